// adc_spi: free-running SPI master for an ADC128S022-style 8-channel,
// 12-bit converter, reading two channels in turn.
//
// How it works.  A clock divider toggles sclk every HALF_PERIOD system
// clocks, so one serial bit takes 2*HALF_PERIOD clocks.  A bit counter and a
// word counter group the bits into CHANNELS frames of FRAME_BITS bits; chip
// select stays low for as long as the block is out of reset, so frames follow
// each other with no gap.  On every rising sclk edge the converter's output
// (miso) is shifted into a receive register; on every falling edge the next
// command bit is put on mosi.  The command bits carry, in bits 13:11 of each
// frame, the channel the converter must convert next.  The converter returns
// the conversion of the channel chosen in the previous frame, so frame w asks
// for channel (w+1) mod CHANNELS and frame 0 always returns channel 0.
// After the last falling edge of the last frame the receive register is
// copied to `data` and `valid` is raised.
//
// Interface.  `data` holds CHANNELS frames of 16 bits, channel 0 in the most
// significant one; each frame is four zeros and the 12-bit result.  `valid`
// stays high until the consumer takes the word with `ready`.  The converter
// never stops: if the consumer has not taken a word when the next pair is
// done, the old word is overwritten and `valid` simply stays high.
//
// Timing.  With the defaults one pair takes 2*16*2*16 = 1024 clocks: at
// 50 MHz sclk is 1.5625 MHz, one conversion is made every 10.24 us and a pair
// is delivered every 20.48 us (about 98 ksps over both channels).  mosi
// changes on falling sclk edges and miso is sampled on rising ones.  ssn is
// the registered reset, so it falls one clock after reset is released.
//
// From the original design: channels 0 and 1, 16-bit frames, sclk = clk/32, the
// channel field in bits 13:11, the 32-bit packing with channel 0 on top,
// the continuous chip select and the ready/valid output.  This design's own
// choices: the reset values of the shift and output registers, and the
// parameterisation of divider, frame length and channel count.
module adc_spi
  import av_pkg::*;
#(
  parameter int HALF_PERIOD = 16,          // system clocks per sclk half period
  parameter int FRAME_BITS  = ADC_FRAME,   // sclk periods per conversion frame
  parameter int CHANNELS    = ADC_CHANNELS // channels read in turn, from 0
) (
  output logic sclk,   // SPI master
  output logic mosi,
  output logic ssn,
  input  logic miso,

  input  logic                           ready,  // ready/valid data out
  output logic                           valid,
  output logic [CHANNELS*FRAME_BITS-1:0] data,

  input  logic clk,
  input  logic reset
);

  localparam int W       = CHANNELS * FRAME_BITS;
  localparam int HC_BITS = (HALF_PERIOD > 1) ? $clog2(HALF_PERIOD) : 1;
  localparam int BC_BITS = $clog2(FRAME_BITS);
  localparam int WC_BITS = (CHANNELS > 1) ? $clog2(CHANNELS) : 1;

  // Command pattern shifted out on mosi: frame w selects channel
  // (w+1) mod CHANNELS in its bits 13:11, every other bit is zero.
  function automatic logic [W-1:0] command_word();
    logic [W-1:0] cmd;
    cmd = '0;
    for (int w = 0; w < CHANNELS; w++) begin
      logic [ADC_CHAN_BITS-1:0] nxt;
      nxt = ADC_CHAN_BITS'((w + 1) % CHANNELS);
      for (int b = 0; b < ADC_CHAN_BITS; b++)
        cmd[(CHANNELS-1-w)*FRAME_BITS + 11 + b] = nxt[b];
    end
    return cmd;
  endfunction

  localparam logic [W-1:0] CMD = command_word();

  logic [HC_BITS-1:0] half_cnt;
  logic [BC_BITS-1:0] bit_cnt;
  logic [WC_BITS-1:0] word_cnt;
  logic [W-1:0]       rx_sr, tx_sr;
  logic               tick, rising, falling, last_bit;

  assign tick     = (half_cnt == HC_BITS'(HALF_PERIOD - 1));
  assign rising   = tick && !sclk;
  assign falling  = tick &&  sclk;
  assign last_bit = (bit_cnt == BC_BITS'(FRAME_BITS - 1)) &&
                    (word_cnt == WC_BITS'(CHANNELS - 1));

  // divider and bit/word counters
  always_ff @(posedge clk) begin
    if (reset) begin
      half_cnt <= '0;
      sclk     <= 1'b0;
      bit_cnt  <= '0;
      word_cnt <= '0;
    end else begin
      half_cnt <= tick ? '0 : half_cnt + 1'b1;
      if (tick) sclk <= !sclk;
      if (falling) begin
        if (bit_cnt == BC_BITS'(FRAME_BITS - 1)) begin
          bit_cnt  <= '0;
          word_cnt <= (word_cnt == WC_BITS'(CHANNELS - 1)) ? '0 : word_cnt + 1'b1;
        end else begin
          bit_cnt <= bit_cnt + 1'b1;
        end
      end
    end
  end

  // serial shift registers, parallel output and handshake
  always_ff @(posedge clk) begin
    if (reset) begin
      rx_sr <= '0;
      tx_sr <= CMD;
      mosi  <= CMD[W-1];
      data  <= '0;
      valid <= 1'b0;
    end else begin
      if (rising)
        rx_sr <= {rx_sr[W-2:0], miso};
      if (ready && valid)
        valid <= 1'b0;
      if (falling) begin
        if (last_bit) begin
          data  <= rx_sr;
          valid <= 1'b1;
          tx_sr <= CMD;
          mosi  <= CMD[W-1];
        end else begin
          tx_sr <= {tx_sr[W-2:0], 1'b0};
          mosi  <= tx_sr[W-2];
        end
      end
    end
  end

  // chip select is low whenever the block runs
  always_ff @(posedge clk)
    ssn <= reset;

  // a word that is offered stays offered until it is taken
  a_valid_held : assert property (@(posedge clk) disable iff (reset)
                                  valid && !ready |=> valid);

endmodule
