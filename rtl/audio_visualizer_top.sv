// audio_visualizer_top: FPGA side of a 16-band audio spectrum display.
//
// Audio, shifted and amplified off-chip, is digitised by the board's serial
// ADC; the processor reads 16 consecutive samples, computes a 16-point FFT
// and draws one coloured bar per frequency bin into a 96x64 frame buffer,
// which it sends pixel by pixel to an RGB OLED panel.  This module holds the
// custom hardware of that system:
//
//   adc_spi        reads channels 0 and 1 of the ADC without pause and
//                  offers one 32-bit word (both samples) every 1024 clocks;
//   sample_fifo    buffers those words, keeping the channel-1 sample with a
//                  4-bit sample number, and hands them to the processor's
//                  streaming input (st_*);
//   oled_spi_master  takes byte writes from the processor's Avalon-MM bus
//                  (spi_*) and shifts them to the panel (rgb_*).
//
// The processor, its SDRAM, PLL and bus fabric are not part of this RTL: the
// FIFO's stream output and the display master's slave port are brought out
// as ports instead.  The LEDs show the top four bits of the most recent
// channel-0 sample (led[7:4]) and channel-1 sample (led[3:0]).
//
// Reset.  key[0] is the active-low reset button.  It is passed through a
// two-flop synchroniser (this design's stand-in for the platform's reset
// controller), so every block leaves reset on the same clock edge.  key[1]
// is unused, as on the original board.
//
// Timing.  All logic runs on the one 50 MHz clock.  At the defaults a new
// sample pair enters the FIFO every 1024 clocks (20.48 us) and a display
// byte takes 128 clocks.
module audio_visualizer_top
  import av_pkg::*;
(
  input  logic        clk_50,
  input  logic [1:0]  key,
  output logic [7:0]  led,

  // serial ADC on the 2x13 header
  output logic        adc_cs_n,
  output logic        adc_saddr,
  output logic        adc_sclk,
  input  logic        adc_sdat,

  // sample stream to the processor (Avalon-ST sink on that side)
  input  logic        st_ready,
  output logic        st_valid,
  output logic [31:0] st_data,

  // display master's Avalon-MM slave port
  input  logic        spi_write,
  input  logic        spi_read,
  input  logic [31:0] spi_writedata,
  output logic [31:0] spi_readdata,

  // OLED panel
  output logic        rgb_din,
  output logic        rgb_clk,
  output logic        rgb_cs,
  output logic        rgb_dc,
  output logic        rgb_res
);

  logic [1:0] rst_sync;
  logic       reset;

  always_ff @(posedge clk_50)
    rst_sync <= {rst_sync[0], !key[0]};
  assign reset = rst_sync[1];

  // converter to FIFO
  logic        adc_ready, adc_valid;
  adc_pair_t   adc_data;

  adc_spi u_adc (
    .sclk  (adc_sclk),
    .mosi  (adc_saddr),
    .ssn   (adc_cs_n),
    .miso  (adc_sdat),
    .ready (adc_ready),
    .valid (adc_valid),
    .data  (adc_data),
    .clk   (clk_50),
    .reset (reset)
  );

  // debug: most significant result bits of both channels
  assign led = {adc_data.ch0[ADC_BITS-1 -: 4], adc_data.ch1[ADC_BITS-1 -: 4]};

  sample_fifo u_fifo (
    .iready (adc_ready),
    .ivalid (adc_valid),
    .idata  (adc_data),
    .oready (st_ready),
    .ovalid (st_valid),
    .odata  (st_data),
    .reset  (reset),
    .clk    (clk_50)
  );

  oled_spi_master u_spi (
    .writedata (spi_writedata),
    .readdata  (spi_readdata),
    .read      (spi_read),
    .write     (spi_write),
    .sclk      (rgb_clk),
    .mosi      (rgb_din),
    .csn       (rgb_cs),
    .dcn       (rgb_dc),
    .resetn    (rgb_res),
    .reset     (reset),
    .clk       (clk_50)
  );

endmodule
