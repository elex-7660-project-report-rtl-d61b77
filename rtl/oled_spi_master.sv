// oled_spi_master: Avalon-MM slave that sends single bytes to an SPI RGB OLED
// panel (96x64, 16-bit colour, SSD1331-style controller).
//
// How it works.  A bus write loads a byte and a command flag and starts a
// transfer: chip select falls, the byte is shifted out MSB first on mosi,
// one bit per N clocks, with sclk low for the first N/2 clocks of each bit
// and high for the second N/2 (the panel latches mosi on the rising edge).
// mosi moves to the next bit on the falling edge.  After the eighth bit,
// chip select rises again and sclk stays low until the next write.  The
// data/command line is driven from the flag for the whole transfer.
//
// Interface.  writedata[7:0] is the byte, writedata[8] set marks a command
// byte (dcn low), clear a data byte (dcn high).  readdata is a status word
// whose bit 0 is 1 when the master is idle, so software polls it before
// each write.  A write during a transfer abandons it and starts the new one.
// resetn, the panel's reset, follows the system reset.
//
// Timing.  Chip select is low for exactly 8*N clocks per byte, starting one
// clock after the write; with N = 16 and a 50 MHz clock sclk runs at
// 3.125 MHz and a byte takes 2.56 us.
//
// From the original design: the Avalon-MM write/read ports, N = 16 clocks per bit,
// MSB-first 8-bit transfers, D/C from bit 8 inverted, the idle flag as
// status bit 0, restart on a write, and resetn from the system reset.  This
// design's own choices: sclk is held low between transfers instead of
// running freely, and mosi presents bit 7 from the first clock of a
// transfer.
module oled_spi_master
  import av_pkg::*;
#(
  parameter int N = 16  // system clocks per sclk period, even
) (
  input  logic [31:0] writedata,  // Avalon-MM bus
  output logic [31:0] readdata,
  input  logic        read,
  input  logic        write,

  output logic sclk,    // SPI master
  output logic mosi,
  output logic csn,
  output logic dcn,
  output logic resetn,

  input  logic reset,
  input  logic clk
);

  localparam int JW = (N > 2) ? $clog2(N / 2) : 1;

  spi_word_t     wr;
  logic [7:0]    shreg;
  logic [2:0]    bit_idx;
  logic [JW-1:0] j;
  logic          half;

  assign wr     = spi_word_t'(writedata);
  assign half   = (j == JW'(N / 2 - 1));
  assign resetn = !reset;

  // status register: bit 0 is the idle flag; reads have no side effects
  assign readdata = {31'b0, csn};

  always_ff @(posedge clk) begin
    if (reset) begin
      shreg   <= '0;
      bit_idx <= '0;
      j       <= '0;
      sclk    <= 1'b0;
      mosi    <= 1'b0;
      csn     <= 1'b1;
      dcn     <= 1'b1;
    end else if (write) begin
      shreg   <= wr.data;
      bit_idx <= 3'd7;
      j       <= '0;
      sclk    <= 1'b0;
      mosi    <= wr.data[7];
      csn     <= 1'b0;
      dcn     <= !wr.command;
    end else if (!csn) begin
      j <= half ? '0 : j + 1'b1;
      if (half) begin
        sclk <= !sclk;
        if (sclk) begin               // falling edge: next bit or done
          if (bit_idx == 3'd0) begin
            csn <= 1'b1;
          end else begin
            bit_idx <= bit_idx - 1'b1;
            mosi    <= shreg[bit_idx - 1'b1];
          end
        end
      end
    end
  end

  a_idle_sclk_low : assert property (@(posedge clk) disable iff (reset)
                                     csn |-> !sclk);

endmodule
