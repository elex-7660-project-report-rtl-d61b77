// sample_fifo: the 16 x 20-bit buffer between the converter and the processor.
//
// How it works.  A circular buffer of DEPTH entries with a read and a write
// pointer.  Each accepted input word stores its low 16 bits (one 16-bit
// sample frame) together with the write pointer, which serves as the sample
// number: entry k always carries tag k, so the reader can tell where a
// sample falls in a run of DEPTH consecutive samples (the FFT on the
// processor side works on 16 samples).  The buffer is empty when the
// pointers are equal and full when advancing the write pointer would make
// them equal, so at most DEPTH-1 words are held.
//
// Interface.  Input: ready/valid (`iready`, `ivalid`, `idata`); a word moves
// on a clock edge where both are high.  Output: Avalon-ST style (`oready`,
// `ovalid`, `odata`); `odata` = {zeros, tag, sample} shows the oldest entry
// whenever `ovalid` is high, and advances on a clock edge with both high.
// Only idata[15:0] is stored; the upper half of the input word is dropped.
//
// Timing.  A word written into an empty buffer appears on the output on the
// next clock.  One word can enter and one leave on every clock.
//
// From the original design: 16 entries of 20 bits, the 16-bit sample in the low bits
// and the 4-bit sample number on top, pointer-based full/empty flags that
// keep one entry free, the two handshakes and the storing of only the low
// 16 input bits.  This design's own choices: the output is read
// combinationally from the oldest entry (first-word fall-through) rather than
// through a look-ahead register, and the tag is written with the sample
// rather than preset in the array.
module sample_fifo
  import av_pkg::*;
#(
  parameter int DEPTH     = FIFO_DEPTH,     // entries, a power of two
  parameter int DATA_BITS = FIFO_DATA_BITS  // sample bits stored per entry
) (
  output logic        iready,  // ready/valid input
  input  logic        ivalid,
  input  logic [31:0] idata,

  input  logic        oready,  // Avalon-ST output
  output logic        ovalid,
  output logic [31:0] odata,

  input  logic reset,
  input  logic clk
);

  localparam int AW = $clog2(DEPTH);
  localparam int EW = AW + DATA_BITS;

  logic [EW-1:0] mem [DEPTH];
  logic [AW-1:0] rdp, wrp;
  logic          push, pop;

  assign ovalid = (rdp != wrp);
  assign iready = (wrp + 1'b1) != rdp;
  assign push   = ivalid && iready;
  assign pop    = oready && ovalid;
  assign odata  = 32'(mem[rdp]);

  always_ff @(posedge clk) begin
    if (reset) begin
      rdp <= '0;
      wrp <= '0;
    end else begin
      if (push) wrp <= wrp + 1'b1;
      if (pop)  rdp <= rdp + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (push) mem[wrp] <= {wrp, idata[DATA_BITS-1:0]};

  // Avalon-ST: a valid word stays valid and unchanged until it is taken
  a_out_held   : assert property (@(posedge clk) disable iff (reset)
                                  ovalid && !oready |=> ovalid && $stable(odata));
  a_not_over   : assert property (@(posedge clk) disable iff (reset)
                                  !iready |-> !push);

endmodule
