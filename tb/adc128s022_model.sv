// adc128s022_model: behavioural model of an ADC128S022-style 8-channel,
// 12-bit serial converter, for simulation only.
//
// While cs_n is low the converter runs 16-clock frames back to back.  In each
// frame it returns, MSB first, four zeros and the 12-bit result of the channel
// chosen in the previous frame (channel 0 for the first frame after cs_n
// falls), changing dout after each falling sclk edge.  It samples din on
// rising edges; rising edges 3 to 5 of a frame carry the next channel number
// (bits 13:11 of the frame).  The "analog" input of channel c is levels[c].
// Every result it returns is also pushed onto hist[c], so a testbench can
// compare what reached the far end with what the converter produced.
module adc128s022_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic        din,
  output logic        dout,
  input  logic [11:0] levels [8]
);

  logic [15:0] word;
  logic [2:0]  addr, next_addr;
  int          fcnt, rcnt;
  int          conversions;
  logic [11:0] hist [8][$];

  task automatic start_frame(input logic [2:0] ch);
    word = {4'b0000, levels[ch]};
    hist[ch].push_back(levels[ch]);
    conversions++;
    fcnt = 0;
    rcnt = 0;
  endtask

  initial begin
    conversions = 0;
    word = '0;
    fcnt = 0;
    rcnt = 0;
    addr = '0;
    next_addr = '0;
  end

  always @(negedge cs_n) start_frame(3'd0);

  always @(posedge sclk) if (!cs_n) begin
    if (rcnt >= 2 && rcnt <= 4) next_addr[4 - rcnt] = din;
    rcnt++;
  end

  always @(negedge sclk) if (!cs_n) begin
    fcnt++;
    if (fcnt == 16) begin
      addr = next_addr;
      start_frame(addr);
    end
  end

  assign dout = cs_n ? 1'b0 : word[15 - fcnt[3:0]];

endmodule
