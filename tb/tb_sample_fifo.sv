// tb_sample_fifo: self-checking testbench of sample_fifo.
//
// Random ivalid and oready patterns, at several densities so that the buffer
// runs both empty and full, are checked against a reference queue kept by the
// testbench.  Every word taken must equal {12'b0, n mod 16, sample} where n
// counts the words accepted so far; iready must be low exactly when 15 words
// are held and ovalid high exactly when at least one is; a word written into
// an empty buffer must be offered on the next clock.
module tb_sample_fifo;
  import av_pkg::*;

  logic        clk = 1'b0, reset;
  logic        iready, ivalid, oready, ovalid;
  logic [31:0] idata, odata;

  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_pop = 0;

  sample_fifo dut (.iready, .ivalid, .idata, .oready, .ovalid, .odata, .reset, .clk);

  always #10 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] model [$];
  int unsigned pushed = 0;

  initial begin
    int pin, pout;
    bit was_empty;
    ivalid = 1'b0; oready = 1'b0; idata = '0;
    reset = 1'b1;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    #1;
    check(!ovalid && iready, "empty after reset");

    // latency: one word into the empty buffer is offered on the next clock
    ivalid = 1'b1; idata = 32'hDEAD_0042;
    @(posedge clk);
    #1 ivalid = 1'b0;
    check(ovalid && odata == 32'h0000_0042, "first word offered after one clock");
    model.push_back(32'h0000_0042);
    pushed = 1;

    for (int phase = 0; phase < 6; phase++) begin
      case (phase)
        0: begin pin = 90; pout = 10; end   // fill up
        1: begin pin = 10; pout = 90; end   // drain
        2: begin pin = 50; pout = 50; end
        3: begin pin = 100; pout = 0; end   // stay full
        4: begin pin = 0; pout = 100; end   // stay empty
        default: begin pin = 70; pout = 60; end
      endcase
      repeat (2000) begin
        ivalid = ($urandom_range(99) < pin);
        oready = ($urandom_range(99) < pout);
        idata  = $urandom;
        #1;
        check(iready == (model.size() < 15), "iready tracks the fill level");
        check(ovalid == (model.size() > 0), "ovalid tracks the fill level");
        if (!iready) n_full++;
        if (!ovalid) n_empty++;
        if (ovalid && oready) begin
          check(odata == model[0], $sformatf("odata %h expected %h", odata, model[0]));
          void'(model.pop_front());
          n_pop++;
        end
        if (ivalid && iready) begin
          model.push_back({12'b0, 4'(pushed), idata[15:0]});
          pushed++;
        end
        @(posedge clk);
        #1;
      end
    end
    check(n_full > 100 && n_empty > 100 && n_pop > 1000, "full, empty and throughput exercised");
    $display("full cycles %0d, empty cycles %0d, words moved %0d", n_full, n_empty, n_pop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
