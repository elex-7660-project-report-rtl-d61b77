// tb_adc_spi: self-checking testbench of adc_spi against a converter model.
//
// The model returns levels[c] for channel c.  For each round the testbench
// sets new random levels on channels 0 and 1, lets one word go by, and checks
// that the next word is {4'b0, level0, 4'b0, level1}: this shows that the
// channel numbers sent on mosi alternate correctly and that the result bits
// are sampled and packed in the right place.  It also checks that words come
// exactly 1024 clocks apart, that sclk has a 32-clock period, that chip
// select stays low, and that a word that is not taken stays offered (with
// the newest data) while the converter keeps running.
module tb_adc_spi;
  import av_pkg::*;

  logic        clk = 1'b0, reset;
  logic        sclk, mosi, ssn, miso, ready, valid;
  logic [31:0] data;
  logic [11:0] levels [8];

  int checks = 0, failures = 0;

  adc_spi dut (.sclk, .mosi, .ssn, .miso, .ready, .valid, .data, .clk, .reset);
  adc128s022_model u_adc (.cs_n(ssn), .sclk, .din(mosi), .dout(miso), .levels);

  always #10 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // cycle counter and timestamps of valid rising
  longint cyc = 0;
  always @(posedge clk) cyc++;

  // sclk period and chip select watch
  longint last_rise = -1;
  int     sclk_bad = 0, sclk_seen = 0;
  always @(posedge clk) if (!reset) begin
    if (dut.rising) begin
      if (last_rise >= 0 && cyc - last_rise != 32) sclk_bad++;
      last_rise = cyc;
      sclk_seen++;
    end
  end

  // wait for a word, take it, return the cycle when it was first offered
  task automatic take(output logic [31:0] w, output longint t);
    while (!valid) @(posedge clk);
    t = cyc;
    #1 ready = 1'b1;
    w = data;
    @(posedge clk);
    #1 ready = 1'b0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w;
    longint t, tprev;
    logic [11:0] a, b;
    foreach (levels[i]) levels[i] = 12'(i * 300 + 7);
    ready = 1'b0;
    reset = 1'b1;
    repeat (5) @(posedge clk);
    #1 reset = 1'b0;

    take(w, tprev);
    for (int r = 0; r < 20; r++) begin
      a = 12'($urandom);
      b = 12'($urandom);
      levels[0] = a;
      levels[1] = b;
      take(w, t);
      check(t - tprev == 1024, "word spacing after level change");
      tprev = t;
      take(w, t);
      check(t - tprev == 1024, "word spacing");
      tprev = t;
      check(w == {4'b0, a, 4'b0, b}, $sformatf("word %h expected %h", w, {4'b0, a, 4'b0, b}));
      check(ssn == 1'b0, "chip select low while running");
    end

    // back-pressure: leave a word untaken for three periods
    while (!valid) @(posedge clk);
    a = 12'hABC; b = 12'h123;
    levels[0] = a; levels[1] = b;
    repeat (3 * 1024) begin
      @(posedge clk);
      check(valid, "valid held while not taken");
    end
    take(w, t);
    check(w == {4'b0, a, 4'b0, b}, "newest word replaces an untaken one");

    check(sclk_seen > 100 && sclk_bad == 0, "sclk period of 32 clocks");

    // reset mid-frame stops the converter and raises chip select
    @(posedge clk);
    #1 reset = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    check(ssn && !valid && !sclk, "reset: ssn high, valid and sclk low");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
