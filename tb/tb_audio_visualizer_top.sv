// tb_audio_visualizer_top: end-to-end testbench of audio_visualizer_top at
// its default parameters.
//
// Around the FPGA logic sit a converter model (channel 0 held at 0xA5C,
// channel 1 carrying two tones that land in FFT bins 3 and 6 at one sample
// per 1024 clocks), a panel model, and a procedural model of the processor.
// One complete display update is run:
//
//   1. the processor takes the first 16 words from the sample stream; each
//      must carry sample number 0..15 and the channel-1 result the converter
//      produced for that pair;
//   2. it computes the 16-point spectrum of those samples (mean removed),
//      clears a 96x64 frame, draws one 5-pixel-wide bar per bin in that
//      bin's colour, checks that the tallest bar is bin 3, and sends six
//      command bytes and the 12288 pixel bytes through the display master,
//      polling its idle flag before every byte;
//   3. meanwhile it stops reading the stream, so the FIFO fills and the
//      converter overwrites untaken words; afterwards it drains the FIFO and
//      checks that sample numbers still run on without a gap.
//
// The panel's frame must then equal the one drawn.  Each mechanism (FIFO
// full, converter overrun, stream stall, sample-number wrap, command byte,
// data byte, busy poll) is counted and must have happened.
module tb_audio_visualizer_top;
  import av_pkg::*;

  localparam int W = 96, H = 64, NB = 16;

  logic        clk = 1'b0;
  logic [1:0]  key;
  logic [7:0]  led;
  logic        adc_cs_n, adc_saddr, adc_sclk, adc_sdat;
  logic        st_ready, st_valid;
  logic [31:0] st_data;
  logic        spi_write, spi_read;
  logic [31:0] spi_writedata, spi_readdata;
  logic        rgb_din, rgb_clk, rgb_cs, rgb_dc, rgb_res;
  logic [11:0] levels [8];

  int checks = 0, failures = 0;

  audio_visualizer_top dut (.clk_50(clk), .*);
  adc128s022_model u_adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .din(adc_saddr),
                          .dout(adc_sdat), .levels);
  oled_panel_model u_panel (.din(rgb_din), .clk(rgb_clk), .cs(rgb_cs),
                            .dc(rgb_dc), .res(rgb_res));

  always #10 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- analog input: two tones on channel 1 --------------------------
  localparam real PI = 3.14159265358979;
  longint cyc = 0;
  always @(posedge clk) begin
    real t;
    cyc++;
    t = real'(cyc) / (16.0 * 1024.0);
    levels[1] <= 12'($rtoi(2048.0 + 1200.0 * $sin(2.0 * PI * 3.0 * t)
                                   + 500.0 * $sin(2.0 * PI * 6.0 * t)));
  end

  // ---- mechanism counters (all seen at the top's ports) ---------------
  int n_stall = 0, n_wrap = 0, n_poll = 0, n_full = 0, n_overrun = 0;
  always @(posedge clk) begin
    if (key[0]) begin
      if (st_valid && !st_ready) n_stall++;
      if (st_valid && st_ready && st_data[19:16] == 4'hF) n_wrap++;
    end
  end

  // ---- processor model ------------------------------------------------
  logic [15:0] frame [W*H];
  logic [15:0] colors [NB];

  task automatic spi_send(input logic cmd, input logic [7:0] b);
    while (spi_readdata[0] == 1'b0) begin
      n_poll++;
      @(posedge clk);
      #1;
    end
    spi_writedata = {23'b0, cmd, b};
    spi_write = 1'b1;
    @(posedge clk);
    #1 spi_write = 1'b0;
  endtask

  task automatic take_word(output logic [31:0] w);
    st_ready = 1'b1;
    while (!st_valid) begin
      @(posedge clk);
      #1;
    end
    w = st_data;
    @(posedge clk);
    #1 st_ready = 1'b0;
  endtask

  initial begin
    logic [31:0] w;
    logic [11:0] s [NB];
    real mag [NB], re, im, mean, peak;
    int  h [NB], best, bad, tag, prev_tag;

    foreach (levels[i]) levels[i] = 12'h000;
    levels[0] = 12'hA5C;
    for (int k = 0; k < NB; k++)   // colour of each column, red through blue
      colors[k] = {5'(31 - 2 * k), 6'(k * 4), 5'(2 * k)};
    st_ready = 1'b0; spi_write = 1'b0; spi_read = 1'b1; spi_writedata = '0;
    key = 2'b10;
    repeat (5) @(posedge clk);
    #1 key = 2'b11;

    // 1. gather 16 samples
    for (int k = 0; k < NB; k++) begin
      take_word(w);
      check(w[31:20] == 12'b0 && w[15:12] == 4'b0, "unused bits of a stream word are zero");
      check(w[19:16] == 4'(k), $sformatf("sample number %0d expected %0d", w[19:16], k));
      check(u_adc.hist[1].size() > k && w[11:0] == u_adc.hist[1][k],
            $sformatf("sample %0d value %h", k, w[11:0]));
      check(led[7:4] == 4'hA, "LEDs show channel 0 top bits");
      s[k] = w[11:0];
    end
    prev_tag = 15;

    // 2. spectrum, bars, frame
    mean = 0.0;
    for (int k = 0; k < NB; k++) mean += real'(s[k]) / NB;
    peak = 0.0; best = 0;
    for (int f = 0; f < NB; f++) begin
      re = 0.0; im = 0.0;
      for (int k = 0; k < NB; k++) begin
        re += (real'(s[k]) - mean) * $cos(2.0 * PI * f * k / NB);
        im -= (real'(s[k]) - mean) * $sin(2.0 * PI * f * k / NB);
      end
      mag[f] = $sqrt(re * re + im * im);
      if (f <= NB / 2 && mag[f] > peak) begin peak = mag[f]; best = f; end
    end
    check(best == 3, $sformatf("strongest bin %0d expected 3", best));
    foreach (frame[i]) frame[i] = 16'h0000;                // clean
    for (int f = 0; f < NB; f++) begin                     // fill each column
      h[f] = (peak > 0.0) ? $rtoi(60.0 * mag[f] / peak) : 0;
      if (h[f] < 0) h[f] = 0;
      if (h[f] > H) h[f] = H;
      for (int y = H - h[f]; y < H; y++)
        for (int x = f * 6; x < f * 6 + 5; x++)
          frame[y * W + x] = colors[f];
    end
    spi_send(1'b1, 8'h15); spi_send(1'b1, 8'h00); spi_send(1'b1, 8'(W - 1));
    spi_send(1'b1, 8'h75); spi_send(1'b1, 8'h00); spi_send(1'b1, 8'(H - 1));
    for (int i = 0; i < W * H; i++) begin
      spi_send(1'b0, frame[i][15:8]);
      spi_send(1'b0, frame[i][7:0]);
    end
    while (spi_readdata[0] == 1'b0) @(posedge clk);
    #1;

    bad = 0;
    for (int i = 0; i < W * H; i++) if (u_panel.frame[i] != frame[i]) bad++;
    check(bad == 0, $sformatf("%0d panel pixels differ", bad));
    check(u_panel.n_cmd == 6 && u_panel.n_data == 2 * W * H && u_panel.n_bad == 0,
          "panel byte counts");
    check(u_panel.n_reset == 1, "panel reset pulsed once");

    // 3. drain the FIFO that filled meanwhile.  It holds 15 words (pairs
    // 16..30, taken right after step 1) and the converter holds one more,
    // the newest pair, all ready back to back; later words come one per
    // 1024 clocks.
    begin
      int run, last;
      run = 0;
      st_ready = 1'b1;
      #1;
      while (st_valid) begin
        w   = st_data;
        tag = int'(w[19:16]);
        check(tag == (prev_tag + 1) % 16, $sformatf("sample number %0d after %0d", tag, prev_tag));
        check(w[31:20] == 12'b0 && w[15:12] == 4'b0, "unused bits zero after drain");
        if (run < 15)
          check(w[11:0] == u_adc.hist[1][16 + run], $sformatf("stored word %0d value %h", run, w[11:0]));
        else begin
          last = u_adc.hist[1].size() - 1;
          if (w[11:0] != u_adc.hist[1][31] &&
              (w[11:0] == u_adc.hist[1][last] || w[11:0] == u_adc.hist[1][last - 1]))
            n_overrun++;
          check(n_overrun == 1, "word held by the converter is the newest conversion");
        end
        prev_tag = tag;
        run++;
        @(posedge clk);
        #1;
      end
      st_ready = 1'b0;
      if (run >= 15) n_full++;
      check(run == 16, $sformatf("%0d words ready back to back after the stall", run));
    end

    $display("FIFO-full episodes %0d, converter overruns %0d, stream stalls %0d, sample-number wraps %0d",
             n_full, n_overrun, n_stall, n_wrap);
    $display("command bytes %0d, data bytes %0d, busy polls %0d", u_panel.n_cmd, u_panel.n_data, n_poll);
    check(n_full > 0, "FIFO full happened");
    check(n_overrun > 0, "converter overrun happened");
    check(n_stall > 0, "stream stall happened");
    check(n_wrap > 0, "sample-number wrap happened");
    check(u_panel.n_cmd > 0 && u_panel.n_data > 0, "command and data bytes sent");
    check(n_poll > 0, "busy polling happened");
    $display("bars: %p", h);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
