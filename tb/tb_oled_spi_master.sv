// tb_oled_spi_master: self-checking testbench of oled_spi_master.
//
// Writes random bytes, each marked as command or data at random, through the
// Avalon-MM port, polling the status register for the idle flag in between,
// as the display software does.  A panel model on the SPI side collects the
// bytes; each must arrive intact with the data/command line set as written
// (bit 8 set gives dc low).  Chip select must be low for exactly 8*N = 128
// clocks per byte, sclk must rise eight times per byte and rest low, and
// the panel reset must follow the system reset.  Finally a write in the
// middle of a transfer must restart it with the new byte.
module tb_oled_spi_master;
  import av_pkg::*;

  logic        clk = 1'b0, reset;
  logic [31:0] writedata, readdata;
  logic        read, write;
  logic        sclk, mosi, csn, dcn, resetn;

  int checks = 0, failures = 0;

  oled_spi_master dut (.writedata, .readdata, .read, .write,
                       .sclk, .mosi, .csn, .dcn, .resetn, .reset, .clk);
  oled_panel_model u_panel (.din(mosi), .clk(sclk), .cs(csn), .dc(dcn), .res(resetn));

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

  int sclk_rises = 0;
  always @(posedge sclk) sclk_rises++;

  initial begin
    int busy, n_before, rises;
    logic [7:0] b;
    bit cmd;
    write = 1'b0; read = 1'b0; writedata = '0;
    reset = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    check(!resetn && csn, "panel reset low and idle during reset");
    reset = 1'b0;
    #1;
    check(resetn, "panel reset released");
    read = 1'b1;
    #1 check(readdata == 32'h1, "status idle after reset");

    for (int n = 0; n < 200; n++) begin
      b   = 8'($urandom);
      cmd = 1'($urandom);
      n_before = cmd ? u_panel.n_cmd : u_panel.n_data;
      rises  = sclk_rises;
      writedata = {23'($urandom), cmd, b};
      write = 1'b1;
      @(posedge clk);
      #1 write = 1'b0;
      busy = 0;
      while (readdata[0] == 1'b0) begin
        check(!csn, "chip select low while busy");
        busy++;
        @(posedge clk);
        #1;
      end
      check(busy == 128, $sformatf("transfer took %0d clocks", busy));
      check(!sclk, "sclk rests low");
      check(sclk_rises - rises == 8, "eight sclk pulses per byte");
      check((cmd ? u_panel.n_cmd : u_panel.n_data) == n_before + 1, "byte counted as command/data");
      check(u_panel.last_byte == b, $sformatf("byte %h expected %h", u_panel.last_byte, b));
      check(u_panel.last_dc == !cmd, "data/command line");
      repeat ($urandom_range(3)) @(posedge clk);
      #1;
    end
    check(u_panel.n_bad == 0, "no partial transfers");

    // a write during a transfer abandons it and sends the new byte in full
    writedata = 32'h0000_01A5;
    write = 1'b1;
    @(posedge clk);
    #1 write = 1'b0;
    repeat (40) @(posedge clk);
    #1 writedata = 32'h0000_003C;
    write = 1'b1;
    @(posedge clk);
    #1 write = 1'b0;
    busy = 0;
    while (readdata[0] == 1'b0) begin
      busy++;
      @(posedge clk);
      #1;
    end
    check(busy == 128, $sformatf("restarted transfer took %0d clocks", busy));
    check(u_panel.sr == 8'h3C && dcn, "restarted transfer ends with the new byte as data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
