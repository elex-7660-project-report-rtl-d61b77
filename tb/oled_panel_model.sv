// oled_panel_model: behavioural model of the serial side of a 96x64 RGB OLED
// panel (SSD1331-style), for simulation only.
//
// While cs is low it shifts din in on rising clk edges, MSB first; each group
// of eight bits is one byte, taken as a command when dc is low and as display
// data when dc is high.  A command byte moves the write position back to the
// first pixel; data bytes fill the 96x64 frame of 16-bit RGB565 pixels in
// raster order, high byte first.  It counts commands, data bytes and
// transfers whose bit count was not a multiple of eight.
module oled_panel_model (
  input  logic din,
  input  logic clk,
  input  logic cs,
  input  logic dc,
  input  logic res
);

  localparam int W = 96, H = 64;

  logic [15:0] frame [W*H];
  logic [7:0]  sr;
  int          nbits, pix, half;
  int          n_cmd, n_data, n_bad, n_reset;
  logic [7:0]  last_byte;
  logic        last_dc;

  initial begin
    nbits = 0; pix = 0; half = 0;
    n_cmd = 0; n_data = 0; n_bad = 0; n_reset = 0;
    last_byte = '0; last_dc = 1'b0; sr = '0;
    foreach (frame[i]) frame[i] = '0;
  end

  always @(negedge res) n_reset++;

  always @(posedge cs) begin
    if (nbits != 0) n_bad++;
    nbits = 0;
  end

  always @(posedge clk) if (!cs) begin
    sr = {sr[6:0], din};
    nbits++;
    if (nbits == 8) begin
      nbits     = 0;
      last_byte = sr;
      last_dc   = dc;
      if (!dc) begin
        n_cmd++;
        pix  = 0;
        half = 0;
      end else begin
        n_data++;
        if (pix < W*H) begin
          if (half == 0) frame[pix][15:8] = sr;
          else begin
            frame[pix][7:0] = sr;
            pix++;
          end
          half ^= 1;
        end
      end
    end
  end

endmodule
