// tb_rtvps_gmo_top_full: one whole VGA frame through the default design.
//
// The top is used exactly as delivered (distributed pointers, 640-pixel
// lines, 12-bit pixels, 5x5 window). A 640 x 480 frame of pixels generated
// from a hash of the pixel's coordinates is streamed in raster order with
// random stalls. After each accepted pixel every window tap is compared
// with the frame pixel it must hold,
//   win[i][j] = frame[r - (4-i)][c - (4-j)]  for pixel (r, c) four places back,
// i.e. stream position n - 4 - (4-i)*640 - (4-j). The run counts stalls and
// the BR1 -> BR2 port B hand-overs and returns (one of each per line, the last return after the final pixel) and
// checks the window-valid pulse follows each pixel by one clock.
module tb_rtvps_gmo_top_full;
  import gmo_pkg::*;
  localparam int LL = LINE_L;
  localparam int NL = N_LINES;
  localparam int ROWS = 480;
  logic clk = 1'b0, rst, valid;
  logic [PIX_W-1:0]                       pix;
  logic [WIN_N-1:0][WIN_N-1:0][PIX_W-1:0] win;
  logic                                   wv;
  logic [NPART-1:0]                       pen, pen_prev;
  int n, checks = 0, failures = 0;
  int stalls = 0, to_br2 = 0, to_br1 = 0, windows = 0;

  rtvps_gmo_top dut (
    .clk, .rst, .pix_valid_i(valid), .pix_i(pix),
    .win_o(win), .win_valid_o(wv), .part_en_o(pen));

  always #5 clk = ~clk;

  // Pixel value at stream position p (row p/640, column p%640).
  function automatic logic [PIX_W-1:0] frame_px(int p);
    int unsigned h;
    h = 32'(p / LL) * 32'd2654435761 ^ 32'(p % LL) * 32'd40503;
    h = h ^ (h >> 13);
    return PIX_W'(h);
  endfunction

  initial begin
    repeat (ROWS * LL * 2) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; valid = 0; pix = '0; n = 0;
    @(posedge clk); #1; rst = 0;
    pen_prev = pen;
    while (n < ROWS * LL) begin
      valid = ($urandom % 8) != 0;
      pix = valid ? frame_px(n) : PIX_W'($urandom);
      @(posedge clk); #1;
      checks++;
      if (wv != valid) failures++;
      if (pen[P_BR2_B] && !pen_prev[P_BR2_B]) to_br2++;
      if (pen[P_BR1_A] && !pen_prev[P_BR1_A]) to_br1++;
      pen_prev = pen;
      if (!valid) begin
        stalls++;
        continue;
      end
      if (n >= NL + NL*LL + NL) begin
        windows++;
        for (int i = 0; i < WIN_N; i++)
          for (int j = 0; j < WIN_N; j++) begin
            checks++;
            if (win[i][j] != frame_px(n - NL - (NL-i)*LL - (NL-j))) begin
              failures++;
              if (failures < 10) $display("n=%0d win[%0d][%0d]=%h", n, i, j, win[i][j]);
            end
          end
      end
      n++;
    end
    $display("stalls=%0d BR1->BR2=%0d BR2->BR1=%0d windows=%0d", stalls, to_br2, to_br1,
             windows);
    checks += 3;
    if (stalls == 0) failures++;
    if (to_br2 != ROWS) failures++;
    if (to_br1 != ROWS) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
