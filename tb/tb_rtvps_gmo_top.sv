// tb_rtvps_gmo_top: end-to-end test of the 5x5 window generator.
//
// The design at its default size (640-pixel lines, 12-bit pixels, 5x5
// window, distributed pointers) and a second copy using the base pointer
// scheme take the same random video stream: 12 lines of 640 pixels with
// random gaps in valid. After pixel n has been taken, every window tap
// win[i][j] must equal pixel n - 4 - (4-i)*640 - (4-j) of the stream,
// window-valid must follow each accepted pixel by exactly one clock, and
// both copies must agree. The run must see stalls, the hand-over of the
// 32-bit segment from BR1 to BR2 port B, its return to BR1 at the end of
// the line, and both address schemes producing checked windows.
module tb_rtvps_gmo_top;
  import gmo_pkg::*;
  localparam int LL = LINE_L;
  localparam int NL = N_LINES;
  logic clk = 1'b0, rst, valid;
  logic [PIX_W-1:0]                       pix;
  logic [WIN_N-1:0][WIN_N-1:0][PIX_W-1:0] win_d, win_b;
  logic                                   wv_d, wv_b;
  logic [NPART-1:0]                       pen_d, pen_b, pen_prev;
  logic [PIX_W-1:0] hist [8192];
  int n, checks = 0, failures = 0;
  int stalls = 0, to_br2 = 0, to_br1 = 0, win_checked = 0;

  rtvps_gmo_top dut (
    .clk, .rst, .pix_valid_i(valid), .pix_i(pix),
    .win_o(win_d), .win_valid_o(wv_d), .part_en_o(pen_d));

  rtvps_gmo_top #(.SCHEME(ADDR_BASE_POINTER)) dut_base (
    .clk, .rst, .pix_valid_i(valid), .pix_i(pix),
    .win_o(win_b), .win_valid_o(wv_b), .part_en_o(pen_b));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("n=%0d mismatch: %s", n, what);
    end
  endtask

  initial begin
    rst = 1; valid = 0; pix = '0; n = 0;
    @(posedge clk); #1; rst = 0;
    pen_prev = pen_d;
    while (n < 12 * LL) begin
      valid = ($urandom % 5) != 0;
      pix = PIX_W'($urandom);
      if (valid) hist[n] = pix;
      @(posedge clk); #1;
      chk(wv_d == valid && wv_b == valid, "window valid one clock after pixel");
      chk(pen_d == pen_b, "same partitions in both schemes");
      if (pen_d[P_BR2_B] && !pen_prev[P_BR2_B]) to_br2++;
      if (pen_d[P_BR1_A] && !pen_prev[P_BR1_A]) to_br1++;
      pen_prev = pen_d;
      if (!valid) begin
        stalls++;
        continue;
      end
      // pixel n has been taken
      if (n >= NL + NL*LL + NL) begin
        win_checked++;
        for (int i = 0; i < WIN_N; i++)
          for (int j = 0; j < WIN_N; j++) begin
            logic [PIX_W-1:0] e;
            e = hist[n - NL - (NL-i)*LL - (NL-j)];
            chk(win_d[i][j] == e, $sformatf("distributed win[%0d][%0d]", i, j));
            chk(win_b[i][j] == e, $sformatf("base pointer win[%0d][%0d]", i, j));
          end
      end
      n++;
    end
    $display("stalls=%0d BR1->BR2=%0d BR2->BR1=%0d windows=%0d", stalls, to_br2, to_br1,
             win_checked);
    chk(stalls > 0, "stall seen");
    chk(to_br2 >= 10, "hand-over to BR2 port B seen");
    chk(to_br1 >= 10, "return to BR1 seen");
    chk(win_checked > 4 * LL, "windows checked in both schemes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
