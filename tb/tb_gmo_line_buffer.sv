// tb_gmo_line_buffer: self-checking test of the four packed line buffers.
//
// Two instances, one per address scheme (distributed and base pointer),
// take the same random 12-bit pixel stream with random gaps in valid. The
// testbench keeps the whole stream and checks, whenever pixel n is
// presented, that tap k (k = 1..4) equals pixel n - k*(640+1), once that
// pixel exists, and that both instances enable the same partitions. It
// counts hand-overs between the two partitions of segment 1 (BR1 -> BR2
// and back) and requires several of each.
module tb_gmo_line_buffer;
  import gmo_pkg::*;
  logic clk = 1'b0, rst, valid;
  logic [PIX_W-1:0]              pix;
  logic [N_LINES-1:0][PIX_W-1:0] taps_d, taps_b;
  logic [NPART-1:0]              pen_d, pen_b, pen_prev;
  logic [PIX_W-1:0] hist [16384];
  localparam int LL = LINE_L;
  int n, checks = 0, failures = 0, to_br2 = 0, to_br1 = 0, stalls = 0;

  gmo_line_buffer #(.SCHEME(ADDR_DISTRIBUTED)) u_dist (
    .clk, .rst, .valid_i(valid), .pix_i(GMO_W'(pix)), .lines_o(taps_d), .part_en_o(pen_d));
  gmo_line_buffer #(.SCHEME(ADDR_BASE_POINTER)) u_base (
    .clk, .rst, .valid_i(valid), .pix_i(GMO_W'(pix)), .lines_o(taps_b), .part_en_o(pen_b));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; valid = 0; pix = '0; n = 0;
    @(posedge clk); #1; rst = 0;
    pen_prev = pen_d;
    while (n < 7 * LINE_L) begin
      valid = ($urandom % 6) != 0;
      pix = PIX_W'($urandom);
      if (valid) hist[n] = pix;
      #1;
      checks++;
      if (pen_d != pen_b) failures++;
      if (pen_d[P_BR2_B] && !pen_prev[P_BR2_B]) to_br2++;
      if (pen_d[P_BR1_A] && !pen_prev[P_BR1_A]) to_br1++;
      pen_prev = pen_d;
      if (valid) begin
        for (int k = 1; k <= N_LINES; k++) begin
          if (n - k*(LL+1) >= 0) begin
            checks += 2;
            if (taps_d[k-1] != hist[n - k*(LL+1)]) begin
              failures++;
              if (failures < 10) $display("dist n=%0d tap %0d = %h exp %h", n, k,
                                          taps_d[k-1], hist[n - k*(LL+1)]);
            end
            if (taps_b[k-1] != hist[n - k*(LL+1)]) begin
              failures++;
              if (failures < 10) $display("base n=%0d tap %0d = %h", n, k, taps_b[k-1]);
            end
          end
        end
        n++;
      end else stalls++;
      @(posedge clk); #1;
    end
    checks++;
    if (to_br2 < 5 || to_br1 < 5 || stalls == 0) failures++;
    $display("hand-overs BR1->BR2 %0d, BR2->BR1 %0d, stalls %0d", to_br2, to_br1, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
