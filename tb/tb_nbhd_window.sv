// tb_nbhd_window: self-checking test of the N x N tap registers.
//
// Two instances, N = 5 and N = 3, with 8-bit pixels. The testbench keeps
// the history of a random pixel stream and feeds row k with the pixel
// k*(L+1) samples back (L = 9 here), as the packed line buffer delivers
// it. With random gaps in valid it checks that, after pixel n,
// win[i][j] == pixel n - (N-1) - (N-1-i)*L - (N-1-j), and that the valid
// pulse comes one clock after each input.
module tb_nbhd_window;
  localparam int L = 9;
  localparam int W = 8;
  logic clk = 1'b0, rst, valid;
  logic [4:0][W-1:0]       rows5;
  logic [2:0][W-1:0]       rows3;
  logic [4:0][4:0][W-1:0]  win5;
  logic [2:0][2:0][W-1:0]  win3;
  logic                    wv5, wv3;
  logic [W-1:0] hist [8192];
  int n;  // index of the next pixel
  int checks = 0, failures = 0;

  nbhd_window #(.N(5), .PIX_W(W)) u5 (.clk, .rst, .valid_i(valid), .rows_i(rows5),
                                      .win_o(win5), .win_valid_o(wv5));
  nbhd_window #(.N(3), .PIX_W(W)) u3 (.clk, .rst, .valid_i(valid), .rows_i(rows3),
                                      .win_o(win3), .win_valid_o(wv3));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] px(int i);
    return (i >= 0) ? hist[i] : '0;
  endfunction

  initial begin
    rst = 1; valid = 0; rows5 = '0; rows3 = '0; n = 0;
    @(posedge clk); #1; rst = 0;
    for (int t = 0; t < 4000; t++) begin
      valid = ($urandom % 4) != 0;
      if (valid) hist[n] = W'($urandom);
      for (int k = 0; k < 5; k++) rows5[k] = valid ? px(n - k*(L+1)) : W'($urandom);
      for (int k = 0; k < 3; k++) rows3[k] = valid ? px(n - k*(L+1)) : W'($urandom);
      @(posedge clk); #1;
      checks++;
      if (wv5 != valid || wv3 != valid) failures++;
      if (valid) n++;
      if (n > 5*(L+1)) begin
        for (int i = 0; i < 5; i++)
          for (int j = 0; j < 5; j++) begin
            checks++;
            if (win5[i][j] != px(n - 1 - 4 - (4-i)*L - (4-j))) begin
              failures++;
              if (failures < 10) $display("N=5 n=%0d win[%0d][%0d]=%h", n, i, j, win5[i][j]);
            end
          end
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) begin
            checks++;
            if (win3[i][j] != px(n - 1 - 2 - (2-i)*L - (2-j))) begin
              failures++;
              if (failures < 10) $display("N=3 n=%0d win[%0d][%0d]=%h", n, i, j, win3[i][j]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
