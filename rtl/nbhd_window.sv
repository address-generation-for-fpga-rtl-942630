// nbhd_window: tap registers that form an N x N pixel neighbourhood.
//
// Row inputs: rows_i[0] is the incoming pixel, rows_i[k] (k = 1..N-1) the
// output of line buffer k, which in this design lags the input by
// k*(LINE_L+1) valid pixels (see gmo_line_buffer). Each row first passes
// N-1-k alignment registers, which removes the extra one-pixel lag per
// line, then a chain of N registers whose outputs are the window taps (the
// "d" delays between the line buffers in the classic 3x3 arrangement,
// here registered also at the first tap). All registers advance only on
// valid_i.
//
// Output: win_o[i][j], row i = 0 top (oldest line) .. N-1 bottom (current
// line), column j = 0 left (oldest) .. N-1 right. After the registers have
// taken pixel n, win_o[i][j] holds pixel
//   n - (N-1) - (N-1-i)*LINE_L - (N-1-j)
// so the centre tap lags the input by (N-1) + (N-1)/2*(LINE_L+1) pixels.
// win_valid_o pulses one clock after each valid input. Border handling is
// not done here.
//
// The tap structure follows the usual line-buffer window; the registered
// first tap and the alignment stages are choices of this design.
module nbhd_window #(
  parameter int unsigned N     = 5,
  parameter int unsigned PIX_W = 12
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            valid_i,
  input  logic [N-1:0][PIX_W-1:0]         rows_i,
  output logic [N-1:0][N-1:0][PIX_W-1:0]  win_o,
  output logic                            win_valid_o
);

  localparam int unsigned NL = N - 1;

  for (genvar k = 0; k < N; k++) begin : g_row
    // Registers 0 .. NL-k+N-1; register 0 takes the row input.
    localparam int unsigned R = NL - k + N;
    logic [R-1:0][PIX_W-1:0] sr;

    always_ff @(posedge clk) begin
      if (rst) begin
        sr <= '0;
      end else if (valid_i) begin
        sr[0] <= rows_i[k];
        for (int unsigned s = 1; s < R; s++) sr[s] <= sr[s-1];
      end
    end

    // Row k (k lines above the current one) is window row NL-k.
    for (genvar j = 0; j < N; j++) begin : g_tap
      assign win_o[NL-k][j] = sr[NL - k + NL - j];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) win_valid_o <= 1'b0;
    else     win_valid_o <= valid_i;
  end

endmodule
