// rtvps_gmo_top: 5x5 neighbourhood generator whose line buffers live in one
// global memory object on two Spartan-3 style Block RAMs.
//
// A raster video stream of 12-bit pixels, 640 pixels per line, enters one
// pixel per valid clock (pix_valid_i may drop at any time; everything
// holds while it is low). The four line buffers a 5x5 window needs are
// packed side by side into a 640 x 48 GMO (gmo_line_buffer), stored as in
// the allocation of gmo_pkg: a 32-bit segment split over BR1 and BR2 port
// B and a 16-bit segment in BR2 port A. The GMO's Block RAM ports are
// addressed by distributed pointers (default) or by one base pointer
// (SCHEME). nbhd_window turns the current pixel and the four line outputs
// into the 5x5 window.
//
// Outputs: win_o[i][j] (row 0 = oldest line, column 0 = oldest pixel) and
// win_valid_o, a pulse one clock after each accepted pixel. After pixel n
// has been taken, win_o[i][j] is pixel n - 4 - (4-i)*640 - (4-j) of the
// stream; the window is meaningful once 4*641+4 pixels have gone in.
// part_en_o shows the partition enables presented to the RAMs this clock
// (they take effect only with pix_valid_i). Synchronous,
// active-high reset.
module rtvps_gmo_top
  import gmo_pkg::*;
#(
  parameter addr_scheme_e SCHEME = ADDR_DISTRIBUTED
) (
  input  logic                                    clk,
  input  logic                                    rst,
  input  logic                                    pix_valid_i,
  input  logic [PIX_W-1:0]                        pix_i,
  output logic [WIN_N-1:0][WIN_N-1:0][PIX_W-1:0]  win_o,
  output logic                                    win_valid_o,
  output logic [NPART-1:0]                        part_en_o
);

  logic [N_LINES-1:0][PIX_W-1:0] taps;   // line k in taps[k-1]
  logic [WIN_N-1:0][PIX_W-1:0]   rows;

  gmo_line_buffer #(.SCHEME(SCHEME)) u_lines (
    .clk       (clk),
    .rst       (rst),
    .valid_i   (pix_valid_i),
    .pix_i     (GMO_W'(pix_i)),
    .lines_o   (taps),
    .part_en_o (part_en_o)
  );

  assign rows = {taps, pix_i};

  nbhd_window #(.N(WIN_N), .PIX_W(PIX_W)) u_win (
    .clk         (clk),
    .rst         (rst),
    .valid_i     (pix_valid_i),
    .rows_i      (rows),
    .win_o       (win_o),
    .win_valid_o (win_valid_o)
  );

endmodule
