// tb_design_cases: the line-buffer memories of four evaluated design cases.
//
// Each memory object of the cases below is built as a GMO line buffer with
// an allocation worked out for it (segments of legal Block RAM port widths,
// partitions of at most one RAM port each), and run under both address
// schemes by gmo_lb_check on a random stream with stalls:
//
//   case 1-1  7 x  640 x 48 (2 lines x 24-bit RGB), 2 RAMs each: 32-bit
//             segment in RAM0 A (512) + RAM1 B (128 at 320), 16-bit in RAM1 A
//   case 1-2  7 x  708 x 16 (2 lines x 8 bit), 1 RAM each (port A, 1024x16)
//   case 2-1  640 x 32 (4 lines x 8 bit): RAM0 A 512 + RAM1 A 128, 32-bit
//             3 x 640 x 16 (16 lines x 1 bit): 1 RAM each
//             256 x 19 (1 line): 16 bits RAM0 A, 2 bits RAM0 B from 2-bit
//             address 2048, 1 bit RAM1 A
//   case 2-2  1300 x 48 (4 lines x 12 bit): 32-bit segment in three
//             partitions (512, 512, 276), 16-bit segment in RAM3 A (1024)
//             and RAM2 B (276 from 16-bit address 552)
//             4096 x 21 (1 line): 16 bits in four RAMs (1024 each), 4 bits
//             in RAM4 (4096x4), 1 bit in RAM5
//             3 x 1300 x 16 (16 lines x 1 bit): RAM0 A 1024 + RAM1 A 276
//
// Sizes are those of the cases; the allocations are this testbench's. In
// the checks above each GMO gets RAMs of its own. Two more checks let GMOs
// share RAMs (gmo_shared_check, one stream per GMO):
//
//   case 1-2  on 6 RAMs: GMO g (0..5) in port A of RAM g (708 x 16), GMO 6
//             in port B of RAM0, RAM1, RAM2 (316 + 316 + 76 words from
//             16-bit address 708)
//   case 2-1  on 5 RAMs: 640 x 32 in RAM0 A (512) + RAM1 A (128); the three
//             640 x 16 in port A of RAM2, RAM3, RAM4; 256 x 19 as 16 bits
//             in RAM1 B from 16-bit address 256, 2 bits in RAM2 B from 2-bit
//             address 5120, 1 bit in RAM3 B from 1-bit address 10240
//   case 2-2  on 13 RAMs: 4096 x 21 as 16 bits in port A of RAM0..3 and
//             4 bits in RAM4 A; the rest filled in order through RAM5..12,
//             each piece in the next free port from the next free address:
//             1300 x 48 bits 31:0 (512 + 512 + 276 words, 32-bit ports),
//             bits 47:32 (472 + 828), the three 1300 x 16 (196 + 1024 + 80,
//             944 + 356, 668 + 632), and the 1-bit slice of 4096 x 21 in
//             RAM12 B from 1-bit address 10112
//
// 30000 pixels pass, enough for every buffer to wrap.
module tb_design_cases;
  localparam int NCHK = 27;
  logic clk = 1'b0, rst, valid, finish;
  logic [31:0] pix;
  int chk [NCHK];
  int fl  [NCHK];
  int checks = 0, failures = 0, n = 0, stalls = 0;

  always #5 clk = ~clk;

  // Allocation tables, one set per memory object kind.
  localparam int unsigned T2_P_SEG [1] = '{1};
  localparam int unsigned T2_P_START [1] = '{0};
  localparam int unsigned T2_P_LEN [1] = '{708};
  localparam int unsigned T2_P_OFFSET [1] = '{0};
  localparam int unsigned T2_P_RAM [1] = '{0};
  localparam int unsigned T2_P_PORT [1] = '{0};
  localparam int unsigned T2_R_WA [1] = '{16};
  localparam int unsigned T2_R_WB [1] = '{16};
  localparam int unsigned T2_S_LO [1] = '{0};
  localparam int unsigned T2_S_W [1] = '{16};
  localparam int unsigned T3_P_SEG [2] = '{1, 1};
  localparam int unsigned T3_P_START [2] = '{0, 512};
  localparam int unsigned T3_P_LEN [2] = '{512, 128};
  localparam int unsigned T3_P_OFFSET [2] = '{0, 0};
  localparam int unsigned T3_P_RAM [2] = '{0, 1};
  localparam int unsigned T3_P_PORT [2] = '{0, 0};
  localparam int unsigned T3_R_WA [2] = '{32, 32};
  localparam int unsigned T3_R_WB [2] = '{32, 32};
  localparam int unsigned T3_S_LO [1] = '{0};
  localparam int unsigned T3_S_W [1] = '{32};
  localparam int unsigned T4_P_SEG [1] = '{1};
  localparam int unsigned T4_P_START [1] = '{0};
  localparam int unsigned T4_P_LEN [1] = '{640};
  localparam int unsigned T4_P_OFFSET [1] = '{0};
  localparam int unsigned T4_P_RAM [1] = '{0};
  localparam int unsigned T4_P_PORT [1] = '{0};
  localparam int unsigned T4_R_WA [1] = '{16};
  localparam int unsigned T4_R_WB [1] = '{16};
  localparam int unsigned T4_S_LO [1] = '{0};
  localparam int unsigned T4_S_W [1] = '{16};
  localparam int unsigned T5_P_SEG [3] = '{1, 2, 3};
  localparam int unsigned T5_P_START [3] = '{0, 0, 0};
  localparam int unsigned T5_P_LEN [3] = '{256, 256, 256};
  localparam int unsigned T5_P_OFFSET [3] = '{0, 2048, 0};
  localparam int unsigned T5_P_RAM [3] = '{0, 0, 1};
  localparam int unsigned T5_P_PORT [3] = '{0, 1, 0};
  localparam int unsigned T5_R_WA [2] = '{16, 1};
  localparam int unsigned T5_R_WB [2] = '{2, 1};
  localparam int unsigned T5_S_LO [3] = '{0, 16, 18};
  localparam int unsigned T5_S_W [3] = '{16, 2, 1};
  localparam int unsigned T6_P_SEG [5] = '{1, 1, 1, 2, 2};
  localparam int unsigned T6_P_START [5] = '{0, 512, 1024, 0, 1024};
  localparam int unsigned T6_P_LEN [5] = '{512, 512, 276, 1024, 276};
  localparam int unsigned T6_P_OFFSET [5] = '{0, 0, 0, 0, 552};
  localparam int unsigned T6_P_RAM [5] = '{0, 1, 2, 3, 2};
  localparam int unsigned T6_P_PORT [5] = '{0, 0, 0, 0, 1};
  localparam int unsigned T6_R_WA [4] = '{32, 32, 32, 16};
  localparam int unsigned T6_R_WB [4] = '{32, 32, 16, 16};
  localparam int unsigned T6_S_LO [2] = '{0, 32};
  localparam int unsigned T6_S_W [2] = '{32, 16};
  localparam int unsigned T7_P_SEG [6] = '{1, 1, 1, 1, 2, 3};
  localparam int unsigned T7_P_START [6] = '{0, 1024, 2048, 3072, 0, 0};
  localparam int unsigned T7_P_LEN [6] = '{1024, 1024, 1024, 1024, 4096, 4096};
  localparam int unsigned T7_P_OFFSET [6] = '{0, 0, 0, 0, 0, 0};
  localparam int unsigned T7_P_RAM [6] = '{0, 1, 2, 3, 4, 5};
  localparam int unsigned T7_P_PORT [6] = '{0, 0, 0, 0, 0, 0};
  localparam int unsigned T7_R_WA [6] = '{16, 16, 16, 16, 4, 1};
  localparam int unsigned T7_R_WB [6] = '{16, 16, 16, 16, 4, 1};
  localparam int unsigned T7_S_LO [3] = '{0, 16, 20};
  localparam int unsigned T7_S_W [3] = '{16, 4, 1};
  localparam int unsigned T8_P_SEG [2] = '{1, 1};
  localparam int unsigned T8_P_START [2] = '{0, 1024};
  localparam int unsigned T8_P_LEN [2] = '{1024, 276};
  localparam int unsigned T8_P_OFFSET [2] = '{0, 0};
  localparam int unsigned T8_P_RAM [2] = '{0, 1};
  localparam int unsigned T8_P_PORT [2] = '{0, 0};
  localparam int unsigned T8_R_WA [2] = '{16, 16};
  localparam int unsigned T8_R_WB [2] = '{16, 16};
  localparam int unsigned T8_S_LO [1] = '{0};
  localparam int unsigned T8_S_W [1] = '{16};

  // case 1-2 with shared RAMs
  localparam int unsigned S12_G_PIX [7] = '{8, 8, 8, 8, 8, 8, 8};
  localparam int unsigned S12_G_LINES [7] = '{2, 2, 2, 2, 2, 2, 2};
  localparam int unsigned S12_G_L [7] = '{708, 708, 708, 708, 708, 708, 708};
  localparam int unsigned S12_P_SEG [9] = '{1, 2, 3, 4, 5, 6, 7, 7, 7};
  localparam int unsigned S12_P_START [9] = '{0, 0, 0, 0, 0, 0, 0, 316, 632};
  localparam int unsigned S12_P_LEN [9] = '{708, 708, 708, 708, 708, 708, 316, 316, 76};
  localparam int unsigned S12_P_OFFSET [9] = '{0, 0, 0, 0, 0, 0, 708, 708, 708};
  localparam int unsigned S12_P_RAM [9] = '{0, 1, 2, 3, 4, 5, 0, 1, 2};
  localparam int unsigned S12_P_PORT [9] = '{0, 0, 0, 0, 0, 0, 1, 1, 1};
  localparam int unsigned S12_P_GMO [9] = '{0, 1, 2, 3, 4, 5, 6, 6, 6};
  localparam int unsigned S12_R_WA [6] = '{16, 16, 16, 16, 16, 16};
  localparam int unsigned S12_R_WB [6] = '{16, 16, 16, 16, 16, 16};
  localparam int unsigned S12_S_LO [7] = '{0, 0, 0, 0, 0, 0, 0};
  localparam int unsigned S12_S_W [7] = '{16, 16, 16, 16, 16, 16, 16};
  localparam int unsigned S12_S_GMO [7] = '{0, 1, 2, 3, 4, 5, 6};

  // case 2-1 with shared RAMs
  localparam int unsigned S21_G_PIX [5] = '{8, 19, 1, 1, 1};
  localparam int unsigned S21_G_LINES [5] = '{4, 1, 16, 16, 16};
  localparam int unsigned S21_G_L [5] = '{640, 256, 640, 640, 640};
  localparam int unsigned S21_P_SEG [8] = '{1, 1, 2, 3, 4, 5, 6, 7};
  localparam int unsigned S21_P_START [8] = '{0, 512, 0, 0, 0, 0, 0, 0};
  localparam int unsigned S21_P_LEN [8] = '{512, 128, 256, 256, 256, 640, 640, 640};
  localparam int unsigned S21_P_OFFSET [8] = '{0, 0, 256, 5120, 10240, 0, 0, 0};
  localparam int unsigned S21_P_RAM [8] = '{0, 1, 1, 2, 3, 2, 3, 4};
  localparam int unsigned S21_P_PORT [8] = '{0, 0, 1, 1, 1, 0, 0, 0};
  localparam int unsigned S21_P_GMO [8] = '{0, 0, 1, 1, 1, 2, 3, 4};
  localparam int unsigned S21_R_WA [5] = '{32, 32, 16, 16, 16};
  localparam int unsigned S21_R_WB [5] = '{32, 16, 2, 1, 16};
  localparam int unsigned S21_S_LO [7] = '{0, 0, 16, 18, 0, 0, 0};
  localparam int unsigned S21_S_W [7] = '{32, 16, 2, 1, 16, 16, 16};
  localparam int unsigned S21_S_GMO [7] = '{0, 1, 1, 1, 2, 3, 4};

  // case 2-2 with shared RAMs
  localparam int unsigned S22_G_PIX [5] = '{12, 21, 1, 1, 1};
  localparam int unsigned S22_G_LINES [5] = '{4, 1, 16, 16, 16};
  localparam int unsigned S22_G_L [5] = '{1300, 4096, 1300, 1300, 1300};
  localparam int unsigned S22_P_SEG [18] = '{1, 1, 1, 2, 2, 3, 3, 3, 4, 4, 5, 5, 6, 6, 6, 6, 7, 8};
  localparam int unsigned S22_P_START [18] =
    '{0, 512, 1024, 0, 472, 0, 196, 1220, 0, 944, 0, 668, 0, 1024, 2048, 3072, 0, 0};
  localparam int unsigned S22_P_LEN [18] =
    '{512, 512, 276, 472, 828, 196, 1024, 80, 944, 356, 668, 632, 1024, 1024, 1024, 1024, 4096, 4096};
  localparam int unsigned S22_P_OFFSET [18] =
    '{0, 0, 0, 552, 0, 828, 0, 0, 80, 0, 356, 0, 0, 0, 0, 0, 0, 10112};
  localparam int unsigned S22_P_RAM [18] = '{5, 6, 7, 7, 8, 8, 9, 10, 10, 11, 11, 12, 0, 1, 2, 3, 4, 12};
  localparam int unsigned S22_P_PORT [18] = '{0, 0, 0, 1, 0, 1, 0, 0, 1, 0, 1, 0, 0, 0, 0, 0, 0, 1};
  localparam int unsigned S22_P_GMO [18] = '{0, 0, 0, 0, 0, 2, 2, 2, 3, 3, 4, 4, 1, 1, 1, 1, 1, 1};
  localparam int unsigned S22_R_WA [13] = '{16, 16, 16, 16, 4, 32, 32, 32, 16, 16, 16, 16, 16};
  localparam int unsigned S22_R_WB [13] = '{16, 16, 16, 16, 16, 32, 32, 16, 16, 16, 16, 16, 1};
  localparam int unsigned S22_S_LO [8] = '{0, 32, 0, 0, 0, 0, 16, 20};
  localparam int unsigned S22_S_W [8] = '{32, 16, 16, 16, 16, 16, 4, 1};
  localparam int unsigned S22_S_GMO [8] = '{0, 0, 2, 3, 4, 1, 1, 1};

  gmo_shared_check #(
    .NG(5), .GMO_W(48), .G_PIX(S22_G_PIX), .G_LINES(S22_G_LINES), .G_L(S22_G_L),
    .NP(18), .NR(13), .NS(8), .AW(14), .P_SEG(S22_P_SEG), .P_START(S22_P_START),
    .P_LEN(S22_P_LEN), .P_OFFSET(S22_P_OFFSET), .P_RAM(S22_P_RAM), .P_PORT(S22_P_PORT),
    .P_GMO(S22_P_GMO), .R_WA(S22_R_WA), .R_WB(S22_R_WB), .S_LO(S22_S_LO), .S_W(S22_S_W),
    .S_GMO(S22_S_GMO), .NAME("case 2-2 shared, 13 RAMs")
  ) u_s22 (.clk, .rst, .finish_i(finish), .checks_o(chk[26]), .failures_o(fl[26]));

  gmo_shared_check #(
    .NG(7), .GMO_W(16), .G_PIX(S12_G_PIX), .G_LINES(S12_G_LINES), .G_L(S12_G_L),
    .NP(9), .NR(6), .NS(7), .AW(10), .P_SEG(S12_P_SEG), .P_START(S12_P_START),
    .P_LEN(S12_P_LEN), .P_OFFSET(S12_P_OFFSET), .P_RAM(S12_P_RAM), .P_PORT(S12_P_PORT),
    .P_GMO(S12_P_GMO), .R_WA(S12_R_WA), .R_WB(S12_R_WB), .S_LO(S12_S_LO), .S_W(S12_S_W),
    .S_GMO(S12_S_GMO), .NAME("case 1-2 shared, 6 RAMs")
  ) u_s12 (.clk, .rst, .finish_i(finish), .checks_o(chk[24]), .failures_o(fl[24]));

  gmo_shared_check #(
    .NG(5), .GMO_W(32), .G_PIX(S21_G_PIX), .G_LINES(S21_G_LINES), .G_L(S21_G_L),
    .NP(8), .NR(5), .NS(7), .AW(14), .P_SEG(S21_P_SEG), .P_START(S21_P_START),
    .P_LEN(S21_P_LEN), .P_OFFSET(S21_P_OFFSET), .P_RAM(S21_P_RAM), .P_PORT(S21_P_PORT),
    .P_GMO(S21_P_GMO), .R_WA(S21_R_WA), .R_WB(S21_R_WB), .S_LO(S21_S_LO), .S_W(S21_S_W),
    .S_GMO(S21_S_GMO), .NAME("case 2-1 shared, 5 RAMs")
  ) u_s21 (.clk, .rst, .finish_i(finish), .checks_o(chk[25]), .failures_o(fl[25]));

  // case 1-1: seven 640 x 48 GMOs, allocation of the 5x5 example
  for (genvar i = 0; i < 7; i++) begin : g_c11
    gmo_lb_check #(.PIX_W(24), .N_LINES(2), .L(640), .SALT(i * 7919), .NAME("case 1-1"))
      u (.clk, .rst, .valid_i(valid), .pix_i(pix), .finish_i(finish),
         .checks_o(chk[i]), .failures_o(fl[i]));
  end

  // case 1-2: seven 708 x 16 GMOs, one RAM port each
  for (genvar i = 0; i < 7; i++) begin : g_c12
    gmo_lb_check #(.PIX_W(8), .N_LINES(2), .L(708), .NP(1), .NR(1), .NS(1), .AW(10),
      .P_SEG(T2_P_SEG), .P_START(T2_P_START), .P_LEN(T2_P_LEN), .P_OFFSET(T2_P_OFFSET), .P_RAM(T2_P_RAM),
      .P_PORT(T2_P_PORT), .R_WA(T2_R_WA), .R_WB(T2_R_WB), .S_LO(T2_S_LO), .S_W(T2_S_W),
      .SALT(i * 104729), .NAME("case 1-2"))
      u (.clk, .rst, .valid_i(valid), .pix_i(pix), .finish_i(finish),
         .checks_o(chk[7+i]), .failures_o(fl[7+i]));
  end

  // case 2-1: median 640 x 32
  gmo_lb_check #(.PIX_W(8), .N_LINES(4), .L(640), .NP(2), .NR(2), .NS(1), .AW(10),
    .P_SEG(T3_P_SEG), .P_START(T3_P_START), .P_LEN(T3_P_LEN), .P_OFFSET(T3_P_OFFSET),
    .P_RAM(T3_P_RAM), .P_PORT(T3_P_PORT), .R_WA(T3_R_WA), .R_WB(T3_R_WB),
    .S_LO(T3_S_LO), .S_W(T3_S_W), .SALT(11), .NAME("case 2-1 median"))
    u_c21_med (.clk, .rst, .valid_i(valid), .pix_i(pix), .finish_i(finish),
               .checks_o(chk[14]), .failures_o(fl[14]));

  // case 2-1: three morphology buffers 640 x 16
  for (genvar i = 0; i < 3; i++) begin : g_c21m
    gmo_lb_check #(.PIX_W(1), .N_LINES(16), .L(640), .NP(1), .NR(1), .NS(1), .AW(10),
      .P_SEG(T4_P_SEG), .P_START(T4_P_START), .P_LEN(T4_P_LEN), .P_OFFSET(T4_P_OFFSET), .P_RAM(T4_P_RAM),
      .P_PORT(T4_P_PORT), .R_WA(T4_R_WA), .R_WB(T4_R_WB), .S_LO(T4_S_LO), .S_W(T4_S_W),
      .SALT(i + 1), .NAME("case 2-1 morphology"))
      u (.clk, .rst, .valid_i(valid), .pix_i(pix), .finish_i(finish),
         .checks_o(chk[15+i]), .failures_o(fl[15+i]));
  end

  // case 2-1: 256 x 19 in three segments (16 + 2 + 1)
  gmo_lb_check #(.PIX_W(19), .N_LINES(1), .L(256), .NP(3), .NR(2), .NS(3), .AW(14),
    .P_SEG(T5_P_SEG), .P_START(T5_P_START), .P_LEN(T5_P_LEN),
    .P_OFFSET(T5_P_OFFSET), .P_RAM(T5_P_RAM), .P_PORT(T5_P_PORT),
    .R_WA(T5_R_WA), .R_WB(T5_R_WB), .S_LO(T5_S_LO), .S_W(T5_S_W),
    .SALT(5), .NAME("case 2-1 256x19"))
    u_c21_19 (.clk, .rst, .valid_i(valid), .pix_i(pix), .finish_i(finish),
              .checks_o(chk[18]), .failures_o(fl[18]));

  // case 2-2: median 1300 x 48
  gmo_lb_check #(.PIX_W(12), .N_LINES(4), .L(1300), .NP(5), .NR(4), .NS(2), .AW(10),
    .P_SEG(T6_P_SEG), .P_START(T6_P_START),
    .P_LEN(T6_P_LEN), .P_OFFSET(T6_P_OFFSET),
    .P_RAM(T6_P_RAM), .P_PORT(T6_P_PORT),
    .R_WA(T6_R_WA), .R_WB(T6_R_WB), .S_LO(T6_S_LO), .S_W(T6_S_W),
    .SALT(3), .NAME("case 2-2 median"))
    u_c22_med (.clk, .rst, .valid_i(valid), .pix_i(pix), .finish_i(finish),
               .checks_o(chk[19]), .failures_o(fl[19]));

  // case 2-2: 4096 x 21 in three segments (16 + 4 + 1), first one in 4 RAMs
  gmo_lb_check #(.PIX_W(21), .N_LINES(1), .L(4096), .NP(6), .NR(6), .NS(3), .AW(14),
    .P_SEG(T7_P_SEG), .P_START(T7_P_START),
    .P_LEN(T7_P_LEN), .P_OFFSET(T7_P_OFFSET),
    .P_RAM(T7_P_RAM), .P_PORT(T7_P_PORT),
    .R_WA(T7_R_WA), .R_WB(T7_R_WB),
    .S_LO(T7_S_LO), .S_W(T7_S_W), .SALT(9), .NAME("case 2-2 4096x21"))
    u_c22_21 (.clk, .rst, .valid_i(valid), .pix_i(pix), .finish_i(finish),
              .checks_o(chk[20]), .failures_o(fl[20]));

  // case 2-2: three morphology buffers 1300 x 16
  for (genvar i = 0; i < 3; i++) begin : g_c22m
    gmo_lb_check #(.PIX_W(1), .N_LINES(16), .L(1300), .NP(2), .NR(2), .NS(1), .AW(10),
      .P_SEG(T8_P_SEG), .P_START(T8_P_START), .P_LEN(T8_P_LEN), .P_OFFSET(T8_P_OFFSET),
      .P_RAM(T8_P_RAM), .P_PORT(T8_P_PORT), .R_WA(T8_R_WA), .R_WB(T8_R_WB),
      .S_LO(T8_S_LO), .S_W(T8_S_W), .SALT(i + 17), .NAME("case 2-2 morphology"))
      u (.clk, .rst, .valid_i(valid), .pix_i(pix), .finish_i(finish),
         .checks_o(chk[21+i]), .failures_o(fl[21+i]));
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; valid = 0; pix = '0; finish = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    while (n < 30000) begin
      valid = ($urandom % 5) != 0;
      pix = $urandom;
      if (valid) n++; else stalls++;
      @(posedge clk); #1;
    end
    valid = 0;
    @(posedge clk); #1;
    finish = 1;
    #1;
    for (int i = 0; i < NCHK; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    checks++;
    if (stalls == 0) failures++;
    $display("pixels=%0d stalls=%0d", n, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
