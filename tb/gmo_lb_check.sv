// gmo_lb_check: checker for one GMO line buffer under both address schemes.
//
// Instantiates gmo_line_buffer twice with the same allocation, once with
// distributed pointers and once with the base pointer, feeds both the
// testbench's pixel stream (pixels are made distinct per instance by
// XOR-ing SALT) and keeps the stream's history. Whenever pixel n is on the
// input it checks that tap k of both equals pixel n - k*(L+1), and that
// both schemes enable the same partitions. It counts the valid accesses of
// each partition and, at `finish_i`, counts a failure for any partition
// that was never used. checks_o/failures_o are running totals.
module gmo_lb_check #(
  parameter int unsigned PIX_W   = 12,
  parameter int unsigned N_LINES = 4,
  parameter int unsigned L       = 640,
  parameter int unsigned NP      = 3,
  parameter int unsigned NR      = 2,
  parameter int unsigned NS      = 2,
  parameter int unsigned AW      = 10,
  parameter int unsigned P_SEG    [NP] = gmo_pkg::FIG5_SEG,
  parameter int unsigned P_START  [NP] = gmo_pkg::FIG5_START,
  parameter int unsigned P_LEN    [NP] = gmo_pkg::FIG5_LEN,
  parameter int unsigned P_OFFSET [NP] = gmo_pkg::FIG5_OFFSET,
  parameter int unsigned P_RAM    [NP] = gmo_pkg::FIG5_RAM,
  parameter int unsigned P_PORT   [NP] = gmo_pkg::FIG5_PORT,
  parameter int unsigned R_WA     [NR] = gmo_pkg::FIG5_WA,
  parameter int unsigned R_WB     [NR] = gmo_pkg::FIG5_WB,
  parameter int unsigned S_LO     [NS] = gmo_pkg::FIG5_SEG_LO,
  parameter int unsigned S_W      [NS] = gmo_pkg::FIG5_SEG_W,
  parameter int unsigned SALT     = 0,
  parameter string       NAME     = "gmo"
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        valid_i,
  input  logic [31:0] pix_i,
  input  logic        finish_i,
  output int          checks_o,
  output int          failures_o
);
  localparam int LL = L;
  localparam int unsigned GW = PIX_W * N_LINES;
  localparam int unsigned G_PIX   [1]  = '{PIX_W};
  localparam int unsigned G_LINES [1]  = '{N_LINES};
  localparam int unsigned G_L     [1]  = '{L};
  localparam int unsigned P_GMO   [NP] = '{default: 0};
  localparam int unsigned S_GMO   [NS] = '{default: 0};
  logic [PIX_W-1:0]              pix;
  logic [N_LINES-1:0][PIX_W-1:0] taps_d, taps_b;
  logic [NP-1:0]                 en_d, en_b;
  logic [PIX_W-1:0]              hist [32768];
  int n = 0;
  int used [NP];

  assign pix = PIX_W'(pix_i ^ SALT);

  gmo_line_buffer #(
    .SCHEME(gmo_pkg::ADDR_DISTRIBUTED), .GMO_W(GW), .G_PIX(G_PIX), .G_LINES(G_LINES), .G_L(G_L),
    .NP(NP), .NR(NR), .NS(NS), .AW(AW), .P_SEG(P_SEG), .P_START(P_START), .P_LEN(P_LEN),
    .P_OFFSET(P_OFFSET), .P_RAM(P_RAM), .P_PORT(P_PORT), .R_WA(R_WA), .R_WB(R_WB),
    .S_LO(S_LO), .S_W(S_W), .P_GMO(P_GMO), .S_GMO(S_GMO)
  ) u_dist (.clk, .rst, .valid_i, .pix_i(GW'(pix)), .lines_o(taps_d), .part_en_o(en_d));

  gmo_line_buffer #(
    .SCHEME(gmo_pkg::ADDR_BASE_POINTER), .GMO_W(GW), .G_PIX(G_PIX), .G_LINES(G_LINES), .G_L(G_L),
    .NP(NP), .NR(NR), .NS(NS), .AW(AW), .P_SEG(P_SEG), .P_START(P_START), .P_LEN(P_LEN),
    .P_OFFSET(P_OFFSET), .P_RAM(P_RAM), .P_PORT(P_PORT), .R_WA(R_WA), .R_WB(R_WB),
    .S_LO(S_LO), .S_W(S_W), .P_GMO(P_GMO), .S_GMO(S_GMO)
  ) u_base (.clk, .rst, .valid_i, .pix_i(GW'(pix)), .lines_o(taps_b), .part_en_o(en_b));

  initial begin
    checks_o = 0;
    failures_o = 0;
    for (int p = 0; p < NP; p++) used[p] = 0;
  end

  // Sample just before the clock edge, when the inputs are settled.
  always @(negedge clk) begin
    if (rst) begin
      n <= 0;
    end else begin
      checks_o++;
      if (en_d != en_b) begin
        failures_o++;
        if (failures_o < 5) $display("%s: schemes disagree on enables at n=%0d", NAME, n);
      end
      for (int p = 0; p < NP; p++)
        if (valid_i && en_d[p]) used[p]++;
      if (valid_i) begin
        hist[n % 32768] = pix;
        for (int k = 1; k <= int'(N_LINES); k++) begin
          if (n - k*(LL+1) >= 0) begin
            checks_o += 2;
            if (taps_d[k-1] != hist[(n - k*(LL+1)) % 32768] ||
                taps_b[k-1] != hist[(n - k*(LL+1)) % 32768]) begin
              failures_o++;
              if (failures_o < 5) $display("%s: n=%0d tap %0d wrong", NAME, n, k);
            end
          end
        end
        n <= n + 1;
      end
    end
  end

  always @(posedge finish_i) begin
    for (int p = 0; p < NP; p++) begin
      checks_o++;
      if (used[p] == 0) begin
        failures_o++;
        $display("%s: partition %0d never used", NAME, p);
      end
    end
    $display("%s: %0d pixels, checks %0d, failures %0d", NAME, n, checks_o, failures_o);
  end
endmodule
