// gmo_shared_check: checker for several GMOs sharing Block RAMs.
//
// Instantiates gmo_line_buffer twice with the same multi-GMO allocation,
// once per address scheme. Every GMO gets its own random pixel stream with
// its own random stalls, so GMOs on the two ports of one RAM run
// independently. For each GMO and each valid pixel n of that GMO, line k
// must equal that GMO's pixel n - k*(L+1) (see gmo_line_buffer), in both
// instances; the two schemes must give the same enables; and every
// partition must be used. Results are reported when finish_i rises.
module gmo_shared_check #(
  parameter int unsigned NG    = 2,
  parameter int unsigned GMO_W = 16,
  parameter int unsigned G_PIX   [NG] = '{8, 8},
  parameter int unsigned G_LINES [NG] = '{2, 2},
  parameter int unsigned G_L     [NG] = '{640, 640},
  parameter int unsigned NP = 2,
  parameter int unsigned NR = 1,
  parameter int unsigned NS = 2,
  parameter int unsigned AW = 10,
  parameter int unsigned P_SEG    [NP] = '{1, 2},
  parameter int unsigned P_START  [NP] = '{0, 0},
  parameter int unsigned P_LEN    [NP] = '{640, 640},
  parameter int unsigned P_OFFSET [NP] = '{0, 0},
  parameter int unsigned P_RAM    [NP] = '{0, 0},
  parameter int unsigned P_PORT   [NP] = '{0, 1},
  parameter int unsigned P_GMO    [NP] = '{0, 1},
  parameter int unsigned R_WA     [NR] = '{16},
  parameter int unsigned R_WB     [NR] = '{16},
  parameter int unsigned S_LO     [NS] = '{0, 0},
  parameter int unsigned S_W      [NS] = '{16, 16},
  parameter int unsigned S_GMO    [NS] = '{0, 1},
  parameter string       NAME     = "shared"
) (
  input  logic clk,
  input  logic rst,
  input  logic finish_i,
  output int   checks_o,
  output int   failures_o
);
  logic [NG-1:0]            valid;
  logic [NG-1:0][GMO_W-1:0] pix, lines_d, lines_b;
  logic [NP-1:0]            en_d, en_b;
  logic [GMO_W-1:0]         hist [NG][32768];
  int n [NG];
  int used [NP];

  gmo_line_buffer #(
    .SCHEME(gmo_pkg::ADDR_DISTRIBUTED), .NG(NG), .GMO_W(GMO_W), .G_PIX(G_PIX),
    .G_LINES(G_LINES), .G_L(G_L), .NP(NP), .NR(NR), .NS(NS), .AW(AW), .P_SEG(P_SEG),
    .P_START(P_START), .P_LEN(P_LEN), .P_OFFSET(P_OFFSET), .P_RAM(P_RAM), .P_PORT(P_PORT),
    .P_GMO(P_GMO), .R_WA(R_WA), .R_WB(R_WB), .S_LO(S_LO), .S_W(S_W), .S_GMO(S_GMO)
  ) u_dist (.clk, .rst, .valid_i(valid), .pix_i(pix), .lines_o(lines_d), .part_en_o(en_d));

  gmo_line_buffer #(
    .SCHEME(gmo_pkg::ADDR_BASE_POINTER), .NG(NG), .GMO_W(GMO_W), .G_PIX(G_PIX),
    .G_LINES(G_LINES), .G_L(G_L), .NP(NP), .NR(NR), .NS(NS), .AW(AW), .P_SEG(P_SEG),
    .P_START(P_START), .P_LEN(P_LEN), .P_OFFSET(P_OFFSET), .P_RAM(P_RAM), .P_PORT(P_PORT),
    .P_GMO(P_GMO), .R_WA(R_WA), .R_WB(R_WB), .S_LO(S_LO), .S_W(S_W), .S_GMO(S_GMO)
  ) u_base (.clk, .rst, .valid_i(valid), .pix_i(pix), .lines_o(lines_b), .part_en_o(en_b));

  initial begin
    checks_o = 0;
    failures_o = 0;
    valid = '0;
    pix = '0;
    for (int g = 0; g < int'(NG); g++) n[g] = 0;
    for (int p = 0; p < int'(NP); p++) used[p] = 0;
  end

  // New inputs shortly after each edge, while running.
  always @(posedge clk) begin
    #1;
    for (int g = 0; g < int'(NG); g++) begin
      valid[g] = !rst && !finish_i && ($urandom % 4) != 0;
      pix[g]   = GMO_W'({$urandom, $urandom}) & GMO_W'((64'd1 << G_PIX[g]) - 1);
    end
  end

  // Check just before the clock edge, when everything has settled.
  always @(negedge clk) begin
    if (!rst) begin
      checks_o++;
      if (en_d != en_b) begin
        failures_o++;
        if (failures_o < 5) $display("%s: schemes disagree on enables", NAME);
      end
      for (int p = 0; p < int'(NP); p++)
        if (valid[P_GMO[p]] && en_d[p]) used[p]++;
      for (int g = 0; g < int'(NG); g++) begin
        if (valid[g]) begin
          hist[g][n[g] % 32768] = pix[g];
          for (int k = 1; k <= int'(G_LINES[g]); k++) begin
            int m;
            logic [GMO_W-1:0] mask, want;
            m = n[g] - k * (int'(G_L[g]) + 1);
            if (m >= 0) begin
              mask = GMO_W'((64'd1 << G_PIX[g]) - 1);
              want = hist[g][m % 32768];
              checks_o += 2;
              if (((lines_d[g] >> ((k-1) * G_PIX[g])) & mask) != want ||
                  ((lines_b[g] >> ((k-1) * G_PIX[g])) & mask) != want) begin
                failures_o++;
                if (failures_o < 5) $display("%s: GMO %0d n=%0d line %0d wrong", NAME, g, n[g], k);
              end
            end
          end
          n[g]++;
        end
      end
    end
  end

  always @(posedge finish_i) begin
    for (int p = 0; p < int'(NP); p++) begin
      checks_o++;
      if (used[p] == 0) begin
        failures_o++;
        $display("%s: partition %0d never used", NAME, p);
      end
    end
    for (int g = 0; g < int'(NG); g++) begin
      checks_o++;
      if (n[g] < int'(G_LINES[g] * (G_L[g] + 1) + G_L[g])) begin
        failures_o++;
        $display("%s: GMO %0d saw only %0d pixels", NAME, g, n[g]);
      end
    end
    $display("%s: %0d GMOs, checks %0d, failures %0d", NAME, NG, checks_o, failures_o);
  end
endmodule
