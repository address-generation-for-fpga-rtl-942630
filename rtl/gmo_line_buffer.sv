// gmo_line_buffer: line buffers of neighbourhood operators held as GMOs.
//
// Instead of one RAM per line buffer, the lines an operator buffers share
// one word, a global memory object (GMO): for GMO g, field k (bits
// k*G_PIX[g] +: G_PIX[g]) holds line k+1 above the current one, for
// G_LINES[g] lines of G_L[g] pixels. One pointer therefore serves all the
// buffers of an operator. On every valid pixel of GMO g the word at its
// current element is read and, in the same read-first access, overwritten
// with the previous word shifted up by one field with the new pixel in
// field 0, so each field cascades into the next like chained line buffers.
// NG GMOs with independent pixel streams can share Block RAMs: the
// allocation table (see gmo_storage) may put two GMOs on the two ports of
// one RAM.
//
// Timing: the word read for one pixel is only available a clock later, so
// the word written for pixel n is built from the read made for pixel n-1.
// Counting only valid pixels of that GMO, field k-1 of lines_o[g] then
// carries the pixel k*(G_L[g]+1) samples older than the pixel on pix_i[g];
// nbhd_window evens this out. lines_o[g] is stable while valid_i[g] is low.
//
// SCHEME selects the address generators, one per GMO: ADDR_DISTRIBUTED
// (default, one register pointer per partition) or ADDR_BASE_POINTER (one
// decoded pointer per GMO). Both give the same accesses; they differ in
// logic and speed. The defaults are one GMO, the 5x5, 12-bit, 640-pixel
// example, a 640 x 48 GMO on two Block RAMs. Packing lines into one word is
// the GMO idea; the shift-by-one-field update and its one-pixel skew are
// choices of this design.
module gmo_line_buffer #(
  parameter gmo_pkg::addr_scheme_e SCHEME = gmo_pkg::ADDR_DISTRIBUTED,
  parameter int unsigned NG    = 1,
  parameter int unsigned GMO_W = gmo_pkg::GMO_W,  // widest GMO word
  parameter int unsigned G_PIX   [NG] = '{gmo_pkg::PIX_W},
  parameter int unsigned G_LINES [NG] = '{gmo_pkg::N_LINES},
  parameter int unsigned G_L     [NG] = '{gmo_pkg::LINE_L},
  parameter int unsigned NP      = gmo_pkg::NPART,
  parameter int unsigned NR      = gmo_pkg::NRAM,
  parameter int unsigned NS      = gmo_pkg::NSEG,
  parameter int unsigned AW      = gmo_pkg::ADDR_W,
  parameter int unsigned P_SEG    [NP] = gmo_pkg::FIG5_SEG,
  parameter int unsigned P_START  [NP] = gmo_pkg::FIG5_START,
  parameter int unsigned P_LEN    [NP] = gmo_pkg::FIG5_LEN,
  parameter int unsigned P_OFFSET [NP] = gmo_pkg::FIG5_OFFSET,
  parameter int unsigned P_RAM    [NP] = gmo_pkg::FIG5_RAM,
  parameter int unsigned P_PORT   [NP] = gmo_pkg::FIG5_PORT,
  parameter int unsigned P_GMO    [NP] = gmo_pkg::FIG5_GMO,
  parameter int unsigned R_WA     [NR] = gmo_pkg::FIG5_WA,
  parameter int unsigned R_WB     [NR] = gmo_pkg::FIG5_WB,
  parameter int unsigned S_LO     [NS] = gmo_pkg::FIG5_SEG_LO,
  parameter int unsigned S_W      [NS] = gmo_pkg::FIG5_SEG_W,
  parameter int unsigned S_GMO    [NS] = gmo_pkg::FIG5_SEG_GMO
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [NG-1:0]            valid_i,
  input  logic [NG-1:0][GMO_W-1:0] pix_i,      // pixel in the low G_PIX bits
  output logic [NG-1:0][GMO_W-1:0] lines_o,    // GMO word: line k in field k-1
  output logic [NP-1:0]            part_en_o   // partition enables
);

  logic [NG-1:0][NP-1:0]         en_g;
  logic [NG-1:0][NP-1:0][AW-1:0] addr_g;
  logic [NP-1:0]                 en;
  logic [NP-1:0][AW-1:0]         addr;
  logic [NG-1:0][GMO_W-1:0]      rdata, wdata;

  for (genvar g = 0; g < NG; g++) begin : g_gmo
    localparam int unsigned W = G_PIX[g] * G_LINES[g];
    localparam logic [GMO_W-1:0] WMASK = GMO_W'((65'd1 << W) - 1);
    localparam logic [GMO_W-1:0] PMASK = GMO_W'((65'd1 << G_PIX[g]) - 1);

    if (SCHEME == gmo_pkg::ADDR_DISTRIBUTED) begin : g_dist
      dist_ptr_addr_gen #(
        .NP(NP), .AW(AW), .P_SEG(P_SEG), .P_LEN(P_LEN), .P_OFFSET(P_OFFSET),
        .P_GMO(P_GMO), .GSEL(g)
      ) u_agen (
        .clk     (clk),
        .rst     (rst),
        .valid_i (valid_i[g]),
        .en_o    (en_g[g]),
        .addr_o  (addr_g[g])
      );
    end else begin : g_base
      logic [(G_L[g] > 1 ? $clog2(G_L[g]) : 1)-1:0] bp;
      base_ptr_addr_gen #(
        .L(G_L[g]), .NP(NP), .AW(AW), .P_SEG(P_SEG), .P_START(P_START), .P_LEN(P_LEN),
        .P_OFFSET(P_OFFSET), .P_GMO(P_GMO), .GSEL(g)
      ) u_agen (
        .clk     (clk),
        .rst     (rst),
        .valid_i (valid_i[g]),
        .ptr_o   (bp),
        .en_o    (en_g[g]),
        .addr_o  (addr_g[g])
      );
    end

    // Shift the lines up by one field and put the new pixel in field 0.
    assign wdata[g] = ((rdata[g] << G_PIX[g]) | (pix_i[g] & PMASK)) & WMASK;
  end

  // Every partition belongs to one GMO; the other generators drive zero.
  always_comb begin
    en   = '0;
    addr = '0;
    for (int unsigned g = 0; g < NG; g++) begin
      en   |= en_g[g];
      addr |= addr_g[g];
    end
  end

  gmo_storage #(
    .NG(NG), .GMO_W(GMO_W), .NP(NP), .NR(NR), .NS(NS), .AW(AW), .P_SEG(P_SEG),
    .P_RAM(P_RAM), .P_PORT(P_PORT), .R_WA(R_WA), .R_WB(R_WB), .S_LO(S_LO), .S_W(S_W),
    .S_GMO(S_GMO)
  ) u_store (
    .clk     (clk),
    .rst     (rst),
    .valid_i (valid_i),
    .we_i    ({NG{1'b1}}),
    .en_i    (en),
    .addr_i  (addr),
    .wdata_i (wdata),
    .rdata_o (rdata)
  );

  assign lines_o   = rdata;
  assign part_en_o = en;

  initial begin
    for (int unsigned g = 0; g < NG; g++) begin
      int unsigned sw;
      sw = 0;
      for (int unsigned s = 0; s < NS; s++)
        if (S_GMO[s] == g) sw += S_W[s];
      assert (sw == G_PIX[g] * G_LINES[g] && sw <= GMO_W)
        else $error("gmo_line_buffer: segments do not cover GMO %0d", g);
    end
    for (int unsigned p = 0; p < NP; p++)
      assert (P_GMO[p] == S_GMO[P_SEG[p] - 1])
        else $error("gmo_line_buffer: partition %0d and its segment disagree on the GMO", p);
  end

endmodule
