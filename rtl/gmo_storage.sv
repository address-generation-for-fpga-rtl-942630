// gmo_storage: global memory objects spread over Block RAM partitions.
//
// Each GMO word is cut into segments (segment s is bits S_LO[s] +: S_W[s]
// of the word of GMO S_GMO[s]) and every segment into partitions. Partition
// p holds part of segment P_SEG[p] (numbered from 1) in port P_PORT[p]
// (0 = A, 1 = B) of Block RAM P_RAM[p]; the RAMs are NR instances of
// bram_dp with port widths R_WA/R_WB. The two ports of one RAM may serve
// two different GMOs. Which GMO elements a partition holds and where they
// start in the port is the address generators' business: this block only
// gets, per partition, an enable and an address (en_i/addr_i).
//
// On a valid access of GMO g (valid_i[g]) every enabled partition of g
// reads its word and, if we_i[g], writes its segment's slice of
// wdata_i[g] (zero-padded to the port width). Read data comes one clock
// later: for each segment the word of the partition that was enabled for
// that access is selected through a register of the enables (AND-OR, one
// partition per segment is enabled). rdata_o[g] holds between accesses of
// g; its bits above the GMO's own width read as zero. A RAM port that no
// partition uses is tied off and its read data left unused.
//
// The defaults are one GMO, the worked 640 x 48 example: segment 1 (bits
// 31:0) in BR1 port A and BR2 port B, segment 2 (bits 47:32) in BR2 port
// A. The segment bit assignment is this design's choice.
module gmo_storage #(
  parameter int unsigned NG    = 1,
  parameter int unsigned GMO_W = gmo_pkg::GMO_W,  // widest GMO word
  parameter int unsigned NP    = gmo_pkg::NPART,
  parameter int unsigned NR    = gmo_pkg::NRAM,
  parameter int unsigned NS    = gmo_pkg::NSEG,
  parameter int unsigned AW    = gmo_pkg::ADDR_W,
  parameter int unsigned P_SEG  [NP] = gmo_pkg::FIG5_SEG,
  parameter int unsigned P_RAM  [NP] = gmo_pkg::FIG5_RAM,
  parameter int unsigned P_PORT [NP] = gmo_pkg::FIG5_PORT,
  parameter int unsigned R_WA   [NR] = gmo_pkg::FIG5_WA,
  parameter int unsigned R_WB   [NR] = gmo_pkg::FIG5_WB,
  parameter int unsigned S_LO   [NS] = gmo_pkg::FIG5_SEG_LO,
  parameter int unsigned S_W    [NS] = gmo_pkg::FIG5_SEG_W,
  parameter int unsigned S_GMO  [NS] = gmo_pkg::FIG5_SEG_GMO
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [NG-1:0]             valid_i,
  input  logic [NG-1:0]             we_i,
  input  logic [NP-1:0]             en_i,
  input  logic [NP-1:0][AW-1:0]     addr_i,
  input  logic [NG-1:0][GMO_W-1:0]  wdata_i,
  output logic [NG-1:0][GMO_W-1:0]  rdata_o
);

  localparam int unsigned MAXW = 32;  // widest Block RAM port

  // Partition on port `port` of RAM r, or NP if the port is unused.
  function automatic int unsigned part_at(int unsigned r, int unsigned port);
    for (int unsigned p = 0; p < NP; p++)
      if (P_RAM[p] == r && P_PORT[p] == port) return p;
    return NP;
  endfunction

  logic [NP-1:0][MAXW-1:0]  pdout;     // read word of every partition
  logic [NP-1:0]            sel_q;     // partitions used by the last access
  logic [NS-1:0][GMO_W-1:0] seg_word;  // segment read data at its GMO bits

  for (genvar r = 0; r < NR; r++) begin : g_ram
    localparam int unsigned PA  = part_at(r, 0);
    localparam int unsigned PB  = part_at(r, 1);
    localparam int unsigned AWA = $clog2(gmo_pkg::BRAM_BITS / R_WA[r]);
    localparam int unsigned AWB = $clog2(gmo_pkg::BRAM_BITS / R_WB[r]);

    logic               en_a, en_b, we_a, we_b;
    logic [AWA-1:0]     addr_a;
    logic [AWB-1:0]     addr_b;
    logic [R_WA[r]-1:0] din_a, dout_a;
    logic [R_WB[r]-1:0] din_b, dout_b;

    if (PA < NP) begin : g_a
      localparam int unsigned S = P_SEG[PA] - 1;
      localparam int unsigned G = S_GMO[P_SEG[PA] - 1];
      assign en_a   = valid_i[G] && en_i[PA];
      assign we_a   = we_i[G];
      assign addr_a = addr_i[PA][AWA-1:0];
      assign din_a  = R_WA[r]'(wdata_i[G][S_LO[S] +: S_W[S]]);
      assign pdout[PA] = MAXW'(dout_a);
    end else begin : g_a_off
      assign en_a   = 1'b0;
      assign we_a   = 1'b0;
      assign addr_a = '0;
      assign din_a  = '0;
    end

    if (PB < NP) begin : g_b
      localparam int unsigned S = P_SEG[PB] - 1;
      localparam int unsigned G = S_GMO[P_SEG[PB] - 1];
      assign en_b   = valid_i[G] && en_i[PB];
      assign we_b   = we_i[G];
      assign addr_b = addr_i[PB][AWB-1:0];
      assign din_b  = R_WB[r]'(wdata_i[G][S_LO[S] +: S_W[S]]);
      assign pdout[PB] = MAXW'(dout_b);
    end else begin : g_b_off
      assign en_b   = 1'b0;
      assign we_b   = 1'b0;
      assign addr_b = '0;
      assign din_b  = '0;
    end

    bram_dp #(.WIDTH_A(R_WA[r]), .WIDTH_B(R_WB[r]), .BITS(gmo_pkg::BRAM_BITS)) u_bram (
      .clk    (clk),
      .rst    (rst),
      .en_a   (en_a),
      .we_a   (we_a),
      .addr_a (addr_a),
      .din_a  (din_a),
      .dout_a (dout_a),
      .en_b   (en_b),
      .we_b   (we_b),
      .addr_b (addr_b),
      .din_b  (din_b),
      .dout_b (dout_b)
    );
  end

  for (genvar p = 0; p < NP; p++) begin : g_sel
    localparam int unsigned G = S_GMO[P_SEG[p] - 1];
    always_ff @(posedge clk) begin
      if (rst)             sel_q[p] <= 1'b0;
      else if (valid_i[G]) sel_q[p] <= en_i[p];
    end
  end

  // Per segment: OR of the words of its partitions used by the last
  // access, placed at the segment's bits of its GMO word.
  for (genvar s = 0; s < NS; s++) begin : g_seg
    always_comb begin
      logic [MAXW-1:0] w;
      w = '0;
      for (int unsigned p = 0; p < NP; p++)
        if (P_SEG[p] == s + 1 && sel_q[p]) w |= pdout[p];
      seg_word[s] = GMO_W'(w[S_W[s]-1:0]) << S_LO[s];
    end
  end

  always_comb begin
    rdata_o = '0;
    for (int unsigned s = 0; s < NS; s++)
      rdata_o[S_GMO[s]] |= seg_word[s];
  end

endmodule
