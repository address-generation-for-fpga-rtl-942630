// base_ptr_addr_gen: base pointer address generator for one GMO.
//
// One pointer per GMO counts the element being accessed: it starts at 0,
// steps on every valid pixel and wraps from L-1 to 0, so it needs
// ceil(log2 L) bits. An address table (one row per partition: segment,
// first GMO element held, length, start address in its RAM port) is
// compared with the pointer every cycle. A partition is enabled while the
// pointer lies in its span START .. START+LEN-1, and its port address is
// OFFSET + pointer - START. Partitions of different segments that cover
// the same elements are enabled together; within a segment only one is.
//
// Ports: valid_i is one pixel access; en_o[p]/addr_o[p] drive the port of
// partition p (RAM enable en_o[p] & valid_i); ptr_o is the base pointer.
// ptr_o is a register; en_o and addr_o are combinational decodes of it,
// which puts comparators and a subtractor between the register and the
// RAM ports.
//
// The table comes in as parameters, defaulting to the worked 640x48
// example; the decode rules are those of the base pointer scheme. The
// table may list the partitions of several GMOs that share Block RAMs
// (P_GMO); this generator serves only GMO GSEL, of length L, and drives
// zero on the other partitions' outputs.
module base_ptr_addr_gen
  import gmo_pkg::*;
#(
  parameter int unsigned L  = gmo_pkg::LINE_L,
  parameter int unsigned NP = gmo_pkg::NPART,
  parameter int unsigned AW = gmo_pkg::ADDR_W,
  parameter int unsigned P_SEG    [NP] = gmo_pkg::FIG5_SEG,
  parameter int unsigned P_START  [NP] = gmo_pkg::FIG5_START,
  parameter int unsigned P_LEN    [NP] = gmo_pkg::FIG5_LEN,
  parameter int unsigned P_OFFSET [NP] = gmo_pkg::FIG5_OFFSET,
  parameter int unsigned P_GMO    [NP] = gmo_pkg::FIG5_GMO,
  parameter int unsigned GSEL          = 0,
  localparam int unsigned PW = (L > 1) ? $clog2(L) : 1
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  valid_i,
  output logic [PW-1:0]         ptr_o,
  output logic [NP-1:0]         en_o,
  output logic [NP-1:0][AW-1:0] addr_o
);

  localparam logic [PW-1:0] PTR_LAST = PW'(L - 1);

  always_ff @(posedge clk) begin
    if (rst)                 ptr_o <= '0;
    else if (valid_i)        ptr_o <= (ptr_o == PTR_LAST) ? '0 : ptr_o + 1'b1;
  end

  always_comb begin
    for (int unsigned p = 0; p < NP; p++) begin
      if (P_GMO[p] == GSEL) begin
        en_o[p]   = ({1'b0, ptr_o} >= (PW+1)'(P_START[p])) &&
                    ({1'b0, ptr_o} <  (PW+1)'(P_START[p] + P_LEN[p]));
        addr_o[p] = AW'(P_OFFSET[p]) + AW'(ptr_o) - AW'(P_START[p]);
      end else begin
        en_o[p]   = 1'b0;
        addr_o[p] = '0;
      end
    end
  end

  // Within a segment the spans do not overlap.
  for (genvar p = 0; p < NP; p++) begin : g_chk
    for (genvar q = p + 1; q < NP; q++) begin : g_excl
      if (P_SEG[q] == P_SEG[p]) begin : g_same
        a_one_active : assert property (@(posedge clk) disable iff (rst)
          !(en_o[p] && en_o[q]));
      end
    end
  end

endmodule
