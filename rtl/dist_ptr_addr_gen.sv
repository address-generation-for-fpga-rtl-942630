// dist_ptr_addr_gen: distributed pointer address generator for one GMO.
//
// One dist_partition_ptr per partition. The partitions of a segment are
// chained in table order into a ring: when a partition has used its last
// word it hands control to the next partition of the same segment, and the
// last partition hands it back to the first. Segments run side by side, one
// active partition each, all stepped by the same valid pixels. Because every
// address and enable is a register of its own, the Block RAM ports are fed
// without the shared comparator and adder of the base pointer scheme; this
// is the reason the scheme reaches a higher clock rate.
//
// Ports: valid_i is one pixel access; en_o[p] and addr_o[p] drive the port
// of partition p (the RAM enable is en_o[p] & valid_i). Outputs are
// registers and change on the clock edge that consumes a valid pixel.
//
// The partition table (segment, length and start offset of every
// partition) is the allocation result and comes in as parameters; the
// defaults are the worked 640x48 example. The ring order within a segment
// is the table order. The table may list the partitions of several GMOs
// that share Block RAMs (P_GMO); this generator serves only GMO GSEL and
// drives zero on the other partitions' outputs.
module dist_ptr_addr_gen
  import gmo_pkg::*;
#(
  parameter int unsigned NP = gmo_pkg::NPART,
  parameter int unsigned AW = gmo_pkg::ADDR_W,
  parameter int unsigned P_SEG    [NP] = gmo_pkg::FIG5_SEG,
  parameter int unsigned P_LEN    [NP] = gmo_pkg::FIG5_LEN,
  parameter int unsigned P_OFFSET [NP] = gmo_pkg::FIG5_OFFSET,
  parameter int unsigned P_GMO    [NP] = gmo_pkg::FIG5_GMO,
  parameter int unsigned GSEL          = 0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 valid_i,
  output logic [NP-1:0]        en_o,
  output logic [NP-1:0][AW-1:0] addr_o
);

  // Is p the first partition of its segment in table order?
  function automatic bit is_first(int unsigned p);
    for (int unsigned q = 0; q < p; q++)
      if (P_SEG[q] == P_SEG[p]) return 1'b0;
    return 1'b1;
  endfunction

  // The partition that hands control to p: the closest earlier partition
  // of the same segment, or, for the first one, the last of the segment.
  function automatic int unsigned prev_of(int unsigned p);
    int unsigned r;
    r = p;
    for (int unsigned q = 0; q < NP; q++)
      if (P_SEG[q] == P_SEG[p] && (q < p || is_first(p))) r = q;
    return r;
  endfunction

  logic [NP-1:0] done;

  for (genvar p = 0; p < NP; p++) begin : g_part
    if (P_GMO[p] == GSEL) begin : g_own
      dist_partition_ptr #(
        .AW     (AW),
        .LEN    (P_LEN[p]),
        .OFFSET (P_OFFSET[p]),
        .FIRST  (is_first(p))
      ) u_ptr (
        .clk     (clk),
        .rst     (rst),
        .valid_i (valid_i),
        .take_i  (done[prev_of(p)]),
        .en_o    (en_o[p]),
        .addr_o  (addr_o[p]),
        .done_o  (done[p])
      );
    end else begin : g_other
      assign en_o[p]   = 1'b0;
      assign addr_o[p] = '0;
      assign done[p]   = 1'b0;
    end

    // Exactly one partition of a segment holds control.
    for (genvar q = p + 1; q < NP; q++) begin : g_excl
      if (P_SEG[q] == P_SEG[p]) begin : g_same
        a_one_active : assert property (@(posedge clk) disable iff (rst)
          !(en_o[p] && en_o[q]));
      end
    end
  end

endmodule
