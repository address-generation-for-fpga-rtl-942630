// dist_partition_ptr: local pointer of one GMO partition (distributed scheme).
//
// Each partition of a segment owns an enable flag and an address register
// that is wired straight to its Block RAM port, so no address arithmetic
// sits between a register and the RAM. While the flag is set, every valid
// pixel steps the address from OFFSET up to OFFSET+LEN-1. On the valid
// pixel that uses the last address, the flag is cleared, the address goes
// back to OFFSET, and done_o pulses so that the next partition of the
// segment takes control (take_i) for the following pixel. A partition that
// is alone in its segment feeds done_o back to its own take_i and simply
// wraps. After reset the flag equals FIRST, so the first partition of every
// segment starts.
//
// Ports: valid_i marks a pixel access; en_o/addr_o go to the RAM port (the
// RAM's own enable is en_o & valid_i). Both outputs are registers.
//
// The behaviour follows the per-partition rules of the distributed scheme;
// the reset value of the address (OFFSET, the partition's start) and the
// use of a synchronous reset are choices of this design.
module dist_partition_ptr #(
  parameter int unsigned AW     = 10,
  parameter int unsigned LEN    = 512,
  parameter int unsigned OFFSET = 0,
  parameter bit          FIRST  = 1'b1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          valid_i,
  input  logic          take_i,   // previous partition finished
  output logic          en_o,
  output logic [AW-1:0] addr_o,
  output logic          done_o    // this partition used its last word
);

  localparam logic [AW-1:0] FIRST_ADDR = AW'(OFFSET);
  localparam logic [AW-1:0] LAST_ADDR  = AW'(OFFSET + LEN - 1);

  assign done_o = en_o && valid_i && (addr_o == LAST_ADDR);

  always_ff @(posedge clk) begin
    if (rst) begin
      en_o   <= FIRST;
      addr_o <= FIRST_ADDR;
    end else begin
      if (done_o) begin
        addr_o <= FIRST_ADDR;
      end else if (en_o && valid_i) begin
        addr_o <= addr_o + 1'b1;
      end
      en_o <= (en_o && !done_o) || take_i;
    end
  end

  initial begin
    assert (LEN >= 1 && OFFSET + LEN <= (1 << AW))
      else $error("dist_partition_ptr: partition does not fit the address width");
  end

endmodule
