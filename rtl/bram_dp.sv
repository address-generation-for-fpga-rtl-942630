// bram_dp: 16 kbit true dual-port synchronous Block RAM, Spartan-3 style.
//
// Both ports read and write independently on the same clock edge, and each
// port has its own data width (a power of two, up to 32 bits here; parity
// bits are not modelled). The storage is one array of MIN_W-bit words. A
// port of width W = R * MIN_W sees address a as the R consecutive words
// a*R .. a*R+R-1, lowest word in the least significant bits, which is how
// the Spartan-3 primitive maps mixed port widths onto its cells.
//
// Timing: an access happens at the rising clock edge when the port's enable
// is high. Reads are "read first": dout shows the word as it was before a
// write in the same cycle, one clock after the address. When the enable is
// low the port does nothing and dout holds. rst clears the output
// registers only (like the primitive's set/reset pin), not the contents.
// Writing the same cells from both ports in one cycle is not allowed; port
// B wins in this model.
//
// The read-first mode and the mapping of mixed widths are choices of this
// design; the source only says the ports are synchronous, independent and
// of independent width.
module bram_dp #(
  parameter int unsigned WIDTH_A = 16,
  parameter int unsigned WIDTH_B = 32,
  parameter int unsigned BITS    = 16384,
  localparam int unsigned AW_A   = $clog2(BITS / WIDTH_A),
  localparam int unsigned AW_B   = $clog2(BITS / WIDTH_B)
) (
  input  logic               clk,
  input  logic               rst,
  // port A
  input  logic               en_a,
  input  logic               we_a,
  input  logic [AW_A-1:0]    addr_a,
  input  logic [WIDTH_A-1:0] din_a,
  output logic [WIDTH_A-1:0] dout_a,
  // port B
  input  logic               en_b,
  input  logic               we_b,
  input  logic [AW_B-1:0]    addr_b,
  input  logic [WIDTH_B-1:0] din_b,
  output logic [WIDTH_B-1:0] dout_b
);

  localparam int unsigned MIN_W = (WIDTH_A < WIDTH_B) ? WIDTH_A : WIDTH_B;
  localparam int unsigned DEPTH = BITS / MIN_W;
  localparam int unsigned R_A   = WIDTH_A / MIN_W;
  localparam int unsigned R_B   = WIDTH_B / MIN_W;
  localparam int unsigned MAW   = $clog2(DEPTH);

  logic [MIN_W-1:0] mem [DEPTH];

  // Word index of sub-word k of a port address.
  function automatic logic [MAW-1:0] idx_a(logic [AW_A-1:0] a, int unsigned k);
    return MAW'(a * R_A + k);
  endfunction
  function automatic logic [MAW-1:0] idx_b(logic [AW_B-1:0] a, int unsigned k);
    return MAW'(a * R_B + k);
  endfunction

  // One process for both ports keeps the array single-driven.
  always_ff @(posedge clk) begin
    if (en_a) begin
      for (int unsigned k = 0; k < R_A; k++) begin
        dout_a[k*MIN_W +: MIN_W] <= mem[idx_a(addr_a, k)];
        if (we_a) mem[idx_a(addr_a, k)] <= din_a[k*MIN_W +: MIN_W];
      end
    end
    if (en_b) begin
      for (int unsigned k = 0; k < R_B; k++) begin
        dout_b[k*MIN_W +: MIN_W] <= mem[idx_b(addr_b, k)];
        if (we_b) mem[idx_b(addr_b, k)] <= din_b[k*MIN_W +: MIN_W];
      end
    end
    if (rst) begin
      dout_a <= '0;
      dout_b <= '0;
    end
  end

  initial begin
    assert (WIDTH_A % MIN_W == 0 && WIDTH_B % MIN_W == 0)
      else $error("bram_dp: port widths must be multiples of each other");
  end

endmodule
