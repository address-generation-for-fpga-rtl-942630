// tb_base_ptr_addr_gen: self-checking test of the base pointer address generator.
//
// Uses the default partition table: a 640-element GMO with segment 1 in
// BR1 port A (elements 0..511, addresses 0..511) and BR2 port B (elements
// 512..639, addresses 320..447), and segment 2 in BR2 port A (elements
// 0..639, addresses 0..639). A counter of valid pixels gives the element
// being accessed; from it the expected enables and addresses are worked
// out independently and compared every clock, with random gaps in valid.
// The run must pass the BR1 -> BR2 hand-over and the wrap-around several
// times.
module tb_base_ptr_addr_gen;
  import gmo_pkg::*;
  logic clk = 1'b0, rst, valid;
  logic [NPART-1:0]             en;
  logic [NPART-1:0][ADDR_W-1:0] addr;
  logic [9:0]                   ptr;
  int checks = 0, failures = 0, handovers = 0, wraps = 0, stalls = 0;
  int e;  // GMO element of the next access

  base_ptr_addr_gen dut (.clk, .rst, .valid_i(valid), .ptr_o(ptr), .en_o(en), .addr_o(addr));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("%0t e=%0d mismatch: %s en=%b a0=%0d a1=%0d a2=%0d",
                                  $time, e, what, en, addr[0], addr[1], addr[2]);
    end
  endtask

  initial begin
    rst = 1; valid = 0; ptr = '0;
    @(posedge clk); #1; rst = 0;
    e = 0;
    for (int t = 0; t < 5000; t++) begin
      valid = ($urandom % 5) != 0;
      #1;
      chk(en[P_BR1_A] == (e < 512), "BR1_EN_A");
      chk(en[P_BR2_B] == (e >= 512), "BR2_EN_B");
      chk(en[P_BR2_A] == 1'b1, "BR2_EN_A");
      if (e < 512) chk(addr[P_BR1_A] == ADDR_W'(e), "BR1_A_Adr");
      else         chk(addr[P_BR2_B] == ADDR_W'(320 + e - 512), "BR2_B_Adr");
      chk(addr[P_BR2_A] == ADDR_W'(e), "BR2_A_Adr");
      chk(ptr == 10'(e), "base pointer");
      @(posedge clk); #1;
      if (valid) begin
        if (e == 511) handovers++;
        if (e == 639) wraps++;
        e = (e == 639) ? 0 : e + 1;
      end else stalls++;
    end
    chk(handovers >= 3 && wraps >= 3 && stalls > 0, "hand-over, wrap and stall seen");
    $display("handovers=%0d wraps=%0d stalls=%0d", handovers, wraps, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
