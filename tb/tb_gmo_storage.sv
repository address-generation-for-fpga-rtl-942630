// tb_gmo_storage: self-checking test of the 640 x 48 GMO on two Block RAMs.
//
// The testbench plays the address generator: for GMO element e it enables
// BR1 port A (e < 512, address e) or BR2 port B (e >= 512, address
// 320 + e - 512) for segment 1, and BR2 port A (address e) for segment 2.
// One pass writes a random 48-bit word to every element, a second pass
// reads them back (and writes new ones, read-first) and a third reads the
// new ones. Reads are checked one clock after the access and must hold
// through gaps in valid. Since both segments of every element are written
// in the same pass, a port B partition that overlapped the 16-bit segment
// in BR2 would corrupt the read-back.
module tb_gmo_storage;
  import gmo_pkg::*;
  logic clk = 1'b0, rst, valid, we;
  logic [NPART-1:0]             en;
  logic [NPART-1:0][ADDR_W-1:0] addr;
  logic [GMO_W-1:0]             wdata, rdata;
  logic [GMO_W-1:0]             img [2][LINE_L];
  int checks = 0, failures = 0;

  gmo_storage dut (.clk, .rst, .valid_i(valid), .we_i(we), .en_i(en),
                   .addr_i(addr), .wdata_i(wdata), .rdata_o(rdata));

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
      if (failures < 10) $display("%0t mismatch: %s", $time, what);
    end
  endtask

  // One access to element e; returns after the clock edge.
  task automatic access(int e, logic w, logic [GMO_W-1:0] d);
    en = '0;
    en[P_BR1_A] = (e < 512);
    en[P_BR2_B] = (e >= 512);
    en[P_BR2_A] = 1'b1;
    addr[P_BR1_A] = ADDR_W'(e);
    addr[P_BR2_B] = ADDR_W'(320 + e - 512);
    addr[P_BR2_A] = ADDR_W'(e);
    valid = 1; we = w; wdata = d;
    @(posedge clk); #1;
    valid = 0; we = 0; wdata = $urandom;
    en = NPART'($urandom); addr = {NPART*ADDR_W{1'b1}};
  endtask


  initial begin
    rst = 1; valid = 0; we = 0; en = '0; addr = '0; wdata = '0;
    @(posedge clk); #1; rst = 0;
    for (int e = 0; e < LINE_L; e++) begin
      img[0][e] = {$urandom, $urandom};
      img[1][e] = {$urandom, $urandom};
    end
    for (int e = 0; e < LINE_L; e++) access(e, 1'b1, img[0][e]);
    for (int e = 0; e < LINE_L; e++) begin
      access(e, 1'b1, img[1][e]);
      chk(rdata == img[0][e], $sformatf("pass 2 element %0d", e));
      repeat ($urandom % 3) @(posedge clk);
      #1 chk(rdata == img[0][e], $sformatf("hold element %0d", e));
    end
    for (int e = 0; e < LINE_L; e++) begin
      access(e, 1'b0, '0);
      chk(rdata == img[1][e], $sformatf("pass 3 element %0d", e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
