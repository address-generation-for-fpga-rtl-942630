// tb_dist_partition_ptr: self-checking test of one partition's local pointer.
//
// Two instances: a lone partition (LEN 5, OFFSET 3) whose done output feeds
// its own take input, so it must wrap 3..7 forever and stay enabled; and a
// partition that starts disabled (FIRST 0) and is handed control by the
// testbench. A reference model steps with random valid gaps and checks the
// enable, the address and the done pulse every clock.
module tb_dist_partition_ptr;
  logic clk = 1'b0, rst, valid, take2;
  logic en1, done1, en2, done2;
  logic [5:0] addr1, addr2;
  int checks = 0, failures = 0, wraps = 0, handoffs = 0;
  // reference state
  logic m_en1, m_en2;
  int   m_a1, m_a2;

  dist_partition_ptr #(.AW(6), .LEN(5), .OFFSET(3), .FIRST(1'b1)) u1 (
    .clk, .rst, .valid_i(valid), .take_i(done1), .en_o(en1), .addr_o(addr1), .done_o(done1));
  dist_partition_ptr #(.AW(6), .LEN(4), .OFFSET(20), .FIRST(1'b0)) u2 (
    .clk, .rst, .valid_i(valid), .take_i(take2), .en_o(en2), .addr_o(addr2), .done_o(done2));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  initial begin
    rst = 1; valid = 0; take2 = 0;
    @(posedge clk); #1; rst = 0;
    m_en1 = 1; m_a1 = 3; m_en2 = 0; m_a2 = 20;
    for (int t = 0; t < 3000; t++) begin
      bit d1, d2;
      valid = ($urandom % 4) != 0;
      take2 = !m_en2 && (($urandom % 8) == 0);
      #1;
      d1 = m_en1 && valid && m_a1 == 7;
      d2 = m_en2 && valid && m_a2 == 23;
      chk(en1 == m_en1 && addr1 == 6'(m_a1) && done1 == d1, "lone partition");
      chk(en2 == m_en2 && addr2 == 6'(m_a2) && done2 == d2, "chained partition");
      @(posedge clk);
      if (d1) begin m_a1 = 3; wraps++; end
      else if (m_en1 && valid) m_a1++;
      if (d2) m_a2 = 20;
      else if (m_en2 && valid) m_a2++;
      if (take2) handoffs++;
      m_en2 = (m_en2 && !d2) || take2;
      #1;
    end
    chk(wraps > 10 && handoffs > 10, "wraps and handoffs happened");
    $display("wraps=%0d handoffs=%0d", wraps, handoffs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
