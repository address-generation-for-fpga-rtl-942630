// tb_bram_dp: self-checking test of the mixed-width dual-port Block RAM.
//
// Port A is 1024 x 16, port B 512 x 32 over the same 16 kbit. A reference
// array of 16-bit words follows every write; random reads and writes on
// both ports (never on the same cells in one cycle) check read-first
// behaviour, the one-clock read latency, enables that hold the output,
// and that 32-bit word b is the 16-bit words 2b (low) and 2b+1 (high).
module tb_bram_dp;
  logic clk = 1'b0, rst;
  logic en_a, we_a, en_b, we_b;
  logic [9:0]  addr_a;
  logic [8:0]  addr_b;
  logic [15:0] din_a, dout_a;
  logic [31:0] din_b, dout_b;
  logic [15:0] ref_mem [1024];
  logic [15:0] exp_a;
  logic [31:0] exp_b;
  int checks = 0, failures = 0;

  bram_dp #(.WIDTH_A(16), .WIDTH_B(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en_a = 0; we_a = 0; en_b = 0; we_b = 0;
    addr_a = '0; addr_b = '0; din_a = '0; din_b = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    // Fill through port A with known data.
    for (int i = 0; i < 1024; i++) begin
      en_a = 1; we_a = 1; addr_a = 10'(i); din_a = 16'(i * 37 + 5);
      ref_mem[i] = din_a;
      @(posedge clk); #1;
    end
    en_a = 0; we_a = 0;
    // Random mixed traffic.
    for (int t = 0; t < 6000; t++) begin
      logic ea, eb, wa, wb;
      logic [9:0] aa; logic [8:0] ab;
      ea = 1'($urandom); eb = 1'($urandom);
      wa = 1'($urandom); wb = 1'($urandom);
      aa = 10'($urandom); ab = 9'($urandom);
      if (ea && eb && (aa >> 1) == 10'(ab)) ab = ab + 1'b1;  // avoid collision
      en_a = ea; we_a = wa; addr_a = aa; din_a = 16'($urandom);
      en_b = eb; we_b = wb; addr_b = ab; din_b = $urandom;
      if (ea) exp_a = ref_mem[aa];
      if (eb) exp_b = {ref_mem[{ab, 1'b1}], ref_mem[{ab, 1'b0}]};
      @(posedge clk);
      if (ea && wa) ref_mem[aa] = din_a;
      if (eb && wb) begin
        ref_mem[{ab, 1'b0}] = din_b[15:0];
        ref_mem[{ab, 1'b1}] = din_b[31:16];
      end
      #1;
      if (t > 0 || ea) begin
        checks++;
        if (dout_a !== exp_a) begin
          failures++;
          if (failures < 10) $display("t=%0d port A %h exp %h", t, dout_a, exp_a);
        end
      end
      if (t > 0 || eb) begin
        checks++;
        if (dout_b !== exp_b) begin
          failures++;
          if (failures < 10) $display("t=%0d port B %h exp %h", t, dout_b, exp_b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
