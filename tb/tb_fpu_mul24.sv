// Testbench of the two-cycle significand multiplier: a new operand pair every
// cycle; each product must appear one clock edge after its operands were
// sampled, i.e. in the second cycle.
module tb_fpu_mul24;
  logic clk = 0;
  logic [23:0] a = 0, b = 0;
  logic [47:0] p;
  int checks = 0, failures = 0;

  fpu_mul24 dut (.clk(clk), .a(a), .b(b), .p(p));
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] expect_p;
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      a = (i % 10 == 0) ? 24'hFFFFFF : 24'($urandom);
      b = (i % 10 == 1) ? 24'hFFFFFF : 24'($urandom);
      expect_p = 48'(a) * 48'(b);
      @(posedge clk);
      #1;
      a = ~a;   // changing the inputs must not disturb the product now shown
      #1;
      checks++;
      if (p != expect_p) begin
        failures++;
        if (failures < 10) $display("MISMATCH %h * %h = %h, expected %h", ~a, b, p, expect_p);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
