// Testbench of the 128-bit MAC unit: a stream of random operand pairs with
// random enable and occasional clears. A model keeps acc = {carry, low 256
// bits of (acc + a*b)} and is compared after every edge, so the one-edge
// latency is checked too. Large operands make the 256-bit running sum wrap,
// which must set bit 256; the test counts wraps, holds and clears and fails
// if any of them never happened.
module tb_mac_128;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic [127:0] a = 0, b = 0;
  logic [256:0] y, model;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_hold = 0, n_clr = 0, n_acc = 0;

  mac_128 dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .en(en), .clr(clr), .y(y));
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [256:0] sum;
    model = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom};
      if (i % 5 == 0) begin a = '1; b = '1; end
      if (i % 5 == 1) a = a >> $urandom_range(0, 127);
      en  = ($urandom_range(0, 7) != 0);
      clr = ($urandom_range(0, 40) == 0);
      sum = {1'b0, model[255:0]} + {1'b0, 256'(a) * 256'(b)};
      if (clr) begin model = '0; n_clr++; end
      else if (en) begin model = sum; n_acc++; if (sum[256]) n_wrap++; end
      else n_hold++;
      @(posedge clk);
      #1;
      checks++;
      if (y != model) begin
        failures++;
        if (failures < 10) $display("MISMATCH cycle %0d: y=%h model=%h", i, y, model);
      end
    end
    $display("accumulations=%0d wraps=%0d holds=%0d clears=%0d", n_acc, n_wrap, n_hold, n_clr);
    checks++;
    if (n_wrap == 0 || n_hold == 0 || n_clr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
