// Testbench of the accumulator register: random enable, clear and data
// over many cycles plus an asynchronous reset in the middle; a model register
// in the testbench predicts the output after every edge.
module tb_accum;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [256:0] a = 0, y, model;
  int checks = 0, failures = 0;

  accum dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .a(a), .y(y));
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 15) == 0);
      for (int k = 0; k < 9; k++) a[k*32 +: 32] = $urandom;
      if (clr) model = '0;
      else if (en) model = a;
      if (i == 1500) begin
        #1 rst_n = 0;
        #1 rst_n = 1;
        model = (clr || en) ? model : '0;
        if (!clr && en) model = a;
        checks++;
        if (y != '0) failures++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (y != model) begin
        failures++;
        if (failures < 10) $display("MISMATCH cycle %0d: y=%h model=%h", i, y, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
