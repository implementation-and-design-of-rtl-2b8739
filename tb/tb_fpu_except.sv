// Testbench of the exceptions unit: operands drawn mostly from zeros,
// infinities and NaNs; checks the sNaN flag, whether the unit takes over the
// result, and the special result (quiet NaN or signed infinity) against the
// reference model.
module tb_fpu_except;
  import fp_ref_pkg::*;
  logic [31:0] opa, opb, sres;
  logic [1:0] op;
  logic special, snan;
  int checks = 0, failures = 0;

  fpu_except dut (.opa(opa), .opb(opb), .op(op), .special_o(special), .special_res_o(sres),
                  .snan_o(snan));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_t r;
    for (int i = 0; i < 5000; i++) begin
      opa = rand_operand();
      opb = rand_operand();
      op  = 2'($urandom);
      #1;
      r = fp_op(int'(op), 0, opa, opb);
      checks++;
      if (special != r.special || snan != r.snan || (special && sres != r.res)) begin
        failures++;
        if (failures < 10) $display("MISMATCH op=%0d %h %h: sp=%b %h sn=%b", op, opa, opb, special, sres, snan);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
