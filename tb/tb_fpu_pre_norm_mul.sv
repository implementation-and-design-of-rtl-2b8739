// Testbench of the multiply pre-normaliser: random and special operands; the
// significands, the product sign and the exponent sum ea + eb - 127 are
// recomputed here with integers and compared.
module tb_fpu_pre_norm_mul;
  import fp_ref_pkg::*;
  logic [31:0] opa, opb;
  logic [23:0] ma, mb;
  logic signed [11:0] ex;
  logic sg;
  int checks = 0, failures = 0;

  fpu_pre_norm_mul dut (.opa(opa), .opb(opb), .ma_o(ma), .mb_o(mb), .exp_o(ex), .sign_o(sg));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb;
    for (int i = 0; i < 5000; i++) begin
      opa = rand_operand();
      opb = rand_operand();
      #1;
      ea = (opa[30:23] == 0) ? 1 : int'(opa[30:23]);
      eb = (opb[30:23] == 0) ? 1 : int'(opb[30:23]);
      checks++;
      if (ma != {opa[30:23] != 0, opa[22:0]} || mb != {opb[30:23] != 0, opb[22:0]} ||
          int'(ex) != ea + eb - 127 || sg != (opa[31] ^ opb[31])) begin
        failures++;
        if (failures < 10) $display("MISMATCH %h %h: %h %h %0d %b", opa, opb, ma, mb, ex, sg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
