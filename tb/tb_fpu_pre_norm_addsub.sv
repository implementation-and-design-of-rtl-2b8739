// Testbench of the add/subtract pre-normaliser: random and special operands
// with both add and subtract. Checks that the larger magnitude is chosen,
// that the smaller significand is shifted right by the exponent difference
// (exactly while nothing falls off, with the sticky bit set when something
// does), the common exponent and the signs.
module tb_fpu_pre_norm_addsub;
  import fp_ref_pkg::*;
  logic [31:0] opa, opb;
  logic sub;
  logic [9:0] ex;
  logic [49:0] fa, fb;
  logic sg, sgb, effsub;
  int checks = 0, failures = 0;

  fpu_pre_norm_addsub dut (.opa(opa), .opb(opb), .sub(sub), .exp_o(ex), .fa_o(fa), .fb_o(fb),
                           .sign_o(sg), .sign_b_o(sgb), .eff_sub_o(effsub));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb, el, d;
    logic [23:0] ma, mb, ml, ms;
    logic sa, sb, sl, ss;
    logic [299:0] wide, expect_fb;
    logic ok;
    for (int i = 0; i < 5000; i++) begin
      opa = rand_operand();
      opb = rand_operand();
      if (i % 3 == 0) opb[30:23] = opa[30:23] + 8'($urandom_range(0, 30));
      sub = 1'($urandom);
      #1;
      ea = (opa[30:23] == 0) ? 1 : int'(opa[30:23]);
      eb = (opb[30:23] == 0) ? 1 : int'(opb[30:23]);
      ma = {opa[30:23] != 0, opa[22:0]};
      mb = {opb[30:23] != 0, opb[22:0]};
      sa = opa[31];
      sb = opb[31] ^ sub;
      if (ea > eb || (ea == eb && ma >= mb)) begin
        el = ea; d = ea - eb; ml = ma; ms = mb; sl = sa; ss = sb;
      end else begin
        el = eb; d = eb - ea; ml = mb; ms = ma; sl = sb; ss = sa;
      end
      // exact shifted value in a field with 250 extra bits below
      wide = {1'b0, ms, 275'b0} >> d;
      expect_fb = wide >> 250;
      ok = (fa == {1'b0, ml, 25'b0}) && (int'(ex) == el) && (sg == sl) && (sgb == ss) &&
           (effsub == (sa ^ sb));
      if (wide[249:0] == 0) ok = ok && (fb == expect_fb[49:0]);
      else ok = ok && (fb[49:1] == expect_fb[49:1]) && fb[0];
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("MISMATCH %h %h sub=%b: fa=%h fb=%h ex=%0d", opa, opb, sub, fa, fb, ex);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
