// Testbench of the significand adder/subtractor: random fields with fa >= fb,
// both operations, all rounding modes; checks the magnitude and the result
// sign including the signed-zero rule.
module tb_fpu_addsub;
  logic [49:0] fa, fb, sum;
  logic effsub, sa, sb, sg;
  logic [1:0] rm;
  int checks = 0, failures = 0;

  fpu_addsub dut (.fa(fa), .fb(fb), .eff_sub(effsub), .sign_a(sa), .sign_b(sb), .rmode(rm),
                  .sum_o(sum), .sign_o(sg));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [49:0] t, es;
    logic eg;
    for (int i = 0; i < 5000; i++) begin
      fa = {1'b0, 49'({$urandom, $urandom})};
      fb = (i % 4 == 0) ? fa : {1'b0, 49'({$urandom, $urandom})};
      if (fb > fa) begin t = fa; fa = fb; fb = t; end
      sa = 1'($urandom);
      sb = 1'($urandom);
      effsub = sa ^ sb;
      rm = 2'($urandom);
      if (i % 7 == 0) begin fa = 0; fb = 0; end
      #1;
      es = effsub ? fa - fb : fa + fb;
      eg = (es != 0) ? sa : ((sa == sb) ? sa : (rm == 2'd3));
      checks++;
      if (sum != es || sg != eg) begin
        failures++;
        if (failures < 10) $display("MISMATCH fa=%h fb=%h sub=%b: %h %b", fa, fb, effsub, sum, sg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
