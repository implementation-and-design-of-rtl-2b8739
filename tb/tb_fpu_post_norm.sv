// Testbench of the post-normalise and round unit: random signs, exponents
// and raw significands (with runs of leading zeros, values far below the
// subnormal range and above the overflow threshold), all four modes. The
// expected result comes from rounding the exact value
// (-1)^sign * mant * 2^(exp - 175) with the reference model.
module tb_fpu_post_norm;
  import fp_ref_pkg::*;
  logic sign;
  logic signed [11:0] ex;
  logic [49:0] mant;
  logic [1:0] rm;
  logic [31:0] res;
  logic zero, ovf, ine;
  int checks = 0, failures = 0;

  fpu_post_norm dut (.sign(sign), .exp(ex), .mant(mant), .rmode(rm), .result(res), .zero(zero),
                     .overflow(ovf), .inexact(ine));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_t r;
    for (int i = 0; i < 20000; i++) begin
      sign = 1'($urandom);
      ex   = 12'($urandom_range(0, 560)) - 12'sd180;
      mant = 50'({$urandom, $urandom}) >> $urandom_range(0, 49);
      if (i % 9 == 0) mant = mant & ~50'h3FFFFFF;   // exact cases
      rm   = 2'($urandom);
      #1;
      r = round_sp(sign, BW'(mant), int'(ex) - 175, int'(rm));
      checks++;
      if (res != r.res || zero != r.zero || ovf != r.ovf || ine != r.ine) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH s=%b e=%0d m=%h rm=%0d: %h z%b o%b x%b exp %h z%b o%b x%b",
                   sign, ex, mant, rm, res, zero, ovf, ine, r.res, r.zero, r.ovf, r.ine);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
