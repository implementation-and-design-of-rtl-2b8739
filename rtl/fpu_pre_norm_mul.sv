// Pre-normalisation for multiplication.
// Unpacks both single precision operands into 24-bit significands (hidden bit
// restored; subnormals read with exponent 1 and hidden bit 0), forms the
// product sign as the XOR of the input signs and the product exponent as
// ea + eb - 127 (signed, 12 bits). With the 48-bit significand product placed
// in bits 49:2 of the post-normaliser's raw field, that exponent belongs to
// bit 48. Combinational. The sign/exponent/significand steps follow the
// design; exponent overflow and underflow are resolved after normalisation.
module fpu_pre_norm_mul
  import fpu_pkg::*;
(
  input  logic [31:0]        opa,
  input  logic [31:0]        opb,
  output logic [23:0]        ma_o,
  output logic [23:0]        mb_o,
  output logic signed [11:0] exp_o,
  output logic               sign_o
);
  sp_float_t fa, fb;
  assign fa = sp_float_t'(opa);
  assign fb = sp_float_t'(opb);

  assign ma_o   = significand(fa);
  assign mb_o   = significand(fb);
  assign sign_o = fa.sign ^ fb.sign;
  assign exp_o  = $signed({4'b0, eff_exp(fa)}) + $signed({4'b0, eff_exp(fb)})
                  - 12'(BIAS);
endmodule
