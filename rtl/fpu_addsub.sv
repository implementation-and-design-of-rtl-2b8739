// Significand adder/subtractor of the floating-point unit.
// Adds the two aligned 50-bit fields, or subtracts the smaller from the larger
// for an effective subtraction, so the result is always a magnitude. The
// result carries the larger operand's sign, except for an exact zero from
// operands of opposite sign, which is +0 (-0 when rounding toward minus
// infinity); the sum of two zeros of the same sign keeps that sign.
// Combinational. The add/subtract role follows the design; the width and the
// zero-sign rule (the usual IEEE 754 one) are this implementation's choice.
module fpu_addsub
  import fpu_pkg::*;
(
  input  logic [MW-1:0] fa,
  input  logic [MW-1:0] fb,
  input  logic          eff_sub,
  input  logic          sign_a,
  input  logic          sign_b,
  input  logic [1:0]    rmode,
  output logic [MW-1:0] sum_o,
  output logic          sign_o
);
  always_comb begin
    if (eff_sub) sum_o = fa - fb;
    else         sum_o = fa + fb;
    if (sum_o == '0) begin
      if (sign_a == sign_b) sign_o = sign_a;
      else                  sign_o = (rmode_e'(rmode) == RM_TO_NEG_INF);
    end else begin
      sign_o = sign_a;
    end
  end
endmodule
