// Exceptions unit of the floating-point unit.
// Classifies both operands and decides the cases the arithmetic path cannot:
//   - any NaN input, inf - inf (effective subtraction of infinities) and
//     0 * inf give the quiet NaN 0x7FC00000;
//   - an infinite input otherwise gives an infinity with the proper sign.
// special_o says that special_res_o replaces the arithmetic result;
// snan_o says that an input is a signalling NaN (fraction MSB clear).
// The remaining flags (qNaN, Inf, Ine) are derived from the final result in
// fpu_sp. Combinational. The sNaN/qNaN definitions follow the design; the
// canonical NaN value is this implementation's choice.
module fpu_except
  import fpu_pkg::*;
(
  input  logic [31:0] opa,
  input  logic [31:0] opb,
  input  logic [1:0]  op,
  output logic        special_o,
  output logic [31:0] special_res_o,
  output logic        snan_o
);
  sp_float_t a, b;
  logic      is_mul, sb;

  assign a      = sp_float_t'(opa);
  assign b      = sp_float_t'(opb);
  assign is_mul = op[1];
  assign sb     = b.sign ^ (fpu_op_e'(op) == FPU_SUB);
  assign snan_o = is_snan(a) | is_snan(b);

  always_comb begin
    special_o     = 1'b1;
    special_res_o = QNAN_CANON;
    if (is_nan(a) || is_nan(b)) begin
      special_res_o = QNAN_CANON;
    end else if (is_mul) begin
      if ((is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b)))
        special_res_o = QNAN_CANON;
      else if (is_inf(a) || is_inf(b))
        special_res_o = {a.sign ^ b.sign, 8'hFF, 23'b0};
      else
        special_o = 1'b0;
    end else begin
      if (is_inf(a) && is_inf(b) && (a.sign != sb))
        special_res_o = QNAN_CANON;
      else if (is_inf(a))
        special_res_o = {a.sign, 8'hFF, 23'b0};
      else if (is_inf(b))
        special_res_o = {sb, 8'hFF, 23'b0};
      else
        special_o = 1'b0;
    end
  end
endmodule
