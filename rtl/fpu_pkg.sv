// Shared types and constants of the single precision floating-point unit.
// Format: sign in bit 31, 8-bit biased exponent in bits 30:23 (bias 127),
// 23-bit fraction in bits 22:0. Operation and rounding-mode encodings are this
// implementation's own choice.
package fpu_pkg;

  typedef enum logic [1:0] {
    FPU_ADD = 2'd0,
    FPU_SUB = 2'd1,
    FPU_MUL = 2'd2,
    FPU_MUL_ALT = 2'd3   // treated as multiply
  } fpu_op_e;

  typedef enum logic [1:0] {
    RM_NEAREST_EVEN = 2'd0,
    RM_TO_ZERO      = 2'd1,
    RM_TO_POS_INF   = 2'd2,
    RM_TO_NEG_INF   = 2'd3
  } rmode_e;

  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [22:0] frac;
  } sp_float_t;

  localparam int unsigned BIAS = 127;
  // Raw significand width handed to the post-normaliser: bit 48 is the hidden
  // bit position at the nominal exponent, bit 49 takes a carry.
  localparam int unsigned MW = 50;

  localparam logic [31:0] QNAN_CANON = 32'h7FC0_0000;

  function automatic logic is_nan(input sp_float_t f);
    return (f.exp == 8'hFF) && (f.frac != '0);
  endfunction

  function automatic logic is_inf(input sp_float_t f);
    return (f.exp == 8'hFF) && (f.frac == '0);
  endfunction

  function automatic logic is_zero(input sp_float_t f);
    return (f.exp == 8'h00) && (f.frac == '0);
  endfunction

  // A signalling NaN has the most significant fraction bit clear.
  function automatic logic is_snan(input sp_float_t f);
    return is_nan(f) && !f.frac[22];
  endfunction

  // Significand with hidden bit (0 for zero and subnormals).
  function automatic logic [23:0] significand(input sp_float_t f);
    return {f.exp != 8'h00, f.frac};
  endfunction

  // Effective exponent: subnormals use exponent 1.
  function automatic logic [7:0] eff_exp(input sp_float_t f);
    return (f.exp == 8'h00) ? 8'd1 : f.exp;
  endfunction

endpackage
