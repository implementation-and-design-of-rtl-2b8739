// Post-normalise and round unit of the floating-point unit.
//
// Input value: (-1)^sign * mant * 2^(exp - 127 - 48), i.e. bit 48 of the
// 50-bit raw significand sits at the biased exponent exp (bit 49 takes a
// carry). The unit
//   1. counts leading zeros and shifts the leading one to bit 49; if the
//      exponent would fall below 1 it shifts only far enough to reach exponent
//      1 (or right, collecting a sticky bit), giving a subnormal result;
//   2. takes the 24-bit significand, guard bit and sticky bit, forms the
//      rounded-up and truncated candidates for all four modes in parallel
//      and selects one with rmode (0 nearest-even, 1 toward zero,
//      2 toward +inf, 3 toward -inf);
//   3. renormalises a carry out of rounding, and on exponent overflow returns
//      infinity or the largest finite number as the mode requires.
// Flags: zero (result is +-0), overflow, inexact (bits were lost).
// Combinational. Normalising, rounding in parallel and selecting by mode
// follow the design; subnormal results and the mode encoding are this
// implementation's choice.
module fpu_post_norm
  import fpu_pkg::*;
(
  input  logic               sign,
  input  logic signed [11:0] exp,
  input  logic [MW-1:0]      mant,
  input  logic [1:0]         rmode,
  output logic [31:0]        result,
  output logic               zero,
  output logic               overflow,
  output logic               inexact
);
  logic [5:0]         lz;
  logic signed [11:0] en, et, ef;
  logic [MW-1:0]      n;
  logic               sticky_r;
  logic [23:0]        sig;
  logic               g, st;
  logic [24:0]        cand [4];
  logic [24:0]        sig_r;
  logic               up_ne, up_pi, up_ni;

  // Leading-zero count
  always_comb begin
    lz = 6'(MW);
    for (int i = 0; i < MW; i++) begin
      if (mant[i]) lz = 6'(MW - 1 - i);
    end
  end

  assign en = exp + 12'sd1 - $signed({6'b0, lz});

  // Normalising shift
  always_comb begin
    n        = '0;
    sticky_r = 1'b0;
    if (en >= 12'sd1) begin
      et = en;
      n  = mant << lz;
    end else begin
      et = 12'sd1;
      if (exp >= 12'sd0) begin
        n = mant << exp[5:0];
      end else if (exp > -12'sd50) begin
        n        = mant >> (-exp);
        sticky_r = |(mant & ((MW'(1) << (-exp)) - MW'(1)));
      end else begin
        n        = '0;
        sticky_r = |mant;
      end
    end
  end

  assign sig = n[MW-1 -: 24];
  assign g   = n[MW-25];
  assign st  = (|n[MW-26:0]) | sticky_r;

  // All roundings in parallel
  assign up_ne = g & (st | sig[0]);
  assign up_pi = ~sign & (g | st);
  assign up_ni = sign & (g | st);
  assign cand[RM_NEAREST_EVEN] = {1'b0, sig} + {24'b0, up_ne};
  assign cand[RM_TO_ZERO]      = {1'b0, sig};
  assign cand[RM_TO_POS_INF]   = {1'b0, sig} + {24'b0, up_pi};
  assign cand[RM_TO_NEG_INF]   = {1'b0, sig} + {24'b0, up_ni};
  assign sig_r = cand[rmode];

  assign ef = sig_r[24] ? et + 12'sd1 : (sig_r[23] ? et : 12'sd0);

  always_comb begin
    overflow = 1'b0;
    if (mant == '0) begin
      result = {sign, 31'b0};
    end else if (ef >= 12'sd255) begin
      overflow = 1'b1;
      unique case (rmode_e'(rmode))
        RM_NEAREST_EVEN: result = {sign, 8'hFF, 23'b0};
        RM_TO_ZERO:      result = {sign, 8'hFE, {23{1'b1}}};
        RM_TO_POS_INF:   result = sign ? {1'b1, 8'hFE, {23{1'b1}}} : {1'b0, 8'hFF, 23'b0};
        default:         result = sign ? {1'b1, 8'hFF, 23'b0} : {1'b0, 8'hFE, {23{1'b1}}};
      endcase
    end else begin
      result = {sign, ef[7:0], sig_r[24] ? sig_r[23:1] : sig_r[22:0]};
    end
  end

  assign zero    = (result[30:0] == '0);
  assign inexact = (mant != '0) && (g | st | overflow);
endmodule
