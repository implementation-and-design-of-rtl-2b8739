// Single precision floating-point unit: add, subtract and multiply with four
// rounding modes and the exception flags sNaN, qNaN, Inf and Ine.
//
// Structure: OP A and OP B go to two pre-normalisers, one for add/subtract
// (exponent difference, alignment shift, effective operation) and one for
// multiply (sign XOR, exponent sum minus bias, significands with hidden bit).
// The add/subtract path runs through a significand adder/subtractor, the
// multiply path through a two-cycle 24 x 24 multiplier. The selected raw
// result goes through one post-normalise-and-round unit driven by RM MODE.
// An exceptions unit overrides the result for NaN, infinity and invalid
// operations and supplies the sNaN flag.
//
// Pipeline (a new operation may start every cycle):
//   stage 1 register: pre-normalised operands, exception decisions
//   stage 2 register: add/sub result; first multiplier cycle (inside fpu_mul24)
//   stage 3 register: second multiplier cycle, post-normalise/round, flags
// Operands presented with start = 1 before rising edge k appear on result
// with ready = 1 after edge k+2 (LATENCY = 3 edges).
// Encodings: op 0 add, 1 subtract, 2 (and 3) multiply; rmode 0 nearest-even,
// 1 toward zero, 2 toward +inf, 3 toward -inf.
// The block structure follows the design; the pipelining, encodings, NaN
// value and subnormal support are this implementation's own choices.
module fpu_sp
  import fpu_pkg::*;
#(
  parameter int unsigned LATENCY = 3  // fixed by the structure; documents the timing
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [1:0]  op,
  input  logic [1:0]  rmode,
  input  logic [31:0] opa,
  input  logic [31:0] opb,
  output logic        ready,
  output logic [31:0] result,
  output logic        zero,
  output logic        snan,
  output logic        qnan,
  output logic        inf,
  output logic        ine
);
  // ---------------- stage 0: pre-normalise, exceptions ----------------
  logic [9:0]         as_exp;
  logic [MW-1:0]      as_fa, as_fb;
  logic               as_sign, as_sign_b, as_eff_sub;
  logic [23:0]        m_ma, m_mb;
  logic signed [11:0] m_exp;
  logic               m_sign;
  logic               x_special, x_snan;
  logic [31:0]        x_res;

  fpu_pre_norm_addsub u_pre_as (
    .opa(opa), .opb(opb), .sub(fpu_op_e'(op) == FPU_SUB),
    .exp_o(as_exp), .fa_o(as_fa), .fb_o(as_fb),
    .sign_o(as_sign), .sign_b_o(as_sign_b), .eff_sub_o(as_eff_sub)
  );

  fpu_pre_norm_mul u_pre_mul (
    .opa(opa), .opb(opb),
    .ma_o(m_ma), .mb_o(m_mb), .exp_o(m_exp), .sign_o(m_sign)
  );

  fpu_except u_exc (
    .opa(opa), .opb(opb), .op(op),
    .special_o(x_special), .special_res_o(x_res), .snan_o(x_snan)
  );

  // ---------------- stage 1 register ----------------
  typedef struct packed {
    logic               is_mul;
    logic [1:0]         rmode;
    logic               special;
    logic [31:0]        special_res;
    logic               snan;
    logic signed [11:0] exp;      // exponent of bit 48 for the chosen path
    logic               sign;     // product sign (multiply path)
  } ctl_t;

  logic          v1, v2;
  ctl_t          c1, c2;
  logic [MW-1:0] s1_fa, s1_fb;
  logic          s1_sign_a, s1_sign_b, s1_eff_sub;
  logic [23:0]   s1_ma, s1_mb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= start;
  end

  always_ff @(posedge clk) begin
    c1.is_mul      <= op[1];
    c1.rmode       <= rmode;
    c1.special     <= x_special;
    c1.special_res <= x_res;
    c1.snan        <= x_snan;
    c1.exp         <= op[1] ? m_exp : $signed({2'b0, as_exp});
    c1.sign        <= m_sign;
    s1_fa          <= as_fa;
    s1_fb          <= as_fb;
    s1_sign_a      <= as_sign;
    s1_sign_b      <= as_sign_b;
    s1_eff_sub     <= as_eff_sub;
    s1_ma          <= m_ma;
    s1_mb          <= m_mb;
  end

  // ---------------- stage 1: add/sub, multiplier cycle 1 ----------------
  logic [MW-1:0] as_sum;
  logic          as_rsign;
  logic [47:0]   prod;

  fpu_addsub u_addsub (
    .fa(s1_fa), .fb(s1_fb), .eff_sub(s1_eff_sub),
    .sign_a(s1_sign_a), .sign_b(s1_sign_b), .rmode(c1.rmode),
    .sum_o(as_sum), .sign_o(as_rsign)
  );

  fpu_mul24 u_mul (.clk(clk), .a(s1_ma), .b(s1_mb), .p(prod));

  // ---------------- stage 2 register ----------------
  logic [MW-1:0] s2_sum;
  logic          s2_sign;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
  end

  always_ff @(posedge clk) begin
    c2      <= c1;
    s2_sum  <= as_sum;
    s2_sign <= c1.is_mul ? c1.sign : as_rsign;
  end

  // ---------------- stage 2: multiplier cycle 2, post-normalise ----------------
  logic [MW-1:0] pn_mant;
  logic [31:0]   pn_res, fin_res;
  logic          pn_zero, pn_ovf, pn_ine;

  assign pn_mant = c2.is_mul ? {prod, 2'b00} : s2_sum;

  fpu_post_norm u_post (
    .sign(s2_sign), .exp(c2.exp), .mant(pn_mant), .rmode(c2.rmode),
    .result(pn_res), .zero(pn_zero), .overflow(pn_ovf), .inexact(pn_ine)
  );

  assign fin_res = c2.special ? c2.special_res : pn_res;

  // ---------------- stage 3 register: outputs ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready  <= 1'b0;
      result <= '0;
      zero   <= 1'b0;
      snan   <= 1'b0;
      qnan   <= 1'b0;
      inf    <= 1'b0;
      ine    <= 1'b0;
    end else begin
      ready  <= v2;
      result <= fin_res;
      zero   <= !c2.special && pn_zero;
      snan   <= c2.snan;
      qnan   <= (fin_res[30:23] == 8'hFF) && (fin_res[22:0] != '0);
      inf    <= (fin_res[30:0] == {8'hFF, 23'b0});
      ine    <= !c2.special && pn_ine;
    end
  end

  // The output stage is three edges behind the input.
  initial assert (LATENCY == 3) else $error("fpu_sp: LATENCY must be 3");
endmodule
