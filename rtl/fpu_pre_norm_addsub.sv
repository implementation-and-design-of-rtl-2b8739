// Pre-normalisation for addition and subtraction.
// Unpacks both operands (subnormals read with exponent 1 and no hidden bit),
// applies the subtract request to the sign of B, and orders the operands by
// magnitude. The larger significand is placed in bits 48:25 of a 50-bit field;
// the smaller one is placed the same way and shifted right by the exponent
// difference, with every bit shifted out ORed into bit 0 (sticky). The
// operation is an effective subtraction when the two signs differ.
// Outputs: the common exponent (that of the larger operand, belonging to bit
// 48), both aligned fields, the larger operand's sign and the effective sign
// of B. Combinational. Exponent difference and right shift follow the design;
// the field widths are this implementation's choice.
module fpu_pre_norm_addsub
  import fpu_pkg::*;
(
  input  logic [31:0]   opa,
  input  logic [31:0]   opb,
  input  logic          sub,
  output logic [9:0]    exp_o,
  output logic [MW-1:0] fa_o,
  output logic [MW-1:0] fb_o,
  output logic          sign_o,
  output logic          sign_b_o,
  output logic          eff_sub_o
);
  sp_float_t a, b;
  logic       sb;
  logic       swap;
  logic [7:0] ea, eb, el, es;
  logic [23:0] ml, ms;
  logic [8:0] diff;
  logic [MW-1:0] ms_full, ms_shift;
  logic          sticky;

  assign a  = sp_float_t'(opa);
  assign b  = sp_float_t'(opb);
  assign sb = b.sign ^ sub;
  assign ea = eff_exp(a);
  assign eb = eff_exp(b);

  // Swap when |B| > |A|
  assign swap = {ea, significand(a)} < {eb, significand(b)};
  assign el = swap ? eb : ea;
  assign es = swap ? ea : eb;
  assign ml = swap ? significand(b) : significand(a);
  assign ms = swap ? significand(a) : significand(b);
  assign diff = {1'b0, el} - {1'b0, es};

  assign ms_full = {1'b0, ms, 25'b0};

  always_comb begin
    if (diff >= 9'd50) begin
      ms_shift = '0;
      sticky   = |ms;
    end else begin
      ms_shift = ms_full >> diff;
      sticky   = |(ms_full & ((MW'(1) << diff) - MW'(1)));
    end
  end

  assign exp_o     = {2'b0, el};
  assign fa_o      = {1'b0, ml, 25'b0};
  assign fb_o      = {ms_shift[MW-1:1], ms_shift[0] | sticky};
  assign sign_o    = swap ? sb : a.sign;
  assign sign_b_o  = swap ? a.sign : sb;
  assign eff_sub_o = a.sign ^ sb;
endmodule
