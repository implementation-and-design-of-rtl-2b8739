// Two-cycle 24 x 24 -> 48-bit unsigned significand multiplier.
// First cycle: a times the low and high 12-bit halves of b are formed and
// registered on the rising clock edge. Second cycle: the two registered
// partial products are shifted and added combinationally, so p shows the
// product of the a, b sampled at the previous edge. No reset is needed: the
// pipeline carries its own valid bit outside this block.
// The two-cycle, 24-bit organisation follows the design; the split of b into
// two 12-bit halves is this implementation's choice.
module fpu_mul24 (
  input  logic        clk,
  input  logic [23:0] a,
  input  logic [23:0] b,
  output logic [47:0] p
);
  logic [35:0] pp_lo_q, pp_hi_q;

  always_ff @(posedge clk) begin
    pp_lo_q <= a * {12'b0, b[11:0]};
    pp_hi_q <= a * {12'b0, b[23:12]};
  end

  assign p = {12'b0, pp_lo_q} + ({12'b0, pp_hi_q} << 12);
endmodule
