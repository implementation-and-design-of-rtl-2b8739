// One-bit full adder: s = a ^ b ^ ci, co = majority(a, b, ci).
// Used by the 4-bit ripple-carry blocks that close the sparse variant of
// adder_256. Combinational.
module pp_full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (ci & (a ^ b));
endmodule
