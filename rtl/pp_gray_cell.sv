// Gray cell of the parallel prefix tree.
// Like the black cell but produces only the group generate
//   G = g_hi | (p_hi & g_lo)
// It is used where the group already reaches the carry-in column, so the group
// propagate is never needed again. Purely combinational; used by adder_256.
module pp_gray_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  output logic g_o
);
  assign g_o = g_hi | (p_hi & g_lo);
endmodule
