// Black cell of the parallel prefix tree.
// Combines a higher group (g_hi, p_hi) covering bits i:k with the adjacent lower
// group (g_lo, p_lo) covering bits k-1:j into the group i:j:
//   G = g_hi | (p_hi & g_lo),  P = p_hi & p_lo   (the "o" operator).
// Purely combinational. The cell equations are the standard ones of the
// parallel prefix adder; this module is used by adder_256.
module pp_black_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g_o,
  output logic p_o
);
  assign g_o = g_hi | (p_hi & g_lo);
  assign p_o = p_hi & p_lo;
endmodule
