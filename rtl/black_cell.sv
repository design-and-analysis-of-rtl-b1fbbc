// Black cell of a parallel prefix carry tree. It merges a more significant
// bit group (g_hi, p_hi) with the adjoining less significant group
// (g_lo, p_lo) into one group:
//   g = g_hi | (p_hi & g_lo),   p = p_hi & p_lo.
// The group generates a carry if its upper part generates one, or the upper
// part propagates a carry the lower part generates. Combinational.
module black_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g,
  output logic p
);
  assign g = g_hi | (p_hi & g_lo);
  assign p = p_hi & p_lo;
endmodule
