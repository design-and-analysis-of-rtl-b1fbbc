// Grey cell of a parallel prefix carry tree. Like the black cell it merges a
// more significant group (g_hi, p_hi) with a less significant group g_lo, but
// it is used where the merged group reaches bit 0, so only the group
// generate is needed (it is the carry out of that bit position):
//   g = g_hi | (p_hi & g_lo).
// Combinational.
module grey_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  output logic g
);
  assign g = g_hi | (p_hi & g_lo);
endmodule
