// Partial product generator of an N x N unsigned multiplier: an array of
// N*N AND gates. Row j holds A & {N{B[j]}}, i.e. the bits A[i]&B[j] of
// weight 2^(i+j). Each row is returned already shifted into its place in a
// 2N-bit word (row j occupies columns j .. j+N-1, the other bits are 0), which
// is the parallelogram of dots the reduction tree starts from.
// Combinational.
module pp_gen #(
  parameter int N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] pp [N]
);
  for (genvar j = 0; j < N; j++) begin : g_row
    logic [N-1:0] and_row;
    assign and_row = a & {N{b[j]}};
    assign pp[j]   = {{N{1'b0}}, and_row} << j;
  end
endmodule
