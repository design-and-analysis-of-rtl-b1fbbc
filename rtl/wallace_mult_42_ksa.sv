// Approximate unsigned N x N Wallace tree multiplier (default 16 x 16).
//
// Three parts in a row, all combinational:
//   pp_gen            - N*N AND gates form the N partial product rows;
//   wallace_reduce    - a Wallace tree of approximate 4:2 compressors, full
//                       adders and half adders brings the rows down to two
//                       (three stages for N = 16: 16 -> 8 -> 4 -> 2 rows);
//   kogge_stone_adder - a 2N-bit Kogge-Stone parallel prefix adder adds the
//                       sum row and the carry row into the product.
// The approximate compressor trades exactness for area: the result is never
// larger than A*B, and is exact unless, in some compressor, the bits of the
// first three rows of its group are all 1. The port names A, B and sum and the
// 16-bit default follow the reference design; the 2N-bit final adder width,
// the grouping of the tree and the use of the approximate compressor in every
// column are this design's choices. No clock: sum follows A and B after the
// combinational delay.
module wallace_mult_42_ksa #(
  parameter int N = 16
) (
  input  logic [N-1:0]   A,
  input  logic [N-1:0]   B,
  output logic [2*N-1:0] sum
);
  logic [2*N-1:0] pp [N];
  logic [2*N-1:0] row_s;
  logic [2*N-1:0] row_c;
  logic           cout_unused;

  pp_gen #(.N(N)) u_pp (.a(A), .b(B), .pp(pp));

  wallace_reduce #(.N(N)) u_tree (.pp(pp), .row_s(row_s), .row_c(row_c));

  // The carry out is always 0 (the two rows never sum to 2^(2N) or more).
  kogge_stone_adder #(.WIDTH(2 * N)) u_ksa (
    .a(row_s), .b(row_c), .sum(sum), .cout(cout_unused)
  );
endmodule
