// Approximate 4:2 compressor. Four bits of equal weight x1..x4 are reduced to
// a sum bit S (same weight) and a carry bit C (double weight), with
// S + 2*C ~= x1 + x2 + x3 + x4. Unlike the exact 4:2 compressor it has no
// carry-in or carry-out, so neighbouring columns do not depend on each other.
//
// Structure: the pair x1, x2 is re-coded into w1 = x1 | x2 and a flag
// x1 & x2; that flag is ORed with x3 into w2'. w1, w2' and w3 = x4 then go
// through a full adder. Since (x1|x2) + (x1&x2) = x1 + x2, the result is exact
// except when x1, x2 and x3 are all 1: then the OR loses one unit and the
// output is one less than the true count. That is 2 of the 16 input
// combinations (x1 = x2 = x3 = 1, x4 = 0 or 1), with error -1 each time.
// The output never exceeds the true count.
//
// Purely combinational, no clock.
module approx_compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  output logic s,
  output logic c
);
  logic w1, w2p, w3;

  assign w1  = x1 | x2;
  assign w2p = (x1 & x2) | x3;
  assign w3  = x4;

  full_adder u_fa (.a(w1), .b(w2p), .cin(w3), .s(s), .c(c));
endmodule
