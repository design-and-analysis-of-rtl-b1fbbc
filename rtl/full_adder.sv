// Full adder (3:2 counter): adds three bits of equal weight, giving a sum bit
// of the same weight and a carry bit of twice the weight, so that
// a + b + cin = s + 2*c. It is the output stage of the approximate 4:2
// compressor and the cell of the reduction tree for three-bit columns.
// Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic c
);
  assign s = a ^ b ^ cin;
  assign c = (a & b) | (cin & (a ^ b));
endmodule
