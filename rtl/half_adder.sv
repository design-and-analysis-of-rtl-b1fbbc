// Half adder: adds two bits, giving a sum bit (XOR) and a carry bit (AND).
// Used by the partial product reduction tree on columns where only two bits
// meet in a group of four rows. Purely combinational, no clock.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
