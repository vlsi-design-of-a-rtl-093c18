// Half adder: adds the two bits of a column that holds only two dots.
// sum = a xor b, carry = a and b. Its gate structure is this design's own
// choice (the simplest one). Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
