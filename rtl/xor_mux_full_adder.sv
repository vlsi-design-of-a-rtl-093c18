// Low-power full adder: one XOR gate and two 2:1 multiplexers.
//
// s = B xor C is the select line of both multiplexers.
//   s = 0 (B equals C):  sum = A,   carry = B  (B and C are both 0 or both 1)
//   s = 1 (B differs):   sum = ~A,  carry = A
// The sum mux therefore chooses between A and its complement and the carry mux
// between B and A, so the critical path is one XOR plus one multiplexer. The
// structure (XOR on B,C; sum mux on A/~A; carry mux on B/A) follows the design;
// which data input sits on which select value is fixed here by the full-adder
// truth table. Purely combinational.
module xor_mux_full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  logic sel;
  logic a_n;

  assign sel = b ^ c;
  assign a_n = ~a;

  mux2 u_sum   (.d0(a), .d1(a_n), .sel(sel), .y(sum));
  mux2 u_carry (.d0(b), .d1(a),   .sel(sel), .y(carry));
endmodule
