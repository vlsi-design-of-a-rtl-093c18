// Unsigned N x N Wallace tree multiplier, p = a * b (2N bits).
//
// Three phases, each in its own module:
//   1. partial_product_gen : N*N AND gates give N rows of partial products;
//   2. wallace_reduction   : rows are reduced three at a time by full adders
//                            (half adders where a column holds two dots) until
//                            two rows remain;
//   3. carry_select_adder  : the two rows are added into the product.
// Every full adder is the XOR + two-multiplexer cell unless FA_STYLE selects the
// 4:1-multiplexer cell. The default N = 8 is the design's main size; N = 16 is
// its other evaluated size. Purely combinational: the product is valid one
// combinational delay after the operands.
module wallace_multiplier
  import wallace_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter fa_style_e   FA_STYLE = FA_XOR_MUX
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [N-1:0][N-1:0] pp;
  logic [2*N-1:0]      row0, row1;
  logic                cout;

  partial_product_gen #(.N(N)) u_ppg (.a(a), .b(b), .pp(pp));

  wallace_reduction #(.N(N), .FA_STYLE(FA_STYLE)) u_red (
    .pp(pp), .row0(row0), .row1(row1));

  // cout is always 0: an N x N product fits in 2N bits.
  carry_select_adder #(.W(2*N), .BLK(4), .FA_STYLE(FA_STYLE)) u_cpa (
    .a(row0), .b(row1), .cin(1'b0), .sum(p), .cout(cout));
endmodule
