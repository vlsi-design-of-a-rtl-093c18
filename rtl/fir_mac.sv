// One tap of the FIR filter (a multiply-accumulate stage).
//
// sum_out = sum_in + coef * x when the tap is enabled, sum_out = sum_in when it
// is not. A disabled tap forces both multiplier operands to zero, so the Wallace
// tree sees no switching while the sample it would use is not yet valid (operand
// isolation for low power). The multiply is the Wallace tree multiplier; the
// accumulate adder is a plain adder. Unsigned data and coefficients. Purely
// combinational: taps are chained into the adder line of a direct-form filter.
module fir_mac
  import wallace_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned ACC_W    = 18,
  parameter fa_style_e   FA_STYLE = FA_XOR_MUX
) (
  input  logic             en,
  input  logic [N-1:0]     x,
  input  logic [N-1:0]     coef,
  input  logic [ACC_W-1:0] sum_in,
  output logic [ACC_W-1:0] sum_out
);
  logic [N-1:0]   x_g, c_g;
  logic [2*N-1:0] prod;

  assign x_g = en ? x    : '0;
  assign c_g = en ? coef : '0;

  wallace_multiplier #(.N(N), .FA_STYLE(FA_STYLE)) u_mul (.a(x_g), .b(c_g), .p(prod));

  assign sum_out = sum_in + ACC_W'(prod);
endmodule
