// Full-adder cell wrapper: instantiates the full adder named by FA_STYLE so that
// the reduction tree and the final adder can switch cells with one parameter.
// Purely combinational.
module fa_cell
  import wallace_pkg::*;
#(
  parameter fa_style_e FA_STYLE = FA_XOR_MUX
) (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  if (FA_STYLE == FA_MUX4) begin : g_mux4
    mux4_full_adder u_fa (.a(a), .b(b), .ci(c), .sum(sum), .co(carry));
  end else begin : g_xor_mux
    xor_mux_full_adder u_fa (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));
  end
endmodule
