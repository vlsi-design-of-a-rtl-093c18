// Ripple-carry adder of W full-adder cells: sum + 2^W*cout = a + b + cin.
// Used as the building block of each section of the carry-select adder; the
// cell type follows FA_STYLE. Purely combinational.
module ripple_adder
  import wallace_pkg::*;
#(
  parameter int unsigned W        = 4,
  parameter fa_style_e   FA_STYLE = FA_XOR_MUX
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] cy;
  assign cy[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    fa_cell #(.FA_STYLE(FA_STYLE)) u_fa (
      .a(a[i]), .b(b[i]), .c(cy[i]), .sum(sum[i]), .carry(cy[i+1]));
  end
  assign cout = cy[W];
endmodule
