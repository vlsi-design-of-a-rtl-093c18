// Partial product generator: N*N two-input AND gates.
//
// Row i of the output is the multiplicand a gated by multiplier bit b[i]:
// pp[i][j] = a[j] & b[i], with weight 2^(i+j). The rows are left unshifted; the
// reduction tree applies the weight of each row. Unsigned operands. Purely
// combinational.
module partial_product_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0][N-1:0]  pp
);
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      assign pp[i][j] = a[j] & b[i];
    end
  end
endmodule
