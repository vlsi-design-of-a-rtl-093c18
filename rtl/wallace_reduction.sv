// Wallace reduction tree: turns the N rows of partial products into two rows.
//
// The rows are reduced in stages. In each stage the rows are taken in groups of
// three; in every column of a group, three dots go to a full adder, two dots to a
// half adder and a single dot passes straight down. A group thus yields a sum row
// (same column) and a carry row (one column to the left). Rows left over when the
// row count is not a multiple of three pass to the next stage unchanged. The row
// count therefore follows R(i+1) = 2*floor(R(i)/3) + R(i) mod 3, starting at
// R(0) = N, and the tree stops when two rows remain (N = 8: 8, 6, 4, 3, 2, four
// stages). Which dot exists where is worked out at elaboration time by the
// constant function stage_map(), so only the adders a dot diagram would show are
// instantiated.
//
// Interface: pp[i][j] = a[j] & b[i] (weight 2^(i+j)) from partial_product_gen;
// row0 + row1 equals the product modulo 2^(2N). A carry out of the top column can
// only be zero for an N x N product and is not kept. Purely combinational.
// The grouping rule is the design's; the bit-level placement of sum and carry
// rows within a stage is this implementation's choice.
module wallace_reduction
  import wallace_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter fa_style_e   FA_STYLE = FA_XOR_MUX
) (
  input  logic [N-1:0][N-1:0] pp,
  output logic [2*N-1:0]      row0,
  output logic [2*N-1:0]      row1
);
  localparam int unsigned W = 2 * N;

  if (N < 2) begin : g_bad_n
    $error("wallace_reduction needs N >= 2");
  end

  // Rows present before stage s.
  function automatic int unsigned rows_at(int unsigned s);
    int unsigned r = N;
    for (int unsigned t = 0; t < s; t++) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  function automatic int unsigned num_stages();
    int unsigned r = N;
    int unsigned s = 0;
    while (r > 2) begin
      r = 2 * (r / 3) + r % 3;
      s++;
    end
    return s;
  endfunction

  // Dot map before stage s: bit r*W+c is set when row r holds a dot in
  // column c.
  function automatic logic [N*W-1:0] stage_map(int unsigned s);
    logic [N*W-1:0] m;
    logic [N*W-1:0] nm;
    int unsigned rc = N;
    int unsigned g, n;
    m = '0;
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned j = 0; j < N; j++) m[i*W + i + j] = 1'b1;
    for (int unsigned t = 0; t < s; t++) begin
      g  = rc / 3;
      nm = '0;
      for (int unsigned k = 0; k < g; k++) begin
        for (int unsigned c = 0; c < W; c++) begin
          n = 0;
          for (int unsigned i = 0; i < 3; i++) if (m[(3*k+i)*W + c]) n++;
          if (n >= 1) nm[(2*k)*W + c] = 1'b1;
          if (n >= 2 && c + 1 < W) nm[(2*k+1)*W + c + 1] = 1'b1;
        end
      end
      for (int unsigned i = 0; i < rc % 3; i++)
        for (int unsigned c = 0; c < W; c++) nm[(2*g+i)*W + c] = m[(3*g+i)*W + c];
      m  = nm;
      rc = 2 * g + rc % 3;
    end
    return m;
  endfunction

  // Number of dots in column c of group g of dot map m.
  function automatic int unsigned dots(logic [N*W-1:0] m, int unsigned g, int unsigned c);
    int unsigned n = 0;
    for (int unsigned i = 0; i < 3; i++) if (m[(3*g+i)*W + c]) n++;
    return n;
  endfunction

  // Row (within the whole stage) of the k-th dot in column c of group g.
  function automatic int unsigned dot_row(logic [N*W-1:0] m, int unsigned g, int unsigned c,
                                          int unsigned k);
    int unsigned seen = 0;
    int unsigned res  = 3*g;
    for (int unsigned i = 0; i < 3; i++) begin
      if (m[(3*g+i)*W + c]) begin
        if (seen == k) res = 3*g + i;
        seen++;
      end
    end
    return res;
  endfunction

  localparam int unsigned NS = num_stages();

  for (genvar s = 0; s <= NS; s++) begin : g_stage
    logic [W-1:0] row [N];

    if (s == 0) begin : g_in
      for (genvar r = 0; r < N; r++) begin : g_r
        assign row[r] = W'(pp[r]) << r;
      end
    end else begin : g_red
      // SP is s - 1, kept from wrapping in case a tool evaluates this branch
      // for s = 0 as well.
      localparam int unsigned SP = (s > 0) ? s - 1 : 0;
      localparam int unsigned RP = rows_at(SP);
      localparam int unsigned G  = RP / 3;
      localparam int unsigned RN = rows_at(s);
      localparam logic [N*W-1:0] M = stage_map(SP);

      logic [W-1:0] sb [G];   // sum row of each group
      logic [W-1:0] cb [G];   // carry row of each group, before the shift

      for (genvar g = 0; g < G; g++) begin : g_grp
        for (genvar c = 0; c < W; c++) begin : g_col
          localparam int unsigned D  = dots(M, g, c);
          localparam int unsigned R0 = dot_row(M, g, c, 0);
          localparam int unsigned R1 = dot_row(M, g, c, 1);
          localparam int unsigned R2 = dot_row(M, g, c, 2);
          if (D == 3) begin : g_fa
            fa_cell #(.FA_STYLE(FA_STYLE)) u_fa (
              .a(g_stage[s-1].row[R0][c]), .b(g_stage[s-1].row[R1][c]),
              .c(g_stage[s-1].row[R2][c]), .sum(sb[g][c]), .carry(cb[g][c]));
          end else if (D == 2) begin : g_ha
            half_adder u_ha (
              .a(g_stage[s-1].row[R0][c]), .b(g_stage[s-1].row[R1][c]),
              .sum(sb[g][c]), .carry(cb[g][c]));
          end else if (D == 1) begin : g_pass
            assign sb[g][c] = g_stage[s-1].row[R0][c];
            assign cb[g][c] = 1'b0;
          end else begin : g_empty
            assign sb[g][c] = 1'b0;
            assign cb[g][c] = 1'b0;
          end
        end
        assign row[2*g]   = sb[g];
        // cb[g][W-1] would carry beyond the 2N-bit product; it is always zero.
        assign row[2*g+1] = {cb[g][W-2:0], 1'b0};
      end

      for (genvar r = 2 * G; r < N; r++) begin : g_rest
        if (r < RN) begin : g_left
          assign row[r] = g_stage[s-1].row[3*G + (r - 2*G)];
        end else begin : g_none
          assign row[r] = '0;
        end
      end
    end
  end

  assign row0 = g_stage[NS].row[0];
  assign row1 = g_stage[NS].row[1];
endmodule
