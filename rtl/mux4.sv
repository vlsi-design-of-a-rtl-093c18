// 4:1 multiplexer made of three 2:1 multiplexers: two first-level muxes select on
// sel[0] and a second-level mux picks between them on sel[1]. Data input dN is
// chosen when sel == N. Purely combinational.
module mux4 (
  input  logic [3:0] d,
  input  logic [1:0] sel,
  output logic       y
);
  logic lo, hi;
  mux2 u_lo  (.d0(d[0]), .d1(d[1]), .sel(sel[0]), .y(lo));
  mux2 u_hi  (.d0(d[2]), .d1(d[3]), .sel(sel[0]), .y(hi));
  mux2 u_out (.d0(lo),   .d1(hi),   .sel(sel[1]), .y(y));
endmodule
