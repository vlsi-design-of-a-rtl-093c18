// Full adder made of two 4:1 multiplexers, both selected by {A,B}.
//
//   {A,B}   sum mux input   carry mux input
//    00        CI              0
//    01        ~CI             CI
//    10        ~CI             CI
//    11        CI              1
//
// The data inputs are those of the design's multiplexer full adder; each 4:1
// multiplexer is three 2:1 multiplexers (see mux4). The critical path is one
// inverter plus two multiplexer levels. Purely combinational.
module mux4_full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic sum,
  output logic co
);
  logic ci_n;
  assign ci_n = ~ci;

  mux4 u_sum (.d({ci, ci_n, ci_n, ci}),    .sel({a, b}), .y(sum));
  mux4 u_co  (.d({1'b1, ci, ci, 1'b0}),    .sel({a, b}), .y(co));
endmodule
