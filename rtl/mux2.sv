// 2:1 multiplexer, the primitive all adder cells of this design are made of.
// y = sel ? d1 : d0. Purely combinational.
module mux2 (
  input  logic d0,
  input  logic d1,
  input  logic sel,
  output logic y
);
  assign y = sel ? d1 : d0;
endmodule
