// Shared types for the Wallace tree multiplier and the FIR filter built on it.
//
// fa_style_e selects the full-adder cell used wherever the reduction tree or the
// final adder needs a 3:2 counter:
//   FA_XOR_MUX : the low-power cell of the design, one XOR whose output selects
//                two 2:1 multiplexers (the default everywhere).
//   FA_MUX4    : the earlier multiplexer cell, two 4:1 multiplexers selected by
//                the operands A and B with the carry-in and its complement as data.
package wallace_pkg;

  typedef enum logic [0:0] {
    FA_XOR_MUX = 1'b0,
    FA_MUX4    = 1'b1
  } fa_style_e;

endpackage
