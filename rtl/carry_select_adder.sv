// Carry-select adder: the final adder of the Wallace multiplier, which adds the
// two rows left by the reduction tree.
//
// The operands are cut into sections of BLK bits (the last one may be shorter).
// The lowest section is a plain ripple adder fed by cin. Every higher section
// holds two ripple adders, one assuming a carry-in of 0 and one of 1, and the
// carry out of the section below picks one result with 2:1 multiplexers. The
// delay is one section ripple plus one multiplexer per section. The design calls
// for a carry-select adder; the section size BLK = 4 is this implementation's
// choice. Interface: sum + 2^W*cout = a + b + cin. Purely combinational.
module carry_select_adder
  import wallace_pkg::*;
#(
  parameter int unsigned W        = 16,
  parameter int unsigned BLK      = 4,
  parameter fa_style_e   FA_STYLE = FA_XOR_MUX
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NB = (W + BLK - 1) / BLK;

  logic [NB:0] bc;   // carry into each section
  assign bc[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_sec
    localparam int unsigned LO = k * BLK;
    localparam int unsigned SW = (LO + BLK <= W) ? BLK : W - LO;

    if (k == 0) begin : g_first
      ripple_adder #(.W(SW), .FA_STYLE(FA_STYLE)) u_add (
        .a(a[LO +: SW]), .b(b[LO +: SW]), .cin(bc[0]),
        .sum(sum[LO +: SW]), .cout(bc[1]));
    end else begin : g_sel
      logic [SW-1:0] s0, s1;
      logic          c0, c1;
      ripple_adder #(.W(SW), .FA_STYLE(FA_STYLE)) u_add0 (
        .a(a[LO +: SW]), .b(b[LO +: SW]), .cin(1'b0), .sum(s0), .cout(c0));
      ripple_adder #(.W(SW), .FA_STYLE(FA_STYLE)) u_add1 (
        .a(a[LO +: SW]), .b(b[LO +: SW]), .cin(1'b1), .sum(s1), .cout(c1));
      for (genvar i = 0; i < SW; i++) begin : g_mux
        mux2 u_m (.d0(s0[i]), .d1(s1[i]), .sel(bc[k]), .y(sum[LO + i]));
      end
      mux2 u_mc (.d0(c0), .d1(c1), .sel(bc[k]), .y(bc[k+1]));
    end
  end

  assign cout = bc[NB];
endmodule
