// Direct-form FIR filter whose multipliers are Wallace tree multipliers.
//
//   y[n] = sum_{k=0}^{TAPS-1} coef[k] * x[n-k]
//
// The incoming sample x feeds tap 0 directly and a delay line of TAPS-1
// registers (z^-1); tap k multiplies the sample k steps old by coef[k]. Each tap
// is a multiply-accumulate stage (fir_mac) and the taps are chained along the
// adder line, as in the usual direct-form structure. A control block
// (tap_enable_ctrl) enables tap k only once k samples have entered since reset;
// a disabled tap holds its multiplier operands at zero.
//
// Interface: a sample is accepted on a rising clock edge with in_valid high. At
// that edge the delay line shifts and y is loaded with the output for that
// sample, so y and out_valid appear one clock after the sample (latency 1, one
// sample per clock at most). Without in_valid the delay line and y hold.
// Samples and coefficients are unsigned N-bit numbers; y is full precision,
// 2N + clog2(TAPS) bits, so it never overflows. Coefficients are inputs and may
// be changed at any time. rst_n is an asynchronous active-low reset that clears
// the delay line, y and the tap enables.
//
// The structure and the 8-bit Wallace multiplier follow the design. The tap count
// (4), the registered output, the handshake and unsigned arithmetic are this
// implementation's choices.
module fir_wallace
  import wallace_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned TAPS     = 4,
  parameter fa_style_e   FA_STYLE = FA_XOR_MUX,
  localparam int unsigned ACC_W   = 2 * N + $clog2(TAPS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [N-1:0]     x,
  input  logic [N-1:0]     coef [TAPS],
  output logic [ACC_W-1:0] y,
  output logic             out_valid,
  output logic [TAPS-1:0]  tap_en
);
  logic [N-1:0]     dly  [TAPS-1];   // dly[k] holds x[n-1-k]
  logic [N-1:0]     xtap [TAPS];     // sample seen by tap k
  logic [ACC_W-1:0] acc  [TAPS+1];   // adder line

  tap_enable_ctrl #(.TAPS(TAPS)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .tap_en(tap_en));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS - 1; k++) dly[k] <= '0;
    end else if (in_valid) begin
      dly[0] <= x;
      for (int k = 1; k < TAPS - 1; k++) dly[k] <= dly[k-1];
    end
  end

  assign xtap[0] = x;
  for (genvar k = 1; k < TAPS; k++) begin : g_xtap
    assign xtap[k] = dly[k-1];
  end

  assign acc[0] = '0;
  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    fir_mac #(.N(N), .ACC_W(ACC_W), .FA_STYLE(FA_STYLE)) u_mac (
      .en(tap_en[k]), .x(xtap[k]), .coef(coef[k]),
      .sum_in(acc[k]), .sum_out(acc[k+1]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= acc[TAPS];
    end
  end
endmodule
