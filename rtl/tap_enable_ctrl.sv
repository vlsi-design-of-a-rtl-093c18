// Tap enable control: turns on each multiply-accumulate stage of the FIR filter
// only once the delay line holds a valid sample for it.
//
// Tap 0 works on the incoming sample and is always enabled. Tap k (k >= 1) uses
// the sample that entered k samples ago, so it is enabled after k samples have
// been accepted since reset. A shift register of ones (fill) records this: every
// accepted sample (in_valid high at a rising clock edge) shifts a 1 in. After
// TAPS-1 samples every tap stays enabled until the next reset.
// Interface: tap_en[k] is registered and changes only on an accepted sample.
// The design only states that a control logic enables each stage at the
// appropriate time; this fill-counter form is this implementation's choice.
module tap_enable_ctrl #(
  parameter int unsigned TAPS = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic [TAPS-1:0] tap_en
);
  if (TAPS < 2) begin : g_bad_taps
    $error("tap_enable_ctrl needs TAPS >= 2");
  end

  logic [TAPS-2:0] fill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        fill <= '0;
    else if (in_valid) fill <= (TAPS-1)'({fill, 1'b1});
  end

  assign tap_en = {fill, 1'b1};
endmodule
