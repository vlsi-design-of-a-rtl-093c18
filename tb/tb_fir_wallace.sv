// End-to-end self-check of fir_wallace at its default size (8-bit samples and
// coefficients, 4 taps, XOR/MUX full adders).
//
// A reference model keeps the history of accepted samples (zero before the
// first one) and computes y[n] = sum coef[k] * x[n-k] for every accepted sample.
// One clock after each accepted sample, out_valid must be high and y must match
// (latency 1); on idle clocks out_valid must be low and y must hold. tap_en must
// show k+1 enabled taps after k samples. The run covers, and counts:
//   ramp     : each tap k >= 1 being switched on by the enable control;
//   hold     : clocks without a sample (delay line and output hold);
//   coef     : coefficient changes while samples are flowing;
//   fullscale: all-ones samples and coefficients filling every tap (largest y);
//   restart  : a reset in the middle of the run, after which the ramp repeats.
// A mechanism that never happened counts as a failure.
module tb_fir_wallace;
  localparam int N    = 8;
  localparam int TAPS = 4;
  localparam int YW   = 2 * N + $clog2(TAPS);

  int checks = 0, failures = 0;
  int n_ramp = 0, n_hold = 0, n_coef = 0, n_full = 0, n_restart = 0;

  logic            clk = 0, rst_n = 0, in_valid = 0;
  logic [N-1:0]    x = '0;
  logic [N-1:0]    coef [TAPS];
  logic [YW-1:0]   y;
  logic            out_valid;
  logic [TAPS-1:0] tap_en, tap_en_prev;

  fir_wallace dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .coef(coef),
                   .y(y), .out_valid(out_valid), .tap_en(tap_en));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0]  hist [TAPS];   // hist[k] = x[n-k] once the new sample is in
  logic [YW-1:0] y_prev;
  int            accepted;

  function automatic logic [YW-1:0] model();
    logic [YW-1:0] s = '0;
    for (int k = 0; k < TAPS; k++) s += YW'(coef[k]) * YW'(hist[k]);
    return s;
  endfunction

  task automatic do_reset();
    rst_n = 0; in_valid = 0;
    for (int k = 0; k < TAPS; k++) hist[k] = '0;
    accepted = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    y_prev = y;
    tap_en_prev = tap_en;
  endtask

  // One clock: present (v, xv), let the edge pass, check the outputs.
  task automatic step(logic v, logic [N-1:0] xv);
    logic [YW-1:0] exp_y;
    logic [TAPS-1:0] exp_en;
    in_valid = v;
    x = xv;
    if (v) begin
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = xv;
      exp_y = model();
    end else begin
      exp_y = y_prev;
      n_hold++;
    end
    @(posedge clk);
    #1;
    if (v) accepted++;
    checks++;
    if (out_valid !== v || y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0t valid=%0d out_valid=%0d y=%0d expected=%0d", $time, v,
                 out_valid, y, exp_y);
    end
    exp_en = '0;
    for (int k = 0; k < TAPS; k++) if (k <= accepted) exp_en[k] = 1'b1;
    checks++;
    if (tap_en !== exp_en) begin
      failures++;
      $display("FAIL tap_en=%b expected %b after %0d samples", tap_en, exp_en, accepted);
    end
    for (int k = 1; k < TAPS; k++) if (tap_en[k] && !tap_en_prev[k]) n_ramp++;
    if (v && exp_y == YW'(TAPS * (2**N - 1) * (2**N - 1))) n_full++;
    tap_en_prev = tap_en;
    y_prev = y;
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) coef[k] = N'($urandom);
    do_reset();

    // Random traffic with gaps and occasional coefficient changes.
    for (int t = 0; t < 3000; t++) begin
      if (t % 97 == 50) begin
        coef[$urandom_range(0, TAPS - 1)] = N'($urandom);
        n_coef++;
      end
      if (t == 1500) begin
        do_reset();
        n_restart++;
      end
      step(($urandom % 10) < 7, N'($urandom));
    end

    // Full scale: all-ones samples through all-ones coefficients.
    for (int k = 0; k < TAPS; k++) coef[k] = '1;
    n_coef++;
    for (int t = 0; t < 2 * TAPS; t++) step(1'b1, '1);
    step(1'b0, '0);

    $display("mechanisms: ramp=%0d hold=%0d coef=%0d fullscale=%0d restart=%0d",
             n_ramp, n_hold, n_coef, n_full, n_restart);
    if (n_ramp < 2 * (TAPS - 1)) begin failures++; $display("FAIL ramp not seen twice"); end
    if (n_hold == 0)    begin failures++; $display("FAIL no hold"); end
    if (n_coef == 0)    begin failures++; $display("FAIL no coefficient change"); end
    if (n_full == 0)    begin failures++; $display("FAIL no full-scale output"); end
    if (n_restart == 0) begin failures++; $display("FAIL no restart"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
