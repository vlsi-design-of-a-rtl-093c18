// Self-check of tap_enable_ctrl (TAPS = 4). Samples are offered with random gaps;
// after k accepted samples exactly taps 0..k must be enabled (all taps from the
// third sample on), idle cycles must change nothing, and reset clears it again.
module tb_tap_enable_ctrl;
  localparam int TAPS = 4;
  int checks = 0, failures = 0;

  logic            clk = 0, rst_n = 0, in_valid = 0;
  logic [TAPS-1:0] tap_en;
  int              accepted;

  tap_enable_ctrl #(.TAPS(TAPS)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
                                      .tap_en(tap_en));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [TAPS-1:0] expect_en(int n);
    logic [TAPS-1:0] e = '0;
    for (int k = 0; k < TAPS; k++) if (k <= n) e[k] = 1'b1;
    return e;
  endfunction

  initial begin
    for (int round = 0; round < 2; round++) begin
      rst_n = 0; in_valid = 0; accepted = 0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      for (int t = 0; t < 40; t++) begin
        in_valid = 1'($urandom);
        @(posedge clk);
        if (in_valid) accepted++;
        #1;
        checks++;
        if (tap_en != expect_en(accepted)) begin
          failures++;
          $display("FAIL after %0d samples tap_en=%b", accepted, tap_en);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
