// Self-check of fir_mac (N = 8, ACC_W = 18): enabled, sum_out must be
// sum_in + coef * x; disabled, sum_out must equal sum_in whatever x and coef are.
module tb_fir_mac;
  int checks = 0, failures = 0;

  logic        en;
  logic [7:0]  x, c;
  logic [17:0] si, so;

  fir_mac dut (.en(en), .x(x), .coef(c), .sum_in(si), .sum_out(so));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      en = (t % 4 != 3);
      x  = (t == 0) ? 8'hFF : 8'($urandom);
      c  = (t == 0) ? 8'hFF : 8'($urandom);
      si = (t == 0) ? 18'h3_0000 : 18'($urandom_range(0, 3 * 65025));
      #1;
      checks++;
      if (so != (en ? si + 18'(x) * 18'(c) : si)) begin
        failures++;
        $display("FAIL en=%0d x=%0d c=%0d in=%0d out=%0d", en, x, c, si, so);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
