// Exhaustive self-check of xor_mux_full_adder: all eight input combinations are applied and
// {carry, sum} is compared with the arithmetic sum of the three input bits.
module tb_xor_mux_full_adder;
  logic a, b, c;
  logic s, co;
  int checks = 0, failures = 0;

  xor_mux_full_adder dut (.a(a), .b(b), .c(c), .sum(s), .carry(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({co, s} != 2'(a) + 2'(b) + 2'(c)) begin
        failures++;
        $display("FAIL a=%0d b=%0d c=%0d -> carry=%0d sum=%0d", a, b, c, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
