// Self-check of wallace_multiplier against the * operator.
//   - N = 8 with the XOR/MUX full adder (default): all 65536 operand pairs,
//     including 170 * 171 = 29070 (16'b0111000110001110).
//   - N = 8 with the 4:1-multiplexer full adder: all 65536 pairs.
//   - N = 16: 3000 random pairs and all-ones.
module tb_wallace_multiplier;
  import wallace_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0]  a, b;
  logic [15:0] p, pm;
  logic [15:0] a16, b16;
  logic [31:0] p16;

  wallace_multiplier                          dut    (.a(a), .b(b), .p(p));
  wallace_multiplier #(.FA_STYLE(FA_MUX4))     dut_m4 (.a(a), .b(b), .p(pm));
  wallace_multiplier #(.N(16))                 dut16  (.a(a16), .b(b16), .p(p16));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0;
    a = 8'd170; b = 8'd171;
    #1;
    checks++;
    if (p != 16'b0111000110001110) begin
      failures++;
      $display("FAIL 170*171 = %0d", p);
    end
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      checks += 2;
      if (p != 16'(a) * 16'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d = %0d", a, b, p);
      end
      if (pm != 16'(a) * 16'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL mux4 %0d*%0d = %0d", a, b, pm);
      end
    end
    for (int i = 0; i < 3001; i++) begin
      if (i == 0) begin a16 = '1; b16 = '1; end
      else begin a16 = 16'($urandom); b16 = 16'($urandom); end
      #1;
      checks++;
      if (p16 != 32'(a16) * 32'(b16)) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 %0d*%0d = %0d", a16, b16, p16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
