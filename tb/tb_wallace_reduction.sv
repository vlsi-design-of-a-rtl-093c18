// Self-check of wallace_reduction. The partial products are formed in the
// testbench (a[j] & b[i]); the two output rows must add up to a * b.
//   - N = 8 (default): all 65536 operand pairs.
//   - N = 16: 3000 random pairs plus all-ones.
//   - N = 5 (row count 5 -> 4 -> 3 -> 2, uneven groups): all 1024 pairs.
module tb_wallace_reduction;
  int checks = 0, failures = 0;

  logic [7:0]             a8, b8;
  logic [7:0][7:0]        pp8;
  logic [15:0]            r8_0, r8_1;
  logic [15:0]            a16, b16;
  logic [15:0][15:0]      pp16;
  logic [31:0]            r16_0, r16_1;
  logic [4:0]             a5, b5;
  logic [4:0][4:0]        pp5;
  logic [9:0]             r5_0, r5_1;

  always_comb for (int i = 0; i < 8; i++)  pp8[i]  = a8  & {8{b8[i]}};
  always_comb for (int i = 0; i < 16; i++) pp16[i] = a16 & {16{b16[i]}};
  always_comb for (int i = 0; i < 5; i++)  pp5[i]  = a5  & {5{b5[i]}};

  wallace_reduction                dut8  (.pp(pp8),  .row0(r8_0),  .row1(r8_1));
  wallace_reduction #(.N(16))      dut16 (.pp(pp16), .row0(r16_0), .row1(r16_1));
  wallace_reduction #(.N(5))       dut5  (.pp(pp5),  .row0(r5_0),  .row1(r5_1));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0; a5 = '0; b5 = '0;
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      checks++;
      if (16'(r8_0 + r8_1) != 16'(a8 * b8)) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 %0d*%0d rows %h %h", a8, b8, r8_0, r8_1);
      end
    end
    for (int i = 0; i < 3001; i++) begin
      if (i == 0) begin a16 = '1; b16 = '1; end
      else begin a16 = 16'($urandom); b16 = 16'($urandom); end
      #1;
      checks++;
      if (32'(r16_0 + r16_1) != 32'(a16) * 32'(b16)) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 %0d*%0d", a16, b16);
      end
    end
    for (int i = 0; i < 1024; i++) begin
      {a5, b5} = 10'(i);
      #1;
      checks++;
      if (10'(r5_0 + r5_1) != 10'(a5 * b5)) begin
        failures++;
        if (failures < 10) $display("FAIL N=5 %0d*%0d", a5, b5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
