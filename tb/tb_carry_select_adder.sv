// Self-check of carry_select_adder against the + operator:
//   - W = 16, BLK = 4 (the multiplier's final adder): corner cases that carry
//     through every section, then random operands and carry-in;
//   - W = 10, BLK = 4 (a short last section): all carries through, random.
module tb_carry_select_adder;
  int checks = 0, failures = 0;

  logic [15:0] a, b, s;
  logic        ci, co;
  logic [9:0]  a10, b10, s10;
  logic        co10;

  carry_select_adder                    dut   (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));
  carry_select_adder #(.W(10), .BLK(4)) dut10 (.a(a10), .b(b10), .cin(ci), .sum(s10), .cout(co10));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [15:0] va, logic [15:0] vb, logic vc);
    a = va; b = vb; ci = vc; a10 = va[9:0]; b10 = vb[9:0];
    #1;
    checks += 2;
    if ({co, s} != 17'(va) + 17'(vb) + 17'(vc)) begin
      failures++;
      $display("FAIL W=16 %h + %h + %0d -> %0d %h", va, vb, vc, co, s);
    end
    if ({co10, s10} != 11'(va[9:0]) + 11'(vb[9:0]) + 11'(vc)) begin
      failures++;
      $display("FAIL W=10 %h + %h + %0d -> %0d %h", va[9:0], vb[9:0], vc, co10, s10);
    end
  endtask

  initial begin
    apply(16'hFFFF, 16'h0000, 1'b1);
    apply(16'hFFFF, 16'hFFFF, 1'b1);
    apply(16'h0FFF, 16'h0001, 1'b0);
    apply(16'h00F0, 16'h0010, 1'b0);
    apply(16'h0000, 16'h0000, 1'b0);
    for (int t = 0; t < 2000; t++)
      apply(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
