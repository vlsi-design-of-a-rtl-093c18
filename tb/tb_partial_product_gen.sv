// Self-check of partial_product_gen (N = 8): for random and corner operands every
// bit pp[i][j] must equal a[j] & b[i], and the weighted sum of all bits must be
// the product a * b.
module tb_partial_product_gen;
  localparam int N = 8;
  logic [N-1:0]        a, b;
  logic [N-1:0][N-1:0] pp;
  int checks = 0, failures = 0;

  partial_product_gen #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int unsigned wsum = 0;
    int bad = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        if (pp[i][j] != (a[j] & b[i])) bad++;
        if (pp[i][j]) wsum += 1 << (i + j);
      end
    checks++;
    if (bad != 0 || wsum != int'(a) * int'(b)) begin
      failures++;
      $display("FAIL a=%0d b=%0d bad_bits=%0d weighted=%0d", a, b, bad, wsum);
    end
  endtask

  initial begin
    a = '1; b = '1; #1; check();
    a = '0; b = '1; #1; check();
    a = 8'd170; b = 8'd171; #1; check();
    for (int t = 0; t < 500; t++) begin
      a = N'($urandom); b = N'($urandom); #1; check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
