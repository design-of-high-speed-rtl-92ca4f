// tb_accurate_rca: exhaustive check of the 8-bit accurate ripple-carry part
// (all 65536 operand pairs) against a + b with a 9-bit result. Counts the
// cases where the carry ripples through every cell and where a carry leaves
// the top.
module tb_accurate_rca;
  localparam int unsigned N = 8;
  logic [N-1:0] a, b;
  logic [N:0]   sum;
  int checks = 0, failures = 0;
  int full_ripple = 0, carry_out = 0;

  accurate_rca #(.N(N)) dut (.a(a), .b(b), .sum(sum));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        a = N'(i);
        b = N'(j);
        #1;
        checks++;
        if (sum !== (N+1)'(i + j)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d got %0d", i, j, sum);
        end
        if (sum[N]) carry_out++;
        if ((i ^ j) == (1 << N) - 2 && (i & j & 1) == 1) full_ripple++;
      end
    end
    checks++;
    if (carry_out == 0 || full_ripple == 0) begin
      failures++;
      $display("FAIL carry cases not exercised");
    end
    $display("carry_out=%0d full_ripple=%0d", carry_out, full_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
