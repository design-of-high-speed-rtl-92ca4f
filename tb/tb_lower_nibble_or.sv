// tb_lower_nibble_or: exhaustive check of the 4-bit OR nibble: each output
// bit must be 1 exactly when at least one operand bit at that position is 1.
module tb_lower_nibble_or;
  localparam int unsigned N = 4;
  logic [N-1:0] a, b, s;
  int checks = 0, failures = 0;

  lower_nibble_or #(.N(N)) dut (.a(a), .b(b), .s(s));

  initial begin
    #100000;
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
        for (int k = 0; k < N; k++) begin
          checks++;
          if (s[k] !== (a[k] || b[k])) begin
            failures++;
            $display("FAIL a=%b b=%b bit %0d got %b", a, b, k, s[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
