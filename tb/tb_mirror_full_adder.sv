// tb_mirror_full_adder: exhaustive check of the one-bit mirror full adder
// against {co, s} = a + b + ci for all eight input combinations.
module tb_mirror_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  mirror_full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] exp_sum;
      {a, b, ci} = 3'(v);
      #1;
      exp_sum = 2'(a) + 2'(b) + 2'(ci);
      checks++;
      if ({co, s} !== exp_sum) begin
        failures++;
        $display("FAIL a=%b b=%b ci=%b got co,s=%b%b exp %b", a, b, ci, co, s, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
