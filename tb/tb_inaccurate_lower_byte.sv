// tb_inaccurate_lower_byte: exhaustive check of the 8-bit carry-free part
// (4 OR bits, 4 selection bits) over all 65536 operand pairs, against the
// bit-serial reference. Also checks the flag and counts both paths.
module tb_inaccurate_lower_byte;
  import hs_lp_ha_ref_pkg::*;
  localparam int unsigned N    = 8;
  localparam int unsigned OR_N = 4;
  logic [N-1:0] a, b, s;
  logic         set_flag;
  int checks = 0, failures = 0;
  int forced_cnt = 0, or_cnt = 0;

  inaccurate_lower_byte #(.N(N), .OR_N(OR_N)) dut (
    .a(a), .b(b), .s(s), .set_flag(set_flag));

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
        longint unsigned exp_s;
        bit exp_f;
        a = N'(i);
        b = N'(j);
        #1;
        exp_s = approx_sum(longint'(i), longint'(j), N, N, OR_N);
        exp_f = forced_path(longint'(i), longint'(j), N, OR_N);
        checks++;
        if (s !== N'(exp_s) || set_flag !== exp_f) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%b b=%b got s=%b f=%b exp %b %b", a, b, s, set_flag, N'(exp_s), exp_f);
        end
        if (exp_f) forced_cnt++; else or_cnt++;
      end
    end
    checks++;
    if (forced_cnt == 0 || or_cnt == 0) begin
      failures++;
      $display("FAIL a path was never taken");
    end
    $display("forced=%0d or_only=%0d", forced_cnt, or_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
