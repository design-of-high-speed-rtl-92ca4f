// tb_upper_nibble: exhaustive check of the 4-bit selection nibble against
// the bit-serial reference (OR up to the first 1+1 from the LSB, 1s from
// there up). Counts operand pairs that take the OR-only path and the
// forced-1 path, with the first 1+1 at each of the four positions.
module tb_upper_nibble;
  import hs_lp_ha_ref_pkg::*;
  localparam int unsigned N = 4;
  logic [N-1:0] a, b, s;
  logic         set_out;
  int checks = 0, failures = 0;
  int or_only = 0;
  int first_at [N];

  upper_nibble #(.N(N)) dut (.a(a), .b(b), .s(s), .set_out(set_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (first_at[k]) first_at[k] = 0;
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        longint unsigned exp_s;
        logic [N-1:0] both;
        a = N'(i);
        b = N'(j);
        #1;
        // the reference with no OR-only bits and no accurate bits
        exp_s = approx_sum(longint'(i), longint'(j), N, N, 0);
        both  = a & b;
        checks++;
        if (s !== N'(exp_s) || set_out !== (both != 0)) begin
          failures++;
          $display("FAIL a=%b b=%b got s=%b set=%b exp %b", a, b, s, set_out, N'(exp_s));
        end
        if (both == 0) or_only++;
        else begin
          for (int k = 0; k < N; k++)
            if (both[k]) begin first_at[k]++; break; end
        end
      end
    end
    checks++;
    if (or_only == 0) begin failures++; $display("FAIL OR-only path never taken"); end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (first_at[k] == 0) begin failures++; $display("FAIL first 1+1 never at bit %0d", k); end
    end
    $display("or_only=%0d first_at=%p", or_only, first_at);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
