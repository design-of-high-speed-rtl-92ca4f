// tb_hs_lp_ha_adder: end-to-end test of the 16-bit HS-LP-HA adder at its
// default sizes.
//
// 1. The two worked examples of the design: 0xB39A + 0x6913 must give
//    0x11CFB (72955; the exact sum is 72877) with the forced-1 path, and
//    0xB39A + 0x6903 must give 0x11C9B with the OR-only path.
// 2. Every low-order byte pair (65536) with random high-order bytes, then
//    200000 fully random operand pairs, against the bit-serial reference.
// 3. For every vector the error against the exact sum must stay below
//    2^8; the mean relative error magnitude over all vectors with a
//    non-zero exact sum is reported as accuracy = (1 - mean) x 100 %.
// Each mechanism is counted and must occur: forced-1 path, OR-only path,
// carry out of the accurate part, carry rippling through all eight
// accurate cells.
module tb_hs_lp_ha_adder;
  import hs_lp_ha_ref_pkg::*;
  localparam int unsigned W  = hs_lp_ha_pkg::WIDTH;
  localparam int unsigned IN = hs_lp_ha_pkg::INACC_BITS;
  localparam int unsigned OB = hs_lp_ha_pkg::OR_BITS;

  logic [W-1:0] a, b;
  logic [W:0]   sum;
  logic         set_flag;
  int checks = 0, failures = 0;
  int n_forced = 0, n_or_only = 0, n_carry_out = 0, n_full_ripple = 0;
  real rem_total = 0.0;
  longint n_rem = 0;

  hs_lp_ha_adder dut (.a(a), .b(b), .sum(sum), .set_flag(set_flag));

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] va, input logic [W-1:0] vb);
    longint unsigned exp_s, exact;
    longint diff;
    bit exp_f;
    logic [W-IN-1:0] ha, hb;
    a = va;
    b = vb;
    #1;
    exp_s = approx_sum(longint'(va), longint'(vb), W, IN, OB);
    exp_f = forced_path(longint'(va), longint'(vb), IN, OB);
    exact = longint'(va) + longint'(vb);
    checks++;
    if (sum !== (W+1)'(exp_s) || set_flag !== exp_f) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h got %h/%b exp %h/%b", va, vb, sum, set_flag, exp_s, exp_f);
    end
    diff = longint'(exact) - longint'(sum);
    if (diff < 0) diff = -diff;
    checks++;
    if (diff >= (longint'(1) << IN)) begin
      failures++;
      if (failures < 10) $display("FAIL error %0d too large for a=%h b=%h", diff, va, vb);
    end
    if (exact != 0) begin
      rem_total += real'(diff) / real'(exact);
      n_rem++;
    end
    if (exp_f) n_forced++; else n_or_only++;
    if (sum[W]) n_carry_out++;
    ha = va[W-1:IN];
    hb = vb[W-1:IN];
    if ((ha ^ hb) == {{(W-IN-1){1'b1}}, 1'b0} && ha[0] && hb[0]) n_full_ripple++;
  endtask

  task automatic expect_value(input logic [W-1:0] va, input logic [W-1:0] vb,
                              input logic [W:0] want, input logic want_f);
    apply(va, vb);
    checks++;
    if (sum !== want || set_flag !== want_f) begin
      failures++;
      $display("FAIL example %h + %h: got %0d exp %0d", va, vb, sum, want);
    end
  endtask

  initial begin
    // worked examples
    expect_value(16'b1011001110011010, 16'b0110100100010011, 17'd72955, 1'b1);
    expect_value(16'b1011001110011010, 16'b0110100100000011, 17'b10001110010011011, 1'b0);
    // carry through the whole accurate part
    apply(16'hFF00, 16'h0100);
    // all low-order byte pairs
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        apply({8'($urandom), 8'(i)}, {8'($urandom), 8'(j)});
    // random operands
    for (int k = 0; k < 200000; k++)
      apply(16'($urandom), 16'($urandom));

    $display("forced=%0d or_only=%0d carry_out=%0d full_ripple=%0d",
             n_forced, n_or_only, n_carry_out, n_full_ripple);
    $display("mean relative error magnitude=%0.6f accuracy=%0.4f%%",
             rem_total / real'(n_rem), (1.0 - rem_total / real'(n_rem)) * 100.0);
    checks++;
    if (n_forced == 0)      begin failures++; $display("FAIL forced-1 path never taken"); end
    checks++;
    if (n_or_only == 0)     begin failures++; $display("FAIL OR-only path never taken"); end
    checks++;
    if (n_carry_out == 0)   begin failures++; $display("FAIL no carry out"); end
    checks++;
    if (n_full_ripple == 0) begin failures++; $display("FAIL no full carry ripple"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
