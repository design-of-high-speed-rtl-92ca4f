// tb_hs_lp_ha_adder_w32: the adder widened to 32 bits. The split of a
// 32-bit operand is not fixed by the design, so two are checked side by
// side against the bit-serial reference with 100000 random operand pairs
// plus corner cases:
//   u16: 16 accurate bits, 16 inaccurate bits (8 OR + 8 selection)
//   u8 : 24 accurate bits,  8 inaccurate bits (4 OR + 4 selection)
// Both paths of the inaccurate upper part and the carry out must occur for
// each; the accuracy of each split is reported.
module tb_hs_lp_ha_adder_w32;
  import hs_lp_ha_ref_pkg::*;
  localparam int unsigned W = 32;

  logic [W-1:0] a, b;
  logic [W:0]   sum16, sum8;
  logic         f16, f8;
  int checks = 0, failures = 0;
  int n_forced [2] = '{0, 0};
  int n_or     [2] = '{0, 0};
  int n_cout   [2] = '{0, 0};
  real rem [2] = '{0.0, 0.0};
  longint n_rem = 0;

  hs_lp_ha_adder #(.WIDTH(W), .INACC_BITS(16), .OR_BITS(8)) u16 (
    .a(a), .b(b), .sum(sum16), .set_flag(f16));
  hs_lp_ha_adder #(.WIDTH(W), .INACC_BITS(8), .OR_BITS(4)) u8 (
    .a(a), .b(b), .sum(sum8), .set_flag(f8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int idx, input logic [W:0] got, input logic gotf,
                           input int unsigned inacc, input int unsigned orb);
    longint unsigned exp_s, exact;
    longint diff;
    bit exp_f;
    exp_s = approx_sum(longint'(a), longint'(b), W, inacc, orb);
    exp_f = forced_path(longint'(a), longint'(b), inacc, orb);
    exact = longint'(a) + longint'(b);
    checks++;
    if (got !== (W+1)'(exp_s) || gotf !== exp_f) begin
      failures++;
      if (failures < 10) $display("FAIL split %0d a=%h b=%h got %h exp %h", inacc, a, b, got, exp_s);
    end
    diff = longint'(exact) - longint'(got);
    if (diff < 0) diff = -diff;
    if (exact != 0) rem[idx] += real'(diff) / real'(exact);
    if (exp_f) n_forced[idx]++; else n_or[idx]++;
    if (got[W]) n_cout[idx]++;
  endtask

  task automatic apply(input logic [W-1:0] va, input logic [W-1:0] vb);
    a = va;
    b = vb;
    #1;
    check_one(0, sum16, f16, 16, 8);
    check_one(1, sum8, f8, 8, 4);
    if (longint'(va) + longint'(vb) != 0) n_rem++;
  endtask

  initial begin
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    apply(32'h0000_0000, 32'h0000_0000);
    apply(32'hFFFF_0000, 32'h0001_0000);
    for (int k = 0; k < 100000; k++)
      apply($urandom, $urandom);
    for (int s = 0; s < 2; s++) begin
      $display("split %0d: forced=%0d or_only=%0d carry_out=%0d accuracy=%0.4f%%",
               s == 0 ? 16 : 8, n_forced[s], n_or[s], n_cout[s],
               (1.0 - rem[s] / real'(n_rem)) * 100.0);
      checks++;
      if (n_forced[s] == 0 || n_or[s] == 0 || n_cout[s] == 0) begin
        failures++;
        $display("FAIL a mechanism never occurred for split %0d", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
