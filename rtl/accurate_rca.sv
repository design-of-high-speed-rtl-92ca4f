// accurate_rca: the accurate (high-order) part of the HS-LP-HA adder.
//
// An N-bit ripple-carry adder built from mirror_full_adder cells, carry
// propagating from bit 0 to bit N-1. Its carry in is tied to 0: the
// inaccurate low-order part beside it produces no carry, so the high-order
// sum is exact for the high-order operand bits alone. The carry out of the
// last cell is kept as bit N of the result, which becomes the extra MSB of
// the full adder's output.
//
// Interface: a, b (N bits) in; sum (N+1 bits) out. Combinational; the
// critical path is the N-cell carry chain.
module accurate_rca #(
  parameter int unsigned N = hs_lp_ha_pkg::WIDTH - hs_lp_ha_pkg::INACC_BITS
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   sum
);
  logic [N:0] c;

  assign c[0] = 1'b0;

  for (genvar i = 0; i < N; i++) begin : g_fa
    mirror_full_adder u_fa (
      .a  (a[i]),
      .b  (b[i]),
      .ci (c[i]),
      .s  (sum[i]),
      .co (c[i+1])
    );
  end

  assign sum[N] = c[N];
endmodule
