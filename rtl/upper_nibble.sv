// upper_nibble: upper part of the HS-LP-HA inaccurate set.
//
// N upper_nibble_cell instances chained from bit 0 to bit N-1 through their
// set flags; the chain starts at 0. Bits below the first position where both
// operands are 1 are ORs; that position and all above it are 1. If no
// position holds two 1s the whole nibble is the OR of the operands.
// set_out is the flag leaving the top cell: 1 when the nibble saw a 1+1.
//
// Interface: a, b (N bits) in; s (N bits), set_out out. Combinational; the
// flag chain is N two-input gates long.
module upper_nibble #(
  parameter int unsigned N = hs_lp_ha_pkg::INACC_BITS - hs_lp_ha_pkg::OR_BITS
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         set_out
);
  logic [N:0] set_c;

  assign set_c[0] = 1'b0;

  for (genvar i = 0; i < N; i++) begin : g_cell
    upper_nibble_cell u_cell (
      .a       (a[i]),
      .b       (b[i]),
      .set_in  (set_c[i]),
      .s       (s[i]),
      .set_out (set_c[i+1])
    );
  end

  assign set_out = set_c[N];
endmodule
