// lower_nibble_or: the lowest part of the HS-LP-HA inaccurate set.
//
// Every sum bit is the OR of the two operand bits at the same position, so
// a 1+1 at this level is counted as 1 and no carry is produced or consumed.
// One OR cell per bit; the width N is 4 (a nibble) in the 16-bit adder.
//
// Interface: a, b (N bits) in; s (N bits) out. Combinational, one gate deep.
module lower_nibble_or #(
  parameter int unsigned N = hs_lp_ha_pkg::OR_BITS
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);
  always_comb s = a | b;
endmodule
