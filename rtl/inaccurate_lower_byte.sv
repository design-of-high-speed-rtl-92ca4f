// inaccurate_lower_byte: the carry-free low-order part of the HS-LP-HA
// adder.
//
// The N-bit inaccurate set is split into a lower part of OR_N bits
// (lower_nibble_or: plain OR) and an upper part of N-OR_N bits
// (upper_nibble: OR until the first 1+1, then forced 1s). The two parts work
// side by side and neither passes anything to the other or to the accurate
// part, so the delay is that of a few gates whatever N is. set_flag reports
// that the upper part forced at least one bit to 1.
//
// Interface: a, b (N bits) in; s (N bits), set_flag out. Combinational.
module inaccurate_lower_byte #(
  parameter int unsigned N    = hs_lp_ha_pkg::INACC_BITS,
  parameter int unsigned OR_N = hs_lp_ha_pkg::OR_BITS
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         set_flag
);
  lower_nibble_or #(.N(OR_N)) u_lo (
    .a (a[OR_N-1:0]),
    .b (b[OR_N-1:0]),
    .s (s[OR_N-1:0])
  );

  upper_nibble #(.N(N-OR_N)) u_hi (
    .a       (a[N-1:OR_N]),
    .b       (b[N-1:OR_N]),
    .s       (s[N-1:OR_N]),
    .set_out (set_flag)
  );
endmodule
