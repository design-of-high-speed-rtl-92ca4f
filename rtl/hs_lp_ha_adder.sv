// hs_lp_ha_adder: high-speed, low-power, high-accuracy approximate adder.
//
// The operands are split into an accurate high-order set of
// WIDTH-INACC_BITS bits and an inaccurate low-order set of INACC_BITS bits,
// and both sets are worked on at the same time:
//   * accurate_rca adds the high-order bits exactly (ripple carry of
//     mirror full adders, carry in 0) and supplies the MSB carry out;
//   * inaccurate_lower_byte combines the low-order bits without carries:
//     ORs in its lowest OR_BITS bits, and above them ORs up to the first
//     position holding two 1s, 1s from there to its top.
// No carry passes from the low-order set to the high-order set, so the
// critical path is the (WIDTH-INACC_BITS)-bit carry chain. The result is
// WIDTH+1 bits wide and always within 2^INACC_BITS - 1 of the exact sum.
//
// Defaults (16 bits, 8 accurate, 4+4 inaccurate) are the configuration
// the design is presented in. set_flag tells that the forced-1 path of the
// inaccurate upper part was taken; it is an observation port of this
// implementation.
//
// Interface: a, b (WIDTH bits) in; sum (WIDTH+1 bits), set_flag out.
// Combinational, no clock or reset.
module hs_lp_ha_adder #(
  parameter int unsigned WIDTH      = hs_lp_ha_pkg::WIDTH,
  parameter int unsigned INACC_BITS = hs_lp_ha_pkg::INACC_BITS,
  parameter int unsigned OR_BITS    = hs_lp_ha_pkg::OR_BITS
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH:0]   sum,
  output logic             set_flag
);
  localparam int unsigned ACC_BITS = WIDTH - INACC_BITS;

  accurate_rca #(.N(ACC_BITS)) u_acc (
    .a   (a[WIDTH-1:INACC_BITS]),
    .b   (b[WIDTH-1:INACC_BITS]),
    .sum (sum[WIDTH:INACC_BITS])
  );

  inaccurate_lower_byte #(.N(INACC_BITS), .OR_N(OR_BITS)) u_inacc (
    .a        (a[INACC_BITS-1:0]),
    .b        (b[INACC_BITS-1:0]),
    .s        (sum[INACC_BITS-1:0]),
    .set_flag (set_flag)
  );
endmodule
