// hs_lp_ha_pkg: sizes shared by the HS-LP-HA approximate adder.
//
// The adder splits each operand into an accurate high-order set, added
// exactly by a ripple-carry adder, and an inaccurate low-order set that is
// combined without any carry. The inaccurate set is itself split in two: a
// lower part whose sum bits are plain ORs, and an upper part whose sum bits
// are ORs until the first position (counted from its LSB) where both operand
// bits are 1, from which point on they are forced to 1.
//
// The defaults are the 16-bit configuration: an 8-bit accurate set and an
// 8-bit inaccurate set made of two 4-bit nibbles.
package hs_lp_ha_pkg;
  // Operand width of the whole adder.
  localparam int unsigned WIDTH      = 16;
  // Width of the low-order inaccurate set (the "lower byte").
  localparam int unsigned INACC_BITS = 8;
  // Width of the OR-only part at the bottom of the inaccurate set.
  localparam int unsigned OR_BITS    = 4;
endpackage
