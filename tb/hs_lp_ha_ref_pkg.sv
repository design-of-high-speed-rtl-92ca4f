// hs_lp_ha_ref_pkg: bit-serial reference model of the HS-LP-HA adder, used
// by the testbenches to work out expected results without the RTL.
//
// approx_sum walks the operands one bit at a time, LSB first:
//   bits [0, or_bits)          : a | b
//   bits [or_bits, inacc_bits) : a | b until the first position with
//                                a = b = 1, then 1 for that and all higher
//   bits [inacc_bits, width)   : exact addition, carry starting at 0
// Widths up to 63 bits are supported.
package hs_lp_ha_ref_pkg;
  function automatic longint unsigned approx_sum(
      input longint unsigned a,
      input longint unsigned b,
      input int unsigned     width,
      input int unsigned     inacc_bits,
      input int unsigned     or_bits);
    longint unsigned r;
    bit forced;
    bit carry;
    r      = 0;
    forced = 1'b0;
    carry  = 1'b0;
    for (int unsigned i = 0; i < width; i++) begin
      bit ai, bi, si;
      ai = a[i];
      bi = b[i];
      if (i < or_bits) begin
        si = ai | bi;
      end else if (i < inacc_bits) begin
        if (ai && bi) forced = 1'b1;
        si = forced ? 1'b1 : (ai | bi);
      end else begin
        si    = ai ^ bi ^ carry;
        carry = (ai & bi) | (ai & carry) | (bi & carry);
      end
      r[i] = si;
    end
    r[width] = carry;
    return r;
  endfunction

  // True when the forced-1 path of the inaccurate upper part is taken.
  function automatic bit forced_path(
      input longint unsigned a,
      input longint unsigned b,
      input int unsigned     inacc_bits,
      input int unsigned     or_bits);
    for (int unsigned i = or_bits; i < inacc_bits; i++)
      if (a[i] && b[i]) return 1'b1;
    return 1'b0;
  endfunction
endpackage
