// mirror_full_adder: one-bit full adder in the carry-first form used by a
// mirror adder cell.
//
// The carry stage is evaluated first, as its complement co_n, and the sum
// stage reuses it:
//   co_n = ~(A.B + Cin.(A + B))
//   S    = A.B.Cin + co_n.(A + B + Cin)
// This is the Boolean form of the 24-transistor mirror adder; transistor
// sizing and layout have no counterpart in RTL. The carry-out port is the
// true carry (the inverse of co_n).
//
// Interface: a, b, ci in; s, co out. Purely combinational, no clock.
module mirror_full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic co_n;

  always_comb begin
    co_n = ~((a & b) | (ci & (a | b)));
    s    = (a & b & ci) | (co_n & (a | b | ci));
    co   = ~co_n;
  end
endmodule
