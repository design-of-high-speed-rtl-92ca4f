// upper_nibble_cell: one bit cell of the upper part of the HS-LP-HA
// inaccurate set.
//
// A 2:1 multiplexer gives the sum bit: input 0 is OR(a, b), input 1 is a
// constant 1. Its select is the cell's flag, set_out = (a AND b) OR set_in,
// where set_in is the flag of the cell one position lower (tied to 0 for the
// lowest cell of the nibble). So once a position holding two 1s has been
// seen, this and every higher cell of the nibble output 1.
//
// Interface: a, b, set_in in; s, set_out out. Combinational.
module upper_nibble_cell (
  input  logic a,
  input  logic b,
  input  logic set_in,
  output logic s,
  output logic set_out
);
  always_comb begin
    set_out = (a & b) | set_in;
    s       = set_out ? 1'b1 : (a | b);
  end
endmodule
