// csa: W-bit carry-save adder (a row of W independent full adders).
//
// Reduces three operands to a sum vector s and a carry vector c with
//   x + y + z = s + 2*c.
// c is returned unshifted (c[i] has weight 2^(i+1)); the user shifts it left
// by one when it feeds the final carry-propagate adder. In the comparator
// the result is only needed modulo 2^W, so c[W-1] is simply dropped there.
//
// Interface: purely combinational, one full-adder delay.
module csa #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  assign s = x ^ y ^ z;
  assign c = (x & y) | (x & z) | (y & z);

endmodule
