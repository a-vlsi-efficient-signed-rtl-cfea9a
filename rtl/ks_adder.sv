// ks_adder: W-bit Kogge-Stone parallel-prefix adder with carry input.
//
// Three stages, as in any carry look-ahead adder of this family:
//   pre-processing   p[i] = a[i] ^ b[i], g[i] = a[i] & b[i]
//   carry network    G(i:0), P(i:0) from a Kogge-Stone prefix tree
//                    (ks_prefix); the carry input is folded in afterwards as
//                    c[i] = G(i:0) | (P(i:0) & cin)
//   post-processing  sum[i] = p[i] ^ c[i-1], with c[-1] = cin
// Carries therefore settle after ceil(log2 W) prefix levels.
//
// Interface: purely combinational. sum = (a + b + cin) mod 2^W, cout is the
// carry out of bit W-1. In the comparator it forms PX, where the carry out
// is not used.
module ks_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] g, p, gg, pp, c;

  assign g = a & b;
  assign p = a ^ b;

  ks_prefix #(.W(W)) u_prefix (.g(g), .p(p), .gg(gg), .pp(pp));

  assign c    = gg | (pp & {W{cin}});
  assign sum  = p ^ ((c << 1) | W'(cin));
  assign cout = c[W-1];

endmodule
