// qx_gen: QX = (A + B) mod (2^(N+1) - 1), the merged end-around-carry
// generator and (N+1)-bit Kogge-Stone adder.
//
// A modulo 2^k-1 adder must add one and drop the carry whenever A+B >= 2^k-1.
// That happens exactly when the plain sum carries out (group generate
// G(N:0) = 1) or when it is all ones (group propagate P(N:0) = 1, with the
// bit propagate taken as a XOR b). Both group signals come out of the same
// Kogge-Stone tree that serves the addition, so
//   cin = G(N:0) | P(N:0)
// is formed from that tree and re-enters only the last stage:
//   c[i] = G(i:0) | (P(i:0) & cin),  qx[i] = p[i] ^ c[i-1],  c[-1] = cin.
// No second carry-propagate pass is needed. With A, B <= 2^(N+1)-1 and
// A+B <= 2*(2^(N+1)-1) - 1 the result is always in [0, 2^(N+1)-2], so the
// all-ones pattern (the second code of zero) never appears.
//
// cin is also an output: the PX adder of subrange_gen reuses it, because the
// low N bits of QX equal (A_L + B_L + cin) mod 2^N.
//
// Interface: purely combinational.
module qx_gen #(
  parameter int unsigned N = 4
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] qx,
  output logic       cin
);

  logic [N:0] g, p, gg, pp, c;

  assign g = a & b;
  assign p = a ^ b;

  ks_prefix #(.W(N + 1)) u_prefix (.g(g), .p(p), .gg(gg), .pp(pp));

  assign cin = gg[N] | pp[N];
  assign c   = gg | (pp & {(N + 1){cin}});
  assign qx  = p ^ ((c << 1) | (N + 1)'(cin));

endmodule
