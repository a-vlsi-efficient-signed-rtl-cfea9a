// ks_prefix: Kogge-Stone carry look-ahead network.
//
// Given the bit generate g[i] and propagate p[i] signals of a W-bit addition,
// it returns the group signals G[i] = G(i:0) and P[i] = P(i:0) for every bit
// position. The network has ceil(log2 W) levels; at level l every position
// i >= 2^l merges with position i-2^l using the usual prefix operator
//   G(i:j) = G(i:k+1) | (P(i:k+1) & G(k:j)),  P(i:j) = P(i:k+1) & P(k:j),
// and the lower positions pass through. This is the fully parallel
// Kogge-Stone arrangement: one prefix cell per bit per level, fan-out 2.
//
// Interface: purely combinational, no clock.
module ks_prefix #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] g,
  input  logic [W-1:0] p,
  output logic [W-1:0] gg,   // G(i:0)
  output logic [W-1:0] pp    // P(i:0)
);

  localparam int unsigned L = (W > 1) ? $clog2(W) : 0;

  logic [W-1:0] gl [L+1];
  logic [W-1:0] pl [L+1];

  assign gl[0] = g;
  assign pl[0] = p;

  for (genvar l = 0; l < L; l++) begin : g_level
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= D) begin : g_cell
        assign gl[l+1][i] = gl[l][i] | (pl[l][i] & gl[l][i-D]);
        assign pl[l+1][i] = pl[l][i] & pl[l][i-D];
      end else begin : g_pass
        assign gl[l+1][i] = gl[l][i];
        assign pl[l+1][i] = pl[l][i];
      end
    end
  end

  assign gg = gl[L];
  assign pp = pl[L];

endmodule
