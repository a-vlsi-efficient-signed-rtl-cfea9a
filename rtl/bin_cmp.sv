// bin_cmp: W-bit unsigned magnitude comparator, parallel-prefix tree of
// multiplexer cells.
//
// Every bit starts as a one-bit group with gt = a & ~b and eq = a XNOR b.
// Groups are merged pairwise, most significant group first: a merged group
// takes the lower group's verdict only when the upper group's bits are
// equal, otherwise the upper group's verdict stands:
//   gt = eq_hi ? gt_lo : gt_hi,   eq = eq_hi & eq_lo.
// The gt half of each prefix cell is thus a 2:1 multiplexer, and the
// decision is resolved from the MSB toward the LSB in ceil(log2 W) levels.
// Widths that are not a power of two are padded at the bottom with groups
// that compare equal. The multiplexer cell follows the published comparator's
// description of the parallel-prefix comparator; the radix-2 tree is this
// design's choice.
//
// Interface: purely combinational. gt = (a > b), eq = (a == b).
module bin_cmp #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         gt,
  output logic         eq
);

  localparam int unsigned L  = (W > 1) ? $clog2(W) : 0;
  localparam int unsigned WP = 1 << L;

  // level l holds WP >> l groups; group j of level l+1 = groups 2j+1 (upper)
  // and 2j (lower) of level l
  logic [WP-1:0] lgt [L+1];
  logic [WP-1:0] leq [L+1];

  for (genvar i = 0; i < WP; i++) begin : g_leaf
    if (i >= WP - W) begin : g_bit
      assign lgt[0][i] = a[i-(WP-W)] & ~b[i-(WP-W)];
      assign leq[0][i] = ~(a[i-(WP-W)] ^ b[i-(WP-W)]);
    end else begin : g_pad
      assign lgt[0][i] = 1'b0;
      assign leq[0][i] = 1'b1;
    end
  end

  for (genvar l = 0; l < L; l++) begin : g_level
    for (genvar j = 0; j < WP; j++) begin : g_node
      if (j < (WP >> (l + 1))) begin : g_cell
        assign lgt[l+1][j] = leq[l][2*j+1] ? lgt[l][2*j] : lgt[l][2*j+1];
        assign leq[l+1][j] = leq[l][2*j+1] & leq[l][2*j];
      end else begin : g_unused
        assign lgt[l+1][j] = 1'b0;
        assign leq[l+1][j] = 1'b1;
      end
    end
  end

  assign gt = lgt[L][0];
  assign eq = leq[L][0];

endmodule
