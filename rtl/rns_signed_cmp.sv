// rns_signed_cmp: signed magnitude comparator for the residue number system
// with moduli {2^N-1, 2^N, 2^(N+1)-1}.
//
// Operands X and Y arrive as residue triples (x1, x2, x3), (y1, y2, y3). The
// dynamic range M = (2^N-1) 2^N (2^(N+1)-1) is split in half: a residue
// number X with X < M/2 stands for +X, one with X >= M/2 for X - M. The
// comparator never converts back to binary. Each operand passes through a
// subrange_gen that computes the subrange identifiers PX (N bits) and QX
// (N+1 bits), the two upper mixed-radix digits of X; x1 is the lowest digit
// and MSB(PX) is the sign. Three binary comparators (N-bit PX:PY, (N+1)-bit
// QX:QY, N-bit x1:y1) and cmp_decision then produce X>Y, X=Y and X<Y.
//
// Hardware, as in the published architecture: two N-bit CSAs, two N-bit and two (N+1)-bit
// Kogge-Stone adders, two N-bit and one (N+1)-bit binary comparators, a 2:1
// multiplexer and a few gates. N defaults to 4, the size the architecture is drawn at;
// it was evaluated at N = 4 to 64, and any N >= 2 elaborates.
//
// Interface: purely combinational, single-pass; there is no clock and the
// result is valid one combinational delay after the residues. Residues must
// be canonical (x1, y1 < 2^N-1; x3, y3 < 2^(N+1)-1).
module rns_signed_cmp
  import rns_cmp_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] x1,
  input  logic [N-1:0] x2,
  input  logic [N:0]   x3,
  input  logic [N-1:0] y1,
  input  logic [N-1:0] y2,
  input  logic [N:0]   y3,
  output cmp_result_t  res
);

  logic [N-1:0] px, py;
  logic [N:0]   qx, qy;
  logic         p_gt, p_eq, q_gt, q_eq, r_gt, r_eq;

  subrange_gen #(.N(N)) u_sub_x (.x1(x1), .x2(x2), .x3(x3), .px(px), .qx(qx));
  subrange_gen #(.N(N)) u_sub_y (.x1(y1), .x2(y2), .x3(y3), .px(py), .qx(qy));

  bin_cmp #(.W(N))     u_cmp_p (.a(px), .b(py), .gt(p_gt), .eq(p_eq));
  bin_cmp #(.W(N + 1)) u_cmp_q (.a(qx), .b(qy), .gt(q_gt), .eq(q_eq));
  bin_cmp #(.W(N))     u_cmp_r (.a(x1), .b(y1), .gt(r_gt), .eq(r_eq));

  cmp_decision u_dec (
    .px_msb(px[N-1]),
    .py_msb(py[N-1]),
    .p_gt  (p_gt),
    .p_eq  (p_eq),
    .q_gt  (q_gt),
    .q_eq  (q_eq),
    .r_gt  (r_gt),
    .r_eq  (r_eq),
    .res   (res)
  );

endmodule
