// subrange_gen: the two subrange identifiers PX and QX of one RNS operand.
//
// An operand X in [0, M), M = (2^N-1) * 2^N * (2^(N+1)-1), is given by its
// residues x1 = X mod (2^N-1), x2 = X mod 2^N and x3 = X mod (2^(N+1)-1).
// It can be written in mixed radix as
//   X = x1 + (2^N-1) * QX + (2^N-1)(2^(N+1)-1) * PX,
//   QX in [0, 2^(N+1)-1),  PX in [0, 2^N),
// so (PX, QX, x1) ordered lexicographically orders X, and PX >= 2^(N-1),
// i.e. the MSB of PX, says that X lies in the upper (negative) half of the
// range. With m1 = 2^N-1 and m3 = 2^(N+1)-1 one has m1^-1 = -2 (mod m3) and
// m3 = -1 (mod 2^N), which gives
//   QX = |2*(x1 - x3)|_m3 = |A + B|_m3,  A = {x1, 0},  B = rotl1(~x3)
//   PX = |QX - x1 + x2|_2^N = |x1 + x2 + B_L + cin|_2^N
// where B_L is the low N bits of B and cin is the end-around carry of the
// QX adder (the low N bits of QX are A_L + B_L + cin, and A_L - x1 = x1
// mod 2^N). Hardware, as published: qx_gen (merged cin generator
// and (N+1)-bit Kogge-Stone adder) for QX; an N-bit carry-save adder on
// x1, x2, B_L followed by an N-bit Kogge-Stone adder with carry input cin,
// carry out unused, for PX. Multiplying by 2 and negating modulo 2^(N+1)-1
// are a rotation and an inversion, so A and B cost only wiring and
// inverters. The derivation of A, B and the CSA operands is this design's
// reading of the architecture; the published design gives its inputs and adders.
//
// Interface: purely combinational. Residues must be canonical
// (x1 != 2^N-1, x3 != 2^(N+1)-1).
module subrange_gen #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] x1,
  input  logic [N-1:0] x2,
  input  logic [N:0]   x3,
  output logic [N-1:0] px,
  output logic [N:0]   qx
);

  logic [N:0]   op_a, op_b, x3_n;
  logic         cin;
  logic [N-1:0] cs_s, cs_c;
  logic         unused_cout;

  assign op_a = {x1, 1'b0};                 // 2*x1, no wrap since x1 < 2^N
  assign x3_n = ~x3;                        // m3 - x3
  assign op_b = {x3_n[N-1:0], x3_n[N]};     // 2*(m3 - x3) mod m3

  qx_gen #(.N(N)) u_qx (.a(op_a), .b(op_b), .qx(qx), .cin(cin));

  csa #(.W(N)) u_csa (.x(x1), .y(x2), .z(op_b[N-1:0]), .s(cs_s), .c(cs_c));

  ks_adder #(.W(N)) u_px (
    .a   (cs_s),
    .b   (cs_c << 1),
    .cin (cin),
    .sum (px),
    .cout(unused_cout)
  );

endmodule
