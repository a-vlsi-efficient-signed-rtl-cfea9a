// cmp_decision: final flag logic of the signed RNS magnitude comparator.
//
// Inputs are the sign bits (MSBs of PX and PY) and the verdicts of the three
// binary comparators PX:PY, QX:QY and x1:y1.
//   s = MSB(PX) XNOR MSB(PY)                   1 when the signs agree
//   s = 0:  X>Y = MSB(PY)                      the negative operand is smaller
//   s = 1:  X>Y = (PX>PY) | (PX=PY & QX>QY) | (PX=PY & QX=QY & x1>y1)
//   X=Y  = (PX=PY) & (QX=QY) & (x1=y1)
//   X<Y  = NOR(X>Y, X=Y)
// With equal signs both operands lie in the same half of the range, where
// the signed order is the unsigned order of the mixed-radix digits
// (PX, QX, x1). The structure (XNOR, 2:1 multiplexer, two ANDs and an OR,
// the 3-input equality AND, the NOR) is the published architecture's.
//
// Interface: purely combinational; exactly one flag of res is set.
module cmp_decision
  import rns_cmp_pkg::*;
(
  input  logic        px_msb,
  input  logic        py_msb,
  input  logic        p_gt,   // PX > PY
  input  logic        p_eq,   // PX = PY
  input  logic        q_gt,   // QX > QY
  input  logic        q_eq,   // QX = QY
  input  logic        r_gt,   // x1 > y1
  input  logic        r_eq,   // x1 = y1
  output cmp_result_t res
);

  logic s, lex_gt;

  assign s      = ~(px_msb ^ py_msb);
  assign lex_gt = p_gt | (p_eq & q_gt) | (p_eq & q_eq & r_gt);

  always_comb begin
    res.gt = s ? lex_gt : py_msb;
    res.eq = p_eq & q_eq & r_eq;
    res.lt = ~(res.gt | res.eq);
  end

endmodule
