// rns_size_check: random-vector checker for one size N of the signed RNS
// comparator, used by tb_rns_sizes.
// Draws X and Y as wide integers in [0, M), M = (2^N-1) 2^N (2^(N+1)-1),
// derives the residues with %, and compares the comparator's flags with the
// order of the signed values (X - M when X >= M/2). Besides random pairs it
// uses the range ends, Y = X, Y = X +- 1 and pairs that share the upper
// mixed-radix digits. Reports its counts once `done` rises.
module rns_size_check #(
  parameter int unsigned N     = 4,
  parameter int unsigned TESTS = 2000
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import rns_cmp_pkg::*;

  localparam int unsigned VW = 3 * N + 4;   // holds M and the signed values

  typedef logic [VW-1:0] val_t;

  logic [N-1:0] x1, x2, y1, y2;
  logic [N:0]   x3, y3;
  cmp_result_t  res;

  rns_signed_cmp #(.N(N)) dut (.*);

  val_t m1, m2, m3, mm;

  function automatic val_t rand_below(val_t lim);
    logic [3*VW-1:0] r;
    for (int i = 0; i < 3 * VW; i += 32) r[i+:32] = $urandom;
    return val_t'(r % (3*VW)'(lim));
  endfunction

  task automatic check(input val_t x, input val_t y);
    logic signed [VW:0] xs, ys;
    x1 = N'(x % m1); x2 = N'(x % m2); x3 = (N+1)'(x % m3);
    y1 = N'(y % m1); y2 = N'(y % m2); y3 = (N+1)'(y % m3);
    #1;
    xs = (x >= mm / 2) ? $signed({1'b0, x}) - $signed({1'b0, mm}) : $signed({1'b0, x});
    ys = (y >= mm / 2) ? $signed({1'b0, y}) - $signed({1'b0, mm}) : $signed({1'b0, y});
    checks++;
    if (res.gt != (xs > ys) || res.eq != (xs == ys) || res.lt != (xs < ys)) begin
      failures++;
      $display("N=%0d X=%0d Y=%0d: gt=%0d eq=%0d lt=%0d", N, xs, ys, res.gt, res.eq, res.lt);
    end
  endtask

  initial begin
    val_t x, y;
    done = 1'b0;
    checks = 0;
    failures = 0;
    m1 = (val_t'(1) << N) - 1;
    m2 = val_t'(1) << N;
    m3 = (val_t'(1) << (N + 1)) - 1;
    mm = m1 * m2 * m3;
    check(0, mm - 1);
    check(mm - 1, 0);
    check(mm / 2, mm / 2 - 1);
    check(mm / 2 - 1, mm / 2);
    check(mm / 2, mm / 2);
    for (int k = 0; k < TESTS; k++) begin
      x = rand_below(mm);
      case (k % 5)
        0: y = rand_below(mm);
        1: y = x;
        2: y = (x + 1) % mm;
        3: y = (x + m1 * rand_below(m3)) % mm;   // same x1 digit
        default: y = (x + m1 * m3 * rand_below(4)) % mm;   // same x1, QX
      endcase
      check(x, y);
      check(y, x);
    end
    done = 1'b1;
  end

endmodule
