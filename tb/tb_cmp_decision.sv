// tb_cmp_decision: self-checking test of the flag logic.
// Random mixed-radix digit triples (p, q, r) are drawn for X and Y at N=4
// (p < 16, q < 31, r < 15), often sharing upper digits so that every
// comparator level gets to decide. The comparator verdicts are formed with
// the > and == operators, and the expected flags come from the signed values
//   X = r + 15 q + 465 p,  minus 7440 when p >= 8.
module tb_cmp_decision;
  import rns_cmp_pkg::*;

  int checks = 0, failures = 0;

  logic        px_msb, py_msb, p_gt, p_eq, q_gt, q_eq, r_gt, r_eq;
  cmp_result_t res;

  cmp_decision dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    int xp, xq, xr, yp, yq, yr, xs, ys;
    for (int k = 0; k < 20000; k++) begin
      xp = int'($urandom % 16); xq = int'($urandom % 31); xr = int'($urandom % 15);
      yp = int'($urandom % 16); yq = int'($urandom % 31); yr = int'($urandom % 15);
      if (k % 4 >= 1) yp = xp;
      if (k % 4 >= 2) yq = xq;
      if (k % 8 == 7) yr = xr;
      px_msb = (xp >= 8); py_msb = (yp >= 8);
      p_gt = (xp > yp); p_eq = (xp == yp);
      q_gt = (xq > yq); q_eq = (xq == yq);
      r_gt = (xr > yr); r_eq = (xr == yr);
      #1;
      xs = xr + 15 * xq + 465 * xp - ((xp >= 8) ? 7440 : 0);
      ys = yr + 15 * yq + 465 * yp - ((yp >= 8) ? 7440 : 0);
      checks++;
      if (res.gt != (xs > ys) || res.eq != (xs == ys) || res.lt != (xs < ys)) begin
        failures++;
        $display("X=%0d Y=%0d: gt=%0d eq=%0d lt=%0d", xs, ys, res.gt, res.eq, res.lt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
