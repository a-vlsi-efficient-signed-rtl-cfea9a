// tb_rns_signed_cmp: end-to-end test of the signed RNS comparator at its
// default size (N = 4: moduli 15, 16, 31, range [-3720, 3720)).
// Every X of the range is compared with Y = X, X +- 1, the range ends, the
// values around zero and 16 random Y. Residues are taken with %, and the
// expected flags come from the signed integers themselves. The test also
// counts how often each mechanism of the comparator was exercised and fails
// if one never was:
//   signs differ (mux passes MSB(PY)), both positive, both negative,
//   decided by PX, by QX, by x1, equal operands, and both values of the
//   end-around carry of the QX adder.
module tb_rns_signed_cmp;
  import rns_cmp_pkg::*;

  localparam int N  = 4;
  localparam int M1 = 15, M2 = 16, M3 = 31;
  localparam int MM = M1 * M2 * M3;

  int checks = 0, failures = 0;
  int n_sign_diff = 0, n_both_pos = 0, n_both_neg = 0;
  int n_by_p = 0, n_by_q = 0, n_by_r = 0, n_equal = 0, n_cin1 = 0, n_cin0 = 0;

  logic [N-1:0] x1, x2, y1, y2;
  logic [N:0]   x3, y3;
  cmp_result_t  res;

  rns_signed_cmp dut (.*);

  initial begin : watchdog
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int to_signed(int x);
    return (x >= MM / 2) ? x - MM : x;
  endfunction

  task automatic check(input int x, input int y);
    int xs, ys, xp, yp, xq, yq;
    x1 = 4'(x % M1); x2 = 4'(x % M2); x3 = 5'(x % M3);
    y1 = 4'(y % M1); y2 = 4'(y % M2); y3 = 5'(y % M3);
    #1;
    xs = to_signed(x);
    ys = to_signed(y);
    checks++;
    if (res.gt != (xs > ys) || res.eq != (xs == ys) || res.lt != (xs < ys)) begin
      failures++;
      $display("X=%0d Y=%0d: gt=%0d eq=%0d lt=%0d", xs, ys, res.gt, res.eq, res.lt);
    end
    // which mechanism decided, from the reference digits
    xp = x / (M1 * M3);  yp = y / (M1 * M3);
    xq = (x / M1) % M3;  yq = (y / M1) % M3;
    if ((xs < 0) != (ys < 0)) n_sign_diff++;
    else begin
      if (xs < 0) n_both_neg++; else n_both_pos++;
      if (xp != yp) n_by_p++;
      else if (xq != yq) n_by_q++;
      else if (x != y) n_by_r++;
      else n_equal++;
    end
    // end-around carry of the QX adder: 2*x1 + rotl1(~x3) >= 31
    if (2 * int'(x1) + int'({~x3[3:0], ~x3[4]}) >= M3) n_cin1++; else n_cin0++;
  endtask

  initial begin : stim
    for (int x = 0; x < MM; x++) begin
      check(x, x);
      check(x, (x + 1) % MM);
      check(x, (x + MM - 1) % MM);
      check(x, 0);
      check(x, MM - 1);
      check(x, MM / 2);
      check(x, MM / 2 - 1);
      check(x, 1);
      check(x, (x + M1) % MM);            // same x1, QX differs by one
      check(x, (x + M1 * M3) % MM);       // same x1 and QX, PX differs
      for (int k = 0; k < 16; k++) check(x, int'($urandom % MM));
    end
    $display("mechanisms: sign_diff=%0d both_pos=%0d both_neg=%0d by_px=%0d by_qx=%0d by_x1=%0d equal=%0d cin1=%0d cin0=%0d",
             n_sign_diff, n_both_pos, n_both_neg, n_by_p, n_by_q, n_by_r, n_equal, n_cin1, n_cin0);
    if (n_sign_diff == 0) begin failures++; $display("never: signs differ"); end
    if (n_both_pos == 0)  begin failures++; $display("never: both positive"); end
    if (n_both_neg == 0)  begin failures++; $display("never: both negative"); end
    if (n_by_p == 0)      begin failures++; $display("never: decided by PX"); end
    if (n_by_q == 0)      begin failures++; $display("never: decided by QX"); end
    if (n_by_r == 0)      begin failures++; $display("never: decided by x1"); end
    if (n_equal == 0)     begin failures++; $display("never: equal"); end
    if (n_cin1 == 0)      begin failures++; $display("never: end-around carry 1"); end
    if (n_cin0 == 0)      begin failures++; $display("never: end-around carry 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
