// tb_rns_sizes: the signed RNS comparator at every operand size of the
// evaluation table, N = 4, 8, 12, 16, 20, 32 and 64 (dynamic ranges of
// about 13 to 193 bits). Each size runs its own rns_size_check with random
// and boundary operand pairs checked against wide-integer arithmetic.
module tb_rns_sizes;

  localparam int NS = 7;
  localparam int unsigned SIZES [NS] = '{4, 8, 12, 16, 20, 32, 64};

  logic [NS-1:0] done;
  int            chk  [NS];
  int            fail [NS];

  for (genvar i = 0; i < NS; i++) begin : g_size
    rns_size_check #(.N(SIZES[i]), .TESTS(2000)) u_chk (
      .done(done[i]), .checks(chk[i]), .failures(fail[i])
    );
  end

  initial begin : watchdog
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin : collect
    int checks, failures;
    #1;
    wait (&done);
    checks = 0;
    failures = 0;
    for (int i = 0; i < NS; i++) begin
      $display("N=%0d: checks=%0d failures=%0d", SIZES[i], chk[i], fail[i]);
      checks += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
