// tb_qx_gen: self-checking test of the modulo 2^(N+1)-1 adder.
// N=4: every a in [0, 30] and b in [0, 31] (b = 31 is the second code of
// zero, which the comparator produces when x3 = 0). N=9: random operands.
// Reference: qx = (a + b) mod m3 and cin = (a + b >= m3).
module tb_qx_gen;

  int checks = 0, failures = 0;

  logic [4:0] a4, b4, q4;
  logic       ci4;
  logic [9:0] a9, b9, q9;
  logic       ci9;

  qx_gen #(.N(4)) dut4 (.a(a4), .b(b4), .qx(q4), .cin(ci4));
  qx_gen #(.N(9)) dut9 (.a(a9), .b(b9), .qx(q9), .cin(ci9));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    int s;
    for (int i = 0; i < 31; i++) begin
      for (int j = 0; j <= 31; j++) begin
        a4 = 5'(i); b4 = 5'(j);
        #1;
        s = i + j;
        checks++;
        if (int'(q4) != s % 31 || ci4 != (s >= 31)) begin
          failures++;
          $display("N=4 a=%0d b=%0d: qx=%0d cin=%0d expected %0d %0d", i, j, q4, ci4, s % 31, s >= 31);
        end
      end
    end
    for (int k = 0; k < 5000; k++) begin
      int ri, rj;
      ri = int'($urandom % 1023);
      rj = int'($urandom % 1024);
      if (k % 11 == 0) rj = 1023 - ri;   // exact all-ones sum
      a9 = 10'(ri); b9 = 10'(rj);
      #1;
      s = ri + rj;
      checks++;
      if (int'(q9) != s % 1023 || ci9 != (s >= 1023)) begin
        failures++;
        $display("N=9 a=%0d b=%0d: qx=%0d cin=%0d expected %0d %0d", ri, rj, q9, ci9, s % 1023, s >= 1023);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
