// tb_subrange_gen: self-checking test of the subrange identifier generator.
// The residues of X are taken with the % operator and the expected
// identifiers are the mixed-radix digits of X:
//   PX = X div ((2^N-1)(2^(N+1)-1)),  QX = ((X - x1) / (2^N-1)) mod (2^(N+1)-1).
// N=4: every X of the range [0, 7440). N=8: random X plus both range ends.
module tb_subrange_gen;

  int checks = 0, failures = 0;

  logic [3:0] x1_4, x2_4, px4;
  logic [4:0] x3_4, qx4;
  logic [7:0] x1_8, x2_8, px8;
  logic [8:0] x3_8, qx8;

  subrange_gen #(.N(4)) dut4 (.x1(x1_4), .x2(x2_4), .x3(x3_4), .px(px4), .qx(qx4));
  subrange_gen #(.N(8)) dut8 (.x1(x1_8), .x2(x2_8), .x3(x3_8), .px(px8), .qx(qx8));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check8(input longint x);
    longint m1, m3, ep, eq;
    m1 = 255; m3 = 511;
    x1_8 = 8'(x % m1); x2_8 = 8'(x % 256); x3_8 = 9'(x % m3);
    #1;
    ep = x / (m1 * m3);
    eq = ((x - x % m1) / m1) % m3;
    checks++;
    if (longint'(px8) != ep || longint'(qx8) != eq) begin
      failures++;
      $display("N=8 X=%0d: px=%0d qx=%0d expected %0d %0d", x, px8, qx8, ep, eq);
    end
  endtask

  initial begin : stim
    longint mm8;
    for (int x = 0; x < 15 * 16 * 31; x++) begin
      int ep, eq;
      x1_4 = 4'(x % 15); x2_4 = 4'(x % 16); x3_4 = 5'(x % 31);
      #1;
      ep = x / (15 * 31);
      eq = ((x - x % 15) / 15) % 31;
      checks++;
      if (int'(px4) != ep || int'(qx4) != eq) begin
        failures++;
        $display("N=4 X=%0d: px=%0d qx=%0d expected %0d %0d", x, px4, qx4, ep, eq);
      end
    end
    mm8 = 255 * 256 * 511;
    check8(0);
    check8(mm8 - 1);
    check8(mm8 / 2);
    check8(mm8 / 2 - 1);
    for (int k = 0; k < 20000; k++) check8(longint'({$urandom, $urandom} % 64'(mm8)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
