// tb_bin_cmp: self-checking test of the multiplexer-tree binary comparator.
// W=4 and W=5 are checked exhaustively, W=13 with random and near-equal
// operands (differing in one random bit), against the > and == operators.
module tb_bin_cmp;

  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;
  logic [4:0]  a5, b5;
  logic [12:0] a13, b13;
  logic        gt4, eq4, gt5, eq5, gt13, eq13;

  bin_cmp #(.W(4))  dut4  (.a(a4),  .b(b4),  .gt(gt4),  .eq(eq4));
  bin_cmp #(.W(5))  dut5  (.a(a5),  .b(b5),  .gt(gt5),  .eq(eq5));
  bin_cmp #(.W(13)) dut13 (.a(a13), .b(b13), .gt(gt13), .eq(eq13));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      #1;
      checks++;
      if (gt4 != (a4 > b4) || eq4 != (a4 == b4)) begin
        failures++;
        $display("W=4 a=%0d b=%0d gt=%0d eq=%0d", a4, b4, gt4, eq4);
      end
    end
    for (int i = 0; i < 1024; i++) begin
      {a5, b5} = 10'(i);
      #1;
      checks++;
      if (gt5 != (a5 > b5) || eq5 != (a5 == b5)) begin
        failures++;
        $display("W=5 a=%0d b=%0d gt=%0d eq=%0d", a5, b5, gt5, eq5);
      end
    end
    for (int i = 0; i < 5000; i++) begin
      a13 = 13'($urandom);
      case (i % 3)
        0:       b13 = 13'($urandom);
        1:       b13 = a13 ^ (13'd1 << ($urandom % 13));
        default: b13 = a13;
      endcase
      #1;
      checks++;
      if (gt13 != (a13 > b13) || eq13 != (a13 == b13)) begin
        failures++;
        $display("W=13 a=%0d b=%0d gt=%0d eq=%0d", a13, b13, gt13, eq13);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
