// tb_ks_adder: self-checking test of the Kogge-Stone adder.
// Instance W=4 is checked exhaustively (all a, b, cin); a W=13 instance (a
// width that is not a power of two) is checked with random operands. The
// reference is the plain integer sum a + b + cin.
module tb_ks_adder;

  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, s4;
  logic        c4, co4;
  logic [12:0] a13, b13, s13;
  logic        c13, co13;

  ks_adder #(.W(4))  dut4  (.a(a4),  .b(b4),  .cin(c4),  .sum(s4),  .cout(co4));
  ks_adder #(.W(13)) dut13 (.a(a13), .b(b13), .cin(c13), .sum(s13), .cout(co13));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    logic [4:0]  r4;
    logic [13:0] r13;
    for (int i = 0; i < 512; i++) begin
      {c4, a4, b4} = 9'(i);
      #1;
      r4 = 5'(a4) + 5'(b4) + 5'(c4);
      checks++;
      if ({co4, s4} !== r4) begin
        failures++;
        $display("W=4 a=%0d b=%0d cin=%0d: got %0d expected %0d", a4, b4, c4, {co4, s4}, r4);
      end
    end
    for (int i = 0; i < 5000; i++) begin
      a13 = 13'($urandom);
      b13 = (i % 7 == 0) ? ~a13 : 13'($urandom);   // long propagate chains
      c13 = 1'($urandom);
      #1;
      r13 = 14'(a13) + 14'(b13) + 14'(c13);
      checks++;
      if ({co13, s13} !== r13) begin
        failures++;
        $display("W=13 a=%0d b=%0d cin=%0d: got %0d expected %0d", a13, b13, c13, {co13, s13}, r13);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
