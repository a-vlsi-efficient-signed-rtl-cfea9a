// tb_csa: self-checking test of the carry-save adder.
// Checks x + y + z = s + 2*c for every 4-bit operand triple and for random
// 16-bit triples.
module tb_csa;

  int checks = 0, failures = 0;

  logic [3:0]  x4, y4, z4, s4, c4;
  logic [15:0] x16, y16, z16, s16, c16;

  csa #(.W(4))  dut4  (.x(x4),  .y(y4),  .z(z4),  .s(s4),  .c(c4));
  csa #(.W(16)) dut16 (.x(x16), .y(y16), .z(z16), .s(s16), .c(c16));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    for (int i = 0; i < 4096; i++) begin
      {x4, y4, z4} = 12'(i);
      #1;
      checks++;
      if (6'(x4) + 6'(y4) + 6'(z4) !== 6'(s4) + 6'({c4, 1'b0})) begin
        failures++;
        $display("W=4 %0d+%0d+%0d: s=%0d c=%0d", x4, y4, z4, s4, c4);
      end
    end
    for (int i = 0; i < 2000; i++) begin
      x16 = 16'($urandom); y16 = 16'($urandom); z16 = 16'($urandom);
      #1;
      checks++;
      if (18'(x16) + 18'(y16) + 18'(z16) !== 18'(s16) + 18'({c16, 1'b0})) begin
        failures++;
        $display("W=16 %0d+%0d+%0d: s=%0d c=%0d", x16, y16, z16, s16, c16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
