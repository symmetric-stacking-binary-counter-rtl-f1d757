// tb_stack_to_binary -- self-checking test of the stack-to-binary
// converter at stack lengths 6 (the 6:3 counter) and 7 (the 7:3 counter)
// and 3. Every valid stack (m ones at the bottom) must give count m.
module tb_stack_to_binary;
  logic [5:0] y6;
  logic [2:0] c6;
  logic [6:0] y7;
  logic [2:0] c7;
  logic [2:0] y3;
  logic [1:0] c3;
  int checks = 0, failures = 0;

  stack_to_binary dut6 (.y(y6), .count(c6));
  stack_to_binary #(.N(7)) dut7 (.y(y7), .count(c7));
  stack_to_binary #(.N(3)) dut3 (.y(y3), .count(c3));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m <= 7; m++) begin
      y7 = 7'((1 << m) - 1);
      y6 = 6'((1 << (m > 6 ? 6 : m)) - 1);
      y3 = 3'((1 << (m > 3 ? 3 : m)) - 1);
      #1;
      checks++;
      if (c7 != 3'(m)) begin failures++; $display("FAIL N=7 m=%0d c=%0d", m, c7); end
      if (m <= 6) begin
        checks++;
        if (c6 != 3'(m)) begin failures++; $display("FAIL N=6 m=%0d c=%0d", m, c6); end
      end
      if (m <= 3) begin
        checks++;
        if (c3 != 2'(m)) begin failures++; $display("FAIL N=3 m=%0d c=%0d", m, c3); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
