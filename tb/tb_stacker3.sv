// tb_stacker3 -- exhaustive self-checking test of the three-bit stacker.
// Every input pattern is applied; the expected stack has y[i] = 1 exactly
// when more than i inputs are 1, counted independently with $countones.
module tb_stacker3;
  logic [2:0] x, y;
  int checks = 0, failures = 0;

  stacker3 dut (.x(x), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      x = 3'(v);
      #1;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (y[i] !== ($countones(x) > i)) begin
          failures++;
          $display("FAIL x=%b y=%b", x, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
