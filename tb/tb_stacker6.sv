// tb_stacker6 -- exhaustive self-checking test of the six-bit symmetric
// stacker. All 64 inputs are applied; bit i of the expected stack is 1
// exactly when more than i inputs are 1 ($countones). The four-ones case
// of the worked example (a run that spans both halves) is included.
module tb_stacker6;
  logic [5:0] x, y;
  int checks = 0, failures = 0;

  stacker6 dut (.x(x), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      x = 6'(v);
      #1;
      for (int i = 0; i < 6; i++) begin
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
