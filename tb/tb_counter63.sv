// tb_counter63 -- exhaustive self-checking test of the 6:3 symmetric
// stacking counter: for every input pattern the count must equal the
// number of ones, worked out with $countones.
module tb_counter63;
  logic [5:0] x;
  logic [2:0] count;
  int checks = 0, failures = 0;

  counter63 dut (.x(x), .count(count));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 6); v++) begin
      x = 6'(v);
      #1;
      checks++;
      if (count != 3'($countones(x))) begin
        failures++;
        $display("FAIL x=%b count=%0d", x, count);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
