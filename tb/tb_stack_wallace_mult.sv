// tb_stack_wallace_mult -- self-checking test of the stacking-counter
// Wallace multiplier.
//
// Four instances: 8x8 exact (APPROX_LSB = 0) and 8x8 with three
// approximated columns, both over all 65536 operand pairs; 5x5 with one
// approximated column, exhaustive; and the default 64x64 with its default
// approximation, on corner cases and random operands.
// The expected product is worked out without the tree: the exact part is
// a*b minus the weight of the partial products of the approximated
// columns, and each approximated bit is the OR of its column.
module tb_stack_wallace_mult;
  import ssbc_ref_pkg::*;

  localparam int unsigned NB = 64;
  localparam int unsigned LB = NB / 8;

  logic [7:0]  a8, b8;
  logic [15:0] p8x, p8a;
  logic [4:0]  a5, b5;
  logic [9:0]  p5;
  logic [NB-1:0]   ab, bb;
  logic [2*NB-1:0] pb;
  int checks = 0, failures = 0;

  stack_wallace_mult #(.N(8), .APPROX_LSB(0)) dut8x (.a(a8), .b(b8), .p(p8x));
  stack_wallace_mult #(.N(8), .APPROX_LSB(3)) dut8a (.a(a8), .b(b8), .p(p8a));
  stack_wallace_mult #(.N(5), .APPROX_LSB(1)) dut5  (.a(a5), .b(b5), .p(p5));
  stack_wallace_mult dutb (.a(ab), .b(bb), .p(pb));


  task automatic check_big(logic [NB-1:0] a, logic [NB-1:0] b);
    logic [127:0] exp_p;
    ab = a;
    bb = b;
    #1;
    exp_p = ref_mult(a, b, NB, LB);
    checks++;
    if (pb != exp_p[2*NB-1:0]) begin
      failures++;
      $display("FAIL N=%0d a=%h b=%h p=%h exp=%h", NB, a, b, pb, exp_p);
    end
  endtask

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] e;
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x);
        b8 = 8'(y);
        #1;
        checks += 2;
        if (p8x != 16'(x * y)) begin
          failures++;
          $display("FAIL exact 8x8 %0d*%0d=%0d", x, y, p8x);
        end
        e = ref_mult(64'(x), 64'(y), 8, 3);
        if (p8a != e[15:0]) begin
          failures++;
          $display("FAIL approx 8x8 %0d*%0d=%0d exp %0d", x, y, p8a, e[15:0]);
        end
      end
    end
    for (int x = 0; x < 32; x++) begin
      for (int y = 0; y < 32; y++) begin
        a5 = 5'(x);
        b5 = 5'(y);
        #1;
        e = ref_mult(64'(x), 64'(y), 5, 1);
        checks++;
        if (p5 != e[9:0]) begin
          failures++;
          $display("FAIL 5x5 %0d*%0d=%0d exp %0d", x, y, p5, e[9:0]);
        end
      end
    end
    check_big('0, '0);
    check_big('1, '1);
    check_big('1, 64'd1);
    check_big(64'd1, '1);
    check_big({1'b1, 63'd0}, {1'b1, 63'd0});
    for (int k = 0; k < 3000; k++) begin
      check_big({$urandom, $urandom}, {$urandom, $urandom});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
