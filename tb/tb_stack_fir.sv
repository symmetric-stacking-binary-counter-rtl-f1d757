// tb_stack_fir -- self-checking test of the FIR filter.
//
// Two filters see the same random sample stream with random gaps in
// in_valid: the default one (8-bit, 4 taps) and one with three
// approximated product columns. A software delay line and the reference
// multiplier give the expected output of every accepted sample; the
// output must appear exactly one cycle after the sample and must hold
// while no sample arrives.
module tb_stack_fir;
  import ssbc_ref_pkg::*;

  localparam int unsigned W = 8, T = 4, YW = 2 * W + $clog2(T);
  localparam int unsigned LSB_A = 3;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [W-1:0]  x_in = '0;
  logic [W-1:0]  coef [T];
  logic          ov_d, ov_a;
  logic [YW-1:0] y_d, y_a;
  int checks = 0, failures = 0, cycles = 0;

  stack_fir dut_d (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
                   .coef(coef), .out_valid(ov_d), .y_out(y_d));
  stack_fir #(.APPROX_LSB(LSB_A)) dut_a (.clk(clk), .rst_n(rst_n),
                   .in_valid(in_valid), .x_in(x_in), .coef(coef),
                   .out_valid(ov_a), .y_out(y_a));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0]  hist [T];
  logic [YW-1:0] exp_d, exp_a;
  logic [127:0]  pr;

  initial begin
    for (int k = 0; k < T; k++) begin
      coef[k] = 8'($urandom);
      hist[k] = '0;
    end
    coef[0] = 8'hff;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    exp_d = '0;
    exp_a = '0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      x_in     = (n % 50 == 7) ? 8'hff : 8'($urandom);
      if (in_valid) begin
        for (int k = T - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = x_in;
        exp_d = '0;
        exp_a = '0;
        for (int k = 0; k < T; k++) begin
          pr = ref_mult(64'(hist[k]), 64'(coef[k]), W, W / 8);
          exp_d += YW'(pr[2*W-1:0]);
          pr = ref_mult(64'(hist[k]), 64'(coef[k]), W, LSB_A);
          exp_a += YW'(pr[2*W-1:0]);
        end
      end
      @(posedge clk);
      #1;
      checks += 2;
      if (ov_d !== in_valid || ov_a !== in_valid) begin
        failures++;
        $display("FAIL out_valid %b %b expected %b", ov_d, ov_a, in_valid);
      end
      if (y_d != exp_d || y_a != exp_a) begin
        failures++;
        $display("FAIL sample %0d y=%0d/%0d expected %0d/%0d", n, y_d, y_a, exp_d, exp_a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
