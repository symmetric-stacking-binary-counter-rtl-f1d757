// tb_ssbc_top -- end-to-end test of the top at its default sizes.
//
// The 64x64 stacking-counter multiplier is driven with corner cases and
// random operands and compared with the reference model; the 8-bit 4-tap
// FIR filter is reset, loaded with coefficients and fed a sample stream
// with random gaps, and every output is compared with a software filter.
// Mechanisms counted, each of which must happen at least once:
//   approx    a product whose approximated low bits differ from a*b
//   exact_hi  a product whose upper part is below that of a*b, because
//             the approximated columns send no carry upward
//   fir_out   an accepted FIR sample and its checked output
//   fir_hold  a cycle without a sample, in which the output must hold
//   fir_reset a reset that clears a non-zero FIR output
module tb_ssbc_top;
  import ssbc_ref_pkg::*;

  localparam int unsigned MN = 64, ML = MN / 8;
  localparam int unsigned W = 8, T = 4, YW = 2 * W + $clog2(T);

  logic [MN-1:0]   mul_a, mul_b;
  logic [2*MN-1:0] mul_p;
  logic clk = 1'b0, rst_n = 1'b0, fir_in_valid = 1'b0;
  logic [W-1:0]  fir_x = '0;
  logic [W-1:0]  fir_coef [T];
  logic          fir_out_valid;
  logic [YW-1:0] fir_y;

  int checks = 0, failures = 0, cycles = 0;
  int n_approx = 0, n_exact_hi = 0, n_fir_out = 0, n_fir_hold = 0, n_fir_reset = 0;

  ssbc_top dut (
    .mul_a(mul_a), .mul_b(mul_b), .mul_p(mul_p),
    .clk(clk), .rst_n(rst_n), .fir_in_valid(fir_in_valid), .fir_x(fir_x),
    .fir_coef(fir_coef), .fir_out_valid(fir_out_valid), .fir_y(fir_y)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 50000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_mult(logic [MN-1:0] a, logic [MN-1:0] b);
    logic [127:0] e, full;
    mul_a = a;
    mul_b = b;
    #1;
    e    = ref_mult(a, b, MN, ML);
    full = 128'(a) * 128'(b);
    checks++;
    if (mul_p != e) begin
      failures++;
      $display("FAIL mult %h * %h = %h expected %h", a, b, mul_p, e);
    end
    if (mul_p[ML-1:0] != full[ML-1:0]) n_approx++;
    if (mul_p[2*MN-1:ML] != full[2*MN-1:ML]) n_exact_hi++;
  endtask

  logic [W-1:0]  hist [T];
  logic [YW-1:0] exp_y, held;
  logic [127:0]  pr;

  initial begin
    // ---- multiplier
    check_mult('0, '0);
    check_mult('1, '1);
    check_mult('1, 64'd2);
    check_mult(64'h8000_0000_0000_0001, 64'hffff_ffff_0000_ffff);
    for (int k = 0; k < 2000; k++) check_mult({$urandom, $urandom}, {$urandom, $urandom});

    // ---- FIR
    for (int k = 0; k < T; k++) begin
      fir_coef[k] = 8'($urandom | 1);
      hist[k] = '0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    exp_y = '0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      fir_in_valid = ($urandom % 3) != 0;
      fir_x        = 8'($urandom);
      held         = fir_y;
      if (fir_in_valid) begin
        for (int k = T - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = fir_x;
        exp_y = '0;
        for (int k = 0; k < T; k++) begin
          pr = ref_mult(64'(hist[k]), 64'(fir_coef[k]), W, W / 8);
          exp_y += YW'(pr[2*W-1:0]);
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (fir_out_valid !== fir_in_valid || fir_y != exp_y) begin
        failures++;
        $display("FIR FAIL n=%0d valid=%b y=%0d expected %0d", n, fir_out_valid, fir_y, exp_y);
      end
      if (fir_in_valid) n_fir_out++;
      else if (fir_y == held) n_fir_hold++;
    end

    // ---- FIR reset clears the output
    @(negedge clk);
    fir_in_valid = 1'b0;
    if (fir_y != '0) begin
      rst_n = 1'b0;
      @(posedge clk);
      #1;
      checks++;
      if (fir_y != '0 || fir_out_valid != 1'b0) begin
        failures++;
        $display("FAIL reset did not clear the FIR output");
      end else n_fir_reset++;
    end

    $display("mechanisms: approx=%0d exact_hi=%0d fir_out=%0d fir_hold=%0d fir_reset=%0d",
             n_approx, n_exact_hi, n_fir_out, n_fir_hold, n_fir_reset);
    if (n_approx == 0)    begin failures++; $display("FAIL approximation never visible"); end
    if (n_exact_hi == 0)  begin failures++; $display("FAIL no carries into the upper part"); end
    if (n_fir_out == 0)   begin failures++; $display("FAIL no FIR output"); end
    if (n_fir_hold == 0)  begin failures++; $display("FAIL no FIR hold cycle"); end
    if (n_fir_reset == 0) begin failures++; $display("FAIL FIR reset never exercised"); end
    checks += 5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
