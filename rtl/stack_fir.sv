// stack_fir -- direct-form FIR filter built on the stacking-counter
// multiplier.
//
// y[n] = sum_k coef[k] * x[n-k], k = 0 .. TAPS-1. Each tap has its own
// stack_wallace_mult, so every product is formed by the symmetric stacking
// counter tree with the same low-column approximation as the stand-alone
// multiplier. The products are added by an ordinary adder and the sum is
// registered.
//
// Follows the description: an FIR filter whose multipliers are the
// stacking, approximate-computing multipliers. This design's own choices:
// direct form, unsigned samples and coefficients, TAPS = 4, DATA_W = 8,
// coefficients taken from input ports, a sample-valid handshake and an
// active-low synchronous reset.
//
// Interface:
//   clk, rst_n         clock, synchronous active-low reset
//   in_valid, x_in     a new sample, taken on a rising edge with in_valid
//   coef[k]            coefficient of tap k (x[n-k]), held by the user
//   out_valid, y_out   y_out holds the output for the sample taken on the
//                      previous edge while out_valid is 1
// Timing: one output per accepted sample, one cycle of latency; the
// delay line and the output change only on accepted samples.
module stack_fir #(
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned TAPS       = 4,
  parameter int unsigned APPROX_LSB = DATA_W / 8,
  localparam int unsigned PROD_W    = 2 * DATA_W,
  localparam int unsigned ACC_W     = PROD_W + $clog2(TAPS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] x_in,
  input  logic [DATA_W-1:0] coef [TAPS],
  output logic              out_valid,
  output logic [ACC_W-1:0]  y_out
);
  logic [DATA_W-1:0] delay [TAPS];   // delay[0] = x_in, delay[k] = x[n-k]
  logic [DATA_W-1:0] hist  [TAPS];   // registered past samples (hist[0] unused)
  logic [PROD_W-1:0] prod  [TAPS];
  logic [ACC_W-1:0]  acc;

  always_comb begin
    delay[0] = x_in;
    for (int k = 1; k < TAPS; k++) delay[k] = hist[k];
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    stack_wallace_mult #(.N(DATA_W), .APPROX_LSB(APPROX_LSB)) u_mult (
      .a(delay[k]), .b(coef[k]), .p(prod[k])
    );
  end

  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++) acc += ACC_W'(prod[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) hist[k] <= '0;
      out_valid <= 1'b0;
      y_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 1; k < TAPS; k++) hist[k] <= delay[k-1];
        hist[0] <= '0;
        y_out   <= acc;
      end
    end
  end
endmodule
