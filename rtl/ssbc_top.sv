// ssbc_top -- symmetric stacking counter multiplier and its FIR filter
// application, side by side.
//
// The design's building block is the symmetric stacking counter (6:3 and
// 7:3 counters that sort bits into a stack and read the stack out as a
// binary count, with no XOR gate on the way). Two uses of it are brought
// out here:
//   - a stand-alone MUL_N x MUL_N unsigned multiplier whose
//     partial-product tree is reduced by those counters and whose
//     MUL_APPROX lowest product bits are approximated (combinational);
//   - a FIR_TAPS-tap FIR filter whose tap multipliers are the same
//     multiplier at FIR_W bits (registered output, one cycle latency).
// The two share nothing but the counter design.
//
// MUL_N = 64 follows the multiplier width named for the design; the FIR
// sizes and both approximation widths are this design's choices.
//
// Interface: mul_a, mul_b -> mul_p (combinational product). clk, rst_n,
// fir_in_valid, fir_x, fir_coef -> fir_out_valid, fir_y (see stack_fir).
module ssbc_top #(
  parameter int unsigned MUL_N      = 64,
  parameter int unsigned MUL_APPROX = MUL_N / 8,
  parameter int unsigned FIR_W      = 8,
  parameter int unsigned FIR_TAPS   = 4,
  parameter int unsigned FIR_APPROX = FIR_W / 8,
  localparam int unsigned FIR_Y_W   = 2 * FIR_W + $clog2(FIR_TAPS)
) (
  input  logic [MUL_N-1:0]   mul_a,
  input  logic [MUL_N-1:0]   mul_b,
  output logic [2*MUL_N-1:0] mul_p,

  input  logic               clk,
  input  logic               rst_n,
  input  logic               fir_in_valid,
  input  logic [FIR_W-1:0]   fir_x,
  input  logic [FIR_W-1:0]   fir_coef [FIR_TAPS],
  output logic               fir_out_valid,
  output logic [FIR_Y_W-1:0] fir_y
);
  stack_wallace_mult #(.N(MUL_N), .APPROX_LSB(MUL_APPROX)) u_mult (
    .a(mul_a), .b(mul_b), .p(mul_p)
  );

  stack_fir #(.DATA_W(FIR_W), .TAPS(FIR_TAPS), .APPROX_LSB(FIR_APPROX)) u_fir (
    .clk(clk), .rst_n(rst_n), .in_valid(fir_in_valid), .x_in(fir_x),
    .coef(fir_coef), .out_valid(fir_out_valid), .y_out(fir_y)
  );
endmodule
