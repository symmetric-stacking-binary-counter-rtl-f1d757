// stacker3 -- three-bit bit stacker.
//
// Moves every '1' of the three inputs to the low-index end of the output
// while keeping the number of ones: y[i] is 1 exactly when more than i of
// the inputs are 1. y[0] is the OR of the inputs, y[1] their majority and
// y[2] their AND, as the stacking scheme defines them. Purely
// combinational, no XOR gate on any path.
//
// Interface: x[2:0] are the bits X0..X2, y[2:0] the stack Y0..Y2.
module stacker3 (
  input  logic [2:0] x,
  output logic [2:0] y
);
  always_comb begin
    y[0] = x[0] | x[1] | x[2];
    y[1] = (x[0] & x[1]) | (x[0] & x[2]) | (x[1] & x[2]);
    y[2] = x[0] & x[1] & x[2];
  end
endmodule
