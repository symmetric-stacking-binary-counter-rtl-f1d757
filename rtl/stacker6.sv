// stacker6 -- six-bit symmetric bit stacker.
//
// Stacks six bits so that y[i] is 1 exactly when more than i inputs are 1.
// x[2:0] and x[5:3] are first stacked by two stacker3 circuits into H and I.
// Reading H backwards and I forwards (H2 H1 H0 I0 I1 I2) gives one unbroken
// run of ones. Pairs three places apart are combined:
//   J = {H0|I2, H1|I1, H2|I0}  takes the first three ones of the run,
//   K = {H0&I2, H1&I1, H2&I0}  takes the ones beyond three.
// J and K hold as many ones as the inputs and J fills before K, so stacking
// each with one more stacker3 and concatenating gives the six-bit stack:
// y[2:0] = stack(J), y[5:3] = stack(K). Two stacker levels and one OR/AND
// level, no XOR gates.
//
// Interface: x[5:0] are X0..X5, y[5:0] the stack Y0..Y5. Combinational.
module stacker6 (
  input  logic [5:0] x,
  output logic [5:0] y
);
  logic [2:0] h, i, j, k;

  stacker3 u_stack_h (.x(x[2:0]), .y(h));
  stacker3 u_stack_i (.x(x[5:3]), .y(i));

  // Symmetric merge: H reversed against I.
  always_comb begin
    j[0] = h[2] | i[0];
    j[1] = h[1] | i[1];
    j[2] = h[0] | i[2];
    k[0] = h[2] & i[0];
    k[1] = h[1] & i[1];
    k[2] = h[0] & i[2];
  end

  stacker3 u_stack_j (.x(j), .y(y[2:0]));
  stacker3 u_stack_k (.x(k), .y(y[5:3]));
endmodule
