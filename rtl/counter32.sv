// counter32 -- 3:2 counter (full adder) in stacking form.
//
// Stacks three bits with stacker3 and converts the stack to a two-bit
// count: count[1] = y1 (majority, the carry), count[0] = y0&~y1 | y2 (the
// sum). Used by the multiplier tree for columns whose leftover height is
// three to five bits.
//
// Interface: x[2:0] inputs, count[1:0] number of ones. Combinational.
module counter32 (
  input  logic [2:0] x,
  output logic [1:0] count
);
  logic [2:0] stack;

  stacker3 u_stack (.x(x), .y(stack));
  stack_to_binary #(.N(3)) u_conv (.y(stack), .count(count));
endmodule
