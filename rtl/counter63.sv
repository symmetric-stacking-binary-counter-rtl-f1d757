// counter63 -- 6:3 symmetric stacking counter.
//
// Counts the ones among six bits of equal weight and gives the count as a
// three-bit binary number. The six bits are stacked by the symmetric
// six-bit stacker and the stack is then converted to binary; neither step
// uses an XOR gate, which keeps XORs off the critical path.
//
// Interface: x[5:0] input bits, count[2:0] = number of ones (0..6).
// Combinational.
module counter63 (
  input  logic [5:0] x,
  output logic [2:0] count
);
  logic [5:0] stack;

  stacker6 u_stack (.x(x), .y(stack));
  stack_to_binary #(.N(6)) u_conv (.y(stack), .count(count));
endmodule
