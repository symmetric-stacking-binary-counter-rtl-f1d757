// counter22 -- 2:2 counter (half adder) in stacking form.
//
// A two-bit stack is {x0&x1, x0|x1}; converting it gives the carry
// count[1] = x0&x1 and the sum count[0] = (x0|x1)&~(x0&x1). Used by the
// multiplier tree for columns left with two bits.
//
// Interface: x[1:0] inputs, count[1:0] number of ones. Combinational.
module counter22 (
  input  logic [1:0] x,
  output logic [1:0] count
);
  logic [1:0] stack;

  assign stack = {x[0] & x[1], x[0] | x[1]};
  stack_to_binary #(.N(2)) u_conv (.y(stack), .count(count));
endmodule
