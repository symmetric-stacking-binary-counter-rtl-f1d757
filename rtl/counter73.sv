// counter73 -- 7:3 symmetric stacking counter.
//
// Counts the ones among seven bits of equal weight. x[5:0] are stacked by
// the symmetric six-bit stacker into s[5:0]. The seventh bit x[6] is then
// inserted into that stack: one more '1' moves every position up by one,
//   z[0] = s[0] | x6,  z[i] = s[i] | (s[i-1] & x6),  z[6] = s[5] & x6,
// which is one AND-OR level. The seven-bit stack z is converted to binary
// without XOR gates. How the seventh input joins the stack is this
// design's own choice; the counter's function is the 7:3 count.
//
// Interface: x[6:0] input bits, count[2:0] = number of ones (0..7).
// Combinational.
module counter73 (
  input  logic [6:0] x,
  output logic [2:0] count
);
  logic [5:0] s;
  logic [6:0] z;

  stacker6 u_stack (.x(x[5:0]), .y(s));

  always_comb begin
    z[0] = s[0] | x[6];
    for (int i = 1; i < 6; i++) z[i] = s[i] | (s[i-1] & x[6]);
    z[6] = s[5] & x[6];
  end

  stack_to_binary #(.N(7)) u_conv (.y(z), .count(count));
endmodule
