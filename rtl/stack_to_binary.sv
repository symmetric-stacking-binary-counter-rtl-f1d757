// stack_to_binary -- converts a bit stack into a binary count.
//
// A stack of N bits (y[i] = 1 when the count is above i) is a thermometer
// code. The count is m exactly where y[m-1] = 1 and y[m] = 0, so each such
// edge is detected with one AND and an inverter, and every bit of the
// binary count is the OR of the edges whose count has that bit set. For
// N = 6 this reduces to
//   count[0] = y0&~y1 | y2&~y3 | y4&~y5,
//   count[1] = y1&~y3 | y5,       count[2] = y3,
// so no XOR gate is needed. The edge-and-OR structure is this design's
// choice; the stacking scheme only asks that the stack be turned into a
// binary count.
//
// Interface: y[N-1:0] a valid stack, count[$clog2(N+1)-1:0] its number of
// ones. Combinational. An input that is not a stack gives an undefined
// count.
module stack_to_binary #(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0]             y,
  output logic [$clog2(N+1)-1:0]   count
);
  localparam int unsigned CW = $clog2(N + 1);

  logic [N:0] ext;     // stack with a 0 above its top
  logic [N:1] edge_m;  // edge_m[m]: exactly m ones

  assign ext = {1'b0, y};

  always_comb begin
    for (int unsigned m = 1; m <= N; m++) begin
      edge_m[m] = ext[m-1] & ~ext[m];
    end
    count = '0;
    for (int unsigned m = 1; m <= N; m++) begin
      for (int unsigned bt = 0; bt < CW; bt++) begin
        if (((m >> bt) & 1) == 1) count[bt] = count[bt] | edge_m[m];
      end
    end
  end
endmodule
