// counter32 -- 3:2 counter (full adder) built on a three-bit stack.
//
// The three inputs are stacked by stacker3; the carry is the "at least two"
// output y[1] and the sum (odd count: exactly one or three ones) is
// y[0] & ~y[1] | y[2]. Using the stacker rather than an XOR chain is this
// design's choice, in the spirit of the stacking counters; the function is an
// ordinary full adder.
//
// Interface: x[2:0] in, count[1:0] = {carry, sum} out. Combinational.
module counter32 (
  input  logic [2:0] x,
  output logic [1:0] count
);
  logic [2:0] y;

  stacker3 u_stk (.x(x), .y(y));

  always_comb begin
    count[0] = (y[0] & ~y[1]) | y[2];
    count[1] = y[1];
  end
endmodule
