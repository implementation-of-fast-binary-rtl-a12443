// stacker3 -- three-bit bit stacker.
//
// Groups the "1" bits of three equally weighted inputs at the low end of the
// output vector: y[0] is set when at least one input is set (OR), y[1] when at
// least two are set (majority) and y[2] when all three are set (AND). The
// number of ones is preserved, so y is a thermometer code of the input count.
// These three equations are the ones of the symmetric-stacking counter method;
// the choice that y[0] carries the "at least one" bit is this design's.
//
// Interface: x[2:0] in, y[2:0] out. Purely combinational, one gate level.
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
