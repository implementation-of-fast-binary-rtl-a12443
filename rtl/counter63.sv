// counter63 -- 6:3 parallel counter based on symmetric stacking.
//
// Counts the ones among six equally weighted bits and returns the count as
// count = {C2, C1, S}. The bottom restacking layer of the six-bit stacker is
// not needed: the outputs come straight from the first-layer stacks h, i and
// the AND vector k of stacker6.
//   He = ~h0 | (h1 & ~h2)        even number of ones in x[2:0] (0 or 2)
//   Ie = ~i0 | (i1 & ~i2)        even number of ones in x[5:3]
//   S  = He ^ Ie                 (the only XOR, off the critical path)
//   C2 = k0 | k1 | k2            count >= 4
//   C1 = (h1 | i1 | h0&i0) & ~C2 count is 2 or 3
//      | h2 & i2                 count is 6
// These equations follow the symmetric-stacking method; no XOR and no
// multiplexer lies on the path to C1/C2.
//
// Interface: x[5:0] in, count[2:0] out. Purely combinational.
module counter63 (
  input  logic [5:0] x,
  output logic [2:0] count
);
  logic [5:0] y_unused;
  logic [2:0] h, i, j_unused, k;
  logic       he, ie, c2;

  stacker6 u_stk (.x(x), .y(y_unused), .h(h), .i(i), .j(j_unused), .k(k));

  always_comb begin
    he       = ~h[0] | (h[1] & ~h[2]);
    ie       = ~i[0] | (i[1] & ~i[2]);
    c2       = k[0] | k[1] | k[2];
    count[0] = he ^ ie;
    count[1] = ((h[1] | i[1] | (h[0] & i[0])) & ~c2) | (h[2] & i[2]);
    count[2] = c2;
  end
endmodule
