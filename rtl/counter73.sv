// counter73 -- 7:3 parallel counter based on symmetric stacking.
//
// Counts the ones among seven equally weighted bits, count = {C2, C1, S}.
// x[5:0] go through a stacker6 (only its h, i, j, k vectors are used). Two
// versions of C1 and C2 are formed in parallel and x[6] selects one:
//   x[6] = 0: the 6:3 equations  C2 = k0|k1|k2,
//             C1 = (h1 | i1 | h0&i0) & ~C2 | h2&i2
//   x[6] = 1: the six-bit count n must give n+1 in {2,3,6,7} / n+1 >= 4:
//             C1 = (h0 | i0) & ~(j0&j1&j2) | h2&i1 | h1&i2   (n in {1,2,5,6})
//             C2 = j0 & j1 & j2                               (n >= 3)
//   S = (He ^ Ie) ^ x[6]
// j0&j1&j2 detects "at least three ones" because the J vector fills before K.
// This is the 7:3 design of the symmetric-stacking method, with its final
// multiplexer on the critical path.
//
// Interface: x[6:0] in, count[2:0] out. Purely combinational.
module counter73 (
  input  logic [6:0] x,
  output logic [2:0] count
);
  logic [5:0] y_unused;
  logic [2:0] h, i, j, k;
  logic       he, ie, c1_x0, c2_x0, c1_x1, c2_x1;

  stacker6 u_stk (.x(x[5:0]), .y(y_unused), .h(h), .i(i), .j(j), .k(k));

  always_comb begin
    he    = ~h[0] | (h[1] & ~h[2]);
    ie    = ~i[0] | (i[1] & ~i[2]);
    // x[6] = 0
    c2_x0 = k[0] | k[1] | k[2];
    c1_x0 = ((h[1] | i[1] | (h[0] & i[0])) & ~c2_x0) | (h[2] & i[2]);
    // x[6] = 1
    c2_x1 = j[0] & j[1] & j[2];
    c1_x1 = ((h[0] | i[0]) & ~c2_x1) | (h[2] & i[1]) | (h[1] & i[2]);

    count[0] = (he ^ ie) ^ x[6];
    count[1] = x[6] ? c1_x1 : c1_x0;
    count[2] = x[6] ? c2_x1 : c2_x0;
  end
endmodule
