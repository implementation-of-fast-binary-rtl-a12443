// stacker6 -- six-bit symmetric bit stacker.
//
// Stacks six equally weighted bits so that all "1" bits are grouped at the low
// end of y (y[n-1] = 1 exactly when at least n inputs are 1). It follows the
// symmetric-stacking construction:
//   * x[2:0] and x[5:3] are stacked by two stacker3 cells into h and i;
//   * h is read reversed (h2 h1 h0 i0 i1 i2), which makes one contiguous train
//     of ones; bits three positions apart are combined:
//       j = {h0|i2, h1|i1, h2|i0},  k = {h0&i2, h1&i1, h2&i0};
//     j fills with ones before k, and |j|+|k| equals the input count;
//   * j and k are restacked by two more stacker3 cells and concatenated,
//     the j stack in the low half, the k stack in the high half.
// The intermediate vectors h, i, j and k are brought out because the 6:3 and
// 7:3 counters read them directly instead of the final restacking layer.
//
// Interface: x[5:0] in; y[5:0], h[2:0], i[2:0], j[2:0], k[2:0] out.
// Purely combinational: three gate levels to y, two to j/k.
module stacker6 (
  input  logic [5:0] x,
  output logic [5:0] y,
  output logic [2:0] h,
  output logic [2:0] i,
  output logic [2:0] j,
  output logic [2:0] k
);
  stacker3 u_h (.x(x[2:0]), .y(h));
  stacker3 u_i (.x(x[5:3]), .y(i));

  always_comb begin
    j[0] = h[2] | i[0];
    j[1] = h[1] | i[1];
    j[2] = h[0] | i[2];
    k[0] = h[2] & i[0];
    k[1] = h[1] & i[1];
    k[2] = h[0] & i[2];
  end

  stacker3 u_j (.x(j), .y(y[2:0]));
  stacker3 u_k (.x(k), .y(y[5:3]));
endmodule
