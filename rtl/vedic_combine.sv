// vedic_combine -- sums the four sub-products of one Vedic multiplier level.
//
// With a = {aH, aL} and b = {bH, bL} (N/2-bit halves), the vertically and
// crosswise (Urdhva Tiryakbhyam) rule gives
//   a*b = aH*bH * 2^N + (aL*bH + aH*bL) * 2^(N/2) + aL*bL.
// The two vertical products do not overlap and form one 2N-bit row
// {p_hh, p_ll}; the two crosswise products form two more rows shifted by N/2.
// One row of 3:2 stacking counters (counter32) reduces the three rows to two,
// Wallace style, and a carry-propagate adder produces the product. The
// three-row arrangement and the single counter row are this design's choices.
//
// Interface: p_ll = aL*bL, p_lh = aL*bH, p_hl = aH*bL, p_hh = aH*bH (N bits
// each) in; p[2N-1:0] out. Purely combinational.
module vedic_combine #(
  parameter int unsigned N = 128
) (
  input  logic [N-1:0]   p_ll,
  input  logic [N-1:0]   p_lh,
  input  logic [N-1:0]   p_hl,
  input  logic [N-1:0]   p_hh,
  output logic [2*N-1:0] p
);
  localparam int unsigned W = 2 * N;
  localparam int unsigned M = N / 2;

  logic [W-1:0] r0, sum, carry;  // carry[c]: carry into column c

  assign r0 = {p_hh, p_ll};
  assign carry[0] = 1'b0;

  // Only columns M .. 3M-1 hold three bits; the others pass r0 through.
  for (genvar c = 0; c < W; c++) begin : g_col
    if (c >= M && c < 3*M) begin : g_fa
      logic [1:0] cnt;
      counter32 u_fa (.x({p_hl[c-M], p_lh[c-M], r0[c]}), .count(cnt));
      assign sum[c]     = cnt[0];
      assign carry[c+1] = cnt[1];
    end else begin : g_thru
      assign sum[c] = r0[c];
      if (c + 1 < W) begin : g_nc
        assign carry[c+1] = 1'b0;
      end
    end
  end

  // The carry out of column 2N-1 would always be zero (the product fits in
  // 2N bits), so it is not formed.
  assign p = sum + carry;
endmodule
