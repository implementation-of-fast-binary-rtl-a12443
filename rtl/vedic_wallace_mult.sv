// vedic_wallace_mult -- N x N Vedic Wallace multiplier (top level).
//
// Unsigned multiplier built by the vertically and crosswise (Urdhva
// Tiryakbhyam) method applied hierarchically. Both operands are cut into
// LEAF-bit blocks a_i, b_j. Level 0 forms every block product a_i * b_j with
// an 8 x 8 counter-based Wallace multiplier (cbw_mult, whose tree is built
// from symmetric-stacking 7:3 and 6:3 counters). Each higher level doubles the
// operand width: the product of two 2S-bit blocks is put together by
// vedic_combine from the four S x S products of its halves (low*low,
// low*high, high*low, high*high) of the level below. With the defaults,
// N = 128 and LEAF = 8, there are 256 leaf multipliers and four combine levels
// (16, 32, 64 and 128 bits; 64 + 16 + 4 + 1 adders).
// The 128-bit size and the 8 x 8 Wallace leaf follow the design; halving all
// the way down to the leaf and the combine circuit are this design's reading
// of the hierarchical Vedic method. The hierarchy is unrolled with generate
// loops (one loop level per Vedic level) rather than by a recursive module.
//
// Interface: a[N-1:0], b[N-1:0] in; p[2N-1:0] = a*b out. N must be LEAF
// times a power of two. Purely combinational, no clock and no latency.
module vedic_wallace_mult #(
  parameter int unsigned N    = 128,
  parameter int unsigned LEAF = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int NB     = N / LEAF;       // blocks per operand
  localparam int LEVELS = $clog2(NB);     // combine levels

  if ((LEAF << LEVELS) != N) begin : g_bad
    $error("vedic_wallace_mult: N must be LEAF times a power of two");
  end

  // g_lvl[l].prod[i][j]: product of the (LEAF<<l)-bit blocks a_i and b_j
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int S = LEAF << l;   // operand block width at this level
    localparam int K = NB >> l;     // blocks per operand at this level
    logic [2*S-1:0] prod [K][K];

    if (l == 0) begin : g_leaf
      for (genvar i = 0; i < K; i++) begin : g_i
        for (genvar j = 0; j < K; j++) begin : g_j
          cbw_mult #(.N(LEAF)) u_cbw (
            .a(a[i*LEAF +: LEAF]), .b(b[j*LEAF +: LEAF]), .p(prod[i][j])
          );
        end
      end
    end else begin : g_comb
      for (genvar i = 0; i < K; i++) begin : g_i
        for (genvar j = 0; j < K; j++) begin : g_j
          vedic_combine #(.N(S)) u_comb (
            .p_ll(g_lvl[l-1].prod[2*i][2*j]),
            .p_lh(g_lvl[l-1].prod[2*i][2*j+1]),
            .p_hl(g_lvl[l-1].prod[2*i+1][2*j]),
            .p_hh(g_lvl[l-1].prod[2*i+1][2*j+1]),
            .p(prod[i][j])
          );
        end
      end
    end
  end

  assign p = g_lvl[LEVELS].prod[0][0];
endmodule
