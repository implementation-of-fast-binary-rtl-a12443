// cbw_mult -- N x N counter-based Wallace (CBW) multiplier.
//
// Unsigned multiplier in three parts:
//   1. an AND array forms the N*N partial-product bits; column c (weight 2^c)
//      holds every a[i] & b[c-i];
//   2. the columns are compressed in stages, mostly by 7:3 symmetric-stacking
//      counters, with 6:3, 5:3, 4:3, 3:2 and 2:2 counters for the remainder of
//      a column that is not a multiple of seven; the sum of a counter stays in
//      its column, C1 moves one column up and C2 two columns up. The schedule
//      (which counter goes where, and how many stages) is computed by the
//      functions of cbw_pkg when the module is elaborated, so any N works;
//   3. when every column holds at most two bits, a carry-propagate adder adds
//      the two rows.
// The counter-based Wallace reduction and its counter set follow the CBW
// method; the order in which the outputs are stacked into the next stage,
// reducing two-bit columns with 2:2 counters too, and the plain "+" for the
// final adder are this design's choices. For N = 8 the tree has 3 stages
// (tallest column 8 -> 4 -> 3 -> 2) built from 3 7:3, 2 6:3, 2 5:3, 3 4:3,
// 11 3:2 and 17 2:2 counters.
//
// Interface: a[N-1:0], b[N-1:0] in; p[2N-1:0] = a*b out. Purely
// combinational, no clock and no latency.
module cbw_mult
  import cbw_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int W    = 2 * N;
  localparam int NS   = num_stages(N);
  localparam int MAXH = max_height(N);

  // Height of every column in every stage, computed once (8 bits each).
  typedef logic [NS:0][W-1:0][7:0] plan_t;

  function automatic plan_t make_plan();
    plan_t t;
    t = '0;
    for (int c = 0; c < W; c++) t[0][c] = 8'(pp_height(N, c));
    for (int s = 0; s < NS; s++)
      for (int c = 0; c < W; c++) begin
        int h;
        h = n_counters(int'(t[s][c])) + n_pass(int'(t[s][c]));
        if (c >= 1) h += n_counters(int'(t[s][c-1]));
        if (c >= 2) h += n_wide(int'(t[s][c-2]));
        t[s+1][c] = 8'(h);
      end
    return t;
  endfunction

  localparam plan_t PLAN = make_plan();

  // Height of column c before stage s, zero outside the product.
  function automatic int hgt(int s, int c);
    if (c < 0 || c >= W) return 0;
    return int'(PLAN[s][c]);
  endfunction

  // g_lvl[s].bits[c][r]: bit r of column c entering stage s (one variable
  // per stage, so that each stage only reads the one before it)
  for (genvar s = 0; s <= NS; s++) begin : g_lvl
    logic [MAXH-1:0] bits [W];
  end

  // Stage 0: partial products.
  for (genvar c = 0; c < W; c++) begin : g_pp
    localparam int H0 = hgt(0, c);
    for (genvar r = 0; r < H0; r++) begin : g_bit
      localparam int IA = (c < N) ? r : c - N + 1 + r;
      assign g_lvl[0].bits[c][r] = a[IA] & b[c-IA];
    end
    for (genvar r = H0; r < MAXH; r++) begin : g_zero
      assign g_lvl[0].bits[c][r] = 1'b0;
    end
  end

  // Reduction stages.
  for (genvar s = 0; s < NS; s++) begin : g_stage
    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int H       = hgt(s, c);
      localparam int NC      = n_counters(H);
      localparam int NP      = n_pass(H);
      localparam int HNEXT   = hgt(s + 1, c);
      // where this column's outputs land in the next stage
      localparam int BASE_C1 = n_counters(hgt(s, c + 1));
      localparam int BASE_C2 = n_counters(hgt(s, c + 2))
                             + n_counters(hgt(s, c + 1));
      localparam int BASE_P  = NC + n_counters(hgt(s, c - 1))
                             + n_wide(hgt(s, c - 2));

      for (genvar j = 0; j < NC; j++) begin : g_cnt
        localparam int K = counter_size(H, j);
        logic [2:0] cnt;
        cbw_counter #(.K(K)) u_cnt (.x(g_lvl[s].bits[c][7*j +: K]), .count(cnt));
        assign g_lvl[s+1].bits[c][j] = cnt[0];
        if (c + 1 < W) begin : g_c1
          assign g_lvl[s+1].bits[c+1][BASE_C1 + j] = cnt[1];
        end
        if (K >= 4 && c + 2 < W) begin : g_c2
          assign g_lvl[s+1].bits[c+2][BASE_C2 + j] = cnt[2];
        end
      end

      for (genvar q = 0; q < NP; q++) begin : g_pass
        assign g_lvl[s+1].bits[c][BASE_P + q] = g_lvl[s].bits[c][H - NP + q];
      end

      for (genvar r = HNEXT; r < MAXH; r++) begin : g_zero
        assign g_lvl[s+1].bits[c][r] = 1'b0;
      end
    end
  end

  // Final carry-propagate adder of the last two rows.
  logic [W-1:0] row0, row1;
  for (genvar c = 0; c < W; c++) begin : g_rows
    assign row0[c] = g_lvl[NS].bits[c][0];
    assign row1[c] = g_lvl[NS].bits[c][1];
  end
  assign p = row0 + row1;
endmodule
