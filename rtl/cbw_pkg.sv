// cbw_pkg -- reduction schedule of the counter-based Wallace (CBW) tree.
//
// Constant functions that cbw_mult evaluates at elaboration to plan the
// placement of every counter and wire of an N x N tree. Column c of stage 0 holds
// the partial-product bits of weight 2^c. In each stage, a column of height
// h >= 2 is covered by floor(h/7) 7:3 counters, then one counter for the
// remainder r = h mod 7 (6:3, 5:3, 4:3, 3:2 or 2:2); a remainder of one bit
// is passed on unprocessed, and so is a column of a single bit. Reducing
// columns of two bits with 2:2 counters as well keeps height-3 columns from
// rippling through many stages: an 8 x 8 tree needs 3 stages
// (8 -> 4 -> 3 -> 2), a 16 x 16 tree 4 and a 128 x 128 tree 6.
// The height of column c in the next stage is then
//   counters(c) + counters(c-1) + three-output counters(c-2) + passed bits(c)
// (one sum per counter, one C1 carry from the column below, one C2 carry from
// two columns below). Stages repeat until no column is taller than two.
// Bits of weight 2^(2N) and above are dropped; they are always zero because
// the product fits in 2N bits.
package cbw_pkg;

  // Largest tree the functions can plan: 2N columns must fit in MAX_COLS (N <= 128).
  localparam int MAX_COLS   = 256;
  localparam int MAX_STAGES = 32;

  // Number of partial-product bits of weight 2^c in an n x n product.
  function automatic int pp_height(int n, int c);
    if (c < 0 || c > 2*n - 2) return 0;
    return (c < n) ? c + 1 : 2*n - 1 - c;
  endfunction

  // Counters placed in a column of height h.
  function automatic int n_counters(int h);
    if (h <= 1) return 0;
    return h / 7 + (((h % 7) >= 2) ? 1 : 0);
  endfunction

  // Counters with three outputs (four or more inputs) in a column of height h.
  function automatic int n_wide(int h);
    if (h <= 1) return 0;
    return h / 7 + (((h % 7) >= 4) ? 1 : 0);
  endfunction

  // Bits passed on unprocessed from a column of height h.
  function automatic int n_pass(int h);
    if (h <= 1) return h;
    return ((h % 7) == 1) ? 1 : 0;
  endfunction

  // Number of inputs of counter j in a column of height h.
  function automatic int counter_size(int h, int j);
    return (j < h / 7) ? 7 : h % 7;
  endfunction

  // Runs the schedule of an n x n tree to the end. Returns the number of
  // stages when want_stages is set, else the tallest column seen (at least 2).
  function automatic int run_schedule(int n, bit want_stages);
    int cur [MAX_COLS];
    int nxt [MAX_COLS];
    int tallest, most;
    most = 2;
    for (int k = 0; k < 2*n; k++) cur[k] = pp_height(n, k);
    for (int s = 0; s < MAX_STAGES; s++) begin
      tallest = 0;
      for (int k = 0; k < 2*n; k++) if (cur[k] > tallest) tallest = cur[k];
      if (tallest > most) most = tallest;
      if (tallest <= 2) return want_stages ? s : most;
      for (int k = 0; k < 2*n; k++) begin
        nxt[k] = n_counters(cur[k]) + n_pass(cur[k]);
        if (k >= 1) nxt[k] += n_counters(cur[k-1]);
        if (k >= 2) nxt[k] += n_wide(cur[k-2]);
      end
      for (int k = 0; k < 2*n; k++) cur[k] = nxt[k];
    end
    return want_stages ? MAX_STAGES : most;
  endfunction

  // Number of stages until no column of an n x n tree is taller than two.
  function automatic int num_stages(int n);
    return run_schedule(n, 1'b1);
  endfunction

  // Tallest column over all stages of an n x n tree (at least 2).
  function automatic int max_height(int n);
    return run_schedule(n, 1'b0);
  endfunction

endpackage
