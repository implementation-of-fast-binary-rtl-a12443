// tb_vedic_wallace_mult -- end-to-end test of the 128 x 128 Vedic Wallace
// multiplier at its default parameters.
// Operands: corner values (0, 1, all ones, single bits), uniform random
// values, dense random values (OR of three random words, so most partial
// products are 1) and sparse ones. Each product is compared with the 256-bit
// "*" of the two operands.
// It also counts how often the mechanisms of the design were exercised, by
// looking into the first leaf 8 x 8 multiplier and the top Vedic adder:
//   x6_high / x6_low  the 7:3 counter of column 6 selects its x6 = 1 / x6 = 0
//                     versions of C1 and C2
//   full7             that 7:3 counter counts seven ones
//   k_path            the 6:3 counter of column 5 counts four or more (K set)
//   six               that 6:3 counter counts six (the h2&i2 term of C1)
//   cross_carry       the top-level 3:2 row of the Vedic adder makes a carry
// A mechanism that never occurs counts as a failure.
// Watchdog: 100000 clock cycles.
module tb_vedic_wallace_mult;
  localparam int N = 128;
  int checks = 0, failures = 0;
  int x6_high = 0, x6_low = 0, full7 = 0, k_path = 0, six = 0, cross_carry = 0;
  logic clk = 1'b0;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;

  always #5 clk = ~clk;

  vedic_wallace_mult dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rand_word();
    logic [N-1:0] r;
    for (int w = 0; w < N; w += 32) r[w +: 32] = $urandom;
    return r;
  endfunction

  task automatic run(logic [N-1:0] x, logic [N-1:0] y);
    logic [2*N-1:0] e;
    logic [6:0] c73_x;
    logic [5:0] c63_x;
    a = x;
    b = y;
    #1;
    e = (2*N)'(x) * (2*N)'(y);
    checks++;
    if (p !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h expected %h", x, y, p, e);
    end
    c73_x = dut.g_lvl[0].g_leaf.g_i[0].g_j[0].u_cbw
              .g_stage[0].g_col[6].g_cnt[0].u_cnt.g_k7.u_c73.x;
    c63_x = dut.g_lvl[0].g_leaf.g_i[0].g_j[0].u_cbw
              .g_stage[0].g_col[5].g_cnt[0].u_cnt.g_k456.u_c63.x;
    if (c73_x[6]) x6_high++; else x6_low++;
    if (c73_x == 7'h7f) full7++;
    if ($countones(c63_x) >= 4) k_path++;
    if (c63_x == 6'h3f) six++;
    if (dut.g_lvl[4].g_comb.g_i[0].g_j[0].u_comb.carry != '0) cross_carry++;
    @(posedge clk);
  endtask

  initial begin
    run('0, '0);
    run('1, '0);
    run('1, '1);
    run(N'(1), '1);
    run('1, N'(1));
    for (int s = 0; s < N; s += 7) run(N'(1) << s, '1);
    for (int t = 0; t < 1500; t++) run(rand_word(), rand_word());
    for (int t = 0; t < 1500; t++)
      run(rand_word() | rand_word() | rand_word(), rand_word() | rand_word() | rand_word());
    for (int t = 0; t < 500; t++)
      run(rand_word() & rand_word() & rand_word(), rand_word());
    $display("mechanisms: x6_high=%0d x6_low=%0d full7=%0d k_path=%0d six=%0d cross_carry=%0d",
             x6_high, x6_low, full7, k_path, six, cross_carry);
    checks += 6;
    if (x6_high == 0) failures++;
    if (x6_low == 0) failures++;
    if (full7 == 0) failures++;
    if (k_path == 0) failures++;
    if (six == 0) failures++;
    if (cross_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
