// tb_stacker6 -- exhaustive self-checking test of the six-bit symmetric
// stacker. For all 64 inputs it checks that y is the thermometer code of the
// population count, that h and i are the stacks of the two input halves, that
// j and k together hold as many ones as the input and that k stays empty until
// j is full. Watchdog: 2000 clock cycles.
module tb_stacker6;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [5:0] x, y, ey;
  logic [2:0] h, i, j, k, eh, ei;

  always #5 clk = ~clk;

  stacker6 dut (.x(x), .y(y), .h(h), .i(i), .j(j), .k(k));

  function automatic logic [2:0] therm3(int n);
    logic [2:0] t;
    for (int b = 0; b < 3; b++) t[b] = (n > b);
    return t;
  endfunction

  task automatic check(string what, logic [5:0] got, logic [5:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL x=%b %s=%b expected %b", x, what, got, exp_v);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      int n, nh, ni, nj, nk;
      x  = 6'(v);
      nh = $countones(v[2:0]);
      ni = $countones(v[5:3]);
      n  = nh + ni;
      for (int b = 0; b < 6; b++) ey[b] = (n > b);
      eh = therm3(nh);
      ei = therm3(ni);
      @(posedge clk);
      nj = $countones(j);
      nk = $countones(k);
      check("y", y, ey);
      check("h", 6'(h), 6'(eh));
      check("i", 6'(i), 6'(ei));
      check("j+k", 6'(nj + nk), 6'(n));
      check("j count", 6'(nj), 6'((n > 3) ? 3 : n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
