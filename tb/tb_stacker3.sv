// tb_stacker3 -- exhaustive self-checking test of the three-bit stacker.
// All eight inputs are applied; y must be the thermometer code of the
// population count of x (y[n-1] = 1 iff at least n ones). A watchdog ends the
// run with a failure if it has not finished after 1000 clock cycles.
module tb_stacker3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [2:0] x, y, expect_y;

  always #5 clk = ~clk;

  stacker3 dut (.x(x), .y(y));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int n;
      x = 3'(v);
      n = $countones(3'(v));
      for (int b = 0; b < 3; b++) expect_y[b] = (n > b);
      @(posedge clk);
      checks++;
      if (y !== expect_y) begin
        failures++;
        $display("FAIL x=%b y=%b expected %b", x, y, expect_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
