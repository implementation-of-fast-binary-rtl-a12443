// tb_counter32 -- exhaustive self-checking test of the stack-based 3:2
// counter: for all eight inputs {carry, sum} must equal the number of ones.
// Watchdog: 1000 clock cycles.
module tb_counter32;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [2:0] x;
  logic [1:0] count;

  always #5 clk = ~clk;

  counter32 dut (.x(x), .count(count));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      x = 3'(v);
      @(posedge clk);
      checks++;
      if (count !== 2'($countones(x))) begin
        failures++;
        $display("FAIL x=%b count=%0d", x, count);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
