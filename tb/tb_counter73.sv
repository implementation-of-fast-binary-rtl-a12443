// tb_counter73 -- exhaustive self-checking test of the 7:3 stacking counter.
// Every one of the 128 inputs is applied and count must equal the
// population count of x, computed here by adding the bits. Watchdog: 2000
// clock cycles.
module tb_counter73;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [6:0] x;
  logic [2:0] count;
  int hits [8];

  always #5 clk = ~clk;

  counter73 dut (.x(x), .count(count));

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int n;
      x = 7'(v);
      n = $countones(x);
      @(posedge clk);
      checks++;
      hits[n]++;
      if (count !== 3'(n)) begin
        failures++;
        $display("FAIL x=%b count=%0d expected %0d", x, count, n);
      end
    end
    // every count value 0..7 must have been produced
    for (int n = 0; n <= 7; n++) begin
      checks++;
      if (hits[n] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
