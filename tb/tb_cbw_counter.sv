// tb_cbw_counter -- exhaustive self-checking test of the column counter for
// every size the Wallace tree uses (2:2, 3:2, 4:3, 5:3, 6:3 and 7:3). One
// instance per size is driven from the low bits of a shared 7-bit vector;
// each count is compared with the population count of its inputs.
// Watchdog: 2000 clock cycles.
module tb_cbw_counter;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [6:0] x;
  logic [2:0] count [2:7];

  always #5 clk = ~clk;

  for (genvar k = 2; k <= 7; k++) begin : g_dut
    cbw_counter #(.K(k)) dut (.x(x[k-1:0]), .count(count[k]));
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      x = 7'(v);
      @(posedge clk);
      for (int k = 2; k <= 7; k++) begin
        int n;
        if (v >= (1 << k)) continue;
        n = $countones(7'(v));
        checks++;
        if (count[k] !== 3'(n)) begin
          failures++;
          $display("FAIL K=%0d x=%b count=%0d expected %0d", k, x, count[k], n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
