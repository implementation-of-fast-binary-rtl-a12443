// tb_cbw_mult -- self-checking test of the counter-based Wallace multiplier.
// The 8 x 8 multiplier (the default size) is checked exhaustively over all
// 65536 operand pairs; a 16 x 16 instance is checked on 4000 random pairs
// plus the corner operands 0, 1 and all ones. Products are compared with the
// "*" operator. It also checks the depth of the generated trees: 3 counter
// stages for 8 x 8 (8 -> 4 -> 3 -> 2 rows) and 4 for 16 x 16 (16 -> 8 -> 4 ->
// 3 -> 2 rows, the first step being the sixteen-to-eight example of the CBW
// row count). Watchdog: 200000 clock cycles.
module tb_cbw_mult;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [15:0] a16, b16;
  logic [31:0] p16;

  always #5 clk = ~clk;

  cbw_mult dut8 (.a(a8), .b(b8), .p(p8));
  cbw_mult #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(logic [15:0] x, logic [15:0] y);
    a16 = x;
    b16 = y;
    #1;
    checks++;
    if (p16 !== 32'(x) * 32'(y)) begin
      failures++;
      $display("FAIL 16x16 %h * %h = %h", x, y, p16);
    end
  endtask

  initial begin
    a16 = '0;
    b16 = '0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        #1;
        checks++;
        if (p8 !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL 8x8 %0d * %0d = %0d", i, j, p8);
        end
      end
      @(posedge clk);
    end
    check16(16'h0000, 16'hffff);
    check16(16'h0001, 16'hffff);
    check16(16'hffff, 16'hffff);
    check16(16'hffff, 16'h0001);
    for (int t = 0; t < 4000; t++) check16(16'($urandom), 16'($urandom));
    checks += 2;
    if (dut8.NS != 3) begin
      failures++;
      $display("FAIL 8x8 tree has %0d stages", dut8.NS);
    end
    if (dut16.NS != 4) begin
      failures++;
      $display("FAIL 16x16 tree has %0d stages", dut16.NS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
