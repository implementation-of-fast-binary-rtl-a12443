// tb_vedic_combine -- self-checking test of the Vedic level adder at the
// default N = 128. Random operand halves are multiplied here with "*" and the
// four sub-products fed in; the output must equal the full product. Random,
// unrelated sub-products and all-ones sub-products are also applied and
// compared with (p_hh*2^N + (p_lh + p_hl)*2^(N/2) + p_ll) mod 2^(2N).
// Watchdog: 20000 clock cycles.
module tb_vedic_combine;
  localparam int N = 128;
  localparam int M = N / 2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [N-1:0]   p_ll, p_lh, p_hl, p_hh;
  logic [2*N-1:0] p;

  always #5 clk = ~clk;

  vedic_combine #(.N(N)) dut (.p_ll(p_ll), .p_lh(p_lh), .p_hl(p_hl), .p_hh(p_hh), .p(p));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] rand_half();
    logic [M-1:0] r;
    for (int w = 0; w < M; w += 32) r[w +: 32] = $urandom;
    return r;
  endfunction

  function automatic logic [N-1:0] rand_full();
    return {rand_half(), rand_half()};
  endfunction

  task automatic apply_and_check();
    logic [2*N-1:0] e;
    #1;
    e = {p_hh, p_ll} + ((2*N)'(p_lh) << M) + ((2*N)'(p_hl) << M);
    checks++;
    if (p !== e) begin
      failures++;
      $display("FAIL p=%h expected %h", p, e);
    end
    @(posedge clk);
  endtask

  initial begin
    for (int t = 0; t < 1000; t++) begin
      logic [M-1:0] al, ah, bl, bh;
      logic [2*N-1:0] full;
      al = rand_half(); ah = rand_half(); bl = rand_half(); bh = rand_half();
      p_ll = N'(al) * N'(bl);
      p_lh = N'(al) * N'(bh);
      p_hl = N'(ah) * N'(bl);
      p_hh = N'(ah) * N'(bh);
      full = (2*N)'({ah, al}) * (2*N)'({bh, bl});
      #1;
      checks++;
      if (p !== full) begin
        failures++;
        $display("FAIL product %h expected %h", p, full);
      end
      apply_and_check();
    end
    for (int t = 0; t < 1000; t++) begin
      p_ll = rand_full(); p_lh = rand_full(); p_hl = rand_full(); p_hh = rand_full();
      apply_and_check();
    end
    p_ll = '1; p_lh = '1; p_hl = '1; p_hh = '1;
    apply_and_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
