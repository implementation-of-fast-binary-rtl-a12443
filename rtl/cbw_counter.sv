// cbw_counter -- one column counter of the counter-based Wallace tree.
//
// Counts the ones in K equally weighted bits (K = 2..7) and returns the count
// in binary, count = {C2, C1, S}; C2 is always 0 for K <= 3. The cell used
// depends on K:
//   K = 7      counter73 (symmetric-stacking 7:3 counter)
//   K = 6      counter63 (symmetric-stacking 6:3 counter)
//   K = 5, 4   counter63 with the spare inputs tied to 0 (5:3 and 4:3 counters)
//   K = 3      counter32 (stack-based full adder)
//   K = 2      half adder
// The Wallace tree names 5:3 and 4:3 counters without giving their circuits;
// reusing the 6:3 stacking counter for them is this design's choice.
//
// Interface: x[K-1:0] in, count[2:0] out. Combinational.
module cbw_counter #(
  parameter int unsigned K = 7
) (
  input  logic [K-1:0] x,
  output logic [2:0]   count
);
  if (K == 7) begin : g_k7
    counter73 u_c73 (.x(x), .count(count));
  end else if (K >= 4 && K <= 6) begin : g_k456
    logic [5:0] x6;
    assign x6 = 6'(x);
    counter63 u_c63 (.x(x6), .count(count));
  end else if (K == 3) begin : g_k3
    logic [1:0] c32;
    counter32 u_c32 (.x(x), .count(c32));
    assign count = {1'b0, c32};
  end else if (K == 2) begin : g_k2
    assign count = {1'b0, x[0] & x[1], x[0] ^ x[1]};
  end else begin : g_bad
    $error("cbw_counter: K must be between 2 and 7");
  end
endmodule
