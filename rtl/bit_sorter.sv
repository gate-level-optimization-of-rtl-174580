// bit_sorter: sorts N single bits, the mode-2 function of the Multiplier/Sorter
// benchmark. Built as an odd-even transposition sorting network: N stages of
// compare-exchange elements, each of which is an AND gate (smaller value) and
// an OR gate (larger value). Output y has all ones at its most significant
// end, so y[k] = 1 exactly when at least N-k inputs are 1. The network type and
// the output order are this design's choices; only "sorter" is prescribed.
// Combinational, depth N compare-exchange stages.
module bit_sorter #(
  parameter int N = 8
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] y
);

  logic [N-1:0] stage [N+1];

  assign stage[0] = x;

  for (genvar s = 0; s < N; s++) begin : g_stage
    for (genvar k = 0; k < N; k++) begin : g_bit
      if ((k % 2) == (s % 2) && k + 1 < N) begin : g_lo
        assign stage[s+1][k] = stage[s][k] & stage[s][k+1];
      end else if ((k % 2) != (s % 2) && k >= 1) begin : g_hi
        assign stage[s+1][k] = stage[s][k] | stage[s][k-1];
      end else begin : g_pass
        assign stage[s+1][k] = stage[s][k];
      end
    end
  end

  assign y = stage[N];

endmodule
