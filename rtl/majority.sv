// majority: N-input majority, the mode-1 function of the Majority/Parity
// benchmark. y = 1 when more than N/2 inputs are 1 (N is odd in all the
// benchmark sizes). Combinational.
module majority #(
  parameter int N = 3
) (
  input  logic [N-1:0] x,
  output logic         y
);

  always_comb begin
    int ones;
    ones = 0;
    for (int i = 0; i < N; i++) ones += int'(x[i]);
    y = (2 * ones > N);
  end

endmodule
