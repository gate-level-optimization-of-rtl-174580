// mult_sorter_bdd: polymorphic Multiplier/Sorter built as binary decision
// diagrams, one bdd_poly per output bit. Each diagram is a multiplexer tree
// over inputs x[N-1:1] whose leaves are polymorphic terminals of x[0], so the
// mode reaches the circuit only through the terminals, near the inputs.
// Inputs: x[AW-1:0] is operand A, x[AW+BW-1:AW] operand B (own choice).
// Mode 1: o = A * B; mode 2: o = the input bits sorted, ones at the top.
// Combinational.
module mult_sorter_bdd
  import poly_pkg::*;
#(
  parameter int AW = 4,
  parameter int BW = 4
) (
  input  poly_mode_e         mode,
  input  logic [AW+BW-1:0]   x,
  output logic [AW+BW-1:0]   o
);

  localparam int N = AW + BW;

  for (genvar k = 0; k < N; k++) begin : g_out
    bdd_poly #(
      .BENCH(BENCH_MULT_SORT),
      .N    (N),
      .AW   (AW),
      .OUT  (k)
    ) u_bdd (
      .mode(mode),
      .x   (x),
      .y   (o[k])
    );
  end

endmodule
