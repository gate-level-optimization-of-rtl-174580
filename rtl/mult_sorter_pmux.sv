// mult_sorter_pmux: polymorphic Multiplier/Sorter built by polymorphic
// multiplexing.
//
// The mode-1 function (AW x BW-bit multiplier) and the mode-2 function
// (AW+BW-bit sorter) are implemented separately, side by side, and each output
// bit passes through a pmux that selects the multiplier's bit in mode 1 and
// the sorter's bit in mode 2. This is the straightforward starting point for
// a polymorphic circuit; it costs the two circuits plus five gates per output.
// Inputs: x[AW-1:0] is operand A, x[AW+BW-1:AW] operand B (own choice).
// Combinational.
module mult_sorter_pmux
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

  logic [N-1:0] product, sorted;

  multiplier #(.AW(AW), .BW(BW)) u_mult (
    .a(x[AW-1:0]),
    .b(x[N-1:AW]),
    .p(product)
  );

  bit_sorter #(.N(N)) u_sort (
    .x(x),
    .y(sorted)
  );

  for (genvar k = 0; k < N; k++) begin : g_out
    pmux u_pmux (.mode(mode), .a(product[k]), .b(sorted[k]), .y(o[k]));
  end

endmodule
