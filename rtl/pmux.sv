// pmux: polymorphic multiplexer, y = a in mode 1 and y = b in mode 2.
//
// Five gates, two of them NAND/NOR: the upper branch inverts a and feeds it
// with a constant 1 to a NAND/NOR gate, which gives a in mode 1 (NAND) and 0 in
// mode 2 (NOR). The lower branch feeds b with a constant 0 to a NAND/NOR gate
// and inverts the result, giving 0 in mode 1 and b in mode 2. An OR gate merges
// the two branches, one of which is always 0. The structure follows the
// published gate-level pmux; the merging gate is taken as OR, the gate that
// makes the two branches give this function. Combinational.
module pmux
  import poly_pkg::*;
(
  input  poly_mode_e mode,
  input  logic       a,
  input  logic       b,
  output logic       y
);

  logic a_n, upper, lower_n, lower;

  assign a_n = ~a;

  nand_nor_gate u_upper (.mode(mode), .a(a_n), .b(1'b1), .y(upper));
  nand_nor_gate u_lower (.mode(mode), .a(b),   .b(1'b0), .y(lower_n));

  assign lower = ~lower_n;
  assign y     = upper | lower;

endmodule
