// nand_nor_gate: the polymorphic NAND/NOR gate.
//
// The physical gate is a transistor circuit whose function follows its supply
// voltage: NAND at one level, NOR at the other. Here that level is the input
// `mode`: mode 1 gives y = NAND(a, b), mode 2 gives y = NOR(a, b). It is the
// only polymorphic gate the circuits of this design use. Purely combinational,
// no timing beyond the gate delay. Which mode is NAND follows the gate
// notation X1/X2 (function X1 in mode 1); carrying the mode as a logic input
// is this model's choice.
module nand_nor_gate
  import poly_pkg::*;
(
  input  poly_mode_e mode,
  input  logic       a,
  input  logic       b,
  output logic       y
);

  always_comb begin
    if (mode == MODE1) y = ~(a & b);
    else               y = ~(a | b);
  end

endmodule
