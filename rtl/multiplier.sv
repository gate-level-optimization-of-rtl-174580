// multiplier: unsigned AW x BW-bit combinational multiplier, the mode-1
// function of the Multiplier/Sorter benchmark. The full AW+BW-bit product is
// returned, so the number of outputs equals the number of inputs, as the
// benchmark requires. Only the function is prescribed; the structure is left
// to synthesis here.
module multiplier #(
  parameter int AW = 4,
  parameter int BW = 4
) (
  input  logic [AW-1:0]    a,
  input  logic [BW-1:0]    b,
  output logic [AW+BW-1:0] p
);

  assign p = (AW + BW)'(a) * (AW + BW)'(b);

endmodule
