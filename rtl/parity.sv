// parity: N-input parity (XOR of all inputs), the mode-2 function of the
// Majority/Parity benchmark. Combinational.
module parity #(
  parameter int N = 3
) (
  input  logic [N-1:0] x,
  output logic         y
);

  assign y = ^x;

endmodule
