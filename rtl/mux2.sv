// mux2: ordinary 2-input multiplexer, one node of a polymorphic binary
// decision diagram. The node tests one circuit input: y = d1 when sel is 1
// (then-branch), y = d0 when sel is 0 (else-branch). Combinational.
module mux2 (
  input  logic sel,
  input  logic d0,
  input  logic d1,
  output logic y
);

  assign y = sel ? d1 : d0;

endmodule
