// maj_par_pmux: polymorphic Majority/Parity built by polymorphic multiplexing.
// An N-input majority circuit (mode 1) and an N-input parity circuit (mode 2)
// feed one pmux, which passes the majority in mode 1 and the parity in mode 2.
// Combinational.
module maj_par_pmux
  import poly_pkg::*;
#(
  parameter int N = 3
) (
  input  poly_mode_e   mode,
  input  logic [N-1:0] x,
  output logic         o
);

  logic maj, par;

  majority #(.N(N)) u_maj (.x(x), .y(maj));
  parity   #(.N(N)) u_par (.x(x), .y(par));
  pmux              u_pmux (.mode(mode), .a(maj), .b(par), .y(o));

endmodule
