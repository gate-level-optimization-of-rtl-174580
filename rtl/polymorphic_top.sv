// polymorphic_top: the two benchmark polymorphic circuits, each built by the
// two construction methods, side by side.
//
// All four circuits share the mode input, which stands for the environment
// (the supply voltage of the NAND/NOR gates); everything else is
// combinational and independent:
//   ms_mux_o  Multiplier/Sorter by polymorphic multiplexing (mult_sorter_pmux)
//   ms_bdd_o  Multiplier/Sorter as polymorphic BDDs (mult_sorter_bdd)
//   mp_mux_o  Majority/Parity by polymorphic multiplexing (maj_par_pmux)
//   mp_bdd_o  Majority/Parity as a polymorphic BDD (bdd_poly)
// Mode 1: ms = A * B with A = ms_x[MS_AW-1:0], mp = majority of mp_x.
// Mode 2: ms = ms_x with its bits sorted (ones at the top), mp = parity.
// Defaults: the 4x4-bit Multiplier/8-bit Sorter and the 3-bit
// Majority/Parity, whose BDD is three multiplexers over the terminals 0/id,
// id/neg and 1/id.
module polymorphic_top
  import poly_pkg::*;
#(
  parameter int MS_AW = 4,
  parameter int MS_BW = 4,
  parameter int MP_N  = 3
) (
  input  poly_mode_e               mode,
  input  logic [MS_AW+MS_BW-1:0]   ms_x,
  output logic [MS_AW+MS_BW-1:0]   ms_mux_o,
  output logic [MS_AW+MS_BW-1:0]   ms_bdd_o,
  input  logic [MP_N-1:0]          mp_x,
  output logic                     mp_mux_o,
  output logic                     mp_bdd_o
);

  mult_sorter_pmux #(.AW(MS_AW), .BW(MS_BW)) u_ms_mux (
    .mode(mode), .x(ms_x), .o(ms_mux_o)
  );

  mult_sorter_bdd #(.AW(MS_AW), .BW(MS_BW)) u_ms_bdd (
    .mode(mode), .x(ms_x), .o(ms_bdd_o)
  );

  maj_par_pmux #(.N(MP_N)) u_mp_mux (
    .mode(mode), .x(mp_x), .o(mp_mux_o)
  );

  bdd_poly #(.BENCH(BENCH_MAJ_PAR), .N(MP_N), .AW(0), .OUT(0)) u_mp_bdd (
    .mode(mode), .x(mp_x), .y(mp_bdd_o)
  );

endmodule
