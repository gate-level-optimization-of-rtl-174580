// bdd_poly: one output of a polymorphic circuit built as a binary decision
// diagram (BDD).
//
// The two truth tables of the output (mode 1 and mode 2) are merged into one
// diagram whose inner nodes are ordinary 2-input multiplexers and whose leaves
// are polymorphic terminals. The tree is complete with N-1 levels: the root
// tests input x[N-1], the level above the leaves tests x[1], and each leaf,
// fixed by x[N-1:1], is a bdd_terminal that handles x[0] and the mode. The
// code of each leaf is worked out at elaboration from the benchmark function
// (poly_pkg::terminal_code).
//
// The diagram is reduced in two of the three classical ways. Identical
// terminals are shared: there is at most one bdd_terminal per code, and every
// leaf with that code is a wire to it. Redundant nodes, whose two branches
// cover identical leaf codes, are replaced by a wire to one branch (found at
// elaboration by poly_pkg::halves_equal). Identical sub-diagrams at the same
// level are left to synthesis, which merges multiplexers with equal inputs;
// the function is the same either way.
//
// Node numbering is a heap: node 1 is the root, node i has else-child 2i and
// then-child 2i+1, and node LEAVES+j is leaf j. Parameters: BENCH and N choose
// the benchmark and its input count, AW the width of the multiplier's operand
// A (Multiplier/Sorter only), OUT the output bit. Combinational, depth N-1
// multiplexers plus one terminal.
module bdd_poly
  import poly_pkg::*;
#(
  parameter bench_e BENCH = BENCH_MAJ_PAR,
  parameter int     N     = 3,
  parameter int     AW    = 0,
  parameter int     OUT   = 0
) (
  input  poly_mode_e     mode,
  input  logic [N-1:0]   x,
  output logic           y
);

  localparam int LEAVES = 2 ** (N - 1);

  // The constant functions work on vectors of MAX_N bits; N >= 2 gives a tree.
  if (N < 2 || N > MAX_N) begin : g_bad_n
    $error("bdd_poly: N must lie between 2 and %0d", MAX_N);
  end

  // One shared terminal per code; codes no leaf uses are left for synthesis
  // to remove.
  logic [15:0] term;
  for (genvar c = 0; c < 16; c++) begin : g_term
    bdd_terminal #(.CODE(4'(c))) u_term (.mode(mode), .i0(x[0]), .y(term[c]));
  end

  logic node [1:2*LEAVES-1];

  for (genvar j = 0; j < LEAVES; j++) begin : g_leaf
    localparam logic [3:0] LCODE = terminal_code(BENCH, N, AW, (MAX_N-1)'(j), OUT);
    assign node[LEAVES+j] = term[LCODE];
  end

  for (genvar i = 1; i < LEAVES; i++) begin : g_node
    // depth 0 is the root; depth d tests input x[N-1-d]
    localparam int DEPTH = $clog2(i + 1) - 1;
    // leaves below this node: [FIRST, FIRST + 2*HALF)
    localparam int HALF  = LEAVES >> (DEPTH + 1);
    localparam int FIRST = (i - (1 << DEPTH)) * 2 * HALF;
    if (halves_equal(BENCH, N, AW, OUT, FIRST, HALF)) begin : g_redundant
      // both branches compute the same function: the test is dropped
      assign node[i] = node[2*i];
    end else begin : g_mux
      mux2 u_mux (
        .sel(x[N-1-DEPTH]),
        .d0 (node[2*i]),
        .d1 (node[2*i+1]),
        .y  (node[i])
      );
    end
  end

  assign y = node[1];

endmodule
