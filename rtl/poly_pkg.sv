// poly_pkg: types and constant functions shared by the polymorphic circuits.
//
// A polymorphic circuit computes one logic function in mode 1 and another in
// mode 2; the mode is set by the environment (for the NAND/NOR gate, by its
// supply voltage), not by a logic input. Here the mode is carried as the
// one-bit type poly_mode_e so that it can be simulated.
//
// The functions below define the two benchmarks: Multiplier/Sorter (an
// AW x (N-AW)-bit unsigned product in mode 1, the N input bits sorted in
// mode 2) and Majority/Parity (majority of N bits in mode 1, their parity in
// mode 2). They are only evaluated at elaboration, to fill the terminals of a
// polymorphic binary decision diagram (terminal_code) and to find its
// redundant nodes (halves_equal). The terminal code is
// s = 8*s21 + 4*s20 + 2*s11 + s10, where s1x is the mode-1 value and s2x the
// mode-2 value of the output for i0 = x, the other inputs being fixed.
// Own choices: operand A sits in the low AW input bits; the sorter puts its
// ones at the most significant end of the output.
package poly_pkg;

  typedef enum logic {
    MODE1 = 1'b0,
    MODE2 = 1'b1
  } poly_mode_e;

  typedef enum int {
    BENCH_MULT_SORT = 0,
    BENCH_MAJ_PAR   = 1
  } bench_e;

  // Widest input vector the constant functions handle.
  localparam int MAX_N = 16;

  function automatic int count_ones(logic [MAX_N-1:0] x, int n);
    int c = 0;
    for (int i = 0; i < n; i++) c += int'(x[i]);
    return c;
  endfunction

  // Output bit `out` of benchmark `bench` for input vector x in mode `m`.
  function automatic logic bench_out(bench_e bench, int n, int aw,
                                     logic [MAX_N-1:0] x, poly_mode_e m, int out);
    logic [2*MAX_N-1:0] a, b, p;
    int ones;
    ones = count_ones(x, n);
    if (bench == BENCH_MULT_SORT) begin
      if (m == MODE1) begin
        a = '0;
        b = '0;
        for (int i = 0; i < aw; i++) a[i] = x[i];
        for (int i = aw; i < n; i++) b[i-aw] = x[i];
        p = a * b;
        return p[out];
      end
      // sorted: output bit k is 1 when at least n-k inputs are 1
      return ones >= n - out;
    end
    if (m == MODE1) return 2 * ones > n;
    return ones[0];
  endfunction

  // 4-bit terminal code of BDD leaf `leaf` (the value of inputs n-1..1).
  function automatic logic [3:0] terminal_code(bench_e bench, int n, int aw,
                                               logic [MAX_N-2:0] leaf, int out);
    logic [MAX_N-1:0] x0, x1;
    x0 = {leaf, 1'b0};
    x1 = x0 | MAX_N'(1);
    return {bench_out(bench, n, aw, x1, MODE2, out),
            bench_out(bench, n, aw, x0, MODE2, out),
            bench_out(bench, n, aw, x1, MODE1, out),
            bench_out(bench, n, aw, x0, MODE1, out)};
  endfunction

  // 1 when the two halves of the leaf range [first, first + 2*span) carry the
  // same terminal codes, i.e. the BDD node over that range is redundant.
  function automatic logic halves_equal(bench_e bench, int n, int aw, int out,
                                        int first, int span);
    for (int j = 0; j < span; j++) begin
      if (terminal_code(bench, n, aw, (MAX_N-1)'(first + j), out) !=
          terminal_code(bench, n, aw, (MAX_N-1)'(first + span + j), out))
        return 1'b0;
    end
    return 1'b1;
  endfunction

endpackage
