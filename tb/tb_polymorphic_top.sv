// tb_polymorphic_top: end-to-end test of the top at its default sizes (4x4-bit
// Multiplier/8-bit Sorter, 3-bit Majority/Parity).
//
// Every input vector of both benchmarks is applied in mode 1, then the mode is
// switched and every vector is applied again in mode 2, then the mode is
// switched back for a shorter random pass. Both implementations of each
// benchmark are compared with products, sorted vectors, majority and parity
// computed here. The testbench also counts how often each mechanism of the
// design was exercised and counts a failure for any that never was:
//   - a mode switch in each direction,
//   - a pmux that had to choose between differing mode-1 and mode-2 values,
//   - each of the published terminals 0/id (8), id/neg (6) and 1/id (11),
//   - a terminal built from a pmux (codes outside 0, 15, 6, 8, 11 whose two
//     modes differ) and an ordinary terminal (both modes alike).
// Terminal codes are worked out here from the reference functions.
module tb_polymorphic_top;
  import poly_pkg::*;

  poly_mode_e mode;
  logic [7:0] ms_x, ms_mux_o, ms_bdd_o;
  logic [2:0] mp_x;
  logic       mp_mux_o, mp_bdd_o;
  int checks = 0, failures = 0;

  int n_switch_12 = 0, n_switch_21 = 0, n_pmux_choice = 0;
  int n_code [16];

  polymorphic_top dut (
    .mode(mode), .ms_x(ms_x), .ms_mux_o(ms_mux_o), .ms_bdd_o(ms_bdd_o),
    .mp_x(mp_x), .mp_mux_o(mp_mux_o), .mp_bdd_o(mp_bdd_o)
  );

  function automatic logic [7:0] ref_ms(logic [7:0] x, int m);
    if (m == 0) return 8'(int'(x[3:0]) * int'(x[7:4]));
    return ~(8'hff >> $countones(x));
  endfunction

  function automatic logic ref_mp(logic [2:0] x, int m);
    if (m == 0) return $countones(x) >= 2;
    return ^x;
  endfunction

  task automatic expect_eq(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (mode %0d ms_x=%b mp_x=%b)",
               what, got, exp, int'(mode) + 1, ms_x, mp_x);
    end
  endtask

  task automatic set_mode(int m);
    if (int'(mode) == 0 && m == 1) n_switch_12++;
    if (int'(mode) == 1 && m == 0) n_switch_21++;
    mode = poly_mode_e'(m);
  endtask

  // Code of the terminal a BDD output reaches for this input vector.
  function automatic logic [3:0] ms_code(logic [7:0] x, int k);
    logic [7:0] x0, x1;
    logic [7:0] a, b, c, d;
    x0 = {x[7:1], 1'b0};
    x1 = {x[7:1], 1'b1};
    a = ref_ms(x0, 0);
    b = ref_ms(x1, 0);
    c = ref_ms(x0, 1);
    d = ref_ms(x1, 1);
    return {d[k], c[k], b[k], a[k]};
  endfunction

  function automatic logic [3:0] mp_code(logic [2:0] x);
    logic [2:0] x0, x1;
    x0 = {x[2:1], 1'b0};
    x1 = {x[2:1], 1'b1};
    return {ref_mp(x1, 1), ref_mp(x0, 1), ref_mp(x1, 0), ref_mp(x0, 0)};
  endfunction

  task automatic apply(logic [7:0] msv, logic [2:0] mpv);
    logic [7:0] e;
    ms_x = msv;
    mp_x = mpv;
    #1;
    e = ref_ms(msv, int'(mode));
    expect_eq(ms_mux_o, e, "multiplexed Multiplier/Sorter");
    expect_eq(ms_bdd_o, e, "BDD Multiplier/Sorter");
    expect_eq(8'(mp_mux_o), 8'(ref_mp(mpv, int'(mode))), "multiplexed Majority/Parity");
    expect_eq(8'(mp_bdd_o), 8'(ref_mp(mpv, int'(mode))), "BDD Majority/Parity");
    n_pmux_choice += $countones(ref_ms(msv, 0) ^ ref_ms(msv, 1));
    for (int k = 0; k < 8; k++) n_code[ms_code(msv, k)]++;
    n_code[mp_code(mpv)]++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_pmux_term, n_ordinary_term;
    foreach (n_code[c]) n_code[c] = 0;
    mode = MODE1;
    for (int m = 0; m < 2; m++) begin
      set_mode(m);
      for (int v = 0; v < 256; v++) apply(8'(v), 3'(v));
    end
    set_mode(0);
    for (int i = 0; i < 200; i++) begin
      if (i % 50 == 25) set_mode(1 - int'(mode));
      apply(8'($urandom), 3'($urandom));
    end

    n_pmux_term = 0;
    n_ordinary_term = 0;
    for (int c = 0; c < 16; c++) begin
      logic [3:0] cc;
      cc = 4'(c);
      if (cc[1:0] == cc[3:2]) n_ordinary_term += n_code[c];
      else if (c != 6 && c != 8 && c != 11) n_pmux_term += n_code[c];
    end
    $display("mode switches 1->2: %0d, 2->1: %0d", n_switch_12, n_switch_21);
    $display("pmux choices between differing values: %0d", n_pmux_choice);
    $display("terminals reached: 0/id %0d, id/neg %0d, 1/id %0d, pmux-built %0d, ordinary %0d",
             n_code[8], n_code[6], n_code[11], n_pmux_term, n_ordinary_term);
    foreach (n_code[c]) if (n_code[c] != 0) $display("  code %0d reached %0d times", c, n_code[c]);
    checks++; if (n_switch_12 == 0) begin failures++; $display("FAIL no switch to mode 2"); end
    checks++; if (n_switch_21 == 0) begin failures++; $display("FAIL no switch to mode 1"); end
    checks++; if (n_pmux_choice == 0) begin failures++; $display("FAIL pmux never chose"); end
    checks++; if (n_code[8] == 0) begin failures++; $display("FAIL terminal 0/id unused"); end
    checks++; if (n_code[6] == 0) begin failures++; $display("FAIL terminal id/neg unused"); end
    checks++; if (n_code[11] == 0) begin failures++; $display("FAIL terminal 1/id unused"); end
    checks++; if (n_pmux_term == 0) begin failures++; $display("FAIL no pmux-built terminal"); end
    checks++; if (n_ordinary_term == 0) begin failures++; $display("FAIL no ordinary terminal"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
