// tb_workloads: the benchmark sizes evaluated for both polymorphic circuits,
// each checked exhaustively in both modes on the top:
//   Multiplier/Sorter 2x2/4b, 3x2/5b, 3x3/6b, 4x3/7b (4x4/8b is the top's default and
//   is covered by tb_polymorphic_top), Majority/Parity 7b, 9b, 11b, 13b.
// One top instance per size pairs a Multiplier/Sorter with a Majority/Parity.
module tb_workloads;
  import poly_pkg::*;

  poly_mode_e mode;
  int checks = 0, failures = 0;

  logic [3:0]  ms4_x, ms4_m, ms4_b;
  logic [2:0]  mp3_x;
  logic        mp3_m, mp3_b;
  logic [4:0]  ms5_x, ms5_m, ms5_b;
  logic [5:0]  ms6_x, ms6_m, ms6_b;
  logic [6:0]  ms7_x, ms7_m, ms7_b;
  logic [7:0]  ms8_x, ms8_m, ms8_b;
  logic [6:0]  mp7_x;
  logic [8:0]  mp9_x;
  logic [10:0] mp11_x;
  logic [12:0] mp13_x;
  logic [3:0]  mp_m, mp_b;

  polymorphic_top #(.MS_AW(2), .MS_BW(2), .MP_N(3)) u_w4 (
    .mode(mode), .ms_x(ms4_x), .ms_mux_o(ms4_m), .ms_bdd_o(ms4_b),
    .mp_x(mp3_x), .mp_mux_o(mp3_m), .mp_bdd_o(mp3_b));
  polymorphic_top #(.MS_AW(3), .MS_BW(2), .MP_N(7)) u_w0 (
    .mode(mode), .ms_x(ms5_x), .ms_mux_o(ms5_m), .ms_bdd_o(ms5_b),
    .mp_x(mp7_x), .mp_mux_o(mp_m[0]), .mp_bdd_o(mp_b[0]));
  polymorphic_top #(.MS_AW(3), .MS_BW(3), .MP_N(9)) u_w1 (
    .mode(mode), .ms_x(ms6_x), .ms_mux_o(ms6_m), .ms_bdd_o(ms6_b),
    .mp_x(mp9_x), .mp_mux_o(mp_m[1]), .mp_bdd_o(mp_b[1]));
  polymorphic_top #(.MS_AW(4), .MS_BW(3), .MP_N(11)) u_w2 (
    .mode(mode), .ms_x(ms7_x), .ms_mux_o(ms7_m), .ms_bdd_o(ms7_b),
    .mp_x(mp11_x), .mp_mux_o(mp_m[2]), .mp_bdd_o(mp_b[2]));
  polymorphic_top #(.MS_AW(4), .MS_BW(4), .MP_N(13)) u_w3 (
    .mode(mode), .ms_x(ms8_x), .ms_mux_o(ms8_m), .ms_bdd_o(ms8_b),
    .mp_x(mp13_x), .mp_mux_o(mp_m[3]), .mp_bdd_o(mp_b[3]));

  // Reference Multiplier/Sorter output for an n-input vector, A in aw bits.
  function automatic logic [7:0] ref_ms(int v, int aw, int n, int m);
    int a, b, ones;
    a = v % (1 << aw);
    b = v >> aw;
    ones = $countones(v);
    if (m == 0) return 8'(a * b);
    return 8'(((1 << ones) - 1) << (n - ones));
  endfunction

  task automatic cmp(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s mode=%0d got %b expected %b", what, int'(mode) + 1, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sizes [4] = '{7, 9, 11, 13};
    for (int m = 0; m < 2; m++) begin
      mode = poly_mode_e'(m);
      for (int v = 0; v < (1 << 13); v++) begin
        ms4_x = 4'(v);
        mp3_x = 3'(v);
        ms5_x = 5'(v);
        ms6_x = 6'(v);
        ms7_x = 7'(v);
        ms8_x = 8'(v);
        mp7_x = 7'(v);
        mp9_x = 9'(v);
        mp11_x = 11'(v);
        mp13_x = 13'(v);
        #1;
        if (v < 16) begin
          cmp(8'(ms4_m), ref_ms(v, 2, 4, m), "2x2/4b multiplexed");
          cmp(8'(ms4_b), ref_ms(v, 2, 4, m), "2x2/4b BDD");
        end
        if (v < 8) begin
          cmp(8'(mp3_m), 8'((m == 0) ? ($countones(v) >= 2) : ($countones(v) % 2 == 1)),
              "Majority/Parity 3b multiplexed");
          cmp(8'(mp3_b), 8'((m == 0) ? ($countones(v) >= 2) : ($countones(v) % 2 == 1)),
              "Majority/Parity 3b BDD");
        end
        if (v < 32) begin
          cmp(8'(ms5_m), ref_ms(v, 3, 5, m), "3x2/5b multiplexed");
          cmp(8'(ms5_b), ref_ms(v, 3, 5, m), "3x2/5b BDD");
        end
        if (v < 64) begin
          cmp(8'(ms6_m), ref_ms(v, 3, 6, m), "3x3/6b multiplexed");
          cmp(8'(ms6_b), ref_ms(v, 3, 6, m), "3x3/6b BDD");
        end
        if (v < 128) begin
          cmp(8'(ms7_m), ref_ms(v, 4, 7, m), "4x3/7b multiplexed");
          cmp(8'(ms7_b), ref_ms(v, 4, 7, m), "4x3/7b BDD");
        end
        for (int s = 0; s < 4; s++) begin
          int w, x, ones;
          logic e;
          w = sizes[s];
          if (v < (1 << w)) begin
            x = v;
            ones = $countones(x);
            e = (m == 0) ? (2 * ones > w) : ones[0];
            cmp(8'(mp_m[s]), 8'(e), $sformatf("Majority/Parity %0db multiplexed", w));
            cmp(8'(mp_b[s]), 8'(e), $sformatf("Majority/Parity %0db BDD", w));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
