// tb_poly_pkg: checks the benchmark functions and the terminal codes of the
// package. The 3-bit Majority/Parity must give the terminal codes 8, 6, 6, 11
// for i2 i1 = 00, 01, 10, 11; the functions are compared with products,
// sorted vectors, majority and parity computed here. halves_equal is checked
// on every node of the eight 4x4/8b Multiplier/Sorter diagrams against codes
// worked out here; some of those nodes must be redundant and some not.
module tb_poly_pkg;
  import poly_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    begin
      int n_red, n_kept;
      n_red = 0;
      n_kept = 0;
      for (int k = 0; k < 8; k++) begin
        logic [3:0] code [128];
        for (int j = 0; j < 128; j++) begin
          int v0, v1;
          logic [7:0] p0, p1, s0, s1;
          v0 = 2 * j;
          v1 = 2 * j + 1;
          p0 = 8'((v0 % 16) * (v0 / 16));
          p1 = 8'((v1 % 16) * (v1 / 16));
          s0 = ~(8'hff >> $countones(8'(v0)));
          s1 = ~(8'hff >> $countones(8'(v1)));
          code[j] = {s1[k], s0[k], p1[k], p0[k]};
        end
        for (int span = 1; span < 128; span *= 2) begin
          for (int first = 0; first < 128; first += 2 * span) begin
            logic same;
            same = 1'b1;
            for (int j = 0; j < span; j++)
              if (code[first + j] != code[first + span + j]) same = 1'b0;
            if (same) n_red++;
            else n_kept++;
            check(halves_equal(BENCH_MULT_SORT, 8, 4, k, first, span) == same,
                  $sformatf("halves_equal out %0d first %0d span %0d", k, first, span));
          end
        end
      end
      $display("Multiplier/Sorter 4x4/8b: %0d redundant nodes, %0d kept", n_red, n_kept);
      check(n_red > 0 && n_kept > 0, "both redundant and kept nodes occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp_codes [4] = '{4'd8, 4'd6, 4'd6, 4'd11};
    #1;
    for (int j = 0; j < 4; j++)
      check(terminal_code(BENCH_MAJ_PAR, 3, 0, 15'(j), 0) == exp_codes[j],
            $sformatf("maj/par terminal %0d", j));
    for (int v = 0; v < 256; v++) begin
      logic [MAX_N-1:0] x;
      logic [7:0] prod, srt;
      x = MAX_N'(v);
      prod = 8'((v % 16) * (v / 16));
      srt = ~(8'hff >> $countones(v[7:0]));
      for (int k = 0; k < 8; k++) begin
        check(bench_out(BENCH_MULT_SORT, 8, 4, x, MODE1, k) == prod[k],
              $sformatf("product bit %0d of %0d", k, v));
        check(bench_out(BENCH_MULT_SORT, 8, 4, x, MODE2, k) == srt[k],
              $sformatf("sorted bit %0d of %0d", k, v));
      end
      if (v < 128) begin
        check(bench_out(BENCH_MAJ_PAR, 7, 0, x, MODE1, 0) == ($countones(v[6:0]) > 3),
              $sformatf("majority of %0d", v));
        check(bench_out(BENCH_MAJ_PAR, 7, 0, x, MODE2, 0) == ^v[6:0],
              $sformatf("parity of %0d", v));
      end
    end
    begin
      int n_red, n_kept;
      n_red = 0;
      n_kept = 0;
      for (int k = 0; k < 8; k++) begin
        logic [3:0] code [128];
        for (int j = 0; j < 128; j++) begin
          int v0, v1;
          logic [7:0] p0, p1, s0, s1;
          v0 = 2 * j;
          v1 = 2 * j + 1;
          p0 = 8'((v0 % 16) * (v0 / 16));
          p1 = 8'((v1 % 16) * (v1 / 16));
          s0 = ~(8'hff >> $countones(8'(v0)));
          s1 = ~(8'hff >> $countones(8'(v1)));
          code[j] = {s1[k], s0[k], p1[k], p0[k]};
        end
        for (int span = 1; span < 128; span *= 2) begin
          for (int first = 0; first < 128; first += 2 * span) begin
            logic same;
            same = 1'b1;
            for (int j = 0; j < span; j++)
              if (code[first + j] != code[first + span + j]) same = 1'b0;
            if (same) n_red++;
            else n_kept++;
            check(halves_equal(BENCH_MULT_SORT, 8, 4, k, first, span) == same,
                  $sformatf("halves_equal out %0d first %0d span %0d", k, first, span));
          end
        end
      end
      $display("Multiplier/Sorter 4x4/8b: %0d redundant nodes, %0d kept", n_red, n_kept);
      check(n_red > 0 && n_kept > 0, "both redundant and kept nodes occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
