// tb_bdd_poly: exhaustive check of polymorphic BDD outputs in both modes:
// the 3-bit and 7-bit Majority/Parity and all five outputs of the 3x2-bit
// Multiplier/5-bit Sorter, against references computed here.
module tb_bdd_poly;
  import poly_pkg::*;

  poly_mode_e mode;
  logic [2:0] x3;
  logic [6:0] x7;
  logic [4:0] x5;
  logic       y3, y7;
  logic [4:0] y5;
  int checks = 0, failures = 0;

  bdd_poly dut3 (.mode(mode), .x(x3), .y(y3));
  bdd_poly #(.BENCH(BENCH_MAJ_PAR), .N(7)) dut7 (.mode(mode), .x(x7), .y(y7));
  for (genvar k = 0; k < 5; k++) begin : g_ms
    bdd_poly #(.BENCH(BENCH_MULT_SORT), .N(5), .AW(3), .OUT(k))
      dut5 (.mode(mode), .x(x5), .y(y5[k]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int v = 0; v < 128; v++) begin
        logic e3, e7;
        logic [4:0] e5;
        mode = poly_mode_e'(m);
        x3 = 3'(v);
        x7 = 7'(v);
        x5 = 5'(v);
        #1;
        if (m == 0) begin
          e3 = $countones(x3) >= 2;
          e7 = $countones(x7) >= 4;
          e5 = 5'(int'(x5[2:0]) * int'(x5[4:3]));
        end else begin
          e3 = ^x3;
          e7 = ^x7;
          e5 = ~(5'h1f >> $countones(x5));
        end
        checks++;
        if (y7 !== e7) begin
          failures++;
          $display("FAIL 7b mode=%0d x=%b y=%b", m + 1, x7, y7);
        end
        if (v < 8) begin
          checks++;
          if (y3 !== e3) begin
            failures++;
            $display("FAIL 3b mode=%0d x=%b y=%b", m + 1, x3, y3);
          end
        end
        if (v < 32) begin
          checks++;
          if (y5 !== e5) begin
            failures++;
            $display("FAIL 3x2/5b mode=%0d x=%b y=%b expected %b", m + 1, x5, y5, e5);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
