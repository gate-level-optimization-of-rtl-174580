// tb_maj_par_pmux: exhaustive check of the multiplexed Majority/Parity at 3
// and 9 inputs in both modes.
module tb_maj_par_pmux;
  import poly_pkg::*;

  poly_mode_e mode;
  logic [2:0] x3;
  logic [8:0] x9;
  logic       o3, o9;
  int checks = 0, failures = 0;

  maj_par_pmux               dut3 (.mode(mode), .x(x3), .o(o3));
  maj_par_pmux #(.N(9))      dut9 (.mode(mode), .x(x9), .o(o9));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int v = 0; v < 512; v++) begin
        logic e3, e9;
        mode = poly_mode_e'(m);
        x3 = 3'(v);
        x9 = 9'(v);
        #1;
        e3 = (m == 0) ? ($countones(x3) >= 2) : ^x3;
        e9 = (m == 0) ? ($countones(x9) >= 5) : ^x9;
        checks++;
        if (o9 !== e9) begin
          failures++;
          $display("FAIL 9b mode=%0d x=%b o=%b", m + 1, x9, o9);
        end
        if (v < 8) begin
          checks++;
          if (o3 !== e3) begin
            failures++;
            $display("FAIL 3b mode=%0d x=%b o=%b", m + 1, x3, o3);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
