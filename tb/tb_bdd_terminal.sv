// tb_bdd_terminal: instantiates all sixteen terminals and checks each, for
// i0 = 0 and 1 in both modes, against the bit of its code that the
// conversion matrix assigns: s10/s11 in mode 1, s20/s21 in mode 2.
module tb_bdd_terminal;
  import poly_pkg::*;

  poly_mode_e  mode;
  logic        i0;
  logic [15:0] y;
  int checks = 0, failures = 0;

  for (genvar c = 0; c < 16; c++) begin : g_dut
    bdd_terminal #(.CODE(4'(c))) dut (.mode(mode), .i0(i0), .y(y[c]));
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int v = 0; v < 2; v++) begin
        mode = poly_mode_e'(m);
        i0 = 1'(v);
        #1;
        for (int c = 0; c < 16; c++) begin
          logic [3:0] code;
          code = 4'(c);
          checks++;
          if (y[c] !== code[2*m + v]) begin
            failures++;
            $display("FAIL code=%0d mode=%0d i0=%0d y=%b", c, m + 1, v, y[c]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
