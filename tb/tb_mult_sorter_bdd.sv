// tb_mult_sorter_bdd: exhaustive check of the BDD-built 4x4-bit
// Multiplier/8-bit Sorter in both modes, and of the 3x2-bit/5-bit instance.
module tb_mult_sorter_bdd;
  import poly_pkg::*;

  poly_mode_e mode;
  logic [7:0] x8, o8;
  logic [4:0] x5, o5;
  int checks = 0, failures = 0;

  mult_sorter_bdd                     dut8 (.mode(mode), .x(x8), .o(o8));
  mult_sorter_bdd #(.AW(3), .BW(2))   dut5 (.mode(mode), .x(x5), .o(o5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int v = 0; v < 256; v++) begin
        logic [7:0] e8;
        logic [4:0] e5;
        mode = poly_mode_e'(m);
        x8 = 8'(v);
        x5 = 5'(v);
        #1;
        if (m == 0) begin
          e8 = 8'(int'(x8[3:0]) * int'(x8[7:4]));
          e5 = 5'(int'(x5[2:0]) * int'(x5[4:3]));
        end else begin
          e8 = ~(8'hff >> $countones(x8));
          e5 = ~(5'h1f >> $countones(x5));
        end
        checks++;
        if (o8 !== e8) begin
          failures++;
          $display("FAIL 4x4 mode=%0d x=%b o=%b expected %b", m + 1, x8, o8, e8);
        end
        if (v < 32) begin
          checks++;
          if (o5 !== e5) begin
            failures++;
            $display("FAIL 3x2 mode=%0d x=%b o=%b expected %b", m + 1, x5, o5, e5);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
