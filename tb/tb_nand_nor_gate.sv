// tb_nand_nor_gate: exhaustive check of the polymorphic NAND/NOR gate: all
// four input pairs in both modes, against NAND (mode 1) and NOR (mode 2).
module tb_nand_nor_gate;
  import poly_pkg::*;

  poly_mode_e mode;
  logic a, b, y;
  int checks = 0, failures = 0;

  nand_nor_gate dut (.mode(mode), .a(a), .b(b), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int v = 0; v < 4; v++) begin
        logic exp;
        mode = poly_mode_e'(m);
        {a, b} = 2'(v);
        #1;
        // mode 1: 0 only when both are 1; mode 2: 1 only when both are 0
        exp = (m == 0) ? !(v == 3) : (v == 0);
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL mode=%0d a=%b b=%b y=%b expected %b", m + 1, a, b, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
