// tb_pmux: exhaustive check of the polymorphic multiplexer: y must equal a in
// mode 1 and b in mode 2 for all data values.
module tb_pmux;
  import poly_pkg::*;

  poly_mode_e mode;
  logic a, b, y;
  int checks = 0, failures = 0;

  pmux dut (.mode(mode), .a(a), .b(b), .y(y));

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
        exp = (m == 0) ? a : b;
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL mode=%0d a=%b b=%b y=%b", m + 1, a, b, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
