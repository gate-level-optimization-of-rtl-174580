// tb_mux2: exhaustive check of the BDD node multiplexer.
module tb_mux2;
  logic sel, d0, d1, y;
  int checks = 0, failures = 0;

  mux2 dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, d1, d0} = 3'(v);
      #1;
      checks++;
      if (y !== (v[2] ? v[1] : v[0])) begin
        failures++;
        $display("FAIL sel=%b d0=%b d1=%b y=%b", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
