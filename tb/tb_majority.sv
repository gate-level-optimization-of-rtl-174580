// tb_majority: exhaustive check of the 3-input and 7-input majority.
module tb_majority;
  logic [2:0] x3;
  logic [6:0] x7;
  logic y3, y7;
  int checks = 0, failures = 0;

  majority            dut3 (.x(x3), .y(y3));
  majority #(.N(7))   dut7 (.x(x7), .y(y7));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      x7 = 7'(v);
      x3 = 3'(v);
      #1;
      checks++;
      if (y7 !== ($countones(x7) >= 4)) begin
        failures++;
        $display("FAIL N=7 x=%b y=%b", x7, y7);
      end
      checks++;
      if (y3 !== ($countones(x3) >= 2)) begin
        failures++;
        $display("FAIL N=3 x=%b y=%b", x3, y3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
