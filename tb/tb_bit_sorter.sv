// tb_bit_sorter: exhaustive check of the 8-bit and 5-bit sorters. The
// expected output has as many ones as the input, all at the top.
module tb_bit_sorter;
  logic [7:0] x8, y8;
  logic [4:0] x5, y5;
  int checks = 0, failures = 0;

  bit_sorter              dut8 (.x(x8), .y(y8));
  bit_sorter #(.N(5))     dut5 (.x(x5), .y(y5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [7:0] e8;
      logic [4:0] e5;
      x8 = 8'(v);
      x5 = 5'(v);
      #1;
      e8 = ~(8'hff >> $countones(x8));
      e5 = ~(5'h1f >> $countones(x5));
      checks++;
      if (y8 !== e8) begin
        failures++;
        $display("FAIL N=8 x=%b y=%b expected %b", x8, y8, e8);
      end
      checks++;
      if (y5 !== e5) begin
        failures++;
        $display("FAIL N=5 x=%b y=%b expected %b", x5, y5, e5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
