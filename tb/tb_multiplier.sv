// tb_multiplier: exhaustive check of the 4x4 multiplier at its default size
// and of a 3x2 instance, against integer products.
module tb_multiplier;
  logic [3:0] a4, b4;
  logic [7:0] p44;
  logic [2:0] a3;
  logic [1:0] b2;
  logic [4:0] p32;
  int checks = 0, failures = 0;

  multiplier                  dut44 (.a(a4), .b(b4), .p(p44));
  multiplier #(.AW(3), .BW(2)) dut32 (.a(a3), .b(b2), .p(p32));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i);
        b4 = 4'(j);
        a3 = 3'(i);
        b2 = 2'(j);
        #1;
        checks++;
        if (int'(p44) != i * j) begin
          failures++;
          $display("FAIL 4x4 %0d*%0d=%0d", i, j, p44);
        end
        checks++;
        if (int'(p32) != (i % 8) * (j % 4)) begin
          failures++;
          $display("FAIL 3x2 %0d*%0d=%0d", i % 8, j % 4, p32);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
