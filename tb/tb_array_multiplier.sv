// tb_array_multiplier: exhaustive check of the 4x4 array multiplier, plus
// a random check of a 6x6 instance to exercise the parameterised array.
// Expected products are computed with the simulator's integer multiply.
module tb_array_multiplier;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [5:0]  a6, b6;
  logic [11:0] p6;
  int checks = 0, failures = 0;

  array_multiplier dut4 (.a(a4), .b(b4), .p(p4));
  array_multiplier #(.N(6)) dut6 (.a(a6), .b(b6), .p(p6));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x);
        b4 = 4'(y);
        #1;
        checks++;
        if (int'(p4) != x * y) begin
          failures++;
          $display("FAIL 4x4 %0d*%0d = %0d, expected %0d", x, y, p4, x * y);
        end
      end
    end
    for (int k = 0; k < 500; k++) begin
      int x, y;
      x = int'($urandom_range(63));
      y = int'($urandom_range(63));
      a6 = 6'(x);
      b6 = 6'(y);
      #1;
      checks++;
      if (int'(p6) != x * y) begin
        failures++;
        $display("FAIL 6x6 %0d*%0d = %0d, expected %0d", x, y, p6, x * y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
