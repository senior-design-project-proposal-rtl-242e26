// tb_mult_cell: exhaustive check of one array-multiplier cell.
// All 16 combinations of a, b, sum_in and carry_in are applied and the
// outputs compared with the integer sum (a*b) + sum_in + carry_in.
module tb_mult_cell;
  logic a, b, sum_in, carry_in, sum_out, carry_out;
  int checks = 0, failures = 0;

  mult_cell dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int expected;
      logic pp_ref;
      {a, b, sum_in, carry_in} = 4'(v);
      #1;
      pp_ref = a & b;
      expected = int'(pp_ref) + int'(sum_in) + int'(carry_in);
      checks++;
      if ({carry_out, sum_out} !== 2'(expected)) begin
        failures++;
        $display("FAIL a=%0d b=%0d s=%0d c=%0d -> %0d%0d, expected %0d",
                 a, b, sum_in, carry_in, carry_out, sum_out, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
