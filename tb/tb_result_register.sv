// tb_result_register: checks capture and hold.
// With load high q must take d at every rising edge (and not before it);
// with load low q must keep its value whatever d does.
module tb_result_register;
  logic       clk;
  logic       load;
  logic [7:0] d, q;
  logic [7:0] model;
  int checks = 0, failures = 0;

  result_register dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b1;
    d = 8'h00;
    @(posedge clk);
    #1 model = 8'h00;
    for (int k = 0; k < 1000; k++) begin
      load = ($urandom_range(3) != 0);
      d = 8'($urandom);
      #1;
      // no change between edges
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL before edge q=%h expected %h", q, model);
      end
      @(posedge clk);
      #1;
      if (load) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL load=%0d d=%h q=%h expected %h", load, d, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
