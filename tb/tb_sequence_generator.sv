// tb_sequence_generator: checks the test-word series.
// With start low the word must sit at 0. With start high it must count
// 0,1,2,... one step per clock, raise `last` only on word 255, and wrap to 0.
// Dropping start in mid-pass must return it to 0, and a new pass must again
// start from 0.
module tb_sequence_generator;
  logic       clk;
  logic       start = 1'b0;
  logic [7:0] word;
  logic       last;
  int checks = 0, failures = 0;
  int last_seen = 0;

  sequence_generator dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [7:0] exp_word, logic exp_last);
    checks++;
    if (word !== exp_word || last !== exp_last) begin
      failures++;
      $display("FAIL t=%0t word=%0d last=%0d, expected %0d/%0d",
               $time, word, last, exp_word, exp_last);
    end
  endtask

  initial begin
    start = 1'b0;
    repeat (2) @(posedge clk);
    #1 check(8'd0, 1'b0);
    // a full pass plus a few words of wrap-around
    start = 1'b1;
    #1 check(8'd0, 1'b0);
    for (int k = 1; k < 260; k++) begin
      @(posedge clk);
      #1;
      if (last) last_seen++;
      check(8'(k), (k % 256) == 255);
    end
    // stop in mid-pass: word returns to 0 on the next edge
    start = 1'b0;
    #1 check(8'd0 + 8'(259 % 256), 1'b0);
    @(posedge clk);
    #1 check(8'd0, 1'b0);
    @(posedge clk);
    #1 check(8'd0, 1'b0);
    // restart
    start = 1'b1;
    for (int k = 1; k < 10; k++) begin
      @(posedge clk);
      #1 check(8'(k), 1'b0);
    end
    checks++;
    if (last_seen != 1) begin
      failures++;
      $display("FAIL last seen %0d times, expected 1", last_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
