// tb_manual_vs_self_test: the chip-level acceptance procedure.
//
// First the multiplier is tested "manually": with start low, all 256
// operand pairs are applied on the pins and the products on p are recorded.
// Then one self-test pass is run with start high: every clock the test word
// shown on seq_out is logged, and the product that appears on reg_out one
// clock later is looked up in the manual table. The test features work if
// every register output matches the manual result for the word that
// produced it and every word of the pass was seen exactly once.
module tb_manual_vs_self_test;
  localparam int N = 4;
  localparam int W = 2 * N;
  localparam int PASS = 1 << W;

  logic         clk;
  logic         start = 1'b0;
  logic [N-1:0] a = '0, b = '0;
  logic [W-1:0] p, seq_out, reg_out;
  logic         seq_last;
  logic [W-1:0] manual [PASS];
  int           seen   [PASS];
  int checks = 0, failures = 0;

  testable_multiplier dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] prev;
    // manual test, also checked against arithmetic
    for (int w = 0; w < PASS; w++) begin
      a = N'(w);
      b = N'(w >> N);
      #1;
      manual[w] = p;
      seen[w] = 0;
      checks++;
      if (int'(p) != (w % (1 << N)) * (w >> N)) begin
        failures++;
        $display("FAIL manual %0d*%0d = %0d", w % (1 << N), w >> N, p);
      end
    end
    // self-test pass
    @(negedge clk);
    start = 1'b1;
    for (int k = 0; k < PASS; k++) begin
      #1 prev = seq_out;
      seen[prev]++;
      checks++;
      if (seq_last !== (prev == W'(PASS - 1))) begin
        failures++;
        $display("FAIL seq_last=%0d on word %0d", seq_last, prev);
      end
      @(posedge clk);
      #1;
      checks++;
      if (reg_out !== manual[prev]) begin
        failures++;
        $display("FAIL word %0d: register %0d, manual %0d", prev, reg_out, manual[prev]);
      end
      @(negedge clk);
    end
    start = 1'b0;
    for (int w = 0; w < PASS; w++) begin
      checks++;
      if (seen[w] != 1) begin
        failures++;
        $display("FAIL word %0d applied %0d times", w, seen[w]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
