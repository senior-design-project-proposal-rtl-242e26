// tb_testable_multiplier: end-to-end test of the self-testing multiplier at
// its default size (4x4 operands, 8-bit test words).
//
// Plays the part of the user at the board:
//  1. normal mode: random operands on the pins, product checked on p;
//  2. test mode: start held for one full pass plus one clock, while random
//     junk sits on the operand pins. Every clock the test word on seq_out is
//     checked against the expected count, and reg_out against the product of
//     the word shown one clock earlier (what the user would compare);
//  3. start dropped: reg_out must hold the last product (15*15) and the
//     generator must return to word 0; normal mode works again;
//  4. a second test aborted mid-pass, then a restart that must begin at 0.
// Each mechanism (normal multiply, switch into test mode, operand pins
// ignored, end of pass, result hold, abort, restart) is counted and must
// occur at least once.
module tb_testable_multiplier;
  localparam int N = 4;
  localparam int W = 2 * N;
  localparam int PASS = 1 << W;

  logic         clk;
  logic         start = 1'b0;
  logic [N-1:0] a = '0, b = '0;
  logic [W-1:0] p, seq_out, reg_out;
  logic         seq_last;
  int checks = 0, failures = 0;
  int n_normal = 0, n_enter_test = 0, n_pins_ignored = 0, n_pass_end = 0;
  int n_hold = 0, n_abort = 0, n_restart = 0;

  testable_multiplier dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int prod_of_word(logic [W-1:0] w);
    return int'(w[N-1:0]) * int'(w[W-1:N]);
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL t=%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  task automatic normal_mode_checks(int count);
    for (int k = 0; k < count; k++) begin
      int x, y;
      x = int'($urandom_range(2**N - 1));
      y = int'($urandom_range(2**N - 1));
      a = N'(x);
      b = N'(y);
      #1;
      expect_eq("normal-mode product", int'(p), x * y);
      n_normal++;
    end
  endtask

  // Runs `clocks` clocks of test mode starting from start low.
  task automatic run_test(int clocks);
    logic [W-1:0] prev_word;
    @(negedge clk);
    start = 1'b1;
    n_enter_test++;
    #1 expect_eq("first test word", int'(seq_out), 0);
    for (int k = 1; k <= clocks; k++) begin
      prev_word = seq_out;
      a = N'($urandom);
      b = N'($urandom);
      #1;
      // product pins follow the test word, not the operand pins
      expect_eq("p in test mode", int'(p), prod_of_word(seq_out));
      if (prod_of_word(seq_out) != int'(a) * int'(b)) n_pins_ignored++;
      expect_eq("seq_last", int'(seq_last), int'((k - 1) % PASS == PASS - 1));
      if (seq_last) n_pass_end++;
      @(posedge clk);
      #1;
      expect_eq("test word", int'(seq_out), k % PASS);
      expect_eq("captured result", int'(reg_out), prod_of_word(prev_word));
    end
  endtask

  initial begin
    logic [W-1:0] held;
    normal_mode_checks(50);

    // one full exhaustive pass: PASS words, plus one clock so the last
    // product (word 255 = 15*15) reaches the register
    run_test(PASS);
    // wait, with start still high, until just after the edge, then stop
    @(negedge clk);
    start = 1'b0;
    held = reg_out;
    expect_eq("result after full pass", int'(held), 15 * 15);
    // after start falls: register holds, generator clears
    repeat (5) begin
      a = N'($urandom);
      b = N'($urandom);
      @(posedge clk);
      #1;
      expect_eq("held result", int'(reg_out), int'(held));
      expect_eq("generator cleared", int'(seq_out), 0);
      n_hold++;
    end
    normal_mode_checks(20);

    // second test, aborted after 37 words
    run_test(37);
    @(negedge clk);
    start = 1'b0;
    n_abort++;
    @(posedge clk);
    #1 expect_eq("generator cleared after abort", int'(seq_out), 0);
    // restart must begin again at word 0
    run_test(20);
    n_restart++;
    @(negedge clk);
    start = 1'b0;

    $display("mechanisms: normal=%0d enter_test=%0d pins_ignored=%0d pass_end=%0d hold=%0d abort=%0d restart=%0d",
             n_normal, n_enter_test, n_pins_ignored, n_pass_end, n_hold, n_abort, n_restart);
    if (n_normal == 0)       begin failures++; $display("FAIL normal mode never used"); end
    if (n_enter_test == 0)   begin failures++; $display("FAIL test mode never entered"); end
    if (n_pins_ignored == 0) begin failures++; $display("FAIL pin isolation never exercised"); end
    if (n_pass_end == 0)     begin failures++; $display("FAIL end of pass never reached"); end
    if (n_hold == 0)         begin failures++; $display("FAIL result hold never exercised"); end
    if (n_abort == 0)        begin failures++; $display("FAIL abort never exercised"); end
    if (n_restart == 0)      begin failures++; $display("FAIL restart never exercised"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
