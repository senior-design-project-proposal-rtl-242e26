// sequence_generator: on-chip test-pattern source.
//
// While the start bit is high the generator steps through a series of
// WIDTH-bit test words, one per rising clock edge; the words go to the
// multiplier inputs and out to pins so the user can predict every expected
// product. The series is a binary count 0, 1, ..., 2^WIDTH-1 that then wraps,
// so one pass of 256 words applies every 4x4 operand pair exactly once.
// While start is low the count is held at 0, so every test starts from word 0
// (the chip has no reset pin; start doubles as a synchronous clear).
//
// Timing: the first word (0) is on `word` in the cycle start is first seen
// high; each later edge with start high advances it by one. `last` is high
// while the final word of a pass is on `word`.
// The clock, start bit and 8-bit words follow the original chip; the counting
// order, the clear-on-start-low behaviour and `last` are this design's own.
module sequence_generator #(
  parameter int unsigned WIDTH = tmul_pkg::WORD_W
) (
  input  logic             clk,
  input  logic             start,
  output logic [WIDTH-1:0] word,
  output logic             last
);
  always_ff @(posedge clk) begin
    if (!start) word <= '0;
    else        word <= word + 1'b1;
  end

  assign last = start && (word == {WIDTH{1'b1}});
endmodule
