// testable_multiplier: a 4x4 array multiplier chip with built-in self-test.
//
// Normal mode (start low): the array multiplier multiplies the operand pins
// a and b and drives the product on p, combinationally.
// Test mode (start high): the operand pins are ignored. The sequence
// generator drives the multiplier with one test word per clock (low half =
// multiplicand, high half = multiplier) and also shows the word on seq_out;
// the result register captures each product and shows it on reg_out. The
// product pins p keep showing the multiplier output.
//
// Timing in test mode: reg_out after a rising edge holds the product of the
// word seq_out showed before that edge, i.e. reg_out lags seq_out by one
// clock. With start held for 2^(2N)+1 clocks every operand pair has been
// checked once. After start falls the register holds its last product and
// the generator returns to word 0.
// The blocks and the pin functions follow the original chip; the word
// layout and the one-clock lag are this design's own choices.
module testable_multiplier #(
  parameter int unsigned N = tmul_pkg::MULT_N
) (
  input  logic           clk,       // sequence-generator clock
  input  logic           start,     // start bit: high = test mode
  input  logic [N-1:0]   a,         // multiplicand pins
  input  logic [N-1:0]   b,         // multiplier pins
  output logic [2*N-1:0] p,         // product pins
  output logic [2*N-1:0] seq_out,   // test word being applied
  output logic           seq_last,  // final word of a test pass
  output logic [2*N-1:0] reg_out    // captured test result
);
  logic [N-1:0]   mul_a, mul_b;
  logic [2*N-1:0] product;

  sequence_generator #(.WIDTH(2*N)) u_seq (
    .clk  (clk),
    .start(start),
    .word (seq_out),
    .last (seq_last)
  );

  // test-mode input selection
  always_comb begin
    if (start) begin
      mul_a = seq_out[N-1:0];
      mul_b = seq_out[2*N-1:N];
    end else begin
      mul_a = a;
      mul_b = b;
    end
  end

  array_multiplier #(.N(N)) u_mul (
    .a(mul_a),
    .b(mul_b),
    .p(product)
  );

  result_register #(.WIDTH(2*N)) u_reg (
    .clk (clk),
    .load(start),
    .d   (product),
    .q   (reg_out)
  );

  assign p = product;
endmodule
