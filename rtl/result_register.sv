// result_register: test-result capture register.
//
// A WIDTH-bit register clocked by the sequence-generator clock. While `load`
// (test mode) is high it captures the multiplier outputs at every rising
// edge, so q shows the product of the previous test word; while `load` is low
// it holds, keeping the last test result visible on the pins after the test.
// There is no reset: q is undefined until the first test clock.
// The 8-bit width and the capture of multiplier outputs in test mode follow
// the original chip; holding outside test mode is this design's own choice.
module result_register #(
  parameter int unsigned WIDTH = tmul_pkg::WORD_W
) (
  input  logic             clk,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (load) q <= d;
  end
endmodule
