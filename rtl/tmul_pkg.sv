// tmul_pkg: sizes shared by the self-testing 4x4 multiplier.
//
// MULT_N is the operand width of the cellular array multiplier (4 bits, as
// in the original chip). A test word carries both operands, so it and the
// product are WORD_W = 2*MULT_N = 8 bits wide. The test word layout, low half
// multiplicand and high half multiplier, is this design's own choice.
package tmul_pkg;
  localparam int unsigned MULT_N = 4;
  localparam int unsigned WORD_W = 2 * MULT_N;
endpackage
