// mult_cell: one cell of the cellular array multiplier.
//
// The multiplier is built from identical cells, sixteen for 4x4 operands.
// Each cell forms the partial-product bit a AND b and adds it to a
// partial-sum bit arriving from the row above and a carry arriving from its
// right-hand neighbour in the same row, with a full adder:
//   {carry_out, sum_out} = (a & b) + sum_in + carry_in
// The cell is purely combinational. That the array is made of identical
// cells is from the original design; the AND-plus-full-adder contents are
// the usual array-multiplier cell and are this design's reading of it.
module mult_cell (
  input  logic a,         // multiplicand bit a_i
  input  logic b,         // multiplier bit b_j
  input  logic sum_in,    // partial-sum bit from the previous row
  input  logic carry_in,  // carry from the neighbouring cell in this row
  output logic sum_out,
  output logic carry_out
);
  logic pp;

  always_comb begin
    pp        = a & b;
    sum_out   = pp ^ sum_in ^ carry_in;
    carry_out = (pp & sum_in) | (pp & carry_in) | (sum_in & carry_in);
  end
endmodule
