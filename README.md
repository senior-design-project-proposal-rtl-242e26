# A 4x4 array multiplier that tests itself

This is a small chip that multiplies two 4-bit numbers and can also check its own multiplier.
A technician can test it on the board with one start pin and a clock, with no tester and no test program.

The multiplier is a *cellular array*: sixteen identical cells, each an AND gate and a full adder, tiled four by four.
Two test features sit around it:

- a **sequence generator**, which drives the multiplier with a known series of 8-bit test words;
- an **8-bit result register**, which captures each product so it can be read from pins.

Both the test words and the captured products are brought out to pins.
The user knows the word series, so the user knows every expected product.
If the register outputs match the multiplication table, the chip is good.
If they do not, only this chip needs replacing, not the whole board.

```
             a[3:0] b[3:0]                 clk  start
                |     |                     |     |
                |     |          +----------v-----v---+
                |     |          | sequence_generator |---> seq_out[7:0], seq_last
                |     |          +---------+----------+
                |     |             word[3:0] word[7:4]
             +--v-----v--------------v---------v--+
  start ---->|  operand select (start=1: word)     |
             +--------------+----------------------+
                            |  mul_a, mul_b
                  +---------v----------+
                  |  array_multiplier  |  16 x mult_cell
                  +---------+----------+
                            | product[7:0]
                            +------------------------------> p[7:0]
                  +---------v----------+
   clk, start --->|  result_register   |-------------------> reg_out[7:0]
                  +--------------------+
```

## The cell array

`array_multiplier` computes `p = a * b` for unsigned N-bit operands, with N = 4 by default.
It uses N x N copies of one cell, `mult_cell`, and no other logic.

Each cell computes

```
{carry_out, sum_out} = (a_i & b_j) + sum_in + carry_in
```

The cells form N rows.
Row *j* adds the partial product `a * b_j` to the running sum left by row *j-1*, shifted right by one bit:

```
R_0 = a * b_0
R_j = (R_(j-1) >> 1) + a * b_j        for j = 1 .. N-1
```

Within row *j*:

| column i | partial-product bit | sum_in                              | carry_in            |
|----------|---------------------|-------------------------------------|---------------------|
| 0        | a_0 & b_j           | sum_out of row j-1, column 1        | 0                   |
| 1 .. N-2 | a_i & b_j           | sum_out of row j-1, column i+1      | carry of column i-1 |
| N-1      | a_(N-1) & b_j       | **carry_out of row j-1, column N-1** | carry of column N-2 |

Row 0 has `sum_in = 0` in every column.

Two points make the array work with identical cells only:

- **The shift costs nothing.** The shift by one bit is just wiring. The low bit of each row's sum never changes again. It is output at once as product bit `p[j]`.
- **There is no final adder.** A row's carry-out becomes the top sum bit fed into the next row. The last row therefore gives `p[2N-2:N-1]` from its sum outputs and `p[2N-1]` from its final carry.

The array is purely combinational.
The longest path ripples along a row and then down through the rows, roughly 2N cells.
For N = 4 it synthesises to 16 AND gates plus 16 full adders.

The 4x4 size and the sixteen identical cells come from the original chip.
The cell contents and the ripple-carry row wiring are this design's own choices.
They are the standard way to build such an array from one repeated cell.

## Normal mode and test mode

The **start** pin selects the mode.

**Normal mode (`start = 0`).**
The multiplier takes its operands from pins `a` and `b`.
The product appears on `p` after the combinational delay.
The sequence generator is held at word 0.
The result register holds whatever it last captured.

**Test mode (`start = 1`).**
Pins `a` and `b` are ignored.
On every rising clock edge the sequence generator moves to the next word.
The words are a plain binary count, 0 to 255, which then wraps to 0.
Each word is split in two halves:

- `word[3:0]` is the multiplicand;
- `word[7:4]` is the multiplier.

So one pass of 256 words applies every possible operand pair exactly once.
The word being applied is shown on `seq_out`.
`seq_last` is high while word 255, the last word of a pass, is applied.
At every rising edge the result register captures the current product and shows it on `reg_out`.
The product pins `p` keep showing the multiplier output, so they show the test product too.

### Timing in test mode

`reg_out` lags `seq_out` by one clock:

| clock edge after start rises | `seq_out` after the edge | `reg_out` after the edge |
|------------------------------|--------------------------|--------------------------|
| (before the first edge)      | 0                        | unknown                  |
| 1                            | 1                        | product of word 0        |
| 2                            | 2                        | product of word 1        |
| ...                          | ...                      | ...                      |
| 256                          | 0 (wrapped)              | product of word 255 = 225 |

A full exhaustive test therefore needs **257 rising edges** with start high.
That is one edge per word, plus one edge to capture the last product.

When `start` falls:

- the register keeps its last value, so the final result stays readable;
- the generator returns to word 0 on the next edge.

Any new test therefore starts again from word 0, including a test that was stopped part-way.

### Reading the result

At each clock the user, or a simple board-level circuit, compares `reg_out` with `lo * hi`.
Here `lo` and `hi` are the halves of the `seq_out` value seen one clock earlier.
Any mismatch means the multiplier, or the test path itself, is faulty.

The intended acceptance procedure for a fabricated part is:

1. Test the multiplier by hand through `a`, `b` and `p`.
2. Run the self-test.
3. Check that the two give the same products.

`tb/tb_manual_vs_self_test.sv` runs exactly this procedure.

## Pins

| pin        | dir | width | function |
|------------|-----|-------|----------|
| `clk`      | in  | 1     | clocks the sequence generator and the result register |
| `start`    | in  | 1     | 1 = test mode; 0 = normal mode, and clears the generator |
| `a`, `b`   | in  | 4, 4  | operands in normal mode; ignored in test mode |
| `p`        | out | 8     | multiplier output, in both modes |
| `seq_out`  | out | 8     | test word currently applied |
| `seq_last` | out | 1     | final word of a pass is applied |
| `reg_out`  | out | 8     | captured product |

The chip also has supply and ground pins.
They carry no logic and are not modelled.

There is no reset pin.
The start pin clears the generator synchronously.
The result register is not reset and holds no defined value until the first test clock.

## Files

| file | contents |
|------|----------|
| `rtl/tmul_pkg.sv` | shared sizes: `MULT_N = 4`, `WORD_W = 8` |
| `rtl/mult_cell.sv` | the AND plus full adder cell |
| `rtl/array_multiplier.sv` | N x N cell array, parameter `N` |
| `rtl/sequence_generator.sv` | test-word counter, parameter `WIDTH` |
| `rtl/result_register.sv` | capture register with load enable, parameter `WIDTH` |
| `rtl/testable_multiplier.sv` | top level, parameter `N` |

Every module is parameterised.
The top derives its word and register widths as `2*N`, so changing `N` rescales the whole chip.
A pass then takes `2^(2N)` words.

## Where this design makes its own choices

The original chip fixes the following:

- the blocks and their pins;
- the 4-bit operands and the 8-bit words and register;
- the sixteen identical cells;
- the rule that the external operands are ignored in test mode.

The following are choices made here:

- **Cell and array wiring.** These are the AND plus full-adder cell and the ripple-carry rows described above.
- **Word series.** A binary count is used because it is exhaustive and trivially predictable. Any other known series, such as a pseudo-random one, would fit the same interfaces.
- **Word layout.** The low half is `a` and the high half is `b`.
- **Result register.** The register stores one plain product per clock, for the user to compare. It does *not* compress the results into a signature. The original description mentions "signature analysis" once, but describes the register only as storing and showing the multiplier outputs, and the plain register follows that description. A signature register would need a feedback polynomial and a reference signature, and neither is given.
- **Product pins in test mode.** `p` keeps showing the product in test mode; it is not blanked. These pins are the ones that feed the register.
- **Start-pin behaviour.** Start acts as a synchronous clear. The register holds its value outside test mode.
- **`seq_last`.** This output is an addition, so that a board can tell when a pass has finished.

## Verification

Each testbench checks its block against values it computes itself and prints a `TB_RESULT checks=... failures=...` line.

| testbench | what it checks |
|-----------|----------------|
| `tb_mult_cell` | all 16 input combinations of the cell |
| `tb_array_multiplier` | all 256 products of the 4x4 array; 500 random products of a 6x6 instance |
| `tb_sequence_generator` | counting, wrap, `seq_last` on word 255 only, clear when start falls, restart from 0 |
| `tb_result_register` | capture on the edge only when `load` is high; hold otherwise (random stimulus) |
| `tb_testable_multiplier` | end to end at default size, in five stages (see below) |
| `tb_manual_vs_self_test` | every operand pair by hand through the pins; then a self-test pass compared with those results; every word applied exactly once |

`tb_testable_multiplier` runs these stages:

1. Normal-mode products.
2. A full 256-word self-test, with random values on the ignored operand pins. Each word and each captured product is checked with the one-clock lag.
3. Hold after the test.
4. A test stopped part-way.
5. A restart from word 0.

It counts each of these events and fails if one never happens.

All testbenches run at the default size and finish in well under a second.

## Simulating

Verilator 5 builds any testbench directly. The package must come first:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
    rtl/tmul_pkg.sv rtl/*.sv tb/tb_testable_multiplier.sv \
    --top tb_testable_multiplier -Mdir obj_tb
./obj_tb/Vtb_testable_multiplier
```

Replace the testbench file and the `--top` name to run any of the others.
The testbenches use no x or z values, so a two-state simulator gives the same results.
