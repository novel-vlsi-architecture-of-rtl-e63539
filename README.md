# LUT-less distributed-arithmetic FIR filter with Brent-Kung adders

This is a 4-tap (3rd order) FIR filter,

    y[n] = h[0]·x[n-1] + h[1]·x[n-2] + h[2]·x[n-3] + h[3]·x[n-4]

that uses no multipliers and no look-up table. Samples arrive one bit per
clock. The filter works through the bits of the last four samples together.
For each bit position it adds up the coefficients whose sample has a 1 in
that position. It then folds that sum into a shift-accumulator. The sum a
classic distributed-arithmetic (DA) filter would read from a ROM is built
here from multiplexers and adders. So the coefficients are plain inputs and
may be changed while the filter runs. Every adder in the design is a
Brent-Kung parallel-prefix adder.

At its default size the filter has:

- 16-bit signed coefficients, packed into a 64-bit bus `h`;
- 16-bit signed samples, sent serially on `Xin`;
- a 64-bit signed output `Yout`.

It produces one output every 16 clocks.

## The arithmetic: why bit-serial works

Write a 16-bit two's-complement sample as

    x = -b15·2^15 + b14·2^14 + ... + b1·2 + b0

The filter output can then be regrouped by bit position instead of by tap:

    y = Σ_i 2^i · P_i   (i = 0..14)   −   2^15 · P_15
    P_i = Σ_k h[k] · b_k,i       (b_k,i is bit i of the sample in tap k)

`P_i` can take only 16 values, one per pattern of the four bits `b_k,i`.
A classic DA filter stores those 16 sums in a ROM. Here each tap has a 2:1
multiplexer that passes either `h[k]` or 0. A tree of three adders then adds
the multiplexer outputs: tap0+tap1, tap2+tap3, and finally the two pair sums.
The cost is three adders instead of a ROM, and any coefficient set works
without reloading a table.

Bits arrive least significant first. Each clock the accumulator therefore
halves its previous value and adds the new partial sum:

    acc ← (first bit ? 0 : acc >>> 1)  ±  (P_i << 15)

It subtracts on the sign bit (bit 15) and adds on every other bit. A right
shift would normally drop precision. Here each partial sum enters at weight
2^15, and the low 15 bits of the 64-bit accumulator hold the bits that the
halving moves down. After the sign bit the accumulator holds the exact
integer `Σ h[k]·x_k`, and nothing has been rounded. The subtraction uses the
same Brent-Kung adder, with the operand inverted and carry-in 1.

## Timing

- **Bit order.** `Xin` carries the samples back to back, LSB first, with no
  gaps. The first sample starts on the first clock after `reset` falls.
- **Delay line.** Inside, the four 16-bit tap registers form one 64-bit shift
  chain. Every 16 clocks each sample moves one register further down, which
  is the FIR delay line. The LSB of each register selects its tap's
  multiplexer.
- **One-sample latency.** A sample's bits can only go to the multiplexers
  once the whole sample is in a register. So during sample period `m` the
  taps hold samples `m-1 .. m-4`.
- **Output.** On the clock edge that ends period `m`, `Yout` is loaded with
  `Σ h[k]·x[m-1-k]`. `Yvalid` is 1 for the one cycle after each load. That
  happens every 16 clocks, and the first load comes 16 clocks after reset.
  A sample therefore reaches `Yout` 16 clocks after its last bit goes in.
- **Changing `h`.** `h` is read every clock. To switch coefficient sets
  cleanly, change `h` at a sample boundary, in the cycle when `Yvalid` is
  1. A change in mid-word mixes the two sets for that one output.
- **Reset.** `reset` is synchronous and active high. It clears the delay
  line, the bit counter, the accumulator and `Yout`.

## Blocks

| module | role |
|---|---|
| `FIRusingLUTless_bka` | top: wires the four blocks below |
| `da_bit_counter` | counts bit positions 0..15. Flags `first` (bit 0) and `sign` (bit 15, the sign-bit timing signal) |
| `da_shift_chain` | the 4 × 16-bit serial delay line. Gives each tap's LSB as its multiplexer select |
| `lutless_partial_sum` | the per-tap multiplexers (coefficient or 0) and the adder tree: the ROM replacement |
| `da_accumulator` | the add/subtract adder, the accumulator with ×½ feedback, and the output register |
| `bk_adder` | Brent-Kung adder of any width, default 32 |
| `bk_prefix_cell` | the prefix carry operator `(Pi·Pj, Gi + Pi·Gj)` |
| `fir_da_pkg` | default sizes and a small width helper |

### Brent-Kung adder

`bk_adder` works in three steps:

1. **Pre-processing.** For each bit it computes `P = A xor B` and
   `G = A and B`. The carry-in is folded into bit 0.
2. **Prefix tree.** This is built from `bk_prefix_cell` operators.
   - The up-sweep forms group signals for spans of 2, 4, 8, … bits, ending at
     bits 1, 3, 7, 15, …
   - The down-sweep then fills in the remaining bits.

   That takes `2·log2(W)-1` levels and fewer than `2W` cells. For 4 bits
   there are four cells:
   - bit 1 from bit 0;
   - bit 3 from bit 2;
   - bit 3 from bit 1;
   - bit 2 from bit 1.
3. **Post-processing.** `S = P xor C`.

The generator also handles widths that are not powers of two. The filter
uses 18-bit adders in the tree and a 64-bit adder in the accumulator.

## Parameters

The top module takes these parameters:

| parameter | default | meaning |
|---|---|---|
| `TAPS` | 4 | number of taps (filter order + 1) |
| `COEF_W` | 16 | width of one coefficient. `h` is `TAPS·COEF_W` bits wide |
| `DATA_W` | 16 | width of one sample, and the number of clocks per output |
| `OUT_W` | 64 | width of the accumulator and of `Yout` |

The blocks check or assume these limits:

- `OUT_W` must be at least `COEF_W + log2(TAPS) + DATA_W`. This is checked
  at elaboration.
- `DATA_W` must be at least 2.
- `TAPS` may be any value from 1 up. The adder tree is a heap-ordered
  binary tree. At 4 taps it is exactly the three-adder arrangement above.

## What is fixed by the design and what was chosen here

The reference design fixes these points:

- the LUT-less structure: a multiplexer per tap, a pairwise adder tree, an
  add/subtract accumulator with ×½ feedback, and subtraction on the sign
  bit;
- four taps;
- the Brent-Kung adders, built from the propagate/generate, prefix-operator
  and sum equations;
- the names and widths of the top-level ports `clock`, `reset`, `Xin`,
  `h[63:0]` and `Yout[63:0]`.

These are choices made here:

- **Sample width.** The sample width of 16 bits.
- **Packing of `h`.** The 64-bit bus is split into four 16-bit two's-complement
  coefficients, tap 0 in the lowest bits.
- **Bit timing.** LSB-first bit order with no gap between samples, the bit
  counter that makes the sign-bit timing signal, and the `first` flag that
  clears the accumulator.
- **`Yvalid`.** The extra output `Yvalid` is added.
- **Reset.** Reset is synchronous and active high.
- **Exact accumulation.** The fraction bits are kept in the accumulator, so
  the integer result is exact. The reference describes the accumulation with
  fractions.
- **Adder widths.** Every tree adder is 18 bits wide, with sign-extended
  inputs.
- **32-bit adder layout.** The reference's 32-bit Brent-Kung drawing groups
  the tree into six stages. This design uses the textbook arrangement of
  nine cell levels. The function is the same, but the stage depth drawn
  there is not reproduced.

Left out on purpose:

- the ROM-based DA filter and the carry-skip-adder version of the filter.
  They are only comparison points.

The reference synthesizes this filter to an FPGA at 401 LUTs and 3.272 mW.
Those figures were not reproduced here.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

- **`tb_bk_prefix_cell`:** exhaustive truth table.
- **`tb_bk_adder`:** 32-, 4-, 5-, 17- and 64-bit adders.
  - exhaustive over 5-bit operands;
  - carry chains through every bit position;
  - 3000 random operand sets.
- **`tb_da_bit_counter`:** the count sequence, `sign` once every 16 clocks,
  and reset in mid-word.
- **`tb_da_shift_chain`:** every register against a bit history kept by the
  testbench. Whole words move one register per 16 clocks.
- **`tb_lutless_partial_sum`:** all 16 select patterns for random and extreme
  coefficient sets.
- **`tb_da_accumulator`:** 300 words of random and extreme partial sums. It
  checks that `y` equals the 64-bit integer formula and that `y_valid` rises
  exactly once per word.
- **`tb_FIRusingLUTless_bka`:** the whole filter at its default parameters.
  - About 400 random sample periods against a 64-bit integer model.
  - `Yvalid` must come exactly once every 16 clocks.
  - Coefficients change at run time.
  - Extreme operands produce outputs beyond 32 bits.
  - A reset comes in mid-stream.
  - A final impulse test must read back `h[0]..h[3]` in order.
  - It counts each of these events and fails if one never happens.

To run a testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

    verilator --binary --timing --assert -Irtl rtl/fir_da_pkg.sv \
        rtl/bk_prefix_cell.sv rtl/bk_adder.sv rtl/da_bit_counter.sv \
        rtl/da_shift_chain.sv rtl/lutless_partial_sum.sv \
        rtl/da_accumulator.sv rtl/FIRusingLUTless_bka.sv \
        tb/tb_FIRusingLUTless_bka.sv --top-module tb_FIRusingLUTless_bka
    ./obj_dir/Vtb_FIRusingLUTless_bka

For another block, replace the testbench file and the top-module name. All
files are plain SystemVerilog-2017 and also elaborate in other tools. Lint
reports a few unused package constants and three deliberately open outputs
in the top: the bit index, the tap words and the raw accumulator. Those
outputs exist for observation and testing.
