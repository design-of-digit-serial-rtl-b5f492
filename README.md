# Digit-serial FIR filter with a shared shift-add multiplier block

A fixed-coefficient FIR filter multiplies every input sample by the same set
of constants. Instead of a multiplier per coefficient, this filter forms all
its products in one network of additions, subtractions and shifts, in which
intermediate results are reused between coefficients. This is multiple
constant multiplication (MCM), and the graph used here is of the graph-based
(GB) kind. The whole datapath is also **digit-serial**: each word moves
through it `D` bits per clock cycle, least significant digit first. An adder
is then `D` full adders and one flip-flop, and a shift is a handful of
flip-flops. Area grows with the digit size, not with the word length. The
price is `WORD_W/D` cycles per sample.

The filter is

    y(n) = 59·x(n) + 89·x(n-1) + 43·x(n-2) + 29·x(n-3)

and by default takes 8-bit unsigned samples, uses 4-bit digits and 16-bit
words. A new sample goes in every 4 cycles. Every output is full precision.

## Words, digits and framing

Everything inside the filter is a stream of `WORD_W`-bit words. Each word is
cut into `NDIG = WORD_W/D` digits. The digits are sent in consecutive cycles
with no gaps, and the next word follows at once. `ds_frame_ctrl` counts digits
and produces two strobes:

- `first`: digit 0 of every word.
- `last`: digit `NDIG-1` of every word.

The word length is the length of the *result*, not of the input. A serial
network only yields as many product bits as it runs cycles. So the sample is
padded to the full word: with zeros when unsigned, with copies of its sign
bit when `SIGNED=1`. The largest output is 255 · (59+89+43+29) = 56100, so 16
bits hold it, and no value inside the filter wraps at the default sizes.
Signed 8-bit samples give at most |−128 · 220| = 28160, which also fits.

## The three serial operators

The arithmetic is built from three operators. Each keeps a little state from
one digit to the next, and `first` re-initialises that state at the start of
every word. There is no dead cycle between words, and no bit of one word leaks
into the next.

- **`ds_add`**: `D` full adders in a ripple chain. The carry out of the top
  adder is stored in one flip-flop and becomes the carry in of the next
  digit. On `first` the stored carry is replaced by `CARRY_INIT`, which is 0
  for an addition. The sum digit is combinational: it leaves in the same
  cycle as its operands.
- **`ds_sub`**: two's complement `a − b`. It is `ds_add` with `b` inverted and
  `CARRY_INIT = 1`, which forms `a + ~b + 1` across the word.
- **`ds_shift`**: a left shift by `S` only delays the bit stream by `S` bits.
  The module keeps the last `S` bits of the stream in `S` flip-flops. Each
  cycle it places the current digit above them and reads `D`-bit windows out
  of the result. Output `y[k]` is the word shifted by `k`, for every `k` from 0
  to `S`, so smaller shifts of the same signal cost no extra flip-flops. On
  `first` the stored bits read as zero. Bits that are shifted past the top of
  the word are dropped, as in any fixed-length frame.

None of the operators adds latency. Inside one word, every product digit is a
combinational function of the current input digit and the stored bits.

## The multiplier block (`mcm_gb`)

Recoding each constant in plain binary would need 3 + 3 + 4 + 3 = 13
additions for the four coefficients. The GB network needs five operations:

| result | operation            | operator |
|--------|----------------------|----------|
| 7x     | (x << 3) − x         | ds_sub   |
| 29x    | (7x << 2) + x        | ds_add   |
| 43x    | (7x << 1) + 29x      | ds_add   |
| 59x    | 43x + (x << 4)       | ds_add   |
| 89x    | (59x << 1) − 29x     | ds_sub   |

The first three rows are the known minimal solution for the pair 29x and 43x.
Both products share the intermediate 7x. The last two rows extend that
solution to 59 and 89 with one operation each. Five different odd constants
need at least five operations, so five is the minimum for this set.

Shifts of the same signal share flip-flops:

- x << 3 and x << 4 come from one 4-bit chain.
- 7x << 1 and 7x << 2 come from one 2-bit chain.
- 59x << 1 uses a single flip-flop.

The block holds 7 shift flip-flops and 5 carry flip-flops in total. That
count does not depend on the word length.

`mcm_gb` has no word-length parameter: it works at any frame length. In
bit-serial form (`D = 1`) with a 16-bit x, 29x needs 21 cycles to complete and
43x needs 22. The testbench checks both figures.

## The filter (`fir_ds_gb`)

```
sample ─► ds_p2s ─► x ─► mcm_gb ─► 29x 43x 59x 89x

s1 = 29x          ─► ds_word_delay ─► y1
s2 = 43x + y1     ─► ds_word_delay ─► y2      (ds_add)
s3 = 89x + y2     ─► ds_word_delay ─► y3      (ds_add)
s4 = 59x + y3     ─► ds_s2p ─► y, y_valid     (ds_add)
```

This is the transposed direct form. The products of the current sample are
added to partial sums that are delayed by one word. A one-word delay
(`ds_word_delay`) is a shift register of `NDIG` digit stages: a digit leaves
it in the same position of the next word, so the operands of every tap adder
stay aligned digit for digit. The tap order, with 29 first along the chain and
59 last, gives step response 59, 148, 191, 220. The testbench reproduces it.

`ds_p2s` loads a sample on `first` and sends its digit 0 in the same cycle.
`ds_s2p` shifts the digits of `s4` into a register. On `last` it copies the
complete word to `y`.

### Interface and timing

| port          | dir | width      | meaning |
|---------------|-----|------------|---------|
| `clk`         | in  | 1          | one digit per rising edge |
| `rst`         | in  | 1          | synchronous, active high; clears every delay (filter at rest) |
| `sample`      | in  | `SAMPLE_W` | x(n), taken in the cycle `sample_take` is high |
| `sample_take` | out | 1          | high once every `WORD_W/D` cycles, starting in the first cycle after reset |
| `y`           | out | `WORD_W`   | output; unsigned, or two's complement if `SIGNED` |
| `y_valid`     | out | 1          | pulses when `y` changes; `y` then holds for a word |

- The filter never stalls. The source must present a sample whenever
  `sample_take` is high.
- The output that includes x(n) appears with `y_valid` exactly `WORD_W/D`
  cycles after x(n) was taken. That is also the cycle in which x(n+1) is
  taken, and an assertion checks that the two line up.

Parameters: `D` (digit size, default 4), `SAMPLE_W` (8), `WORD_W` (16),
`SIGNED` (0). `WORD_W` must be a multiple of `D` and at least `2·D`. Choose
`WORD_W` large enough for the largest output, because results are taken
modulo 2^`WORD_W`.

## What is fixed and what was chosen

These come from the design as published:

- the coefficients 29, 43, 59, 89
- digit size 4 and 8-bit samples
- the tap order, read off its reference simulation
- the full-adder-plus-one-flip-flop adder
- the subtracter that inverts one operand and starts its carry at 1
- the flip-flop-chain shifts, with smaller shifts taken from the same chain
- the graph for 29x and 43x through 7x
- padding the input with zeros or sign bits

These are this implementation's own choices:

- the graph for 59x and 89x
- the 16-bit word; the published design appears to bring out only an 8-bit
  output, which would wrap for most inputs
- the `first`/`last` framing and the way flip-flops are initialised from it
- the input and output converters and their strobes
- reset behaviour
- the `SIGNED` option

The published implementation appears to compute a new output every clock.
This one is digit-serial all the way through, with one output per
`WORD_W/D` cycles. At `D = WORD_W/2` it comes closest to that rate.

The published synthesis figures (FPGA slices, LUTs and delay) are not
reproduced here and should not be expected to match. After generic synthesis
the default filter holds 55 flip-flop bits plus 48 bits in the three word
delays. Baseline filters built without sharing, or by common-subexpression
elimination, are not included.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module against plain integer arithmetic and ends with a
`TB_RESULT checks=… failures=…` line.

| testbench            | what it shows |
|----------------------|---------------|
| `tb_ds_add`, `tb_ds_sub` | random and corner 16-bit words, back to back, against `a+b` / `a−b` mod 2^16 |
| `tb_ds_shift`        | a 5-bit shift with 4-bit digits; all six taps against `x<<k` |
| `tb_ds_word_delay`   | exact 4-cycle delay; zeros after reset |
| `tb_ds_p2s`          | zero and sign padding; sample held after it is taken |
| `tb_ds_s2p`          | word reassembly, `valid` timing, hold between words |
| `tb_ds_frame_ctrl`   | `first`/`last` period and phase after reset |
| `tb_mcm_gb`          | all four products for unsigned and signed samples; bit-serial completion at 21 and 22 cycles |
| `tb_fir_ds_gb`       | the filter at its default parameters: step response 59, 148, 191, 220; impulse response; full-scale output 56100; 20 000 cycles of random input, every output and its latency checked; counts inter-digit carries, borrows and shifted bits and fails if any never occurred |
| `tb_fir_ds_gb_var`   | signed samples at `D = 4`; `D = 1`, `2` and `8`; all checked word by word |

`fir_scoreboard` is the filter's reference model. It watches only the
filter's ports.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ds_pkg.sv tb/tb_fir_ds_gb.sv --top-module tb_fir_ds_gb -o sim
./obj_dir/sim
```

Every testbench finishes in well under a second.

## Changing it

- **Other coefficients:** change the graph in `mcm_gb` and the tap wiring in
  `fir_ds_gb`. The serial operators are generic. Reuse a shift chain wherever
  two shifts start from the same signal. Make `WORD_W` at least
  `SAMPLE_W + ⌈log2(Σ|h|)⌉`.
- **Speed against area:** `D` trades the two. Sample rate, adder width and
  delay-stage width all scale with `D`. The shift flip-flops do not.
- **Files:** `rtl/ds_pkg.sv` holds the default sizes and the coefficient
  constants. Every other file in `rtl/` holds one module and opens with a
  description of its timing.
