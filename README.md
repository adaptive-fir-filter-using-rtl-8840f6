# Multiplier-less LMS adaptive FIR filter with distributed arithmetic

This is an adaptive FIR filter that computes its inner product, y = Σ wₖ·x(n−k),
without multipliers, and it adapts its weights by delayed LMS. The inner product
uses **distributed arithmetic (DA)**. All 16 subset sums of four consecutive
input samples are held in a small register table. The weights are read one bit
slice per clock cycle, and each slice picks one table word. The picked words are
shift-accumulated in **carry-save form**, so no carry propagates inside the
per-bit loop. The critical path of a bit cycle is one table read plus one
full-adder delay. Only the end of a sample period needs a real (carry-propagate)
addition.

The weight update replaces μ·e by a power of two. The error magnitude goes
through a leading-one detector, and each weight moves by ±(x >> t). That needs
only barrel shifters and adders.

The RTL follows the architecture in *"Adaptive FIR Filter Using LMS Algorithm
for an Area Efficient Design"*: the four-point inner-product block, the
small-order (N = 4) and large-order (N = 16, four blocks) filter structures, the
carry-save adder trees with their carry-in bits, the sign-magnitude separator
and the 3-bit barrel-shifter control word. Several details are not fixed by
that description and are choices made here. They are listed under
[Design choices](#design-choices-and-departures).

## Fixed-point conventions

* Samples x, desired signal d and weights w are L-bit two's complement. The
  default is L = 8.
* One sample period is **L clock cycles**. The clock is the "bit clock". The
  sample-rate registers (DA tables, weights, error, output words) are
  clock-enabled in the last cycle of each period. There is no second clock.
* With x and w taken as plain integers, the output is

      y(n) = floor( Σ_b floor(P_b / 2^(L−1)) / 2 ),   P_b = Σ_{k=0..3} w_{4b+k}·x(n−4b−k)

  For N = 4 this is exactly floor(Σ wₖ·x(n−k) / 2^L). y is L + log₂N bits wide.
* The error is e = (d − y + N/2) >> log₂N, kept at L bits. This is a rounding
  arithmetic shift. d is added at the LSB of y. |d − y|/N always fits in
  L bits, so e cannot overflow.

## The four-point inner-product block (`inner_product4`)

```
 x(n+1) ──► DA table (15 regs + 0) ──► 16:1 mux ──► CSA accumulator ──► S, C (L+2 bits each)
                    │                     ▲ a = {w3[l], w2[l], w1[l], w0[l]}
                    └── x(n) .. x(n−3) taps to the weight update and to the next block
```

**DA table (`da_table`).** Entry k is the sum of x(n−j) over the bits j set in
k, where bit 0 is the newest sample. Entry 0 is the constant 0. The other 15
entries are registers of L+2 bits. When a sample arrives, the table is rebuilt
from itself with seven adders:

    new[2m] = old[m],    new[2m+1] = x_new + old[m]      (m = 0..7, old[0] = 0)

Shifting every sample one place older doubles the index. A separate delay line
is therefore not needed: the four samples are entries 1, 2, 4 and 8.

**Bit-serial accumulation.** Write w = −2^(L−1)·w_{L−1} + Σ_{j<L−1} 2^j·w_j.
Then the inner product is Σ_j ±2^j·T[a_j], where T[a_j] is the table word
selected by bit slice j. The sign is negative for the sign slice only. The
slices come LSB first, one per cycle, and the sign slice comes last.

## Carry-save accumulation: why it is exact (`csa_accumulator`)

This is the part of the design that is least obvious. Each cycle, a row of
L+2 full adders adds three words:

* the held sum word S;
* the held carry word C;
* the table word T, inverted on the sign slice.

The row produces a sum vector s and a carry vector c with s + 2c = S + C + T.
All three operands are sign-extended, so the identity holds for the signed
values with no overflow. The registers then take:

    S ← s >>> 1        C ← c           (C is kept unshifted)

The value held is V = S + C, and the new value is floor(s/2) + c =
floor((V + T)/2). The dropped LSB of s is the LSB of the whole sum, because 2c
has none. So the carry-save loop reproduces a conventional right-shifting
accumulator bit for bit. Nested floors compose, so after all L slices the
result is floor(P / 2^L).

The sign slice is subtracted as ~T + 1. The +1 is not added in the loop.
Instead, the unshifted s and c of that last cycle are latched as the block's
output words `s_o`, `c_o`, and the product is

    (s_o + 2·c_o + 1) >> 1

The carry word weighs twice the sum word, and one carry-in bit per block
remains pending. After reset `s_o`/`c_o` are −1/0, the words that an all-zero
product leaves, so y starts at 0.

## Longer filters: blocks, chaining and adder trees (`da_lms_filter`, `adder_tree`)

A filter of length N uses Q = N/4 blocks.

* **Chaining.** Block b holds x(n−4b) … x(n−4b−3). Its input is the oldest
  sample of block b−1.
* **Adder trees.** The Q sum words go through one binary adder tree and the Q
  carry words through another. The Q pending carry-in bits belong to sum words.
  Because a carry word weighs double, they equal Q/2 carry-ins on the carry
  tree, which are added at its first-level adders. The output is
  y = (ΣS >>> 1) + (ΣC + Q/2).
* **Single block (N = 4).** The one pending bit is added to the sum word:
  y = ((S + 1) >>> 1) + C.

Widths are L+2 per block, L+3 after the first tree level and L+4 at the root
for N = 16.

## Error, control word and weight update

| block | what it does |
|---|---|
| `sign_mag_separator` | e → sign, \|e\| (L bits, so \|−2^(L−1)\| fits) |
| `control_word_gen` | leading one of \|e\| at bit p → t = (L−1) − p (3 bits for L = 8). It sets `upd` = 0 when e = 0 |
| `weight_increment` | four weights. It outputs the current bit slice a. At the sample edge it sets wₖ ← sat(wₖ ± (xₖ >>> t)), with four barrel shifters and four add/subtract units |

This makes μ·|e| equal to 2^p / 2^(L−1), which is μ·|e| rounded down to a power
of two. The effective step size follows from that mapping and from the >> log₂N
in the error path. The error shift rounds rather than truncates. A truncating
shift turns every small negative difference into e = −1. With N = 16, where the
error loses four bits, that bias made the weights drift and stalled the
adaptation. The barrel shifts of x still truncate.

### Sample timing and adaptation delay

All inputs are taken at the clock edge that ends a cycle where `sample_tick` is
high ("edge n").

| when | what happens |
|---|---|
| edge n | x(n) enters the DA tables. d(n−1) is registered. The words of y(n−1) are latched |
| period n | y(n) is accumulated with weights w(n). y(n−1) is on `y_out` |
| edge n+1 | e(n−1) = (d(n−1) − y(n−1) + N/2) >> log₂N is registered and appears on `e_out` |
| period n+1 | the increments for e(n−1) and x(n−1) … x(n−N) are formed |
| edge n+2 | the weights are updated |

So **d must be supplied one sample after its x**. The update is
w(n+1) = w(n) + μ·e(n−2)·x(n−2), which is an adaptation delay of two sample
periods.

The update needs x(n−2) … x(n−N−1). The weight-increment block b takes the two
older taps of its own table and the two newest taps of block b+1. The last block
takes them from two extra sample registers.

## Interface of `da_lms_filter` (top)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | bit clock, asynchronous active-low reset (everything to 0) |
| `x_in` | in | L | reference input, taken at the edge after `sample_tick` |
| `d_in` | in | L | desired input, one sample behind `x_in` |
| `sample_tick` | out | 1 | last cycle of a sample period |
| `y_out` | out | L+log₂N | y of the last finished period |
| `e_out` | out | L | registered error, the system output of a noise canceller |
| `w_out` | out | N × L | current weights |

Parameters: `L` (8), `N` (16, a multiple of 4; 4 gives the small-order filter),
`TW` (3). The defaults are in `rtl/da_lms_pkg.sv`. A generic yosys coarse
synthesis of the N = 16 default gives about 660 word-level cells and 887
flip-flop bits.

## Files

`rtl/` has one module per file:

* `da_lms_pkg`: shared constants
* `da_lms_filter`: the top
* `inner_product4`, `da_table`, `csa_accumulator`
* `full_adder`, built from two `half_adder`s
* `weight_increment`, `sign_mag_separator`, `control_word_gen`
* `adder_tree`, `bit_timer`

`tb/` has one self-checking testbench per module, plus two whole-filter tests:

* `tb_da_lms_small`: the filter at N = 4;
* `tb_da_lms_noise_cancel`: noise cancellation at N = 16.

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself with
a watchdog.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/da_lms_pkg.sv \
          tb/tb_da_lms_filter.sv --top-module tb_da_lms_filter
./obj_dir/Vtb_da_lms_filter
```

## How it is verified

* **Unit tests.** Each unit test compares against arithmetic that does not use
  the block's own method:
  * subset sums for the table;
  * the plain shift-accumulation integer for the carry-save accumulator;
  * integer dot products for the inner-product block;
  * exhaustive tables for the adders, the sign-magnitude separator and the
    control word;
  * saturating integer updates for the weights.
* **End-to-end tests.** `tb_da_lms_filter` runs the N = 16 default;
  `tb_da_lms_small` runs N = 4. Both identify a random FIR plant whose output
  uses the filter's own scaling, so a perfect match drives the error to zero.
  `tb_da_lms_noise_cancel` uses the filter as a noise canceller: d is a
  triangle-wave signal plus noise through an unknown 16-tap path, and x is the
  noise itself. The error output must keep the signal and lose the noise.
  In all three:
  * A reference model written in plain integers predicts y, e and all N
    weights at every sample. The RTL must match it exactly.
  * Each test also checks that a sample is taken every L cycles.
  * Each test checks that the mean residual |d − y − signal| falls at least
    twofold over the identification phase. Over 100-sample windows it falls
    about 5× for N = 16 (3757→714, ×1/100), about 23× for N = 4 and about 5×
    for the noise canceller. Across twelve random seeds the N = 16 and
    noise-cancelling runs improved between 3× and 15×.
  * A second phase drives the filter with an impulse train. The target is
    first too high and then too low for the filter to reach, which pushes
    the weights into saturation. A zero target then lets the error decay
    through every size.
  * The tests count sign-slice subtractions, positive, negative and skipped
    updates, saturations, and every shift amount t from log₂N to 7. Smaller
    shifts would need a larger error than the filter can produce.

## Design choices and departures

The following are this design's choices. The architecture's description does
not fix them.

* **Word length L = 8.** The description leaves L open. Eight bits matches the
  3-bit control word and the 10-bit carry-save words seen in its simulation
  output.
* **Error-to-shift mapping.** t = (L−1) − ⌊log₂|e|⌋. There is no further μ
  scaling, and a zero error means no update.
* **Error rounding.** The error shift rounds, adding N/2 before the shift,
  where the source structure shows a plain right shift.
* **Saturating weights.** Weights saturate at the L-bit limits.
* **Clocking.** There is one clock with a sample-rate enable, instead of a
  separate slow clock. The bit order is LSB slice first.
* **Reset.** Reset is asynchronous and active-low.
* **DA-table refill.** The table is refilled by the index-doubling recurrence
  above.
* **Alignment of d.** d is aligned with the LSB of y in the error subtraction.
  This gives the filter the full gain range. Aligning d with the top of y
  instead would keep more error resolution but leave d tiny for realistic
  plants.
* **Block word width.** The block output words are L+2 bits. The source
  structure shows L+1 for the N = 4 filter and L+2 everywhere else; L+2 is
  used throughout.
* **Multiplexer order.** The multiplexer uses the binary subset order (address
  bit j selects x(n−j)).

What is not modelled: the area and power figures of the original comparison,
which need a cell library. There is also no input handshake: the filter takes a
sample every L cycles, free-running.
