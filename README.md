# Double-path HUB floating-point adder

This is a combinational floating-point adder/subtractor for numbers in **HUB format**
(half-unit-biased). It uses the classic *double-path* organisation: a **close path** and a
**far path** compute in parallel, and a multiplexer picks one. In HUB format, rounding to
nearest is plain truncation and negation is plain bit inversion. So the adder has no
rounding logic, no sticky-bit logic and no carry-in for negation. An optional
**unbiased** mode (`UNBIASED = 1`, the default) breaks ties evenly instead of always in
the same direction.

The datapath follows the published double-path HUB adder (swap, conditional inverter,
close path with one-place alignment and a long normalisation, far path with a long
alignment and a one-place normalisation, final multiplexer, and two small tie-handling
blocks). The exponent and sign logic, the encoding of zero and the handling of exponent
overflow are this design's own choices, because the published description leaves them
open. They are listed under [Departures and own choices](#departures-and-own-choices).

## The HUB number format

A HUB floating-point word looks like an IEEE-754 word: a sign `s`, an `EW`-bit biased
exponent `e` and `FW` stored fraction bits `f`. The difference is that the significand
has **two** implicit bits: the leading 1, and an **implicit least significant bit
(ILSB)**, also 1:

    value = (-1)^s * 2^(e - bias) * (1.f + 2^-(FW+1)),     bias = 2^(EW-1) - 1

With the defaults `EW = 8`, `FW = 23` (HUB single precision), the significand has 25
bits, of which 23 are stored. The representable values sit exactly half-way between the
values of the conventional format with the same storage. This has three consequences,
and the whole design rests on them:

* **Rounding to nearest is truncation.** Any exact result lies between two conventional
  grid points `k*ulp` and `(k+1)*ulp`. The HUB value between them, `(k+0.5)*ulp`, is the
  nearest one. Dropping the bits below the ulp therefore rounds to nearest.
* **Negation is inversion.** A significand carried with its ILSB is an odd integer
  `2M+1`. Its bitwise inverse is `-(2M+1)-1`. If the ILSB position is left at 1, that
  is exactly `-(2M+1)`. One row of XOR gates negates an operand, with no +1.
* **A tie is an exact grid point.** The exact result is half-way between two HUB values
  only when it lands on `k*ulp`, that is when every truncated bit is 0. Plain truncation
  then always rounds up, which is a statistical bias. The unbiased mode removes it.

Exponent field 0 encodes zero. There are no subnormals, infinities or NaNs, and the
all-ones exponent is an ordinary exponent.

## Datapath

```
            x ----+    +---- y        op
                  v    v
               +----------+   |d|, d=0, d=1, eop = sx^sy^op
               |   SWAP   |   larger exponent -> left (ma, ea, sa)
               +----------+
             ma |        | mb
                |   {0,mb} -> conditional inverter (eop)  -> b  (M+1 bits)
        +-------+--------+-----------------+
        |  CLOSE PATH (eop, |d|<=1)        |  FAR PATH (everything else)
        |  R1-shifter  {b,1} >>> (d==1)    |  R-shifter  {b,1} >>> |d|
        |  adder  {0,ma,1} + .             |  adder  {0,ma,1} + .
        |  LZOD -> s                       |  LOD -> r1 (overflow) / l1 (0.1xx)
        |  L-shifter (fill pattern)        |  L1/R1 shifter
        |  conditional inverter (c<0)      |  LSB tie fix (d=0 addition)
        +---------------+------------------+-------------+
                        v                                v
                  result multiplexer (eop,d): exponent ea - s  or  ea + r1 - l1,
                  sign, zero operands, overflow / underflow, packing -> z
```

`M = FW + 1` is the significand width with its leading 1. Both adders are `M+2` bits
wide: a sign/overflow bit, `M` significand bits, and the ILSB position. Every internal
significand carries its ILSB explicitly. The left operand enters the adder as
`{0, ma, 1}`, and the right one is `{b, 1}` after its shift.

### Why no sticky bit is needed

The right operand always ends in its ILSB, so an aligned operand that was shifted at
all loses bits that are not all zero. The alignment shifters are arithmetic. They drop
the shifted-out bits, which yields `floor(aligned value)` in two's complement, even for
an inverted (negative) operand. The left operand is an integer at the adder's
resolution, so the floor of the sum equals the sum with the floored operand. Every later
truncation is a further floor. **Whenever the result is not shifted left past the
adder's LSB, the kept bits are exactly the truncation of the exact result.** No sticky,
guard or round bits are needed. Only the close path can shift left by more than one
place, and that case is handled next.

### Close path: effective subtraction with |d| = 0 or 1

* **R1-shifter.** It appends the ILSB and, for `d = 1`, shifts right one place with
  sign repeat. The ILSB that falls out is reported on `lost`.
* **No comparator.** For `d = 0` the swap cannot know which significand is larger, so
  the difference `c` can be negative. The LZOD counts leading digits equal to the sign
  bit: zeros for `c >= 0`, ones for `c < 0`. The L-shifter normalises on that count. The
  conditional inverter then inverts the normalised window when `c < 0`. This works
  because, in HUB format, inverting the truncated window of `c` gives the truncated
  window of `-c`, rounded to the other tie neighbour.
* **The lost half bit (the subtle part).** For `d = 1` the exact difference is
  `X - Y/2`. Its lowest set bit lies *half* a position below the adder's LSB: it is the
  ILSB the R1-shifter dropped. A large cancellation can shift the result left by 2 or
  more places, and that bit then lands inside the result window.
  * Filling the vacated positions with zeros loses it. In an exhaustive test at
    `EW = 5`, `FW = 4`, zero fill gave results more than one ulp off.
  * The L-shifter therefore takes a fill pattern: one first bit, then a repeated bit.
  * `1000...` re-inserts the lost bit. This is the exact value, which is a tie, and it
    rounds up.
  * `0111...` is one unit less in the last place. It gives the lower tie neighbour.
* **Unbiased fill control.** It chooses between the two patterns:
  * With `UNBIASED = 0` it always inserts `1000...` for `d = 1` and zeros for `d = 0`.
  * With `UNBIASED = 1` it picks whichever pattern leaves the result LSB at 0. Only a
    left shift of exactly 2 leaves the inserted 1 as the LSB, so only then is `0111...`
    used.
  * This block also takes the shift count as an input.
* **Exponent.** The result exponent is `ea - s`. An exact zero difference (`c = 0`,
  only possible with `d = 0`) gives +0.

### Far path: additions, and subtractions with |d| > 1

The R-shifter aligns `{b, 1}` arithmetically by `|d|`. A shift of `M+2` or more leaves
only sign bits, which is still the exact floor. The sum then lies in `[0.5, 4)`, so only
three cases exist:

* **Overflow** (`r1`): an addition carries into the top bit. The result is `c[M+1:2]`
  and the exponent rises by 1.
* **Normalised:** the result is `c[M:1]`.
* **Pattern 0.1xxx** (`l1`): a subtraction with `|d| >= 2`. The result is `c[M-1:0]`
  and the exponent falls by 1.

The LOD only needs the two top bits to tell these apart.

### Where ties occur, and how the unbiased mode treats them

The operands carry their ILSBs, so exact results are odd at the finest resolution. That
limits ties to three situations:

| situation | path | tie when | `UNBIASED = 1` | `UNBIASED = 0` |
|---|---|---|---|---|
| aligned addition, `d = 0` | far | the bit dropped below the overflowed sum is 0 | LSB forced to 0 | rounds up |
| aligned subtraction, `d = 0` | close | always, unless exact zero | up if `c > 0`, down if `c < 0` | same |
| subtraction, `d = 1` | close | left shift >= 2 | fill chosen so that LSB = 0 | rounds up (`1000...`) |

Forcing the LSB to 0 on a tie picks each neighbour about half of the time.

The aligned subtraction is not forced. Its direction already follows the sign of `c`,
and that sign depends on which operand happens to be the larger. This is left as the
published design leaves it, so for this one case the unbiased mode is unbiased only
statistically, not by a fixed rule.

## Interface and timing

`hub_fp_adder #(EW = 8, FW = 23, UNBIASED = 1)`

| port | dir | width | meaning |
|---|---|---|---|
| `x`, `y` | in | `1+EW+FW` | operands `{sign, exponent, fraction}` |
| `op` | in | 1 | 0: `z = x + y`, 1: `z = x - y` |
| `z` | out | `1+EW+FW` | result |
| `overflow` | out | 1 | exponent too large: `z` saturated to the largest magnitude |
| `underflow` | out | 1 | exponent below 1: `z` flushed to +0 |
| `path` | out | `hub_fp_pkg::path_e` | which path produced `z` (`CLOSE_PATH` / `FAR_PATH`) |

The adder is purely combinational, with no clock and no handshake. For a pipelined
version, register its ports. The natural internal cut points are after the swap and
inverter, and after the two adders.

## Departures and own choices

* **Close-path fill.** The published close path fills the left shift with zeros. That is
  inexact for `d = 1` subtractions with a left shift of 3 or more (see above). This
  design inserts `1000...` there, and with `UNBIASED = 1` chooses between `1000...` and
  `0111...` by the result LSB.
* **Signals the block diagrams do not draw.**
  * The exponent comparator lives in the swap block.
  * The result sign is the sign of the larger-exponent operand, flipped when the
    close-path difference is negative.
  * The exponent update is `ea - s`, or `ea + r1 - l1`.
* **Special values.** The format description gives none.
  * Exponent 0 is zero.
  * A zero operand returns the other operand, negated for `x - y`.
  * Exact cancellation gives +0.
  * Exponent overflow saturates to `{sign, all ones}` and raises `overflow`.
  * Underflow flushes to +0 and raises `underflow`.
  * There are no subnormals, infinities or NaNs.
* **Exact LZOD.** The leading-digit count is exact, with no leading-zero anticipation.
* **Bias.** The bias is `2^(EW-1) - 1`, as in IEEE-754.
* **Not built.** The single-path HUB adder and the conventional adder are comparison
  designs only.

## Source files

`rtl/` holds one module per file:

* `hub_fp_adder` is the top.
* `hub_swap` and `hub_cond_inverter` come first in the datapath.
* Close path: `hub_close_path` with `hub_r1_shifter`, `hub_twos_adder`, `hub_lzod`,
  `hub_l_shifter`, `hub_unbiased_close` and `hub_cond_inverter`.
* Far path: `hub_far_path` with `hub_r_shifter`, `hub_twos_adder`, `hub_lod`,
  `hub_l1r1_shifter` and `hub_unbiased_far`.
* `hub_result_mux` is the final stage.
* `hub_fp_pkg` holds the default widths, the `path_e` type and the bias function.

## Verification

`tb/hub_ref_pkg.sv` is an exact reference model, independent of the datapath:

* Each significand becomes the odd integer `2^M + 2f + 1`, and both operands are scaled
  to a common exponent in a 2112-bit integer.
* The model adds or subtracts exactly, normalises, and truncates to `M` bits.
* For ties it returns both neighbours. With `UNBIASED = 1` it returns only the LSB-0
  neighbour for aligned additions and for `d = 1` subtractions.

Testbenches (each prints `TB_RESULT checks=N failures=F`):

| testbench | what it does |
|---|---|
| `tb_hub_fp_adder` | default parameters, 200,000 random operations. It steers the operands toward every mechanism (both paths, far overflow and 0.1xxx, negative close-path difference, long left shift, swap, alignment beyond the significand, both unbiased corrections, aligned-subtraction ties, zero operands, exact cancellation, exponent overflow and underflow), counts each, and fails if one never occurs |
| `tb_hub_fp_adder_small` | `EW=5, FW=4`: every operand pair and both operations, with `UNBIASED = 1` and `0` side by side (4.2 M checks) |
| `tb_hub_fp_adder_formats` | HUB half precision (`5/10`) and double precision (`11/52`), 20,000 random operations each |
| `tb_hub_<block>` | one per block, exhaustive at small widths where possible, otherwise random against the reference model |

Run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/hub_fp_pkg.sv tb/hub_ref_pkg.sv tb/tb_hub_fp_adder.sv \
    --top-module tb_hub_fp_adder -Mdir obj && obj/Vtb_hub_fp_adder
```

Verilator finds the other modules through `-Irtl -Itb`, since each file is named after
its module. The default-size test runs in about a second, and the exhaustive small test
in about 15 seconds.

**How far to trust it.** Every result the adder produced in these tests was the HUB
round-to-nearest of the exact result, and every tie went to a neighbour the rules above
allow. The small format was tested exhaustively. The single, half and double formats
were tested by random operations concentrated on the hard cases. Timing, area and FPGA
mapping have not been evaluated.
