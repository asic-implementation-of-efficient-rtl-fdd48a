# Single-precision floating-point adder with LZA error detection

Floating-point addition spends most of its time and area in two places: adding the aligned
significands, and then normalising the result by shifting its leading one back to the top.
This design saves area in the first place and time in the second:

* **Significand adder.** It is a *carry select adder* (CSLA). A regular CSLA keeps two ripple
  carry adders per group, one for carry-in 0 and one for carry-in 1. This one keeps a single
  ripple carry adder (RCA) per group. It derives the carry-in-1 result by adding one to the
  carry-in-0 result in a *binary to excess-1 converter* (BEC). A BEC is a chain of AND and
  XOR gates, much smaller than a second RCA.
* **Normalisation.** A *leading zero anticipator* (LZA) predicts the normalisation shift from
  the operands, at the same time as the addition. Its prediction is right or exactly one place
  short. An error detector reads the adder's carry at the predicted leading-digit position to
  tell which. A *coarse shifter* applies the prediction and a *fine shifter* adds the
  one-place correction.

The RTL is IEEE 754 binary32 (single precision). It is written in synthesizable
SystemVerilog and is purely combinational.

## Interface

`fp_adder_ed` (top, `rtl/fp_adder_ed.sv`):

| port      | dir | width | meaning                                                    |
|-----------|-----|-------|------------------------------------------------------------|
| `x`, `y`  | in  | 32    | operands, `fp_add_pkg::fp32_t` = {sign, exp[7:0], frac[22:0]} |
| `sub`     | in  | 1     | 0: x + y, 1: x − y                                         |
| `z`       | out | 32    | result                                                     |
| `flags`   | out | 5     | `fp_flags_t` = {nan, overflow, underflow, inexact, zero}  |
| `lza_err` | out | 1     | the LZA prediction was one short and was corrected (observation only) |

There is no clock. `z` and `flags` settle one combinational delay after the inputs change.
If you need a pipeline, register the inputs and outputs around the top.

## Number conventions

These are choices of this implementation:

* **Rounding.** Round to nearest, ties to even. There is no other mode.
* **Subnormals.** They are flushed to zero. An operand with exponent field 0 counts as zero,
  whatever its fraction. A result below the smallest normal number (exponent ≤ 0 after
  normalisation) becomes a zero with the result's sign. It raises `underflow`, `inexact` and
  `zero`. For addition, such a result is always exact before flushing.
* **Overflow.** An exponent of 255 or more after rounding gives ±infinity with `overflow` and
  `inexact`.
* **NaN.** A NaN operand, or ∞ − ∞, gives the quiet NaN `0x7FC00000` with `nan`. Infinities
  otherwise pass through.
* **Zero.** x − x gives +0. −0 + −0 gives −0. A zero operand passes the other operand through
  unchanged.

## Datapath

```
 x, y, sub
   │
   ├─ special_cases ──────────────────────────────────────────────┐ (NaN/inf/zero result)
   ├─ exp_diff: d=|ex−ey|, swap=sgn(d), e_big                      │
   ├─ swap: ma = larger significand, mb = smaller                  │
   ├─ r_shifter: mb >> d, with guard, round, sticky (27 bits)      │
   ├─ addsub_norm ────────────────────────────────┐                │
   │    csla_bec (28 bit) : ma ± mb               │ parallel       │
   │    lza               : predicted lz, one-hot │                │
   │    carry_select_ed   : err (lz one short?)   │                │
   │    coarse_shifter    : << lz                 │                │
   │    fine_shifter      : << 1 if err, >> 1 if addition carried  │
   ├─ round_rne: nearest even, ovf_rnd                             │
   ├─ exp_update: e_big + ovf − shift + ovf_rnd, overflow/underflow│
   ├─ sign_logic                                                   │
   └─ result select  ◄─────────────────────────────────────────────┘
```

**Operand ordering.** `swap` is set when |y| > |x|. The decision compares the exponents and,
when they are equal, the fractions. So `ma ≥ mb` always holds and an effective subtraction
never goes negative. That removes any need to complement the result. It also lets the LZA
use a simple positive-difference indicator.

**Alignment.** The smaller significand, hidden bit included, is shifted right by `d`. It
keeps a guard bit, a round bit and a sticky bit: the sticky bit is the OR of everything
shifted further down. If `d > 26`, only the sticky bit survives. The larger significand gets
three zero bits appended.

**Effective operation.** `eop = sign(x) XOR sign(y) XOR sub`. The 28-bit adder computes
`ma + mb` or `ma + ~mb + 1`. Bit 27 holds the carry-out of an addition.

## The carry select adder with BEC (`csla_bec`)

The adder is cut into 4-bit groups (default `WIDTH = 16`, four groups; the floating-point
unit uses 28 bits, seven groups):

* **Group 0** (bits 3:0) is a plain 4-bit RCA of four full adders. It takes the external
  carry-in.
* **Every other group** (`csla_bec_group`) contains:
  * one 4-bit RCA with carry-in fixed at 0: three full adders and a half adder at bit 0;
  * a 5-bit BEC, which turns the RCA's 5-bit result {carry, sum} into {carry, sum} + 1;
  * a 5-bit 2:1 multiplexer (10 inputs, 5 outputs), steered by the carry out of the group
    below. It picks the RCA result when that carry is 0 and the BEC result when it is 1.

The BEC (`bec`) computes `x[0] = ~b[0]` and `x[i] = b[i] ^ (b[i-1] & … & b[0])`. The AND
terms form a chain, so a 5-bit BEC costs one inverter, three 2-input ANDs and four XORs.
A second 4-bit RCA would cost four full adders. Group outputs settle in parallel; only the
multiplexer selects ripple from group to group.

The adder also outputs `carry[i]`, the carry *into* bit `i`. It is recovered as
`sum ^ a ^ b`, and the error detector uses it.

## Leading zero anticipation and its error detection

This is the least obvious part of the design.

**Prediction (`lza`).** For `a − b` with `a ≥ b`, each bit pair is classed as
`g` (a=1, b=0), `s` (a=0, b=1) or `e` (equal). The indicator string is

    f[i] = ~s[i-1] & ( e[i+1] & g[i]  |  ~e[i+1] & s[i] )        (e[top+1] = 1, s[-1] = 0)

Read a − b as a string of signed digits (+1, 0, −1). Since a ≥ b, the string starts
`e…e g`. A run `g s s … s` has the same value as `e … e g` ending at its last `s`. So the
leading one of `f` marks the position `p` that closes the prefix `e* g s*`. What follows
decides the exact answer:

* a `g`, or nothing but `e`s, keeps the value ≥ 2^p, so the true leading one is at `p`;
* `e…e s` pulls the value just under 2^p, so the true leading one is at `p − 1`.

So the predicted count `lz` is exact or one short, never anything else. Its testbench checks
this exhaustively at 8 bits and with random vectors at 27 bits. A leading-one detector turns `f`
into a one-hot position `onehot` and the count `lz`. `a == b` gives `f = 0` and `lz = 27`.

**Detection (`carry_select_ed`).** The difference bit at the predicted position `p` is
`t[p] ^ carry[p]`, where `t = a ^ ~b` is the propagate term of the subtraction and
`carry[p]` comes from the CSLA. If that bit is 0, the leading one is at `p − 1` and
`err = 1`. Selecting `t` and `carry` is a plain AND-OR over the one-hot vector, so the
detector needs neither the encoded count nor a second leading-zero count of the sum.

**Correction.** The coarse shifter (`coarse_shifter`, a 5-stage logarithmic shifter) shifts
left by `lz`. The fine shifter (`fine_shifter`) then does one of two one-place shifts:

* one more left shift when `err = 1`;
* for an effective addition that carried out, one right shift that ORs the bit it drops into
  the sticky position.

The fine shifter also does the right-by-one, because this design has no separate left/right-1
normalisation shifter. The total left shift reported to the exponent is `lz + err`.

**Why the guard bits suffice.** A left shift of more than one place only happens when
`d ≤ 1`. In that case no bits were lost in alignment, so guard, round and sticky are exact.

## Rounding and exponent

`round_rne` increments the 24-bit significand when `G & (R | S | LSB)`. A carry out of the
hidden bit (`ovf_rnd`) means the result is 1.0 × 2. Then `frac` is 0 and the exponent grows
by one. `exp_update` computes `e_big + ovf − shift + ovf_rnd` in 10-bit signed arithmetic
and flags `overflow` (≥ 255) and `underflow` (≤ 0).

## Files

`rtl/` holds one module or package per file.

| file | content |
|------|---------|
| `fp_add_pkg.sv` | widths, `fp32_t`, `fp_flags_t`, quiet-NaN constant |
| `fp_adder_ed.sv` | top |
| `special_cases.sv`, `exp_diff.sv`, `swap.sv`, `r_shifter.sv` | front end |
| `addsub_norm.sv` | adder + LZA + error detection + shifters |
| `csla_bec.sv`, `csla_bec_group.sv`, `rca.sv`, `bec.sv`, `mux2w.sv`, `full_adder.sv`, `half_adder.sv` | carry select adder |
| `lza.sv`, `carry_select_ed.sv`, `coarse_shifter.sv`, `fine_shifter.sv` | normalisation |
| `round_rne.sv`, `exp_update.sv`, `sign_logic.sv` | back end |

Parameters: `csla_bec.WIDTH` (default 16, multiple of 4); `rca.WIDTH`, `rca.HAS_CIN`;
`bec.WIDTH` (default 5); `lza.WIDTH` and `carry_select_ed.WIDTH` (default 27);
`coarse_shifter.WIDTH` and `fine_shifter.WIDTH` (default 28); `addsub_norm.W` (default 27).
The top and the floating-point blocks are fixed at binary32 through `fp_add_pkg`.

## Verification

Every module has a self-checking testbench in `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The expected values are worked out
independently in each testbench, exhaustively where the input space is small (BEC, RCA, CSLA
group, sign logic).

The end-to-end test is `tb/tb_fp_adder_ed.sv`. It compares every result and flag with
`tb/fp_ref_pkg.sv`, a reference that adds the operands exactly as 300-bit integers and then
rounds. It runs 15 directed vectors and 200,000 random ones, biased towards:

* exponent differences of 0 to 2 (deep cancellation);
* the overflow and underflow ranges;
* arbitrary encodings, which include NaNs, infinities and zeros.

It also counts each mechanism and fails if one never happens. The mechanisms are: LZA error
correction, addition carry-out, rounding carry-out, exponent overflow and underflow, NaN,
infinity and zero operands, exact cancellation, alignment entirely into the sticky bit,
operand swap, and long normalisation shifts. It takes under a second.

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fp_add_pkg.sv tb/fp_ref_pkg.sv tb/tb_fp_adder_ed.sv --top-module tb_fp_adder_ed
./obj_dir/Vtb_fp_adder_ed
```

Unit testbenches run the same way. Replace the testbench file and the top name. Packages are
needed only by the testbenches that import them.

## What follows the source design and what does not

Taken from the source design:

* the CSLA structure: a 4-bit full-adder RCA with carry-in in group 0; in each upper group an
  RCA of three full adders and a half adder, a 5-bit BEC and a 10:5 multiplexer, selected by
  the carries out of bits 3, 7, 11;
* the BEC logic;
* the 16-bit adder size;
* the set of floating-point blocks: exponent difference, mux, swap, right shifter, add/sub,
  round, exponent update, sign and special cases;
* in the proposed normaliser: LZA, carry-select error detection, coarse and fine shifters.

This design's own choices:

* the LZA indicator equations and the leading-one detector;
* error detection as a one-hot selection of propagate and carry;
* the operand ordering by full magnitude;
* the guard/round/sticky format;
* round-to-nearest-even only;
* flush-to-zero for subnormals;
* the NaN encoding and the flag set as a port;
* purely combinational timing.

Not built:

* any technology-specific implementation: the area, delay and power figures quoted for the
  original design come from an FPGA flow and are not reproduced here;
* the regular two-RCA carry select adder and the LZC-based floating-point unit, which serve
  only as baselines for comparison;
* a proposed future variant that would replace the BEC with D latches.
