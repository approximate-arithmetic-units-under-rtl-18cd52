# Approximate 16-bit adders and multipliers

Most of the delay of an adder is its carry chain, and most carries die after a
few bits. An approximate adder exploits this: it cuts the chain into short,
overlapping pieces that all work in parallel. The sum is then wrong on the few
operand pairs where a carry would have had to travel further than one piece.
The same idea applies to multipliers, at two places. The small partial-product
blocks can be simplified, and the adders that sum the partial products can be
given cells that cut the carry.

This RTL holds thirteen 16-bit adders and five 16x16 multipliers, written so
that they can be compared side by side:

| unit | kind | module and setting |
|---|---|---|
| ACAI_Gen, ACAI_RCA | approximate | `gear_adder` R=1, P=7 (Almost Correct Adder) |
| ACAII_Gen, ACAII_RCA | approximate | `gear_adder` R=4, P=4 (Accuracy Configurable Adder) |
| GeAr2_Gen, GeAr2_RCA | approximate | `gear_adder` R=2, P=8 |
| GeAr4_Gen, GeAr4_RCA | approximate | `gear_adder` R=4, P=8 |
| GeAr6_Gen, GeAr6_RCA | approximate | `gear_adder` R=6, P=8 |
| RCA | exact | `rca_adder`: 16 full-adder cells |
| KSA | exact | `ksa_adder`: Kogge-Stone prefix tree |
| "+" | exact | `plus_adder`: `a + b`, structure left to synthesis |
| Mult16 | exact | `udm_mult` APPROX=0 |
| UDM16 | approximate | `udm_mult` APPROX=1, SFA=0 |
| UDM16_SFA | approximate | `udm_mult` APPROX=1, SFA=1, SW_FORM=0 |
| UDM16_SFA_SW | approximate | `udm_mult` APPROX=1, SFA=1, SW_FORM=1 |
| "*" | exact | `star_mult`: `a * b`, structure left to synthesis |

`_Gen` versions write each sub-adder as `+`. `_RCA` versions build each
sub-adder as a ripple-carry chain. The two versions of an adder compute the same
function. They differ only in the netlist that synthesis produces, which
matters for timing and so for how the adder degrades when its clock is too fast
or its supply voltage too low. The top level `arith_top` puts all eighteen units
between an input register rank and an output register rank. That frame is what
you need to time each unit as a one-cycle path.

All operands are unsigned. Sums are 17 bits: bit 16 is the carry out. Products
are 32 bits.

## The GeAr adder: overlapping windows

`gear_adder` implements the generic accuracy-configurable adder GeAr(N, R, P).
Its sub-adders are L = R + P bits wide. Sub-adder *j* starts at bit R·j:

```
bit:        15 14 13 12 11 10  9  8  7  6  5  4  3  2  1  0
GeAr4  j=0:              [ -------- 12-bit exact sum -------- ]  result bits 0..11
(R=4,  j=1:  [ 4 result  |   8 prediction bits    ]              result bits 12..15 + carry
 P=8)
```

* Sub-adder 0 gives its L low result bits exactly.
* Every later sub-adder recomputes the P bits just below its R result bits.
  It uses them only to predict the carry into its result bits. A carry born
  inside those P bits is seen. A carry born further down is lost unless it
  would have been killed anyway.
* The last window is cut at bit 15 when it would run past it, and its carry
  out becomes bit 16 of the sum.
* The number of sub-adders is K = ceil((N − L)/R) + 1. So ACA-I has 9, ACA-II 3,
  GeAr2 4, and GeAr4 and GeAr6 have 2 each.

The wrong sums follow from this structure. Window *j* mispredicts when a carry
enters bit R·j from below and all P prediction bits propagate (a[i] ≠ b[i]).
Its result bits then lack a carry of weight 2^(R·j+P). Where neighbouring
windows mispredict together, their wrong bits cancel to the same single
power of two. **Every error is therefore a positive power of two, at a bit
position fixed by the setting** (the testbenches check this on 10^7 sums):

| setting | error magnitudes | exact sums, random operands |
|---|---|---|
| ACA-I (1,7) | 2^8 … 2^15 | 98.44 % |
| ACA-II (4,4) | 2^8, 2^12 | 94.14 % |
| GeAr2 (2,8) | 2^10, 2^12, 2^14 | 99.56 % |
| GeAr4 (4,8) | 2^12 | 99.82 % |
| GeAr6 (6,8) | 2^14 | 99.81 % |

The rate is roughly (number of cuts) × ½ × 2^−P. Large P buys accuracy. Small R
buys short carry chains at the cost of more windows. GeAr4 and GeAr6 are equally
often wrong, but GeAr4's errors are four times smaller.

The ACA-I and ACA-II adders from the literature are just two GeAr settings.
ACA-I is R=1, P=L−1: every result bit has its own 8-bit window. ACA-II is
R = P = L/2: half-overlapping 8-bit windows.

GeAr6 is a corner case. With L = 14, (N − L)/R = 2/6 is not an integer, and the
second window would reach bit 19. It is cut at bit 15, so it adds bits 6..15,
predicts with bits 6..13 and gives bits 14, 15 and the carry. This reading
gives the single 2^14 error magnitude measured for that adder.

## The simplified full adder (SFA)

`sfa_cell` is a full adder with part of its logic removed:

```
exact:  s = a ^ b ^ cin            cout = a&b | cin&(a^b)
SFA:    s = (a ^ b) | cin          cout = a&b
```

The carry no longer depends on `cin`, so an SFA anywhere in a ripple chain splits
the chain in two. It is wrong for exactly two of the eight inputs, (0,1,1) and
(1,0,1). There it yields 1 instead of 2. An XOR in the sum would give 0 there.
Turning the second XOR into an OR halves the size of the error without making
it more frequent.

`rca_adder` takes a parameter `SFA_POS` that puts one SFA at that bit. The
default, −1, gives an exact adder.

## The block multipliers

`udm_mult` is recursive. An N-bit operand is split into halves, and the four
half-size products are added with shifts:

```
p = LL + (HL << N/2) + (LH << N/2) + (HH << N)       HL = a_hi * b_lo, etc.
```

Each half-size product is again a `udm_mult`, down to `mult2x2` at N = 2. A
16x16 product is therefore built from 64 2x2 blocks in three levels of
partial sums (4x4, 8x8, 16x16).

**The under-designed 2x2 block.** `mult2x2` with APPROX=1 drops the fourth
output bit. It returns 3·3 = 7 (111) instead of 9 (1001) and is exact for the
other 15 input pairs. Its logic becomes three AND/OR terms.

**Where approximation is allowed.** The HH product holds the most significant
bits. So in an approximate block, HH is computed entirely exactly, with exact
2x2 blocks and exact adders at every level below it. HL, LH and LL are
approximate blocks, and the same rule applies inside them. At the top, a_hi ×
b_hi is exact. In each of the other three 8x8 products, its own hi×hi 4x4 is
exact, and so on down. Of the 64 2x2 blocks, 27 are under-designed.

**SFA in the partial sums (SFA=1).** In every approximate block, each of the
three partial-sum additions has one SFA at bit weight N, the middle bit of the
block's 2N-bit result. All other cells are exact full adders. Exact blocks never
get an SFA. The third addition adds HH, whose low N bits are zero, so no carry
reaches its SFA and that SFA is always exact. The errors come from the first two
additions.

**Two adder shapes (SW_FORM).**
* `SW_FORM=1` (UDM16_SFA_SW) follows the software model of the multiplier. Each
  addition is a full 2N-bit ripple adder, even where one operand is all zeros.
* `SW_FORM=0` (UDM16_SFA, also used for Mult16 and UDM16) is the optimised
  form. Low bits that meet only zeros go straight to the result, and each adder
  is only as wide as its operands.

The SFA stays at weight N in both shapes, so the two compute identical products.
The testbenches check this on every operand pair. They differ in area and in
carry-chain length.

Functional accuracy, from `mult_precision_tb`. The first two data sets have
10^7 pairs each. The third is every pair of operands from 1 to 2047.

| multiplier | random 16-bit: exact / MRE | half-precision mantissas: exact / MRE | all 11-bit pairs: exact / MRE |
|---|---|---|---|
| Mult16, "*" | 100 % / 0 | 100 % / 0 | 100 % / 0 |
| UDM16 | 36.0 % / 0.011 % | 79.1 % / 0.0006 % | 49.1 % / 0.76 % |
| UDM16_SFA, _SW | 8.4 % / 0.073 % | 54.5 % / 0.0032 % | 23.5 % / 5.3 % |

MRE is the mean of |exact − approximate| / exact over all operations. Every
approximation here only loses value, so no approximate product exceeds the exact
one.

The "mantissa" operands mimic how a half-precision multiply was mapped onto
this 16-bit multiplier. Each operand is an 11-bit mantissa with its hidden 1.
The first is placed with one zero above it and four below, the second with five
zeros below.

## Top level and timing

`arith_top` (ports use the enums of `approx_arith_pkg`):

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; all flip-flops on the rising edge |
| `add_a`, `add_b` | in | 16 | adder operands, shared by all 13 adders |
| `add_sum[13]` | out | 17 each | sums, index `adder_e` (ACAI_GEN = 0 … ADD_PLUS = 12) |
| `mul_a`, `mul_b` | in | 16 | multiplier operands, shared by all 5 multipliers |
| `mul_prod[5]` | out | 32 each | products, index `mult_e` (MUL_MULT16 = 0 … MUL_STAR = 4) |

Operands applied before rising edge *n* are captured at edge *n*. Their results
are on the outputs after edge *n+1*, a latency of two edges. A new pair can be
applied every cycle. The registers have no reset. The outputs are meaningless
until two edges after the first valid operands.

Every unit is combinational. Its whole delay lies between the two register
ranks. Running the frame with a period shorter than a unit's critical path, or
with cells slowed by a lowered supply voltage, is the intended way to study
timing errors. That needs a gate-level netlist with back-annotated delays; the
RTL itself is cycle-accurate only.

## How far to trust it, and what is this design's own reading

Checked against published numbers. 10^7 random operand pairs through
`arith_top` reproduce the published error-free precision of every GeAr-family
adder within 0.01 points. They also reproduce its counts per error magnitude
within the noise of the sample (`adder_precision_tb`).

Choices made here, where the description of these units leaves a point open:
* **Carry out.** The sum is 17 bits, with the carry out of the last window.
  This width matches the measured error magnitudes, which are all positive.
* **Last GeAr window.** It is cut at bit 15 (see GeAr6 above).
* **Which XOR the SFA turns into an OR.** It is the one that takes `cin`. That is
  the only choice that keeps the published two-error truth table.
* **Order of the multiplier's partial sums.** LL + HL, then + LH, then + HH. This
  order, and the SFA at weight N in both adder shapes, are this design's
  choices. They make UDM16_SFA and UDM16_SFA_SW functionally identical, as
  their equal measured precision suggests. A different order or SFA position
  would change which products are wrong, but not the kind of error.
* **SFA at every level.** There is one SFA per addition of every approximate
  block at all three levels. Where exactly the SFA cells sit in the reference
  software model is not known here, so bit-exact agreement with that model's
  products is not claimed.
* **Adder shape of Mult16 and UDM16.** Both use the narrow adder shape.
* **Registers.** They have no reset. The units share one operand register pair
  per kind (adders, multipliers) rather than one frame per unit.

Not in the RTL:
* the timing experiments (overclocking, voltage underscaling);
* the resulting precision, power and slack figures. These are properties of a
  synthesised 22 nm netlist, not of the RTL.

The GeAr adder family also allows error detection and correction logic. It is
not part of these settings and is not provided. Nor is the Error Tolerant
Multiplier (ETM), a known alternative that was not part of this set.

## Files

`rtl/`
* `approx_arith_pkg.sv`: widths, the `adder_e` and `mult_e` index enums, and
  the settings table (`gear_cfg`, `mult_cfg`) that `arith_top` uses to build
  its instances.
* `full_adder.sv`, `sfa_cell.sv`: the one-bit cells.
* `rca_adder.sv`, `ksa_adder.sv`, `plus_adder.sv`: the exact adders. The ripple
  adder is also the sub-adder of the `_RCA` versions and the partial-sum adder
  of the multipliers.
* `gear_adder.sv`: the approximate adders.
* `mult2x2.sv`, `udm_mult.sv`, `star_mult.sv`: the multipliers.
* `arith_top.sv`: the register frame with all eighteen units.

`tb/`: one self-checking testbench per module (`<module>_tb.sv`), plus:
* `approx_ref_pkg.sv`: integer reference models of GeAr, SFA addition and the
  block multiplier.
* `arith_top_tb.sv`: end-to-end test at default parameters. It covers
  back-to-back operands, latency, every reference model, and counts each
  approximation mechanism.
* `adder_precision_tb.sv`: 10^7 random additions, precision and error
  magnitudes.
* `mult_precision_tb.sv`: 10^7 random multiplications, 10^7 mantissa-shaped
  ones, and all 11-bit operand pairs, with precision and MRE.

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends the run with a failure if the run hangs.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```sh
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/approx_arith_pkg.sv tb/approx_ref_pkg.sv tb/arith_top_tb.sv \
    --top-module arith_top_tb --Mdir obj_top
./obj_top/Varith_top_tb
```

Replace `arith_top_tb` with any other testbench name. The packages must come
first on the command line. `-y rtl -y tb` finds the modules by file name.
Run times are about 0.3 s for `arith_top_tb`, about 5 s for
`adder_precision_tb` and about 1 minute for `mult_precision_tb`.

## Changing it

* **Another GeAr setting.** Instantiate `gear_adder #(.N(n), .R(r), .P(p),
  .SUB_RCA(0|1))`. Any N ≥ 2 and R, P ≥ 1 work. R + P ≥ N degenerates to an
  exact adder. The reference model `gear_ref` in `tb/approx_ref_pkg.sv` takes
  the same three numbers.
* **Another multiplier width.** `udm_mult #(.N(n))` works for any power of
  two n ≥ 2. An 11-bit mantissa multiplier would be a 16-bit instance with the
  operands zero-padded, or a new non-power-of-two split.
* **More units in the frame.** Extend `adder_e`/`mult_e` and the settings
  functions in `approx_arith_pkg`, then add the instance in `arith_top`.
