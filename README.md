# xinterval: interval contractor instructions for a RISC-V core

Robot localisation and similar tasks are often posed as constraint problems
and solved with *contractors*: operators that shrink a box of intervals
without losing any point that satisfies the constraints. A contractor for a
whole equation is assembled from small primitives, such as the forward and
backward contractors of `+`, `-`, `*`, `/`, `x^2`, `sqrt`, `exp` and `log`,
plus the forward contractors of `cos` and `sin`. This RTL moves
those primitives into hardware as a custom RISC-V instruction-set extension,
**xinterval**:

* an interval fits in one 64-bit floating-point (D) register, so the core's
  ordinary `fld`/`fsd` move intervals to and from memory;
* each primitive is one instruction, working on register operands;
* bounds use a reduced 31-bit floating-point format. Lower bounds are always
  rounded toward -inf and upper bounds toward +inf, so every result is a
  guaranteed enclosure;
* an *iota* flag in the register marks intervals that left the domain of a
  partial function (the square root and the logarithm), so that a later backward step can
  take this into account.

The RTL covers the extension itself: the instruction decoder, the register
file holding the intervals, and the interval execution unit. The host core
(RV32IMFD) is not included. Its side of the interface is brought out as plain
ports on `xinterval_top`.

## Number and interval formats

A bound (`fp31_t` in `rtl/xinterval_pkg.sv`) is 31 bits:

| bits  | field    | notes                                      |
|-------|----------|--------------------------------------------|
| 30    | sign     |                                            |
| 29:23 | exponent | bias 63; 0 = zero, 127 = infinity          |
| 22:0  | fraction | hidden leading 1 for normal numbers        |

So the significand has 24 bits, as in IEEE single precision, and the range is
about 2^-62 to 2^64. There are no subnormals and no NaN.

An interval (`itv_t`) is 64 bits:

| bits  | field                                                  |
|-------|--------------------------------------------------------|
| 63    | `empty`: the interval is the empty set (bounds ignored) |
| 62    | `iota`: the interval went outside a function's domain  |
| 61:31 | lower bound                                            |
| 30:0  | upper bound                                            |

The 31/7-bit bound and the two flags come from the design's definition. The
exponent bias, the field order and the codes for zero and infinity are this
implementation's choices.

### Directed rounding

Every bound unit (`fp31_add`, `fp31_mul`, `fp31_div`, `fp31_sqrt`) returns two
results: `y_dn`, rounded toward -inf, and `y_up`, rounded toward +inf. All four
keep enough guard bits plus a sticky bit that both roundings are exact, so
`[y_dn, y_up]` is the tightest pair of representable numbers around the true
value. The shared rounding step is `fp_round` in the package:

* A result too large for the format rounds to infinity in the outward
  direction, and to the largest finite number in the inward direction.
* A result too small for a normal number rounds to the smallest normal number
  in the outward direction, and to zero in the inward direction.

So underflow and overflow never break an enclosure. At interval level,
`0 * inf` counts as 0. The division units never see a divisor interval that
contains zero (see below), so `0/0` and `inf/inf` do not arise.

## Instruction set

All instructions name registers of the floating-point file (`f0`..`f31`).
Operand roles follow one rule: a backward contractor receives the operand
it contracts *and* the value it had before propagation, and it returns their
intersection. This saves the separate intersection that state updates would
otherwise need.

| mnemonic              | format, opcode       | funct3 | funct7 / funct2 | operation                         |
|-----------------------|----------------------|--------|-----------------|-----------------------------------|
| `addfwctc rd,rs1,rs2` | R, `0001011`         | 100    | 0000000         | rd = rs1 + rs2                    |
| `subfwctc`            | R, `0001011`         | 100    | 0000001         | rd = rs1 - rs2                    |
| `mulfwctc`            | R, `0001011`         | 100    | 0000010         | rd = rs1 * rs2                    |
| `divfwctc`            | R, `0001011`         | 100    | 0000011         | rd = rs1 / rs2                    |
| `sqrtfwctc rd,rs1`    | R, `0001011`         | 101    | 0000100         | rd = sqrt_iota(rs1)               |
| `sqrfwctc rd,rs1`     | R, `0001011`         | 101    | 0000101         | rd = rs1^2                        |
| `sqrtbwctc rd,rs1,rs2`| R, `0001011`         | 110    | 0000100         | rd = sqrt_iota_bw(x=rs1, y=rs2)   |
| `sqrbwctc rd,rs1,rs2` | R, `0001011`         | 110    | 0000101         | rd = rs1 ∩ ±sqrt(rs2)             |
| `expfwctc rd,rs1`     | R, `0001011`         | 101    | 0000110         | rd = exp(rs1)                     |
| `logfwctc rd,rs1`     | R, `0001011`         | 101    | 0000111         | rd = log_iota(rs1)                |
| `expbwctc rd,rs1,rs2` | R, `0001011`         | 110    | 0000110         | rd = rs1 ∩ log(rs2 ∩ [0, +inf])   |
| `logbwctc rd,rs1,rs2` | R, `0001011`         | 110    | 0000111         | rd = log_iota_bw(x=rs1, y=rs2)    |
| `cosfwctc rd,rs1`     | R, `0001011`         | 101    | 0001000         | rd = cos(rs1)                     |
| `sinfwctc rd,rs1`     | R, `0001011`         | 101    | 0001001         | rd = sin(rs1)                     |
| `addbwctc1 rd,rs1,rs2,rs3` | R4, `0101011`   | 000    | 00              | rd = rs1 ∩ (rs3 - rs2)            |
| `addbwctc2`           | R4, `0101011`        | 001    | 00              | rd = rs2 ∩ (rs3 - rs1)            |
| `subbwctc1`           | R4, `0101011`        | 000    | 01              | rd = rs1 ∩ (rs3 + rs2)            |
| `subbwctc2`           | R4, `0101011`        | 001    | 01              | rd = rs2 ∩ (rs1 - rs3)            |
| `mulbwctc1`           | R4, `0101011`        | 000    | 10              | rd = rs1 ∩ (rs3 / rs2)            |
| `mulbwctc2`           | R4, `0101011`        | 001    | 10              | rd = rs2 ∩ (rs3 / rs1)            |
| `divbwctc1`           | R4, `0101011`        | 000    | 11              | rd = rs1 ∩ (rs3 * rs2)            |
| `divbwctc2`           | R4, `0101011`        | 001    | 11              | rd = rs2 ∩ (rs1 / rs3)            |

For the two-input primitives, `rs1 = x`, `rs2 = y` and `rs3 = z`, where
`z = x op y`. Backward contractors take three sources, so they need the R4
format (`rs3` in bits 31:27, `funct2` in bits 26:25). An opcode carries only
one instruction format, so the R4 instructions use the second custom opcode.

These encodings come from the design's definition: the custom-0 opcode, and
the R-type codes of the four two-input forward contractors. All other funct
values are this implementation's choice. Any word that is not in the table is
reported as illegal on `instr_illegal` and writes nothing. This includes the
backward codes kept for cos and sin (funct3 110, funct7 8 and 9), which are
not implemented.

### Special cases

* **Empty operands.** An empty source gives an empty result.
* **Division by an interval containing zero.** Only the hull is kept.
  * `divfwctc` returns `[-inf, +inf]`, or the empty set when the divisor is
    exactly `[0, 0]`.
  * The backward contractors that would divide (`mulbwctc1/2`, `divbwctc2`)
    return their operand unchanged. This is a valid contraction, though not
    always the tightest one.
* **Intersections.** An empty intersection sets the `empty` flag, and the
  bounds of an empty result are stored as zero.

### The iota flag and the square root

`sqrt` is only defined on `[0, +inf]`. Intersecting with that domain and
propagating as usual gives wrong results when a contractor is later used to
build its complement: the points below zero disappear silently. The extension
tracks this instead:

* **`sqrtfwctc`** computes the square root of `x ∩ [0, +inf]`. It sets `iota`
  on the result when `x` reaches below zero. An `x` entirely below zero gives
  the empty set, flagged `iota`.
* **`sqrtbwctc`** contracts `x` to `x ∩ [lo(y)^2, hi(y)^2]`, using
  `y ∩ [0, +inf]`.
  * If `y` carries `iota`, the part of `x` below zero is kept rather than
    removed: the result is the hull of the contracted part and
    `x ∩ [-inf, 0]`.
  * The result is flagged `iota` when `x` reaches below zero.

How exactly the flag changes the backward result is this implementation's
reading. The defining description only says that the backward step
"evaluates" the flag and marks intervals partly outside the domain.

The natural logarithm is partial in the same way and is treated the same:
`logfwctc` takes the logarithm of `x ∩ [0, +inf]` (log 0 = -inf) and flags
`x` reaching below zero, and `logbwctc` contracts `x` to
`x ∩ [exp(lo(y)), exp(hi(y))]`, keeping the part of `x` below zero when `y`
is flagged.

Apart from the square root and the logarithm, forward results carry the OR
of their operands' flags. Backward results keep the flag of the operand
being contracted.

### Exponential and logarithm units

Both bound units work in 64-bit fixed point with 50 fraction bits and turn
the result into a bound with the same directed rounding as the other units.
Before rounding, the fixed-point value is widened on each side by a bound on
its evaluation error, so the pair always encloses the true value.

* **exp.** The argument is split as `x = k·ln2 + r` with `|r| <= ln2/2`.
  `e^r` comes from a 12-term Taylor series in Horner form. The result is
  then scaled by `2^k` through the exponent. The two results are at most
  about two units in the last place apart. Results beyond `2^64` go to
  `+inf` (upper bound) or the largest finite number (lower bound). Results
  below `2^-62` go to zero or the smallest normal number.
* **log.** The mantissa is brought into `[1/√2, √2]`. `ln m` comes from the
  series `2·atanh(s)` with `s = (m-1)/(m+1)`, 8 terms. The exponent adds
  `E·ln2`. The widening is an absolute `2^-44`. Far from `x = 1` this is below
  one unit in the last place. Close to `x = 1` (results near zero) the
  bounds are looser in relative terms, though still tight in absolute terms.
  `log 1 = 0` and `log 0 = -inf` are exact. A negative bound gives
  `[-inf, +inf]`; the contractor never passes one in.

Both are single combinational blocks with wide multipliers and a divider.
They are by far the largest parts of the execution unit.

### Cosine and sine

`fp31_cos` evaluates `cos a` or, with `sine = 1`, `sin a` for one bound:

* The argument is split as `a = k·π/2 + r` with `|r| <= π/4`, with `π/2` held
  to 62 fraction bits.
* 9-term Taylor series give `cos r` and `sin r`.
* `k mod 4` picks `±cos r` or `±sin r`. The sine uses `k - 1`, since
  `sin a = cos(a - π/2)`.
* The value is widened by `2^-42` absolute and clipped to `[-1, 1]`.
* Arguments with `|a| >= 64`, and infinities, give `[-1, 1]`. This is valid
  but carries no information.
* Arguments below `2^-12` bypass the series, so that `sin a` keeps full
  relative precision.

`ctc_trig` builds the interval result:

* It takes the hull of the function at both ends of `x`.
* It widens the upper bound to 1 when a maximum lies inside `x`, and the
  lower bound to -1 when a minimum does.
* Extrema are found on the phase `u = x/π` (cos) or `x/π - 1/2` (sin).
  Maxima are at even integers of `u`, minima at odd ones.
* Both phase ends are pushed outward by `2^-30` before the test. An extremum
  very close to an end is therefore included, never missed.

## Microarchitecture and timing

```
 instr ──► xinterval_decoder ──► op, rd, rs1..rs3
                                   │
          xinterval_fregfile ◄─────┘   (3 operand read ports, 1 store read port,
            │ rs1 rs2 rs3               result write port, load write port)
            ▼
          xinterval_unit ── ctc_addsub ── 2 x fp31_add
            │              ctc_mul    ── itv_mul (4 x fp31_mul), itv_div (2 x fp31_div)
            │              ctc_div    ── itv_div, itv_mul
            │              ctc_sqr    ── 2 x fp31_mul, 2 x fp31_sqrt
            │              ctc_sqrt   ── 2 x fp31_sqrt, 2 x fp31_mul
            │              ctc_exp    ── 2 x fp31_exp, 2 x fp31_log
            │              ctc_log    ── 2 x fp31_log, 2 x fp31_exp
            │              ctc_trig   ── 2 x fp31_cos (forward cos/sin)
            └──► result mux ──► written to rd at the next clock edge
```

* **Throughput.** `xinterval_top` accepts one instruction per cycle
  (`instr_valid`/`instr`) and never stalls.
* **Latency.** Decode, register read and execution are combinational. The
  result is written to `rd` at the next rising edge, and `res_valid`,
  `res_rd` and `res_data` show it during the following cycle. The next
  instruction can therefore read the result with no bubble and no bypass
  network.
* **Critical path.** The cost of this simplicity is a long path: register read
  → aligner/normaliser or divider → intersection → result mux. It has not been
  timed. A design that needs a high clock rate would pipeline the units and
  add forwarding or interlocks.
* **Hardware sharing.** Each primitive has its own arithmetic. Only the
  operand buses and the output multiplexer are shared.
* **Loads and stores.** `ld_valid`/`ld_addr`/`ld_data` model the host core
  writing a register (`fld`). `st_addr`/`st_data` read a register for `fsd`.
  A load and an interval result must not target the same register in the same
  cycle. The assertion `a_no_write_clash` checks this; if it happens anyway,
  the interval result wins.
* **Reset.** `rst_n` is active low and synchronous. It clears every register
  to `[0, 0]`.

## Using the primitives: the localisation contractor

A robot at `(x, y)` measures its distance `d` to a landmark at `(xa, ya)`,
with `(x - xa)^2 + (y - ya)^2 ∈ d^2`. The register use below is the one in
`tb/tb_xinterval_top.sv`: `f1 = x`, `f2 = y`, `f3 = xa`, `f4 = ya`, `f5 = d`.

Forward contractor:

```
subfwctc  f6, f1, f3        # DistX = x - xa
sqrfwctc  f8, f6            # DistX^2
subfwctc  f7, f2, f4        # DistY = y - ya
sqrfwctc  f9, f7            # DistY^2
sqrfwctc  f10, f5           # d^2
```

Backward contractor:

```
addbwctc1 f8, f8, f9, f10   # DistX^2 ∩ (d^2 - DistY^2)
addbwctc2 f9, f8, f9, f10   # DistY^2 ∩ (d^2 - DistX^2)
sqrbwctc  f6, f6, f8        # DistX ∩ ±sqrt(DistX^2)
sqrbwctc  f7, f7, f9
subbwctc1 f1, f1, f3, f6    # x ∩ (DistX + xa)
subbwctc1 f2, f2, f4, f7    # y ∩ (DistY + ya)
```

These 11 instructions execute in 11 cycles. Running them for three landmarks,
one after the other, intersects the three ring contractors, because each pass
starts from the box left by the previous one. Three such rounds take the box
`[0, +inf] x [0, +inf]` down to about 0.4 x 0.3 around the true position.
Measurement uncertainty is ±0.05.

Contraction alone stops at a box that still contains every consistent
position. To describe the solution set more finely, the host software
bisects boxes and contracts each half (SIVIA: set inversion via interval
analysis). It drops empty halves and keeps halves that are small enough.
Only the contractor runs on the extension. Each box needs the same ten
registers, and the stack of pending boxes lives in ordinary memory.

## Files

| file                         | contents                                                  |
|------------------------------|-----------------------------------------------------------|
| `rtl/xinterval_pkg.sv`       | formats, encodings, operation enum, rounding and interval helper functions |
| `rtl/xinterval_top.sv`       | the extension: decoder + register file + execution unit   |
| `rtl/xinterval_decoder.sv`   | instruction decoder                                       |
| `rtl/xinterval_fregfile.sv`  | 32 x 64-bit interval register file                        |
| `rtl/xinterval_unit.sv`      | execution unit, result selection                          |
| `rtl/ctc_*.sv`               | contractor primitives                                     |
| `rtl/itv_mul.sv`, `rtl/itv_div.sv` | interval product and quotient                       |
| `rtl/fp31_*.sv`              | bound arithmetic with both directed roundings             |
| `tb/tb_<module>.sv`          | self-checking testbench of each module                    |
| `tb/tb_fp31_pkg.sv`, `tb/tb_asm_pkg.sv` | reference conversions/checks and instruction builders for the testbenches |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`; it has a watchdog. With Verilator 5, run from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/xinterval_pkg.sv tb/tb_fp31_pkg.sv tb/tb_asm_pkg.sv \
    tb/tb_xinterval_top.sv --top-module tb_xinterval_top
./obj_dir/Vtb_xinterval_top
```

Replace the testbench file and top name to run another one. The end-to-end
test `tb_xinterval_top` uses the top at its default (and only) configuration
and runs in well under a second.

How the testbenches check the design:

* **Bound units.** Random operands are compared with results computed in
  double precision. For `+ - * / sqrt` the check requires the tightest
  enclosing pair, not just any enclosure. For `exp`, `log`, `cos` and `sin`
  it requires an enclosure at most two units in the last place wide, or
  (for `log`, `cos` and `sin`) at most `2^-42` or `2^-40` wide in absolute
  terms.
* **Contractors.** Random intervals are checked against a real-number
  reference for enclosure, tightness to a few units in the last place, and the
  empty and iota flags.
* **Top level.** Every instruction of the localisation program is compared
  with a reference, and so is its one-cycle latency. The test also exercises:
  * an inconsistent measurement, which empties the box;
  * both uses of the iota flag;
  * `exp` followed by `log`, which must give the starting interval back;
  * `cos` of `[0, 1]`;
  * a paving (SIVIA) of `[0, 8] x [0, 8]` with distances known to ±0.5.
    The testbench plays the host: it keeps a stack of boxes, bisects the
    wider side of each box, and hands every box to the ring contractor. Boxes
    below 0.25 are kept. The run contracts 77 boxes and keeps 39, and the
    true position must lie in one of them;
  * an unimplemented (backward cos) instruction word, which must be illegal;
  * infinite bounds;
  * dependent instructions issued back to back.

## Limits and departures

* **Not implemented: backward cos and sin.** These need an inverse cosine or
  sine unit. They also need the periodic inverse image of `y`, a union of
  intervals whose hull over `x` must be taken. Their codes decode as illegal.
  The forward contractors are implemented.
* **exp, log, cos and sin are this implementation's own.** Their
  encodings, algorithms and accuracy are not taken from a definition. The
  logarithm, cosine and sine are widened by a fixed absolute amount. That
  is loose in relative terms where the result is close to zero (see above).
* **Register width.** Registers are 64 bits wide, as the D extension requires
  and the interval format needs.
* **Subnormals.** There are none. Tiny values round outward to the smallest
  normal number or inward to zero, which keeps enclosures valid but loses
  some precision near 2^-62.
* **Zero-containing divisors.** Backward contractors that would divide by an
  interval containing zero do not contract. The exact extended division,
  which can give two half-lines, is not implemented.
* **Operand order of `sqrbwctc`.** `sqrbwctc` takes `x` in `rs1` and
  `x^2` in `rs2`, the same order as `sqrtbwctc`.
* **Timing.** The execution unit is a single combinational stage (see
  above). Its frequency and area have not been measured on an FPGA.
