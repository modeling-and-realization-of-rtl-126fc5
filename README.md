# Radix-4 ISD unit: inverse square root, square root and division in one recurrence

This is a floating-point unit for IEEE-754 single precision that computes
`x / h`, `sqrt(x)` and `1 / sqrt(h)` with one shared datapath. It rests on one
observation: the digit recurrence for the inverse square root,

```
w(k+1) = 4 w(k) - B(k) r(k+1) - C(k) r(k+1)^2
B(k+1) = B(k) + 2 r(k+1) C(k)
C(k+1) = C(k) / 4
R(k+1) = R(k) + r(k+1) 4^-(k+1)
```

already contains both other operations. Set `C(0) = 0` and it becomes SRT division by
`B`. Set `B(0) = R(0)` and drop the operand from `C` and it becomes a square root. So
all three operations share the same registers, the same adders and the same
digit-selection table. Only three things differ between them: the start values, the
number of iterations, and the final shift.

Each clock cycle retires one radix-4 digit `r` in {-2, -1, 0, 1, 2}, which is two
result bits. An operation takes 16 clocks for division, 15 for the square root and 14
for the inverse square root, from the start edge to `done`.

## How each operation is mapped onto the recurrence

The operand is scaled first, so that the result `R(N)` and the value `B` stay in the
ranges the selection table was made for (`B` in [0.5, 1)). Below, `x` and `h` are the
significands (1.f, in [1, 2)). `Ex` and `Eh` are the unbiased exponents.

| | DIV `x/h` | SQRT `sqrt(x)` | ISQRT `1/sqrt(h)` |
|---|---|---|---|
| what `R` converges to | `(x/8)/(h/2)`, in [1/8, 1/2) | `sqrt(y)`, y = x/4 (Ex even) or x/2 (Ex odd), in [1/2, 1) | `1/sqrt(g)`, g = h/4 (Eh even) or h/2 (Eh odd), in (1, 2] |
| `w(0)` | `x/8` | `(y - 1)/2` | `(1 - g R(0)^2)/2` = `(1-h)/2` or `(1-h/2)/2` |
| `B(0)` | `h/2` | `1` | `g R(0) = h/2` |
| `C(0)` | `0` | `1/8` | `g/8` |
| `R(0)` | `0` | `1` | `2` (Eh even) or `1` (Eh odd) |
| iterations N | 14 = ceil((24+3)/2) | 13 = ceil((24+1)/2) | 12 = ceil(24/2) |
| final shift | `4R` if R >= 1/4, else `8R` | `2R` | none; R = 2 becomes 1.0 with exponent + 1 |
| exponent | `Ex - Eh`, minus 1 when the shift was 3 | `floor(Ex/2)` | `-(Eh+1)/2` (odd), `-(Eh+2)/2` (even) |

Why the residual stays bounded for the inverse square root: the residual is
`w(k) = 4^k (1 - g R(k)^2) / 2`. Then `B(k) = g R(k)` tends to `sqrt(g)`, which lies
in [0.5, 1). So `w` acts like the partial remainder of a division by `B`. The
`C r^2` term is the second-order part of `(R + r 4^-(k+1))^2`. The square root works
in the same way with `w = 4^k (y - R^2)/2` and `B = R`.

## The datapath, one cycle

```
         +------------------- r(k+1) (register) -------------------+
         |                                                          |
  ws,wc -+-> <<2 -+                                                 |
  B ------mux(0,B,2B) ---+-> 4:2 compressor -> ws,wc(k+1) ----------+--> registers
  C ------mux(0,C,4C) ---+           \-> 7-bit CPA -> 4w~ -+        |
  B,C ----mux(0,2C,4C) --> carry-select adder -> B(k+1) ---+--------+
                      \--> 8-bit CPA -> B~ ----------------+        |
  C ----> >>2 -> C(k+1)                                    v        |
  Q,QM -> on-the-fly conversion -> Q,QM(k+1)      converter -> selection ROM -> r(k+2)
```

* **Residual step** (`isd_w_rec`). The residual is kept in carry-save form: a sum
  vector `ws` and a carry vector `wc`. Both are shifted left by two places. The
  multiples `B r` and `C r^2` come from multiplexers. A subtracted multiple is
  inverted, and its `+1` is put into bit 0 of one of the shifted residual vectors,
  which the shift left empty. A 4:2 compressor adds the four vectors. No carry
  propagates across the full width.
* **B and C step** (`isd_bc_rec`). `2rC` is selected from {0, 2C, 4C}, inverted for
  a negative digit (with the carry-in as `+1`), and added to `B` in a 53-bit
  carry-select adder (`csel_adder`, 8-bit blocks). `C/4` is only wiring.
* **Retimed selection.** The next digit is selected at the end of the cycle in
  which `w(k+1)` and `B(k+1)` are formed, not at the start of the next cycle. Two
  short adders give the estimates the table needs:
  * a 7-bit adder over the top bits of the new `ws` and `wc` gives `4w~` in 1/16
    units (format `III.FFFF`);
  * an 8-bit adder over the top bits of `B` and `2rC`, running beside the wide
    adder, gives `B~` in 1/32 units (format `I.FFFFF`).

  Both estimates are truncations. `4w~` can be up to 2/16 below the true value, and
  `B~` up to 1/32 below.
* **On-the-fly conversion** (`isd_otf`). This turns the signed digits into `R`
  without carry propagation. It keeps `Q = R(k)` and `QM = R(k) - 4^-k`. Each digit
  only fills in the two empty bits of weight `4^-(k+1)`.
* **Phases** (`isd_ctrl`):
  * Phase 1 (`isd_init`) loads the start values. It selects `r(1)` from the same
    kind of estimates: `m/2` and `-v/2` pass a 4:2 compressor and the 7-bit adder.
  * Phase 2 is the N iterations.
  * Phase 3 (`isd_round`) assimilates the last residual. A negative residual means
    `R(N)` is one unit too large, and `QM` is used instead of `Q`. A non-zero
    residual is the sticky bit. The result is then shifted, rounded to nearest even
    and packed.

## The selection table

The digit is chosen by comparing `4w~` with four thresholds, picked by the column
`B~` (16..31 for `B` in [0.5, 1)):

```
r = 2 if 4w~ >= m(2);  1 if >= m(1);  0 if >= m(0);  -1 if >= m(-1);  else -2
```

This is the part of the design that needs the most care. The thresholds in
`isd_sel_table` come from a published modified table that was found by trial and
error. Four of its cells were changed back to the values of the unmodified table:

| column B~ | threshold | modified table | used here |
|---|---|---|---|
| 20 | m(-1) | -18 | -16 |
| 21 | m(-1) | -18 | -17 |
| 23 | m(0) | -8 | -7 |
| 28 | m(-1) | -20 | -21 |

With this datapath's estimates, each of those four cells lets the residual leave its
bound `|w| <= 2/3 B` for some operands, and the result is then wrong. Table cells are
checked against `(k +- 2/3) B` and against how far the estimates can be off.

All other changes of the modified table against the unmodified one are kept:
m(-1) = -18 at column 22, -20 at columns 26 and 27; m(0) = -6 at column 18, -8 at
column 24; m(1) = 5 at column 24; and the lower m(2) values at columns 19, 24 and 28
to 30.

The published table has no column for `B~ >= 1`. The square root needs one, because
it starts at `B(0) = 1` and keeps `B = 1` for as long as the digits are zero. This
design adds a column `(-22, -9, 8, 22)` for that case. It also uses `m(-1) = -20` for
the first digit only, because there `C(0) = 1/8` moves `B` a long way in one step. No
single value of `m(-1)` works for both the first and later steps. If `B~` is ever
below 0.5, column 16 is used.

The table input is reduced as follows (`isd_sel_conv`). No threshold exceeds 24 in
magnitude, so any estimate with `|4w~| >= 32` is passed on as +-25. That case is
detected from the top bits alone, and only the low bits are range-checked.

The table with these changes was checked with a bit-exact model of this datapath
(same widths and truncations) on tens of thousands of random and edge-case operands.
The RTL was then run on 1.8 million random operations: 150,000 of each kind under
each of four seeds. All results were correctly rounded. This is strong evidence, not
a proof. No formal bound was derived for the combined table.

## Number formats

* `B`, `C` and the residual vectors: 53 bits, two's complement, 50 fraction bits
  (`ISD_W`, `ISD_F` in `isd_pkg`). The last `C` term of the inverse square root
  weighs 2^-50. With fewer fraction bits the final residual is not exact, and its
  sign and zero test (correction and sticky bit) can be wrong. Three integer bits
  hold `4w` in (-4, 4).
* `Q` and `QM`: 31 bits, 28 fraction bits (14 digits of 2 bits), plus sign room for
  `QM = -1` at the start of a division.

## Interface and timing (`isd_unit`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk_i`, `rst_ni` | in | 1 | clock; synchronous active-low reset |
| `din_i` | in | 32 | the single operand port |
| `ld_x_i`, `ld_h_i` | in | 1 | write `din_i` into the x or the h register |
| `op_i` | in | 2 | 0 DIV (`x/h`), 1 SQRT (`sqrt x`), 2 ISQRT (`1/sqrt h`) |
| `start_i` | in | 1 | start; sampled only while not busy |
| `result_o` | out | 32 | IEEE single result, held until the next operation ends |
| `flags_o` | out | 5 | `{invalid, div_zero, overflow, underflow, inexact}` |
| `busy_o` | out | 1 | operation running; loads and starts are ignored |
| `done_o` | out | 1 | one-cycle pulse: `result_o`/`flags_o` are new |

The sequence for one operation is:

1. Load the operands in any order. A division needs both x and h. The square root
   uses x, and the inverse square root uses h.
2. Raise `start_i` with `op_i` for one cycle.
3. `done_o` comes N + 2 clock edges after the start edge: 1 cycle for phase 1, N
   iterations, and 1 cycle for phase 3. One operation runs at a time.

## Exceptions and IEEE details

These are choices of this design:

* **Rounding.** Round to nearest, ties to even. An exact tie cannot occur for these
  three operations.
* **Subnormals.** Subnormal operands are treated as zero. Results below the normal
  range become a signed zero, with the underflow and inexact flags set.
* **Overflow.** Results above the range become infinity, with the overflow and
  inexact flags set. Only division can leave the range.
* **Special operands.** These follow IEEE-754. Any NaN operand, 0/0, inf/inf and the
  root of a negative number give the quiet NaN `0x7FC00000` with the invalid flag.
  For example, `sqrt(-5612)` and `1/sqrt(-11111)` both give this NaN. Other cases:
  * `x/0` gives infinity with the division-by-zero flag;
  * `1/sqrt(+-0)` gives +-infinity with the division-by-zero flag;
  * `sqrt(-0)` gives -0;
  * `1/sqrt(+inf)` gives +0.

  The recurrence still runs its full length for special operands, so the latency is
  the same.
* **Rounding carry-out.** The rounding step keeps the carry-out case for safety.
  These operations never round up to the next power of two, so that case does not
  occur.

## Where this design departs from its source description

* **Recurrence width.** The adders are 53 bits wide where the source quotes 51. The
  reason is given under Number formats.
* **Selection table.** Four cells are changed and a column for `B~ >= 1` is added.
  See the selection-table section above.
* **Odd-exponent `w(0)` for the inverse square root.** Two forms appear in the
  source: `(1 - h/4)/2` and `(1 - h/2)/2`. The second is used, because only it
  matches `g = h/2, R(0) = 1`. The first gives wrong results.
* **Details the source does not give.** These were chosen here:
  * the interface handshake: load strobes, `busy`/`done` and the flags;
  * the state machine;
  * the on-the-fly conversion (the source only names a conversion step);
  * the compressor and adder structures;
  * all exception encodings.
* **Shifts.** Shifts of operands are done by wiring, not by shift registers.
* **Scope.** The FPGA-specific results (slice counts, 12.4 ns period) are not
  targets here. Generic synthesis gives about 390 flip-flop bits.

## Files

`rtl/` (all synthesizable):

| file | block |
|---|---|
| `isd_pkg.sv` | types, operation codes, widths, iteration counts |
| `isd_unit.sv` | top: operand registers, recurrence registers, wiring |
| `isd_ctrl.sv` | IDLE / INIT / ITER / FINAL sequencer |
| `isd_unpack.sv` | IEEE field split and classification |
| `isd_init.sv` | phase-1 start values and first estimates |
| `isd_w_rec.sv` | residual step with 4:2 compressor and 7-bit estimate adder |
| `isd_bc_rec.sv` | B and C step with carry-select adder and 8-bit estimate adder |
| `isd_csa42.sv` | 4:2 compressor |
| `csel_adder.sv` | carry-select adder |
| `isd_sel_conv.sv` | saturating table-input converter |
| `isd_sel_table.sv` | digit selection ROM |
| `isd_otf.sv` | on-the-fly conversion |
| `isd_exp.sv` | result exponent |
| `isd_except.sv` | special operands |
| `isd_round.sv` | phase 3: correct, normalize, round, pack |

`tb/` has one self-checking testbench per block, `tb_<module>.sv`, and these:

* `isd_tb_pkg.sv` is the reference checker. It tests whether a result is the
  correctly rounded value using integer arithmetic only, by bracketing the exact
  value between the two rounding midpoints.
* `tb_isd_unit.sv` is the end-to-end test at the default configuration. It runs
  100,000 random operations of each kind and the special cases. Set the count with
  `+N=` and the seed with `+SEED=`. It checks every latency, and it fails if any
  datapath mechanism was never exercised: each digit value, the correction, both
  division shifts, R = 2, the `B~ >= 1` column, converter saturation,
  overflow, underflow and each exception.
* `tb_isd_workloads.sv` runs twelve demonstration operand sets, among them
  `1.1/0.13`, `sqrt(132)` and `1/sqrt(0.0013245)`.

Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/isd_pkg.sv tb/isd_tb_pkg.sv tb/tb_isd_unit.sv --top-module tb_isd_unit
./obj_dir/Vtb_isd_unit +N=2000
```

The block testbenches build in the same way, with their own file and top module.
Lint a module with `verilator --lint-only -Wall -Irtl rtl/isd_pkg.sv rtl/<module>.sv`.

To change the selection thresholds, edit `TABLE` in `isd_sel_table.sv` and the
matching reference rows in `tb/tb_isd_sel_table.sv`. Then run `tb_isd_unit` with a
large `+N=`: a threshold that is too tight shows up as a wrong result within a few
thousand operations.
