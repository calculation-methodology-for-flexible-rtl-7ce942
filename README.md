# Flexible multiplier: a product whose precision follows the time available

A real-time controller sometimes cannot wait for an exact product. One
example is guidance of a moving object, where the faster the object moves
the less time there is per decision. This multiplier lets the caller trade
precision for delay on every operation. Every block-by-block partial
product is generated in one step from a stored table. The reduction of
those partial products then stops early or runs to the end, depending on a
2-bit selection code. With fewer partial products combined, the result
comes out sooner. It is never larger than the exact product and is short
of it by a known relative amount.

The RTL contains:

* the multiplier itself (`flex_mult`) with its parts: the product table,
  the partial-product arrangement, the carry-save tree with taps, the
  final adder and two result multiplexers;
* an operation control (`op_control`) that maps the speed of the moving
  object to a selection;
* a scalar-product unit (`scalar_product_unit`, the top), which computes
  r·S = rx·sx + ry·sy + rz·sz with one flexible multiplier used three
  times and an accumulating adder.

## Forming a product from k-bit blocks

Operands are unsigned fractions in [0, 1) of n = 4k bits (k = 8, n = 32 by
default). Each is split into four k-bit blocks, A3..A0 and B3..B0.

**Product table (`lut_kmult`).** A read-only table holds the 2k-bit product
of every pair of k-bit numbers. It is addressed by `{x, y}`, so entry
`x·2^k + y` holds `x·y`. At k = 8 that is 65536 words of 16 bits (1 Mbit).
It has 16 asynchronous read ports, one for each pair (Ai, Bj), so all block
products are available after a single table access. The contents are
computed from the formula when the table is initialised; no data file is
involved.

**Partial-product rows (`pp_arrange`).** The 16 products, each at weight
2^(k(i+j)), are packed two per row. The two products in a row never
overlap:

```
bit:   8k        6k        4k        2k        0
row 0  [ A3·B3  ][ A1·B3  ][ A2·B0  ][ A0·B0  ]    first and last row side by side
row 1       [ A3·B0  ][ A1·B0  ]                   offset k
row 2       [ A2·B1  ][ A0·B1  ]                   offset k
row 3            [ A3·B1  ][ A1·B1  ]              offset 2k
row 4            [ A2·B2  ][ A0·B2  ]              offset 2k
row 5                 [ A3·B2  ][ A1·B2  ]         offset 3k
row 6                 [ A2·B3  ][ A0·B3  ]         offset 3k
```

(Rows 1–6 are drawn with the high bits on the left. Each row is a 4k-bit
field at the offset shown.) Generally there are ceil(2n/k) − 1 rows: for
every block Bj, one row with the even-numbered A blocks and one with the
odd-numbered ones. The very last row fits to the left of the first.

**Selections.** The result can be taken after combining only some of the
rows. The rows left out are always the ones of lowest weight:

| selection (`sel_t`) | rows combined  | path                           | mean relative error, k = 8 |
|---------------------|----------------|--------------------------------|----------------------------|
| 1 stage (`SEL_1`)   | 0              | table + mux (no addition)      | ≈ 2^-7                     |
| 2 stages (`SEL_2`)  | 0, 5, 6        | table + 1 CSA + adder + 2 mux  | ≈ 2^-15                    |
| 3 stages (`SEL_3`)  | 0, 3, 4, 5, 6  | table + 3 CSA + adder + 2 mux  | ≈ 2^-23                    |
| 4 stages (`SEL_4`)  | all            | table + 4 CSA + adder + 2 mux  | 0 (exact)                  |

The error column is what the testbenches measure for scalar products of
random fractions. Each extra stage gains about k bits.

**Reduction tree (`csa_tree`, `csa`).** Six carry-save adders produce three
sum/carry taps:

```
L1  a = CSA(row0, row5, row6)   -> tap 2
    b = CSA(row1, row2, row3)
L2  c = CSA(a.s, a.c, row4)
L3  d = CSA(c.s, c.c, row3)     -> tap 3
    e = CSA(c.s, c.c, b.s)
L4  f = CSA(e.s, e.c, b.c)      -> tap 4
```

Row 3 enters twice: once on the short path to tap 3, and once, through
`b`, on the full path. Tap 4 is therefore four CSA levels deep, not five.
The first multiplexer sends one tap to the 8k-bit final adder
(`final_adder`). The second multiplexer chooses between the adder output
and row 0, which is the whole one-stage result and needs no addition.

All internal vectors are 2n bits wide. Carries out of the top bit are
dropped. This is exact: every partial sum is at most the full product,
which fits in 2n bits.

## Timing: selections as multicycle paths

`flex_mult` is purely combinational, so the delay saved by a short
selection is real path delay. In a clocked system, each selection is
treated as a multicycle path. `scalar_product_unit` holds the multiplier
operands in registers. It waits `SEL_CYCLES[sel]` cycles and then lets the
accumulator capture the product. The defaults are 5, 6, 8 and 10 cycles
for 1 to 4 stages. They come from measured FPGA delays for three
multiplications (14.02, 16.07, 23.23 and 28.88 ns), divided by three and
rounded up to a 1 ns clock. These numbers only describe that reference
point. Set `SEL_CYCLES` from the static timing of your own implementation,
and constrain the multicycle paths to match.

## Scalar-product unit (top)

```
speed ──> op_control ──sel──┐
r_vec[c], s_vec[c] ──regs──> flex_mult ──> dot_accumulator ──> result, ovf
                 c = 0,1,2 sequenced, SEL_CYCLES[sel] cycles each
```

Interface (rising edge of `clk`; `rst_n` is asynchronous, active low):

| port       | dir | width  | meaning                                                                  |
|------------|-----|--------|--------------------------------------------------------------------------|
| `start`    | in  | 1      | request. Taken only when `busy` is low; `speed`, `r_vec`, `s_vec` are sampled in that cycle |
| `speed`    | in  | 8      | speed of the object, 0..150 in the application (larger values are allowed) |
| `r_vec`    | in  | 3 × 32 | reference vector, fractions in [0, 1)                                    |
| `s_vec`    | in  | 3 × 32 | position vector                                                          |
| `busy`     | out | 1      | high for exactly 3·`SEL_CYCLES[sel]` cycles after the start cycle        |
| `done`     | out | 1      | one-cycle pulse. A new `start` may be given in this same cycle           |
| `result`   | out | 64     | r·S as a 64-bit fraction, modulo 1.0                                     |
| `ovf`      | out | 1      | the sum reached 1.0 or more (possible, since three products can add to almost 3) |
| `sel_used` | out | 2      | selection used for this result                                           |

The selection is fixed at `start` and used for all three products.

**Operation control (`op_control`).** This is a combinational coder with
three comparators:

| speed     | stages |
|-----------|--------|
| 0 – 31    | 4      |
| 32 – 63   | 3      |
| 64 – 95   | 2      |
| 96 and up | 1      |

A speed exactly on a bound (32, 64 or 96) goes to the faster selection.

**Accumulator (`dot_accumulator`).** An adder and a register in a feedback
loop. `clr` together with `en` loads the first product. `en` alone adds a
product. The carry out of the top bit sets the sticky flag `ovf`.

Two concurrent assertions guard the sequencer:

* the selection does not change while a product is settling;
* `done` never appears while the unit is busy.

Verilator reports `SYNCASYNCNET` for `rst_n` because the assertions'
`disable iff` samples the reset on the clock. This is expected and harmless.

## Other operand sizes

`flex_mult`, `pp_arrange` and `lut_kmult` take `K` and `NBLK` (blocks per
operand, so n = K·NBLK). NBLK may be 1 or any even number. Four blocks use
the six-CSA tree above. Other block counts use a simple chain instead: one
CSA for selection 2, then two CSAs per further selection, each adding that
selection's two rows to the previous tap. The chain is correct at any size
but is not of minimum depth. The selection port is `$clog2(NBLK)` bits
wide. The partial-product counts of the method (1, 3, 7, 15 for k = 8 and
3, 7, 15, 31 for k = 4, at n = 8, 16, 32, 64) are checked by simulation.

Table size grows as 2^(2k) · 2k bits:

| k | table size |
|---|------------|
| 4 | 256 B      |
| 6 | 6 KB       |
| 8 | 128 KB     |

With k = 8 and NBLK = 8 (n = 64, eight selections), measured mean relative
errors over 10^5 independent products are:

| stages | mean relative error |
|--------|---------------------|
| 1      | 2^-5.1              |
| 2      | 2^-11.8             |
| 3      | 2^-19.4             |
| 4      | 2^-27.3             |
| 5      | 2^-35.2             |
| 6      | 2^-43.2             |
| 7      | 2^-51.2             |
| 8      | exact               |

Seven stages reach about the precision of an IEEE 754 double. The
scalar-product unit itself is written for four blocks only.

## How this departs from, or reads, the method it implements

* The wiring between the six CSAs is this design's. It matches the
  method's stated path depths (1, 3 and 4 CSA levels) and its count of six
  adders. All adder inputs are 8k bits wide.
* The scalar-product sequencing, the start/busy/done handshake, the
  registers, the reset, the overflow flag and the cycle counts are this
  design's. The method gives path delays in nanoseconds and gate delays,
  not in clock cycles.
* The method describes a whole arithmetic unit with flexible addition,
  division and square root as well. Only multiplication is worked out in
  enough detail to build, so it is the only operator here.
* The 2^-31 error the method reports for the complete scalar product
  comes from representing real numbers in 32 bits. The RTL works on the
  fixed-point values themselves, so its complete result is exact.
* An experiment that chains 1000 inexact multiplications is not
  reproduced, because the chaining rule is not defined.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_lut_kmult`: all 65536 table entries, spread over all 16 ports.
* `tb_pp_arrange`, `tb_csa`, `tb_csa_tree`, `tb_final_adder`: random and
  extreme vectors against arithmetic identities.
* `tb_flex_mult`: 20000 operand pairs at every selection. Results are
  compared against a reference built from the selection rule, against the
  exact product, and checked for monotonicity.
* `tb_op_control`: every speed from 0 to 255.
* `tb_dot_accumulator`: random clear/enable/data sequences with overflows.
* `tb_scalar_product_unit`: end to end at the default size. It covers
  results, overflow flag, selection and exact busy-cycle counts. It also
  makes every mechanism happen at least once: all four selections,
  overflow, start in the `done` cycle, and start while busy (ignored).
* `tb_table6_workload`: 1000 scalar products per speed interval. Measured
  mean relative errors are 2^-6.7, 2^-14.6, 2^-22.6 and 0. The reference
  values are 2^-6.89, 2^-14.82, 2^-22.97; the check allows ±1.5.
* `tb_table1_configs` (with `tb_flex_cfg_check`): eight sizes of k and n.
* `tb_error_n64`: the n = 64 error profile above.

Simulate with Verilator 5 from the folder that holds `rtl/` and `tb/`.
Name the packages explicitly; every module is found by name through `-y`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/flex_pkg.sv tb/tb_flex_ref_pkg.sv \
  tb/tb_scalar_product_unit.sv --top-module tb_scalar_product_unit -o sim
./obj_dir/sim
```

Every testbench runs the same way with its own file and top module.

## Synthesis notes

The default table is a 1 Mbit ROM with 16 asynchronous read ports. That is
the fastest form, but an expensive one. An implementation can replicate
the table, use k = 4 (256 B), or split the table by operand block. The
multiplier is combinational; pipelining it would turn the variable path
delay into a variable latency, and that is left to the user.
