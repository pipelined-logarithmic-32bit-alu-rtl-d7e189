# 32-bit logarithmic (LNS) ALU: pipelined and non-pipelined cores

A logarithmic number system stores a real number as its sign and the base-2
logarithm of its magnitude. Multiplication, division and square root then
become an integer add, subtract and shift of the logs, one cycle of plain
logic. Addition and subtraction are the hard part. They need
`log2(1 + 2^r)` and `log2(1 - 2^r)`, which this design evaluates by table
interpolation with a parallel error-correction term. The tables live in four
external 32-bit SRAM banks.

The RTL contains two ALU cores built around the same add/subtract datapath:

* **`lns_alu_seq`**: a non-pipelined core. One addition or subtraction at a
  time, 9 or 12 cycles each.
* **`lns_alu_pipe`**: a 3-stage pipelined core. It accepts a new
  addition/subtraction every 5 cycles and returns it 13 cycles later. Up to
  three are in flight.

Both cores also hold a saturating multiply/divide/square-root unit. Fast
combinational multiply/divide/square-root macros (`lns_fast_ops`) can be
placed anywhere next to them. A Horner-polynomial sequencer (`log2int_pipe`)
shows how to keep the pipelined core busy: it interleaves three independent
evaluations.

## Number format

```
 31 | 30 ............ 23 | 22 ................ 0
  S |  log integer part  |  log fraction part
```

* `S`: the sign of the real value (1 = negative).
* Bits 30:0 hold `L = round(2^23 * log2|x|)` as a two's complement number,
  so `x = (-1)^S * 2^(L / 2^23)`. The range is about 2^-128 to 2^128
  (2.9e-39 to 3.4e38). The precision is comparable to IEEE single.
* Two codes are reserved. `0x40000000` is zero and `0xC0000000` is NaN (for
  example the result of a division by zero). Both use the most negative log,
  so the smallest ordinary log is `-2^30 + 1`.
* Every saturating operation returns a 3-bit status,
  `lns_status_t = {nan, underflow, overflow}`. On overflow the result
  saturates to the largest magnitude. On underflow it is flushed to the zero
  code.

The types, codes and table geometry are in `rtl/lns_pkg.sv`.

## Multiply, divide, square root

| operation | log of the result   | sign    |
|-----------|---------------------|---------|
| `a * b`   | `La + Lb`           | `Sa ^ Sb` |
| `a / b`   | `La - Lb`           | `Sa ^ Sb` |
| `sqrt(a)` | `(La + 1) >>> 1`    | `Sa`    |

The square root keeps the sign of its operand; it does not flag negative
operands.

* `lns_fast_ops` is the "fast regular" version. It is combinational, has no
  range checks and wraps, so it is small enough to replicate.
* `lns_muldiv` is the saturating version with status. It handles NaN
  operands, division by zero (NaN), zero operands, overflow and underflow.
  It is fully pipelined with `LATENCY` = 3.

## Addition and subtraction

Let `i` be the larger of the two logs and `j` the smaller, with `r = j - i <= 0`.
Then

```
a + b  (same signs)      ->  L = i + log2(1 + 2^r)
a + b  (different signs) ->  L = i + log2(1 - 2^r)
```

The result takes the sign of the operand with the larger log. For
subtraction, `b` is negated first.

### Datapath

```
          a, b
            |
  [select j <= i ; subtract]          lns_addsub_front
     |  i            | d = i - j = |r|   (d in units of 2^-23)
     |       +-------+---------------+----------------+
     |       | d[27:17] = hi         | d[16:0] = lo   | lo[16:5]
     |   F[hi]  D[hi]   E[hi]        |              P[lo']     <- 4 SRAM banks
     |     |      \       \__________|_______________/
     |     |       D*lo           E*P                 lns_addsub_mult
     |     |        |              |
     |   [ carry-save add: F + D*lo + E*P ]           lns_addsub_sum
     +-->[ carry-save add: ... + i        ]
         [ carry-propagate add, round 35 -> 32 bits, saturate ]
```

How it works:

* `lns_addsub_front` splits `d = |r|` into two parts. The high part `hi`
  (11 bits) selects an interval of width 1/64. The low part `lo` (17 bits) is
  the offset inside that interval.
* Within the interval the function is approximated by the secant
  `F + D * lo`.
* The remaining error has nearly the same parabolic shape in every interval.
  The correction is therefore a product: a per-interval amplitude `E[hi]`
  times a shared shape `P[lo']`, where `lo'` is the top 12 bits of `lo`.
* The two multipliers run in parallel and need no shifter.
* The sum is formed with two carry-save adders and one carry-propagate adder.
  It is 35 bits wide: the sign, the 31-bit log and 3 guard bits. It is then
  rounded (half up) to the 32-bit format.

Cases that need no table are settled in the select step:

* A NaN operand gives NaN.
* A zero operand gives the other operand.
* Exact cancellation gives zero.
* `|r| >= 32` gives the larger operand unchanged, because the correction is
  then below half an ulp.

### Table contents

The host loads the tables into the SRAM banks before use. Each bank is
32 bits wide. The tables are at word `TABLE_BASE` (default 0) of each bank.

Let `g(x) = log2(1 + 2^-x)` (addition) or `log2(1 - 2^-x)` (subtraction).
Interval `k` (0 to 2047) covers `x` from `x0 = k/64` to `x1 = (k+1)/64`, and
`xm` is its midpoint.

| bank | table | address | word |
|------|-------|---------|------|
| 0 | F | `{sub, k}` | `round(g(x0) * 2^26)` |
| 1 | D | `{sub, k}` | `round((g(x1) - g(x0)) / (x1 - x0) * 2^24)` (secant slope) |
| 2 | E | `{sub, k}` | `round(4 * (g(xm) - (F + D * (xm - x0))) * 2^26)` |
| 3 | P | `m` (0..4095) | `round(u (1 - u) * 2^32)`, with `u = (32 m + 16) / 2^17` |

All values are saturated to 32-bit two's complement. Subtraction has a pole
at `x = 0`, so its interval 0 uses `x0 = 2^-12`. Together the tables fill
4 Kwords of each bank: 64 KB in all.

`tb/lns_tb_pkg.sv` computes exactly these formulas (`tab_word`).

### Accuracy

Measured against a real-arithmetic reference with the correctly rounded log:

* Addition: within 1 ulp over the whole range.
* Subtraction with `|r| >= 1`: within 1 ulp.
* Subtraction with `|r| < 1` (near cancellation): the uniform intervals are
  too coarse near the pole, so the error grows as `|r|` shrinks:

  | `|r|` | error |
  |-------|-------|
  | 1/2 to 1 | about 6 ulp |
  | 1/4 to 1/2 | about 45 ulp |
  | 1/8 to 1/4 | about 330 ulp |
  | 1/16 to 1/8 | about 2300 ulp |
  | 1/64 to 1/32 | about 7e4 ulp |
  | below 1/64 | much larger; the result is not usable as a log |

  Measured as an absolute error relative to the larger operand, it stays
  below about 2^-13 for `|r| >= 1/64` and below 1% for `|r| < 1/64`.

Full single-precision subtraction near cancellation would need
approximation intervals chosen non-uniformly near `r = 0`. That interval
selection is not part of this RTL. Only the table contents and the
`hi`/`lo` split would change; the datapath would not.

## The non-pipelined core: `lns_alu_seq`

One input channel (`in_valid`/`in_ready`, `in_op`, `in_a`, `in_b`) carries
all five operations.

An addition or subtraction runs through the shared datapath, sequenced by a
cycle counter:

| cycle | step |
|-------|------|
| 1-2 | select and subtract |
| 2 | table read, one word from each bank |
| 3 | capture the table words |
| 4-7 | multiply |
| 8-11 | add, round and saturate |

The result comes with a one-cycle `add_valid` pulse:

* 12 cycles after acceptance when the tables are used.
* 9 cycles after acceptance when they are not (special operands or
  `|r| >= 32`).

While an addition or subtraction runs, `in_ready` is low for further
additions and subtractions. Multiply, divide and square root are always
accepted and answer on `mul_valid` 3 cycles later.

## The pipelined core: `lns_alu_pipe`

The add/subtract path is three blocks, each holding one operation:

| block | cycles | work |
|-------|--------|------|
| 1 | 5 | select, subtract, special cases; one read per table bank as the operation leaves |
| 2 | 5 | capture the table words, form `D*lo` and `E*P` |
| 3 | 3 | carry-save and carry-propagate adds, round, saturate; then hold the result |

An operation leaves a block after its cycle count, as soon as the next block
is free. This gives:

* Results appear on `add_valid` 5 + 5 + 3 = **13 cycles** after acceptance,
  and stay there until `add_ready` (the `result()` read).
* With the result side ready, a new addition/subtraction is accepted **every
  5 cycles**.
* **Stall rule:** the pipe holds three operations. If three additions have
  been issued and no result has been read, block 3 is full, block 2 cannot
  drain and block 1 stays occupied. `in_ready` then stays low for a fourth
  addition until a result is read. A caller that issues four additions before
  reading a result deadlocks itself. Read a result at least every third
  issue.

The saturating MUL/DIV/SQRT unit shares the input channel. It takes an
operation in any cycle and answers on `mul_valid` after 3 cycles,
independently of the additions in flight. `empty` is high when no
addition/subtraction is inside.

Assertions check the channel rules: an offer is held until it is taken, and
a result is held until it is read.

### SRAM interface (both cores)

Each core has its own port to four banks: `sram_en[3:0]`,
`sram_addr[4][19]` and `sram_rdata[4][32]`. The banks are 512 Kwords each.

* Bank 0 holds F, bank 1 D, bank 2 E and bank 3 P.
* Reads are synchronous: the address and enable are sampled on a clock edge,
  and the word is valid in the next cycle.
* Only the low 12 address bits vary. The upper bits are set by `TABLE_BASE`,
  which leaves the rest of each bank free.

## Polynomial macro: `log2int_pipe`

The macro evaluates `y = k0 + x(k1 + x(k2 + x(k3 + x(k4 + k5 x))))` for a
block of three LNS inputs. This is the polynomial core of a log-to-fixed-point
conversion.

* Each Horner step is one fast multiply (`lns_fast_ops`, combinational, in
  front of the ALU input) followed by one addition issued to the pipelined
  core.
* The three elements are interleaved. Issue `t` belongs to element `t mod 3`,
  and it waits only for the result of issue `t - 3`. This keeps all three
  pipe blocks busy.
* A block of three takes **85 cycles**. The same 15 additions done one after
  another on the non-pipelined core take 195 cycles.
* The coefficients are inputs.
* The output is the LNS value of the polynomial. Packing it into a 24-bit
  integer word and extending the input range to (-1, 1) are not part of this
  RTL.

In `lns_alu_top` the macro shares the pipelined core's channel:

* A start is taken only when the pipe is empty and no external operation is
  offered in that cycle.
* While `l2i_busy` is high, the external `pipe_in_ready` is low and all
  add/sub results go to the macro.

## Top level: `lns_alu_top`

The top holds the two cores side by side, each with its own channel, result
ports and SRAM port. The signal groups are:

* `seq_*`: the non-pipelined core.
* `pipe_*`: the pipelined core.
* `l2i_*`: the polynomial macro.

The top has no parameters. The SRAM banks and their loading are outside the
design.

## Files

| file | contents |
|------|----------|
| `rtl/lns_pkg.sv` | format, status, opcodes, table geometry |
| `rtl/lns_addsub_front.sv` | select/subtract, special cases, table addresses |
| `rtl/lns_addsub_mult.sv` | the two table multipliers |
| `rtl/lns_addsub_sum.sv` | carry-save adders, final adder, rounding, saturation |
| `rtl/lns_csa.sv` | 3:2 carry-save adder |
| `rtl/lns_muldiv.sv` | saturating mul/div/sqrt with status |
| `rtl/lns_fast_ops.sv` | fast mul/div/sqrt |
| `rtl/lns_alu_seq.sv` | non-pipelined core |
| `rtl/lns_alu_pipe.sv` | pipelined core |
| `rtl/log2int_pipe.sv` | Horner sequencer on the pipelined core |
| `rtl/lns_alu_top.sv` | top level |
| `tb/lns_tb_pkg.sv` | table formulas, real-arithmetic reference models |
| `tb/lut_sram_model.sv` | behavioural SRAM bank that fills itself with its table |
| `tb/tb_*.sv` | self-checking testbenches, one per block, plus the examples |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a hung run. Example, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/lns_pkg.sv tb/lns_tb_pkg.sv rtl/*.sv tb/lut_sram_model.sv \
  tb/tb_lns_alu_top.sv --top-module tb_lns_alu_top -Mdir obj_top
./obj_top/Vtb_lns_alu_top
```

Replace the testbench file and top module name to run another one:

| testbench | what it checks |
|-----------|----------------|
| `tb_lns_addsub` | the add/subtract datapath alone, over 32k vectors with sweeps over the whole table range; prints the worst errors |
| `tb_lns_muldiv` | the saturating unit |
| `tb_lns_fast_ops` | the fast macros |
| `tb_lns_alu_seq` | the non-pipelined core: results and the 9/12-cycle latency |
| `tb_lns_alu_pipe` | the pipelined core: 13-cycle latency, 5-cycle issue interval, the stall of a fourth addition, random traffic with back-pressure |
| `tb_log2int_pipe` | the polynomial macro, 85 cycles per block |
| `tb_example1_seq` | the same polynomial issued sequentially on the non-pipelined core |
| `tb_example_loop_seq` | an 8-iteration loop with an addition on the non-pipelined core and a square root and two multiplies on fast macros beside it |
| `tb_lns_alu_top` | both cores at once plus the macro, at the top's only configuration; counts every mechanism (stall, busy, bypass and table paths, overflow, underflow, NaN, channel hand-over) and fails if one never happened |

The reference models in `tb/lns_tb_pkg.sv` work on real numbers
(`$ln`, `$pow`). They do not reuse the RTL.

## Design choices and departures

The following match the original description of these cores:

* the number format and its special codes;
* the shape of the add/subtract datapath: four tables, two multipliers, two
  carry-save adders, one carry-propagate adder and a 35-bit internal word;
* the 4 x 4 Kword external table storage;
* the 5 + 5 + 3 cycle pipe with room for three operations;
* the 9-12 cycle non-pipelined add;
* the 3-cycle MUL/DIV/SQRT unit beside the pipe;
* the three-way interleaved Horner evaluation.

These points are this design's own choices:

* **Table scheme:** uniform 1/64 intervals with a secant plus a
  parabola-shaped correction. The organisation, the table sizes (4 x
  4 Kwords) and the datapath shape are fixed. The interval selection was
  chosen to fit them, and it limits subtraction accuracy near cancellation
  (see Accuracy).
* **Cycle budgets:** what each pipe block does inside its 5/5/3 cycles, and
  which cases take 9 rather than 12 cycles in the non-pipelined core.
* **Interfaces:** the valid/ready handshakes, the single input channel with
  an opcode, the one-cycle SRAM read latency and the bank order.
* **Status:** the 3-bit encoding, round-half-up rounding, and the saturation
  and flush-to-zero behaviour.
* **Sign of products and quotients:** exclusive-or of the operand signs.
* **Saturating MUL/DIV/SQRT latency:** 3 cycles in both cores.
* **Polynomial block time:** 85 cycles, a few more than an ideal
  hand-scheduled sequence (about 79), because each issue waits for a
  complete result read.

Not provided as RTL:

* the integer-to-log conversion;
* the final packing of the polynomial result into an integer word;
* the board SRAM and its host-side loader.
