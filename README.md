# A 32-bit LNS adder/subtractor with second-degree Newton interpolation

In a logarithmic number system (LNS) a real number is stored as its sign and
log2 of its magnitude. Multiplication and division then become fixed-point addition
and subtraction of the logs. Addition and subtraction become the hard operations.
For |x| >= |y|, with i = log2|x|, j = log2|y| and r = i - j >= 0:

    log2(|x| + |y|) = i + Fa(r),   Fa(r) = log2(1 + 2^-r)
    log2(|x| - |y|) = i + Fs(r),   Fs(r) = log2(1 - 2^-r)

Both functions are non-linear. A plain lookup table at full precision would be far
too large. This unit approximates them with a **second-degree Newton
divided-difference interpolator**. That keeps the tables small (256 words per
segment) without the error-correction tables a first-degree interpolator needs.
Near r = 0, Fs(r) goes to minus infinity and cannot be interpolated. That region,
0 < r < 2, is handled instead by a **second-order co-transformation** with three
further 256-word tables. The result is better than floating point: over 400,000
random operations, the relative error of every result stays below 0.5 units of
2^-23, which is the worst-case rounding error of a float with a 23-bit fraction.

The RTL is synthesizable SystemVerilog with no vendor macros. Every table is
computed at elaboration from its formula, so no data files are needed.

## Number format

| bits  | meaning |
|-------|---------|
| 31    | sign of the value (1 = negative) |
| 30:0  | log2 of the magnitude, two's complement, 8 integer bits (sign included) and 23 fraction bits |

The log code `31'h4000_0000` (the most negative one) stands for zero. The other codes
cover magnitudes from about 2^-128 to 2^128 with a constant relative step of 2^-23 in
the log. Inside the unit every log carries 4 guard bits, so it works at a resolution
of 2^-27. The result is rounded to nearest only once, at the end.

## How r selects the method

`lns_addsub` decodes the operands. It sets i to the larger log and j to the smaller,
computes r = i - j, and works out whether the magnitudes are effectively added or
subtracted (`op` XOR both signs). It then picks one of these paths:

| case | method | result |
|------|--------|--------|
| either operand zero | pass the other one (sign flipped for `a - b`) | exact |
| subtraction, r = 0 | exact cancellation | zero |
| r >= 32 | F(r) is below 2^-31 and rounds away | the larger operand |
| addition, 0 <= r < 32 | Fa interpolator, 6 segments | i + Fa(r) |
| subtraction, 2 <= r < 32 | Fs interpolator, 4 segments | i + Fs(r) |
| subtraction, 0 < r < 2 | co-transformation | j + log2(2^r - 1) |

The sign of the result is the sign of the term with the larger magnitude.

## Second-degree Newton interpolation (`lns_ndd_interp`, `lns_fds_rom`)

The range 0 <= r < 32 is cut into power-of-two segments:
[0,1), [1,2), [2,4), [4,8), [8,16) and [16,32). Each segment holds 256 equal intervals
of width h (h = 2^-8 in the first two segments and 2^(s-8) in segment [2^s, 2^(s+1))).
For an interval starting at r0, with r1 = r0 + h and r2 = r0 + 2h, the Newton quadratic is

    f2(r) = f(r0) + Df0 (r - r0) + D2f0 (r - r0)(r - r1)
    Df0  = (f(r1) - f(r0)) / h
    D2f0 = (Df1 - Df0) / (r2 - r0)

The hardware writes r = r0 + t·h with 0 <= t < 1 and stores the coefficients already
multiplied by h and h^2:

    F = f(r0)
    D = f(r1) - f(r0)
    S = (f(r2) - 2 f(r1) + f(r0)) / 2
    f2 = F + D·t - S·t(1 - t)

With this scaling one datapath serves every segment. No division is needed and the
coefficients are small numbers.
- **Segment decode.** The segment is the leading one of the integer part of r.
- **Table address.** The 8 bits just below that leading one address the tables.
  In segment [0,1) they are the top 8 fraction bits.
- **t.** The remaining bits, shifted left to 23 bits, form t. The argument has 27
  fraction bits, so no bit of r is lost.
- **Arithmetic.** Two multipliers, D×t (22×23 bits) and S×t(1-t) (14×47 bits), are
  each rounded to 2^-27 and added to F.

The segment [16,32) has no S table. There the curvature term stays below a few units
of 2^-27, so S reads as zero.

| table | addition (Fa) | subtraction (Fs) | word |
|-------|---------------|------------------|------|
| F | 6 × 256 | 4 × 256 (from r = 2) | 29 bits |
| D | 6 × 256 | 4 × 256 | 22 bits |
| S | 5 × 256 | 3 × 256 | 14 bits |
| bits | 96,256 | 62,976 | |

The interpolator is fully pipelined. It takes one argument per cycle and returns the
result two cycles later: a synchronous table read, then evaluation into a register.
Against log2(1 ± 2^-r) computed in double precision, its error is at most 2.6 units of
2^-27.

## Second-order co-transformation (`lns_cotrans`, `lns_cotrans_rom`)

For 0 < r < 2, the unit uses

    log2(|x| - |y|) = j + T,   T = log2(2^r - 1)

T goes to minus infinity as r -> 0: about -23.5 at the smallest r of 2^-23. So T is
not interpolated. It is assembled from the three 8-bit fields of r:

    r = a·2^-7 + b·2^-15 + c·2^-23      (a, b, c in 0..255; 24 bits, 0 < r < 2)

    F1[a] = log2(2^(a·2^-7) - 1)
    F2[b] = log2(2^(b·2^-15) - 1)
    F3[c] = log2(2^(c·2^-23) - 1)

It uses the identity 2^(p+q) - 1 = (2^p - 1) + 2^p (2^q - 1), applied twice:

    L = log2(2^(b·2^-15 + c·2^-23) - 1) = F2[b]  (+)  (b·2^-15 + F3[c])
    T = log2(2^r - 1)                   = F1[a]  (+)  (a·2^-7  + L)

Here u (+) v = max(u,v) + Fa(|u - v|) is an ordinary LNS addition, evaluated on the
same Fa interpolator that additions use. No extra interpolation tables are needed.
Both steps add positive quantities, so there is no cancellation anywhere in the
critical region. The final sum j + T is exact apart from table rounding.

A field that is zero drops out of the formula. A transformation therefore needs 0, 1
or 2 passes through the interpolator:
- r with one non-zero field reads T straight from a table.
- r with two non-zero fields needs one addition.
- r with all three fields non-zero needs two additions.

A small state machine sequences the steps:
1. Read all three tables (one cycle).
2. Do the inner addition, if one is needed.
3. Do the outer addition, if one is needed.

The state machine borrows the Fa interpolator through a request port. The top level
gives it that port only while no ordinary addition is in flight. An assertion checks
that both never request in the same cycle.

## Interface and timing (`lns_addsub`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | operand handshake; `in_ready` is high while idle |
| `in_a`, `in_b` | in | 32 | operands |
| `in_op` | in | 1 | 0: a + b, 1: a - b |
| `out_valid` / `out_ready` | out / in | 1 | result handshake; the result is held until taken |
| `out_y` | out | 32 | result |
| `out_ovf` | out | 1 | magnitude too large, saturated to the largest code |
| `out_unf` | out | 1 | magnitude too small, returned as zero |

One operation is in flight at a time. Cycles from the cycle in which `in_valid` and
`in_ready` are both high to the one in which `out_valid` is high:

| path | cycles |
|------|--------|
| zero operand, cancellation, r >= 32 | 1 |
| interpolated addition or subtraction | 3 |
| co-transformation with 0 / 1 / 2 inner additions | 4 / 6 / 8 |

## Accuracy

Measured by `tb_lns_accuracy` on 200,000 additions and 200,000 subtractions. The
operands are spread over all segments and densely over 0 < r < 2. The relative error
is (result - exact) / exact, in units of 2^-23:

| | largest positive | largest negative |
|---|---|---|
| addition | +0.439 | -0.382 |
| subtraction | +0.438 | -0.407 |

In the log domain, the worst error seen in `tb_lns_addsub` is 0.63 units of 2^-23.
Of that, 0.5 is the final rounding and the rest comes from the tables and the
products.

## Where this implementation makes its own choices

The following follow the method this design is built on:
- the second-degree Newton interpolator with F, D and S tables and no error-correction
  tables;
- 256 words per segment, six addition segments and four subtraction segments;
- no S table for 16 <= r < 32;
- 4 guard bits;
- co-transformation over the extended range 0 < r < 2, with three 256-word tables
  F1, F2, F3.

The rest is this implementation's own:
- **What the co-transformation tables hold, and the decomposition above.** The method
  fixes the tables' count, size and range, not their contents. The 3 × 8-bit cut of a
  24-bit r is the natural reading of three 256-word tables over 0 < r < 2.
- **The divisor of the second divided difference.** It is taken as (r2 - r0), the
  standard Newton form. Only with that divisor does the quadratic pass through f(r2).
- **Table word widths.** They are F 29, D 22, S 14 and F1/F2/F3 33 bits, for 184,576
  bits in all. The organisation this design follows totals 173,056 bits with narrower
  words.
- **Scaling of D and S.** They are stored multiplied by h and h^2.
- **The number layout and special values.** This covers the zero code, saturation on
  overflow, flush to zero on underflow and round to nearest.
- **Sequencing.** This covers the handshake, the multi-cycle sequencing and the
  sharing of one Fa interpolator between additions and the co-transformation.

## Files

| file | contents |
|------|----------|
| `rtl/lns_pkg.sv` | format constants, widths, types, table-generating functions |
| `rtl/lns_fds_rom.sv` | F, D, S tables of one function |
| `rtl/lns_ndd_interp.sv` | second-degree Newton interpolator |
| `rtl/lns_cotrans_rom.sv` | co-transformation tables F1, F2, F3 |
| `rtl/lns_cotrans.sv` | co-transformation sequencer |
| `rtl/lns_addsub.sv` | top level: decode, path select, rounding, handshake |
| `tb/tb_lns_fds_rom.sv` | every table word against its formula |
| `tb/tb_lns_ndd_interp.sv` | interpolator error and latency, both functions |
| `tb/tb_lns_cotrans_rom.sv` | every co-transformation table word |
| `tb/tb_lns_cotrans.sv` | T = log2(2^r - 1) error and latency, all field patterns |
| `tb/tb_lns_addsub.sv` | end to end: all paths, special values, back-pressure, latency |
| `tb/tb_lns_accuracy.sv` | relative-error sweep against the 0.5 floating-point bound |

Each testbench checks itself and ends with a line `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/lns_pkg.sv rtl/lns_fds_rom.sv rtl/lns_ndd_interp.sv \
        rtl/lns_cotrans_rom.sv rtl/lns_cotrans.sv rtl/lns_addsub.sv \
        tb/tb_lns_addsub.sv --top-module tb_lns_addsub
    ./obj_dir/Vtb_lns_addsub

For another testbench, change the last file and the top module. Each testbench
finishes within seconds. The table contents are computed by
constant functions during elaboration, which takes a few seconds.

## Changing it

- Widths and guard bits are `localparam`s in `lns_pkg`. If you change `GUARD` or
  `FRAC`, check the word widths `FW`, `DW`, `SW` and `CW` against the largest table
  values given next to them, then rerun `tb_lns_fds_rom` and `tb_lns_accuracy`.
- `lns_fds_rom` and `lns_ndd_interp` take `FN` (`FUNC_ADD` or `FUNC_SUB`). The segment
  map is in `seg_base`/`seg_step` in the package and in the leading-one decode of the
  interpolator.
- Table values are rounded to nearest at 2^-27 from double-precision evaluations of
  the formulas in `lns_pkg`. Any tool that evaluates SystemVerilog constant functions
  with `$ln`, `$exp` and `$pow` builds them.
