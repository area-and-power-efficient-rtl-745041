# LMS adaptive filter with rounding-based approximate (ROBA) multipliers

An LMS adaptive filter is an FIR filter that keeps retuning its own
coefficients. At each sample it compares its output with a desired signal and
moves every tap weight a little in the direction that shrinks the error.
In hardware, most of the area and power goes into the multipliers. This
design replaces every multiplier in the filter, both the tap multipliers and
the ones in the weight update, with a **ROBA multiplier**. A ROBA multiplier
rounds each operand to its nearest power of two, so every partial product it
needs is a plain shift.

The RTL is synthesizable SystemVerilog. It consists of a 4-tap, 16-bit LMS
filter and, beside it at the top level, a stand-alone 8x8 ROBA multiplier.

## The ROBA multiplier

Let `A_r` and `B_r` be the powers of two nearest to `A` and `B`. The exact
product can then be written as

    A*B = A_r*B + B_r*A - A_r*B_r + (A_r - A)*(B_r - B)

Every term except the last is a shift, because `A_r` and `B_r` are powers of
two. The last term is the product of two rounding errors, so it is small. The
ROBA multiplier drops it:

    A*B ~= A_r*B + B_r*A - A_r*B_r

For 8-bit unsigned operands, the mean absolute relative error over all
non-zero operand pairs is about 2.9 %. The testbench measures and prints
this figure. The result is exact whenever either operand is a power of two.

The datapath is a chain of small modules, one per stage:

| stage | module | what it does |
|---|---|---|
| 1 | `sign_detector` | In signed mode, takes the MSB of each operand as its sign and negates negative operands to magnitudes. In unsigned mode it is disabled. |
| 2 | `rounding` (x2) | Rounds each magnitude to the nearest power of two and returns it one-hot. |
| 3 | `shifter` (x3) | Forms `A_r*B`, `B_r*A` and `A_r*B_r` by shifting. |
| 4 | `roba_adder` | Computes `A_r*B + B_r*A`. |
| 5 | `roba_subtractor` | Subtracts `A_r*B_r`. |
| 6 | `sign_set` | In signed mode, negates the result when exactly one operand was negative. |

`roba_mult` wires the stages together. It is purely combinational.

**Rounding rule.** Let bit `p` be the leading one of the magnitude. The
magnitude rounds up to `2^(p+1)` when bit `p-1` is also set, and down to
`2^p` otherwise. This puts ties (values of the form `3*2^(p-1)`, such as 3,
6 and 12) on the larger power. Zero rounds to zero. The rounded value needs
one bit more than the input: 255 rounds to 256.

**Widths.** For N-bit operands:
- the shifters produce 2N+1 bits;
- the adder produces 2N+2 bits;
- the result is cut to 2N bits.

The cut is safe. The approximate magnitude never goes below zero and never
exceeds `2^(2N) - 1`. An exhaustive check at N = 8 confirms this: the
largest unsigned result is 65024. In signed mode the magnitudes are at most
`2^(N-1)`, so the signed result always fits.

**Mode.** `is_signed = 1` treats `a` and `b` as two's complement and returns
a two's complement product. `is_signed = 0` treats them as unsigned, with the
sign stages disabled.

## The adaptive filter

```
x(n) ─┬──────────┬─── delay ─┬─── delay ─┬─── delay ─┐
      │          │           │           │           │
      │       [ROBA]w0    [ROBA]w1    [ROBA]w2    [ROBA]w3    FIR part:
      │          └─────── + ─┴──── + ────┴──── + ────┘         y(n)
      │                                            │
      │                      d(n) ──(+)──── - ─────┘
      │                              │ e(n)
      │                   mu ──[ROBA]┘  mu*e(n)
      └─ x(n-k) ──[ROBA]──(+)── w_k register   (weight update, one per tap)
```

The filter computes, per sample:

    y(n)       = sum_k w_k(n) * x(n-k)         k = 0..3   (fir_filter)
    e(n)       = d(n) - y(n)                              (lms_filter)
    w_k(n+1)   = w_k(n) + mu * e(n) * x(n-k)              (weight_update)

`mu*e(n)` is formed once, by one multiplier, and is then shared by the four
per-tap update multipliers. There are nine ROBA multipliers in total:
four taps, one for `mu*e`, and four updates. All of them run in signed
16-bit mode.

**Number format.** All samples, desired values, the step size, the error
and the weights are 16-bit two's complement numbers in Q4.12: 12 fractional
bits, range [-8, 8). Every product is scaled back as follows:
- it is shifted right arithmetically by 12 bits, which truncates toward
  minus infinity;
- it is then saturated to 16 bits.

The FIR part sums the four full-width products before scaling, so it scales
only once. The error, `mu*e` and each new weight are saturated to 16 bits
too. `lms_pkg` holds the width (`DATA_W`), the fraction (`FRAC_BITS`), the
tap count (`TAPS`) and the stand-alone multiplier width (`MULT_W`). Every
filter module also takes them as parameters (`W`, `FRAC`, `T`).

**Timing.** The filter takes one sample per clock cycle. In a cycle with
`enable` high:
- `data_in = x(n)` and `desired_in = d(n)` are presented;
- `y_out` and `error_out` are combinational and valid in the same cycle;
- on the rising edge, the three `delay_unit` registers shift and the weights
  load `w(n+1)`.

With `enable` low nothing changes state, and the outputs still show what the
current inputs would give. `reset` is synchronous and active high. It clears
the delay line and the weights. The combinational path runs through two
ROBA multipliers, the adder chain, the error subtractor and two more ROBA
multipliers. There is no pipelining.

## Top level (`lms_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `Reset` | in | 1 | synchronous, active-high reset |
| `Enable` | in | 1 | accept a sample and adapt |
| `Data_in` | in | 16 | x(n), Q4.12 |
| `Desired_in` | in | 16 | d(n), Q4.12 |
| `Step_size` | in | 16 | mu, Q4.12 |
| `Mult_signed` | in | 1 | mode of the stand-alone multiplier |
| `Error_out` | out | 16 | e(n) |
| `y` | out | 16 | y(n) |
| `Weights` | out | 4 x 16 | current tap weights |
| `prod` | out | 16 | stand-alone ROBA product of `Data_in[7:0]` and `Step_size[7:0]` |
| `final_out` | out | 16 | `Error_out + prod`, wrapping |

The stand-alone multiplier and the `final_out` adder reproduce the
top-level structure of the reference implementation. They take no part in
the adaptation.

## What follows the source design and what is this design's own

These follow the published design:
- the ROBA formula and its stage chain;
- signed and unsigned operation;
- the LMS equations;
- the four-tap structure with three delay units;
- the 16-bit port widths;
- the 8x8 stand-alone multiplier on the low bytes, and `final_out`.

These are this design's own choices, because the source does not specify
them:
- the Q4.12 number format, with truncating scaling and saturation;
- the tie rule of the rounding (round up, as in the original ROBA proposal);
- the order of the update products (`mu*e` first, then times `x(n-k)`);
- synchronous active-high reset to zero;
- combinational outputs, with one sample per clock;
- the `Mult_signed` and `Weights` ports.

One point of the source is ambiguous. Its prose says that a subtraction is
used in place of the addition "if the input variables are negative". Its
formula and block diagram, however, always subtract `A_r*B_r` and apply the
sign at the end. This design follows the formula and the block diagram.

The published implementation reports 540 LUTs and 576 registers on an FPGA.
This RTL holds 112 flip-flops: three 16-bit delay registers and four 16-bit
weights. The source does not say what its other registers hold, so they are
not reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line. `tb/roba_ref_pkg.sv` holds the reference
models. They are written independently of the RTL:
- the rounding finds the nearer power of two by comparing distances;
- the products use integer multiplication;
- a class `lms_model` models the whole filter at bit level.

| testbench | checks |
|---|---|
| `tb_roba_mult` | All 65,536 operand pairs of the 8-bit multiplier in both modes, plus 20,000 random 16-bit signed pairs. Also prints the mean relative error. |
| `tb_rounding`, `tb_sign_detector` | Exhaustive at 8 bits. |
| `tb_shifter`, `tb_roba_adder`, `tb_roba_subtractor`, `tb_sign_set` | Random and extreme operands. |
| `tb_delay_unit`, `tb_weight_update` | Cycle by cycle, with random enable and reset. |
| `tb_fir_filter` | Random taps, including ones that saturate. |
| `tb_lms_filter` | System identification: an unknown system with weights (0.5, -0.3, 0.2, 0.1) filters a uniform random input in [-0.5, 0.5), with mu = 0.5. Outputs and weights are compared bit-exactly with the model every cycle. After 3000 samples every weight must be within 0.05 of the unknown system, and the error must have dropped at least fourfold. |
| `tb_lms_top` | The same identification through the top level at its default sizes. It then runs full-scale inputs that saturate the error and the weights, then a reset. It checks `prod` and `final_out` in both multiplier modes. It counts enabled updates, held cycles, resets, saturations, signed and unsigned products, negative products, and operands rounded up and down; each count must be non-zero. |

In the identification test the weights converge to about (2038, -1235, 808,
401) in Q4.12, against (2048, -1229, 819, 410) for the unknown system. The
approximate multipliers leave a small bias, but adaptation is not impaired.

Running a testbench with Verilator, for example the top-level one:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/lms_pkg.sv tb/roba_ref_pkg.sv tb/tb_lms_top.sv \
    --top-module tb_lms_top -o sim
./obj_dir/sim
```

Other testbenches work the same way: put `lms_pkg.sv` and `roba_ref_pkg.sv`
first and name the testbench as the top module. `-Irtl` lets Verilator find
the rest. Every run finishes in well under a second.

## Changing it

- **Tap count:** change `TAPS` in `lms_pkg`, or override `T` on
  `lms_filter`. The delay line and the multiplier banks are generated from it.
- **Data width and format:** change `W` and `FRAC` together. The multipliers
  follow `W`.
- **Stand-alone multiplier width:** change `MULT_W`.
- **Exact multiplication, for comparison:** swap `roba_mult` in
  `fir_filter` and `weight_update` for a signed `*`. The ports are the same.
