# Faithful binary32 tangent: table-based pipelined datapath

`fp_tan` computes tan(x) for an IEEE-754 single-precision argument in
[-pi/2, pi/2] with an error below one unit in the last place (faithful
rounding). It produces one result per clock, 30 cycles after the argument. It
does not use CORDIC or a long polynomial. Instead it splits the argument into
three bit fields. Two of them index small tables, and the tangent addition
formula puts the pieces back together with one multiplier, one reciprocal and a
final multiply.

The architecture follows M. Langhammer and B. Pasca, "Faithful Single-Precision
Floating-Point Tangent for FPGAs": the field split, the table formats, the
numerator/denominator structure, the bypass for small arguments, the separate
table next to pi/2 and the 30-cycle latency. The departures are listed in
[Where this design departs from the published architecture](#where-this-design-departs-from-the-published-architecture).
The RTL is an independent implementation.

## The idea

Tangent is odd, so the datapath works on |x| and the sign is put back at the end.

For |x| < 2^-12, tan(x) and x agree to within the last bit, so the input is
returned unchanged. For larger |x| up to pi/2, |x| fits without rounding into
a 36-bit fixed-point word X with 35 fraction bits (1 + 23 + 12 bits). X is split
into

| field | bits of X | weight of one step | range          | how tan() of it is found |
|-------|-----------|--------------------|----------------|--------------------------|
| c     | [35:27]   | 2^-8               | 0 .. 1.57      | 512-word table           |
| a     | [26:18]   | 2^-17              | 0 .. 0.0039    | 512-word table           |
| b     | [17:0]    | 2^-35              | < 2^-17        | tan(b) ~ b               |

Applying the addition formula twice gives

    tan(c + a + b) = (tan(c) + T) / (1 - T * tan(c)),   T = tan(a + b)

Because a and b are both small, T is close to tan(a) + b. The design computes

    n = tan(c) + T                 numerator, a floating-point sum
    d = 1 - T * tan(c)             denominator, a fixed-point subtraction
    tan(x) = n * (1/d)             a reciprocal, then one 36 x 36 multiply

The error budget is about a quarter ulp each for n and d, plus half an ulp for
the final rounding. That budget sets the table widths.

## Number formats inside the datapath

* **tan(c) table**: 34-bit words `{exp[4:0], mant[28:0]}` holding
  tan(c) = mant * 2^(exp - 36). The mantissa keeps its leading one explicitly,
  so c = 0 is simply the all-zero word and needs no decoding. Over the used
  range tan(c) runs from 2^-8 to about 2^11 (exponents 0..19).
* **tan(a) table**: 37-bit fixed point with LSB weight 2^-45. tan(a) spans only
  nine binades, so fixed point still leaves every nonzero entry at least
  1 + 23 + 5 significant bits.
* **T = tan(a) + b**: 38 bits, LSB 2^-45. It can carry one bit beyond tan(a).
* **n, d and 1/d**: normalized 36-bit mantissas (1.35) with a small exponent.

All three tables are computed during elaboration from `$tan` in double
precision, rounded to nearest. There are no data files.

## Pipeline

| stage | block | work |
|-------|-------|------|
| 1 | input register | |
| 2 | `tan_input_stage`, `tan_c_rom`, `tan_a_rom`, `tan_pio2_rom` | classify, shift to fixed point by 127 - e, split into c/a/b; registered table reads |
| 3 | `tan_numerator` | T = tan(a) + b (+ tan(a)^2 b); shift T right by the tan(c) exponent; add; normalize with a leading-zero count |
| 4 | `tan_denominator` | normalize T; multiply by the tan(c) mantissa (36 x 29); shift back to fixed point (40 fraction bits); subtract from 1; normalize |
| 5..16 | `tan_recip` | q = floor(2^71 / d_mant), a restoring digit recurrence, 3 quotient bits per stage; the other operands wait in a `tan_delay` chain alongside |
| 17 | `tan_mult_round`, `tan_out_select` | n * q (72 bits, in [1, 4)); 1-bit normalization mux; round to nearest even; pick the result by input class |
| 18..30 | `tan_delay` | balancing registers up to `LATENCY` |

The published design gives only the total latency (30). How the cycles are
spread over the operators is this design's choice. The 13 trailing registers
exist so that a retiming synthesis flow can move them into the multipliers,
which are still single-stage here.

### Interface (`fp_tan`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset; it clears only the valid chain |
| `in_valid` | in | 1 | `x` holds an argument this cycle |
| `x` | in | 32 | binary32 argument |
| `out_valid` | out | 1 | `r` holds a result; `in_valid` delayed by `LATENCY` |
| `r` | out | 32 | binary32 tan(x) |

Parameters: `LATENCY` (default 30, minimum 5 + `RECIP_STAGES`), `RECIP_STAGES`
(default 12; 1 to 36, each stage resolving ceil(36 / `RECIP_STAGES`) quotient
bits) and `TAB_CORR` (default 1, see below). There is no back-pressure. A new argument may be presented every cycle.

## Accuracy near pi/2: the part that needs care

Close to pi/2, tan(c) reaches 2^11 and the product T * tan(c) comes close to 1.
The denominator then loses up to four leading bits to cancellation. Any
absolute error in T is multiplied by tan(c)/d, which can reach about 2^15.

Two measures keep this under control:

1. **The last 256 floats before pi/2 use a table instead.** These are
   0x3FC90EDC..0x3FC90FDB, and the last of them is the float nearest pi/2.
   `tan_pio2_rom` holds their correctly rounded results. 0x3FC90FDB lies just
   above pi/2, so its entry is the large negative value -22877332. With this
   window the deepest cancellation left in the datapath is four positions
   (d >= 2^-4).
2. **T includes the second-order term.** tan(a + b) = tan(a) + b +
   tan(a)^2 b + ... The third term is below 2^-33. Taken at face value, the
   published equations drop it: n = tan(c) + tan(a) + b and
   d = 1 - (tan(a) + b) tan(c). Once magnified by tan(c)/d, that dropped term
   costs up to about 3.6 ulp for arguments between roughly 1.5 and the table
   window. `tan_numerator` therefore adds tan(a)^2 * b when `TAB_CORR = 1`,
   the default. It takes the top 18 bits of tan(a), squares them and
   multiplies by b: two 18 x 18 products. Setting `TAB_CORR = 0` gives the
   published equations exactly. `tb_fp_tan_eq56` runs that setting and shows
   errors above 1 ulp.

With the default setting, the largest error measured against a double-precision
`$tan` over 400,000 arguments (weighted towards pi/2) is 0.87 ulp.

## Special inputs

| input | result |
|-------|--------|
| \|x\| < 2^-12, including zero and subnormals | x itself |
| the 256 floats up to 0x3FC90FDB (either sign) | table value, sign of x applied |
| \|x\| > 0x3FC90FDB, +-infinity, NaN | quiet NaN 0x7FC00000 |
| everything else | datapath |

The published design only supports [-pi/2, pi/2] and leaves range reduction
out. Returning NaN outside that range is this design's choice.

## Where this design departs from the published architecture

* **tan(a)^2 b term** (`TAB_CORR = 1`), explained above. The published
  equations are available with `TAB_CORR = 0`.
* **Reciprocal.** The original uses a separate inverse unit, which it takes
  from other work: a table-and-multiplier method. Here it is a plain restoring
  recurrence, pipelined over 12 stages and exact to the last bit, with no
  tables or multipliers. It costs 36 subtract-and-compare steps of 37 bits
  rather than DSP blocks. A table-seeded Newton-Raphson unit could replace it
  behind the same interface (36-bit mantissa in, 36-bit reciprocal out,
  `RECIP_STAGES` cycles).
* **Denominator normalizer.** The original exploits the small cancellation and
  uses a short normalizer. Here it is a full leading-zero count.
* **Near-pi/2 window.** Its exact ends are this design's reading of "the
  256 ulp before pi/2".
* **Resource counts.** The original reports 18 18-bit multipliers and 8 M9K
  on Stratix-IV. The tables here need 44,544 bits, about six M9K. The numbers
  are not comparable because the reciprocal differs.

## Files

`rtl/` (synthesizable):

* `tan_pkg.sv`: widths, constants, the input-class enum and the tan(c) word struct
* `fp_tan.sv`: top level and pipeline
* `tan_input_stage.sv`, `tan_c_rom.sv`, `tan_a_rom.sv`, `tan_pio2_rom.sv`,
  `tan_numerator.sv`, `tan_denominator.sv`, `tan_recip.sv`,
  `tan_mult_round.sv`, `tan_out_select.sv`: the operators
* `tan_lzc.sv`, `tan_delay.sv`: leading-zero counter and delay line

`tb/` (self-checking; each ends with `TB_RESULT checks=N failures=M`):

* `tb_fp_tan.sv`: end-to-end test at default parameters. It streams 400,000
  arguments with random gaps and checks the 1-ulp bound, the exact 30-cycle
  latency, and that every mechanism is exercised: tiny bypass, pi/2 table,
  NaN, negative arguments, c = 0, both positions of the normalization mux, a
  rounding carry, and deep cancellation.
* `tb_fp_tan_sweep.sv`: every one of the 2^24 consecutive arguments from about
  0.39 up to the pi/2 table window, streamed back to back, each checked against
  the 1-ulp bound (about 75 s of simulation).
* `tb_fp_tan_eq56.sv`: the same top with `TAB_CORR = 0`.
* `tb_tan_*.sv`: one per operator. Each compares against real arithmetic or
  exact integer references.
* `tan_ref_pkg.sv`: binary32 and ulp helpers for the testbenches.

## Simulating

With Verilator 5, for example the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        --top-module tb_fp_tan rtl/tan_pkg.sv tb/tan_ref_pkg.sv tb/tb_fp_tan.sv
    ./obj_dir/Vtb_fp_tan

Run it from the folder that holds `rtl/` and `tb/`. The two packages are named
first; `-y` lets Verilator find every module by its file name. The test runs in
a few seconds and also prints how often each mechanism occurred and the largest
error seen. Any other testbench builds the same way with its own name in
`--top-module` and its own file in place of `tb/tb_fp_tan.sv`.

## How far to trust it

* The operators are checked against independent references: real-number
  arithmetic, exact wide-integer division, and an integer rounding model.
* The whole unit is checked against double-precision `$tan`. The hardest
  region, from about 0.39 to the pi/2 window, is checked exhaustively (all 2^24
  arguments, worst case 0.87 ulp at 0x3FC90ED2). The rest of the range is
  sampled with random and targeted arguments. Sampling is not a proof: the
  roughly 1.1 * 10^8 positive main-path arguments could all be swept by
  widening `COUNT` in `tb_fp_tan_sweep`, in about eight minutes of simulation.
* The reference is `$tan` in double precision. Its own error is far below the
  binary32 ulp, so it does not affect a 1-ulp verdict.
* Timing (the published 314 MHz) and FPGA resource use have not been measured.
