# Hyperbolic sine and cosine in fixed point: exponential, series and half-wave ROM units

sinh and cosh are built from the exponential:
sinh(x) = (e^x − e^−x)/2 and cosh(x) = (e^x + e^−x)/2.
This RTL holds three small FPGA-style ways to compute them, plus the
exponential unit the first one is built on. All of them take a 10-bit input
and answer in a single clock cycle. The three ways make different trades:

| unit | idea | latency | input range | accuracy (own measurement) |
|---|---|---|---|---|
| `exp_unit` | e^X = e^int · e^fra from two small ROMs and a multiplier; a third ROM for e^−\|X\| | 1 clock | −16 … +15.97 | < 0.04 % for X > −4; exactly 0 for X ≤ −4 |
| `sinh_cosh_exp` | two multiplexers give e^X and e^−X at once; an adder and a subtractor, then a shift by one | 1 clock | −15.97 … +15.97 | mean 0.002 %, max 0.034 % |
| `taylor_sinh_cosh` | four-term series whose factorials are replaced by powers of two | combinational | \|X\| < 4 | sinh mean 0.46 %, cosh mean 4.0 % (max 7.9 %) |
| `rom_sinh_cosh` | sinh and cosh of \|X\| read from two 128-word tables; sinh negated for X < 0 | 1 clock | \|X\| < 4 | mean 0.02 %, max 0.26 % (sinh) |

The accuracy column is the relative error against double-precision sinh/cosh.
The end-to-end testbench measures it over −15 … +15 for the exponential unit
and over −3.8 … +3.8 for the other two. The series error is the series'
own error, not a rounding effect. The ROM unit is the smallest of the three:
two 128-word tables, a negator and a multiplexer, with no arithmetic beyond
that.

## The shared input word

Every unit reads the same `x`: 10 bits, two's complement, with 4 integer bits
and 5 fraction bits (sign, 4 integer bits, then the binary point and 5 fraction
bits). It therefore spans −16 … +15.96875 in steps of 1/32. The format comes
from the exponential design. The series and ROM units adopt it so that all
units can share one input. All widths are in `rtl/hyp_pkg.sv`.

## Exponential by decomposition (`exp_paths`, `exp_unit`)

A direct table of e^X over all 1024 input codes would need 1024 words. The
exponential unit uses three much smaller tables instead (16 + 32 + 128 = 176
words):

* **Positive path.** |X| is split into its integer part (bits 8:5) and its
  fraction part (bits 4:0). A 16-word ROM holds e^0 … e^15 and a 32-word ROM
  holds e^(k/32). Their product is e^|X|, by e^(a+b) = e^a·e^b. The integer
  ROM words carry 22 integer and 16 fraction bits. The fraction ROM words carry
  2 integer and 16 fraction bits. The 56-bit product is cut back to 40 bits
  with 16 fraction bits, by truncation.
* **Negative path.** A 128-word ROM, addressed by the 7 low bits of |X|, holds
  e^−v for v = 0 … 3.97. Once |X| ≥ 4, a multiplexer replaces the word by the
  constant 0: e^−4 ≈ 0.018, and smaller values are treated as zero. So
  **e^X is exactly 0 for X ≤ −4**. That is the largest error this unit has,
  and it is deliberate.
* **Output mux.** The sign bit of X picks the positive path (X ≥ 0) or the
  negative path (X < 0).

All ROMs have a registered read, like block RAM. The sign bit and the
"|X| ≥ 4" flag pass through one register each, so they stay aligned with the
ROM words. The multiplier and the multiplexers sit after the ROM registers.
The result therefore appears one clock after X is sampled, and a new X can be
applied every clock.

## sinh and cosh from the exponential (`sinh_cosh_exp`)

This unit uses the same two paths. It needs e^X and e^−X at the same time, and
those are e^|X| and e^−|X| in one order or the other:

* **Mux1** gives e^X: the positive path when X ≥ 0, the negative path when X < 0.
* **Mux2** gives e^−X: the other path.
* A subtractor forms e^X − e^−X and an adder forms e^X + e^−X, both 41 bits
  wide.
* An arithmetic shift right by one halves each. Negative sinh values are
  rounded toward −∞.

Because e^−|X| is forced to 0 for |X| ≥ 4, the results there are ±e^|X|/2.
The relative error this causes is below 0.04 % at |X| = 4 and shrinks fast
beyond it. Both outputs are signed 40-bit numbers with 16 fraction bits, and
sinh(15) = cosh(15) ≈ 1.635·10^6. The input −16 is outside the unit's range:
its positive path would need e^16, which the integer ROM does not hold.

## Series with power-of-two denominators (`taylor_sinh_cosh`)

The Maclaurin series of sinh and cosh is cut to four terms. The factorial
denominators become constants that cost no divider:

    sinh(x) = x + 0.1667·x^3 + x^5/2^7 + x^7/2^12      (3! → ×0.1667, 5! ≈ 2^7, 7! ≈ 2^12)
    cosh(x) = 1 + x^2/2 + x^4/2^4 + x^8/2^15

Note that the fourth cosh term is x^8/2^15, not x^6/6!. That is how this
variant is defined, and it is the main reason why cosh is noticeably high near
|x| = 4. A chain of seven multipliers forms x^2 … x^8, each multiplying the
previous power by x. Power-of-two divisions are arithmetic right shifts. The
0.1667 factor is a constant multiplication by 10925/2^16. Every product is
truncated back to a 56-bit word with 16 fraction bits. The unit has no
registers: its outputs follow `x` within the same clock cycle. It is meant for
|x| < 4. Larger inputs do not overflow the word, but the series is no longer a
useful approximation there.

## Half-wave ROM (`rom_sinh_cosh`)

cosh is even and sinh is odd, so only X ≥ 0 needs to be tabulated. The unit
takes |X| and uses its 7 low bits as the address of two 128-word ROMs, one for
sinh and one for cosh. The address covers |X| = 0 … 3.97 in steps of 1/32.
The cosh word is the result. The sinh word goes to a multiplexer directly and
through a negator, and the registered sign bit picks one of the two. The words
are sinh and cosh rounded to 10 fraction bits. The results are signed 16-bit
numbers (±31.99).

For |X| ≥ 4 the address simply drops the upper bits, so the result wraps
around. The caller must keep |X| below 4. The step of the table is set by the
`IN_FRAC` parameter (default 5). With `IN_FRAC = 7` the same 128 words cover
0 … 0.99 in steps of 1/128.

## ROM contents

No table is stored as data. `hyp_rom` fills its table at elaboration from
`hyp_pkg::tab_value`. That function computes e^v for v = a/2^IN_FRAC as a
Maclaurin series (term_k = term_(k−1)·v/k, 160 terms) in 128-bit integers with
48 fraction bits. It then derives e^−v = 2^96 / e^v, and sinh and cosh as half
the difference and half the sum. The result is rounded to nearest with
`OUT_FRAC` fraction bits. Changing a width or a step therefore needs no
regenerated file. Synthesis sees a constant array and maps it to a ROM.

## Files

| file | content |
|---|---|
| `rtl/hyp_pkg.sv` | formats, widths, table kinds, table generator |
| `rtl/hyp_rom.sv` | registered ROM of e^v, e^−v, sinh v or cosh v |
| `rtl/exp_paths.sv` | positive and negative exponential paths |
| `rtl/exp_unit.sv` | e^X |
| `rtl/sinh_cosh_exp.sv` | sinh/cosh from the exponential paths |
| `rtl/taylor_sinh_cosh.sv` | series unit |
| `rtl/rom_sinh_cosh.sv` | half-wave ROM unit |
| `rtl/hyp_top.sv` | all units side by side on one input; no logic of its own |
| `tb/tb_*.sv` | one self-checking testbench per module |

`hyp_top` exists so that the units can be compared sample by sample. In a real
system you would instantiate just the unit you need.

## Simulating

Every testbench checks against values it computes itself with real arithmetic
(`$exp`). Each ends with a line `TB_RESULT checks=N failures=M`. The end-to-end
testbench `tb_hyp_top` drives every input code through all units at their
default sizes. It prints each unit's error statistics, and it counts how often
each datapath selection was used: positive path, negative path, zero constant,
the e^X/e^−X swap, and the negated and plain sinh words. For example:

    verilator --binary --timing --assert --top-module tb_hyp_top \
        rtl/hyp_pkg.sv rtl/hyp_rom.sv rtl/exp_paths.sv rtl/exp_unit.sv \
        rtl/sinh_cosh_exp.sv rtl/taylor_sinh_cosh.sv rtl/rom_sinh_cosh.sv \
        rtl/hyp_top.sv tb/tb_hyp_top.sv
    ./obj_dir/Vtb_hyp_top

To run a single unit, replace the top module and the testbench file, e.g.
`--top-module tb_rom_sinh_cosh` with `rtl/hyp_pkg.sv rtl/hyp_rom.sv
rtl/rom_sinh_cosh.sv tb/tb_rom_sinh_cosh.sv`. Each run takes well under a
second. The testbenches also check the reference points 3.269·10^6 for e^15,
1.635·10^6 for sinh(15) and cosh(15), and 22.62 and 22.64 for sinh and cosh of
3.8125 in the ROM unit.

## Where this RTL makes its own choices

The structure of each unit follows the original design: the blocks, how they
connect, the table sizes, the input format, the series terms and the 0.1667
constant. The following points are choices of this implementation:

* **Word widths, fraction bits and rounding** of every ROM word, product and
  result. The original gives none of them.
* **Registers on the sign and "|X| ≥ 4" paths.** They keep these select
  signals aligned with the registered ROM reads. Without them, the selects
  would act on the next sample.
* **ROM unit step of 1/32.** The original states a resolution of 1/2^7 for the
  ROM unit, yet evaluates that unit over −3.8 … +3.8. A 7-bit address with
  7 fraction bits cannot reach that range. This RTL takes 5 fraction bits
  (range 0 … 3.97). `IN_FRAC = 7` gives the other reading.
* **Number format of X** is taken as two's complement, since every unit starts
  with an absolute-value step.
* **Series unit is combinational.** It is specified as a one-cycle design
  with no flip-flops.
* **No reset.** The only registers are the ROM outputs and one or two select
  bits per unit, and they are rewritten on every clock.

## Not included

The original work compares two further variants, which are not part of this
RTL:

* **The vendor's standard CORDIC block.** It works in hyperbolic rotation mode
  and converges only for |x| < π/4. It is the tool vendor's IP and its
  configuration is not specified.
* **A "modified" series unit** with a 10-cycle latency. Only its results are
  known, not its structure.
