# PLMS adaptive filter in IEEE-754 single precision

This is a proportionate least-mean-square (PLMS) adaptive FIR filter. Like a
plain LMS filter it learns the coefficients of an unknown system from two
sample streams: the input x(n) and the system's output d(n). It differs in how
it spreads the step size over the taps. Each tap gets a gain proportional to
the magnitude of its own weight, so the few large taps of a sparse system
converge much faster than under LMS. All arithmetic is 32-bit IEEE-754 single
precision. The adders and multipliers are built from Vedic (Urdhva-Tiryagbhyam)
multiplier cells and simple shift/add normalisers. The divider is a one-step
approximation. The default filter has 32 taps.

Per sample the filter computes

```
y(n)      = sum_i w_i(n) x(n-i)                    filter output (a priori)
e(n)      = d(n) - y(n)                            error
gamma_i   = |w_i(n)| + rho                         proportionate gain numerator
g_i       = gamma_i / mean_j(gamma_j)              gain of tap i
w_i(n+1)  = w_i(n) + mu * g_i * x(n-i) * e(n)      weight update
```

The error is used in the same iteration. There is no adaptation delay as in
delayed LMS. With all weights at zero every g_i is 1 and the filter starts out
as ordinary LMS.

## How one iteration is scheduled

The filter is organised around L identical **tap blocks**, one **serial
adder**, and a **switch** in front of that adder. Every tap block holds x(n-i)
and w_i, plus one FP multiplier and one FP adder. A **controller** broadcasts
one operation code to all taps per clock, so the taps work in lock-step. Each
tap reuses its multiplier and adder in every phase.

| clock (from acceptance) | controller state | what happens |
|---|---|---|
| 0 | IDLE | sample accepted; every tap shifts x down the delay line; d(n) is latched |
| 1 | PROD | every tap forms its tap-out p_i = x_i w_i and gamma_i = \|w_i\| + rho; the switch is started |
| 2 .. L+1 | SUM | **switch 1**: p_0 .. p_(L-1) go to the serial adder, one per clock |
| L+2 .. 2L+1 | SUM | **switch 2**: gamma_0 .. gamma_(L-1) go to the serial adder; y(n) is final at L+2, e(n) = d - y is registered at L+3 |
| 2L+2 | SUM | gamma sum final; the gain block forms k = mu e(n) L / sum(gamma) |
| 2L+3 | SUM | k valid; the controller leaves SUM |
| 2L+4 | UPD1 | every tap: t_i = gamma_i x_i |
| 2L+5 | UPD2 | every tap: t_i = t_i k |
| 2L+6 | UPD3 | every tap: w_i = w_i + t_i; `out_valid` with y(n), e(n) |
| 2L+7 | IDLE | next sample can be accepted |

One sample therefore takes **2L + 7 clocks**: 71 clocks at L = 32. The serial
sums dominate this time. Every FP unit is a single combinational stage, so the
clock period is set by the longest of them (the divider followed by two
multipliers in the gain block, or a multiplier in a tap).

The proportionate normalisation g_i = gamma_i / mean(gamma) is not divided
per tap. Every tap needs mu g_i e(n) anyway, so the gain block computes the
common factor k = mu e(n) / mean(gamma) once per iteration and broadcasts it.
Each tap then multiplies k by its own gamma_i and x_i. This gives the same
gain matrix with one divider instead of L dividers.

## Floating-point units

All three units are combinational. Subnormal inputs and results are flushed to
zero. Results are truncated rather than rounded. Exponent overflow gives
infinity. Inf/NaN inputs get no special handling: the filter never produces
them for sensible inputs.

- **`fp_addsub`** works in three stages. First it compares the exponents and
  keeps the larger-magnitude operand as the reference. Second, it shifts the
  smaller mantissa right and adds or subtracts the two mantissas. The XOR of
  the signs chooses between adding and subtracting. Third, it normalises: a
  carry gives a right shift and an exponent increment, and a cancellation
  gives a left shift by the leading-zero count. Three guard bits are kept
  during alignment. The result is within 2^-21 of the larger operand.
- **`fp_mul`** splits the significand product as
  (1+m1)(1+m2) = 1 + (m1+m2) + m1·m2. It needs one 23-bit adder, one Vedic
  multiplier for m1·m2, and an adder that sums the two. The carry out of that
  sum selects a one-bit shift and is added to the exponent sum
  e1 + e2 − 127. The result is within 2^-22 relative.
- **`fp_div`** is approximate, and it is the unit least like its textbook
  counterpart. The reciprocal of the divisor significand 1.m2 comes from a
  straight line: the 23-bit fraction m2 is subtracted from a 24-bit constant
  C. The difference is read with 24 fraction bits, so it equals
  C/2^24 − (1.m2 − 1)/2. The dividend significand is then multiplied by this
  seed (Vedic multiplier plus one adder), and the result is normalised by up
  to two left shifts. The constant C = round((√12 − 2.5)·2^24) = `24'hF6CF5D`
  is the minimax intercept for that slope. The quotient is within
  **±7.2 %** of the exact value. The filter uses the divider only for the
  gain normalisation. There the error scales all taps' steps by the same
  factor, between 0.93 and 1.07, which acts like a slightly different mu.
- **`vedic_mul24`** tiles nine `vedic_mul8` cells (3×3 byte products) and
  adds the columns. `vedic_mul8` is the classic Vedic recursion
  (`vedic_mul2` → `vedic_mul4` → `vedic_mul8`). Each level forms the vertical
  products (low×low, high×high) and the crosswise products (low×high,
  high×low), adds the crosswise pair, and adds it in at the middle position.

## Interface of `plms_filter`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (all state to +0) |
| `in_valid`, `in_ready` | in/out | 1 | a sample is taken on a clock where both are high; `in_ready` is low for 2L+6 clocks after each accepted sample |
| `x_in`, `d_in` | in | 32 | input sample x(n) and desired sample d(n) |
| `out_valid` | out | 1 | one-clock pulse 2L+6 clocks after acceptance |
| `y_out`, `e_out` | out | 32 | y(n) and e(n) of the last sample; they stay valid until the next sample's values replace them |
| `w_load_valid`, `w_load_idx`, `w_load_data` | in | 1, log2 L, 32 | write an initial weight; taken only while `in_ready` is high |
| `w_rd_idx`, `w_rd_data` | in/out | log2 L, 32 | combinational read-back of any weight |

Parameters: `L` (taps, default 32), `MU` (step size as an FP32 bit pattern,
default 0.01 = `32'h3C23D70A`), and `RHO` (minimum-gain constant, same
default). Changing `MU` or `RHO` means supplying another IEEE-754 pattern.
`L` may be any value of 2 or more.

## What follows the source architecture and what is chosen here

The structure is the published PLMS architecture: parallel tap blocks, each
with its own FP multiplier producing the tap-out and the gain term; switch 1
and switch 2 feeding tap-outs and then gammas to one serial FP adder; an error
block; a proportionate gain block; the decomposed FP multiplier; and the
subtract-and-multiply FP divider. Also taken from it: 32 taps, single
precision, and no adaptation delay.

Chosen here, because the source architecture leaves these open:

- The values of mu and rho (0.01 each).
- Truncation, flush-to-zero, and the Inf behaviour of the FP units.
- The divider's constant and the reading of its seed as a slope −1/2 line.
- One scanning multiplexer as the switch, instead of switches placed between
  groups of taps.
- A single shared divider for the gain normalisation.
- The three-phase weight update in each tap.
- The controller FSM and the valid/ready, load and read-back ports.
- The FP units are purely combinational. The only pipelining is the phase
  sequencing, so no throughput figure of the original is reproduced.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

- `tb_vedic_mul8` tests all 65 536 operand pairs. `tb_vedic_mul24` tests
  20 000 random pairs and the corner cases.
- `tb_fp_addsub`, `tb_fp_mul` and `tb_fp_div` compare with double-precision
  arithmetic, using the error bounds given above. The divider test also
  checks that the worst error reaches the designed ~7 %.
- `tb_plms_tap`, `tb_plms_switch`, `tb_serial_adder`, `tb_error_block`,
  `tb_gain_block` and `tb_plms_ctrl` check each phase's result and its timing.
- `tb_plms_filter` runs the full-size filter (defaults, 32 taps) on a sparse
  system-identification task: 4 non-zero taps out of 32, uniform random
  input, 4000 samples, and one deliberately wrong initial weight loaded
  through the load port. For every sample it checks y(n), e(n) and all 32
  weight updates against a real-valued model of the equations above. It also
  checks the 2L+6 and 2L+7 clock latencies. At the end it requires the error
  power to have fallen by at least 40 dB (about 47 dB is reached) and every
  weight to be within 5·10^-3 of the true system. It counts weight loads,
  input stalls, switch 1 and switch 2 phases, gain factors and weight updates,
  and fails if any of them never occurred.
- `tb_plms_sine` drives the full-size filter with a sine wave,
  x(n) = 0.9 sin(2πn/20), through a sparse 32-tap system. A single tone only
  reveals the system's response at one frequency, so this test checks the
  error rather than the weights. Over 2000 samples the error power must fall
  by 60 dB, and about 120 dB is reached. It also checks y(n) + e(n) = d(n)
  on every sample.

To simulate a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/plms_pkg.sv \
          tb/tb_plms_filter.sv --top-module tb_plms_filter -Mdir obj -o sim
./obj/sim
```

Substitute any other testbench name in the last two arguments of the first
command. Verilator finds the modules of `rtl/` through `-Irtl`, because each
module is in a file of its own name. The full-size run takes about half a
minute.

## Files

- `rtl/plms_pkg.sv`: FP32 type, tap operation codes, switch phase tags,
  helper functions.
- `rtl/plms_filter.sv`: the top.
- `rtl/plms_ctrl.sv`, `rtl/plms_tap.sv`, `rtl/plms_switch.sv`,
  `rtl/serial_adder.sv`, `rtl/error_block.sv`, `rtl/gain_block.sv`: the
  filter blocks.
- `rtl/fp_addsub.sv`, `rtl/fp_mul.sv`, `rtl/fp_div.sv`: FP units.
- `rtl/vedic_mul2.sv`, `rtl/vedic_mul4.sv`, `rtl/vedic_mul8.sv`,
  `rtl/vedic_mul24.sv`: the Vedic multiplier tree.
- `tb/`: one testbench per module, named `tb_<module>.sv`.
