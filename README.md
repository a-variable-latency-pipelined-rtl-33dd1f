# Variable latency pipelined double precision adder

Most high-speed floating-point adders have a fixed latency: three cycles for a
pipelined two-path adder with combined rounding. Not every addition needs all
three cycles, though. When the exponents differ by at most one (the CLOSE
path), the long alignment shift is not needed. If the operation is also an
effective addition, or a subtraction that cancels only a bit or two, the
long normalizing shift is not needed either.

This adder lets each operation leave the pipeline as soon as its result is
ready:

| operation | path | latency |
|---|---|---|
| exponent difference > 1 | FAR | 3 cycles |
| Inf or NaN operand | FAR pipeline | 3 cycles |
| \|exponent difference\| ≤ 1, effective addition | CLOSE | 1 cycle |
| \|exponent difference\| ≤ 1, effective subtraction, predicted normalizing shift ≤ 2 | CLOSE | 1 cycle |
| \|exponent difference\| ≤ 1, any other effective subtraction | CLOSE | 2 cycles |

A new operation can still enter every cycle. The processor around the adder
must schedule dynamically and accept results out of order; the adder tells it
early when each result will arrive.

The operand statistics used here are the published SPECfp92 ones: 57% FAR,
20% CLOSE additions and 23% CLOSE subtractions. On that mix the average
latency falls from 3 cycles to 2.25, a speedup of 1.33. The workload test
reproduces this figure (see *Verification*).

## Datapath, stage by stage

The top module is `vlfpa`. It computes `a + b` or `a - b` on IEEE 754
binary64 words and supports all four rounding modes.

Inside the adder each operand is carried unpacked (`fpa_pkg::fp_unpack`):

- The exponent is the biased exponent, with a subnormal's 0 read as 1.
- The significand has 53 bits, with the hidden bit made explicit.

With this form the datapath treats subnormal inputs like any other input.

**Stage 1.** All of the following work on the same operands in parallel:

- `fpa_exp_diff` (FAR path) subtracts the exponents. It gives the distance
  `d = |Ea − Eb|`, which operand is larger, and the larger exponent.
- `fpa_close_path` (CLOSE path) starts without waiting for that subtraction:
  - It decides the swap and the one-place alignment from the two low-order
    exponent bits only: `01` means A is larger by one, `11` means B is larger
    by one, `00` means the exponents are equal.
  - It keeps the larger significand X and the aligned Y with one guard bit
    (54 bits), and feeds them to a compound adder (`fpa_compound_adder`).
    The adder gives both `X + ~Y` and `X + ~Y + 1` (or `X + Y`).
  - For a subtraction this pair also converts the result to sign and
    magnitude, without a second adder:
    - If `X + ~Y + 1` carries out, the difference is positive and that sum
      is the result.
    - Otherwise the magnitude is `~(X + ~Y)` and the sign flips.
  - A leading-one predictor (`fpa_lop`) works from X and Y in parallel with
    the adder. It predicts how far the difference must be shifted left.
  - For the one-cycle cases the block also finishes the result:
    - An addition needs at most a one-place right shift.
    - A short subtraction goes through a small mux that shifts 0, 1 or 2
      places, plus one place of correction.
    - Either way the result is then rounded (`fpa_round`).
- `fpa_onecycle_pred` produces the two early signals described in the next
  section.
- `fpa_special` detects Inf and NaN operands and forms their result.

**Stage 2.**

- FAR path: `fpa_align_shift` shifts the smaller significand right by `d`,
  keeping guard, round and sticky places.
- CLOSE path: `fpa_norm_shift` applies the full-length normalizing left
  shift. It uses the predicted amount plus a one-place correction, and
  rounds the one case that can be inexact (no cancellation when `d = 1`).

**Stage 3.** FAR path only: `fpa_far_add` adds or subtracts, normalizes by
at most one place and rounds, all with one compound adder and a selection.
In a subtraction the result is above ½, so it needs at most one left shift;
a sum may need one right shift.

Rounding here never uses a second carry-propagate addition:

- **Addition.** A row of half adders combines X and Yh above their lowest
  bit. The carry out of the lowest bit fills the empty bottom place of the
  carry vector. The compound adder then delivers `(X + Yh) / 2` and that
  value plus one, which is the sum and the sum plus two units.
  - The sum plus two is what a directed rounding needs when the sum carries
    out and is shifted right.
  - Without a carry out, the rounded sum is one of `{U, p0}`, `{U, 1}` and
    `{U + 1, 0}`, where U is the adder output and p0 the half-adder sum bit
    of the lowest place.
- **Subtraction.** The compound adder delivers `X + ~Yh = X − Yh − 1` and
  `X − Yh`. If the guard, round and sticky places of Y are non-zero, they
  borrow: the upper difference is then the first value and its rounded-up
  form the second. If those places are zero, the second value is exact.

The larger FAR operand is always the minuend, so the FAR path never needs a
conversion step. The CLOSE path needs rounding only when the result is not
shifted left, and then rounds only one guard bit. This split of the work
between the two paths is what makes the short CLOSE path possible.

## Deciding early that an operation finishes in one cycle

A dynamically scheduled processor needs to know that a result is coming
before the result itself arrives. `fpa_onecycle_pred` forms two signals well
inside the first cycle:

- **`close`**. The exponents differ by at most one. This is tested without
  the 11-bit exponent subtractor, by comparing each exponent with the other
  and with the other plus one. The test only asks whether the difference has
  a one above its least significant bit.
- **`one_cycle`**. The operation completes in this cycle. This holds when it
  is `close`, has no Inf or NaN operand, and either:
  - it is an effective addition (every mode except `LAT_TWO_CYCLE`), or
  - it is an effective subtraction (modes `LAT_SUBSk`) where:
    - the predicted normalizing shift is at most `k`, and
    - the larger exponent is at least 4. This keeps the short shift out of
      the subnormal range.

The shift test does not wait for the full leading-one predictor and its
54-bit priority encoder. `fpa_onecycle_pred` has a small predictor of its
own. It takes the top four bits of the aligned pair `X`, `Y` from the CLOSE
path and forms the position flags for the top three positions only. Each
flag depends on its own bit and the bits on either side, so four bits are
enough. The flags are the usual transfer, generate and zero indicators of
`X` and `~Y`, the same as in `fpa_lop`. Mode `LAT_SUBSk` ORs the top `k+1`
flags. The answer therefore equals "full prediction at most `k`". That
prediction is either exact or one too small, and never too large. Two
consequences follow:

- A subtraction with a true shift of `k` or less always qualifies.
- A true shift of `k+1` may also qualify. The one-cycle mux therefore
  handles one extra place.

This is also why the measured subs0 and subs1 averages below are slightly
lower than the figures computed from the shift histogram.

## The result bus, collisions and scheduler notice

Each stage can produce a result, but there is only one result bus.
`fpa_bus_ctrl` sets the order:

- Stage 3 always drives the bus when it holds an operation.
- Stage 2 drives it only if stage 3 is empty.
- Stage 1 drives it only if both later stages have nothing finished.

A finished result that loses is carried into the next stage with the
operation's tag, and tries again there. Stage 3 always wins, so:

- no operation takes more than three cycles;
- the pipeline never stalls;
- one result retires per cycle at most, and one operation may enter per cycle.

Results come out of order: a one-cycle operation can overtake a FAR operation
issued before it. The rule only makes sure that a younger finished result
never takes the bus from an older one in the same cycle.

Collisions cost latency but never throughput. With back-to-back mixed
traffic many early results are delayed. In the full-rate test more than 80% of
operations retire in cycle 3. The published averages assume operations far
enough apart not to collide.

There are two scheduler outputs:

- `pred_one_cycle` is valid in the cycle the operation is presented. It
  means "the result is on the bus this cycle".
- `sched_valid`, `sched_tag` and `sched_cycles` are valid in the next cycle
  and describe the operation now in stage 2. `sched_cycles` is 1 if its
  result is on the bus in this cycle and 2 if it comes in the next one.
  These values are exact, because they already take the collision with
  stage 3 into account.

## Interface and timing

```
module vlfpa #(parameter lat_mode_e LAT_MODE = LAT_SUBS2, parameter int TAG_W = 6)
  clk, rst_n                    synchronous, active-low reset empties the pipeline
  in_valid, in_a[63:0], in_b[63:0], in_sub, in_rm (rmode_e), in_tag[TAG_W-1:0]
  pred_one_cycle
  sched_valid, sched_tag, sched_cycles[1:0]
  res_valid, res_tag, res_value[63:0], res_stage[1:0]
```

- An operation is presented for one cycle; there is no ready signal.
- The result bus is combinational from the stage that finishes.
- An operation presented in cycle *t* is on the bus in cycle *t + L − 1*.
  `L = res_stage` is its latency.
- Consumers sample the result on the clock edge that ends that cycle.
- In a one-cycle operation, the inputs therefore reach the result bus
  through logic only, within the same cycle.
- Tags are returned unchanged. Every operation leaves within three cycles,
  so tags only need to be unique over any three consecutive issue slots.

`LAT_MODE` (`fpa_pkg::lat_mode_e`) chooses which operations may finish
early:

| LAT_MODE | one-cycle operations |
|---|---|
| `LAT_TWO_CYCLE` | none: CLOSE path in 2 cycles, FAR in 3 |
| `LAT_ADDS` | CLOSE effective additions |
| `LAT_SUBS0` / `LAT_SUBS1` / `LAT_SUBS2` | additionally, CLOSE subtractions with predicted shift ≤ 0 / 1 / 2 |

In `LAT_TWO_CYCLE` a CLOSE addition is still computed in stage 1 and released
from stage 2.

## Numerics

- **Rounding.** All four IEEE 754 modes are supported (`RM_RNE`, `RM_RTZ`,
  `RM_RUP`, `RM_RDN`). The round-up decision always comes from the sign, LSB,
  guard and sticky bits (`fpa_pkg::round_up`). The FAR path rounds by
  selecting among its compound-adder outputs (stage 3 above). The CLOSE path
  results go through `fpa_round`, which selects between the normalized
  significand and its increment from a compound incrementer. If the
  increment carries out, the result is shifted right one place.
- **Overflow.** The result becomes Inf or the largest finite number,
  depending on the mode.
- **Subnormals.** Subnormal operands need no special handling. A result too
  small for a normal number comes out subnormal because the normalizing
  shift is limited to `exponent − 1`.
- **Exact zero.** An exact zero difference is +0, or −0 when rounding
  towards −Inf. The sum of two zeros of the same sign keeps that sign.
- **NaN.** A NaN operand is returned quieted, A's before B's.
- **Inf − Inf.** The result is `7FF8_0000_0000_0000`.
- **Flags.** None are exported.

## How far this follows the original algorithm

These parts follow the published scheme:

- the CLOSE/FAR split;
- the three-stage pipeline and what each stage contains;
- the CLOSE swap decided from two exponent bits;
- compound-adder conversion and rounding;
- the early completion classes (Two Cycle, adds, subs0–2);
- the early CLOSE/FAR and leading-one signals;
- the rule that the latest stage owns the bus and other results are piped on;
- the scheduler notice at the end of the first cycle.

These are choices made here:

- **CLOSE path rounding.** The CLOSE path rounds its one-cycle results,
  and the unshifted two-cycle case, with a separate compound incrementer
  after normalization. It does not fold the rounding into the main
  significand adder. Only one guard bit is ever rounded there.
- **Result bus.** A multiplexer stands in for the per-stage tri-state
  drivers.
- **Added interface and behaviour.** The tags, the scheduler ports, reset,
  subnormal and Inf/NaN handling, the exponent ≥ 4 guard on one-cycle
  subtractions, and the data widths (one guard bit in the CLOSE path; guard,
  round and sticky bits in the FAR path) are not specified by the algorithm
  and were chosen here.
- **Extended precision.** The algorithm also mentions 15-bit exponents. This
  RTL is double precision only.
- **Cycle time.** No gate-level timing is claimed. The RTL describes the
  stage contents; it is not tuned to a cell library.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

The reference model is `tb/fpa_ref_pkg.sv`. It works differently from the
adder: it adds in one wide fixed-point word, searches for the leading one and
rounds once. `tb_vlfpa` also compares its round-to-nearest results with the
simulator's native double addition.

| testbench | what it covers |
|---|---|
| `tb_vlfpa` | 20,000 operations at full rate with gaps, in all modes and cases, including cancellation, subnormals, overflow, zeros, Inf and NaN. Checks every value, and the exact cycle, tag and stage of each result, using a replay of the bus rule. Also checks `pred_one_cycle` and the scheduler notice, and that each mechanism occurred. Default parameters. |
| `tb_vlfpa_modes` | The same full-rate mixed stream (8,000 operations) on four adders built with `LAT_TWO_CYCLE`, `LAT_ADDS`, `LAT_SUBS0` and `LAT_SUBS1`. For each configuration it predicts every natural latency, replays the bus rule, and checks every value, cycle, tag and stage, `pred_one_cycle` and the scheduler notice. It also requires collisions at both stages. |
| `tb_vlfpa_workload` | The five latency modes side by side. First on a stream drawn from the published operand statistics with no collisions, then on a back-to-back FAR, FAR, CLOSE pattern in which every CLOSE result collides. All results are checked, and each mode must retire one result per cycle. |
| `tb_fpa_*` | One per block: compound adder, rounder, exponent difference, leading-one predictor (prediction exact or one short), one-cycle predictor, CLOSE stage 1, normalizing shifter, aligning shifter, FAR add/round, Inf/NaN, bus control. |

Average latency per mode from `tb_vlfpa_workload`:

| mode | published | measured |
|---|---|---|
| Two Cycle | 2.57 | 2.571 |
| adds | 2.37 | 2.371 |
| subs0 | 2.36* | 2.336 |
| subs1 | 2.31* | 2.280 |
| subs2 | 2.25 | 2.247 |

\* Computed here from the published shift histogram.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb rtl/fpa_pkg.sv tb/fpa_ref_pkg.sv \
    tb/tb_vlfpa.sv --top-module tb_vlfpa -o sim && ./obj_dir/sim
```

Replace `tb_vlfpa` with any other testbench name. Verilator finds the other
modules in `rtl/` by their file names.

## Files

- `rtl/fpa_pkg.sv`: widths, rounding and latency-mode enums, pipeline
  register structs, the unpack function.
- `rtl/vlfpa.sv`: the top; pipeline registers and result bus.
- `rtl/fpa_close_path.sv`, `fpa_lop.sv`, `fpa_onecycle_pred.sv`,
  `fpa_norm_shift.sv`: the CLOSE path and early prediction.
- `rtl/fpa_exp_diff.sv`, `fpa_align_shift.sv`, `fpa_far_add.sv`: the FAR
  path.
- `rtl/fpa_compound_adder.sv`, `fpa_round.sv`, `fpa_special.sv`,
  `fpa_bus_ctrl.sv`: shared pieces.
- `tb/`: the testbenches and the reference model.
