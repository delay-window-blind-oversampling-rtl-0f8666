# Delay-window blind-oversampling CDR

A blind-oversampling clock and data recovery (CDR) receiver samples a serial
line with a free-running local clock that is faster than the bit rate. It
never adjusts that clock. Instead, it works out from the samples where each
bit is. Classic schemes pick one sample out of every fixed group of `beta`
samples, where `beta` is the oversampling rate. They need an integer `beta`
and a local clock that is accurately frequency-matched to the transmitter.
Any drift between the two turns into bit slips.

This receiver uses *delay windows* instead. A delay window is a countdown
that restarts at every data edge, and its length is computed from a
real-valued `beta`. The decision grid therefore moves with the data, not
with the local clock, which brings three benefits:

- `beta` can be any real number of 3 or more.
- Slow drift and large low-frequency jitter are tracked. In simulation,
  14.8 UI of sinusoidal jitter over a 64 000 UI period gives no bit errors.
- `beta` can be measured on a preamble when the exact rate is not known.

The RTL is parameterised by `M`, the number of samples processed per core
clock:

- `M = 12` (the default) is a 12-phase receiver, for example 640 Mb/s at
  `beta = 3` with a 160 MHz core clock.
- `M = 1` is a single-phase receiver for a low-power node. That node has a
  poor RC clock and a tracking range of `3 <= beta <= 9`.

## The delay window

The core (`dw_cdr_core`) keeps three pieces of state:

- the previous sample, used for edge detection;
- a countdown `timer`;
- `p`, the number of windows that have ended since the last edge.

For every sample, in time order, the core does the following:

| condition | action | phasesel |
|---|---|---|
| sample differs from the previous one (edge) | `p <= 0`, `timer <= T_0 - 1` | 1 |
| no edge, `timer == 0` (window expired) | `p <= p + 1`, `timer <= T_p - 1` (new `p`) | 1 |
| otherwise | `timer <= timer - 1` | 0 |

Every window end (`phasesel = 1`) yields one recovered bit. Its value is the
sample just before the window end:

- On an edge, this is the last sample of the bit that has just finished.
- On an expiry, the line has not changed, so it is the bit in progress.

Consider a bit that starts at an edge. The window that starts there ends at
about 1.5 `beta` samples. That is the middle of the following bit. If that
bit brings no edge, the next window ends about one `beta` later, in the
middle of the bit after that, and so on. If an edge comes first, it ends the
window early and re-centres the grid. As a result, the boundary estimate is
never more than one run of equal bits old.

### Window lengths for a real-valued beta

A window can only last a whole number of samples. Using `floor(beta)` for
every later window would let the rounding error add up. Instead, each window
is aimed at an absolute midpoint measured from the last edge:

```
T_0 = floor(1.5 beta)
T_p = floor((p + 1.5) beta) - floor((p + 0.5) beta)     p > 0
```

For `beta = 3.5`, this gives the lengths 5, 3, 4, 3, 4, ..., whose average
is exactly 3.5 (`dw_duration`).

`beta` is held in fixed point with 5 integer and 3 fractional bits. In other
words, the port carries the integer `B = 8 * beta`, so `beta = 3` is 24,
`beta = 3.5` is 28 and the maximum is 31.875. Each floor is then an integer
multiply followed by a right shift: `floor((p + k/2) beta) = ((2p + k) * B) >> 4`.

Because `B` is an integer, `T_p` for `p > 0` repeats every 8 values of `p`.
The core uses this so that `p` only needs 4 bits. It counts 0, 1, ..., 8 and
then wraps back to 1, and the window lengths are exactly those of an
unbounded counter. The table `T_0 .. T_8` comes from nine `dw_duration`
instances, each with a constant `p`.

### M samples per clock

With `M > 1`, the table above is unrolled `M` times in one combinational
pass (`always_comb` loop in `dw_cdr_core`). `timer` and `p` are carried from
sample to sample within the pass. Bit 0 of the sampled word is the oldest
sample and bit `M-1` the newest, and the loop runs from bit 0 upwards.

The core's outputs are registered and are one cycle behind the input word:

- `phasesel[i]`: a recovered bit ends at sample `i`;
- `dsel[i]`: the value of that bit;
- `edge_end[i]`: the window ended on an edge rather than by expiry. This
  output is for observation only.

Anywhere from 0 to `M` bits can come out of one word, about `M / beta` on
average. With `beta = 3` and jitter, 5 bits per word are common.

## Getting samples in

`dw_sampler` (used when `M > 1`) takes `M` clocks of the same frequency.
Clock `clk_ph[k]` lags `clk_ph[0]` by `k/M` of a period, and `clk_ph[0]` is
the core clock. Each phase samples the line, and the sample is handed on
through flip-flops clocked by the following phases, one hop of `1/M` period
at a time. Finally, all `M` lanes are captured together on `clk_ph[0]`. The
word that appears at the start of period `n+1` holds the samples of period
`n`, with the oldest in bit 0. For `M = 12`, the chain uses 79 flip-flops.

`dw_synchronizer` (used when `M = 1`) is a two-flip-flop synchronizer on the
single clock.

## Measuring beta on a preamble

`dw_beta_estimator` measures `beta` when it is not known. After a one-cycle
`arm` pulse:

1. It waits for the first edge on the line.
2. It counts samples until `PRE_UI` further edges have passed.
3. It reports `beta_est = floor(8 * span / PRE_UI)` (so `8 * beta`) and
   raises `beta_valid`.

Edge times are resolved to the individual sample even when several edges fall
into one word.

The assumed preamble is 9 bits that each begin with a transition, such as
alternating bits or NRZI-coded ones. Its 9 edges are 8 UI apart from the
first to the last, so `PRE_UI = 8` and the division is a shift.

If the measured span passes `PRE_UI * 32` samples, the measurement restarts
at the next edge.

The estimate is truncated to 1/8. The estimated `beta` is therefore up to
1/8 low, a relative error of up to 4 % at `beta = 3`. Over a run of equal
bits, this error adds up. A run of `n` bits drifts by about `n * error` UI
and slips a bit once that reaches 0.5 UI. This is harmless for
run-length-limited line codes such as 4B5B with NRZI, which have at most 4
equal bits in a row. Long runs need a programmed, accurate `beta`.

In `dw_cdr_top`, `beta_use_est` selects the estimate once it is valid.
Otherwise, the core uses `beta_cfg`.

## Jitter tolerance

`tb_dw_jitter_tolerance` runs the default 12-phase receiver at `beta = 3`.
At 640 Mb/s, this is a 160 MHz core clock. The data is random, with runs of
up to 31 equal bits. The sinusoidal jitter amplitude is raised step by step
until bits are lost.

| jitter frequency at 640 Mb/s | period | largest amplitude without error |
|---|---|---|
| 10 kHz | 64 000 UI | 100 UI (highest step tried) |
| 100 kHz | 6 400 UI | 10 UI |
| 1 MHz | 640 UI | 1 UI |
| 10 MHz | 64 UI | 0.3 UI |
| 50 MHz | 12.8 UI | 0.2 UI |

The limit comes from the longest run of equal bits. During a run there are
no edges, so the window grid free-runs. It slips once the jitter has moved
the data by about half a bit since the last edge. A fixed decision window
cannot follow the data, so it is limited to well under 1 UI at every
frequency. The delay window's advantage therefore lies entirely at low
jitter frequencies and under drift.

## Output FIFO

`dw_output_fifo` is a 64-bit shift buffer. It takes 0..`M` bits per cycle
from `dw_data_extractor`, which packs the selected bits oldest first. It
delivers 8-bit words with a valid/ready handshake:

- The first received bit is in bit 0 of `out_word`.
- `out_valid` means at least 8 bits are held.
- A word is taken when `out_valid` and `out_ready` are both high.

The consumer must take words on average at least as fast as bits arrive
(about 4 bits per cycle at `beta = 3`, `M = 12`). A burst that does not fit
is dropped whole, and `fifo_overflow` is set until reset.

## Top level: `dw_cdr_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk_ph` | in | M | sampling phases; `clk_ph[0]` is the core clock |
| `rst_n` | in | 1 | synchronous active-low reset (`clk_ph[0]` domain) |
| `din` | in | 1 | asynchronous serial input |
| `beta_cfg` | in | 8 | programmed `8 * beta` |
| `beta_use_est` | in | 1 | use the measured `beta` once valid |
| `est_arm` | in | 1 | start a measurement on the next edge |
| `beta_est`, `beta_est_valid`, `est_busy` | out | 8,1,1 | estimator result and state |
| `beta_active` | out | 8 | `beta` the core is using |
| `out_word`, `out_valid`, `out_ready` | out/out/in | 8,1,1 | recovered data stream |
| `fifo_level`, `fifo_overflow` | out | 7,1 | buffered bits, sticky overflow |

Parameters: `M = 12`, `OUT_W = 8`, `FIFO_DEPTH = 64`, `PRE_UI = 8`,
`BETA_W = 8`. With `M = 1`, only `clk_ph[0]` exists.

Latency from a line edge to the matching bit in the FIFO:

- about one core cycle in the sampler (two in the synchronizer);
- one cycle in the core;
- one cycle in the extractor.

After that, the bit waits in the FIFO until a whole word is there.

The core's `timer`, `p` and `phasesel` are reset to 0. Without a reset,
they become valid at the first edge anyway.

## How far to trust it, and what is this design's own

What the algorithm fixes, and the RTL follows exactly:

- the window decision rule;
- the `T_p` function and its integer evaluation in the 5.3 format;
- the reset values;
- estimating `beta` from a preamble of known length.

Choices made here:

- **Sample order.** Samples are processed oldest first (bit 0 upwards),
  because the decisions must follow time order.
- **Recovered value.** The recovered value is the sample just before each
  window end.
- **`p` wraps.** `p` wraps from 8 back to 1. This is exact, as explained
  above.
- **Sampler.** The hand-off chain of the sampler is this design's own. Its
  overall shape (a shift-register sampler of about `M^2` flip-flops) is the
  reference structure, but this one uses fewer.
- **Synchronizer.** The synchronizer has two stages.
- **Preamble.** The preamble pattern (edges at every bit), the arm/timeout
  behaviour, and counting samples rather than clock cycles (so `M > 1` works)
  are this design's own.
- **Extractor and FIFO.** The extractor's packed format and the entire
  output FIFO are this design's own: word width, depth, handshake and
  overflow policy.
- **beta selection.** The `beta_cfg` / `beta_use_est` selection is this
  design's own.

Not included:

- the multi-phase clock generator (a PLL);
- the RC oscillator of the low-power node;
- the LVDS input buffer;
- the 4B5B/NRZI packet decoder of the node's bus, whose framing is not
  defined here.

Size: the core holds 47 flip-flops for `M = 12`:

- timer: 6
- `p`: 4
- previous sample: 1
- registered `phasesel`, `dsel` and `edge_end`: 3 x 12

A fixed-`beta = 3` build needs far fewer, since the timer, `p` and the
`T_p` table shrink to constants. That is the figure to compare with reported
cores of about 20 registers and 50 logic cells. Timing closure at 160 MHz
has not been checked.

Verified in simulation (all self-checking):

- `dw_duration` against real-number arithmetic for every `8 * beta` from 24
  to 255 and `p = 0..8`.
- `dw_cdr_core`, cycle by cycle, against an independent model with
  unbounded `p`. This covers `M = 12` and `M = 1`, `beta` values 3, 3.5,
  4.375 and 9, frequency offsets of ±1 %, and jitter.
- The full receiver end to end, at default parameters. The run includes
  64 000 bits at 14.8 UI of jitter with runs of up to 24 equal bits, 0.5 %
  drift, an estimated `beta` of 3.7, a consumer that stalls, and a forced
  overflow.
- The single-phase receiver with `beta` values 3.3, 5.5 and 8.9 estimated,
  and with `beta = 9` at 1 % drift.

No bit-error rate was measured. About 10^5 bits per run were compared, with
zero errors.

## Files and simulation

`rtl/`:

- `dw_pkg.sv` (constants)
- `dw_duration.sv`
- `dw_cdr_core.sv`
- `dw_sampler.sv`
- `dw_synchronizer.sv`
- `dw_data_extractor.sv`
- `dw_output_fifo.sv`
- `dw_beta_estimator.sv`
- `dw_cdr_top.sv`

`tb/`:

- one `tb_<module>.sv` per module;
- `tb_dw_cdr_single.sv` for the `M = 1` receiver;
- `tb_dw_jitter_tolerance.sv` for the jitter sweep;
- `dw_tb_pkg.sv`, which holds the models: a transmitter with jitter, a
  reference model of the algorithm, and a PRBS-7 checker.

Every testbench prints `TB_RESULT checks=N failures=F`. For example:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/dw_pkg.sv tb/dw_tb_pkg.sv rtl/dw_duration.sv rtl/dw_cdr_core.sv \
    rtl/dw_sampler.sv rtl/dw_synchronizer.sv rtl/dw_data_extractor.sv \
    rtl/dw_output_fifo.sv rtl/dw_beta_estimator.sv rtl/dw_cdr_top.sv \
    tb/tb_dw_cdr_top.sv --top-module tb_dw_cdr_top -o sim
./obj_dir/sim
```

The testbenches generate their sampling clocks with delays (1 time unit =
1 ps by default), so `--timing` is required. In `tb_dw_cdr_top`, one sample
is 1000 units apart.
