# Phase measurement by random sampling, and a clock-to-data alignment loop built on it

Two digital signals of the same frequency are sampled together at moments
that have nothing to do with either signal. Each sample is a pair of bits.
Over one cycle the pair runs through four states, and the chance that a
random sample sees a given state equals the fraction of the cycle that state
lasts. Take n samples and count the X that show `10` (signal 1 already high,
signal 2 still low). Then X/n estimates how far signal 2 lags signal 1, as a
fraction of a cycle. Nothing here is analog: the hardware is flip-flops,
two counters and a clock whose edges fall at random.

This RTL implements that measurement, the *random sampling unit* (RSU), and
the system it was proposed for: a receiver that calibrates its clock-to-data
timing. During calibration the transmitter sends its clock down the data line.
The RSU measures how far the receiver's capturing clock lags that pattern, and a
control unit sets a programmable delay line in the receiver clock path so the
lag reaches a target, typically 90°. Because the measurement can be made
as accurate as needed, the controller can pick the best tap. The residual error
is then below half a tap.

The design follows a published description of the technique (a 130 nm
standard-cell RSU with 16-bit counters, a 33 ps delay line, an LFSR-steered
ring oscillator as random clock). The control algorithm, the handshakes,
the number formats and all sizes not stated there are this design's own.
They are marked as such below and in each file's header.

## The measurement and its statistics

```
            |<------------------ T (one cycle) ------------------>|
signal 1    ___/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_________________________/‾
signal 2    __________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_________________
region         A (10)  |     B (11)        | C (01)|    D (00)
```

Let p = t_A / T. Each random sample is a Bernoulli trial with success
probability p, so P = X/n has mean p and standard error sqrt(p(1-p)/n).
For an error of at most alpha with confidence level CL (critical value z,
1.645 at 90 %, 2.576 at 99 %, 4.892 at 99.9999 %) the sample size is

    n = (z / alpha)^2 * P(1 - P)        worst case P = 0.5

| error alpha | 90 %  | 99 %   | 99.9999 % |
|-------------|-------|--------|-----------|
| 10 %        | 68    | 166    | 599       |
| 1 %         | 6 765 | 16 587 | 59 820    |
| 0.1 %       | 676 k | 1.66 M | 5.98 M    |

With 16-bit counters (n up to 65 535), an error of 1 % is reachable
even at 99.9999 % confidence. 0.1 % needs 20 to 23 counter bits: set `CNT_W`.
The error shrinks with sqrt(n), so halving the error costs four times
the samples. Zero-mean jitter on the measured signals averages out.

Two properties of the estimate matter in use:

* **Region A measures a folded lag.** For two 50 % duty signals with lag d,
  t_A = min(d, T - d). The loop therefore treats X/n as the lag itself. That
  holds while the lag is less than half a cycle, which the alignment flow
  keeps to (see below). Regions A and C have equal length for such signals,
  so swapping the two inputs changes nothing.
* **The random clock has to be random with respect to the signal.**
  Only the distribution of its edges over the signal's cycle matters, not
  its frequency. See *Random clock* for what goes wrong when that fails.

## Random sampling unit (`rsu`)

```
sample  --[sync x2]--+--[ff]--(differ?)-- reset pulse --+--> Counter 1 LOAD (n)
                     +-------------------'               +--> Counter 2 clear
signal1 --[sync x2]--\
signal2 --[sync x2]--+--(== region_code)--+
                                           AND (Counter 1 != 0) --> Counter 2 EN
Counter 1 EN = (Counter 1 != 0), no trial in the reset-pulse cycle
sample_ready = (Counter 1 == 0)          count_x = Counter 2
```

Everything runs on `rand_clk`. Inputs are sampled through two cascaded
flip-flops each, so a metastable capture has a full cycle to settle.
Whatever the capture resolves to is still a valid random sample. A
*transition* of `sample`, in either direction, starts a measurement. That
lets a controller in another clock domain start one by toggling a level,
with no pulse to stretch.

Timing, counted in `rand_clk` edges after `sample` toggles:

| edge                           | event                                      |
|--------------------------------|--------------------------------------------|
| 2                              | synchronised sample changes, reset pulse   |
| 3                              | Counter 1 = n, Counter 2 = 0, `sample_ready` falls |
| 4 .. n+3                       | the n trials                               |
| n+3                            | `sample_ready` rises, `count_x` = X, stable |

`n` must be at least 1; an assertion checks it. `count_x` is only read
while `sample_ready` is high, when it no longer changes, so it can cross
to another clock domain without further synchronisation.
`rsu_down_counter` (Counter 1) and `rsu_event_counter` (Counter 2) are
separate modules. `sync_ff` is the synchroniser chain.

## Random clock (`random_clock_gen`, `lfsr`, `ring_oscillator`)

A 16-bit maximal-length LFSR (x^16 + x^14 + x^13 + x^11 + 1) on the system
clock drives, through its low 3 bits, the length control of a ring
oscillator. The ring is a behavioural model. It toggles every
(13 + 2*sel) × 40 ps, plus a uniform 0..160 ps term that stands in for the
erratic timing of a free-running ring. That gives half periods of 520 to
1240 ps.

The jitter term is not decoration. With a spread of 60 ps and length steps of
80 ps, and with the 80 ps step dividing the 2000 ps signal period, edges bunch at some
signal phases. X/n then came out about 0.7 % low, enough to pick the wrong
tap. With 160 ps the bias is below 0.1 %, under the statistical error
of the measurements run. A real ring's jitter, and a system clock not locked
to the measured signal, both help. A silicon implementation should verify
the uniformity of its own random clock, for example with the accuracy test below.

## Alignment loop (`phase_align_link`, `phase_ctrl`)

```
 clk_tx -+-> tx_launch (data flip-flop) ---\
         |                                   mux --> line_out ~~line~~> line_in --+--> rx_capture D --> data_out
         +-> clkq_delay (clock pattern) ----/ ^align                              |        ^
                                                                                  |        | clk_rx_dly
 clk_rx --------------------------------------------> delay_line (tap) ------------|--------+
                                                           ^                      |        |
                                                           | tap                  v        v
 sys_clk --> random_clock_gen --rand_clk--> rsu (signal1 = line_in, signal2 = clk_rx_dly, region 10)
                                                           ^   | sample_ready, count_x
                                                           |   v
                                                        phase_ctrl  (sample, n)
```

The line and the clock buffers are outside the top module: `line_out` goes
to the line, `line_in` comes back, and `clk_tx`/`clk_rx` are the clocks as
they arrive at each end. Those delays are what the loop corrects.

When `align` rises, `phase_ctrl` runs passes. Each pass does this:

1. picks the sample size: `n_coarse` on the first pass, `n_fine` after
   (quick first correction, accurate final ones);
2. toggles `sample`, waits for the synchronised `sample_ready` to fall and
   rise, and latches X;
3. computes the correction in taps, rounded to nearest:

       delta = round((target_phase - X/n) * cycle_taps)

   `target_phase` is Q0.16 of a cycle (0x4000 = 90°). `cycle_taps` is the
   clock period divided by the tap step, in Q8.8 (2000 ps / 33 ps = 60.6 →
   15515). The arithmetic is exact in fixed point: the error
   `target_phase*n - X*2^16` times `cycle_taps`, its magnitude divided by n on
   a 48-cycle sequential divider, then rounded half up;
4. moves `tap` by delta, clamped to 0..63.

The loop ends with `done` after `MAX_PASSES` (4) passes, or as soon as a
pass after the first needs no change. `tap` then holds, also after `align`
falls. `align` is taken to be synchronous to `sys_clk`.

The sign convention assumes the receiver clock lags the data by less than
half a cycle at the start. The worked case (500 MHz, 33 ps taps) shows why
accuracy pays. Suppose the clock lags by 100 ps and should lag by 500 ps (90°).
It needs 400 ps more. Tap 12 gives 396 ps (4 ps off) and tap 13 gives 429 ps (29 ps
off), and the loop must tell them apart. The end-to-end testbench runs
exactly this case.

## What is synthesizable

| module | kind |
|--------|------|
| `rsu`, `rsu_down_counter`, `rsu_event_counter`, `sync_ff` | synthesizable |
| `lfsr`, `phase_ctrl`, `seq_divider`, `tx_launch`, `rx_capture` | synthesizable |
| `ring_oscillator`, `delay_line`, `clkq_delay` | behavioural models (delays) |
| `random_clock_gen`, `phase_align_link` | structural; contain behavioural models |

The behavioural models stand for technology-specific cells: a ring of
inverters, a tapped delay chain, a matched delay. In silicon they are
custom or hand-instantiated standard cells. `rsu_pkg` holds the region
encoding (A = 10, B = 11, C = 01, D = 00) and the fixed-point widths.

Parameters and their origin:

| parameter | default | origin |
|-----------|---------|--------|
| `CNT_W` (RSU counters) | 16 | original design |
| `TAP_PS` | 33 | original design |
| `NTAPS` | 64 | own choice: one 500 MHz cycle at 33 ps |
| `SYNC_STAGES` | 2 | original block diagram draws a flip-flop pair per input |
| LFSR width / polynomial / seed | 16 / 0xB400 / 0xACE1 | own choice |
| ring: `SEL_W`, `BASE_STAGES`, `STAGE_PS`, `JITTER_PS` | 3, 13, 40, 160 | own choice |
| `CLKQ_PS` | 100 | own choice |
| `MAX_PASSES` | 4 | own choice |

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. A run passes when M is 0.

* `tb_rsu` drives random pairs on a regular clock. It predicts X from the
  applied history shifted by the synchroniser depth and checks the
  Sample Ready timing in the table above, restart in mid-measurement, X = n
  and X = 0.
* `tb_rsu_accuracy` repeats the accuracy experiment. It feeds the RSU two
  100 MHz signals 90° apart, clocked by `random_clock_gen`, with the n from
  the formula above. It runs 100 measurements for each of 12 settings (error
  10 % and 1 %, confidence 90 % to 99.9999 %) and two per confidence level
  at error 0.1 % on a 24-bit instance (n up to 5.98 M). It prints the largest
  error divided by alpha, and checks the share within alpha, that no error
  exceeds alpha at 99.99 % confidence and above, and the mean. In the runs
  so far every measurement was within alpha. The largest ratios were 0.59
  at error 10 %, 0.51 at 1 % and 0.79 at 0.1 %, and the mean at 1 % was
  0.2504. The residual bias of about 0.05 % of a cycle comes from the
  ring model.
* `tb_phase_ctrl` closes the loop around a model of the link. It checks each
  pass's tap against a real-valued calculation, and also the coarse/fine
  sample sizes, the early stop, the pass limit and clamping.
* `tb_phase_align_link` runs the whole link at default parameters with
  n = 1024 then 65 535. It passes data, aligns (tap 12, lag 496 ps), passes data,
  shortens the line by 100 ps, realigns (tap 9, lag 497 ps) and passes data again.
  Then it adds ±90 ps of zero-mean jitter to every line edge and realigns.
  It counts that the clock pattern, coarse and fine passes, tap increases and
  decreases, data transfers and the jittered alignment all happened.
  Under jitter the mean of X/n stays put but its spread grows: about
  0.003 of a cycle against 0.001 without. Tap 9 beats tap 10 by only
  13.5 ps, so over six random seeds the loop stopped at tap 10 once. The
  jittered case therefore accepts a neighbouring tap.
* The others check the counters, the LFSR (maximal period), the ring
  and random clock timing, the delay elements and the transmit and receive
  flip-flops.

To run one with Verilator 5 (from the directory holding `rtl/` and `tb/`):

    verilator --binary --timing --assert -Irtl -Itb rtl/rsu_pkg.sv \
        tb/tb_phase_align_link.sv --top-module tb_phase_align_link -o sim
    ./obj_dir/sim

All files use `timescale 1ps/1ps`. The end-to-end run takes a few seconds
and `tb_rsu_accuracy` about 75 s.

## Departures and limits

* The control algorithm (passes, rounding, clamping, early stop), the
  start/ready handshake and the number formats are not taken from the
  original design, which says only what the control unit achieves.
* The loop reads X/n as the lag. A start-up lag beyond half a cycle
  would steer the wrong way. Resolving that needs a second measurement,
  which is not built.
* Under signal jitter the spread of X/n is wider than the Bernoulli
  figure sqrt(p(1-p)/n), so the sample-size formula is optimistic there.
  The loop has no averaging across passes; its last pass decides.
* The sample size must keep `sample_ready` low for a few `sys_clk` cycles
  so the controller sees it fall. With a random clock about as fast as
  `sys_clk`, n ≥ 16 is ample.
* Ring, delay line and clock-to-Q delay are behavioural. Their numbers
  (except the 33 ps step) are placeholders for a real technology.
* The clock buffers and the line are not modelled in the RTL. The
  testbenches supply them (`tb/tb_line_model.sv`).
