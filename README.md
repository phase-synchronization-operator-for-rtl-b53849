# DDA phase synchronization processor

This is a small integer-only processor that measures how strongly two
band-limited neural signals (EEG or ECoG, for example) are phase synchronized.
It does not estimate instantaneous phase with a Hilbert transform, a wavelet
or CORDIC units. Instead it uses **Delay Difference Analysis (DDA)**:

* a signal's local minima split it into cycles. The time between two
  consecutive minima (the *transition period* T) is one full turn of
  phase, 2π;
* two signals that stay phase locked have equal transition periods. The more
  their periods differ, the more their phases drift apart;
* so the processor pairs the periods of the two signals as they arrive. It
  adds up the absolute differences |T1 - T2| over a window of N samples and
  maps the sum to an index between 0 (no coupling) and 1 (perfect locking).

It needs only comparators, shift registers, counters and adders. It stores
no signal history beyond ten comparison bits per channel. The RTL follows the
two-channel DDA processor described in *Phase Synchronization Operator for
On-Chip Brain Functional Connectivity Computation*. Its default configuration
is: 10-bit samples at 1024 samples/s, N = 1024 (one index per second), a
minimum detector with M = 10 and Q = 2, and index smoothing with α = 1/32.
Where that description leaves details open, this RTL makes its own choices.
They are listed in "Choices made in this RTL" below.

## The index

Let K be the number of period pairs formed in window k. The index is

    S(k) = 1 - (2^r / N) * min( Σ|ΔT_n| - T_os , N / 2^r )

* **r** (selectivity, 0..log2 N) sets how quickly the index falls as the
  periods diverge. A larger r gives a narrower frequency band in which the
  index is non-zero.
* **T_os** (offset) is subtracted from the sum. At larger r the peak index of
  two nearly locked signals falls below 1, and T_os lifts it back up.
* If the sum is below T_os, the index would exceed 1. A **limiter** then
  clamps it to 1.

The hardware computes `N*S`, an integer from 0 to N (`$clog2(N)+1` = 11 bits).
`2^r` and `N/2^r` are shifts, so the datapath has no multiplier or divider:

    idx = N                        if sum <  T_os            (limiter)
    idx = 0                        if sum - T_os >= N >> r    (floor)
    idx = N - ((sum - T_os) << r)  otherwise

The window count K is limited by the slower signal: K ≈ N·f_min/f_s. With a
20 Hz sine against a 10→30 Hz chirp, the index therefore falls off linearly
below 20 Hz and more slowly above it. `tb_dda_workloads` reproduces this
asymmetry. For example, at r = 2 the index falls to 0 at 15 Hz but only at
about 27 Hz on the high side.

## Datapath

```
 sdi1 ─ spi_rx ─ exp_smoother(α=1/4) ─ event_detector ─ period_counter ─┐
                                                                         pairing_fsm ─ sync_index ─ exp_smoother(α=1/32) ─ pso_tx ─ sdo
 sdi2 ─ spi_rx ─ exp_smoother(α=1/4) ─ event_detector ─ period_counter ─┘
```

| module | role |
|---|---|
| `dda_pkg` | default sizes and widths shared by all modules |
| `spi_rx` | serial-to-parallel input port, one per channel |
| `exp_smoother` | y ← y − y·2^−S + x·2^−S. Used on each input and on the index |
| `minima_logic` | combinational minimum decision over the comparison history |
| `event_detector` | comparator + M-bit history register + `minima_logic` |
| `period_counter` | counts samples between consecutive minima of one channel |
| `pairing_fsm` | latches the latest period of each channel and emits \|T1−T2\| when both are present |
| `sync_index` | accumulates \|ΔT\| over N samples and evaluates the index with the limiter |
| `pso_tx` | parallel-to-serial output port |
| `dda_top` | wires the above together and brings out test points |

### Minimum detection (`event_detector`, `minima_logic`)

Each sample is compared with the previous one. The result (1 = rose or
stayed flat, 0 = fell) is shifted into a history of the last M = 10
comparisons. The history is split into an older half and a newer half of
five comparisons each. A minimum is reported when all three hold:

1. the older half has at least M/2 − Q = 3 falls;
2. the newer half has at least 3 rises;
3. the two comparisons at the centre are a fall followed by a rise.

Rules 1 and 2 let up to Q = 2 comparisons on each flank go the wrong way, so a
short noise blip on the way down or up does not hide the minimum. Rule 3
places the reported minimum at a fixed point: exactly M/2 = 5 samples before
the sample that completes the pattern. Both channels see the same delay, so
the periods are unaffected.

After a detection, the history is refilled with "rise". Without this, an
outlier next to the minimum could satisfy the rules again two samples later
and report the same minimum twice. After reset the history also holds only
rises, and the first sample only loads the previous-sample register.

### Pairing (`pairing_fsm`)

The FSM has three states: `EMPTY`, `HAVE1` (a period of s1 is waiting) and
`HAVE2`.

* A new period always replaces the waiting period of the same channel. If one
  signal completes several cycles before the other completes one, only its
  latest cycle is used.
* As soon as both channels hold a period, |T1 − T2| goes to the indexing
  block in the same cycle, and both latches are emptied.
* Periods of both channels that arrive in the same sample pair at once.

`d_valid` is the pulse that marks each computed pair. It is brought out as
`tp_pair`. `tp_overwrite` shows when a waiting period was replaced.

### Periods and windows

`period_counter` counts sample ticks. A period is the number of samples from
one minimum to the next, and it saturates at 2^CNT_W − 1 = 2047. The first
minimum after reset only starts the count.

`sync_index` closes a window every N ticks. The windows do not overlap, and
counting starts at the first sample after reset. A difference that arrives in
the last tick of a window counts in that window. The accumulator is 16 bits
wide and saturates.

### Smoothing (`exp_smoother`)

`y ← y − (y >>> S) + (x >>> S)` uses two arithmetic shifts, a subtracter and
an adder. Truncation makes y settle within 2^S − 1 of a constant input, and y
never leaves the range of the inputs, so no saturation logic is needed.

* The index smoother uses S = 5 (α = 1/32). It updates once per window.
* Each input smoother uses S = 2 (α = 1/4) and updates once per sample. This
  gives a corner near 47 Hz at 1024 samples/s, which keeps the β band
  (12–30 Hz).

## Interfaces and timing

The whole design runs on one clock, `clk`, at the serial bit rate. With
10-bit samples this is 10 × the sample rate: 10.24 kHz for 1024 samples/s.
There is no separate slow core clock. The word-complete strobe of the
channel-1 input port acts as the sample tick (a clock enable) for every stage
after the ports. An assertion checks that both ports complete their words
together.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | bit clock; asynchronous active-low reset |
| `sfrm` | in | 1 | high with the MSB of each input word (shared by both channels) |
| `sdi1`, `sdi2` | in | 1 | serial samples, MSB first, two's complement |
| `r_sel` | in | 4 | selectivity r (values above log2 N act as log2 N) |
| `tos` | in | 8 | offset T_os |
| `sdo`, `so_frm` | out | 1 | smoothed index, 11 bits MSB first; `so_frm` on the MSB |
| `tp_min1`, `tp_min2` | out | 1 | a minimum was detected (one clock) |
| `tp_pair` | out | 1 | a period pair was formed |
| `tp_idx`, `tp_idx_valid` | out | 11, 1 | raw index N·S and its one-clock strobe |
| `tp_idx_smooth` | out | 11 | smoothed index |
| `tp_limited`, `tp_floored` | out | 1 | the last window hit the limiter / the floor |
| `tp_overwrite` | out | 1 | a waiting period was replaced |

Latency, counted from the clock edge that takes in a sample's LSB:

* The input port registers the word on that edge.
* The input smoothers update on the next edge (`tick`).
* Detection, counting, pairing and accumulation act on the edge after that
  (`tick_d`).
* When a window closes, `tp_idx` and `tp_idx_valid` change on that edge and
  the smoothed index one edge later.
* The serial word starts on the next clock and takes 11 clocks.

With the stream running continuously, one index appears every N × 10 clocks.
`tb_dda_top` checks this cycle count.

`r_sel` and `tos` are read when a window closes. Change them between windows.

## Parameters

`dda_top` parameters and their defaults: `SAMPLE_W` = 10, `N` = 1024,
`M` = 10, `Q` = 2, `IN_SHIFT` = 2, `OUT_SHIFT` = 5, `CNT_W` = 11.

* `N` must be a power of two.
* `M` must be even.
* The accumulator width and the widths of `r_sel` and `tos` come from
  `dda_pkg` (`ACC_W` = 16, `R_W` = 4, `TOS_W` = 8).

The other characterised configurations (M = 12, Q = 4, α = 1/16, 8- or 12-bit
samples) are reached through these parameters. `tb_dda_configs` builds and
runs them.

After coarse synthesis the default design has about 224 flip-flop bits and
about 210 word-level cells, with no memories. The published chip reports
6053 gates. That figure also covers its test buffers, and this RTL does not
model its custom 0.5 V cell library.

## Choices made in this RTL

The structure follows the published processor: the serial ports, input
smoothing, the comparator, shift-register and minima-logic event detectors,
the up-counters and latches under an FSM, the accumulating indexing block
with a limiter, the shift-based index smoother and the serial output. The
following details are this design's own:

* The gate-level minima rule: half-split majority with at most Q outliers
  per half, plus the fall/rise centre condition. The same minimum is not
  reported twice because the history is refilled with rises after each
  detection.
* Equal consecutive samples count as a rise.
* The input smoothing factor α = 1/4. The published description only gives
  the index factor.
* The truncating shifts in the smoothers, with no guard bits and reset to 0.
* Counter width 11 with saturation, a 16-bit saturating accumulator, 4-bit r
  (clamped to log2 N) and 8-bit T_os.
* The limiter output N (S = 1) when the sum is below T_os.
* The single bit-rate clock with a sample-tick enable, and the serial framing
  (frame pulse on the MSB, MSB first, two's complement) on both ports.
* The set of test points.

This RTL does not model the following:

* the electrical behaviour of the original chip, such as the loss of input
  data below about 0.35 V supply;
* the off-chip seizure-detection thresholds and the "one out of three pairs"
  rule;
* multi-pair functional-connectivity maps. Each 16-electrode map needs
  120 pairs, which means 120 instances of `dda_top` or 120 passes over a
  recording.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares its
module against values computed separately inside the testbench.

| testbench | what it checks |
|---|---|
| `tb_spi_rx` | 500 random words with gaps and stray bits; one strobe per word, on the edge after the LSB |
| `tb_exp_smoother` | two instances (α = 1/32 and 1/4) against integer floor arithmetic; settling at both rails |
| `tb_minima_logic` | all 2^10 histories (M = 10, Q = 2) and all 2^12 histories (M = 12, Q = 4) against a counting reference |
| `tb_event_detector` | V shapes with and without outliers (one report, exactly M/2 samples late); a noisy sine against a reference model |
| `tb_period_counter` | random minimum spacing, including saturation, and no period at the first minimum |
| `tb_pairing_fsm` | a hand-made sequence with an overwrite and simultaneous periods; 5000 random events against a model |
| `tb_sync_index` | N = 32 and N = 1024 instances; random sums, r and T_os; window timing; limiter and floor cases |
| `tb_pso_tx` | random words, including interrupted words |
| `tb_dda_top` | the whole design at its default parameters over 10 windows of synthetic tones (see below) |
| `tb_dda_workloads` | the characterisation experiments at full size (see below) |
| `tb_dda_configs` | the two-tone experiment on six parameter sets: the default; α = 1/16; M = 12 with Q = 2 and with Q = 4; 8-bit and 12-bit samples. Uses the helper `dda_tone_run` |

`tb_dda_top` compares each window result with a sample-level reference model
of the whole algorithm. It checks the raw index, its flags, the smoothed
index, the serial output word and the N × 10-clock index period. It drives
the design through each mechanism: the limiter, the floor, mid-range indices,
period overwrites, minima found despite outliers, and a run-time change of r
and T_os. It fails if any mechanism never occurs.

`tb_dda_workloads` runs two experiments:

1. **Selectivity sweep.** A 20 Hz sine against a chirp sweeping from 10 to
   30 Hz, fed to four instances with r = 2, 4 and 6 at T_os = 6, and with
   r = 4 at T_os = 0. The index peaks between 19.5 and 20.5 Hz. The width of
   the non-zero band shrinks from 24 windows to 6 to 2 as r grows. The offset
   raises the r = 4 peak from 816 to 912 (out of 1024).
2. **Tones.** Tones at 25 and 30 Hz for 100 000 samples. Every window forms
   K = 25 pairs and gives an index of 854. This agrees with the interval
   arithmetic: 1024 − 25·|1024/25 − 1024/30| ≈ 853.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/dda_pkg.sv rtl/*.sv \
          tb/tb_dda_top.sv --top-module tb_dda_top -Mdir obj_tb -o sim && ./obj_tb/sim
```

For `tb_dda_configs`, also list `tb/dda_tone_run.sv`. The package must come
first on the command line.

Each testbench ends with `TB_RESULT checks=<n> failures=<m>`, and each has a
cycle watchdog. All of them finish in a few seconds.
