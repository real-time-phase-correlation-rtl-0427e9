# DDA phase-synchronization processor

This is a small, multiplier-free digital processor. It measures how well two neural signals (EEG or ECoG channels) stay in phase. Such a measure is a candidate seizure marker for closed-loop neural prostheses. The usual approach extracts an instantaneous phase per sample with a Hilbert or wavelet transform, takes the phase difference through sine and cosine, and averages it into a phase-locking value. That needs CORDIC units, multipliers and wide arithmetic.

The **Discrete Distance Approximation (DDA)** avoids all of that:

* One signal period is the time between two consecutive minima. If the phase rises by 2π per period, the phase difference of two signals follows from the difference of their periods, `dT_n = T_n(1) - T_n(2)`.
* A minimum detector and one up/down counter measure `|dT_n|` directly, in samples, with no phase computed.
* The synchronization index replaces the phase-locking value:

      SI = 1 - sum_{n=0}^{K-1} |dT_n| / (K * dT_max)

  `dT_max` is the largest period difference the signal band allows. `K * dT_max` is a power of two, so the division is a shift. SI is about 1 for locked signals and about 0 for unrelated ones.
* An exponential filter with a power-of-two weight smooths SI. Comparators and counters then raise an alarm when the index stays below a fall threshold, or above a rise threshold, for a set number of samples.

The whole design is registers, counters, adders, subtractors, comparators and shifts. It processes two 10-bit channels at 128 samples/s from a 128 kHz master clock.

## Signal chain

```
 datain1 ─ ser2par ─┐                                  ┌───────── dda_core ─────────────────────────┐
                    ├─ frame_timer (1000 clk/sample) ─►│ preprocessor ─ min_detector ─┐             │
 datain2 ─ ser2par ─┘                                  │ preprocessor ─ min_detector ─┴─ dt_fsm ─►  │
                                                       │ sync_index ─ exp_filter (smooth) ─ alarm   │
 load_param/datain1 ─ param_loader (thresholds) ─────► └────────────────────────────────────────────┘
                                                            │ smoothed SI         │ alarm_rise/fall
                                                         par2ser ─► dataout
```

| Stage | Module | What it does |
|---|---|---|
| Input ports | `ser2par` ×2 | one 10-bit two's complement sample per frame per channel, MSB first |
| Framing | `frame_timer` | 1000-clock frames (128 kHz / 128 S/s), bit slots 0–9, hand-over at clock 10 |
| Pre-processing | `preprocessor` ×2 | band-pass (DC-blocking high-pass, then low-pass), then one more low-pass, all first-order power-of-two sections built from `exp_filter` |
| Marker detection | `min_detector` ×2 | flags each signal minimum |
| Period difference | `dt_fsm` | FSM plus up/down counter; outputs `|dT_n|` or an overload value |
| Index | `sync_index` | sliding window of K values with a running sum; power-of-two scaling |
| Smoothing | `exp_filter` | `y(m) = (1-a) y(m-1) + a SI(m)`, with `a = 2^-3` |
| Alarm | `alarm` | rise/fall comparators with hold counters |
| Output port | `par2ser` | sends the smoothed index, MSB first, in every frame |
| Configuration | `param_loader` | 36-bit serial register with the thresholds and hold counts |

Shared types are in `dda_pkg` (counter mode, event source, configuration record).

## Minimum detector

For each new sample, the detector compares it with the previous sample, `x(i) > x(i-1)`. It shifts the result into a 10-bit register (M = 10), where 1 means rising. A combinational block then looks for a minimum at the centre of the register. It allows Q = 2 noisy comparisons in each half:

* the two centre comparisons are falling then rising (a turning point);
* at least `M/2 - Q = 3` of the 5 older comparisons are falling;
* at least 3 of the 5 newer comparisons are rising.

A marker therefore comes out a fixed 6 samples after the true minimum. Both channels have the same delay, so it cancels in `dT`. Equal samples count as "not rising".

**Limit.** A clean fall-then-rise must fit in the window, so a period needs more than about 5 samples. At 128 S/s that means below about 24 Hz. This covers the theta and alpha bands and low beta (12–20 Hz). The upper beta band is not resolved well at 128 S/s: minima are missed, and the index then reads low. `tb_dda_chirp` shows the full 12–32 Hz sweep working at 256 S/s.

## The dT state machine (`dt_fsm`)

This is the least obvious part. One signed counter, in one of three modes (FROZEN, UP, DOWN), measures the difference of two periods without storing either. The counters `MS1` and `MS2` count the markers seen on each signal since the current measurement began. In each sample, the counter first steps in its current mode. Then that sample's markers are applied:

1. **Idle.** Nothing counts until a marker arrives. The first marker(s) start a measurement: FROZEN if both signals fire together, UP otherwise.
2. **Marker, measurement not complete.** Increment `MSx` for each signal that fired, then set the mode:
   * both signals fire → FROZEN;
   * same signal as the last marker → FROZEN becomes UP; UP and DOWN stay;
   * the other signal → FROZEN becomes DOWN; UP and DOWN become FROZEN.
3. **Complete.** When `MS1 ≥ 2` and `MS2 ≥ 2`, the counter's magnitude is output as `|dT_n|`. The counter clears, and `MSx` becomes 1 for a signal that fired in that sample and 0 otherwise. A new measurement starts as in step 1, from the marker that completed the old one.
4. **Overload.** If the count would pass ±127 (CNT_W = 8), the value 127 is output with `dt_ovf` set, and the machine returns to idle. For example, this happens when one channel goes silent. Overload wins over a completion in the same sample.

Take markers s1 at 0, s2 at a, s1 at T1 and s2 at a+T2. The counter counts up from 0 to a, holds from a to T1, and counts down from T1 to a+T2. It ends at `a - (a + T2 - T1) = T1 - T2`. The phase offset a cancels.

The machine assumes the two signals have similar frequencies. Take two markers on one signal between markers on the other, for example 12 Hz against 22 Hz. Then the result is a difference between unrelated intervals, and it can be small. Each measurement restarts from its last marker, so the error does not build up. But strongly mismatched frequencies are only partly seen as unsynchronized.

## Synchronization index and smoothing

`sync_index` first limits each `|dT_n|` to `DT_MAX` (8 samples), so that noise and overloads count as fully unsynchronized rather than driving SI negative. It keeps the last K = 16 limited values in a shift register, with a running sum. The output is a 10-bit fraction:

    SI_q = min(1023, 1024 - sum * 1024 / 2^SCALE_LOG2),  SCALE_LOG2 = log2(K * DT_MAX) = 7

So 1023 means perfect lock and 0 means fully unlocked. There is no output until K values have arrived. The index updates once per completed measurement, so its rate follows the signal frequency.

Choose `DT_MAX` from the band: it is the difference between the longest and shortest period, in samples. Then choose K so that `K * DT_MAX` is a power of two. The defaults (16 × 8 = 128) suit the beta band at 128 S/s (periods 4.3–10.7 samples). For the theta band (periods 18–32 samples) use `K = 8, DT_MAX = 16`. Unlocked low-beta signals differ by at most about 4.3 samples, so with the defaults they read about 0.5. Set the fall threshold with that in mind.

`exp_filter` implements the smoothing recursion as `acc += ((x << F) - acc) >>> SHIFT`, with F = SHIFT extra fraction bits. The output settles within one LSB of a constant input. The same module, with other shifts, forms the pre-processing sections.

## Alarm

`alarm_fall` is raised after the smoothed index has been below `t_fall` for `n_fall` consecutive samples. This is the proposed seizure-anticipation condition: synchronization drops before seizures. `alarm_rise` is raised after `n_rise` samples above `t_rise`, for logging seizure activity. Each alarm stays high while its condition holds. The alarm block ignores the smoothing filter's reset value: it starts counting only once the first smoothed index exists.

## Chip interface and timing (`dda_top`)

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst` | in | master clock (128 kHz); synchronous active-high reset |
| `load_param` | in | while high, the frame counter is held and `datain1` shifts the configuration in |
| `datain1`, `datain2` | in | serial samples, MSB first, in the first 10 clocks of each frame |
| `frame_start` | out | first clock of each 1000-clock frame |
| `dataout`, `dataout_valid` | out | smoothed index, MSB first, in the 10 clocks after `frame_start` |
| `alarm_rise`, `alarm_fall` | out | alarms |
| `test_*` | out | markers, counter mode, `|dT_n|` with overload flag, raw index with strobe |

Within a frame: in clock 0, `frame_start` is high. Bit 9 of each sample must be on the data inputs at the rising edge that ends clock 0, and bit 0 at the edge that ends clock 9. The words reach the core at clock 11. The filters take 3 clocks and the detector 1, so `|dT_n|` appears at clock 16, the raw index at 17 and the smoothed index at 18. The output port captures the smoothed index in clock 0 of the next frame.

Configuration: raise `load_param` for 36 clocks and shift in `{t_rise[9:0], t_fall[9:0], n_rise[7:0], n_fall[7:0]}` MSB first on `datain1`. Framing restarts when `load_param` falls. The reset defaults are 768, 256, 128 and 128.

## Parameters

| Parameter | Default | Where |
|---|---|---|
| `DW`, `SI_W` | 10 | word and index width |
| `CLKS_PER_SAMPLE` | 1000 | clocks per sample frame |
| `M`, `Q` | 10, 2 | detector window, tolerated outliers per half |
| `HP_SHIFT`, `BP_LP_SHIFT`, `LP_SHIFT` | 3, 1, 1 | filter weights 2^-n (n = 0 makes a section a plain register) |
| `CNT_W` | 8 | signed `dT` counter; overload at ±127 samples |
| `K`, `DT_MAX` | 16, 8 | index window and `|dT|` limit; `K*DT_MAX` should be a power of two |
| `SMOOTH_SHIFT` | 3 | smoothing weight 2^-3 |

## Where this design fills in details

The block structure comes from the published design of this processor. So do the DDA formula, the dT state machine rules, M = 10 and Q = 2, the power-of-two smoothing, the alarm concept, and the 10-bit, 128 kHz, 128 S/s operating point. The following are this design's own choices:

* **Pre-processing filters.** Only their roles are known (a band-pass plus an extra low-pass). They are first-order power-of-two sections here, and much weaker than the fourth-order Butterworth band-pass normally applied off-line. For real recordings, band-limit the signals before they reach the chip, or replace `preprocessor`.
* **Detector decision rule.** The exact rule, described above.
* **State machine details.** Three details are fixed here: the restart after a measurement behaves like the first marker; a last marker from both signals counts as "same signal" for the next single marker; and in each sample the counter steps before markers are applied.
* **Index details.** `K`, `DT_MAX`, `CNT_W`, the limiting of `|dT|`, the sliding (rather than block) window, the 10-bit index format and the start-up rule.
* **Chip interface.** The serial frame layout, the bit order, the configuration record and protocol, the alarm counting in samples, and which internal nodes go to test outputs.
* **Not modelled.** The pads, supply regulation and level shifting of the test chip.

## Verification

Each module has a self-checking bench in `tb/` (named `tb_<module>`). It compares the outputs with an independent model, checks latencies, and stops with a watchdog. It ends with a line `TB_RESULT checks=N failures=M`.

* `tb_dt_fsm` checks that periodic marker trains give `|T1 - T2|` (0 for equal periods). It also replays 40,000 random samples against a behavioural model of the algorithm, and forces overloads.
* `tb_dda_core` runs four phases through the core: locked at 22 Hz, 16 Hz against 29 Hz, locked at 20 Hz, and one channel silent. It rebuilds every index value from the observed `|dT|` values and every smoothed value from the smoothing recursion. It also counts markers, simultaneous markers, down-counting, overloads and both alarms, and fails if any of them never happens.
* `tb_dda_top` drives the chip at its default size (1000 clocks per sample) through the serial ports. It loads a configuration, and decodes and checks every output word, the frame period, and the clock position of each `|dT|` result. It also checks the index level in each phase and all the mechanisms above.
* `tb_dda_chirp` runs 22 Hz against a 12→32 Hz chirp. The index peaks at 21–22 Hz (about 0.93) and falls to about 0.12 at 12 Hz and 0.5 at 30 Hz.
* `tb_dda_bands` runs low-beta (default parameters) and theta (`K = 8, DT_MAX = 16`) cores through locked and unlocked stretches.

All benches run in seconds. To simulate one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal rtl/dda_pkg.sv tb/tb_dda_top.sv -y rtl --top-module tb_dda_top
./obj_dir/Vtb_dda_top
```

The RTL is synthesizable SystemVerilog-2017. All state has a synchronous reset, and the only memory is the 16-entry index window. The core is about 300 word-level cells and 250 flip-flops.
