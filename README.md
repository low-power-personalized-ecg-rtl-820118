# Single-lead ECG monitor with beat segmentation and adaptive ADC resolution

This design is a low-power ECG acquisition and analysis chip for long-term monitoring of one
patient. It amplifies one electrode pair with a gain it sets itself. It converts the signal with
a sigma-delta ADC that normally delivers 8-bit samples. It cuts the sampled ECG into frames of
4096 samples and, inside each frame, finds every heart beat: the R-peak, the start and end of the
beat, the QRS complex with its Q and S points, and the onset, peak and end of the P and T waves.
Those per-beat records are what a downstream rule engine or radio would use. The ADC switches to
12 bits only when the heart rate leaves limits set for that patient, and back to 8 bits when it
is normal again, so the converter spends power on resolution only when the signal matters.

The digital part is synthesizable SystemVerilog. The analog parts are real-valued behavioural
models, so the whole chip can be simulated from an electrode voltage to per-beat features:
- front-end amplifier;
- peak and level detector;
- sigma-delta modulator.

## Signal chain

```
ecg_in (V) -> afe_pga_model --+--> peak_level_detector_model -> agc_decoder --(gain switches)--> afe
                              |                                        |
                              |                                        +-- s1 = agc_done: ADC on
                              +--> sd_modulator_model (1 bit, 15.625 kHz, 1st/2nd order)
                                         -> cic_decimator (/16 -> 976.6 Hz, 8 or 12 bit)
                                         -> ecg_digital_block
                                               clu: frame control, heart-rate check, mode_hp
                                               ecg_memory: ECG 4096x12, cD3 512x15, cD5 128x17
                                               dwt_haar_core: Haar details at levels 3 and 5
                                               bd_unit: R-peaks and beat boundaries
                                               fe_unit: P, QRS, T points per beat
                                               extremum_search: shared max/min/|max| engine
mode_hp (from clu) ---> modulator order and decimator width
```

There is one clock, 1 MHz. The modulator runs on a clock enable every 64 clocks, which gives
15.625 kHz. The decimator produces one sample every 1024 clocks, so a 4096-sample frame takes
about 4.2 s to acquire. Analysing a frame takes a few thousand clocks, well under one sample
period.

## Setting the gain before anything is converted

The amplifier's mid-stage capacitor bank has a unit capacitor Cg that is always connected. Three
switches add more:
- S3 adds 3 Cg;
- S5 adds 4.5 Cg;
- S4 adds 6 Cg.

The eight switch combinations give totals of 1, 4, 5.5, 7, 8.5, 10, 11.5 and 14.5 Cg.
`gain_switches()` in `ecg_pkg` maps gain codes 0..7 to them in that order, so a higher code
always means more gain. The model's pass-band gain is 100 × (total / Cg), which runs from 40 dB
to 63 dB. The pass band is 0.25–250 Hz, modelled as one high-pass and one low-pass pole stepped
at the modulator rate.

A peak detector holds the largest |amplified signal| it has seen. Two level detectors turn that
value into two bits:
- `vo1`: peak above 0.3 of ADC full scale;
- `vo2`: peak above 0.6 of full scale.

`agc_decoder` is a Moore machine. It starts at code 0, waits `SETTLE_CYCLES` (1.5 M clocks =
1.5 s, long enough to see a beat), and then decides:
- peak below the range: step the code up and wait again;
- peak in range, or code 7 reached: stop;
- peak above the range (overshoot): step back one code and stop.

When it stops, `s1`/`agc_done` goes high. This isolates the gain loop and powers up the modulator
and decimator. The frame controller waits for `agc_done`, so no sample is taken while the gain
is still moving. The level-detector inputs are asynchronous and pass through two flip-flops.
Reset restarts the search, and so does the one-clock `start` input.

## Two resolutions from one modulator

`sd_modulator_model` has two modes:
- 8-bit mode: a first-order loop, `i1 += vin - y`;
- 12-bit mode: a second-order cascade with both coefficients 0.5.

Here `y = ±1` is the fed-back output bit. Inputs up to about ±0.8 of full scale keep the loop
stable.

`cic_decimator` is a cascaded integrator-comb filter with decimation 16:
- third order in 12-bit mode: 16³ = 4096 levels, the full 12 bits;
- second order in 8-bit mode: 16² = 256 levels.

The DC offset is removed so samples are two's complement. 8-bit samples are shifted left by
four bits, so both modes use the same 12-bit scale and everything downstream is
mode-independent. An input with density k/16 of ones gives 256·k − 2048 in either mode;
full-scale positive input saturates.

A mode change clears the filter. The controller then drops the next `DISCARD` = 4 samples while
the filter refills.

## Frames and the Haar transform

While a frame is acquired, each sample is written to the ECG memory and also fed to
`dwt_haar_core`. That core is a chain of five identical `haar_stage`s. Each stage pairs
consecutive inputs and outputs the sum (approximation) and the difference (detail), with no
1/√2 scaling. Widths grow by one bit per level. Only two outputs are stored, because only they
are searched:
- level-3 details (cD3): 512 per frame, 15 bits;
- level-5 details (cD5): 128 per frame, 17 bits.

The controller starts analysis when the last cD5 coefficient has arrived. One cD3 index covers
8 samples and one cD5 index covers 32. Moving between the ECG and the two detail levels is
therefore only shifting: ×8 or ×32 and /4 between levels 3 and 5.

## Finding the beats (`bd_unit`)

This is the core of the design. The QRS complex is the steepest part of the ECG. Its level-3
Haar detail therefore shows a pronounced maximum/minimum pair around every R-peak, while P and
T waves are too slow to reach that level. `bd_unit` finds those pairs without knowing the heart
rate in advance:

1. **Sub-frame maxima.** cD3 is split into 4 sub-frames of 128 coefficients (1024 samples each).
   At the intended rate of about 1 kHz every sub-frame holds at least one beat, so each
   sub-frame maximum is a QRS. The smallest of the four maxima is called `min4`. It is the
   weakest beat that is certainly a beat.
2. **Threshold.** Th = 60 % of `min4`, computed as `(min4 * 154) >>> 8`. That is one constant
   multiply, with no divider.
3. **Comparator memory.** Every cD3 coefficient is compared with Th. The result goes into a
   512 × 1-bit memory, `comp_mem`.
4. **Candidates.** The memory is scanned. Each run of consecutive 1s gives one candidate: its
   last 1. Two candidates closer than 50 coefficients (400 samples, the shortest R-R interval
   accepted at 1 kHz) belong to the same beat, and the later one is kept. This step also picks
   up beats that step 1 cannot see, such as a second beat in a sub-frame.
5. **R-peak.** For each candidate t, the minimum of cD3 within t ± 10 completes the pair
   (t1 < t2). The R-peak is the ECG sample of largest magnitude between t1·8 and t2·8. Taking
   the magnitude makes inverted leads work too.
6. **Boundaries.** A beat runs from the midpoint between the previous R-peak and its own R-peak
   to the midpoint before the next one. The first and last beats borrow the neighbouring R-R
   interval: B0 = R0 − (R1−R0)/2. If such a boundary falls outside the frame, it is clipped to
   0 or 4095, and `first_valid` or `last_valid` goes low. The reader can then discard that
   partial beat.

All searches (steps 1, 5, and the feature searches) go through one `extremum_search` engine. It
streams a memory range at one word per clock and returns the first index of the maximum,
minimum or largest magnitude. A search of k words takes k + 2 clocks.

The result record `bd_result_t` holds:
- up to `MAX_PEAKS` = 7 R-peaks, with index, value and cD3 pair;
- 8 boundaries;
- flags: `first_valid`, `last_valid`, `overflow`, and `too_few` (fewer than two peaks, so no
  boundaries).

One frame takes about 3·512 + 150 + 35 per peak clocks.

## Features of each beat (`fe_unit`)

`fe_unit` reuses the same search engine, once per beat:
- **QRS on/off**: the beat's cD3 pair widened by `QRS_EXT` = 3 coefficients on each side (24
  samples).
- **Q and S points**: the minimum of the ECG from QRS-on to R, and from R to QRS-off. If the
  R-peak is negative (inverted lead), the maximum is used instead.
- **P wave**: x1 = argmax and x2 = argmin of cD5 from the beat's start boundary (/32) to
  QRS-on/4. The onset and end are the smaller and larger of the two, ×32. The P peak is the
  ECG sample of largest magnitude between them. Ordering x1 and x2 is a min/max, not a case
  analysis of which came first.
- **T wave**: the same search over cD5 from QRS-off/4 to the beat's end boundary/32.

A `feat_t` record with all of these indices and the R value is emitted per beat, with a
one-clock `feat_valid`.

## Control and resolution switching (`clu`)

The controller runs frames back to back while `enable` is high:
- wait for `agc_done`;
- acquire 4096 samples, dropping the first 4 after a mode change;
- wait for the DWT pipeline;
- run boundary detection;
- run feature extraction;
- check the heart rate.

A frame is **abnormal** if fewer than two R-peaks were found, or if any R-R interval lies
outside `[rr_min, rr_max]`. The limits are in samples and are inputs, so they can be set per
patient.

After an abnormal frame, `mode_hp` goes to 1 (12-bit) for the next frame. After a normal frame
it goes back to 0. `frame_done` and `hr_abnormal` report each frame.

## Departures from the original method, and what is left out

The following are this design's own choices, where the original description is silent or only
names a part:
- **QRS onset/offset.** The original takes its QRS-boundary rule from earlier work without
  stating it. Here they are the level-3 pair ± 3 coefficients. This is the least trustworthy
  feature, and Q/S depend on it.
- **P/T windows.** In a multi-beat frame these are limited to the beat's own boundaries, rather
  than starting at the frame start or running to the frame end.
- **Heart-rate rule.** The R-R window test, switching back to 8 bits after a normal frame, and
  the 4-sample discard are not specified originally.
- **Rates.** 1 MHz / 64 = 15.625 kHz modulator rate and decimation by 16 give 976.6 Hz, not
  exactly the 1 kHz the boundary constants (50 coefficients, 1024 samples per sub-frame) were
  chosen for. The constants are kept.
- **AGC details.** The order of the gain codes, the 1.5 s settling time, the search strategy
  (up from minimum, one step back on overshoot) and the 0.3/0.6 detection levels are this
  design's.
- **Modulator and amplifier models.** The second-order loop coefficients (0.5) and the 100×
  base gain are assumed. The model's top gain is 63 dB, against a stated range of 40–60 dB.
- **Peak store depth.** `MAX_PEAKS` = 7 is the largest depth of the original peak memory. It
  covers R-R intervals down to about 683 samples in every frame phase. Faster rhythms (the
  boundary rules allow down to 400 samples) set `overflow` and lose the extra beats.
- **Tie rules.** Ties in every search return the first index.
- **Baseline and P/T peaks.** The 0.25 Hz high-pass removes the ECG's mean. The isoelectric
  line then sits a few percent of the R amplitude below zero. The P/T peak is the sample of
  largest magnitude inside its window, so when the P or T wave is small it can land on the
  shifted baseline instead of the wave's top. The windows themselves stay in place. The
  end-to-end test shows this with a 0.12 R-amplitude P wave. A digital baseline correction
  before the search would remove it, but it is not part of this design.

Not built:
- the amplifier's noise and the tuning of its high-pass corner;
- lead-off detection and analog filters;
- the amplifier's transistor-level opamp;
- the ECG backup store;
- the rule engine that would classify beats;
- the radio.

The per-beat records, boundaries and the abnormal flag are the top-level outputs where these
would connect. The top-level module contains the analog models, so it is for simulation only.
`ecg_digital_block` is the synthesizable core: about 920 word-level cells, 1.7 k flip-flops and
59 kbit of memory.

## Files

| File | Contents |
|---|---|
| `rtl/ecg_pkg.sv` | widths, frame size, gain-code table, `bd_result_t`, `feat_t` |
| `rtl/ecg_monitor_top.sv` | whole chip: analog models, AGC, ADC, digital block |
| `rtl/ecg_digital_block.sv` | synthesizable back end |
| `rtl/clu.sv`, `bd_unit.sv`, `fe_unit.sv`, `extremum_search.sv` | control and analysis |
| `rtl/dwt_haar_core.sv`, `haar_stage.sv` | streaming Haar transform |
| `rtl/ecg_memory.sv`, `sync_ram.sv` | frame memories (one write, one read port each) |
| `rtl/agc_decoder.sv`, `cic_decimator.sv` | gain-control FSM, decimation filter |
| `rtl/*_model.sv` | behavioural analog models (real-valued) |
| `tb/ecg_ref_pkg.sv` | synthetic ECG and plain reference models of the DWT, boundary and feature steps |
| `tb/tb_<block>.sv` | one self-checking testbench per block |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. A watchdog ends a hung
run with a failure. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_ecg_monitor_top rtl/ecg_pkg.sv tb/ecg_ref_pkg.sv tb/tb_ecg_monitor_top.sv
./obj_dir/Vtb_ecg_monitor_top
```

Replace the top-module and file name for any other testbench. Only pass `tb/ecg_ref_pkg.sv`
where it is imported.

- `tb_ecg_monitor_top` runs the whole chip at its real rates, with default parameters:
  - about 15.6 M clocks, around 15 s of wall time;
  - a 1 mV synthetic ECG with 800-sample beats;
  - the AGC steps once and settles at code 1;
  - three frames: normal in 8-bit, abnormal (limits tightened) leading to 12-bit, then normal
    again back in 8-bit.

  It checks the R-peak spacing, R amplitude, R timing against the analog peaks, the feature
  ordering and the boundary flags. It also counts each mechanism: AGC step, switch in each
  direction, frames per mode, beats, and valid/invalid edge boundaries.
- `tb_ecg_digital_block` feeds six synthetic frames straight into the back end. It compares
  every boundary result and feature record exactly with the reference models, including a
  too-few-beats frame, inverted polarity and the dropped samples after each switch.
- `tb_frame_start_points` starts frames on the P wave, Q, R, S and T wave of a beat, at three
  heart periods and both polarities. It compares each result with the reference and checks
  that every planted R-peak inside the frame is found.
- `tb_bd_unit` and `tb_fe_unit` compare against the reference models over many heart rates,
  phases, noise levels and both polarities, including overflow and edge-boundary cases.
  `tb_bd_unit` also checks the run time.

## Parameters

| Parameter | Where | Default | Meaning |
|---|---|---|---|
| `N_FRAME` | `ecg_pkg` | 4096 | samples per frame |
| `MAX_PEAKS` | `ecg_pkg` | 7 | R-peaks kept per frame |
| `SD_CLK_DIV` | top | 64 | clocks per modulator step |
| `R` | `cic_decimator` | 16 | decimation factor |
| `SETTLE_CYCLES` | `agc_decoder` | 1 500 000 | wait per gain step |
| `TH_PERCENT`, `MIN_GAP`, `MIN_WIN`, `SAMPLES_PER_SF` | `bd_unit` | 60, 50, 10, 1024 | threshold, shortest R-R (cD3 units), minimum-search window, samples per sub-frame |
| `QRS_EXT` | `fe_unit` | 3 | QRS widening, cD3 units |
| `DISCARD` | `clu` | 4 | samples dropped after a mode switch |

`TH_PERCENT` selects the 154/256 constant for 60 %. Other values use `round(TH_PERCENT · 256 / 100)`.
