# CPSD processor: on-sensor detection of ventricular fibrillation

A wearable ECG sensor uses far more power to radio raw samples away than to
analyse them where they are measured. This RTL analyses them on the sensor. A
small application-specific processor turns the 10-bit ECG stream (256
samples/s) into one number per second, the **CPSD** (chaotic phase space
differential) index. The index stays near or below 1 while the rhythm looks
like the patient's own normal reference. It rises several-fold when the
rhythm turns chaotic, as in ventricular fibrillation or tachycardia, or when
premature ventricular beats distort it. A general purpose processor on the
same Wishbone bus reads each value on an interrupt, compares it with a
threshold and decides whether to wake the radio.

The architecture follows a published design of such a sensor node: an
ASIC-style CPSD processor for 100 kHz operation, with an OpenRISC processor,
a radio and an I2C port on a shared Wishbone bus. That description gives the
algorithm, the block diagram of the processor and the system figures. It
does not give word widths, matrix sizes, register maps or handshakes; this
implementation chose them. The section *What is chosen here* lists each
choice.

## The CPSD measure

The processor compares two *phase matrices* (PM), each a 2-D histogram of one
8-second window of filtered ECG:

1. **Phase vectors.** Every sample s(t) in the window is paired with the
   sample d steps earlier: v = ⟨s(t−d), s(t)⟩. A window of 2048 samples gives
   2048 − d vectors.
2. **Quantisation.** Both coordinates are first saturated to [−M, M] and then
   quantised to N levels:
   `q = min(floor(((s + M)·N + M) / (2M)), N − 1)`.
   Here M is the largest |s| of the *reference* window. The `+M` in the
   numerator rounds to the nearest level. The formula gives N when s = M, so
   the top level is clamped to N − 1.
3. **Histogram.** PM(j, k) counts the vectors whose quantised pair is
   ⟨j, k⟩ (N = 16, so 256 cells).
4. **Difference.** Diff(A, B) is the number of cells in which
   |A(j,k) − B(j,k)| > h.
5. **Index.** CPSD = Diff(PM_current, PM_reference) / Diff(PM_reference+1,
   PM_reference). The denominator comes from the window that followed the
   reference and validated it, so it measures how much a normal rhythm varies
   from one second to the next.

A normal beat traces the same closed loop in the (s(t−d), s(t)) plane every
time, so its PM is concentrated in a few cells and changes little. A
fibrillating signal spreads over many cells. The reference is learnt from the
wearer, so no database of "normal" ECGs is needed.

## Training and on-line processing

Everything below happens at **second boundaries**, when the 256th filtered
sample of a second has been stored. The controller (`cpsd_controller`) keeps
one of four phases:

| phase  | at each boundary |
|--------|------------------|
| FILL   | nothing; the window memory fills during the first 8 s after reset |
| CAND   | M_ref := M of the newest window; its PM goes into the **reference** memory (the candidate) |
| CHECK  | PM of the newest window, quantised with M_ref, goes into the **current** memory; d = Diff(cur, ref). If d < Threshold_valid the candidate becomes the reference and d is kept as the denominator of the index; otherwise the next second starts a new candidate |
| ONLINE | current PM, difference, CPSD, interrupt |

After reset the first candidate is taken at second 8 and checked at second 9.
The first CPSD value appears at second 10 if the check passes. After
`REF_PERIOD` seconds (30 by default) on one reference, the processor retrains
on its own. It also retrains at the next boundary after the host writes the
retrain bit. Retraining takes one or two seconds, plus two for each failed
check, and no CPSD values are produced during it.

## Four pipelines, one second

`cpsd_asp` is organised as four pipelines:

```
 ADC ─► raw delay regs ─► filter unit ─► window memory (2048 × 10 bit) ──┐
                                  └─► per-second peak |s| (window M)     │
   ┌─────────────────────────────────────────────────────────────────────┘
   └► PM constructor ─► reference PM / current PM (2 × 256 × 12 bit)
                          └─► difference accumulator ─► PM-difference regs
                                                           └─► CPSD calculator
```

* **Pipeline 1, per sample.** Three cascaded second-order sections share one
  multiply-accumulate unit: 15 MACs in 16 clocks per sample. The filtered
  sample is written into a circular window memory. At the same time,
  `window_max` keeps the peak |s| of each of the last eight seconds, so the
  window's M is known at the boundary without a memory scan.
* **Pipeline 2, per second.** `pm_constructor` clears the target PM memory
  (256 clocks). It then reads the window oldest-first. For each sample it
  does the eq.-2 saturation and a 5-step restoring division; 5 steps suffice
  because the quotient is at most N. It pushes the level into a 32-deep delay
  line, so the level of s(t−d) is at hand without a second read. It then
  increments PM cell ⟨q(t−d), q(t)⟩ with a read-modify-write. This takes
  about 9 clocks per sample, roughly 21,000 clocks in all.
* **Pipeline 3.** `diff_accumulator` reads both PM memories at the same
  address, one cell per clock (258 clocks).
* **Pipeline 4.** `cpsd_calculator` divides bit-serially (19 clocks).

Pipelines 2–4 run one after another and finish within about 21,000 clocks.
One second at 100 kHz is 100,000 clocks, so the processor keeps up with a
real-time stream at the intended clock. A boundary that arrives while work is
still under way is served as soon as the pipelines are idle. The window
memory is never overwritten ahead of the scan: new samples arrive every 390
clocks, and the scan reads a sample every 9–11 clocks, starting with the
oldest word. This relies on the scan starting at its own boundary. At the default
rates it always does, because each second's work ends long before the next
boundary. A boundary served late would let new samples overtake the scan.

## Number formats

| quantity | format |
|----------|--------|
| raw and filtered samples | 10-bit two's complement |
| filter coefficients | signed Q2.14 (b0, b1, b2, a1, a2 per section; a0 = 1) |
| filter section states | 18-bit, 4 fractional guard bits, saturating, rounded after each section |
| M | 10-bit unsigned (|−512| = 512) |
| PM counters | 12-bit, saturating |
| differences | 9-bit (0 … 256) |
| CPSD | unsigned Q8.8, saturates at 0xFFFF; a zero denominator counts as 1 |

Section s computes
`y[n] = b0·x[n] + b1·x[n−1] + b2·x[n−2] − a1·y[n−1] − a2·y[n−2]`. With
a1 = a2 = 0 the unit is an FIR filter. After reset every section passes its
input unchanged.

## Programming the processor

The processor is a Wishbone classic slave with 32-bit data and byte
addresses. Word offsets are defined in `cpsd_pkg`. Every access is
acknowledged one clock after `cyc & stb`, and `sel` is ignored.

| offset | register | access | reset | meaning |
|--------|----------|--------|-------|---------|
| 0x00 | CTRL | R/W | 0 | bit 1: write 1 to retrain; bit 2: interrupt enable |
| 0x04 | STATUS | R, W1C | – | [1:0] phase (0 FILL, 1 CAND, 2 CHECK, 3 ONLINE); [2] reference valid; [8] CPSD ready (write 1 to clear) |
| 0x08 | CPSD | R | 0 | latest index, Q8.8 |
| 0x0C | DIFF_CUR | R | 0 | latest Diff(cur, ref) |
| 0x10 | DIFF_REF | R | 0 | Diff(ref+1, ref) of the valid reference |
| 0x14 | H | R/W | 4 | difference threshold h |
| 0x18 | TH_VALID | R/W | 32 | Threshold_valid, in cells |
| 0x1C | DELAY | R/W | 8 | delay d in samples, 1…32 (0 acts as 1) |
| 0x20 | REF_PERIOD | R/W | 30 | seconds between reference refreshes (0: never) |
| 0x24 | M_REF | R | 0 | M of the reference window |
| 0x28 | SECONDS | R | 0 | second boundaries seen |
| 0x2C | FILT | R | 0 | latest filtered sample, sign-extended, for fetching the filtered ECG |
| 0x40 + 4·(5s+k) | COEF | R/W | b0 = 0x4000 | coefficient k of section s |

The interrupt line is `STATUS[8] & CTRL[2]`, and it stays high until the host
clears `STATUS[8]`. A typical host loop is: take the interrupt, read CPSD,
write 0x100 to STATUS, compare CPSD with its own threshold.

## System level

`ecg_sensor_soc` is the digital section of the node. It contains the CPSD
processor and a shared Wishbone bus (`wb_interconnect`) with one master. The
parts below are outside the RTL, and the top brings their connections out as
ports:

* the general purpose processor: `gpp_*` master port and `cpsd_irq`;
* the radio: `radio_cyc/stb/dat_r/ack/err`;
* the I2C port: `i2c_*`;
* the amplifier and ADC: `adc_valid`, `adc_sample`.

The radio and the I2C port share `bus_we/adr/dat_w/sel`.

Address map: 0x0000 CPSD processor, 0x1000 radio, 0x2000 I2C port. Address
bits 15:12 select the slave. Other addresses are answered with `err`.

`adc_valid` is a one-clock strobe. Two strobes must be at least 17 clocks
apart; an assertion in `cpsd_asp` flags a violation. At 100 kHz and 256
samples/s they are 390 clocks apart.

## What is chosen here

Taken from the design description:
* 10-bit samples at 256 samples/s;
* an 8-second window memory;
* the four pipelines and the blocks of the processor;
* the CPSD equations;
* training by candidate and check against Threshold_valid;
* a reference that stays fixed while on-line;
* a 30-second refresh and retraining on request;
* a bus-programmable cascaded-MAC filter;
* an interrupt-driven host;
* the shared Wishbone bus with radio and I2C slaves;
* a 100 kHz processor clock.

Chosen here, because the description leaves them open:
* **Sizes.** N = 16 levels (the published matrix plots use a grid of about
  that size); d = 8 samples at reset (maximum 32); h = 4;
  Threshold_valid = 32; window length W = 8 s, taken equal to the memory.
* **Filter structure.** Three biquad sections, meant as one band-pass and two
  notches, sharing one MAC.
* **M.** Taken from per-second peaks of the stored samples, not from a scan.
* **Candidate check.** The check window is quantised with the candidate's M.
* **After a failed check.** The window of the following second becomes the
  new candidate, so a failure costs two seconds. Reusing the window that was
  just checked would save a second. But its PM would have to be rebuilt with
  its own M, and by the time the check is decided, new samples have
  overwritten the oldest part of it in the 8-second memory.
* **Quantiser.** The top level is clamped, and M = 0 is treated as 1.
* **Formats and protocol.** All number formats, the register map, the bus
  timing and the address map.
* **One clock.** The whole digital section runs on one clock, meant to be
  100 kHz. In the described node the general purpose processor runs at only
  4 kHz; with such a split, its bus would need a clock-domain bridge, which
  is not part of this RTL.
* **Filtered-sample read-back.** The filtered ECG can be fetched from the
  node. Here the latest filtered sample is held in the FILT register.

Not included: the general purpose processor, the radio, the I2C port and the
analog front end. The fatal-rhythm decision thresholds are not included
either: they run in software on the general purpose processor, and no values
for them are given.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=… failures=…` line and has a cycle watchdog. Values are
computed independently in the testbench. `tb/cpsd_model_pkg.sv` holds an
integer reference model of the whole algorithm and a synthetic ECG generator.
The generator makes normal beats, premature ventricular contractions (every
fourth beat early, wide and inverted), ventricular tachycardia (regular wide
complexes at 3 beats/s), a fibrillation-like oscillation, and a motion
artifact.

| testbench | what it shows |
|-----------|---------------|
| `tb_ecg_sensor_soc` | top at full default size and a 100 kHz clock (390 clocks per sample), 36 s of signal. Every CPSD, difference, M_ref and filtered sample read over the bus equals the model. Training from reset ends at second 10. The test also sees failed and passed checks, periodic refresh, bus retrain, saturation to M, interrupts, both external slaves and a bus error. The worst second takes 21,002 of 99,840 clocks. Mean CPSD is 0.29 on normal rhythm and 4.5 in fibrillation. |
| `tb_rhythm_workload` | top at full default size with every register at its reset value (pass-through filter), fed 39 s of normal rhythm, then PVC, VT and VF segments of 8 s each. Every CPSD equals the model. Mean CPSD over the last 3 s of each segment: normal 0.0, PVC 17, VT 32, VF 87; each abnormal rhythm must score above normal. |
| `tb_cpsd_asp` | the processor at 16 samples/s, a 4 s window and N = 8, with the same model comparison and mechanism counts |
| `tb_filter_workload` | filter programmed as a 1–100 Hz band-pass with 60 Hz and 120 Hz notches at 256 samples/s. Measured gains: 10 Hz 1.00, 30 Hz 0.96, 60 Hz 0.003, 120 Hz 0.005, 0.1 Hz drift 0.10 |
| `tb_pm_constructor` | histograms for M above, below and at the peak, M = 0, and clamped d |
| `tb_filter_unit`, `tb_diff_accumulator`, `tb_cpsd_calculator` | bit-exact results and latencies (16, N·N+2 and 19 clocks) |
| `tb_cpsd_controller` | phase sequence over 16 scripted seconds |
| `tb_cpsd_wb_regs`, `tb_wb_interconnect` | registers and interrupt; bus routing and errors |
| `tb_filt_sram`, `tb_pm_sram`, `tb_raw_delay_regs`, `tb_pm_diff_regs` | storage behaviour |

To run a testbench with Verilator:

```
verilator --binary --timing --assert --top-module tb_ecg_sensor_soc \
  -y rtl -y tb +libext+.sv -Irtl rtl/cpsd_pkg.sv tb/cpsd_model_pkg.sv \
  tb/tb_ecg_sensor_soc.sv -o sim && ./obj_dir/sim
```

The full-size run takes about 10 s of wall time. Every testbench that
instantiates the processor needs `cpsd_model_pkg.sv` on the command line;
the unit testbenches need only `rtl/cpsd_pkg.sv`. To change a size, override
the parameters of `ecg_sensor_soc` or `cpsd_asp` (`SPS`, `WIN_SEC`, `N`). The
memory depth, counter widths and address widths follow from them.

## Files

`rtl/`:
* `cpsd_pkg` (formats, phases, register map);
* `raw_delay_regs`, `filter_unit`, `filt_sram`, `window_max`;
* `pm_constructor`, `pm_sram`, `diff_accumulator`, `pm_diff_regs`,
  `cpsd_calculator`;
* `cpsd_controller`, `cpsd_wb_regs`, `cpsd_asp`;
* `wb_interconnect`, `ecg_sensor_soc`.

`tb/`: one testbench per module, plus `tb_filter_workload`, `tb_rhythm_workload`
and `cpsd_model_pkg`.
