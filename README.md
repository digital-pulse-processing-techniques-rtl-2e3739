# Trigger-less digital pulse processor for gamma-ray spectroscopy

This RTL measures the energy of radiation-detector pulses without an analog shaping amplifier or
a peak-sensing ADC. The signal from a charge-sensitive preamplifier is digitised directly by a
fast 12-bit ADC at 80–100 MHz. On the FPGA, every sample then goes through:

1. baseline subtraction;
2. a single second-order IIR filter. It cancels the preamplifier's exponential decay
   (pole-zero compensation) and shapes each pulse into a CR-RC pulse;
3. a peak search that needs no trigger.

Each peak amplitude, proportional to the deposited energy, is buffered and read out over a CAMAC
dataway. The host then histograms it into a spectrum. The chain keeps up with one sample per
clock all the time, so it has no dead time. A peak is lost only if the readout falls behind
by more than the buffer depth.

The pole-zero coefficient does not have to be tuned by hand. A fall-time detector measures the
preamplifier's decay from the pulses themselves and programs the filter.

```
 adc_data ─► baseline_restorer ─► iir_crrc_filter ─► peak_detector ─► peak_fifo ─► camac_interface ─► dataway
  (12 bit)          │                    ▲ a1            (hysteresis,     (512 words,   (F0/F2/F8/F9/F24/F26,
                    └──► falltime_detector ┘              pile-up flag)   lost count)    LAM, Z, C, I)
```

## The shaping filter (`iir_crrc_filter`)

The filter is one direct-form-I section:

    y(n) = b1·y(n-1) + b2·y(n-2) + a0·x(n) + a1·x(n-1) + a2·x(n-2)

The two poles set the shaping. The two zeros set the pole-zero compensation. The practical
setting, used by all the testbenches, is:

| coefficient | value | role |
|---|---|---|
| b1 | 2d | double pole at d = exp(−1/τs), where τs is the CR-RC time constant in samples |
| b2 | −d² | |
| a0 | K | gain |
| a1 | −K·p | zero on the preamplifier pole p = exp(−1/τp) |
| a2 | 0 | |

A preamplifier pulse is x(n) = A·pⁿ after a step. The factor (1 − p·z⁻¹) turns it into a single
impulse of weight A. The double pole then turns that impulse into K·A·(n+1)·dⁿ, the
discrete CR-RC pulse. Its maximum is K·A·max((n+1)dⁿ), which is close to K·A·τs/e. Choosing
K = 1/max((n+1)dⁿ) therefore makes the shaped peak equal the step height A. For τs = 50,
K = 1/18.757.

If p is wrong, a slow undershoot or overshoot tail is left after each pulse. That tail shifts
the next pulse's peak, which broadens the spectrum lines. This is why a1 is measured
automatically.

**Fixed point.** All coefficients are signed Q2.30 (−2 ≤ c < 2). That is enough for b1 = 2d with
d close to 1. It also places a1/a0 within about 10⁻⁸ of p, which matters because 1 − p is only
about 5·10⁻⁴ for a 20 µs preamplifier at 100 MHz. The recursive state is 48 bits with 16
fraction bits. Each step is rounded to nearest and saturated. The output `y` is the integer part,
saturated to 18 bits signed.

The whole recursion closes in one clock. y(n) appears one clock after x(n). Coefficients are
static inputs and may change at any time.

Note that with the zero moved off z = 1, the filter passes DC: its DC gain is
K(1−p)/(1−d)², about 0.07 for the example values. That is why the baseline is removed first.

## Automatic pole-zero: the fall-time detector (`falltime_detector`)

On a clean tail, x(k) = A·pᵏ. The sum of N consecutive samples is then

    S = x(0) + … + x(N−1) = (x(0) − x(N)) / (1 − p)

so

    1 − p = (x(0) − x(N)) / S

This holds exactly for any window length N. It needs no logarithm, no root and no knowledge of A.
It even holds on the tail of an earlier pulse, because a sum of exponentials with the same p is
again such an exponential. The detector works in five steps:

1. It finds a pulse edge where x(n) − x(n−4) exceeds `rise_thr`.
2. It waits `SKIP` (64) samples after the last rising sample.
3. It sums a window of 2^`WIN_LOG2` (1024) samples, and keeps x(0) and x(N). A new edge inside
   the window means pile-up: the window is dropped and the measurement restarts on the new pulse.
4. It adds numerators and denominators over 2^`AVG_LOG2` (16) windows, to average out noise.
5. It runs one 50-bit-by-29-bit restoring division (`seq_divider`, 50 clocks). The quotient is
   q = 1 − p in Q.30, and the detector publishes p = 1 − q and a1 = −a0·p.

A block that would give p outside (0, 1) is discarded. Measurement then starts over, so p follows
slow drifts. `pz_valid` rises after the first result. The top uses the measured a1 while
`pz_auto` is high and a result exists; otherwise it uses `a1_manual`.

In simulation, with ±1–2 counts of ADC noise, 16 pulses give 1 − p to within about 1 %. After the
filter, that error is a negligible amplitude error: about 0.1 % for a 1 % error in 1 − p.

## Peak search (`peak_detector`)

The peak search is trigger-less: it watches every filter output sample. It has three states:

- **IDLE** arms when y exceeds `thr`.
- **RISING** tracks the running maximum. A peak is declared only once y has fallen `hyst`
  counts below that maximum. Noise wiggles smaller than `hyst` near the top therefore give one
  peak, not several. If y drops below `thr` before that, the pulse was too small and is ignored.
- **FALLING** tracks the running minimum. If y rises `hyst` above the minimum while still above
  `thr`, a second pulse is riding on the first. The search goes back to RISING and flags that
  second peak as pile-up. Below `thr`, it returns to IDLE.

The amplitude reported is the largest sample, with no interpolation. `peak_valid` pulses on the
clock after the sample that is `hyst` below the maximum.

## Baseline (`baseline_restorer`)

The baseline is an exponential average of the raw ADC samples, with a time constant of 256
samples and 8 fraction bits. It is updated only on samples within `bl_thr` counts of the current
baseline, so pulses do not pull it up. The first sample after reset loads it directly. The output
x = adc − baseline is registered, so it lags the input by one clock.

At high rates on long tails, the last few counts of each tail fall inside the window. This lifts
the baseline by a few counts. The shaped output moves by only about 7 % of that, because of the
small DC gain noted above.

## Buffer and CAMAC readout (`peak_fifo`, `camac_interface`)

Peaks go into a 512-word first-word-fall-through FIFO. A peak that arrives while the FIFO is full
is dropped and counted in a saturating 16-bit lost counter. The readout word carries the pile-up
flag in bit 23 and the amplitude in bits 15..0.

The dataway is asynchronous to the sample clock, so each line passes through a two-flip-flop
synchroniser. S1/S2 actions take effect three clocks after the strobe rises. R, Q and X follow
the command lines two clocks after they change, which is well inside CAMAC's settling time
before S1.

| command | action | Q |
|---|---|---|
| F0 A0 | read head word (no pop) | buffer not empty |
| F0 A1 | read word count | 1 |
| F0 A2 | read lost count | 1 |
| F2 A0 | read head word, pop on S2 | buffer not empty |
| F8 A0 | test LAM | LAM pending |
| F9 A0 | clear buffer and lost count (S1) | 1 |
| F24 / F26 A0 | disable / enable LAM (S1) | 1 |
| Z·S2 | clear buffer, disable LAM | – |
| C·S2 | clear buffer | – |
| I | while high, new peaks are not stored | – |

X is 1 for the commands above and 0 for any other. L is raised while LAM is enabled and the
buffer holds data.

## Top level (`dpp_top`)

The top has:

- ports for the ADC bus;
- the configuration: `bl_thr`, `rise_thr`, `pz_auto`, the coefficients `b1 b2 a0 a1_manual a2`,
  `peak_thr` and `peak_hyst`;
- status outputs: baseline, measured p, the shaped signal, peak strobe and value, buffer full;
- the CAMAC dataway lines.

From an ADC sample to the filter output takes 2 clocks. Shared widths, the coefficient struct
`iir_coef_t` and the peak struct `peak_t` are in `dpp_pkg`.

| parameter | default | meaning |
|---|---|---|
| `FIFO_LOG2` | 9 | buffer depth 2^9 |
| `PZ_WIN_LOG2` | 10 | fall-time window 1024 samples |
| `PZ_AVG_LOG2` | 4 | 16 windows per pole-zero result |
| `PZ_SKIP` | 64 | samples from edge to window |

The defaults come from this design, not from a measured system. The window should cover a good
fraction of the preamplifier time constant, and `PZ_SKIP` should exceed the preamplifier rise
time.

After synthesis the channel has about 700 flip-flops and 8.7 kbit of buffer memory. It uses no
vendor primitives.

Concurrent assertions in the RTL state the internal handshake rules. They are checked whenever
a simulation is built with assertions enabled (`--assert` in Verilator):

- a buffer pop is a one-clock pulse, never on an empty buffer and never together with a clear;
- the buffer never holds more than its depth;
- the divider is started only when idle;
- two peaks are never reported on consecutive clocks.

## What is taken from the method and what is this design's own

These parts follow the method this RTL implements:

- the architecture: direct digitisation, then pole-zero + CR-RC shaping in one IIR section of
  the form above, then a trigger-less peak search, then CAMAC readout;
- automatic fall-time detection;
- a 12-bit ADC at 80–100 MHz;
- the filter loop closing within one sample period.

The following are this design's own choices:

- baseline restoration and how it is done;
- the fall-time method (the tail-sum identity) and its window and averaging;
- the hysteresis peak search and the pile-up flag;
- the buffer, its depth and the lost counter;
- the CAMAC command set and word layout;
- every fixed-point width and format.

Coefficients, thresholds and time constants are not fixed by the method; the values in the
testbenches are examples.

Limitations:

- One channel; a multi-channel build would instantiate `dpp_top` per ADC.
- The peak amplitude is the largest sample. There is no ballistic-deficit correction and no
  pile-up rejection beyond the flag.
- There is no register bank: the configuration comes from ports.
- Pulse-shape (rise-time) variations of real detectors are not modelled in the tests.

## Verification

Each testbench in `tb/` checks its results against values it computes itself and ends with a
line `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_iir_crrc_filter` | bit-exact against a 128-bit model of the arithmetic with random coefficients and data; a preamplifier pulse comes out as the ideal CR-RC pulse within 2 counts and returns to zero |
| `tb_baseline_restorer` | output = sample − baseline each clock; baseline held during pulses and following slow drift |
| `tb_falltime_detector` | 1 − p within 2 % on clean and piled-up pulses; a1 = −a0·p exactly; result count |
| `tb_peak_detector` | one peak per pulse with the exact maximum and report cycle; nothing from noise or sub-threshold pulses; pile-up flagged |
| `tb_peak_fifo` | against a queue model, including overflow, lost count and clear |
| `tb_camac_interface` | every command, Q/X, LAM, pop-once-per-F2, Z, C, I |
| `tb_dpp_top` | whole chain at default sizes: 40 pulses, manual→measured a1 switch, pile-up, inhibit, 600-pulse burst overflowing the buffer; every peak read over CAMAC matched to a floating-point model of the filter within 1 % + 4 counts |
| `tb_co60_spectrum` | 1400 events of a 60Co-like source (1173.2 and 1332.5 keV lines, continuum, random arrivals at 20 kc/s) through the default-size chain and CAMAC; lines at the right ratio within 0.3 %, 1332.5 keV FWHM 0.26 % with this idealised noise model, no loss |

To run one with Verilator 5, list the package first:

```
verilator --binary --timing -Wno-fatal --top-module tb_dpp_top \
    rtl/dpp_pkg.sv rtl/seq_divider.sv rtl/baseline_restorer.sv rtl/falltime_detector.sv \
    rtl/iir_crrc_filter.sv rtl/peak_detector.sv rtl/peak_fifo.sv rtl/camac_interface.sv \
    rtl/dpp_top.sv tb/tb_dpp_top.sv
./obj_dir/Vtb_dpp_top
```

Run times are: `tb_dpp_top` about 2 s, `tb_co60_spectrum` about 17 s, and the others under
1 s. A block testbench needs only the package, its module and, for the fall-time detector,
`seq_divider.sv`.

The simulated resolution reflects only ADC noise, the ADC's quantisation and a 2 keV intrinsic
line width. A real system adds electronic noise, interference and ballistic deficit, so its
resolution will be worse.
