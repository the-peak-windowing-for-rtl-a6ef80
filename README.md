# Peak-windowing PAPR reduction for an SDR base-station transmitter

OFDM (LTE) and WCDMA baseband signals have rare but tall envelope peaks: the
peak-to-average power ratio (PAPR) is around 10 dB. A power amplifier that must pass
those peaks linearly runs far below its efficient operating point. This RTL lowers the
PAPR before the signal reaches the DAC, by *peak windowing*: wherever the envelope exceeds
a threshold `Th`, the signal is multiplied by a smooth gain dip whose depth is just what
brings the peak down to `Th`. Because the dip is a smooth window (Hann by default) and not a
hard clip, the spectrum is far less disturbed than with plain clipping. A 40-tap
programmable low-pass FIR follows and removes what is left out of band.

The design targets an FPGA. It uses 18-bit fixed point throughout, 30.72 MS/s I/Q
samples and a 122.88 MHz clock (four clocks per sample). Every FIR filter is a
time-multiplexed multiply-accumulate engine with only five 18x18 multipliers for 40
taps.

## Signal chain

```
 modem x_in/xen_in ──┐
                     ├─ src_sel ─► papr_reduction ─────────────────────────► lp_fir_iq ─► y, y_valid
 wfm_ram (playback) ─┘            │                                          (40-tap, I and Q)
                                  │ pw_envelope  e(n) = sqrt(I²+Q²)
                                  │ pw_clip_gain c(n) = min(1, Th/e(n))
                                  │ pw_peak_search cp(n): local minima of c over 7 samples
                                  │ pw_windowing:  feedback → PWFIR1 → b(n);  y = b(n)·x(n-D)
                                  │ I/Q delay line matching all of the above
```

| file | role |
|---|---|
| `rtl/pw_pkg.sv` | number formats, types, pipeline latencies |
| `rtl/pw_envelope.sv` | squarer + pipelined square root |
| `rtl/pw_clip_gain.sv` | threshold compare + pipelined divider |
| `rtl/pw_peak_search.sv` | 7-sample local-minimum detector |
| `rtl/pw_mac_fir.sv` | time-multiplexed FIR engine (PWFIR1, PWFIR2, low-pass) |
| `rtl/pw_windowing.sv` | feedback structure, PWFIR1/PWFIR2, gain correction |
| `rtl/papr_reduction.sv` | the whole PAPR reduction block |
| `rtl/lp_fir_iq.sv` | low-pass FIR for I and Q, with bypass |
| `rtl/wfm_ram.sv` | test-waveform memory with looping playback |
| `rtl/papr_tx_top.sv` | top level |

## How the gain b(n) is formed

This is the core of the design and the least obvious part.

**1. Clipping function.** Per sample, `c(n) = Th / e(n)` if the envelope `e(n)` is
above `Th`, else 1. Multiplying by `c(n)` would be a hard clip.

**2. Peak search.** A clipped peak spans several consecutive samples with `c < 1`. Only
the deepest of them is kept: `cp(n) = c(n)` if `c(n)` equals the minimum of
`c(n-3) … c(n+3)`, otherwise `cp(n) = 1`. One impulse per peak, with exactly the needed
depth, then goes into the window filter. This is why the output envelope lands on `Th`
and does not undershoot it. (Two equal minima in one window both pass. The feedback
below keeps them from adding up.)

**3. Window filter with feedback.** The ideal gain is
`b(n) = 1 − Σ_k p(k)·w(n−k)`, a window `w` centred on each peak impulse `p(k)`.
`PWFIR1` computes that sum. When peaks are closer than half a window, the tail of
an earlier window already attenuates the later peak. Feeding the full `1 − cp` again
would over-attenuate it. So a second filter, `PWFIR2`, holds the trailing half of the
window and computes how much attenuation earlier impulses already put on the current
sample:

```
f(n) = Σ_{j=0..19} h2(j) · p(n−1−j)
p(n) = max(0, (1 − cp(n)) − f(n))          ← input of both PWFIR1 and PWFIR2
1 − b(n) = Σ_{i=0..19} h1(i) · (p(n−i) + p(n−39+i))     (PWFIR1, 40 symmetric taps)
y(n) = b(n) · x(n)                          (x delayed to the window centre)
```

`p(n)` depends on `p(n−1)`, so this recursion has to close within one sample period.
It does. PWFIR2's final sum appears in the fourth MAC clock (`sum_now`). That is the
same clock in which the next sample strobe writes `p(n)` into both filters, and `p(n)`
is formed combinationally from it.

**4. Coefficients for window length N.** The filters hold 20 coefficients each, loaded
through the coefficient port. For a Hann window `w(k) = ½(1 − cos(2πk/(N−1)))`,
`0 ≤ k ≤ N−1`, with `⌊·⌋` the floor:

```
PWFIR1:  h1(j) = w(j − (20 − ⌊(N+1)/2⌋))   for 20 − ⌊(N+1)/2⌋ ≤ j ≤ 19, else 0
PWFIR2:  h2(j) = w(⌊(N+1)/2⌋ + j)          for 0 ≤ j ≤ ⌊N/2⌋ − 1,        else 0
```

For N = 40 these are exactly the two halves of the window, so the feedback exactly
cancels the overlap. For odd N the 40-tap symmetric PWFIR1 has two equal centre taps.
The feedback is then slightly off, and the output envelope can exceed `Th` by about 1 %
(seen in simulation with N = 19). Any N from 1 to 40 is set by the coefficients alone.
Hamming, Blackman-Harris or other windows are just other coefficient sets.

## The time-multiplexed FIR engine (`pw_mac_fir`)

Four clocks per sample, five multipliers (`NMUL`), 20 coefficients:

* **Coefficient memories** `Mem0..Mem4`, 4 words each. Coefficient `h(i)` is in bank
  `i/4`, word `i%4`. They have a write port for loading and are read by the 2-bit phase
  counter `cnt`.
* **Data memories** `Dmem`: ten 4-word banks (symmetric form, 40 samples) or five
  (plain form, 20 samples). Each bank is a small circular buffer. On a sample strobe
  every bank writes at the next address: bank 0 takes the new sample, and bank k takes
  the sample that just became the oldest in bank k−1. Bank `j` is read at phase `r` for
  delay `4j + r`. Its mirror bank `9−j` is read in the opposite order for delay
  `39 − (4j + r)`. The pair is pre-added and multiplied by `h(4j + r)`. This is
  eq. `Sum = Σ_j (D_j + D_{9−j})·H_j` evaluated over four clocks.
* **Integrator.** It is cleared in the first phase. After the fourth phase the exact sum
  is floored by 2¹⁶, saturated to 18 bits and latched into `y`.

The same engine, in symmetric form, makes both components of the low-pass FIR. Each
40-tap filter therefore costs 5 multipliers instead of 40: a factor of 4 from time
multiplexing and a factor of 2 from coefficient symmetry.

## Number formats

| quantity | format |
|---|---|
| I, Q | signed 18 bit, 17 fractional bits (±1.0 full scale) |
| envelope, `th` | unsigned 18 bit on the I/Q scale (`th = 0.7·2¹⁷` for Th = 0.7) |
| c, cp, b, window data p | unsigned, 1.0 = 2¹⁷ |
| coefficients | signed 18 bit, 16 fractional bits (1.0 = 65536) |

`Th` is a fraction of full scale. Scale the waveform so that its largest peak is near
full scale. Th = 1.0 then leaves it untouched, and the useful range is about 0.6 to 1.0.
The envelope of a full-scale I/Q pair can reach √2, which the 18-bit unsigned envelope
holds.

## Interfaces and timing

* **Sample strobe.** Samples move with a one-clock strobe (`xen_in`, or the one that
  `wfm_ram` generates), at most one every 4 clocks. The windowing feedback assumes
  exactly 4 clocks while streaming; longer gaps are tolerated. `pw_mac_fir` asserts the
  minimum spacing.
* **Latency** (strobe of an input sample to the `y_valid` that carries it):

| block | latency |
|---|---|
| `pw_envelope` | 19 samples |
| `pw_clip_gain` | 17 samples |
| `pw_peak_search` | 5 samples |
| `pw_windowing` | 20 samples + 6 clocks |
| `papr_reduction` total | 61 samples + 6 clocks = 250 clocks |
| `lp_fir_iq` | 5 clocks (bypassed: 1 clock); group delay 19.5 samples |
| `papr_tx_top` | 255 clocks (251 with the low-pass bypassed) |

* **Coefficient port** (`coef_we`, `coef_sel` = PWFIR1 / PWFIR2 / LPF, `coef_addr`
  0..19, `coef_data`). Write it while the stream is idle, or accept a few samples mixing
  the old and new sets. Coefficients reset to zero.
* **Bypasses.** `pw_bypass` forces b = 1 with unchanged latency. `lpf_bypass` skips the
  low-pass filter.
* **Waveform RAM.** Write samples with `wfm_wr_*`, set `wfm_last`, and raise `wfm_play`
  with `src_sel = 1`. The RAM plays addresses 0..`wfm_last` in a loop, one sample every
  4 clocks. `WFM_DEPTH` is 4096.
* **Monitors.** `clip_evt`, `peak_evt` and `fb_evt` pulse when a sample is above Th, when
  a peak enters the window filter, and when the feedback reduces a peak.
* All state resets asynchronously on `rst_n` low, except the waveform RAM contents.

## Design choices and departures

These follow the published architecture only in part, and a user should know them:

* The square root and the divider are plain restoring digit-recurrence pipelines, one
  result bit per stage. They are exact (floor / truncation), so `c(n)·e(n) ≤ Th`
  always holds.
* The whole design runs on the 4x clock. The sample-rate parts (envelope, divider,
  peak search, delay lines) are clock-enabled by the strobe instead of running on a
  separate 30.72 MHz clock.
* The feedback equation `p = max(0, 1 − cp − f)` is this design's reading of "the
  feedback adjusts the input values of cp(n)". The clamp to zero is applied after the
  subtraction.
* Saturation: the PWFIR1 output is saturated to 18 bits, so b(n) bottoms out at 2⁻¹⁷
  rather than 0. All FIR outputs are floored, not rounded.
* The I/Q samples are delayed by the preprocessing latency plus 19 samples, so that each
  sample meets the PWFIR1 centre tap of its own peak impulse.
* The data memories are register arrays read twice per clock (MAC and hand-over), not
  true single-port RAMs.
* The waveform RAM depth (4096) is this design's choice. A full 10 ms LTE test-model
  frame at 30.72 MS/s (307,200 samples) would need `WFM_DEPTH = 2**19`.
* Not part of this RTL: the baseband modem that feeds `x_in`, the RF transceiver and DAC
  after `y`, the power amplifier and its predistortion.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog. `tb/pw_ref_pkg.sv` is a
sample-domain reference model written from the equations above: exact integer square
root, integer division, the 7-sample minimum test, the feedback recursion, and the
filters as direct convolutions.

| testbench | what it shows |
|---|---|
| `tb_pw_envelope` | exact floor square root, including corners, 19-sample latency, enable gaps |
| `tb_pw_clip_gain` | Th/e truncated, e = Th and e = Th+1 edges, Th from 0.6 to 1.0 |
| `tb_pw_peak_search` | local-minimum selection on bumps of width 1–9, flat bottoms |
| `tb_pw_mac_fir` | both forms against direct convolution, full-scale data and coefficients, reload, 5-clock latency |
| `tb_pw_windowing` | bit-exact against the feedback model for N = 40, 19, 9; bypass; 86-clock latency; feedback exercised |
| `tb_papr_reduction` | bit-exact end to end; event counts; output envelope ≤ 1.02·Th; reports PAPR before/after |
| `tb_lp_fir_iq` | 10 MHz windowed-sinc low-pass on random I/Q, bit-exact; bypass |
| `tb_wfm_ram` | upload, looping at `last`, full-depth loop, strobe every 4 clocks, restart |
| `tb_papr_tx_top` | default-size top: 4096-sample waveform through the whole chain bit-exact, modem input with N = 9, both bypasses; counts every mechanism |
| `tb_papr_workloads` | the measurement sweeps: Hann with N = 9/19/29/39 and Th = 1.0…0.6 in 0.04 steps, Hamming and Blackman-Harris with N = 9/19/39; bit-exact, Th = 1.0 is transparent, PAPR falls with Th, EVM rises with N |

Some numbers from `tb_papr_workloads`. The input is 1200 samples of an LTE-like signal:
600 QPSK subcarriers on a 2048-point grid, input PAPR 8.4 dB over the snippet, peak at
full scale. EVM here is the raw error of y against x, with no receiver in between, so
it reads higher than an EVM measured after demodulation.

| window, N | Th | PAPR out | EVM | max\|y\| / Th |
|---|---|---|---|---|
| Hann, 9 | 0.72 | 6.1 dB | 8.0 % | 1.033 |
| Hann, 19 | 0.72 | 5.9 dB | 9.3 % | 1.000 |
| Hann, 39 | 0.72 | 6.0 dB | 10.4 % | 1.000 |
| Hann, 19 | 0.60 | 4.8 dB | 16.0 % | 1.004 |
| Hann, 39 | 0.60 | 5.1 dB | 18.3 % | 1.000 |

Longer windows cost EVM. A 9-tap window is narrower than a clipped peak, so the samples
next to the peak can stay a few percent above Th. This is one reason the low-pass FIR
and window length are chosen together.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl --top-module tb_papr_tx_top \
  rtl/pw_pkg.sv tb/pw_ref_pkg.sv tb/tb_papr_tx_top.sv
./obj_dir/Vtb_papr_tx_top
```

Replace `tb_papr_tx_top` with any other testbench name. The full-size top test runs in
about ten seconds.

## Resources, for orientation

Each of PWFIR1, PWFIR2 and the two low-pass components uses five 18×18 multipliers (the
FIR pre-adder makes one operand 19 bits). The envelope squarer adds two more, and the
gain correction two more. The published FPGA implementation reports 14 DSP blocks for
the PAPR block and 10 for the FIR. This RTL has not been fitted to a device, and its
timing at 122.88 MHz is unverified. The longest path is the feedback loop: MAC sum →
subtract → clamp → data memory write.
