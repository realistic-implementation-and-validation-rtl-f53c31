# CP-correlation interference detection for an LTE macrocell / femtocell pair

A femtocell that reuses the macrocell's 20 MHz carrier can swamp the
downlink of a nearby macro user. This RTL lets the macro user's receiver
notice that, and tell the femtocell which half of the band to leave alone.

The key observation is that a receiver already computes something that
reacts to interference: the cyclic-prefix (CP) correlation it uses for
symbol timing. With no noise and no interference, the normalised
correlation

    |r|^2 = |dn|^2 / (ds0 * ds1)

peaks at almost exactly 1 at the end of every OFDM symbol's prefix. Here:

- `dn` is the sum over a window of L samples of `conj(s[t-N]) * s[t]`.
- `ds0` and `ds1` are the energies of the two windowed stretches.

Anything added to the signal that is not itself cyclically prefixed
lowers that peak. In-band interference of power I on a signal of
power S gives roughly `(S/(S+I))^2`.

The receiver runs this correlation three times:

- once on the whole 20 MHz band;
- once on each 10 MHz half, after a complex band-splitting filter.

In each 5 ms frame, a branch declares interference if any data-symbol
peak falls below its threshold. The three verdicts are combined into a
two-bit code:

| Code | Meaning |
|---|---|
| 00 | clean |
| 01 | low half interfered |
| 10 | high half interfered |
| 11 | both halves or the whole band interfered |

The femto base station picks its allocation from this code:

| Code | Femto allocation |
|---|---|
| 00 | whole band |
| 01 | high half only |
| 10 | low half only |
| 11 | silence |

The same correlation also gives the receiver everything it needs for
synchronisation:

- FFT-window timing;
- the carrier-frequency-offset (CFO) estimate, from the angle of `dn`;
- the frame structure, learned from the quiet part of each frame.

So detection costs little extra hardware.

## Signal format assumed

The target is LTE at 20 MHz with extended CP:

- sampling rate 30.72 MHz;
- a 2048-sample useful part with a 512-sample prefix, so each symbol is 2560 samples;
- 100 PRBs of 12 subcarriers;
- 60 symbols per 5 ms frame.

Each frame contains a quasi-quiet stretch (one 1 ms subframe in the test
stimulus). During it only reference signals are sent. Its correlation
peaks still exist, but the energy under them is small. That is how the
receiver tells data symbols from quiet ones.

The correlation window is 467 samples in the whole-band branch. This is
the prefix minus 45 samples, left as a margin for channel delay spread.
The half-band branches use 416 samples, a further 51 less, because the
51-tap band filter smears the prefix boundary.

## Block structure

```
                       +-------------+   whole band    +------------------+
 DDC output  ---+----->| align_fifo  |---------------->|  sync_wb_detect  |--> FFT window stream
 (30.72 MHz)    |      +-------------+                 |  (control, CFO,  |--> DDS phase_incr
                |                                      |   whole-band det)|--+
                |      +----------------------+  low   +------------------+  | start/restart/
                +----->| cplx_halfband_filter |------> halfband_branch (L)  |<+ frame length
                       |  (clk and clk2x)     |------> halfband_branch (H)  |
                       +----------------------+  high         |             |
                                                              v             v
                                                        feedback_gen  -> 2-bit code
                                                              |
             femto BS:  pn20_prbs -> qpsk_mapper -> femto_prb_alloc -> subcarriers to IFFT
```

`ifm_top` wires all of this. The blocks that are not built (see
*Departures and open points*) appear as ports:

- the AGC gain word, as an input;
- the DDS phase correction, as an output;
- the FFT-window stream, as an output;
- the femto subcarrier stream, as an output.

## The time-shared complex band splitter (`cplx_halfband_filter`)

This is the least obvious part of the design.

Both half-band filters come from one complex prototype:

    h_low  = h_i + j*h_q
    h_high = conj(h_low) = h_i - j*h_q

`h_low` passes negative frequencies, that is the lower 10 MHz half. For
a complex input `s = s_i + j*s_q`, both outputs come from the same four
real convolutions:

    low_i  = s_i*h_i - s_q*h_q        low_q  = s_q*h_i + s_i*h_q
    high_i = s_i*h_i + s_q*h_q        high_q = s_q*h_i - s_i*h_q

So two real FIRs (`h_i` and `h_q`) are enough. Each FIR is a two-channel
filter (`fir_2ch_sym`) clocked at 61.44 MHz (`clk2x`). It is fed the real
part of a sample in one fast cycle and the imaginary part in the next, and
keeps an interleaved delay line, so the two channels never mix.

The data path is:

1. A dual-clock FIFO (`async_fifo`) carries each complex sample from
   `clk` into `clk2x`.
2. A two-phase selector pops it and presents `s_i`, then `s_q`, to both
   FIRs.
3. The four products are registered in the fast domain.
4. They are combined with saturating add/subtract.
5. Two dual-clock FIFOs bring the low and high outputs back to `clk`.

`clk2x` must be twice `clk` and come from the same source. One reset
serves both domains.

The filters exploit symmetry, which halves the multipliers:

- `h_i` is even-symmetric, so taps k and 50-k are pre-added.
- `h_q` is odd-symmetric, so they are pre-subtracted.

The odd symmetry is forced by the band shift. A complex filter whose
real and imaginary parts were both even could not be frequency-shifted
to one side.

The coefficients are 51 taps of 18 bits in `fir_coef_pkg`. They are a
Hamming-windowed sinc with a 5 MHz cut-off, shifted by -5 MHz:

    h[n] = w[n] * sinc(n - 25) * exp(-j*2*pi*(5/30.72)*(n - 25))

with w the Hamming window. They reject the other half by more than 49 dB.
This design computed them; replace the package to use another set.

The latency from input to aligned output is 8 baseband samples.
`align_fifo` delays the whole-band branch by the same 8 samples, so all
three branches see a given symbol at the same time.

## Correlation and metric (`cp_corr`, `corr_metric`, `pipe_div`)

`cp_corr` keeps a delay memory of N+L samples. For every new sample it
adds the newest product to `dn`, `ds0` and `ds1` and subtracts the
product leaving the window. That is four complex samples read per step,
and no re-summing.

After a `restart` (pulsed when a new frame is found), the sums are
rebuilt by adding only, for L samples. This keeps fixed-point error from
accumulating without bound. The oldest sample of the memory, `s[t-N-L]`,
is also brought out. It is the sample stream from which FFT windows are
later forwarded.

`corr_metric` reduces the wide sums to their top 32 bits. It squares
`dn` and multiplies the energies, then divides the two. The divider is
`pipe_div`: a restoring divider with one stage per quotient bit. The
result is an unsigned Q2.16 value (1.0 = 65536).

The correlation value, the divisor and the delayed sample travel
alongside the metric, so everything downstream is time-aligned.

## Synchronisation and frame learning (`sync_wb_detect`, `gen_ctrl`)

`peak_detect` reports one peak per burst of the metric, with these fields:

- its maximum value;
- its age (samples since the maximum);
- the divisor at the maximum;
- `dn` at the maximum.

A burst starts at the detection level and ends below half of it. The
hysteresis stops a noisy rising edge from producing two peaks.

`divisor_profile` keeps the largest divisor seen. It restarts that
maximum whenever the AGC gain word changes. A peak whose divisor is
above half of this maximum is a data-symbol peak. Otherwise it belongs
to the quiet period.

`gen_ctrl` is a five-state controller:

| State | Action |
|---|---|
| S0 | Profile the divisor for 20 symbols. |
| S1 | Wait for a quiet-period peak. |
| S2 | Wait for the first data peak after it. |
| S3 | On the first pass, count data peaks up to the next quiet peak. This is the frame length (48 in the test signal). Then return to S2. |
| S4 | On later passes, start the work described below, then return to S2 when the frame is done. |

On entry to S4 the controller:

- starts `data_fwd`;
- starts all three band detectors;
- restarts the correlation sums.

`data_fwd` uses the peak age to find the first sample of the FFT window
in the delay memory. It then forwards N samples and skips CP samples, on
a fixed 2560-sample grid, for the learned number of symbols. The window
therefore starts between L and CP samples into the prefix.

At every data peak, `cordic_atan` (an iterative vectoring CORDIC) takes
the angle of `dn`. This is 2π·CFO·N/fs, with a full turn equal to 2^16.
Its negation is the per-sample phase-increment correction for a 27-bit
DDS accumulator (`phase_incr`). Only the fractional CFO is estimated.

## Interference decision (`band_detect`, `feedback_gen`)

Each branch has a `band_detect` state machine:

1. It is started by the controller at the frame's first data peak.
2. It takes that peak, then the maximum metric of each following
   2560-sample period.
3. After the frame's data symbols, it declares interference if fewer
   peaks than symbols were above its threshold.

The thresholds are run-time inputs (Q2.16). In the testbenches:

| Setting | Value | Q2.16 |
|---|---|---|
| Whole band | 0.93 | 60948 |
| Half bands | 0.90 | 58982 |
| Detection level | 0.5 | 32768 |

`feedback_gen` waits for the three verdicts of a frame and then emits
the code.

## Femto side (`pn20_prbs`, `qpsk_mapper`, `femto_prb_alloc`)

The femto data is generated as follows:

- `pn20_prbs` generates the PN20 sequence (x^20 + x^3 + 1), two bits per
  subcarrier.
- `qpsk_mapper` maps each pair to ±11585 on I and Q (±1/√2 of full scale).
- `femto_prb_alloc` latches the latest feedback. At each femto frame
  boundary it selects the allocation.
- Within a symbol it zeroes the subcarriers of PRBs that are not
  allocated. The low half is PRBs 0-49.

For experiments, the allocation alternates between two modes every
`mode_period` frames:

- **adaptive**: follow the feedback;
- **forced whole band**: ignore it.

A `mode_period` of 0 keeps the adaptive mode permanently.

## Departures and open points

Choices made where the source design gives no detail:

- The half-band branches take their detection timing from the central
  controller. They use only their own metric values.
  - They do not contain their own peak detector and divisor profile, as
    the source design's half-band branches do.
  - Quiet and data symbols are told apart only in the whole-band branch.
- The source design describes its filter coefficients as even-symmetric.
  That cannot hold for both parts of a one-sided complex filter, so here
  `h_q` is odd-symmetric.
- The source design's coefficient values are not available. The set used
  here was computed for this design, and rejects better than the 35 dB
  the source targets.
- Several details are this design's own:
  - the correlation-window taps (467 is used throughout);
  - the divisor threshold (half the maximum);
  - the peak-burst rule;
  - the divider and CORDIC structures;
  - the number formats;
  - the rule that the feedback waits for all three verdicts.
- AGC, DDC/DDS, FFT/IFFT, CP insertion, channel estimation, demapping,
  scrambling, resource-element mapping and the BER monitor are not here.
  Their designs are not given. The signals that would connect to them
  are ports of `ifm_top`.

## How far it has been checked

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. Arithmetic blocks are compared bit
for bit with models computed in the testbench:

- correlation sums;
- divider;
- metric;
- filter, including the 8-sample latency;
- CORDIC within a small angle error;
- PN20, with the full 2^20-1 period checked.

Control blocks are checked against scripted peak streams.

System level:

- `tb_sync_wb_detect` and `tb_halfband_branch` run a synthetic downlink
  (`tb/ofdm_stim.sv`) at a reduced symbol size:
  - random symbols with a real CP;
  - a quiet subframe at 1/16 amplitude;
  - switchable band-limited or white interference;
  - a CFO.
- `tb_ifm_top` (reduced size) and `tb_ifm_full` (all defaults, seven
  full 5 ms frames, under a minute of simulation) run the whole design.
  - The scenario goes clean, low-band, high-band and whole-band
    interference, then clean again.
  - They check every forwarded FFT window sample by sample against the
    received samples.
  - They check the learned frame length, each frame's feedback code,
    the CFO correction (within 0.5°) and the femto allocation and
    subcarrier masking.
  - They count each mechanism (controller states, quiet-period peaks,
    restarts, detections per branch, each feedback code, each femto
    allocation, mode changes, CFO updates, gain change) and fail if any
    never occurs.

The stimulus is not a standard-conformant LTE signal. It has no
multipath channel, and its interference sits at a lower SIR (about 4 dB
in band) than a field scenario would. Threshold values for real signals
have to be found on real signals.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/ifm_pkg.sv rtl/fir_coef_pkg.sv tb/tb_ifm_full.sv --top-module tb_ifm_full
./obj_dir/Vtb_ifm_full
```

To build another testbench, replace `tb_ifm_full` with that testbench's
name. Each one ends with `$finish` and has a watchdog. The reduced-size
runs take seconds.

Parameters worth knowing:

- `ifm_top`: `N`, `CP`, `LW`, `LH` (symbol and window sizes),
  `SYMS_PROFILE`, and `ALIGN_DEPTH`, which must match the filter latency.
  The two windows should stay CP-45 and LW-51 for the 51-tap filter.
- `femto_prb_alloc`: `NP` and `SC`.
