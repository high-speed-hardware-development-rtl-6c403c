# FDMA-to-TDM converter: polyphase transmultiplexer and burst QPSK demodulator

A satellite that serves many small earth stations lets them transmit one narrow
carrier each (SCPC/FDMA uplink). It then sends everything back to the ground
as a single time-division multiplexed stream (TDM downlink). On board, the
carriers must be separated and demodulated in real time. This RTL implements
that processing chain after the architecture of "High Speed Hardware
Development for FDMA/TDM System":

* a **transmultiplexer** separates 800 uniformly spaced carriers of 45 kHz.
  It is a uniform polyphase filter bank: a commutator, one time-shared 9-tap
  FIR filter, a phase shifter, a 1024-point pipelined FFT and a multiplication
  by a constant;
* a **burst QPSK demodulator** recovers the data of a TDMA burst on a channel:
  preamble acquisition, coherent demodulator, bit decision, symbol-timing and
  carrier tracking loops, and unique-word detection.

Every module is pipelined so that each one finishes its work on a frame within
one frame period: 1/45 kHz = 22.22 µs. With one composite input sample per
clock, a frame is 1024 clocks and the clock is 46.08 MHz.

```
composite FDMA samples (1/clk)
   │
commutator ──► shared 9-tap FIR ──► phase shifter ──► 1024-pt FFT ──► × constant ──► channels 0..799
 (branch      (delay lines and      (exp(jπi/M))      (10 stages,     (C·(-1)^m·2^10)      │
  counter)     taps in RAM,                             dual memories,                     │ ch_sel
               9 multipliers +                          one butterfly                      ▼
               adder tree)                              per stage)              ┌── burst QPSK demodulator ──┐
                                                                                │ preamble module (acq.)     │
                                                                                │ coherent demod (interp.,   │
                                                                                │   derotation) ◄──┐  ◄──┐   │
                                                                                │ bit decision ────┤     │   │
                                                                                │ timing tracking ─┘ (mu) │   │
                                                                                │ carrier tracking ──(θ)──┘   │
                                                                                │ unique-word detector → data │
                                                                                └─────────────────────────────┘
```

## The filter bank, and why each stage is there

This is the part that takes the most care. The bank is only correct if the
commutator order, FFT addressing, phase shift, coefficient signs and output
sign all agree. With M = 1024 branches:

1. **Commutator** (`commutator`). Input samples are dealt to the branches in
   descending order. Sample i of block m (i = 0..M-1) goes to branch
   b = M-1-i. Because a single filter serves all branches, the commutator is
   a counter that tags each sample with its branch and marks the ends of the
   block.

2. **Shared FIR** (`shared_fir`). Branch b computes
   `y_b[m] = Σ_{k=0..8} h_b[k] · x_b[m-k]` with `h_b[k] = h[k·M + b]`, where h is
   the 9·M-tap prototype low-pass filter. Every branch's last eight samples
   are held in eight RAMs of M words, and the coefficients in nine RAMs of M
   words. Per clock, one branch sample is filtered:
   * read the branch's old samples and taps;
   * form the nine products in parallel;
   * add them in a two-level registered tree;
   * round the result back to Q1.15;
   * write the shifted delay line back.

   Latency is 4 clocks. A branch must not come back on the very next clock,
   which is always true with the commutator.

3. **Phase shifter** (`phase_shifter`). The branch output that belongs to
   block position i = M-1-b is rotated by `exp(jπ·i/M)`. This moves the bin
   grid by half a channel, so that bin k picks up the carrier centred at
   `(k - 1/2)·fs/M`. The channels then lie symmetrically around the band centre.

4. **FFT** (`fft_pipeline`). The rotated branch outputs are written to FFT
   input address i, their position in the block. The FFT output is scaled
   by 1/M.

5. **Multiplication by a constant** (`const_mult`). This stage multiplies by
   `C · (-1)^m · 2^10`:
   * C is a programmable complex constant that sets the output gain and phase;
   * 2^10 undoes the FFT scaling, with saturation;
   * `(-1)^m` (m = frame number) is needed because of the half-bin offset.
     After critical decimation, a carrier half a bin off the grid sits at half
     the output rate, and the alternating sign moves it to baseband.

With these conventions, and with the prototype taps loaded as
**`h[k·M + b] · (-1)^k`**, the output of bin k in frame m is exactly the
carrier at `(k-1/2)·fs/M`, filtered by h and taken at composite sample
`(m+1)·M-1`. There is no residual phase rotation from frame to frame. Bins
0..799 are delivered as channels; bins 800..1023 are guard band.

The half-bin rotation is this design's reading of the phase shifter, and the
same goes for the alternating tap sign, the frame sign and the gain
restoration that it implies. The source names the phase shifter and the
constant multiplier but gives neither angle nor constant. No prototype
coefficients are given either: they are loaded through
`coef_we/coef_branch/coef_tap/coef_data` (Q1.15). The testbenches use a
Hamming-windowed sinc of 9·M taps with its cutoff at half the channel spacing,
normalised to unit DC gain.

## The pipelined FFT

`fft_pipeline` has 10 radix-2 decimation-in-frequency stages (`fft_stage`).
Each stage has a **dual memory** (`fft_dual_mem`) in front of it and a single
**multiplexed butterfly element** (`fft_mae`):

* The dual memory has two banks of 1024 words. The stage upstream writes one
  bank while this stage reads the other. When the upstream stage writes the
  last word of a frame it raises `done`, and the banks swap.
* After a swap, the stage runs its 512 butterflies, one per clock. For
  butterfly j of stage s, with span L = 1024/2^(s+1):
  * `a = (j / L)·2L + (j mod L)` and `b = a + L`;
  * `W = exp(-j2π·(j mod L)·2^s / 1024)`, read from a cos/sin table computed
    at elaboration;
  * both operands are read in one clock through two read ports;
  * the results `(a+b)/2` and `((a-b)/2)·W` are written through two write
    ports into the next stage's memory, at the same addresses (in-place
    addressing).
* Halving in every stage means no stage can overflow. The complex product
  uses four parallel multipliers.
* `fft_reorder` holds the last frame, which is in bit-reversed order. It reads
  the frame out in natural order, one bin per clock.

**Timing**:
* Each stage needs 512 + 4 clocks per frame, and the frame period is 1024
  clocks.
* All 10 stages work on different frames at the same time.
* From the last input write of a frame to its first output bin:
  `10·(512+4) + 2 = 5162` clocks.
* A frame that reaches a stage still busy with the previous one sets the
  sticky `overrun` output. This cannot happen at one input sample per clock.

## The burst demodulator

A TDMA burst is: guard time, preamble, unique word, data. `qpsk_demod` expects
the channel at **two samples per symbol**. It works in two phases.

**Acquisition** (`preamble_proc`), started by `burst_start` over the next
`PRE_LEN` = 32 samples (16 symbols). The preamble is taken to be alternating
symbols (1+j), -(1+j), so one sample phase carries full-amplitude symbols and
the other sits on zero crossings. For every sample pair the module forms:
* a timing value from a subtractor, |I₀|+|Q₀| − |I₁|−|Q₁|;
* the sum of the two samples' fourth powers z⁴. This strips the QPSK
  modulation and leaves `exp(j(π + 4φ))`.

An adder tree sums the per-pair values, one level per clock:
* the sign of the timing sum selects the symbol sample phase;
* a 16-step CORDIC (`cordic_atan`) gives the angle of the z⁴ sum, and the
  carrier phase is `φ = (angle − π)/4`.

This is the usual fourth-power estimate and is unique only up to a quarter
turn. The estimates are ready about 25 clocks after the last preamble sample,
which is far less than the 1024 clocks between two samples of one channel.

**Tracking**, once the estimates are loaded:
* `coherent_demod`:
  * interpolates `i[n] = x[n-1] + mu·(x[n] − x[n-1])`, where mu ∈ [0,1] and
    mu = 1 is on time;
  * derotates `y = i·exp(−jθ)`;
  * labels samples even (symbol centre) or odd.
* `bit_decision`: `A_n = sign(I)` and `B_n = sign(Q)` on even samples
  (bit 1 = negative). It keeps `A_{n-1}` and `B_{n-1}`.
* `timing_tracking`, on each symbol:
  * error `e = I_{2n-1}(A_{n-1} − A_n) + Q_{2n-1}(B_{n-1} − B_n)`, with the
    decisions as ±1;
  * the error is negative when sampling is late;
  * loop: `S_n = S_{n-1} + K·e/2^16`, limited to [0,1];
  * S_n is the interpolator's mu.
* `carrier_tracking`, on each symbol:
  * error `e = Y_{2n}·A_n − X_{2n}·B_n`;
  * proportional-plus-integral loop with the two gains `K1·Ts` and `K2·Ts`:
    `f += K2·e`, `θ += K1·e + f`;
  * θ is a 32-bit binary angle, and its top 12 bits drive the derotator.
* `uw_detector`: compares the last 16 decided symbols with the unique word
  (`32'hE4B11D2F` by default) and accepts up to 2 bit errors. When it matches,
  `uw_found` pulses and the following symbols are delivered on
  `data_valid/data_bits` until the next `burst_start`.

The loops and the unique-word search run only after acquisition. Loop gains
are inputs. The testbenches use K1·Ts = 2800, K2·Ts = 60 and K = 200 for
signal amplitudes around 8000–12000 LSB.

## Top level

`fdma_tdm_top` chains the transmultiplexer and one demodulator:
* `ch_valid/ch_index/ch_data` carry the 800 separated channels, one frame of
  bins per 1024 clocks, and `frame_out` marks the last bin of a frame;
* the channel chosen by `ch_sel` feeds the demodulator, whose outputs are
  brought out as `dm_*`;
* the first bin of a frame leaves about 5170 clocks (just over five frame
  periods) after the last composite sample of that frame entered.

## Number formats

* Samples are complex, with two 16-bit two's-complement parts in Q1.15
  (`fdma_pkg::cplx_t`).
* Products are rounded to nearest and saturated (`fdma_pkg::rnd15`).
* Angles are binary: a full turn is 2^12 at the derotator and the loop
  outputs, 2^16 in the CORDIC and 2^32 in the carrier loop accumulator.
* Sizes are parameters that default to the source's figures:
  * `FFT_N` = 1024;
  * `NUM_CHANNELS` = 800;
  * `FIR_TAPS` = 9;
  * 10 FFT stages (`$clog2(N)`).

## How far this follows the source, and what it adds

These parts follow the source:
* the block structure: commutator, shared 9-tap FIR with RAMs and a
  multiplier/adder tree, phase shifter, 10-stage pipelined 1024-point FFT with
  dual memories and a multiplexed butterfly, constant multiplier;
* the demodulator's module set: tree-structured preamble module with
  subtractors, coherent demodulator with interpolator, bit decision, timing
  tracking from odd samples and A_n, A_{n-1}, B_n, B_{n-1}, carrier tracking
  from even samples with gains K1·Ts and K2·Ts, and the unique-word frame;
* the 22.22 µs frame budget.

The following are this design's own choices. The source gives no detail on
them:
* word lengths and all number formats;
* the clock rate (one sample per clock);
* the half-bin phase shift and the output sign and gain that go with it;
* coefficient loading through ports;
* DIF butterfly addressing, scaling and bank-swap handshake;
* pipeline depths;
* the preamble pattern and length, and the two acquisition estimators;
* linear interpolation;
* the loop error detectors and loop filter forms;
* the unique word, its length and the error tolerance;
* the control sequence of the demodulator.

Departures and limits:
* **1024 branch filters, not 800.** The source counts 800 nine-tap filters
  next to a 1024-point FFT. A critically sampled bank needs as many branches
  as DFT points, so 1024 are built, and 800 bins are used as channels.
* **One demodulator.** Only the channel on `ch_sel` is demodulated. How
  demodulators would be shared among the 800 channels is not described.
* **Sample rate versus bit rate.** A channel leaves the bank at 45 kS/s. A
  64 kb/s QPSK signal is 32 ksymbol/s, which would need 64 kS/s for the two
  samples per symbol the demodulator assumes. The tests therefore run the
  demodulator on signals with two samples per channel sample period.
* **Timing acquisition** only chooses the symbol sample phase. The
  interpolator can move the sampling instant up to one sample *earlier* (mu
  from 1 down to 0), so a burst must arrive on time or late by less than a
  sample, relative to the chosen phase. The tracking loop takes up the
  fraction.
* **Phase ambiguity.** The carrier estimate has the usual QPSK quarter-turn
  ambiguity. Nothing resolves it; a rotated unique word would simply not be
  found.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F` and stops itself through a watchdog. The
expected values are computed inside the testbench, independently of the RTL:
bit-exact integer models for the arithmetic blocks, floating-point DFT and
rotation references with a small tolerance for the rest.

| testbench | what it shows |
|---|---|
| `tb_commutator` | branch order, block flags, 1-cycle latency, gaps in the input |
| `tb_shared_fir` | every output against a per-branch 9-tap convolution, 4-cycle latency |
| `tb_phase_shifter` | rotation by exp(jπ(M-1-b)/M), 3-cycle latency |
| `tb_fft_dual_mem` | ping-pong banks, two ports each side, swap timing |
| `tb_fft_mae` | bit-exact butterfly, 3-cycle latency |
| `tb_fft_pipeline` | 64-point frames against a DFT, latency 6·(32+4)+2, one frame per N clocks, overrun |
| `tb_const_mult` | bit-exact C·(-1)^m·2^s |
| `tb_preamble_proc` | symbol phase and carrier phase (±3/4096 turn) over 12 preambles |
| `tb_coherent_demod` | interpolation and derotation, even/odd labels |
| `tb_bit_decision`, `tb_timing_tracking`, `tb_carrier_tracking` | bit-exact loop arithmetic, limits, preset |
| `tb_uw_detector` | word found with 0–2 bit errors, not with 3–4; data after it |
| `tb_qpsk_demod` | two full bursts with phase and frequency offset and late sampling: acquisition, unique word, 64/64 data symbols, both loops moving |
| `tb_fdma_tdm_top` | end to end at M = 64: two QPSK bursts on neighbouring channels through the whole bank and the demodulator |
| `tb_fdma_tdm_top_full` | the same at full size (1024 branches, 800 channels, default parameters) |

The end-to-end tests check the frame rate and the absence of overrun. They
also check that the neighbouring channel stays in its own bin (the empty bin
between them stays below 5 % of the channel's energy) and that acquisition
and the unique word each happen exactly once. Every data symbol must come
out correct, and both tracking loops must have moved.

To run one testbench with Verilator (5.x), from the folder that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fdma_tdm_top \
    rtl/fdma_pkg.sv $(ls rtl/*.sv | grep -v fdma_pkg) tb/tb_fdma_tdm_top.sv
./obj_dir/Vtb_fdma_tdm_top
```

The full-size end-to-end test simulates more than 200 000 clocks and runs
in under a second.

## Files

* `rtl/fdma_pkg.sv`: shared constants, sample type, rounding.
* `rtl/fdma_tdm_top.sv`: top level.
* Transmultiplexer: `commutator`, `shared_fir`, `phase_shifter`,
  `fft_pipeline` (`fft_stage`, `fft_dual_mem`, `fft_mae`, `fft_reorder`),
  `const_mult`, and `sincos_rom` (cos/sin tables computed at elaboration).
* Demodulator: `qpsk_demod`, `preamble_proc` (`cordic_atan`),
  `coherent_demod`, `bit_decision`, `timing_tracking`, `carrier_tracking`,
  `uw_detector`.
