# Reconfigurable multicarrier demodulator

A satellite that takes many narrow SCPC/FDMA carriers on its uplink and
sends one TDM stream on its downlink has to demodulate every uplink carrier
on board. This RTL does that digitally in two stages:

1. A **reconfigurable transmultiplexer (RTMUX)** splits the sampled FDMA band
   into its channels. It uses a polyphase filter bank followed by an FFT.
2. A **programmable demodulator (PRODEM)** recovers carrier phase, symbol
   timing and data for every channel. One set of time-shared hardware does
   this for all channels in turn.

The band can be laid out in one of three ways. The same hardware handles
all three by reconfiguring itself:

| case | carriers                                   | path                                               |
|------|--------------------------------------------|----------------------------------------------------|
| 1    | 800 × 64 kb/s                              | module 2: 1024-channel channelizer                 |
| 2    | 400 × 64 kb/s (lower half) and 12 × 2.048 Mb/s (upper half) | module 1 splits the band; module 2 runs at 512 channels, module 3 at 16 |
| 3    | 24 × 2.048 Mb/s                            | module 3: 32-channel channelizer                   |

Module 2 feeds demodulator A (up to 1024 channels). Module 3 feeds
demodulator B (up to 32). The recovered bits end up in each demodulator's
data RAM. Its read port is a top-level port, meant for the baseband switch
that follows.

## Top level (`mcd_top`)

```
 mode ──┐
 I/Q ──► input_demux ─┬──────────────► channelizer (module 2) ─► prodem A ─► a_rd_*
                      ├─► halfband_split ─lo┘  (case 2)
                      │        (module 1) ─hi┐
                      └──────────────► channelizer (module 3) ─► prodem B ─► b_rd_*
```

* **Input.** `in_valid` qualifies one complex sample `in_data`: 16-bit
  signed I and Q (`cplx_t` in `mcd_pkg`). `mode` is `CASE1`, `CASE2` or
  `CASE3`.
* **Mode change.** When `mode` changes, both channelizers restart within a
  cycle. The demodulators keep running, so the estimation interval that
  spans the change holds mixed data.
* **Rate.** A filter bank needs M·K + 2 cycles for each block of M input
  samples. The input must therefore stay below one sample per K cycles in
  cases 1 and 3, and below two per K cycles in case 2. With K = 8, one
  sample every 9 cycles is safe. A faster input sets the sticky `overflow`.
* **Outputs per demodulator.**
  * `done` pulses when an interval's bits are in the data RAM; `done_bank`
    says which bank.
  * `rd_bank/rd_ch/rd_sym` read 2 bits per symbol, asynchronously.
  * `ph_valid` and `ted_valid` show carrier and timing updates.
  * `overrun` is a sticky flag: the replay could not keep up.

Parameters (defaults in brackets):

| parameter  | meaning                                      |
|------------|----------------------------------------------|
| `LOG_M2`   | log2 of module 2 size [10]                   |
| `LOG_M3`   | log2 of module 3 size [5]                    |
| `K`        | polyphase taps per branch [8]                |
| `LOG_LSYM` | log2 of symbols per estimation interval [4]  |

## The channelizer: polyphase filter bank + FFT

With M branches, channel q of frame m is

    Y_q[m] = (1/M) · Σ_p v_p[m] · e^(-j2π·p·q/M)
    v_p[m] = Σ_k h[k·M + M-1-p] · x[(m-k)·M + p],   k = 0..K-1

Here h is a prototype low-pass filter of length M·K. Substituting shows
Y_q[m] = (1/M) Σ_n x[n] h[(m+1)M-1-n] e^(-j2πnq/M). That is the band
shifted by q/M, filtered by h, and decimated by M. A tone exactly on bin q
with phase φ therefore appears in channel q with phase φ and amplitude
A·Σh/M.

**Shared filter bank (`shared_filter_bank`).** All M branch filters share
one complex-by-real multiply-accumulate:

* Samples go into a memory of K+1 blocks of M samples, so one block can
  fill while the previous K are read.
* When a block is complete, the MAC computes the M branch outputs one after
  another, K products each. Block slots that do not exist yet after a
  restart count as zero.
* The prototype is computed at elaboration: a Hamming-windowed sinc with
  cutoff 1/(2M), in Q1.14, scaled so that its peak is 1.
* In half size (case 2) the bank has M/2 branches and uses every second
  prototype tap.
* `in_ready` drops only while a finished block waits for the MAC.

**Reconfigurable FFT (`rfft`, `rfft_stage`, `fft_coef_gen`, `mae`).** This
is a radix-2 single-path delay-feedback pipeline, decimation in frequency,
one sample per `in_valid`:

* Stage s has a delay line of D = 2^(N-1-s) samples and one arithmetic
  element (`mae`) that is time-shared between two phases:
  * Butterfly phase: it outputs (a+b)/2 and writes (a−b)/2 into the delay
    line.
  * Second phase: it multiplies the delayed difference by the twiddle
    exp(−j2πi/2D) while the new input enters the line.
* Per stage, `fft_coef_gen` is a position counter that supplies the
  delay-line address, the phase and the twiddle index. The twiddle table is
  computed at elaboration.
* **Half size.** The first stage is bypassed and the remaining counters are
  loaded with a different start offset. The same pipeline then does 2^(N-1)
  points. This is the "N−1/N stage" reconfiguration.
* **Scaling and order.** Every butterfly halves, so the output is DFT/N.
  Bins come out in bit-reversed order, tagged with `out_bin`; `out_last`
  marks the end of a frame.
* **Latency.** The pipeline moves only on `in_valid`. Latency is N−1+stages
  input samples.

**Band split (`halfband_split`, module 1).**

* The lower half-band is shifted up by multiplying by j^n. The upper half
  is shifted down by multiplying by (−j)^n.
* Both go through the 7-tap half-band filter [−1 0 9 16 9 0 −1]/32 and are
  decimated by 2.
* It outputs one lower and one upper sample for every two input samples.

## The demodulator (`prodem`)

```
ch sample ─► interpolator ─┬─► MCRM (carrier phase per channel) ──┐ cos/sin
              ▲  mu        └─► MRBS (buffer, 2 banks) ─ replay ─► MDRM ─► latch ─► DDR (bits)
              └──────────── MTRM (timing per channel) ◄────────────────┘
```

Channel samples arrive with their channel number, one frame (one sample of
every channel) after another, with the last channel flagged.
`prodem_ctrl` learns the number of channels from the frame length. It keeps
the sample index within the estimation interval: LS = 2·LSYM samples, at
QPSK with 2 samples per symbol. It also keeps the bank, which alternates
every interval.

* **Interpolator.** Per channel, it interpolates linearly between the
  previous and the current sample. It uses that channel's fractional delay
  mu (Q0.8) from the MTRM.
* **MCRM, carrier recovery.** For the symbol-instant samples of an interval
  it works per channel:
  1. Raise each sample to the 4th power and accumulate. This removes the
     QPSK modulation.
  2. A pipelined CORDIC gives the angle A of the sum. The phase is
     φ = (A − π)/4.
  3. A 1024-entry table turns φ into cos φ and sin φ, stored per channel
     and bank.

  The estimate has the usual π/2 ambiguity of QPSK. Nothing here resolves
  it.
* **MRBS.** While the MCRM works, the same samples are written to the
  sample buffer, indexed by bank, sample index and channel.
* **Replay.** When an interval is complete, its last phases leave the CORDIC
  pipeline after DRAIN = ITER+4 cycles. The controller then reads the
  buffered interval back, one sample per cycle, channel by channel within
  each sample index.
* **MDRM.** It derotates with the stored phase:

      y_I = (I·cos + Q·sin)/2^14
      y_Q = (Q·cos − I·sin)/2^14

  It decides bits = {sign y_I, sign y_Q} and latches the result. Symbol
  samples go to the data RAM `ddr_ram` at {bank, channel, symbol}.
* **MTRM.** It takes the same output latch. For each channel it forms the
  Gardner error e = Re{(x[k−1] − x[k])·conj(mid)}, using the symbol samples
  and the mid-symbol sample between them. It updates that channel's 16-bit
  timing by e·2^-20, saturating at 0 and 1. The top MUW bits of the timing
  are the interpolator's mu.

Because the replay reads one sample per cycle, it ends long before the next
interval is complete at any input rate the channelizer allows. `overrun`
exists for the case where it does not: the new replay then waits its turn.

## What follows the source architecture and what is this design's own

**Taken from the architecture:**

* The RTMUX/PRODEM split, with the three cases and their channel counts.
* The routing: a front-end demultiplexer; module 1 splits the band in case
  2; module 2 serves case 1 or 2(a); module 3 serves case 2(b) or 3.
* A shared, time-multiplexed polyphase filter bank.
* A pipelined FFT that is reconfigured by dropping a stage and by a
  programmable coefficient/address generator.
* A multiplexed arithmetic element for the butterfly.
* A demodulator made of carrier recovery (MCRM), a sample buffer (MRBS)
  holding one estimation interval, data recovery (MDRM) that takes four
  values (I, Q, cos, sin) into a latch before the data RAM, and timing
  recovery (MTRM) fed from that latch and driving the interpolator.
* All channels processed by one shared set of hardware.

**Chosen here, where the architecture gives no detail:**

* **FFT sizes.** They are the channel counts rounded up to powers of two:
  1024/512 and 32/16. Case 2(a) takes the lower half of the band and 2(b)
  the upper half.
* **Two demodulators** (A for module 2, B for module 3). The architecture
  describes a single shared demodulator. Two demodulate both halves of
  case 2 at once without merging two channel streams.
* **Modulation.** QPSK, 2 samples per symbol, 16-symbol estimation
  intervals. All channels of one demodulator share one symbol rate. The
  architecture also allows groups of channels at different bit rates
  inside one demodulator; that is not supported here. The two rates of
  case 2 are served by the two demodulators instead.
* **Estimators.** A 4th-power feed-forward carrier estimator. A Gardner
  timing detector with a first-order loop. A linear interpolator without
  sample skipping or stuffing: when mu would wrap, it saturates instead.
* **Filters.** K = 8 and the Hamming-windowed prototype. The 7-tap
  half-band filter, whose selectivity is modest: its gain is 0.5 at the
  band edge, about −25 dB a quarter of a half-band further on, and zero
  only at the far end of the other half.
* **FFT structure and scaling.** The SDF pipeline, 1/2 scaling per stage and
  bit-reversed output.
* **Word widths.** 16-bit samples, Q1.14 coefficients, saturation after
  every multiply.
* **Control.** The replay scheme and all handshakes, flags and reset
  behaviour. A mode change does not clear the demodulators.
* **Not built.** The analog quadrature sampler and the units after the
  demodulator (switch matrix, TDM multiplexer, modulator). No AGC is built.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values are
computed in the testbench, for example:

* a direct DFT for `rfft`;
* the polyphase sum for `shared_filter_bank`;
* tone power per bin for `channelizer` and `rtmux`;
* ideal QPSK signals with known phase for `prodem`.

These testbenches cover the larger assemblies:

* **`tb_mcd_top`** (32/8 channels, K = 4, 8-symbol intervals). It runs case
  1, then case 3, then case 2, each with carriers of known phase, and checks
  the decided bits in the data RAMs. It then drives the input too fast and
  expects `overflow`. It counts, and requires at least once: mode switches,
  band-split outputs, half-size FFT frames, phase and timing updates in
  both demodulators, completed intervals in both, and filter-bank stalls.
* **`tb_mcd_top_full`** (all defaults: 1024 + 32 channels, K = 8). It feeds
  two carriers in case 1 for three intervals (about 104 000 samples) and
  checks their bits and that no overflow or overrun occurred.

* **`tb_mcd_workloads`** (all defaults). Case 3 with 24 carriers on
  channels 0–23, whose phases step by π/2 from channel to channel: all 24
  channels must decode to the expected QPSK point on every symbol. Then
  case 2 with two carriers in each half: the decided bits must be the same
  on every symbol of an interval, in both demodulators.

* **`tb_prodem_timing`** (4 channels). Random QPSK with raised-cosine
  pulses and a sampling offset of 0.1–0.4 symbol per channel. It checks
  that the timing loop pulls each channel's mu towards the ideal value and
  that the data is error-free once the loop has settled.

Timing accuracy. Linear interpolation at two samples per symbol biases
the Gardner detector towards mu = 1/2. The loop settles 25–35 % short of
the ideal fractional delay, a residual timing error of up to about 0.04
symbol for offsets of 0.1–0.4 symbol. With the default gain (2^-20 per
update, 16-bit timing word, 16-bit samples at about 7000 amplitude), the
acquisition time constant is roughly 1000–1500 symbols. Both scale with
the signal power, because there is no AGC. A cubic interpolator would
remove the bias.

Not covered by tests: noise performance and frequency offsets.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/mcd_pkg.sv tb/tb_mcd_top.sv --top-module tb_mcd_top
./obj_dir/Vtb_mcd_top
```

Any other testbench builds the same way with its name. `mcd_pkg` holds the
shared types: `cplx_t` and `mcd_case_e`. It also holds the constants
W = 16 and CFRAC = 14, and the `sat16` saturation function. To simulate a
larger or smaller design, override the top's parameters. The filter bank
memory grows as (K+1)·2^LOG_M2 samples. Each demodulator's sample buffer
grows as 2·LS·2^LOG_NCH samples.
