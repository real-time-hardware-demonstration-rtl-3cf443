# Sub-banded DFT-S OFDM receiver (180 Gbps, dual polarization)

This RTL is the digital back end of a coherent optical receiver for a 25 GHz-wide
DFT-spread OFDM channel carrying 16-QAM on two polarizations. Instead of
demodulating the whole 26.6 GS/s channel in one piece, the receiver splits it
with a polyphase filter bank into 16 sub-bands of 3.325 GS/s each (two samples
per sub-band symbol). Each sub-band is then an ordinary narrow-band DFT-S OFDM
signal that a modest processor can demodulate at the FPGA clock. One sub-band
processor per polarization is built here, and it can be switched to any
filter-bank output. A duplicate per sub-band would give full throughput.

Everything runs at one clock. At 415.625 MHz that is 26.6 GS/s / 64, so each
ADC channel delivers 64 samples per clock.

## Signal flow

```
ADC I/Q (64 lanes x 6 bit) ─> iq_imbalance_corr ─> filter_bank (8 x fb_module) ─> pilot_cfo_comp
   ─> subband_select ─> subband_processor:
        decim2 ─> golay_timing ─> block_aligner ─> FFT64 ─> lms_equalizer ─> IFFT64 ─> qam16_slicer ─> ber_meter
```

`dfts_rx_top` builds this chain twice, once for X and once for Y. No
polarization demultiplexing (2x2 MIMO) is done; each polarization is
equalized on its own.

Shared types and constants live in `dfts_pkg`:
- samples are `cplx_t`, a packed {re, im} pair of signed 16-bit values;
- coefficients are Q2.14;
- `LANES=64`, `NSUB=16`, `NFB=8`, `NSC=64`, `NCP=8`, and so on.

## The filter bank (the hard part)

The analysis bank has 16 channels and is decimated by 8 instead of 16. This
is the "twice under-decimated" case. For sub-band k and output time m:

    y_k[m] = 1/16 * sum_n h[n] x[8m - n] exp(-j 2 pi k (8m - n) / 16)

The prototype `h` is a 32-tap Hann-windowed sinc, computed at elaboration
time by `dfts_pkg::proto_coefs()`. It has cutoff 1/32 of the input rate and a
DC gain of 16.

Each clock carries 64 new samples, which is 8 hops of 8. `filter_bank` holds
the previous clock's 64 samples, so every one of the 8 `fb_module`s sees its own
32-sample window `win[n] = x[8m - n]` (win[0] newest). Each module:

1. multiplies the window by the prototype;
2. folds the 32 products into 16 (n and n+16 add);
3. takes a 16-point IFFT (`fft_radix2`, INV=1).

The fold and IFFT compute the sum in the modulation-free form, which carries a
factor exp(-j 2 pi k 8m / 16) = (-1)^(k·m). Modules in odd positions therefore
negate their odd sub-bands (parameter `ODD`).

Latency is 5 clocks from the input vector to `out_data[NFB][NSUB]`. Each clock
then gives 8 time samples for each of the 16 sub-bands.

## Carrier recovery from the pilot sub-band

The transmitter puts two pilot tones at ±1/8 of the sub-band sample rate in
the centre sub-band (index 0 in filter-bank order). `pilot_cfo_comp` works
as follows:

- It extracts each tone separately by mixing its 8 samples per clock with the
  tone's conjugate.
- It averages each tone over `NAVG=4` clocks.
- It multiplies the two averages. The angle of the product is twice the common
  carrier phase.

The two tones cannot simply be summed. The filter delay advances one tone's
phase and retards the other's, so a single matched filter cancels at some
offsets. The product is immune to that.

The angle comes from a vectoring `cordic`. A 17-bit accumulator unwraps it and
the result is halved, giving φ. A rotation CORDIC turns φ into exp(-jφ), and all
16 sub-bands are multiplied by it. The data are delayed to line up with the
estimate, and the output appears 7 clocks after the input.

The estimate is updated every clock. It has a π ambiguity, which the
equalizer absorbs together with the rest of the constant phase.

## Sub-band processor

- **subband_select / decim2.** A registered multiplexer picks one sub-band
  (8 samples per clock). `decim2` then keeps every second sample, with the
  phase set by `dec_phase`, leaving 4 symbols per clock.
- **golay_timing.** Each frame starts with a Golay complementary pair Ga|Gb,
  each 32 symbols long. The metric is |Ca + Cb|², the sum of both correlations
  at the hypothesised preamble end. It is computed for all 4 lanes using only
  adds and subtracts, and it has a single sharp peak there.
  - After the first metric above `thr`, the largest metric in the next L
    symbols is taken as the preamble end.
  - The detector then sleeps for one frame minus L.
  - The symbol stream leaves delayed by 12 clocks, with `out_mark` on the last
    preamble symbol.
  - For the first few clocks after reset the correlator holds stale data, so
    detection is held off (`WARMUP`).
- **block_aligner.** A frame is the preamble, then `NTRAIN=1` training
  block, then `NDATA=99` data blocks, for 64 + 100·72 = 7264 symbols. Each block
  is an 8-symbol cyclic prefix followed by 64 symbols.
  - After the mark, the aligner collects 64-symbol windows that start
    `ADVANCE=4` symbols into the prefix. This keeps a timing error of a few
    symbols inside the CP, where it becomes a linear phase that the equalizer
    removes.
  - Blocks are flagged as training or first-data.
- **FFT64 → lms_equalizer → IFFT64.** This is DFT-spread OFDM, so the symbols
  are in the time domain: the FFT moves them to sub-carriers, the equalizer
  works there, and the IFFT "de-spreads" them back.
  - Scaling is ÷8 in the FFT (stages 0, 2, 4; `SCALE_MASK=0x15`) and ÷8 in the
    IFFT (`0x2A`), so a unity channel maps symbols back to their own values.
  - The equalizer keeps one complex weight per sub-carrier.
  - On a training block it runs 16 LMS iterations, one per clock, against the
    known QPSK training pattern. The pattern is ±1024 and comes from a 16-bit
    LFSR with seed 0xACE1 (`train_bits()`).
  - The LMS step is normalised by a power of two: μ = 2^-(⌊log2|y|²⌋+1). This
    keeps the update stable without a divider.
  - Data blocks are multiplied by the weights with one clock of latency.
- **qam16_slicer.** Gray-mapped 16-QAM decisions with levels ±512 and ±1536
  (`QAM_UNIT=512`). Per symbol k, bits 4k and 4k+1 are the I sign and I inner
  flag, and bits 4k+2 and 4k+3 are the same for Q.
- **ber_meter.** The payload is PRBS19, b[n] = b[n-14]^b[n-17]^b[n-18]^b[n-19].
  On the first data block of each frame the meter loads its register from the
  first 19 received bits. From then on it predicts each bit and counts
  compared bits and errors in 48-bit counters.

## What is taken from the system, and what is this design's own

These numbers follow the system:
- 16 sub-bands, two-times oversampled sub-bands, 8 parallel filter-bank
  modules and a 64-sample-per-clock datapath;
- IQ imbalance correction before the filter bank;
- pilot-based CFO/phase correction from the centre sub-band, with two tones at
  ±415.6 MHz;
- Golay-sequence timing;
- 64-point DFT-S OFDM with an 8-symbol CP, a 1 % training overhead, and
  adaptive LMS equalization;
- a 16-QAM slicer and a PRBS19 BER meter.

These are choices made here:
- the prototype filter;
- all word widths (6-bit ADC, 16-bit samples);
- the two-tone product estimator;
- the preamble length and the detection rule;
- the frame layout of one training block plus 99 data blocks;
- the LMS schedule and step rule;
- the training pattern;
- the CP advance.

The CP is read as 8 sub-band symbols out of 72. The overhead can also be read
as 8 samples at the full rate (about 0.83 %). The per-sub-band reading is the
one implemented; `NCP` changes it.

The system also has parts that are not included here:
- ADC calibration and the data links from the ADCs;
- the links between FPGAs, since the three-FPGA partition is flattened into
  one top module;
- the transmitter DSP;
- the optical front end.

## Interface of `dfts_rx_top`

| port | dir | meaning |
|---|---|---|
| `in_valid` | in | one ADC vector this clock |
| `adc_xi/xq/yi/yq [64]` | in | signed `ADC_W`-bit samples (default 6), index 0 oldest |
| `c_ii/c_qi/c_qq [2]` | in | Q2.14 IQ correction per polarization: I' = c_ii·I, Q' = c_qi·I + c_qq·Q |
| `sb_sel` | in | sub-band given to both sub-band processors |
| `dec_phase` | in | sample phase of the 2:1 decimation |
| `golay_thr` | in | threshold on \|Ca+Cb\|² (48 bit) |
| `cfo_phase [2]` | out | pilot phase estimate, 2^16 = one turn |
| `sym_valid/sym_data [2]` | out | equalized symbols, one 64-symbol block per valid |
| `bits_valid/bits [2]` | out | 256 sliced bits per block |
| `ber_bits/ber_errs/ber_synced [2]` | out | BER meter |
| `n_detect/trained [2]` | out | preamble count, equalizer trained |

Latencies in clocks:
- IQ correction: 1
- filter bank: 5
- pilot correction: 7
- select: 1
- decimate: 1
- Golay: 12
- aligner: 1 after a block's last symbol
- FFT: 6
- equalizer: 1
- IFFT: 6
- slicer: 1
- BER meter: 1

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Irtl -y rtl --top-module tb_dfts_rx_top rtl/dfts_pkg.sv tb/tb_dfts_rx_top.sv
./obj_dir/Vtb_dfts_rx_top
```

`tb_dfts_rx_top` runs the complete receiver at its default sizes. A
behavioural transmitter builds four 16-QAM sub-bands plus the pilots. The
channel adds a frequency offset, a phase offset and IQ imbalance, and a 6-bit
ADC quantises the result. The test runs four frames and switches the sub-band
after two. It checks that:
- every preamble is detected;
- the equalizer trains;
- the BER meters synchronise with zero errors on both polarizations, before and
  after the switch;
- the pilot phase tracks the offset.

It also counts each mechanism (preamble detection, training, CFO tracking, IQ
correction, sub-band switch). It takes well under a minute.

`tb_subband_processor` runs a processor alone at 2 samples per symbol through
a complex flat channel.

## Known limits

- Only one sub-band per polarization is demodulated; there is no MIMO.
- There is no automatic gain control. `golay_thr` and the IQ coefficients are
  static inputs.
- The pilot estimate is held for the 8 samples of each clock. Phase noise
  faster than the NAVG-clock average is not tracked.
- The equalizer is trained once per frame and not updated on data (no
  decision-directed mode).
