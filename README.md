# MFCC feature extraction accelerator

Speech recognisers describe each short slice of speech by its Mel-frequency
cepstral coefficients (MFCCs). Computing them takes a 256-point FFT per frame,
a bank of 40 overlapping triangular band-pass filters on the Mel scale, a
logarithm and a small discrete cosine transform (DCT). Done entirely in
software on a small embedded processor this is slow. This RTL is the
hardware half of a hardware/software split: a processor keeps control and
moves data, and four accelerators do the arithmetic.

```
 samples ──► Write-FIFO ──► [FFT core] ──► Read-FIFO ──► processor: |X[b]|
                                                              │
            ┌─────────────────────────────────────────────────┘
            ▼
   ear-magnitude extractor ──► log unit ──► cepstral extractor ──► 13 MFCCs
   (40 filters, 5 MACs)        (LUT ln)     (13 MACs)              + valid flag
```

The FFT core is a separate streaming 256-point FFT (scaled output, natural
order, about 862 cycles of latency) and is not part of this RTL: its input
and output streams are ports of the top level. The processor, the audio codec
that records speech at 8000 Hz and the external memory are likewise outside.

## Files

| file | contents |
|---|---|
| `rtl/mfcc_pkg.sv` | sizes, word widths, fixed-point constants, `cplx_t` |
| `rtl/stream_fifo.sv` | generic valid/ready FIFO |
| `rtl/fft_fifos.sv` | Write-FIFO and Read-FIFO around the FFT core |
| `rtl/emag_extractor.sv` | Mel filter bank on 5 shared MACs |
| `rtl/log_lut.sv`, `rtl/log2_lut.hex` | natural logarithm with a 256-entry table |
| `rtl/cep_extractor.sv` | 13-MAC DCT with output registers and valid flag |
| `rtl/mfcc_top.sv` | everything wired together |
| `tb/tb_*.sv` | self-checking testbenches, one per block plus the top |
| `tb/mfcc_tb_pkg.sv` | reference models: Mel bank, log, cosine table |
| `tb/fft256_model.sv` | behavioural (non-synthesizable) model of the FFT core |

## The ear-magnitude extractor: 40 filters on 5 MACs

This is the least obvious block. Mathematically it computes
`emag = F · a`, where `a` is the column of 256 FFT magnitudes and `F` is a
40 × 256 matrix of filter weights. `F` is sparse: each triangle covers only a
few neighbouring bins (a Mel bank spread over 0–4 kHz has a few hundred
non-zero weights out of 10240).

The filters are ordered along the frequency axis and each overlaps only its
neighbours. So a filter and the filter five places after it never cover a
common bin, and one MAC can compute filter k, then k+5, then k+10, and so on:

| MAC | filters (0-based) |
|---|---|
| 0 | 0, 5, 10, 15, 20, 25, 30, 35 |
| 1 | 1, 6, 11, … 36 |
| … | … |
| 4 | 4, 9, 14, … 39 |

Each MAC therefore needs just one weight bank of 256 words: word `b` of bank
`m` is the weight, at bin `b`, of whichever filter of that MAC covers `b`, or 0.
A bin counter sweeps `b = 0..255`; every cycle the magnitude `a[b]` is read
once and broadcast to the five MACs, each multiplying it by its own bank's
word. A 40-entry table holds the last bin of every filter. When the bin
being accumulated is the last bin of the next filter `k` in line, the select
logic switches the output multiplexer to MAC `k mod 5`, the finished sum
(including this bin's product) is registered out with its index `k`, and the
same MAC starts again from zero for filter `k+5`. Ear-magnitudes thus come out
in filter order, at most one per cycle.

Rules the loaded bank must obey (assertions check them in simulation):

* last bins strictly increasing (never two filters finishing on one bin);
* filter `k+5` has no non-zero weight at or before the last bin of filter `k`.

Any ordinary triangular Mel bank meets both. `tb/mfcc_tb_pkg.sv` shows how to
build one: 42 edges equally spaced in `mel(f) = 1127 ln(1 + f/700)` from 0 to
4000 Hz, bin = f · 256 / 8000, filter `k` rising from edge `k` to edge `k+1`
and falling to edge `k+2`, height `2/(width in bins)` so each triangle has
unit area, weights × 10000 rounded.

**Timing.** With `start` at cycle 0, bin `b` is accumulated in cycle `b+2`, a
filter whose last bin is `b` appears on `emag_valid` at cycle `b+3`, `done`
pulses at cycle 258 and the block is idle again at cycle 259. Every frame takes
the same time whatever the bank contains.

## Fixed point and the logarithm

| quantity | format |
|---|---|
| speech sample, FFT real/imag | 16-bit signed |
| magnitude `a[b]` | 16-bit unsigned |
| filter weight | 16-bit unsigned, real weight × 10000 |
| ear-magnitude | 40-bit unsigned sum |
| log ear-magnitude | 32-bit signed, × 10000 |
| cosine | 16-bit signed, Q14 |
| MFCC | 32-bit signed, × 10000 |

`log_lut` writes its input as `a = 2^p · N` with `0.5 ≤ N < 1`, so
`ln a = (p + log2 N) · ln 2`. `p` is one more than the position of the
leading 1. The 8 bits just below the leading 1 index a 256-entry ROM holding
`round(10000 · log2(0.5 + i/512))`, i = 0..255 (`rtl/log2_lut.hex`, 16-bit
two's complement). The unit computes `p·10000 + ROM[i]`, multiplies by ln 2
(as 45426/2^16), and subtracts `CORR`. Because the index is truncated, the
result is at most about 39 units (0.0039 in ln) below the exact value.

`CORR` compensates for the weights having been multiplied by 10000. Its
default, 40000 (that is, 4), is the correction the design calls for. It is
exact only for a base-10 logarithm; for the natural log the exact value would
be `10000 · ln 10000 = 92103`. A constant offset on every log ear-magnitude
only moves cepstral coefficient 0, so set `CORR` to taste. Input 0 is taken as
1. The latency is 2 cycles (ROM read, then arithmetic), and a new value can
enter every cycle.

## The cepstral extractor

`cep_i = 2/40 · Σ_j x_j · m_ij` for i = 0..12 and j = 0..39, with `x_j` the
log ear-magnitudes and `m_ij` a cosine matrix stored in 13 RAMs of 40 words
(one per coefficient). A counter reads each `x_j` once and broadcasts it to 13
MACs in parallel. After the 40th product each sum is multiplied by 3277/2^16
(≈ 2/40), shifted right by 14 (the cosine format), and all 13 are latched at
once into the output registers; `cep_valid` rises and stays high until the next
`start`. The testbenches use `m_ij = cos(π · i · (j + 0.5) / 40)`, the usual
DCT-II for MFCCs; the hardware works with whatever matrix is loaded.

Timing: `start` at cycle 0, `cep_valid` and the outputs change at the end of
cycle 42 (seen high at cycle 43).

## Top level: `mfcc_top`

`mfcc_top` has no parameters; sizes come from `mfcc_pkg`. A frame goes
through these steps:

1. **FFT.** Push 256 samples with `smp_push` (wait while `smp_full`). The
   Write-FIFO streams them to the FFT core over `fft_in_valid/ready` whenever
   the core accepts them. The core's results come back over
   `fft_out_valid/ready` into the Read-FIFO, which pushes back when full. Pop
   them with `bin_pop` while `!bin_empty`. Each FIFO holds one full frame.
2. **Magnitudes.** The processor computes `|X[b]|` and writes it with
   `mag_we/mag_addr/mag_data`. Load the weight banks (`coef_*`), last-bin table
   (`end_*`) and cosines (`cos_*`) once, beforehand.
3. **Filters, log, DCT.** Pulse `emag_start`. Each ear-magnitude goes straight
   through the log unit and appears on `lem_valid/lem_idx/lem_data`.
   * `chain_en = 1`: the log values are also written into the cepstral
     extractor, which starts by itself after the 40th. `cep_valid` rises
     `e39 + 49` cycles after `emag_start`, where `e39` is the last bin of the
     last filter (177 cycles for the 0–4 kHz bank).
   * `chain_en = 0`: the processor stores the log values, writes them back
     with `dct_we/dct_addr/dct_data` and pulses `dct_start`.
4. Read `cep[0..12]` once `cep_valid` is high.

Inputs to the RAMs are ignored while their block is busy. Reset (`rst_n`,
active low, synchronous) clears control state and flags, not memory contents.

## Accuracy and speed

Against a floating-point MFCC computed from the same magnitudes, the
fixed-point chain agrees to within about 0.0025 on coefficients 1..12 over a
30-frame utterance. Coefficient 0 carries a known offset: every log
ear-magnitude is `ln(weighted sum) + ln 10000 - 4`, and the DCT turns that
constant into `+2 · (ln 10000 − 4) ≈ 10.42` on `cep[0]` only, since the
other rows of the cosine matrix sum to zero.

Accelerator time per frame is `e39 + 49` cycles (177 for the 0–4 kHz bank).
Including the FFT core's latency and one-word-per-cycle transfers by the
processor, a frame takes about 1800 cycles, or 27 µs at 66.67 MHz. With
256-sample frames every 128 samples at 8000 Hz, that is a small fraction of
the 16 ms available.

## Where this departs from or adds to the source design

* **Weight storage.** The source describes one coefficient RAM per filter (40)
  but draws five. Here there are five banks, one per MAC, holding the same
  40 filters. The last-bin table that tells the control when a filter is
  complete is this design's own mechanism. The source only says the MACs are
  reset "at regular intervals" and their outputs collected in order.
* **Direct chaining** (`chain_en = 1`) of filter bank → log → DCT is an
  addition. In the source the processor moves the log values through memory;
  `chain_en = 0` keeps that flow.
* **FFT handshakes** are single-clock valid/ready. The source calls them
  asynchronous handshakes without detail; no clock-domain crossing is built.
* **MACs** are plain multiply-add registers, not vendor DSP cores.
* All **word widths**, the Q14 cosine format, the ln 2 constant, pipeline
  depths, the flag-clearing rule and the handling of `log(0)` are choices made
  here.
* The filter bank always sweeps all 256 bins (1280 multiply slots on 5 MACs)
  rather than only the non-zero weights.

Not built as RTL: pre-emphasis and frame blocking (left to the processor;
no pre-emphasis filter is specified), the FFT core (a vendor core; `tb/fft256_model.sv` models
it), the magnitude computation (processor software), the processor, the
audio codec and its controller, and the external memory.

## Simulating

Run from the repository root (the log ROM is read from `rtl/log2_lut.hex`,
a path relative to the working directory):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mfcc_pkg.sv tb/mfcc_tb_pkg.sv tb/tb_mfcc_top.sv --top-module tb_mfcc_top
./obj_dir/Vtb_mfcc_top
```

Replace `tb_mfcc_top` with `tb_utterance`, `tb_emag_extractor`, `tb_log_lut`,
`tb_cep_extractor` or `tb_fft_fifos` for the block tests. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_fft_fifos` | fill to full, ordering under random valid/ready, levels |
| `tb_emag_extractor` | 40 outputs against a direct 40×256 product, output cycle of every filter, MAC reuse count; Mel bank and a random bank over all 256 bins |
| `tb_log_lut` | edge values, every power of two and neighbours, 2000 random values: exact integer model, accuracy against true ln, latency, tag |
| `tb_cep_extractor` | 13 outputs against integer and real DCT, 43-cycle latency, flag behaviour, writes ignored while busy |
| `tb_utterance` | half a second of synthetic voiced speech, 30 frames of 256 with 50 % overlap, chained mode: every MFCC against a floating-point MFCC of the same magnitudes (tolerance 0.01; the worst seen is about 0.0025), accelerator cycles per frame |
| `tb_mfcc_top` | three full-size frames through a behavioural FFT: every bin through the Read-FIFO, every log ear-magnitude and MFCC against the model, chained latency. It also counts that each mechanism occurs: Write-FIFO full, FFT input stall, Read-FIFO full, MAC hand-over, chained and processor-driven DCT, log of zero |

All testbenches run the design at its default sizes and finish in well under
a second.
