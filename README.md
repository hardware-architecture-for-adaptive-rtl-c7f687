# Hybrid ADTF + DWT ECG denoiser

An ECG recorded through electrodes picks up muscle (EMG) noise, power-line
interference and other high-frequency noise. This design removes it in real
time, sample by sample, with two small filters in series:

1. an **adaptive dual threshold filter (ADTF)**. It looks at a 10-sample window
   and clips the window's middle sample into a band `[Lt, Ht]` around the
   window mean. The band's width adapts to the local spread of the signal.
2. a **two-level Daubechies-4 wavelet stage (DWT)**. It decomposes the last eight
   ADTF outputs, discards the two finest detail bands (D1 and D2), and
   rebuilds the signal from what remains.

The input is an 11-bit ECG sample stream (360 samples/s, as in the MIT-BIH
recordings). The output is a 16-bit fixed-point sample with 11 integer and 5
fraction bits (Q11.5). Each output sample needs a handful of multiplies by
constants. The whole design is a pipeline with no memory blocks: 622
flip-flops, and no RAM.

```
sample_in ─► FB1 window(10) ─► FB2 mean/max/min ─► FB3 thresholds + clip ─► FB4 window(8) ─► FB5 DWT/drop D1,D2/IDWT ─► signal_out
  11 bit        adtf_load         adtf_treatment        adtf_test              load_data          dwt_idwt                 Q11.5
              └───────────────── adtf_filter ─────────────────────┘        └────────── dwt_filter ──────────┘
                                                  hybrid_top
```

## Number formats

| Signal | Format |
|---|---|
| input sample | 11-bit unsigned code, 0..2047 |
| mean, Ht, Lt, ADTF output, DWT input/output | Q11.5: 16-bit unsigned, value = code / 32 |
| alpha | Q1.10 in 11 bits: 0.1 is stored as 102 (0.0996) |
| db4 taps | signed, 16 fraction bits (18-bit words) |
| DWT internals | signed 32-bit, 9 fraction bits (5 + 4 guard bits) |

All types and constants are in `rtl/ecg_pkg.sv`.

## ADTF stage (FB1–FB3)

**FB1, `adtf_load`.** A 10-deep shift register. `win[0]` holds the newest
sample and `win[9]` the oldest.

**FB2, `adtf_treatment`.** Computes max, min and mean in one clock. The mean is
the window sum times 13107 = round(2^17/10). That 30-bit product, rounded by
12 bits, is the mean in Q11.5. The truncated reciprocal makes the mean at most
1.5 LSB (1/21 of a sample code) low near full scale.

**FB3, `adtf_test`.** Computes the two thresholds:

```
Ht = mean + (max - mean) * alpha
Lt = mean - (mean - min) * alpha
```

Both products are rounded to Q11.5. The middle sample `win[4]` ("Data 5") is
compared with the integer parts of `Ht` and `Lt`:

| condition | output | `adtf_sel` |
|---|---|---|
| sample > int(Ht) | Ht | `ADTF_HIGH` |
| sample < int(Lt) | Lt | `ADTF_LOW` |
| otherwise | sample with five zero fraction bits | `ADTF_PASS` |

With alpha = 0.1 the band is narrow, so most samples are clipped. The ADTF
therefore acts as a strong, spread-aware smoother. A smaller alpha removes more
noise and flattens peaks more. `ALPHA_Q10` is a parameter of `adtf_filter` and
`adtf_test`.

FB3 reads Data 5 directly from FB1, not through FB2's register. FB1 holds its
window until the next strobe, so this path is correct only when sample strobes
are at least two clocks apart. An assertion in `adtf_filter` checks this. At a
50 kHz clock and 360 Hz sampling, strobes are about 139 clocks apart.

## DWT stage (FB4–FB5): the part that needs care

**FB4, `load_data`.** Keeps the last eight ADTF outputs. `dwt_filter` hands
them to FB5 in time order: `s[0]` is the oldest.

**FB5, `dwt_idwt`.** Transforms eight samples with an eight-tap filter. Every
output would therefore need samples from outside the window. This design
handles that by treating the window as **one period of a periodic signal**:

```
level 1 analysis:  A1[k] = Σn x[n]·h[(n−2k) mod 8]      D1[k] = Σn x[n]·g[(n−2k) mod 8]     k = 0..3
level 2 analysis:  A2[j] = Σk A1[k]·h4[(k−2j) mod 4]    D2[j] = Σk A1[k]·g4[(k−2j) mod 4]   j = 0..1
elimination:       D1 := 0, D2 := 0
level 2 synthesis: A1'[k] = Σj A2[j]·h4[(k−2j) mod 4] + D2[j]·g4[(k−2j) mod 4]
level 1 synthesis: y = Σk A1'[k]·h[(OUT_IDX−2k) mod 8] + D1[k]·g[(OUT_IDX−2k) mod 8]
```

In these formulas:

- `h` is the db4 low-pass filter.
- `g[m] = (−1)^m h[7−m]` is its mirror high-pass filter.
- `h4` and `g4` are `h` and `g` folded to length 4: `h4[m] = h[m] + h[m+4]`.

With this folding each level is an orthonormal matrix, so synthesis is just the
transpose of analysis. With `ELIM_D1 = ELIM_D2 = 0` the block returns its input
unchanged (perfect reconstruction). The testbench uses this to check the whole
transform, not only the low-pass path.

Meaning of the levels: at 360 Hz, D1 covers roughly 90–180 Hz and D2 roughly
45–90 Hz. Dropping both leaves a low-pass filter that keeps content below about
45 Hz.

Only one of the eight reconstructed samples is produced: position
`OUT_IDX = 4`. The window slides by one sample per input, so the stage still
gives one output per input sample. Since the DWT stage is linear, the
end-to-end effect of FB5 is an 8-tap FIR filter whose weights come from the
wavelet. For `OUT_IDX = 4` those weights peak at `x[5]`, so the DWT stage
delays the signal by about two samples. The ADTF adds four more (it outputs
the middle of its window).

Coefficients: the textbook db4 taps `h` are scaled by 2^16 and rounded to
nearest. Two taps lie almost exactly half way (−694.51 and −12257.51); these
are rounded up, so that the even and the odd taps each sum to 46341 =
round(2^16/√2). Constants then pass through both levels with no gain error.
The constants are computed in `ecg_pkg` from the 8-entry table `DB4_H`.

Pipeline: there are four register stages (level-1 analysis, level-2 analysis,
level-2 synthesis, level-1 synthesis). The output is rounded to Q11.5 and
saturated to 0..2047.97. About 100 constant multiplies are written; after
elimination, synthesis tools drop the unused detail paths.

## Interface and timing (`hybrid_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | processing clock (50 kHz in the reference timing) |
| `rst_n` | in | 1 | synchronous, active low; clears every register |
| `sample_valid` | in | 1 | one-clock strobe per input sample, at least 2 clocks apart |
| `sample_in` | in | 11 | ECG sample |
| `signal_out` | out | 16 | denoised sample, Q11.5; holds between updates |
| `out_valid` | out | 1 | one-clock pulse when `signal_out` updates |
| `adtf_out` | out | 16 | ADTF result (monitoring) |
| `adtf_sel` | out | 2 | ADTF branch taken for the sample now in the DWT stage (monitoring) |

Latency, measured from the `sample_valid` clock to `out_valid`:

| Block | Clocks |
|---|---|
| FB1 | 1 |
| FB2 | 1 |
| FB3 | 1 |
| FB4 | 1 |
| FB5 | 4 |
| **Total** | **8** |

At 50 kHz, 8 clocks is 160 µs. This is well inside the 0.3 ms response
reported for the original implementation and the 2.78 ms sample period. The
pipeline accepts a sample every second clock.

After reset all windows hold zeros, so the first ten outputs are a start-up
transient.

## Where this design departs from, or adds to, the original architecture

What comes from the original architecture:

- the block split FB1–FB5 and their port names
- the 10-sample window
- alpha = 0.1 stored as Q1.10 in 11 bits
- a 30-bit mean reduced to Q11.5
- the three-way threshold decision on the window's middle sample (Data 5),
  compared against the integer parts of the thresholds
- the 8-sample window for the db4 wavelet
- two decomposition levels with D1 and D2 eliminated
- the 11-bit input and the Q11.5 output

Choices made here, where the original gives no detail:

- **Timing model.** One processing clock with a sample strobe. The original
  shows a single clock pin per block and a separate 360 Hz sample rate. This
  design also adds a reset, `out_valid`, and the two monitoring outputs, so it
  has more than the original's 28 pins.
- **Sample coding.** Input samples are unsigned codes.
- **Mean.** Computed by multiplying by a reciprocal; the alpha products are
  rounded to nearest.
- **Median.** "Median" is read as the window's middle sample, not as a sorted
  median.
- **DWT details.** The db4 coefficient values and their precision, the
  periodic handling of the window edges, the output position `OUT_IDX`, the
  internal precision, the output saturation, and the pipeline depth.
- **FB4 → FB5 order.** The published diagram crosses these wires in an order
  that cannot be read; time order is used here.
- **Resource use.** The original's FPGA resource figures (logic elements, DSP
  blocks) are not reproduced. They depend on the vendor tool and device.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Reference models are in
`tb/tb_ecg_model_pkg.sv`:

- the ADTF model uses integer arithmetic;
- the two-level periodic db4 model uses floating point with the exact,
  unquantised taps.

| Testbench | What it checks |
|---|---|
| `tb_adtf_load`, `tb_load_data` | window contents after every strobe; `out_valid` timing |
| `tb_adtf_treatment` | exact max/min; mean within 1.5 LSB of sum·3.2; 1-clock latency |
| `tb_adtf_test` | thresholds against floating-point equations with alpha = 0.1; branch choice; all three branches occur |
| `tb_adtf_filter` | bit-exact against the ADTF model on noisy ECG and random data; 3-clock latency |
| `tb_dwt_idwt` | within 2 LSB of the floating-point model; constants pass unchanged; perfect reconstruction with elimination off; 4-clock latency at full throughput |
| `tb_dwt_filter` | FB4 + FB5 against the model; 5-clock latency |
| `tb_hybrid_top` | see below |
| `tb_workload_wgn` | see below |

`tb_hybrid_top` runs the whole design at its default parameters. It uses a
50 kHz clock and 360 Hz strobes, with 10 s of a synthetic ECG plus noise,
then random codes. It checks:

- every output against the model chain;
- the 160 µs response;
- that pass-through, clip-to-Ht, clip-to-Lt and an effective D1/D2 elimination
  each occur;
- that the error against the clean ECG falls.

`tb_workload_wgn` adds Gaussian noise at 5, 10 and 20 dB SNR to the synthetic
ECG. On that signal the measured SNR improvement is about +5.5 dB, +2.0 dB and
−7.5 dB. At 20 dB the smoothing of the QRS complex costs more than the noise
it removes. No recorded ECG data is included, so results on real recordings
are not verified here.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ecg_pkg.sv tb/tb_ecg_model_pkg.sv tb/tb_hybrid_top.sv \
    --top-module tb_hybrid_top -Mdir obj_top
./obj_top/Vtb_hybrid_top
```

To run another testbench, swap in its file and top name. The unit testbenches
for the ADTF stage do not need `tb_ecg_model_pkg.sv` but accept it. To lint
the RTL:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/ecg_pkg.sv rtl/hybrid_top.sv
```

## Changing the design

- **Window length.** Set `W` on `adtf_filter`. The mean reciprocal follows
  automatically, and Data 5 becomes `win[W/2-1]`.
- **Threshold.** Set `ALPHA_Q10`; the value is alpha·1024.
- **DWT output.** Set `OUT_IDX`, `ELIM_D1` and `ELIM_D2` on `dwt_filter`.
  `ELIM_*` = 0 keeps a detail band.
- **Coefficients.** Change `DB4_H` in `ecg_pkg`. Keep the even and odd sums
  equal to 2^16/√2 if constants should pass with no gain error.
