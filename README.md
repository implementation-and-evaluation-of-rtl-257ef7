# Decoder-aided channel tracking and phase correction for IEEE 802.11p

Vehicles move fast, so the radio channel changes many times during one
IEEE 802.11p packet. A 1600-byte packet at a low rate lasts several
milliseconds, but at highway speed the channel stays coherent for well under
one millisecond. A receiver that estimates the channel once, from the long
preamble, is therefore out of date long before the packet ends. Two effects
hurt most:

* the channel's amplitude and phase per sub-carrier drift, and
* a common phase error (residual carrier offset, oscillator phase noise)
  rotates every sub-carrier of a symbol by the same angle, which grows from
  symbol to symbol.

This RTL implements the receiver stage that fights both. It sits between the
FFT and the de-mapper of an OFDM receiver and uses the receiver's own decoder
as a source of training data:

1. Each data symbol is equalized with the current channel estimate and sent
   on to de-mapping, de-interleaving and Viterbi decoding.
2. Once the decoder has produced the bits of a symbol, they are re-encoded,
   re-interleaved and re-mapped. The result is a clean copy `X~` of what was
   sent.
3. The received symbol divided by that copy, `Y / X~`, is a fresh channel
   estimate. It is low-pass filtered across the sub-carriers and averaged
   into the stored estimate.
4. The phase difference between consecutive fresh estimates measures how
   fast the common phase turns. This is the key idea of the design. The
   equalizer then rotates each new symbol back by that rate times the decoder
   loop's delay.

The decoder loop is slow. A symbol's reconstruction comes back `D` symbols
after the symbol itself, with `D` = 6, 5, 5, 4, 4, 4, 4, 4 for rate index
0..7. This comes from the Viterbi trace-back depth of 64 bits plus the
de-mapping and re-mapping steps. The stored channel estimate is therefore
always `D` symbols old. The phase tracker's job is to predict what happened
in between.

## Data flow

```
            Y(n,k)                                   X'(n,k)                 X(n,k)
FFT ──────────┬──────────► equalizer: Y / H(n) ─────────► phase_track: X'·e^{-jφ} ─────► de-mapper …
              │                 ▲ H(n)                         ▲ φ = D·θ
              │                 │                              │
  LTS1, LTS2  ├─► init_chest ─┐ │                              │
              │               ├─► lpf ──► ewma_ram ────────────┘(H(n,i) also to phase_track)
   data       └─► y_buffer ─► ce_divider: Y / X~ ─┘
                                  ▲ X~(n,i)
                       … re-encoder, re-interleaver, constellation mapper
```

| Module | Role |
|---|---|
| `chest_pt_top` | Top level. Wires the blocks below; the decoder loop is outside it. |
| `init_chest` | Least-squares estimate from the two long-training symbols: `H_I = (Y_L1 + Y_L2)/2 · L(n)`, where `L(n) = ±1`. |
| `y_buffer` | FIFO that holds the received data bins until their reconstruction `X~` returns, up to 6 symbols later. |
| `ce_divider` | `H(n,i) = Y · conj(X~) · C`, with `C = 2^Q / |X~|^2`. Truncates the low bits. |
| `lpf` | Low-pass filter over the 64 bins. It keeps the first 16 samples (the 1.6 µs guard interval) of the channel impulse response. |
| `ewma_ram` | Per-sub-carrier estimate memory. The initial estimate is written directly. Later estimates are averaged in as `H ← α·H + (1-α)·H(n,i)`. |
| `equalizer` | `X' = Y · conj(H) / |H|^2`. |
| `phase_track` | Common phase error estimation, prediction and removal. |
| `chest_pkg` | Sample types, the feedback-delay table and the long-training sequence. |
| `dpram` | Simple dual-port RAM used by `ewma_ram`. |

## Phase tracking in detail

`phase_track` receives the same filtered per-symbol estimates `H(n,i)` that
go into the averaging RAM. It uses them before averaging, because the
averaging would blur the phase step.

1. **Phase difference per sub-carrier.** A 64-entry buffer returns the
   previous symbol's estimate of the same bin. A complex multiplier forms
   `P(n,i) = H(n,i) · conj(H(n,i-1))`. Its angle is the phase change of that
   sub-carrier over one symbol. The conjugate product gives the angle of
   `H(n,i)/H(n,i-1)` without a divider. Its magnitude `|H|^2` weights strong
   sub-carriers more, which is what an estimator should do anyway.
2. **Average.** An accumulator sums `P` over all 64 bins. Null bins add zero.
3. **Angle.** At the last bin, the sum goes to a 14-iteration CORDIC in
   vectoring mode. The CORDIC first rotates the vector into the right half
   plane, so any angle in (-180°, 180°] works. Its output `θ` is the phase
   step per symbol, a 16-bit word where 2^16 is one full turn. Taking only
   the angle is the normalisation `P/|P|`.
4. **Prediction.** The "multiplier factor table" gives `D` for the current
   rate index, and `φ = D·θ` (modulo one turn). The stored channel estimate
   comes from symbol `i`. The symbol being equalized is `k = i + D`, so it
   has turned by `D·θ` since then.
5. **Removal.** A 1024-entry sine/cosine table, addressed with rounding,
   gives `exp(-jφ)`. A complex multiplier applies it to every equalized bin.

The new rotation is in use 18 cycles after the last bin of an estimate. An
initial (preamble) estimate only loads the one-symbol buffer and resets the
rotation to 1, since there is no previous estimate to compare with.

Consequences worth knowing:

* The first phase step of a packet is measured against the preamble
  estimate. The preamble estimate averages two symbols, so this first step is
  1.5 symbols long, not one, and the first prediction is somewhat too large.
  From the second decoder-based estimate on, the steps are exact.
* The `α`-average lags a steadily turning phase by about `α/(1-α)` steps.
  Small `α` suits fast phase drift; large `α` suits noise.
* Until the first reconstruction returns (`D` symbols), no phase correction
  is applied.

## The low-pass filter

The filter keeps the part of the channel response that can be real. The
multipath is assumed to lie within the 16-sample guard interval. Everything
the estimate shows beyond sample 15 is noise.

In the frequency domain, this window is a circular convolution across the 64
bins with the complex kernel

    K(d) = (1/64) · Σ_{t=0..15} exp(-j·2π·d·t/64)

`K(d)` is the DFT of 16 ones followed by 48 zeros. Its values are computed at
elaboration time from that formula (real `$cos`/`$sin` in a constant
function), with 15 fraction bits.

The circuit is a direct convolution with `LANES` = 8 complex multiply-
accumulate lanes. Each pass of 64 cycles produces 8 output bins. The results
of a pass stream out, one per cycle, while the next pass runs. A symbol takes
520 cycles. Two input banks let the next symbol arrive while the current one
is being filtered. Writing into a bank that is still busy sets the sticky
`overrun` flag.

**Null sub-carriers.** An 802.11p symbol uses only 52 of the 64 bins. The
estimate on DC and on the 11 edge bins is zero. Windowing that notched
response smears the notch over the whole band. In a noise-free three-path
test this gave about 18.6 % error vector magnitude (EVM) on the equalized
symbols. With `NULL_FILL = 1` (the default) the filter reads every null bin
as its nearest used bin (`0 → 1`, `27..31 → 26`, `32..37 → 38`). This only
remaps addresses and brings the EVM down to about 5 %. The remaining 5 % is
ripple from the rectangular window itself, largest next to the band edges.
It is a noise floor of the method. In the end-to-end test it caused one
wrong 64-QAM decision in about 3,200 bins. Set `NULL_FILL = 0` to filter the bins
unchanged.

## Number formats

* Every complex sample is a `cpx_t`: two signed `W`-bit components with
  `F = W-2` fraction bits, so each component covers [-2, 2). `W = 12` is set
  in `chest_pkg`. The constellations use unit average energy, so a channel
  gain up to about 1.3 fits without saturating 64-QAM corners.
* Products are kept at full precision (`cpx_prod_t`, `2W+1` bits) and are
  truncated and saturated back to `W` bits at each block output.
* `ce_divider` uses `Q = 3F+4 = 34`. This keeps the reciprocal `C` above 12
  bits even for the smallest 64-QAM point.
* `α = alpha_i / 256`.
* Phases are 16-bit words; 2^16 is one full turn.

`W` is the cost/quality knob. Results published for this architecture
(packet error rate against bit width) show 8 bits performing like 12, and 4
or 6 bits clearly worse. Only 12 bits has been simulated here.

## Interface and timing of `chest_pt_top`

All streams carry one complex bin per valid cycle together with its FFT bin
index. Bins use natural FFT order: bins 32..63 are sub-carriers -32..-1.

| Port | Dir | Meaning |
|---|---|---|
| `rate[2:0]` | in | Rate index 0..7 (BPSK 1/2 … 64-QAM 3/4). Selects `D`. |
| `alpha_i[7:0]` | in | EWMA weight, `α = alpha_i/256`. |
| `y_valid, y_type, y_bin, y_data` | in | FFT output. `y_type` is `SYM_LTS1`, `SYM_LTS2` or `SYM_DATA` (header and data). |
| `xt_valid, xt_bin, xt_data` | in | Reconstructed points from the constellation mapper, one symbol at a time, in the order the data symbols were received. |
| `x_valid, x_bin, x_data` | out | Equalized, phase-corrected bins for the de-mapper. 4 cycles after `y_*`. |
| `h_valid, h_bin, h_data` | out | Each word written to the estimate RAM. |
| `cpe_update, cpe_theta, cpe_phi` | out | Pulse when a new rotation takes effect; measured step `θ`; applied rotation `φ`. |
| `ybuf_overflow, ybuf_underflow, lpf_overrun` | out | Sticky error flags. |

Timing rules for the caller:

* A symbol's estimate is in the RAM about 530 cycles after its last
  reconstructed bin; the low-pass filter takes most of that. At 10 MHz
  bandwidth a symbol lasts 8 µs, which is 800 cycles at 100 MHz. That leaves
  room, but symbols must not come faster than one per ~530 cycles.
* The first bin of a long-training symbol clears `y_buffer`. A packet whose
  tail was never reconstructed, for example an aborted one, therefore does
  not shift the next packet's pairing of `Y` and `X~`.
* The estimate RAM may be updated in the middle of a symbol that is being
  equalized. The equalizer always reads the newest word of each bin.
* Reset is asynchronous, active low.

## What is original and what is this implementation's choice

These parts follow the original architecture:

* the overall pipeline;
* LS averaging of the two preamble symbols;
* the 16-sample window;
* division by the reconstructed symbol through `conj(X~)` and a `2^q/|X~|^2`
  factor with truncation;
* the α-weighted average held in a dual-port RAM by read-modify-write;
* phase tracking with a one-symbol buffer, conjugate multiplier,
  accumulator, CORDIC, rate-indexed multiplier table, sine/cosine table and
  final complex multiplier;
* the feedback delays and the 12-bit width.

These are this implementation's own choices:

* the streaming interfaces and bin-index handshake;
* the fraction split `F = W-2`;
* `Q`, the α format, the CORDIC length and the table sizes;
* the reciprocal computed by a divider rather than a stored table, because
  the table's addressing is not specified;
* the filter built as an 8-lane direct convolution with double buffering;
* null-bin filling;
* a second RAM copy that gives the equalizer its own read port;
* the `y_buffer` depth (512 bins = (6+1) symbols of 64 rounded up), and
  clearing it at a new preamble;
* resetting the phase rotation at each preamble;
* the general divider in the equalizer.

Not included:

* the FFT;
* synchronisation;
* the de-mapper, de-interleaver, Viterbi decoder, re-encoder, re-interleaver
  and constellation mapper that close the loop. They are standard receiver
  components and are reached through the `y_*`, `x_*` and `xt_*` ports.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares against
values computed independently: real-valued arithmetic, or its own copy of the
training sequence and delay table. Each ends with a `TB_RESULT` line and has
a watchdog.

| Testbench | What it shows |
|---|---|
| `tb_init_chest` | Exact LS average and sign, shuffled bin order, 1-cycle latency. |
| `tb_lpf` | In-window responses pass, out-of-window ones are removed, random symbols match a real DFT→window→DFT, double buffering, overrun, 520-cycle budget. Covers both `NULL_FILL` settings. |
| `tb_y_buffer` | Order against a reference queue, full and empty behaviour, clear, flags. |
| `tb_ce_divider` | `Y/X~` for BPSK … 64-QAM points within 1.5 % of full scale, null points, 2-cycle latency. |
| `tb_ewma_ram` | Bit-exact α-average for several α, initial overwrite, equalizer read port. |
| `tb_equalizer` | `Y/H` within 1.5 LSB including saturation and `H = 0`, 3-cycle latency. |
| `tb_phase_track` | `θ` within 0.2° in all four quadrants, `φ = D·θ` for rates 0, 2, 3, 4, 5, 7, rotation accuracy, update latency, reset by a preamble. |
| `tb_chest_pt_top` | End to end at default sizes (see below). |
| `tb_vehicular` | Time-varying two-path Doppler channel at 40 and 80 MPH, compared against a preamble-only receiver (see below). |

`tb_chest_pt_top` sends whole packets through a three-path channel with a
phase that turns by a fixed step each symbol. An ideal decoder model returns
the transmitted points `D` symbols later. The packets are:

* a 20-symbol BPSK packet whose tail is never returned, which exercises the
  buffer clear;
* 1600-byte packets at rate 2 (QPSK 1/2, 268 symbols), rate 4 (16-QAM 1/2,
  134 symbols) and rate 6 (64-QAM 2/3, 67 symbols).

Results:

* The measured phase step matches the applied one within 0.02°.
* EVM is about 5 % in every packet.
* There are no wrong decisions for BPSK to 16-QAM, and 1 in about 3,200 bins for
  64-QAM.
* The test also counts each mechanism and fails if one never happened:
  initial estimate, EWMA update, non-zero phase update, feedback delays 6, 5
  and 4, and buffer clear.

The test adds no noise, so the EVM is the design's own floor. It runs in a
few seconds.

`tb_vehicular` drives the same top level through a time-varying channel: two
paths of equal power, 0.5 µs (5 samples) apart, each with its own Doppler
rotation for 40 and 80 MPH at 5.62 GHz (about 335 and 670 Hz), plus a
common phase drift of 0.5° per symbol. It sends the three 1600-byte packets
at each speed. The testbench also equalizes with the preamble estimate only
and compares the two receivers:

| Speed | Rate | EVM, this design | EVM, preamble only | Wrong decisions, this design / preamble only |
|---|---|---|---|---|
| 40 MPH | 2 | 44 % | 348 % | 531 / 7,167 of 13,572 |
| 40 MPH | 4 | 43 % | 381 % | 773 / 5,656 of 6,656 |
| 40 MPH | 6 | 37 % | 238 % | 893 / 2,810 of 3,172 |
| 80 MPH | 2 | 59 % | 363 % | 775 / 9,486 of 13,572 |
| 80 MPH | 4 | 52 % | 352 % | 1,020 / 6,042 of 6,656 |
| 80 MPH | 6 | 54 % | 390 % | 1,260 / 2,975 of 3,172 |

The test fails if the design is not better than the preamble-only receiver
on both measures. Two equal paths make deep spectral nulls that move with
time. Those nulls cause most of the remaining error, because the received
value there is close to zero. The estimate also lags the channel by the
feedback delay. The channel model is deterministic and adds no noise, so
these are not packet error rates.

To run one testbench with Verilator (from the folder that holds `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_chest_pt_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/chest_pkg.sv tb/tb_chest_pt_top.sv
./obj_dir/Vtb_chest_pt_top
```

## Changing it

* **Bit width:** change `W` in `chest_pkg`. Everything else scales, including
  `Q` and the filter coefficient width.
* **Filter:** `lpf #(.TAPS(16), .LANES(8), .NULL_FILL(1))`. More lanes
  shorten the 520-cycle filter time proportionally.
* **Feedback delays:** `feedback_delay()` in `chest_pkg`. If a different
  decoder changes the loop latency, change it here together with the
  `y_buffer` depth.
* **Phase tracker precision:** `phase_track #(.CORDIC_IT(14), .SCA(10))`.
