# DVB-T/H OFDM receiver synchronization in SystemVerilog

A DVB-T/H receiver must line up four things before a single carrier can be
demodulated: symbol timing (where each OFDM symbol starts), carrier frequency
(tuner offset, up to several carrier spacings), sampling clock (the ADC rate
differs from the transmitter's by tens of ppm), and the scattered-pilot phase
(which of four pilot patterns the current symbol carries). This RTL builds
that synchronization chain as a low-cost design. Its main ideas are:

* **All-digital loops.** Clock offset is corrected by a cubic Lagrange
  interpolator. Carrier offset is corrected by a CORDIC derotator driven by
  a numerically controlled oscillator (NCO). No analog VCXO or VCO is
  needed.
* **Cheap control.** The interpolator controller checks only the two top
  bits of its accumulator. The loop filters use power-of-two coefficients,
  so they are shifts, not multipliers. Over the guard interval (GI), the NCO
  and the interpolator controller stop, and the phase they would have
  gathered is added back in one step. Because the GI length is a power of
  two, that step is a shift.
* **Small pilot tables.** Continual-pilot positions are stored as the
  differences between neighbouring positions. One period of those
  differences fits a 64 x 8 ROM.
* **Fast scattered-pilot sync.** A two-stage power-based detector finds
  the pattern in two symbols (four after one detection error). Meanwhile,
  the channel-estimation pilot buffers are pre-filled, so that work is not
  lost.

The RTL covers the inner-receiver synchronization path from the baseband
samples to the FFT output, plus a hard demapper. Channel estimation and
the outer receiver (soft demapper, deinterleaver, Viterbi decoder) are
not included (see "Not included").

## Signal flow

```
 rx (1 sample / 4 clk)
   |                         +--------------------------+
   +--> symbol_sync ---------+ timing, FCFO (acquisition)|
   |                         +--------------------------+
   v
 lagrange_interp <-- interp_ctrl (mu, skip/double, GI prediction) <-- SCO loop
   v
 cordic_rotator  <-- phase_acc (NCO, GI prediction) <-- FCFO + ICFO + RCFO loop
   v
 elastic_buffer --> fft_multimode (2K/4K/8K, centred bins)
                       |
        +--------------+--------------+------------------+
        v              v              v                  v
     icfo_est      cp_pos_gen -> rcfo_sco_est       sp_sync -> sp_prefill
   (integer CFO)   (pilot index)  (cordic_vectoring)  (two-stage PB)  (6 banks)
                                   |        |
                            loop_filter  loop_filter
                              (RCFO)       (SCO)
```

Everything runs on one clock, the "4X" clock. Received samples arrive as
a valid strobe once every four clocks. The spare cycles let the
interpolator compute a second output from one input window (a "double"),
and let the FFT drain the elastic buffer faster than it fills.

## Acquisition and tracking (`dvbt_sync_top`)

A small sequencer takes the receiver through these steps:

1. **Symbol timing and FCFO.** `symbol_sync` correlates the input with
   itself N samples later, summed over a GI-long window. The peak of the
   magnitude over two symbols marks the symbol boundary. The angle of the
   correlation at the peak is 2π·ε for a fractional offset of ε carrier
   spacings, which gives the fractional CFO. The NCO is loaded with
   `fcfo << 8 >> log2(N)`, in NCO units where 2^24 is one turn per sample.
2. **Framing.** At the next first-GI sample, the framer starts. It passes G
   input windows as GI (no outputs; on the last one, the GI prediction is
   applied). It then counts N interpolated outputs as the useful part, and
   repeats. The derotator output is tagged with a start-of-symbol flag and
   goes through the elastic buffer into the FFT.
3. **ICFO.** `icfo_est` takes the first FFT symbol. For every candidate
   shift s in -8..8, it sums |Y|^2 over the continual-pilot positions
   shifted by s. The best shift, in whole carriers, is added to the NCO as
   `icfo << (24 - log2 N)`.
4. **Settle**, SETTLE = 3 symbols. The symbols already in the pipeline
   still carry the old offset.
5. **Tracking.**
   * `rcfo_sco_est` multiplies each continual pilot by the conjugate of
     the same pilot in the previous symbol. It sums the products separately
     over the lower and the upper half of the band, and takes both angles
     with the CORDIC `tan^-1` unit.
     * A residual CFO turns all pilots alike, so it shows in the **sum** of
       the two angles.
     * A clock offset turns each pilot in proportion to its carrier index,
       so it shows in the **difference**.
   * Two PI loop filters (`y = x/2 + I`, `I += x/2^4`; the SCO loop uses
     `x/2^3`) smooth the sum and the difference. The sum feeds the NCO and
     the difference feeds the interpolator step.
   * At the same time, scattered-pilot sync and pre-filling start.

Units used in the top:

| Quantity | Scale |
|---|---|
| NCO frequency | 2^24 = one turn per sample |
| Interpolator step `delta` | 2^23 = one sample |
| Angles | 2^16 = one turn |

Each estimate's scaling into these units is a shift by the FFT size. A
positive pilot-slope difference means the receiver samples late in the
symbol, so the loop output enters `delta` with a negative sign.

## Timing correction: interpolator and controller

The interpolator holds a window of four input samples. The controller keeps
the fractional position `mu` of the next output relative to the window's
centre sample, in [-0.5, 0.5). The accumulator is signed and spans [-1, 1),
so "in range" simply means its two top bits are equal. After each output,
`mu += delta`:

| Top bits | Meaning | Action |
|---|---|---|
| `01` | mu ≥ 0.5: the next output belongs to the next window | `mu -= 1`; the next window gives no output (**skip**) |
| `10` | mu < -0.5: the next output is still in this window | `mu += 1`; a second output is computed from the same window in the next cycle (**double**) |

During the GI, windows produce nothing and `mu` is left alone. On the last
GI window, `delta << log2(G)` is added in one step. If that pushes `mu`
below -0.5, the first useful output is taken from that last GI window.

The interpolator uses the Farrow form of the cubic Lagrange polynomial:

```
c0 = x0
c1 = (-2x_-1 - 3x0 + 6x1 - x2)/6
c2 = (x_-1 - 2x0 + x1)/2
c3 = (-x_-1 + 3x0 - 3x1 + x2)/6
y  = ((c3·mu + c2)·mu + c1)·mu + c0
```

Division by 6 is a multiplication by 10923 followed by a shift by 16.

## Carrier correction: NCO with phase prediction

`phase_acc` adds `freq` once per output sample. On the first sample of
each symbol it also adds `freq << log2(G)`, the phase the GI samples would
have contributed. The NCO therefore does nothing during the GI, and its
phase stays continuous. `cordic_rotator` rotates by minus the phase:

* a quadrant pre-fold;
* 14 pipelined micro-rotations with 4 guard bits;
* gain correction by one constant multiplication.

Latency is 16 cycles.

## Continual-pilot positions (`cp_pos_gen`)

The continual-pilot positions of all three modes are one sequence of 44
differences repeated with period 1704 carriers. It starts 0, 48, 54, 87,
…, 1704, and the 2K mode uses one period. The differences sit in a
64 x 8 ROM:

* Entry 0 holds the start value 0.
* After entry 44 the address wraps to entry 1.

An adder accumulates the current position. The generator is advanced by
the consumer when the current pilot has been used. The same generator
serves the ICFO search (through an offset) and the RCFO/SCO estimator.

## Scattered-pilot synchronization (`sp_sync`, `sp_prefill`)

Symbol l carries scattered pilots on carriers 3·(l mod 4) + 12p, boosted
to 4/3 amplitude. The detector sums |Y(k)|^2 over each of the four
candidate groups and picks the largest. It uses two multipliers, one
adder and four accumulators. The two-stage scheme:

* **1st SPS:** detect the mode m1 and predict m1+1 for the next symbol.
* **2nd SPS:** detect the mode of that next symbol.
  * If it equals the prediction, the design is **locked**, and the mode
    then steps by one per symbol.
  * Otherwise it **restarts** with a new 1st SPS.

Pre-filling uses six pilot banks of 569 words (one 8K pilot group each):

* During the 1st SPS, the four candidate groups of that symbol are written
  to banks 0-3.
* During the 2nd SPS, the predicted group of the next symbol goes to
  bank m1+1, the bank after the detected group's. It overwrites a
  candidate that is no longer needed.
* On confirm, banks m1 and m1+1 are kept; the others are freed.
* On restart, all banks are dropped.
* When locked, each new symbol's pilots go to a free bank, or else replace
  the oldest.

`bank_valid`, `bank_group` and `bank_sym` tell a channel estimator what
each bank holds.

## FFT (`fft_multimode`)

The FFT is a radix-2 decimation-in-frequency single-path delay-feedback
pipeline of 13 stages, with delay lines of 4096 down to 1 sample:

* **Modes.** 4K and 2K bypass the first one or two stages.
* **Twiddles.** A quarter-wave cosine table (2049 x 13 bits,
  `round(2048·cos(2πk/8192))`) is computed at elaboration by an integer
  CORDIC function, so no data file is needed. Each stage folds its angle
  into the first quadrant.
* **Scaling.** Each butterfly halves. The output is scaled to X(k)/√N in
  4K mode and 0.71·X(k)/√N in 2K and 8K mode.
* **Reorder.** A double-buffered reorder memory (2 x 8192) turns the
  bit-reversed order into centred order: bin -N/2 first. One bin leaves
  per clock.
* **Latency.** A symbol leaves once the next symbol has pushed it through
  the pipeline. This suits a continuous OFDM stream.

## Interfaces and parameters

Shared types are in `dvbt_pkg`:

* `cplx_t`: 12-bit re/im.
* `fft_mode_e`: MODE_2K/4K/8K.
* `gi_e`: GI_1_32 … GI_1_4.
* `sps_state_e`.
* Helpers for the mode sizes (N, G, K, number of continual pilots).

Top ports, as groups:

| Group | Ports |
|---|---|
| Configuration | `mode`, `gi` (transmission parameters, static), `qam` (demapper) |
| Input | `rx_valid`, `rx_data` (one strobe per 4 clocks at most) |
| To the channel estimator | `fft_valid`, `fft_data`, `fft_bin`, `fft_sof`; `ce_ready` low holds the FFT input |
| Pre-filled pilots | `pf_rd_bank`, `pf_rd_addr` → `pf_rd_data` (1 cycle); `pf_bank_valid` |
| From the channel estimator | `eq_valid`, `eq_data` → hard demapper → `dm_valid`, `dm_bits`, `dm_nbits` |
| Observation | `sym_found`, `tracking`, `icfo`, `rcfo_err`, `sco_err`, `nco_freq`, `sco_delta`, `predict_ev`, `skip_cnt`, `double_cnt`, SPS state and pulses, `ebuf_overflow` |

Latencies of the building blocks:

| Block | Latency |
|---|---|
| Interpolator | 2 cycles |
| Derotator | 16 cycles |
| `tan^-1` | 17 cycles |
| Loop filter | 1 cycle |
| Demapper | 1 cycle |
| ICFO, RCFO/SCO | estimate 1 cycle to a few dozen cycles after the symbol end |
| SPS | decides at each symbol end |

## Sizes and memory

Word widths are this design's choices:

* samples: 12 bits;
* FFT internal words: 24 bits;
* NCO and interpolator accumulators: 24 bits;
* angles: 16 bits.

Memories at the default (8K-capable) size:

| Memory | Size |
|---|---|
| FFT delay lines | 2 x 8191 x 24 bit |
| FFT reorder | 2 x 8192 x 24 bit |
| Symbol-sync delay line and correlation window | about 300 Kbit |
| Previous-symbol pilots | 177 x 24 bit |
| Pre-fill banks | 6 x 569 x 24 bit |
| Pilot ROM | 64 x 8 bit |

The FFT and the symbol synchronizer are larger than a memory-optimized
implementation would need. Reasons: wider words, a double-buffered
reorder, and a full-length delay line in the correlator.

## Not included, and departures

* **Mode and GI detection.** Mode and GI are inputs. The symbol
  synchronizer finds the boundary and FCFO for a known mode and GI.
* **Channel estimation and equalization.** The FFT output and pre-fill
  banks are brought out for it, and the demapper takes its output from
  ports.
* **Outer receiver.** The soft demapper, deinterleaver and Viterbi decoder
  are not included.
* **The correlator's tap.** It taps the receiver input, not the buffer
  output, so it needs no interpolator during acquisition.
* **No re-check after lock.** After lock, the SPS is not re-checked; a new
  `start` is needed to resynchronize.
* **Own choices throughout.** Loop coefficients (C1 = 1/2, C2 = 1/16 or
  1/8), the settle count, the ICFO search range (±8 carriers) and all
  widths were chosen here and checked only in simulation.

## Verification

Each block has a self-checking testbench in `tb/` that compares against
values computed in the testbench. Each ends with
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_cordic_rotator`, `tb_cordic_vectoring` | Random vectors against `$cos/$sin/$atan2` |
| `tb_lagrange_interp` | Against the Lagrange polynomial in floating point; exact cubic ramp; latency |
| `tb_interp_ctrl` | Output times: 1+delta apart within a symbol, and the right span across each GI with prediction |
| `tb_phase_acc` | Every phase against an ideal accumulator running through the GI |
| `tb_fft_multimode` | Every bin of random symbols in 2K, 4K and 8K mode against a floating-point DFT (±6 LSB), with input gaps |
| `tb_symbol_sync` | Boundary (within G/8) and FCFO on synthetic OFDM symbols |
| `tb_icfo_est` | Detected shift for every shift in -8..8 (2K) and two shifts in 8K |
| `tb_cp_pos_gen` | All 2K/4K/8K positions against the cumulative sum |
| `tb_rcfo_sco_est` | Sum and difference angles for imposed pilot rotations |
| `tb_sp_sync` | Two symbols to lock without error, four with one error |
| `tb_sp_prefill` | Bank contents through first/second/confirm/restart |
| `tb_loop_filter` | Against the PI formula, clear and saturation |
| `tb_elastic_buffer` | Against a queue model; overflow |
| `tb_hard_demapper` | Against nearest-level decisions and the Gray tables |

`tb_dvbt_sync_top` runs the whole chain at its default parameters in 2K
mode with GI 1/4. A behavioural transmitter builds OFDM symbols:

* 1705 carriers: continual and scattered pilots at 4/3, QPSK data.
* Impairments: CFO of 2.2 carrier spacings, a sampling offset of +100 ppm
  and then -100 ppm (the signal is evaluated exactly at the skewed
  sampling instants), and noise.
* Until the first SPS restart, the transmitter advances the pilot pattern
  by two per symbol, which forces a restart.

Each run checks:

* timing found;
* ICFO = 2;
* the NCO frequency within 200 units of the true CFO;
* the interpolator step within 30% of -ppm·2^23;
* GI predictions, doubles (+ppm) or skips (-ppm);
* SPS first stage, restart, confirm and lock;
* pre-filled banks and demapper output;
* finally, an elastic-buffer overflow caused by holding `ce_ready` low.

A mechanism that never happens counts as a failure. Both runs pass all 32
checks.

Simulate a block with plain Verilator, for example:

```
verilator --binary --timing -Wno-fatal --top-module tb_dvbt_sync_top \
    -y rtl +libext+.sv rtl/dvbt_pkg.sv rtl/fft_pkg.sv tb/tb_dvbt_sync_top.sv
./obj_dir/Vtb_dvbt_sync_top
```

(The end-to-end test takes a few seconds. The packages must be listed
first; the other modules are found with `-y rtl`.)
