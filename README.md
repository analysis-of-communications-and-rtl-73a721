# FFT-based carrier synchronization core for BPSK/QPSK bursts

A burst receiver has to remove the carrier frequency offset and phase offset left
after down-conversion before it can decide on symbols. This core does that without
pilots or preambles ("non data aided"). The trick is to raise every received sample
to the M-th power (M = 2 for BPSK, 4 for QPSK). This wipes out the data modulation,
and the burst collapses to a single complex tone at M times the frequency offset.
An N-point FFT of that tone peaks at the bin nearest the offset. The peak's index
gives the frequency, and its phase divided by M gives the carrier phase. The burst
is kept in a buffer meanwhile, and is then rotated back by the estimate and sent out
one sample per clock.

With a plain N-point FFT the frequency is only known to half a bin, i.e.
1/(2·M·N) cycles per symbol. A 512-point FFT then leaves enough phase drift across a
300-symbol burst to cost a few tenths of a dB. Doubling the FFT to 1024 points
fixes that, at twice the hardware time per burst. The core instead offers three
cheaper refinements around a 512-point FFT, chosen per burst:

| `tech_e` value | Name | Where it acts | What it does |
|---|---|---|---|
| `TECH_REF` | base algorithm | nothing extra | peak bin only |
| `TECH_SRR` | sample rate reduction | modulation removal | sums D consecutive samples, so the FFT spans D·N symbols and its bins are D times finer; the frequency range shrinks by D |
| `TECH_INT` | interpolation | spectral analysis | fits a parabola through the peak and its two neighbours for a fractional bin, and interpolates the peak's phase at that point |
| `TECH_DD` | decision directed | correction | corrects once, decides the symbols, strips them, and measures the residual frequency and phase from the phase change between the burst's two halves |

All numbers below are for the default parameters: N = 512, QPSK (M = 4), D = 2,
12-bit input samples and bursts of up to 1024 samples.

## Data path at a glance

```
in_* ──┬──► mod_removal ──► fft_r2sdf ──► spectral_analysis ──┐ estimate (f, phi)
       │   |r|e^{jM arg r}   N-point,       windowed peak,      │
       │   (+ D-sum, SRR)    streaming      INT, arg/M          ▼
       └──────────────► burst_ram (3 banks) ─────────► phase_freq_correction ──► out_*
                                                         r·e^{-j(2πfl+phi)}, DD
```

| Module | Role |
|---|---|
| `carrier_sync_core` | top level; wires the blocks and routes the per-burst technique |
| `mod_removal` | pipelined CORDIC → multiply the angle by M → sine/cosine table and multipliers back to I/Q; SRR summing; zero padding to N |
| `fft_r2sdf` + `fft_sdf_stage` | radix-2 single-path delay-feedback FFT, one sample per clock, ½ scaling per stage |
| `spectral_analysis` | peak search in a window, INT division, serial CORDIC for the peak's phase, conversion to frequency/phase words |
| `burst_ram` | round-robin buffer of `NBANK` = 3 banks for the raw bursts, plus length and technique per bank |
| `phase_freq_correction` | phase accumulator, sine/cosine table and complex multiply; the DD refinement |
| `cordic_vec_pipe` | fully pipelined vectoring CORDIC (magnitude and angle) |
| `cordic_arg_serial` | small iterative CORDIC that returns the angle only |
| `divider_serial` | restoring divider, one quotient bit per clock |
| `sincos_lut` | 1024-entry cosine/sine table, computed at elaboration |
| `cs_pkg` | shared widths, the technique enum, and the table-building function |

## Number formats

- **Angles and phases:** unsigned or two's-complement fractions of a full turn.
  - `PHASE_W` = 16 bits for phases: 0x4000 = 90°.
  - `FREQ_W` = 24 bits for frequencies, read as the phase advance per sample.
    A frequency f in cycles per symbol is `round(f · 2^24)`.
  - Working in turns makes "divide by M" a shift and lets wrap-around take care of
    ±π.
- **Input:** `SW` = 12-bit signed I/Q. The estimate does not depend on the level,
  but the test bursts use amplitudes around 1400. An AGC ahead of the core should
  keep the magnitude well inside the range.
- **Output:** `SW+1` bits, because a rotated sample can grow by √2 in one component.
- **FFT:** `DW` = 18 bits inside. Each stage divides by 2, so the output is the
  DFT divided by N.

## Estimation path

### Modulation removal

`cordic_vec_pipe` turns each sample into magnitude and angle, 14 iterations with a
new sample every clock. The angle is shifted left by log2(M): multiplying by M
modulo one turn. It then goes through `sincos_lut` and two multipliers to give
|r|·e^{jM·arg r} in Cartesian form again. Keeping |r|, rather than squaring twice,
keeps the dynamic range manageable and weights weak samples down.

For an SRR burst, D consecutive results are added before they go to the FFT. The
FFT therefore sees L/D samples, each covering D symbol periods. After the burst's
last sample the block pads the frame with zeros up to N points. Samples beyond the
N-th (N·D-th for SRR) are not used for the estimate, but they are still buffered
and corrected.

`in_ready` of the core falls from a burst's last sample until the padded frame has
left this block, which is N clocks after its first sample plus the 17-clock
pipeline. The parameter `GAP` (default 0) can add idle clocks between frames.

### FFT

The FFT is a plain R2SDF pipeline: log2 N butterfly stages, each with a delay line
of N/2, N/4, … entries. Each stage has a twiddle multiplier fed from its own small
cosine table. Samples enter in natural order and bins leave in bit-reversed order.
Each bin carries its natural index k, so nothing downstream needs to reorder them.
The frame start (`sof`) travels with the data.

The pipeline advances on a valid input sample, or on its own for N + log2 N + 2
clocks after a frame's last sample (self-flush). A following frame stops the flush
and pushes the previous one out instead. Back-to-back frames therefore stream
without gaps, and a lone frame still comes out. The first bin of a frame appears
about N clocks after its first sample.

### Spectral analysis

While a frame's bins stream in, they are written into a bin memory. A comparator
keeps the largest energy re² + im² seen so far among the bins inside the window
(`k <= cfg_w_u` or `k >= cfg_w_l`). The window is how the search is limited to
offsets that SRR can represent. Use `cfg_w_u = N/2-1`, `cfg_w_l = N/2` for no
restriction.

The bin memory has two banks, so the next frame can be collected while this one is
evaluated. The evaluation then:

1. Reads the peak C and its neighbours L and R (cyclically).
2. For INT only, divides to get
   Δ = (E_R − E_L) / (2·(2E_C − E_R − E_L)).
   - Δ has 10 fractional bits and is limited to ±½.
   - The peak's complex value is replaced by the linear interpolation toward the
     neighbour on Δ's side: X(C) + |Δ|·(X(neighbour) − X(C)).
3. Takes the angle of that value with the serial CORDIC and divides it by M: the
   phase.
4. Forms the signed bin (k − N for k ≥ N/2) plus Δ, and scales it by 1/(M·N)
   (1/(M·N·D) for SRR): the frequency.
5. For SRR only, subtracts π·f·(D−1) from the phase. Summing D samples shifts the
   phase reference by half the group, and this puts it back at the first sample.

The estimate is ready about 30 clocks after the last bin, or about 80 clocks for
INT (the divider adds about 50). It is handed to the correction with a valid/ready
pair.

The phase keeps the M-fold ambiguity of every M-th-power method. A QPSK burst may
come out rotated by a multiple of 90°. Resolving that (unique word, differential
coding) is left to the back end.

## Buffer and flow control

`burst_ram` stores each raw burst in the next of `NBANK` = 3 banks of `LMAX` = 1024
words, in turn. When the last sample is written, the bank is marked full together
with the burst's length and technique. The correction reads the oldest full bank
and releases it when done.

The buffer has to cover the FFT's latency. A burst holds its bank from its first
sample until its corrected output has left, which is about 2N + L + 100 clocks for
REF, INT and SRR (about 1420 for L = 300). With bursts arriving every N clocks,
three bursts are in flight at once:

- one being written and transformed;
- one whose bins are being searched, or whose estimate waits;
- one being corrected.

Hence three banks. The spectral analysis needs no more than its two bin-memory
banks for this. At most one collected frame waits for evaluation, because a fourth
burst cannot enter before the oldest bank is released.

`in_ready` is low while all banks are taken, or while the modulation removal is
still padding the previous frame. `out_*` has no back-pressure: the correction
emits one sample per clock.

Sustained rates:

- **REF, INT and SRR:** a new burst of up to N samples every N + 19 clocks. The 19
  clocks are the modulation-removal pipeline, which drains before the zero padding
  completes a frame.
- **DD:** the correction needs 2L + about 90 clocks per burst (690 for L = 300). A
  stream of DD bursts longer than about N/2 samples is therefore limited by the
  correction, and `in_ready` stalls for a free bank.

Measured in the end-to-end test, from a burst's last input sample to its last
corrected output sample:

| Technique | Latency (clocks) |
|---|---|
| REF, L = 300 | about 1080 |
| INT | about 1130 |
| SRR | about 1230 |
| DD | about 1600 |

## Correction and the decision-directed refinement

The correction runs a phase accumulator θ(l) = φ + l·f (in turns). It looks up
cos θ and sin θ in a second table and multiplies: r_c = r·e^{−jθ}. Output samples
come 3 clocks after their buffer address.

For a DD burst it makes two passes over the buffer:

1. **First pass:** corrects with the FFT estimate and decides each sample to the
   nearest constellation point. It multiplies by the conjugate of the decision,
   which for QPSK on the axes is a rotation by a multiple of 90°, so no multiplier
   is needed. It sums the result over the first half (z1) and the second half (z2)
   of the burst.
2. **Between passes:**
   - The serial CORDIC takes the angles of z1, z2 and z1 + z2.
   - The residual frequency is (arg z2 − arg z1)/(L/2), computed with the divider.
   - The residual phase is arg(z1 + z2), moved back from the burst centre (where the
     average sits) to the first sample.
3. **Second pass:** corrects with the FFT estimate plus both residuals. This adds
   L plus about 90 clocks.

The residual measurement can only absorb what is left after the FFT: the
half-to-half phase change must stay below ½ turn (|f| < 1/L). After a 512-point FFT
the residual is at most 1/(2·M·N) = 1/4096, far inside that limit.

`used_dphi`/`used_phi` show the frequency and phase the correction actually applied
to the current output burst. `dd_dphi`/`dd_phi` show the DD residuals (zero for the
other techniques). `est_*` shows each raw estimate at the moment it is taken
(`est_take`), including the peak bin `est_kf` and Δ (`est_delta`).

## Interface of `carrier_sync_core`

| Port | Dir | Meaning |
|---|---|---|
| `in_valid`, `in_sof`, `in_last` | in | one burst = samples from `in_sof` to `in_last`; gaps are allowed; a sample is taken when `in_valid && in_ready` |
| `in_tech` | in | `tech_e`, sampled with `in_sof` |
| `in_re`, `in_im` | in | signed `SW`-bit sample |
| `in_ready` | out | core accepts a sample |
| `cfg_w_u`, `cfg_w_l` | in | peak-search window, quasi-static while a frame is collected |
| `out_valid`, `out_sof`, `out_last`, `out_re`, `out_im` | out | corrected burst, same length as the input burst |
| `used_dphi`, `used_phi`, `dd_dphi`, `dd_phi` | out | applied frequency/phase and DD residuals, valid during the output burst |
| `est_take`, `est_dphi`, `est_phi`, `est_kf`, `est_delta` | out | raw estimate, for monitoring |

Bursts must be at most N samples long (N·D for SRR) for the whole burst to count in
the estimate, and at most `LMAX` samples for the buffer. Reset is asynchronous and
active low.

## Accuracy seen in simulation

From `tb_carrier_sync_core`: 300-symbol QPSK bursts at default parameters, without
noise unless stated. "Residual" is the largest phase error of a corrected symbol.

| Technique | Frequency error | Residual |
|---|---|---|
| REF, worst case between two bins | ≤ 0.5 bin | up to 13° at the burst ends |
| INT | up to 0.1 bin | about 5° |
| DD | exact to the word length | 0.3° |
| SRR, D = 2 | about 0.05 bin of the finer grid | 0.7° |

These match the expected behaviour: a 512-point FFT alone leaves a visible phase
tilt, and INT or DD remove it.

### Bit error rate

`tb_ber_workload` sends 12 noisy 300-symbol bursts per point.

- **Offsets:** random in ±(0.01 … 0.02), or 0.01 and 0.03 for SRR.
- **Window:** the peak-search window is set to the known offset range.
- **Ambiguity:** the 90° ambiguity is removed per burst, as a back end would do.

| Technique | BER at 3 dB | BER at 5 dB |
|---|---|---|
| ideal coherent QPSK | 0.079 | 0.038 |
| REF | 0.13 | 0.044 |
| INT | 0.12 | 0.039 |
| DD | 0.078 | 0.041 |
| SRR, offset 0.01 | 0.081 | 0.036 |
| SRR, offset 0.03 | 0.12 | 0.038 |

With 7200 bits per point, these numbers are only good to about ±10 %.

At 5 dB every technique is close to ideal. At 3 dB the M-th-power estimator sometimes
loses the spectral peak to a noise bin, and that burst is lost entirely. This
happened in 1–2 of 12 bursts for REF and INT. A floating-point model of the same
method loses about 8 % of bursts there, so this is a property of the method at that
SNR, not of the fixed-point implementation. Limiting the window to the known
offset range halves the rate; without a window it is about 17 %.

## Where this design departs from the published architecture

The block structure, the equations, and the use of a pipelined CORDIC, a lookup
table with multipliers, a streaming FFT, a serial CORDIC and a divider follow the
published design. The following are this implementation's own choices:

- **One core, chosen per burst.** The original builds a separate core per
  technique. Here all four are in one core and selected per burst. Resource figures
  for a single-technique core therefore do not apply.
- **Throughput.** The published core processes one burst per N clocks. This one
  takes one per N + 19 clocks (the pipeline drain before padding). The DD
  technique makes two passes over the buffer: a measuring pass, then the final
  correction. DD bursts longer than about N/2 are therefore slower. The original
  measures in a pipelined way ahead of the final correction, but does not describe
  the schedule or its throughput.
- **Bin storage.** All bins of a frame are stored (two banks), because the FFT emits
  them in bit-reversed order. The original keeps only the neighbours of the running
  peak.
- **Interpolation for Δ < 0.** Interpolation is written for Δ > 0 only. Here a
  negative Δ interpolates toward the left neighbour.
- **Interpolation arithmetic.** The interpolated bin uses two multipliers for
  |Δ|·(X(neighbour) − X(C)). The original mentions only adders and control logic for
  this step.
- **Where SRR acts.** In the original, SRR touches only the modulation removal. Here
  the spectral analysis also knows the technique: it rescales the bin to a frequency
  and applies the SRR phase term there.
- **SRR phase term.** The SRR phase term is derived from the summation as π·f·(D−1),
  with f per original symbol. For D = 2 it equals the published half-sample
  correction.
- **DD frequency.** It uses arg z2 − arg z1 (the same angle as arg(z1·z2*), with
  the sign taken as a phase advance) divided by L/2 samples.
- **DD phase.** The phase from arg(z1 + z2) is moved from the burst centre to the
  first sample. Without this, a large coarse frequency error left its tilt in the
  output.
- **Constellation.** QPSK is taken as the four points on the axes {1, j, −1, −j}.
  A constellation rotated by 45° only moves the phase estimate by a constant.
- **Widths and formats.** Word widths, table sizes, CORDIC iteration counts, the
  window encoding and the handshakes are not fixed by the original; the values above
  are this design's own.
- **Outside the core.** The AGC in front of the core and the ambiguity resolution
  behind it are not part of this RTL.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops by itself. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/cs_pkg.sv tb/tb_carrier_sync_core.sv --top-module tb_carrier_sync_core
./obj_dir/Vtb_carrier_sync_core
```

`tb_carrier_sync_core` runs the whole core at its default parameters.

- **Bursts:** ten, covering every technique, worst-case and negative offsets,
  interpolation on both sides, a restricted window and a noisy burst.
- **Checks:** frequency, symbol decisions, residual phase, latency and burst
  spacing.
- **Coverage:** it fails if a mechanism never occurred (each technique,
  back-pressure, waiting for a buffer bank, bursts at the full rate, both signs of Δ, a non-zero DD
  correction, the window).
- **Run time:** under a second.

`tb_ber_workload` runs the bit error rate measurement above, also at the default
size, in about a second.

The block testbenches use reduced sizes (N = 64, short buffers) and compare
against reference models written in the testbench:

- CORDICs, table and divider: exhaustive or random comparison with real-number
  math, plus latency.
- FFT: a direct DFT, plus the bin order and the latency.
- Modulation removal: the M-th-power model, SRR sums, padding and `in_ready`
  timing.
- Spectral analysis: peak, Δ, frequency and phase for synthetic spectra.
- Buffer: round-robin order of the banks, lengths and per-bank side data.
- Correction: rotation accuracy and the DD residuals.

To change the size, override the top's parameters: `N` (a power of two), `M`
(2 or 4), `D` (a power of two), `LMAX`, `NBANK`, `SW`, `DW`. Keep `LMAX` ≥ the longest burst.
