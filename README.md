# Low-complexity FBMC/OQAM transceiver in SystemVerilog

Filter-bank multicarrier (FBMC) modulation with offset QAM (OQAM) gives
better spectral containment than OFDM and needs no cyclic prefix. The cost is
the hardware: each end needs an M-point FFT or IFFT plus a polyphase filter
network built from a prototype filter of length L = K·M. This design saves
hardware in both places:

* **The FFT.** An M = T² point FFT/IFFT uses one T-point radix-2 core twice,
  in a feedback loop. With T = 16 that gives a 256-point transform. Between
  the two passes, a twiddle multiplier uses three real multipliers per
  complex product instead of four.
* **The filters.** The polyphase filters use distributed arithmetic (DA).
  Each inner product with the fixed prototype coefficients comes from small
  tables of precomputed coefficient sums, addressed one input bit at a time,
  plus a shift-and-add accumulator. The filters have no multipliers.

Default configuration: M = 256 subcarriers, T = 16, overlap factor K = 4,
prototype length L = 1024. The samples are 16-bit complex values.

## Data path

```
 transmitter (fbmc_tx)
 symbols ─► oqam_mod ─► fft_feedback (IFFT) ─► axis_fifo ─► sfb_ppn ─► samples
            2 frames      M points/frame                    M/2 samples/frame
            per symbol

 receiver (fbmc_rx)
 samples ─► afb_ppn ─► rx_reorder ─► reg ─► fft_feedback (FFT) ─► axis_fifo ─► oqam_demod ─► symbols
            M values     flips each          M points/frame                     1 symbol
            per M/2 in   block of M                                             per 2 frames
```

`fbmc_top` puts the transmitter and the receiver side by side. The channel is
not part of the design, so `tx_out_*` and `rx_in_*` are separate ports.
Connecting them gives an ideal back-to-back link.

Every connection is a valid/ready stream of `cplx_t`, a packed struct with
16-bit signed `re` and `im` fields. A transfer happens on a clock where both
valid and ready are 1. Any block can stall the blocks before it. In the
loopback, the receiver filter is the slowest stage and it paces the
transmitter.

## The feedback FFT (`fft_feedback`)

For N = T², write n = k + T·m and the output index as r + T·d. The DFT then
splits into two passes of T-point DFTs:

```
X[r + T·d] = Σ_k W_T^(k·d) · ( W_N^(r·k) · Σ_m x[k + T·m] · W_T^(r·m) )
             └─ second pass ┘   └ twiddle ┘  └──── first pass ─────┘
```

The hardware does exactly this with four blocks:

| block | job |
|---|---|
| `fft_order` | Input buffer of N points, loaded one point per clock. It sends the core one group per clock. Group g holds the T points `buf[g + T·m]`. A counter runs the frame and drives `wait` and `finish`. |
| `fft_core` | T-point radix-2 FFT (decimation in frequency), T points in parallel per clock, one register per stage. For T = 16 that is 4 stages. |
| `twiddle_mult` | Multiplies lane r of group k by W_N^(r·k). It is used in the first pass only. |
| `fft_register` | Stores group g at addresses g·T … g·T+T−1, feeds the whole register back to `fft_order`, and reads the result out when `finish` is 1. |

Schedule of one frame. All counts are clocks; T = 16 and LAT1/LAT2 are
listed in the parameter table.

1. **Load:** N clocks. `s_ready` is 1 only in this phase.
2. **First pass:** T clocks, one group per clock, with `wait = 1`. The core
   output goes through the twiddle multiplier into the register.
3. **Drain 1:** LAT1 = log2T + 2 = 6 clocks. At the end, the whole register
   is copied into the order buffer in one clock.
4. **Second pass:** T clocks with `wait = 0`. The same strided groups go
   through the core and straight into the register, bypassing the
   multiplier.
5. **Drain 2:** LAT2 = log2T + 1 = 5 clocks.
6. **Readout:** `finish = 1`. One point per clock while `m_ready` is 1, in
   natural order. X[n] is read from address (n mod T)·T + ⌊n/T⌋, which swaps
   the two base-T digits of n. `m_last` marks X[N−1]. Reading the last point
   returns the block to Load.

The first output point comes 2T + LAT1 + LAT2 + 1 = 44 clocks after the last
input point. Frames do not overlap: the next load starts after the readout.
A 256-point frame therefore takes at least 256 + 44 + 256 clocks.

**Scaling.** Every butterfly halves its sum and its difference, so the output
is the transform divided by N and cannot overflow:
`out[k] = (1/N) Σ x[n] e^(∓j2πnk/N)`. The sign is + when `INVERSE = 1`.

**Inverse transform.** The twiddles are conjugated in both the core and the
twiddle multiplier.

**Core multipliers.** Twiddles 1 and −j need only wiring and negation. For
T = 16 that leaves 10 true rotations, each made of 3 constant
multiplications.

### Three-multiplier complex product

Take an input A + jB and a twiddle C + jD. Then
`re = (C − D)·B + C·(A − B)` and `im = (C + D)·A − C·(A − B)`.
That is three real multipliers and three adders/subtractors
(`fbmc_pkg::cmul3`).

`twiddle_mult` keeps C, C − D and C + D in tables that cover only the first
N/2 twiddles. For exponents N/2 … N−1 it negates all three values, because
W_N^(e+N/2) = −W_N^e. Conjugating the twiddle for the inverse transform only
swaps the C − D and C + D tables.

Twiddles are Q2.14 numbers (1.0 = 16384), so that |C ± D| ≤ 1.414 fits in 16
bits. Products are rounded to 16 bits and saturated.

## Polyphase filter banks with distributed arithmetic

### Prototype filter

The prototype is the K = 4 frequency-sampling design widely used for FBMC:

```
p[l] = 1 − 2·H1·cos(a) + 2·H2·cos(2a) − 2·H3·cos(3a),   a = 2π(l+1)/(K·M),  l = 0 … K·M−1
H1 = 0.97195983, H2 = 1/√2, H3 = 0.23514695
```

It is divided by its peak value, 1 + 2(H1 + H2 + H3), and stored as Q1.14.
All coefficients are computed at elaboration (`fbmc_pkg::proto_coef`).
There are no coefficient files.

### Synthesis network (`sfb_ppn`, transmitter)

Each IFFT frame y_m holds M values and produces M/2 output samples:

```
s[m·M/2 + i] = Σ_{q=0}^{2K−1} p[i + q·M/2] · y_{m−q}[(i + q·M/2 + 1) mod M],   i = 0 … M/2−1
```

This is the bank of M prototype sub-filters, upsampled by M/2, delayed and
summed. Here it is written as one 2K-tap inner product per output sample:

* The last 2K frames are kept in 2K memory banks, one frame per bank, so all
  taps of a sample are read in one clock.
* Frames before the first one count as zero.
* The "+1" in the frame index puts the phase reference of every subcarrier at
  the centre of the prototype, which is sample L/2 − 1. Real orthogonality of
  OQAM needs this.

### Analysis network (`afb_ppn`, receiver)

After each M/2 new samples, once a full window of L samples is present, the
block computes M folded products:

```
u[j] = Σ_{q=0}^{K−1} p[jj + q·M] · r[m·M/2 + jj + q·M],   jj = (j − 1) mod M
```

The FFT of u gives the matched-filter outputs of half-symbol m. The window
sits in 2K banks of M/2 samples, and the K taps of a product always fall in
different banks.

The sub-filters run in reverse order: u[M−1] leaves first. `rx_reorder` then
flips each block of M values. It uses a two-bank dual-port memory: one bank
is written while the other is read backwards. After it, the FFT sees u[0]
first.

### DA engine (`da_engine`)

It computes one inner product `y = Σ_t c[phase][t]·x[t]` exactly:

1. The NTAP samples are loaded into shift registers.
2. Each clock takes one bit of every sample, MSB first. The taps are split
   into groups of four, and each group's four bits address a 16-word table of
   partial coefficient sums. The synthesis engine has 8 taps, so two tables
   are added per clock.
3. The accumulator does `acc ← 2·acc − table` for the sign bit and
   `acc ← 2·acc + table` for the other bits.
4. After 16 bit-clocks, `acc` holds the exact two's-complement sum. `done`
   pulses 17 clocks after `start`.

There is one set of tables per polyphase phase:

* synthesis: M/2 phases × 2 tables × 16 words;
* analysis: M phases × 1 table × 16 words.

Each network runs two engines in lock-step, one for the real parts and one
for the imaginary parts; the coefficients are real. An assertion checks the
lock-step. The result is rounded from Q1.14 and saturated to 16 bits.

**Throughput.** Each output sample costs DW + 3 = 19 clocks (read, 16 bits,
result).

| direction | work per half-symbol frame | clocks per sample | clock needed for 1.6 MHz sample rate |
|---|---|---|---|
| transmit | 256 load + 128·19 = 2688 clocks for 128 output samples | 21 | ≈ 34 MHz |
| receive | 128 load + 256·19 = 4992 clocks per 128 input samples | 39 | ≈ 62 MHz |

## OQAM mapping

**Transmit (`oqam_mod`).** Symbol c_k = a + jb of subcarrier k becomes two
real half-symbol frames:

* frame 2n carries a·j^(k+2n);
* frame 2n+1 carries b·j^(k+2n+1).

The real frame passes the input straight through. The imaginary parts are
held in an M-word buffer for the second frame.

**Receive (`oqam_demod`).** It computes `d = Re{conj(j^(k+m))·u_m[k]}`. It
stores the values of the even frame and outputs `d_even + j·d_odd` during the
odd frame.

The transmit and receive frame counters both start at 0 after reset. The
receiver's first frame is the transmitter's first frame, because the
analysis window starts with the first received sample.

### End-to-end gain and precision

From transmit symbol to receive symbol the gain is `G = Σ_l p[l]² / M²`:

* the IFFT contributes 1/M;
* the FFT contributes 1/M;
* the prototype is applied twice, which gives Σp².

| M | G | input amplitude 16000 gives | largest error seen in simulation |
|---|---|---|---|
| 16 | ≈ 1/23 | 686 | 2.3 |
| 64 | ≈ 1/93 | 172 | 2.6 |
| 256 | ≈ 1/373 | 43 | 2.9 |

With 16-bit words and the 1/N FFT scaling, the 256-subcarrier link has
roughly 23 dB of headroom over its rounding noise. That is enough for 4-QAM
decisions. Denser constellations need wider words or less FFT scaling
(`DW` in `fbmc_pkg`, `half()` in the butterflies).

## Parameters and formats

| name | where | default | meaning |
|---|---|---|---|
| `T` | `fbmc_top`, `fbmc_tx`, `fbmc_rx`, `fft_feedback` | 16 | FFT core size; M = N = T² subcarriers |
| `K` | `fbmc_top`, `fbmc_tx`, `fbmc_rx`, PPNs | 4 | overlap factor; L = K·M |
| `INVERSE` | `fft_feedback` | 0 | 1 = IFFT |
| `FIFO_DEPTH` | `fbmc_tx`, `fbmc_rx` | T² | FIFO after each FFT |
| `DW`, `TWW`/`TWF`, `CW`/`CF` | `fbmc_pkg` | 16, 16/14, 16/14 | sample width, twiddle Q2.14, coefficient Q1.14 |

Constraints on the parameters:

* T must be a power of two.
* K must be even. The +1 and −1 index offsets in the two networks assume
  K·M/2 ≡ 0 (mod M).
* The prototype formula is the K = 4 design.

Input values should stay above −2^15. The OQAM phases and the −j rotation
negate values without saturation.

All blocks use one clock and an active-low asynchronous reset, `rst_n`. The
reset clears control state only. Data memories are never read before they
are written: the synthesis network masks frames that do not exist yet, and
the analysis network waits for a full window.

## How far it follows the published design, and where it departs

These parts follow the published architecture:

* the two-pass FFT with a 16-point radix-2 core, an order block, a twiddle
  multiplier and a result register;
* the `wait` and `finish` control signals, driven by a counter, and the
  multiplier used only in the first pass;
* the three-multiplier product with C, C − D and C + D tables over half the
  twiddles;
* the DA filters: table, shifter, +/− accumulator, and pairs of 4-input
  tables added together;
* the FIFO between the frame-based FFT and the sample-based filter;
* the receiver's reverse-order sub-filters followed by a block-flip memory
  with a counter;
* the block order of the transmitter and the receiver;
* M, K and L.

The published implementation was made from vendor FFT, FIR and FIFO cores
and does not give the following. These are choices made here:

* word lengths, Q formats, rounding and saturation;
* the 1/2 scaling in every butterfly and the DIF ordering;
* serial input and output of the FFT, with frames that do not overlap;
* the exact polyphase formulas, including the phase-centre offsets, and the
  memory banking;
* the prototype coefficients: the published filter was designed with a
  90 kHz passband and a 100 kHz stopband, and its coefficients are not
  available, so the standard K = 4 frequency-sampling prototype is used;
* the OQAM phase rule j^(k+m) and its buffering;
* the FIFO depth and its first-word-fall-through behaviour;
* the one-word register in front of the receiver FFT.

Not covered:

* The published results tables also list a 128-subcarrier case. 128 is not a
  square, so the two-pass structure cannot form it.
* No timing or area figures are claimed for this RTL.

## Verification

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. Each also has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_fft_core` | 40 groups back to back, forward and inverse, against a floating-point DFT/T; latency log2T; tag |
| `tb_twiddle_mult` | every group and lane, forward and inverse, against floating point; 1-clock latency |
| `tb_fft_order` | strided groups in both passes, copy of the register, `wait`/`finish` timing, no input outside load |
| `tb_fft_register` | group storage, transposed readout, `m_last`, single `unload_done` |
| `tb_fft_feedback` | 256-point FFT and IFFT, 3 frames each, against a floating-point DFT/N (±6 LSB); exact 44-clock latency; `wait` low exactly T+LAT2 clocks per frame; random output back-pressure |
| `tb_axis_fifo` | random traffic against a queue model; full and empty flags |
| `tb_da_engine` | both modes, bit-exact against Σc·x including −32768; 17-clock latency |
| `tb_sfb_ppn` | one generate scope per size, M = 256 and at the small DA filter size M = 8, K = 4, L = 32; bit-exact against the formula above; start-up; latency |
| `tb_afb_ppn` | M = 256, bit-exact against the formula above; output order; start-up; latency |
| `tb_rx_reorder`, `tb_oqam_mod`, `tb_oqam_demod` | reference models, with random gaps on both sides |
| `tb_fbmc_link` | transmitter and receiver back to back at M = 16 (T = 4) and M = 64 (T = 8), one generate scope per size, 12 random 4-QAM symbols each, every symbol within 10 % of G·A |
| `tb_fbmc_top` | the whole transceiver at its defaults (M = 256) in loopback, 3 symbols; counts and requires second passes, readouts, link stalls and output hold-off |

Running a testbench with Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/fbmc_pkg.sv tb/tb_fbmc_top.sv \
          --top-module tb_fbmc_top -o sim
./obj_dir/sim
```

Swap in any other testbench name. `tb_ref_pkg.sv` in `tb/` holds the
reference prototype and rounding used by the filter testbenches. The
full-size `tb_fbmc_top` runs in well under a second of simulated work.
