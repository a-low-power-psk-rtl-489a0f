# Digital double-differential PSK receiver with a 1-bit A/D

This is synthesizable SystemVerilog for the baseband of a low-power PSK receiver
built for a deep-space link (a Mars orbiter-to-lander UHF link at 435 MHz,
0.1 to 100 kb/s). The receiver has to cope with a large, changing Doppler
offset. It does this without a PLL, carrier recovery or pilot tone by using
**double differential PSK (DDPSK)**. The data sit in the *second-order*
phase difference of the carrier. A constant frequency offset adds the same
phase step to every symbol, so it cancels in the second difference.

The design keeps power low by reducing the input to **one bit**. A comparator
hard-limits the IF (1 MHz) or the RF carrier, and the result is sampled at
fs = 4 MHz. Subsampling the 435 MHz carrier with fs = 4/(2n+1)·f_i, n = 217,
gives the same 4 MHz. Either way there are exactly four samples per carrier
cycle. Every mixer becomes an XNOR gate, and every matched filter becomes an
up/down counter.

The RTL follows the receiver as published: its block diagram, its delay
units for several bit rates and its multi-rate timing circuit. The published
material gives only the structure, and in places only block names. Where it
is silent, the implementation choices are this design's own, and each
module's header comment says which ones they are.

## Signal path

```
 vin ─► adc_1bit ─► r_k ─┬──────────────────────────► XNOR ─► x_I(k) ─► decimator ─► accumulator I ─► I_n ─┐
      (comparator +      │                              ▲      (L↓)          (Σ, up/down)                     │
       sampler @ fs)     └► delay T or 2T ─► r_{k-D} ───┤                                                    ├─► stage2: sgn(I_n·I_{n-1} + Q_n·Q_{n-1}) ─► data_bit
                            (delay_unit ×2)   │         │                                                    │
                                              └► 90° ───► XNOR ─► y_Q(k) ─► decimator ─► accumulator Q ─► Q_n ─┘
                                                 (1 sample)                         ▲
 timing_in ─► timing_recovery ─► T_clk ─► reset_circuit (dump/clear once per symbol)┘
                      └────────► S_i (rate) ─► delay units
```

| module | role |
|---|---|
| `ddpsk_rx_top` | the receiver: `adc_1bit` feeding `ddpsk_baseband` |
| `ddpsk_baseband` | all the digital logic after the A/D, with input r_k; the synthesizable top. It also brings out the decision metric and the timing events for observation |
| `adc_1bit` | 1-bit A/D: comparator and sampling flip-flop. A **behavioural model** with a `real` input |
| `stage1_detector` | first differential stage: two delay units, the (T,T)/(2T,T) multiplexer, the 90° tap and two XNORs |
| `delay_unit`, `delay_line` | a delay of one symbol at the selected rate, built from cascaded segments with a tap multiplexer |
| `decimator` | keeps one of every L products and restarts its phase at each symbol |
| `accumulator` | integrate-and-dump up/down counter (the matched filter) |
| `reset_circuit` | turns the rising edge of T_clk into the decimator-sync and accumulator-dump strobes |
| `stage2_detector` | I_n·I_{n-1} + Q_n·Q_{n-1} and its sign |
| `timing_recovery` | symbol-clock recovery over four rates. It contains `transition_detector`, `pulse_filter`, `freq_controller`, `rate_divider`, `pfd` and `phase_estimator` |
| `ddpsk_pkg` | constants (fs, 40 samples per 100 kb/s symbol, decade rate step, ÷40, τ = 2) and the `rate_e` and `delay_mode_e` types |

## How the two differential stages remove Doppler

Let the received carrier be at f_i + f_d, and let θ_n be the transmitted
phase (0 or π) of symbol n.

**First stage.** Each sample is multiplied (XNOR) by the sample D = T or 2T
earlier. D is a whole number of carrier cycles (40 samples = 10 cycles at
100 kb/s). What remains of the product is the phase difference
θ_n − θ_{n−D/T} plus a constant error ε = 2π f_d D. The Q branch uses the
reference one sample older, which at four samples per cycle is a 90° shift.
Summed over a symbol:

- I_n ≈ K·c(Δθ_n + ε)
- Q_n ≈ K·s(Δθ_n + ε)

Here c and s are the "triangular" cosine and sine that hard-limited
correlation produces, and K = fs·T/L is the number of samples the
accumulator sees.

**Second stage.** I_n·I_{n−1} + Q_n·Q_{n−1} depends only on
Δθ_n − Δθ_{n−1}. The error ε has cancelled. Its sign is the decision. A
negative sum means a phase reversal, which gives `data_bit = 1`.

**Encoding that matches each mode.** The transmitter encodes
c_n = a_n ⊕ c_{n−1}. For the (T,T) combination it then encodes
d_n = c_n ⊕ d_{n−1}. For (2T,T) it uses d_n = c_n ⊕ d_{n−2}, which gives the
second-order difference φ_n − φ_{n−1} − φ_{n−2} + φ_{n−3}. The (2T,T) mode
avoids correlated noise between the two stages and is worth about 1.8 dB.

**Limit: the Doppler rate.** The cancellation assumes that ε is the same for
adjacent symbols. If the offset drifts at ḟ Hz/s, ε moves by about
2π·ḟ·D·T per symbol, which is 2π·ḟ·T² for (T,T). The decisions degrade as
this approaches π/2 and invert at π. At 100 kb/s the limit is far beyond
any physical drift. At 0.1 kb/s (T = 10 ms) it is about 2.5 kHz/s:
−1 kHz/s decodes cleanly, while −5 kHz/s inverts every bit.

### Decimation and the quadrature branch: use L = 1 or an odd L with Doppler

With exactly four samples per carrier cycle, an **even** decimation ratio
keeps only two of the four carrier phases. I then holds only the in-phase
component and Q only the cross term, so the pair is no longer a quadrature
pair. The Doppler cancellation then breaks down. A behavioural model of the
algorithm and the RTL agree on this: at 100 kb/s with L = 2 and a 10 kHz
offset, 20 % or more of the bits are wrong. With L = 1 or L = 3 and the same
offset, no bits are wrong.

The published example (K = 20 at 100 kb/s with L = 2) works as long as there
is no frequency offset. For a Doppler-tolerant link choose L = 1 or an odd L.
Examples that keep K an integer are L = 5 at 10 kb/s (K = 80), L = 125 at
1 kb/s (K = 32) and L = 625 at 0.1 kb/s (K = 64).

### Noise is part of the operating point

The same four-samples-per-cycle structure means that noise-free 1-bit
samples take only a few distinct patterns. Under a Doppler offset the I and
Q sums then move in coarse steps from symbol to symbol, and with a small K
a decision can occasionally tie or flip with no noise at all. For example,
(2T,T) with L = 3 and −8 kHz gets about 7 % of bits wrong when
noise-free, but only about 1 % with moderate noise. A bit-level model of
the algorithm shows this, and the RTL reproduces it. Receiver noise ahead of the comparator dithers the
samples and restores the averaged triangular behaviour. Small K is also
weak against noise: L = 3 at 100 kb/s (K = 13) shows a few errors per
thousand bits at moderate noise, while K = 40 shows none.

## Timing recovery

The only thing the receiver must know is where symbols begin. Each rising
edge of `t_clk` dumps and clears the accumulators through `reset_circuit`,
and `rate_sel` (S_i) sets the length of the delay units. The chain follows
the published timing circuit:

1. **Transition detector.** It XORs `timing_in` with a copy delayed by
   τ = 2 samples, so each data transition becomes a pulse exactly 2 samples
   wide.
2. **Pulse filter.** It passes only pulses at least τ wide, which removes
   single-sample glitches from noise or fast Doppler. `y_rise` marks each
   pulse that passes. From a transition at `timing_in` to `y_rise` takes
   3 clocks.
3. **Frequency controller.** It measures the number of samples between
   passed transitions and picks the stage. The bounds are 380, 3800 and
   38000 samples, which is 9.5 symbols of each rate. The framing makes this
   safe: a `1010…` preamble, and `10` inserted after every 8 data bits, so a
   run of equal bits never exceeds 9 symbols. The stage changes only after
   two consecutive intervals agree, and each change triggers a realignment.
4. **Rate divider.** The 4 MHz reference and three ÷10 stages produce
   enables at 4 MHz, 400 kHz, 40 kHz and 4 kHz. A multiplexer picks one.
5. **÷40 and phase estimator.** Forty ticks make one symbol, and `t_clk` is
   high for the first 20 of them. The first transition after reset or a rate
   change loads the counter so that the symbol boundary falls exactly on
   that transition, correcting for the 3-clock detection delay. From then on
   the **PFD** compares each transition with the counter phase and gives a
   one-tick advance or retard (bang-bang). The boundary stays within one
   tick, T/40, of the transitions. The goal was a timing error under T/10.

`timing_in` is a port. The published material does not say which receiver
signal feeds the timing circuit. Its simulation drives the circuit with the
data sequence itself, and the testbenches do the same. Without a separate
source, one candidate is the demodulated data.

With the detection delay compensated, the rising edge of `t_clk` coincides
with the transition at `timing_in`. The receiver expects the A/D output
r_k to begin a new symbol on that same clock, so drive `timing_in` one clock
after `vin` changes symbol. The A/D register accounts for that clock.

## Interface and timing of `ddpsk_rx_top`

| port | dir | meaning |
|---|---|---|
| `clk` | in | sample clock fs = 4 MHz; everything is on this one clock |
| `rst_n` | in | asynchronous active-low reset |
| `vin` | in (`real`) | analog A/D input |
| `timing_in` | in | data-rate logic signal for the timing circuit (see above) |
| `mode` | in | `DELAY_T_T` or `DELAY_2T_T` |
| `dec_ratio` | in [15:0] | decimation ratio L (0 is treated as 1) |
| `data_bit`, `data_valid` | out | one decision per symbol |
| `t_clk` | out | recovered symbol clock |
| `rate_sel` | out | `RATE_100K`, `RATE_10K`, `RATE_1K`, `RATE_100` |
| `timing_locked` | out | the timing circuit has aligned since the last reset or rate change |

`ddpsk_baseband` has the same ports, with two differences. First, the 1-bit
sample `rk` replaces `vin`; with no A/D register in between, a symbol
begins at `rk` on the same clock as its transition at `timing_in`. Second,
it has extra observation outputs: `metric` (X_n + Y_n of the latest
decision, 35 bits signed), `y_rise`, `pd_up`, `pd_dn` and `rate_change`.

**Latency.** The products leave the first stage one clock after their
sample. The decimator is synchronised one clock after the `t_clk` edge, and
the accumulators dump one clock after that. `data_valid` follows the dump by
two clocks and carries the bit of the symbol that just ended. So a symbol's
decision appears 4 clocks after the next symbol starts. At start-up the
first few decisions are meaningless: the delay lines fill, the previous-sum
registers are zero, and the rate and phase are still being acquired.

**Parameters.** `ACC_W` = 17 lets the accumulators hold ±40000, which is
0.1 kb/s without decimation. `DEC_W` = 16 is the width of `dec_ratio`. The
rate structure (40 samples, ×10 steps, four rates, ÷40, τ = 2) is set in
`ddpsk_pkg`.

**Cost.** Two delay units of 40 + 360 + 3600 + 36000 one-bit memory entries
each, 80 000 bits in total, take almost all the storage. A generic
synthesis of `ddpsk_baseband` gives those 80 000 memory bits, 312
flip-flops and about 250 other cells.

## What comes from the published design and what does not

The following follow the published design: the 1-bit A/D; fs = 4·f_i; the
XNOR first stage with its 2T/T delay, 90° branch and (T,T)/(2T,T)
multiplexer; decimation by L; up/down-counter accumulators reset once per
symbol by an RC block; the multiply-add-sign second stage; decade delay
units picked by S_i; and a timing circuit built from XOR with z^−τ
(τ = 2/fs), a ≥τ pulse filter, a PFD, a frequency controller, ÷10 stages
selected by a multiplexer, ÷40 and a phase estimator.

The following are this design's own choices:

- the delay segments are circular memories, and the taps add up to
  40/400/4000/40000 samples, with a fourth tap for 0.1 kb/s;
- the decimator restarts its phase at each symbol, and L is a run-time
  input;
- the accumulator width is 17 bits;
- the reset circuit detects the rising edge of T_clk and issues two strobes;
- a zero decision metric counts as 0;
- the frequency controller measures intervals and changes rate only when
  two intervals agree;
- the PFD is bang-bang, and the phase estimator loads on the first
  transition and then tracks;
- the divided clocks are one-cycle enables on the sample clock;
- the reset is asynchronous and active low.

The following are not covered:

- The analog front-ends (LNA, mixer, band-pass filter, IF amplifier,
  high-gain subsampling LNA) have no logic function.
- The comparator exists only as the sign test inside the A/D model.
- The paper reports K = 128 without naming its rate. No integer L gives
  exactly 128 at fs = 4 MHz for these rates; L = 312 at 0.1 kb/s gives 129.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. It checks
against values computed independently in the testbench and prints
`TB_RESULT checks=N failures=M`.

`tb_ddpsk_rx_top` runs the whole receiver at its default parameters. A
transmitter model double-differentially encodes framed data and produces
the A/D input: a carrier with a random phase, Doppler offsets between
−10 kHz and +10 kHz, and Gaussian noise. The runs cover:

- 100 kb/s, (T,T), L = 2, with the data pattern 10010110;
- 100 kb/s, (2T,T), L = 1, with −10 kHz Doppler;
- 100 kb/s, (T,T), L = 1, with +10 kHz Doppler and a slow transmitter
  symbol clock;
- 10 kb/s, L = 5, with a fast transmitter symbol clock;
- 1 kb/s, (2T,T), L = 125;
- 0.1 kb/s, L = 625;
- 100 kb/s, (2T,T), L = 1, with the 435 MHz carrier itself at the A/D
  input. Sampled at 4 MHz it advances 108.75 cycles per sample, so it
  aliases to fs/4 with the spectrum mirrored. The receiver needs no change
  for this subsampling front-end: the sign of the residual offset does not
  matter to it.

Every bit decided after start-up must be correct, and there must be exactly
one decision per symbol. The testbench also checks that every mechanism was
actually exercised: each rate, both modes, decimation on and off, both
Doppler signs, the subsampled input, phase corrections in both
directions, and glitches on the timing input.

`tb_ddpsk_baseband` drives the baseband directly with hard-limited
samples. It checks each decision and that the reported metric agrees with
it. In the noise-free run at f_d = 0 with L = 1 it also checks that the
metric is exactly K² = 1600: the I sums are ±K and the Q products cancel
over whole carrier cycles. It also checks that the observation outputs
report transitions and rate changes.

`tb_timing_recovery` sweeps the four rates without a reset in between. It
requires every rising edge of T_clk to lie within T/10 of a true boundary
while the transmitter clock drifts and glitches are injected.

The whole end-to-end run is about 1.4 million clocks and takes a few seconds.

### Error rate against noise

`tb_ddpsk_ber` measures the bit error rate of the whole receiver with
white Gaussian noise on every sample. SNR is counted over the samples the
accumulator actually uses: SNR = K·A²/(4σ²) for carrier amplitude A and
per-sample noise deviation σ. This way different K can be compared at
equal SNR. The testbench also runs its own reference of the detection
algorithm on the same 1-bit samples, with ideal symbol boundaries. The
receiver, including its timing recovery, must agree with that reference on
at least 97 % of the symbols. In practice it agrees on all of them. With
the seeds as written, it measures:

| K (rate, L, mode) | SNR | bits | BER |
|---|---|---|---|
| 20 (100 kb/s, L=2, (T,T)) | 6 / 9 / 12 / 15 dB | 600 each | 0.092 / 0.003 / 0 / 0 |
| 20 (100 kb/s, L=2, (2T,T)) | 9 / 12 dB | 600 each | 0.003 / 0 |
| 64 (0.1 kb/s, L=625, (T,T)) | 9 / 15 dB | 60 each | 0.47 / 0 |
| 129 (0.1 kb/s, L=312, (T,T)) | 12 dB | 40 | 0 |

All runs use a fixed carrier phase of 0.3 rad. How these numbers depend on
L comes from which carrier phases the decimator keeps:

- L = 2 and L = 312 keep samples at a single carrier phase. At this
  favourable phase those samples are near the carrier peaks.
- L = 625 keeps all four phases, so half of the samples lie near the zero
  crossings and carry little signal.

That costs several dB at equal SNR, which is the price of keeping the
quadrature pair (and with it the Doppler immunity). A phase-locked choice
of L is also only good when the carrier phase is favourable. The curves
are a characterisation of this noise model. The receiver's noise bandwidth
ahead of the comparator sets the absolute SNR scale, and a band-pass
filter narrower than fs/2 shifts the curves.

### Running with Verilator

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_ddpsk_rx_top rtl/ddpsk_pkg.sv tb/tb_ddpsk_rx_top.sv
./obj_dir/Vtb_ddpsk_rx_top
```

Replace `tb_ddpsk_rx_top` with any other testbench name to run it.
`verilator --lint-only -Wall -Irtl -y rtl rtl/ddpsk_pkg.sv rtl/<module>.sv`
lints a single module.

`adc_1bit` has a `real` input, so synthesis flows should use
`ddpsk_baseband` as the top. The rest of the RTL is synthesizable as
written.
