# ACAPE-FID: adaptive polar / convolutional FEC with iterative RS-assisted decoding

This is synthesizable SystemVerilog for a forward-error-correction (FEC) link
built on the ACAPE-FID idea ("Adaptive Convolution-Assisted Polar Encoder with
Flexible Iterative Decoding"). The idea is to avoid a fixed block size and its
padding. The number of frozen polar bits, and so the block length, follows the
amount of data in each frame. A convolutional code adds the channel
redundancy. The receiver decodes softly and checks the result with a
Reed-Solomon (RS) code decoded by Euclid's algorithm. When that check fails,
it iterates between the two decoders.

The source article describes the system only at block-diagram level. It gives
no block lengths, no polynomials, no word widths and no interfaces. Everything
concrete here comes from this implementation: the sizes, the codes, the
iteration rule and the timing. The section
[How this relates to the ACAPE-FID description](#how-this-relates-to-the-acape-fid-description)
lists what comes from the article and what does not.

## The frame

The transmitter carries **two information streams** per frame, with the same
number of bits K (1..16) in each.

| step | stream 1 | stream 2 |
|---|---|---|
| adaptive frozen-bit selection | N = smallest of 4, 8, 16 with N >= K + min_frozen | same N, same frozen set |
| polar transform x = u·F | N bits | N bits |
| pack into GF(16) symbols | bits 0..N-1 of the frame | bits N..2N-1 |
| shortened RS, 4 parity symbols (corrects 2) | N/2 message symbols + 4 parity = N/2+4 symbols | |
| convolutional code, K=3, generators 7,5 (octal) | 4·(N/2+4) bits + 2 zero tail bits = L trellis steps | |
| optional puncturing to rate 2/3 | second coded bit of every odd step dropped | |

| N | information bits (2K) | RS symbols | trellis steps L | coded bits sent (rate 1/2 / 2/3) |
|---|---|---|---|---|
| 4 | up to 8 | 6 | 26 | 52 / 39 |
| 8 | up to 16 | 8 | 34 | 68 / 51 |
| 16 | up to 32 | 12 | 50 | 100 / 75 |

Bit b of the packed frame is bit b mod 4 of RS symbol b/4. RS symbol s of the
message is the coefficient of x^(s+4) in the codeword, and the parity symbols
are the coefficients of x^0..x^3. The convolutional encoder sees codeword
symbol 0 (the first parity symbol) first, bit 0 first. The two tail bits bring it back to state 0.

The receiver must know N, K and the code rate of each frame. The transmitter
outputs them as side information with the frame (`tx_blk_len`, `tx_k`,
`tx_punct`), and the receiver takes them with the first LLR pair (`rx_*`). A
real link would carry them in a header.

## Adaptive polar stage

`frozen_selector` picks N and the information set. Positions are ranked by
polarization weight, PW(i) = Σ bit_j(i)·2^(j/4). The weights are computed in
16.16 fixed point inside the package. The ranks are elaboration-time
constants, so the only run-time hardware is one comparison per position
against N−K. The K most reliable positions carry data. The rest are frozen at
0.

`polar_encoder` scatters the K data bits into the information positions in
ascending order. It then applies the 16-point Arikan butterfly
(F = [1 0; 1 1]^⊗4). Every position at or above N is frozen, so the same
16-point circuit serves N = 4, 8 and 16: the upper bits stay zero and the
lower N bits are the N-point transform. One `frozen_selector` feeds both
stream encoders.

## Reed-Solomon stage: RS(15,11) shortened, over GF(16)

`rs_encoder` forms c(x) = x^4·m(x) + (x^4·m(x) mod g(x)), with
g(x) = (x+α)(x+α²)(x+α³)(x+α⁴) and α a root of x^4+x+1. The codeword is
therefore a multiple of g(x), and the message symbols stay readable in place.
A division LFSR takes one message symbol per cycle.

## Convolutional stage and rate adaptation

`conv_encoder` is the two-flip-flop encoder: c0 = u⊕FF1⊕FF2 and c1 = u⊕FF2.
With `punct` set, it drops the second coded bit of every odd step (pattern
[1 1; 1 0], rate 2/3). The coded pair still appears on every step, and
`c_keep` says which of its bits go on air.

## Receiver: iterative decoding

`turbo_decoder` buffers a frame of channel LLRs. An LLR is log P(0)/P(1), 6
bits signed. For a punctured frame, the second LLR of every odd step is
replaced by 0 (depuncturing), whatever arrived in its place. Each iteration
then does three things:

1. **Soft decoding.** `siso_decoder` runs max-log-MAP (BCJR) over the 4-state
   trellis, starting and ending in state 0. The forward pass stores all α
   metrics (51 × 4 × 16 bits). The backward pass produces an a-posteriori LLR
   per step. Metrics are 16 bits and need no normalisation at these lengths.
2. **RSE check.** The signs of the LLRs give the codeword bits, and
   `rse_decoder` decodes the symbols. It computes the syndromes S1..S4 by
   Horner's rule, one symbol per cycle. It solves the key equation with
   Euclid's algorithm, one quotient term per cycle, starting from x^4 and S(x)
   and stopping when the remainder degree drops below 2. It then runs a Chien
   search with Forney error values, one position per cycle. It reports failure
   when the root count does not match deg Λ, when deg Ω ≥ deg Λ, when
   Λ(0) = 0, or when Λ′ vanishes at a root.
3. **Frozen-bit check.** The corrected message is split into the two polar
   blocks and re-transformed. Every frozen position must come out 0. This acts
   as a second error detector. It catches most RS miscorrections whenever
   N > K.

A frame is accepted when steps 2 and 3 both pass. If it is not accepted and
the iteration budget `max_iter` (1..7) allows, the decoder picks the least
reliable codeword bit of the first pass that has not been tried yet. It gives
that bit a strong a-priori LLR against its first-pass decision and re-runs the
SISO decoder. The trellis then re-decodes the bit and its neighbours under the
opposite hypothesis, and RSE checks again. This is a Chase-like search that
the soft and algebraic decoders run together. In simulation it recovers
between one in six and one in three of the frames whose first
pass fails.

`polar_decoder` (one per stream) applies the same butterfly, since F is its
own inverse over GF(2). It gathers the information bits and reports
`frozen_ok`.

## Adaptive control

`adaptive_controller` judges frames in windows of 4. A window with a failed
frame, or with more than 2 corrected symbols in total, does three things: it
raises `min_frozen` by 2 (up to 8), raises `max_iter` by 1 (up to 7) and
returns to rate 1/2. An error-free window lowers both knobs. If `min_frozen`
is already 0, it also switches to rate 2/3. Any other window leaves the knobs
as they are. After reset the knobs are min_frozen 0, max_iter 1 and rate
1/2. The controller drives the
transmitter's `min_frozen` and rate and the receiver's iteration budget.
Corrected-symbol counts and failures stand in for an SNR or BER estimate.

## Timing and size

All blocks use one clock and an asynchronous active-low reset (`rst_n`).

| path | cycles |
|---|---|
| transmitter, start to first coded pair | N/2 + 4 |
| coded stream | L pairs, one per cycle |
| SISO pass | 2L + 1 |
| RSE decode | 2·n_sym + at most 20 |
| one decoder iteration at N = 16 | 128 to 148 |
| clean N = 16 frame, `tx_start` to `rx_out_valid` | 184 |

The receiver starts decoding once the last pair is in. Frames do not
overlap: the receiver accepts a new frame only when it is idle.
A clean N=16 frame carries 32 data bits in 184 cycles, about 0.17 bit per
cycle, so 12 Mb/s of user data would need a clock of roughly 69 MHz. The
article reports 24 clock cycles and a latency of 0.01 µs. These serial
schedules do not approach either figure. A faster design would unroll the
trellis and RS phases.

After generic synthesis, the whole design is about 4.8k word-level cells,
3.1k flip-flop bits and one 3.3 kbit memory (the α store). The SISO decoder
and the LLR buffers dominate.

## Error rates over a Gaussian channel

`tb_acape_awgn` sends frames through the whole link over an AWGN channel,
with BPSK and the adaptive controller in the loop. Eb/N0 is per data bit. It
counts the frozen, RS and convolutional overhead at the rate actually sent,
with puncturing included. Typical results, 300 N=16 frames per point:

| Eb/N0 | FER, K = 16 | of which accepted wrong | BER, K = 16 | FER, K = 8 | BER, K = 8 |
|---|---|---|---|---|---|
| 2 dB | 0.25 | about 45 | 0.08 | 0.86 | 0.28 |
| 3 dB | 0.07 | | 0.02 | 0.71 | 0.21 |
| 4 dB | 0.03 | 1 to 5 | 0.007 | 0.43 | 0.11 |

These results say three things about the scheme:
- **Frozen bits cost energy without adding correction.** The receiver never
  decodes the polar code softly. It only re-transforms a word that RS has
  already corrected. The frozen bits of a half-full block therefore halve the
  energy per coded bit and buy only error detection. This is why K = 8 does
  much worse than K = 16 at the same Eb/N0. A soft polar decoder would be
  needed to turn frozen bits into coding gain.
- **Full blocks have one detector.** With K = 16 there are no frozen bits,
  and the 4 RS parity symbols are the only check. Each extra iteration is one
  more chance to land on a wrong RS codeword, so 5 to 8 % of frames are
  accepted wrong, almost all at 2 dB. With K = 8, no wrong word was accepted
  in these runs.
- **The published error rates are not reached.** The published FER is 0.007
  at 2 dB and 0.001 at 4 dB. This link, with its K = 3 convolutional code and
  t = 2 RS code, is far from that. BERs of 1e-5 to 1e-9 could not be measured
  in a simulation of this length anyway.

## How this relates to the ACAPE-FID description

Taken from the article:
- the chain: adaptive frozen polar coding, then convolutional coding at the
  transmitter; RS/Euclid error detection with iterative soft decoding, then
  reverse polarization at the receiver
- two stream polar encoders sharing one frozen-bit and rate-control unit
- a convolutional encoder with two flip-flops and two output nodes
- x = u·F + f, c = x′·G, c(x) = g(x)m(x) + e(x), and decoding by syndromes
  and gcd(a, b) = gcd(b, a mod b)
- a feedback unit that adjusts the code rate, the frozen bits and the
  iteration count

Choices made here, because the article leaves them open:
- all sizes and the RS field and generator
- generators 7,5 (read from the tap positions of the encoder drawing; the
  node type is taken as modulo-2 addition)
- the reliability rule and frozen value 0
- the placement of the RS encoder between the polar and convolutional stages.
  The article decodes an RS code but does not say where one is added.
- puncturing as the rate-adaptation mechanism
- max-log-MAP as the SISO algorithm
- the Chase-like exchange, and the frozen-bit check as a second detector
- the controller's window rule
- the side-information ports

Not built:
- a second constituent SISO decoder with interleaver and de-interleaver, as in
  the article's classic turbo-decoder drawing. This transmitter has one
  convolutional encoder and no interleaver, so there is no second code to
  decode, and the article gives no permutation.
- decoding of other code families (LDPC, other turbo codes) by the same
  decoder, which the article claims but does not describe.
- adaptive list decoding of the polar code. The polar block arrives already
  corrected, and the article does not describe the list decoder.
- constraint-length optimisation. The encoder is fixed at two flip-flops.
- an SNR or BER estimator for the controller. It uses the decoder's own
  counts instead.
- the article's BER and FER are measured above but not matched. Its BLER,
  SNR-gain, PSNR, latency and retransmission curves are not reproduced: it
  gives no block size, traffic or time base for them.

## Files

`rtl/`
- `acape_pkg.sv`: sizes, types, GF(16) functions, polarization weight,
  polar transform
- `frozen_selector.sv`, `polar_encoder.sv`, `rs_encoder.sv`,
  `conv_encoder.sv`: transmitter parts
- `polarized_conv_encoder.sv`: the transmitter
- `siso_decoder.sv`, `rse_decoder.sv`, `turbo_decoder.sv`,
  `polar_decoder.sv`: receiver parts
- `adaptive_controller.sv`: the feedback unit
- `acape_fid_top.sv`: transmitter, receiver and controller; the channel is
  outside

`tb/`
- one self-checking testbench per module, `tb_<module>.sv`
- `tb_acape_awgn.sv`: error rates of the whole link over a Gaussian channel
  (see above)
- `acape_ref_pkg.sv`: independent reference models. The polar transform uses
  the generator-matrix rule, the frozen set the tabulated reliability order,
  GF(16) log/antilog tables, RS long division and a shift-register
  convolutional encoder.
- `acape_chan_pkg.sv`: the channel model, ±8 LLRs plus the sum of two
  uniform noise terms, saturated

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends it with a failure if it hangs. Run from the project root, with
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb --top-module tb_acape_fid_top \
  rtl/acape_pkg.sv tb/acape_ref_pkg.sv tb/acape_chan_pkg.sv tb/tb_acape_fid_top.sv
./obj_dir/Vtb_acape_fid_top
```

Replace the top-module name to run another testbench. `tb_acape_fid_top`
runs the full design at its default sizes. It sends 160 frames in three
phases: clean channel, noisy channel, clean again. The first frame carries
the 7-bit example word 0110110 on both streams. It checks the coded stream
against the reference and the recovered data of every accepted frame. It also
requires every mechanism to occur at least once: the three block lengths, RS
corrections, extra iterations, recovery after a failed first pass, reported
failures, controller raise and lower, and punctured and unpunctured frames.

At high noise, a short code can now and then accept a wrong word that passes
every detector. The receiver testbenches therefore count such words at their
noisiest levels and bound them instead of failing on each one. The bounds
are under 2% of frames in `tb_turbo_decoder`, at most 5% in
`tb_acape_fid_top`, and 2% (K = 8) or 12% (K = 16) in `tb_acape_awgn`. At
lower noise, every accepted frame must be exact.

## Changing sizes

`NMAX` and the RS sizes are package constants. Several pieces assume the
present values and would need attention if they change:
- the block-length enum (4/8/16)
- the 3-bit symbol index in `rs_encoder`
- the 6-bit step counters (LMAX = 50 < 64)
- the GF(16) constant α⁻¹ in `rse_decoder`

`adaptive_controller` is fully parameterised (window, thresholds, steps,
limits).
