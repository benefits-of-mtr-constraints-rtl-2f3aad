# LDPC + MTR read channel for an E²PR4 magnetic recording channel

This RTL is a complete write and read channel for a hard-disk track. It uses
two codes in series:

* an outer **LDPC code**: length N = 4732, 169 parity checks, column weight 3,
  rate about 0.96. It is built from a Steiner triple system of order 169;
* an inner **rate 4/5 maximum-transition-run code**, MTR(j=2, k=8). It never
  records more than two magnetisation transitions in a row.

The channel is the E²PR4 partial-response target, (1−D)(1+D)³ = 1 + 2D − 2D³ − D⁴.
The overall code rate is 0.96 × 0.8 = 0.768.

The MTR constraint pays off twice:

* It keeps the NRZ patterns `0101` and `1010` off the medium. This removes the
  ±[+1 −1 +1] error event that dominates at high density.
* It removes two of the 16 states of the E²PR4 trellis, so the Viterbi
  detector runs on **14 states**.

The MTR code is plain combinational logic. So the design also passes *soft*
information through it: each AND, OR, NOT and XOR gate of the MTR encoder and
decoder is evaluated on log-likelihood ratios with cheap approximations (max,
min, negation, sign-min). This turns the detector's soft output on code bits
into soft input on data bits for the LDPC decoder. It also works in reverse:
the LDPC decoder's output can be turned back into a priori information for
the detector.

The design follows the scheme of the article *"Benefits of MTR Constraints in
Soft-Output Decoding of LDPC – MTR Codes Concatenation over E²PR4 Channel
Model"*. The article presents it as a simulation study. Everything at the
gate and register level here is this design's own, including the MTR code
table beyond one output equation, the detector architecture, the LDPC
decoder architecture, the fixed-point formats and the control. The
section [Where this design makes its own choices](#where-this-design-makes-its-own-choices)
lists these choices.

## Signal chain

```
 write path
   LDPC codeword bits ──4──► mtr_encoder ──5──► nrzi_precoder ──► NRZ bit to the head
   (LDPC encoder not included)                 (serialise, 1/(1⊕D))

 read path (one frame = 4732 bits = 1183 MTR words = 5915 samples)
   samples ──► frame buffer ──► sova_detector ──► 5 code-bit LLRs ──► soft_mtr_decoder
                   ▲              (14 states,                            │ 4 data-bit LLRs
                   │               window 20)                            ▼
                   │                  ▲                             ldpc_decoder (min-sum)
                   │                  │ a priori LLRs                    │ a posteriori LLRs
                   │           a priori buffer ◄── soft_mtr_encoder ◄────┤   (Case B only)
                   └── replayed in Case B                                 ▼
                                                                 decoded codeword, 4 bits/clock
```

The read path has two modes, chosen per frame with the `case_b` input:

* **Case A (forwarding), `case_b = 0`.** One detector pass, then message
  passing. Soft information flows only from the detector to the LDPC decoder.
  This is the low-complexity mode and the one the article recommends.
* **Case B (exchange), `case_b = 1`.** After each LDPC decoding, the decoder's
  a posteriori LLRs go through `soft_mtr_encoder`. The results become a priori
  LLRs for the code bits, and the stored samples are detected again. The
  frame takes `OUTER_ITERS` = 5 detector/decoder passes in all.
  The article found no extra gain over Case A. The code-bit LLRs made by the
  soft MTR encoder depend on each other, while the gate rules assume
  independent inputs.

`det_word` additionally delivers the frame as the detector alone saw it: its
hard decisions through the hard `mtr_decoder`, before any message passing.

## Soft logic (llr_pkg, llr_gate)

A soft bit is LLR(x) = ln P(x=0)/P(x=1). Positive means "probably 0". It is
stored as an 8-bit signed number saturated to ±127. The gate rules are:

| gate | exact (independent inputs)                      | used here                          |
|------|-------------------------------------------------|------------------------------------|
| NOT  | −L                                              | −L                                 |
| AND  | ln(e^L1 + e^L2 + e^(L1+L2))                     | max(L1, L2)                        |
| OR   | −ln(e^−L1 + e^−L2 + e^−(L1+L2))                 | min(L1, L2)                        |
| XOR  | ln((1 + e^L1 e^L2)/(e^L1 + e^L2))               | sign(L1)·sign(L2)·min(\|L1\|,\|L2\|) |

The approximations differ most from the exact values when the result is
already very reliable, so little is lost. The XOR rule is also the
check-node rule of the LDPC decoder, which is therefore a min-sum decoder.

## The MTR(j=2, k=8) code

In NRZI a `1` is a transition. The code uses every 5-bit word that has no
`111`, does not begin or end with `11`, and is not `00000`. There are exactly
16 such words, and concatenated they never hold more than 2 ones in a row
(j = 2) or 8 zeros in a row (k = 8).

The article prints only one encoder output: `x0 = y1 + y0·ȳ2·y3 + y0·y2·ȳ3`.
If `+` were OR, that bit would be 1 for 10 of the 16 data words, and no bit
position of the code is 1 in 10 code words. So `+` is taken as addition
modulo 2: `c2 = d1 ⊕ (d0 ∧ (d2 ⊕ d3))`. That bit is 1 for 8 data words and
is used as the middle code bit, the only position that is 1 in exactly 8
code words. The rest of the table is this design's choice: for each value of
c2, data words in increasing order map to code words in increasing order.

| d3..d0 | c0..c4 | d3..d0 | c0..c4 |
|--------|--------|--------|--------|
| 0000 | 00001 | 1000 | 01010 |
| 0001 | 00010 | 1001 | 01101 |
| 0010 | 00100 | 1010 | 10100 |
| 0011 | 00101 | 1011 | 10000 |
| 0100 | 01000 | 1100 | 10001 |
| 0101 | 00110 | 1101 | 10010 |
| 0110 | 01100 | 1110 | 10101 |
| 0111 | 01001 | 1111 | 10110 |

`c0` is recorded first. The encoder and decoder outputs are minimised sums of
products of this table. In the decoder, the 16 invalid words are don't-cares.

The soft encoder and decoder evaluate **the same sums of products** with the
gate rules above. So their hard decisions always equal the hard
encoder/decoder applied to the signs of their inputs. Their reliabilities,
though, depend on the logic form chosen. Another but equivalent circuit
would give other LLRs.

## The 14-state SOVA detector (sova_detector)

This block is the hardest part of the design.

**Trellis.** State `s` holds the last four NRZ bits, `s[0]` newest. The
states `0101` (5) and `1010` (10) do not exist. A branch goes from `s` to
`ns = {s[2:0], a}` for the new NRZ bit `a`. Its noiseless sample is

    x = b(a) + 2·b(s[0]) − 2·b(s[2]) − b(s[3]),   b(v) = 2v − 1,

one of 0, ±2, ±4, ±6. Each branch also carries the NRZI label
`u = a ⊕ s[0]`. The detector decides and outputs `u`, which is directly the
MTR code bit. If the three older bits of a state read `010` or `101`, one of
its two predecessors is a removed state. Such a state has a single incoming
branch and needs no compare-select.

**Branch metric.** `(y − x·Y_UNIT)² + u · (LLR_apriori << REL_SHIFT)`. This is
the article's metric: squared distance plus the a priori LLR of the branch's
information bit. The sample scale is `Y_UNIT` = 8 LSBs per level, and
`REL_SHIFT` converts LLRs into metric units. In Case A the a priori term is
zero.

**Path metrics.** Path metrics are 20-bit signed numbers. Each step subtracts
the smallest metric of the previous step and clamps at the maximum. At a
frame start, state 0000 has metric 0 and all other states a large metric.
This matches a precoder and channel memory cleared to zero.

**Soft output.** Register exchange over `WINDOW` = 20 symbols, which is the
window the article specifies. Every state keeps 20 decisions and 20 7-bit
reliabilities. On a two-way select, the metric difference
`Δ = |m0 − m1| >> REL_SHIFT` (saturated to 127) becomes the reliability of
every position where survivor and competitor disagree, if it is smaller than
what is stored (Hagenauer's rule). The newest position starts at 127.

**Timing.** The detector takes one sample per clock. The oldest decision of
the state with the best metric is emitted as an LLR (negative = transition).
The output for sample k is registered in the clock after sample k + 20 is
accepted. After `in_eof` the detector lowers `in_ready` and flushes the last
20 decisions from the best state, one per clock, with `out_last` on the
final one. So a frame of L samples takes L + 20 clocks, and every sample
yields exactly one output.

## The LDPC code and decoder

**Code (sts_column_gen).** There are 169 checks and 4732 columns. Every
column has ones in the three rows of one triple of a Steiner triple system
on 169 points, so every pair of checks shares exactly one column. This gives
no 4-cycles, column weight 3 and row weight 84. The article calls the code
"based on Kirkman triple systems". Because 169 ≡ 1 (mod 6), the triples come
from Skolem's construction on Z₅₆ × Z₃ ∪ {∞}:

* `{(x,0),(x,1),(x,2)}` for x < 28;
* `{∞,(x+28,i),(x,i+1)}` for x < 28;
* `{(x,i),(y,i),(x∘y,i+1)}` for x < y < 56.

Here `x∘y = s/2` for even `s = (x+y) mod 56` and `(s−1)/2 + 28` for odd `s`.
Point (x,i) is check `56·i + x`, and ∞ is check 168. The generator walks
these triples in this order with counters, so H is never stored. It is
parameterised by `STS_N` (n): v = 6n+1 checks and n(6n+1) columns. The
testbenches use n = 4 (N = 100) for quick runs. H has full rank 169 for
n = 28.

**Decoder (ldpc_decoder).** The decoder is min-sum with a flooding schedule
and processes one column per clock:

* Each check keeps a compressed state: smallest and second-smallest
  magnitude, the column of the smallest, and the sign product. There are two
  copies: the previous iteration's and the one being built.
* Each edge keeps only the sign of its last bit-to-check message.
* For column j the decoder rebuilds the three check-to-bit messages from the
  old state. It forms `L = channel + Σ messages` and stores the a posteriori
  value and hard decision. It then folds `L − message` into the new state of
  each of the three checks, together with the syndrome.

An iteration takes N + 1 clocks, 4733 at full size. Decoding stops when the
syndrome is zero or after `MAX_ITER` = 10 iterations. Channel LLRs are
written 4 at a time, one MTR word per clock. A posteriori LLRs and hard bits
are read 4 at a time.

## Control and frame timing (ldpc_mtr_e2pr4)

One frame at the default size, in clocks:

| phase | clocks |
|-------|--------|
| receive and detect 5915 samples | 5915 (+20 flush) |
| LDPC decoding | 4733 per iteration, 1–10 iterations |
| Case B only, per extra pass: soft re-encode 1183 words, replay, detect, decode | 1183 + 5915 + 20 + LDPC |
| output 1183 words | 1183 |

A frame starts with the first sample accepted (`y_ready` high only while
waiting for a frame). `frame_done` pulses with the last output word. At that
point `ldpc_converged`, `ldpc_iters` and `passes` describe the frame. The
message-passing state is cleared at the start of every pass. The samples stay
in a 5915-entry buffer, and the a priori LLRs in another, for Case B replay.

## Where this design makes its own choices

The article gives the system structure, the 14-state trellis, the 20-symbol
window, the branch metric, the LLR gate rules, the LDPC code size and column
weight, one MTR output equation and the 5 outer iterations. This design
chose the following:

* the MTR code table apart from the middle bit, and the reading of its one
  printed equation as modulo-2 (see above);
* the NRZI→NRZ precoder. The article never names one, but only a precoded
  NRZI MTR code keeps `0101`/`1010` off the channel input, as the article
  states;
* the E²PR4 polynomial 1 + 2D − 2D³ − D⁴ with bipolar input. This is the
  standard definition; the article prints none;
* the SOVA architecture (register exchange, Hagenauer update), the metric and
  reliability scaling (`Y_UNIT`, `REL_SHIFT`), the word widths and the flush;
* the triple system construction and column order. The article's reference
  construction was not available, and "Kirkman" cannot hold for 169 points;
* the min-sum decoder, its schedule, `MAX_ITER` = 10 and early stop;
* in Case B: returning a posteriori rather than extrinsic LLRs, always running
  all 5 passes, and clearing the decoder between passes;
* all handshakes, framing, reset and the `det_word` diagnostic output.

Not included:

* the LDPC encoder, because no generator matrix or encoder is specified. The
  testbenches make codewords by Gaussian elimination of H;
* the recording channel itself, which is physical. The testbench models it.

## How far it has been checked

Every module has a self-checking testbench in `tb/`, and each testbench has
been shown to fail on a deliberately broken copy of its module.

| testbench | what it checks |
|-----------|----------------|
| `tb_llr_gate` | all four gate rules against integer references, including saturation |
| `tb_mtr_encoder`, `tb_mtr_decoder` | the table rebuilt from its definition, j/k limits on a long random stream, the round trip |
| `tb_soft_mtr_encoder`, `tb_soft_mtr_decoder` | output signs equal hard coding of input signs; equal input magnitudes give equal output magnitudes; the middle bit matches the gate rules exactly |
| `tb_nrzi_precoder` | bit-exact output, one bit per clock when streaming, frame restart |
| `tb_sova_detector` | error-free and 20-sample latency without noise; no confident errors with mild noise; fewer errors with correct a priori LLRs at heavy noise; short-frame flush |
| `tb_sts_column_gen` | at full size: 4732 columns, every check pair exactly once, weight 84 per check |
| `tb_ldpc_decoder` | N = 100: clean codewords in 1 iteration, weak errors corrected, random LLRs end on a codeword or at the limit, N+1 clocks per iteration |
| `tb_ldpc_mtr_e2pr4` | the whole system **at full size**, with a behavioural E²PR4 + Gaussian noise channel (see below) |
| `tb_ber_sweep` | full size, five noise levels, Case A and Case B on the same samples (see below) |

`tb_ldpc_mtr_e2pr4` runs four frames and checks the write path bit by bit:

* Case A, noiseless;
* Case A with σ = 0.8 level units plus 8 impulses of 4 levels, spread over
  the frame. This gives a few to about 20 detector errors, which message
  passing removes;
* Case B with the same kind of disturbance, with all 5 passes;
* Case A with heavy noise, which must stop at the iteration limit.

`tb_ber_sweep` is a small BER-versus-SNR run at full size. It uses 3
frames (14,196 bits) per noise level and decodes the same noisy samples in
both modes. SNR is 10·log10(Ec / (2Rσ²)), with Ec = 10 (the energy of the
E²PR4 response) and R = 0.768. One run gave:

| σ (levels) | SNR (dB) | detector + hard MTR decoding | Case A | Case B |
|-----------|----------|------------------------------|--------|--------|
| 0.7 | 11.2 | 3.5e-4 | 0 | 0 |
| 0.9 | 9.1 | 7.0e-5 | 0 | 0 |
| 1.0 | 8.1 | 2.5e-3 | 0 | 0 |
| 1.1 | 7.3 | 5.6e-3 | 5.2e-3 (0/3 frames converge) | 8.5e-4 (2/3 converge) |
| 1.2 | 6.6 | 1.5e-2 | 1.7e-2 | 1.4e-2 |

These are far too few bits for a BER curve. A point near 10⁻⁵ needs
millions of decoded bits per noise level. Detector errors come in bursts,
which the MTR decoder widens, so the detector-only column is noisy.

The waterfall of this fixed-point design is between σ = 1.0 and 1.2. Runs
with other random seeds show that an occasional frame fails at σ = 1.0 too.
In the run above, Case B recovered frames that Case A did not. The article
reports no gain for Case B, or a loss, because the LLRs that come back
through the soft MTR encoder are statistically dependent. Case B can lose
here too: with another seed, one σ = 1.0 frame that Case B did not decode
ended with about 1,600 wrong bits. Three things could move the balance: the
plain min-sum decoder, the LLR scaling, and the return of a posteriori LLRs.
Settling which of them matters would need a much larger study.

All testbenches were also run with other random seeds and with random
power-up register values (Verilator `+verilator+seed+<n>` and
`+verilator+rand+reset+2`), and they pass. For this, the testbenches give the
reset a real falling edge before the first clock edge.

Post-synthesis size of the top, from a generic coarse synthesis: about 5,000
word-level cells and 12,000 flip-flop bits. It also has about 185 kbit of
memory: the sample and a priori buffers, the LDPC channel and a posteriori
LLRs, and the edge signs.

## Simulating

Any testbench builds with plain Verilator 5. The shared package and the
testbench packages go first on the command line:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/llr_pkg.sv tb/tb_mtr_code_pkg.sv tb/tb_ldpc_pkg.sv \
    tb/tb_ldpc_mtr_e2pr4.sv --top-module tb_ldpc_mtr_e2pr4
./obj_dir/Vtb_ldpc_mtr_e2pr4
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`. The
full-size system test takes about ten seconds.

The sizes are parameters of the top:

* `STS_N` sets the code: 28 gives N = 4732. N must be a multiple of 4, which
  holds for n = 4, 8, 28.
* `OUTER_ITERS` sets the number of Case B passes.
* `LDPC_ITERS` sets the decoder iteration limit.
* `WINDOW` sets the detector window.

The word widths are in `llr_pkg` (`LLR_W`) and in the detector's parameters.
