# Trellis encoder-decoder: a K = 3, rate 1/2 recursive systematic code with a Viterbi decoder

A message bit stream is protected against channel errors by a convolutional code that is
made *recursive*: part of the encoder's output is fed back into its shift register, which
spreads every message bit over an unbounded stretch of coded bits. The code is systematic
(each message bit is also sent as it is) and has rate 1/2 (one parity bit per message bit).
The receiver is a trellis decoder: it searches the four-state trellis of the encoder for the
state sequence that best explains the received bits and returns the message that drove it,
correcting isolated channel errors along the way.

The whole chain runs on one clock:

```
msg_valid/msg_bit ─► rsc_encoder ─► output_mux ══ serial channel ══► trellis_decoder ─► dec_valid/dec_bit
                     (sys, par)     (sys, then par)   ▲ chan_flip
                                                      (error injection)
```

## The code

The generator matrix is G(D) = [1, g1(D)/g2(D)] with

* g1 = 1 + D^2 (octal 5), the feed-forward (parity) polynomial, and
* g2 = 1 + D + D^2 (octal 7), the feedback polynomial.

The register holds a(k-1), a(k-2), where a(k) = u(k) + a(k-1) + a(k-2) (mod 2), and the parity
bit is p(k) = a(k) + a(k-2). The encoder state is numbered `{a(k-1), a(k-2)}`. The constraint
length and rate are fixed at K = 3 and r = 1/2. The polynomials are this design's choice, the
usual pair for K = 3; they are parameters (`G1_FF`, `G2_FB`, bit i = coefficient of D^i), and
changing them changes encoder and decoder together. Every trellis function (feedback, parity,
next state, branch label, message bit of a transition) is in `rtl/trellis_pkg.sv`.

## Encoder and channel framing

`rsc_encoder` takes one message bit per cycle on a valid/ready handshake and registers the
coded pair `{sys, par}`. `output_mux` sends each pair over the next two cycles, systematic bit
first. `ser_first` goes with the systematic bit so the receiver can pair the bits again; it is
a framing aid of this design, as a real link would get it from frame sync. The serial channel
carries two bits per message bit, so the codec's steady rate is **one message bit per two
clock cycles**; `msg_ready` drops on every other cycle while the stream is full.

In the top module `trellis_codec` the channel is a wire with one addition: `chan_flip` inverts
the channel bit of the cycle in which it is high. This models channel errors.

## The decoder, block by block

The decoder is a hard-decision Viterbi decoder. Its four stages use the vocabulary of a
"delta domain": every quantity is measured relative to the most reliable value, which then
sits at zero.

1. **Input stage** (inside `trellis_decoder`). It holds the systematic bit until its parity
   bit arrives and then fires one trellis `step` with the received symbol r = {sys, par}. A
   parity bit that comes without its systematic bit is dropped.
2. **`permutation_network`: normal to delta domain.** The received symbol is the most reliable
   value and becomes the reference. Each of the four branch labels a is re-indexed as
   eta = a XOR r, so r maps to 0, and gets the cost weight(eta), its Hamming distance to r.
   These four values are the branch metrics.
3. **`extra_column_generator`: the next trellis column.** Next state ns has the two
   predecessors `{ns[0], x}`. For each ns, both predecessors are extended by the metric of
   their branch label, and a two-input `min2_finder_tree` keeps the cheaper one (x = 0 on a
   tie). A four-input `min2_finder_tree` then finds the most reliable state of the new column,
   and its metric (`norm`) is subtracted from all four. The column is therefore again in the
   delta domain: the best state is at 0 and the metrics stay within 6 bits. `norm` is 0 as
   long as the received stream is a valid code sequence. It becomes non-zero when a channel
   error can no longer be explained away, and the decoder reports it as `best_growth`.
4. **`inverse_permutation_network`: back to the normal domain.** This is a register-exchange
   survivor memory. Each state owns a DEPTH-bit register holding the message bits along its
   best path. On each step, state ns copies its surviving predecessor's register, shifted,
   and appends the bit of the surviving branch. This is a permutation of the four registers,
   chosen by the decisions. After DEPTH steps the paths have merged with high probability, so
   the oldest bit of the best state's register is the decoded message bit.

The decoder starts with state 0 at metric 0 and the other states at `PM_INIT` = 16, because the
encoder starts from reset in state 0. The decoder does not terminate the trellis: it decodes
a continuous stream. The last DEPTH-1 message bits come out only once further symbols follow
them, so to flush the decoder, send DEPTH-1 extra message bits.

### Timing

* The encoder registers its output pair one cycle after it accepts a bit. The bit is on the
  channel in cycles t+2 (sys) and t+3 (par) after it was accepted in cycle t.
* The decoder steps on the cycle in which a parity bit arrives. One cycle later, `out_valid`
  and `out_bit` give the message bit DEPTH-1 = 14 symbols older than that symbol.
* The first 14 symbols after reset fill the window and give no output.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `K` | 3 | `trellis_pkg` | constraint length (the trellis code is written for K = 3) |
| `G1_FF` | `3'b101` | encoder, decoder, top | feed-forward polynomial g1 |
| `G2_FB` | `3'b111` | encoder, decoder, top | feedback polynomial g2 (bit 0 must be 1) |
| `DEPTH` | 15 | decoder, top | survivor length; 5·K by the usual rule |
| `PM_W` | 6 | decoder, top | path-metric width |
| `PM_INIT` | 16 | decoder, top | start metric of states other than 0 |

## How far to trust it, and where it departs from the description it follows

* The encoder's recursive, systematic structure, K = 3, r = 1/2 and the bit-by-bit
  multiplexing of the two outputs come from the design description. The polynomials 5/7, the
  output order, the framing flag, the handshakes and the synchronous active-low reset are this
  design's choices.
* The description names the decoder's stages: permutation network into the delta domain,
  "2 min finder tree", extra column generator, and permutation network back to the normal
  domain. It gives almost nothing of their insides. Those terms come from decoders for
  non-binary codes. Here each is given the nearest role in a 4-state Viterbi decoder, as
  listed above. The decoding algorithm (maximum-likelihood search of the state sequence, hard
  decisions, register exchange) is this design's choice.
* The reference implementation reported 20 slice registers and 40 LUTs for the whole codec.
  This design has 49 flip-flop bits plus 60 survivor-memory bits. A Viterbi decoder with a
  15-deep survivor memory cannot be built with 20 registers, so the reference decoder must
  store less. How it did that is unknown.
* The decoder decodes hard decisions only. Soft channel values would need a wider
  `permutation_network` metric. Nothing else would change.

## Verification

Each module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`.
The reference models in `tb/tb_ref_pkg.sv` are written separately from the RTL: an
integer-register encoder and its transition function.

| Testbench | What it checks |
|---|---|
| `tb_rsc_encoder` | coded pairs and state against the reference encoder under random stalls; one-cycle latency; one bit per cycle |
| `tb_output_mux` | order sys-then-par, `ser_first`, no gap inside a pair, 2 cycles per pair |
| `tb_permutation_network` | all received symbols × labels: delta index and Hamming cost |
| `tb_min2_finder_tree` | N = 2, 4, 5 (padded tree): minimum and first index, many ties |
| `tb_extra_column_generator` | add-compare-select, tie rules and normalisation against a transition-by-transition reference |
| `tb_inverse_permutation_network` | register exchange against whole-path queues, DEPTH = 15 and 4 |
| `tb_trellis_decoder` | isolated errors all corrected; at 6 % channel errors, bit-exact against a reference Viterbi search; latency, count, metric growth |
| `tb_trellis_codec` | end to end at default parameters, 3014 bits with isolated channel errors: every bit decoded right; counts stalls, encoder states, pairs, injected errors, metric growth and warm-up, each of which must occur; rate and latency |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/trellis_pkg.sv tb/tb_ref_pkg.sv tb/tb_trellis_codec.sv --top-module tb_trellis_codec
./obj_dir/Vtb_trellis_codec
```

Each testbench finishes in well under a second.
