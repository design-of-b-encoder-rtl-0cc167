# Booth multiplier and B-Encoder / B-Decoder

Two pieces of arithmetic and coding hardware that share one clock domain:

* a **signed multiplier with modified (radix-4) Booth encoding**, which halves
  the number of partial products a shift-and-add multiplier would need, and
* a **rate-1/2 convolutional coder**: the *B-Encoder* turns each data bit into
  two coded bits that depend on that bit and the four before it, and the
  *B-Decoder* (a hard-decision Viterbi decoder) recovers the data from the coded
  stream, correcting sparse bit errors on the way.

Everything is SystemVerilog (IEEE 1800-2017), synthesizable, with a
self-checking testbench per module.

## Modules

| module | what it is |
|---|---|
| `bcodec_pkg` | shared types (`booth_sel_t`) and code constants (K = 5, polynomials 23/35 octal) |
| `booth_encoder` | Booth encoder: one 3-bit group of the multiplier -> digit select `{neg, one, two}` |
| `booth_pp_gen` | Booth decoder: selects 0 / X / 2X, inverts for negative digits, emits the `+1` |
| `booth_multiplier` | `WIDTH/2` encoder + generator rows, summed into a `2*WIDTH` product |
| `b_encoder` | 4-flip-flop shift register + two XOR trees, one 2-bit symbol per data bit |
| `b_decoder` | 16-state Viterbi decoder, register-exchange survivors |
| `booth_codec_top` | the multiplier and the encoder -> channel -> decoder chain side by side |

## The Booth multiplier

The multiplier `y` (two's complement, `WIDTH` bits, default 16) is extended
with a 0 below its LSB and read as `WIDTH/2` overlapping 3-bit groups
`{y[2i+1], y[2i], y[2i-1]}`. Each group stands for the digit
`d = -2*y[2i+1] + y[2i] + y[2i-1]`, so `y = sum d_i * 4^i` with
`d_i in {-2, -1, 0, +1, +2}`.

| group | digit | `neg one two` |
|---|---|---|
| 000, 111 | 0 | 0 0 0 |
| 001, 010 | +1 | 0 1 0 |
| 011 | +2 | 0 0 1 |
| 100 | -2 | 1 0 1 |
| 101, 110 | -1 | 1 1 0 |

`booth_pp_gen` builds each row as a `WIDTH+1`-bit value (`X` sign-extended,
or `2X`), and for a negative digit simply inverts every bit. The inverted row
is the 1's complement; the missing `+1` that makes it the 2's complement is
returned separately on `cin`. `booth_multiplier` sign-extends row `i` to
`2*WIDTH` bits, shifts it `2*i` places left, and adds all rows and all `cin`
bits (`cin[i]` at weight `2^(2i)`). The accumulation is written as a plain
sum; synthesis chooses the adder structure. The multiplier is purely
combinational.

One subtle case: for `X` = most negative value and digit -2, `2X` is
`1_000…0` (17 bits). Inverting it gives the positive `0_111…1`, and the `+1`
completes the correct `+2^16`. This is why the `+1` is kept apart rather than
added inside the 17-bit row, where it would overflow.

## The B-Encoder

```
 in_bit ──┬──► sr[0] ──► sr[1] ──► sr[2] ──► sr[3]
          │      │         │         │         │
          └──────┴────┬────┴─────────┴─────────┘
                 XOR(G0) -> c0      XOR(G1) -> c1
```

The window is `{u_t, u_t-1, u_t-2, u_t-3, u_t-4}`, with the current bit as the
MSB. It is ANDed with each 5-bit generator polynomial and XOR-reduced:

* `G0 = 23 (octal) = 10011` gives `c0 = u_t ^ u_t-3 ^ u_t-4`
* `G1 = 35 (octal) = 11101` gives `c1 = u_t ^ u_t-1 ^ u_t-2 ^ u_t-4`

This is the standard constraint-length-5, free-distance-7 pair. Both are
parameters. A bit is taken on a clock edge while `in_valid` is high. The symbol
`{c1, c0}` appears the next cycle with `out_valid`. Reset clears the register.
Four 0 bits return the code to state 0.

## The B-Decoder (Viterbi)

The decoder's trellis has 16 states, one per content of the encoder's shift
register. From state `s`, data bit `u` leads to `{s[2:0], u}`, so state
`s'` has the two predecessors `{0, s'[3:1]}` and `{1, s'[3:1]}`.

For each accepted symbol (`in_valid` high) and each state, the decoder does
the following:

1. **Branch metric.** For both incoming transitions, the Hamming distance (0–2)
   between the received symbol and the symbol that transition would have
   produced.
2. **Add-compare-select.** It adds each distance to its predecessor's path
   metric and keeps the smaller total. On a tie it keeps the predecessor with
   top bit 0.
3. **Register exchange.** The state's survivor, the last `TB_DEPTH` data bits
   of its best path, becomes the chosen predecessor's survivor shifted by one,
   with `s'[0]` (the transition's data bit) appended.

The decoded bit is the oldest survivor bit of the state with the smallest
stored metric. With `TB_DEPTH = 32` (more than six constraint lengths), the
survivors have almost always merged by then.

Housekeeping:

* **Start.** After reset, state 0 has metric 0 and every other state
  `2^(MW-3)`. Decoding therefore assumes the encoder starts in state 0.
  Survivors reset to 0.
* **Renormalisation.** Metrics are `MW = 8` bits. When all 16 have their top
  bit set, that bit is cleared in all of them. With hard decisions, the spread
  between metrics of this code stays far below `2^(MW-1)`, so the order of the
  metrics is preserved.
* **Latency.** Data bit *k* leaves on `out_bit` (with `out_valid`) one clock
  after the decoder accepted symbol *k + TB_DEPTH*. Feed `TB_DEPTH` further
  symbols, for example from 0 bits after a message, to release the last bits.
* **Cost.** 16 × (8 + 32) flip-flops, 32 adders and 16 comparators.

## Top level: `booth_codec_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `mul_x`, `mul_y` | in | WIDTH | signed operands |
| `mul_p` | out | 2·WIDTH | signed product (combinational) |
| `enc_in_valid`, `enc_in_bit` | in | 1 | data bit into the encoder |
| `chan_flip` | in | 2 | XOR mask on the symbol going to the decoder (0 for a clean link) |
| `enc_sym_valid`, `enc_sym` | out | 1, 2 | coded symbol as it leaves the encoder |
| `dec_out_valid`, `dec_out_bit` | out | 1 | decoded data bit |

Parameters: `WIDTH = 16`, `TB_DEPTH = 32`. The multiplier and the coder are
independent; no data path between them is defined. `chan_flip` is applied in
the cycle its symbol is on `enc_sym`, so a testbench can inject channel errors.

## Where this design makes its own choices

The following follow the source description:

* the radix-4 Booth recoding to `0, ±X, ±2X`
* the 1's complement rows with a `+1` at the LSB, each row two places left of
  the one before
* 16-bit operands
* an encoder of four series flip-flops and two XOR networks producing two
  coded bits per data bit
* a decoder that takes two bits per clock under an input enable and works
  along paths through the code's states

This design chose the rest:

* **Generator polynomials.** They are not specified; 23/35 octal are used, as
  parameters.
* **Decoding algorithm.** Viterbi, hard decision, with register exchange,
  `TB_DEPTH = 32` and 8-bit metrics with top-bit renormalisation.
* **Bit-serial coder.** The description also shows word-wide signals for the
  coder: a 16-bit data word and a 17-bit encoded word. It also shows a second
  decoder input that is the bitwise complement of a second 16-bit word. What
  these mean is not defined. They are not modelled; the coder here is the
  bit-serial one of the block description.
* **No link between multiplier and coder.** How the multiplier takes part in
  encoding is not defined, so the two stand side by side.
* **Block named only.** The "adaptive logic" around the encoder and decoder is
  named but not described, and is not modelled.
* **Plain accumulation, no pipelining.** The multiplier's partial products are
  summed with plain adders (no particular compressor tree) and it is not
  pipelined. The reported delay figure (about 15.5 ns) belongs to an
  unspecified device and is not a property of this RTL.
* **Reset.** Synchronous, active low, everywhere.
* **`chan_flip`.** Added for testing.
* **Radix-2 multiplier not included.** The classic radix-2 Booth algorithm is
  the baseline the design is compared against, and is not part of it.

## Verification

Each testbench in `tb/` is self-checking. It ends with
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `tb_booth_encoder`: all 8 groups against the digit formula.
* `tb_booth_pp_gen`: 5 digits × (corner + 400 random) multiplicands; checks
  that row + `cin` = digit·X.
* `tb_booth_multiplier`: all pairs of corner operands, then 20 000 random
  pairs, against a native signed multiply; checks that every digit value
  occurs. A second, 8-bit instance is checked exhaustively (all 65 536 pairs).
* `tb_b_encoder`: 6 000 random bits with idle gaps, against a history-based
  reference, including the impulse response and a mid-stream reset.
* `tb_b_decoder`: 5 000 bits against a reference encoder. The first 1 000 go
  over a clean channel. After that, one bit of every 17th symbol is flipped
  (235 errors, enough to force renormalisation). Every bit and its exact
  latency are checked.
* `tb_booth_codec_top`: the whole design at default parameters. It runs 300
  random 16-bit words through the coder while multiplying a new operand pair
  every cycle. It injects single-bit errors every 13th symbol and a double-bit
  symbol error every 200. It checks every product, symbol and decoded bit and
  the decoder latency. It fails if a Booth digit value, an idle input cycle, a
  corrected single or double error, or a flush bit never occurred.

Running a test with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/bcodec_pkg.sv tb/tb_booth_codec_top.sv --top-module tb_booth_codec_top -o sim
./obj_dir/sim
```

Every test finishes in well under a second.

What is not verified:

* random error patterns denser than the ones above, where any Viterbi decoder
  of this code will make errors
* gate-level timing
