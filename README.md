# Extended Golay (24,12,8) encoder and decoder

This design adds twelve check bits to every 12-bit message, so that a
receiver can repair a word damaged on a noisy link. The extended binary Golay
code maps 12-bit messages to 24-bit codewords. Any two codewords differ in at
least 8 bit positions. As a result the decoder can:

- correct every pattern of up to three flipped bits in a word, and
- recognise every pattern of four flipped bits, and ask for that word to be
  sent again.

This code protected the Voyager image downlinks. The design has two halves:

- a combinational encoder;
- a four-stage pipelined decoder that takes one word per clock. It uses the
  syndrome algorithm, with weight tests built from small adder trees.

The RTL is plain synthesizable SystemVerilog with no vendor primitives.

## Word layout and the matrix B

A 24-bit word `w` has two halves:

| bits      | name          | encoder output                 |
|-----------|---------------|--------------------------------|
| `w[11:0]` | message half  | the 12-bit message, unchanged  |
| `w[23:12]`| check half    | `B * message` over GF(2)       |

`B` is a fixed 12x12 binary matrix, held as `golay_pkg::B_ROW`. Row `r` lists
the message bits that are XORed into check bit `12+r`. Rows 1 to 11 have
weight 7. Row 0 has weight 11: all message bits except bit 0. `B` has two
properties that the whole decoder relies on. The second-syndrome testbench
checks both:

- `B` is symmetric, so column `k` of `B` (called `b_k` below) equals row `k`;
- `B * B = I`, so `B` is its own inverse.

The encoder (`golay_encoder`) has no clock: it is one XOR network of twelve
parity trees.

## How the decoder finds the error

Suppose the received word is `w = c ^ e`, where `c` is a codeword and `e` is the
error pattern. Write `e = [e_hi, e_lo]`, for the check half and the message half.

**Syndrome** (`golay_syndrome`). `S = w[23:12] ^ B*w[11:0]`. A codeword gives
zero, so `S = e_hi ^ B*e_lo` depends only on the errors.

**Second syndrome** (`golay_second_syndrome`). `SB = B*S = B*e_hi ^ e_lo`,
because `B*B = I`. It is the same relation with the two halves swapped.

When there are at most three errors, at least one of the four cases below
holds:

| case | where the errors are                        | test                  | error vector `E`        |
|------|---------------------------------------------|-----------------------|-------------------------|
| 1    | all in the check half                       | `wt(S) <= 3`          | `[S, 0]`                |
| 2    | exactly one in message bit `k`, <= 2 in check half | `wt(S ^ b_k) <= 2` | `[S ^ b_k, I_k]`       |
| 3    | all in the message half                     | `wt(SB) <= 3`         | `[0, SB]`               |
| 4    | exactly one in check bit `k`, <= 2 in message half | `wt(SB ^ b_k) <= 2` | `[I_k, SB ^ b_k]`      |
| -    | none of the tests passes                    |                       | retransmit              |

Here `I_k` is the 12-bit vector with only bit `k` set. Why the tests work:

- In case 2, `S ^ b_k` removes the contribution of the one message error and
  leaves `e_hi`.
- Case 4 is the same argument applied to `SB`.
- A word with at most three errors has exactly one cause within distance 3,
  because the minimum distance is 8. So exactly one candidate `E` can pass a
  test, and it is the right one.
- With four errors, no pattern of weight 3 or less has the same syndrome, so
  every test fails and `retransmit` is raised.

`golay_error_select` takes the tests in the order of the table. Within cases 2
and 4 it takes the lowest `k`. This order only matters for words that have
been damaged beyond correction.

The candidate vectors `S ^ b_k` come from `golay_s_plus_b`, which inverts
selected bits of `S` according to column `k`. One copy serves `S` and a second
copy serves `SB`.

**Weights** (`golay_weight12`). Each of the 26 weights is a three-level adder
tree:

1. four full adders (`golay_full_adder`) each count the ones in three bits
   (0..3);
2. two 2-bit adders combine them in pairs (0..6);
3. one 3-bit adder forms the 4-bit weight (0..12).

Only the comparisons with 2 and 3 are kept.

## Decoder pipeline and timing

`golay_decoder` has four register stages and accepts a word every clock. It
never stalls:

| stage | registers after the stage          | logic in front of it                             |
|-------|------------------------------------|--------------------------------------------------|
| 1     | `rx_word`, `in_valid`              | none                                             |
| 2     | word, `S`                          | syndrome network                                 |
| 3     | word, `S`, `SB`, 13 hit flags      | 13 weight trees on `S` and `S ^ b_k`, `SB` network |
| 4     | `corrected`, `err_vec`, `retransmit`, `out_valid` | 13 weight trees on `SB` and `SB ^ b_k`, selection, `w ^ E` |

Consider a word that is presented with `in_valid` high and sampled at clock
edge `n`. Its result is on the outputs after edge `n+3`. The testbenches count
this as a latency of 4 clocks, from the cycle the word is driven to the cycle
its result is read.

`rst_n` is synchronous and active low. It clears every register, including
`out_valid`. `retransmit` is only ever high together with `out_valid`.

The decoder has two concurrent assertions:

- a retransmit request always comes with a valid word;
- an accepted correction never has more than three ones in `E`.

The synthesized decoder has 174 flip-flops.

## Ports of the top, `golay_top`

The top holds both ends of the link. Between them would sit the channel,
which is not part of the design. The encoder output and the decoder input are
therefore separate ports.

| port             | dir | width | meaning                                          |
|------------------|-----|-------|--------------------------------------------------|
| `clk`, `rst_n`   | in  | 1     | decoder clock, synchronous active-low reset      |
| `tx_data`        | in  | 12    | message to encode                                |
| `tx_codeword`    | out | 24    | codeword, combinational from `tx_data`           |
| `rx_valid`       | in  | 1     | `rx_word` holds a word to decode                 |
| `rx_word`        | in  | 24    | word received from the channel                   |
| `dec_valid`      | out | 1     | decoder outputs are valid                        |
| `dec_codeword`   | out | 24    | corrected word; the message is `dec_codeword[11:0]` |
| `dec_err_vec`    | out | 24    | the error pattern that was removed               |
| `dec_retransmit` | out | 1     | uncorrectable word: ask for it again             |

## Files

- `rtl/golay_pkg.sv`: types, the matrix `B_ROW`, and the helpers `b_col` and `b_mult`.
- `rtl/golay_encoder.sv`: the encoder.
- Decoder parts:
  - `rtl/golay_syndrome.sv`
  - `rtl/golay_s_plus_b.sv`
  - `rtl/golay_second_syndrome.sv`
  - `rtl/golay_weight12.sv` and `rtl/golay_full_adder.sv`
  - `rtl/golay_error_select.sv`
- `rtl/golay_decoder.sv`: the pipeline.
- `rtl/golay_top.sv`: the top.
- `tb/golay_ref_pkg.sv`: the reference model used by the testbenches. It
  writes the check equations out term by term, builds the columns by encoding
  unit vectors, and draws random error patterns. It is independent of the
  RTL's matrix constant.
- `tb/<module>_tb.sv`: one self-checking testbench per module. The
  full-adder helper has none of its own; the exhaustive weight test covers
  it. Each testbench prints
  `TB_RESULT checks=N failures=M` and has a watchdog.

## Verification

Each testbench compares the module with the reference model:

- **Weight tree, encoder and second syndrome:** exhaustive over all 4096 inputs.
- **Syndrome and `S + b_k`:** directed single-error cases plus random words.
- **Error selection:** random patterns of 0 to 3 errors must come back
  exactly. Random 4-error patterns must give "not found". Directed cases check
  the priority order.
- **Decoder:** every one of the 2324 error patterns of weight 0 to 3 is streamed
  back to back, on random codewords, followed by 500 random 4-error words. The
  test checks the corrected word, the error vector, the retransmit flag and
  the exact latency. It also applies a reset in the middle of a stream.
- **`golay_top_tb`:** runs the whole codec. It encodes 3000 random messages,
  injects channel errors chosen so that every decoding case above is used, and
  decodes them. It counts each case and fails if any case never occurs. The
  top has no parameters, so this run is at full size.

Simulate any testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-DECLFILENAME --top-module golay_top_tb \
    -y rtl -y tb +libext+.sv rtl/golay_pkg.sv tb/golay_ref_pkg.sv tb/golay_top_tb.sv
./obj_dir/Vgolay_top_tb
```

Building and running one testbench takes a few seconds.

## Choices made here, and where this differs from the source design

- **Bit placement.** The message goes in `w[11:0]` and the check bits in
  `w[23:12]`. This matches the published equations, which are evaluated with
  the check half at zero to produce the check bits. Another bit order needs
  only different wiring.
- **Step with `SB ^ b_k`.** Case 4 forms `E = [I_k, SB ^ b_k]`. The source
  algorithm is printed with `S ^ b_k` in that position. That version does not
  decode, and the `error_select` testbench fails on it.
- **Pipeline.** That the decoder is registered, and the adder-tree weight
  units, follow the source design. These parts are this design's own choice:
  - the four stage boundaries;
  - the `in_valid`/`out_valid` flags;
  - the synchronous reset;
  - the `err_vec` and `retransmit` outputs.

  The source reports about 280 flip-flops and 226 MHz on a Virtex-4 device.
  This pipeline has 174 flip-flops, and its speed on that part has not been
  measured.
- **Encoder pins.** The source encoder used one more pin than the 12 inputs
  and 24 outputs. Its purpose is unknown, so it is not provided.
- **Tie-breaking.** When several `k` pass a test, the lowest `k` wins. The
  source design does not say which one to take.
- **Not built.** The source also names the perfect (23,12,7) Golay code but
  gives no hardware for it. Only the extended (24,12,8) code is built.

## Changing the design

- The code is fully defined by `B_ROW` in `golay_pkg`. Another matrix works only
  if it is symmetric, satisfies `B*B = I`, and generates a code of distance 8.
- To move the pipeline registers, edit the `always_ff` blocks of
  `golay_decoder`. Adjust `LATENCY` in `golay_decoder_tb` and `golay_top_tb` to
  match.
