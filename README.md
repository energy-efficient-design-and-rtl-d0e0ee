# Convolutional coding with block interleaving for a MIMO-OFDM link

A radio channel does not corrupt bits one at a time. Fading and interference
wipe out runs of neighbouring bits. A convolutional code with Viterbi decoding
fixes scattered errors well, but a dense burst overwhelms it. This design
puts an 8×8 block interleaver between the encoder and the channel. A burst on
the air is then spread across the code word before it reaches the decoder.

The RTL covers the channel-coding path of a MIMO-OFDM transceiver:

```
 16-bit frame ─► convolutional ─► 8x8        ─► [QPSK, space-time coding,  ─► 8x8           ─► Viterbi  ─► 16-bit frame
                 encoder          interleaver    4x4 antennas, channel,       de-interleaver    decoder      (serial)
                 (rate 1/3, K=5)                 demodulation: not here]
```

The modem stages in brackets belong to the full system but are not part of
this RTL. The top module brings the interleaved word out and takes the
received word back in, so a channel model or the rest of a modem can sit
between the two.

## The code

| item | value |
|---|---|
| frame | 16 data bits, sent MSB first |
| code | rate 1/3, constraint length 5 (16 trellis states) |
| generators (octal) | G0 = 37, G1 = 33, G2 = 25 |
| termination | 4 zero tail bits, so the encoder ends in state 0 |
| code word | (16 + 4) × 3 = 60 bits, 20 three-bit symbols |
| block | 60 code bits + 4 zero padding bits = 64 bits = 8 × 8 |

These generators were not given with the design. They were recovered from
its reference vector: they are the only rate-1/3 code with constraint length
up to 7 that reproduces that vector. The vector is:

| stage | value |
|---|---|
| data | `1101001111001011` |
| code word | `0e5ce8e894c578cf` (60 bits: `e5ce8e894c578cf`) |
| interleaved word | `3d77324af3cd8105` |

That example cannot tell you the bit order, because the data word is a
palindrome and so are all three generators. The order chosen here is:

- data bit 15 enters the encoder first;
- symbol *t* of the frame is `code[59-3t -: 3]`;
- within a symbol, bit 2 is G0, bit 1 is G1 and bit 0 is G2.

The code's free distance is 12. A maximum-likelihood decoder therefore
corrects any 5 wrong bits in a frame. Often it corrects more.

## The interleaver

The 64-bit block is treated as 8 rows of 8 bits, with row *i* = bits
`[8i+7:8i]`. The code word sits in the low 60 bits. The 4 padding zeros are
the top half of row 7.

The interleaver transposes the block. Output row *j* is input column *j*:
`out[8j+k] = in[8k+j]`. The transpose is its own inverse, so the
de-interleaver does the same thing again.

The transposed word is sent row by row. Consecutive transmitted bits within
a row are therefore 8 code bits apart. Consecutive rows hold neighbouring
code bits.

This spreading is what makes the link robust to bursts. For the reference
frame, every burst of up to 10 consecutive wrong bits in the 64-bit
transmitted word is corrected. Without the interleaver, bursts longer than 6
start to get through uncorrected.

The padding bits land on `code_out[39]`, `[47]`, `[55]` and `[63]`. Those
outputs are always 0.

## The Viterbi decoder

The decoder (`viterbi_decoder`) is the largest part of the design. It works
on one terminated frame at a time.

**Trellis.** The state is the 4 previous input bits, newest in the MSB. State
*S'* = `{b, s3, s2, s1}` is reached from the two predecessors
`{S'[2:0], x}`, for *x* = 0 or 1. The input bit of that transition is
`b = S'[3]`. Each state has one `viterbi_acs` unit, 16 in all. Each unit
works as follows:

1. It computes, for both predecessors, the symbol the encoder would have
   sent.
2. It adds the Hamming distance between that symbol and the received one to
   the predecessor's path metric.
3. It keeps the smaller sum and records *x* as its decision bit. On a tie,
   *x* = 0 wins.

Decisions are hard, so the branch metrics are 0 to 3.

**Path metrics.** There are sixteen 8-bit registers. At the start of a frame
state 0 holds 0 and every other state holds 64. The largest metric a real
path can reach is 20 × 3 = 60, so a path that starts in any other state can
never win. Over one frame the metrics stay below 128. No normalisation is
needed.

**Survivor memory.** This is a 20 × 16-bit array: one row of 16 decisions per
received symbol (320 bits).

**Traceback.** The tail guarantees that the frame ends in state 0. Traceback
therefore starts there, with no search for the best state. It runs one step
per clock, from step 19 down to step 0. At step *t*:

- the data bit is `state[3]`;
- the previous state is `{state[2:0], decision[t][state]}`.

Steps 16 to 19 are the tail and are dropped.

**Output.** The 16 recovered bits appear in parallel on `decoded`, with a
`decoded_valid` pulse. They are also shifted out on `sout`, first
transmitted bit first, while `out_enable` is high.

**Cost.** For a 16-bit frame this plain structure is cheap: about 180
flip-flop bits plus the 320-bit survivor memory. A streaming decoder with a
sliding traceback window would only pay off for much longer frames.

## Modules and timing

All clocks refer to one clock. Every reset is synchronous and active high.

| module | role | interface and timing |
|---|---|---|
| `codec_pkg` | constants, `conv_symbol()`, `hamming3()` | — |
| `convolutional_encoder` | one bit per clock; 60-bit `data_out` | `enable` latches `data_in`. `data_out_en` pulses 20 clocks later. |
| `interleaver` | 8×8 transpose, one register stage | `load` → `rows_out`, with `out_valid` on the next clock |
| `convolution_encoder_with_interleaver` | transmit chain | `enable` → `code_out[63:0]`, with `data_out_en` 21 clocks later |
| `deinterleaver` | inverse transpose, then 20 symbols one per clock | `load` → symbols on clocks 2 to 21 after it (`sym_valid`, `last`) |
| `viterbi_acs` | add-compare-select for one state | combinational |
| `viterbi_decoder` | see above | 20 symbols in (any gaps allowed). `decoded_valid` 20 clocks after the last symbol. Then 16 clocks of `sout`. |
| `convolutional_decoder_with_deinterleaver` | receive chain; ports `r0`…`r7`, `sout`, `out_enable` | Decodes one frame after each reset. Rows are captured on the first clock after reset is released. The first output bit comes 43 clocks after that release. |
| `mimo_ofdm_codec_top` | both chains side by side | `tx_*` and `rx_*` ports. `rx_rows[j]` = bits `[8j+7:8j]` of `tx_code_out`. |

The receive chain has no start input. Pulse its reset to decode the next
frame. It keeps nothing from the previous frame.

## Where this RTL departs from, or adds to, the original design

Taken from the original design:

- the frame, code-word and block sizes;
- the rate;
- the row/column interleaving;
- the port names of the encoder, the two chains and the decoder's 3-bit
  symbol input;
- the reference vector.

Choices made here:

- **Generators and bit order.** Recovered from the reference vector, as
  described above.
- **Clock-level timing and handshakes.** All strobes and latencies are this
  design's own: `load`, `*_valid`, `last`, `busy`, and the 20/21/43-clock
  latencies.
- **Decoder insides.** Only the decoder's function was given. The
  decoder uses hard decisions, full-frame survivor storage, traceback from
  state 0, and breaks ties towards *x* = 0.
- **Receive-chain start.** It decodes once per reset, because the interface
  it follows has no start or valid input.
- **Padding.** The padding zeros go in the top four bits of the block, as the
  reference vector shows.
- **Extra parallel output.** `decoded` on the decoder is an addition to the
  serial output.

Not implemented: QPSK mapping and demapping, space-time coding and decoding,
the four transmit and four receive antennas, and the OFDM modulation itself.
The system diagram these come from only names them. It gives no algorithm or
interface, so they are left outside the top.

## Verification

Every module has a self-checking testbench in `tb/`. The expected values
come from `tb/codec_ref_pkg.sv`, which is written independently of the RTL:

- an encoder that walks a bit list with explicit taps;
- the index formula for the transpose;
- a behavioural Viterbi decoder written with integer loops.

What the testbenches check:

- **Reference vector.** It passes through every stage.
- **Random frames.** Each is compared with the reference models.
- **Single-bit errors.** Every position is corrected: all 60 code-word bits
  at the decoder, and all 64 received bits at the receive chain.
- **Scattered errors.** 1 to 5 random errors are always corrected. Frames
  with 6 to 12 errors must decode exactly as the reference decoder does.
- **Bursts.** Bursts of 1 to 10 bits in the received word are corrected.
- **Timing.** Every latency listed above is checked to the clock, along with
  the one-clock strobes.

The end-to-end testbench `tb_mimo_ofdm_codec_top` runs the top at its only
configuration. It pushes 161 frames through four kinds of channel:

- clean;
- one flipped bit;
- a burst of 2 to 10 bits;
- 8 to 15 scattered flips.

It counts each mechanism and fails if any never occurs:

- error-free frames;
- single-bit corrections;
- corrected bursts that would have defeated the decoder without interleaving;
- frames beyond the code's power.

It runs in well under a second.

To simulate, for example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/codec_pkg.sv tb/codec_ref_pkg.sv tb/tb_mimo_ofdm_codec_top.sv \
  --top-module tb_mimo_ofdm_codec_top
./obj_dir/Vtb_mimo_ofdm_codec_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`. Swap the
file name for any other `tb/tb_<module>.sv`.

## Changing the design

- **Frame length.** `DATA_BITS` in `codec_pkg` sets it. The encoder and
  decoder follow it through their `DATA_W` parameters. The 8×8 block holds
  at most 64 code bits, so a longer frame also needs larger `ROWS` and
  `COLS`.
- **Generators.** `G0`, `G1` and `G2` in `codec_pkg` set them. `conv_symbol()`
  is the only place that uses them.
- **Path metrics.** `PM_W` and `INIT_PM` set their width and initial value.
  `INIT_PM` must exceed 3 × (frame steps), and the metrics must not overflow
  `PM_W` bits.
