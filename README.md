# Turbo encoder and SOVA turbo decoder for 8-bit frames

This design protects a stream of bits with a rate-1/3 turbo code and recovers
them with an iterative soft-output Viterbi (SOVA) decoder. Each 8-bit frame
becomes a 24-bit codeword. The codeword carries:

- the data bits themselves;
- the parity of a recursive convolutional encoder run over the data;
- the parity of a second, identical encoder run over the same data in a
  scrambled (interleaved) order.

The decoder runs one SOVA decoder per parity stream. The two decoders take
turns, and each passes on what it learned from its own parity to the other.
After four such iterations, every single-bit channel error in a frame is
corrected.

The complete chain is a single top module, `turbo_coder`: encoder, a channel
model that lets you flip chosen code bits, and decoder. That makes it easy to
show errors being introduced on purpose and then removed.

```
x (serial) ─► turbo_encoder ─► code[23:0] ─► soft_mapper ─► turbo_decoder ─► dec_bits, dec_llr
              RSC1: c1, c2                   err_mask flips   SOVA1 ─► interleave ─► SOVA2
              interleaver ─► RSC2: c3        chosen bits        ▲                      │
                                                                └──── de-interleave ◄──┘
```

## The constituent code

Both encoders use the same code: a recursive systematic convolutional (RSC)
code with constraint length 3, `G = [1, (1 + D²)/(1 + D + D²)]`. In octal this
is (1, 5/7): the conventional generators 111 and 101, with the 111 output fed
back to the input. The encoder has two memory bits, `state = {s1, s2}`, with
`s1` the newer one. For input `u`:

```
a      = u ^ s1 ^ s2      feedback, enters s1
parity = a ^ s2
next   = {a, s1}
```

Since the state is a shift register, the two trellis branches that enter a
state `ns` come from `{ns[0], 0}` and `{ns[0], 1}`. The decoder therefore
stores one decision bit per state and step, the oldest bit `d` of the winning
predecessor. The branch input can be recovered as `u = ns[1] ^ ns[0] ^ d`.
All of these functions are in `turbo_pkg`.

The encoders start every frame in state 0 and are **not terminated**. The 24
bits hold exactly 8 × 3 code bits, which leaves no room for tail bits. The
decoder handles the open end explicitly (see the SOVA section).

## Encoder (`turbo_encoder`, `rsc_encoder`)

Bits arrive one per cycle on `x`, with a `x_valid`/`x_ready` handshake.

1. **Load.** RSC1 encodes each bit as it is accepted. The bit (c1) and its
   parity (c2) are stored.
2. **Second encoder.** Once 8 bits are stored, RSC2 encodes the interleaved
   frame, one bit per cycle, producing c3. This takes 8 cycles, and `x_ready`
   is low meanwhile.
3. **Output.** `code_valid` is high for one cycle, with
   `code[3k] = c1_k`, `code[3k+1] = c2_k` and `code[3k+2] = c3_k`. Here c3_k
   is RSC2's parity for interleaved bit k.

`code_valid` rises at the 8th clock edge after the edge that accepts the last
bit. With continuous input, one frame takes 17 cycles.

## Block interleaver (`block_interleaver`, `block_deinterleaver`)

The frame is written into a 2 × 4 matrix column by column and read out row by
row. Output element k is input element `(k % COLS)·ROWS + k / COLS`. For 8
elements the order becomes 0 2 4 6 1 3 5 7. The de-interleaver applies the
inverse map.

The whole frame is already held in registers, so the matrix is never stored
and the permutation is pure wiring. The element type is a parameter:

- The encoder uses single bits.
- The decoder uses 8-bit soft values. Around decoder 2 it uses two
  interleavers (systematic values and decoder 1's extrinsic values) and three
  de-interleavers (extrinsic values, soft outputs and hard decisions).

## Channel model (`soft_mapper`)

Each code bit becomes a soft value of ±16: +16 for a 1 and −16 for a 0. Every
bit set in `err_mask` has its sign inverted. The mapper also splits the word
into three streams: systematic `ys`, parity `yp1` and parity `yp2`. Throughout
the decoder, a positive soft value means "1 is more likely".

## SOVA component decoder (`sova_decoder`)

This is the most involved block. It decodes one 8-bit frame of the 4-state
code. Its inputs are three log-likelihood ratios (LLRs) per bit:

- `ls`, the systematic value;
- `lp`, the parity value;
- `la`, the a-priori value supplied by the other decoder.

A trellis branch with input `u` and parity `p` adds `u·(ls+la) + p·lp` to the
path metric, and the decoder keeps the largest metric. With this scaling, the
difference between two path metrics is itself an LLR, so no conversion is
needed at the output.

It works through five phases. The cycle counts are for N = 8:

| phase | cycles | what happens |
|---|---|---|
| FWD  | N = 8 | Add-compare-select for all 4 states in parallel. For every step and state it stores the decision bit and the survivor-minus-loser metric difference, saturated to 127. Only state 0 starts with metric 0; the others start at a large negative value. |
| BEST | 1 | The state with the largest final metric ends the maximum-likelihood (ML) path. On a tie, the lowest-numbered state wins. |
| TB   | N | Trace back the ML path and record the decoded bit and the ML state at every step. |
| END  | ≤ 3N + 5 | Because the trellis is open, the survivors ending in the other three final states are competitors too. Each is traced back until it merges with the ML path. At every bit where it disagrees with the ML path, the reliability is lowered to the difference between the final metrics. |
| REL  | N … N(N+1)/2 | Hagenauer's update. For each step k, the path that lost the comparison into the ML state is traced back until it merges with the ML path. At every bit where it differs from the ML path (always including bit k itself), the reliability is lowered to that step's metric difference. |

The outputs are:

- `hard[k]`, the decoded bit;
- `llr[k] = ±reliability[k]`, signed by the decoded bit;
- `ext[k] = llr[k] − la[k] − ls[k]`, the extrinsic value passed to the other
  decoder.

All three are saturated to ±127. They are valid from `done` until the next
`start`, provided `ls` and `la` are held. The worst case from `start` to `done`
is 5N + 8 + N(N+1)/2 = 84 cycles.

**Why END matters.** Without the END phase, the last bits of an open trellis
are never contradicted by a merging path, so they keep the maximum
reliability. A single error on the last systematic bit or on its parity is
then never corrected. With the END phase, every single error is corrected.

**Storage.** The decision and metric-difference memories hold 8 × 4 × (1 + 7)
bits. Synthesis maps them to memory cells.

## Iterative decoder (`turbo_decoder`)

On `start`, the decoder registers `ys`, `yp1` and `yp2` and sets decoder 1's
a-priori input to zero. One iteration then runs two passes:

1. **SOVA 1**, in natural order, uses `ys`, `yp1` and the a-priori values.
   Its extrinsic output is stored.
2. **SOVA 2**, in interleaved order, uses the interleaved `ys`, `yp2` and the
   interleaved extrinsic output of SOVA 1. Its extrinsic output is
   de-interleaved and becomes SOVA 1's a-priori input for the next iteration.

After 4 iterations (`ITER`), SOVA 2's LLRs and hard decisions, de-interleaved,
are the result. `done` is high for one cycle. The two component decoders run
one after the other, since each needs the other's latest output. A frame takes
at most 8 × (84 + 2) + 3 cycles. With random soft inputs, 491 to 673 cycles
were measured.

## Top level (`turbo_coder`)

`x_ready` is the encoder's ready signal, forced low while the decoder is busy,
so exactly one frame is in the decoder at a time. In the `code_valid` cycle:

- the codeword passes through `soft_mapper`, and `err_mask` is applied then;
- the decoder starts.

An assertion checks that the decoder is always idle when a codeword appears.
`dec_valid` is high for one cycle, with `dec_bits` in the order the bits
entered on `x` and `dec_llr` beside them. Both hold until the next frame.

The reset `rst` is synchronous and active high.

Synthesised size of the top, with coarse word-level cells: about 985 cells,
505 flip-flop bits and 776 memory bits.

## Parameters

| parameter | default | meaning | origin |
|---|---|---|---|
| `N` / `FRAME_LEN` | 8 | information bits per frame | 24-bit codeword at rate 1/3 |
| `ROWS`, `COLS` | 2, 4 | interleaver matrix | own choice |
| `LW` / `LLR_W` | 8 | width of every soft value, two's complement | own choice |
| `AMP` / `CH_AMP` | 16 | magnitude of a received soft value | own choice |
| `ITER` / `NUM_ITER` | 4 | decoder iterations | own choice |

`ROWS·COLS` must equal `N`. The path-metric width, `LW + log2(N) + 4`, is
derived inside `sova_decoder`. It leaves room for the start-state offset and
for N steps of worst-case branch metrics.

## Behaviour measured in simulation

- Every one of the 256 frames decodes correctly:
  - without errors;
  - with any single one of its 24 code bits flipped.

  That is 6400 decodes.
- With two random code-bit errors, 252 of 256 frames were corrected.
- The decoder's outputs are bit-exact with a behavioural model. The model
  implements the same algorithm with register exchange, keeping whole
  survivor and loser paths, instead of traceback.

## Where this design departs from, or adds to, its source

The original work describes this structure:

- a turbo coder built from two K = 3 RSC encoders, G = [1, g2/g1] with
  g1 = 111 and g2 = 101;
- a block interleaver that writes by columns and reads by rows;
- a 24-bit encoder output;
- two SOVA decoders iterating through an interleaver and a de-interleaver,
  with errors introduced on purpose and removed by decoding.

The following points are this design's own reading or choice:

- **Constituent code.** The work is framed for LTE, whose turbo code uses an
  8-state K = 4 code (13/15 octal) and the QPP interleaver. The work itself
  specifies the 4-state K = 3 code and a block interleaver, and those are what
  is built here. This design is not LTE-compliant.
- **Interleaver.** The text calls the interleaver pseudo-random in places and
  a block interleaver elsewhere. The block interleaver is built. Its 2 × 4
  shape is chosen to fit 8 bits.
- **No trellis termination.** As a consequence, the SOVA adds the
  final-state competitors (END phase).
- **Decoder details.** Not specified in the source, and chosen here:
  - soft-value format, channel amplitude and saturation;
  - iteration count;
  - SOVA tie rules;
  - extrinsic values passed without scaling;
  - component decoders running sequentially, not simultaneously.
- **Interfaces.** Also chosen here:
  - serial input with a valid/ready handshake, and the codeword bit order;
  - the error-mask port;
  - synchronous active-high reset.

## Simulating

Every testbench in `tb/` checks its results and ends with a
`TB_RESULT checks=… failures=…` line. For example, to run the end-to-end test:

```
verilator --binary --timing -Irtl -Itb rtl/turbo_pkg.sv tb/tb_turbo_ref_pkg.sv \
          tb/tb_turbo_coder.sv rtl/*.sv --top-module tb_turbo_coder -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_rsc_encoder` | Parity and state against polynomial division, with random gaps and clears. |
| `tb_block_interleaver`, `tb_block_deinterleaver` | Against explicit matrices (2 × 4 and 3 × 5), plus a round trip. |
| `tb_soft_mapper` | Mapping, error flips and stream split. |
| `tb_turbo_encoder` | Codewords against a reference encoder, the stall while RSC2 runs, and latency. |
| `tb_sova_decoder` | Bit-exact against the register-exchange model. Also checks, by exhaustive search over all 256 sequences, that the decoded path is maximum-likelihood, and checks the latency bound. |
| `tb_turbo_decoder` | Bit-exact against the reference iteration. Clean frames and single-error frames must decode correctly. |
| `tb_turbo_coder` | End to end at default parameters: codewords, decoded bits and LLRs for frames with 0, 1 or 2 errors. It also counts encoder stalls, decoder stalls, corrected frames and iterations, and whether interleaving reorders frames. |
| `tb_error_correction` | The exhaustive single-error run described above. |

`tb/tb_turbo_ref_pkg.sv` holds the reference models that the testbenches
share.

To try another frame size, set `FRAME_LEN`, `IL_ROWS` and `IL_COLS` in
`turbo_pkg` together, or pass `N`, `ROWS` and `COLS` to `turbo_coder`. The
reference package follows `turbo_pkg`. The REL phase grows as N², so for long
frames a sliding-window traceback would be the next step.
