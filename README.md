# Turbo code with both trellises terminated, for any block length

A turbo encoder feeds the same information block to two recursive systematic
convolutional (RSC) encoders, the second through an interleaver. Tail bits can
bring one recursive encoder back to the zero state. The other encoder sees the
data in scrambled order, so the same tail bits do not end it in a known state,
and its decoder has to guess the end of the block. This leaves a floor of
residual errors at the end of each block.

This design terminates **both** trellises, for **any** block length N up to
440 bits, with one fixed code. It covers both ends of the link:

* `turbo_encoder` produces a systematic stream X and a punctured redundancy
  stream Y, at rate 1/2 or 5/7.
* `turbo_decoder` decodes the received soft values in two iterations. Each
  iteration runs two soft-output Viterbi (SOVA) passes, and both passes know
  that their trellis starts and ends in state zero.
* `turbo_codec` is the top. It holds the two halves side by side with separate
  ports, because the channel between them is not hardware.

The scheme follows K. Koora, F. Poegel and A. Finger, *New Turbo-Code
Termination Scheme for Variable Block Length*. This RTL is an independent
implementation of that scheme. Where the publication leaves something open,
the choice made here is listed under "Where this design goes its own way".

## Why both passes can end in state zero

The code is the memory-3 RSC code {13,15} (octal). The recursion polynomial is
G(D) = 1 + D^2 + D^3 and the parity polynomial is 1 + D + D^3. In the
polynomials here, bit i of a constant holds the coefficient of D^i.

G(D) is primitive, so it divides 1 + D^7 exactly. The length l = 7 is called
the *reset length*. Start the encoder in state zero and feed it any input
sequence. It ends in state zero exactly when the input polynomial is a
multiple of G(D). Two facts follow:

1. **Tail bits end pass 0.** After the N data bits, the encoder takes 3 more
   input bits. Each one is chosen so that the recursion feedback is 0, and the
   register then fills with zeros. The block of N + 3 bits is then a multiple
   of G(D).
2. **A position-preserving interleaver ends pass 1.** Suppose each bit leaves
   the interleaver at a position q with q ≡ p (mod 7), where p is its input
   position. Then each term D^p becomes D^q. Because D^7 ≡ 1 modulo
   1 + D^7, the interleaved block equals the direct block modulo 1 + D^7,
   which is itself a multiple of G(D). So the interleaved block is also a
   multiple of G(D), and the second pass ends in state zero with **no tail
   bits of its own**. This holds for any block length and any permutation
   with that property.

A single RSC encoder does both passes, one after the other. Between the passes
it receives N0 zero bits, so that N + 3 + N0 is a multiple of 7:

    N0 = (7 − (N + 3) mod 7) mod 7        (the smallest i·7 − (N+3) ≥ 0)

The encoder output during these zeros is discarded, and the interleaver is
halted. For N = 440 there are 443 data-plus-tail bits and N0 = 5, so the first
decoder works on 448 = 64·7 steps. The zeros are never transmitted. The decoder
puts them back as values that say "certainly 0".

## Encoder: four phases of one block

`switch_sequencer` steps the encoder through four phases. The encoder's three
switches are the multiplexers in `turbo_encoder`:

* S1 chooses between the data input and the tail bit.
* S2 chooses between the direct stream and the interleaver output.
* S3 chooses between that stream and a forced zero.

| phase  | cycles            | encoder input        | X out | Y out            | interleaver |
|--------|-------------------|----------------------|-------|------------------|-------------|
| `DATA` | N (plus stalls)   | data bit (S1 = d)    | yes   | punctured        | write       |
| `TAIL` | 3                 | `tail_logic` (S1 = t)| yes   | dropped          | write       |
| `ZERO` | N0 (0..6)         | 0 (S3)               | no    | dropped          | halted      |
| `INTL` | N + 3             | interleaver (S2)     | no    | punctured        | read        |

Only N0 needs counting. A mod-7 counter runs during `DATA` and `TAIL`, and
`ZERO` lasts until that counter wraps to 0, so no divider is needed.

Timing works as follows:

* `start` with `blk_len` = N is taken only in IDLE. A length of 0 or above
  `N_MAX` is ignored.
* A data bit is taken in each cycle where `in_valid` and `in_ready` are both
  high. A low `in_valid` stalls the encoder.
* The outputs have no back-pressure. They appear in the cycle the encoder steps.
* With no stalls, a block takes 2(N + 3) + N0 cycles, plus the start cycle.
* `done` pulses after the last step, together with `term_ok`, which confirms
  that the encoder is in state zero. A new `start` can be given in the `done`
  cycle.
* Two concurrent assertions check state zero at the start of `INTL` and at
  `done`.

**Puncturing** (`puncturer`): X, the data and tail bits, is always sent.
Parity bits are sent only at data positions k < N, taking turns between the
two passes:

| rate | pass 0 keeps | pass 1 keeps | bits per block (N = 440) |
|------|--------------|--------------|--------------------------|
| 1/2  | k even       | k odd        | 443 + 440 = **883**      |
| 5/7  | k mod 5 = 0  | k mod 5 = 2  | 443 + 176 = **619**      |

The block sizes 883 and 619 are those of the published scheme. The patterns
that produce them are this design's own.

## The interleaver

`interleaver` stores the N + 3 bits of pass 0 in a 1-bit memory, seen as a
matrix with **7 columns** and written row by row. Column c therefore holds
exactly the positions p ≡ c (mod 7).

For output position q = 7r + c, the read address comes from `il_addr_gen`:

    p = 7 · ((c + r · IL_STEP) mod R_c) + c

Here R_c is the height of column c: ⌊L/7⌋ full rows, plus one if c < L mod 7.
Reading is row by row, but the row order is shuffled inside each column, so
p ≡ q (mod 7) always holds.

IL_STEP = 67 is a prime above the largest column height (64), so the stride is
a permutation of every column for every length. The hardware never divides:

* Each column has a register holding the next source row.
* On each read, that register moves on by IL_STEP mod R_c, with one conditional
  subtract.
* The only modulo operators act on a 7-bit column height.

The decoder uses the same generator once per block, to fill a permutation
table.

## Decoder

`turbo_decoder` receives the soft values of a block, where a positive value
means bit 1. It then runs N_ITER = 2 iterations, each made of two SOVA passes
on one shared `sova_decoder` core.

1. **Receive** (`depuncturer`). Values arrive in the encoder's output order:
   X[k] followed by its kept Y1[k], for k = 0..L−1, then every kept Y2[q]. They
   are written into three memories, with 0 at punctured positions. The
   depuncturer uses the same `puncturer` block as the encoder, so the two
   cannot disagree.
2. **Permutation table**: L cycles.
3. **Decoder 1** runs over K1 = L + N0 steps in direct order. The systematic
   input of the padding steps is the largest "0" value and their parity input
   is 0. The a-priori input is zero in the first iteration. Its output gives
   the extrinsic value Le1 = L − Lsys − La.
4. **Decoder 2** runs over L steps in interleaved order. Its inputs are
   Lsys[π(q)], Y2[q] and Le1[π(q)]. Its extrinsic output goes back through π
   and becomes decoder 1's a-priori input. In the last iteration, its hard
   decisions are stored in de-interleaved order.
5. `done` pulses. `dec_bit` then returns bit `dec_idx` combinationally.

**SOVA core** (`sova_decoder`). This is the hardest part of the design. It
decodes one pass in four phases:

* **FWD**: one trellis step per cycle, with add-compare-select over 8 states.
  The branch metric is ±(sys + apr) ± par. The zero state starts 4096 above all
  other states, because every pass starts there. Each step renormalises the
  metrics by subtracting the new metric of state 0. For every step and state,
  the decision bit and the metric difference are stored, saturated to 9 bits.
* **TB**: one traceback over the whole block, starting from **state zero**,
  which is where the trellis is known to end. For each step it records the
  survivor's bit and states, the competitor's predecessor, and the metric
  difference Δ.
* **UPD**: the soft-output update. For each step k, the competing path is
  followed backwards, one step per cycle. It stops when it meets the survivor,
  after 56 steps (the observation length), or at the start of the block.
  Wherever the competitor's bit differs from the survivor's, the reliability at
  that position is lowered to Δ.
* **OUT**: the soft output has the decision's sign and half the reliability as
  magnitude. The metrics count twice the log-likelihood, hence the half.

One SOVA pass takes about 3K cycles plus the update walk. The walk is at most
K·56 cycles and in practice much shorter. A rate-1/2 block with N = 440 decodes
in about 19 000–22 000 cycles after the last value is received.

## Module map and parameters

```
turbo_codec                      top: encoder and decoder, separate ports
├── turbo_encoder                one RSC, switches S1/S2/S3
│   ├── switch_sequencer         phases DATA/TAIL/ZERO/INTL, N0 counting
│   ├── tail_logic               tail bit = feedback taps of the state
│   ├── interleaver              1-bit memory + il_addr_gen
│   ├── rsc_encoder              {13,15}, memory 3
│   └── puncturer                rate 1/2 or 5/7
└── turbo_decoder                receive, permutation table, 2 iterations
    ├── depuncturer  (+ puncturer)
    ├── il_addr_gen
    └── sova_decoder             shared by decoder 1 and decoder 2
turbo_pkg                        constants and the phase / rate enums
```

| parameter | default | meaning | origin |
|-----------|---------|---------|--------|
| `N_MAX`   | 440 | largest block (an ATM cell plus two bytes) | published |
| `M`, `G_FB`, `G_FF` | 3, 13₈, 15₈ | code | published |
| `L_RESET` | 7 | length of the reset polynomial 1 + D^7 | published |
| `U_OBS`   | 56 | SOVA update depth (observation length) | published |
| `N_ITER`  | 2 | decoder iterations | published |
| `IL_STEP` | 67 | interleaver row stride (prime > 64) | this design |
| `LLR_W`, `EXT_W`, `PM_W`, `DLT_W` | 6, 8, 16, 9 | soft-value widths | this design |

If you change the code polynomials, three things must change together: M,
L_RESET (the length l for which G divides 1 + D^l), and IL_STEP (a prime above
⌈(N_MAX+M)/L_RESET⌉).

## Where this design goes its own way

* **Interleaver layout.** The published description fills a matrix by rows and
  reads it by columns, with shuffling allowed only inside a column. Its example
  for N = 440 is 22 rows by 21 columns, with a last row of three elements.
  No row/column read-out of 443 bits keeps every position modulo 7, and
  22 × 21 with a last row of three holds 444 bits, not 443. This design keeps
  the property that termination depends on, and the rule that shuffling stays
  within a column: it uses 7 columns, reads by rows, and uses the stride rule
  above. The scheme gives no way to search for an optimised interleaver
  either, so none is built.
* **SOVA windowing.** The published decoder uses an observation length of 56
  and flushes the block in 8 loops of a sliding window. Here the survivor is
  traced back once over the whole terminated block, and 56 is the depth of the
  soft-output update. Decisions near the block end therefore use the known
  final state directly.
* **Widths, handshakes and the transmission order** are not given by the
  published scheme. The same holds for the puncturing patterns (only the block
  sizes are given), the neutral value for punctured bits, and the plain
  extrinsic exchange with no scaling. All were chosen here. One SOVA core
  serves both decoders, which is possible because they run in series.
* **Not built:** the baselines the scheme is compared with. These are
  continuous Viterbi/SOVA decoding with truncation length 50, termination of
  the second trellis only, and Reed–Solomon coding. The OFDM/DQPSK modem and
  the 60 GHz channel used to evaluate it are not built either.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M`
and has a watchdog. Packages must come first, and `-y rtl` finds the rest:

```
verilator --binary --timing -y rtl rtl/turbo_pkg.sv tb/tb_turbo_codec.sv --top-module tb_turbo_codec
./obj_dir/Vtb_turbo_codec
```

| testbench | what it shows |
|-----------|---------------|
| `tb_turbo_codec` | Full size and end to end. Encodes and adds noise (34–45 sign errors per rate-1/2 block), then decodes without errors. Checks the 883/619-bit sizes, padding and no padding, both rates, stalls on both sides, the second iteration, and errors corrected. |
| `tb_turbo_encoder` | Checks every X and Y bit, the bit counts and the cycle count of 18 blocks against a reference model. Also covers an ignored illegal start and back-to-back blocks. |
| `tb_turbo_decoder` | Blocks from a reference encoder model, noisy, must decode exactly, in exactly two iterations. |
| `tb_sova_decoder` | Short blocks checked against exhaustive max-log search: the ML sequence, and soft outputs at or above max-log. Long blocks checked against a reference Viterbi. |
| `tb_interleaver`, `tb_il_addr_gen` | Closed-form permutation for every length 1..443, plus an independent permutation and mod-7 check. |
| `tb_switch_sequencer`, `tb_puncturer`, `tb_depuncturer`, `tb_rsc_encoder`, `tb_tail_logic` | Unit checks: phase lengths and N0; the patterns; the placement of every value; the recursions and the 1 + D^7 reset property; termination from all 8 states. |
| `tb_ber_awgn` | BPSK over AWGN, 12 blocks of 440 bits per point. |

BER measured with `tb_ber_awgn` (5280 bits per point, so coarse):

| rate | Eb/N0 (dB) | BER |
|------|-----------|-----|
| 1/2 | 0.5 / 1.5 / 3.0 | 1.4e-1 / 3.9e-2 / 2.1e-3 |
| 5/7 | 1.0 / 2.5 / 4.0 | 9.3e-2 / 2.5e-2 / 1.7e-3 |

The published floating-point results are better, about 1e-4 at 3 dB for rate
1/2. The 6-bit channel values, the fixed-point SOVA without extrinsic scaling,
and the short runs all count against this design. Treat the decoder as
functionally verified rather than tuned for performance.

## How far to trust it

The following have been checked against models written independently of the
RTL:

* the encoder, bit for bit;
* termination, for every length;
* the interleaver;
* the SOVA hard decisions.

Every module passes Verilator lint (`-Wall`, warnings only) and elaborates in
Yosys through its slang front end. Synthesised, the encoder is about 170 cells
with 97 flip-flops and a 443-bit memory. The decoder is about 550 cells with
roughly 66 kbit of memories: SOVA decisions and metric differences, soft-value
stores, and the permutation table.

The remaining Verilator warnings are of three kinds:

* output pins left open on purpose;
* parameters in the package that some modules do not use;
* reset used both by flip-flops and by the assertions' `disable iff`.
