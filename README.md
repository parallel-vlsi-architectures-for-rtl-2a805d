# Fully parallel encoder and decoder for a rate 8/9 PCPC LDPC code

This is synthesizable SystemVerilog for an encoder and a fully parallel
sum-product decoder for one low-density parity-check code. The code has
k = 512 message bits, n = 576 codeword bits and rate 8/9. It is built as a
*parallel concatenated parity check* (PCPC) code. The point of this
construction is that both the parity-check matrix H and the generator
matrix G are sparse. As a result, the encoder is just a layer of XOR trees
and needs no dense matrix multiply, while the decoder can give every node
of the code graph its own hardware.

The architecture is the one published by S. Kim, G. E. Sobelman and
J. Moon in "Parallel VLSI Architectures for a Class of LDPC Codes"; figure
numbers in the source comments (Fig. 2 encoder, Fig. 3 decoder, Fig. 4
Cell-A2, Fig. 5 Cell-B, Fig. 6 the f() table) refer to that paper.

## The code

`P1` is a 16 x 512 matrix. Row `r` has 32 consecutive ones, in columns
`32r .. 32r+31`. Its three column-permuted copies are `pi_1(P1)`,
`pi_2(P1)` and `pi_3(P1)`. Stacking `P1` and the three copies gives a
64 x 512 matrix `P`. From it:

* `H = [ I64 | P ]` is 64 x 576. Each row has weight 33. Parity columns
  have weight 1 and message columns have weight 4. In total H has 2112 ones,
  so the code graph has 2112 edges.
* `G = [ P ; I512 ]`, so each codeword is `c = {parity[0..63], m[0..511]}`.
  Codeword bit `i < 64` is parity bit `i`. Codeword bit `64 + j` is message
  bit `j`.

Any fixed set of three permutations gives a valid code. This design uses
the following permutations. They are defined in `rtl/ldpc_pkg.sv` as the
function `perm()`:

    pi_g(j) = ( C_g * bitrev9( (A_g * j + B_g) mod 512 ) + D_g ) mod 512

| g | A   | B   | C   | D   |
|---|-----|-----|-----|-----|
| 1 | 303 | 13  | 475 | 424 |
| 2 | 391 | 481 | 171 | 17  |
| 3 | 511 | 35  | 63  | 16  |

Each step is a bijection on 0..511, because the multipliers are odd. Message
bit `j` of group `g` lands in check `16g + pi_g(j)/32`. These constants were
picked from random candidates. The goal was to keep small the largest number
of message bits that any two checks share; for these constants it is 6.
Short cycles cannot be avoided entirely: a row of 32 bits must spread over
16 checks of each other group, so some pairs of checks always share bits.
**If you need the code to match another implementation, replace `perm()`.**
Everything else, including the encoder, the interleavers and the syndrome
check, derives from that one function.

## Encoder

`ldpc_encoder` has four branches. Each branch feeds the 512-bit message
through a permutation (`pcpc_permute`), which is pure wiring; the first
branch uses the identity. Each permutation is followed by a `parity_check`
unit: 16 XOR trees, each over 32 consecutive bits. Together the branches
produce the 64 parity bits in five XOR levels.

`p2s_converter` then sends the 576-bit codeword to the channel one bit per
clock, bit 0 (parity bit 0) first.

Handshake:

* A message is accepted on `m_valid && m_ready`.
* The codeword starts on `c_bit` in the next clock.
* `c_first` and `c_last` mark the codeword's first and last bits.
* `m_ready` is also high during the last bit, so codewords follow each
  other without a gap: one codeword every 576 clocks.

## Decoder

### Datapath

`ldpc_decoder` runs the log-domain sum-product algorithm with one hardware
unit per node of the code graph. It is built from these units:

* **Cell-A1** (`cell_a1`, 64 of them): the bit nodes of the parity bits.
  Each has a single check neighbour. Its outgoing message is therefore just
  the channel prior, and its hard decision is `prior + r >= 0`.
* **Cell-A2** (`cell_a2`, 512 of them): the bit nodes of the message bits.
  1. It adds `(r1+r2) + (r3+r4) + prior` to form the posterior `P_post`.
  2. Each outgoing message is `q_k = sat(P_post - r_k)`.
  3. The hard decision is the inverted sign bit of `P_post`.
* **B2C interleaver** (`b2c_interleaver`): routing only. It places the
  2112 bit-to-check messages in check order. Edge `33c` is the parity bit of
  check `c`. Edges `33c+1 .. 33c+32` are its message bits, in `P1` column
  order.
* **Pipeline register 1** (`msg_register`): 2112 x 6 bits.
* **Cell-B** (`cell_b`, 64 of them, 33 inputs each): the check nodes. They
  compute `|r_k| = f( sum_{j != k} f(|q_j|) )` with
  `f(x) = log((e^x+1)/(e^x-1))`. This is split into four parts:
  * `lut_b1` forms `f(|q_j|)`.
  * One adder forms the 12-bit total of all 33 values.
  * 33 subtractors each remove their own term, and each result is saturated
    to 15.75.
  * `lut_b2` applies `f` again and attaches the sign. The sign comes from a
    33-input XOR of the sign bits, with each output's own sign bit XORed back
    out.
* **Pipeline register 2**: 2112 x 6 bits, holding the check-to-bit messages.
* **C2B interleaver** (`c2b_interleaver`): the inverse routing, back to the
  Cell-A inputs.
* **Support logic:**
  * a 576-word store for the channel priors;
  * `syndrome_check`, which computes H·x̂ with the same permutation and XOR
    units as the encoder;
  * `decoder_ctrl`, the iteration controller.

### Number formats

All messages use the (6,2) format: 6-bit two's complement with 2 fraction
bits, covering −8.00 .. 7.75 in steps of 0.25.

| Quantity | Format |
|---|---|
| Cell-A2 outgoing messages before saturation | (8,2). Each is a sum of four messages, so it always fits. |
| `P_post` | 9 bits. It sums five messages, so it needs one more bit than (8,2) to keep its sign exact. |
| LUT-B1 output and saturated check sums | Unsigned (6,2), 0 .. 15.75 |
| Check-node adder | 12 bits, unsigned |

The `f` table is `round(4·f(k/4))`, clipped to 63:

| k     | 0  | 1 | 2 | 3 | 4 | 5–6 | 7–11 | ≥ 12 |
|-------|----|---|---|---|---|-----|------|------|
| value | 63 | 8 | 6 | 4 | 3 | 2   | 1    | 0    |

`lut_b2` also clips its magnitude to 31 (7.75) so that the signed output
fits. Both tables are written as case statements (combinational logic), not
as memories.

### Sign convention

A positive LLR means that bit 1 is more likely. This follows from the
hard-decision rule: x̂ is the *inverted* sign bit of the posterior. Each
check node's output is computed from its 32 other inputs, an even number.
So in this convention a check message is negative exactly when the XOR of
the other inputs' sign bits is 0. This inversion lives in `lut_b2`.

**If you change the LLR convention, this is the line to change.**

### Schedule and timing

A decode runs as follows:

1. **Clock 0:** `start` is sampled. The priors are stored and pipeline
   register 2 is cleared, so the first bit-to-check messages equal the
   priors.
2. **Phase A, one clock:** the Cell-A units read the check-to-bit register,
   and the bit-to-check register is loaded.
3. **Phase B, one clock:** the Cell-B units read the bit-to-check register,
   and the check-to-bit register is loaded.

Phases A and B repeat, so each iteration takes two clocks. At the start of
each phase A after the first, the hard decisions of the iteration just
finished are tested. If H·x̂ = 0, or if `MAX_ITER` iterations (default 20)
have run, the decode stops:

* the decisions are latched;
* `done` pulses;
* `iterations` and `converged` give the outcome.

A decode of n iterations therefore raises `done` 2n+1 clocks after the
start edge. The controller ignores `start` while `busy` is high.

The critical path runs through Cell-A, the B2C wiring and the syndrome
tree in phase A, and through the whole of Cell-B in phase B. Both phases
are single-cycle combinational paths.

## Interfaces

The top, `ldpc_codec`, contains the encoder and the decoder side by side.
The channel between them is not part of the design.

| Signal | Direction | Meaning |
|---|---|---|
| `clk` | in | clock |
| `rst` | in | synchronous reset, active high |
| `m_valid`, `m_ready`, `m[511:0]` | in, out, in | message input handshake |
| `c_bit`, `c_valid`, `c_first`, `c_last` | out | serial codeword |
| `enc_parity[63:0]` | out | parity bits of the current `m` (combinational) |
| `dec_start` | in | start a decode; `llr` is sampled in this cycle |
| `llr[576]` | in | (6,2) channel LLRs in codeword order; positive means 1 |
| `dec_busy`, `dec_done` | out | decoder state; `done` pulses when results are valid |
| `dec_x_hat[575:0]`, `dec_info[511:0]` | out | hard decisions (all bits / message bits) |
| `dec_converged`, `dec_iterations` | out | stopped on a zero syndrome; iterations used |

## Size

Each pipeline register holds 12,672 flip-flops, and the prior store holds
3,456. The check nodes dominate the logic: there are 2112 copies of each
LUT plus 64 adders with 33 inputs. The encoder is only 64 XOR trees with 32
inputs. Expect a large netlist. The decoder flattens to about 640 node units
and roughly 30k flip-flops.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` at the end. `tb/ldpc_ref_pkg.sv` holds the
reference models:

* an encoder written from the rows of H;
* an AWGN channel with BPSK modulation and (6,2) LLR quantization;
* a loop-based fixed-point sum-product decoder.

The reference decoder follows the hardware's formats and schedule, so the
hardware can be compared with it bit for bit, iteration count included. Its
`f` tables are computed in floating point, not copied from the RTL.

| Testbench | What it covers |
|---|---|
| `tb_ldpc_codec` | End to end, at default parameters. It runs back-to-back codewords through the encoder and decodes each one after the channel. It checks the results against the reference and checks the latency. It also requires each mechanism to occur at least once: back-to-back encoding, stopping on the syndrome, stopping at the iteration limit, saturated bit-to-check messages, and check messages clipped at f(0). |
| `tb_ber_sweep` | Bit error rate from 1.0 to 6.0 dB Eb/N0 with up to 20 iterations. It uses 25 frames per point, and every frame is checked against the reference. Raise `FRAMES` for smoother curves. |
| `tb_ldpc_decoder`, `tb_ldpc_encoder` | Full-size subsystems |
| Cell and LUT testbenches | Exhaustive or random comparison with integer models |
| Interleaver, permutation and syndrome testbenches | Checked against the rows of H built independently in the testbench |

In one run with 25 frames per point, the decoder made no message-bit errors
at 5.5 dB and 6 errors in 12,800 bits at 6.0 dB; below 4 dB the bit error
rate stays at a few percent. With this few frames the numbers vary from run
to run.

To simulate, for example the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_codec.sv \
        --top-module tb_ldpc_codec -Mdir obj && ./obj/Vtb_ldpc_codec

Building the full-size decoder takes about 1.5 minutes, and a frame
simulates in milliseconds. Verilator simulates with two states, so the
testbenches reset or clear everything they read. The message registers
have no reset; the decoder clears the one it reads at every start.

## Design choices and departures

Several parts of this design are choices made here, not fixed by the
published architecture:

* **Parallel-to-serial converter:** the handshake and the bit order.
* **Decoder control:**
  * the two-clock iteration schedule;
  * the prior store;
  * clearing the check-to-bit register at start;
  * testing the syndrome after each iteration (never before the first).
* **Cell-A2:** the extra bit on `P_post`.
* **Check node:**
  * rounding to nearest in the `f` table;
  * the 7.75 clip in `lut_b2`;
  * treating the check-node sum as unsigned.

The permutations `pi_1..pi_3` are this design's own, as described above.
The published architecture only requires that they be independent random
column permutations. As a result, error-rate curves will match other
implementations of the code only in shape.

The controller, the syndrome checker and the prior store are the design's
additions around the published datapath. The datapath itself follows the
published block structure: Cell-A1/A2, B2C, two registers, Cell-B and C2B.
