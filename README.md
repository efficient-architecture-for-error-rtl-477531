# Double-state Viterbi detector with fast add-compare-select

A Viterbi decoder's critical loop is the add-compare-select (ACS) recursion
in the path-metric unit. A conventional ACS adds a branch metric to each of
two predecessor metrics and then compares the two sums. That takes two adders
in front of a comparator.

This design uses a *double-state* trellis, where both transitions into a
state carry the same branch metric. The sum can then be formed after the
choice:

    SM_k(n+1) = min(SM_i(n), SM_j(n)) + BM_k(n)

Each state then needs one comparator, one multiplexer and one adder. The
compare no longer waits for an addition.

The RTL builds a decoding core around that ACS. The core has a path-metric
unit whose clock is gated, a survivor memory, a traceback unit and a
first-in-last-out (FILO) buffer. The top level uses the core twice, side by
side:

- **Channel detector.** A maximum-likelihood sequence detector for a channel
  with intersymbol interference.
- **Convolutional decoder.** A decoder for a rate-1/2, K = 3 convolutional
  code. A matching encoder is included. It is not wired to the decoder inside
  the top level.

Only the branch-metric unit differs between the two.

## Where the double state comes from

The detector targets a channel with intersymbol interference:

    H(D) = h0 + h1*D + ... + hN*D^N + 0*D^(N+1)

The input bits a(n) are in {0,1}. The channel is modelled with one more tap
than it really has, and that last tap is zero. The trellis therefore has
2^(N+1) states rather than 2^N.

- **State.** A state holds the last N+1 input bits. Bit 0 is the newest and
  bit N the oldest.
- **Transition.** Input a moves state s to `{s[N-1:0], a}`.
- **Predecessors.** State k is reached from `i = k >> 1` and
  `j = (k >> 1) | 2^N`. These two differ only in their oldest bit.
- **Same metric.** The ideal channel output of a transition,
  `y = h0*a(n) + ... + hN*a(n-N)`, is a function of the ending state alone.
  The bit that tells i from j meets the zero tap. So both transitions into k
  have the same branch metric BM_k.

The default is N = 1 with H(D) = 1 + D, a partial-response channel of the
kind used for bit detection in storage. This gives four states, 00 to 11. One
unit of the channel is 16 LSBs of the 6-bit received sample, so the ideal
outputs are 0, 16, 16 and 32 for states 00, 01, 10 and 11.

## The same trick for a convolutional code

A rate-1/n code with constraint length K forms each code word from the
current input bit and the K−1 bits before it. Take a double-state trellis
with N = K − 1. Its states then hold exactly those K bits, so the code word
of a transition is again a function of the ending state alone.

The default (7,5) octal code therefore runs on an 8-state double-state
trellis with the same core. Its branch metric is the Hamming distance between
the received hard-decision code bits and each state's code word
(`code_branch_metric_unit`). This costs twice the states of the usual 4-state
trellis for this code, but it keeps one adder per state.

## Data path

```
rx_sample ─► branch_metric_unit ──────┐
              |r − y_k| per state     ▼
                                 viterbi_core (×2)
code_in ───► code_branch_metric_unit ─┘   path_metric_unit ─► survivor_memory ─► traceback_unit ─► filo_buffer ─► dec_bits
              Hamming per state           fast_acs per state,  1 bit/state/stage   2 stages/cycle     ping-pong stacks
                                          gated registers
```

| module | role |
|---|---|
| `viterbi_pkg` | Default sizes and the path-metric width rule. |
| `viterbi_core` | The metric-independent decoder: clock gate, path-metric unit, survivor memory, traceback unit, FILO, and the traceback scheduling. |
| `code_branch_metric_unit` | Gives the Hamming distance between `code_in` and the code word of each ending state. It is combinational. |
| `branch_metric_unit` | Gives `bm[k] = |r − y_k|`, saturated to BM_W bits. It is combinational. |
| `fast_acs` | The ACS for one state. It does a modulo compare of `sm_i` and `sm_j`, selects the smaller, adds `bm`, and outputs a decision bit (1 = j chosen). |
| `path_metric_unit` | One `fast_acs` per state, connected by the trellis. It holds the state-metric registers and finds the best state. |
| `clock_gate` | A latch and an AND gate. It stops the clock of the metric registers and survivor memory when `rx_valid` is low. |
| `survivor_memory` | A ring of 3·TB_LEN words with one decision bit per state. It has one write port and two asynchronous read ports. |
| `traceback_unit` | Follows the survivor path back from the best state. |
| `filo_buffer` | Turns the traced bits back into time order. |
| `conv_encoder` | A rate-1/n convolutional encoder (K = 3, generators 7 and 5 octal), with a registered output. |
| `viterbi_top` | The channel detector (`rx_*` → `dec_*`), the encoder (`enc_*`) and the code decoder (`code_*` → `cdec_*`), side by side. |

## Path-metric arithmetic

The metrics are never normalised. They are kept modulo 2^PM_W, and each
compare takes the sign bit of the wrapped difference. This is correct as long
as all live metrics lie within 2^(PM_W−1) of each other.

The width comes from the rule

    PM_W = ceil(log2 Bmax + log2(4·(K−1)))

Here Bmax is the largest branch metric and K is the constraint length. For
this trellis K = N + 2, because the shift register holds N + 1 bits. With
Bmax = 63 and K = 3, PM_W is 9 bits. For the code decoder, Bmax = 2 and
K = 4, so PM_W is 6 bits.

The actual spread is much smaller. From any state, every state can be reached
in N + 1 = 2 steps, so the spread is at most 2·63 = 126, well under 256.

On ties, the ACS picks predecessor i and the best-state search picks the
lowest index. At reset all metrics are zero, meaning the starting state is
unknown.

## Traceback schedule

This is the least obvious part of the design. The survivor memory is split
into three blocks of TB_LEN stages each (default 16), used as a ring.

1. **Writing.** Each stage that carries a sample writes one decision word.
   The word has one bit per state.
2. **Starting a traceback.** When the last stage of a block has been written,
   and at least two blocks exist, `tb_start` rises for one cycle. In that
   cycle the metric registers still hold that stage's metrics. `best_state`
   is therefore the right starting point even if a new sample arrives in the
   same cycle.
3. **Tracing.** `traceback_unit` walks back 2·TB_LEN stages, two stages per
   cycle, using both read ports. One step from state s at stage t:
   - the decoded bit for stage t is `s[0]`;
   - the state one stage earlier is `{decision[t][s], s[N:1]}`.
   
   The first TB_LEN stages are only for convergence. The next TB_LEN stages
   are decoded and pushed into the FILO, two bits per cycle, as {newer, older}.
   A traceback takes TB_LEN cycles.
4. **Keeping up.** A new block is written over TB_LEN samples, which is never
   fewer than TB_LEN cycles. So a traceback always ends before the next one
   starts. The top-level module asserts this. The third memory block is the
   one being written while the other two are being traced.
5. **Reordering.** `filo_buffer` has two stacks of TB_LEN/2 two-bit words.
   The traceback fills one stack while the other is emptied, one word per
   cycle, last word pushed first. Because the traceback runs backwards in time,
   this puts the bits back in time order.

**Output.** `dec_valid` is high with `dec_bits`: bit 0 is the earlier stage
and bit 1 the later one. Each traceback releases TB_LEN/2 words on
consecutive cycles.

**Latency.** The first word of a block appears TB_LEN + 2 clock edges after
the edge that writes the last stage of the *following* block. A given sample
therefore waits for between TB_LEN and 2·TB_LEN − 1 further samples, plus
TB_LEN + 2 to 1.5·TB_LEN + 1 cycles. The last stream samples that do not fill
two complete blocks stay in the memory until more samples arrive. The design
has no flush or trellis termination.

## Clock gating

`clock_gate` is the standard integrated clock-gating cell: a latch that is
transparent while `clk` is low, followed by an AND gate. `viterbi_top` drives
the state-metric registers and the survivor memory from the gated clock.
Their enable is `rx_valid`, so with no sample they do not toggle at all. The
write pointer, the traceback and the FILO run on the free clock. The latch in
`clock_gate` is intended; a real chip would use the library's ICG cell
instead.

## Parameters (`viterbi_top`)

| name | default | meaning |
|---|---|---|
| `N` | 1 | Channel order. The trellis has 2^(N+1) states. |
| `RX_W` | 6 | Width of the unsigned received sample. |
| `BM_W` | 6 | Width of a branch metric. Metrics saturate. |
| `H0`, `H1` | 16, 16 | Channel taps, in LSBs of the sample. Any higher taps are zero. |
| `TB_LEN` | 16 | Stages of convergence, and stages decoded per traceback. Must be even. |
| `ENC_K`, `ENC_N` | 3, 2 | Code constraint length and number of code bits. The code decoder has 2^ENC_K states. |
| `ENC_G` | 7, 5 (octal) | Generators. Bit ENC_K−1 taps the current input and bit 0 the oldest. |

`PM_W` is computed from `BM_W` and `N`. Both decoders use the same `TB_LEN`. The branch-metric unit supports only
the two taps h0 and h1. For N > 1, the other taps are taken as zero.

## What is specified and what is chosen

These points come from the method itself:

- the double-state trellis;
- the ACS equation above, with one comparator, one multiplexer and one adder
  per state;
- modulo path metrics and the width rule;
- clock gating of the path-metric unit;
- a survivor memory with one bit per state per stage;
- traceback, followed by a first-in-last-out buffer to restore order;
- a convolutional encoder built from a shift register with XOR taps;
- the use of the same structure for convolutional decoding.

These are this design's own choices:

- the channel (1 + D) and the 16-LSB scaling;
- the absolute-difference branch metric (a squared distance would also do);
- the 6-bit sample width;
- TB_LEN = 16 and the sliding-block schedule with two traceback steps per
  cycle;
- the three-block survivor ring with two read ports;
- the ping-pong FILO;
- the best-state start of each traceback;
- zero reset metrics and the tie rules;
- the (7,5) code and hard-decision Hamming metrics for it.

These are not built:

- **Soft-decision code metrics.** The code decoder takes hard decisions
  only.
- **More than two input levels.** Only binary inputs are handled.
- **A conventional two-adder ACS.** The comparison baseline is not included.

The two `fast_acs` instances that share a predecessor pair make the same
comparison. Synthesis may merge them.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl rtl/viterbi_pkg.sv tb/tb_viterbi_top.sv --top-module tb_viterbi_top
./obj_dir/Vtb_viterbi_top
```

`tb_viterbi_top` runs the whole design at its default parameters.

For the channel detector:

1. It sends 640 random bits through the 1 + D channel with noise, with random
   idle cycles in between.
2. In the first half the noise is below half the level spacing, and the
   decoded bits must equal the bits sent.
3. In the second half the noise is larger. The output must match a software
   Viterbi model in the testbench that uses the same metric, tie rules and
   traceback schedule.
4. It checks the latency of each decoded block, and that the metrics hold
   while the clock is gated.
5. It counts that each of these happens at least once: gated idle cycles,
   tracebacks, FILO bank swaps, both ACS choices, metric wrap-around, and a
   non-zero start state.

For the convolutional path:

1. It encodes 480 random bits and checks the encoder's equations.
2. It flips one code bit in every 12th code word and feeds the words to the
   code decoder, with idle gaps.
3. The decoded bits must equal the bits sent. All 39 errors must be
   corrected.

`tb_viterbi_core` repeats the detector test on the core alone. There the
branch metrics are computed by the testbench.

The unit testbenches check each block against values computed independently
in the testbench:

- the ACS and path-metric unit, against unbounded-integer models;
- the branch metrics, over every sample value, and the code metrics, over
  every code word and state;
- the traceback, against a reference traceback of a random decision memory,
  including its timing;
- the FILO, for order and the one-cycle delay to its first output;
- the clock gate, for no glitches and one edge per enabled cycle.
