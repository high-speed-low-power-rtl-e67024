# Hybrid Viterbi decoder for a K = 3, rate-1/3 convolutional code

A Viterbi decoder spends most of its effort on survivor-path bookkeeping: remembering, for every
trellis state, which input bits led there. The two classic schemes pull in opposite directions.
*Trace-back* writes one decision bit per state per stage into a memory and later walks backwards
through it, which needs many reads and delivers bits in reverse order. *Register exchange* keeps
a register of decoded bits per state and copies whole registers between states on every stage,
which is fast but toggles a lot of flip-flops.

This design uses a hybrid of the two. It relies on one property of a shift-register code: after
`m = K-1` stages, a state's bits are exactly the last `m` input bits, whatever state the path
started in. So the survivor registers only need to be copied once every `m` stages. In between,
a tiny survivor memory holds the last `m` decision vectors, and a short trace back of `m` steps
finds which state each register must be copied from. The copy is `m` positions long. The state
bits themselves fill in the `m` newest positions. Register traffic drops by a factor of `m`, and
there is no large trace-back RAM. The whole decoder is built from flip-flops and logic, with no
memory macro.

The repository holds the matching convolutional encoder and the decoder, both written in
synthesizable SystemVerilog, with self-checking testbenches for every block.

## The code

| item | value |
|---|---|
| constraint length `K` | 3 (two memory registers, `m0` and `m-1`) |
| rate | 1/3: three output bits `n1, n2, n3` per input bit `m1` |
| generators (taps on `m1, m0, m-1`) | `G1 = 111`, `G2 = 011`, `G3 = 101` |
| equations | `n1 = m1^m0^m-1`, `n2 = m0^m-1`, `n3 = m1^m-1` |
| code word packing | `{n1, n2, n3}`, `n1` in the MSB |
| decoding | hard decision, Hamming-distance branch metrics |

**Trellis convention** (used by every block): a state is the `K-1` most recent input bits, the
newest in the MSB. With `M = K-1`:

- From state `p`, input `u` leads to `{u, p[M-1:1]}`.
- State `s` has the predecessors `{s[M-2:0], b}`, for `b` = 0 or 1.
- The ACS decision bit of `s` is that `b`.
- The input bit that led into `s` is `s[M-1]`.

The code, widths and defaults live in `rtl/viterbi_pkg.sv`.

## Block structure

```
           viterbi_top
 ┌───────────────────────────────────────────────────────────────────────────┐
 │  enc_in_* ──► conv_encoder ──► enc_out_*          (transmit side)         │
 │                                                                           │
 │  in1 ──► bmu ──► acsu (4 × acs_unit + path metrics) ──► smu ──► hybrid_unit ──► out1
 │                   │ best_state ─────────────────────────────────►  ▲      │
 │                   └────────── viterbi_decoder ─────────────────────┘      │
 └───────────────────────────────────────────────────────────────────────────┘
```

| module | role |
|---|---|
| `conv_encoder` | Rate-1/N encoder. After a bit flagged `in_last` it shifts in `K-1` zeros, so the registers return to zero (flush termination). |
| `bmu` | Branch metric unit. XORs the received word with each of the `2**N` code words and counts the differing bits into a 3-bit metric. The metric table is registered. |
| `acs_unit` | One add-compare-select. Two path metrics plus two branch metrics; the smaller sum wins and gives the decision bit. |
| `acsu` | One `acs_unit` per state, the path-metric registers, and a search for the best (smallest-metric) state. |
| `smu` | Survivor memory: a serial-in serial-out shift register of decision vectors, `K-1` stages deep. |
| `hybrid_unit` | The trace-back-then-copy survivor registers and the output buffer (next section). |
| `viterbi_decoder` | BMU → ACSU → SMU → hybrid unit, with the clock-enable handshake. |
| `viterbi_top` | Encoder and decoder side by side. They share only clock and reset; the channel is outside. |

## How the hybrid unit works

Each of the `2**M` states owns a `REG_LEN`-bit register (default 16). Bit 0 holds the newest
decoded bit. The unit counts trellis stages in groups of `M`. When a group closes after stage `j`,
two things hold:

- the survivor memory holds the decisions of stages `j` and `j-1` (`sm[0]` and `sm[1]` for `M = 2`);
- the ACSU's path metrics belong to the states at time `j+1`.

The unit then runs two phases, each one clock cycle:

1. **Trace phase (first stage of the next group).** For every state `s`, it follows the `M`
   stored decisions backwards: `st = {st[M-2:0], sm[k][st]}` for `k = 0 .. M-1`. The result
   `ptr[s]` is the state the survivor of `s` occupied `M` stages earlier. All `ptr[s]` are
   latched. So is the ACSU's current best state.
2. **Store phase (next stage).** Every register is rewritten as

   `reg[s] <= { reg[ptr[s]][REG_LEN-M-1:0], s[0], s[1], ..., s[M-1] }`

   The ancestor's history moves up by `M` places. The `M` newest places are the bits of `s`
   itself: `s[M-1]`, the newest input bit, lands in bit 0. In the same cycle, the `M` oldest bits
   of the latched best state's new register go into an `M`-bit output buffer.

Between loads, the output buffer shifts once per stage and presents its oldest bit on `out1`. It
therefore delivers exactly one decoded bit per stage, in order. The next group's trace phase
reuses the cycle that follows the store, so the phases never overlap. They use separate
registers, so the scheme stays correct even if they did.

Copying a register from `ptr[s]`, which was itself built the same way, is equivalent to a full
trace back from `s` through every stored decision. `tb_hybrid_unit` and `tb_viterbi_decoder`
check the hardware bit for bit against such a full trace back.

**Decision depth.** A bit leaves the register `REG_LEN` stages after it entered, give or take
the group alignment. `REG_LEN` therefore plays the role of the traceback depth. The default of 16
(about `5K`) makes the best-state output match a full-history maximum-likelihood decision in the
tests, even when a quarter of the received bits are flipped.

## Path metrics

- Metrics are `PM_W = 8` bits wide and are never normalised. They wrap modulo 256 and are
  compared by the sign of their 8-bit difference.
- This is exact as long as all live metrics stay within 127 of each other. Any state reaches any
  other in `K-1` stages, so the spread is at most about `(K-1)·N` = 6 plus the initial offset.
- At reset, state 0 starts at 0 and the others at 32 (`2**(PM_W-3)`), because the encoder starts
  in the zero state.
- Ties: in `acs_unit` predecessor 0 wins; in the best-state search the lowest state index wins.

## Interfaces and timing

**Decoder** (`viterbi_decoder`, and the receive side of `viterbi_top`):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | clock; synchronous active-high reset |
| `clk_enable` | in | 1 | global clock enable: when high, `in1` is taken as the next received word and the whole pipeline advances one stage |
| `in1` | in | `N` | received hard-decision code word `{n1,n2,n3}` |
| `ce_out` | out | 1 | `out1` carries a decoded bit |
| `out1` | out | 1 | decoded bit, in message order |

- **Throughput:** one received word in and one decoded bit out per enabled cycle.
- **Latency:** the bit of the word presented in the `i`-th enabled cycle after reset appears on
  `out1` in enabled cycle `i + REG_LEN + 3` (19 by default). The latency is made up of one BMU
  register stage, one stage to enter the survivor memory, the trace and store phases, and the
  register length.
- `ce_out` stays low for the first `REG_LEN + 3` enabled cycles and whenever `clk_enable` is low.
- The decoder runs continuously and knows nothing of frames. To push out the last bits of a
  message, keep supplying words, for example the encoder's flush words followed by zero words.

**Encoder** (`conv_encoder`, and the `enc_*` ports of `viterbi_top`):

- Handshake: `in_valid` / `in_bit` / `in_last` / `in_ready`.
- A bit accepted in cycle `t` gives its code word on `out_sym` with `out_valid` in cycle `t+1`.
- After `in_last`, `in_ready` stays low for `K-1` cycles while the zero flush words go out.
- `out_last` marks the final flush word.

## Where this design departs from, or adds to, its source description

The source describes the code, the BMU/ACSU/SMU split, the hybrid method and an FPGA result. The
following are this design's own choices or readings:

- **Branch metric counter.** The source builds the bit counter from flip-flops, each clocking the
  next (a ripple counter). Here the count is a combinational population count, so the design has
  a single clock; the metric value is the same.
- **Input width.** The published simulation shows the decoder input as a pair of 3-bit values,
  and the published pin count fits a 6-bit input. That looks like a rate-1/2 soft-decision
  configuration, which the text never describes. This design decodes the rate-1/3 hard-decision
  code the text does describe.
- **Unspecified sizes.** These are this design's choices:
  - survivor register length (16);
  - path metric width (8);
  - survivor memory depth (`K-1`, read as the span the hybrid method traces back);
  - group length `m = K-1`.
- **Unspecified behaviour.** These are also this design's own:
  - reset behaviour and initial metrics;
  - tie rules;
  - output taken from the best state;
  - meaning of `clk_enable` and `ce_out`;
  - the encoder handshake.
- **Register stages.** The published schematic has register stages after the inputs, after the
  branch metrics, after the ACS outputs and before the output; their exact depth is not given.
  This implementation registers the branch metrics, the path metrics, the survivor memory, the
  hybrid unit's latches and the output buffer, with no separate input or output delay register.
- **Not implemented.** Puncturing, which is mentioned but with no pattern given. The reported
  FPGA figures (110 MHz, 113 mW, 3,673 slice registers) belong to a larger decoder than this
  `K = 3` one. They are not reproduced: at the defaults this design has about 155 flip-flops in
  total.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=<n> failures=<n>`. Each has a
watchdog.

| testbench | what it checks |
|---|---|
| `tb_conv_encoder` | Every code word against the written-out equations. Two flush words after each frame, `in_ready` low during the flush, `out_last`, idle cycles. |
| `tb_bmu` | All 8 metrics for every received word, against a bit-by-bit count. Metrics hold while `en` is low. |
| `tb_acs_unit` | Random metrics across the wrap-around point, against unwrapped integer sums. Ties included. |
| `tb_acsu` | Decisions, stored metrics (mod 256) and best state each stage, against an integer Viterbi recursion. Metrics wrap many times. |
| `tb_smu` | Shift behaviour with random enables. |
| `tb_hybrid_unit` | Random decisions and best states. Each output bit against a full trace back, the exact latency, and one trace phase and one store phase per `M` stages. |
| `tb_viterbi_decoder` | First, sparse channel errors: the output must equal the message. Second, 25 % bit errors: the output must equal an integer full-history Viterbi reference, bit for bit. Random `clk_enable` gaps and exact latency in both runs. |
| `tb_viterbi_top` | Default parameters. Random frames through encoder, channel (isolated single-bit errors) and decoder, with the decoder stalled whenever the encoder idles. It counts, and requires, flush terminations, stalls, corrected errors, trace/store phases and outputs taken from a non-zero best state. |

The testbenches are written for the default code (`K = 3`, rate 1/3). The RTL itself is
parameterised in `K`, `N`, `GEN`, `PM_W` and `REG_LEN`, but other codes have not been simulated.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/viterbi_pkg.sv tb/tb_viterbi_top.sv \
          --top-module tb_viterbi_top -Mdir obj_top
./obj_top/Vtb_viterbi_top
```

Replace `tb_viterbi_top` with any other testbench name to run that test instead. Each one
finishes in well under a second. The testbenches use only two-state values and `$urandom`.

## Changing it

- **Another code.** Set `K`, `N` and `GEN` on `viterbi_top` or `viterbi_decoder`. `GEN` is
  packed `[N-1:0][K-1:0]`; the first element is the generator of the MSB output, and bit `K-1`
  taps the newest input bit.
  - Keep `BM_W >= $clog2(N+1)`.
  - Keep `REG_LEN > K-1`, roughly 5K or more.
  - Keep `PM_W` large enough that `2**(PM_W-1)` exceeds the metric spread plus the reset offset.
- **Latency against accuracy.** `REG_LEN` trades decoding latency (`REG_LEN + 3`) against
  accuracy at high error rates.
