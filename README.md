# Reversible multiple-stream Viterbi coding

This design sends several parallel data streams over a noisy channel and
protects them twice:

1. **Within each stream**: every stream is convolutionally encoded
   (constraint length K = 3, rate 1/2, generators g1 = 1 + D + D², g2 = 1 + D²)
   and decoded with a hard-decision Viterbi decoder.
2. **Across streams**: before encoding, the batch of stream bits is made
   *reversible*. Each stream's single data bit becomes an S-bit message, and
   the S messages of a batch are all different and are a known function of
   the data bits. After decoding, that relationship is checked. One stream
   that its decoder got wrong can then be repaired from the other streams.
   This covers, for example, three errors in a stream of the K = 3 code,
   which the Viterbi decoder alone cannot correct.

The Viterbi trellis node is built the way a reversible (quantum) circuit
would be built. Its parts are Feynman (controlled-NOT), Toffoli
(controlled-controlled-NOT) and Fredkin (controlled-swap) gates, reversible
half- and full-adders, and an iterative comparator whose selection is done
by Fredkin gates. In RTL each gate is its classical permutation of basis
states, so the result is ordinary synthesizable logic with the gate
structure kept visible. Superposition is not modelled.

## Block hierarchy

```
rv_top                          system: send side + receive side
├── reverser                    batch bits -> S distinct S-bit messages
├── mimo_encoder                S parallel encoders
│   └── conv_encoder            K=3, rate-1/2 encoder
├── viterbi_decoder  (x S)      one trellis level per clock
│   └── qv_cell      (x 4)      trellis node: add-compare-select
│       ├── branch_metric (x2)  2 Feynman + half-adder -> Hamming distance
│       ├── metric_adder  (x2)  half-adder + full-adder chain
│       └── qcm                 comparator with multiplexing
│           ├── q_comparator    iterative comparator network
│           │   ├── comparator_cell (xN)  uses 2 q_subtractor + Toffolis
│           │   └── comparator_output
│           └── fredkin_gate (xN)
└── rev_corrector               mapping check and single-stream repair
    ├── reverser (x3)
    └── q_eq_n -> q_eq_comparator   N-bit equality from 2-bit slices
```

Gate primitives: `feynman_gate`, `toffoli_gate`, `fredkin_gate`,
`q_half_adder`, `q_full_adder`, `q_subtractor`, `q_eq_comparator`.
The code constants and trellis helper functions are in `viterbi_pkg`.

## The trellis node (`qv_cell`)

This block carries most of the design, so it is described in detail.

A node (a state of the 4-state trellis) has two entering branches, each from
one predecessor state. For each branch:

* **Branch metric** (`branch_metric`). Two Feynman gates XOR the received
  symbol {A1, A2} onto the branch label {B1, B2}. A reversible half-adder
  then adds the two difference bits. Its result `{carry, sum}` is the
  Hamming distance 0, 1 or 2.
* **Path metric** (`metric_adder`). The 2-bit distance is added to the
  predecessor's W-bit survivor metric. Bit 0 uses a half-adder, bit 1 a
  full-adder, and each further bit one more full-adder with a zero operand.
  The sum has W+1 bits, so the basic node (W = 2) compares 3-bit metrics.

The two sums X (first branch) and Y (second branch) go to the
**comparator with multiplexing** (`qcm`):

* `q_comparator` is an iterative network. Its cells scan the digits from
  the most significant one and carry two flags: "X greater so far" and
  "X smaller so far". The first differing digit sets one flag, and the other
  flag then blocks any later change:
  `g' = g | (~l & x & ~y)`, `l' = l | (~g & ~x & y)`.
  The per-digit terms `x & ~y` and `~x & y` are the borrows of two
  reversible half-subtractors. Toffoli gates combine them with the flags
  (an OR is a Toffoli on inverted inputs with the target preset to 1).
  An output circuit gives lt, eq and gt.
* `o1 = (X < Y)` drives one Fredkin gate per metric bit. The smaller metric
  leaves on `min_o` and the other on `max_o`.

**Tie rule.** When X = Y, o1 is 0 and the second branch survives; `tie`
reports the event. The second branch comes from the predecessor whose oldest
register bit is 1. This fixed choice replaces the coin flip of the textbook
algorithm.

Composite blocks tie their ancilla inputs to 0 and leave garbage outputs
unconnected. The gate modules keep all their outputs, and their testbenches
check that each gate is one-to-one.

## Code and trellis conventions

* A state is the encoder's 2-bit shift register, newest bit in the MSB. The
  states a, b, c, d of the usual trellis drawing are 00, 10, 01, 11.
* A symbol is `{path #1 bit, path #2 bit}`, sent in that order.
* A message of L bits is followed by K-1 = 2 zero tail bits, which return
  the encoder to state 00. A message therefore sends L+2 symbols.
* Worked values the testbenches use: 10011 -> 11 10 11 11 01 01 11, and
  101 -> 11 10 00 10 11. The received word 01 10 10 10 11 decodes to 101
  with metric 2. The triple-error word 11 00 01 00 00 (sent: all zeros)
  decodes wrongly to 100, because the correct path is dropped at level 3.

## The reverser (batch to reversible messages)

For a batch of S bits (stream i supplies `data[i]`), the reverser builds a
table with one row per stream. The data bit is in the rightmost column.
S-1 auxiliary columns are then added from right to left:

* **Column 1**: 0 in the first ceil(S/2) rows and 1 below.
* **Column c > 1**: rows that equal each other in columns 0..c-1 form a
  group. In a group of n rows, the first ceil(n/2) get 1 and the rest get 0.
  A row that is already unique gets the complement of its own column c-1.

Each step at least halves every group, so after S-1 columns all rows differ.
Row i is stream i's message, sent from its leftmost bit, so the data bit
goes last. For S = 3:

| data {d1,d2,d3} | m1  | m2  | m3  |
|-----------------|-----|-----|-----|
| 0,0,0           | 100 | 000 | 010 |
| 1,0,0           | 101 | 100 | 010 |
| 0,1,0           | 100 | 101 | 010 |
| 1,1,0           | 101 | 001 | 010 |
| 0,0,1           | 100 | 000 | 011 |
| 1,0,1           | 101 | 100 | 011 |
| 0,1,1           | 100 | 101 | 011 |
| 1,1,1           | 101 | 001 | 011 |

The first row of the table is the source construction's only worked
example. Two points are this design's reading of the construction:

* how an odd group is split;
* that the complement rule also applies when every row is already unique,
  which keeps every message S bits long.

## Viterbi decoder (`viterbi_decoder`)

* One trellis level per clock. There are four `qv_cell`s, one per state.
* Survivor metrics are held in registers. Survivor paths use **register
  exchange**: each state has a `MAX_SYM`-bit path register. The winner's
  register is copied, and the decoded bit (the newest bit of the state) is
  written at position `level`.
* **Start of a frame** (`in_first`): state 00 starts at metric 0 and the
  others at BIG = 2·MAX_SYM+1. BIG is larger than any real path metric, so
  only paths that leave state 00 survive. Metrics are
  `PM_W = clog2(4·MAX_SYM+2)` bits wide (6 bits for MAX_SYM = 15), so they
  cannot overflow.
* **End of a frame** (`in_last`):
  * `terminated = 1`: the path ending in state 00 is released.
  * `terminated = 0`: the path with the smallest metric is released, the
    lowest state index winning on equal metrics. This is the truncated-window
    mode for long streams: frames are cut to at least 5K = 15 symbols and
    decisions are close to, but not exactly, maximum likelihood.
* **Timing**: `out_valid` pulses one clock after the last symbol. Frames can
  follow back to back, with a new `in_first` on the clock after `in_last`.
  `out_bits[j]` is the bit decoded at level j.
* `tie_count` counts equal-metric comparisons on reachable paths.
* An assertion rejects frames longer than `MAX_SYM`.

## Repair across streams (`rev_corrector`)

* **Check**: the decoded data column (bit 0 of every decoded message) is
  passed through a reverser. Each decoded message is compared with the
  regenerated one using reversible equality comparators. Differing rows set
  `mismatch` and raise `detected`.
* **Suspects**: a stream is suspect when its decoder distrusts it (in
  `rv_top`: path metric above `CORR_T` = 2) or when it mismatches.
* **Repair**, with exactly one suspect stream k: both values of stream k's
  data bit are run through a reverser. A value is acceptable if it
  regenerates every other message exactly.
  * If both values are acceptable, the one whose message k is nearer in
    Hamming distance to the received message k wins. On equal distance the
    received data bit is kept.
  * Message k is then replaced by the regenerated one (`corrected`).
* **Uncorrectable**: with no acceptable value, or with more than one
  suspect, `uncorrectable` is set and the batch passes through unchanged.

Limits of the repair:

* Stream k's auxiliary bits are always recovered exactly, because the
  trusted rows fix them.
* Its data bit may not be recoverable. For S = 3, a wrong data bit in
  stream 3 leaves a batch that is itself valid, so it cannot be detected.
* The choice by Hamming distance is this design's rule. The source argues
  the repair only in words, for a single example.

## System timing (`rv_top`)

* **Send side**:
  * `tx_start` is accepted when `tx_busy` is 0.
  * The first symbol appears on `tx_syms` two clocks after acceptance. Then
    S+2 symbols follow, one per clock, framed by `tx_first` and `tx_last`.
  * All S streams are sent in lock step.
* **Receive side**:
  * The channel's output enters at `rx_syms` with `rx_valid`, `rx_first`
    and `rx_last`. Frames are terminated, so each decoder releases the
    path that ends in state 00.
  * `out_valid` rises two clocks after the symbol flagged `rx_last`. One
    clock is the decoders' output register and one is the corrector's
    output register.
  * `out_data` is the corrected batch and `out_msgs` the corrected
    messages. `out_metrics`, `out_suspect` and the three `err_*` flags
    report what happened.
* The channel is not part of the design. Testbenches model it by flipping
  bits between `tx_syms` and `rx_syms`.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `rv_top`, `mimo_encoder`, `reverser`, `rev_corrector` | `S` | 3 | streams per batch, also the message length |
| `rv_top`, `viterbi_decoder` | `MAX_SYM` | 15 (= 5K) | longest frame in symbols; `rv_top` needs `MAX_SYM >= S+2` |
| `rv_top` | `CORR_T` | 2 | largest decoder metric still trusted; the K = 3 code corrects two errors |
| `qv_cell`, `metric_adder` | `W` | 2 | width of the incoming path metric (the decoder uses `PM_W`) |
| `qcm`, `q_comparator` | `N` | 3 | compared width |
| `viterbi_pkg` | `K`, `G1`, `G2` | 3, 111, 101 | the code |

The decoder's branch labels come from `viterbi_pkg::branch_sym`. Changing
`G1`/`G2` therefore changes encoder and decoder together. The decoder
structure assumes K = 3 (4 states, and predecessors taken from
`pred_state`).

## Where this design departs from, or adds to, the source

* Reversible gates are modelled as classical bijections. The quantum
  behaviour (superposition, and the no-fan-out rule of a closed quantum
  circuit) is not modelled. Control signals such as the decoder's received
  symbol fan out freely in the RTL.
* The decoder keeps its state in clocked registers. A closed quantum circuit
  has no feedback, so in the source the node stands for one trellis level
  of an unrolled network.
* The internal gate arrangement of the half-adder, full-adder, subtractor,
  equality comparator and comparator cell is a standard reversible
  construction chosen here. Only their functions are specified.
* The encoder emits both code bits of a step together as one symbol,
  instead of serialising them through a multiplexer.
* Register-exchange survivor memory, the BIG start metric, the
  unterminated-frame rule, the suspect threshold and the repair rule are
  this design's choices.
* The encoder is registered (one clock of latency). Reset is asynchronous
  and active low throughout.

## Verification

Every module has a self-checking testbench in `tb/` named `tb_<module>`.
Each ends by printing `TB_RESULT checks=N failures=M`. A watchdog ends a
run that hangs.

* The gates and arithmetic blocks are tested exhaustively against truth
  tables. Gate tests also check the one-to-one property.
* The encoder is checked against the worked code words and a
  polynomial-multiplication model.
* The decoder is checked against the worked examples (including the
  triple-error failure) and against a behavioural Viterbi model on 400
  random frames, terminated and unterminated, sent back to back. Its
  latency is checked every cycle.
* `tb_rv_top` runs the whole system at default parameters. It covers clean
  batches, the worked noisy streams, a repair after a mapping mismatch, a
  repair after a metric alarm, an uncorrectable two-stream error and random
  single errors. It counts each of these mechanisms and fails if one never
  occurs.

To run a testbench with Verilator (for example the system test):

```
verilator --binary --timing --assert -Irtl -Itb rtl/viterbi_pkg.sv \
    tb/tb_rv_top.sv --top-module tb_rv_top -o sim
./obj_dir/sim
```

Other modules are found through `-Irtl`. Lint with
`verilator --lint-only -Wall -Irtl rtl/viterbi_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are:

* unconnected garbage outputs of reversible gates;
* unused bits;
* `rst_n` used both as an asynchronous reset and in an assertion's
  `disable iff`.
