# Power-efficient hard-decision Viterbi decoder (T-algorithm), K = 3, rate 1/2

A convolutional code protects a bit stream by sending, for every message bit,
two code bits computed from that bit and the two bits before it. A Viterbi
decoder recovers the message from a corrupted copy. It follows all the
sequences of encoder states the code allows and keeps, for each state, the one
closest to what was received. This design makes that decoder cheaper with the
**T-algorithm**. At every step a path whose metric lies more than a fixed
threshold above the best path is dropped. A dropped path costs no additions
and no comparisons in later steps. At the default threshold of 0 the decoder
keeps only the paths tied with the best one. Its path-metric storage then
reduces to one "still alive" flag per state, and it still corrects every
single bit error in a frame.

The RTL contains the encoder and the decoder of such a system. Both are
SystemVerilog-2017 and synthesizable, with no vendor primitives.

## The code

`conv_encoder` is a two-flip-flop shift register. The state is written
`{S1,S2}`, where S1 holds the previous message bit. For a message bit `m` the
encoder sends

    c1 = m ^ S2          (generator 101)
    c2 = m ^ S1 ^ S2     (generator 111)

and moves to state `{m,S1}`. Code words are packed as `{c1,c2}`, and c1 is
sent first. The encoder starts in state 00. A frame ends with two zero tail
bits, which return the encoder to 00. For example, the message `100011` plus
tail `00` encodes to `11 01 11 00 11 10 10 11`.

The state table behind these equations (state, input → next state, code):

| state | m=0 → next, c1c2 | m=1 → next, c1c2 |
|-------|------------------|------------------|
| 00    | 00, 00           | 10, 11           |
| 01    | 00, 11           | 10, 00           |
| 10    | 01, 01           | 11, 10           |
| 11    | 01, 10           | 11, 01           |

## Decoder structure

```
 in_code ──► bmu ──bm[4]──► acs_pm_unit ──dec[4]──► spmu ──► out_bits
                            (2 × acs_butterfly,   ▲ start_state
                             metric registers,    │
                             threshold) ──────────┘ best_state
```

* **`bmu`**: the branch metric unit. It computes the Hamming distance (0..2)
  from the received symbol to each of the four code words. Every trellis
  branch takes the metric of the code word it carries.
* **`acs_pm_unit`**: add-compare-select and path-metric storage merged into
  one unit. It contains two `acs_butterfly` instances: butterfly *k* joins
  states `{k,0}` and `{k,1}` to states `{0,k}` and `{1,k}`. It also holds the
  threshold logic, described in the next section.
* **`spmu`**: the survivor path memory. It stores one 4-bit word of survivor
  decisions per step. At the end of a frame it traces back from the best
  state.
* **`viterbi_decoder`** wires these three units together. **`viterbi_system`**
  places the encoder and the decoder side by side. The channel between them is
  not hardware, so the encoder's output and the decoder's input are separate
  ports.

## How the threshold works

This is the part that differs from a textbook Viterbi decoder.

1. **Only active states take part.** Each state has an active flag. An
   `acs_butterfly` destination handles its sources as follows:
   * Two active sources: it adds the branch metrics and keeps the smaller sum
     (`cmp_*` high). A tie keeps the source with S2 = 0.
   * One active source: it takes that path with no comparison.
   * No active source: the destination becomes inactive.
2. **Normalize.** The smallest new metric among the active states is
   subtracted from all of them. The stored metric is then the distance from
   the best path.
3. **Prune.** A state whose distance exceeds `THRESHOLD` loses its active
   flag. It contributes nothing to the next step.

Because the stored metrics are distances from the best path, each is compared
with a constant. No stored metric ever exceeds `THRESHOLD`, so a metric
register needs only `clog2(THRESHOLD+3)` bits and cannot overflow.

At **`THRESHOLD = 0`** (the default) every surviving state has distance 0.
For this code, no trellis state is then ever reached by two surviving paths,
so the compare half of add-compare-select is never needed. This was checked
exhaustively for every received sequence of up to 8 symbols. Every decision
comes from the "single active source" case.
`n_compared` therefore stays 0 at the default. Setting the threshold higher
brings comparisons back. Setting it to `2*FRAME_LEN` or more keeps every path,
and the decoder then performs full Viterbi decoding.

The threshold is measured from the best metric of each step. It is not an
absolute limit on the metric. With an absolute limit of 0, a single channel
error would push every path over the limit and leave nothing to decode. With
the relative threshold, a frame with one flipped code bit still decodes
correctly. The tests check this for the example above with its 9th code bit
flipped (received `11 01 11 00 01 10 10 11`), and for hundreds of random
frames.

Pruning loses the maximum-likelihood guarantee once errors are dense: with two
or more errors in a frame the threshold-0 decoder can choose a different
message than full Viterbi decoding would. The threshold trades this
robustness for activity and register count. The tests compare the decoder
with a reference model of the same pruning rule, not with full Viterbi
decoding.

## Frames, trace-back and timing

The decoder works on frames of `FRAME_LEN` symbols (default 8: six message
bits and two tail bits). Every frame starts in state 00.

* **Input.** One symbol is accepted per clock when `in_valid && in_ready`.
  The first symbol of a frame loads the start condition: state 00 active with
  metric 0, all other states inactive. A new frame may therefore follow the
  previous one directly.
* **Trace-back.** After the last symbol, `in_ready` is low for `FRAME_LEN`
  cycles while `spmu` traces back, one step per clock. It starts from the
  lowest-numbered state with distance 0. At each step the current state
  `{m,S1}` yields the decoded bit `m`. The stored decision `d` for that state
  gives the previous state `{S1,d}`.
* **Output.** `out_valid` pulses for one cycle, `FRAME_LEN + 1` cycles after
  the cycle in which the last symbol was accepted. `out_bits[t]` is the
  message bit of symbol `t`, and the two tail bits are the top two bits.
* **Throughput.** Frames can follow each other every `2*FRAME_LEN` cycles.

Reset is synchronous and active low (`rst_n`). It puts the encoder in state 00
and the decoder in its start condition.

The outputs `active_states`, `n_pruned` and `n_compared` exist only to make
the pruning visible. They show the states kept, and how many states were
pruned and how many comparisons were made for the symbol currently on the
input. They can be left unconnected.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `viterbi_system`, `viterbi_decoder` | `FRAME_LEN` | 8 | symbols per frame, tail included |
| `viterbi_system`, `viterbi_decoder`, `acs_pm_unit` | `THRESHOLD` | 0 | pruning distance from the best metric |
| `spmu` | `FRAME_LEN` | 8 | survivor memory depth |
| `acs_butterfly` | `PM_W` | 2 | metric width, set by `acs_pm_unit` |

`vd_pkg` fixes the code: K = 3, four states, two code bits, and the functions
`branch_code` and `next_state`. Changing the constraint length or the
generators requires editing the package and the butterfly wiring in
`acs_pm_unit`.

## Where this design makes its own choices

The encoder, the Hamming branch metric, the butterfly equations, the merged
ACS/path-metric unit, the threshold of 0 and trace-back from the best state
are the design as specified. These details are choices of this
implementation:

* The threshold is measured from the best metric, with normalization, as
  explained above.
* Frame-based decoding with a frame length of 8 and a whole-frame survivor
  memory. Trace-back starts after the frame, one step per clock, and input
  stalls during it.
* Ties keep the source with S2 = 0. Trace-back starts at the lowest-numbered
  best state.
* One branch metric per code word rather than per branch.
* Synchronous active-low reset, and the observation outputs.
* The encoder's code word is combinational, valid in the same cycle as its
  message bit.

The design has not been mapped to an FPGA here, so no resource or power
figures are claimed. Its interface (separate encoder and decoder ports, a
ready/valid handshake, observation outputs) and its frame buffer are its own,
so its port and register counts are not those of a minimal four-port build. Yosys coarse synthesis of `viterbi_system` gives about 30
flip-flop bits plus the 32-bit survivor memory.

## Simulation

Every module has a self-checking test bench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. `tb/vd_ref_pkg.sv` is an independent
reference model of the code and of threshold decoding, written with absolute
integer metrics and no normalization.

| test bench | what it covers |
|------------|----------------|
| `tb_conv_encoder` | the example sequence; random bits against the parity model |
| `tb_bmu` | all 16 symbol/code-word distances |
| `tb_acs_butterfly` | random metrics, flags and ties |
| `tb_acs_pm_unit` | per-step decisions, metrics, flags, best state, prune/compare counts at thresholds 0 and 2 |
| `tb_spmu` | random decision frames, trace-back result, stall length, output latency |
| `tb_viterbi_decoder` | 400 frames with 0–4 errors, thresholds 0 and 3, against the reference; latency |
| `tb_viterbi_system` | encoder → bit-flip channel → decoder at default parameters. Runs the example with and without the 9th-bit error, then 300 streamed frames. Requires pruning, compare-free selections, stalls and corrected errors to occur, and no comparison at threshold 0. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/vd_pkg.sv tb/vd_ref_pkg.sv tb/tb_viterbi_system.sv --top-module tb_viterbi_system
./obj_dir/Vtb_viterbi_system
```

Each test bench finishes in a few seconds.
