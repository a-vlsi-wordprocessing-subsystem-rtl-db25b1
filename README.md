# Word-level Viterbi engine for large-vocabulary HMM speech recognition

This is synthesizable SystemVerilog for the word processing part of a real-time
continuous speech recogniser. The recogniser models every vocabulary word as a
chain of hidden Markov model (HMM) states. Once per speech frame (10 ms) it must
update the score of every state of every word:

    P(i, s) = best over predecessors p of [ P(i-1, p) * A(p, s) ] * B(o_i | s)

Here A is a transition probability and B is the probability that state s emits
the frame's observed features. The target is 50,000 states in real time, which
is one state every 200 ns. The design can address up to 256K states, at about
five times real time. All the model data lives in commodity DRAM. The problem is
therefore bandwidth, not arithmetic: every piece of data one state needs must
arrive in a single memory cycle.

The design solves this with one idea: **sort the states so that predecessors
are always close.** Words are stored one after another and states within a word
are in order. Every predecessor of a state is then at most 15 rows earlier. The
frame i-1 scores are streamed in sequentially, one state per cycle. Three small
on-chip caches hold the last 16 of them, so the three predecessor scores a state
needs come out of the caches in parallel. Off-chip memory is read once per
state.

Each state is also carried with a *backtrace tag*. The tag names the word that
led into this word. The grammar (word-to-word) search runs in a separate
subsystem, which is not part of this RTL. It talks to this design through two
FIFOs:
- **Source FIFO:** one entry per word going in (the word's entry score and tag).
- **Destination FIFO:** one entry per word coming out (the word's exit score and tag).

## Number representation

- **Log domain.** All probabilities are stored as |log p|, so smaller is better.
  A product becomes an addition and "best of" becomes a minimum.
- **Widths** (in `wp_pkg`):
  - Transition and output probabilities: 8 bits (`TW`).
  - State scores: 14 bits (`PW`).
  - Backtrace tags: 18 bits (`TAGW`), so score plus tag fill a 32-bit state memory word.
- **Saturation.** Every adder saturates at all ones (`PWORST`), which stands for
  "probability zero". A path that cannot happen never wraps around into a good score.
- **Normalisation.** Each frame's scores have the previous frame's best score
  subtracted, floored at 0. This keeps the numbers inside 14 bits over long
  utterances. The first frame of an utterance (`first_frame`) is not normalised,
  and it treats all old scores as `PWORST`.

## The row stream

The HMM is described by a *topology memory*, one word per row (`topo_row_t`).

Fields of a row:
- **Predecessor offsets.** Three 4-bit two's-complement offsets, 0 to -15: how
  far back each predecessor is.
- **Transition probabilities.** Three of them, one per predecessor.
- **Word-exit transition.** The transition probability out of the word (`gntrans`).
- **Control bits:**
  - `gnselect`: the first predecessor is the word's entry, taken from the source FIFO.
  - `dgnenable`: the state may leave the word.
  - `morepred`: this row continues the previous row's state. A state with more
    than three predecessors uses several rows, and the best result of those rows is kept.
  - `eow`: second-to-last row of a word.
  - `eof`: last row of the vocabulary.

Row layout rules:
- **Word length.** A real word needs at least five rows. The controller needs
  that many cycles to pop the next word's entry and push the previous word's result.
- **Leading word.** The vocabulary starts with a leading word of at least two
  rows. It has no entry and no exit, and it lets the pipeline fill before the first real word.
- **Last word.** The last word carries `eof` on its last row instead of `eow`.

Three more memories share the row address:
- **Output lookup memory** (256K x 14 bits). It maps a state to one of its shared output distributions.
- **State memory for frame i-1** (256K x 32 bits, {tag, score}). It is read at the row address.
- **Second state memory** (frame i). It is written with the results eleven cycles later.

The two state memories swap roles at the end of each frame (`mem_sel`).

The output probability is built from four 8-bit feature streams:
1. Each of four distribution memories is addressed with {distribution index, vector-quantised feature}.
2. The four values go into the add/mux, which either sums them (mode 0,
   saturating at 255) or passes one of them through (modes 1 to 4).
3. The result reaches the processor three cycles after its row.

## The Viterbi processor pipeline (`viterbi_proc`)

The processor has eleven stages and one row enters per clock. Stage k is k clock
enables after the row was at the inputs. Each operation has its own stage, so
the slowest path is one saturating 14-bit adder.

| stage | work | module |
|---|---|---|
| 1 | register the offsets and the row's old score; write the old score into the three caches at the row's slot | `predadd`, `predsel` |
| 2 | slot + offset gives three cache read addresses, and the caches are read | `predadd`, `predsel`, `bidirmem` |
| 3 | operand select: path 1 can take the word's entry score from the source FIFO (`gnselect`); paths 2 and 3 take `PWORST` in a first frame | `dp1` |
| 4 | three saturating adds of the old scores and the transition probabilities | `dp1` |
| 5 | ring compare (1<=2, 2<=3, 3<=1) decoded into a 2-bit select; the best sum is chosen | `predcom`, `minpla`, `outmindp` |
| 6 | add the output probability | `outmindp` |
| 7 | subtract the previous frame's minimum (not in a first frame) | `outmindp` |
| 8 | `morepred` keeps the earlier row's value if it is not worse; update the running word minimum and frame minimum | `outmindp` |
| 9 | add the word-exit transition, delayed eight cycles on chip | `dgndalu` |
| 10 | running minimum of the word-exit score over the rows with `dgnenable` | `dgndalu` |
| 11 | result out, written to the frame-i memory; word results latched when the next word starts; frame minimum latched by the `eof` row | `taildp` |

The ring compare can produce the flag pattern 000 only through inconsistent
inputs. The decode then picks path 1. When all three sums are equal, path 1 wins.

**Caches.** Each cache (`bidirmem`) has 16 entries. It has one sequential write
port and one random read port, and the read data is combinational from a
registered address. A row's own score is written at the end of stage 1 and read
back at stage 2. That is what offset 0 (a self-loop) uses. The write slot
counter is cleared at every frame start (`startcounter`).

**Data-stationary control.** The sequencer makes one control word per row:
`ctrl_t`, with fields valid, gnselect, newword, newframe, morepred, dgnenable,
eof, pushdest and endframe. The word enters `ctrl_shift`, a 13-deep register
chain that moves with the data. Each stage reads the tap with its own stage
number: `gnselect2`, `morepred7`, `newword9`, `eof10`, `pushdest11` and so on.
Pipeline bubbles carry `valid = 0` and are ignored by the running minima.

**Stall.** `stall` holds every pipeline register, including the cache write and
the memory address registers, so the design needs no replay logic. Stall is high
in two cases:
- the sequencer is waiting on a FIFO;
- the board raises `memorystall`.

## The backtrace processor (`backtrace_proc`)

This unit runs in lock step with the Viterbi processor on the same row:
- **Caches.** It keeps three tag caches of its own, addressed the same way by its own `predadd`.
- **Tag selection.** It takes the Viterbi side's stage-2 `gnselect`, stage-5
  path select, stage-7 `morepred` keep and stage-9 word-exit update. With these it
  moves the winning predecessor's tag along with the score.
- **Outputs.** The tag of each state leaves at stage 11 with its score. The tag
  that goes with each word's exit score leaves with the destination FIFO entry.

## The sequencer (`sequencer`)

The sequencer is a 16-state machine. The states are numbered 0 to 15, as in the
original state diagram.

| states | role |
|---|---|
| 0 | idle |
| 1 | clears the cache counter |
| 14, 15 | the leading word; 15 takes its last row |
| 2, 3 | wait for, then pop, the first real word's entry; 3 takes the word's first row |
| 4 | takes rows until `eow` (or `eof`) |
| 5 | takes the word's last row and checks the source FIFO |
| 6, 7 | wait for, then pop, the next entry; 7 takes the next word's first row |
| 8, 9, 10 | second row, wait while the destination FIFO is full, third row with a push of the previous word's result |
| 11, 12, 13 | frame end: a closing bubble that latches the last word's results, a wait while full, the final push; then back to 0 |

Timing:
- **Throughput.** Without waits, a frame of N rows takes exactly N + 3 cycles
  (the bubbles are states 1, 11 and 13). The result of each row is written
  exactly eleven enabled cycles after the row was taken. Both are checked by the testbenches.
- **startframe** passes a two-flop synchroniser.
- **memorystall** freezes the state machine as well as the pipeline.

## Top level (`wordproc_subsystem`)

The top holds the two processors, the add/mux, the two FIFOs and the board logic:
- the row address counter;
- the frame-i write address (the row address delayed eleven stages);
- the distribution memory addresses;
- the `mem_sel` flip on `frame_done`.

The FIFOs (`gn_fifo`) have 16 entries. Their full flag is raised three entries
early, so the pushes already in flight always fit.

All memories are external ports with a one-cycle read latency. Address outputs
are driven so that the read data stays valid through a stall.

Interface notes:
- `word_push` marks the cycle in which a word's destination entry and its best
  score `wordmin11_out` are valid. The grammar side uses that score for pruning.
- `framemin11_out` is the frame's best score.

## Departures and choices

These points are this implementation's decisions, not the original design:

- **Clocking.** One rising-edge clock with a clock enable. The original uses a
  two-phase master/slave clock with dynamic scan registers. There is no scan chain.
- **Score width.** 14 bits throughout, saturating at 16383. Some of the original
  block diagrams show 12-bit buses; the 14-bit width described for the state scores was used.
- **Minima.** The running word, frame and word-exit registers keep minima
  (better scores). Where a drawn comparator polarity would keep the worse value,
  the described behaviour was followed.
- **First frame.** A first frame is handled by writing `PWORST` into the caches,
  which covers all three paths at once.
- **Leading word and row rules.** The leading word, the five-row minimum, the
  states that take rows, and the state-11 closing bubble are one consistent
  reading of the controller's state graph.
- **State 6.** The controller waits there while the source FIFO is empty, as in state 2.
- **Frame minimum.** It is latched when the `eof` row is at stage 10, so the
  last row of the frame is included.
- **pushdest13.** The processor keeps its `pushdest13` pin, which is the push
  strobe two cycles later. The top does not use it: with a single clock,
  `wordmin11_out` has already moved on to the next word by then for five-row words.
- **Board row counter.** The row counter is cleared by `startcounter` and
  advanced by the processor's `take` signal, so it stops on its own after the
  `eof` row. In the original, `newframe` starts the board counter and `eof10`
  stops it, and a dummy word ends the vocabulary. Here the dummy word leads it
  instead. `newframe` and `eof10` remain as status outputs.
- **Pin polarity.** The source-pop strobe `popsource` is active high (originally
  an active-low pin).
- **Assumed sizes.** The tag width (18 = 32 - 14), FIFO depth and margin,
  add/mux mode encoding, and memory latencies are assumptions.

## Sizes and speed

One row is taken per clock. The per-frame overhead is 16 cycles: the start
synchroniser, three bubbles and the eleven-stage drain. With a 200 ns clock
(the DRAM cycle the design is built around), `tb_wordproc_workload` measures the
following at the default parameters:

| vocabulary | rows | cycles, start to last write | time at 200 ns |
|---|---|---|---|
| real-time target | 50,000 (leading word + 5,855 words) | 50,016 | 10.003 ms |
| full address space | 262,144 (30,916 words) | 262,160 | 52.4 ms, about 5.2x real time |

A frame of exactly 50,000 rows therefore needs a clock a fraction of a percent
faster than 5 MHz to fit in 10 ms.

Extra rows for states with more than three predecessors count against the
budget. Memory stalls and FIFO waits add their own cycles.

## Files

- `rtl/wp_pkg.sv`: widths, `ctrl_t`, `topo_row_t`, sequencer state enum,
  saturating add and floored subtract.
- `rtl/*.sv`: one module per file, as named above.
- `tb/tb_<module>.sv`: a self-checking testbench per module. Each drives random
  rows with random stalls and compares against an independent model. Each
  prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_wordproc_subsystem` runs the full-size top with no parameter overrides:
- 2 x 256K-word state memories;
- a 25-word vocabulary (about 200 rows);
- three frames: a first frame; a normalised frame with FIFO empty/full stalls,
  memory stalls and saturated entry scores; and a single-feature output mode frame.

It checks every written state-memory word, every destination FIFO entry, every
word minimum and the frame minimum against a behavioural model. It also counts
each mechanism and fails if one never happens.

`tb_wordproc_workload` runs the same checks on the full-size vocabularies
above: a 50,000-row first frame, the same vocabulary normalised, and all
262,144 rows.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl --top-module tb_wordproc_subsystem \
        rtl/wp_pkg.sv tb/tb_wordproc_subsystem.sv -o sim && ./obj_dir/sim

The same command with another `tb_<module>` runs a unit test. Every testbench
finishes in well under a minute.
