# Storage-efficient traceback Viterbi decoder for a (3,2,2) convolutional code

A rate-2/3 convolutional code turns every 2-bit information symbol into a 3-bit code word
that depends on the symbol and on the two symbols before it. The decoder here recovers the
symbols from a stream of received, possibly corrupted 3-bit words by the Viterbi algorithm:
it keeps, for each of the 8 encoder states, the cheapest path (in Hamming distance) that
could have led there, remembers which predecessor each survivor came from, and reads the
decision back along the best path ("traceback") a fixed number of stages later.

The point of this design is the survivor memory. A straightforward traceback decoder keeps
two label bits per state for each of the last 10 stages (160 flip-flops) and walks back
10 steps per released symbol. Here the bit-0 labels are kept for 9 stages and the bit-1
labels for only 8 (136 flip-flops), and the walk takes 8 steps: the code's structure lets
the oldest symbol be read one step early, out of the traceback register and a single label
bit, so the last stage of bit-1 labels and the last traceback step are never needed. The
conventional arrangement is still available by a parameter, for comparison.

The RTL also contains the matching encoder, so a complete link (encoder, your channel,
decoder) can be simulated.

## The code

State = the encoder's three register bits `{S22,S21,S11}`; symbol `u = {U2,U1}`; code word
`v = {V3,V2,V1}`:

```
V1 = U1 ^ S11 ^ S21
V2 = U2 ^ S11 ^ S22
V3 = U1 ^ U2 ^ S22
next state = {S21, U2, U1}          (U1 -> S11, U2 -> S21 -> S22)
```

Every state `{a,b,c}` is entered by four branches, all carrying the symbol `{b,c}`, from the
predecessors `{x,a,y}`. The 2-bit **backward label** `{x,y}` (the predecessor's S22 and
S11) identifies which of the four survived. Tracing back from state `{s22,s21,s11}` with
label `{b2,b1}` gives the predecessor `{b2, s22, b1}`.

`rtl/viterbi322_pkg.sv` holds these equations as functions and the shared types.

## How a received word moves through the decoder

`viterbi322_decoder` is a sequenced datapath, not a pipeline that takes a word every
cycle. `control322` steps through these states for each word:

| state  | enable | what happens |
|--------|--------|--------------|
| IDLE   |        | wait for `seq_rdy` (the word was captured in an input register) |
| LOAD   | `le`   | `bmu322`: Hamming distance of the word from each of the 8 code words, registered |
| ADD    | `ae`   | `acsu322`: for every state, 4 sums predecessor metric + branch metric, registered |
| STORE  | `we`   | the minimum of each state's 4 sums goes to `pm_memory`; its label is pushed into `tb_path_memory` |
| START  | `be`   | `tb_output_decision`: the state with the smallest metric is loaded into the traceback register |
| TRACE  | `te`   | one step back per cycle: label of the current state picked by an 8:1 mux, register moves to the predecessor |
| OUTPUT | `oe`   | one decoded symbol on `Dx` with `Dx_valid` |

While the path memory fills (the first `L0` words of a block) only LOAD/ADD/STORE run: a
word every 3 cycles. From word `L0+1` on, every word also triggers START, 8 TRACE cycles and
OUTPUT, so one symbol comes out per word, 13 cycles after its `seq_rdy`; it is the symbol of
the word received `L0` words earlier (`L0` = 9 here, 10 in the conventional arrangement).

### Path metrics

Metrics are 4 bits. The value 15 means "unreachable": a block starts with metric 0 in state
000 and 15 everywhere else, an unreachable predecessor passes 15 on without adding, and any
sum above 15 is held at 15. There is no renormalisation, so metrics only grow inside a
block; with few channel errors the best metric stays small, and the decoder reports
`seq_error` when even the best metric has reached `SYNC_THRESH` (default 8), meaning it
has lost track of the transmitted sequence. Metrics restart with every block. Ties are
resolved towards the lowest label (in the add-compare-select tree) and the lowest-numbered
state (in the best-state search).

### The survivor (path) memory and its traceback

`tb_path_memory` has, per state, one shift register per label bit: bit 0 is `L0` = 9 deep,
bit 1 is `L1` = 8 deep. Only flop 0 of each register is visible. A write pushes the new
stage in at flop 0 (the oldest falls out of the far end). A traceback reads the registers by
rotating them towards flop 0, so flop 0 shows the stages newest first; since each register
is rotated exactly as many times as it is long per traceback, it ends where it started and
the next traceback sees the same data.

In the storage-efficient traceback (`PROPOSED = 1`):

* 8 TRACE steps rotate both bit registers; the traceback register walks from the best
  state `s(t)` back to `s(t-8)`.
* In OUTPUT the bit-0 registers rotate a 9th time, showing the oldest stage, and the symbol
  released is `{s22, b1}`: `s22` of the register and bit 0 of the oldest label. This is the
  symbol `{s21, s11}` that one more full traceback step would have produced.

In the conventional traceback (`PROPOSED = 0`) both registers are 10 deep, there are 10 TRACE
steps, and the symbol is `{s21, s11}` of the traceback register.

The storage-efficient arrangement decides each symbol from 9 stages of survivors instead of
10, so on a noisy channel its decisions can differ slightly from the conventional one; it
starts releasing one word earlier in a block and needs two cycles less per word.

### End of a block

A block is `N_SYM` (default 32) received words, starting from encoder state 000 (restart the
encoder with `enc_clr` on a block's first symbol). After the block's last word the decoder
still holds `L0` undecided symbols. It releases them without further input by repeating
START/TRACE/OUTPUT: pass `k` starts again from the best final state but stops following the
labels `k` steps earlier, so it releases the symbol `k` stages newer than the last normal
one (from `{s21,s11}`). The memory still rotates a full traceback's worth each pass. These
releases come every `TRACE steps + 2` cycles (10, or 12 in the conventional arrangement).
With the `N_SYM`-th symbol `block_done` rises, the metrics and counters restart, and the
next block can begin; a word arriving meanwhile waits.

### Input handshake

`Rx` is captured on the `seq_rdy` pulse, so it need not be held. A pulse that comes while
the controller is idle, or in the last cycle of a word (STORE while filling, OUTPUT after),
starts LOAD in the next cycle; this is what allows one word per 3 cycles during the fill.
One further word may arrive while the decoder is busy; it is processed right after. A
second one while the first still waits is lost and sets the sticky `overrun` flag (cleared
by reset). The safe steady-state
spacing is one word per 13 cycles (plus 10 cycles per remaining symbol at the end of a block).

## Files

| file | module | role |
|------|--------|------|
| `rtl/viterbi322_pkg.sv` | package | types, sizes, code equations |
| `rtl/conv_encoder322.sv` | `conv_encoder322` | the encoder |
| `rtl/bm322.sv`, `rtl/bmu322.sv` | `bm322`, `bmu322` | branch metric unit (8 distance blocks + registers) |
| `rtl/acs322.sv`, `rtl/acsu322.sv` | `acs322`, `acsu322` | add-compare-select element, and 8 of them wired as the trellis |
| `rtl/pm_memory.sv` | `pm_memory` | 8 x 4-bit path metrics |
| `rtl/tb_path_memory.sv` | `tb_path_memory` | survivor label registers (the `tb_` prefix means traceback) |
| `rtl/tb_output_decision.sv` | `tb_output_decision` | best-state search, traceback register, output, `seq_error`, counters |
| `rtl/control322.sv` | `control322` | the sequencer |
| `rtl/viterbi322_decoder.sv` | `viterbi322_decoder` | the decoder |
| `rtl/viterbi322_top.sv` | `viterbi322_top` | encoder and decoder side by side (top) |

Decoder ports: `clock`, `reset` (synchronous, active high), `Rx[2:0]`, `seq_rdy`, `Dx[1:0]`,
`Dx_valid`, `seq_error`, plus `block_done` and `overrun`. `Dx` is 0 whenever `Dx_valid` is
low. The top prefixes them with `dec_` and adds the encoder's `enc_clr`, `enc_en`, `enc_u`,
`enc_v`, `enc_v_valid`; the channel between `enc_v` and `dec_rx` is yours.

Parameters (top and decoder): `PROPOSED` (1), `T_CONV` (10, the conventional memory depth;
the efficient one uses `T_CONV-1` and `T_CONV-2`), `N_SYM` (32, must be at least `L0+1`),
`SYNC_THRESH` (8).

## Simulation

Each module has a self-checking testbench in `tb/`; `tb/viterbi_ref_pkg.sv` holds an
independent encoder and a complete reference Viterbi decoder written from the code's
equations, which the decoder testbenches compare against symbol by symbol. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  rtl/viterbi322_pkg.sv tb/viterbi_ref_pkg.sv tb/tb_viterbi322_top.sv \
  --top-module tb_viterbi322_top -o sim
./obj_dir/sim
```

Any other testbench runs the same way with its file and module name in place of
`tb_viterbi322_top`. Every testbench ends with `TB_RESULT checks=N failures=M`.

* `tb_viterbi322_top` runs the whole link at the default parameters: five blocks covering
  the fastest fill (a word every 3 cycles), the 13-cycle latency of each release whose word
  found the decoder free, words queued while busy, isolated channel errors that must be corrected, a channel that has lost
  the signal (must raise `seq_error`), the end-of-block releases, `block_done`, and an
  overrun. It counts each of these and fails if one never happened.
* `tb_viterbi322_decoder` runs the storage-efficient and conventional decoders side by side
  on the same stream (latencies 13 and 15).
* `tb_waveform_replay` feeds both arrangements the 20-word stream of the published
  simulation plots (0 1 1 6 5 3 2 3 5 6 5 1 3 0 2 3 5 1 0 4), fast during the fill and
  slower afterwards, as in those plots. It checks that the storage-efficient decoder answers
  after the 10th word and the conventional one after the 11th, and that the two differ
  exactly where their references do.
* The others test one module each: encoder, BMU, ACSU (including ties and saturation), metric
  memory, path memory (read order, depths, restore after a traceback), output decision
  (both wirings and the end-of-block passes), sequencer (cycle-by-cycle enables).

## What is this design's own

The structure (units, enables, register depths, the two output wirings, the state
sequence) follows the published storage-efficient decoder. These points were not specified
there and were chosen here:

* Branch metric = Hamming distance computed with a bit count (not a lookup table).
* Sums clamp at 15 instead of wrapping; ties go to the lowest label and lowest state.
* The path memory is written at its read end and read by rotation, which makes the newest
  stage come out first and restores the memory after each traceback. A plain shift register
  written at the far end, as the structure is usually drawn, would present the oldest stage
  first.
* The published state diagram returns from STORE to LOAD and decides there whether the
  memory is full; here STORE decides and goes to START, LOAD (a word is waiting or just
  arriving) or IDLE. OUTPUT likewise goes to LOAD only for such a word, and every word
  needs its own `seq_rdy`.
* The first release waits for `L0+1` words, so the first symbol released is the block's
  first real symbol.
* How the last `L0` symbols of a block are released (shortened tracebacks) and the exact
  condition that starts this.
* Block length 32, `seq_error` threshold 8, registered `seq_error` held until the next
  traceback, `Dx` driven low instead of tri-stated, the input register, the one-deep queue
  and `overrun`, synchronous reset, the encoder's `clr`.

## Limits

* Hard-decision only: `Rx` is 3 bits, one per code bit; no soft metrics.
* Without renormalisation the 4-bit metrics suit short blocks. In a block with many errors
  the metrics saturate at 15 and decisions degrade; `seq_error` is the warning.
* The decoder does not find block boundaries or resolve phase/polarity ambiguity; the
  receiver front end (carrier and timing recovery, A/D conversion, block synchronisation) is
  outside this RTL.
* Throughput is one word per 13 cycles in steady state. The published decoder was
  synthesized at 100 MHz for a 65 nm library and for a Zynq-7020 FPGA; this RTL has not been
  taken through synthesis timing.
