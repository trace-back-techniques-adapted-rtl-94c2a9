# Trace-back survivor memory for the M algorithm

The M algorithm decodes a trellis code by keeping only the M best paths at
every step instead of one path per state as the Viterbi algorithm does. Each
step extends the M survivors into 2M candidates, discards the worse of two
candidates that reach the same state, and keeps the M candidates with the
smallest path metrics, sorted. Decoders of this kind have traditionally kept
the survivor paths by *register exchange*: every survivor owns a row of L
registers holding its last L decisions, and the whole row moves through the
sorting network with the path. That costs wiring and switching power that grow
with M × L.

This RTL keeps the survivors the way a Viterbi trace-back decoder does: a
memory receives one small *decision vector* per trellis step, and once the
sequence is complete the best path is followed backwards through the memory,
one word per clock. The twist needed for the M algorithm is that a survivor
has no fixed place: its position in the sorted list changes from step to step.
Each entry of the decision vector therefore carries, next to its decision bit,
the *path number* (rank) its predecessor had in the previous step, and the
trace back follows these pointers.

A second variant combines both ideas: a very narrow register-exchange bank
collects m steps, and only every m-th step writes a word to the trace-back
memory. That stores fewer bits and traces the sequence m times faster.

Both variants are in `rtl/`, instantiated side by side by `mtb_top`.

## Trellis and decision conventions

The trellis is binary with 2^(K-1) states. The state after symbol t holds the
last K-1 input bits, newest at the MSB:

    next_state = {input_bit, state[K-2:1]}

so the two transitions that arrive at a state come from predecessors that
differ only in their LSB. The **decision bit** of a survivor is the LSB of its
predecessor state: 0 when the upper transition (predecessor LSB 0) survived,
1 otherwise. Going backwards, the earlier state is obtained by shifting the
current state left and appending the decision bit at the LSB, and the MSB of
every visited state is one decoded input bit.

## The decision vector

For every input symbol the path-metric / sorting stage (not part of this RTL)
hands over one entry per survivor, in increasing order of path metric, entry 0
being the best path:

    entry j = { path number of survivor j's predecessor   (log2 M bits),
                decision bit of survivor j                (1 bit) }

The M entries form a word of M(log2 M + 1) bits; entry j sits at bits
`[j*(log2 M+1) +: log2 M+1]` (packed array `[M-1:0][log2 M:0]`). The word of
symbol t is written at address t. The path number always refers to the
sorted list of the *previous* step, which is what lets the trace back find a
path no matter how the sorting moved it.

Tracing back from the end of a sequence of L_SIN symbols:

1. load the visited-state register with the end state of the best path and
   the path-number register with 0 (best path);
2. read the word of the last symbol; the multiplexer picks the entry named by
   the path-number register;
3. the entry's decision bit enters the state register at the LSB; the bit
   that leaves at the MSB is pushed on a LIFO; the entry's path number goes
   into the path-number register;
4. repeat with the previous word, one word per clock, down to address 0.

The LIFO then holds the decoded sequence in reverse and is read out in time
order. Example (M = 2, 4 states): a best path visiting the states
10, 01, 00, 00, 00, 10, 11, 01, 00 has decision bits 0,1,0,0,0,0,1,1 and
decodes to 0,0,0,0,1,1,0,0, whatever rank it held at each step
(`tb/tb_mtb_example_path.sv` runs exactly this case).

## The combined register-exchange / trace-back scheme

`mtb_re_bank` holds one row of log2 M + m bits per survivor:

    row j = { rank of survivor j's ancestor at the last flush   (log2 M bits),
              decision bits since then, newest at the MSB        (m bits) }

Every step each row is extended into two candidate rows (2M rows in all, formed
combinationally) by shifting a decision bit in at the top, and the sorter's
result selects which candidate becomes survivor j. After the m-th step the M
selected rows, M(log2 M + m) bits, are written to the memory as one word and
the bank restarts with row j = {j, 0}.

The trace back works as before, but each step consumes m decision bits: the
state register and the m bits form one contiguous run of input bits
`{state, d(t), d(t-1), ..., d(t-m+1)}`; its top m bits are m decoded bits and
its low K-1 bits are the state m steps earlier. With m = K-1 the decision bits
of one entry are exactly that earlier state.

Storage and trace-back time for a sequence of L symbols:

| scheme | memory words | bits per word | total bits | trace-back steps |
|---|---|---|---|---|
| plain trace back | L | M(log2 M + 1) | L·M(log2 M + 1) | L |
| combined | L/m | M(log2 M + m) | (L/m)·M(log2 M + m) | L/m |

At the defaults (M = 2, m = 2, L = 8): 8 × 4 = 32 bits traced in 8 steps
against 4 × 6 = 24 bits traced in 4 steps. Per m steps the combined scheme
stores M(log2 M + m) bits where the plain one stores m·M(log2 M + 1): the
path numbers are stored once instead of m times, a saving of
(m − 1)·M·log2 M bits (2 bits per word at the defaults, 8 per sequence).

## Blocks

| module | role |
|---|---|
| `mtb_pkg` | default parameters and the `path_w()` helper (log2 M, at least 1) |
| `mtb_decision_memory` | dual-port decision memory, synchronous one-cycle read |
| `mtb_path_select` | multiplexer picking one entry, plus the path-number register |
| `mtb_state_sr` | visited-state shift register, K-1 bits, STEP bits per step |
| `mtb_lifo` | register-array stack for the decoded bits (or m-bit groups) |
| `mtb_traceback` | trace-back sequencer around the three blocks above |
| `mtb_tb_smu` | plain trace-back survivor memory (memory + trace back) |
| `mtb_re_bank` | reduced register-exchange bank of the combined scheme |
| `mtb_combined_smu` | combined survivor memory (bank + memory + trace back, STEP = m) |
| `mtb_top` | both survivor memories on one input |

`mtb_traceback` is shared: STEP = 1 gives the plain trace back, STEP = m the
combined one.

## Interface and timing of `mtb_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | one decision vector per accepted cycle |
| `in_sel` | in | M × (log2 M + 1) | per survivor {predecessor rank, decision bit}, best first |
| `in_best_state` | in | K-1 | end state of the best path; read with the last symbol of a sequence |
| `tb_out_valid`, `tb_out_bit`, `tb_out_last` | out | 1 | plain trace back: one decoded bit per clock, first symbol first |
| `cb_out_valid`, `cb_out_bits`, `cb_out_last` | out | 1, m, 1 | combined scheme: m bits per clock, `cb_out_bits[i]` = symbol m·g + i |

A sequence (frame) is L_SIN symbols; symbols may arrive with gaps. After the
last symbol is accepted, `in_ready` drops until both memories have emitted the
whole sequence. For each memory the first decoded output appears N + 1 cycles
after the clock edge that accepted the last symbol (N = L_SIN trace-back steps
for the plain memory, L_SIN/m for the combined one), followed by N back-to-back
output cycles. There is no back-pressure on the outputs.

Parameters (defaults in `mtb_pkg`): `M` = 2 survivors (a power of two),
`K` = 3 (4 states), `L_SIN` = 8 symbols, `MSTEP` = m = 2. `L_SIN` must be a
multiple of `MSTEP`. These are the sizes of the worked examples the
architecture was described with; the testbenches also run M = 4 (16 states,
32-symbol sequences), M = 8 (64 states, 64-symbol sequences) and m = 3, 4
and 8.

## What follows the original description and what is chosen here

Taken from the architecture as described: the decision-vector format (path
number in the MSBs, decision bit(s) in the LSBs, entries in sorted order), the
memory size L_SIN × M(log2 M + 1), a trace back of one word per clock through
a multiplexer steered by a log2 M-bit path-number register, the K-1 bit
visited-state register whose MSB feeds a LIFO, and for the combined scheme the
bank row of log2 M + m bits, one memory word every m symbols and m decoded
bits per trace-back step.

Choices of this design, where the description is silent:

- entry 0 in the least significant bits of a word;
- the state-update convention above (consistent with the worked example);
- the visited-state register starts from the end state of the best path,
  which the sorting stage must supply (`in_best_state`);
- fixed-length sequences, a valid/ready input, a single memory: input stalls
  while a sequence is traced and read out (no double buffering, no
  sliding-window trace back with a decoding depth);
- synchronous single-cycle memory read; the LIFO is read out after the trace
  back, one entry per clock;
- in the combined scheme only the M survivor rows are registers; the 2M
  candidate rows are combinational, and the newest decision bit is placed at
  the MSB of a row;
- the two schemes share one input in `mtb_top` so that they decode the same
  sequences.

Not in this RTL: the path-metric update and sorting network that produce
`in_sel` (branch metrics, merged-path removal, sorting), the full
register-exchange survivor memory the trace back replaces, and trace-back
architectures that decode continuously with a fixed decoding depth, which
the description mentions as possible but does not specify.

## Verification

Every module has a self-checking testbench in `tb/`. The frame-level tests use
`tb/mtb_ref_pkg.sv`, a software M algorithm (random branch metrics, merged-path
removal, stable sort) that keeps each survivor's complete input history, so
the decoded sequence of the best path is known independently of any trace
back; the hardware's output is compared with it bit by bit.

| testbench | checks |
|---|---|
| `tb_mtb_decision_memory` | random read/write against an array, read latency |
| `tb_mtb_path_select` | selected bits and pointer chain, M = 4, 2 decision bits |
| `tb_mtb_state_sr` | shift rule for 1 and 2 bits per step, decoding of a known sequence |
| `tb_mtb_lifo` | random push/pop against a queue, fill and drain order |
| `tb_mtb_re_bank` | rows and flushed words against a pointer-chain model, M = 4, m = 3 |
| `tb_mtb_traceback` | traced frames for STEP 1 (M = 2 and 4) and STEP 2, start-to-output latency |
| `tb_mtb_tb_smu` | frames at M = 2, 4 and 8, latency, stalls |
| `tb_mtb_combined_smu` | frames at m = 2, 3, 4 and 8 (M up to 8), latency, stalls |
| `tb_mtb_top` | 40 frames through both memories at the defaults, cycle counts, and that every mechanism occurred (frames, input stalls, both trace backs, bank flushes, LIFO read-outs) |
| `tb_mtb_example_path` | the worked example path above through both memories: 8 and 4 trace-back steps |

Each prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog. To run one
with Verilator (packages first):

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/mtb_pkg.sv tb/mtb_ref_pkg.sv tb/tb_mtb_top.sv \
        --top-module tb_mtb_top -o sim
    ./obj_dir/sim

All testbenches pass, and each fails when its module is replaced by a copy
with a single deliberate bug. Lint (`verilator --lint-only -Wall`) leaves only
unused-signal notes and a note that `rst_n` feeds both flip-flop resets and
assertion disables.
