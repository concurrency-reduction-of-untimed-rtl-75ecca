# A configurable family of 4-phase latch controllers

A bundled-data asynchronous pipeline stage is a data latch plus a small
controller. The controller talks 4-phase handshakes on two channels: the
input channel (`lr` request in, `la` acknowledge out) and the output channel
(`rr` request out, `ra` acknowledge in). It also opens and closes the latch
through a third handshake (`ren` out, `aen` in). Dozens of such controllers
have been published. They differ only in how much the two channels may
overlap: when `la` may rise relative to `rr`, whether the input may start a
new token before the output has finished the old one, and so on.

This RTL builds that whole space of controllers from one description.

- The most concurrent legal controller, **max**, is written once as four small
  communicating processes.
- Every other controller of the family is obtained by *cutting* states away
  from the state graph of max.
- A controller is named by a pair of cuts, `Labcd ∘ Rabcd`. It is selected by
  two 16-bit parameters, `LCUT` and `RCUT`, of the controller `latch_ctrl` and
  of every pipeline built from it.

The family has 10 left cuts and 25 right cuts. 159 of the 250 combinations
are live (they never deadlock), and 137 of those are pipelined: a stalled
pipeline holds more than one token. The default is max (`L0000 ∘ R0000`).

This is a **clocked realisation** of untimed protocols. Every controller
output comes from a register that moves on the rising edge of `clk`. A handshake edge therefore
costs one clock edge instead of a gate delay. The behaviour at the channel
pins, meaning which orderings of `lr, la, rr, ra` can occur, is exactly the
chosen protocol's. The timing is that of the clocked model, not of a
clockless gate circuit.

## The four processes of max

A stage moves one token from its input to its output. Two internal tokens
make it safe:

* **S** ("space"). It is full at reset and means the latch may be overwritten.
* **V** ("valid"). It is empty at reset and means the latch holds data the
  output channel has not sent yet.

The processes, written as the order of their actions:

| process | actions, repeated forever |
|---|---|
| L (input side) | wait `lr↑` · take S · `ren↑ aen↑ ren↓ aen↓` (latch captures) · put V · `la↑` · wait `lr↓` · `la↓` |
| R (output side) | take V · `rr↑` · wait `ra↑` · put S back · `rr↓` · wait `ra↓` |

Max lets every action happen as soon as these two processes and the tokens
allow it. The latch is normally closed: it opens only while `ren` is high.
The data must therefore be valid and bundled with `lr↑`, as in any
bundled-data pipeline.

## The shape: rows, columns and cuts

This is the part that needs care. The reachable states of max, with the latch
handshake and the tokens hidden, form 32 states. They fit a grid, which this
RTL calls the *shape*:

* **Row** = phase of the output channel.
  * row 1: `rr=0 ra=0`
  * row 2: `rr=1 ra=0`
  * row 3: `rr=1 ra=1`
  * row 4: `rr=0 ra=1`

  Going down a row is one output-channel edge.
* **Column** = progress of the input channel, counted relative to the output
  channel. Every `lr` or `la` edge moves one column right.
  * Column `c` has input phase `c mod 4`: 0 is `lr=1 la=0`, 1 is `11`, 2 is
    `01`, 3 is `00`.
  * When `ra` falls (row 4 back to row 1) the output channel has finished a
    token, so the column is renumbered four lower.

The shape of max in these coordinates:

```
column      0 1 2 3 4 5 6 7 8 9 10 11 12
row 1       x x x R x x x x x
row 2                 x x x x x
row 3                 x x x x x x  x  x  x
row 4                 x x x x x x  x  x  x
```

`R` is the reset state: row 1, column 3, all four wires low. Row 1 stops at
column 8 because a second token cannot be acknowledged before the first has
given S back. Row 2 stops at column 8 for the same reason. Rows 3 and 4 run
on to column 12 because the output channel has already returned S there.

Every column number below is this design's own encoding of the grid.

**Right cut `Rabcd`.** It removes `a, b, c, d` states from the *right* end of
rows 1, 2, 3, 4. It delays the input channel relative to the output channel,
i.e. it reduces how far the input may run ahead.

**Left cut `Labcd`.** It removes `a, b, c` states from the *left* of rows 2, 3,
4, counted from column 4, and `d` states from the left of row 1, counted from
column 0. It delays the output channel relative to the input channel.

The nibbles are written into the parameter exactly as the name reads:
`R2042` is `16'h2042` and `L0033` is `16'h0033`.

A cut is allowed when its numbers fall inside the legal ranges, which keep
the shape convex. A cut is *untimed* when two further conditions hold:

* The controller never refuses an input edge. This makes every right-cut
  number even and, on the left, forces `a=b` and `c=d`.
* For the delay-insensitive subset, the same holds for its own outputs.

`lp_pkg` computes the lists of untimed cuts from these rules rather than
storing them: 10 left cuts and 25 right cuts. A pair is **live** if every row
keeps at least one state and every neighbouring pair of rows keeps a path
down (seven inequalities, `lp_pkg::is_live`). These give 159 live pairs.

**Occupancy.** The right cut alone predicts how many tokens a stalled pipeline
holds:

| class | right cuts | tokens held by a stalled pipeline |
|---|---|---|
| full | `R0000` … `R2262` | one per stage |
| half | `R2244`, `R2264`, `R4244`, `R4264` | one per two stages |
| unpipelined | the rest (row 2 keeps only its first state, or row 4 loses six or more) | at most one in the whole pipeline |

Among the live shapes these classes have 115, 22 and 22 members.
`lp_pkg::occ_of_rcut` states the grouping as a formula. `lp_family_tb`
measures it.

## How `latch_ctrl` works

The controller runs processes L and R as small state machines, with one flag
each for S and V. It also keeps its position in the shape:

* the row comes from `rr` and the last sampled `ra`;
* the column is a 4-bit counter, reset to 3.

On each clock edge:

1. The inputs `lr`, `ra` and `aen` are sampled. An input edge updates the
   position: `lr` moves one column right, and `ra↓` moves four columns left.
   Under the untimed rule an input edge can never leave the shape.
2. An output edge (`la` or `rr`) is *enabled* when two things hold: its
   process and tokens allow it, and the state it leads to is inside
   `Lcut ∘ Rcut`.
3. Every enabled output fires on this edge. If `la` and `rr` are both enabled
   and the diagonal state is in the shape, both fire. If it is not, `rr` goes
   first and `la` waits a cycle. This priority is this design's choice.

The controller carries assertions for the following:

* the 4-phase rules of both channels;
* every state reached lies inside the shape;
* the column never leaves 0..12;
* the column always agrees with the phase of `lr, la`.

The last three hold by construction. They catch a wrong cut or a wrong
environment.

**Timing, max, latch acknowledging one edge after `ren`.** Call the edge that
first samples `lr=1` edge 0. Then:

* `ren` rises after edge 1;
* `aen` rises after edge 2;
* `ren` falls after edge 3;
* `aen` falls after edge 4;
* V is put after edge 5;
* `la` and `rr` rise together after edge 6.

A stage therefore adds 7 edges of forward latency. Cuts can only delay
outputs, never hurry them.

## Pipelines and the test set-up

* `data_latch`: the latch, modelled as an enabled register. It loads while
  `ren` is high and answers `aen` one edge later.
* `pipe_stage`: `latch_ctrl` plus `data_latch`.
* `series_pipe`: `DEPTH` stages in a chain, the pipeline *SP_d*.
* `hs_fork` / `hs_join`: split one channel into `W` channels and join them
  again.
  * The fork broadcasts the request. Its acknowledge is a Muller C-element
    (it changes only when all branch acknowledges agree).
  * The join does the mirror image.
  * Data is split into, and reassembled from, `W` slices.
* `parallel_pipe`: fork, `W` series pipelines, join: the structured parallel
  pipeline *PP_w,d*.
* `hs_source`, `hs_sink`: the behavioural ends of a test pipeline. The left
  end requests while `go` is high and the acknowledge is low. The right end
  acknowledges while `go` is high and a request is pending. Both hold a
  started handshake when `go` drops, so the channels stay legal. The source
  sends consecutive token numbers. The sink counts the tokens received and
  keeps the last one.
* `lp_top`: a 4-deep series pipeline and a 2-wide, 4-deep parallel pipeline
  of the same protocol, side by side. Each has its own source and sink. Both
  `go` inputs of each side, the token counters, the last token and the four
  channel wires at the pipeline ends are ports.

All resets are asynchronous and active low, into the all-zero quiescent state.

## Measured behaviour

`lp_char_tb` characterises five protocols in a 4-deep pipeline, in clock
edges. The metrics:

* **forward:** `lr↑` at the input to `rr↑` at the output, pipeline idle;
* **backward:** `ra↑` at the output to the next `la↑` at the input, pipeline
  full and stalled;
* **cycle:** the largest gap between insertions of twelve tokens streamed
  into an empty pipeline.

| protocol | forward | backward | cycle |
|---|---|---|---|
| L0000 ∘ R0000 (max) | 28 | 28 | 14 |
| L2233 ∘ R2244 | 45 | 8 | 28 |
| L0033 ∘ R4244 | 28 | 10 | 19 |
| L0022 ∘ R2042 | 28 | 28 | 14 |
| L0033 ∘ R2242 | 28 | 42 | 18 |

The gate-level versions of these circuits were characterised in picoseconds
on a 65 nm process. Those numbers depend on the gates each protocol
synthesises to, so the clocked model reproduces their orderings only in part:

* Reducing the concurrency of the output channel (left cuts `La, Lb`) raises
  forward latency, as in the gate-level study.
* The clocked model cannot show the opposite effect, that simpler logic is
  faster.

Parallel pipelines add one edge of latency for the join: 29 edges for depth 4.

## Where this design departs from the published family

* The published controllers are clockless gate circuits. This RTL is a
  synchronous emulation of the same protocols, and every delay is one clock
  edge.
* The order of simultaneous outputs is this design's choice: `rr` before `la`
  when the shape forbids firing both together.
* The fork, join and test interfaces are the simplest circuits that do the
  job. Their internals are not specified by the family definition. The
  interfaces add a hold term so that `go` can drop mid-handshake.
* With identical branches and a common clock, the branches of a parallel
  pipeline run in lockstep. The untimed analysis shows parallel pipelines
  gaining states through different branch interleavings, and that needs
  branches that drift apart. The RTL transports data correctly, but it does
  not exhibit those interleavings.
* State counts of whole pipelines (which shapes are kept, gained or lost in
  deep or parallel pipelines) come from exploring every interleaving of the
  untimed model. A simulation explores one interleaving per run, so these
  counts are not reproduced.
* The two unpipelined right cuts `R2266` and `R4266` hold one acknowledged
  token in a stalled pipeline; the other unpipelined cuts hold none. Both
  fit "at most one, independent of depth".

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `LCUT`, `RCUT` | `16'h0000` | every controller and pipeline | protocol `Lcut ∘ Rcut` (must be untimed and live; the controller's assertions fire otherwise) |
| `WIDTH` | 8 | latch, stages, pipelines | data bits (per branch in `parallel_pipe`) |
| `DEPTH` | 4 | `series_pipe`, `parallel_pipe`, `lp_top` | stages per pipeline, as in the characterisation set-up |
| `W` / `PAR_W` | 2 | fork, join, `parallel_pipe` / `lp_top` | branches of the parallel pipeline |
| `CW` | 16 | source, sink, `lp_top` | token counter width |

`lp_pkg` offers:

* `lcut_at(i)`, `i` = 0..9, and `rcut_at(j)`, `j` = 0..24: the untimed cuts;
* `is_live(l, r)`;
* `occ_of_rcut(r)`.

Use them to pick or enumerate protocols in generate loops.

## Testbenches

Every testbench is self-checking and ends with a one-line
`TB_RESULT checks=… failures=…` summary.

| testbench | what it checks |
|---|---|
| `lp_pkg_tb` | cut counts (10, 25), 91 dead pairs, 23 live delay-insensitive pairs, 22 unpipelined, shape sizes, complements of cuts |
| `latch_ctrl_tb` | four protocols under a random environment: every state in the shape (checked against an independent mask), handshake orders, latch-before-`la`/`rr`, S/V safety; plus the 7-edge latency |
| `data_latch_tb`, `pipe_stage_tb` | latch handshake and capture; one stage holds one token when stalled |
| `series_pipe_tb`, `parallel_pipe_tb` | data order and integrity under random traffic, latency 28/29 edges, 4 tokens held when stalled, drain; parallel pipelines of widths 1, 2 and 3 behave identically at their channels |
| `hs_fork_tb`, `hs_join_tb` | against a reference C-element, with 3 branches |
| `hs_source_tb`, `hs_sink_tb` | interface equations, hold behaviour, counters |
| `lp_top_tb` | whole top at default parameters, random / stall / drain phases, scoreboards on both pipelines. It must see stalls, throttling, a full pipeline, a stage whose input runs ahead of its output (column ≥ 8) and one whose output runs ahead (row 1, column < 3) |
| `lp_family_tb` | 37 shapes by default: every right cut with `L0000`, every left cut with `R0000`, and three further combinations. Streaming, occupancy class, drain. Set `ALL_SHAPES = 1` for all 159 live shapes (slow to compile) |
| `lp_char_tb` | the characterisation above |

To run one with plain verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --assert -Wno-fatal -Irtl -Itb rtl/lp_pkg.sv tb/lp_top_tb.sv --top-module lp_top_tb
./obj_dir/Vlp_top_tb
```

Change the testbench name for the others. `lp_top` itself takes the
parameters above. To try another protocol, set `LCUT` and `RCUT` on its
instance, e.g. `#(.LCUT(16'h0022), .RCUT(16'h2042))`.
