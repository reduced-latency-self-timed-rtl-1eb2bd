# Reduced-latency flow-through FIFOs

A self-timed flow-through FIFO built as a micropipeline is simple and fast. Each
stage is a latch controlled by one C-element. The sender only ever talks to the
first stage, so throughput does not depend on depth. The price is latency:
every word ripples through every stage. In a 16-word FIFO, a word written
into the empty FIFO still passes 16 latches before it can be read.

This library contains five ways of organising a 16-word flow-through FIFO.
Each one keeps the local two-phase handshake but lets a word skip most of the
stages:

| FIFO | Idea | Path of one word |
|---|---|---|
| `linear_fifo` | plain micropipeline (the reference) | all 16 stages |
| `parallel_fifo` | words dealt round-robin to 4 linear arms of 4 stages, collected in the same order | 4 stages + distribute/merge |
| `tree_fifo16` | words fanned out through a binary tree of storing cells and fanned back in | 8 cells |
| `square_fifo` | a top row drops words into 4 columns, a bottom row collects them; L-shaped path | 7 cells |
| `arbited_fifo` | folded U of 2 x 8 cells; a word jumps down to the output row as soon as nothing older is ahead | 1–2 cells when empty, up to 16 when full |

`fifo_suite` instantiates all of them side by side. It has two arbited FIFOs,
one for each top-cell variant. The FIFOs share only the clock and the clear.

## Two-phase channels, and how time is modelled

Every connection between cells is a two-phase bundled-data channel:

* `req` toggles once per word.
* `ack` toggles once when the word has been taken.
* the data bus is held stable while `req != ack`.

Nothing is level-sensitive on the interface. A channel is idle when
`req == ack`, and both wires are 0 after the master clear (`rst_n` low).

These circuits are self-timed. Synthesizable RTL and a two-state simulator have
no notion of gate delay. So each storage control element of the circuits is a
flip-flop:

* the C-element;
* the toggle stages;
* the pass (P) state of a latch;
* the select state;
* the two latches of the Q-select.

Each of these may change once per clock. XOR merges, muxes and the full/empty
OR chains stay combinational. A clock therefore stands for one control-element
delay. Latencies in clocks count the control elements a word passes, like the
gate-delay counts used to compare the original circuits. The clock is a time
step, not a synchronous interface: a FIFO's two channels can be driven by any
logic in the same clock domain that obeys the two-phase rule.

The same model gives every cell the same inner structure:

* A **C-element** combines the incoming request with the inverted pass state.
  When it fires, the latch captures the word. The new C level then serves as
  both the request onward and the acknowledge backward.
* The **pass state P** follows the onward acknowledge one clock later. This
  reopens the latch and re-arms the C-element.
* A cell holds a word while `C != P`. The arbited FIFO reads this XOR as the
  cell's full flag.

## Building blocks

**`c_element`**: a Muller C-element with an optional inverted second input and
a clear value. With the inverted input it is "half-cocked" after clear. It then
fires on the first request alone, which is how a merge accepts its first word
from a chosen input.

**`mp_stage`**: one micropipeline stage. `linear_fifo` chains `DEPTH` of them.
`DEPTH = 0` gives a plain wire, so that tree leaves and square columns can be
empty. An assertion in every stage enforces the two-phase rule on its input:
the sender may not toggle the request again until it has been acknowledged.

**`toggle_n`**: an N-way transition toggle. Successive input transitions come
out on `tout[0]`, `tout[1]`, … in turn. It is a Johnson counter that steps on
both input edges. For N = 4 the states are 0000, 1000, 1100, 1110, 1111, 0111,
0011, 0001 (bit 0 first). Each step flips exactly one bit, so `^tout` equals
the number of transitions seen, mod 2. A new input transition is therefore
simply `tin != ^tout`. `idx` gives the level-coded number of the next output,
which drives the merge muxes. Odd N works the same way.

## Parallel FIFO

`toggle_distribute` sends each input request to the next arm through a 4-way
toggle, and XORs the arms' acknowledges back into `ain`. It stores nothing, and
all arms see the same data bus.

`toggle_merge` gates each arm's request with its own C-element:

* Gate k's other input is toggle output k-1.
* Gate 0's other input is the inverted last output, so gate 0 is the
  half-cocked one.
* The consumer's acknowledge steps the toggle. Output k of the toggle both
  acknowledges arm k and enables gate k+1.
* The gate outputs are XORed into `rout`.
* The toggle position selects the mux.

Words therefore leave in the order they were dealt, however the arms race.

## Tree FIFO

Unlike the parallel FIFO's distributor and merger, the tree cells store a word
each.

* `tree_dist_cell` latches a word, then sends the latch's request alternately
  to its two outputs through a 2-way toggle. The pass state is the XOR of the
  two output acknowledges.
* `tree_merge_cell` takes words alternately from input 0 (first) and input 1
  into a mux-latch. It acknowledges only the input it latched.

`tree_fifo` builds the tree. A distribute cell feeds two sub-trees and a merge
cell recombines them; a leaf is a `linear_fifo` of `LEAF_DEPTH` stages. The RTL
lays this out as a heap: node n of level l feeds nodes 2n and 2n+1. Sizes:

* 2 levels: 6 words, 4 cells on the path.
* 3 levels: 14 words, the default.
* 2 levels with single-stage leaves: 10 words, 5 cells on the path.

`tree_fifo16` puts one plain stage before and after the 14-word tree to reach
16 words.

## Square FIFO: passing a "drop position" with handshakes only

This is the least obvious design. `square_fifo` has three parts:

* A top row of `COLS` cells.
* `COLS` vertical `linear_fifo` columns of `COL_DEPTH` stages.
* A bottom row of `COLS` cells.

The defaults are 4 columns of 2 stages, so 4 + 8 + 4 = 16 words.

Words must drop down in a rotating order. Word 0 drops into the rightmost
column, word 1 into the next column to the left, and so on. Word 4 then starts
again at the far right. Conceptually a "drop bit" moves one cell to the left
per word. No cell sends it as a level signal: it travels in the *kind* of
handshake transition.

**Top row, left to right: select cells, one toggle cell, a corner stage.**

* A cell acknowledges its left neighbour on one of two wires:
  * `alr` means "your next word goes right";
  * `ald` means "your next word goes down".
* `sq_top_toggle`, the next-to-last cell, alternates right and down. It
  answers `alr` for a word it will pass right and `ald` for one it will drop.
* `sq_top_select` cells keep a SEL bit. An `ald`-type acknowledge from the
  right (ARD) sets SEL, so the cell drops its next word. The acknowledge from
  its column (AD) clears SEL. A cell answers its own left neighbour with the
  kind that matches where its current word goes.
* The corner cell is a plain stage whose only way out is down.

**Bottom row, left to right: corner stage, one toggle-merge cell, select-merge
cells.** The rule is the mirror image of the top row. A word is sent to the
right on one of two request wires:

* `routh` means "after this word, take your next one from the left";
* `routv` means "after this word, take your next one from your column".

`sq_bot_toggle` alternates its column and its left input, column first. It
emits `routh` after a column word and `routv` after a left word.

`sq_bot_select` starts on its column (its column gate is half-cocked). After a
column word it switches to the left input and emits `routh`. A left word
arriving as `rinh` keeps it on the left and is passed on as `routh`. A left word
arriving as `rinv` sends it back to its column and is passed on as `routv`.

The last cell's two request kinds are XORed into `rout`. Every word takes
`COLS + COL_DEPTH + 1` cells, and the FIFO is square-root-shaped for any size.
`COLS >= 2` is required.

## Arbited FIFO: skipping empty cells

`arbited_fifo` folds `2*HALF` cells into a U:

* Top cells `arb_top_cell` carry words to the right.
* Bottom cells `arb_bot_cell` carry them back to the output at the left.
* The two end cells are plain stages.

Top cell i may send its word straight down to bottom cell i, but only if
nothing older is ahead of it. Two combinational OR chains of the C-xor-P full
flags report that:

* `tf`: some top cell to the right of i is full;
* `bf`: bottom cell i, or a bottom cell to its right, is full.

In an empty FIFO the first word therefore drops straight into the output cell.
When the bottom row is full, words travel the whole U like a linear FIFO.

The status is changing while a cell looks at it. So a `q_select` takes the
decision:

* It samples the unbundled `sel` level into a first latch when the request
  arrives.
* It copies the sample into a second latch a clock later.
* It then steers the delayed request to `tout` (blocked: go right) or `fout`
  (free: go down).

Because the status is synchronous here, sampling cannot go metastable. The two
stages are kept for the element's structure and delay.

Two top-cell variants exist (`TYPE`):

* **TYPE 2** latches the word first, acknowledges the sender at once, and then
  decides. An empty FIFO passes a word through 2 cells in 4 clocks.
* **TYPE 1** decides on the incoming request before latching. A free word goes
  down with its data passing straight through, and the sender is acknowledged
  only when the bottom cell has latched it. An empty FIFO passes a word through
  1 cell in 3 clocks, but the input acknowledge is slower. For TYPE 1 the cell's
  own latch is part of the blocking condition, so a word cannot overtake an
  older word still held in that cell.

The latency therefore depends on how full the FIFO is. With k words held and
the output stopped, the words sit in bottom cells 0 to k-1. The next word goes
down at top cell k, and k = `HALF-1` is the U-turn. Each held word adds one top
cell, which is 3 clocks, before the new word reaches the bottom row.
`tb_arbited_fifo` checks this for k = 0 to 7.

The bottom cells accept a word from the right or from the skip path above. A
top cell skips only into an empty stretch of the bottom row, so the two are
never requested at once. `arb_bot_cell` asserts this on every clock. The
assertion is the design's correctness check for the status chains.

## Measured behaviour (defaults, 8-bit words)

These figures come from `tb_fifo_suite`:

* **Latency**: clocks from a request into an empty FIFO until the word is
  offered at the output.
* **Capacity**: words accepted while the consumer is stopped.
* **Burst**: clocks per word with source and sink at full speed.

| FIFO | Latency | Capacity | Burst |
|---|---|---|---|
| linear | 16 | 16 | 3 |
| parallel | 6 | 16 | 3 |
| tree | 11 | 16 | 4 |
| square | 7 | 16 | 3 |
| arbited, TYPE 1 | 3 | 16 | 5 |
| arbited, TYPE 2 | 4 | 16 | 5 |

In this model the tree comes out slower than the square. A distribute cell
costs two clocks: one for its latch and one for its toggle. A gate-level count
weights these elements differently. The arbited FIFO's throughput is limited by
the Q-select, which sits inside each top cell's handshake loop.

## Where this RTL departs from the original gate-level circuits

* **Self-timed behaviour is emulated with a clock**, as described above. Delay
  matching (the capture-done and pass-done delays, bundling margins) is
  replaced by one-clock steps. There are no races, so the internal timing
  hazards of a latch-based toggle do not arise.
* **Latches are registers.** A micropipeline latch is transparent while empty.
  Here the data register is written when the C-element fires. The next stage
  reads it only while the stage is full, so FIFO behaviour is the same, but an
  empty FIFO is not a transparent path.
* **The Call elements** (two requesters sharing a latch) and the select
  elements are written as behaviour inside the cells, not as separate library
  modules.
* **Toggles of odd size** wrap their Johnson state directly. There is no
  hidden extra position fed back to the input, so there is no slow step every
  N transitions.
* **The Q-select** is the two-latch approximation, not a true arbiter or
  Q-flop. The variants built around a Q-flop or a request-grant-done arbiter
  are not provided. With a synchronous status level they would make the same
  decisions; only their delay could differ.
* **Square column depth** (`COL_DEPTH = 2`) and the default arbited top-cell
  type (`TYPE = 2`) are this library's choices. Both arbited types are
  instantiated in `fifo_suite`.
* **Word width** defaults to 8 bits. 32 bits is the other size of interest;
  set `WIDTH = 32`.

## Files

`rtl/` has one module per file:

* `fifo_pkg` holds the default width and depth;
* `c_element`, `mp_stage`, `linear_fifo`, `toggle_n`;
* `toggle_distribute`, `toggle_merge`, `parallel_fifo`;
* `tree_dist_cell`, `tree_merge_cell`, `tree_fifo`, `tree_fifo16`;
* `sq_top_select`, `sq_top_toggle`, `sq_bot_toggle`, `sq_bot_select`,
  `square_fifo`;
* `q_select`, `arb_top_cell`, `arb_bot_cell`, `arbited_fifo`;
* `fifo_suite`, the top.

`tb/` has one self-checking testbench per block, plus `tb_chan_env`. That
module is a two-phase source and a checking sink. The source sends
hash-numbered words with random or full-speed timing. The sink checks order
and data, and measures the empty latency.

Most FIFO testbenches run the same phases:

1. one word into the empty FIFO, with its latency checked;
2. filling with the consumer stopped, with capacity and source stall checked;
3. draining;
4. a random-timing stream;
5. a full-speed burst.

Some mechanisms are also counted and required:

* the column a square FIFO word drops into, checked against the rotation;
* skips from every arbited top cell, and the full U-turn;
* the arbited top cell a word goes down at, for each fill level;
* the use of every parallel arm and every tree leaf.

`tb_fifo_suite` runs all six FIFOs of the top at their default parameters.

## Simulating

Any testbench builds with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    --top-module tb_fifo_suite rtl/fifo_pkg.sv tb/tb_fifo_suite.sv
./obj_dir/Vtb_fifo_suite
```

Replace the top module name to run another testbench. Each one ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog that counts a failure if it
hangs. All testbenches finish in well under a second of simulation time.

To change a size, override the parameters, for example:

* `parallel_fifo #(.WAYS(3), .ARM_DEPTH(5))`
* `tree_fifo #(.LEVELS(2), .LEAF_DEPTH(1))`
* `square_fifo #(.COLS(5), .COL_DEPTH(3))`
* `arbited_fifo #(.HALF(4), .TYPE(1))`

The testbenches already simulate several such sizes.
