# Low-latency self-timed flow-through FIFOs

A self-timed (clockless) FIFO built as a micropipeline is a chain of stages.
When the FIFO is empty, a word still has to ripple through every stage before
it appears at the output. In a sixteen-deep FIFO that is sixteen handshakes
of latency, even though nothing is blocking the word. The only reason for the
length is storage.

This design keeps the storage but shortens the path a word takes. It offers
five ways to build the same sixteen-word, eight-bit buffer, all side by side
in one top module (`lowlat_fifos`):

| Organization | Idea | Path of a word through the empty FIFO |
|---|---|---|
| Linear | the plain micropipeline, for reference | 16 stages |
| Parallel | deal words out in turn to four 4-deep FIFOs, collect them in the same turn | 4 stages plus deal/collect |
| Tree | a binary tree of storing cells fans words out; a mirrored tree fans them back in | 8 cells |
| Square | a top row drops words into short columns; a bottom row picks them up | an L-shaped path of 7 cells, whichever column |
| Folded | a U-shaped FIFO; a word jumps from the input side straight to the output side when everything ahead of it is empty | 1 latch (or 2, see Type 2) |

All five are first-in first-out: words leave in the order they entered, and
each holds exactly sixteen words.

## The handshake every channel uses

Every port and every internal link is a *two-phase bundled-data channel*: a
request wire, an acknowledge wire and a data bus.

- The sender puts a word on the data bus, then **toggles** the request. Rising
  and falling edges mean the same thing.
- The receiver takes the word, then toggles the acknowledge.
- The data must be stable before the request changes, and must stay stable
  until the acknowledge changes. This is the "bundling" constraint.

After `clr` every request and acknowledge wire is 0. A channel is idle when its
request equals its acknowledge, and busy (a word offered but not yet taken)
when they differ.

## Building blocks

The control logic uses a small set of transition elements:

- **C-element (join).** The output copies the two inputs when they agree and
  holds otherwise. It therefore fires once both inputs have toggled. With one
  input inverted it fires on the first toggle after clear ("half-cocked").
  This is the basic element that waits for two events.
- **Merge.** An XOR: a toggle on any input gives a toggle on the output.
- **Toggle.** It sends successive input toggles alternately to output 0 and
  output 1. An N-way Toggle (`toggle_n`) sends them round-robin to N outputs.
  It is built here as a binary tree of two-way Toggles, so N is a power of two.
- **Select.** It sends an input toggle to output 0 or output 1 according to a
  level `sel`. The level must be stable when the toggle arrives.
- **Q-Select.** A Select whose `sel` is *not* guaranteed stable. It samples
  `sel` when the toggle arrives. A real implementation needs an arbiter for
  this; see *Limits*.
- **Call.** It lets two mutually exclusive clients share one resource. The
  two requests are merged, and the resource's acknowledge goes back to
  whichever client asked.
- **Transition latch** (`tlatch`). A level latch driven by two transition
  inputs. A toggle on *capture* closes it and a toggle on *pass* opens it
  again. It is transparent while capture equals pass, so `full = capture ^
  pass`. The *capture-done* and *pass-done* outputs report that each action
  finished.

A **FIFO stage** (`fifo_stage`) is a C-element driving a transition latch.
The C-element has one input inverted and fires when a new request arrives
*and* the previous word has been passed on. Its output captures the word, and
the same toggle acknowledges the left side and requests the right side. The
right side's acknowledge opens the latch again. An empty stage is
transparent, so data run ahead of the control.

## Linear FIFO

`fifo_linear` is sixteen stages in a row. It is the reference point: the
rin-to-rout delay grows with depth, one C-element per stage. The input
acknowledge comes back after the first stage, so it accepts words quickly.

## Parallel FIFO

`par_distribute` sends the input request through a four-way Toggle. Word 0
goes to FIFO 0, word 1 to FIFO 1, and so on. The data bus goes to all four,
and the four acknowledges are XOR-merged into one input acknowledge.

`par_merge` must take the words back in the same order. A second four-way
Toggle, driven by the output acknowledge, keeps track of whose turn it is.
Each FIFO's output request goes through a C-element that is enabled only on
that FIFO's turn. The C-element for FIFO 0 is half-cocked, so FIFO 0 is
enabled after clear. The output multiplexer needs to know which FIFO is
current. Two adjacent Toggle outputs differ only while the turn is between
them, so the select signal is an XOR of neighbouring Toggle outputs.

A word passes 4 of the 16 stages plus the deal and collect logic.

## Tree FIFO

Each node of the tree is a storing cell:

- **Distribute cell** (`tree_dist_cell`). A FIFO stage whose capture-done
  goes through a two-way Toggle. The first stored word is offered to branch
  0, the next to branch 1, and so on. The latch reopens when either branch
  acknowledges.
- **Merge cell** (`tree_merge_cell`). It has one C-element per input, and a
  Toggle on its latch's pass-done arms them alternately, starting with input
  0. So it takes a word from branch 0, then from branch 1, and so on. A mux
  picks the matching data bus. The select is the XOR of the arming Toggle and
  the branch-1 acknowledge, so it flips only after a word from the other
  branch has been captured.

Because both trees alternate in the same pattern at every level, the words
come back out in the order they went in. `fifo_tree` uses three tree levels,
which hold 2 × (1 + 2 + 4) = 14 words on a six-cell path. It adds one linear
stage before and one after, making 16 words on an 8-cell path. The tree is
built with generate loops over heap-numbered cells (cell h feeds cells 2h and
2h+1).

## Square FIFO

The square FIFO (`fifo_square`) has a top row of four cells, four columns of
two linear stages, and a bottom row of four cells. A word enters at the top
left, runs right along the top row, drops down one column, and runs right
along the bottom row to the output.

**Ordering.** The first word after clear goes to the rightmost column. The
next goes one column to its left, and so on. Then the cycle repeats. The
bottom row must collect them in the same order. This shape is hard to control
because every cell has to know, from local handshakes only, whether the
*next* word goes straight on or turns.

**Top row.** The signalling is in the acknowledges. A top cell tells its left
neighbour where the neighbour's next word must go:

- acknowledge on **ALR**: send the next word right;
- acknowledge on **ALD**: send the next word down.

From the cells to the right, the top row works as follows:

- **Corner (rightmost).** A plain stage that always drops into the last
  column.
- **Next-to-last cell.** A distribute cell whose Toggle alternates between
  right and down. Its two Toggle outputs are also its ALR/ALD acknowledges to
  the left. When it has just sent a word right (to the corner), its
  neighbour's next word goes right too. When it has just sent one down, the
  neighbour's next word goes down.
- **Other cells** (`sq_top_cell`). Each cell remembers which kind of
  acknowledge it last received from the right. The latch reopens on any of
  the three acknowledges (ARR, ARD, or AD from the column), which is the XOR of
  the three. The "go down" level is ARD ⊕ AD. It is 1 exactly when the right
  neighbour has asked for a drop that has not happened yet. A Select on
  capture-done uses that level to send the request right or down. The request
  it sends is also the acknowledge to the left, as ALR or ALD.

So ALR/ALD pass down the row one cell per word. The result is that word k of
a round lands in column 3 − k.

**Bottom row.** The signalling is in the requests. A bottom cell tells its
right neighbour where the neighbour's word *after* this one comes from:

- **ROUTH**: after this word, take the next one from the left (horizontal);
- **ROUTV**: after this word, take the next one from your own column
  (vertical).

From the left, the bottom row works as follows:

- **Corner (leftmost).** A plain stage fed only by column 0.
- **Second cell.** A merge cell that alternates: column 1 first, then the
  corner. Its acknowledge to the column doubles as ROUTH, and its
  acknowledge to the corner doubles as ROUTV. After it forwards its own
  column's word, the right neighbour must next take from the left. After it
  forwards the corner's word, the round is over and the neighbour goes back
  to its column.
- **Other cells** (`sq_bot_cell`). Each cell holds two pieces of state as
  XORs of transition wires:
  - `mode_v`: "waiting for my column". It starts at 1, is cleared when a
    column word is captured, and is set again when this cell sends an ROUTV.
    It drives the data mux and two Selects. One Select routes capture-done
    back to the column or to the left. The other routes the right neighbour's
    acknowledge to re-arm the column C-element or the left C-element. The
    column C-element is half-cocked, because the first word comes from the
    column.
  - `type_v`: "the word I hold came with RINV". A third Select uses it to
    send capture-done to the right as ROUTV or ROUTH.

  Note the order: the request kind for the word in hand is decided by RINV.
  The switch back to the column happens only when the ROUTV actually leaves,
  after the word from the left has been captured. Deciding it earlier would
  steer the mux away from a word that is still arriving.

Every word passes seven cells, whichever column it uses: k + 1 top cells, two
column stages and 4 − k bottom cells for column k. The select cells add a
Select delay to the C-element delay, so in this model the first word after
clear reaches the output 11 control delays after it entered.

## Folded (arbited) FIFO

`fifo_folded` is U-shaped. Eight **top cells** carry words to the right. At
the end the words make a U-turn into eight **bottom cells** that carry them
left to the output. Top cell i sits above bottom cell i.

**The jump.** A word in top cell i may jump straight down into bottom cell i,
but only if nothing downstream of it holds data. Otherwise it would overtake
an older word. "Downstream" means:

- any top cell to the right of cell i (the word would be behind those); and
- bottom cell i or any bottom cell to its right (those words leave before
  cell i's).

Each cell computes `full = capture ^ pass` of its latch. Two OR daisy chains
collect these flags: the **top chain** runs right to left over the top cells,
and the **bottom chain** runs right to left over the bottom cells. Their OR
at position i is the `go_right` level for top cell i. In an empty FIFO a word
jumps at cell 0 and appears at the output after a single latch, whatever the
FIFO's length. The latency grows only as the FIFO fills.

**Why a Q-Select.** `go_right` is not bundled with the request. It is
computed by chains that change whenever other words move, so it may be
changing just as a request arrives. Each top cell therefore *samples* it with
a Q-Select.

The chains are safe to sample because a moving word is never invisible. A
sending stage stays full until the receiver has captured the word and
acknowledged. So the word is counted in at least one place at every moment,
and the chain cannot falsely read "empty" while a word is in flight. A false
"full" only costs a missed jump; the word then takes the long way, which is
always correct.

**Two top-cell arrangements** (parameter `LATCH_FIRST`):

- **Type 1** (`LATCH_FIRST = 0`, the default). The Q-Select comes *before*
  the latch. A jumping word is not latched in the top row at all: the request
  and `din` go straight to the bottom cell. The bottom cell's acknowledge,
  merged with this cell's own capture-done, is the input acknowledge. The
  shortest latency: 1 latch. The input acknowledge waits for the bottom
  cell, though. Because the decision is made before latching, this cell's own
  full flag is part of its top chain.
- **Type 2** (`LATCH_FIRST = 1`). The word is always latched first, which
  acknowledges the input at once. Then a Q-Select sends capture-done right or
  down. There are 2 latches on the shortest path, but the input acknowledge
  is faster, which helps throughput.

**Bottom cell** (`fold_bot_cell`). Words arrive either from the right (the
normal flow) or from the top (a jump). The jump rule makes the two mutually
exclusive, so a Call element merges the two requests into the cell's
C-element and returns the acknowledge to the right client. The data mux
follows the Call's "top client busy" level. The cell ORs its own full flag
into the bottom chain.

## Top level

`lowlat_fifos` (parameters `W = 8`, `DEPTH = 16`) has one channel per
organization. Index k of `rin`, `ain`, `din`, `rout`, `aout` and `dout`
belongs to organization k of `fifo_pkg::fifo_org_e`: 0 linear, 1 parallel,
2 tree, 3 square, 4 folded. The FIFOs share only `clr`, which is active high.
Hold all `rin` and `aout` at 0 while `clr` is high. `DEPTH` other than 16 is
rejected at elaboration. Other sizes are made by instantiating the individual
FIFO modules with their own parameters (`fifo_linear.DEPTH`,
`fifo_parallel.WAYS`, `fifo_tree.LEVELS`, `fifo_square.COLS/COL_DEPTH`,
`fifo_folded.CELLS/LATCH_FIRST`).

## Timing model and measured latency

The control elements (C-element, Toggle, Select, and the Q-Select and Call
built from them) delay their outputs by a parameter `DLY = 1` time unit. This
is a gate delay used only in simulation; synthesis ignores it. Latches,
multiplexers and XOR glue have no delay. As a result, a data word always
settles before the request that goes with it, which is what the bundling
constraint demands of real layout.

The empty-FIFO latencies measured in simulation, in control-element delays:

| 16-word FIFO | rin → rout | rin → ain |
|---|---|---|
| Linear | 16 | 1 |
| Parallel | 7 | 3 |
| Tree | 11 | 1 |
| Square (first word, far column) | 11 | 2 |
| Folded Type 1 | 2 | 3 |
| Folded Type 2 | 3 | 1 |

For eight words, the linear FIFO takes 8 and the folded FIFO still takes 2
(Type 1) or 3 (Type 2). The folded FIFO's latency does not depend on its
length.

The published comparison counted FPGA gates: linear 48, parallel 20, tree 27,
square 27–32, folded 14. The ranking is the same, except that tree and square
tie in this model. Area is not comparable, because the published figures used
a specific FPGA and CMOS cell library.

## Choices made in this design

Where the original description leaves details open, this design chose:

- **Tree sizing.** Three tree levels plus one linear stage on each side give
  16 words on an 8-cell path.
- **Square sizing.** Columns are two stages deep: 4 + 4 × 2 + 4 = 16 words.
- **N-way Toggle.** Built as a tree of two-way Toggles. The parallel merge's
  mux select is decoded one-hot from neighbouring Toggle outputs; for four
  ways it picks the same input at every step as a two-bit Gray-code select.
- **Square second bottom cell.** The acknowledge to the column is used as
  ROUTH, and the acknowledge to the corner as ROUTV. This mapping keeps the
  words in order.
- **Folded full chains.** For Type 1 the top chain includes the deciding
  cell itself; for Type 2 it starts at the next cell. These are the only
  choices that never let a word overtake another. The U-turn is a direct
  channel from the last top cell to the last bottom cell.
- **Reset.** A level `clr` forces all control state and latches to 0.

## Limits

- **Arbitration is not modelled.** A real Q-Select needs a mutual-exclusion
  element or Q-flop to resolve a `sel` that changes just as the request
  arrives, which can go metastable. Here it is a level latch that is
  transparent while no request is pending. Its logic is right, but
  metastability and its resolution time are analog effects that two-state
  simulation cannot show.
- The circuits are delay-dependent in the usual bundled-data way. The
  simulation delays satisfy the bundling constraints by construction. A
  physical implementation must add matched delays on the request wires.
- Synthesis sees the C-elements, Toggles and Selects as level latches in
  feedback loops, and lint tools report the handshake rings as circular
  logic. That is inherent in self-timed control.

## Files

- `rtl/fifo_pkg.sv`: sizes and the organization enumeration.
- Elements: `c_element.sv`, `merge.sv`, `toggle2.sv`, `toggle_n.sv`,
  `select2.sv`, `qselect2.sv`, `call2.sv`, `tlatch.sv`.
- Linear and parallel: `fifo_stage.sv`, `fifo_linear.sv`,
  `par_distribute.sv`, `par_merge.sv`, `fifo_parallel.sv`.
- Tree: `tree_dist_cell.sv`, `tree_merge_cell.sv`, `fifo_tree.sv`.
- Square: `sq_top_cell.sv`, `sq_bot_cell.sv`, `fifo_square.sv`.
- Folded: `fold_top_cell.sv`, `fold_bot_cell.sv`, `fifo_folded.sv`.
- Top: `lowlat_fifos.sv`.
- `tb/`: one self-checking testbench per module (`tb_<module>.sv`).
  - `fifo_tester.sv` is a reusable environment. It measures empty latency,
    fills the FIFO to check its exact capacity, then streams random words
    with random stalls on both sides and checks order. It also watches the
    handshake protocol.
  - `tb_lowlat_fifos.sv` drives all five FIFOs at their default size. It
    also fails any internal mechanism that never happened: parallel arms,
    tree branches, square column drops and ROUTV requests, folded jumps at
    cell 0 and deeper, and U-turns.

## Simulating

With Verilator 5 (timing support is needed for the gate delays):

```
verilator --binary --timing --assert -Irtl -Itb rtl/fifo_pkg.sv tb/tb_lowlat_fifos.sv --top-module tb_lowlat_fifos
./obj_dir/Vtb_lowlat_fifos
```

Every testbench ends with a line `TB_RESULT checks=<n> failures=<m>`. A
watchdog stops a hung simulation and counts it as a failure.
