# Token-ring FIFOs with low latency

A conventional asynchronous FIFO is a pipeline: every item ripples through
every stage, so the time from input to output grows with the depth. The
FIFOs here never move an item. They are a ring of identical *cells*, each
holding one word, all hanging on a common put bus and a common get bus. Two
tokens travel around the ring:

* the **PUT token** marks the tail: only the cell holding it may take the
  next item from the put bus;
* the **GET token** marks the head: only the cell holding it may place its
  item on the get bus.

Each token moves to the next cell once its cell has used it, and the PUT
token always stays ahead of the GET token. An item written into an empty
FIFO is already in the cell that holds the GET token, so it can leave at
once: the latency is that of one cell's control, whatever the depth.

This RTL follows the design published as *Low-Latency Asynchronous FIFO's
Using Token Rings*. Three FIFOs are given, side by side in the top level
`token_ring_fifo_top`:

| prefix | design | role |
|---|---|---|
| `opt_` | optimized protocol, cell of OPT, OGT, PC, GC, DV controllers | the main design: lowest latency, smallest control |
| `bm_`  | base protocol, cell of burst-mode controllers, plus a Starter | the simpler protocol the optimized one improves on |
| `hs_`  | base protocol, cell and Starter built as handshake circuits | the same protocol from standard handshake components |

Defaults are 4 places and 8-bit data, the main evaluated configuration.
All three are parameterised by `N` (places, capacity `N`) and `WIDTH`.

## The environment's view

All three FIFOs have two **passive** four-phase bundled-data channels; the
environment starts every transfer.

* **put**: drive `put_data`, raise `put_req`, wait for `put_ack`, lower
  `put_req`, wait for `put_ack` to fall. Keep `put_data` stable until then.
* **get**: raise `get_req`, wait for `get_ack`, take `get_data`, lower
  `get_req`, wait for `get_ack` to fall.

A get on an empty FIFO is legal: it simply waits until an item is written.
A put on a full FIFO is legal too: it waits until an item has been read.
`put_ack` and `get_ack` are the OR of all cells' acknowledges, and
`get_data` is the OR of the cells' bus drives (exactly one cell drives at a
time; the original uses tri-state drivers).

## How the optimized cell works

This is the part worth reading slowly. The cell (`opt_cell`) has no token
channels at all: a token is handed over by a **complete pulse** on a wire
the cell already has. The right-hand neighbour's write enable `we1` rising
and falling means "I have latched my item, the PUT token is yours"; its read
enable `re1` rising and falling hands over the GET token. Cell `i`'s
right-hand neighbour is cell `i-1`; cell 0's is cell `N-1`.

Six elements make up a cell:

| element | module | behaviour |
|---|---|---|
| OPT, obtain PUT token | `opt_obtain_put_token` | after a `we1` pulse raise `ptok`; drop it as soon as own `we` rises; wait for `we` to fall |
| OGT, obtain GET token | `opt_obtain_get_token` | after an `re1` pulse raise `gtok`; keep it through own `re` high; drop it when `re` falls |
| PC, put controller | `opt_put_ctrl` | asymmetric C-element: `we` rises on `put_req & ptok & !valid`, falls on `!put_req & !ptok` |
| GC, get controller | `opt_get_ctrl` | asymmetric C-element: `re` rises on `get_req & ra & valid`, falls whenever `!get_req` |
| DV, data valid | `opt_data_valid` | `valid` rises on `we` rising; falls only after `re` has risen *and fallen* |
| REG | `cell_reg` | latches transparent while `we`; read port enabled by `gtok`; acknowledges `wa` (= `put_ack`) and `ra` |

Three ideas give the low latency and the good cycle time:

1. **Early read enable.** The register's read port is opened by the GET
   token itself, before any get request. In an empty FIFO the cell holding
   the GET token already drives the get bus, and its latches are
   transparent while being written, so a new item reaches the bus without
   waiting for the put to finish. GC then only waits for `ra`, `valid` and
   `get_req`.
2. **Overlap inside a cell.** `valid` rises as soon as the write starts, so
   the item can be dequeued while the put handshake is still returning to
   zero. `valid` falls only after the get has completely returned to zero,
   so the register cannot be overwritten while it is being read.
3. **Token passing in parallel with data.** A token is passed by the same
   pulse that does the data operation, and obtaining the GET token
   overlaps with enqueueing (and the PUT token with dequeueing), so only
   two actions are on the critical path: obtain the token, move the data.

Sequence in an empty FIFO with a get request waiting, in model steps
(see "Timing model"): `put_req`↑, then `we`↑ (1), `valid`↑ and `put_ack`↑
(2), `re` = `get_ack`↑ with the item on `get_data` (3).

After reset, cell 0 holds both tokens (its OPT and OGT start in the
token-held state) and all registers are empty, so no Starter is needed.

**Full and empty.** With `N` items stored, the PUT token sits in a cell whose
`valid` is high and PC will not write; the put waits until that cell's item
is read. With no items, the GET token sits in a cell whose `valid` is low
and GC will not read.

## How the base-protocol cell works

In the base protocol (`bm_cell`) each cell runs a strict loop: obtain the
PUT token from the right, enqueue one item, pass the token left; obtain the
GET token from the right, dequeue the item, pass it left. Both tokens use
the same pair of four-phase channels: the active `right` channel
(`right_req`/`right_ack`, "give me the next token") and the passive `left`
channel (`left_req`/`left_ack`, the left neighbour asking for a token).

| element | module | behaviour |
|---|---|---|
| TD, token distributor | `bm_token_distributor` | 12-state machine: right handshake, then `ptok` handshake, then `pass` handshake; the same for `gtok`; repeat |
| PC and GC | `bm_data_ctrl` (two instances) | C-element of the bus request and the token request; output is both the token acknowledge and the register's write (read) enable; the register's acknowledge answers the bus |
| LC, left controller | `bm_left_ctrl` | C-element of `left_req` and `pass_r`: the neighbour gets a token only when one is ready to pass |
| REG | `cell_reg` | as above, read port enabled by GC |

The ring needs a **Starter** (`bm_starter`) between cell 0 and cell `N-1`. It
owns both tokens after reset: it answers the first two requests of cell 0
directly (PUT token, then GET token). After that it only relays: each request
from cell 0 becomes a request to cell `N-1`, answered back once that cell has
passed a token. Every cell raises `right_req` at reset, asking for its first
token.

Because a cell must complete its put and pass the PUT token before it may
even ask for the GET token, an item in an empty FIFO needs 14 model steps
to come out instead of 3.

## The base protocol as a handshake circuit

`hs_cell` does the same job as `bm_cell` but is composed from five kinds of
small, standard handshake components instead of purpose-built controllers.
The cell repeats six steps for ever: get a token from the right, take an
item from the put bus into its register, pass the token left, get the next
token from the right, drive the item onto the get bus, pass that token left.
Each component is a four-phase handshake element:

| component | module | what it does |
|---|---|---|
| repeater `#` | `hs_repeater` | once started, does handshakes on its output for ever; never finishes |
| sequencer `;` | `hs_sequencer` | for each handshake it receives, does a full handshake on its first output, then on its second, then acknowledges |
| call (MUX) | `hs_call` | merges `M` mutually exclusive callers onto one outgoing channel |
| passivator `•` | `hs_passivator` | joins two passive channels: a C-element on the two requests, acknowledging both |
| transferer | `hs_transferer` | when activated, pulls a word from its input channel and pushes it on its output channel |

In the cell, repeater `r1` drives sequencer `s1`, which runs the put half
(`s2`) then the get half (`s4`). `s2` fetches a token through call `m1` on
the right channel, then starts `s3`; `s3` runs transferer `t1` (put bus to
register, meeting the environment in passivator `p1`) and then passes the
token left through call `m2` and passivator `p3`, which meets the left
neighbour's request. `s4`/`s5`/`t2`/`p2` do the same for the get half, with
`t2` reading the register onto the get bus. The transferers, passivators and
register together form a one-place "wagging" register: a put then a get,
strictly alternating.

The Starter (`hs_starter`) completes two handshakes on its left, then for
ever fetches a token on its right and hands it out on its left. Its
sequencers `s1` and `s2` hand out the two tokens through call `m1`, then
`s2` starts repeater `r1`, which loops sequencer `s3` (right, then left)
for ever. This component set cannot wait for a request before acting, so
the Starter asks for a token on its right *before* the left neighbour asks
for one. Its role in the ring is the same as `bm_starter`'s; the order of
events on its ports differs (`right_req` rises and falls, then `left_ack`
rises and falls).

Every component adds a step, so this FIFO is the slowest of the three: 37
steps of latency at start-up against 14 for `bm_fifo` (see the trace in
`hs_fifo_tb`). Because its internal path is long, a slow environment hardly
changes its throughput.

## Timing model

The original circuits are asynchronous: C-elements, burst-mode machines
and latches, with no clock. Here every controller is written as
synchronous logic clocked by `clk`, which is **not part of the design but
the unit of time of the model**. Each controller output changes one `clk`
step after the input change that causes it, as if every element had the
same delay. This keeps the code synthesizable and two-state simulable and
preserves each controller's event order, but:

* latencies and cycle times come out in steps, not nanoseconds, and wire
  and bus loads are not modelled (so, unlike in silicon, latency does not
  grow with `N`);
* the burst-mode fundamental-mode constraints and the pulse-width
  constraint on `we` (`we` must stay high longer than DV takes to raise
  `valid`) hold automatically in this model. In a real asynchronous
  implementation they are timing constraints to verify;
* the environment must drive its inputs so that they are stable at the
  rising edge of `clk` (the testbenches drive on the falling edge).

To build real asynchronous hardware, each `always_ff` state machine would be
replaced by the corresponding hazard-free gate-level controller. The register
storage is already written as real latches (`always_latch`), so synthesis
reports latches for `cell_reg.word`; that is intended.

## Measured behaviour

From `fifo_workloads_tb`, with the environment answering each acknowledge
within half a step ("fast") or after two more steps ("slow"). "Steps/item"
is the streaming time per item with puts and gets running flat out, and
includes one step of testbench overhead per transfer.

| config | optimized latency | optimized steps/item | burst-mode latency | burst-mode steps/item | handshake latency | handshake steps/item |
|---|---|---|---|---|---|---|
| 4 places, fast  | 3 | 5.00 | 14 | 8.91  | 37 | 21.00 |
| 4 places, slow  | 3 | 9.00 | 16 | 10.97 | 37 | 21.03 |
| 16 places, fast | 3 | 5.00 | 14 | 8.39  | 37 | 19.80 |
| 16 places, slow | 3 | 9.00 | 16 | 10.45 | 37 | 19.83 |

The optimized FIFO's latency does not depend on the environment, because
nothing on the path from `put_req` to `get_ack` waits for the environment.
The burst-mode base FIFO's does, because its put must return to zero first.
The same pattern is seen in the transistor-level results published for the
design (1.73 ns for the optimized 4-place FIFO in both environments; 7.8 to
7.9 ns for the burst-mode one; 13.8 ns for the handshake-circuit one). The
order of the three designs matches. The ratios do not, because here every
element costs the same one step.

## Where this RTL departs from the original

* **Clocked unit-delay model** of asynchronous controllers, as described
  above. OPT, OGT and DV were gate-level circuits synthesised from their
  state graphs; here they are written as state machines over the same
  graphs.
* **OR-bus instead of tri-state bus** for `get_data`, and OR reductions for
  the acknowledge trees.
* **Register acknowledges** (`wa`, `ra`) are the requests delayed by one
  step, standing in for the register's matched delays.
* **Active-low asynchronous reset** `rst_n` is this design's choice. The
  original only says which state the token-holding cell starts in.
* **`get_ack` of the optimized cell is the GC output `re`**. This is how
  the cell schematic draws it; `ra` is always high by the time `re` can
  rise, so the register has output the data by then.
* **Handshake components** are written from their behaviour only, as
  small state machines, not as the standard gate-level circuits used for
  them in practice.
* **Not built:** the third implementation of the base protocol, synthesised
  from Petri nets into monolithic controllers. Only its interface behaviour
  is known, and that is what `bm_cell` and `bm_starter` already do. The
  transistor-level aspects (bus buffering, loads, area) are not built
  either.

## Files

`rtl/` (one module or package per file):

* `tr_pkg.sv`: state encodings shared by the controllers.
* `token_ring_fifo_top.sv`: the three FIFOs side by side.
* `opt_fifo.sv`, `opt_cell.sv`, `opt_obtain_put_token.sv`,
  `opt_obtain_get_token.sv`, `opt_put_ctrl.sv`, `opt_get_ctrl.sv`,
  `opt_data_valid.sv`: the optimized FIFO.
* `bm_fifo.sv`, `bm_cell.sv`, `bm_token_distributor.sv`,
  `bm_data_ctrl.sv`, `bm_left_ctrl.sv`, `bm_starter.sv`: the base FIFO.
* `hs_fifo.sv`, `hs_cell.sv`, `hs_starter.sv`, `hs_repeater.sv`,
  `hs_sequencer.sv`, `hs_call.sv`, `hs_passivator.sv`, `hs_transferer.sv`:
  the base FIFO as a handshake circuit.
* `cell_reg.sv`: the one-word latch register used by all three.

`tb/`: one self-checking testbench per module (`<module>_tb.sv`), plus:

* `fifo_driver.sv`: a reusable environment for either FIFO. It runs latency,
  full-FIFO, random and streaming phases against a reference queue.
* `token_ring_fifo_top_tb.sv`: all three FIFOs end to end at default
  parameters. It counts full stalls, empty waits, early reads, put/get
  overlap, token wrap-around and Starter relays, and fails if any never
  happens.
* `fifo_workloads_tb.sv`: the four evaluated configurations (4 and 16
  places, fast and slow environment) on all three FIFOs.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops
itself; a watchdog ends it with a failure if it hangs.

## Simulating

With Verilator 5 (needs `--timing` for the testbenches' delays):

```sh
verilator --binary --timing --assert -Wno-fatal \
  --top-module token_ring_fifo_top_tb -y rtl -y tb +libext+.sv \
  rtl/tr_pkg.sv tb/token_ring_fifo_top_tb.sv
./obj_dir/Vtoken_ring_fifo_top_tb
```

Replace the top module and file for any other testbench. The package must
come first on the command line; everything else is found through `-y`.
Lint a module with
`verilator --lint-only -Wall -y rtl rtl/tr_pkg.sv rtl/<module>.sv`.
