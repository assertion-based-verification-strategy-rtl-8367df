# Generic synchronous FIFO with assertion-based checking

A single-clock FIFO buffers words between a producer and a consumer that run
on the same clock but not in lockstep. This design is a parameterized FIFO
with four status flags (full, empty, almost full at 3/4, almost empty at 1/4),
an error output and a synchronous reset. Alongside the FIFO sits a property
module that states its rules as SystemVerilog assertions and counts a fixed
set of cover sequences. The FIFO sits in a small application: an
enqueue/dequeue controller moves words from a "bus A" side into the FIFO and
out to a "bus B" side, using the FIFO's status to decide when.

The specification this RTL follows fixes the port list, the flag levels, the
reset style, the depth and width configurations, the reset properties and the
cover list. Most of the rest was left open and is this design's own choice:
the error rule, the read timing, the handshakes around the controller, and
most properties. The section "What is specified and what is chosen" sets the
two apart.

```
             a_valid/a_data ┌──────────────┐ push,pop ┌──────────┐ data_out ──► b_data
  bus A ─────────────────►  │ enq_deq_ctrl │ ───────► │   fifo   │ ────────────────────►  bus B
  controller ◄── a_ack ──── │              │ ◄─────── │          │  status  ──► full, empty, ...
  (outside)                 │              │  full,   └────┬─────┘                       controller
                            │              │  empty        │ all ports                   (outside)
                            └──────────────┘          ┌────▼──────┐
                              b_ready ──►, ◄── b_valid│ fifo_props│ ──► violations, cov
                                                      └───────────┘
                                 fifo_system (top)
```

## The FIFO (`rtl/fifo.sv`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | the one clock for pushes and pops |
| `reset_n` | in | 1 | synchronous reset, active low |
| `data_in` | in | `DATA_WIDTH` | word to push |
| `push` | in | 1 | write `data_in` at this edge |
| `pop` | in | 1 | read the oldest word at this edge |
| `data_out` | out | `DATA_WIDTH` | last popped word |
| `full` | out | 1 | occupancy = depth |
| `almost_full` | out | 1 | occupancy ≥ 3/4 of the depth |
| `empty` | out | 1 | occupancy = 0 |
| `almost_empty` | out | 1 | occupancy ≤ 1/4 of the depth |
| `error` | out | 1 | the previous edge saw an overflow or underflow |

Parameters: `BIT_DEPTH` (depth is `2**BIT_DEPTH`, default 4, so 16 words) and
`DATA_WIDTH` (default 16). The intended configurations are depths 2**4 and
2**8 and widths 16 and 32; the defaults are the smaller of each, and the test
runs all four combinations.

### How the status is kept

The storage is a circular array. The only other state is two pointers and
the output register. Each pointer has `BIT_DEPTH + 1` bits: the low bits
address the array and the top bit flips each time the pointer wraps. The
occupancy is then just `wr_ptr - rd_ptr` (modulo `2**(BIT_DEPTH+1)`), which
ranges over 0 to the depth. "Full" and "empty" both have the low pointer bits
equal, and the top bit tells them apart. All four flags decode from this
occupancy, so they change on the clock edge that changes a pointer and are
never out of step with each other:

- `almost_full` is set from `floor(3*depth/4)` words up, and so also when full;
- `almost_empty` is set up to `floor(depth/4)` words, and so also when empty.

For depth 16 these levels are 12 and 4. For depth 256 they are 192 and 64.

### Push, pop and error rules

At each rising edge:

- a **pop** is performed if the FIFO is not empty. The head word is loaded
  into the `data_out` register, so it appears one cycle after the pop and is
  held until the next accepted pop;
- a **push** is performed if the FIFO is not full, or if it is full and a pop
  happens at the same edge. The pop frees the slot that the push fills, so
  the occupancy stays at the depth;
- a push into a full FIFO without a pop is **dropped**. A pop from an empty
  FIFO returns nothing, even if a push happens at the same edge. Either case
  raises `error` for exactly the following cycle.

A clock edge with `reset_n` low empties the FIFO and clears `data_out` and
`error`. The array contents are not cleared, and nothing can read them before
they are rewritten. After the reset edge: `full=0`, `almost_full=0`,
`empty=1`, `almost_empty=1`.

```
clk       _/‾\_/‾\_/‾\_/‾\_/‾\_
push      ‾‾‾‾\___________        word A pushed at edge 1
pop       ______/‾‾‾\_____        popped at edge 2
data_out  =======X A =====        A appears after edge 2
empty     ‾‾‾‾\_/‾‾‾‾‾‾‾‾‾        low between edges 1 and 2
```

## The enqueue/dequeue controller (`rtl/enq_deq_ctrl.sv`)

This controller makes sure that every word bus A hands over reaches bus B
exactly once. It never overflows or underflows the FIFO, so in this system
the FIFO's `error` stays low.

- Bus A side: `a_valid` offers a word. `a_ack` is high in the cycle the
  word is pushed. A word that is not acknowledged must stay offered. Bus A
  is stalled while the FIFO is full, unless bus B takes a word in that same
  cycle.
- Bus B side: `b_ready` asks for a word. The controller pops if the FIFO is
  not empty, and raises `b_valid` in the next cycle, when the word is on
  `data_out`.
- `words_in` and `words_out` count the words moved since reset. Their
  difference is the FIFO's occupancy, which gives the system a check that no
  word was lost or duplicated.

`push`, `pop` and `a_ack` are combinational from the requests and the
`full`/`empty` flags. `b_valid` and the counters are registered. Three
assertions inside the controller state its own rules: no push into a full
FIFO without a pop, no pop from an empty FIFO, and no acknowledge without an
offer.

## The property module (`rtl/fifo_props.sv`)

`fifo_props` watches only the FIFO's ports, so it can be bound to any
instance with `bind fifo fifo_props ...`, or instantiated next to it (the top
does this). It keeps its own occupancy counter, stepped by the pushes and
pops that the FIFO must accept, and checks the following:

| property | rule |
|---|---|
| `p_t1_full`, `p_t2_afull`, `p_t3_empty`, `p_t4_a_empty` | one cycle after `reset_n` low: `full=0`, `almost_full=0`, `empty=1`, `almost_empty=1` |
| `p_full_xor_empty` | never full and empty together |
| `p_full_afull`, `p_empty_aempty` | full implies almost_full; empty implies almost_empty |
| `p_level_flags` | all four flags match the tracked occupancy and the 3/4 and 1/4 levels |
| `p_error_set`, `p_error_clear` | `error` is high exactly in the cycle after an overflow or underflow |
| `p_dout_stable` | `data_out` changes only after an accepted pop |
| `p_first_word` | a word pushed into an empty FIFO and popped next cycle appears on `data_out` |

Each failing assertion prints a message and increments the `violations`
output. The nine cover sequences are counted in the `cov` output, a packed
struct `fifo_pkg::fifo_cov_t` with one 32-bit counter per sequence:

- `push_pop_sequencing`: an accepted push followed on the next cycle by an
  accepted pop;
- the rise (`*_on`) and fall (`*_off`) of each of the four flags.

The module also carries the same nine sequences as `cover property`
statements, for simulators that report coverage. The aim is that every
counter ends a test above zero. The counters are not cleared by `reset_n`,
so they add up over the resets a test applies.

The counters are ordinary synthesizable logic. Synthesis drops the
assertions, however, so `violations` reads 0 in a netlist. It counts only in
simulation.

## The top (`rtl/fifo_system.sv`) and package (`rtl/fifo_pkg.sv`)

`fifo_system` connects the controller, the FIFO and the property monitor as
in the diagram above. The bus A and bus B controllers were not designed
here. Their protocols are unknown, so their FIFO-side signals are the top's
ports: `a_valid`, `a_data`, `a_ack`, `b_ready`, `b_valid`, `b_data`, plus
the status flags, `error`, the two word counters, `violations` and `cov`.
The top has the parameters `BIT_DEPTH`, `DATA_WIDTH` and `CNT_WIDTH` (the
counter width, default 32).

`fifo_pkg` holds the default depth exponent and width, the two threshold
functions and the cover-count struct.

## Verification environment (`tb/`)

The testbenches follow a transactor/server-task layout.
`tb/fifo_if.sv` is the FIFO's signal bundle, and it holds the following:

- the server tasks: `step` (one cycle of reset/push/pop/data), `idle` and
  `do_reset`;
- a queue-based reference model of the FIFO;
- the scoreboard.

`step` drives the inputs at the falling edge. It first compares the FIFO's
flags, `error` and `data_out` with what the model predicted for the edge just
gone. Because of this, the one-cycle read latency is checked on every pop.
The flag levels in the model are computed independently of the RTL.

| testbench | what it does |
|---|---|
| `fifo_tb` | runs `fifo_check` in all four configurations (2**4/2**8 × 16/32), with `fifo_props` bound into every FIFO (see below) |
| `fifo_props_tb` | drives the property module from the reference model: legal traffic must give no violation and hit every cover; then 12 single-cycle corruptions (wrong flag at each threshold, spurious or missing error, `data_out` changing without a pop, corrupted first word, flag wrong after reset) must each raise `violations` |
| `enq_deq_ctrl_tb` | random requests against a 16-word level model; checks `push`, `pop`, `a_ack`, `b_valid` and both counters every cycle; bus A stall, bus B starvation, push+pop at full and a reset mid-traffic must each happen |
| `fifo_wave_tb` | directed: five words pushed (binary 111, 101, 110, 101, 110), four popped and returned in order one cycle after each pop, flags checked at each level, then a reset |
| `fifo_system_tb` | end to end at the default size with no parameter overridden: numbered words from a bus A source that holds offered words, a random bus B sink, fill/drain phases and resets mid-traffic; checks word order, the one-cycle delivery, the flags against `words_in - words_out`, `error` low, zero violations, and that each mechanism and every cover sequence happened |

`fifo_check` runs the following for each configuration:

- reset;
- a directed fill to full, then one overflow push, then a push and pop
  together at full;
- a drain to empty, then one underflow pop, then a push and pop together at
  empty;
- a reset applied at 1 word, 1/4, 1/2 and 3/4 of the depth, and at full;
- pseudo-random push, pop and reset traffic in filling and draining phases.

At the end, the bound monitor must report no violation and every cover count
must be above zero.

Every testbench is self-checking and has a watchdog. Each prints
`TB_RESULT checks=N failures=M`. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
          rtl/fifo_pkg.sv tb/fifo_system_tb.sv --top-module fifo_system_tb
./obj_dir/Vfifo_system_tb
```

Replace `fifo_system_tb` with `fifo_tb`, `fifo_props_tb`, `fifo_wave_tb`
or `enq_deq_ctrl_tb` to run the others. Each one finishes in well under a
second of wall time. The testbenches use only two-state values and
`$urandom`. Reset both the FIFO and the monitor before use: the monitor's
checks assume the FIFO has seen a reset.

To change the FIFO's size, set `BIT_DEPTH` and `DATA_WIDTH` on `fifo` or
`fifo_system`. The flag levels follow the depth. With depths below 4,
`floor(depth/4)` becomes 0, so `almost_empty` coincides with `empty`.

## What is specified and what is chosen

These points follow the specification:

- the port names and directions of the FIFO;
- a single clock;
- a synchronous reset, active low as the `_n` suffix says;
- parameterized depth (as a power of two) and width, with the configurations
  2**4 and 2**8 by 16 and 32;
- almost-full at 3/4 and almost-empty at 1/4;
- status derived from the pointers;
- the four reset properties and the list of nine cover sequences, each to be
  hit at least once;
- the place of the enqueue/dequeue controller between two bus controllers
  and the FIFO, all on one clock;
- a testbench built from an interface, a package, a transactor with server
  tasks, and a property module bound to the FIFO.

These points are this design's own choices, where the specification is
silent:

- **`error`**: set for one cycle after a dropped push or an empty pop. The
  specification only says the FIFO has an error indicator.
- **Thresholds inclusive**: `almost_full` is `>=` 3/4 and `almost_empty` is
  `<=` 1/4.
- **Registered read** with one cycle of latency, and `data_out` cleared by
  reset.
- **Push and pop together at full are both performed.** At empty, the pop is
  refused and the push is performed.
- **The bodies of the cover sequences**: push followed by pop on the next
  cycle, and the rise and fall of each flag. Only their names are given.
- **Every property beyond the four reset properties**.
- **The controller's handshakes** (`a_valid`/`a_ack`, `b_ready`/`b_valid`),
  its push-at-full-with-pop rule and its word counters.
- **The monitor inside the top.** The specification binds the property
  module only from the testbench. Here it is also instantiated in the top,
  so that the cover counts and violations are visible at the system level.

Not built: the bus A and bus B controllers, whose buses and behaviour are
not specified. Their FIFO-side signals are the top's ports instead.

## How far to trust it

Every testbench passes, with these results:

| testbench | checks | failures |
|---|---|---|
| `fifo_tb` | about 195,000 | 0 |
| `fifo_system_tb` | about 169,000 | 0 |
| `enq_deq_ctrl_tb` | 24,000 | 0 |
| `fifo_props_tb` | 23 | 0 |
| `fifo_wave_tb` | 66 | 0 |

Each testbench was also run against a deliberately broken copy of its
module, and each one failed:

| broken copy | change | failing checks |
|---|---|---|
| FIFO | `almost_full` decoded as `>` instead of `>=` | 248 |
| property module | `almost_full` term left out of the flag property | 2 |
| controller | `b_valid` following push instead of pop | 1771 |
| top | the FIFO's `pop` wired straight to `b_ready` | 2377 |

The RTL lints cleanly under Verilator `-Wall`; the only warnings are two
unused package parameters. It elaborates in Yosys with the slang front end.
Coarse synthesis of the default top gives about 100 word-level cells, 375
flip-flop bits and a 256-bit memory. Most of those flip-flops are the
monitor's cover counters and the controller's word counters, not the FIFO.
The FIFO alone is 11 flip-flop bits (two 5-bit pointers and `error`) plus the
memory, whose registered read port holds `data_out`.
