# Composable self-timed building blocks

Synchronous logic ties correctness to timing: every path must meet the clock,
and a change anywhere can break a timing budget somewhere else. Self-timed
logic separates the two. Each block here talks to its neighbours through a
request/acknowledge handshake, so a block is correct whatever its own delay
and whatever the delay of the wires to it. Larger systems are then built by
connecting blocks by their function alone, and a faster or slower block can be
swapped in without retiming anything.

This repository holds a library of such blocks in synthesizable
SystemVerilog: the control elements (Merge, Join, Select, Call, Arbiter with
its mutual-exclusion element), a transition-controlled data latch, a four-deep
FIFO built from them, and a carry-completion adder. A top level,
`st_testchip`, places all of them side by side with every port brought out,
the way a library test chip would.

## Two-phase signalling and bundled data

All control wires use **two-phase (transition) signalling**: an event is a
*change* of a wire, rising or falling alike. The level of a wire means nothing
on its own. A channel has two wires: `req`, toggled by the sender to ask for
service, and `ack`, toggled by the receiver when the service is done. A channel
is idle when `req == ack` and busy when they differ.

Data travels as **bundled data**: an ordinary binary bus next to a req/ack
pair. The sender must have the bus stable before it toggles `req` and keep it
stable until it sees `ack` (the *bundling constraint*). This is the only
timing rule in the library, and it is local to one channel.

Thinking in tokens helps: each transition is a token moving along a wire, and
the state of a system is where its tokens are. The elements below are the
rules for how tokens combine and split.

## The elements

| Element | Module | What it does with transitions |
|---|---|---|
| Merge | `st_merge` | OR: one output transition per transition on either input (an XOR gate). |
| Join | `st_celement` | AND: the output toggles once both inputs have toggled (Muller C-element, `q = a&b | a&q | b&q`). |
| Select | `st_select` | Steers an input transition to `out_t` or `out_f` according to a bundled `sel` level. |
| Call | `st_call` | Lets two clients share one subroutine; routes the subroutine's acknowledge back to the caller. |
| Mutex | `st_mutex` | Four-phase mutual exclusion: at most one of two level requests is granted. |
| Arbiter | `st_arbiter` | Two-phase arbiter: grants one client and delays the other until the first gives the resource back. |
| Latch | `st_latch` | Bundled-data latch: a `capture` transition closes it, a `pass` transition opens it. |
| FIFO | `st_fifo` | Four-deep micropipeline FIFO for bundled data. |
| Adder | `st_cc_adder` | Adder whose acknowledge comes when its carry chain has resolved. |

### Call

`st_call` is three Merges and two C-elements:

```
req_subr = req_x ^ req_y
ack_x    = C(req_x, ack_subr ^ ack_y)
ack_y    = C(req_y, ack_subr ^ ack_x)
```

At rest `ack_subr == ack_x ^ ack_y`. When client x toggles `req_x`, the
request reaches the subroutine through the Merge. When the subroutine
acknowledges, `ack_subr ^ ack_y` turns to agree with `req_x`, so only client
x's C-element fires. Client y's C-element sees no change on `req_y` and holds.
The clients must not have requests outstanding at the same time. An assertion
in the module flags it if they do. Put an arbiter in front if the clients are
independent.

### Mutex and arbiter

`st_mutex` is a level (four-phase) element. Raising `req1` raises `ack1`
unless `ack2` is already high; dropping a request drops its grant and lets
the other side in. The physical element is a cross-coupled gate pair followed
by an analog filter that keeps both outputs low until a metastable pair has
settled. That analog behaviour cannot be expressed in two-valued logic.
Here a tie (both requests rising in the same instant) is resolved at once in
favour of `req1`.

`st_arbiter` wraps the mutex in a two-phase interface. A client's request is
*pending* from its `req` transition until its `done` transition, i.e. while
`req ^ done` is high. That level drives the mutex. While the mutex grants a
side, a latch on that side is open and copies `req` to `grant`, so `grant`
toggles exactly once. When `done` arrives, the mutex request falls, the latch
closes, and a waiting client on the other side is granted. The client protocol
is `req` → wait for `grant` → use the resource → `done` → next `req`.

### Latch and FIFO

`st_latch` is transparent while `capture == pass` and holds while they
differ. `st_fifo` chains `DEPTH` stages. Each stage has a C-element
`c[i+1] = C(c[i], ~c[i+2])` and a latch that captures on `c[i+1]` and passes
on `c[i+2]`, with `c[0] = in_req` and `c[DEPTH+1] = out_ack`. A stage is full
while its control differs from the next one's. A word moves forward only into
an empty stage, so words ripple through an empty FIFO and stop behind full
stages. When all four stages are full, `in_ack` stops answering.

**Zero-delay caveat, the subtle part.** In silicon the request wire of a
micropipeline is slower than the data. A latch that opens therefore always
has time to take over its input word before its C-element closes it again. A
zero-delay model has no such margin. When a consumer frees the last stage of a
full FIFO, every stage passes and captures in the same instant, and a latch
could close before it ever saw the word ahead of it. To keep the model exact,
each stage's C-element is allowed to capture only once the stage latch's
output equals its input word. This equality check stands in for the matched
delay of a physical micropipeline. It is an addition to the plain
micropipeline and would not be needed in a delay-annotated or physical
implementation.

### Carry-completion adder

`st_cc_adder` carries every carry on two rails, carry-is-1 and carry-is-0.
Both rails are low at rest. A transition on `req` raises `go = req ^ ack` and
releases the chain:

- A bit that generates (`a = b = 1`) or kills (`a = b = 0`) resolves its
  carry-out at once.
- A bit that propagates waits for its carry-in.

The addition is complete when every position has one rail high. The sum is
then captured in an output latch. `ack` toggles only after that latch shows
the new sum, which drops `go` and returns the chain to zero for the next
operation. The sum and carry-out stay valid after `ack` even if the operands
change. The carry-in is 0.

## How far the model goes

- **Timing.** All modules are zero-delay logic. On silicon, the elements
  measured roughly 0.34 ns (Merge, C-element), 1.2 ns (Select) and 1.8 ns
  (Call). No delay is modelled, and a testbench can only check the order of
  events, not their timing.
- **Environment rule.** Drive each transition and let it settle (at least
  one simulation time step) before the environment reacts to it. Two
  dependent changes in the same time step are not a valid self-timed
  environment and can confuse the simulator's loop settling.
- **Structure versus function.** The Merge, C-element, Call and mutex follow
  the original cells. The arbiter follows the original in its interface and
  behaviour, but uses one Merge and one latch per side instead of the
  original's larger cell network. The Select, latch, FIFO and adder insides
  are this library's own, since only their function was specified. The FIFO
  depth of four is the original's. The 8-bit data and adder widths are this
  library's choice and are parameters.
- **Reset.** Only the arbiter had a reset originally. `rst` on the other
  stateful elements is an addition so that simulation starts from a known
  state. All request/acknowledge inputs must be low while reset is high.
- **Protocol assertions.** Immediate assertions check the handshake rules
  that the elements rely on: Call requests must be mutually exclusive, the
  mutex must never grant both sides, an arbiter client may toggle `done`
  only for a granted request, and the FIFO's input word and the adder's
  operands may change only while their channel is idle. Build with
  `--assert` to enable them. In a zero-delay model the two bundling checks
  only catch a change while the element is stalled, for example while the
  FIFO is full.
- **Not included.** The transistor-level GaAs cells and the routing circuit
  that was to be generated from a concurrent program. Neither has a logic
  description to build from.

## Lint output you will see

Self-timed elements are state-holding and cross-coupled by nature. Verilator
reports `UNOPTFLAT` (circular logic) for the Call, Select, mutex, arbiter,
FIFO and adder, and some synthesis tools report logic loops and inferred
latches. These are the intended feedback paths of the elements (the
C-element's hold, the mutex cross-coupling, the handshake loops) and not
mistakes. Each module's header comment says which loop it has.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The testbenches use delays and therefore
need `--timing`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    tb/tb_st_fifo.sv --top-module tb_st_fifo -o sim
./obj_dir/sim
```

`tb/tb_st_testchip.sv` runs the whole chip at its default sizes, with all
elements in parallel. It counts every mechanism (merge, join, both select
outputs, calls from both clients, an arbiter tie and contention, latch capture
and pass, FIFO full stalls and pass-through, adder carry-out) and fails if any
of them never happened. Each testbench stops itself with a failure through a
watchdog if it hangs.

## Files

- `rtl/st_merge.sv`, `st_celement.sv`, `st_select.sv`, `st_call.sv`,
  `st_mutex.sv`, `st_arbiter.sv`, `st_latch.sv`, `st_fifo.sv`,
  `st_cc_adder.sv`: the elements.
- `rtl/st_testchip.sv`: the top level. Its parameters are `FIFO_DEPTH = 4`,
  `DATA_WIDTH = 8` and `ADDER_WIDTH = 8`.
- `tb/tb_<module>.sv`: one testbench per module.
