# Conservative delay-insensitive state machine

In a conservative circuit, signal events behave like physical objects: they
are moved and rearranged, but never created or destroyed. Ordinary logic gates
cannot do that. A NAND gate discards information, and so does a Fork, which
turns one event into two. This RTL builds a finite state machine out of
conservative, delay-insensitive (DI) elements instead. Each primitive emits as
many events as it consumes: a Merge passes one event on, and a Cjoin or Ctria
takes in two events and sends out two. When a step of the machine has no
output, the leftover events are not thrown away. They are parked in a storage
stack and handed back later, when a step has to produce two outputs. No phase
of "uncomputation" is needed, unlike clocked reversible-logic schemes.

The library holds the conservative primitives, the arbiters and sequencers
built from them, the event storage stack, and the state machine `cfsm_top`,
which connects them all.

## Events, wires and the clocked emulation

Every channel is one wire. An **event** is a transition on that wire: 0→1 or
1→0, i.e. two-phase signalling. To send an event on a wire, flip it. An
element sees an event as a difference between the input wire and the level it
last consumed.

The elements are asynchronous in the original theory. Here each one is a small
clocked circuit:

- On every rising clock edge it samples its inputs.
- If the events it needs are present, it consumes them and flips its output
  register.
- Every stateful element therefore adds exactly one clock of delay.

A delay-insensitive network works for any element or wire delay, so this is a
legal implementation and not an approximation. The Merge is the one exception:
it is a plain exclusive-or with no clock delay.

Rules for the environment (the circuits around an element), checked by
assertions where they can be:

- Do not send a second event on a wire before the first has been consumed.
- Do not give a Merge two events at once. Two flips in the same cycle would
  cancel in the XOR.
- Do not give a Join two row events, or two column events, at the same time.

All wires are 0 after reset, which is synchronous and active low. A **bubble**
on an input (`INIT_ROW`, `INIT_COL`, `INIT_EDGE`) means "an event on this
input has already arrived". This is how initial tokens, such as the initial
state, are placed.

## The elements

| Module | Element | Behaviour | Events in : out |
|---|---|---|---|
| `di_merge` | Merge (N inputs) | Any input event goes to the output (XOR) | 1 : 1 |
| `di_toggle` | Toggle | Input events go alternately to `c`, then `d` | 1 : 1 |
| `di_cjoin` | M×N Cjoin | Waits for one row event and one column event, then fires both wires `out[r][c][0..1]` of that pair | 2 : 2 |
| `di_ctria` | Ctria | Edges a, b, c. When the two edges of a vertex (p = a,b; q = b,c; r = a,c) have had events, both wires of that vertex fire | 2 : 2 |
| `di_mutex` | Mutex | Two clients. Odd events on `r[i]` request the critical section and even events release it. Each is answered on `g[i]` | 1 : 1 |

The **doubled output** of a Cjoin or Ctria is what replaces the Fork. Two
wires fire together, carrying the two events that came in.

A 1×1 Cjoin is built as a Ctria whose third edge is unused. When one of its
edges has a bubble, it behaves like a Fork that must be re-armed:

- The first event on the other edge fires it.
- After that, it fires again only when a re-arm event has also arrived.

The arbiters use this "initialized 1×1 Cjoin" in every place where a plain
circuit would use a Fork.

The Mutex protocol is a choice made by this design. The element only has to
be conservative (one event out for each event in). The chosen protocol is
request → grant, then release → acknowledge, all on one wire pair per client,
which meets that requirement. When both clients request in the same cycle,
the one that lost last time wins.

### `di_cjoin_tree`: a large Cjoin from small ones

`di_cjoin_tree` behaves like `di_cjoin` from outside, but it is built only from
Cjoins of at most 2×2, Ctrias and Merges. Each dimension with two or more
wires is split into a lower and an upper half; an odd extra wire goes to the
lower half.

- **Input forks.** Each input wire enters an initialized 1×1 Cjoin. One copy
  goes through the Merge of its half to the central Cjoin. The other copy
  waits in a steering Cjoin.
- **Central Cjoin.** It joins the row half with the column half, which picks
  the quadrant. Its doubled output tells the row steering Cjoin of that row
  half which column half to use. It tells the column steering Cjoin of that
  column half which row half to use.
- **Steering Cjoins (Tree-Muxes).** Each joins the waiting input copy with the
  choice. One output wire is the input of the quadrant. The other is a spare
  event. Through a Merge, the spare re-arms that input's 1×1 Cjoin for its
  next event.
- **Quadrants.** Each quadrant resolves the pair and drives the external
  output.

Steering Cjoins and quadrants are themselves `di_cjoin_tree`s. The recursion
ends at 2×2 or smaller, which is a single `di_cjoin`. Every element takes two
events and gives two, so the tree neither creates nor loses events. The two
spare events are exactly the two re-arm events.

The levels are resolved one after another. Nothing decodes all levels of the
inputs in advance. A 2×3 tree answers in 4 clocks, a 4×4 in 4 and a 2×8 in 10.
`cfsm_top` uses this tree for its transition Cjoin.

## Arbitration without losing events

The difficult part is sharing something between clients without creating or
destroying events.

### `di_cresarb2`: conservative 2-way Resource arbiter

Clients send requests `r[i]`. The arbiter serves one at a time:

1. It invokes the resource by sending an event on `res_req`.
2. It waits for the resource's `res_done` event.
3. It grants the client that was served, on `g[i]`.

Inside, for each client `i`:

```
r[i] ──Merge──> Mutex.r[i] ──> Mutex.g[i] ──Toggle──┬─ 1st event: grant ta[i]
          ^                                         └─ 2nd event: release ack = g[i]
          │
          p1[i]   (release)

ta[i] ─┐
       ├─ initialized 1x1 Cjoin ─┬─ a1[i] ──Merge(a1[0],a1[1])──> res_req
p2[i] ─┘  (re-arm edge bubbled)  └─ a2[i] ──> row i of 2x1 Cjoin, column = res_done
                                                   └─ doubled output (p1[i], p2[i])
```

Walking through one request:

- The Mutex grant is split into two copies, `a1` and `a2`. A bubbled 1×1 Cjoin
  does this instead of a Fork.
- `a1` invokes the resource.
- `a2` waits in the steering Cjoin and marks which client is being served.
- When `res_done` arrives, the steering Cjoin produces two events:
  - `p1` releases the Mutex. The Mutex's acknowledgement becomes the client's
    grant `g[i]`.
  - `p2` re-arms the 1×1 Cjoin for that client's next round.

Every element is conservative, so the arbiter neither creates nor destroys
events, inside or at its ports. The client is granted only after the Mutex
has been released, so its next request cannot collide with the release on the
shared Merge.

### `di_cresarb`: N-way arbiter

A balanced binary tree of 2-way arbiters, laid out as a heap. Node k serves
nodes 2k and 2k+1, and the N clients are the leaves N to 2N−1. A node's
resource request is a client request of its parent. The parent's grant is the
node's done event. Only the root, node 1, drives the real resource. A request
climbs the tree, the resource runs once, and the done event comes back down to
the client that was served.

### `di_cseq2` / `di_cseq`: CSequencers

A Sequencer grants one waiting request for each "clock" event `c`. The
conservative version also hands the clock event back on `c_out` (c′):

- `di_cseq2` is a 2-way arbiter whose resource is a 1×1 Cjoin of `res_req`
  and `c`. One wire of that Cjoin's doubled output is the done event. The
  other wire is `c_out`.
- `di_cseq` (M-way) puts an N-way arbiter in front of each input of
  `di_cseq2`.

`c_out` only leaves once the clock event has been joined with a request. With
no request waiting, it waits too.

## The conservative state machine (`cfsm_top`)

```
                  ┌──────────── c_out ◄─────────────┐
                  ▼                                 │
  next-state ─> 1×N Cjoin (state) ─┬─ column s ─> M×N Cjoin ─┬─ u[i][s][0], u[i][s][1]
  (Merges)          doubled        └─ Merge ─> c ─> M-way    │     steered by the table
                                                 CSequencer ─┘ row i (grant)
  in_req[i] ─────────────────────────────────────> ^
```

One step of the machine:

1. **State.** The 1×N Cjoin holds the present state as a pending event in
   column `s`. When the clock event from the sequencer is also back, it fires
   twice:
   - One event goes to column `s` of the transition Cjoin.
   - The other goes, through a Merge, to the sequencer's clock `c`.

   After reset, bubbles stand in for the initial state and the first clock
   event.
2. **Input.** The M-way CSequencer picks one pending input `i`. Inputs may
   arrive concurrently; they are served one at a time. Its grant goes to row
   `i` of the transition Cjoin, and the clock event goes back to the state
   Cjoin.
3. **Transition.** The M×N Cjoin (a `di_cjoin_tree`) joins row `i` with column `s` and emits the
   pair `u[i][s][0..1]`. What happens to the pair is set by `ACTION[i][s]`:

| `ACTION` | Events in → out | `u0` | `u1` |
|---|---|---|---|
| `ACT_OUT` | 1 → 1 | to next state `NEXT[i][s]` | to output `CHAN[i][s]` |
| `ACT_PUSH` | 1 → 0 | `store` of stack push channel `CHAN[i][s]` | `push` of the same channel; the acknowledgement `z` goes to state `PUSH_NEXT[CHAN[i][s]]` |
| `ACT_POP` | 1 → 2 | to next state `NEXT[i][s]` | `pop` of stack channel `CHAN[i][s]`; the popped pair goes to outputs `POP_X` and `POP_Y` of that channel |

Where several sources drive one wire, the table's fan-in is a Merge (an XOR in
the `always_comb` block). Only one step is in flight at a time, so each of
these Merges sees one event at a time.

For `ACT_PUSH` entries, `NEXT[i][s]` must equal `PUSH_NEXT[CHAN[i][s]]`. Each
push channel is tied to one next state.

Because nothing is created or destroyed, the following holds whenever the
machine is quiet:

```
input events − output events = events in the stack − initial events
```

**Default machine.** Inputs a, b; states S0–S2; outputs x, y. All of it is
example data and can be changed through parameters.

| | S0 | S1 | S2 |
|---|---|---|---|
| a | output x → S0 | push ch1 → S2 | pop ch1 (x, y) → S1 |
| b | push ch0 → S1 | pop ch0 (x, y) → S0 | output y → S2 |

The stack holds 1 to 3 events while this machine runs. The default stack sizes
follow the reference depth-4 stack: depth 4, two push and two pop channels,
one event stored after reset.

### The storage stack (`di_stack`)

- **Push on channel `i`:** takes the event pair `store[i]` and `push[i]`,
  keeps one event and answers with `z[i]`.
- **Pop on channel `j`:** takes `pop[j]`, releases the top stored event, and
  answers with the pair `x[j]`, `y[j]`.

The stack is built from Cjoins and Merges:

- **Stack pointer.** A (1 + `POP_CH`) × (`DEPTH`+1) Cjoin. Its pending column
  event is the pointer; column 0 means empty. Row 0 takes the push requests,
  merged. Row 1+j takes `pop[j]`.
- **Shadow register.** A `PUSH_CH` × `DEPTH` Cjoin. A push at pointer k fires
  the pointer's pair (0, k). One event moves the pointer to k+1. The other
  waits in shadow column k for `store[i]`. The shadow's pair then puts one
  event into storage cell k+1 and answers `z[i]` with the other, so the
  channel of the push is kept.
- **Storage cells 1..`DEPTH`.** `POP_CH` × 1 Cjoins (1×1 for a single pop
  channel) whose column holds the stored event. A pop on channel j at pointer
  k fires the pointer's pair (1+j, k). One event moves the pointer to k-1. The
  other releases cell k as `x[j]`, `y[j]`.

A push brings two events, so its channel can travel with the store event. A
pop brings one, which must both move the pointer and name the channel. That is
why each pop channel has its own pointer row. Operations must be strictly
serial; the pointer Cjoin's assertion flags overlapping requests. A push to a
full stack or a pop from an empty one is a protocol error, flagged by an
assertion. A stack of capacity 2d, where d bounds the difference between input
and output events, never meets it.

## Timing

All figures below are clocks, with requests already waiting where that
matters.

| Path | Latency |
|---|---|
| Toggle, Cjoin, Ctria, Mutex | 1 (after the last needed input event) |
| `di_stack`: push or pop request → `z`, or `x` and `y` | 2 (1 from a `store` event that comes after the pointer has moved) |
| Merge | 0 |
| `di_cresarb2`: request → `res_req` | 3 |
| `di_cresarb2`: `res_done` → grant | 3 |
| `di_cresarb`: either path | 3 per tree level |
| `di_cseq2`: `c` → grant | 4 |
| `di_cseq2`: `c` → `c_out` | 1 |
| `di_cseq`: `c` → grant | 4, plus 3 per arbiter level |
| `di_cjoin_tree`: last input event → output | 1 for 2×2 and smaller; 4 for 2×3 and 4×4; 10 for 2×8 |
| `cfsm_top` (M = 2, idle machine): input → output event | 11 (7 through the sequencer, 4 through the transition Cjoin tree) |
| `cfsm_top`: pop step | 2 more than an output step |

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/di_pkg.sv tb/tb_cfsm_top.sv \
          --top-module tb_cfsm_top -Mdir obj_top -o sim && obj_top/sim
```

| Testbench | Covers | What it checks |
|---|---|---|
| `tb_cfsm_top` | the whole machine at default size | Drives random single and concurrent inputs. Follows the machine with its own copy of the table, in the grant order the machine chose. Checks output event counts, one grant per input, the conservation equation and the exact 11-clock latency. Requires that every mechanism occurs: single output, push, pop and concurrent inputs. |
| `tb_cfsm_top_m3` | the machine with 3 inputs, 2 states and 3 outputs | Uses a table where each input has its own kind of step. Drives the stack from empty to full and back, and sends all three inputs at once, so the 3-way sequencer tree is exercised. |
| `tb_di_cresarb` | 2-, 3- and 4-way arbiters | Acts as the resource. Checks exclusive use of the resource, grants only to waiting clients, grant latency, and that every request is served. |
| `tb_di_cseq` | `di_cseq2` and `di_cseq` with M = 4, 3, 1 | Checks one grant per clock event, `c_out`, and latency. |
| `tb_di_stack` | `di_stack` | Runs random serial pushes and pops from empty to full. |
| `tb_di_mutex` | `di_mutex` | Checks that two looping clients are never inside together. |
| `tb_di_cjoin_tree` | 2×8, 4×4, 3×5, 1×5 and 5×1 trees | Sends random pairs, each in a random order and with a random gap. The next pair follows the output at once or after a pause. Checks that nothing fires early, that exactly the right pair fires within the expected time, and that nothing fires afterwards. |
| `tb_di_merge`, `tb_di_toggle`, `tb_di_cjoin`, `tb_di_ctria` | the primitives | Checks exact output timing and selection. |

## How far this follows the reference construction, and where it departs

**Taken from the construction:**

- the element behaviours: Merge, Toggle, Cjoin, Ctria, Sequencer and
  CSequencer specifications;
- the Resource arbiter's service order;
- building the multi-way arbiter and sequencer by recursion;
- the state machine's organisation: 1×N Cjoin clocking an M-way CSequencer,
  and an M×N Cjoin as the transition relation;
- the large Cjoin built as a central Cjoin, steering Cjoins and recursive
  quadrants, with 1×1 Cjoins in place of Forks, re-armed through Merges by the
  spare outputs of the steering Cjoins;
- the push/pop use of the stack, its parts (a stack-pointer Cjoin, a shadow
  register, one Cjoin per stored event) and its default sizes.

**Choices made here:**

- the clocked two-phase emulation and the reset;
- the Mutex protocol;
- the internal wiring of the conservative Resource arbiter and CSequencer;
- the stack's wiring, with one pointer row per pop channel;
- the row input of the state Cjoin being the returned clock event;
- the example transition table.

**Not provided:**

- **Non-conservative primitives and circuits.** There is no Fork, plain Join,
  Tria, Mem, plain Sequencer or plain Resource arbiter, and no "marginally
  conservative" machine that destroys surplus events in sinks. The design only
  uses the conservative versions. (The Fork is simply a branching wire; Mem is
  only named, without a specification.)
- **The time-optimal parts of the Cjoin decomposition.** There are no
  balanced binary decoders, so `di_cjoin_tree` resolves one level after
  another. Its response time grows as (log max(M,N))² instead of
  Θ(log max(M,N)). The 2×2 Cjoin is not built from Ctrias and Merges; it stays
  a single element. The state register's 1×N Cjoin is also a single element,
  because its initial events have no place in the tree.
- **A minimal element set.** Toggle and `di_cjoin` are used as primitives
  alongside Merge, Ctria and Mutex. Only the transition Cjoin is decomposed.
  The state register, the stack's Cjoins and the arbiters' steering Cjoins
  are single elements; the state register and the stack pointer carry initial
  events, which the tree has no place for. In principle all of these could be
  reduced to Merge, Ctria and Mutex.
- **A handshake back to the environment.** The environment learns that an
  input was taken only through the machine's response. The testbench waits for
  the machine to go quiet before reusing an input.
