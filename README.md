# QuickQ: a block-RAM priority queue for FPGAs

A priority queue hands back the best item it holds (here: the one with the
smallest key) each time it is asked. Software heaps pay for this with a
number of compare-and-swap steps that grows with the number of items; in an
FPGA router's path search, heap adds and fetches can eat a quarter of the run
time. QuickQ does the same job in FPGA fabric with a fixed cost per command:
about one clock per slot of a single node, whatever the number of items
queued.

The idea is to keep the items as one fully sorted list and to cut that list
into equal pieces, the *nodes*. Each node stores its piece in its own small
dual-port block RAM and has its own comparator. A new item walks down the
first node slot by slot, drops into place, and pushes everything behind it
one slot down; whatever falls off the end of that node walks down the next
node in the same way. Because a node forwards a command as soon as it is
done with it, the nodes work like a pipeline: while node 5 is still moving
items for an old command, node 0 is already serving a new one. The host only
ever waits for node 0.

The default build is 45 nodes of 16 slots, 64-bit items (a 32-bit sort key
and a 32-bit payload such as a pointer): 720 items in 45 RAMs of 16 x 64
bits.

## Items, keys and empty slots

An item is `DATA_W` bits. The top `KEY_W` bits are the key, compared as an
unsigned number; the rest is payload that travels with the key but is never
compared. The description below is for the default min queue
(`MIN_QUEUE = 1`); a max queue (`MIN_QUEUE = 0`) mirrors it, with the
largest key first and all-zeros filler. Empty slots hold the all-ones item, which sorts behind every other
key, so a queue is "empty" by being full of all-ones items and a fetch from
an empty queue returns all ones. Do not add an item whose key is all ones if
you need to tell it apart from an empty slot.

A 32-bit IEEE-754 cost can be used as the key directly as long as it is not
negative: non-negative floats order the same way as their bit patterns read
as unsigned integers.

Equal keys: a new item goes in front of items with the same key, so among
equal keys the most recently added one comes out first.

## Inside a node

Each `qq_node` is built from:

- `qq_bram`, the node's RAM: one write port and one registered read port,
  used in the same cycle but never on the same slot;
- a **temp register** that holds the item currently being walked down the
  node; it is loaded from the left input (add), with the all-ones item
  (reset), or with the item the value router sends onward;
- `qq_value_router`, which compares the temp item with the item just read
  from the RAM and routes the one that belongs in the current slot to the
  RAM write port (`place`) and the other onward (`carry`);
- a multiplexer in front of the RAM write port choosing between the router
  and the item coming back from the next node;
- the control logic, a small state machine with a slot counter.

While idle, a node keeps reading slot 0, so its head item is always sitting
on the RAM read port. The three commands then run as follows.

**Add** (insert). The new item is loaded into the temp register. In each of
the next `DEPTH` cycles the node compares the temp item with the item read
from slot *k*, writes the smaller one (the temp item on a tie) back to slot
*k*, keeps the other in the temp register and reads slot *k+1*. After slot
`DEPTH-1` the item left over is handed to the next node as an add of its
own. Example with a 4-slot node holding `3 5 8 9` and a new `4`:

    slot 0: 4 vs 3 -> keep 3, carry 4
    slot 1: 4 vs 5 -> write 4, carry 5
    slot 2: 5 vs 8 -> write 5, carry 8
    slot 3: 8 vs 9 -> write 8, carry 9      node now 3 4 5 8, 9 goes right

Once an item has been displaced it is never smaller than the next slot's
item, so it simply ripples to the end; the walk never needs to stop early.

**Fetch** (remove the head). The head item, already on the read port, is
presented on the left output one cycle after the command is accepted. The
node then copies slot *k* to slot *k-1* for *k* = 1 .. `DEPTH-1`, asks the
next node for its head (a fetch of its own) and writes the answer into its
last slot. The tail of the chain answers with the all-ones item.

**Reset** (clear). The temp register is loaded with the all-ones item,
which is written to every slot; then the reset is passed to the next node.
Asserting `rst_n` does the same in every node at once (block RAM contents
are not reset by hardware), without passing anything on.

## Timing, and why the chain never stalls

With `DEPTH` = 16 a node is busy for

| command | busy cycles | made of |
|---|---|---|
| add   | `DEPTH+1` = 17 | 1 to load the temp register, 1 per slot (the last one hands off) |
| fetch | `DEPTH+2` = 18 | 1 to return the head, `DEPTH-1` moves, 1 handing the read on, 1 to write the answer |
| reset | `DEPTH+1` = 17 | 1 to load the temp register, 1 per slot (the last one hands off) |

A node hands a command to the next node in the last cycle of its own work,
so the next node starts exactly when this one finishes. Working through the
cases shows that the next node is always free by the time this node wants
to hand it something: an add or reset keeps the next node busy for
`DEPTH+1` cycles, which is exactly how long this node needs before it can
hand off again; a fetch hands its read to the next node `DEPTH` cycles after
starting, which is exactly when the next node, started one command earlier,
turns idle. So, issuing commands back to back at full rate, no node ever
waits, and the time the host sees per command is the single-node figure in
the table, independent of queue length. Each link still carries a
`ready`/valid handshake, so a node does wait correctly if a neighbour is ever
busy (for example a different tail model); the testbenches check both
properties.

Each node holds a different command, so up to `NODES` commands can be in
flight. Commands stay in order at every node, so the queue behaves exactly
as if every command had been carried out to the end before the next.

## Using `quickq`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, everything on the rising edge |
| `rst_n` | in | 1 | synchronous, active low; the queue is cleared and `ready_o` returns after `DEPTH` cycles |
| `write_i` | in | 1 | add `data_i` |
| `read_i` | in | 1 | fetch the smallest item |
| `reset_i` | in | 1 | empty the queue |
| `data_i` | in | `DATA_W` | item to add, key in the top `KEY_W` bits |
| `ready_o` | out | 1 | a command is accepted in a cycle where this is high |
| `data_o` | out | `DATA_W` | fetched item |
| `data_valid_o` | out | 1 | `data_o` is valid; one cycle after `read_i` was accepted |
| `lost_valid_o` | out | 1 | an item leaves the tail of the chain |
| `lost_data_o` | out | `DATA_W` | that item |

Raise at most one of `write_i`, `read_i`, `reset_i` per cycle (an assertion
checks it) and hold it until a cycle in which `ready_o` is high. After an
add or reset `ready_o` is low for `DEPTH+1` cycles, after a fetch for
`DEPTH+2`.

When the queue is full, an add pushes the largest item off the end: it
appears on `lost_data_o` with `lost_valid_o`, which fires for every item
leaving the tail, including all-ones filler while the queue is not yet full.
Ignore the port if losing overflow silently is acceptable.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `DATA_W` | 64 | item width |
| `KEY_W` | 32 | key width, the top bits of an item |
| `DEPTH` | 16 | slots per node, at least 2; sets the per-command latency |
| `NODES` | 45 | nodes in the chain; capacity is `NODES*DEPTH` |
| `MIN_QUEUE` | 1 | 1: smallest key first, empty slots all ones; 0: largest key first, empty slots all zeros |

The defaults size the queue for a path-search heap of (cost, pointer)
pairs. A 64-bit by 16-deep RAM takes two of the 18 Kbit block RAMs of a
Virtex-II Pro class device, so the 45 nodes use 90 of them. A key-only
configuration is `DATA_W=32, KEY_W=32, NODES=40` (640 items, one block RAM
per node). Capacity grows with `NODES` at no cost in latency; latency grows
with `DEPTH`. Narrower items (for example a quantised cost and a shortened
pointer) fit more slots in the same RAMs.

## Departures and open points

- An add keeps the head node busy `DEPTH+1` cycles. The original design is
  quoted at 16 cycles for an add and 18 for a fetch with 16-slot nodes; this
  implementation matches the fetch and spends one extra cycle on an add,
  loading the temp register before the first compare.
- The ready/valid handshakes between nodes, the idle read of slot 0, the
  clear on `rst_n`, the tail termination and the lost-item port are choices
  of this implementation. In the original drawing the multiplexer on a
  node's right output has a high-impedance input; here the link carries the
  all-ones item when idle.
- The original queue sat on a processor bus (IBM CoreConnect PLB) next to a
  PowerPC core, program memory, a DDR controller and a UART. None of these
  is included: `quickq` offers the plain command port above, and a bus
  wrapper has to be added for a given system.
- A secondary key is not implemented; only the `KEY_W` key bits are
  compared.
- Memories are written as plain arrays with a registered read, which FPGA
  tools map to block RAM; no vendor macro is instantiated.

## Files

| file | content |
|---|---|
| `rtl/quickq_pkg.sv` | router modes and node states |
| `rtl/qq_bram.sv` | node RAM |
| `rtl/qq_value_router.sv` | compare-and-route unit |
| `rtl/qq_node.sv` | one node: temp register, multiplexers, control logic |
| `rtl/quickq.sv` | top: the chain of nodes and the tail termination |
| `tb/qq_bram_tb.sv` | RAM: read latency, hold with read disabled, random traffic |
| `tb/qq_value_router_tb.sv` | router, min and max builds: all modes, frequent ties, all-ones item last |
| `tb/qq_node_tb.sv` | one node against a model of the rest of the chain: the 3 5 8 9 + 4 example, exact busy times, random traffic with a randomly busy neighbour |
| `tb/quickq_tb.sv` | 4 x 4 chain, back-to-back random commands against a reference queue; overflow, resets, ties, empty fetches, exact timing, no stalls; a max-queue copy fed inverted keys |
| `tb/quickq_full_tb.sv` | default 720-item build: full heaps of 1, 3, ... 511 items added and fetched, 600 plain keys, 760 adds into 720 slots |
| `tb/quickq_initial_tb.sv` | 40-node 32-bit build: sublists of 50 to 600 keys |

Every testbench checks its results against an independent model and ends
with a line `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module quickq_full_tb \
        -y rtl -y tb +libext+.sv -Irtl rtl/quickq_pkg.sv tb/quickq_full_tb.sv
    ./obj_dir/Vquickq_full_tb

Replace the two `quickq_full_tb` names with any other testbench. The
full-size run takes well under a second of simulation time per workload
and prints the clock cycles each took: 17 per add and 18 per fetch
throughout, from 1 item to 600. For synthesis, read `rtl/quickq_pkg.sv`
first and then the other files in `rtl/`, with `quickq` as top.
