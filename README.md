# CAGIS: contention-age input selection for a wormhole mesh network on chip

When several input channels of a network-on-chip switch want the same output,
the switch must pick one. Contention-aware selection picks the channel whose
upstream switch is the most congested. That keeps traffic moving through hot
regions, but a channel fed by a quiet neighbour can then lose every time and
starve. Contention-age input selection (CAGIS) adds a second number to each
input channel, its **AGE**: how many competitions it has lost since it last
won. The channel with the highest AGE wins. Among equal AGEs, the highest
contention level (CL) wins. The winner's AGE returns to zero, so a channel
that keeps losing climbs until it wins. Nothing starves.

This repository holds synthesizable SystemVerilog for a 4x4 mesh of
five-port wormhole switches using CAGIS, with XY or odd-even routing. It also
has self-checking testbenches for every module, including the uniform,
transpose and hot-spot workloads at full size. The design follows the CAGIS
proposal by Akinwale, Adebayo, Folorunso and Adebayo, "An Improved Selection
Technique for Fast Packet Routing in Computer Network". That work describes
the switch architecture and the selection rules and evaluates them in a
network simulator. It specifies no RTL. Widths, flit format, link handshake,
timing and tie-breaking are therefore this design's own, and are listed under
"Where this design makes its own choices".

## The network

- `noc_mesh` is a `MESH_X` x `MESH_Y` grid of tiles, 4x4 by default.
- Tile (x, y) has index `n = y*MESH_X + x`, with (0,0) at the lower left and
  y growing northwards.
- Each tile has one switch (`cagis_switch`). The switch's LOCAL port is brought
  out to that tile's core as the `core_*` ports.
- Neighbouring switches are joined by two opposite links. Each link carries:
  - a flit, with `valid`/`ready`;
  - a 3-bit CL, the contention level of the sending output channel.
- Ports on the edge of the mesh are tied off. Minimal routing never uses them.

Packets are *worms* of flits (`cagis_pkg`). A flit is 34 bits: a 2-bit
kind (`BODY`, `HEAD`, `TAIL`, or `SOLO` for a one-flit packet) and a 32-bit
payload. A head flit's payload is a `head_t`:

| bits  | field | meaning                      |
|-------|-------|------------------------------|
| 31:28 | src_x | source column (odd-even needs it) |
| 27:24 | src_y | source row                    |
| 23:20 | dst_x | destination column            |
| 19:16 | dst_y | destination row               |
| 15:0  | tag   | free for the sender           |

The head reserves a path through each switch. Body flits follow it, and the
tail flit releases it. The evaluated configuration uses packets of five flits
and input buffers of five flits. The RTL accepts any packet length.

## Inside a switch

The switch has five ports, numbered LOCAL, EAST, WEST, NORTH, SOUTH.

**Input channel** (`input_port`). Each input channel holds four things:

- the input buffer (`input_buffer`): a five-flit FIFO;
- the output selection, or router: `xy_route` or `oe_route`;
- the AGE register (`age_counter`);
- the CF register: the CL received from upstream, delayed one cycle.

When the flit at the front of the buffer is a head, the channel raises one
request bit (`req_new`) for the output its router picks. When an output grants
it, the channel locks onto that output and freezes the route. Every flit up
to the tail then leaves as fast as the downstream buffer accepts it.

**Input selection** (`input_selection`). Each output channel has one of these.
It holds:

- `cl_observer`, which counts the input channels that want this output. That
  count is registered and sent down the link as the output's CL.
- `cagis_arbiter`, the selection rule. It builds the treap of the
  contenders with `treap_builder` and grants its root.
- An ownership register, which keeps the output for the winning input until
  its tail flit has left.

**Crossbar** (`crossbar`). One multiplexer per output, selected by that
output's owner. The output is selected by the new winner in the cycle it
wins.

The local input channel has no upstream switch, so its CL is forced to zero
inside the switch. Packets already in the network therefore beat packets
waiting to enter it, when their AGEs are equal.

## Selection: contention level, AGE and the treap root

This is the part that decides the switch's behaviour.

**Contention level.** An output channel's CL is the number of input channels
currently requesting it. That includes a worm already flowing through it, if
its input has a flit waiting. The CL travels one hop downstream. There the
receiving input channel uses it as its *own* priority: "my upstream switch is
this congested".

**AGE.** A *competition* happens in a cycle in which an idle output grants one
of its waiting heads. Then:

- the winner's AGE is cleared;
- every other input that requested that output in that cycle gains one AGE;
- AGE saturates at 15.

A head that waits only because a worm owns its output does not age. Nobody
was chosen in that cycle.

**The treap root.** The proposal frames the decision as a treap (a tree
that is a binary search tree by key and a heap by priority). The contenders
are its nodes, with CL as the key and AGE as the priority, and the root is
granted. By the heap rule the root is the contender with the highest AGE.

`treap_builder` builds that tree in one cycle, with no insertions or
rotations. With distinct keys and priorities the treap is unique: it is the
Cartesian tree of the set. Each node's parent is found directly. Look at the
nearest higher-priority node on each side of it in key order; the parent is
the lower-priority one of those two. The node hangs left of its parent if its
key is smaller, right otherwise. The node without a parent is the root. The
module outputs the root plus the parent, left child and right child of every
node. `cagis_arbiter` uses only the root.

Equal values are made distinct. Keys are compared as {CL, port index}.
Priorities are compared as {AGE, CL, lower port index first}. So equal AGEs are
decided by the higher CL, then by the lower port index.

For example, take five contenders with (CL, AGE) = (5,0), (1,2), (3,4),
(10,7), (8,9). The treap over them has (8,9) at its root, so that channel wins.
Its left child is (3,4), whose children are (1,2) on the left and (5,0) on the
right; its right child is (10,7). `tb_treap_builder` checks that exact tree,
then checks the treap properties on random sets. `tb_cagis_arbiter` checks the
grant, and that (10,7) wins once (8,9) is removed.

What this does in practice (`tb_cagis_switch` checks the exact order):

- **Two inputs, one strong.** The west input gets CL 5 from upstream, and the
  local core input has CL 0. Both stream packets east. The west input wins
  the first competition (equal AGE, higher CL). The core input is now older
  and wins the next one. The packets on the east output alternate west,
  core, west, core... Selecting on CL alone would let the west input hold the
  output for as long as it had traffic.
- **Three inputs.** West (CL 4), east (CL 2) and south (CL 1) stream north.
  The order settles into west, east, south, repeating. Each loser's AGE
  overtakes the last winner's.

## Output selection: XY and odd-even

`ROUTING` selects the router, at the mesh, switch or input port level.

- `ROUTE_XY` (default), `xy_route`: east or west until the column matches,
  then north or south, then local. A packet from (0,3) to (2,2) goes
  (0,3)→(1,3)→(2,3)→(2,2).
- `ROUTE_OE`, `oe_route`: minimal routing under the odd-even turn model.
  - Forbidden turns: east→north and east→south in even columns; north→west
    and south→west in odd columns. This keeps wormhole routing deadlock-free
    without virtual channels.
  - The router lists every legal minimal direction (`allowed`). It needs the
    packet's source column to do so.
  - It then picks the first *free* one: not owned by a worm, and with room
    downstream. X is tried before Y. If none is free, it takes X if legal,
    else Y.
  - The route is re-evaluated each cycle until the head wins an output, and
    then frozen.
  - From (0,3) to (2,2) the legal paths are (0,3)→(0,2)→(1,2)→(2,2) and
    (0,3)→(1,3)→(1,2)→(2,2). East-then-south through (2,3) is excluded.

## Timing and handshake

- **Link handshake.** Every link is valid/ready. `ready` is the downstream
  buffer's "not full" register. `valid` and the flit come from the upstream
  buffer's registers through the route, arbitration and crossbar logic. No
  combinational path crosses a link.
- **Grant timing.** Arbitration is combinational. A head that wins in a cycle
  leaves in that same cycle if the downstream buffer has room.
- **Zero-load latency.** The head spends one cycle per switch. A packet
  crossing *h* hops reaches the destination core *h*+1 cycles after the
  source accepted its head. The remaining flits follow one per cycle.
  `tb_noc_mesh` checks this on an idle mesh.
- **CL delay.** A CL is one cycle old when it leaves its switch (the
  `cl_observer` register). It is one more cycle old when the arbiter uses it
  (the CF register).
- **Reset.** `rst_n` is an active-low asynchronous reset. It clears buffers,
  AGE, CF, locks and ownership. Buffer storage is not reset.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `noc_mesh` | `MESH_X`, `MESH_Y` | 4, 4 | mesh size (the evaluated 4x4 mesh) |
| `noc_mesh`, `cagis_switch`, `input_port` | `ROUTING` | `ROUTE_XY` | `ROUTE_XY` or `ROUTE_OE` |
| same | `DEPTH` | 5 | input buffer depth in flits (the evaluated size) |
| `cagis_pkg` | `COORD_W` | 4 | coordinate width, meshes up to 16x16 |
| `cagis_pkg` | `DATA_W` | 32 | flit payload |
| `cagis_pkg` | `CL_W`, `AGE_W` | 3, 4 | contention level and AGE widths |

With the defaults, the mesh synthesizes to about 15,000 word-level cells and
2,200 flip-flops, plus 80 five-flit buffers (10,880 memory bits).

## Files

`rtl/`:

- `cagis_pkg.sv`: shared types and constants;
- `noc_mesh.sv`: the top;
- `cagis_switch.sv`, `input_port.sv`, `input_buffer.sv`, `xy_route.sv`,
  `oe_route.sv`, `age_counter.sv`, `input_selection.sv`, `cl_observer.sv`,
  `cagis_arbiter.sv`, `treap_builder.sv`, `crossbar.sv`.

`tb/`:

- one `tb_<module>.sv` per module;
- `mesh_env.sv`: traffic sources, sinks and checkers used by the two mesh
  testbenches;
- `tb_noc_workloads.sv`: the evaluation workloads.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/cagis_pkg.sv tb/tb_noc_mesh.sv --top-module tb_noc_mesh
./obj_dir/Vtb_noc_mesh
```

Replace `tb_noc_mesh` with any other testbench name. Approximate run times:

- unit testbenches: under a second;
- `tb_noc_mesh`: under a second;
- `tb_noc_workloads`: about 45 seconds.

Compiling either mesh testbench takes two to three minutes, mostly spent on
the 80 treap builders (five outputs in each of 16 switches).

**`tb_noc_mesh`** runs the default mesh end to end.

- It first times single packets on an idle mesh.
- It then runs six meshes, XY and odd-even, under uniform, transpose and
  hot-spot traffic, with random back-pressure from the sinks.
- It checks every packet for destination, completeness and order. XY packets
  between a pair of tiles must arrive in the order sent.
- It counts how often each mechanism happened, and fails if one never did:
  - contested grants;
  - wins by an aged input;
  - heads blocked behind a worm;
  - non-zero link CLs;
  - back-pressure at injection and at ejection;
  - odd-even heads with a choice of direction.
- It fails if no packet is delivered for 5,000 cycles (a deadlock), or if a
  timed single packet has not arrived after 100 cycles.

**`tb_noc_workloads`** runs the evaluation workloads at full size.

- Setup: 4x4 mesh, five-flit packets and buffers, at least 50,000 packets per
  run, latency not collected for packets created in the first 5,000 cycles.
- Traffic patterns:
  - **uniform**: any other tile, equally likely;
  - **transpose**: tile (i,j) sends to (3-j, 3-i);
  - **hot spot**: uniform, plus 10% of packets to tile (3,3).
- Its injection rate, 0.02 packets per cycle per tile, is a choice of the
  testbench.
- Results at that rate:

  | pattern | mean latency, XY and odd-even |
  |---|---|
  | uniform | about 10.4 cycles |
  | transpose | about 11.0 cycles |
  | hot spot | about 10.5 cycles |

  These figures characterise this RTL. They are not a reproduction of the
  published latency charts, which come from a network simulator.

## Where this design makes its own choices

Where the published description is silent or unclear, this design chose as
follows:

- **What CL counts.** CL is the number of input channels requesting an
  output. That is the definition of the selection rule and its pseudo code.
  Two other passages describe contention in terms of input-buffer capacity or
  occupancy; they were not followed.
- **The CF register.** Each input channel has a register labelled CF, which is
  never explained. Here it holds the CL received from upstream.
- **The treap.** The treap is rebuilt from the current requests every
  cycle, not kept between cycles. The insertion, deletion and rotation
  procedures are not implemented, because the same tree is computed directly.
  Tie-breaking is not specified: this design uses CL, then the lower port
  index.
- **When AGE counts.** A competition is a grant by an idle output. Waiting
  behind a worm does not age a channel. AGE is 4 bits and saturates.
- **Odd-even choice.** The source names odd-even routing but not how to choose
  between the legal directions. The first-free, X-before-Y rule is this
  design's.
- **Interfaces and widths.** Five ports, flit format, all widths, the
  valid/ready link protocol, registered CLs, combinational grant, one-cycle
  switch latency and reset behaviour.
- **Transpose destination.** The published destination is (4-j, 4-i), which
  falls outside a 0..3 mesh. This design uses (3-j, 3-i). The four tiles that
  map to themselves send nothing.
- **Not modelled.** The comparison baselines (contention-aware selection
  alone, first-come-first-served, round-robin) are not modelled. Neither are
  the cores: the mesh exposes their ports, and the testbenches drive them.
- **Observation ports.** `contest` and `blocked` on the switch and mesh are
  observation outputs added for testing.
