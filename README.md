# MH3DT: a modified hierarchical 3D-torus network in SystemVerilog

A flat 3D torus needs long wrap-around wires and a large diameter once it grows
to thousands of nodes. A hierarchical 3D torus avoids this by building the
network in two layers. Small 3D tori of processing elements, the *basic
modules* (BMs), sit at the bottom. A few nodes of each BM, the *gate nodes*,
have two extra links, and through those links the BMs form a second 3D torus.
In the "modified" variant built here, the BMs are themselves tori rather than
meshes. So every ring at every level has a wrap-around link, and every node
has a constant degree of 8: six torus links inside its BM plus two free links.
Only gate nodes use the free links.

This repository holds synthesizable RTL for this network, MH3DT(m, n, L, q):
- m × m × m BMs;
- an n × n × n torus of BMs at Level 2, so L = 2;
- 2^q gate nodes per dimension.

The network uses wormhole switching, two virtual channels (VCs) per physical
channel and deterministic routing, first in z, then y, then x. Each network
node is one `mh3dt_router`. The processing elements attach to the routers'
local ports; they are not part of the RTL.

## Topology and addresses

A node address is six digits, `{bz, by, bx, az, ay, ax}`:
- the first three digits are the BM's coordinates in the Level-2 torus (base n);
- the last three are the node's coordinates inside its BM (base m).

The RTL packs the six digits into `3·log2(n) + 3·log2(m)` bits. That is 12 bits
for m = n = 4.

Inside a BM, node (az, ay, ax) is linked to its ±1 neighbours in z, y and x,
modulo m.

**Gate nodes.** The gate nodes sit in corner columns of the BM, at:
- az = 0 for the Level-2 z-direction;
- az = 1 for y;
- az = 2 for x.

With inter-level connectivity q there are 2^q such columns:

| q | corner columns (ay, ax) |
|---|-------------------------|
| 0 | (0, 0) |
| 1 | (0, 0), (0, m−1) |
| 2 | (0, 0), (0, m−1), (m−1, 0), (m−1, m−1) |

A gate node's `g+` port connects to the `g−` port of the same gate node in the
next BM along its dimension, with wrap-around. Each gate position therefore
forms its own n-node ring through a line of BMs.

Its `g−` port connects the other way, to the `g+` port of the previous BM.

## Routing: top-down through gate nodes

`mh3dt_route` makes the whole routing decision for a header flit. It is
combinational logic with these inputs:
- the router's own address;
- the destination;
- the port the header arrived on;
- the VC it arrived on.

It picks the next hop as follows.

1. **The destination is in another BM.** Take the first BM coordinate, in the
   order z, y, x, that differs from the destination's. If the current node is
   a gate node of that dimension, it sends the packet out on `g+` or `g−`.
   Otherwise the packet moves inside the BM towards that gate node, correcting
   z first, then y, then x. When there are several gate columns, it heads for
   the one nearest to it in y and in x.
2. **The packet is in its destination BM.** It is routed z, then y, then x,
   to the destination node, and then out through the local port.

On every ring the packet goes the shorter way round. When both ways are
equally long (offset exactly k/2 on a ring of k nodes), a positive offset
d − s goes + and a negative one goes −.

Worked example with m = n = 4, from node (1,2,3)(2,1,1) to (3,3,3)(1,1,1):

| Step | Route | Hops |
|---|---|---|
| 1 | Inside BM (1,2,3) to its z gate node (0,0,0) | 4 |
| 2 | Along the z ring of BMs to BM (3,2,3) | 2 |
| 3 | Inside that BM to its y gate node (1,0,0) | 1 |
| 4 | Along the y ring to BM (3,3,3) | 1 |
| 5 | Inside that BM to the destination (1,1,1) | 2 |
|   | **Total** | **10** |

`tb_mh3dt_route` walks exactly this path.

## Deadlock freedom: two virtual channels with a dateline

Dimension-ordered routing removes cycles between dimensions. The wrap-around
link of each ring could still close a cycle, and the second VC breaks it:
- A packet starts on VC0.
- On a wrap-around link, it is sent on VC1. A wrap-around link goes from
  coordinate k−1 to 0 in the + direction, or from 0 to k−1 in the −
  direction.
- It stays on VC1 while it continues on the same ring in the same direction.
  The router sees this when the header arrives on the opposite port of the
  output it takes.
- Once it turns onto another ring, it is back on VC0.

The rule applies alike to the rings inside a BM and to the gate-node rings
between BMs. The BM-internal stretches between gate nodes share the BM's
channels.

## Router microarchitecture (`mh3dt_router`)

Each router has nine ports, numbered as in `port_e`:

| Ports | Connection |
|---|---|
| z+, z−, y+, y−, x+, x− | BM torus links |
| g+, g− | Level-2 links (gate nodes only; idle elsewhere) |
| local | processing element |

Each port carries two VCs. The flit path has two buffer stages:

- **Input buffers.** One `flit_fifo` of `BUF_DEPTH` flits (default 2) per
  input VC.
- **VC allocation.** A header at the front of an idle input VC computes its
  route. It asks for the output VC the route names, but only while that
  output VC is free. One round-robin arbiter per output port grants one such
  request per cycle. The output VC then belongs to that packet until its
  tail flit has passed: this is the wormhole.
- **Crossbar.** Each output VC is written only by the input VC that holds
  it, so no further switch arbitration is needed. Every input VC moves at
  most one flit per cycle into its output VC buffer, and only if that buffer
  has room.
- **Output buffers.** One `flit_fifo` of `OBUF_DEPTH` flits (default 2) per
  output VC.
- **Link arbitration.** Per physical link, a round-robin arbiter (`rr_arbiter`)
  picks one VC per cycle among those with a flit and with room downstream.
  The flit crosses the link and is written into the neighbour's input buffer
  at the next clock edge.

Flow control uses a per-VC "room" bit. The receiving buffer returns it, and it
is computed from the buffer's registered occupancy. Every output of a router
is either a register or registered state passed through multiplexers, so
chains of routers form no combinational loops. Even with 2-flit buffers, a
single stream still runs at one flit per cycle.

**Timing:**
- A body or tail flit needs 2 cycles per hop: input buffer to output buffer,
  then output buffer to the next input buffer.
- A header needs 3 cycles per hop; the extra cycle is route computation and
  VC allocation.
- The flits just behind a header are held back by that same cycle.
- Two packets on different VCs share a link flit by flit at the full rate.

`tb_mh3dt_router` checks all of these timings cycle by cycle.

**Event outputs.** `ev` (type `router_ev_t`) reports, each cycle, whether:
- a header waited for a busy output VC;
- a header was given VC1 on a network link;
- a header took a gate link;
- a flit waited because the next buffer was full;
- both VCs of a link competed;
- an input VC waited for a full output buffer.

The BMs and the top OR these pulses together. They are intended for
performance counters and for test coverage.

## Packets and flits

A flit is `flit_t`: a 2-bit type and 16 bits of data. A packet is, in order:

| Flit | Type | Data |
|---|---|---|
| 1 | `FT_HEAD` | destination address in the low bits |
| 2 | `FT_HEAD2` | second header flit (the test traffic puts the source address here) |
| 3 … | `FT_BODY` | any number of body flits |
| last | `FT_TAIL` | tail flit |

Routers look only at the first header flit and release VCs on the tail. The
packet length is therefore free; the test traffic uses 16-flit packets.

A physical link is `link_t`, made of a valid bit, the VC number and the flit.
`credit_t` is the per-VC room vector that flows back against it.

## Module hierarchy

```
mh3dt_top            N^3 BMs + Level-2 gate-link wiring
└─ mh3dt_bm          M^3 routers in a 3D torus, gate links brought out
   └─ mh3dt_router   wormhole router, 9 ports x 2 VCs
      ├─ mh3dt_route routing decision (one per input VC)
      ├─ flit_fifo   input and output VC buffers
      └─ rr_arbiter  VC allocation per output port, VC arbitration per link
mh3dt_pkg            flit, link, port and event types
```

## Parameters and sizes

| Parameter | Default | Described network | Meaning |
|---|---|---|---|
| `M` | 4 | 4 | BM size per dimension |
| `N` | 4 (2 in `mh3dt_top`) | 4 | Level-2 torus size per dimension |
| `Q` | 2 | 2 | inter-level connectivity (0, 1 or 2) |
| `BUF_DEPTH`, `OBUF_DEPTH` | 2 | 2 (20 in a buffer-size study) | flits per VC buffer |
| `NUM_VC` (package) | 2 | 2 | VCs per physical channel |

At m = n = 4 the described network has 4096 nodes. `mh3dt_top` defaults to
n = 2 (8 BMs, 512 nodes): the 4096-router netlist needs about 60 GB of memory
just for Verilator's lint, about 15 MB per router instance. Overriding `N = 4`
gives the full network where the tools have the memory.

Other restrictions of this RTL:
- m and n must be powers of two.
- m must be at least 3, so that the gate nodes fit in a column.
- Only the two-level hierarchy is built.
- Several things here are this design's own choices, because the underlying
  description of the network does not fix them: the gate-column placement
  for q < 2, the "nearest column" choice, the flit width, the buffer-room
  flow control and the crossbar organisation.

## Simulating

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=N failures=F`, and each has a watchdog. Run from the
repository root, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mh3dt_pkg.sv tb/tb_mh3dt_router.sv \
          --top-module tb_mh3dt_router -Mdir obj_router
./obj_router/Vtb_mh3dt_router
```

| Testbench | What it checks |
|---|---|
| `tb_rr_arbiter` | grants against a reference model, and that a persistent requester is not starved |
| `tb_flit_fifo` | against a queue model, and full-rate streaming through a 2-flit buffer |
| `tb_mh3dt_route` | 20,000 random decisions against a reference written from the routing rules, plus the worked example and 3000 complete source-to-destination walks |
| `tb_mh3dt_router` | single-router tests of routes, VCs, timing, wormhole exclusivity, VC interleaving, back-pressure and gate links |
| `tb_mh3dt_bm` | one 64-node BM under uniform random traffic: 384 packets of 16 flits |
| `tb_mh3dt_top` | the 512-node network at its defaults under uniform traffic, counting gate hops, VC1 allocations, VC waits, VC contention and back-pressure |

The `tb_mh3dt_bm` and `tb_mh3dt_top` scoreboards check that every packet
arrives intact and that each router mechanism occurs at least once.

`tb/pe_model.sv` is a behavioural traffic source and sink standing in for a
processing element.

Verilator's build time grows with the number of router instances. The
64-router BM testbench takes about 8 minutes to compile with one compiler job.
The 512-node top testbench takes far longer and has not yet been run to
completion. The largest configuration simulated end to end is the single
64-node BM; it delivered all 384 packets intact.

## Not included

- Processing elements: only their network interface, the local port, is
  defined.
- More than two VCs. The described network was also studied with 3 and 4
  VCs, but that needs an allocation policy among the extra VCs that it does
  not specify.
- Hierarchies deeper than two levels.
- Latency and throughput measurement. The event outputs and the test models
  are the starting point for it.
