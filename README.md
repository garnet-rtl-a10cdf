# A five-stage virtual-channel mesh network-on-chip

This is synthesizable SystemVerilog for an on-chip packet network: a 2-D
mesh of input-buffered virtual-channel (VC) routers with credit-based flow
control, table-driven deterministic routing and round-robin separable
allocators. It follows the "fixed pipeline" router of the Garnet
interconnect model, a classic five-stage VC router. The goal is low-cost
on-chip routing under tight area budgets. The router uses:

- flit-level buffering;
- single-ported per-VC buffers;
- one shared crossbar input per port;
- simple separable allocators that are fast enough for high clock rates.

The RTL turns that description into cycle-exact hardware. Where the
description gives only a function, this design makes its own choices. Each
one is named below.

## Packets, flits, virtual channels and credits

A packet is a head flit, optional body flits and a tail flit. A one-flit
packet is a single `HEAD_TAIL` flit. A flit is one link-width word: 128 data
bits, so 16 bytes per cycle per link, plus a small header (`flit_t` in
`garnet_pkg`). The header holds the flit type, the VC the flit occupies on
the link it is crossing, and the source and destination node.

Every input port has `NUM_VCS` = `NUM_VNETS` x `VCS_PER_VNET` = 2 x 4 VCs.
Each VC has a private FIFO of `BUF_DEPTH` = 4 flits. A VC belongs to one
virtual network (vnet = VC id / `VCS_PER_VNET`). A packet stays in its vnet
for its whole trip.

Flow control works with credits:

- The upstream side keeps, per downstream VC, a credit count and a "free"
  bit (`output_unit`).
- Sending a flit uses one credit.
- When a flit leaves a downstream VC buffer, a credit for that VC goes back
  upstream. If that flit was the tail, the credit carries `free`, and the
  upstream router may give the VC to a new packet.
- A VC therefore holds at most one packet at a time. That keeps the per-VC
  state small: a route, an output VC and an arrival stamp.

## The router pipeline

`router` joins five `input_unit`s, one `route_compute`, a `vc_allocator`, a
`switch_allocator`, a `crossbar` and five `output_unit`s. A head flit that
appears on `flit_in` in cycle t goes through these stages:

| cycle | stage  | what happens |
|-------|--------|--------------|
| t     | BW, RC | The flit is written into its VC's FIFO. Route computation looks up its destination in the same cycle, and the output port is stored with the VC. The VC goes from IDLE to VA. |
| t+1   | VA     | The VC allocator gives the packet a free VC of its vnet at that output port. The VC becomes ACTIVE. |
| t+2   | SA     | The switch allocator grants the crossbar input and output. The flit is popped and one credit of the output VC is used. |
| t+3   | ST     | The flit crosses the crossbar into the output register. |
| t+4   | LT     | The flit is on `flit_out`. The `network_link` adds its own latency, 1 cycle by default. |

Body and tail flits skip RC and VA and inherit the head's output VC. They
go BW, bubble, SA, ST, LT. The bubble is built into `vc_fifo`: a flit
written in cycle t is reported `visible` only from cycle t+2. As a result,
every flit spends the same two cycles between its write and switch
allocation. When the tail wins SA, the input VC returns to IDLE. The credit
for each popped flit leaves on `credit_out` one cycle after SA.

Resulting figures:

- Zero-load latency per hop is 5 cycles: 4 in the router and 1 on the link.
- From a message entering a network interface to its first flit leaving the
  destination interface takes 10 + 5 x hops cycles. The mesh testbench
  checks this for the 6-hop path from node 0 to node 15: 40 cycles.
- A port streams one flit per cycle as long as credits last.
- With 4-flit buffers, a single VC cannot stream without gaps across a link,
  because the credit round trip is longer than 4 cycles. Several VCs
  together can.

## Allocation and point-to-point ordering

Both allocators are separable and input-first. Each stage is a bank of
`rr_arbiter`s. An arbiter's pointer moves past the winner only when its
grant is actually used.

- **VC allocator.** Stage 1: each waiting input VC picks one free output VC
  of its own vnet at its output port. Stage 2: each output VC grants one of
  the input VCs that picked it. Several output VCs of one port can be
  allocated in the same cycle.
- **Switch allocator.** A VC requests the switch when it is ACTIVE, has a
  visible flit, and its output VC has a credit. Stage 1: each input port
  picks one of its requesting VCs, since each port has one crossbar input.
  Stage 2: each output port grants one input.

Some coherence protocols need point-to-point ordering in some vnets
(`ORDERED_VNETS`, default vnet 0). Two messages from one source to one
destination must then arrive in the order sent. Routing is deterministic,
so such packets follow the same path. The allocators make sure they never
overtake each other:

- **VA rule.** In an ordered vnet, a head waiting for an output port is held
  back while an older head of the same vnet waits for the same port
  anywhere in the router.
- **SA rule.** A packet is held back while an older packet of the same
  input port, vnet and output port is still in the router. This holds even
  while the older packet waits for a credit. That is stricter than ordering
  only requests made in the same cycle, and it is what guarantees the order.

"Older" is based on a 16-bit arrival stamp taken when the head is written.
It is compared as an age (now - stamp), so wrap-around is harmless as long
as no packet waits 32k cycles. Ties go to the lower index.

## Routing

`route_compute` serves all five input ports at once from one table. For
every destination, the table holds the set of output ports that lie on a
minimal path. Each output port also has a link weight. The lookup returns
the candidate with the smallest weight, and the lower port number on a tie.

At reset, the table holds every minimal direction for the router's mesh
position, and X links weigh 1 against 2 for Y links. The result is X-Y
dimension-order routing, which is free of deadlock. The configuration bus
of `garnet_mesh` (`cfg_*`, addressed by node) can rewrite single table
entries or weights. For example, making X links heavier gives Y-X routing;
the mesh testbench does exactly this.

Port numbers are 0 local, 1 east (+X), 2 west (-X), 3 north (+Y) and
4 south (-Y). Node n sits at x = n % `MESH_X`, y = n / `MESH_X`.

## Network interface and multicast

The network has no multicast hardware. The `network_interface` takes a
message with these fields:

- a destination set (one bit per node);
- a vnet;
- a length of 1 to 5 flits;
- one data word per flit.

It sends the message as one unicast packet per destination, lowest node
number first. For each packet it waits for a free VC of the vnet at the
router's local input, then sends the flits one per cycle while credits
last. `msg_ready` is high when the interface is idle. `msg_done` pulses
after the last packet has left, and `pkt_sent` pulses once per packet.

On the eject side, every flit is accepted. It appears on `ej_flit` one
cycle later and is credited back at the same time. `ej_pkt_done` marks
each tail.

## Activity counters

Each router counts, per cycle, six kinds of events:

- buffer writes;
- buffer reads;
- VC allocations;
- switch allocations;
- crossbar traversals;
- link traversals.

The counts come out as saturating 32-bit counters (`cnt_*`, cleared by
`cnt_clear`). They are the inputs a router power model, such as Orion,
turns into dynamic and leakage power. The power model itself is not part
of this RTL.

## The mesh top: `garnet_mesh`

`garnet_mesh` is a `MESH_X` x `MESH_Y` mesh, 4 x 4 by default. Each node has
a router and a network interface. Every connection, including
interface-to-router, is a `network_link` of `LINK_LATENCY` cycles, carrying
flits one way and credits the other. A slower link, such as an off-chip
link, is modelled by a longer latency rather than a narrower width. One
`LINK_LATENCY` applies to every link of the mesh; giving single links their
own latency means passing a different value to those `network_link`
instances. Router ports on the mesh edge are tied idle.

The top's ports, per node, are:

- the message injection interface;
- the ejected flit stream;
- the six activity counters.

There is also one route-configuration bus for the whole mesh.

## Parameters

| parameter | default | where it comes from |
|-----------|---------|---------------------|
| router ports | 5 | the described router (inputs 0..4, outputs 0..4) |
| `NUM_VNETS` | 2 | own choice |
| `VCS_PER_VNET` | 4 | own choice (configurable per vnet in the description) |
| `BUF_DEPTH` | 4 flits per VC | own choice (configurable in the description) |
| `FLIT_DATA_W` | 128 bits (16 B/cycle) | own choice; the flit width sets the link bandwidth |
| `MESH_X` x `MESH_Y` | 4 x 4 | own choice; the description names no topology size |
| `LINK_LATENCY` | 1 | own choice |
| `MAX_PKT_FLITS` | 5 | own choice (a 64-byte block plus a header) |
| `ORDERED_VNETS` | vnet 0 | own choice of which vnet is ordered |
| X / Y link weights | 1 / 2 | X lighter than Y gives X-Y routing, as described |

`NUM_VNETS`, `VCS_PER_VNET`, `BUF_DEPTH`, `FLIT_DATA_W` and `NODE_W` (6, so up
to 64 nodes) live in `garnet_pkg` because the flit and credit structs depend
on them.

## How far it follows the Garnet description, and where it departs

Taken from the description:

- the router structure: input buffers with private per-VC FIFOs, route
  computation, VC allocator, switch allocator and crossbar;
- the five-stage pipeline, including the body-flit bubble;
- credit-based VC flow control, with the tail freeing the VC;
- table-based deterministic routing, with link weights choosing among
  minimal paths (X-Y by default);
- separable round-robin allocators;
- the two point-to-point ordering rules;
- multicast split into unicasts at the network interface;
- slow links modelled as long links;
- activity counting for power estimation.

This design's own choices:

- every size in the parameter table; sizes are fixed when the design is
  elaborated, where the Garnet model sets buffer size and VC count at run
  time;
- the mesh topology;
- one packet per VC at a time;
- the credit format and its one-cycle delay;
- input-first allocation;
- the age-stamp ordering rule, made stricter in SA as explained above;
- the message format and destination order of the network interface;
- port numbering;
- the reset contents of the route table;
- the set of counted events.

Not included:

- **The "flexible pipeline" model.** This is Garnet's second,
  output-queued router abstraction, which adds a configurable delay in each
  router. It is a simulation abstraction, not the proposed hardware.
- **The power model itself.**

Measured in simulation of the 4 x 4 mesh with uniform random traffic (one-flit
packets on vnet 0, five-flit packets on vnet 1):

- light load: about 27 cycles average packet latency;
- heavier load: about 28 cycles.

Injection is limited because each interface holds one message at a time.
These figures are not a reproduction of a load-latency curve.

## Simulating

Every testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops on its own watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/garnet_pkg.sv tb/tb_router.sv --top-module tb_router -Mdir obj_router
./obj_router/Vtb_router
```

| testbench | covers |
|-----------|--------|
| `tb_vc_fifo` | FIFO order, count, BW-to-SA bubble |
| `tb_route_compute` | X-Y routes from the reset table; Y-X after weight change; table write |
| `tb_input_unit` | VC state machine, route and stamp capture, output VC substitution, credits |
| `tb_output_unit` | credit counts and VC free bits against a model |
| `tb_vc_allocator` | allocation rules on random inputs; ordering; round-robin fairness |
| `tb_switch_allocator` | grant rules on random inputs; ordering; round-robin fairness |
| `tb_crossbar` | random permutations |
| `tb_network_link` | exact latency for flits and credits |
| `tb_activity_counters` | sums, clear, saturation |
| `tb_network_interface` | multicast split and order, VC wait, ejection credits |
| `tb_router` | 4-cycle latency, streaming, credit stall, output contention, ordered vnet |
| `tb_garnet_mesh` | a 2 x 2 mesh, in four phases (see below) |
| `tb_garnet_mesh_full` | the same phases on the 4 x 4 mesh with every parameter at its default |

`tb_garnet_mesh` and `tb_garnet_mesh_full` run four phases:

1. the zero-load latency from node 0 to the far corner (20 cycles on
   2 x 2, 40 on 4 x 4);
2. a multicast to every other node;
3. light and heavy uniform random traffic, then a hotspot in which every
   node sends to one node; every packet is checked for delivery,
   integrity and vnet-0 order;
4. a route change by link weights.

It also checks that VC-allocation waits, credit stalls, switch-allocation
losses and ordering holds all occurred. Building the 4 x 4 testbench with
Verilator takes 10 minutes or more, because the whole mesh is flattened
into C++; the 2 x 2 one builds in about a minute. Each run takes well
under a minute.

## Files

Every module is in `rtl/<module>.sv`:

- `garnet_pkg`: types and sizes;
- `rr_arbiter`, `vc_fifo`, `route_compute`, `input_unit`, `output_unit`,
  `vc_allocator`, `switch_allocator`, `crossbar`, `activity_counters`: the
  router parts;
- `router`;
- `network_link`, `network_interface`;
- `garnet_mesh`: the top.

Each file opens with a description of its function, interface and timing.
