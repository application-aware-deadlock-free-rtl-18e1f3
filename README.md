# Table-routed virtual-channel mesh for application-aware oblivious routing

Oblivious routers such as dimension-order (XY) routers pick a packet's path
from its destination alone. They are small and fast. They also ignore the
traffic, so a few links can carry most of an application's data while others
sit idle. This network moves that decision off the chip. Routes for an
application's flows are computed offline from the flows' estimated
bandwidths. The aim is to minimise the load on the busiest link, so routes
may be non-minimal. The routes are chosen from an acyclic channel dependence
graph, so they cannot deadlock. They are then written into routing tables in
the routers before the application starts.

The hardware that makes this possible is an ordinary virtual-channel (VC)
wormhole router. Only its routing step is changed:

* fixed routing logic is replaced by a programmable **routing table**;
* the VC a packet uses on every link is fixed offline, together with its
  route (**static VC allocation**). The router no longer searches for a free
  VC. It only waits until the VC the table names is free.

The RTL is an 8×8 mesh of such routers with two VCs per port, 16-flit VC
buffers and 256-entry routing tables. Both table-based styles are provided:
node-table routing (the default) and source routing.

## Who guarantees deadlock freedom

The routers do not check routes. A set of routes is deadlock-free when the
channels it uses, taken as (link, VC) pairs, form an acyclic dependence
graph. Routes are chosen offline to meet that condition, for example:

* by forbidding turns, as in the turn models (west-first, north-last, ...);
* by removing dependence edges ad hoc;
* or by splitting the VCs into virtual networks, each acyclic on its own.

A packet may change VC between hops. This is safe as long as the combined
graph stays acyclic, for example when packets only ever move from VC0 to
VC1. Whoever writes the tables is responsible for this property. A table
that routes a packet off the edge of the mesh stalls that packet for good.
A table that names a VC the router does not have trips an assertion in
simulation.

## How a packet finds its way

### Node-table routing (`ROUTE_MODE = ROUTE_NODE_TABLE`, default)

Every flow passing through a node owns one entry of that node's table. The
head flit carries an 8-bit **index**. This is the flow's entry number at the
router the flit is entering. When the head flit arrives, the router reads
that entry:

| field      | bits | meaning |
|------------|------|---------|
| `out_port` | 3    | LOCAL=0, NORTH=1 (y+1), EAST=2 (x+1), SOUTH=3 (y−1), WEST=4 (x−1) |
| `next_idx` | 8    | the flow's index at the next router; written into the head flit |
| `next_vc`  | 3    | VC the packet takes on the output link |

Example: a flow from node A through B to C. Say A's entry 1 is (EAST, 2, 1)
and B's entry 2 is (NORTH, 5, 0). The resource at A injects the head with
index 1. The packet leaves A eastward on VC1 carrying index 2. It leaves B
northward on VC0 carrying index 5. At C, entry 5 says LOCAL: the packet is
delivered to C's resource. A flow uses one entry at every node it crosses,
the last one included. A node can therefore carry up to 256 flows.

### Source routing (`ROUTE_MODE = ROUTE_SOURCE`)

Each node holds a `source_route_table` with one entry per destination. An
entry is a complete route plus one VC. Packets with the same source and
destination therefore share a route. The resource looks up the route for
its packet's destination and sends it as the payload of the head flit, which
acts as the packet's routing flit. The route is packed three bits per hop,
first hop in bits [2:0]. Each router takes the low three bits as its output
port and shifts the route right by three. Once the hops run out, the zero
code that remains means "eject". A 64-bit payload therefore holds routes of
up to 21 router-to-router hops. The packet keeps its VC on every hop. In
this mode the routers have no node table, and the head flit's index field
passes through unchanged. Data travels in the body flits. The cost of this
mode is the extra flit per packet.

## Inside the router (`bsor_router`)

Five ports: LOCAL and the four mesh directions. Each input port has
`NUM_VCS` flit buffers (`flit_fifo`, 16 flits each).

1. **Routing, when the flit arrives.** A head flit is looked up as it
   arrives (`node_route_table` has one read port per input). The result is
   the output port and the requested output VC. It is stored in the buffer
   beside the flit, and the head flit's index is replaced by the next index.
   Body and tail flits follow the head.
2. **VC allocation** (`vc_allocator`), for a head flit at the front of its
   buffer. In static mode the requested VC is granted if no packet holds it.
   When several head flits want the same free VC, one wins round-robin.
   `STATIC_VC = 0` gives the conventional alternative: the lowest free VC
   of the output port goes to one requester per cycle.
3. **Switch allocation** (`switch_allocator`), in the same cycle. A VC may
   bid when it holds an output VC (or has just been granted one) and the
   downstream buffer has a credit. Allocation is separable and input-first:
   each input picks one of its bidding VCs round-robin, then each output
   picks one of the inputs that want it round-robin.
4. **Traversal** (`crossbar`). The winning flit, with its outgoing VC
   written in, crosses the crossbar and leaves on the output link in the
   same cycle. It is written into the next router's buffer at the next clock
   edge.

**Timing.** An uncontended flit moves one hop per clock cycle, head and body
alike. A lone packet's head injected in cycle *t* appears at its
destination's ejection port in cycle *t + H + 1*, where *H* is the number of
router-to-router links crossed. The testbenches check this exactly.

**Wormhole VC ownership.** An output VC belongs to one packet from the
cycle its head is granted until its tail leaves. This holds even with static
allocation, so flits of two packets never interleave on one VC.

**Credits.** The router keeps one counter per output VC, reset to
`BUF_DEPTH`. Sending a flit costs one credit. The downstream side returns a
credit, one bit per VC, in the cycle it removes a flit from that buffer. The
counter adds it at the next edge.

## The mesh (`bsor_mesh`) and its interface

Node *n* = *y*·`MESH_X` + *x*. Links at the mesh boundary are tied off:
nothing arrives on them and they never return credits. Each node's local
port is brought out:

| port | direction | per node | protocol |
|------|-----------|----------|----------|
| `pe_in_flit`, `pe_in_valid` | in | flit, valid | inject; the flit's `vc` names the local input buffer |
| `pe_in_credit` | out | `NUM_VCS` bits | one credit per flit the router forwards; the resource starts with `BUF_DEPTH` per VC |
| `pe_out_flit`, `pe_out_valid` | out | flit, valid | eject; the resource must have room (`BUF_DEPTH` slots per VC) |
| `pe_out_credit` | in | `NUM_VCS` bits | resource frees a slot |
| `pe_route_dst` / `pe_route` | in / out | destination / route | source mode only: look up a route in the node's table (combinational) |

Flit (`bsor_pkg::flit_t`, 77 bits): `ftype` (BODY, HEAD, TAIL or HEADTAIL
for one-flit packets), `vc` (3), `idx` (8), `data` (64).

**Programming.** Write tables only while no packet is in flight, one entry
per cycle:

* node-table mode: `cfg_we`, `cfg_node`, `cfg_addr` (the index) and
  `cfg_entry` (`route_entry_t`);
* source mode: `src_cfg_we`, `cfg_node`, `src_cfg_dst` and `src_cfg_route`
  (`src_route_t`).

After reset every node-table entry and every source route means "eject here
on VC0".

### Parameters

| parameter | default | notes |
|-----------|---------|-------|
| `MESH_X`, `MESH_Y` | 8, 8 | mesh size used in the evaluation |
| `NUM_VCS` | 2 | 1, 2, 4 and 8 were evaluated; 2 in most experiments; at most 8 (3-bit VC field) |
| `BUF_DEPTH` | 16 | flits per VC buffer, and per VC at the resource |
| `TABLE_DEPTH` | 256 | node-table entries; the index is 8 bits |
| `STATIC_VC` | 1 | 0 = dynamic VC allocation |
| `ROUTE_MODE` | `ROUTE_NODE_TABLE` | or `ROUTE_SOURCE` |

## Where this RTL departs from, or adds to, the description it follows

* **Route computation is not hardware.** The bandwidth-sensitive route
  selection (mixed-integer linear programming, or a Dijkstra heuristic
  weighted by residual link capacity, run over several acyclic dependence
  graphs) is done offline in software. It is not part of this RTL. The
  testbenches use a small stand-in. For each flow it picks, among four
  deadlock-free route classes, the one that keeps the busiest link least
  loaded, preferring shorter routes and VCs that carry fewer flows. The four
  classes are:
  * XY on VC0;
  * west-first minimal on VC1;
  * a west-first detour two hops longer on VC1;
  * one XY hop on VC0, then west-first on VC1.

  This stand-in is much weaker than the offline optimiser. Its channel loads
  say nothing about the quality of the real routes.
* **One cycle per hop.** The conventional four-stage router pipeline
  (routing, VC allocation, switch allocation, traversal) is folded into
  routing at arrival plus one cycle. This matches the one-cycle per-hop
  latency assumed in the evaluation. A faster clock would need pipeline
  registers after allocation.
* **3-bit output port.** The description budgets 2 bits per table entry for
  the output port. That cannot name the local port besides four directions,
  so 3 bits are used. An entry is 14 bits; a 256-entry table is 448 bytes.
* **Next-hop VC in the table entry.** Static VC allocation needs the VC
  stored with the route, so each node-table entry also holds the next VC.
* **Local link bandwidth.** The evaluation gave the resource-to-router link
  four times the bandwidth of router-to-router links. Here the local port is
  an ordinary one-flit-per-cycle port.
* **Own choices.** These are this design's own: the allocator organisation
  (separable, round-robin), the credit protocol, the source-route encoding,
  the flit format and 64-bit payload, the configuration bus, the port
  numbering and the asynchronous active-low reset.
* **Not included.** The processing elements and their network interfaces,
  such as the H.264 decoder, processor-model and 802.11a/g transmitter
  modules, are outside the network and not part of this RTL.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_flit_fifo` | order and flags against a queue model, including push and pop on a full buffer |
| `tb_node_route_table`, `tb_source_route_table` | reset contents, all read ports, out-of-range indices, old value on a same-cycle write |
| `tb_vc_allocator` | static and dynamic grants cycle by cycle against a reference model, including requests blocked by busy VCs |
| `tb_switch_allocator` | grants against a reference model of two-stage round-robin allocation |
| `tb_crossbar` | random selects and enables |
| `tb_bsor_router` | 1500 random packets from five credit-respecting senders, checked for the points below; plus a lone flit crossing in one cycle and a credit stall phase |
| `tb_bsor_router_dynamic` | the same with dynamic VC allocation |
| `tb_bsor_mesh` | 4×4 mesh, node-table routing, four workloads end to end |
| `tb_bsor_mesh_full` | the same at the default 8×8 size, untouched parameters (about a minute) |
| `tb_bsor_mesh_source` | 8×8 mesh built for source routing, four workloads |
| `tb_bsor_mesh_vcs` | three 4×4 meshes with 1, 4 and 8 VCs, four workloads each |

`tb_bsor_router` checks that each packet:

* leaves on its table port and table VC;
* carries the next index;
* has its flits contiguous and in order;
* never overflows the downstream buffer.

The mesh testbenches share `tb/mesh_traffic.sv`. It runs four workloads one
after another: transpose, bit-complement, shuffle, and the 802.11a/g
transmitter task graph with its estimated rates. Between workloads it
reprograms the tables. For each workload it:

* selects routes, programs the tables and checks that the flows fit them;
* checks the exact one-cycle-per-hop latency of lone packets;
* then loads the network and checks delivery, per-flow order, the arrival
  VC and flit contiguity.

It also counts how often each mechanism happened and fails if one never
did. The mechanisms are non-minimal routes, VC changes along a route,
injection stalls for lack of credit, full ejection buffers, packets delayed
by contention, and table reprogramming. For the transmitter, modules
M1..M15 sit on nodes 0..14. That placement is an assumption.

Not verified: dynamic VC allocation inside a whole mesh, and the H.264 and
processor-model workloads. Their flow graphs are not available here. The
routes the testbenches program use only VC0 and VC1, even when there are
more VCs. With more VCs, resources inject on all of them.

Run any testbench with plain Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/bsor_pkg.sv tb/tb_bsor_mesh.sv --top-module tb_bsor_mesh -Mdir obj
./obj/Vtb_bsor_mesh
```

Lint a module the same way, for example:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/bsor_pkg.sv rtl/bsor_mesh.sv
```

## Files

* `rtl/bsor_pkg.sv`: flit, table-entry and port types.
* `rtl/bsor_mesh.sv`: the top-level mesh.
* `rtl/bsor_router.sv`: the router.
* Router parts in `rtl/`: `node_route_table`, `source_route_table`,
  `flit_fifo`, `vc_allocator`, `switch_allocator`, `crossbar`, and
  `rr_arbiter` (the round-robin arbiter the allocators use).
* `tb/`: the testbenches above and `mesh_traffic.sv`.
