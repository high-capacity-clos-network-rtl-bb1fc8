# Clos-MDN: a Clos-network packet switch with NoC central modules

A three-stage Clos network is the classic way to build a large switch from small
ones. Conventional designs put crossbars in the middle stage and pay for it with
either complex, synchronised matching (bufferless Memory-Space-Memory switches) or
large buffers everywhere (Memory-Memory-Memory switches). This design replaces each
middle-stage crossbar by a **Multi-Directional Network-on-Chip (MDN)**: a small 2-D
mesh of buffered mini-routers whose ports sit on the mesh perimeter. Packets are
carried through the mesh by local, pipelined routing decisions, so no global
scheduler is needed, and the input stage shrinks to one plain FIFO per input port.
Neighbouring central modules are also linked to each other, turning the middle
stage into a ring, and packets may take a detour through a neighbour when their
own module is congested.

The RTL is synthesizable SystemVerilog, parameterised by the Clos geometry. The
default build is the 32x32 switch: 8 input/output modules of 4 ports and 4 central
modules of 4x4 mini-routers.

## Geometry and port numbering

With n ports per input/output module (IOM), k IOMs and m central modules (CMs):

* N = n·k external ports, m = n (the Benes case: every IOM has one link to every CM).
* Each CM is a (k/2)×(k/2) mesh. Its West side has k/2 links, one to each of
  IOMs 0…k/2−1 (IOM i on row i). Its East side has k/2 links, one to each of IOMs
  k/2…k−1 (IOM i on row k−1−i). Its North and South sides link to the previous and
  the next CM.
* Inputs and outputs are spread over the IOMs in opposite directions: input port p
  enters at IOM p/n, output port p leaves from IOM k−1−p/n. In the 32-port switch,
  IOM 0 takes inputs 0–3 and drives outputs 28–31; IOM 7 takes inputs 28–31 and
  drives outputs 0–3. Traffic from input p to output p therefore crosses from one
  side of the central stage to the other.
* Input FIFO j of every IOM always sends to CM j (static dispatch). Each CM can
  deliver to every IOM's output queues, so the IOM–CM links are bidirectional.

```
   IOM 0 ─┐                                   ┌─ IOM 7
   IOM 1 ─┤ West   CM 0 (4x4 mesh)   East     ├─ IOM 6
   IOM 2 ─┤ rows   ───── ring ─────  rows     ├─ IOM 5
   IOM 3 ─┘ 0..3   CM 1 ... CM 3     0..3     └─ IOM 4
           (every IOM links to row i / k-1-i of every CM)
```

## Packets, time slots and speedup

Packets have a fixed size and the fabric is store-and-forward, so a packet is one
word (`clos_pkg::pkt_t`): destination port, source port, a *diverted* flag, the
*turn column* of its route, and a 32-bit payload. One link moves one packet per
clock.

One clock is one cycle of the on-chip fabric. The external lines are SP times
slower (SP = 2 by default): the top's `slot` output is high one cycle in SP; each
input port accepts, and each output port emits, at most one packet per slot. The
internal links are not slowed down, which is what the speedup buys.

## Inside a central module

Each mini-router (`mdn_router`) has four ports (N, E, S, W) and no local port.
Packets use two virtual channels by the side on which they leave the central stage:
**VC0** if the destination IOM faces the CM's East side, **VC1** if it faces the
West side. A packet keeps its VC all the way, so horizontal movement within a VC is
always in one direction, which is how the mesh avoids deadlock between the two
traffic directions.

Buffer depths follow that traffic split. With BUFF packets per input port:

| router / input            | VC0            | VC1            |
|---------------------------|----------------|----------------|
| West-column router, West  | ⌈2·BUFF/3⌉ (3) | rest (1)       |
| East-column router, East  | rest (1)       | ⌈2·BUFF/3⌉ (3) |
| inner West input          | BUFF (4)       | —              |
| inner East input          | —              | BUFF (4)       |
| North / South inputs      | BUFF/2 (2)     | BUFF/2 (2)     |

An inner West input only ever receives eastbound packets and an inner East input
only westbound ones, so each holds a single VC.

Each cycle the head of every VC buffer is routed and requests one output. Every
output has its own round-robin arbiter (`rr_arbiter`) over the eight VC buffers,
and fires only if the downstream buffer of the packet's VC has a credit. Both VCs
of one input may leave in the same cycle towards different outputs. Outputs are
registered. A packet on an input link in cycle t is on the output link in cycle
t+2 when it meets no contention. A freed slot returns a credit one cycle after the
pop.

## Routing inside a CM

Routing is minimal towards the egress row on the egress side. The header's turn
column says where the packet moves vertically:

* eastbound: East while column < turn column, then North/South to the egress row,
  then East until it leaves the mesh;
* westbound: the mirror image.

The IOM sets the turn column when the packet enters the switch:

* **Modulo** route, for a packet that crosses the mesh (enters on one side, leaves
  on the other): one intermediate turn column, (entry row + egress row) mod
  (mesh−1), counted from the entry side. This spreads the vertical legs over the
  columns before the last one.
* Same-side packets (leaving on the side they entered) turn in the entry column.
* **XY** route, for a packet that enters from the North or South: the turn column
  is the exit column, so the packet goes horizontally first, then vertically.

## The inter-CM ring and congestion-aware diversion

The bottom-row router in column c of CM r is linked both ways to the top-row router
in column (k/4 + c) mod (k/2) of CM (r+1) mod m. The column offset of half a mesh
interleaves the links, so a packet moved to a neighbour lands in another part of
its mesh and does not have to cover more ground.

**Congestion estimates.** Every router counts the packets it holds (`occ`). On each
side X it sends `fint[X] = (occ + fex[opposite X]) / 2`, where `fex[Y]` is the value
received from the neighbour on side Y. This is a one-dimensional regional
estimate: each hop further away counts half as much. Estimates cross the inter-CM
links like any other link. They are tied to zero at the IOM sides.

**Diversion.** A top- or bottom-row router can send a packet over its inter-CM
link instead of along its local route. For the packet at a buffer head it compares:

* local metric = HOP_W · (remaining hops on the local route) + estimate from the
  local route's direction;
* diverted metric = HOP_W · (1 + hops from the landing router to the same egress)
  + estimate received over the inter-CM link.

The packet is diverted when all of the following hold:

* it has not been diverted before;
* the diverted path has no more hops;
* the diverted metric is strictly smaller.

A diverted packet gets `diverted = 1` and continues with XY routing in the new CM.
The egress is the same IOM because every CM links to every IOM. Because of the
interleaving, diversion sometimes shortens the path, and is then taken even at
zero load. For example, a packet at the bottom of a mesh that needs the top row
can go straight to the top row of the next CM.

Diversion can reorder packets of one flow. Packets that are not diverted follow a
fixed path through one CM.

## Input/output module (`iom`)

* **Ingress.** One FIFO per input port (IN_DEPTH = 4). A packet is taken from the
  line in a slot cycle if the FIFO has room (`in_ready`). The IOM fills in the
  source port, the VC and the turn column. The FIFO head leaves towards its CM as
  soon as the CM's entry buffer of its VC has a credit. A head without credit
  blocks its FIFO: this is a simple FIFO, not a set of virtual output queues.
* **Egress.** Each CM link ends in a landing buffer of 2·EDGE_CRED packets. The CM
  holds EDGE_CRED credits per VC for it. Landing heads move into the output queue
  of their port (OQ_DEPTH = 8, `output_queue`). One output queue accepts up to m
  packets in one cycle, in link order while there is room. Each output queue
  sends one packet per slot.

## Top-level interface (`clos_mdn_switch`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | fabric clock, synchronous active-low reset |
| `slot` | out | one cycle in SP: external time slot |
| `in_valid[p]`, `in_dst[p]`, `in_payload[p]` | in | packet offered on input p; hold until taken |
| `in_ready[p]` | out | packet taken at this clock edge (slot cycle, FIFO not full) |
| `out_valid[p]`, `out_pkt[p]` | out | one-cycle pulse: packet delivered on output p |
| `ev_divert`, `ev_credit_stall`, `ev_oq_multi` | out | per-cycle event flags for observation |

| parameter | default | meaning |
|---|---|---|
| `N_IO` | 4 | n, ports per IOM (= number of CMs) |
| `K_IOM` | 8 | k, number of IOMs (mesh side k/2; keep it even) |
| `BUFF` | 4 | packets per mini-router input port |
| `SP` | 2 | fabric speedup over the line rate |
| `IN_DEPTH`, `OQ_DEPTH` | 4, 8 | IOM input FIFO and output queue depths |
| `EDGE_CRED` | 2 | credits per VC on a CM-to-IOM link |
| `HOP_W` | 1 | weight of a hop against one unit of congestion |
| `DIVERT_EN` | 1 | enable diversion over the ring |

Limits:

* Header widths allow up to 1024 ports and meshes up to 64×64.
* Credit counters are 4 bits, so BUFF can go up to 15 (an inner buffer holds all BUFF packets).
* EDGE_CRED can go up to 15.

The 32-port default synthesises (generic cells, before mapping) to about 91k
word-level cells, 23k flip-flop bits and 92k bits of buffer memory.

## Where this design makes its own choices

The structure follows the published Clos-MDN architecture: IOM FIFOs and output
queues, MDN central modules, the asymmetric VC buffer split, credit flow control,
XY/Modulo routing, interleaved inter-CM links and congestion-aware diversion. The
following are choices of this implementation:

* Which CM row each IOM link uses, and the exact Modulo turn column.
* The congestion estimate (half-weight aggregation of router occupancy) and the
  diversion rule, including at most one diversion per packet.
* Same-side packets route in the edge column. They use VC1 on the West side and
  VC0 on the East side.
* The depths of the input FIFOs, output queues and landing buffers.
* Backpressure towards the line (`in_ready`) instead of dropping packets.
* Input FIFOs drain towards their CM at fabric speed (up to SP packets per slot).
  They fill at most once per slot.
* The single-word packet, with the speedup modelled as a slot strobe.
* No network-interface logic. Its role (VC choice, credits) sits in the IOM.

**Deadlock.** Within one CM each VC only moves one way horizontally and routes are
minimal, so the mesh has no cyclic dependencies. Across the ring a packet may be
diverted once. A cyclic wait around the ring of CMs has not been ruled out
formally. The simulations below always drained completely, including under
saturation.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_pkt_fifo`, `tb_output_queue`, `tb_rr_arbiter` | against queue / round-robin models, including multi-write acceptance and the starvation bound |
| `tb_route_unit` | directions, Modulo/XY turns and diversion decisions of three routers against an independent model, plus hand-worked cases |
| `tb_mdn_router` | one router under random traffic: delivery, directions, VC, credits both ways, `fint` arithmetic, 2-cycle hop latency |
| `tb_mdn_cm` | a CM with its North/South links looped into a one-CM ring: every packet leaves on the right side and row, with diversions, same-side and Modulo routes |
| `tb_iom` | static dispatch and FIFO order, header fields, credits, one packet per slot per output, multi-write into an output queue, backpressure |
| `tb_clos_mdn_switch` | the whole 32-port switch at default parameters (below) |

The end-to-end testbenches drive four workloads at 70% offered load:

* uniform Bernoulli;
* bursty uniform (on/off, mean burst 10);
* hot-spot (unbalanced, w = 0.5);
* diagonal (2/3 of input i's packets to output i, 1/3 to output i+1).

Every packet must come out exactly once, on the right port, at most one per slot
per output, and the switch must drain after each workload. The testbench also
requires each of these to happen at least once:

* a diversion;
* a credit stall;
* an output-queue multi-write;
* input backpressure;
* same-side and cross-fabric deliveries.

At 32 ports the fabric keeps up with uniform, hot-spot and diagonal traffic at
70% load, with mean delays of 7 to 9 slots. Bursty traffic at that load builds
long queues in the line cards. These runs are functional checks, not a
reproduction of published delay curves.

The same testbench, with the switch instantiated as `#(.N_IO(8), .K_IOM(16))`,
has also passed at 128 ports: 16 IOMs and 8 CMs of 8x8 routers. About 2 million
checks passed, every mechanism occurred, and the fabric drained after each
workload. At 70% uniform load the mean delay rose to about 60 slots. Verilator
builds one specialised copy of each router position, so a 128-port build took
about 13 minutes, against 17 seconds of simulation.

To simulate with Verilator, for example the full switch:

```
verilator --binary --timing --assert -y rtl +libext+.sv rtl/clos_pkg.sv \
          tb/tb_clos_mdn_switch.sv --top-module tb_clos_mdn_switch -Mdir obj -o sim
./obj/sim
```

Other testbenches build the same way with their own top module. The 32-port
end-to-end run takes a few seconds.

## Files

* `rtl/clos_pkg.sv`: packet type, geometry and buffer-depth functions.
* `rtl/pkt_fifo.sv`, `rtl/rr_arbiter.sv`, `rtl/output_queue.sv`: building blocks.
* `rtl/route_unit.sv`, `rtl/mdn_router.sv`, `rtl/mdn_cm.sv`: the central stage.
* `rtl/iom.sv`, `rtl/clos_mdn_switch.sv`: input/output modules and the top.
* `tb/`: testbenches as listed above.
