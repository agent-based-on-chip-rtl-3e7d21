# ANoC: agent-based network-on-chip with congestion-aware selection

A mesh network-on-chip whose routers steer packets around congested regions
using congestion information that is not only local. Routing is minimal and
adaptive (Dynamic-XY): at every hop a packet usually has two productive
directions, one in X and one in Y. The question is which one to take. Here a
second, very small network answers it. This network of *cluster agents*
collects a congestion level from every router. It spreads these levels so
that each router knows the load of every router in its own cluster and in the
four adjacent clusters. A selection rule, CAS (congestion-aware selection),
then weighs the routers on each candidate path, up to three hops ahead, and
picks the less loaded direction.

The default build is the 36-node configuration: a 6 x 6 mesh of routers with
32-bit flits, split into nine 2 x 2 clusters, one agent per cluster.

## Structure

```
                anoc_top
   ┌───────────────────────────────────────────────┐
   │ data network (MESH_W x MESH_H)                │
   │   per node: anoc_ni ── anoc_router            │
   │                         ├ 7 x anoc_fifo       (input VC buffers)
   │                         ├ 7 x anoc_cong_detect
   │                         ├ anoc_agent_cell     (CL = # congested buffers)
   │                         ├ 7 x anoc_route_dyxy + anoc_cas_select
   │                         └ 5 x anoc_rr_arb     (one per output port)
   │ agent network (MESH_W/CW x MESH_H/CH)         │
   │   per cluster: anoc_cluster_agent             │
   └───────────────────────────────────────────────┘
```

Nodes are numbered `n = y*MESH_W + x`. Row 0 is the north edge, North is
row `y-1` and East is column `x+1`. Clusters are numbered row by row in the
same way. In the default 6 x 6 mesh, node 14 at (2,2) lies in the centre
cluster with nodes 15, 20 and 21. Its view also covers the clusters north,
west, east and south of that one.

Shared types and constants are in `rtl/anoc_pkg.sv`:

| constant | value | meaning |
|---|---|---|
| `FLIT_W` | 32 | flit data width |
| `BUF_DEPTH` | 6 | flits per input VC buffer |
| `CONG_THRESH` | 4 | buffer occupancy that counts as "over threshold" |
| `HIST_LEN` | 4 | length of the congestion history |
| `PKT_FLITS` | 5 | flits per packet (header + 4 data) |
| `NUM_VCS` | 7 | input VCs per router |
| `CL_W` | 3 | congestion level width (0..7) |
| `COORD_W` | 4 | coordinate width (meshes up to 16 x 16) |

Top-level parameters: `MESH_W`, `MESH_H` (default 6), `CW`, `CH` (cluster
size, default 2). The mesh must be a multiple of the cluster size.

## Router

Each router has five ports: Local, North, East, South and West. Dynamic-XY
avoids deadlock by splitting the network into two subnetworks. The
*increasing* subnetwork holds the +X links and one virtual channel (VC) of
every Y link. The *decreasing* subnetwork holds the −X links and the other Y
VC. So the Y links carry two VCs and the others carry one. That gives seven
input VCs:

| VC index | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|---|
| input | Local | East | West | North vc1 | North vc2 | South vc1 | South vc2 |

The same numbering is used for output VCs. A packet's subnetwork is fixed
when it is injected: the NI writes bit `subnet` = 1 into the header when the
destination lies to the west, otherwise 0. On Y links the packet always uses
vc1 (`subnet`=0) or vc2 (`subnet`=1). Packets with no X offset go into the
increasing subnetwork.

**Per input VC:** a 6-flit FIFO, a congestion detector, a DyXY routing
function and a CAS unit. The FIFO's head is visible combinationally. When
the head is a header flit, the routing function lists the productive
directions and CAS picks one. The header then asks for that output VC, but
only while no other packet owns the VC. The choice is recomputed every cycle
until the header wins. It therefore follows the congestion at the moment of
departure, not at the moment of arrival.

**Wormhole switching:** when a header leaves, its input VC takes ownership
of the output VC. Ownership ends when the tail leaves. Body flits follow
the stored output VC without routing.

**Switch allocation:** one round-robin arbiter per output port. An input VC
takes part when all of these hold:

- it has a flit;
- it owns an output VC on that port, or it has a header and that port's
  output VC is free;
- the receiving buffer has space for that VC.

The crossbar has one input per input VC, so the two VCs of a Y port never
block each other at the crossbar.

**Link protocol:** the forward half of a link is `link_t` = {valid, vc,
flit}, where a valid flit is a transfer. The backward half is `link_rdy_t`,
one bit per VC: the receiving buffer is not full. The ready bits come
straight from registers, so no combinational path crosses a router. A
sender drives `valid` only when the matching ready bit is set.

**Timing:** a flit written into an input buffer at one clock edge can leave
the router at the next edge, straight into the next buffer. An idle path
therefore costs one cycle per router. Node 0 to node 35 (10 hops, 11
routers) takes 17 cycles, from the PE handing over the message until the
whole message is at the destination PE.

## Congestion detection and congestion level

Each input buffer has a detector with a 4-bit history. Every time a flit
enters or leaves the buffer, one bit enters the history. The bit is 1 if the
buffer holds at least 4 of its 6 flits after the event. The buffer's
congestion status `cs` is 1 when all four history bits are 1. A buffer must
therefore stay high across four successive events, so one burst does not
mark it congested. The *agent cell unit* adds up the seven `cs` bits into
the router's congestion level `cl` (0..7, registered). For example, two
congested buffers give `cl` = 2.

## Agent network

Every cluster agent does three things each cycle:

- It registers the CLs of its four routers as one 12-bit CL string. Router
  `(lx,ly)` of the cluster is at bits `3*(ly*CW+lx)`.
- It sends that string to the four neighbouring agents. The agent links are
  exactly one string wide, so a string moves in one cycle.
- It registers the four strings it receives and hands all five strings to
  its routers as the *view*: own, N, E, S, W.

A router's information is therefore 2 cycles old for its own cluster and 3
cycles old for the neighbouring clusters. At the mesh edge the missing
strings are zero.

## Congestion-aware selection (CAS)

CAS has work to do only when both an X and a Y direction are productive.
Otherwise it passes the single candidate through, or Local at the
destination. The view is arranged as a window of 3CW x 3CH routers around
the own cluster, with the four corner clusters unknown. The rule depends on
where the destination's cluster lies.

**Same agent-column (or agent-row), "part B".** Suppose source and
destination clusters share an agent-column. The Y direction is scored by
the routers 1, 2 and 3 hops ahead in the source's own column. The X
direction is scored by the routers of the destination's column, starting
level with the source and running the same way. The weights are 3, 2 and 1.
Both sides use the same number of hops. That number is limited by the
distance to the destination and by what the view covers. For an agent-row
the roles of X and Y are swapped. If source and destination share a
cluster, the agent-column form is used. With 2 x 2 clusters both forms
reduce to comparing the two neighbours.

*Example (6 x 6):* node 31 (1,5) sends to node 6 (0,1). Both are in the
first agent-column. North is scored `3·CL(25) + 2·CL(19) + 1·CL(13)`. West
is scored `3·CL(30) + 2·CL(24) + 1·CL(18)`. Node 12 is in the view but is
not used.

**Otherwise, "part A".** Each direction is scored by 3 x the CL of the
1-hop neighbour plus 2 x the congestion of the adjacent cluster in that
direction. The cluster's congestion is the mean CL of its routers. Both
scores are multiplied by 4 to keep the mean exact, so the hardware computes
`12·CL(neighbour) + 2·ΣCL(cluster)`. *Example:* node 23 (5,3) sends to
node 1 (1,0). West is scored from node 22 and the cluster west of its own.
North is scored from node 17 and the cluster north of its own.

In both cases the lower score wins, and a tie goes to X. `anoc_cas_select`
also outputs both scores and which rule was used (`mode`: 0 = no choice,
1 = part A, 2 = part B).

## Network interface and packet format

`anoc_ni` takes one message at a time from its PE (`msg_valid`/`msg_ready`).
A message is a destination, a 15-bit tag and four 32-bit words. The NI sends
it as a 5-flit packet, one flit per cycle while the router has room. A cycle
with `msg_valid` high and `msg_ready` low is a failed injection attempt. On
the receive side, flits are collected until the tail arrives. The message
is then offered on `rx_valid`/`rx_ready`. While it waits, the NI takes no
further flits.

Flit = 2-bit type (`FT_BODY`, `FT_HEAD`, `FT_TAIL`, `FT_SINGLE`) + 32-bit
data. Header data word (`hdr_t`, MSB first):

| bits | 31:28 | 27:24 | 23:20 | 19:16 | 15 | 14:0 |
|---|---|---|---|---|---|---|
| field | dst_x | dst_y | src_x | src_y | subnet | tag |

## Choices made in this implementation

These parts are not fixed by the method itself and were chosen here:

- Threshold test is `occupancy >= 4` ("four of six slots occupied"), taken
  after the event. An enter and a leave in the same cycle count as one
  event.
- Flow control is on/off per VC, one cycle per hop. The crossbar has one
  input per VC, and each output port has a round-robin arbiter.
- The header layout, and the NI with one message of buffering in each
  direction.
- Router and NI positions are strapped input pins (`my_x`, `my_y`), so all
  routers are one identical circuit.
- The agent registers both its own and the forwarded strings.
- The cluster congestion in part A is the mean CL. Ties go to X. Part B uses
  an equal hop count on both sides.
- Reset is asynchronous and active-low, and clears all state.

Not included: the processing elements (cores, caches, memory), which the
network only connects to. Their message ports are the top-level ports. The
latency and power results of the original study (8 x 8 and 14 x 14 meshes,
application traces) were not reproduced. The RTL can be built at those
sizes by setting `MESH_W`/`MESH_H` (up to 16). It was simulated at 6 x 6
and 8 x 8, but not at 14 x 14.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_anoc_fifo` | random push/pop against a queue model; full/empty/count |
| `tb_anoc_cong_detect` | 4-event history against a reference, directed rise/fall |
| `tb_anoc_agent_cell` | all 128 status patterns |
| `tb_anoc_cluster_agent` | string packing and view order |
| `tb_anoc_route_dyxy` | every source/destination pair in 16 x 16 |
| `tb_anoc_cas_select` | both worked examples; 40 random congestion maps x all 36 x 36 pairs against a reference model of the rules |
| `tb_anoc_router` | one-cycle hop, CAS steering from the view (both parts), CS/CL under stalled outputs, 600 random packets on all seven input VCs under random backpressure: packets complete, unmixed, on productive ports and the right VC |
| `tb_anoc_ni` | packetisation, header fields, subnet bit, 5 flits in 5 cycles, reassembly under backpressure |
| `tb_anoc_top` | the default 6 x 6 network end to end (below) |
| `tb_anoc_workload` | the same test on an 8 x 8 mesh with the hotspot at (4,4) |

`tb_anoc_top` runs the top at its defaults. It first checks the zero-load
latency (17 cycles, node 0 to 35). It then runs 3000 cycles of uniform
random traffic, followed by 3000 cycles of heavier traffic with a hotspot
at (3,3) that receives an extra 10 % of all messages. A scoreboard checks
that every message arrives exactly once, at the right node, with its data
intact. The testbench also counts the design's mechanisms and fails if any
of them never happened:

- congested buffers;
- non-zero CLs;
- strings arriving from neighbouring agents;
- part A and part B decisions;
- choices of Y over X;
- use of both Y VCs;
- backpressure stalls;
- refused injections.

In one run, the average latency was about 13 cycles under the uniform load
and about 90 cycles under the saturated hotspot load. `tb_anoc_workload`
runs the same two profiles on an 8 x 8 mesh (16 clusters) with the hotspot
at (4,4). Its zero-load latency from node 0 to node 63 is 21 cycles. In one
run the uniform phase averaged about 15 cycles. The hotspot phase is driven
far past saturation, so only a few percent of injection attempts succeed
and the latency is about 200 cycles. The 14 x 14 size is built the same way
(`MW = MH = 14` in that testbench), but it has not been simulated.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -j 0 -y rtl -y tb +libext+.sv \
  --top-module tb_anoc_top rtl/anoc_pkg.sv tb/tb_anoc_top.sv
./obj_dir/Vtb_anoc_top
```

Replace the testbench name to run the others. The package must come first.
The modules hold SystemVerilog assertions for buffer overflow and underflow,
flits arriving at a full NI, and non-header flits at the head of an
unallocated VC.

## Changing the design

- **Mesh size:** set `MESH_W`/`MESH_H` on `anoc_top`. Coordinates are 4
  bits wide, so widen `COORD_W` in `anoc_pkg` beyond 16 x 16. The header
  layout must then be adjusted too.
- **Buffer depth, threshold, history length:** the constants in
  `anoc_pkg`.
- **Cluster size:** `CW`/`CH`. The CL string and the agent links grow to
  `CW*CH*3` bits. With clusters wider than 2, part B's "destination column"
  is no longer next to the source. The rule still reads that column, but
  the method was only described for 2 x 2 clusters.
