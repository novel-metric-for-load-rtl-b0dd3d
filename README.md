# Congestion-aware mesh NoC with a router-wide congestion metric

In a 2D-mesh network-on-chip, a packet whose destination differs in both row
and column has two shortest next hops: one along X and one along Y. Adaptive
routers pick the hop that looks less congested. Most of them judge congestion
by one property of the downstream input port: free VCs, free buffer slots or
crossbar demand. This design uses one number per router instead. The number
describes the whole router:

```
Router status   = (OutFlits / CandidateVCs) * (OutFlits / OutputPorts)
Occupancy rate  = mean over all VC buffers of (flits held / buffer depth)
CM              = Router status * Occupancy rate        (CM = 1.0 if CandidateVCs = 0)
```

Every router computes its CM each cycle and sends it to its four neighbours.
When a header flit has two productive directions, the router sends it towards
the neighbour with the lower CM. This metric and routing rule were proposed by
Aroui, Benyamina, Boulet, Benhaoua and Singh in "Novel Metric for Load Balance
and Congestion Reducing in Network On-Chip". This repository is an
independent RTL implementation of that network in SystemVerilog. The
configuration is the one those authors evaluated: a 7×7 mesh of five-port
wormhole routers, 3 virtual channels per input port, 5-flit buffers, 5-flit
packets, round-robin allocation and credit-based flow control.

The description this RTL was built from covers the metric, the routing rule
and the router's block structure. It does not cover the pipeline timing,
number formats, flit layout, deadlock avoidance or network interface. Those
parts are this design's own choices. They are marked as such below and in the
opening comment of each file.

## The congestion metric (`congestion_metric`)

The router feeds its metric unit three counts for the current cycle:

| input       | meaning in this RTL                                              | range |
|-------------|------------------------------------------------------------------|-------|
| `out_flits` | output ports that send a flit this cycle (switch-allocator grants)| 0..5  |
| `cand_vcs`  | input VCs whose buffer holds at least one flit                    | 0..15 |
| `occ_sum`   | total flits held in all 15 input VC buffers                       | 0..75 |

The mean occupancy rate is `occ_sum / (V * DEPTH)`, with V = 15 buffers
(5 ports × 3 VCs) and DEPTH = 5. Substituting it gives the whole metric as one
ratio. The unit evaluates that ratio with a single integer division:

```
CM = floor( out_flits^2 * occ_sum * 256 / (cand_vcs * 5 * 15 * 5) ),  saturated at 256
CM = 256                                                              when cand_vcs = 0
```

CM is unsigned fixed point with 8 fractional bits (`cm_t`, 9 bits), so
256 = 1.0. Each flit that leaves comes from a non-empty VC, so
`out_flits <= cand_vcs`. Both factors are therefore at most 1, and so is CM.
The result is registered: neighbours see a cycle's metric during the next
cycle. After reset the metric is 1.0.

Note the special case. A router with no flit in any buffer reports 1.0, the
largest possible value. The original algorithm defines it that way to avoid a
division by zero, and this design keeps it. As a result, an empty neighbour
looks *more* congested than a busy one that is draining well. Two routes
compare equal only when both neighbours have the same CM. That includes two
empty neighbours.

## The routing decision (`route_compute`)

The unit is combinational and is evaluated for the header flit at the head of
each idle input VC:

1. Destination is this router: local port.
2. Same column, or same row: go straight towards it (Y or X).
3. Otherwise compare the CM of the X neighbour and the Y neighbour towards the
   destination. Take Y only if its CM is strictly lower. A tie goes to X, so
   the choice is always deterministic.

Only shortest paths are used. If the header then fails VC allocation, the route
is computed again in the next cycle with the neighbours' new metrics. So a
header that is waiting can still switch direction.

**Deadlock avoidance (this design's choice).** Minimal adaptive routing with
wormhole switching can deadlock in a mesh. The routing unit therefore also
returns a VC mask that splits the Y channels into three classes:

| output port   | packet still has to go east | has to go west | already in the destination column |
|---------------|-----------------------------|----------------|-----------------------------------|
| north / south | VC 0 only                   | VC 1 only      | VC 2 only                         |
| east / west / local | any VC                | any VC         | any VC                            |

Eastbound packets use only east channels plus Y VC 0. Westbound packets use
only west channels plus Y VC 1. Neither set can hold a cyclic channel
dependency. Packets in their destination column only move straight in Y and
then leave the network, on Y VC 2.

Column-aligned packets must not share VC 0 or VC 1. An output VC is handed to
a new packet as soon as the previous tail has left. The new packet may then sit
in the downstream buffer behind that tail, and it waits for the packet ahead
of it. In a first version, column-aligned packets could take any Y VC. That
version deadlocked under heavy random traffic: four packets in a 2×2 square
each waited behind a packet of another class.

## Router microarchitecture (`noc_router`)

```
 in_link[p] ──► vc_fifo ×3 ──► route_compute ──► vc_allocator ──► (VC state)
                   │                                                  │
                   └──────────────► switch_allocator ◄── credits ◄────┘
                                         │
                                      crossbar ──► out_link[o] (registered)
 in_credit[p] ◄── one credit per popped flit (registered)
 CM ◄── congestion_metric(out grants, non-empty VCs, buffer occupancy)
```

* **Input ports.** Each of the 5 ports (local, north, east, south, west) has
  three `vc_fifo`s of 5 flits. There is one state record per input VC: an
  output VC is held, and which port and VC it is.
* **VC allocation.** Round-robin, one arbiter per output port over all 15
  input VCs. Each cycle, each output port grants at most one header its lowest
  free output VC that the VC mask allows. An output VC stays busy until its
  tail flit has been sent.
* **Switch allocation.** Separable and input-first, round-robin at both
  stages. Each input port nominates one of its VCs that holds an output VC, has
  a flit and has a credit for that VC. Each output port then picks one
  nominating input.
* **Flow control.** The router keeps one credit counter per output VC,
  starting at the buffer depth. A credit goes back upstream, one cycle later,
  for every flit popped from an input buffer.
* **Crossbar.** A multiplexer per output. Its outputs are registered onto
  `out_link`, which is the link to the neighbour.

**Timing, for a header that meets no contention:**

| cycle | what happens                                                                 |
|-------|------------------------------------------------------------------------------|
| t     | the flit is on `in_link`; it is written into its VC buffer at the clock edge |
| t+1   | route computation and VC allocation                                          |
| t+2   | switch allocation, crossbar; the flit is registered on `out_link`            |
| t+3   | the flit is on the link to the next router (that router's cycle t)           |

Body and tail flits need no allocation. They stream behind the header, one per
cycle. Per hop, the header therefore takes 3 cycles. The whole packet takes
3 + 4 cycles when it does not stall.

**Event flags.** `events` (type `router_events_t`) shows, for each cycle,
which mechanism acted. The testbenches count these flags:

- `adaptive`: a header with two productive directions won a VC.
- `chose_y`: that header took the Y direction.
- `cm_tie`: the two neighbour metrics were equal.
- `va_stall`: a header waited for a VC.
- `sa_conflict`: a ready flit lost switch allocation.
- `credit_stall`: a flit waited for a credit.
- `cm_idle`: the metric was forced to 1.0.

## Flits, links and credits (`noc_pkg`)

* `flit_t` = 2-bit type (`FT_HEAD`, `FT_BODY`, `FT_TAIL`) + 32-bit data.
* Every flit of a packet carries the same `head_payload_t`: destination x/y,
  source x/y (3 bits each) and a 20-bit tag. Only the head flit is used for
  routing. The copies in the other flits let the receiver check reassembly.
* `link_t` = {valid, VC number, flit}: one direction of a physical channel.
* `credit_t` = {valid, VC number}: one freed buffer slot.
* Ports are numbered `P_LOCAL=0, P_NORTH=1, P_EAST=2, P_SOUTH=3, P_WEST=4`.
  Node (x, y) is column x, row y. North is row y-1.

## Network interface (`network_interface`)

The core offers one packet at a time (`pkt_valid/pkt_ready`, destination and
tag). The interface sends 5 flits (head, 3 bodies, tail) into the router's
local input port. It picks the VC for the head round-robin among VCs with a
credit, and sends the rest of the packet on that VC as credits allow. With
credits available, the head is on the link at the clock edge after the one
that accepts the packet, and the other flits follow back to back.

On the ejection side it accepts every flit from the router's local output and
returns a credit one cycle later. It reassembles packets separately per VC,
because packets on different VCs may interleave there. After each tail it
pulses `rx_valid` with the source, tag, length and an error flag. The error
flag covers a missing head or flits whose tags disagree.

## The network (`noc_mesh`, top)

`noc_mesh` instantiates NX×NY (default 7×7) router/interface pairs. It wires
flits, credits and metrics between neighbours. Its ports are the cores' side
of all interfaces, as arrays indexed by `y*NX + x`, plus every router's CM and
event flags. Unused ports on the mesh border receive neither flits nor credits.
Missing neighbours report a metric of 1.0. The processing elements themselves
are not part of the design.

## Where this RTL departs from, or adds to, the original description

- **Buffer depth: 5 flits.** The set-up table gives 5. One sentence of the
  text says "a buffer of four flits where packet length is equal to buffer
  size". The packet length is 5, so 5 was used.
- **VCs per port: 3**, as in the set-up table. The router drawing shows 4 VC
  rows per buffer.
- **Uniform pattern.** It sends node (i, j) to (2i, 2j). For i or j ≥ 4 that
  address lies outside a 7×7 mesh. The testbench takes both coordinates
  modulo 7.
- **Own choices.** These are all this design's:
  - the pipeline and its 3-cycle per-hop latency;
  - the fixed-point format;
  - "X on a tie";
  - route recomputation while waiting for a VC;
  - the Y-channel VC classes;
  - the allocator structures;
  - the flit and header layout;
  - the interface handshakes;
  - asynchronous active-low reset.
- **Not in the hardware.** The evaluation statistics (throughput, latency,
  link usage, congested-node and congestion-occurrence rates) are
  measurements. They are not part of the network. The mesh testbench computes
  throughput and latency itself.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

| testbench              | checks |
|------------------------|--------|
| `tb_rr_arbiter`        | grant against a reference pointer model; alternation of two permanent requesters |
| `tb_vc_fifo`           | head, count, empty and full against a queue model, under random push/pop |
| `tb_congestion_metric` | CM against the three equations evaluated in floating point, the idle case, one-cycle latency |
| `tb_route_compute`     | all 7×7×7×7 position pairs against the routing rules, random and equal metrics, VC classes |
| `tb_vc_allocator`      | eligibility, lowest free VC, one grant per port, work conservation, round-robin |
| `tb_switch_allocator`  | legality of grants, crossbar select consistency, work conservation cases, round-robin |
| `tb_crossbar`          | every output against the selected input |
| `tb_network_interface` | flit order and payload, VC kept per packet, credits never exceeded, back-to-back timing, reassembly of interleaved packets |
| `tb_noc_router`        | 3-cycle header latency and 1 flit/cycle streaming; the output port chosen under three metric settings (including ties); VC classes; no interleaving on an output VC; no buffer overflow; every packet out exactly once; CM 1.0 when empty. Adaptive X and Y choices, ties, VC stalls, switch conflicts and credit stalls must all occur |
| `tb_noc_mesh`          | the full 7×7 network at default parameters: random traffic at PIR 0.3, the (2i, 2j) pattern at PIR 0.5, random at PIR 1.0, then drain. Every packet must reach its destination exactly once, complete and intact. Every mechanism above, plus the idle metric and a metric below 1.0, must occur |
| `tb_noc_workloads`     | the evaluation sweep on the full network: {random, (2i, 2j)} × PIR {0.3, 0.5, 1.0} × {300, 500} cycles, plus random at PIR 1.0 for 1000 cycles. The network is reset before each run. Throughput and latency are printed per run. After each run the network must drain with every packet delivered intact, and adaptive decisions must have occurred |

In a typical run of `tb_noc_mesh`, about 21,000 packets are created and all are
delivered. In `tb_noc_workloads` the network carries these loads, in flits
per node per cycle:

| pattern  | PIR 0.3 | PIR 0.5 | PIR 1.0 | window |
|----------|---------|---------|---------|--------|
| random   | 0.306   | 0.291   | 0.291   | 300    |
| random   | 0.305   | 0.287   | 0.299   | 500    |
| random   |         |         | 0.270   | 1000   |
| (2i, 2j) | 0.431   | 0.442   | 0.445   | 300    |
| (2i, 2j) | 0.447   | 0.444   | 0.454   | 500    |

Each interface injects at most one packet every 5 cycles, which is 1 flit per
cycle. Above a PIR of about 0.3 the sources create more than the network
accepts, and packets queue at the cores. Latency is counted from creation, so
it grows with the window length. The original evaluation reports, for both
patterns, 0.38 flits per node per cycle in its 300-cycle runs and 0.31 in its
500-cycle runs. For random traffic at PIR 1.0 over 1000 cycles it reports
about 0.31 (15,424 flits received). This design delivers 0.29 to 0.31 for random
traffic, 0.27 over 1000 cycles, and 0.43 to 0.45 for the (2i, 2j) pattern. Its routers take 3 cycles per hop for a
header. The timing of the original simulator is not known.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl rtl/noc_pkg.sv tb/tb_noc_mesh.sv \
          --top-module tb_noc_mesh -Mdir obj_mesh -j 8
./obj_mesh/Vtb_noc_mesh
```

Replace `tb_noc_mesh` with any other testbench name to run that test.
Verilator finds the modules through `-Irtl`, by file name. Building the 7×7
mesh takes about two minutes. `tb_noc_mesh` then runs for about 5 seconds
and `tb_noc_workloads` for under a minute.

## Changing the configuration

- **Mesh size and buffer depth.** These are module parameters: `NX`, `NY` and
  `DEPTH` of `noc_mesh`, and `DEPTH` of `noc_router` and
  `network_interface`. Coordinates are 3 bits wide, so meshes up to 8×8 need
  no other change.
- **Type-shaping constants.** These live in `noc_pkg`: VCs per port, data
  width, coordinate width, packet length and the CM fraction bits. The
  Y-channel VC classes use VCs 0, 1 and 2, so `NUM_VCS` must be at least 3.
