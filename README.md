# Reconfigurable rings for a mesh network-on-chip

A 2D mesh of routers is cheap to build, but a packet that crosses the chip
pays several router pipeline stages per hop. This design adds a second,
much simpler network beside the mesh: a set of bufferless rings that move a
flit one node per cycle. The rings are short and fixed when taken alone,
but at run time a horizontal and a vertical ring can be spliced together
into one long ring. Which rings are spliced follows the traffic: every
interval the hardware measures which ring pairs talk most, computes a new
matching, briefly drains the rings, flips the switches and rebuilds the
per-node routing tables. Packets that the rings cannot carry at the moment
go through the mesh as usual.

The RTL covers the ring side completely: the rings and their per-node
interfaces, the traffic monitor, the allocator and the reconfiguration
sequencer. The mesh routers and the cores are not included; the top level
exposes one injection and one ejection port per node towards the mesh
router, and one pair towards the core.

## Ring geometry

The network has N x N nodes, with node id `row * N + column`. Row 0 is the
top row. With R = N/2:

* Horizontal ring i links rows 2i and 2i+1. Clockwise, it runs east along
  row 2i, down at the east edge, west along row 2i+1 and up at the west edge.
* Vertical ring j links columns 2j and 2j+1. Clockwise, it runs north along
  column 2j, across the top, south along column 2j+1 and across the bottom.
* Every ring has two lanes, clockwise and anticlockwise. So every node has
  four ring inputs and four ring outputs, indexed `[ring H/V][dir CW/ACW]`.

Each uncombined ring has 2N nodes. A *reconfiguration point* (i, j) is the
2x2 block of nodes where horizontal ring i crosses vertical ring j (rows
2i..2i+1, columns 2j..2j+1). When a point is granted, each of its four
nodes swaps its H and V outputs, separately for both lanes. The two rings
then become one ring of 4(N-1) nodes that visits both, plus a 4-node loop
inside the block. The loop still works as a ring, because its nodes can
reach one another. A full matching, with one point per row and per column,
gives R long rings. `tb_ring_network` checks, for every permutation of a
6x6 network, that each node's ring has exactly 4(N-1) or 4 members.

## Per-node ring interface (`ring_interface`)

Each node registers its four ring inputs: that register is the one-cycle
hop. It then does the following:

1. **Ejection taps.** A flit whose destination is this node is taken off
   its lane into one of two one-packet ejection buffers, one for H and one
   for V. If the buffer is full, the flit is *deflected*: it stays on the
   ring and goes round again. If both lanes of a ring bring a flit for this
   node, the older one is taken.
2. **Probes.** A probe flit from another node is recorded in the routing
   table and forwarded with its hop count plus one. A node's own probe is
   dropped when it returns.
3. **Injection.** A new packet from the core looks up its destination in
   the routing table. It goes onto the ring when all of these hold:
   * the entry is valid;
   * the chosen output lane is not carrying a passing flit;
   * no reconfiguration is in progress.

   Otherwise it goes to the mesh router. The core is stalled only when the
   router refuses as well. Passing flits always have priority over injection.
4. **2x2 switch.** When the node lies in a granted point, the H and V
   outputs are swapped (`reconfig_switch`, one per lane direction).
5. **Ejection arbiter.** Three one-packet buffers share the node's single
   ejection link: H ring, V ring and mesh router. Normally the oldest
   packet goes first, using a 16-bit time stamp compared modulo 2^16. While
   the rings are being drained, the ring buffers have fixed priority over
   the router buffer, with H before V.

### Routing table (`routing_table`)

Each node holds 3 bits per destination: reachable, ring (H or V) and
direction (CW or ACW). The table is cleared in the switch cycle. In the
next cycle every node sends a probe on all four outputs. Probes move one
hop per cycle, so the first copy of a node's probe to arrive has come the
shorter way round. That copy is stored and later ones are ignored. The
stored direction is the opposite of the probe's direction. The stored ring
is the *injection lane before the switch*, which is the arrival ring XOR
the node's own switch setting. With this rule a reply retraces the probe's
path exactly, whatever the switch settings along it. When several probes
arrive in one cycle and want the same entry, the lower-numbered input wins.

## Choosing the rings (`flow_monitor`, `ring_allocator`)

`flow_monitor` counts every packet that is injected (ring or mesh). The
count f[i][j] goes up when the source is in horizontal ring i and the
destination is in vertical ring j. The counters are 16 bits and saturate.
At the end of each interval they are copied into a snapshot, which stays
stable while the allocator reads it.

`ring_allocator` is a greedy maximum-weight matching built as an iterative
separable allocator. It runs R iterations. Each iteration has two stages:

* every unmatched row requests its unmatched column with the largest f;
* every column grants the requesting row with the largest f.

Matched rows and columns drop out. After R iterations, every row and every
column is matched exactly once; assertions check this.

Both stages use `f_arbiter`, a chain of `f_comparator` cells, one per
point. Each cell passes the running maximum to the next one. A cell raises
its `d` flag when it is enabled and its f beats the maximum so far. The
last cell whose flag is set is the winner, so the earlier point wins a tie.
The chain also carries a "seen an enabled point" flag. Because of it, an
enabled point with zero traffic still wins when nothing else bids, which
keeps the matching complete. The maximum moves one cell per cycle.
So:

* one stage takes R cycles;
* one iteration takes 2R cycles;
* a whole allocation takes exactly 2R² cycles (32 for 8x8).

The allocator always runs all R iterations; it does not stop early once
everything is matched. The traffic example with
f = {1 8 9; 3 2 5; 6 7 4} gives points (0,2), (2,1), (1,0) and is
part of `tb_ring_allocator`.

## Reconfiguration sequence (`reconfig_ctrl`)

At the end of each INTERVAL (1000 cycles by default), the controller does
the following:

1. It takes a snapshot of the counters and starts the allocator one cycle
   later. Traffic keeps flowing during allocation.
2. When the allocator finishes, it compares the result with the current
   grant. If they are equal, the rings are *reused* and nothing else
   happens.
3. Otherwise it starts the update, which takes 8N-7 cycles:
   * **Drain**, 4(N-1) cycles. No ring injection. Flits in flight reach
     their destinations, because a combined ring is at most 4(N-1) hops
     long and ring packets have ejection priority.
   * **Switch**, 1 cycle. The new grant takes effect and all routing tables
     are cleared.
   * **Update**, 4(N-1) cycles. Probes go out in the first cycle and fill
     the tables. Ring injection resumes afterwards.

If any ring flit is deflected during the drain, the drain cannot be
trusted. The reconfiguration is then *abandoned*: the old grant and tables
stay, and the next interval tries again.

After reset, no point is granted and the tables are empty. So all traffic
uses the mesh until the first reconfiguration.

The top has assertions that the rings are empty in the switch cycle, that
the allocator is idle when it is started, and that the rings are empty
when the probes are sent.

## Packet format and interfaces

Types are in `rrnet_pkg`:

* `pkt_t` = {src 8, dst 8, ts 16, data 64}.
* A ring flit adds a valid bit, a probe bit and an 8-bit hop count.

Every packet is a single flit. All streaming ports use valid/ready. A
transfer happens on a clock edge where both are high.

| Port group | Direction | Purpose |
|---|---|---|
| `inj_valid/inj_dst/inj_data/inj_ready` | core → net | new packets; src and ts are filled in |
| `ej_valid/ej_pkt/ej_ready` | net → core | delivered packets |
| `rtr_inj_valid/rtr_inj_pkt/rtr_inj_ready` | net → mesh router | packets sent over the mesh |
| `rtr_ej_valid/rtr_ej_pkt/rtr_ej_ready` | mesh router → net | packets arriving from the mesh |
| `phase`, `grant` | out | current sequencer phase and switch settings |
| `ev_reconfig/ev_reuse/ev_abort/ev_ring_inj/ev_ring_ej/ev_deflect` | out | one-cycle event flags for counting |

All node ports are arrays indexed by node id. The reset `rst_n` is
asynchronous and active low.

### Latency

* Ring: a packet injected at cycle t reaches the destination's ejection
  buffer after `distance` hops, and the ejection link after `distance + 1`
  cycles.
* Allocation: 2R² cycles.
* Reconfiguration: 8N-7 cycles.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N` (top, network, interface) | 8 | mesh side; must be even. R = N/2 rings per direction |
| `INTERVAL` | 1000 | cycles between reconfiguration decisions |
| `F_W` | 16 | traffic-counter width |
| `NODE_W`, `TS_W`, `DATA_W`, `HOP_W` (package) | 8, 16, 64, 8 | id, time-stamp, payload and hop-count widths |

With `NODE_W = 8`, N can be at most 16. For N = 16, the counters of a
10000-cycle interval can saturate. Raise `F_W` if exact counts matter.

## Where this design makes its own choices

* **Single-flit packets.** Multi-flit packets are not supported. A longer
  message must be cut into single flits by the core. As a result, no
  injection-side packet buffer is needed.
* **Buffer size.** Each ejection buffer holds one flit.
* **Routing-table rule.** The table uses first-arrival-wins, not a
  comparison of the hop count against half the ring length. Because probes
  move at one hop per cycle, the two rules pick the same shortest
  direction, and this one does not need the ring length.
* **Probe directions.** Probes go out on both lanes of both rings of a
  node.
* **Drain priority.** H has priority over V, both during drain and when
  two packets have the same age.
* **Abandon rule.** An abandoned reconfiguration keeps the old grant and
  waits a full interval before trying again.
* **Allocator.** It always spends the full 2R² cycles, and zero-traffic
  points can win, so the matching is always complete.
* **Time stamps.** They come from a free-running 16-bit counter in the
  top.
* **Traffic counting.** Traffic is counted centrally, from every
  injection.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* The unit benches compare against reference models written in the bench.
  For example, `tb_ring_allocator` models the greedy matching in
  behavioural code for random traffic, and `tb_ring_network` computes
  ring membership and hop distances from the geometry.
* `tb_rrnet_top` runs a 4x4 network with INTERVAL = 400 through five
  intervals of shifted-permutation traffic. It checks that every packet is
  delivered once and intact, and it counts ring and mesh injections,
  deflections, drain-mode ejections, reconfigurations, reuses, abandoned
  reconfigurations and probe rounds. Each of these must occur at least
  once. The mesh is modelled in the bench as a fixed-delay channel.
* `tb_rrnet_top_full` runs the same scenario on the top with no parameter
  overrides (8x8, INTERVAL = 1000). It takes a few minutes to build and
  run with Verilator.
* `tb_rrnet_patterns` runs five synthetic patterns on the 4x4 network:
  uniform, shuffle, transpose, bit-reverse and hotspot (two hotspots that
  take 20% of the packets). Each pattern runs for three intervals at an
  injection rate of 0.08 packets per node per cycle. The bench checks
  delivery and every allocation. It prints the share of packets that
  each pattern sends over the rings and the mean latency. With a 12-cycle
  mesh model, the ring share is about 50% for uniform traffic and 70–80%
  for the others.

To run one bench with plain Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing -Wno-fatal --assert --top-module tb_rrnet_top \
  rtl/rrnet_pkg.sv rtl/f_comparator.sv rtl/f_arbiter.sv rtl/ring_allocator.sv \
  rtl/routing_table.sv rtl/reconfig_switch.sv rtl/ejection_arbiter.sv \
  rtl/ring_interface.sv rtl/ring_network.sv rtl/flow_monitor.sv \
  rtl/reconfig_ctrl.sv rtl/rrnet_top.sv tb/tb_rrnet_top.sv
./obj_dir/Vtb_rrnet_top
```

The package file must come first. A unit bench needs only the package, its
module and the modules below it.

## Not included

* The mesh routers. The baseline is a 5-port router with 8 virtual
  channels, 4-flit buffers, XY routing and 3-cycle latency.
* The cores, caches and directories.
* Multi-flit packets.
