# Low-diameter on-chip network for a 16x16 manycore, built from one tiled hard macro

Large manycore chips, with hundreds to a thousand cores, are usually built by
designing one hard macro (a core plus its network router) and stamping it
across the die. That methodology has three constraints. Every macro must be
identical. All wires between macros must be short, reaching only the
neighbours. Closing timing on one macro must close timing for the whole chip.
Those rules seem to allow only a plain mesh, whose diameter grows with the
side of the array.

This RTL shows that a lower-diameter network fits the same rules. It uses two
techniques:

* **Ruche channels** give each router extra *far* ports that link it to the
  router R tiles away in the same row or column (R is the ruche factor). A
  flit that still has a long way to go skips R-1 routers per hop.
* **Concentration** lets 4 or 8 cores share one router. The router grid is
  then smaller, so fewer hops are needed.

The key point is that a far link need not be a long wire at chip level. Each
tile carries R-1 *feedthrough* lanes straight across itself. Between tiles
the lanes are crossed over, so a far link is built only from
neighbour-to-neighbour wires. The tiles stay identical.

The default build is the **mesh-c1r2** network for a 16x16 core array: 256
tiles, one core per router, ruche factor 2, and radix-9 routers. Parameters
select concentration 1, 4 or 8 and ruche factor 0 (plain mesh), 2 or 3. With
`TORUS = 1` the same top builds a **folded torus** (torus-c1r0, -c4r0 or -c8r0)
from a different, equally homogeneous macro.

## The hard macro and the lane cross-over

Each tile (`ocn_tile`) has 1+R lanes on each of its four edges, in each
direction:

| lane | name        | inside the tile                                      |
|------|-------------|------------------------------------------------------|
| 0    | near        | router port for the adjacent tile                    |
| 1    | far         | router ruche port                                    |
| 2..R | feedthrough | wire from this edge to the opposite edge; no router  |

Between adjacent tiles, output lane `j` of one tile drives input lane
`next_lane(j)` of its neighbour (`ocn_pkg::next_lane`):

* the near lane goes straight across: 0 -> 0;
* the ruche lanes rotate: 1 -> 2 -> ... -> R -> 1.

Follow a flit the router at column x sends east on its far port, with R = 2:

```
tile x      router EF out -> east lane 1 ──┐ cross-over
tile x+1                    west lane 2 <──┘ feedthrough -> east lane 2 ──┐
tile x+2    router WF in  <- west lane 1 <─────────────────────────────────┘
```

With R = 3 the flit passes through two feedthroughs (lanes 2, then 3) before
it returns to lane 1 at tile x+3. Westbound and vertical traffic use the same
rotation. Every tile therefore has the same netlist and the same pins. The
only wiring between tiles is a fixed permutation of pins that face each other.

At the chip edge, the lanes that have no neighbour are tied off. Their inputs
never carry a flit and their outputs are never ready. Routing never sends a
flit off the array.

A tile receives its own grid position on the `pos_x` and `pos_y` pins rather
than as parameters. This keeps the macro's netlist identical everywhere; the
top level ties those pins to constants.

## Router

`ocn_router` has `CONC + 4` ports, or `CONC + 8` with ruche channels, numbered
as follows:

* `0 .. CONC-1`: cores (terminals);
* `CONC .. CONC+3`: near N, S, E, W;
* `CONC+4 .. CONC+7`: far N, S, E, W.

North is increasing y and east is increasing x.

* **Input queues** (`ocn_fifo`): one 2-entry queue per input. A queue is ready
  whenever it is not full, so no ready signal passes through a router
  combinationally. The only wires that cross a tile boundary in one cycle are
  data and valid, plus the ready of the feedthrough wires.
* **Routing** (`ocn_route_compute`): dimension order, X then Y. In each
  dimension the flit takes the far port while at least R routers remain, then
  near hops for the rest. A distance d therefore costs floor(d/R) + (d mod R)
  hops, which is minimal. All hops in one dimension go the same way, and X
  comes before Y, so the routing is deadlock-free without virtual channels.
* **Switch allocation** (`ocn_rr_arbiter`): one round-robin arbiter per
  output. The priority moves past the winner only when its flit actually
  leaves.
* **Wormhole flow control**: a packet is a run of flits, and the last one is
  marked `last`. Once an output has sent a flit that is not `last`, it is
  locked to that input until the packet ends. Packets therefore never
  interleave.

### Flit

There is one flit type, `ocn_pkg::flit_t`, 64 bits wide:

| field     | bits | meaning                                  |
|-----------|------|------------------------------------------|
| `last`    | 1    | final flit of the packet                 |
| `dst_x`   | 4    | destination router column                |
| `dst_y`   | 4    | destination router row                   |
| `dst_t`   | 3    | destination core at that router          |
| `payload` | 52   | free                                     |

Every flit repeats the destination, so it can be routed on its own.

### Timing

All channels use a valid/ready handshake: a flit moves on a rising edge where
both are high.

A flit written into a router's input queue on edge t leaves through the
switch on edge t+1. That edge writes it into the next router's queue. A
channel costs no cycle, however many tiles it spans. A packet of L flits that
crosses H routers (source and destination included) is therefore fully
delivered L + H - 1 cycles after its first flit is injected. This is the
zero-load formula T = H·t_R + H_C·t_C + L/b with t_R = 1 cycle, t_C = 0 and
one flit per cycle. The testbenches check this cycle count exactly.

Examples for the default mesh-c1r2 network:

* corner to corner is 15 columns and 15 rows, each 7 far + 1 near hop, so
  H = 17;
* a 2-flit packet between the corners therefore takes 18 cycles.

A plain 16x16 mesh needs H = 31 for the same trip.

## Folded torus

A torus closes each row and column into a ring. To keep all wires short, the
ring is folded: going round the ring visits the tiles of a row in the order
0, 2, 4, ..., N-2, N-1, N-3, ..., 3, 1. Each link of the ring then spans two
tiles, so it is built exactly like a ruche link with R = 2.

The torus macro (`ocn_torus_tile`) has only two lanes per edge and direction:

| lane | name        | inside the tile                               |
|------|-------------|-----------------------------------------------|
| 0    | far         | router port                                   |
| 1    | feedthrough | wire from this edge to the opposite edge      |

Between neighbouring tiles, lane 0 goes to lane 1 and lane 1 to lane 0. At the
array edge the lanes are looped back into the same tile on the same side:
the far output enters the feedthrough input, and the feedthrough output enters
the far input. Those two loops are what turn each folded line into a ring.

On an even tile the ring's forward direction is east (or north); on an odd
tile it is west (or south). `ocn_torus_route` finds the ring place of the
current and destination tiles, goes the shorter way round (forward on a tie),
and routes X before Y.

Rings can deadlock under wormhole switching, so every torus channel carries
two virtual channels (VC). A packet starts on VC 0 and moves to VC 1 when it
crosses the dateline, the link from ring place N-1 back to place 0. It
returns to VC 0 when it turns from X to Y. Each VC has its own input queue and
its own ready wire. `ocn_torus_router` allocates the outputs per VC with
round-robin arbiters and wormhole locks, then one link arbiter per port picks
a VC that has both a flit and room downstream. Latency is the same as the
mesh: one cycle per router, none per channel.

## Concentration

With `CONC = 4`, each router serves a 2x2 block of cores and the router grid
is 8x8. With `CONC = 8`, each router serves a 4-wide by 2-high block and the
grid is 4 columns by 8 rows. Core `c` sits at:

* column `c % 16` and row `c / 16` of the core array;
* router `(column / cx, row / cy)` and terminal `(row % cy)·cx + column % cx`,
  where `(cx, cy)` is (1,1), (2,2) or (4,2) for concentration 1, 4 or 8.

## Top level and dummy cores

`ocn_top` places `RX x RY` tiles and wires neighbouring lanes as above. It
gives every core slot two sets of ports:

* external ports: `core_inj_*` (core to network) and `core_ej_*` (network to
  core), each an array indexed by core number;
* an `ocn_dummy_core`: an LFSR traffic source with random destinations, plus
  a sink that counts flits and packets, folds payloads into a signature, and
  flags a flit that reached the wrong core.

Dummy cores exist so that a network macro can be synthesized and placed
without the real cores, while keeping synthesis from removing unused router
logic. The `dummy_mode` input selects which set drives the network:

* `dummy_mode = 1`: the dummy cores inject, at `dummy_rate/256` packets per
  cycle per core. The external ports are idle: `core_inj_rdy` and
  `core_ej_val` are low.
* `dummy_mode = 0`: the external ports are connected and the dummy cores are
  silent.

Change `dummy_mode` only while the network is empty.

### Parameters of `ocn_top`

| parameter   | default | meaning                                         |
|-------------|---------|-------------------------------------------------|
| `CORES_X`   | 16      | core columns                                    |
| `CORES_Y`   | 16      | core rows                                       |
| `CONC`      | 1       | cores per router: 1, 4 or 8                     |
| `RUCHE`     | 2       | ruche factor: 0 (plain mesh), 2 or 3            |
| `TORUS`     | 0       | 1 builds the folded torus; `RUCHE` is ignored   |
| `BUF_DEPTH` | 2       | router input-queue depth                        |
| `PKT_LEN`   | 2       | flits per dummy-core packet                     |

The flit fields are sized for at most 16 router columns and rows and 8 cores
per router.

## How closely this follows the tiled-design approach, and where it is its own

Taken from the approach:

* the 16x16 core target;
* the mesh topologies with concentration 1, 4 and 8 and ruche factor 0, 2
  and 3, and the folded-torus topologies with concentration 1, 4 and 8;
* for the torus, one far lane and one feedthrough lane per dimension, and
  short wrap-around loops at the array edge;
* near, far and feedthrough channels in a single homogeneous macro;
* short cross-over wiring between neighbouring macros;
* dummy cores on the router's core ports;
* one cycle per router and none per long channel, following the zero-load
  latency model.

This design's own choices:

* which configuration is the default. Mesh-c1r2 was chosen because its
  physical design is the one worked out in most detail;
* the router's inside: 2-entry input queues, round-robin arbitration,
  wormhole switching, and dimension-ordered routing that takes far hops
  first;
* the 64-bit flit and its format. The approach sweeps 32- to 256-bit
  channels without fixing one;
* the lane numbering and, for R = 3, the order of the lane rotation;
* tile position supplied on pins;
* the contents of the dummy core and its runtime mux at the top;
* the torus ring order as read from the macro drawings, its routing, and the
  two dateline virtual channels with one ready wire each.

Not provided:

* **The cores** (in-order RV32IMAF with 4 KB instruction and data caches).
  They connect through the `core_inj_*` and `core_ej_*` ports.

Physical design is also outside the RTL: layer assignment, routing
blockages, and mapping timing constraints from chip level to macro level.

## Lint note

The feedthrough lanes are wires, and the edge channels are held in arrays.
Verilator's `UNOPTFLAT` warning therefore reports a loop through the
edge-channel arrays of `ocn_top`. This is an artefact of tracking whole
arrays. No real combinational loop exists: every router input ends in a queue
register, and a feedthrough chain always ends at a router or at a tied-off
edge.

## Files

* `rtl/ocn_pkg.sv`: flit type, port numbering, lane cross-over function.
* `rtl/ocn_fifo.sv`, `rtl/ocn_rr_arbiter.sv`, `rtl/ocn_route_compute.sv`:
  router parts.
* `rtl/ocn_router.sv`: the router.
* `rtl/ocn_tile.sv`: the hard macro.
* `rtl/ocn_dummy_core.sv`: dummy core.
* `rtl/ocn_torus_route.sv`, `rtl/ocn_torus_router.sv`, `rtl/ocn_torus_tile.sv`:
  torus routing, router and hard macro.
* `rtl/ocn_top.sv`: the tiled network.
* `tb/tb_<module>.sv`: a self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/ocn_top_harness.sv`: traffic harness used by `tb_ocn_top`. It runs
  mesh-c1r2, mesh-c4r3, mesh-c8r0, torus-c1 and torus-c4 on an 8x8 core
  array. For each it
  checks zero-load latency against L + H - 1, random all-to-all traffic with
  backpressure (delivery, order, packet integrity), and dummy-core traffic.
  It also counts far hops, feedthrough crossings, dateline crossings, stalls,
  shared-router injection and mode switches.
* `tb/tb_ocn_top_full.sv`: the same end-to-end test on the default 16x16
  mesh-c1r2 network, with no parameter overrides.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -j 4 --top-module tb_ocn_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/ocn_pkg.sv tb/tb_ocn_top.sv
./obj_dir/Vtb_ocn_top
```

Replace `tb_ocn_top` with any other testbench name. The 256-tile
`tb_ocn_top_full` takes a few minutes to compile and seconds to run.

To lint a module:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/ocn_pkg.sv rtl/ocn_top.sv --top-module ocn_top
```

To try another topology, override `CONC`, `RUCHE` and `TORUS` on `ocn_top`, or on
`ocn_top_harness` in `tb_ocn_top`.
