# HRES: a network-on-chip router with a bufferless lane for hard real-time traffic

A multicore SoC that runs control loops next to ordinary software has two kinds of on-chip traffic. Hard
real-time messages must arrive within a fixed, known number of cycles. Everything else only wants good
throughput. In a conventional virtual-channel (VC) router both kinds wait in the same buffers and compete
in the same allocators, so a real-time flit's latency depends on the rest of the load.

The HRES (Hard Real-time Support) router keeps the conventional VC router for best-effort traffic and adds
a second datapath beside it for real-time traffic. That second path has no buffers and no arbitration. A
real-time flit enters the router and goes straight through a crossbar whose settings were fixed before the
application started. It leaves on the next clock edge, so every hop costs exactly one cycle, whatever the
best-effort load. Real-time routes are computed offline so that no two real-time flows ever use the same
link. Flits therefore never collide and are never dropped, and no acknowledgements or retransmissions are
needed. The only change to the buffered router is one extra condition in its switch allocator.

This repository holds synthesizable SystemVerilog for the router and for a 4x4 mesh of routers, with
self-checking testbenches for every module.

## The two datapaths inside one router

```
                 +--------------------- buffered (best-effort) path ----------------------+
 in_link[p] --+->| VC buffers -> RC (XY) -> VC allocation -> switch allocation -> crossbar |--+
              |  +---------------------------------------------^---------------------------+  |   +-----+
              |                                                | rt_busy[o]                   +-->| out |-> out_link[o]
              |  +------------------ real-time path -----------+---------------------------+      | mux |   (register)
              +->| five 5-to-1 multiplexers, selects from the guaranteed-service table     |----->|     |
                 +--------------------------------------------------------------------------+     +-----+
     service bit of the flit picks the path
```

Each flit carries one extra **service bit** (`flit_t.rt`). The input port looks at it when the flit
arrives:

* `rt = 1`: the flit is not written anywhere. It goes straight to the real-time crossbar in that cycle.
* `rt = 0`: the flit is written into the buffer of the VC named on the link. From there it follows the
  usual VC-router pipeline.

The two crossbars meet at a multiplexer in front of each output link register. A real-time flit always
wins that multiplexer. The switch allocator sees the real-time valid signal of every output in the same
cycle (`rt_busy`). It treats any buffered request for such an output as having lost allocation: the VC
asked and was not granted, so it stalls and tries again next cycle. The buffered flit stays in its buffer,
the real-time flit passes, and the two never collide. An assertion in `output_port` checks this.

### Real-time path and the guaranteed-service selector table

The real-time crossbar has one 5-to-1 multiplexer per output port. Its select lines come from the
**guaranteed-service selector table** (`gs_selector_table`). The table has one entry per output port: an
enable bit and the number of the input port to forward. Nothing arbitrates. If input *i*'s real-time flit
must go out on port *o*, entry *o* selects *i*, and the offline route computation has made sure that no
other flow uses output *o* of that router.

* **One-to-one** flows set one entry per router along the path.
* **One-to-many** (multicast) comes free: several entries of one router select the same input, and the
  flit is copied to all of them in the same cycle.
* **Many-to-one** is impossible by construction, because an entry names a single input.

A real-time flit that arrives on an input selected by no enabled entry is a configuration error and is
lost. The router flags it on `rt_unrouted`.

The table is written through `cfg_we / cfg_out_port / cfg_in_port / cfg_en`, one entry per cycle, before
the application runs. Writes to output numbers above 4 are ignored. Reset disables every entry.

Computing the routes is not part of the hardware. They come from an offline optimisation over the task
graph of the application. It has three conditions: every link carries at most one real-time flow; a flow
may be split over up to *k* paths; and each path must meet its flow's deadline at one cycle per hop. It
also limits the real-time share of each link so that best-effort traffic is not starved. Edge weights steer
it towards short paths or towards the centre of the mesh.

The table copies flits; it never alternates them between outputs. Every flit on an input goes to all the
outputs that select it. A flow split over several paths therefore needs its sub-flows to enter each router
through different inputs. The tables alone cannot split the flits of one injection port between two paths;
that would need a source that injects on more than one port, which this design does not have.

Because real-time flits take precedence, a link used by a real-time flow gives best-effort traffic only the
cycles in which no real-time flit is sent. Keeping that share reasonable is the job of the offline routing.

### Buffered path: a conventional input-queued VC router

Each input port has `NUM_VC` FIFOs of `BUF_DEPTH` flits. Each VC has a state machine (`input_port`):

| state       | what happens                                                                                       |
|-------------|----------------------------------------------------------------------------------------------------|
| `VC_IDLE`   | When a head flit reaches the front of the buffer, XY route computation runs (RC, 1 cycle).          |
| `VC_VA`     | Route known. The VC asks the VC allocator for a VC of its output port at the next hop.             |
| `VC_ACTIVE` | Output VC held. Each flit asks the switch allocator. A granted flit crosses the crossbar in that cycle. The tail flit returns the VC to `VC_IDLE`. |

* **VC allocation** (`vc_allocator`) keeps a busy bit per downstream VC of every output. Each output port
  grants at most one request per cycle. A round-robin arbiter picks the request, and the lowest free VC is
  given to it. The VC is freed when the packet's tail flit leaves the router.
* **Switch allocation** (`switch_allocator`) is separable and input-first. First, a round-robin arbiter at
  each input picks one VC among those that have a flit and a downstream credit. Then a round-robin arbiter
  at each output picks one input among those targeting it. Outputs that carry a real-time flit in this
  cycle grant nothing; `rt_block` reports each such lost request.
* **Flow control** is credit-based. `output_port` keeps a counter per downstream VC, starting at
  `BUF_DEPTH`. A credit goes back upstream one cycle after a flit leaves an input buffer. Real-time flits
  use no credits.
* **Route computation** (`route_compute`) is dimension-order XY routing, which is deadlock-free on a mesh.
  Any deadlock-free routing would do. Real-time flits never use it.

## Timing

| event                                                          | cycles                          |
|----------------------------------------------------------------|---------------------------------|
| real-time flit: input link to output link, per router           | 1 (always)                      |
| uncontended best-effort head flit: input link to output link    | 4 (buffer write + RC, VA, SA+ST) |
| following body/tail flits of the same packet                   | 1 per cycle                     |
| credit return after a flit leaves the input buffer              | 1                               |
| selector-table write takes effect                              | next cycle                      |

All outputs are registered. In a mesh, a real-time flit placed on a node's injection link appears on the
destination node's ejection link *R* cycles later, where *R* is the number of routers on its path
(source and destination routers included).

## Flit and link format (`hres_pkg`)

| field             | bits | meaning                                                     |
|-------------------|------|-------------------------------------------------------------|
| `flit.rt`         | 1    | service bit: 1 = hard real-time, 0 = best effort             |
| `flit.kind`       | 2    | head, body, tail, single (head and tail)                    |
| `flit.dst_x/dst_y`| 4+4  | destination coordinates (used from the head flit)           |
| `flit.payload`    | 36   | data                                                        |
| `link.vc`         | 3    | VC of the flit on this link (0 for real-time flits)         |
| `link.valid`      | 1    | flit present                                                |

Without the service bit the flit is 46 bits wide, the flit width of the network this router was sized for.
The split of those 46 bits into fields is this design's own choice. A credit (`credit_t`) is a valid bit
plus a VC number.

Ports are numbered 0 local, 1 north (y+1), 2 east (x+1), 3 south (y-1) and 4 west (x-1).

## The mesh (`hres_mesh`, the top)

`hres_mesh` instantiates `MESH_X x MESH_Y` routers (4x4 = 16 by default). Router (x, y) is node
`y*MESH_X + x`. Neighbours are joined by a link and a credit wire in each direction. Ports on the edge of
the mesh receive nothing. Each node's local port comes out as `local_in / local_in_credit` (injection) and
`local_out / local_out_credit` (ejection), to be connected to a processing element's network interface. An
interface must:

* send a best-effort packet's flits on one VC, in order, and only while it holds credits for that VC (8 per
  VC after reset);
* return one credit on `local_out_credit` for every best-effort flit it takes from `local_out`, and none for
  real-time flits;
* inject real-time flits (`rt = 1`) only in cycles when it sends no best-effort flit.

One configuration port writes the selector table of router `cfg_node`. `rt_block[n]` and `rt_unrouted[n]`
bring each router's status flags out.

### Example: programming a real-time route

Suppose a unicast flow runs from node 0 to node 15 (east along row 0, then north along column 3). It needs
one entry in each router on the path:

```
node 0 : out EAST  <- in LOCAL      node 7  : out NORTH <- in SOUTH
node 1 : out EAST  <- in WEST       node 11 : out NORTH <- in SOUTH
node 2 : out EAST  <- in WEST       node 15 : out LOCAL <- in SOUTH
node 3 : out NORTH <- in WEST
```

Its flits arrive 7 cycles after injection. To multicast from node 12 to nodes 13 and 8, set node 12's EAST
and SOUTH entries to LOCAL, node 13's LOCAL entry to WEST and node 8's LOCAL entry to NORTH.

## Parameters

| parameter    | default | where                                  | notes                                                  |
|--------------|---------|----------------------------------------|--------------------------------------------------------|
| `MESH_X`, `MESH_Y` | 4, 4 | `hres_mesh`                            | 16 nodes; the 4x4 shape is assumed                    |
| `NUM_VC`     | 2       | `hres_mesh`, `hres_router` and below   | 4 and 8 are also intended settings; the link's VC field holds up to 8 |
| `BUF_DEPTH`  | 8       | same                                   | flits per VC buffer, and credits per downstream VC     |
| `X_COORD`, `Y_COORD` | 0 | `hres_router`, `input_port`, `route_compute` | router position, set by the mesh             |
| `NUM_PORTS`  | 5       | `hres_pkg` (constant)                  | the real-time crossbar is five 5-to-1 multiplexers     |
| `BASE_FLIT_W`| 46      | `hres_pkg` (constant)                  | plus the service bit                                   |

## Module hierarchy

```
hres_mesh
└── hres_router (x MESH_X*MESH_Y)
    ├── input_port (x5)      service demultiplexer, VC state, RC
    │   ├── vc_buffer (x NUM_VC)
    │   └── route_compute (x NUM_VC)
    ├── vc_allocator         uses rr_arbiter
    ├── switch_allocator     uses rr_arbiter, with the real-time stall
    ├── be_crossbar          buffered 5x5 crossbar
    ├── gs_selector_table    guaranteed-service selector table
    ├── rt_crossbar          real-time 5x5 crossbar (five 5-to-1 multiplexers)
    └── output_port (x5)     output multiplexer, link register, credit counters
```

`hres_pkg` holds the shared types. `rr_arbiter` is a generic round-robin arbiter.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl rtl/hres_pkg.sv tb/tb_hres_mesh.sv --top-module tb_hres_mesh
./obj_dir/Vtb_hres_mesh
```

The sources of the other modules are found through `-Irtl`.

* `tb_hres_mesh` runs the full 4x4 mesh at its default parameters. All 16 nodes send 40 random
  best-effort packets of 1 to 4 flits each. A unicast real-time flow (node 0 to 15) and a multicast flow
  (node 12 to 13 and 8) run at the same time. One sink withholds credits for a while. The test checks:
  - every packet arrives whole, in order, at the right node;
  - every real-time flit arrives exactly *R* cycles after injection;
  - switch requests lost to real-time flits and credit exhaustion both occur.
  It runs in well under a second.
* `tb_hres_mesh_vcs` runs the same scenario, with random VC choice, on a 4-VC mesh and an 8-VC mesh side
  by side. It shows that the other VC configurations need only the `NUM_VC` parameter.
* `tb_hres_mesh_load` runs the scenario on three default meshes side by side, at three best-effort
  loads. Idle sources start a packet with probability 5 %, 30 % or 100 % per cycle. Real-time flits must
  keep their exact latency at every load, and mean best-effort packet latency must rise with the load. In
  one run it rose from about 24 to 37 to 51 cycles; these means include the deliberately slow sink.
* `tb_hres_router` runs a similar scenario on a single router with all five ports driven. It also checks the 4-cycle uncontended latency of
  the buffered path.
* The unit testbenches compare each block against an independent model under random stimulus.

## Where this design makes its own choices

The router's architecture comes from its original description:

* the service bit in the flit;
* two crossbars, with the real-time one bufferless and driven by a programmable selector table of five
  5-to-1 multiplexers;
* the output multiplexer;
* a switch allocator that stalls a VC when its request loses, *or* when a real-time flit is assigned to
  its output;
* one-to-one and one-to-many real-time transfers;
* the 4-stage RC/VA/SA/ST buffered pipeline, 46-bit flits, 8-flit VC buffers, 2/4/8 VCs and a 16-node 2D
  mesh.

The following are this implementation's choices, because the original does not fix them:

* the field layout of the flit, the 3-bit VC field beside it on the link, and the port numbering;
* the cycle budget: RC, VA and SA take one cycle each, switch traversal ends in the output link register,
  and the real-time path is one cycle from input link to output link;
* credit-based flow control with a one-cycle credit return;
* separable round-robin allocators, lowest-free-VC choice, and freeing an output VC when the tail flit
  leaves;
* XY routing for best-effort traffic. The router only needs some deadlock-free routing for that traffic;
  the offline table routing is for real-time flows only;
* the configuration port of the selector table, the reset behaviour (everything cleared, table disabled)
  and the `rt_block` / `rt_unrouted` status outputs;
* the 4x4 arrangement of the 16 nodes, and tied-off edge ports.

Not included:

* the offline route optimiser, which is software;
* processing elements and network interfaces, which the testbenches model;
* the option of switching the buffered datapath off to save power when there is little traffic. It was
  only suggested, never specified.

The router's pin count (about 560 signals at 2 VCs) differs from that of the original implementation. The
flit and credit encodings here are this design's own.
