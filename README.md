# A reusable wormhole router and three networks-on-chip built from it

This design uses one parameterized on-chip router and one network interface
to build three networks. No net is shared between them:

- a **star network** for a Motion-JPEG encoder (one 5-port router, five cores);
- a **two-router network** for an MPEG-2 encoder (seven cores, or eight with a
  second motion estimator);
- a **4x4 mesh** with two **application-specific long-range links**. The
  routers of the nodes that hold a link get a sixth port.

The only parts that change from network to network are the router's port
count, the contents of its routing table and the wiring between routers. The
router itself is never changed. The encoders' processing cores (DCT,
quantization, VLE, motion estimation and the rest) are not part of this RTL.
Each core position is a network-interface port on the top level, so cores or
traffic generators are attached from outside.

Top level: `noc_prototypes_top` puts the three networks side by side. Each
network has its own port group: `mj_*` for the MJPEG star, `mp_*` for MPEG-2
and `ms_*` for the mesh.

## The router

`noc_router` has `NUM_PORTS` ports, which may be 3 to 6. Its buffers sit at the
outputs, and it uses wormhole flow control. Each port has three parts:

- an input control (`noc_input_ctrl`);
- a routing-table read port (`noc_route_table`, with one table shared by all
  inputs);
- an output control (`noc_output_ctrl`). This holds an arbiter, a multiplexer,
  a stage register and the output FIFO (`noc_fifo`).

### Four pipeline stages

| Stage | Where | What happens |
|---|---|---|
| 1 | input control | The flit from the link is captured in the input register. |
| 2 | input control + table | For a header, the destination field indexes the routing table. The input control then holds a request (flit, output port, "is header") in its request register. A body flit inherits the port of its packet. |
| 3 | output control | When an output port is free, it grants one requesting header in round-robin order. The grant stays with that input until the packet's last flit. The winner's flit passes the multiplexer into the stage register. |
| 4 | output control | The stage register is written into the output FIFO. The FIFO's head drives the outgoing link. |

If the header meets no contention, it appears on the output link **4 cycles**
after it is taken from the input link. Body flits follow at one per cycle.
Every stage can stall. A stage register only moves when the one after it
frees up. The output FIFO's `full` flag is a register, so it is known before
the cycle starts.

The hardest point is how ready signals are kept from forming combinational
loops. No link's `ready` depends combinationally on the `ready` of a link
further downstream. An input's `in_ready` is computed only from that router's
own pipeline registers and the registered `full` flags of its output FIFOs.
Because of this, rings of routers (the mesh, and the R1↔R2 channel of the
MPEG-2 network) contain no combinational loops. The price is that a stage decides on flow
control from state one cycle old, so a nearly full buffer can hold back a flit
for a cycle that it could have taken; the pipeline still moves one flit per
cycle when nothing is full.

### Wormhole and packet framing

A packet starts with a 16-bit header:

| Bits | Field |
|---|---|
| [15:8] | total packet length in flits, header included (1 to 255) |
| [7:0] | destination node number |

There are no separate head or tail wires. Each input control counts the
packet's flits down from the length field, so it knows which flit is the
tail. The grant of stage 3 is held until that flit passes. As a result,
packets on one output link never interleave. A packet that is blocked holds
its path through every router it has already entered. That is ordinary
wormhole behaviour. The buffer space needed is only the output FIFOs
(`DEPTH` flits of `FLIT_W` bits each).

### Links

Every link, including the local port, is a `valid`/`flit`/`ready` handshake.
A flit moves in a cycle where both `valid` and `ready` are high. The
assertions in the RTL check three rules:

- a request in the pipeline stays stable until it is accepted;
- an output FIFO is never written when full, and never read when empty;
- a packet's first flit on a port is always its header.

### Routing table

Each router holds a table that maps the destination node to an output port
(`NUM_NODES` entries of 3 bits each). Routing is therefore deterministic, and
it changes only when the table is changed.

- The table loads its `ROUTE_INIT` parameter at reset. The network that
  contains the router computes this parameter at elaboration.
- Each network has a write port (`cfg_we`, node or router select, `cfg_dest`,
  `cfg_port`) that rewrites single entries while the network runs.
- A destination outside the table goes to port 0, the local port.

## Network interface

`noc_ni` connects a core to a router's local port. It adds no register and no
latency.

To send, the core presents the first word of a packet together with
`tx_dest` and `tx_len`, the number of body words (1 to 254). The interface
first sends the header, with length = `tx_len + 1`, without taking the word.
It then passes `tx_len` words through as body flits, and `tx_ready` shows
which word was taken.

On the receive side, the interface swallows the header. It delivers the body
on `rx_valid`/`rx_data`, with `rx_first` and `rx_last` marking the packet's
first and last word. Holding `rx_ready` low stalls the router's output FIFO.

## The three networks

### MJPEG star (`mjpeg_noc`)

There is one 5-port router, R1. Its port *p* is node *p*:

| Node | Core |
|---|---|
| 0 | input buffer |
| 1 | DCT |
| 2 | zigzag and quantization |
| 3 | VLE |
| 4 | output image |

Every destination routes to the port of the same number. The defaults are
16-bit flits and 16-flit buffers. A block of 8x8 pixels of 16 bits each
travels as a packet of one header and 64 body flits.

### MPEG-2 (`mpeg2_noc`)

There are two routers, joined by one bidirectional channel.

| Node | Router.port | Core |
|---|---|---|
| 0 | R1.0 | input buffer |
| 1 | R1.1 | DCT and quantization |
| 2 | R1.2 | motion estimation |
| 3 | R1.3 | frame buffer |
| 4 | R2.0 | inverse quantization and IDCT |
| 5 | R2.1 | VLE and output buffer |
| 6 | R2.2 | motion compensation |
| 7 (only with `NUM_ME = 2`) | R2.4 | second motion estimator |

R1 has 5 ports, and its port 4 goes to R2. R2 has port 3 going to R1, so it
has 4 ports, or 5 when `NUM_ME = 2`. Each router sends a packet for one of
its own nodes to that node's port, and every other packet over the channel.
`NUM_ME` selects between the single-estimator network (default) and the
two-estimator network.

### 4x4 mesh with long-range links (`mesh_noc`)

Nodes are numbered row by row, with node 0 at the north-west corner. Each
router has the local port plus one port per existing neighbour, so ports are
used only where needed:

- corner routers have 3 ports, edge routers 4 and inner routers 5;
- a node that holds a long-range link has one more port (4, 5 or 6).

Ports are numbered local, N, E, S, W, then the long-range link, with missing
directions skipped. The link list is a parameter (`NUM_LRL`, `LRL_A`,
`LRL_B`). The default list has two links: 5-15 and 9-3. `NUM_LRL = 0` gives
the plain mesh.

Routing is computed per node at elaboration:

- A packet leaves over the node's link if the link's far end is more than
  one mesh hop nearer the destination than the node itself.
- Otherwise it goes X first, then Y.

A packet never takes a link back, because that would need the opposite
inequality. On an idle network, the first body word reaches the destination
core 4·R + 1 cycles after the source interface sends the header, where R is
the number of routers on the path.

**Caveat:** dimension-ordered routing alone is deadlock-free, but mixing it
with the links has not been proven deadlock-free. Every load simulated here
completed. A different link set, or heavier traffic, should be checked
before it is relied on.

## What is from the source design and what is not

These points follow the source design:

- output buffers;
- wormhole flow control;
- four pipeline stages with a 4-cycle header latency;
- packets of 1 to 255 flits;
- parameterized buffer depth and width;
- a routing lookup table;
- 3- to 6-port routers;
- simple wrappers that packetize and depacketize;
- the star of five cores;
- the two-router MPEG-2 network, and its variant with two motion estimators;
- a 4x4 mesh whose linked nodes get 6-port routers;
- 16-bit flits and 16-flit buffers in the MJPEG network.

These are this design's own choices, because the source does not give them:

- the header layout;
- the handshake, and ready signals that do not depend on downstream ready;
- round-robin arbitration with the grant held until the tail;
- the depth of the MPEG-2 and mesh buffers (16, the same as in MJPEG);
- the node numbering in the star and MPEG-2 networks;
- **which mesh nodes are linked** (the source only says the links are
  chosen for the application);
- the routing rule with links;
- the run-time table write port;
- the network interface's core-side protocol.

The source used a vendor FIFO for the output buffers. Here it is a small
register-array FIFO with first-word fall-through.

Not included:

- the encoder cores;
- the image memories;
- the host and external memory;
- the source's mixed-clock (GALS) version, which it describes only as
  planned work.

Area, power and clock frequency depend on the FPGA and on a 90-nm library
that were not used here.

## Measured behaviour

All figures are from simulations at the default sizes, with the testbenches
named in the table.

| Property | Result | Testbench |
|---|---|---|
| Header latency through one router, all 25 port pairs of a 5-port router | 4 cycles | `tb_noc_router` |
| Zero-load latency, all 240 source–destination pairs of the mesh | 4·R + body length cycles, header to last word | `tb_mesh_noc` |
| MJPEG star, 20 blocks of 65 flits streamed along the chain | 1305 cycles, close to one flit per cycle per link | `tb_mjpeg_noc` |
| One 352x288 4:2:0 frame (2376 blocks) through all four hops of the MJPEG chain at once, cores forwarding without delay | 156,834 cycles, 637 frames/s at 100 MHz, within the 171,585-cycle budget of 582.8 frames/s | `tb_mjpeg_frame` |
| Mesh, each of 16 nodes sends 50 packets of 32 flits, as fast as accepted ("bursty") | 3245 cycles with links, 3343 without | `tb_mesh_workloads` |
| Same job, one packet per node every 150 cycles | 7486 cycles with links and without | `tb_mesh_workloads` |
| Hotspot traffic, average latency vs injection rate (node 15 gets 25% of packets, 9-flit packets) | 3–5% lower with links below saturation; both saturate between 0.36 and 0.44 packets/cycle offered to the whole network | `tb_mesh_workloads` |

For comparison, the source reports these job times:

- bursty job: 3,416 cycles with its links and 5,120 without;
- constant-rate job: 7,674 and 7,694 cycles.

In the hotspot sweep both networks saturate at the same load for a plain
reason: at 0.44 packets/cycle over the network (one per node every 36 cycles),
9 flits each and a quarter of them for node 15, the hotspot alone must absorb
one flit per cycle, the capacity of its delivery link. No long-range link
raises that limit, so the source's 11% gain in critical load must come from a
hotspot pattern it does not give.

For the bursty job, the source's traffic destinations and link positions are not known. Here, traffic is
uniform random and the links are this design's own, so these results match its
constant-rate figure but do not reproduce its large gain in the bursty job.

A 100 MHz clock gives one flit per cycle per link. A CIF 4:2:0 frame has 2376
blocks of 65 flits. At 582.8 frames/s that needs about 90% of one link. The
frame test shows the star sustains this on every hop of the chain at once;
it models the cores as taking no time, so it bounds what the network allows,
not what the encoder achieves.

## Files

- `rtl/noc_pkg.sv`: widths, header helpers and the star routing table.
- `rtl/noc_fifo.sv`, `noc_route_table.sv`, `noc_input_ctrl.sv`,
  `noc_output_ctrl.sv`, `noc_router.sv`: the router.
- `rtl/noc_ni.sv`: the network interface.
- `rtl/mjpeg_noc.sv`, `rtl/mpeg2_noc.sv`, `rtl/mesh_noc.sv`: the three
  networks.
- `rtl/noc_prototypes_top.sv`: all three side by side.
- `tb/tb_<module>.sv`: a self-checking testbench per module.
  `tb/tb_noc_prototypes_top.sv` runs the whole top level at its default size.
  `tb/tb_mpeg2_noc_two_me.sv` tests the two-estimator network, and
  `tb/tb_mesh_workloads.sv` compares the mesh with and without links, and
  `tb/tb_mjpeg_frame.sv` streams a full frame through the MJPEG star.
- `tb/tb_core_agent.sv` is a traffic source and sink used by the network
  testbenches. It stamps every packet with its source, sequence number and
  send time, and checks each received packet for:
  - the right destination;
  - complete contents;
  - order per source.

## Simulating

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>`. Each one
has a watchdog that counts a failure if the run hangs. To build and run one
with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/noc_pkg.sv tb/tb_mesh_noc.sv --top-module tb_mesh_noc -y rtl -y tb \
  -Mdir obj_mesh -o sim
./obj_mesh/sim
```

To run a different testbench, swap in its name. To change a network, set its
parameters on the instance:

- `NUM_LRL`, `LRL_A`, `LRL_B` choose the mesh's links;
- `NUM_ME` chooses the number of motion estimators in the MPEG-2 network;
- `DEPTH` and `FLIT_W` set the buffer size.
