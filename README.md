# Flexible router for a mesh network-on-chip

A conventional mesh router gives each input port one FIFO. When a packet
arrives at a port whose FIFO is full, the upstream router has to wait, even
if the FIFOs of the other input ports of the same router sit half empty.
That blocking spreads backwards and is where congestion starts.

The **Flexible router** keeps the same amount of buffering but lets the input
ports lend each other FIFO slots. When a packet meets a full FIFO, the port's
*FIFO Flexibility Controller* (FFC) looks for a not-full FIFO of another input
port of the same router and stores the packet there instead. Packets are
still forwarded from the head of whatever FIFO holds them, so no extra
buffers and no virtual channels are needed. The price is a small amount of
control logic and the fact that two packets of one flow, sitting in
different FIFOs, can leave a router in the wrong order.

This repository holds synthesizable SystemVerilog for the router and for a
5 x 5 mesh built from it, plus self-checking testbenches.

## The network

* 2-D mesh, `MESH_X` x `MESH_Y` routers (5 x 5 by default). Router (x, y)
  connects East to (x+1, y) and North to (x, y+1); node number
  `n = y * MESH_X + x`.
* Every router has five ports: East, West, North, South and Local. Local
  connects to the processing element's network interface.
* Routing is dimension-ordered XY: first along X to the destination column,
  then along Y, then out through Local.
* Switching is store-and-forward. A link is one packet wide, so a whole
  packet crosses a link in one cycle.

### Packet format (`noc_pkg::packet_t`, 76 bits)

| field     | bits | meaning                                  |
|-----------|------|------------------------------------------|
| `dst_x`   | 3    | destination column                       |
| `dst_y`   | 3    | destination row                          |
| `src_x`   | 3    | source column                            |
| `src_y`   | 3    | source row                               |
| `seq`     | 16   | sequence number at the source            |
| `tx_time` | 16   | cycle in which the packet was created    |
| `info`    | 32   | payload                                  |

The seven fields are the ones the router was designed around; the widths are
this implementation's choice (3-bit coordinates allow meshes up to 8 x 8).
Only `dst_x`/`dst_y` are looked at by the hardware.

### Link handshake

Every link, including the Local ones, uses the same two-wire protocol:

* the sender raises `req` and puts the packet on the data wires;
* it keeps both unchanged until the receiver answers with `gnt`;
* the packet moves at the clock edge of the cycle in which `req` and `gnt`
  are both high.

`gnt` is combinational from `req` and the receiver's registered state; `req`
never depends on `gnt` in the same cycle, so chaining routers creates no
combinational loop. Assertions in `output_port` and `ffc` check that a
request is held until granted.

## Inside the router

```
            flex requests between the four network input ports
        +-------------------------------------------------------+
        |                                                       |
 E in --+-> FFC_E -> FIFO_E -> route -> req_int --+             |
 W in --+-> FFC_W -> FIFO_W -> route -> req_int --+  5 output   |
 N in --+-> FFC_N -> FIFO_N -> route -> req_int --+--ports------+--> E W N S L out
 S in --+-> FFC_S -> FIFO_S -> route -> req_int --+ (round-robin
 L in -----> ctrl -> FIFO_L -> route -> req_int --+  arbiter + MUX)
```

* **Input ports E, W, N, S** (`flex_input_port`): FFC + FIFO of 5 packets +
  XY routing logic. The FIFO can be written by its own link and by the FFCs
  of the three other network ports.
* **Local input port** (`local_input_port`): a conventional input port: the
  controller grants whenever the FIFO has room. It neither lends nor borrows
  FIFO space. Its FIFO holds 8 packets.
* **Output ports** (`output_port`): a round-robin arbiter chooses one of the
  five FIFO heads that want this output, the output controller requests the
  downstream router, and on its grant the packet leaves and the chosen FIFO
  pops its head. Every FIFO can request every output, because a borrowed
  FIFO may hold packets for directions its own port would never see.

A packet written into a FIFO at one clock edge can leave the router at the
next one, so with free paths a packet advances one hop per cycle. From the
edge at which a processing element hands a packet to its router to the edge
at which the destination takes it, the zero-load latency is `hops + 1`
cycles.

## Which FIFO may hold which packet

If any FIFO could hold any packet, two neighbouring routers could each fill
their buffers with packets heading for the other and deadlock. The rule that
prevents it: a FIFO may only hold packets whose next direction is one that a
packet *entering through that FIFO's own port* could take under XY routing.

| FIFO of port | may hold packets going |
|--------------|------------------------|
| East         | West, North, South, Local |
| West         | East, North, South, Local |
| North        | South, Local           |
| South        | North, Local           |

So a packet arriving at East and heading West can only wait in the East
FIFO; one heading South may use the East, West or North FIFO. With this rule
the only turns any FIFO can produce are the four turns XY routing allows
(East/West into North/South), so by the turn-model argument the router
stays deadlock free under XY routing. The table is
`noc_pkg::buffer_accepts`; an assertion in `ffc` checks that no packet is
ever sent to a FIFO that may not hold it.

## The FIFO Flexibility Controller, cycle by cycle

The FFC (`ffc.sv`) is the heart of the design. It has two states.

**No FIFO chosen (normal case).** The upstream request goes to the port's
own FIFO in the same cycle; the FIFO's grant is passed back as `gnt_us`. As
long as the own FIFO has room this is exactly a conventional router: no
extra cycle.

**Contention.** If the own FIFO does not grant (it is full), the FFC looks at
the three other FIFOs, in the fixed order `other_port(PORT, 0..2)` (for East:
West, North, South), and picks the first that is not full and may hold the
packet's direction. The arriving packet's direction is computed at the port
input for exactly this purpose. The choice is registered.

**FIFO chosen.** In the next cycle the FFC requests the chosen FIFO. That
FIFO's grant goes straight back to the upstream router as `gnt_us`, and the
packet is written into it at that edge. Borrowing thus costs one cycle of
controller overhead compared with writing the own FIFO.

**Buffer-to-buffer retry.** A chosen FIFO may refuse: between the choice and
the request, other writers may have filled it. Two neighbouring routers can
even end up waiting for each other this way (packet P1 in router R1's FIFO
waits for a slot in R2's FIFO that is held by P2, which waits for the slot P1
occupies). The FFC never waits on a chosen FIFO: if it does not grant, the
choice is dropped at once and the search restarts from the own FIFO in the
following cycle. The events `ev_contention`, `ev_flex_store` and
`ev_b2b_retry` pulse for a cycle with contention, a packet stored in another
FIFO, and a dropped choice.

### Several writers per FIFO

A network FIFO (`packet_fifo.sv`) has four write requesters: its own link
(first) and the FFCs of the other three network ports (in the order
`other_port(PORT, 0..2)`). In one cycle it serves them in that order, each
as long as a slot is still free, so it can take up to four packets at once.
Free space is counted before the same cycle's read, so a write grant never
depends on the output side. `DEPTH` need not be a power of two (5 by
default).

## Out-of-order delivery

Two packets of one source/destination pair can end up in different FIFOs of
a router, and then the arbiters decide which one leaves first. The mesh
delivers every packet, but not always in order; a destination that needs
order has to reorder by `seq`. Nothing in this RTL reorders.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `noc_mesh` | `MESH_X`, `MESH_Y` | 5, 5 | mesh size (up to 8 x 8 with 3-bit coordinates) |
| `noc_mesh`, `flexible_router` | `DEPTH` | 5 | packets per E/W/N/S FIFO |
| `noc_mesh`, `flexible_router` | `LOCAL_DEPTH` | 8 | packets in the Local FIFO |
| `flexible_router` | `X`, `Y` | 0, 0 | router coordinates |
| `noc_pkg` | `COORD_W`, `SEQ_W`, `TIME_W`, `INFO_W` | 3, 16, 16, 32 | packet field widths |

At the defaults a router has 93 flip-flops of control and 28 packet slots
(2,128 bits of FIFO storage); the 5 x 5 mesh has 53,200 bits of FIFO storage.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv tb/tb_noc_mesh.sv \
          --top-module tb_noc_mesh -o sim
./obj_dir/sim
```

Replace `tb_noc_mesh` by any other testbench name. The testbenches are:

| testbench | what it shows |
|-----------|---------------|
| `tb_xy_route` | routing decision for every destination, three router positions |
| `tb_rr_arbiter` | grant order against a reference model; no starvation |
| `tb_packet_fifo` | four writers, one reader against a queue model |
| `tb_ffc` | East FFC against a cycle-level reference model, incl. retry |
| `tb_output_port` | held request, correct packet and grant, round-robin order, 1 packet/cycle |
| `tb_local_input_port` | grant when room, FIFO order, routing request |
| `tb_flex_input_port` | own vs. borrowed FIFO, write priority, legality of borrowed FIFO |
| `tb_flexible_router` | one router, all links driven: every packet delivered once and unchanged, 1-cycle latency, full rate, contention, borrowing and retry occur; directed: with the East FIFO full, a South-bound packet is taken by another FIFO exactly one cycle after its request and a West-bound one is refused |
| `tb_noc_mesh` | 5 x 5 mesh at default parameters: zero-load latency `hops+1`; 1,000 packets per node each of Hotspot, Uniform and Nearest-Neighbour traffic; scoreboard; every mechanism must occur; out-of-order histogram |
| `tb_noc_sweep` | average delay and throughput versus injection rate for the three traffic patterns |

Traffic patterns used by the mesh testbenches: *Hotspot*: 90 % of each
node's packets go to node (2,2), the rest uniformly to all other nodes;
*Uniform*: all other nodes equally likely; *Nearest-Neighbour*: one of the
up to four adjacent nodes. Gaps between a node's packets are uniformly
distributed. Each processing-element model keeps an unbounded queue of
generated packets in front of the Local port, so the offered load does not
depend on the Local FIFO size.

### What the mesh does

From `tb_noc_sweep` (packets delivered per node per cycle; delay counted
from creation, so it includes waiting in the source queue):

| pattern | offered load | average delay | accepted throughput |
|---------|--------------|---------------|---------------------|
| Hotspot | 0.01 / 0.04 / 0.05 / 0.08 | 4.7 / 6.4 / ~145 / ~890 | 0.009 / 0.037 / 0.046 / 0.046 |
| Uniform | 0.05 / 0.35 / 0.50 / 0.70 | 5.4 / 6.2 / 8.0 / ~45 | 0.047 / 0.33 / 0.47 / 0.51 |
| Nearest-Neighbour | 0.10 / 0.70 / 0.85 / 0.95 | 3.0 / 3.8 / ~16 / ~17 | 0.09 / 0.66 / 0.72-0.82 / 0.80 |

Each point uses 200 packets per node, so delays past saturation reflect a
short burst rather than a steady state. Hotspot saturates near 0.046
packets per node per cycle, Uniform between 0.5 and 0.7, Nearest-Neighbour
between 0.7 and 0.85.

The Hotspot limit is the hotspot's Local output: 24 sources x 90 % x rate
= 1 packet per cycle gives 0.046.

In `tb_noc_mesh`'s Hotspot phase (25,000 packets, offered load about twice
saturation, destinations granting 90 % of cycles) about 5 % of packets
arrive out of order, most of them overtaken by a single packet. The exact
figures depend on the load and the random seed.

## Choices made in this implementation

These points are not fixed by the architecture and were decided here:

* packet field widths, Y growing towards North, active-low asynchronous
  reset;
* the link handshake timing (transfer in the cycle of `req && gnt`);
* the Local input port is a conventional port outside the lending scheme,
  with a FIFO of 8 packets;
* the FFC tries its own FIFO first, then the other FIFOs in a fixed order,
  one at a time, with one cycle to choose; a refused choice is dropped after
  one cycle;
* the FIFO serves its own link first, then the other ports in a fixed order,
  and counts free space before the same cycle's read;
* output arbitration is round robin with the choice held until the
  downstream router grants;
* `ev` outputs for performance counting.

Not included: a reordering unit at the destination, and any network
interface or processing element (the testbenches model them).

## Files

`rtl/noc_pkg.sv` types and the buffer rule; `rtl/xy_route.sv`,
`rtl/rr_arbiter.sv`, `rtl/packet_fifo.sv`, `rtl/ffc.sv`,
`rtl/flex_input_port.sv`, `rtl/local_input_port.sv`, `rtl/output_port.sv`,
`rtl/flexible_router.sv`, `rtl/noc_mesh.sv` (top). Testbenches in `tb/`.
