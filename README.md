# Lasio: a 3D-mesh network-on-chip with a central round-robin arbiter

Lasio is a three-dimensional mesh network-on-chip. Routers sit on an
X x Y x Z grid. Stacked 2D layers are joined by vertical links, which in
silicon are through-silicon vias. Each router has one processing element (PE)
attached, and the PE uses its router's coordinates as its address. Packets
travel by deterministic XYZ routing.

The interesting part is the router's arbitration. A router with one arbiter
per output port switches packets quickly, but it costs area and energy.
Lasio's router instead has **a single, central arbiter**. This arbiter is a
small finite state machine that serves the seven input ports one at a time.
Switching a packet takes it five cycles, and each failed attempt costs three.

The RTL can also lengthen that state machine on purpose, with extra states in
one of two places. This lets you measure how much slower arbitration costs in
end-to-end packet latency. The design was built to study exactly that trade:
a simpler, slower router against network latency.

## The network

* Addresses are `(x, y, z)`, with 4-bit fields, so each axis can hold up to 16
  routers. The default mesh is 4x4x4, which is 64 routers.
* Every router has seven structurally identical ports: Local, East, West,
  North, South, Top and Bottom. In this RTL, East and West are +x and -x,
  North and South are +y and -y, and Top and Bottom are +z and -z. The z links
  are the vertical links between layers, and here they are plain wires.
* Ports on the outer faces of the mesh are tied off. Nothing arrives on them,
  and XYZ routing never sends anything to them.
* XYZ routing works as follows. If x differs, go East or West. Otherwise, if y
  differs, go North or South. Otherwise, if z differs, go Top or Bottom.
  Otherwise, deliver on Local. Routing is deadlock-free on a mesh and never
  makes a U-turn.

### Links and packets

Each direction of a link is a `link_t` (`valid` plus a 16-bit flit), with a
`ready` running the other way. A flit moves in a cycle where `valid` and
`ready` are both high.

A packet is a sequence of flits:

| flit | contents |
|------|----------|
| 0 | header: destination x in [11:8], y in [7:4], z in [3:0] |
| 1 | size: the number of payload flits that follow |
| 2.. | payload |

The evaluated packet has 8 flits: a header, a size flit of 6, and 6 payload
flits. Any size from 2 flits up works. The size flit is how a router finds
the end of a packet. That framing is this design's own choice.

## The router

```
 in[7] --> [input buffer x7] --req/dst--> [switch control] --table--> [crossbar] --> out[7]
               ^   |  flits -------------------------------------------^   |
               |   +-- grant / eop <------------------------------------   |
           in_ready                                                    out_ready
```

* **Input buffer** (`lasio_input_buffer`, built around `lasio_fifo`). This is
  a BUF_DEPTH-flit FIFO, and its port is ready while the FIFO is not full.
  While an unswitched header sits at the head, it raises `req` and shows the
  destination. After `grant`, it offers its flits to the crossbar. It counts
  the packet through the size flit, and it raises `eop` in the cycle the last
  flit leaves.
* **Switch control** (`lasio_switch_control`). This is the central arbiter,
  described below. It owns the connection table, which records for each
  output whether it is busy and which input feeds it. The same table records
  for each input whether it is connected and which output it feeds.
* **Crossbar** (`lasio_crossbar`). These are combinational multiplexers
  steered by that table. An output shows its input's head flit. An input is
  popped when its output is ready.

Switching is wormhole: once a packet is connected, its flits stream through
at one flit per cycle while the next buffer has room. The output stays busy
until the packet's last flit has left. The release happens at `eop`,
independently of the state machine. Because ready comes from a FIFO fill
level and valid from a FIFO's emptiness, no combinational path crosses more
than one router.

### The central arbitration state machine

```
 reset -> S0 -> S1 --any req--> [#PSS extra] -> S2_ROUTE -> S2_CHECK --busy--> S1   (reswitch)
                ^                                             |
                |                                           free
                +-- [#PFS extra] <- S3_ACK <- S3_CONNECT <----+
```

| state | cycle's work |
|-------|--------------|
| S0 | runs once after reset: clears the connection table |
| S1 | waits for any request, then picks an input by round robin, starting after the port picked last (port order Local, E, W, N, S, Top, Bottom) |
| S2_ROUTE | computes the XYZ output port of the chosen header |
| S2_CHECK | if that output is busy, back to S1: a **reswitch**, so the packet tries again later and other inputs get their turn; otherwise on to S3 |
| S3_CONNECT | writes input -> output into the table and marks the output busy; flits can pass from now on |
| S3_ACK | pulses `grant` to the input, which frees its request; back to S1 |

Timing:

* Switching takes 5 cycles. A header that is at a buffer's head while the FSM
  is in S1 gets its grant in the fifth cycle.
* On an idle router, a header written into an input buffer at clock edge t
  leaves on the output link in cycle t+6.
* A reswitch costs 3 cycles: S1, S2_ROUTE and S2_CHECK.
* While one packet is being switched, every other request waits. Under load
  this serialisation is the router's bottleneck. Reswitches are the main
  reason latency grows with injection rate.

Two parameters add states to the FSM:

* `PSS_EXTRA` inserts that many wait states between S1 and S2. These are
  **#PSS**, the packet-switching stages. Every attempt pays for them, a
  reswitch included. A reswitch therefore costs 3 + PSS_EXTRA cycles.
* `PFS_EXTRA` inserts that many states after S3. These are **#PFS**, the
  packet-forwarding stages. Only a completed switch pays for them, because a
  reswitch does not go through S3.

At 0 and 0 you get the basic unit. The counter is 8 bits, so each parameter
can go up to 255.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `X_SIZE`, `Y_SIZE`, `Z_SIZE` | 4, 4, 4 | `lasio_noc` | mesh size; evaluated sizes are 4x4x4 and 2x2x2 |
| `BUF_DEPTH` | 8 | `lasio_noc`, `lasio_router` | input buffer depth in flits; evaluated depths are 8 and 16 |
| `PSS_EXTRA` | 0 | `lasio_noc`, `lasio_router`, `lasio_switch_control` | extra states between S1 and S2 |
| `PFS_EXTRA` | 0 | same | extra states after S3 |
| `FLIT_W` | 16 | `lasio_pkg` | flit width |
| `COORD_W` | 4 | `lasio_pkg` | bits per address coordinate |

The top module `lasio_noc` has these ports: `clk`, `rst_n` (synchronous,
active low), `pe_in[N]`, `pe_in_ready[N]`, `pe_out[N]` and `pe_out_ready[N]`.
The node index is n = (x*Y_SIZE + y)*Z_SIZE + z. The PEs themselves are not
part of the RTL: you attach your own to these ports.

## Files

| file | contents |
|------|----------|
| `rtl/lasio_pkg.sv` | port enum, address struct, `link_t`, header helpers |
| `rtl/lasio_fifo.sv` | flit FIFO |
| `rtl/lasio_input_buffer.sv` | input port: FIFO plus packet framing |
| `rtl/lasio_xyz_route.sv` | XYZ routing decision |
| `rtl/lasio_switch_control.sv` | central arbiter FSM and connection table |
| `rtl/lasio_crossbar.sv` | 7x7 switch |
| `rtl/lasio_router.sv` | router |
| `rtl/lasio_noc.sv` | 3D mesh (top) |
| `tb/tb_*.sv` | self-checking testbenches, one per block |
| `tb/lasio_pe_model.sv`, `tb/lasio_traffic.sv` | behavioural PEs running all-to-all traffic |
| `tb/lasio_router_monitor.sv`, `tb/lasio_noc_harness.sv` | mechanism counters and a parameterised mesh-plus-traffic harness |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself, with
a watchdog in case something hangs. To build and run one:

```
verilator --binary --timing --assert -Irtl -Itb rtl/lasio_pkg.sv \
    tb/tb_lasio_noc_full.sv --top-module tb_lasio_noc_full -Mdir obj -o sim
obj/sim
```

Use the same command for any `tb_*`. The full 4x4x4 testbench takes about
40 s to build and a fraction of a second to run.

### Traffic model

The testbench PEs run the all-to-all pattern. Every node sends one packet to
node 0, then one to node 1, and so on in node order, skipping itself. That
makes 56 packets on a 2x2x2 mesh and 4032 on a 4x4x4 mesh.

* **Creating packets.** A PE creates packets at an injection rate of R
  percent. An accumulator adds R every cycle, and each time it passes 100 a
  packet is created. At 32% that is about one packet every three cycles.
* **Sending.** Created packets queue in the PE and are sent as fast as the
  Local port accepts them.
* **Latency.** A packet's latency runs from its creation to the acceptance of
  its last flit at the destination. Queueing time in the source PE is
  included.
* **Checking received packets.** Each packet carries its source, its
  destination, its creation time and a check word. The receiving PE verifies
  all of them and confirms that each source arrives exactly once.

### What the testbenches establish

* `tb_lasio_xyz_route` checks all 4096 router/destination pairs of a 4x4x4
  mesh against a reference.
* `tb_lasio_switch_control` checks these timings:
  * a grant in cycle 5, or cycle 7 with two #PSS states;
  * a retry every 3 cycles while the output is busy, or every 5 with two
    #PSS states;
  * a grant after the holder's release;
  * round-robin order, with the second grant 5 cycles after the first, or 7
    with two #PFS states.
* `tb_lasio_router` checks a 6-cycle header latency through an idle router,
  packets that never interleave on a shared output, random back-pressure, and
  concurrent traffic.
* `tb_lasio_input_buffer` and `tb_lasio_crossbar` check framing, flow control
  and switching against references.
* `tb_lasio_noc` runs four 2x2x2 meshes side by side: basic, +2 #PSS, +2 #PFS,
  and basic with PEs that stall their inputs. It checks delivery and that the
  switch count equals packets plus link hops. It counts every mechanism:
  switches, reswitches, contention, full buffers, vertical hops, Local
  deliveries, and the #PSS and #PFS states. It also checks that #PSS costs
  more latency than basic, and #PFS at least as much.
* `tb_lasio_noc_full` runs the default 4x4x4 mesh through the complete 4032
  packet exchange at 8%.
* `tb_lasio_workloads` sweeps injection rates of 1, 2, 4, 8, 16, 32 and 64%,
  running them one after another. It uses eight meshes side by side:
  * 2x2x2 with 8-flit buffers, in basic, +5 #PSS and +5 #PFS versions;
  * 2x2x2 with 16-flit buffers, in the same three versions;
  * 4x4x4 with 8-flit and with 16-flit buffers, basic only.

  It takes about 3 minutes to build.

Average packet latency in cycles, all-to-all, from `tb_lasio_workloads`:

| rate | 2x2x2/8 basic | +5 #PSS | +5 #PFS | 2x2x2/16 basic | +5 #PSS | +5 #PFS | 4x4x4/8 basic | 4x4x4/16 basic |
|-----:|-----:|-----:|-----:|-----:|-----:|-----:|-----:|-----:|
| 1% | 45 | 70 | 54 | 45 | 70 | 54 | 929 | 888 |
| 2% | 47 | 100 | 67 | 46 | 87 | 66 | 1229 | 1130 |
| 4% | 62 | 138 | 114 | 59 | 121 | 96 | 1702 | 1473 |
| 8% | 89 | 179 | 135 | 74 | 136 | 116 | 2021 | 1892 |
| 16% | 107 | 198 | 153 | 93 | 155 | 135 | 2215 | 2086 |
| 32% | 117 | 208 | 163 | 103 | 165 | 144 | 2312 | 2183 |
| 64% | 121 | 212 | 167 | 107 | 169 | 148 | 2360 | 2231 |

The trends are the expected ones:

* Latency rises with injection rate.
* Deeper buffers help once the network is loaded.
* Extra switching states (#PSS) cost more than the same number of extra
  forwarding states (#PFS), because #PSS states are paid again on every
  reswitch.

The sweep also shows where this traffic model falls short. Created packets
queue without limit in the source PE, and a PE never has more than N-1
packets to send. So latency levels off at high rates instead of continuing
to climb. Absolute values depend on this injection discipline. Compare trends
between configurations, not absolute cycle counts.

## Where this RTL makes its own choices

The arbitration state machine and its timing are the reference behaviour:

* 2-cycle S2 and S3, 5 cycles to switch, 3 per reswitch;
* #PSS states before S2, #PFS states after S3;
* XYZ order, round-robin service, and the seven-port structure.

The following were not specified and were chosen here:

* the packet format (header layout and a size flit);
* the valid/ready link protocol;
* which compass port is which axis direction;
* round-robin port order;
* how S2 and S3 split their work between their two cycles;
* releasing an output at the last flit;
* the crossbar structure;
* synchronous active-low reset.

For the evaluated arbitration variants, "st+=1" through "st+=6", this RTL
takes st+=k as k-1 extra states over the basic unit. Set `PSS_EXTRA` or
`PFS_EXTRA` accordingly.

Only central arbitration is implemented. A router with one arbiter per
output port is the faster, larger alternative this design avoids, and it is
not included.

The processing elements and the through-silicon-via structures are not
modelled as hardware. The PE interface is brought out at the top, and the
vertical links are wires. Absolute latencies depend on the traffic model
above and on the chosen packet format. Expect trends, not cycle-exact
agreement with any other implementation.

## Synthesis

All RTL is synthesizable SystemVerilog. Memories are plain arrays, and each
input FIFO is a small register file. At the default size the mesh is 64
routers with 448 input buffers. One router synthesises to about 750
word-level cells, 281 flip-flop bits and 896 memory bits.
