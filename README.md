# Five-port store-and-forward NoC router with round-robin output arbitration

This is a packet router for a network on chip laid out as a 2-D mesh. It has
five ports: east, west, north, south and local (the attached core). Packets
of 1 to 15 flits of 8 bits (8 to 120 bits) arrive on any port and leave on the
port their header selects.

The central idea is simplicity. Each channel buffers a whole packet before
passing it on (store and forward), so no flit-level flow control crosses the
switch. Every port's input channel and output channel runs its own small FSM,
and a crossbar of plain multiplexers joins them. When several input channels
want the same output, that output's **round-robin arbiter** decides. The
requester just served drops to the lowest priority, so every requester is
served within five grants and none can starve.

## Structure

```
            +--------------+      +-----------+      +----------------+
 in_req --->| input_channel|----->|           |----->| output_channel |---> out_req
 in_ack <---|  FIFO 16x8   | req  |  crossbar |      |  rr_arbiter    |<--- out_ack
 in_data -->|  FSM, XY     |----->|  5 x 5:1  |----->|  FIFO 16x8     |---> out_data
            +--------------+      |  mux/demux|      |  FSM           |
                 x5               +-----------+      +----------------+  x5
```

| File | Role |
|---|---|
| `rtl/noc_pkg.sv` | flit width, FIFO depth, port enum, header struct, `route_xy()` |
| `rtl/flit_fifo.sv` | 16 x 8 synchronous FIFO, head visible without a read strobe |
| `rtl/rr_arbiter.sv` | N-way round-robin arbiter (pointer + scan) |
| `rtl/input_channel.sv` | receive FSM, FIFO, route decision, request to an output |
| `rtl/crossbar.sv` | per-output 5:1 multiplexers, plus demultiplexers for the read strobe and grant going back |
| `rtl/output_channel.sv` | arbiter, crossbar control, FIFO, send FSM |
| `rtl/noc_router.sv` | one router: five input channels, crossbar, five output channels |
| `rtl/noc_mesh.sv` | top: COLS x ROWS routers (default 3 x 3) joined as a 2-D mesh |

Port index: 0 east, 1 west, 2 north, 3 south, 4 local.

## The link handshake

The same req/ack/data link is used between neighbouring routers, and between
the router and its core:

* The sender raises `req` and puts the first flit on `data`.
* A receiver that is free raises `ack` on the next clock edge.
* One flit moves on every rising edge where `req` and `ack` are both high.
  The sender then puts up the next flit.
* After its last flit the sender drops `req`. The receiver then drops `ack`.
  The sender waits for `ack` to be low before it starts another packet.

The packet length is therefore set by how long `req` stays high. There is no
length field. A receiver that is busy simply keeps `ack` low, which is the
only back-pressure in the design.

## A packet's path through the router

1. **Receive.** The input channel (state IDLE) sees `req` and goes to RECV
   with `ack` high. It writes every flit into its FIFO. When `req` falls it
   reads the header at the FIFO head and works out the output port.
2. **Request.** In REQUEST the channel raises one bit of its one-hot `sw_req`,
   the bit for that output. It acknowledges no new packet until its FIFO is
   empty again.
3. **Arbitrate.** An output channel whose FIFO is empty (IDLE) runs its
   round-robin arbiter over the input channels that request it. It latches the
   winner as the 3-bit crossbar select and goes to XFER.
4. **Copy.** In XFER the crossbar passes the winner's FIFO head and empty flag
   to the output channel. The output channel pops the input FIFO and pushes its
   own FIFO once per cycle until the input FIFO is empty. The crossbar sends
   the pop strobe and the grant back only to the selected input. When the
   input FIFO runs empty the connection is released: the input channel returns
   to IDLE and the output channel goes to SEND.
5. **Send.** The output channel drives the link to the next router (SEND),
   and waits for its `ack` to fall (CLOSE). Its FIFO is then empty and it
   arbitrates again.

All five input channels and all five output channels work independently.
Up to five packets can cross the crossbar at once, and each output can be
sending one packet while its input side receives another.

### Timing

Through an idle router, with a neighbour that acknowledges at once, an L-flit
packet needs 3L+4 clock edges from the rising `req` to the edge that moves
its last flit out:

| Step | Edges |
|---|---|
| acknowledge | 1 |
| store in the input FIFO | L |
| request the output | 1 |
| win arbitration | 1 |
| copy through the crossbar, then see the input FIFO empty | L+1 |
| send | L |

So a 1-flit packet takes 7 edges and a 15-flit packet takes 49. Store and
forward caps the throughput of each port below one flit per cycle. A long
packet takes about 2L cycles of the output channel's time (copy plus send).
It also holds the input channel for L cycles of receiving plus the wait for a
grant and the copy.

## Round-robin arbitration

Each output channel holds an `rr_arbiter` with a priority pointer. The
pointer names the input with the highest priority. Priority then falls in
increasing port index, wrapping round (east, west, north, south, local,
east, ...). The grant is combinational and goes to the first input found
requesting from the pointer onwards. When the output channel takes the grant
(only in IDLE), the pointer moves to the input just after the winner. Two
results follow:

* the input just served has the lowest priority in the next round;
* an input that keeps requesting waits for at most four other packets on that
  output.

Reset gives east the highest priority. The arbiter is parameterised in N and
tested on its own against a reference pointer model.

## Routing and header format

The header is the first flit of every packet and is forwarded with it:

```
 7      4 3      0
+--------+--------+
| dst_y  | dst_x  |
+--------+--------+
```

Routing is dimension-ordered (XY). At router (X, Y), a packet goes east if
`dst_x > X`, west if `dst_x < X`, otherwise north if `dst_y > Y`, south if
`dst_y < Y`, and otherwise out of the local port. X grows towards east and Y
grows towards north. The router's coordinates are the parameters `X` and `Y`
of `noc_router` (4 bits each, default (1,1)). To change the header layout or
the routing, edit `route_xy()` in `noc_pkg.sv`.

## The mesh

`noc_mesh` places COLS x ROWS routers on a grid and gives router (x,y) the
coordinates X = x, Y = y. The default is 3 x 3, the smallest mesh whose
centre router uses all five ports. Links are joined as follows:

* The east output of (x,y) drives the west input of (x+1,y).
* The north output of (x,y) drives the south input of (x,y+1).
* In each link the acknowledge goes back the other way.

The local port of each router is the mesh's interface to its core. Node n =
y*COLS + x is on bit n of `in_req/in_ack/in_data` (core to network) and of
`out_req/out_ack/out_data` (network to core). Links on the boundary are tied
idle.

XY routing never sends a packet addressed inside the mesh across the
boundary. A header naming a node outside the mesh would wait forever at the
boundary, and an assertion reports it. The 4-bit header coordinates allow
meshes of up to 16 x 16.

Between routers the same handshake applies. An L-flit packet that crosses k
routers of an idle mesh, with an immediately acknowledging core at the end,
finishes k(2L+4)+L edges after its request. Each router needs 2L+4 edges to
acknowledge, store, request, win and copy before its own output raises `req`.

## Where this design departs from, or adds to, its source description

* **Header layout and XY routing** are this design's choice. The source says
  only that the control logic reads the header and chooses the output, and
  that in mesh-like networks a packet moves in one dimension at a time.
* **Crossbar width.** The source also gives 40-bit crossbar inputs. This
  crossbar is as wide as a flit (8 bits), because it joins 8-bit FIFOs. The
  width `W` is a parameter of `crossbar`.
* **Arbitration policy.** The source mentions an alternative: priority for
  packets that keep travelling in the same dimension. It is not built. The
  arbiters are plain round robin, the scheme the source describes and
  evaluates.
* **Cycle-level timing** of the handshake and both FSMs, the state names, the
  first-word fall-through FIFO and the asynchronous active-low reset are this
  design's choices. The source describes the sequence of events but not cycle
  timing.
* **Network.** The source evaluates its router on its own and in a network
  of routers, without giving the network's size or topology. The 2-D mesh,
  its 3 x 3 default, the node numbering and the idle boundary links are this
  design's choices.

## Resource use

Generic synthesis of `noc_router` gives about 970 word-level cells, 215
flip-flops and 10 x 128 = 1280 memory bits (the ten 16 x 8 FIFOs). The
3 x 3 mesh is nine of these (about 7700 cells, 1683 flip-flops and 8448
memory bits).
Arbitration is a small part of this. Each arbiter is a 3-bit pointer and a
5-way scan.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_flit_fifo` | 6000 random push/pop cycles against a queue model; reaches full and empty |
| `tb_rr_arbiter` | strict rotation with all requesting; random requests and accepts against a pointer model; a held request served within N grants |
| `tb_crossbar` | random matchings: forward data and empty, backward grant and pop strobe |
| `tb_input_channel` | 300 packets: acknowledge one cycle after the request, route for random headers (every port hit), flit data, back-pressure while busy |
| `tb_output_channel` | about 1000 packets from five source models: every grant against a round-robin reference, copy time L+1 cycles, packet contents in grant order, slow acknowledges |
| `tb_noc_router` | the full router at default parameters, described below |
| `tb_noc_mesh` | the 3 x 3 mesh at default parameters, described below |

`tb_noc_router` runs in two parts:

* Part 1 measures the 3L+4 latency through an idle router.
* Part 2 sends 1000 random packets from every port at once (1 to 15 flits,
  every destination) into receivers with random acknowledge delays. A
  scoreboard checks that every packet arrives intact and in order per
  source and destination. Every grant is checked against a round-robin
  reference.

Part 2 counts these events, and the test fails if any of them never happens:

* collisions at an output;
* back-pressure at an input;
* slow acknowledges;
* cycles with parallel crossbar connections;
* 1-flit packets and 15-flit packets.

`tb_noc_mesh` also runs in two parts:

* Part 1 checks the k(2L+4)+L latency on idle paths of 1 and 5 routers.
* Part 2 has all nine cores send 1000 packets each to random destinations.
  Each packet carries its source and a sequence number. Every packet must
  arrive at its own core, intact and in order per source. None may arrive
  faster than the idle-mesh latency for its path. Packets that waited for
  contention on the way are counted, and there must be some.

Assertions in the RTL check the handshake rules:

* no packet longer than 15 flits, and no FIFO overflow or underflow;
* link rules: a receiver drops `ack` on the edge after it sees `req` low, and
  an output channel raises a new `req` only after it has seen `ack` low;
* one-hot grants;
* no input connected to two outputs;
* an input FIFO is read only while it is granted;
* an output channel arbitrates only with an empty FIFO;
* no request leaves the mesh at its boundary.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/noc_pkg.sv -y rtl \
  tb/tb_noc_mesh.sv --top-module tb_noc_mesh
./obj_dir/Vtb_noc_mesh
```

Every module also lints cleanly as its own top (`verilator --lint-only
-Wall`), apart from Verilator's `SYNCASYNCNET` note. That note comes up
because the assertions sample `rst_n` synchronously while the flip-flops use
it as an asynchronous reset, which is intended.
