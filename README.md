# Wormhole router and 2-D mesh with two virtual lanes per channel

This is a synthesizable SystemVerilog model of a deterministic, dimension-order
wormhole router for a two-dimensional mesh, with two virtual lanes on every
physical channel, and of a K x K mesh built from it. The router follows the
*canonical wormhole router* organisation used in the paper "Testing a K-ary
N-cube Interconnection Network" (Kumarasamy, Gupta, Breuer): every input lane
has an external flow controller (XFC), an internal flow controller (IFC) and an
address decoder (AD); each dimension has a routing decision block (RD) and a
crossbar (CB); each output channel has a virtual channel controller (VC).
Comments in the RTL call this organisation the *reference architecture*. That
paper is about testing such routers with functional tests. Its tests
(non-blocking, blocking, arbitration, allocation, virtual-channel and
whole-network tests) are what the test benches here apply to the RTL.

Everything the paper leaves open was decided here: flit format, widths, buffer
depths, the link handshake, priorities and reset. Those choices are listed in
[Where this model goes beyond the source](#where-this-model-goes-beyond-the-source).

## Structure

```
mesh_net                    K x K mesh, one-stage pipelined links, edge links as ports
 ├─ link_pipe               one register stage per link direction
 └─ router                  one node
     ├─ router_dim (x)      inputs fromPE1, fromPE2, Xp(2 lanes), Xn(2 lanes)
     │                      outputs Xp, Xn (via VC), xtoy1, xtoy2
     ├─ router_dim (y)      inputs xtoy1, xtoy2, Yp(2), Yn(2)
     │                      outputs Yp, Yn (via VC), toPE1, toPE2
     └─ out_buf x2          "B" buffers in front of toPE1, toPE2

router_dim                  one dimension section
 ├─ xfc    x6               input buffer + stop/empty per input lane
 ├─ ifc    x6               one-flit stage, header update, tail detection
 ├─ addr_dec x6             header decode, request generation
 ├─ route_dec               arbitration, lane allocation, connections, lane status, acks
 ├─ crossbar                6 input lanes -> 6 output lanes
 └─ vc_ctrl x2              lane multiplexing onto the Xp/Xn (or Yp/Yn) link
router_pkg                  flit, header and link types, lane numbering
```

A packet is routed completely in x first, then in y. The x section sends it
on along Xp or Xn while its x hop count is non-zero. Once the count is zero it
sends the packet down one of the two internal channels xtoy1/xtoy2 into the y
section. The y section does the same with the y hop count. When that count is
zero too, the packet leaves through an output buffer to one of the processing
element's ejection channels, toPE1 or toPE2.

## Flits, headers and relative addresses

A flit is 18 bits: `head`, `tail` and a 16-bit payload (`flit_t`). A packet is
a header flit, any number of data flits and a tail flit. A single flit may be
both head and tail. In a header the payload is an `hdr_t`:

| bits  | field   | meaning                                           |
|-------|---------|---------------------------------------------------|
| 15    | `xdir`  | 0: travel toward +x (Xp), 1: toward -x (Xn)       |
| 14:9  | `xhops` | x hops still to go, 0..63                         |
| 8     | `ydir`  | 0: toward +y (Yp), 1: toward -y (Yn)              |
| 7:2   | `yhops` | y hops still to go, 0..63                         |
| 1:0   | `spare` | carried unchanged (the test benches use it as a tag) |

Addresses are relative. A header leaving a section along its dimension has
that dimension's hop count reduced by one, so a packet injected with
`xhops = 2, yhops = 1` leaves the network at the node two columns and one row
away. The decrement is applied by the IFC as the header leaves it. The AD
decodes the stored, not yet updated value: a hop count of zero means "turn" in
the x section and "deliver" in the y section.

Channel names follow the direction of travel. Xp carries packets moving toward
+x, so a router's Xp input is driven by its west neighbour's Xp output.

## Links and flow control

A physical channel is a `link_fwd_t` forward (valid, 1-bit lane number,
flit) and a `link_bwd_t` backward (per-lane `stop` and `empty`). The rule is
simple: **a sender may put a flit of lane L on the link in a cycle only if the
`stop[L]` it currently sees is low.** The same rule applies to the injection
channels (`pe_in_*`), to the ejection channels (`pe_out_stop`) and to the
internal xtoy channels.

The XFC is a FIFO (`DEPTH = 8`). It raises `stop` when it holds
`STOP_AT = 5` or more flits, which leaves room for flits already on their
way. In the mesh the stop bit crosses a link register before the sending VC
sees it. The VC may also still hold up to two flits per lane that it collected
before the stop arrived. Three spare entries cover both. `empty` is reported
for completeness; no sender uses it. An assertion in `xfc` fires on a push
into a full buffer. If you change the link pipeline or the VC, re-derive
`STOP_AT` and watch that assertion.

## Setting up and tearing down a worm

1. A header reaches the front of its lane's XFC and moves into the IFC.
2. The AD sees a head flit in the IFC with no connection yet and raises
   `req` with a destination: P, N or local. In the x section, local means the
   xtoy pair; in the y section it means the toPE pair.
3. The RD's **request arbitrator** picks one requester per destination by
   fixed priority: input lane 0 (fromPE1 / xtoy1) highest, then lane 1
   (fromPE2 / xtoy2), then P lane 1, P lane 2, N lane 1, N lane 2.
4. The **lane allocator** gives the winner lane 1 of the destination if it is
   free, otherwise lane 2. If both lanes are busy the header waits: this is
   the blocked state of the functional tests. Only one grant per destination
   is made per cycle.
5. The grant is the **acknowledgment** to the AD. In the same clock edge the
   **connection** (input lane to output lane) and the **lane status** (output
   lane busy and its owner) are registered. The crossbar is driven from these
   registers.
6. Flits then flow through the crossbar whenever the output lane is ready.
   When the tail flit crosses, the connection and the output lane are
   released; a waiting header can take the lane from the next cycle.

A header on an empty path takes **five cycles** from the input link to the
output link of a section: XFC, IFC, connection set-up, VC collection, VC
delivery. `router_tb` checks this number.

## The virtual channel controller

The VC multiplexes the two lanes of an output channel onto its link in two
phases:

* **Collection:** the VC takes a flit from every lane that offers one and
  whose downstream stop is low. Lane 1's flit (or the only one) goes into the
  output buffer and lane 2's into the secondary buffer.
* **Delivery:** from the next cycle on, the output buffer's flit is put on the
  link while the secondary buffer's flit moves into the output buffer. This
  repeats until both buffers are empty, and then the VC collects again.

So with both lanes busy the link carries two flits every three cycles, and a
single lane gets one flit every two cycles. This phase structure is the
source design's. If you need full link bandwidth, the change belongs in
`vc_ctrl` (overlap collection with the last delivery) and in the XFC
threshold.

## The mesh and its edges

`mesh_net` places router (x, y) at node index `y*K + x`. It joins neighbours
with `link_pipe` stages and brings every edge link out as a port:

| port group | edge    | carries in | carries out |
|------------|---------|------------|-------------|
| `west_*`   | x = 0   | Xp         | Xn          |
| `east_*`   | x = K-1 | Xn         | Xp          |
| `south_*`  | y = 0   | Yp         | Yn          |
| `north_*`  | y = K-1 | Yn         | Yp          |

Each array is indexed by the row (west/east) or column (south/north). With
the edges open, test packets can be sent into any router from the periphery
and observed where they leave. A packet entering on a y edge must carry
`xhops = 0`, because it enters the y section directly. A packet whose address
points past an edge leaves the mesh there, with the hop counts it has left.

`K` defaults to 3. Hop counts allow up to 64 routers per side.

## Test benches

Each module has a self-checking test bench in `tb/` that ends with a line
`TB_RESULT checks=N failures=M`.

| test bench        | what it does |
|-------------------|--------------|
| `xfc_tb`          | random push/pop with a one-cycle-late sender; order, stop threshold, empty, no loss |
| `ifc_tb`          | random packets through x and y instances; header update, tail_sent, order |
| `addr_dec_tb`     | every direction and hop count 0..63 in both dimensions; request/ack/release protocol |
| `route_dec_tb`    | random requests against a reference model of priority, lane allocation and release |
| `crossbar_tb`     | random connection sets; valid, flit and ready paths |
| `vc_ctrl_tb`      | collection/delivery sequence, lane order, stop, link occupancy of 2 flits per 3 cycles |
| `out_buf_tb`      | stop from the processing element, order, full rate when not stopped |
| `router_tb`       | the router's functional tests, below |
| `mesh_net_tb`     | whole 3 x 3 mesh at default parameters, below |

`router_tb` applies the functional tests for the x dimension to a single
router:

* **Non-blocking tests** on every x input lane (fromPE1, fromPE2, both Xp
  and both Xn lanes): headers with x = 0..63 and y = 0, headers with x = 0
  and a random y, and header, all-ones, all-zeros, tail packets. Each packet
  must arrive whole at the predicted output with the header updated. The same
  sweep over y = 0..63 is applied to the Yp and Yn lanes. Single-flit packets (head and
  tail in one flit) are sent as well.
* **Blocking tests** on both lanes of Xp: the destination is made busy, either by holding both of
  its lanes with packets from the processing element or by raising the
  downstream stop. The flit under test must not come out until the
  destination is freed.
* **Arbitration test**: four headers wait for the xtoy destination and one
  lane is freed. The highest-priority header must win.
* **Allocation test**: the same four headers wait and both lanes are freed at
  once. The two highest-priority headers must get lane 1 and lane 2.
* **Virtual-channel test**: both Xp lanes wait behind a stop, then must
  interleave correctly on the link.
* **Crossbar connection tests**: every x input lane is connected to both
  lanes of each x destination.

`mesh_net_tb` first tests every router in turn from the west edge, sending
packets to that router's processing element and on through the north and
south edges. It then repeats a blocking test per column with the north edge
stopped: the packet must stay inside until the edge is freed. It then runs
random traffic from all injection channels and edge
inputs, while ejection channels and edge outputs stop at random. Every packet
is checked at its computed destination. The test also counts x-to-y turns,
VCs holding two flits, lane-2 traffic, lost arbitrations, destinations with
both lanes busy, stops toward senders and ejection buffers held by the PE. It
fails if any of these never happened.

### Running with Verilator

Files in `rtl/` have one module or package each; the package must come first.

```
verilator --binary --timing --assert -Wno-fatal --top-module router_tb \
    rtl/router_pkg.sv rtl/*.sv tb/router_tb.sv -o sim
./obj_dir/sim
```

Replace `router_tb` by any test bench name. (Listing `rtl/router_pkg.sv`
twice is harmless; Verilator warns about the duplicate.) Lint a module with
`verilator --lint-only -Wall rtl/router_pkg.sv rtl/*.sv --top-module mesh_net`.
Every test bench runs in well under a minute.

### Parameters you may want to change

| where            | parameter   | default | note |
|------------------|-------------|---------|------|
| `mesh_net`       | `K`         | 3       | routers per side, up to 64 with 6-bit hop counts |
| `mesh_net`, `router`, `router_dim`, `xfc` | `XFC_DEPTH` / `DEPTH` | 8 | input buffer per lane |
| same             | `XFC_STOP` / `STOP_AT` | 5 | stop threshold; keep at most `DEPTH - 3` with the pipelined link |
| `router_pkg`     | `DATA_W`, `HOP_W` | 16, 6 | change `hdr_t` with them |

## Where this model goes beyond the source

These follow the source design: the block structure, the two lanes per
channel, the x and y sections joined by xtoy1/xtoy2, the B buffers toward the
processing element, the collection and delivery phases of the VC,
dimension-order routing with relative addresses updated in the IFC, lane 1
allocated before lane 2, highest-priority-first arbitration, and the header
sweep of 0..63.

These are this model's own choices:

* **Flit and header format**, including the direction bits: the source gives
  only a tail bit and the x/y address values.
* **Link protocol**: per-lane stop and empty, one-cycle link pipeline, the XFC
  depth and threshold.
* **Priority order** of the input lanes. The source only says the highest
  priority must win.
* **One grant per destination per cycle.**
* **One-flit IFC and output buffers.**
* **Release of a connection in the cycle its tail crosses the crossbar.**
* **Reset**: asynchronous and active-low.
* **Mesh size K = 3** and a mesh rather than a torus: the source evaluates a
  router for a 2-D mesh.

What is deliberately not modelled: the source's gate-level router netlist and
its stuck-line fault coverage figures, which come from a commercial fault
simulator and a specific gate implementation. Nothing here injects faults
into the RTL; the test benches check correct behaviour only.

## Known limits

* The AD routes by direction bit whatever the input channel. A header on Xp
  with `xdir = 1` would turn back toward Xn. Minimal dimension-order addresses
  never do this, and nothing checks for it.
* The `empty` status travels back on every link but no sender uses it. The
  source also mentions an empty status from the IFC to the XFC without saying
  how it is used; it is not modelled.
* Link bandwidth is limited by the two-phase VC, as described above.
