# TESH network router with adaptive routing

A TESH (Tori-connected mESHes) network is a hierarchical interconnect for
massively parallel machines. Sixteen processing elements (PEs) form a 4x4 mesh
called a basic module (BM). Sixteen BMs are joined as a 4x4 torus to form a
level-2 network, and sixteen level-2 networks form a 4x4 torus at level 3
(4096 PEs). Each PE has one router. Corner PEs of every BM carry the links of
the higher-level tori. These higher-level rings are long and few, so they are
where congestion builds up.

This RTL is a synthesizable wormhole router for that network and a generator
that wires 16^L routers into a TESH(2,L,0) network. Its routing function adds
three adaptive mechanisms to deadlock-free dimension-order routing, and all
three can be switched on or off by parameter:

* **Channel selection (CS).** A packet on a higher-level ring that finds its
  normal virtual channel busy moves to the second channel, when its path on the
  ring does not wrap around.
* **Link selection (LS).** A packet that is exactly half a ring away from its
  target may go either way. It takes the minus direction when the plus link is
  busy.
* **Dynamic dimension reversal (DDR).** With four virtual channels (two
  adaptive, two deterministic), a packet may use the ring of the PE it is on
  even when that ring is not next in dimension order. Each such reversal
  increments a counter (the DR number) carried in the head flit. Deadlock is
  avoided by the DR-number rule below and by escape to the deterministic
  channels.

The network, the three routing mechanisms and the four-stage router follow a
published description of adaptive routing for TESH networks. Where that
description leaves details open, this design makes its own choices; they are
listed at the end.

## Addressing and topology

A node address is a string of base-4 digits `n[2L-1] .. n1 n0`, packed two bits
per digit: digit `i` is bits `[2i+1:2i]`.

* `(n1, n0) = (y, x)` is the position inside the BM.
* `(n3, n2)` selects the BM inside the level-2 network.
* `(n5, n4)` selects the level-2 network inside the level-3 network.

Inside a BM the routers form a plain 2D mesh with no wrap-around. Each digit
`i >= 2` has a ring: the 4 subnetworks that differ only in digit `i` are linked
in a cycle 0-1-2-3-0. The ring is identified by `lambda = i`:

| lambda | ring                 | corner PE (x, y) | plus link | minus link |
|--------|----------------------|------------------|-----------|------------|
| 5      | level-3 vertical     | (0, 0)           | S         | W          |
| 4      | level-3 horizontal   | (3, 0)           | S         | E          |
| 3      | level-2 vertical     | (0, 3)           | N         | W          |
| 2      | level-2 horizontal   | (3, 3)           | N         | E          |

A corner PE uses its two mesh ports that point out of the BM for its ring.
The plus link leaves through the free y port and reaches the same corner of the
subnetwork whose digit is one higher. The minus link leaves through the free x
port. At level 2 the lambda-4/5 corners have no ring and their free ports are
tied off.

## Routing

The routing function is `tesh_route_sel`, a purely combinational block. It
takes the router address, the head flit, the input VC and the busy/label state
of every output VC. It returns the output port, the output VC, the updated
header fields and one flag per mechanism used.

### Deterministic base (dimension order)

1. Find the highest digit `hi >= 2` in which the destination differs from this
   node.
2. If this node is the corner holding ring `hi`:
   * go plus if `(d - n) mod 4 <= 2`;
   * otherwise go minus.
3. If the node is not that corner, move inside the BM towards it: first in y,
   then in x.
4. When all digits `>= 2` agree, move inside the BM to `(d0, d1)`, then eject
   to the local port.

### Channel classes and dateline

Deadlock freedom uses two channel classes, L and H:

* A packet on its way to a ring outlet inside a BM uses class L.
* In the final in-BM phase it uses class H.
* On a ring the packet keeps its class, except on the hop that crosses the
  wrap-around link (plus from digit 3, minus from digit 0). That hop always
  uses H.

This breaks the cycle of each ring.

| NUM_VC / mode   | class L | class H | adaptive   |
|-----------------|---------|---------|------------|
| 2 VCs           | VC 0    | VC 1    | —          |
| 4 VCs, no DDR   | VC 0, 2 | VC 1, 3 | —          |
| 4 VCs, DDR      | VC 2    | VC 3    | VC 0, 1    |

With 4 VCs and no DDR, each class has two VCs and the free one is taken.

### CS and LS

* **CS.** On a ring, a class-L packet whose plus path needs no wrap (`d > n`),
  or whose minus path needs no wrap (`d < n`), switches to class H when its
  class-L channel on that link is busy.
* **LS.** When the ring distance is exactly 2 and the plus link's channel is
  busy, the packet takes the minus link instead.

"Busy" means the output VC is owned by another packet or its buffer is full.

### DDR

The head flit carries two fields:

* `dr`, the DR number;
* `last_lam`, the last ring used.

A packet in an adaptive VC (0 or 1) has up to two candidate moves:

* **Path 1.** The node is a corner holding ring `lambda`, `lambda < hi`, and
  that digit still differs. The ring is then used out of order, in the
  direction rule above.
* **Path 2.** The normal dimension-order move.

The candidates are tried in order: path 1 on VC 0, then VC 1, then path 2 on
VC 0, then VC 1. The first free adaptive VC is taken.

If none is free:

* the packet waits if any candidate VC is labelled with a DR number greater
  than its own;
* otherwise it escapes to deterministic VC `2 + class` on the path-2 link.

Once in a deterministic VC, a packet stays on the deterministic channels.

When a packet is granted an output VC, that VC is labelled with the packet's
DR number. The DR number increments, saturating at 7, when the ring used has
a higher lambda than `last_lam` (that is, when the packet goes back to an
earlier dimension).

## Router micro-architecture (`tesh_router`)

The router has five ports: N=0, E=1, S=2, W=3 and Local=4. Each port has
`NUM_VC` virtual channels, each with its own `DEPTH`-flit buffer.

The data path is:

* an input demultiplexer and per-VC FIFOs (`tesh_input_port`);
* a crossbar at VC granularity, 20x20 by default (`tesh_crossbar`);
* per-VC output FIFOs, with a round-robin multiplexer onto the link
  (`tesh_output_port`).

The control block (`tesh_control`) is a four-stage pipeline. Each input VC
has its own state: idle, arbitrating, active or draining.

1. **Link/channel selection.** One shared `tesh_route_sel` serves one input VC
   per cycle. A round-robin arbiter picks among the input VCs whose front flit
   is a head. The result is registered for that input VC.
2. **Arbitration.** Each request is decoded to one output VC. One round-robin
   arbiter per output VC grants it to one requester, if the VC is free. The
   winner owns the output VC until its tail has passed, and the VC takes the
   winner's DR label. A loser returns to stage 1 and is routed again, so
   adaptive choices see fresh congestion.
3. **Buffer check.** An owning input VC registers a move when it has a flit not
   yet moved and its output buffer has room. The room count includes the move
   already in flight and the flit the output port sends this cycle.
4. **Switching.** The registered move pops the input FIFO and pushes the output
   FIFO through the crossbar. As the head flit passes, its `dr` and `last_lam`
   fields are rewritten.

### Timing

* A head flit takes 5 cycles from the input link to the output link.
* Body flits follow at one flit per cycle.
* With 2-flit buffers a link sustains full rate, because `full` is lowered in
  the cycle a buffer is popped.

### Link protocol

Each link has three forward signals:

* `valid` — a flit is on the link this cycle;
* `vc` — its virtual channel;
* `flit` — 32 bits.

One signal runs backwards: `full[NUM_VC]`, the receiving buffer's
per-VC full. The sender may send on a VC only when that VC's `full` is low.
The condition is `full = fifo_full & ~pop`.

### Flit format

| bits    | head / single flit                              | body / tail      |
|---------|-------------------------------------------------|------------------|
| 31:30   | type: 00 body, 01 head, 10 tail, 11 single      | same             |
| 29:24   | `src_tag` (free for the source)                 | payload          |
| 23:21   | `last_lam`                                      | payload          |
| 20:18   | `dr`                                            | payload          |
| 17:12   | reserved                                        | payload          |
| 11:0    | destination address                             | payload          |

## Files

| file                       | contents                                                    |
|----------------------------|-------------------------------------------------------------|
| `rtl/tesh_pkg.sv`          | port enum, flit types, address/corner helper functions      |
| `rtl/tesh_route_sel.sv`    | routing function: dimension order, dateline, CS, LS, DDR    |
| `rtl/tesh_rr_arbiter.sv`   | round-robin arbiter                                         |
| `rtl/tesh_flit_fifo.sv`    | one VC buffer                                               |
| `rtl/tesh_input_port.sv`   | demultiplexer + input VC buffers                            |
| `rtl/tesh_output_port.sv`  | output VC buffers + link multiplexer                        |
| `rtl/tesh_crossbar.sv`     | VC-level crossbar                                           |
| `rtl/tesh_control.sv`      | four-stage control pipeline                                 |
| `rtl/tesh_router.sv`       | one router                                                  |
| `rtl/tesh_network.sv`      | top: 16^L routers wired as TESH(2,L,0)                      |
| `tb/tb_<block>.sv`         | self-checking testbench of each block                       |

## Parameters

| parameter | default | meaning                                                      |
|-----------|---------|--------------------------------------------------------------|
| `LEVELS`  | 2 (top), 3 (router) | hierarchy levels: 16^LEVELS PEs, 1..3 supported  |
| `NUM_VC`  | 4       | virtual channels per link (2 or 4; DDR needs 4)              |
| `DEPTH`   | 2       | flits per VC buffer                                          |
| `USE_CS`, `USE_LS`, `USE_DDR` | 1 | enable each adaptive mechanism                 |

With `USE_CS=0 USE_LS=0 USE_DDR=0` the router does plain dimension-order
routing. `NUM_VC=2` without DDR gives the small 2-VC router: 5 ports x 2 VCs,
10 output-VC arbiters.

**Why the top defaults to level 2.** The intended network is level 3 (4096
PEs). The top's default is level 2 (256 PEs) for tool-memory reasons.

* Lint and elaboration tools flatten the network at about 28 MB per router.
* Measured: 0.5 GB for 16 routers and 7.1 GB for 256.
* Projected: over 100 GB for 4096 routers.

`LEVELS=3` is still supported by every block, and the routing testbench
exercises 6-digit addresses.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Example with Verilator 5:

```
verilator --binary --timing -Irtl -Wno-fatal --top-module tb_tesh_router \
    rtl/tesh_pkg.sv rtl/tesh_rr_arbiter.sv rtl/tesh_flit_fifo.sv \
    rtl/tesh_input_port.sv rtl/tesh_output_port.sv rtl/tesh_crossbar.sv \
    rtl/tesh_route_sel.sv rtl/tesh_control.sv rtl/tesh_router.sv \
    tb/tb_tesh_router.sv
./obj_dir/Vtb_tesh_router
```

The testbenches:

* **`tb_tesh_route_sel`** compares plain dimension order and CS+LS with an
  independent model on 20,000 random cases. It adds directed cases for the
  dateline, CS, LS, DDR path 1 and path 2, escape, waiting and DR increment.
* **`tb_tesh_router`** checks:
  * output ports for each routing case;
  * the 5-cycle head latency;
  * one flit per cycle for the body;
  * all five inputs contending under random back-pressure, with no flit
    interleaving within a VC.
* **`tb_tesh_network`** runs the default 256-node network with uniform and
  hot-spot (10 % to node 0) traffic of 16-flit packets. It checks delivery,
  order and packet length. It counts CS, LS, DDR path 1, DDR escape and DR
  increments, and fails if any of them never happens.

At the default size, `tb_tesh_network` delivers all 1536 packets (6 per PE)
in 3653 cycles. It makes 26118 checks with no failures. Each mechanism fires
many times:

| mechanism     | count |
|---------------|-------|
| CS            | 228   |
| LS            | 261   |
| DDR path 1    | 190   |
| DDR escape    | 682   |
| DR increment  | 141   |

The simulation itself takes about 40 s. Building it is the slow part: the
flattened 256-router model takes about 12 minutes to compile with Verilator
on 4 cores. Useful options are `-CFLAGS -O0`, `--output-split 20000` and
`-j 4`.

## Departures and own choices

Stated as choices, not taken from a source:

* **Corner and link placement.** The placement of the four rings on the
  corners, and the use of the y port for plus and the x port for minus.
* **y before x.** Routing inside a BM moves in y first, then x.
* **Dateline.** The class-H hop across each ring's wrap-around link.
* **Flit and link formats.** The 32-bit flit, the header layout, the 3-bit DR
  counter (saturating) and the valid/vc/full link protocol.
* **Shared selection unit.** One routing unit per router, shared round robin.
  A head therefore waits one extra cycle for each other head routed before it
  in the same router.
* **Rerouting losers.** A packet that loses arbitration is routed again rather
  than waiting on its first choice.
* **DDR implementation.** A single combinational DDR function. No separate
  "parallel" DDR circuit is written, because the function is the same and only
  its gate structure would differ.
* **Not reproduced.** Gate counts, clock frequencies and latency/throughput
  curves of larger experiments.
* **No processing element.** The PE model exists only in the testbenches.
* **Level limit.** `LEVELS` is limited to 3. With one link pair per ring
  (q = 0), only the four corners carry rings, so deeper levels would need a
  placement rule for non-corner PEs.
