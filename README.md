# UNION — one optical network for the cores of a chip and for the chips of a system

A system of several chip multiprocessors usually has two unrelated networks.
One network carries traffic between the cores of one chip. A second one, usually
an electrical bus on the board, carries traffic between chips. UNION replaces
both with a single optical network. Each chip's 64 cores reach an optical fat
tree on the chip. The top of each tree connects straight to a segmented optical
bus that runs along the board between the chips. A packet leaves its source
concentrator as light. It climbs the source tree, runs along the bus, and
descends the destination tree. It is converted back to electrical form only at
the destination concentrator. Nothing buffers it in between.

Light cannot be buffered, so a path must be complete before the laser fires.
All of the logic exists to make that possible:

* a **network controller** at the top of each chip's tree reserves paths
  (circuit switching) and sets every router on them;
* **router cluster controllers** hold the switch settings of their routers;
* the controllers of all chips talk over an **optical control bus**. Together
  they arbitrate the **segmented data bus**, and each of them keeps an
  identical copy of the bus arbiter;
* each **concentrator** has a **laser power table**, and the laser emits only
  as much light as the chosen path needs.

This repository holds synthesizable SystemVerilog for all of the control logic.
It also holds behavioural models for the two photonic parts that carry light:
the turnaround router and the interface switches with the data bus. The top
level, `union_top`, models a complete system. By default that is 8 chips of
64 cores, 512 cores in all.

## Sizes

| Quantity | Value | Where set |
|---|---|---|
| chips | 8 (2..8) | `union_top.NUM_CHIPS` |
| cores per chip | 64 = 16 concentrators × 4 cores | `union_pkg` |
| fat tree | 2-ary, 4 levels, 8 routers per level, 32 routers | `union_pkg.LEVELS` |
| router clusters per chip | 8 + 4 + 2 + 1 (one per subtree per level) | `union_chip` |
| data-bus channels | 16, each cut into NUM_CHIPS−1 segments | `union_pkg.NUM_CH` |
| links per chip | 160 (5 boundaries × 16 × up/down) | `union_pkg.NUM_LINKS` |
| flit | 32-bit payload + last + destination side-band | `union_pkg.flit_t` |
| control message | 16 bits per chip per slot | `union_pkg.cmsg_t` |
| controller batch | 16 requests decided in 20 cycles | `network_controller` |

## The fat tree and its link names

Concentrator `c` (0..15) is a leaf. Router `(L, s, p)` sits at level `L`
(1..4). Its subtree number is `s`, with `4−L` bits, and its position inside the
subtree is `p`, with `L−1` bits. Its array index is `{s, p}`. Each router has
two lower ports, to its children, and two upper ports, to its parents. Upper
port `u` of `(L, s, p)` goes to router `(L+1, s>>1, {u, p})`, which it enters on
lower port `s[0]`. The level-1 router `s` serves concentrators `2s` and `2s+1`.
Upper port `u` of top router `p` leaves the chip on bus channel `8u + p`.

Routing is deterministic. A packet climbing through level `i` takes the left
parent if bit `i−1` of its destination is 0, and the right parent otherwise. A
packet for the same chip turns around at level `h`: the lowest level whose
subtree holds both ends, so `src >> h == dst >> h`. It then descends along the
only path to the destination. A packet for another chip climbs all four levels
by the same rule. It therefore always leaves on channel number = destination
concentrator, and it enters the destination chip at the top router that leads
down to that concentrator.

Routing is fixed, so the link set of a path follows from its ends alone. The
design names the links so that this set is cheap to compute. Boundary `l` (0..4)
lies between levels `l` and `l+1`. Boundary 0 is the concentrators, and boundary
4 is the bus.

* The **up link** that a path crosses at boundary `l` is `{src >> l, dst[l−1:0]}`.
  The bits above `l` name the subtree the packet is still in. The low bits are
  the parent choices made so far, and those are destination bits.
* The **down link** toward destination `d` is `d` at every boundary. There is
  exactly one way down.

The link-state bit of an up link is `l·16 + name`, and that of a down link is
`80 + l·16 + name`. An on-chip path with turn level `h` uses `2h` links. An
outgoing interchip path uses 5 up links, and an incoming one uses 5 down links.
`union_pkg::path_mask` builds the 160-bit mask of any path. This naming matters
for scheduling: two paths can share a router and still be compatible. They
collide only when their masks overlap.

## The network controller: one batch of path requests

This is the most involved part of the design (`network_controller.sv`,
`path_scheduler.sv`, `request_buffer.sv`). It works in batches, and only one
batch runs at a time:

```
LOAD (≤16 cycles) → FIND → CHECK → SCHED → UPDATE → LOAD ...
```

* **Request buffer.** Requests come from the 16 concentrators (valid/ready) and
  from one queue per remote chip for incoming transactions. A round-robin
  merger accepts one request per cycle into a 16-entry FIFO.
* **LOAD.** Each cycle, the controller moves one request from the FIFO into the
  lowest free candidate slot. There are 16 slots. LOAD ends in the cycle that
  fills the last free slot, or in the first cycle with nothing to pop once some
  slot is occupied.
* **FIND.** The controller computes `path_mask` for all 16 candidates in
  parallel and registers the results.
* **CHECK.** It ANDs every mask with the link state, which marks each candidate
  as available or not. It also registers a 16×16 collision matrix. Entry
  `(i, j)` is 1 when the masks of candidates `i` and `j` overlap.
* **SCHED.** A priority chain in slot order grants a candidate if it is
  available and collides with no candidate granted before it. The result is a
  maximal set of non-overlapping paths, as in a greedy independent-set search.
* **UPDATE.** The controller ORs the masks of the granted paths into the link
  state. Granted slots move to the emitter. Refused candidates keep their slots
  and compete again in the next batch. `batch_done` and `batch_refused` report
  the outcome.

Sixteen requests that arrive together are decided 20 cycles after the first one
leaves the FIFO. `tb_network_controller` measures exactly 20.

**Emitter.** Everything the controller sends leaves one item per cycle, in
parallel with the next batch. The priority order is:

1. releases after a concentrator's tear-down;
2. releases of incoming paths after a remote tear-down;
3. granted paths.

For each item the controller broadcasts a path message (`setup`, kind, source,
destination) to all cluster controllers. For an on-chip path, `conc_grant` goes
to the source concentrator one cycle after the path message, so the routers are
set before any light arrives. A release clears the path's mask from the link
state in the same cycle as its message. Each concentrator has at most one
transfer at a time, and the controller keeps that transfer's kind and
destination so that it can rebuild the mask for the release.

**Path kinds.** Each request is one of three kinds. LOCAL is an on-chip path.
OUT runs from a concentrator up to the bus. IN runs from the bus down to a
concentrator. The kind follows from the destination chip, and for an incoming
transaction from the queue it came from.

## Interchip transfers: control bus and segmented data bus

The **data bus** has 16 channels. Each channel runs past every chip and is cut
into `NUM_CHIPS−1` segments, with segment `k` between chips `k` and `k+1`. A
transfer from chip `a` to chip `b` occupies segments `min(a,b) .. max(a,b)−1`.
Each chip has two microresonators per channel. One injects light toward lower
or higher chip numbers (`tx_dir`). The other takes light arriving from the left
or from the right into its top router (`rx_dir`). Several transfers can use one
channel at the same time if their segments do not overlap. A channel is
half-duplex, so transfers in opposite directions over the same segment collide.

The **control bus** is one broadcast waveguide. In each cycle every chip may
place one 16-bit message on it, and every controller receives all of them one
cycle later. In `union_top`, the register stage `ctrl_rx <= ctrl_tx` stands in
for that waveguide. A message is `{type, source chip, source concentrator,
destination chip, destination concentrator}`, and there are three types.

Take a transfer from concentrator `s` on chip `A` to concentrator `d` on chip `B`:

1. `s` asks its controller, and the request becomes an OUT candidate. When it
   is granted, `A` sets up `s` → top router → channel `d` and broadcasts
   **TXN_REQ**.
2. `B` queues the transaction, and it becomes an IN candidate in `B`'s batch.
   When it is granted, `B` sets up channel `d` → top router → `d` and
   broadcasts **BUS_REQ**.
3. Every controller holds the same `bus_arbiter`. This copy keeps an occupancy
   bit for each segment of each channel. In the slot where the BUS_REQ arrives,
   each copy scans that slot's messages from a rotating start chip. It grants
   every bus request whose segments are free and do not overlap a request
   already granted in the same scan. Every copy sees the same messages, so every
   copy reaches the same decision, and no grant message is needed.
4. On the grant, `A` sets `tx_dir[d]` toward `B` and pulses `conc_grant` to `s`.
   `B` sets `rx_dir[d]` toward `A`. `s` then sends its packet, which arrives at
   `d` in the same cycle.
5. After the last flit, `s` pulses its tear-down. `A` releases its path, turns
   its transmitter off and broadcasts **TEARDOWN**. Every arbiter frees the
   segments, and `B` releases its path and turns its receiver off.

A bus request that is refused stays pending at `B`. `B` sends it again in any
later cycle in which `B` has nothing else to send, taking its pending requests
in round robin. A request already on the bus is not sent again.

## Router clusters and the turnaround router

A cluster is the set of routers of one subtree at one level: 8 clusters of one
router at level 1, 4 clusters of two routers at level 2, 2 clusters of four at
level 3, and one cluster at the top. `cluster_ctrl` decodes each path message
for itself. At level `L` it takes part in a path when:

* the path climbs through the level and `src >> L == SID`. It connects the lower
  port `src[L−1]` to the upper port `dst[L−1]`;
* the path turns at this level. It connects the lower port `src[L−1]` to the
  lower port `dst[L−1]`;
* the path descends through the level and `dst >> L == SID`. It connects the
  upper port `dst[L−1]` to the lower port `dst[L−1]`.

The router is the one at position `dst & (2^(L−1)−1)`. The cluster stores one
input select per router output and clears that select when the path is
released.

`otar_router` is a behavioural model of the optical turnaround router. Each of
its four outputs shows the input that its select names, or darkness. Upper
outputs can only take light from below. Lower outputs take light from the other
child or from either parent, so the router allows no U-turn and no turn between
its two upper ports. An assertion in `cluster_ctrl` flags any other select. `optical_data_bus`
models the interface switches and the bus. A receiver looking left sees the
nearest chip on its left that transmits to the right, unless a chip in between
takes that light first. The same holds mirrored for a receiver looking right.
Both models have zero delay.

## Concentrator and laser power

A `concentrator` joins four cores through a 5×5 crossbar, `local_crossbar`.
Ports 0–3 are the cores, and port 4 is the optical side. Each crossbar output
is arbitrated round robin and held for a whole packet. A packet for a core of
the same concentrator crosses only the crossbar. Every other packet is switched
to port 4, where the transmit state machine runs:

```
IDLE --packet at port 4--> REQ --req accepted--> WAIT --grant--> SEND --last flit--> IDLE (+ tear-down pulse)
```

Light that arrives goes into a 32-flit receive queue, which holds one 32-flit
packet. From there it reaches the destination core through the crossbar. Light
cannot be held back, so an assertion reports any overflow.

The controller sets up a path deterministically, so the loss of the path
depends only on where the path goes. `power_ctrl` computes a table at
elaboration. It has one entry for each on-chip turn level 1..4 and one for each
chip distance 1..7. The concentrator looks up the entry when a packet reaches
port 4, while the path is still being set up. The entry is the launch power
that the VCSEL driver needs: detector sensitivity plus path loss. The loss
model is:

* every router crossed: one microresonator drop (0.5 dB) and three passes (0.005 dB each);
* every link: one waveguide crossing (0.12 dB) and its length at 0.17 dB/mm.
  A link at boundary `l` is taken as 1.25·2^l mm long, and the link from a top
  router to the board coupler as 5 mm;
* interchip paths also add two chip–board couplings (0.45 dB each), 10 cm of
  board waveguide per chip spanned (0.035 dB/cm), and two microresonator passes
  at each chip passed.

With a sensitivity of −14.2 dBm, the launch powers range from −13.0 dBm for
neighbouring concentrators to +2.6 dBm for chips 7 apart. The device loss
figures come from the published technology numbers. The waveguide lengths and
crossing counts are estimates made for this design.

## Timing summary

| Event | Cycle |
|---|---|
| concentrator sees a packet at port 4 | t |
| request offered (REQ) and power looked up | t+1 |
| batch decision | ≤ 20 cycles after the request leaves the FIFO |
| path message to the clusters | first free emitter cycle after UPDATE |
| cluster switch state updated | +1 |
| `conc_grant` (on-chip) | path message +1 |
| first flit as light, delivered to the receive queue | grant +1 |
| interchip: TXN_REQ → destination queue → IN batch → BUS_REQ → grant | one control slot each, plus the two batches |

## Where this design fills in details

The original description gives the architecture, the arbitration algorithms,
the router rules, the 20-cycle controller figure and the loss figures. The
following details are this design's own choices:

* the link naming, and the reading that the channel equals the destination
  concentrator;
* clusters as "all routers of one subtree at one level", which gives 14 clusters
  below the top;
* path messages that carry (kind, source, destination) instead of raw
  microresonator bits;
* the control-message format: 16 bits, with chip numbers of 3 bits. This fits
  inside the roughly 20 bits each chip can place on the wave-pipelined bus per
  slot at 10 cm spacing and 40 Gb/s;
* the control and path signals that travel on their own wavelength are plain
  wires and registers here;
* refused candidates are kept, and refused bus requests are sent again in free
  slots;
* the emitter order, and one control message per chip per slot;
* the 32-flit receive queue and all valid/ready handshakes;
* waveguide lengths, taken as doubling per level;
* one batch at a time. The controller does not pipeline batches.

Parts that are not built:

* the analog and photonic devices: VCSELs and their drivers, photodetectors and
  receivers, the microresonators as devices, the Y-branch couplers, and the
  waveguides and TSVs;
* the control bus as a medium. Its effect is the register stage in `union_top`;
* the processing cores. The testbenches act as cores;
* the electrical and optical networks used only for comparison.

Interchip light crosses the bus in zero time. Only one transfer per
concentrator can be in flight at a time.

## Files

| File | Contents |
|---|---|
| `rtl/union_pkg.sv` | sizes, flit/message types, routing and link-mask functions |
| `rtl/sync_fifo.sv` | FIFO used by the queues |
| `rtl/request_buffer.sv` | round-robin merge of requests into a FIFO |
| `rtl/path_scheduler.sv` | path check and non-overlapping selection |
| `rtl/bus_arbiter.sv` | replicated data-bus segment arbiter |
| `rtl/network_controller.sv` | batch controller, emitter, interchip protocol |
| `rtl/cluster_ctrl.sv` | router cluster control unit |
| `rtl/otar_router.sv` | turnaround router model |
| `rtl/local_crossbar.sv` | 5×5 crossbar |
| `rtl/power_ctrl.sv` | launch-power table |
| `rtl/concentrator.sv` | crossbar, transmit state machine, receive queue, power |
| `rtl/optical_data_bus.sv` | interface switches and segmented bus model |
| `rtl/union_chip.sv` | one chip: concentrators, tree, clusters, controller |
| `rtl/union_top.sv` | the system: chips, data bus, control bus |

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/union_pkg.sv tb/tb_union_top.sv \
          --top-module tb_union_top -Mdir obj_tb_union_top
./obj_tb_union_top/Vtb_union_top
```

| Testbench | What it checks |
|---|---|
| `tb_union_pkg` | turn levels and link sets against hand-worked values; over all pairs, path length 2h and no shared down links between on-chip paths to different destinations |
| `tb_request_buffer` | one accept per cycle, round-robin order and fairness, FIFO order |
| `tb_path_scheduler` | random masks against a reference greedy selection |
| `tb_bus_arbiter` | four neighbour transfers granted at once on one channel, waiting for a tear-down, opposite directions colliding, random traffic against a reference model |
| `tb_cluster_ctrl` | switch settings for up, turn and down hops, release |
| `tb_otar_router` | each legal turn |
| `tb_local_crossbar` | packet locking, round robin, back-pressure |
| `tb_power_ctrl` | every table entry against the loss budget recomputed in real arithmetic, one-cycle latency, power rising with distance |
| `tb_optical_data_bus` | light across idle chips, several transfers on disjoint stretches of one channel, shielding by a receiving chip, nothing at chips not receiving |
| `tb_concentrator` | local delivery, request/grant/send/tear-down sequence, receive path |
| `tb_network_controller` | 16 requests in 20 cycles, collision and retry, outgoing and incoming protocol with a busy bus |
| `tb_union_chip` | 512 random on-chip packets, scoreboard, power rising with turn level |
| `tb_union_top` | 4 chips, 1024 random packets with about a third going off-chip. It also counts each mechanism: crossbar-only, on-chip optical and interchip delivery, refused requests, denied bus requests, shared channels, all message types, and power by distance |
| `tb_union_top_full` | the same checks on `union_top` at its default size (8 chips, 512 cores) |

`tb_union_top_full` builds `union_top` with its default parameters. Verilator
needs a few minutes to build it.
