# MediaWorm: a wormhole router with rate-based QoS

Cluster interconnects are usually built from wormhole-switched routers,
which serve best-effort traffic well but give no bandwidth guarantee to
video streams. MediaWorm keeps the ordinary pipelined wormhole router and
changes one thing: the scheduler that decides which virtual channel (VC)
may send a flit through the crossbar. Instead of round robin or FIFO it uses
**Fine-Grained VirtualClock (FGVC)**, a rate-based scheduler in which every
message announces the bandwidth it needs, so that real-time (CBR/VBR)
streams get their rate and best-effort traffic takes what is left, without
any connection setup.

This repository holds synthesizable SystemVerilog for that router in its
main configuration (8 ports, 16 VCs per port, 32-bit flits, 20-flit buffers,
multiplexed crossbar), and for a 2x2 "fat mesh" of four such switches.

## Fine-Grained VirtualClock

VirtualClock gives every channel an auxiliary clock `auxVC`. For each unit
that arrives at time `AT`:

    auxVC = max(AT, auxVC)
    auxVC = auxVC + Vtick
    stamp = auxVC

`Vtick` is the time the channel is allowed per unit, the inverse of its
rate. Units are served in order of their stamps. A channel that sends no
faster than its rate gets stamps close to real time; one that sends faster
runs its clock into the future and falls behind everyone else.

The classic algorithm fixes `Vtick` per connection. FGVC makes it per
message: the head flit carries

    Vtick = message inter-arrival time / message length in flits

so a VBR stream can ask for a different rate for every frame, and several
streams can share one VC. Each flit is treated as a VirtualClock unit.
Best-effort messages are given the largest Vtick (0xFFFF), so their stamps
lie far in the future and they only get bandwidth that real-time flits do
not use.

In this implementation (`mw_fgvc_stamp`):

* `AT` is a free-running 32-bit cycle counter in the router.
* Every input VC has its own `auxVC`, kept across messages, and the Vtick of
  the message currently arriving. A head flit loads the Vtick from its
  header. Body and tail flits reuse it. After the tail the Vtick is dropped.
* Flits are stamped **when they enter the input VC buffer**, and the stamp
  is stored with the flit. So a buffer can hold the end of one message and
  the start of the next, each with its own rate.
* The VCs are split into a real-time and a best-effort class by the
  configuration input `rt_vc_mask`. The router forces Vtick = 0xFFFF on
  best-effort VCs, whatever their headers say.
* Stamps are compared by the sign of their difference, so the counter may
  wrap. Any two stamps being compared must be less than 2^31 cycles apart.

## Where the scheduler sits

A multiplexed crossbar has one port per physical channel, so there are
three places where flits compete:

* **(A)** the crossbar input multiplexer, where the VCs of one input share
  that input's crossbar port;
* **(B)** the crossbar outputs, where several inputs may want the same
  output;
* **(C)** the VC multiplexer, where the VCs of one output share the link.

FGVC is applied at (A). Each cycle, `mw_fgvc_switch_alloc` considers, for
each input port, the VCs that have a path set up, a flit at the front of
their buffer and room in their output VC buffer. It picks the one whose
flit has the smallest stamp, with ties going to the lowest VC.

At (B), output ports are arbitrated per message. Here that is the stage-3
allocation of an output VC, described below. Two inputs can still hold
different VCs of the same output and send in the same cycle. Such flit-level
clashes are resolved by smallest stamp as well, with ties going to the
lowest input, and the losers retry next cycle. This tie-break is this
design's own.

At (C), the VC multiplexer is plain round robin. With a multiplexed
crossbar at most one flit per cycle reaches an output port, so a rate-based
scheduler there would have nothing to choose between.

Allocating the output VCs themselves (stage 3, `mw_vc_alloc`) is done once
per message. A head flit claims an output VC. The VC stays claimed until
that message's tail flit has crossed the crossbar.

## Pipeline

| stage | module | work |
|---|---|---|
| 1 | `mw_input_port` (with `mw_fgvc_stamp`, `mw_flit_fifo`) | demultiplex flits by VC, stamp them, buffer them (20 flits per VC), decode heads, return credits |
| 2 | `mw_route_unit` (one per input port) | routing decision for one head flit per cycle |
| 3 | `mw_vc_alloc` | round-robin arbitration for (output port, output VC), one grant per output port per cycle |
| 4 | `mw_fgvc_switch_alloc`, `mw_crossbar` | FGVC input multiplexer, output conflicts, registered 8x8 crossbar |
| 5 | `mw_output_port` | output VC buffers (20 flits), round-robin VC multiplexer, registered link output |

`mw_router` connects these blocks. `mw_rr_arbiter` is the shared
round-robin arbiter, and `mw_pkg` holds the types.

Each input VC is in one of three states:

* **IDLE**: no message is routed.
* **ROUTED**: the head flit has an output port and is waiting for stage 3.
* **ACTIVE**: the VC holds its output VC. All of its flits, the head
  included, compete at (A).

Body and tail flits of an ACTIVE VC skip stages 2 and 3. When the tail is
taken, the VC goes back to IDLE.

Timing through an idle router: the router samples a head flit at edge *t*,
and the head appears on the output link register after edge *t+6*. The
following flits come out one per cycle. A message's body flits can start
crossing in the cycle after its head does.

## Flits, links and flow control

A link carries one `link_t` per cycle:

    valid | vc[7:0] | ftype[1:0] | data[31:0]

`ftype` is head, body, tail or head+tail (a single-flit message). A head
flit's data is laid out as:

| bits | field |
|---|---|
| 31:24 | destination node |
| 23:16 | output VC, used unchanged on every hop |
| 15:0 | Vtick in router cycles per flit |

For a 4 Mb/s stream on a 400 Mb/s link with 32-bit flits (one flit per
cycle), Vtick = 100.

Flow control is credit based, per VC:

* Each input buffer returns one credit (`credit_t`: valid and VC) per flit
  taken, one cycle later.
* Each output port starts with 20 credits per downstream VC and never sends
  without one.
* Inside the router, the output port keeps a second credit counter per VC
  for its own output buffer. It is decremented when the switch allocator
  grants a flit, one cycle before the flit arrives from the crossbar.

All links and routers share one clock. A sender on `in_link` must respect
the credits. The input buffers assert on overrun.

## The 2x2 fat mesh

`mw_fat_mesh` connects four routers, S0 to S3. Switch *s* sits at
x = s[0], y = s[1]. Each pair of neighbours is joined by a fat link of two
physical links:

* ports 4 and 5 lead to the X neighbour;
* ports 6 and 7 lead to the Y neighbour;
* ports 0 to 3 serve four endpoints.

Node *n* = 4·switch + endpoint, and *n* is the header's destination. The
routing unit (parameter `FAT_MESH=1`) routes in X first, then in Y, then to
the endpoint. On each hop it takes the less loaded of the two links, where
load means the number of that port's output VCs currently held by messages.
Dimension-order routing in a 2x2 mesh is free of deadlock.

The head of a message that crosses three switches arrives 18 cycles after
the first switch samples it. Each switch's registered output is sampled
directly by the next switch.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `mw_router` | `N_PORTS` | 8 | physical channels |
| | `N_VCS` | 16 | VCs per physical channel |
| | `DEPTH` | 20 | flits per input and per output VC buffer (one message) |
| | `FAT_MESH`, `MY_X`, `MY_Y` | 0, 0, 0 | routing function and position in the fat mesh |
| `mw_fat_mesh` | `N_VCS`, `DEPTH` | 16, 20 | as above, for all four switches |
| `mw_pkg` | `FLIT_W` | 32 | flit width (the header layout assumes 32) |
| | `TS_W` | 32 | timestamp and cycle-counter width |

`N_VCS` may be any value from 2 to 256. The router elaborates without errors
with 4, 8 and 24 VCs. Only the 16-VC router is simulated as a whole.
`N_PORTS` must be 8 when `FAT_MESH=1`. In a single switch, destination *d*
leaves on port *d* mod `N_PORTS`.

## What is not built, and choices to be aware of

* **Only the multiplexed crossbar is built.** The full-crossbar variant
  gives every VC its own crossbar port and moves FGVC to the VC multiplexer.
  It is not built.
* **Only 32-bit flits.** The 128-bit flits used with 1.6 Gb/s links would
  need a different `FLIT_W` and header layout.
* **FGFQ is not built.** Fine-Grained Fair Queueing, the alternative to
  FGVC, needs a round-number computation and was only a comparison point.
* **The baselines are not built.** These are the traditional FIFO router
  and the pipelined-circuit-switched router.
* **Traffic sources are not built.** This includes the input regulator that
  paces the messages of a video frame. Sources belong to the network
  interface, and the testbenches model them.
* **Stamps are made on arrival, not at the multiplexer.** The effect is the
  same as dropping a message's Vtick when its tail leaves.
* **The following are this design's own choices:**
  * the header layout;
  * credit flow control;
  * single-clock links, with no synchronisers;
  * round robin in stage 3, in the routing-unit sharing and in the VC
    multiplexer;
  * smallest stamp at the crossbar outputs;
  * the fat-mesh port map and node numbering;
  * using held output VCs as the load measure.
* **Reset** is synchronous and active low. It clears the state and the
  counters but not the buffer contents.
* **Stamps of a long-idle VC.** `auxVC` is not re-based. A best-effort VC
  that receives many flits faster than its rate pushes its clock far ahead
  (0xFFFF per flit). This is harmless as long as stamps stay within 2^31 of
  each other, which holds for anything below about 32,000 back-to-back
  best-effort flits on one VC without a pause.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_mw_flit_fifo` | against a queue model; full, empty and count |
| `tb_mw_rr_arbiter` | against a pointer model; rotation |
| `tb_mw_fgvc_stamp` | stamps against the VirtualClock rules; directed Vtick and best-effort cases |
| `tb_mw_input_port` | stage timing of a head (routed 1 cycle after buffering, active after grant); stamp values; bypass of body flits; credits; random traffic order |
| `tb_mw_route_unit` | single-switch and fat-mesh routing for all destinations; less-loaded link choice |
| `tb_mw_vc_alloc` | one grant per port; no double claim of a VC; busy and load state; no starvation |
| `tb_mw_fgvc_switch_alloc` | smallest-stamp choice at inputs and outputs against a model, with wrapping stamps |
| `tb_mw_crossbar` | random selections |
| `tb_mw_output_port` | per-VC order; credit limits; output-buffer back-pressure; work conservation of the VC multiplexer |
| `tb_mw_router` | full-size 8x8 router: 6-cycle latency; 384 random mixed real-time/best-effort messages under random back-pressure; see below |
| `tb_mw_fat_mesh` | full-size 2x2 fat mesh: a three-hop latency check; 384 random messages among 16 endpoints; see below |
| `tb_mw_router_media` | the bandwidth guarantee: see below |

`tb_mw_router` checks that every flit arrives once, in order, on the right
port and VC. `tb_mw_fat_mesh` checks the same for all 16 endpoints, and also
that both links of every fat link carry traffic.

Both whole-design testbenches watch every FGVC decision. The chosen flit
must have the smallest stamp. A best-effort flit may never win while a
real-time flit is eligible. Both testbenches also count each mechanism and
fail if any of them never occurs:

* head routing and body bypass;
* stage-3 waits for a busy output VC;
* contention at the input multiplexer;
* real-time flits chosen over best-effort ones;
* crossbar output conflicts;
* full output buffers;
* downstream credit stalls.

`tb_mw_router_media` shows the point of FGVC. It offers one output of the
full-size router about twice what that output's link can carry:

* two paced real-time streams reserve 1/2 and 1/8 of the link, using
  Vtick 2 and 8;
* best-effort traffic on four inputs fills the rest, and one of those
  inputs also carries the larger stream.

Each real-time message must be delivered within 20 × Vtick cycles of its
release, plus 40 cycles of slack. Every message in fact arrives early. The
link stays busy, and best effort receives the bandwidth left over, about 3/8
of the link. With round robin at the input multiplexer and crossbar output,
the larger stream would be expected to get about a quarter of the link
instead of half. That variant was not simulated.

The testbenches were also run against copies of each module with a
deliberate fault, and each one failed.

The testbenches check function, cycle timing and, in one case, a bandwidth
guarantee. They do not measure the frame-delivery jitter of real video
traces, which needs millions of messages.

To simulate one of them with Verilator (from the repository root):

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
        -Irtl -y rtl rtl/mw_pkg.sv tb/tb_mw_router.sv \
        --top-module tb_mw_router -o sim
    ./obj_dir/sim +verilator+rand+reset+2

Replace `tb_mw_router` with any testbench name. The router testbench builds
in under a minute and runs in well under a second. The fat-mesh testbench
takes several minutes to build.
