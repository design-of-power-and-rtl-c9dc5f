# OP3DBFT: a two-layer butterfly-fat-tree network-on-chip with two vertical links

This is a synthesizable SystemVerilog model of a 64-node network-on-chip
(NoC). It connects 64 processing elements (PEs), stacked in two silicon
layers of 32 PEs each, through a butterfly fat tree (BFT) of 28
virtual-channel routers.

Vertical links between dies are built from through-silicon vias (TSVs),
which are large and costly. If a 2D fat tree is simply stacked into two
layers, it needs eight vertical links. Most of those links carry little
traffic. This design removes all but two:

- each layer is a complete fat tree of its own;
- the two layers meet only at their top routers, through two vertical
  links.

Each vertical link is also serialised 2:1. Its 64-bit flits travel as two
32-bit halves, which halves the number of signal TSVs per link. Packets are
routed to the nearest common ancestor (NCA) of source and destination. Leaf
routers have two parents, and they alternate between them in round-robin
order. This is round-robin output deflection, RROD.

In short: a quarter of the vertical links, paid for with longer trips
for traffic between the layers. Every packet that changes
layer must climb to a top router.

## The network

PEs are numbered 0..63. Layer 0 holds PEs 0..31 and layer 1 holds PEs
32..63. All router and port numbers below are this design's own.

| level  | routers        | ports | connections |
|--------|----------------|-------|-------------|
| leaf   | r = 0..15      | 6     | ports 0-3: PEs 4r..4r+3; ports 4, 5: middle routers 2c and 2c+1, where c = r/4 |
| middle | m = 0..7       | 5     | ports 0-3: leaf routers 4c..4c+3, where c = m/2; port 4: its one top router |
| top    | t = 0..3       | 3     | ports 0-1: two middle routers of its layer; port 2: the vertical link to top router t^1 |

**Clusters.** A cluster c (0..3) is 16 PEs, 16c..16c+15. It has four leaf
routers and two middle routers, 2c and 2c+1. Each of its leaf routers
connects to both middle routers, on the leaf router's port r%4.

**Middle to top.** Middle router m (cluster c, j = m%2) connects to top
router 2j + c/2, on that top router's port c%2. So top routers 0 and 2
serve layer 0 (clusters 0 and 1), and top routers 1 and 3 serve layer 1
(clusters 2 and 3).

**Vertical links.** Pairs (0,1) and (2,3) are joined by the two vertical
links. A layer therefore has two independent top-level paths, one through
each of its top routers. Which one a packet uses depends on the up port
its leaf router chose.

**Link types.**

- Horizontal router-to-router wires: `link_pipe`, 13 register stages in
  each direction, for flits and for credits.
- Vertical links: `tsv_link`.
- PEs attach straight to their leaf router.

## Routing: nearest common ancestor with round-robin up ports

Every router covers a contiguous range of PEs below it:

- leaf r covers 4r..4r+3;
- middle m covers its cluster, 16(m/2)..16(m/2)+15;
- top t covers its layer, 32(t%2)..32(t%2)+31.

Route computation (`nca_route`) asks one question: is the destination
inside my range?

- **Yes:** the packet goes down, through the child whose sub-range holds
  the destination. The port is (dest - min) / stride, with strides of 1, 4
  and 16 PEs at the leaf, middle and top levels.
- **No:** the packet goes up.
  - A middle router has one up port (4).
  - A top router sends the packet across the vertical link (port 2). Its
    peer covers the other layer, so from there the packet only descends.
  - A leaf router has two up ports. It picks one with its round-robin
    bit RB: RB=1 gives port 4, RB=0 gives port 5. RB toggles each time it
    is used. RB lives in each router and resets to 0, so the first up
    packet of a leaf router takes port 5, the next port 4, and so on.

Both up ports lead to routers covering the same cluster, so either choice
reaches the destination. The choice decides which top router, and hence
which vertical link, a cross-layer packet takes. RROD spreads traffic over
both links.

Routes are minimal within this tree and cannot deadlock. Up-then-down
paths without down-to-up turns cannot form a cycle in a tree.

## The router (`bft_router`)

The router is an input-queued virtual-channel router with credit flow
control.

**Buffers.** Each input port has 8 virtual channels (VCs). Each VC has a
16-flit first-word-fall-through buffer (`vc_fifo`).

A packet is a head flit, body flits and a tail flit. A one-flit packet
has both the head and tail bits set. Its destination PE is carried in
bits [5:0] of the head flit's payload.

A packet passes four stages, one clock each:

1. **RC, route computation.** A single `nca_route` unit per router serves
   the input VCs that show a new head flit, one per cycle, in round-robin
   order.
2. **VA, VC allocation.** Each output port has a round-robin arbiter. Every
   cycle it gives one waiting input VC the lowest-numbered free VC of the
   next router's input port. That output VC stays reserved for the packet
   until its tail flit leaves. This is what keeps packets from mixing on
   a VC.
3. **SA, switch allocation.** Allocation is separable and input-first.
   - Each input port picks one of its VCs. Eligible VCs have a flit
     waiting, a credit for their output VC, and an output that is ready.
   - Each output port then picks one of the input ports that chose it.
4. **ST, switch traversal.** The winning flit is popped, crosses the
   crossbar and is registered on the output. Its VC field is rewritten to
   the allocated output VC.

**Timing.** A head flit written into an idle router in cycle t is on the
output in cycle t+4. Body flits follow one per cycle.

**Credits.**

- The router keeps one counter per output VC. Each starts at the
  downstream buffer depth (16).
- A counter drops by one for each flit sent and rises by one for each
  credit returned.
- For every flit the router pops, it sends one registered credit upstream.

A flit is sent only while its counter is non-zero, so the buffers can
never overflow. An assertion in `vc_fifo` checks this.

**`out_ready`.** An output whose `out_ready` is low is not granted in
that cycle. Only the top router's vertical port uses it; the
serialising link below drives it.

## The serialised vertical link (`tsv_link`)

This is the part whose timing is least obvious.

**Serialising a flit.**

- A 64-bit flit is split into SER = 2 beats of 32 bits, low half first.
- Each beat crosses 32 data TSVs and is delayed by TSV_DELAY = 1 cycle.
- Alongside the data, a few control TSVs carry a valid bit, a first-beat
  marker, and the head bit, tail bit and VC of the flit.
- The receiver collects both beats. It presents the whole flit in the
  cycle the second beat arrives.
- A flit accepted in cycle c leaves the link in cycle c + SER + TSV_DELAY,
  which is c + 3.

**Pacing the sender.**

- The link can take a new flit only every SER = 2 cycles. The sending top
  router, however, could send one flit every cycle.
- The router registers its output, so a flit it grants in cycle t enters
  the link in cycle t+1. The link must therefore say one cycle ahead
  whether it can take a flit.
- `ready` is low in the cycle after a flit is accepted. It then rises
  again. In general: `ready = in_valid ? (SER == 1) : (beats left <= 1)`.
- An assertion checks that the router never sends into a busy link.

**Credits on the vertical link.** They travel back on their own TSVs,
with the same one-cycle delay. The top router's credit counters see the
whole round trip. Sixteen credits per VC are more than enough for the
short vertical loop. On the 13-cycle horizontal wires, the credit loop is
about 30 cycles. There a single VC with a steady flow runs out of credits,
and the other VCs fill the gaps.

## Zero-load latencies

These are measured end to end with one-flit packets, in cycles from
injection at a PE port to delivery at another PE port:

| path                                        | hops                             | cycles |
|---------------------------------------------|----------------------------------|--------|
| same leaf router (e.g. PE 0 to PE 1)        | 1 router                         | 4      |
| same cluster (PE 0 to PE 4)                 | 3 routers, 2 wires               | 38 = 3*4 + 2*13 |
| same layer, other cluster (PE 0 to PE 20)   | 5 routers, 4 wires               | 72 = 5*4 + 4*13 |
| other layer (PE 0 to PE 32)                 | 6 routers, 4 wires, 1 TSV link   | 79 = 6*4 + 4*13 + 3 |

A cross-layer packet passes both top routers of a pair: the one it
climbs to in its own layer, and its peer, which it enters from the
vertical link. That peer is the packet's first step down. The
serialisation adds one cycle over a plain one-flit link, and the TSVs add
one more. Under load, the vertical link accepts at most one flit every
two cycles. It is the narrowest point of the network: all traffic
between the layers shares two such links in each direction.

## Parameters

| where        | name        | default  | meaning |
|--------------|-------------|----------|---------|
| `noc_pkg`    | `FLIT_W`    | 64       | channel (payload) width in bits |
| `noc_pkg`    | `NUM_VC`    | 8        | virtual channels per port |
| `noc_pkg`    | `NUM_PE`    | 64       | PEs; the topology in `op3dbft_top` is written for 64 |
| `op3dbft_top`| `DEPTH`     | 16       | flits per VC buffer |
| `op3dbft_top`| `H_DELAY`   | 13       | cycles of every horizontal router-to-router wire |
| `op3dbft_top`| `SER`       | 2        | serialisation ratio of the vertical links |
| `op3dbft_top`| `TSV_DELAY` | 1        | cycles through the TSVs |

- The network is meant to run at 2.5 GHz. The 13-cycle wires and the
  1-cycle TSVs are the delays at that clock.
- `bft_router` also takes `LEVEL` (leaf, middle or top), `P` (ports) and
  `DEPTH`.
- A router's index within its level comes in on the `pos` input rather
  than as a parameter. All routers of one level therefore share one
  elaborated module.

## Files

| file | contents |
|------|----------|
| `rtl/noc_pkg.sv` | flit and credit types and the shared constants |
| `rtl/rr_arbiter.sv` | round-robin arbiter (mask-based) |
| `rtl/vc_fifo.sv` | one VC buffer |
| `rtl/nca_route.sv` | NCA route computation and RB choice |
| `rtl/bft_router.sv` | the VC router |
| `rtl/link_pipe.sv` | horizontal wire: flits one way, credits back, DELAY registers |
| `rtl/tsv_link.sv` | 2:1 serialised vertical link with its credit return |
| `rtl/op3dbft_top.sv` | the whole 64-PE network |
| `tb/tb_*.sv` | one self-checking testbench per module |

**PE interface.** The top exposes one credit-based channel pair per PE:

- `pe_in_valid`/`pe_in_flit` and `pe_cr_out` inject flits into the leaf
  router.
- `pe_out_valid`/`pe_out_flit` and `pe_cr_in` deliver flits to the PE.

The PE starts with 16 credits per VC. It must choose the VC of each packet
itself and keep a packet's flits together on that VC.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Build with plain verilator, listing the package first, for
example:

    verilator --binary --timing --assert -Irtl rtl/noc_pkg.sv rtl/rr_arbiter.sv \
        rtl/vc_fifo.sv rtl/nca_route.sv rtl/bft_router.sv tb/tb_bft_router.sv \
        --top-module tb_bft_router
    ./obj_dir/Vtb_bft_router

What each testbench checks:

- `tb_vc_fifo`: against a queue model.
- `tb_nca_route`: all 28 router positions times 64 destinations times
  both RB values, against an independent range computation.
- `tb_link_pipe`: the exact delay of flits and credits.
- `tb_tsv_link`:
  - the 3-cycle latency and the 2-cycle spacing;
  - the `ready` rule;
  - credit return;
  - data integrity under random traffic.
- `tb_bft_router`, on a leaf router:
  - 4-cycle latency;
  - the 5, 4, 5, 4 order of RROD up ports;
  - 600 random packets with random credit hold-back and a throttled
    port, checked per flit for port, order and VC rule.
- `tb_op3dbft_top`, the whole network at its default parameters:
  - the latencies in the table above;
  - uniform random, transpose and bit-reversal traffic, first at 0.018
    flits/cycle/PE and then as a saturating burst;
  - every flit checked for destination, order and completeness;
  - a count of how often each mechanism fired. These are: both leaf up
    ports used, TSV crossings, the serialiser holding back a top router,
    credit exhaustion on a wire, and turns at middle and top routers. A
    mechanism that never fired counts as a failure.

The full network is large for verilator: 28 routers with 48 VC buffers
each. Expect the C++ compile of `tb_op3dbft_top` to take about 7 minutes on
four cores. The simulation then runs in about 10 seconds.

## Where this model departs from, or goes beyond, its source

- **Router internals are this design's own.** The source names only the
  usual stages (RC, VA, SA, ST) and gives the VC count and buffer depth.
  The single RC unit, the one VA grant per output per cycle, the
  lowest-free-VC choice and the input-first switch allocation are choices
  made here.
- **Router connectivity.**
  - The source gives router counts per level (16, 8, 4). It says the
    top routers have degree 3: two horizontal links and one vertical
    link.
  - Which middle router connects to which top router, and all port
    numbers, are this design's.
  - Middle routers end up with a single parent, because the top level
    has only four routers.
- **Wire delay.** The source gives 13 cycles for both horizontal wire
  lengths of this topology in its text. A table elsewhere lists 18 and 14
  cycles for the two lengths. The model follows the 13 cycles of the
  text. To try the other values, change `H_DELAY`. It is one value for
  all wires; per-wire delays would need a small edit in `op3dbft_top`.
- **The PE-to-leaf link** has no extra delay stage beyond the router's
  output register.
- **RB is per router, resets to 0 and toggles only on up-routed packets.**
  The source does not say whether it is per router or global.
- **Not implemented:**
  - random output deflection (ROD), the comparison scheme;
  - the regular eight-link 3D BFT and the mesh variants the source
    compares against;
  - the power, energy and thermal models, and any network interface
    inside the PEs;
  - the PEs themselves, which lie outside the network.
- **Packet length** is not fixed by the network. The end-to-end testbench
  uses 5-flit packets, plus 1-flit packets for the latency probes.
