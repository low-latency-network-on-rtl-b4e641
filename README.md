# Two-cycle virtual-channel NoC router with request masking

This is SystemVerilog RTL for a wormhole virtual-channel router and for a 2D mesh of such
routers. It follows the microarchitecture of the article *Low Latency Network-on-Chip Router
Microarchitecture Using Request Masking Technique*. The router has two pipeline stages.
In stage 1 it computes the route one hop ahead and does VC allocation and switch allocation
together. In stage 2 the flit crosses the crossbar. The router can do both allocations at once,
without speculation, because of **request masking**: before a request reaches the switch allocator,
the input port drops it unless the grant could really be used. A flit that wins the switch also
has a downstream buffer slot, and a header that wins the switch also gets an output VC. No grant
is wasted, and requests need no priority classes.

The default configuration is the one the article builds: 5-port mesh routers, 4 virtual channels
(VCs) per port, 4 flits per VC and a 32-bit payload, wired into a 4x4 mesh.

## Terms

- **IVC**: a VC buffer at an input port of this router.
- **OVC**: a VC buffer at the input of the next router, as the output port sees it.
- **Credit**: one free slot in an OVC. Each output port keeps a credit counter per OVC. The
  downstream router sends one credit back for each flit it reads out.
- **Assigned**: an OVC is assigned while a packet owns it, from the grant of the header to the
  grant of the tail. An IVC is assigned while its head packet holds an OVC.
- **Free OVC**: an OVC that is not assigned and has at least one credit.

## Where a flit goes, cycle by cycle

```
cycle c    flit on the input link; written into the input port's memory at the edge.
           A header also pushes {output port here, output port at the next router}
           into its VC's header FIFO. The second field comes from look-ahead routing.
cycle c+1  STAGE 1: masked requests -> switch allocator (V:1 per input, then 4:1 per output).
           A granted header takes its output port's candidate OVC in the same cycle.
           Update signals go to the OVC status: decrement a credit, set or clear "assigned".
           At the edge: memory read of the granted flit, crossbar select registered.
cycle c+2  STAGE 2: memory output -> crossbar -> output link. The VC field is rewritten to
           the OVC, and a header's look-ahead field is rewritten to the next router's port.
           The credit for the freed slot goes upstream.
```

With no contention, a flit on an input link in cycle *c* is on the output link in cycle *c+2*. A
packet therefore needs 2·(hops+1) cycles from its source endpoint to its destination endpoint. The
testbenches check both numbers exactly. One input streaming to one output reaches 1 flit per cycle.

## Request masking

This is the part of the design that takes the most care. Every cycle, each IVC that has a flit at
its head makes one of two kinds of request, and each kind has its own mask
(`rtl/input_port.sv`).

**Assigned IVC (body or tail flit).** The IVC needs to know whether its OVC has room. Credits are
counted only at the output side (`ovc_status`), so each IVC gets two status bits of its own OVC:
*full* (0 credits) and *nearly full* (1 credit). A two-level multiplexer selects the bits: first
the output port, then the OVC. They are registered in the input port, which keeps the multiplexer
out of the allocation path. As a result the bits are one cycle old. The mask makes up for this:

- mask if *full*;
- mask if *nearly full* and this IVC was granted in the previous cycle. That grant used the last
  slot, and the registered bits cannot show it yet.

Conservative is safe. A credit that came back during the stale cycle only delays a request by one
cycle. It never lets an unusable request through.

The registered bits are taken for the OVC the IVC will hold *after* the clock edge. This includes
an OVC that a header takes in the current cycle. The body flit right after a header is therefore
already covered, even when the OVC had only one credit.

**Unassigned IVC (header flit).** The IVC needs a free OVC at its output port. Each output port
keeps a registered flag, *avail*, which says the port has a free OVC. The flag is computed one
cycle ahead by counting free OVCs. It drops when no OVC is free. It also drops when exactly one OVC
is free and a header takes it in this cycle. Because only one flit per cycle can leave an output
port, at most one OVC per port is taken per cycle. Each port also offers one *candidate* OVC,
chosen round-robin among its free OVCs. A header that wins the switch takes that candidate. This
replaces a separate VC allocator, and VC allocation costs no extra stage.

Both kinds of request then go to the separable input-first switch allocator (`sw_alloc`).
Whatever it grants can move.

## Reassigning an OVC before it drains

Credits are counted at the output port, not in the input port that happens to use the OVC. So an
OVC can be handed to a new packet as soon as the previous tail has been granted, with whatever
credits remain. It does not have to wait for the downstream buffer to empty. The downstream IVC
can then hold flits of two or more packets one behind the other. The per-VC header FIFO (depth
B) keeps one entry per packet, so each packet keeps its own routing information. The mesh
testbench counts how often an OVC is reassigned with flits still downstream.

## Input port storage

All V IVCs of one input port share one simple dual-port memory of V·B words (`vc_buffer`,
`dp_ram`). VC *v* owns words v·B … v·B+B−1 and has its own read and write pointers. One port of
the memory writes and the other reads. On an FPGA this uses one block RAM and needs no per-VC
multiplexers. The memory read is registered, so the *hdr* and *tail* flags of each VC's head flit
are also kept in a small first-word-fall-through FIFO per VC. Allocation can see them in the
same cycle. These FIFOs (`fwft_fifo`) are shift registers. The head is always in slot 0, so
reading needs no multiplexer.

## Flits, links and endpoints

A flit is `{hdr, tail, vc[V-1:0] (one-hot), payload[31:0]}`, 38 bits by default. In a header the
payload holds these fields (offsets in `noc_pkg`):

| bits | field |
|---|---|
| 2:0 | look-ahead port: the port the *receiving* router must use |
| 6:3 / 10:7 | destination x / y |
| 14:11 / 18:15 | source x / y (carried, not used by the router) |
| FPAY−1:19 | free for the user |

Ports are numbered LOCAL=0, EAST=1, NORTH=2, WEST=3, SOUTH=4. Column x grows to the east and
row y grows to the south. Router (x,y) is index y·NX+x in the mesh's port arrays.

A link is a flit bus with a write strobe in one direction and V credit wires in the other. An
endpoint attached to `noc_mesh` must:

- set the look-ahead field of each header to `noc_pkg::xy_route(src, dst)`, the route at its own
  router;
- never address itself, because a router never sends a flit back out of the port it came in by;
- keep B credits per VC for its injection link, send one packet at a time per VC, and take one
  credit back per pulse on `inj_credit`;
- pulse `ej_credit[vc]` once for each flit it receives.

## Modules

```
noc_mesh                  NX x NY mesh, local ports brought out
└─ router                 5 ports, two stages
   ├─ input_port  x5      buffering, header FIFOs, OVC assignment, status bits, masking
   │  ├─ vc_buffer        shared VC memory + head-flag FIFOs
   │  │  ├─ dp_ram
   │  │  └─ fwft_fifo x V
   │  ├─ fwft_fifo x V    per-packet header FIFOs
   │  └─ lookahead_route  XY route at the next router
   ├─ sw_alloc            V:1 then 4:1 round-robin arbiters
   │  └─ rr_arbiter
   ├─ ovc_status  x5      credits, assigned bits, candidate OVC, avail flag
   │  └─ rr_arbiter
   └─ crossbar            five 4:1 multiplexers with binary select
noc_pkg                   port numbers, header layout, xy_route()
```

Each file begins with a description of its interface and timing.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NX`, `NY` | 4, 4 | mesh size (coordinates are 4 bits, up to 16x16) |
| `V` | 4 | VCs per port (simulated with 2 and 4) |
| `B` | 4 | flits per VC (simulated with 4) |
| `FPAY` | 32 | payload bits; at least 19 for the header fields |

Reset is synchronous and active high. Credit counters start at B.

## Simulating

Each testbench in `tb/` checks its own results and ends with a `TB_RESULT checks=… failures=…`
line. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/noc_pkg.sv \
          tb/tb_noc_mesh.sv --top-module tb_noc_mesh -o sim && obj_dir/sim
```

| testbench | what it exercises |
|---|---|
| `tb_noc_mesh` | default 4x4 mesh: zero-load latency 2·(hops+1) for 24 packets; then uniform random traffic near saturation. Checks every packet and counts each mechanism: header masked for lack of a free OVC, full mask, nearly-full mask, switch conflicts, OVC reassigned before draining. |
| `tb_noc_uniform` | 5x5 mesh with 4 and with 2 VCs, 5-flit packets, uniform random traffic, swept from 0.05 to 0.6 flits/node/cycle; prints throughput and latency |
| `tb_router` | one router with behavioural neighbours: 2-cycle latency, 1 flit/cycle streaming, random traffic with held-back credits, look-ahead field checked |
| `tb_input_port` | each masking rule, OVC take and release, rewritten flit, credit, two packets queued in one VC |
| `tb_ovc_status`, `tb_sw_alloc`, `tb_vc_buffer`, `tb_fwft_fifo`, `tb_dp_ram`, `tb_rr_arbiter`, `tb_crossbar`, `tb_lookahead_route` | unit checks against reference models |

In the 5x5 sweep, mean packet latency (creation to tail delivery) is about 15 cycles at low load,
and throughput saturates near 0.56 flits/node/cycle with 4 VCs and 0.50 with 2 VCs. These numbers
come from this RTL. They are not the article's measurements.

Assertions in the RTL check the handshakes: FIFOs never overflow or underflow, credits never go
below zero or above B, only free OVCs are taken, a router never sends a flit back out the port
it came in by, and there is at most one grant per input port.

## Where this design makes its own choices

The article gives the microarchitecture and the masking rules. The points below are this design's
own, or it departs from the article on them:

- **One credit is enough for a free OVC.** The article defines a free OVC as unassigned with at
  least one credit. In its description of the *avail* flag, though, it asks for a free OVC with two
  credits. Here the status bits are sampled for the OVC being assigned in the same cycle. With
  that, one credit is safe, and this design uses the one-credit definition throughout.
- **Routing is XY dimension-order.** This matches the article's evaluation. The article also
  outlines a port-selection stage for adaptive routing, which is not included here.
- **Arbiters are plain masked round-robin.** The article uses a published fast arbiter. The
  first-stage pointer moves only when its input port also wins the second stage.
- **The flit format, header layout, port numbering and reset behaviour** are this design's
  choices.
- **Credits go upstream one cycle after the grant**, from a register.
- **The FWFT FIFO is a shift register.** The article's own circuit for it is not reproduced.
- **The mesh has no network interface or traffic generator.** The endpoints in the testbenches
  are behavioural.
- The article also describes a speculative switch allocator and a VC-reallocation policy that
  waits for an empty VC. These are baselines it compares against, and they are not built.
