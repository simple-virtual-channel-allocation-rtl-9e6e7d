# Output-port-directed virtual-channel allocation for a two-stage mesh router

In a virtual-channel (VC) router, a packet that cannot leave can still block the packets
queued behind it in the same VC: head-of-line (HoL) blocking. It also takes a slot in the
switch allocator's first stage, where it loses to nothing and wins nothing. This design
ties VCs to *directions*. The upstream router already knows which output port a packet
will take in the next router (look-ahead routing). So it places the packet in a
downstream VC reserved, by preference, for that output. Packets to the same output queue
up behind one another in one VC, while packets to other outputs sit in other VCs and keep
moving. The first switch-allocation stage then sees VCs that mostly want different
outputs, so more of its winners also win the second stage.

The VC allocator becomes very small. VC *selection* (one candidate VC per next-router
direction) runs in parallel with switch allocation. VC *assignment* is just a multiplexer
driven by the switch winner's look-ahead route. The router needs only two pipeline stages.

Two selection schemes are provided, chosen by the `VA_SCHEME` parameter:

* **FVADA** (fixed): each direction owns a *home* VC in the downstream input port. If the
  home VC is reserved or has no free slot, any other usable VC is taken instead. If there
  is none, the packet waits for its home VC.
* **AVADA** (adaptive): a 3-bit-per-VC content-addressable table records which direction
  each downstream VC currently serves. The choice order is:
  1. the VC mapped to this direction;
  2. otherwise an empty, unmapped VC, which then gets mapped;
  3. otherwise any usable VC;
  4. otherwise the head of a free-VC queue.

  Mappings are made on demand and dropped when a VC drains. This suits any number of
  VCs, not just one per direction.

## Network and packets

`noc_mesh` (the top) is a `MESH_X` x `MESH_Y` mesh, 8x8 by default. Routers connect to
their four neighbours with 128-bit links and credit return paths. Each router's LOCAL
port is brought out as an injection/ejection pair for a processing element (CPU or cache
bank), which is not part of the design. Router (x,y) has index `y*MESH_X+x`; EAST is
+x and NORTH is +y. Edge ports are tied off.

Routing is dimension-ordered, X first then Y, computed one hop ahead.

A flit (`flit_t` in `noc_pkg`) is 128 bits, MSB first:

| field | bits | meaning |
|---|---|---|
| payload | 104 | data |
| src_y, src_x, dst_y, dst_x | 4 each | coordinates (up to 16x16) |
| op | 3 | head flits: the output port to take in the router that receives the flit |
| ftype | 2 | HEAD, BODY, TAIL, HEADTAIL |
| vc | 3 | VC of the receiving input port the flit is written into |

Only head flits carry routing information. Body and tail flits follow their head's VC
and output port. Packets may have any length, and the default VC holds 5 flits, one
packet.

A credit (`credit_t`) is a valid bit plus a VC id. It means "one slot of that VC was
freed". Senders start with `VC_DEPTH` credits per VC.

## Router pipeline and timing

```
cycle n    flit arrives on in_flit, is written into its VC (BW)
cycle n+1  stage 1: switch allocation (SA), VC selection + assignment, look-ahead route (LA)
cycle n+2  stage 2: buffer read (BR) and crossbar (ST) into the output register
cycle n+3  flit is on out_flit (LT, the link)
```

A flit that meets no contention therefore appears on the output 3 cycles after it
appeared on the input, and `tb_router` checks this. The original proposal names the two stages and
LT. Writing the buffer in the arrival cycle and allocating in the next one is this
design's reading. The credit for a popped slot leaves one cycle after the grant.

### Input side (`vc_control_table`, `flit_sram`)

Each input port has one flit buffer of `NUM_VC*VC_DEPTH` words. A VC is a circular queue
of `VC_DEPTH` words with its own read and write pointers. A VC may hold the tail of one
packet followed by the head of the next (stacking). The control table therefore keeps
the type, output port and destination of every stored flit as well as the per-VC state:
* the read and write pointers;
* the assigned output VC and whether the VC is active;
* the output port of the packet in progress.

A VC's status is IDLE (empty), VA (head at the front, waiting for a VC) or ACTIVE (packet
in progress). The buffer is written synchronously and read asynchronously, with one
write port and one read port.

### Switch allocation (`switch_allocator`, `rr_arbiter`)

SA is separable:
1. a `NUM_VC`:1 round-robin arbiter per input port;
2. a 5:1 round-robin arbiter per output port.

Body and tail flits beat head flits in *both* stages. A VC whose packet is already moving
therefore is not interrupted by new packets. This keeps VCs short-lived, which matters
because a reserved VC is closed to other packets. A first-stage pointer moves only when
its winner also wins the second stage.

A VC requests the switch only if it can go:
* a head flit only if VC selection offers a usable VC for its look-ahead direction;
* a body or tail flit only if its VC downstream has a credit.

A grant is therefore final: no flit is granted and then dropped.

### Output side (`output_unit`, VC selection and assignment)

Per output port, `output_unit` keeps a credit counter and a "reserved" flag for each VC
of the downstream input port. A VC is reserved from the grant of a head flit until the
grant of its tail, so packets never interleave inside a VC. It is *usable* when it is not
reserved and has at least one credit.

- `vc_select_fvada` computes one candidate per next-router direction from the usable set
  and the fixed home map. The home VC of direction `d` in an input port `p` is `d` if
  `d < p`, else `d-1` (the U-turn is skipped). For example, the VCs of an east input
  serve WEST, SOUTH, NORTH, LOCAL.
- `vc_select_avada` does the same from the mapping table (`vc_mapping_table`), the
  unmapped and usable VCs, and the free-VC queue (`free_vc_queue`).
  - A mapping is written when an unmapped VC is assigned.
  - A mapping is cleared when its VC holds no flits and is not reserved.
  - A packet placed in a VC mapped to another direction does not change the mapping.
- `vc_assign` is the multiplexer that takes the winner's candidate. The chosen VC id is
  written into the departing flit. A head flit's `op` is replaced with its look-ahead
  route.

The crossbar (`crossbar`) is a 5x5 AND-OR matrix.

## Parameters

| parameter | default | where |
|---|---|---|
| `MESH_X`, `MESH_Y` | 8, 8 | `noc_mesh` |
| `NUM_VC` | 4 (AVADA is meant for 2 to 5) | `noc_mesh`, `router`, most blocks |
| `VC_DEPTH` | 5 flits | same |
| `VA_SCHEME` | `VA_FVADA` (`VA_AVADA` for the adaptive scheme) | `noc_mesh`, `router`, `output_unit` |
| `FLIT_W`, `NUM_PORTS` | 128, 5 | `noc_pkg` |

With FVADA, `NUM_VC` must be at least 4, one home VC per non-U-turn direction. A fifth
VC is only used as a fallback. Buffers of 20, 15 and 10 slots per port map to `NUM_VC` =
4, 3, 2 with `VC_DEPTH` = 5 under AVADA.

## Simulating

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv tb/tb_router.sv --top-module tb_router
./obj_dir/Vtb_router
```

Use the same pattern for any other `tb_<block>`. The end-to-end tests are
`tb_noc_mesh` (FVADA), `tb_noc_mesh_avada`, and `tb_noc_mesh_avada10`. The last one is
AVADA with only 2 VCs of 5 flits per port, so several directions must share a VC. They build a 4x4 mesh with processing
elements from `tb/noc_traffic.sv`, which:
* inject 5-flit packets at a set rate under uniform random, bit-complement, transpose,
  tornado, bit-reversal, shuffle and butterfly traffic;
* consume flits at a set rate, to create back-pressure;
* score every delivered flit for destination, order within its VC, duplicates and
  payload.

The tests also count each mechanism and fail if one never happens:
* a head falling back from its home VC;
* packets stacked in one VC;
* body/tail priority deciding an arbitration;
* a head waiting for a VC;
* a flit waiting for a credit;
* a first-stage winner losing the second stage;
* for AVADA, mappings made and dropped, and a packet placed in a VC mapped to another
  direction.

4x4 is the largest mesh simulated. The 8x8 default passes lint and elaboration, but its
simulation model takes too long to build to be practical. The testbenches run at 4x4 by
overriding `MESH_X`/`MESH_Y`. At light load, mean latency on the 4x4 mesh is about
14 to 19 cycles.

## Departures and open points

- **Adaptive routing is not built.** The original proposal also evaluates minimal adaptive routing
  with one VC class for adaptive packets and a DOR class as an escape. It does not say
  how the adaptive port is chosen or how VCs are split between the classes. Only DOR is
  implemented, so the adaptive-routing results (including FVADA with 5 VCs) cannot be
  reproduced.
- The buffer has one write and one read port rather than a single shared port, so that
  the arrival of one flit and the departure of another can share a cycle.
- Credits are charged at the switch grant, not one cycle later when the flit leaves.
- When several usable VCs qualify, the lowest index wins. The AVADA rules are taken as
  an ordered list. Their last step (free-VC queue) only yields a VC that is also usable,
  so when every VC is reserved or full the packet waits.
- The ejection side of every router keeps 4 VCs with credits like any other link. Home
  VC 0 is used for packets leaving at the next router.
- Full and empty are decided with a per-VC occupancy counter. This matches what a
  read/write pointer comparison gives.
- No timing, area or power is modelled. The reported stage delays (315 ps for SA+VA,
  275 ps for BR+ST, 230 ps for the link) are circuit results, not properties of this RTL.
- Comparison designs (a baseline router with a free-VC queue, and a design with
  unified-buffer VCs) are not part of this code.
