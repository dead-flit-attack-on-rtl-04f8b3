# Dead-flit Trojan in a 4x4 mesh network-on-chip

A tiled multicore moves cache misses and their replies over a packet-switched
mesh. Each packet is split into flits, and every flit carries a small
*common prefix* next to its 64-bit payload. The prefix holds a 2-bit flit
type (FT: head, body or tail) and the number of the virtual channel (VCID) the
flit must enter in the next router. A router trusts the FT field completely.
A head flit opens a VC, gets a route and gets a downstream VC. Body and tail
flits simply follow what the head set up (wormhole switching).

This RTL implements that network and a hardware Trojan that abuses this
trust. The Trojan sits on the input ports of one router and flips a single bit
of FT:

* **HT-HB** turns a head flit into a body flit;
* **HT-BH** turns a packet's first body flit into a head flit.

In both cases the flit lands in a VC whose control state contradicts it, so
it never again asks for the crossbar. The flit and everything queued behind
it stay in the buffer forever: these are **dead flits**. The upstream router
never hears that the VC became free, so the VC is lost to all later packets.
The cores whose misses were in those packets wait for ever and stall. The
Trojan infects at most N-1 of the N VCs of a port. One VC always keeps
flowing, so the network still works, but it is congested around the infected
router, and the Trojan is hard to spot.

The default build is the configuration studied most: a 4x4 mesh, 4 VCs of
3 flits per input port, XY routing, and an HT-HB Trojan in router 6 that
fires with probability 0.05 per packet.

## Flit format

| field  | bits | meaning |
|--------|------|---------|
| FT     | 2    | 00 head, 01 body, 10 tail, 11 undefined (prefix) |
| VCID   | 2    | VC to occupy in the downstream router (prefix) |
| data   | 64   | head: PID 8, SID 4, DID 4, PL 4, TYPE 3, PR 2, CMD 7, ADDRESS 32 (MSB first); body/tail: payload |

PL is the number of non-head flits. A miss request is a single head flit with
PL = 0. A reply is H, B, B, B, T with PL = 4. A packet ends with its tail
flit, or with its head when PL = 0. The field order and the FT encoding are
fixed by the design. The field widths are a choice made so the head fills
64 bits. All types live in `rtl/noc_pkg.sv`. A link is a `flit_t` (valid +
prefix + data) in one direction and a `credit_t` (valid, VCID, vc_free) in
the other.

## The control buffer, and how a flit dies

Every VC of an input port (`input_port.sv`) is a 3-flit FIFO (`vc_fifo.sv`)
with a control buffer. The buffer holds S (idle/active), PL, OP (output port),
the downstream VCID, and a head-sent flag. This is the part to understand;
everything else is a conventional VC router.

On arrival, the flit is steered by its VCID. Then:

| arriving flit | VC state | effect |
|---------------|----------|--------|
| head          | idle     | S becomes active; PL is copied; OP is computed by XY routing from DID |
| head          | active   | buffered only; the control buffer is not touched |
| body / tail   | active   | PL is decremented |
| body / tail   | idle     | buffered only; no route and no OP |

A VC asks the VC allocator for a downstream VC when its front flit is an
unsent head and OP is set. It asks the switch allocator only when its front
flit agrees with the control buffer:

* a head, if the head has not left yet;
* a body or tail flit, if the head has already left.

When the packet's last flit leaves, the control buffer is cleared. The credit
sent upstream for that flit carries `vc_free`.

Now follow the two variants:

* **HT-HB.** The head arrives looking like a body flit, and its VC is idle.
  No route is computed and OP stays unset. The flit never requests anything.
  The rest of its packet queues behind it. When the VC's 3 slots are full,
  the rest waits in the upstream router, which applies back-pressure.
* **HT-BH.** The real head leaves normally. The forged head then reaches the
  front of a VC that is already active with the head sent. It is neither a
  new packet (S is active) nor a legitimate follower (it is a head). So it
  never requests, and it blocks the tail behind it.

Either way, no credit with `vc_free` ever returns for that VC. The upstream
`output_unit` keeps it marked busy, and the VC allocator never hands it out
again.

## The Trojan (`ht_trojan.sv`)

One instance sits on each of the five input ports of the infected router.
It is combinational on the flit path, so it adds no latency, and it acts
before buffering, routing and VC allocation. Its parts:

* **Trigger.** A free-running 16-bit maximal-length LFSR. A packet is
  attacked when the LFSR value at the packet's head is below `P_THRESH`.
  `P_THRESH = round(p * 65536)`: 3277 for p = 0.05, 6554 for 0.1, 9830 for
  0.15.
* **HT-HB.** The attacked head flit has FT bit 0 flipped (00 to 01).
* **HT-BH.** Only packets with PL >= 2 (those with a body flit) are
  eligible. The attacked packet's VC is *armed*, and its next body flit has
  FT bit 0 flipped (01 to 00).
* **N-1 limit.** Each instance counts infected plus armed VCs. It stops
  attacking once that count reaches `NUM_VC - 1`.

The `attack` and `infected` outputs let a testbench see what the Trojan did.
They drive nothing inside the router.

## Router (`noc_router.sv`)

The router has five ports: local, north, east, south and west. North is
row y-1, and tile id = 4y + x. Its parts:

* `input_port` per port: buffers and control buffers, with `route_xy`
  computing OP when a head is written;
* `vc_allocator`: for each output, a round-robin winner among the requesting
  VCs gets the lowest idle downstream VC;
* `switch_allocator`: separable, input-first, round-robin. First one VC per
  input that holds a credit is chosen, then one input per output;
* `crossbar`: moves the winning flit and rewrites its VCID to the allocated
  downstream VC;
* `output_unit` per output: a credit counter (starting at the VC depth) and
  an idle flag for each downstream VC;
* a register on every output link.

Timing without contention:

1. A head written at clock edge t requests a VC during cycle t and gets it
   at edge t+1.
2. It wins the switch during cycle t+1 and is on the output link after edge
   t+2.
3. The next router writes it at edge t+3.

So a hop costs three cycles. Body flits follow at one per cycle while credits
last. A credit goes back one cycle after a flit leaves its VC.

## Mesh and adapters (`ht_noc_mesh.sv`, `network_adapter.sv`)

The top, `ht_noc_mesh`, holds 16 routers with 16 network adapters. Tile 6
gets the Trojan (`HT_ROUTER`, `HT_MODE`, `P_THRESH`); `HT_MODE = HT_NONE`
gives the clean baseline. Links that leave the mesh edge are tied off.

Each tile's adapter interface is brought out as arrays indexed by tile id:

* `send_valid`/`send_ready`/`send_desc` hand over a packet descriptor (PID,
  DID, PL, TYPE, PR, CMD, ADDRESS, first payload word);
* `rx_valid`/`rx_pkt` report each packet whose last flit has arrived.

The adapter accepts a descriptor only when one of its router's local input
VCs is idle. It then sends the flits as credits allow; body flit k carries
`data + k - 1`. On receive, it reassembles packets per VC and flags a wrong
flit count, non-consecutive payloads or an out-of-order flit type. It returns
a credit for every received flit and never stalls ejection.

Uncontended latency from descriptor accepted to packet reported is
3 x (routers on the path) + 2 cycles for a single-flit packet. For example,
tile 4 to tile 15 takes the path 4-5-6-7-11-15 in 20 cycles, through the
infected router.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `NUM_VC`  | 4       | mesh, router, ports | VCs per input port (one virtual network) |
| `DEPTH`   | 3       | mesh, router, ports | flits per VC |
| `HT_ROUTER` | 6     | mesh | tile whose router carries the Trojan |
| `HT_MODE` | `HT_HB` (mesh), `HT_NONE` (router) | mesh, router | `HT_NONE`, `HT_HB`, `HT_BH` |
| `P_THRESH`| 3277    | mesh, router, Trojan | trigger threshold, p x 65536 |

`VCID_W = 2` in the package caps `NUM_VC` at 4. The mesh size is fixed at
4x4 by the 4-bit tile ids and 2-bit coordinates.

## Where this design makes its own choices

These points are not given by the architecture this RTL follows, or are
resolved one way here:

* **Virtual networks.** There is a single virtual network: all message
  classes share the 4 VCs.
* **VC count.** 4 VCs per port are used. A 3-VC figure also appears in
  the description of the input port; 4 is the evaluated configuration.
* **Control buffer release.** The control buffer is cleared when the
  packet's last flit leaves. PL is still decremented on arrivals but does
  not free the VC by itself.
* **Priority.** The PR field is carried but not used: arbitration is plain
  round-robin with no priority.
* **Pipeline, allocators and credits.** The pipeline depth, the allocator
  structures and the credit format are all this design's own.
* **Trojan trigger.** The Trojan's random source is an LFSR. HT-BH flips the
  first body flit of the chosen packet.
* **Tiles.** The processors, L1/L2 caches, cache controllers, tile
  controller and main memory are not included. The testbenches play the
  tiles: they issue misses and answer them with replies.
* **Not measured.** The area and power figures given for the Trojan (about
  1.2 % area and 0.3 % static power of a router, 1 GHz at 90 nm) are not
  reproduced or checked here.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* **Small blocks.** `tb_vc_fifo`, `tb_route_xy` (exhaustive, plus the path
  4 to 15), `tb_output_unit`, `tb_vc_allocator`, `tb_switch_allocator` and
  `tb_crossbar` compare the blocks with models written in the testbench,
  under random stimulus.
* **`tb_input_port`.** Covers a normal packet, a single-flit request, and
  both dead-flit cases. It checks that dead VCs never request while the
  others keep working.
* **`tb_ht_trojan`.** Checks both variants, the N-1 limit, p = 0, and the
  measured trigger rate at p = 0.05 (about 3000 in 60000).
* **`tb_noc_router`.** Runs a clean router and an always-firing HT-HB router
  side by side under random traffic on all five inputs. The clean router
  must deliver every packet on its XY port, whole and in order, with a
  3-cycle hop. In the infected router exactly 3 packets per input die, and
  the dead VCs are never released upstream.
* **`tb_network_adapter`.** Loops the adapter back on itself and checks the
  fields, the payload and the latency.
* **Mesh testbenches.** `tb_ht_noc_mesh` (HT-HB), `tb_ht_noc_mesh_bh`
  (HT-BH) and `tb_ht_noc_mesh_nht` (baseline) run cache-like traffic on the
  whole mesh: 40 misses per tile, at most 4 outstanding, with 5-flit replies.
  All three use `mesh_harness`.
  * The baseline must answer every miss, and the first request from tile 4
    to tile 15 must take 20 cycles.
  * With a Trojan, the packets that never arrive must be exactly the
    attacked ones, and all of them must route through router 6. HT-BH must
    lose only replies, and some ports must reach the 3-of-4 limit.
  * The harness counts VC-allocation and credit stalls in router 5 towards
    router 6, and the tiles that stall. It fails if any of them never
    happens.
  * These runs use p = 0.25 so that the limit is reached in a short
    simulation.
* **`tb_ht_noc_mesh_p10` and `tb_ht_noc_mesh_p15`.** Repeat the HT-HB run
  at p = 0.1 and p = 0.15. At the higher rate every tile may end up stalled.
* **`tb_ht_noc_mesh_full`.** Runs the same exercise on the mesh exactly at
  its defaults (HT-HB, p = 0.05).

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv tb/tb_ht_noc_mesh.sv --top-module tb_ht_noc_mesh
./obj_dir/Vtb_ht_noc_mesh
```

The same pattern works for any other testbench. The mesh testbenches take
about a minute to compile with `-j 4` and run in well under a second.

## Known limits

* Statistics such as average buffer occupancy, IPC or miss penalty are not
  computed. The testbenches check the mechanisms (dead flits, lost VCs,
  congestion, stalled tiles), not those figures.
* Ejection assumes the tile always accepts a received packet.
* The Trojan's observation outputs exist for testing. Leave them unconnected
  to model a hidden Trojan.
