# Heterogeneous shared-buffer NoC router

In a mesh network-on-chip, the links do not all carry the same load. Links in
the middle of the chip, or those next to a memory controller, carry much more
traffic than links at the edge. In a homogeneous router every port gets the
same width and the same number of virtual channels (VCs), so the busy links
are too narrow or the quiet ones are wasted.

This router lets every unidirectional port have its own link width and its
own VC count:

- `IP_PFC[i]` / `OP_PFC[i]`: flits per clock on input or output port *i*.
- `IP_VC[i]` / `OP_VC[i]`: VCs on input or output port *i*.

All ports run on one clock. An input that is wider than the output it feeds
has to be decoupled from that output. The router does this with a
space-time-space organisation: input buffers, a first crossbar, a set of
*shared buffers* that are ordered by departure time, and a second crossbar to
the outputs. The timing of each flit is planned when it enters a shared
buffer, not when it leaves.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017) and has been checked
with Verilator 5 and the slang front end of Yosys.

## Datapath

```
 in_link[p][0..IP_PFC-1]                                   out_link[p][0..OP_PFC-1]
   |                                                                   ^
 input_port (per-VC FIFOs, XY route per VC)                      output_port
   |   \__ vca_req --> vc_allocator (free output VCs)            (LT register,
   |                                                              credit counters)
   v                                                                   ^
 ts_sba  -- picks flits, stamps departure slot, picks buffer           |
   |                                                                   |
 XB1 (crossbar, SB*SPEEDUP write ports)                     XB2 (crossbar)
   |                                                                   ^
   +--> shared_buffer[0..SB-1]  (slot 0 = departs now) --> xb2_alloc --+
```

| File | Block |
|---|---|
| `rtl/hnoc_pkg.sv` | Types (flit, lane, credit, cell tag, events) and default port vectors |
| `rtl/hnoc_router.sv` | Top level; wires the whole pipeline |
| `rtl/input_port.sv` | One input port: `vc_buffer`, one `route_xy` per VC, per-VC packet state, credit return |
| `rtl/vc_buffer.sv` | Per-VC FIFO that can take and give up to PFC flits per clock |
| `rtl/route_xy.sv` | Dimension-ordered XY routing |
| `rtl/vc_allocator.sv` | Free-VC list per output, round-robin grant |
| `rtl/ts_sba.sv` | Time stamping and shared-buffer allocation |
| `rtl/shared_buffer.sv` | Time-slotted circular buffer with SPEEDUP write ports |
| `rtl/crossbar.sv` | Multiplexer crossbar, used as XB1 and XB2 |
| `rtl/xb2_alloc.sv` | Maps the departing flits of all shared buffers to output lanes |
| `rtl/output_port.sv` | Egress link register and downstream credit counters |

## Time slots: the core idea

Each shared buffer holds `SB_DEPTH` cells, and each cell stands for a
departure time. Cell *t* holds the flit that leaves *t* clocks from now. Each
clock the buffer rotates by one (a head pointer moves). The flit in slot 0 of
every buffer goes through XB2 to its output. Nothing reads a buffer by
address. Whatever has been written into slot *t* simply comes out *t* clocks
later.

A flit can be written into any free cell of a buffer. This makes it a
push-in/first-out queue. A buffer has `SPEEDUP` write ports, so it can take up
to that many flits per clock, into different cells.

The scheduler has to solve two problems. The first is **departure
conflicts**: no output may get more than `OP_PFC[o]` flits in one slot, summed
over all buffers. The second is **arrival conflicts**: flits that arrive in
the same clock may not need more than `SPEEDUP` write ports of one buffer, or
more than one cell of one buffer in one slot. `ts_sba` solves both problems
within one clock, as follows.

1. **Input order.** The five inputs are visited in a rotating order. The
   starting input moves on by one every clock, for fairness.
2. **VC choice.** Each input picks one VC by round robin. To be picked, a VC
   must hold flits and an output VC, and its output VC must have a credit.
3. **Stamping.** From that VC, up to `IP_PFC` flits are taken, never past a
   packet's tail. Each flit gets the earliest slot *t* that meets three
   conditions:
   - *t* is at least 1, and not earlier than the slot of the previous flit of
     the same VC (this keeps packet order);
   - output *o* has fewer than `OP_PFC[o]` flits in slot *t*, counting flits
     already stored and flits placed earlier in this clock;
   - some enabled buffer has a free cell at *t*.

   A slot skipped because its output was full is a departure conflict. If an
   input is wider than its output, its flits are spread across several slots.
4. **Buffer choice.** The flit goes to the lowest-index buffer that meets
   three conditions:
   - its cell at *t* is free;
   - it still has a write port left this clock;
   - if the previous flit of the same VC sits in the same slot, the buffer's
     index is higher than that flit's buffer. XB2 hands out output lanes in
     ascending buffer order, so this keeps the two flits in order on a wide
     link.

   If no buffer qualifies, that is an arrival conflict. The flit, and the rest
   of its VC's flits, stay in the input buffer and try again next clock.
5. **Reservation.** Each input port keeps `RSV` cells for itself. A port
   that already holds at least `RSV` cells may take another cell only if the
   free cells outnumber the other ports' unused reservations. This stops a
   single flow from filling every buffer.
6. **Credits.** A flit is taken only if its output VC has a credit. The
   credits it spends are subtracted in `output_port`.

The number of buffers decides what can be guaranteed:

- `SB >= ΣOP_PFC`: every output can run at its full width when the slots are
  free.
- `SB >= ceil((ΣIP_PFC - SPEEDUP) / SPEEDUP) + ΣOP_PFC`: arrival conflicts
  cannot happen.
- `SPEEDUP = ΣIP_PFC` and `SB = ΣOP_PFC`: the router behaves like an
  output-buffered router.

The defaults use fewer buffers than any of these bounds, so both kinds of
conflict do happen (see below).

## Packet life cycle and latency

- An input VC is IDLE, WAIT (routed, waiting for an output VC) or ACTIVE
  (owns an output VC).
- When a head flit reaches the front of an IDLE VC, it is routed on the next
  clock edge (XY: x first, then y). It gets an output VC on the edge after
  that.
- From then on, all flits of the packet go through `ts_sba` without routing
  or allocation.
- The output VC goes back to the free list when the packet's tail flit leaves
  through XB2.
- Each flit removed from an input buffer returns one credit upstream, one
  clock later. Credit counters in `output_port` start at `VC_DEPTH`.

Through an idle router, the head flit needs four clock edges after it is
written into the input buffer:

1. routing;
2. VC allocation;
3. stamping and the write into slot 1;
4. the output link register, after the flit leaves the shared buffer.

Counted from the clock a source drives a body flit of an open packet to the
clock the flit is on the output link, the minimum is 3 cycles. The testbenches
check this figure.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `IP_PFC`, `OP_PFC` | `'{2,1,1,1,1}`, `'{1,1,2,1,1}` | flits per clock per port (local, north, east, south, west) |
| `IP_VC`, `OP_VC` | `'{2,2,3,2,2}`, `'{2,3,2,2,2}` | VCs per port |
| `SB` | 4 | shared buffers |
| `SPEEDUP` | 2 | write ports per shared buffer |
| `SB_DEPTH` | 64 | time slots per buffer (64 × 32 bit = 256 B) |
| `VC_DEPTH` | 8 | flits per input VC, and the initial downstream credits |
| `RSV` | 2 | cells reserved per input port |
| `FLIT_W`, `MAX_PFC`, `MAX_VC`, `COORD_W` (package) | 32, 2, 4, 4 | flit width, widest link, most VCs per port, mesh coordinate bits |

`SB` = 4 with `SPEEDUP` = 2 is the configuration reported as the best
trade-off between performance and area/power: four buffers with a
write speed-up of two. The flit width is 32 bits. The port vectors, the
buffer depths and `RSV` are this design's own choices. To model a different
router, override the vectors. Lanes at or above a port's PFC, and VCs at or
above its VC count, are present in the port arrays but are never used. For
links wider than 2 flits, raise `MAX_PFC` in `hnoc_pkg`.

The head flit carries the destination in bits [3:0] (x) and [7:4] (y).
North means larger y, and east means larger x.

## Where this design departs from the published architecture

- **TS and SBA share a clock.** The original architecture runs time stamping,
  shared-buffer allocation and the XB1 write as separate pipeline stages.
  Here all three happen in one clock. The result is a shorter pipeline with a
  longer combinational path (see `ts_sba.sv`).
- **A slot needs a free cell.** The stamping step only gives a flit a slot in
  which some buffer has a free cell. So a flit that fails in the buffer-choice
  step has hit a write-port or ordering conflict, not a full slot.
- **The output VC is freed late.** It is freed when the tail flit physically
  leaves the router, not when the tail is stamped. This is simple and safe,
  but one packet on one VC cannot follow another back to back. After a
  tail, the next head of the same input VC still needs its routing and
  VC-allocation clocks, which adds to the gap. A single flow on one VC
  therefore leaves idle link cycles between packets, even when the link
  width divides the packet length; the published design loses cycles only
  when it does not (`OP_PFC - L mod OP_PFC` lanes idle in the packet's last
  link cycle). Two or more flows on different VCs hide the gap.
- **Defective buffers.** The `sb_disable` input keeps a buffer out of
  allocation. This is a small extension that the tests use.
- **Own choices where the architecture is silent:** round-robin VC choice,
  the reservation rule, credit timing and head-flit layout.
- **Defaults break the egress bound.** With four buffers and a total egress
  width of 6, no more than 4 flits can leave per clock.

## Verification

Each block in `rtl/` has a self-checking testbench `tb/tb_<block>.sv`. The
testbenches print `TB_RESULT checks=N failures=M` and have a watchdog.

- **Unit testbenches.** These compare the block with an independent model in
  the testbench. `tb_ts_sba` drives directed cases for each conflict type and
  for reservation, and then a random phase. In the random phase it checks
  every rule of the section above against a model of all buffer cells.
- **`tb_hnoc_router`.** This runs the whole router with 8-slot shared buffers,
  so that the reservation rule has to act. Five sources (`tb_src.sv`) with
  credits send 300 packets of 8 flits to random destinations. Five sinks
  (`tb_sink.sv`) check the route, packet integrity, lane use and minimum
  latency, and return credits. The sinks throttle for a while, and shared
  buffer 1 is disabled for 200 cycles. The testbench counts every mechanism
  and fails any that never fired:
  - departure conflict, arrival conflict, spreading, multi-write, reservation
    block, credit stall, VC wait and output merge;
  - both lanes of the 2-flit east link busy in one clock;
  - traffic delivered while a buffer was disabled.
- **`tb_hnoc_router_full`.** This is the same test with every parameter at
  its default.
- **`tb_hnoc_mesh`.** This joins 16 routers into a 4x4 mesh. The two ends
  of every link must agree on width and VC count, so all nodes use
  `IP_PFC='{2,1,1,1,2}`, `OP_PFC='{2,1,2,1,1}`, `IP_VC='{2,2,2,3,2}` and
  `OP_VC='{2,3,2,2,2}`: eastward links are 2 flits wide and northward links
  have 3 VCs. The test runs three traffic patterns one after another:
  transpose, bit complement and uniform random, 30 packets per node each.
  It checks that every node receives exactly its pattern's packets, intact,
  and prints each pattern's drain time and accepted throughput. Building it
  with Verilator takes a few minutes.

Simulating with Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl --top-module tb_hnoc_router \
    rtl/hnoc_pkg.sv rtl/*.sv tb/tb_src.sv tb/tb_sink.sv tb/tb_hnoc_router.sv
./obj_dir/Vtb_hnoc_router
```

The unit testbenches need only the package and their block (plus the block's
sub-modules: `input_port` needs `vc_buffer` and `route_xy`).

## Not included

- Latency-versus-load sweeps, meshes larger than 4x4, and the CMP-trace
  studies (these need core, cache and memory models).
- Serial/parallel converters for links on other clock domains.
- Area and power models.
