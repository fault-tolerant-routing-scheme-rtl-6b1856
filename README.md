# Fault-tolerant mesh NoC with dynamic buffer and MUX swapping

Permanent defects in a network-on-chip router usually sit in its two largest
parts: the input buffers and the crossbar. A common answer is to declare the
whole router, or the whole port, dead and route around it. That wastes a
router that is mostly healthy, and on a mesh it can cut the network into
pieces. This design keeps a partly faulty router in service. It lends its
healthy resources to the broken port at run time:

* **Dynamic buffer swapping (DBS).** When an input buffer is faulty, packets
  that arrive on that link are steered, one packet at a time, into a healthy
  buffer borrowed from another port. The ports take turns lending their buffer.
* **Dynamic MUX swapping (DMS).** When a crossbar output MUX is faulty, its
  neighbour on a ring of MUXes time-shares itself between its own output and
  the broken one.
* **Broken link wires** are treated as hard link faults, and the routing
  steers around them.
* **Deadlock recovery.** A counter notices packets that stay blocked. It first
  reroutes them, then hands them to the local network interface, which sends
  them again later.

Faults are found by a CRC carried with every flit, checked at each router
input and output, and by a built-in self-test (BIST) of buffers and MUXes.

All RTL is SystemVerilog-2017 in `rtl/`. Every module has a self-checking
testbench in `tb/`.

## Network and flits

`noc_mesh` builds a `DIMX` x `DIMY` mesh, 8 x 8 by default. Router (x, y) is
node `y*DIMX + x`; x grows towards East and y grows towards South. Each node
has a five-port router (North, East, South, West, Local) and a
`network_interface` that connects the Local port to a processing element (PE).
The PE side of every node is a top-level port.

A flit is 42 bits: a 2-bit type, a 32-bit payload and an 8-bit CRC.

| type | meaning |
|---|---|
| 01 | head |
| 00 | body |
| 10 | tail |
| 11 | single-flit packet |

The head payload holds the destination x/y in `[31:28]/[27:24]` and the source
x/y in `[23:20]/[19:16]`. Bits `[15:0]` are free for the application.
Packets are 2 to 8 flits long (`MAX_PKT = 8`), and switching is wormhole.

The CRC is CRC-8 with polynomial 0x07, taken over the 34 type and payload
bits. The network interface computes it once at injection; nothing
recomputes it afterwards. So a flit corrupted anywhere keeps a wrong CRC all
the way to its destination, and the PE sees `pe_crc_err`.

## Link handshake: CTS and CPS

Each link carries `valid` and `flit` downstream. Two status signals come back
upstream, both driven from registers of the receiving router:

* **CTS (current transmit status).** A flit moves on a clock edge where
  `valid` and CTS are both 1. CTS also serves as buffer-space flow control.
* **CPS (current port status),** 2 bits:

| CPS | meaning for the sender |
|---|---|
| 00 | normal |
| 01 | this port's buffer is about to be lent to a faulty port: finish the current packet, start no new one |
| 10 | blocked: the port's buffer is faulty or lent out |
| 11 | hard link fault: never use this link again (this design's own code) |

CPS 01 and 10 exist so that two packets can never interleave in one buffer
while it changes owner.

## The router

Datapath, in the order a flit passes through it:

    input CRC check -> buffer swapper -> test MUX 1 -> input FIFO (8 flits)
      -> test MUX 2 -> crossbar with MUX swapper -> output CRC check
      -> output register -> link

The control blocks are:

* `routing_unit`: odd-even route computation, one per input;
* `switch_allocator`: round-robin allocation with wormhole locking;
* `dbs_controller` and `buffer_swapper`: buffer swapping;
* `dms_controller` and `crossbar_dms`: MUX swapping;
* `deadlock_detector`: blockage detection and recovery;
* `bist_unit`: the self-test.

In an idle router a flit is accepted on an output link 3 cycles after it was
accepted on the input link. The three stages are FIFO write, route
computation and switch traversal into the output register. The `stat` output
(`rstat_t` in `noc_pkg`) shows:

* the fault maps;
* the DBS state;
* DMS activity;
* one-cycle strobes for each recovery event.

### Buffer swapping (DBS)

`dbs_controller` handles one faulty buffer per router and is a three-state
machine. It has three registers:

* FP_R, the faulty port;
* SP_R, the substitute port;
* DP_R, the port whose buffer currently receives the faulty link's packets.

| state | faulty port sends | substitute port sends | what happens |
|---|---|---|---|
| S0 | CPS 10, CTS 0 | normal | The faulty link is blocked. When a flit waits on it, the next healthy port in round-robin order becomes the substitute, and the machine moves to S1. |
| S1 | CPS 10, CTS 0 | CPS 01, CTS 1 | The substitute finishes the packet it is receiving. Once its buffer is empty and no packet is open on its link, the machine moves to S2. |
| S2 | CPS 00, CTS 1 | CPS 10, CTS 0 | `buffer_swapper` connects the faulty link to the substitute buffer. When that packet's tail has been accepted, the machine returns to S0. |

The candidates for substitute include the Local port. Each swap picks the
next healthy port after the previous substitute, so the lost capacity is
spread over all ports.

A packet held in a borrowed buffer may have to leave through the lending
port's own direction. For this reason the crossbar MUXes have five inputs
(U-turn included), where a normal router would use 4:1 MUXes.

### MUX swapping (DMS)

The five output MUXes form a ring in the order N, E, S, W, L. When MUX `fm`
is faulty, the MUX before it in the ring, `sm = ring_prev(fm)`, drives both
outputs. North serves East, and Local serves North.

`crossbar_dms` has a switch on each output that selects either `sm`'s output
or `fm`'s own. `dms_controller` decides, cycle by cycle, which output `sm`
serves:

* it alternates when both outputs have a flit ready;
* otherwise it serves whichever output has one.

Each output keeps its own output register and link, so the two outputs share
only the MUX's bandwidth. One faulty MUX per router is covered. A second
faulty MUX makes its output unusable, and the routing avoids it.

### Routing

`routing_unit` uses odd-even turn rules, which are deadlock-free on a
fault-free mesh. Among the allowed minimal outputs it prefers one that is
usable and has room. If every minimal output is dead, it takes any usable
non-minimal output. An output counts as dead if:

* the downstream CPS is 11 (hard link fault), or
* its MUX is faulty with no DMS cover.

A recompute request excludes the output the packet is currently waiting on.
An eject request forces the Local output. The route is kept in a register
until the tail flit leaves.

### Deadlock detection and recovery

Both DBS and fault-driven rerouting can create cyclic waits. Every input has
a counter. It starts when a head flit reaches the front of the buffer and
stops when the tail leaves. At `THRESH` cycles (default 64) recovery acts
as follows:

1. **Reroute.** If the head has not left yet, the route is computed again
   with the blocked output excluded.
2. **Eject.** If the packet blocks again and the network interface reports
   room for a whole packet (`ni_free`), the packet goes out through the Local
   port. The network interface sees that the packet is addressed to another
   node. It stores the whole packet in its 16-flit re-send memory and injects
   it again, ahead of new PE traffic. Without room, step 1 repeats.

A packet whose head has already left cannot be redirected. It waits, and
`dl_detect` reports it.

### Fault detection and self-test

**Input CRC error.** The input link is marked as a hard fault. The router
returns CPS 11 and CTS 0 on that link from then on. A packet open on the
link is closed with a zero-payload tail, so downstream routers release their
wormhole locks. The upstream router discards flits it holds for that output,
and its route computation avoids the link from then on.

**Output CRC error.** This means the flit was corrupted inside the router. The
flit is replaced by a closing tail, or dropped if it was a head, and the
router starts its self-test.

**Self-test** (`bist_unit`). It runs after reset, on `bist_req`, and after an
output CRC error. During it the links are stalled.

1. All buffers are flushed.
2. Every slot of every buffer is written with an LFSR pattern (test pattern 1)
   and read back into a per-buffer signature register (MISR).
3. A second pattern is driven into all crossbar inputs (test pattern 2). Each
   MUX steps through all five inputs, and a MISR compacts each MUX output.
4. Each signature is compared with a reference signature. A mismatch sets the
   buffer or MUX bit in the fault map that DBS and DMS use.

The test lasts `3 + 2*DEPTH + 5*XB_PAT` cycles (39 by default). Packets cut by
the flush are closed with zero-payload tails. Body flits that arrive later
without a head are discarded.

So a packet can reach its destination **truncated**: its last flit is a tail
with payload 0 and it has fewer flits than were sent. This happens only when a
fault appears while traffic is running. Faults already present at power-on
cost capacity, not data.

## Where this design departs from the original scheme, or fills gaps

* **Crossbar MUXes have 5 inputs, not 4.** This is needed by buffer swapping,
  as explained above.
* **Link faults are found by the input CRC.** There is no link self-test
  between neighbouring routers. An error on a link is treated as permanent.
* **No leader election.** Deadlocks are broken by reroute and eject only.
  Arbiter-state preemption is not implemented.
* **The network interface re-sends ejected packets by itself.** The PE is not
  involved.
* **One faulty buffer and one faulty MUX per router are tolerated.** Further
  faults block the port, and routing avoids it.
* **Choices of this implementation:**
  * widths and the flit format;
  * the CRC polynomial;
  * LFSR/MISR polynomials and the test sequence;
  * the deadlock threshold (64);
  * the re-send memory size (16);
  * the misroute fallback;
  * the zero-payload truncation tails;
  * CPS code 11.
* **Verification-only inputs.** `fi_buf`, `fi_mux` and `fi_link` flip data bit
  0 at a buffer output, at a MUX output, or on a link's wires. They exist so
  that faults can be injected. Tie them to 0 in a real design. Do the same
  with `bist_req` unless periodic testing is wanted.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| DIMX, DIMY | 8, 8 | noc_mesh, router | mesh size (up to 16 x 16 with 4-bit coordinates) |
| DEPTH | 8 | noc_mesh, router, bist_unit | input buffer depth in flits |
| THRESH | 64 | noc_mesh, router, deadlock_detector | blocked cycles before recovery |
| RS_DEPTH | 16 | noc_mesh, network_interface | re-send memory in flits (at least MAX_PKT) |
| XB_PAT | 4 | router, bist_unit | self-test cycles per crossbar input |
| MAX_PKT | 8 | noc_pkg | longest packet in flits |

## Simulating

Each testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_noc_mesh \
        -y rtl -y tb +libext+.sv rtl/noc_pkg.sv tb/tb_noc_mesh.sv -o sim
    obj_dir/sim

Replace `tb_noc_mesh` with any testbench name.

| testbench | what it exercises |
|---|---|
| `tb_<block>` | each leaf block against an independent model or hand-worked expectations |
| `tb_router` | one router in a 3 x 3 position, driving the 3-cycle latency, every DBS state, DMS, link and intra-router CRC errors, self-test, reroute, eject and misroute |
| `tb_noc_mesh` | 4 x 4 mesh end to end: random packets from every node, faults present at power-on plus faults appearing during traffic, a PE that stalls to force deadlock recovery. Every mechanism is counted and must occur. |
| `tb_noc_mesh_full` | the same scenario on the default 8 x 8 mesh, with no parameter overrides |
| `tb_noc_load` | latency sweep on the default 8 x 8 mesh (see below) |

Building the 8 x 8 mesh takes a few minutes. The simulation itself is fast.

## Measured behaviour

`tb_noc_load` sends uniform random traffic with these settings:

* packets of 2 to 8 flits;
* a Bernoulli injection per node and cycle;
* 2,000 warm-up cycles and 5,000 measured cycles per point.

It runs once fault-free, and once with eight routers that each have one
faulty input buffer handled by DBS. Latency is in cycles, from the packet's
creation in the source queue to the delivery of its tail. All packets arrive
intact in both cases.

| PIR (packets/cycle/node) | fault-free latency | with 8 faulty buffers (DBS) |
|---|---|---|
| 0.005  | 24.4 | 24.7 |
| 0.007  | 24.7 | 25.0 |
| 0.009  | 25.5 | 25.6 |
| 0.013  | 26.3 | 26.6 |
| 0.015  | 26.5 | 27.1 |
| 0.0215 | 28.6 | 29.5 |
| 0.023  | 28.8 | 29.8 |
| 0.025  | 29.4 | 30.3 |

Buffer swapping costs little at low load. The gap grows with load, because a
borrowed buffer serves two links. Up to 0.025 packets/cycle/node, the
network stays well below saturation in both cases.
