# Self-testing mesh NoC router with CRC error detection

Routers in a network-on-chip hold every packet in their input buffers for at
least a clock. A bit flipped there by a particle strike, by interference or by
a defect passes on unseen. This design adds two things to a plain mesh router
so that it notices such faults by itself:

1. **Online error detection.** Every input FIFO takes a CRC of each flit as it
   is written and takes the CRC again as the flit is read out. If the two
   differ, the flit was altered while it was stored. The router counts these
   events and logs the last one.
2. **Router self-test ("router under test" mode).** On request, a router
   finishes the packets it has already started and empties itself. It then cuts
   itself off from its neighbours and sends a fixed set of test flits through
   its own buffers and crossbar. It reports pass or fail, so a host can tell
   which router in the mesh is faulty.

The default network is a 4 × 4 mesh with dimension-order (XY) routing. The
router around these two additions is deliberately simple: single-channel,
wormhole-switched, input-buffered, with valid/ready links.

## The mesh

```
  y=3   R12 - R13 - R14 - R15
         |     |     |     |
  y=2   R8  - R9  - R10 - R11          Rk sits at x = k % 4, y = k / 4
         |     |     |     |           node Nk hangs off port 0 of Rk
  y=1   R4  - R5  - R6  - R7
         |     |     |     |
  y=0   R0  - R1  - R2  - R3
        x=0   x=1   x=2   x=3
```

Each router has five ports, numbered as in `noc_pkg::port_e`:

| port | name  | connects to                       |
|------|-------|-----------------------------------|
| 0    | local | the node (processing element)     |
| 1    | north | router (x, y+1), its south port   |
| 2    | east  | router (x+1, y), its west port    |
| 3    | south | router (x, y-1), its north port   |
| 4    | west  | router (x-1, y), its east port    |

At the edge of the mesh, an unused input is held idle and an unused output is
always ready. XY routing never chooses such a port for a destination inside
the mesh. The nodes are not part of this RTL: the top level `noc_mesh` brings
out each node's injection link (`node_in_*`) and ejection link (`node_out_*`).

### Flits and packets

A flit (`noc_pkg::flit_t`, 41 bits) is what a link moves in one clock:

| bits   | field   | meaning                               |
|--------|---------|---------------------------------------|
| 40     | `tail`  | last flit of its packet               |
| 39:36  | `dst_y` | destination row                       |
| 35:32  | `dst_x` | destination column                    |
| 31:0   | `data`  | payload                               |

Every flit carries its destination, so any flit can be routed by itself. A
packet is one or more flits. The last flit has `tail` set, so a single-flit
packet is one flit with `tail` set. All flits of a packet must carry the same
destination.

Links use valid/ready. A flit moves on a clock edge where both are high.
`ready` depends only on registers (the FIFO is not full), so no combinational
path runs back through a router.

## Inside a router

`noc_router` = `noc_router_core` + `error_logger` + `router_bist`, plus the
muxes that hand the core's ports to the self-test.

**Core datapath (`noc_router_core`).** Each input has a `crc_fifo` (4 flits
deep). The flit at the head of each FIFO is routed by `xy_route`: east or west
until the column matches, then north or south, then local. It then requests
that output. Each output has a round-robin `rr_arbiter`. A grant is only given
when the output's downstream side is ready. When a non-tail flit crosses an
output, that output is locked to its input until the tail crosses, so two
packets never interleave on a link. The crossbar is combinational. A flit at
a FIFO head is written into the next router's FIFO on the same clock edge,
which gives **one clock per hop**: from node 0 to node 15 (six hops) the flit
is at the ejection port six clocks after it was accepted. Each output moves
at most one flit per clock.

XY routing on a mesh with wormhole switching is deadlock-free: a packet never
turns from a y-link back onto an x-link, so no cycle of waiting locks can form.

## Detecting corrupted flits

`crc_fifo` stores each flit with an 8-bit CRC beside it:

```
in_flit ──► crc_gen ──► crc ─────────┐
   │                                 ▼
   └──► (^ fault_mask) ──► [ flit | crc ] × DEPTH ──► head flit ──► crc_gen ──► ≠ ? ──► out_crc_err
```

The CRC is CRC-8 with generator x⁸ + x² + x + 1 (0x07), processed MSB first,
with initial value 0 and no final XOR. Its check value over the ASCII string
"123456789" is 0xF4. The CRC covers all 41 bits of the flit, so a flipped
destination bit is caught as well as a flipped data bit. A flit whose check
fails is **still forwarded**: the mechanism detects and reports, it does not
correct, drop or retransmit.

The check sits beside the flit path, not in it. The CRC is taken in the
same clock the flit is written, and compared in the same clock it is read,
so detection adds no clock to the hop latency and takes nothing from
throughput.

Notice what this covers. It checks the storage of the input buffer, the part
of a router that holds flits longest. It does not check the crossbar, the
links or the routing logic: a flit sent to the wrong output arrives with a
valid CRC. The self-test is there to cover those paths.

**Error log (`error_logger`).** The core raises `pop_err[p]` for the clock in
which input p forwards a flit that failed its check. The logger keeps:

- `err_count`: 16 bits, saturating, counting every such flit;
- `err_ports`: one sticky flag per input port;
- `last_err_port` and `last_err_flit`: the most recent failure. If several
  ports fail in the same clock, the lowest-numbered port is kept.

`err_clear` empties the log. All of it is registered: it shows a failure one
clock after the flit was forwarded.

**Fault injection.** Every input FIFO has a `fault_mask` input (41 bits). Its
bits are XORed into a flit as it is written, after the CRC has been taken.
Holding a mask high models a permanent (stuck) fault. Pulsing it for one
clock models a transient upset. Tie it to zero in a real system. The
testbenches use it to create the faults that the two mechanisms must find.

## Router under test: the self-test

`router_bist` is a five-state controller:

| state  | router's links                          | leaves when                                      |
|--------|-----------------------------------------|--------------------------------------------------|
| IDLE   | normal                                  | `test_start` pulse                               |
| DRAIN  | inputs close at packet boundaries       | router empty: no flit stored, no output locked, no packet half received |
| SEND   | isolated (`test_mode`)                  | the vector's flit is accepted (or skipped)       |
| WAIT   | isolated                                | a flit appears at any output, or a CRC error, or TIMEOUT (32) clocks pass |
| FLUSH  | isolated                                | router empty again → `test_done` pulse, back to IDLE |

While `test_mode` is high, the router shows not-ready on all its inputs and
not-valid on all its outputs to its neighbours. The core's inputs are driven
by the controller, and all core outputs are observed by it and are always
ready.

**Test vectors.** Ten single-flit vectors are built into the logic. Each one
names an input port, an expected output port and a data pattern:

| # | in    | out   | data        |   | # | in    | out   | data        |
|---|-------|-------|-------------|---|---|-------|-------|-------------|
| 0 | local | north | AAAA_AAAA   |   | 5 | local | south | 0F0F_0F0F   |
| 1 | north | east  | 5555_5555   |   | 6 | north | west  | CCCC_CCCC   |
| 2 | east  | south | FFFF_0000   |   | 7 | east  | local | 3333_3333   |
| 3 | south | west  | 0000_FFFF   |   | 8 | south | north | FFFF_FFFF   |
| 4 | west  | local | F0F0_F0F0   |   | 9 | west  | east  | 0000_0001   |

Every input buffer and every output is used twice, with complementary
patterns. A vector's destination is the router itself (local output) or the
neighbour behind the expected output. So the router's own XY logic must steer
the flit to that output. A vector whose neighbour would lie outside the mesh
is skipped: an inner router runs all ten, an edge router eight, a corner
router six.

A vector **passes** only if, in the clock its flit appears, the flit is on
the expected output and on no other, it is bit-for-bit the flit that was sent,
and no input reports a CRC error. Anything else fails the vector, and so does
silence for TIMEOUT clocks. `test_fail_count` gives the number of failed
vectors, and `test_pass` is set when it is zero. A test takes about
2 clocks per vector once the router is empty: around 25 clocks on an idle
inner router.

### Draining without deadlock

This is the part that needs the most care. When a router starts a test, it
may be in the middle of receiving a packet. If it closed that input at once,
the packet's tail could never arrive. The output it holds in this router
would then stay locked and the router would never be empty. So each input
keeps a *mid-packet* bit and closes only at the next packet boundary. A flit
accepted in the very clock the controller checks for emptiness also counts as
"not empty".

Testing several routers at once brings a second trap. Suppose two neighbours
A and B both drain, A holds flits for B and B holds flits for A. If each
closed its input from the other, both would wait forever. To avoid this,
every router tells its four neighbours when it is draining (`draining` →
`nbr_draining`). **A draining router keeps accepting flits from a draining
neighbour.** This always ends:

- Flits enter the set of draining routers only from routers in it. Nodes and
  non-draining neighbours are shut out.
- Every flit moves towards its destination, and XY paths never revisit a
  router, so the flits in the set leave it in bounded time.
- A neighbour already under test had to be empty to enter the test. Its test
  ends on its own.

The end-to-end testbench starts a self-test on all sixteen routers at once
while traffic runs. It confirms that all of them finish in a few dozen clocks
and that no flit is lost.

## Parameters

| module            | parameter    | default | notes |
|-------------------|--------------|---------|-------|
| `noc_mesh`        | `MESH_X`, `MESH_Y` | 4, 4 | mesh size; at most 16 × 16 with 4-bit coordinates |
| `noc_mesh`, `noc_router`, `noc_router_core` | `FIFO_DEPTH` | 4 | flits per input buffer |
| `noc_router`, `noc_router_core`, `router_bist` | `MY_X`, `MY_Y` | 0, 0 | router position, set by the mesh |
| `router_bist`     | `TIMEOUT`    | 32      | clocks to wait for a test flit |
| `crc_gen`         | `IN_W`, `CRC_W`, `POLY` | 41, 8, 0x07 | |
| `error_logger`    | `CNT_W`      | 16      | error counter width |
| `noc_pkg`         | `DATA_W`, `COORD_W`, `CRC_W` | 32, 4, 8 | change here to change the flit |

## Files

| file | contents |
|------|----------|
| `rtl/noc_pkg.sv` | flit type, port enumeration, widths |
| `rtl/crc_gen.sv` | combinational CRC |
| `rtl/crc_fifo.sv` | input FIFO with CRC check and fault-injection hook |
| `rtl/xy_route.sv` | XY route computation |
| `rtl/rr_arbiter.sv` | round-robin arbiter |
| `rtl/error_logger.sv` | error counter and log |
| `rtl/noc_router_core.sv` | 5-port wormhole router |
| `rtl/router_bist.sv` | self-test controller and its vectors |
| `rtl/noc_router.sv` | router with detection, log and self-test |
| `rtl/noc_mesh.sv` | top level: the mesh |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/bist_router_model.sv` | behavioural router used only by `tb_router_bist` |

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each also has a watchdog that counts a
failure if the run hangs. With Verilator 5, from the folder that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert --top-module tb_noc_mesh \
    -y rtl -y tb +libext+.sv rtl/noc_pkg.sv tb/tb_noc_mesh.sv -o sim
./obj_dir/sim
```

Replace `tb_noc_mesh` by any other testbench name. The package must be listed
first. The simulator starts uninitialised state at random values
(`+verilator+rand+reset+2`). The design resets everything that is read, with
an active-low asynchronous `rst_n`.

What the testbenches establish:

- `tb_crc_gen`: the standard CRC-8 check values, and 200 random flits
  against a bit-serial LFSR reference.
- `tb_xy_route`: 9,216 coordinate combinations against the XY rule.
- `tb_rr_arbiter`: grants against a pointer model, and fairness.
- `tb_crc_fifo`: order, full/empty, one-clock latency, and flagging of
  stored flits corrupted at random against a queue model.
- `tb_error_logger`: counts, saturation, sticky flags, last entry, clear.
- `tb_noc_router_core`: about 4,000 flits on all ports with random
  backpressure. It checks XY port, order, no interleaving, one-clock latency
  and CRC flagging.
- `tb_router_bist`: the controller against a behavioural router. A healthy
  router passes. Corrupted data, a CRC error or lost flits each fail exactly
  the two affected vectors. An inner router runs 10 vectors and a corner
  router 6.
- `tb_noc_router`: traffic with a self-test started mid-stream. It checks
  that the links are silent under test, that no flit is lost, that a
  transient fault is logged, and that a stuck bit in the south FIFO fails
  exactly the two vectors entering there.
- `tb_noc_mesh` (default parameters, full 4 × 4): latency of six clocks
  corner to corner; about 15,000 random flits delivered in order; a self-test
  of all routers at once under traffic, all passing; a transient fault logged
  only by the router where it happened; a stuck bit in router 6 found by
  self-test, with only router 6 failing. It also counts injection stalls,
  ejection backpressure, output contention, multi-flit packets, drain cycles,
  flits passed between draining neighbours, detected CRC errors and self-test
  outcomes, and fails if any of them never happened.

## What is specified and what is chosen here

These points follow the intended design:

- a 4 × 4 mesh with XY routing;
- a CRC comparison across each router's input FIFOs, to detect corrupted
  packets;
- an error counter per router, kept as a packet log;
- a self-test mode driven by test vectors fixed in the router's logic, used
  to single out the faulty router;
- five ports per router with port 0 on the node, and routers numbered from
  the bottom-left corner along rows.

These are choices of this implementation:

- **The router itself.** The enhancements are meant for an existing,
  generator-built NoC router whose internals are not part of this
  description. This design uses a single-channel wormhole router with
  valid/ready links instead: the simplest router that does the job. The fault-detection and self-test
  logic does not depend on that choice, but latency and throughput figures
  are those of this simpler router.
- **Routing.** The routing was described as adaptive XY, but no adaptive
  rule was given, so routing here is deterministic XY.
- **Sizes.** Flit layout and widths, FIFO depth 4, CRC-8 with polynomial
  0x07, 16-bit error counter, TIMEOUT 32.
- **The self-test.** The ten vectors and their patterns, the drain procedure,
  the neighbour rule for tests running at the same time, and the pass rule.
- **Error handling.** A failed CRC check is reported and the flit is still
  delivered. Nothing is dropped, corrected or retried, and there is no
  rerouting around a faulty router.
- **Fault injection.** The `fault_mask` hook.

## Limits

- Only buffer storage is checked online. Faults in the crossbar, the
  arbiters or the links show up only in a self-test, or through a flit
  arriving at the wrong node.
- A router under test stops all traffic through it for a few dozen clocks.
  Its neighbours see back-pressure, not rerouting.
- The self-test is single-flit. It exercises locking only by releasing it.
  Multi-flit wormhole behaviour is tested in simulation, not by the built-in
  test.
- `test_start` should be given to a router in normal mode. While a test
  runs, a new pulse is ignored.
