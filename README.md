# A 4x4 mesh network-on-chip for a 14-core List Sphere Decoder

A multi-core detector for 4x4 MIMO with 64-QAM (a List Sphere Decoder, LSD)
is spread over 14 processing cores. The cores do not share a bus. They
exchange messages over a packet-switched network-on-chip: sixteen 5-port
switches in a 4x4 mesh, one network interface (NI) per core, 64-bit links
(32-bit as an alternative) and 64-flit buffers on every link. This repository
holds synthesizable SystemVerilog for that network: switch, routing table,
random-priority arbiter, link buffer, network interface and the assembled
mesh. It also holds self-checking testbenches, including one that runs the
decoder's complete message pattern through the full-size network.

The cores themselves are not part of the RTL. They are processors running
decoder software, and the design only defines them by how long they compute
and how much they send. In the end-to-end tests a behavioural model
(`tb/lsd_pc_model.sv`) plays them.

## The platform

The decoder is split into six functional units: an I/O controller (IOC), two
metric computation units (MCU1, MCU2), a metric enumeration unit (MEU), a
storage unit (SU) and a list unit (LU). In the balanced-load mapping used
here:

* PC1 runs the IOC.
* Five "A" cores (PC2 to PC6) each run SU, MCU1, MEU and LU.
* Eight cores (PC7 to PC14) run only MCU2, the heaviest unit at about 960
  cycles per request.

Each core hangs on one switch. The map below shows the placement. Switch
numbers are 1-based as drawn; the RTL index is one less. Y grows upwards.

```
 y=3   S13 PC1 IOC   S14 PC7 MCU2  S15 -         S16 -
 y=2   S9  PC2 A     S10 PC10 MCU2 S11 PC11 MCU2 S12 PC13 MCU2
 y=1   S5  PC8 MCU2  S6  PC3 A     S7  PC4 A     S8  PC14 MCU2
 y=0   S1  PC9 MCU2  S2  PC5 A     S3  PC12 MCU2 S4  PC6 A
       x=0           x=1           x=2           x=3
```

One decoded vector produces this traffic (sizes in bits):

| from -> to          | bits  | flits at 64 b | flits at 32 b |
|---------------------|-------|---------------|---------------|
| IOC -> each A       | 384   | 6             | 12            |
| each A -> each MCU2 | 4480  | 70            | 140           |
| each MCU2 -> each A | 12480 | 195           | 390           |
| each A -> IOC       | 8     | 1             | 1             |

The placement and the sizes are constants of the reference platform. The
placement is `transim_pkg::PC_SWITCH`. The sizes are parameters of the
traffic model.

## Flits and packets

A link carries one flit per cycle: `FLIT_W` data bits plus two sideband
bits, `{head, tail, data}`. A message becomes one packet:

* a header flit (head=1) whose data field holds `dst[3:0]`, `src[7:4]` and
  `len[17:8]`, where `len` is the number of payload flits (1 to 1023);
* `len` payload flits, the last with tail=1.

Every link is a one-way valid/ready channel. A flit moves at a rising edge
where both are high. `ready` is simply "the receiving buffer is not full",
so backpressure travels one hop per cycle and no flit is ever dropped.

## Inside a switch (`noc_switch`)

This is the part that takes the most care. The switch is organised as five
functions, which is how the original transaction-level switch model was
split:

1. **Switching.** Each of the 5 inputs has a 64-flit `flit_fifo`. Behind it
   sits one holding register: the flit "inside" the switch. A flit moves from
   the buffer into the holding register when the register is empty, or is
   being emptied this cycle.
2. **Route.** When the holding register holds a header, that input's
   `route_unit` turns (src, dst) into an output port number. This is a table
   lookup, combinational.
3. **Priority control.** Each output has a `prio_arbiter`. Among the inputs
   whose header wants that output, it grants the first one found when
   scanning upwards from a random start input. The start input is a free
   running 16-bit LFSR modulo 5, so no input is favoured in the long run.
   Each arbiter of each switch has its own seed.
4. **Crossbar.** The winner owns the output from the edge after the grant
   until its tail flit has left. This is wormhole switching: a 195-flit
   packet never needs to fit in one buffer, it is strung out over several
   switches. The output multiplexer shows the owner's holding register.
5. **Flow control.** A header that lost arbitration, or whose output is
   owned by another packet, simply stays in its holding register. Its input
   buffer fills behind it, and when that buffer is full the upstream switch
   sees `ready` low. A flit only leaves when the next buffer has room.

Timing through an idle switch: a header written into an empty input buffer
at edge t is in the holding register after t+1. It wins its output at t+2
and crosses at edge t+3. Payload flits then follow one per cycle. Every
packet pays one arbitration cycle per hop; there is no bypass.

Status outputs make these mechanisms visible:

* `overload`: an input buffer is full, one bit per input.
* `contention`: some header is waiting for an output.
* `blocked`: an output holds a flit that the next buffer cannot take.

The mesh brings them out per switch. They stand in for the original model's
"buffer overloaded" notice.

**Deadlock.** Routing is dimension-ordered: first along x, then along y. On
a mesh this cannot form a cyclic wait inside the network. Message-level
deadlock, where two cores each wait to send before reading, is a property of
the software on the cores. The traffic model avoids it: A cores and the IOC
always read.

## Routing table (`route_unit`)

The original model reads a generated table in which the row is the source
core, the column the destination core, and the entry the switch output
port. Here each switch has such a table, filled at elaboration time by
`transim_pkg::xy_route`. That function is the deterministic route scheme.

Port numbers are 0 local, 1 north, 2 east, 3 south, 4 west. XY routing
ignores the source, but the (src, dst) indexing is kept, so a
source-dependent table can replace the function without changing the
switch.

## Network interface (`noc_ni`)

The NI has two independent halves.

* **Write.** The core raises `wr_valid` with `wr_dst` and `wr_len` (in
  flits, at least 1) and the first word. The NI emits the header in that
  cycle if the switch is ready. It then passes one word per accepted beat,
  setting tail on the last. `wr_dst` and `wr_len` must stay steady for the
  whole message.
* **Read.** Flits from the switch land in a 64-flit receive buffer. The NI
  strips the header and delivers the payload words with the packet's
  `rd_src` and `rd_len`, plus `rd_first` and `rd_last` marks.
  `rx_overload` shows a full receive buffer.

In the original model the core calls a blocking transport function on the
NI. The two valid/ready streams are this design's version of that call.

## Running the decoder traffic

`lsd_pc_model` implements each core as a read, compute, write loop:

* The IOC sends the inputs to the A cores.
* Each A core computes (135 cycles) and sends a request to each of the 8
  MCU2 cores.
* Each MCU2 core serves its 5 requests one after another. For each it
  computes 960 cycles and answers with 12480 bits. While computing it does
  not read, so the other requests back up into the network.
* Each A core waits for all 8 answers, computes (482 cycles) and reports to
  the IOC.

The delays are sums of the per-unit averages the reference platform gives
for each functional unit. Every payload word carries (source, destination,
index) and is checked on arrival.

Results at the defaults (network cycles):

| test                 | configuration          | result |
|----------------------|------------------------|--------|
| `tb_noc_mesh`        | 64-bit links, 1 vector | latency 11183 cycles (the processing-only critical path is 5689) |
| `tb_noc_mesh_w32`    | 32-bit links, 1 vector | latency 16887 cycles |
| `tb_noc_mesh_stream` | 64-bit links, 4 vectors| 4 vectors in 30810 cycles, about 130 vectors per million cycles |
| `tb_noc_mesh_random` | 64-bit links, random all-pairs traffic | 560 messages of 1 to 40 flits, every word and the per-pair order checked |

In the three decoder tests every mechanism occurs thousands of times. They
see arbitration contention, backpressure, full switch buffers and full NI
buffers, and they fail if any of them never happens. With a 100 MHz network
clock, 11183 cycles is about 112 us. That is the same order as the roughly
110 to 130 us that the transaction-level model reported for this mapping.
The core delays here are estimates, though, so treat this as a sanity
check, not a reproduction.

## What departs from the original model

* **Switch ports.** The switches have 5 ports (local plus four neighbours).
  The original code instantiates a switch type named as 4x4.
* **Switch internals.** Wormhole switching, the single holding register per
  input, the one-cycle output allocation and the LFSR as the random source
  are this design's choices. The original names the functions but not their
  implementation.
* **Routing tables.** There is one table per switch, computed as XY routes,
  instead of a single generated table file.
* **Overload notice.** A buffer overload is reported as a status bit. Flits
  are never lost, because writers wait.
* **Placement.** PC1-S13, PC2-S9, PC3-S6, PC4-S7 and PC7-S14 come from the
  reference platform's connection table. The other nine cores use the same
  rule: each hangs on the switch at the lower-left corner of its tile in the
  reference drawing.
* **Not modelled.** The SPIN topology and the shared bus are only
  comparison points and are not built. Neither is the mapping search that
  chose the placement.
* **Cores.** The decoder's functional units run on processors and exist here
  only as the traffic model.

## Files

| file | contents |
|------|----------|
| `rtl/transim_pkg.sv` | sizes, port numbers, header layout, core placement, XY routing and mesh-neighbour functions |
| `rtl/flit_fifo.sv` | link buffer (first-word fall-through, `full` flag) |
| `rtl/route_unit.sv` | per-switch routing table |
| `rtl/prio_arbiter.sv` | random-priority arbiter of one output |
| `rtl/noc_switch.sv` | 5-port wormhole switch |
| `rtl/noc_ni.sv` | network interface |
| `rtl/noc_mesh.sv` | top: 16 switches, 14 NIs, core ports brought out as arrays indexed by core (PC1 = 0) |
| `tb/tb_*.sv` | one self-checking test per module, plus three extra mesh tests (32-bit links, several vectors, all-pairs random traffic) |
| `tb/lsd_pc_model.sv`, `tb/lsd_bl_traffic.sv` | behavioural cores and their wiring for the mesh tests |

Default parameters are `FLIT_W = 64` and `BUF_DEPTH = 64` on `noc_mesh`,
`noc_switch` and `noc_ni`. Mesh size, core count and placement are package
constants. A different placement means editing `PC_SWITCH`, with at most one
core per switch. A larger mesh also needs `MESH_X`, `MESH_Y`, `N_PC` and the
address width changed.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Each has a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/transim_pkg.sv \
          tb/tb_noc_mesh.sv --top-module tb_noc_mesh
./obj_dir/Vtb_noc_mesh
```

To run another test, replace `tb_noc_mesh` with `tb_noc_switch`,
`tb_noc_ni`, `tb_flit_fifo`, `tb_route_unit`, `tb_prio_arbiter`,
`tb_noc_mesh_w32`, `tb_noc_mesh_stream` or `tb_noc_mesh_random`. The full mesh test takes well
under a second. Concurrent assertions in the RTL check the protocols:
one-hot grants, no buffer overflow, a header first in every packet, packets
reaching only their addressed core, and steady `wr_dst`/`wr_len`. Add
`--assert` to enable them.

Lint reports a `SYNCASYNCNET` warning because the reset is asynchronous in
the flip-flops and sampled synchronously in the assertions' `disable iff`.
It is harmless.
