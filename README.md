# An 80-tile floating-point mesh processor in SystemVerilog

This is RTL for a tiled many-core chip. Eighty identical tiles, each with two
single-precision multiply-accumulate units (FPMACs), are joined by a 2D mesh
network. The aim is teraflop-class throughput at low power.

Three ideas carry the design:

- **A single-cycle accumulate loop.** Each FPMAC adds one product per cycle
  to a running sum, so it sustains 2 FLOP per cycle. It can do this because
  the sum is kept in base 32, and normalisation is done outside the loop.
- **A small, fast router.** Each tile's router has five ports and two
  virtual lanes. Packets are source-routed wormhole packets. A flit falls
  through a router in 5 cycles, and the links are 32 bits wide.
- **Mesochronous clocking and fine-grained sleep.**
  - All tiles share one clock frequency, but each tile's clock can have its
    own phase. Every link between tiles crosses a small phase-tolerant
    FIFO.
  - FPMACs, cores and router ports can be put to sleep one by one. This is
    done by instructions, by packets from other tiles, or statically
    through a scan chain.

At the default size (8 columns × 10 rows), the peak rate is 80 tiles × 2
FPMACs × 2 FLOP per cycle = 320 FLOP per cycle. That is about 1.37 TFLOPS at
4.27 GHz.

## Structure

```
polaris_top                 COLS x ROWS mesh, host port, scan chain
 ├─ mesosync  (per link)    phase-tolerant FIFO between two tile clocks
 └─ tile      (per tile)    reset synchronizer +
     ├─ router              5 ports x 2 lanes, 5-stage pipeline
     │   └─ lane_fifo       one queue per port and lane
     ├─ net_if              packet send/receive for the engine
     ├─ pm_ctrl             sleep control: dynamic and scan
     └─ pe_core             96-bit VLIW engine
         ├─ imem            256 x 96-bit instruction memory
         ├─ dmem            512 x 32-bit data memory
         └─ fpmac x 2       multiply-accumulate units
polaris_pkg                 flit, instruction and command types
```

Tile `t` sits at column `t % COLS` and row `t / COLS`; row 0 is the north
edge.

- Router port 0 is the local port. Ports 1 to 4 are north, east, south and
  west.
- The west port of tile 0 is brought out as the **host port**. The host
  loads programs and data, starts the cores, and receives what tiles send
  west out of tile 0.
- All other edge ports receive idle flits and keep their stop bits raised.

## The FPMAC: accumulating in base 32

This is the least obvious part of the design (`rtl/fpmac.sv`).

A normal floating-point adder has to align the two operands by a variable
shift inside the accumulate loop, and then normalise the result. Both steps
are slow, and together they would stop the loop from running once per
cycle. Here the running sum is held in a different form:

- `acc` is a 128-bit two's-complement significand.
- `bexp` is a block exponent counted in units of 32 bits.
- The value of the sum is `acc × 2^(32·bexp − 300)`.

The FPMAC has an 8-stage pipeline:

| Stage | What it does |
|---|---|
| 1 | Register the operands. |
| 2 | Multiply the 24-bit significands. Add the exponents. |
| 3 | Shift the product left by the low 5 bits of its exponent. Its remaining exponent bits form a base-32 block exponent. Apply the sign. |
| 4 | **The loop.** Align the product and `acc` by whole 32-bit digits (0, 32, 64, 96 bits, or everything), add them, then renormalise by at most one digit. This only needs a multiplexer of constant shifts and one adder. |
| 5–8 | Normalise after the loop: take the absolute value, find the leading one, shift, and pack the exponent and mantissa. |

`res_valid` rises 8 edges after the issue edge. The register file takes the
result on the next edge, which makes the engine's FPU latency 9 cycles.

Departures from IEEE 754 are deliberate:

- Results are truncated.
- Denormal inputs count as zero.
- Overflow gives infinity and underflow gives zero.
- Infinity and NaN inputs are not handled.

The multiplier is written as `*`. A full-custom version would leave the
product in carry-save form and merge it with 4-2 compressors. That is a
circuit choice, not something RTL has to express.

The sum keeps more bits than a single-precision number, so long dot products
come out closer to the exact value than a chain of IEEE additions would. The
testbench compares against a double-precision reference with a tolerance of
about 2^-20 of the result.

## The processing engine

`rtl/pe_core.sv` fetches one 96-bit instruction per cycle from its
instruction memory and issues up to seven operations from it at once:

| Field | Operation | Latency |
|---|---|---|
| FPU0, FPU1 | `acc = (clr ? 0 : acc) + R[ra]·R[rb]`; optional write of the sum to `R[rd]` | 9 |
| LD | `R[r] = DMEM[R[ra]]`, optional post-increment | 2 |
| ST | `DMEM[R[ra]] = R[r]`, optional post-increment | – |
| NET | SND / SNDI: send `R[rs]` as a packet. RCV: wait for a data packet | 2 to the router |
| FLOW | JMP, LOOP (count down `lc` and branch), SETLC, LI, STALL n, HALT | 1 |
| SLEEP | NAP0/1, WAKE0/1 (own FPMACs). PESLEEP, PEWAKE (another tile, by packet) | 1 |

The exact bit layout is `polaris_pkg::instr_t`.

The register file has 32 registers of 32 bits. There are no interlocks: the
program schedules around the latencies, as on any exposed-pipeline VLIW
machine.

An instruction either runs whole or waits whole. It waits:

- while a STALL count is running;
- while RCV finds no arrived packet;
- while the send queue is full.

**Sends.** The route is in `R[rh]` and the command word in `R[rh+1]`. Bit 31
of the route selects the virtual lane. If the route's tenth hop is the chain
code, the route continues in `R[rh+1]` and the command moves to `R[rh+2]`.
SNDI increments the command register after the send, so consecutive sends go
to consecutive addresses.

**Starting a core.** A core starts when a PEWAKE packet arrives. The packet
also carries the start address.

## Packets and routing

A flit is 32 data bits plus `valid`, `head`, `tail` and `lane`. Those four
bits and the two stop bits that flow back (one per lane) are the link's
6 overhead bits.

A packet has these flits, in order:

1. **Route flit.** Ten 3-bit hops, lowest first. Each router uses the lowest
   hop as its output port and shifts the route right by 3 bits. The codes
   are: 0 local, 1 north, 2 east, 3 south, 4 west, 7 chain. A chain code
   means "the route continues in the next flit". The router drops the spent
   route flit and promotes the next one to head, so paths longer than ten
   hops work.
2. **Command flit.** The command is in bits [31:28] and an address in
   [27:0]:
   - `1` write DMEM from that word address on;
   - `2` write IMEM, three flits per 96-bit instruction, low word first;
   - `3` PESLEEP;
   - `4` PEWAKE, starting at that address.
3. **Data flits**, for the write commands.

The interface never stops its router. Both memories accept a write every
cycle, so a packet is drained as fast as it arrives.

`tb/tb_util_pkg.sv` has helpers that build routes, instructions and packets.

## The router

`rtl/router.sv` is input-buffered, with one 16-flit queue per port and lane.
Its pipeline stages are:

1. input latch;
2. buffer write;
3. buffer read and route decode, into a per-lane stage register;
4. arbitration;
5. crossbar traversal into the output register.

A flit that meets no contention leaves 5 cycles after it arrived.

Arbitration is split into two distributed phases:

- Each input port picks one of its two lanes, because the lanes share one
  crossbar input.
- Each output port then picks one of the requesting inputs.

Both phases use rotating priority.

**Lane reservation.** An output lane is reserved from a packet's head flit to
its tail flit, so packets on the same lane never interleave. Packets on
different lanes do interleave, flit by flit.

**Flow control** is on/off, per lane. A lane's stop bit rises while its queue
holds 6 or more flits. That leaves room for the flits still in flight: the
link, the synchronizer and the stop bit's own synchronizer add up to about 8
flits in the worst case. An output lane is not granted while the downstream
stop bit is high.

The chip described uses a double-pumped crossbar, with dual-edge flip-flops
on alternating bits, to halve the crossbar wiring. Here the crossbar is
written at full width on a single edge, with the same function.

## Mesochronous links

Each link has a `mesosync`, a 4-entry FIFO:

- The sending tile writes one entry on every one of its clock cycles, idle
  flits included.
- The receiving tile reads one entry on every one of its cycles.
- Both clocks have the same frequency, so no full or empty logic is needed.
  The read pointer starts 2 entries behind the write pointer, and this
  margin covers any phase difference.

The crossing adds about 1–2 cycles to a hop, plus the read register. The
stop bits go back through a 2-flop synchronizer.

## Power management

`rtl/pm_ctrl.sv` drives 8 sleep controls per tile: FPMAC 0, FPMAC 1, the
core, and the five router ports. The chip described has 21 sleep regions;
only these 8 have control behaviour that can be tied to a mechanism. The
sleep transistors themselves are not logic, so the outputs are their enables.
The same signals serve as clock-gate enables.

| Mechanism | Effect |
|---|---|
| NAP*n* / WAKE*n* instruction | FPMAC *n* sleeps or wakes on the next cycle. A sleeping FPMAC loses its sum. |
| PESLEEP / PEWAKE packet | Stops or starts the destination tile's core. PEWAKE also sets its pc. |
| HALT instruction | Puts the core to sleep. The FPMACs finish the results in flight. |
| Scan register, 8 bits per tile | Bit 0 forces the core and both FPMACs to sleep. Bits 1–2 force an FPMAC to sleep. Bits 3–7 disable router ports 0–4. |
| Port activity | A port's queue region sleeps while the port is idle (`port_active` low). |

**Scan chain.** The chain runs through all tiles, tile 0 first. It is
shifted while `scan_en` is high and copied to the control registers on
`scan_update`. Both happen on `scan_clk`, a slow clock common to all tiles,
so the chain never crosses two tile clocks of different phase.

A disabled port:

- accepts no flits;
- raises both of its stop bits;
- is never granted.

## Sizes and what is assumed

The source material gives the following:

- the tile count;
- the 96-bit instruction word;
- two FPMACs per tile;
- the instruction latencies;
- 5 router ports, 2 lanes, 32-bit links and 5 pipeline stages;
- a 1–2 cycle synchronizer cost.

Everything else is this design's own choice:

| Item | Choice | Note |
|---|---|---|
| Mesh shape | 8 × 10 | A horizontal cut crosses 8 links: 8 × 2 directions × 4 B × 5 GHz = 320 GB/s, which matches the stated bisection bandwidth |
| Instruction memory | 256 words (3 KB) | |
| Data memory | 512 words (2 KB) | |
| Register file | 32 × 32 bit | |
| Router queue | 16 flits, stop at 6 | |
| Synchronizer | 4 entries, offset 2 | |
| Instruction fields and operation set | see `polaris_pkg` | |
| Packet and command format | see above | |
| Host port | west side of tile 0 | |
| Scan layout | 8 bits per tile | |
| Arithmetic | truncation, no denormals | |

Whether the four kernels of the original evaluation fit in 2 KB of data
memory per tile was checked by hand. The kernel sizes are the published
ones; the per-tile arithmetic is this design's:

| Kernel | Published size | Fits in 512 words per tile? |
|---|---|---|
| SGEMM 100×100 | 2.63 M FLOP | Yes. A, B and C are 30,000 words in all, about 375 per tile when distributed. |
| Spreadsheet weighted sums | 62.4 K FLOP | Yes, if one operand is streamed over the network or shared. That is about 390 products per tile; storing both values and weights would take 780 words. |
| 64-point 2D FFT on 64 tiles | 196 K FLOP | Yes. 64 × 64 complex values are 128 words per tile. |
| Stencil (2D heat diffusion) | 358 K FLOP | Unknown: the grid size is not published. A 16 × 16 block with halo needs 324 words. |

## Simulating

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and stops, and each has a watchdog. With
Verilator 5, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/polaris_pkg.sv tb/tb_util_pkg.sv tb/tb_polaris_top.sv \
  --top-module tb_polaris_top -o sim
./obj_dir/sim
```

Replace `tb_polaris_top` with any other testbench. Testbenches that do not
use the helpers do not need `tb/tb_util_pkg.sv`.

| Testbench | What it checks |
|---|---|
| `tb_fpmac` | 1200 random products and dot products against a real-number model. The 8-edge result timing, 1 product per cycle, sleep, and cancellation. |
| `tb_router` | 5-cycle fall-through, chain routes, random traffic on all ports and lanes with random stop bits (no loss, order within each lane), port disable, lane and port conflicts. |
| `tb_mesosync` | Random traffic across several phase offsets, latency window, stop synchronization. |
| `tb_dmem`, `tb_imem` | Random reads and writes against a model, including same-word collisions. |
| `tb_pm_ctrl` | Every sleep mechanism and the scan bit order. |
| `tb_net_if` | Receive decoding of all commands with interleaved lanes. Send packets, 2-cycle send latency, stop and queue full. |
| `tb_pe_core` | Load (2) and FPU (9) latencies, multiply-accumulate, LOOP count, JMP, STALL, RCV wait, send stall, SND/SNDI contents, NAP/WAKE/HALT, PEWAKE restart. |
| `tb_tile` | A program loaded by packets computes and sends back a product. Pass-through latency, static port disable. |
| `tb_polaris_top` | End to end on a 3 × 2 mesh, each tile with its own clock phase (details below). |
| `tb_polaris_full` | The same test on the full 8 × 10 mesh with default parameters. It takes under a minute with Verilator. |

In `tb_polaris_top`, the host:

- loads a weighted-sum program and its data into every tile, one of them
  over a chained route;
- starts the tiles with PEWAKE packets.

Each tile then:

- computes a 32-term dot product on both FPMACs;
- sends the result back to the host;
- sleeps an FPMAC with NAP and wakes it again.

Two tiles also wake and sleep each other by packet.

The test checks every result, the FPU operation count, the scan chain and
static sleep. It counts how often each mechanism occurred and fails if any
never did: lane and port conflicts, stop back-pressure, chained routes, and
sleep and wake events.

## Limits

- Only the 8 sleep controls above are modelled, out of 21 regions.
- The clock source, the clock distribution, the sleep transistors and the
  double-pumped crossbar circuit are not RTL.
- The kernels of the original evaluation (stencil, SGEMM, FFT) were
  hand-written assembly and are not reproduced. Only the weighted-sum
  (spreadsheet) kernel is run, at reduced length.
- Simulation is two-state. Memories come up with random contents, and
  programs must load what they read.
