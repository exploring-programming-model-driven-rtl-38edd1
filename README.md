# Software-controlled QoS on a 4x4 wormhole network-on-chip

This is the RTL of a 16-switch mesh network-on-chip for an eight-processor
system. Software controls its quality of service at run time in two ways:

* **Priorities (soft QoS).** Every packet header carries a 4-bit QoS field.
  Codes 0-7 are priority levels, 0 the lowest and 7 the highest. A processor
  sets the level per target by writing a register in its network interface
  (NI). After that, each of its reads and writes to that target goes out at
  that level. At every switch output, the oldest-waiting packet does not
  simply win: the highest level present wins.
* **Guaranteed channels (hard QoS).** Code `1000` (OPEN) and code `1001`
  (CLOSE) are "fake" header-only packets. As an OPEN packet travels, it sets
  a flip-flop in every switch output it passes through. While that
  flip-flop is set, the output serves only the input the OPEN came from, and
  all other flows wait. The matching CLOSE packet clears the flip-flop. This
  gives circuit switching on top of a packet-switched wormhole network. It
  costs only one flip-flop per input at each output, and no separate
  circuit-switched network is needed.

The cost of using the QoS is small. A processor writes a level or a channel
command to a memory-mapped register. The level then goes into every header
at no extra cycle cost.

## Platform

```
 col 0          col 1          col 2          col 3
 S0  SM0/Video1  S4  SM2/USB     S8  SM4/MemCtrl S12 SM6/IO1      row 0
 S1  ARM0/PM0    S5  ARM2/PM2    S9  ARM4/PM4    S13 ARM6/PM6     row 1
 S2  ARM1/PM1    S6  ARM3/PM3    S10 ARM5/PM5    S14 ARM7/PM7     row 2
 S3  SM1/IO2     S7  SM3/Video2  S11 SM5/DMA     S15 SM7/BaseBand row 3
```

`qos_mpsoc_top` instantiates:

* **Switches.** 16 `qos_switch`, each linked to all of its mesh neighbours.
* **Processor tiles.** On S1, S2, S5, S6, S9, S10, S13 and S14:
  * local port L0 is the initiator NI of ARM*k*. The AHB port of each NI comes
    out as the top-level `ahb_*` ports.
  * local port L1 is the private L2 bank PM*k*, built as a `qos_ni_target`
    plus a `shared_memory`.
* **Memory tiles.** On S0, S3, S4, S7, S8, S11, S12 and S15:
  * local port L0 is the shared L2 bank SM*j*, built the same way as a PM.
  * local port L1 is the raw flit link of a device with no logic in this
    design (Video1, I/O2, USB, Video2, MemCtrl, DMA, I/O1, BaseBand, in that
    order). These links are the `dev_*` ports.

Every network endpoint has a 5-bit ID, `{switch number, local port}`. For
example, SM0 = 0, Video1 = 1, ARM0 = 2, PM0 = 3 and SM7 = 30. A processor
reaches endpoint *e* at address `{3'b000, e[4:0], offset[23:0]}`. With the
default 1024-word banks, word address bits [11:2] select the word.

## Packets

A flit is 34 bits: `head`, `tail` and a 32-bit `data` field. In the first
flit of a packet, `data` holds the header (`qos_noc_pkg::header_t`):

| bits  | field       | meaning                                            |
|-------|-------------|----------------------------------------------------|
| 31:28 | qos         | 0000-0111 priority level, 1000 OPEN, 1001 CLOSE     |
| 27:23 | dst         | destination endpoint                               |
| 22:18 | src         | source endpoint (where the response goes)          |
| 17:16 | cmd         | 00 read request, 01 write request, 10 read response, 11 write response |
| 15    | full_duplex | on OPEN/CLOSE: the target echoes the packet back   |
| 14:0  | zero        |                                                    |

The packet types are:

* **Read request:** a header and an address flit.
* **Write request:** a header, an address flit and a data flit.
* **Read response:** a header and a data flit.
* **Write acknowledge, OPEN and CLOSE:** the header flit only, with both
  head and tail set.

The field positions, the endpoint numbering and the packet formats are this
design's own choices. Only the 4-bit QoS field and its encoding are fixed.

## The QoS allocator (one per switch output)

This is the core of the design. It is in `qos_allocator.sv`, and its parts
match the blocks of the published allocator diagram:

| part                     | file                        | job |
|--------------------------|-----------------------------|-----|
| QoS detector             | `qos_detector.sv`           | decodes the QoS field of every requesting head flit. It gives a priority level per input, plus `open_circuit`/`close_circuit` flags |
| QoS channel flip-flops   | `qos_channel_ff.sv`         | one bit per input. The bit is set when that input's OPEN is forwarded and cleared when its CLOSE is forwarded |
| arbitration tree         | `arbitration_tree.sv`       | `pass_priority[m]` = the requesting inputs at level *m* |
| priority encoder / grant | `priority_grant_encoder.sv` | picks the input to grant, by the rule below |
| output multiplexer       | inside `qos_allocator`      | drives the selected input's flit onto the output |

The grant rule:

1. If any channel bit is set, only the circuit owner can be granted,
   whatever its level. Every other input waits.
2. Otherwise the highest level that has a waiting head flit wins.
3. Inside that level, the input is chosen round robin (`ARB_RR=1`, the
   default) or by fixed priority, lowest port first (`ARB_RR=0`).

This design adds a wormhole lock to the published diagram, which does not
show one. Once a head flit that is not also a tail is granted, the output
stays with that input until the tail flit has passed. Arbitration is idle
during that time. So priority decides which packet goes next. It never
breaks up a packet already in flight.

The detector's level mapping:

* OPEN and CLOSE arbitrate at the top level, so priority traffic does not
  hold up circuit set-up.
* Codes `1010`-`1111` are unused and count as level 0.
* With `NUM_LEVELS` = 4 or 2, the top 2 bits or the top 1 bit of the 3-bit
  priority is kept. `NUM_LEVELS` = 1 turns priorities off.

The grant is combinational from the buffer heads. An uncontended flit
therefore crosses a switch in one cycle: it is written into the input buffer
at one edge and leaves at the next.

## Guaranteed channels, step by step

A processor opens a channel by writing the NI's channel register:
`data[4:0]` = target endpoint, `data[8]` = full duplex, `data[9]` = 1 for
open, 0 for close.

1. The NI sends a one-flit OPEN packet to the target. Each output it passes
   sets the channel bit for the input it came in on.
2. If the channel is full duplex, the target NI echoes the OPEN back. The
   echo reserves the return path in the same way. The processor's write
   completes only when the echo has arrived, so once the write returns, both
   directions are reserved.
3. Ordinary reads and writes now pass at their normal levels. Along the
   reserved path, other inputs wait.
4. A CLOSE packet, echoed as well if it is full duplex, clears the bits. The
   waiting flows then continue under normal arbitration.

Points to keep in mind when using channels:

* **Reservation is per input port, not per flow.** It works at the
  granularity of "the link this packet came in on". Two flows that enter a
  switch on the same input share the reservation downstream of the point
  where they merge. The isolation is done at the merge point.
* **Software must close every channel it opens.** An output held by a
  channel that is never closed blocks all other traffic through it for good.
* **Requests and responses share the same network.** There are no virtual
  channels. A flow blocked by a channel can hold buffers that other flows
  need, and those flows are delayed as well.

## Network interfaces

**`qos_ni_initiator`.** The processor side is an AMBA 2.0 AHB slave port
(`hsel`, `haddr`, `hwrite`, `htrans`, `hwdata`, `hready`, `hreadyout`,
`hrdata`, `hresp`). It is taken in the AHB address phase, and `hwdata` is
read in the following data phase. The NI holds `hreadyout` low until the
transfer has finished in the network, which for writes means until the
acknowledge has come back. Only one transfer is outstanding at a time. A new
address phase may overlap the last cycle of the previous data phase. Only
single word transfers are served: a burst is handled as a series of single
transfers, `hsize` is ignored and `hresp` is always OKAY. The top level
brings out `ahb_hready` so that a bus with several slaves can drive it. With
the NI as the only slave, tie it to `ahb_hreadyout`. Its registers are at
`addr[31]=1`, word index `addr[7:2]`:

| word  | register                                         |
|-------|--------------------------------------------------|
| 0-31  | priority level (3 bits) for target endpoint *n*, reset to 0 |
| 32    | channel control: writing it sends OPEN/CLOSE (layout above); reads return the last value written |

Setting a priority between a processor and a memory is therefore one write
to `0x8000_0000 + 4*endpoint`. Resetting it is writing 0 to the same place.

**`qos_ni_target`.** It serves one request at a time from a synchronous
memory with one-cycle read latency. It answers with the same QoS level as
the request, so a prioritised processor/memory pair is prioritised in both
directions. It echoes full-duplex OPEN and CLOSE packets and absorbs
one-way ones.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `qos_mpsoc_top`, `qos_switch`, `qos_allocator` | `NUM_LEVELS` | 8 | priority levels (1, 2, 4 or 8) |
| `qos_mpsoc_top`, `qos_switch` | `FIFO_DEPTH` | 4 | input buffer depth in flits |
| `qos_mpsoc_top`, `qos_switch`, `qos_allocator` | `ARB_RR` | 1 | arbitration within a level: round robin (1) or fixed priority (0) |
| `qos_mpsoc_top` | `MEM_AW` | 10 | log2 of the number of words per memory bank |
| `qos_noc_pkg` | `MESH_DIM` | 4 | mesh side (used by routing and the top) |

All resets are synchronous and active low (`rst_n`). Memory contents are not
reset.

## What is taken from the published design and what is not

The following come from the published design:

* the 4-bit QoS field and its encoding
* eight priority levels, with level 0 the lowest
* OPEN and CLOSE circuit packets and the three-phase open/use/close sequence
* the structure of the allocator: detector, channel flip-flop, per-level
  arbitration tree, and a priority-encoder grant with a round-robin or
  fixed-priority best-effort policy
* memory-mapped priority registers in the initiator NI
* the 4x4 platform with eight ARMs, eight shared banks, eight private banks
  and its device placement

The following are this design's own choices, because the source does not
give them:

* the flit width and header layout
* the endpoint numbering and address map
* valid/ready link flow control
* XY routing
* the buffer depth and memory size
* the wormhole lock
* the response QoS rule
* the full-duplex echo
* the levels given to OPEN/CLOSE and to unused codes

Departures to know about:

* **Processor bus.** The initiator NI is an AHB slave for single word
  transfers only. Bursts are served one beat at a time, `hsize` is not
  decoded and there are no error responses.
* **Mesh links.** The published platform is described as a "quasi-mesh",
  and some of its vertical links may be absent. Here every neighbour link of
  the full 4x4 mesh is present.
* **Parts not built.** The ARM cores and their L1 caches, the eight devices,
  and the QoS software stack (APIs and OpenMP runtime) are not part of the
  RTL. The FPGA area and fmax figures of the original are not reproduced.

## Testbenches

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_flit_fifo` | order, full/empty, one-cycle write-to-head, against a queue model |
| `tb_shared_memory` | random reads and writes against a model, one-cycle read latency |
| `tb_qos_detector` | all 16 codes, levels for 8, 4 and 2 levels, open/close flags |
| `tb_arbitration_tree` | every request lands in exactly its level |
| `tb_qos_channel_ff` | set on granted OPEN, clear on granted CLOSE |
| `tb_priority_grant_encoder` | highest level first, round robin within a level, circuit owner only |
| `tb_qos_allocator` | no interleaving, no lower-level win, circuit blocking and release, work conservation under stalls |
| `tb_qos_switch` | XY routing on all six ports, one-cycle hop, level 6 overtaking level 1, a flow held by a circuit until its CLOSE |
| `tb_switch_levels` | the switch built with 2, 4 and 8 levels under the same traffic: which codes share a level and which overtake |
| `tb_qos_ni_initiator` | header QoS = programmed level, packet formats, AHB data phase held until the response, overlapping AHB phases, OPEN waits for the echo |
| `tb_qos_ni_target` | memory accesses, responses back to the source at the request's level, echo rules |
| `tb_qos_mpsoc_top` | full platform at the defaults: see below |
| `tb_workload_single_thread` | full platform at the defaults: see below |

`tb_qos_mpsoc_top` has four parts:

1. Every processor writes and reads back data in its own private bank and in
   all eight shared banks.
2. All eight processors load SM7. This runs twice, without priorities and
   with level 7 for ARM0/2/4/6. The slowest of those four took 1628 cycles
   without priorities and 1215 with them.
3. ARM7 holds a full-duplex channel to Video1 while ARM1 is kept out until
   the channel closes.
4. ARM7 streams 20 writes to Video1 while ARM0-6 send 20 transfers each to
   Video1 as well. Best effort, ARM7 took 614 cycles. Inside its own
   channel it took 466 cycles, counting the open and the close.

`tb_workload_single_thread` has two parts:

1. ARM0-3 each work on their own shared bank, while ARM4-7 and a DMA stream
   all load SM3. Giving the team priority on its own banks cuts ARM3's time
   from 955 to 697 cycles.
2. ARM0 holds a channel to Video1.

Both platform tests count priority overtakes, channel blocking and
back-pressure stalls, and fail if one never happens. The traffic sizes
(30-40 transfers per processor) are small stand-ins. The benchmark data
sizes of the original are not known.

## Simulating

All files are in `rtl/` and `tb/`, one module or package per file. The
package must be compiled first. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_qos_switch \
  rtl/qos_noc_pkg.sv rtl/*.sv tb/tb_qos_switch.sv
./obj_dir/Vtb_qos_switch
```

Verilator warns that `qos_noc_pkg.sv` is given twice by `rtl/*.sv`. List the
files explicitly to avoid the warning. The full-platform testbenches take
about 1.5 minutes to build and well under a second to run. For a lint-only
check of the whole design:

```
verilator --lint-only -Wall -y rtl rtl/qos_noc_pkg.sv rtl/qos_mpsoc_top.sv
```

The remaining lint warnings are about unused fields of header structures
and unused package constants.
