# An application-specific NoC that converts bus protocols and data widths

A real SoC does not look like a mesh of identical tiles. It has a handful of
processors, a few video engines, a DMA, and memories and peripherals that speak
different buses (AXI, AHB, APB) at different widths (32 and 128 bits), each on
its own clock. An application-specific network-on-chip (ASNoC) links exactly
these IPs with a few switches. Most of the work in such a network is not in the
switches but in the **network interfaces (NIs)**, which must translate between
the IP buses and the packets of the network:

* an AXI burst of any length must become something an AHB slave can take;
* AXI byte strobes have no AHB counterpart;
* a 128-bit master talking to a 32-bit slave needs its bursts split, and the
  split responses merged again, without breaking AXI's per-ID ordering;
* a wrapping burst that is split for width no longer wraps correctly;
* a 32-bit master talking to a 128-bit slave must use the right byte lanes;
* APB has neither bursts nor byte strobes.

This RTL implements such a network for an example SoC. It has ten AXI masters
and five slaves on three switches. All of the conversion is done in the slave
NIs.

## The example SoC

| Node | Master IP | Bus | Width | Switch |
|---|---|---|---|---|
| 0..3 | Proc 1..4 | AXI | 32 | 1 |
| 4 | DMA | AXI | 32 | 2 |
| 5 | VOM (video out) | AXI | 128 | 2 |
| 6 | VIM (video in) | AXI | 128 | 2 |
| 7 | H.265 CODEC | AXI | 128 | 2 |
| 8 | SD card | AXI | 32 | 3 |
| 9 | JTAG | AXI | 32 | 3 |

| Node | Slave IP | Bus | Width | Switch | Address (addr[31:28]) | Slave NI |
|---|---|---|---|---|---|---|
| 0 | APB bridge | APB3 | 32 | 1 | 4 | `sni_apb` |
| 1 | DDR | AXI | 128 | 2 | 8..B | `sni_axi #(.SW(128))` |
| 2 | SDRAM | AHB-Lite | 32 | 2 | C..F | `sni_ahb` |
| 3 | FLASH | AXI | 32 | 3 | 0..3 | `sni_axi #(.SW(32))` |
| 4 | USB | AXI | 32 | 3 | 5..7 | `sni_axi #(.SW(32))` |

Request links between switches run from Switch 1 to Switch 2, from Switch 3
to Switch 2, and both ways between Switch 1 and Switch 3. So the processors,
SD card and JTAG reach every slave. DMA, VOM, VIM and CODEC on Switch 2 reach
only DDR and SDRAM, which is all their work needs, and an assertion in
`asnoc_top` checks that they address nothing else. Requests and responses
travel on two separate copies of this network, `u_req_s*` and `u_rsp_s*` in
`asnoc_top`. The response copy uses the same links in the opposite
direction. A response therefore never waits behind a request, which rules
out the classic request/response deadlock. The IPs themselves are not part of
the RTL; the testbenches model their buses.

## Packets

The network carries 128-bit flits, 128 bits being the widest IP. A flit is
`flit_t` in `rtl/noc_pkg.sv`: `head`, `tail`, a 2-bit `resp`, 16 strobe bits
and 128 data bits.

* **Head flit.** The header `hdr_t` sits in the low data bits. It holds the
  destination and source nodes, the master's AXI ID, write/read, and the AXI
  address, `len`, `size` and `burst`. It also holds the master's own bus width
  (`mw`) and, in responses, the response code.
* **Write request.** One data flit follows per master beat. A beat keeps the
  byte lanes it had on the master bus, so a 32-bit master's data sits in bits
  31:0 of the flit.
* **Read request and write response.** These are a head flit only.
* **Read response.** A header flit, then one data flit per *master* beat, in
  the master's lanes.

The network therefore always carries transactions exactly as the master issued
them. No NI on the master side knows the width of the slave.

## Switches (`noc_switch`)

The switches use wormhole switching.

* **Input buffer.** Each input has a two-flit first-word-fall-through buffer
  (`sync_fifo`).
* **Routing.** The destination in a head flit indexes a per-instance `ROUTE`
  table. Each 4-bit entry gives the output port for one node.
* **Arbitration.** Each output has a round-robin arbiter. The winner holds the
  output until its tail flit has passed, so packets never interleave.
* **Throughput.** One flit moves per output per cycle.

All switches share the NoC clock, so there are no FIFOs between switches.

## Master NI (`mni`)

The master NI is an AXI slave port in the master's clock domain.

* **Requests.** An accepted AW or AR becomes a head flit. The destination is
  decoded from the address, and W beats follow cut-through as data flits. AW
  and AR take turns.
* **Responses.** A response packet becomes one B beat, or a series of R beats
  with `RLAST` on the tail flit.
* **Clocking.** Both directions cross to the NoC clock through asynchronous
  FIFOs (`async_fifo`: Gray pointers, two-flop synchronizers).

**Ordering.** AXI requires responses with the same ID to return in issue order.
The network keeps packets between two nodes in order, and each slave NI
finishes one transaction before starting the next. So the master NI needs only
one rule: a read may go to a *different* slave only when no read is
outstanding, and the same holds for writes. Up to `MAX_OUT` = 4 reads and 4
writes may be outstanding to one slave. This needs no reorder buffer, at the
cost of some parallelism when a master alternates between slaves.

## Slave NIs: where the conversion happens

All three slave NIs share a front half, `sni_req_engine`, and a back half,
`sni_resp_engine`. Only the bus-specific part differs between them.

### Splitting a request into slave beats (`sni_req_engine`)

The engine takes one request packet and produces a stream of slave-side beats
(`sbeat_t`). Each beat carries its address, size and data, already moved to
the slave's byte lanes. It also says whether it starts or ends a slave-side
burst, and how many beats that burst has.

Let `size` be the master's beat size (log2 bytes) and `ss` the slave bus width
(log2 bytes).

* **Narrow slave (`size > ss`).** Each master beat becomes `2^(size-ss)` slave
  beats. Slave beat `j` belongs to master beat `m = j >> (size-ss)` and is part
  `k = j mod 2^(size-ss)` of it.
  * Its address is computed by `beat_addr()`. This is the master's AXI address
    of beat `m`, following the INCR, WRAP or FIXED rules, plus `k << ss`.
  * `chunk_beats()` then groups consecutive slave beats into INCR bursts. A
    burst ends at whichever comes first:
    * the end of the transaction;
    * 16 beats, the AXI maximum;
    * the wrap point of a wrapping burst, so that no slave burst wraps;
    * the end of a master beat, for a FIXED burst.
* **Wide or equal slave (`size <= ss`).** Each master beat is one slave beat of
  the same size, a narrow transfer on the wide slave bus. It is placed in the
  byte lanes its address selects. AXI slaves then get the master's own burst
  type and length unchanged.

Worked example: a 64-bit master issues a wrapping burst of 16 beats from
`0x08` to a 32-bit slave. That is 32 words in a 128-byte region that wraps at
`0x80`. The slave NI issues three INCR bursts:

| Burst | Start | Beats | Addresses |
|---|---|---|---|
| 1 | `0x08` | 16 | `0x08`–`0x44` |
| 2 | `0x48` | 14 | `0x48`–`0x7C` |
| 3 | `0x00` | 2 | `0x00`–`0x04` (after the wrap point) |

`tb_sni_axi` checks exactly this case.

Write data flits go into a 16-beat buffer. A slave beat is released as soon as
its master beat is in the buffer (cut-through), unless conservative mode is on
(see the AHB NI below).

### Merging the response (`sni_resp_engine`)

Every slave-side transaction of one master transaction is issued with the same
fixed ID (`NEW_TID` in `sni_axi`), and the NI serves one master transaction at
a time. The slave therefore returns its data in order, and merging is just
packing. Slave read beats are placed into master lanes. A data flit leaves
once a whole master beat is complete, carrying the worst response of its
parts. A write gets a single response flit after the last slave burst has
answered, also carrying the worst response.

### AXI slaves (`sni_axi`)

* **Writes.** For each slave burst the NI issues AW, then its W beats, with
  `WLAST` on the burst's last beat.
* **Reads.** One AR is issued per slave burst.
* **Write completion.** B responses are counted against the number of bursts
  issued.

`SW` is the slave width (128 for DDR, 32 for FLASH and USB).

### AHB slave (`sni_ahb`)

AHB has fixed bursts of 4, 8 and 16 beats, plus an undefined-length INCR. Every
request becomes **one INCR burst**, or a SINGLE transfer if it has one beat. The
burst breaks only where the addresses are not contiguous: at a wrap point, or
between beats of a FIXED burst.

AHB has no byte strobes. `be_conservative` selects how strobes are handled:

* **0, speculative.** Strobes are ignored and beats leave cut-through. If the
  next write beat has not arrived in the middle of a burst, the NI inserts
  BUSY transfers. This is fast, and correct whenever masters write whole
  words.
* **1, conservative.** The whole write is stored first. If every strobe is set,
  it goes out as one burst. Otherwise the NI looks at each 32-bit slave word.
  A word with a zero strobe is written as SINGLE byte transfers of its enabled
  bytes only, so disabled bytes are not touched. Consecutive words with all
  strobes set are merged back into one INCR burst, or a SINGLE if the run is
  one word. Example: an 8-beat write whose 4th word has two zero strobes
  becomes a burst of 3, two byte writes, then a burst of 4. This is always
  correct, but it waits for the whole write and is slow for sparse strobes.

**AHB pipelining.** Each address phase overlaps the previous data phase, and
write data waits in a data-phase register. AHB read data cannot be stalled, so
a read address phase goes out only while the two-entry read buffer has room.
An ERROR response makes the whole transaction SLVERR.

### APB bridge (`sni_apb`)

Every slave beat becomes one APB3 transfer (SETUP, then ACCESS until
`PREADY`), always a full 32-bit word. APB has no strobes and no narrow
accesses. A 128-bit beat becomes four word transfers. A narrower write
becomes one full-word write, with zeros in the bytes outside the transfer.
`PSLVERR` becomes SLVERR.

## Clocks and timing

* Every master and slave NI has an IP-side clock and the NoC clock. The
  example platform runs the NoC at 100 MHz and the IPs at 50–100 MHz.
* The testbenches give the IPs several different clock periods and check
  function, not speed.
* All interfaces use AXI-style valid/ready handshakes. Immediate assertions
  in the RTL check the handshake rules at the switch outputs and the NI bus
  ports, such as a waiting valid never being withdrawn.
* All resets are active-low and asynchronous, one per clock domain.

## What follows the source design and what is this design's own

**Taken from the design this RTL is built from:**
* the SoC: the IPs, their buses and widths, which switch each sits on, and
  three switches with the links between them (including which way requests
  flow);
* asynchronous FIFOs in the NIs, and none between switches sharing a clock;
* AXI-to-AHB as one undefined-length INCR burst;
* both byte-strobe options (speculative and conservative), with fully
  strobed words re-merged into bursts in conservative mode;
* width conversion in the slave NI, with one new ID for all split
  transactions;
* the 16-beat burst limit;
* splitting wrapping bursts at the wrap point;
* narrow transfers to wide AXI slaves;
* full-word APB accesses.

**This design's own choices:**
* the separate request and response networks;
* wormhole switching, round-robin arbitration and table routing;
* the flit and header format, with 4-bit node IDs and 4-bit AXI IDs;
* the address map;
* the master NI ordering rule and `MAX_OUT`;
* one transaction at a time per slave NI;
* BUSY insertion on AHB;
* zeros in the unused bytes of a narrow APB write;
* all FIFO and buffer depths (`FIFO_D` = 4, `BUF_D` = 2).

**Not built, or limited:**
* **No AHB master NI.** AHB-to-AXI conversion (undefined-length INCR from an
  AHB master) is not built, because no master in the example SoC uses AHB.
* **No concurrency in a slave NI.** Each slave NI serves one transaction at a
  time, with no reordering or interleaving across masters.
* **Aligned addresses only.** Start addresses must be aligned to the transfer
  size; unaligned AXI starts are not supported.
* **No 1 KB boundary handling.** The AHB rule that a burst must not cross a
  1 KB boundary is not enforced. Masters must not issue such bursts to the
  SDRAM.
* **No exclusive accesses.** AXI `LOCK`, `CACHE`, `PROT` and `QOS` are not
  carried.
* **Not timed.** The design has not been mapped to an FPGA or timed.

## Files

| File | Contents |
|---|---|
| `rtl/noc_pkg.sv` | Types, node numbers, address map, `beat_addr` / `chunk_beats` arithmetic |
| `rtl/async_fifo.sv`, `rtl/sync_fifo.sv` | Clock-crossing FIFO; switch input buffer |
| `rtl/noc_switch.sv` | Wormhole switch |
| `rtl/mni.sv` | Master NI |
| `rtl/sni_req_engine.sv`, `rtl/sni_resp_engine.sv` | Shared halves of the slave NIs |
| `rtl/sni_axi.sv`, `rtl/sni_ahb.sv`, `rtl/sni_apb.sv` | Slave NIs |
| `rtl/asnoc_top.sv` | The whole network for the example SoC |
| `tb/tb_*.sv` | Self-checking testbenches, one per block, plus the end-to-end and video-traffic ones |
| `tb/axi_mem.sv`, `tb/ahb_mem.sv`, `tb/apb_mem.sv` | Slave memory models |
| `tb/axi_master_bfm.sv` | Random AXI master |
| `tb/sni_tb_common.svh` | Shared testbench tasks |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends it with a failure if it hangs. Example with Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/noc_pkg.sv tb/tb_asnoc_top.sv --top-module tb_asnoc_top -o sim
./obj_dir/sim
```

Replace `tb_asnoc_top` with `tb_sni_axi`, `tb_sni_ahb`, `tb_sni_apb`, `tb_mni`,
`tb_noc_switch` or `tb_async_fifo` for the block tests.

`tb_asnoc_top` runs the full network at its default parameters. All ten
masters send random reads and writes to every slave they can reach, with every
burst type, length and size. The run has two phases: speculative AHB mode,
then conservative. Every master checks its read data against what it wrote.
The testbench also counts the design's mechanisms, and fails if any of them
never happened:
* 128-bit bursts converted for the 32-bit SDRAM;
* bursts split at a wrap point;
* narrow transfers to wide slaves;
* AHB INCR bursts, BUSY cycles and byte writes;
* conservative-mode merging of full words into bursts;
* APB transfers;
* switch contention;
* switch-to-switch traffic;
* reads held by the ordering rule.

It takes about 20 seconds.

`tb_asnoc_video` runs video-playback traffic through the same network. VIM
writes a 4 KB frame into DDR in 128-bit bursts of 16 beats. Then three
masters run at once:
* VOM reads the frame back;
* CODEC reads it and copies it into the AHB SDRAM;
* Proc 1 programs eight APB registers and reads them back.

Every byte is checked, and the run prints how long the frame write and read
took. The write takes 792 NoC cycles, about 5 bytes per cycle. The read takes
about 1,230 NoC cycles while VOM shares DDR with CODEC. The frame size, burst
length and data are this testbench's own choices, since the document gives
no traffic figures.
