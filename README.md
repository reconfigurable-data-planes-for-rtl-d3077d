# Virtual router data path with hardware and software data planes

Many virtual networks share one physical router. A network that needs line-rate
forwarding gets its own forwarding engine (a *data plane*) in the FPGA. The
others are forwarded by software on the host, reached through the host DMA
queues. A classification stage at the input decides, frame by frame, which
data plane a frame belongs to. Because that decision is a table entry, a
virtual network moves between hardware and software by rewriting one entry.
The hardware planes are independent copies, each with its own tables and
registers. They can keep their IPv4 or flat-label (ROFL) forwarding tables in a
pair of large external SRAMs that they share, instead of a small on-chip TCAM.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The top module is
`vnet_top`. Its default configuration has four hardware planes, three IPv4 and
one ROFL, all using the shared SRAM tables.

## Data path

```
 MAC RX 0..3 ─┐                                         ┌─ 32-word FIFO ─ plane 0 ─┐
 CPU RX 0..3 ─┴─ input queues ─ input arbiter ─ design ─┼─ 32-word FIFO ─ plane 1 ─┤
               (8 x 256 words)   (round robin,  select  ├─      ...                ├─ output arbiter ─ output queues ─ MAC TX 0..3
                                  per frame)            └─ CPU transceiver ────────┘                  (8 x 256 words)   CPU TX 0..3
                                                                     planes ── sram_arbiter (bank L1) ── SRAM pins [0]
                                                                            └─ sram_arbiter (bank L2) ── SRAM pins [1]
```

The Ethernet MACs, the PCI DMA engine and the two SRAM chips are outside the
design. Their packet streams and SRAM pins are ports of `vnet_top`.

Every stream is a valid/ready handshake carrying one `pkt_word_t` per cycle:

| field | width | meaning |
|---|---|---|
| `data` | 64 | frame bytes, big-endian (byte 0 in bits 63:56 of word 0) |
| `sop`, `eop` | 1 each | first and last word of the frame |
| `src` | 3 | input port: 0..3 MAC, 4..7 CPU DMA queue (set by the input queue) |
| `dst` | 3 | output port, set by the plane or the CPU transceiver |
| `tag` | 4 | VID of the hardware plane, or number of the software interface |

Frames that are not a multiple of 8 bytes are padded in the last word. There
is no byte-enable field.

## Frame format

IPv4 virtual networks use IPIP tunnelling. The outer IPv4 header addresses
physical tunnel endpoints. The inner header carries the virtual addresses.
The design reads and writes these fields:

| bytes | field | word / bits |
|---|---|---|
| 0-5 | DST MAC | w0[63:16] |
| 6-11 | SRC MAC | w0[15:0], w1[63:32] |
| 24-25 | outer header checksum | w3[63:48] |
| 26-29 | outer SRC IP | w3[47:16] |
| 30-33 | outer DST IP | w3[15:0], w4[63:48] |
| 50-53 | inner DST IP = DST VIP (virtual destination) | w6[47:16] |

A ROFL frame carries its 32-bit destination label at the DST VIP position.
Frames shorter than seven words are dropped.

## Dynamic design select

`design_select` buffers the first seven words of a frame and searches
{DST MAC, DST VIP} in a 16-entry ternary table. An ordinary entry is
{address, care-mask} and ignores the MAC. An entry with the by-MAC flag set
matches the full destination MAC and ignores the address, so a virtual network
can be identified by its virtual MAC instead of its virtual IP. The first
matching entry wins. The entry's result says whether the network is in
hardware, which plane, and the tag (VID or software interface). The frame is
then sent as follows:

* **Hardware hit.** The frame goes to that plane's 32-word FIFO, tagged with
  the plane's VID.
* **Software hit, single-receiver mode.** The frame goes to the CPU
  transceiver, tagged with the software interface number. The transceiver puts
  the frame in CPU TX queue `src + 4`. It replaces the DST MAC with the MAC of
  that software interface, so the host's software bridge delivers the frame to
  the right container.
* **Software hit, multi-receiver mode.** The frame is dropped. In this mode,
  switches outside the router send software traffic straight to the host's own
  NIC, and the CPU queues carry nothing.
* **Returned by software.** A frame arriving on a CPU RX queue (src 4..7) has
  already been forwarded by software. It passes through the CPU transceiver
  unchanged and leaves on MAC TX `src - 4`.
* **Miss.** The frame is dropped.

Single-receiver mode is the reset state. The mode register is written through
`cfg`.

**Migration.** To move a network from hardware to software, rewrite its table
entry. Frames already queued in the plane still finish in hardware. The
end-to-end testbench does this while traffic is running. In the full system
this step belongs with FPGA reconfiguration and an ARP remap of the tunnel
endpoints, both done by host software.

## Hardware data plane

`vdp_plane` is one virtual router's forwarding engine. For each frame it:

1. Captures words 0..6.
2. Looks up the destination in the plane's forwarding table, which gives an
   output port and a next hop.
3. Looks up the next hop's MAC in a 32-entry ARP CAM.
4. Emits the rewritten header, then streams the rest of the frame.

It processes one frame at a time; the FIFO in front absorbs new arrivals.
A frame is dropped if either lookup misses.

An IPv4 plane rewrites these fields:
* Outer DST IP becomes the next hop, the far end of the tunnel.
* Outer SRC IP becomes the plane's own address on the output port.
* The outer checksum is recomputed.
* DST MAC becomes the ARP result.
* SRC MAC becomes the plane's MAC on the output port.

The inner virtual header is left alone. A ROFL plane rewrites only the two MAC
addresses. Its ARP CAM is keyed by the label that won the lookup.

An IPv4 plane has three routing modes, set by its MODE register:
* destination-based (the default): the key is the DST VIP;
* source-based: the key is the inner SRC IP (bytes 46-49);
* source-and-destination: the key is {SRC, DST}, matched against entries that
  carry a source prefix next to the destination prefix. Only the TCAM table
  supports this. A route write takes its source prefix from a preceding SRC
  register write; without one, the entry matches any source.

Parameters `PROTO` and `USE_SRAM` select one of four forwarding tables:

| table | lookup | latency (request to result) |
|---|---|---|
| `ipv4_tcam_fib` | 32-entry on-chip TCAM, longest prefix by entry order | 1 cycle |
| `rofl_tcam_fib` | 32-entry ID TCAM and 32-entry pointer cache searched together; lower ID wins | 1 cycle |
| `ipv4_sram_fib` | Conflict CAM, then SRAM bank L1, then (long prefix) bank L2 | 6 cycles short, 10 long |
| `rofl_sram_fib` | hashed namespace in bank L2, with pointer cache in parallel | 4 cycles |

The SRAM latencies assume a read latency of 2 cycles (`SRAM_RD_LAT`). The
general formulas are 4 + RD_LAT (short prefix), 6 + 2·RD_LAT (long prefix) and
2 + RD_LAT (ROFL).

## IPv4 forwarding table in SRAM

This is the subtle part of the design. The scheme is a two-level direct-index
table, similar to DIR-24-8 but split at 19 bits. It is shared by all IPv4
planes.

* **Bank L1** has 2^19 entries of 36 bits, indexed by address bits 31:13. An
  entry is `{flag, port[2:0], next_hop[31:0]}`.
  * A prefix of length l ≤ 19 is written into all 2^(19−l) entries it covers,
    with `flag = 0`.
  * For a longer prefix, the L1 entry of its top 19 bits gets `flag = 1`, and
    its low 6 bits name an L2 set.
* **Bank L2** holds 64 sets of 2^13 entries. Entry `{set, addr[12:0]}` holds
  `{0, port, next_hop}`. As in L1, a prefix between /20 and /32 is expanded
  over the set entries it covers.
* A next hop of 0 means "no route". The host clears both banks before use.

Two virtual routers can own the same prefix with different routes. The
control plane then stores one of them at a free L1 location (an *indirect
index*). It also writes `{VID, prefix, mask} → index` into that plane's
32-entry **Conflict CAM**. Every lookup first searches the Conflict CAM with
`{VID, DST VIP}`, which costs one cycle. On a hit, the indirect index replaces
address bits 31:13 as the L1 address. Keeping free L1 locations and
allocating them is the control plane's job.

Example, as used in the end-to-end test:
* VID 1 routes 10.1.0.0/16 out port 0. It fills L1 entries
  `0x0A010000 >> 13` through +7.
* VID 3 also routes 10.1.0.0/16, but out port 3. Its entry goes to L1
  `0x7F000`, and plane 2's Conflict CAM gets `{3, 10.1.0.0, ffff0000} → 0x7F000`.
* A /24 such as 10.6.5.0/24 flags L1 entry `0x0A060500 >> 13`, which points
  to set 7. The 256 entries `{7, 0x500..0x5FF}` hold its route.

## ROFL forwarding table in SRAM

Each ROFL virtual router owns a contiguous block of bank L2, its circular
label namespace. There are two registers per VID:
* a base address
* a mask, which sets the namespace size to a power of two

A label's location is `base[VID] + (label & mask[VID])`. A resident label's
location holds `{1, port, label}`. Every other location holds the entry of the
closest resident label; the control plane fills these when it adds a label. At
the same time as the SRAM read, the label is searched in the plane's pointer
cache TCAM. The lower of the two labels wins, and the winning label keys the
ARP lookup.

## SRAM sharing

Each bank has an `sram_arbiter` with one requester per plane plus the host:
* The grant is round-robin and comes in the cycle of the request.
* The command is registered onto the SRAM pins.
* Read data returns with a per-requester valid, RD_LAT + 1 cycles after the
  grant.

The host writes the tables through the register port. One write per bank
can be pending; `cfg_busy` is high until it is granted, and the host must
wait before issuing another `cfg` write.

## Register port

`cfg` is a one-cycle write, `{we, unit[3:0], tbl[3:0], idx[18:0], data[127:0]}`.

| unit | tbl | idx | data |
|---|---|---|---|
| plane 0..N-1 | FIB (0): IPv4 TCAM route | entry | [31:0] prefix, [63:32] mask, [95:64] next hop, [98:96] port, [127] valid |
| plane | FIB (0): ROFL ID | entry | [31:0] ID, [63:32] care-mask, [66:64] port, [127] valid |
| plane | AUX (1): Conflict CAM (IPv4 SRAM) | entry | [31:0] prefix, [63:32] mask, [82:64] L1 index, [123:120] VID, [127] valid |
| plane | AUX (1): pointer cache (ROFL) | entry | [31:0] label, [63:32] care-mask, [66:64] port, [127] valid |
| plane | ARP (2), exact match | entry | [31:0] next hop or label, [111:64] MAC, [127] valid |
| plane | PMAC (3) / PIP (4) | output port | [47:0] plane MAC / [31:0] plane IP on that port |
| plane | NS (5): ROFL namespace | VID | [18:0] base, [50:32] mask |
| plane | MODE (6): IPv4 routing mode | – | [1:0] 0 destination, 1 source, 2 source-and-destination |
| plane | SRC (7): source prefix (IPv4 TCAM) | – | [31:0] source prefix, [63:32] mask, used by the next FIB write |
| DSEL (0xD) | FIB (0) | entry | [31:0] VIP, [63:32] mask, [64] hardware, [67:65] plane, [71:68] tag, [119:72] MAC, [120] match by MAC, [127] valid |
| DSEL (0xD) | MODE (6) | – | [0] single-receiver |
| CPUX (0xC) | PMAC (3) | software interface | [47:0] its MAC |
| SRAM (0xE) | bank (0 = L1, 1 = L2) | address | [35:0] word |

Counters of frames to hardware, to software, returned, dropped, forwarded per
plane and Conflict CAM redirects per plane are outputs of `vnet_top`.

## Where this design departs from the original system, or goes beyond it

* **Queues.** The input and output queues are on-chip FIFOs (8 × 256 words
  each). When SRAM tables are used, the original system keeps these queues
  in the board's DDR2 DRAM. No DRAM controller is included.
* **Long-prefix latency.** The long-prefix SRAM lookup takes 10 cycles. The
  original system took 21, and it is not known what the extra cycles were
  spent on. Short-prefix (6), TCAM (1) and ROFL SRAM (4) latencies match.
* **Number of SRAM planes.** The default has four SRAM-based planes. The
  original FPGA fitted three SRAM planes (four with TCAM tables), a limit of
  that device.
* **Routing modes.** An IPv4 plane routes on the destination (default), on the
  source, or on both. The original names the three modes without further
  detail, so the register and the TCAM key layout are this design's.
  Source-and-destination routing needs the TCAM table; an SRAM-table plane in
  that mode routes on the destination.
* **Software-side rewrite.** Software data planes are said to also rewrite
  the DST VIP, but the hardware rewrite is described without it. The hardware
  here leaves the inner header untouched.
* **ROFL classification.** Frames are classified by the label at the DST VIP
  position, or by destination MAC. No separate ROFL header format is defined.
* **Classification by MAC.** The original allows classification by virtual
  MAC but gives no format. Here one flag per entry selects which field
  the entry matches.
* **Choices of this design.** These were left open by the original, so this
  design picks them:
  * the register encoding, the ARP CAM, the 16-entry design select table, and
    dropping on a miss
  * checksum recomputation
  * the SRAM arbitration policy
  * the use of bank L2 for ROFL namespaces
* **Conflict CAM size.** It has 32 entries per plane, as in the original
  prototype. A large table with much prefix overlap would need far more: about
  13,000 entries for 100K prefixes at 13% overlap.

Outside the RTL and not modelled: the Ethernet MAC/PHYs, the PCI DMA engine,
FPGA reconfiguration, and the host software (containers, bridge, control
planes). The testbenches include `tb/sram_model.sv`, a synchronous SRAM with
a configurable read latency.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
compares the outputs against a model written independently in the testbench,
checks the lookup latencies listed above, and prints
`TB_RESULT checks=N failures=M`.

`tb/tb_vnet_top.sv` runs the whole design at its default parameters, with two
512K × 36 SRAM models. It programs every table through `cfg`, then acts as the
host software: frames that come out on a CPU TX queue are sent back on the
matching CPU RX queue. Every frame leaving a TX port is compared byte for byte
with a reference rewrite. The test covers:
* short and long prefixes and a Conflict CAM redirect
* ROFL namespace and pointer-cache hits
* software forwarding and the return path
* a migration from hardware to software during traffic
* the switch to multi-receiver mode, and misses
* source-based routing on one plane
* classification by destination MAC
* a stalled MAC port whose back-pressure reaches the design select
* contention between planes for an SRAM bank

It fails if any of these never occurs. It runs in a few seconds.

To simulate with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_vnet_top \
  -y rtl -y tb +libext+.sv rtl/vnet_pkg.sv tb/vnet_tb_pkg.sv tb/tb_vnet_top.sv
./obj_dir/Vtb_vnet_top
```

For a block testbench, replace `tb_vnet_top` with `tb_<module>`.
`tb/vnet_tb_pkg.sv` holds the frame builder and the checksum reference.
