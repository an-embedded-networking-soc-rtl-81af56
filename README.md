# GigaFlow: a network processor core for Ethernet access concentrators

An access concentrator at the edge of a metro Ethernet network bridges
customer VLANs onto a provider backbone, often inside MPLS tunnels (VPLS).
Per packet, the work is small: look up a MAC address, maybe add or strip a
tunnel header, and pick an output queue. The traffic, though, is minimum-size
frames at gigabit rates. On general-purpose network processors most of the
time goes into moving packet data and managing queues, not into the protocol
work.

This core splits the job in two:

* **Hardware.** Dedicated hardware blocks store each packet exactly once, keep
  per-flow queues of references to it, and do every data movement. They
  classify MAC/VLAN keys, pick which packet a processor gets next, and pick
  which output flow sends next.
* **Software.** A few small processors (PPUs, packet processing units) run the
  protocol software. They see only packet headers, handed to them through one
  dual-port RAM per processor. They steer packets by sending short commands to
  the hardware.

This repository holds the hardware side in synthesizable SystemVerilog:

* the Gigabit (GMII) and Fast Ethernet (MII) MACs;
* an ATM port: AAL5 over a UTOPIA-style cell interface;
* the data memory manager (DMM);
* the connection memory manager (CMM) with its hash-based MAC classifier (HBCE);
* the task scheduler (TSC);
* the output scheduler (OSC) and traffic shaper (TSH) of each port;
* the per-processor DP-RAMs and the command arbiters.

The processors themselves, the control CPU and the security engine are not
part of the RTL. Their connections are ports of the
top module `gigaflow_top`.

## Life of a packet

```
 GMII/MII ─► MAC rx ─► DMM store ─► input flow queue ──► TSC ──(FETCH)──► DMM
                                                                          │ header
                                                                          ▼
        PPU k ◄── task_valid[k] ◄── TSC          PPU k's DP-RAM (port A: DMM,
          │                                                      port B: PPU)
          ├─ CMM: LEARN source, CLASSIFY {dst MAC, VID}
          ├─ DP-RAM: write a new header, DMM WRITE_HDR      (encap / decap)
          ├─ DMM ENQUEUE on one output flow, or on several  (flooding)
          └─ DMM RELEASE, ppu_done[k]
 output flow queues ─► OSC (per port) + TSH (per flow) ─► DMM transmit ─► MAC tx ─► GMII/MII
```

1. **Receive.** A MAC receives a frame, checks its FCS and length, and keeps
   it in its frame buffer. The DMM copies the frame into segmented packet
   memory. It then appends a descriptor to the port's *input flow* and sends
   an arrival notice `{flow, priority}` to the TSC. The ATM port works the
   same way, with the frame carried in AAL5 cells; the cell HEC and the AAL5
   CRC-32 take the place of the FCS.
2. **Dispatch.** The TSC picks an arrival by weighted priority and chooses the
   PPU with the fewest outstanding tasks. It then issues one `FETCH` command:
   the DMM dequeues the packet and copies its first segment (64 bytes) into a
   free buffer of that PPU's DP-RAM. When the response arrives, the TSC
   raises `task_valid[k]` with the packet handle, its length, the input flow
   and the buffer (`task_slot`).
3. **Processing.** The PPU reads the header from its DP-RAM and asks the CMM
   to learn the source address and classify the destination. It may write a
   new header into the DP-RAM and have the DMM splice it in with
   `WRITE_HDR`. It then enqueues the packet on one or more output flows and
   releases its own reference.
4. **Transmit.** Each enqueue on an output flow is reported to that port's
   OSC. When the MAC has room for a maximum frame, the OSC offers its choice
   to the DMM. The DMM streams the packet into the MAC transmit buffer, drops
   that queue's reference, and reports the length back, which advances the
   scheduler's and the shaper's state.

The payload is written once, on reception, and read once per transmission,
however many queues the packet passed through.

## Data memory manager (`dmm`)

The DMM is the largest block and the one to understand first.

### Storage

| Structure | Contents |
|---|---|
| `dmem` | `NSEG` segments of `SEG_WORDS` 32-bit words: 4096 × 64 bytes by default. Bytes are big-endian within a word. |
| `seg_next`, `seg_nb` | The segment chain of a packet, and the bytes used in each segment. The same `seg_next` array links the free list. |
| `pkt_seg`, `pkt_last`, `pkt_nseg`, `pkt_len`, `pkt_ref` | Per packet handle: first and last segment, segment count, length in bytes, and reference count. |
| `desc_pkt`, `desc_next` | Queue elements. Each holds a packet handle and the next element. |
| `q_head`, `q_tail`, `q_cnt` | Per flow, for all 32768 flows. |

Queues hold descriptors, not packets. So one stored packet can sit in any
number of queues, each holding one reference:

* Enqueuing adds a reference.
* Dequeuing hands the queue's reference to the caller.
* `RELEASE` drops one reference. At zero, the packet's whole segment chain is
  spliced onto the free list in one cycle.

Free segments, handles and descriptors come first from a counter of never-used
entries and then from the free lists, so those arrays need no clearing. Only
`q_cnt` is cleared after reset, one flow per cycle: 32768 cycles, while
`init_done` is low.

### Commands

A command is a `dmm_cmd_t`: `op`, `flow`, `dst`, `pkt`, `ppu`, `dp_base` and
`nbytes`. It is answered by a one-cycle `rsp_valid` with `{ok, data}`. For
operations that return a packet, `data` is `{length[31:16], handle[15:0]}`.

| op | effect |
|---|---|
| `ENQUEUE` | append `pkt` to `flow`; +1 reference |
| `DEQUEUE` | remove the head of `flow`; the caller owns its reference |
| `RELEASE` | −1 reference of `pkt`; storage freed at zero |
| `MOVE` | head of `flow` to the tail of `dst`, no data touched |
| `COPY` | head of `flow` also appended to `dst` (flooding); +1 reference |
| `READ_HDR` | copy the first `nbytes` (at most one segment) of `pkt` into DP-RAM `ppu` at word `dp_base` |
| `WRITE_HDR` | replace the first segment of `pkt` by `nbytes` bytes read from DP-RAM `ppu`. The new header may be longer (encapsulation, spills into a second segment) or shorter (decapsulation) than the old one. |
| `FETCH` | `DEQUEUE` + `READ_HDR`, used by the TSC |
| `QLEN`, `PKT_LEN` | return the queue depth or the packet length |

`ok = 0` means the operation failed and changed nothing. The causes are an
empty queue, no free descriptors or segments, or a packet with no references.

### Engine and timing

One engine serves three sources in round-robin order:

* a frame waiting in a receive buffer;
* a transmit request from an output scheduler;
* a command.

It moves one word per cycle for packet data: reception, transmission, and
header read and write. Pure queue operations take 1 to 3 cycles. A 64-byte
frame therefore costs the engine about 16 cycles to store, 16 to fetch its
header and 16 to send, plus a few cycles of queue work.

Receive and transmit are whole-frame operations, so a command can wait for up
to one maximum frame.

Every append to, and removal from, any queue is reported on `enq_evt` and
`deq_evt`. Each port's OSC keeps the events of its own range of output
flows, and uses them to track backlog without reading the DMM's memories.

### Header buffers

The TSC alternates between two 256-word buffers in each PPU's DP-RAM
(`task_slot` 0 or 1). A PPU can therefore have a second header fetched while
it still works on the first, which hides the fetch latency from the software.
A buffer is reused only after `ppu_done` for the task that held it. So PPUs
must finish their tasks in the order they got them.

## Classification (`cmm`, `hbce`)

The CMM owns three tables and answers one request at a time (`cmm_req_t`).

**HBCE: MAC/VLAN table, 16K entries.**

* *Key.* The 24-bit vendor part (OUI) of the MAC address is replaced by its
  index in a 64-entry vendor table that the engine fills itself. The key is
  then {VID, vendor index, 24-bit NIC part}. That makes stored entries
  shorter than the full 60-bit key.
* *Search.* An XOR-fold hash of the key selects a base slot. The engine
  always reads four consecutive slots, one per cycle. Because every search
  reads all four, a deletion only clears a valid bit; nothing has to be
  moved.
* *Learn.* A search followed by a write: it updates the matching entry or
  fills the first free slot of the four. It fails when all four are taken.
* *Delete.* Used by the control CPU for aging.
* *Timing.* The answer comes `PROBES+1` = 5 cycles after the request is
  accepted.
* *After reset.* The table is cleared, one entry per cycle.

**VLAN configuration memory.** 4096 entries: VID → {valid, 11-bit VPLS index}.

**VLAN context memory.** 2048 entries of `vctx_t`:

* a 4-bit protocol, 0 meaning plain bridging and 1 meaning MPLS;
* two 16-bit output-queue fields;
* an 11-byte L2 tunnel header.

`CLASSIFY` does the MAC search, reads the VLAN configuration and reads the
context in one request. The PPU software therefore gets the output port,
VPLS instance, protocol, queue and tunnel header in a single round trip.
`vlan_ok` says whether the VLAN is configured. The context fields are stored
for software; the hardware does not interpret them.

## Scheduling

**TSC (task scheduler).**

* Keeps one FIFO of arrival notices per priority, 4 levels. The top makes
  each FIFO NPKT deep: the DMM holds at most NPKT packets, each with one
  pending notice, so no notice can be lost.
* Serves the FIFOs by weighted credits. Each non-empty level may be served
  `weight` times per round; the highest level with credit goes first, and
  the credits reload when none is left. Reset weights are 1, 2, 4 and 8 for
  priorities 0 to 3.
* Sends the chosen task to the PPU with the fewest outstanding tasks
  (at most 2), round-robin among equals.
* Counts notices lost to a full FIFO in `ovf`.

**OSC (output scheduler), one per port, 16 flows.** A work-conserving
scheduler in the style of WF2Q, with virtual times:

* Only backlogged, conforming flows of the highest waiting priority compete.
* Among them, a flow is eligible when its virtual finish time is ≤ the
  system virtual time V.
* The winner has the smallest `max(V, F) + LREF*vstep`, where `LREF` is a
  reference length of 64 bytes. The real length is not known until the DMM
  sends the packet.
* After sending, the flow's `F` becomes `max(V, F) + len*vstep`, and V moves
  up to the smallest finish time among the backlogged flows.
* `vstep` (8.8 fixed point) is the inverse of the flow's weight.

**TSH (traffic shaper), one leaky bucket per output flow.**

* The level leaks `rate` bytes per cycle (8.8 fixed point).
* Each sent packet adds its length.
* The flow is *conforming*, and may be chosen by the OSC, while
  level ≤ depth.
* Rate 0 means unshaped.

## Ethernet ports (`gmii_rx`, `gmii_tx`, `mii_adapt`)

**Receiver (`gmii_rx`).**

* Strips preamble and SFD and checks the FCS residue (0xDEBB20E3).
* Drops frames that are shorter than 64 bytes, longer than 1522 bytes, carry
  `rx_er`, or do not fit the buffer.
* Keeps good frames as 32-bit words in a 1024-word ring, with their lengths
  (FCS stripped) in a 16-entry FIFO.

**Transmitter (`gmii_tx`).**

* Store-and-forward: it starts a frame only when the whole frame is in its
  buffer.
* Sends the preamble and SFD, pads to 60 bytes, appends the FCS, and keeps
  an inter-frame gap of 12 bytes.

**MII port (`mii_adapt`).** Both MACs take a byte strobe `ce`: every cycle
for GMII, every second MII strobe for MII. `mii_adapt` assembles and splits
nibbles, low nibble first, so the same MAC code serves the Fast Ethernet port.

## ATM port (`aal5_rx`, `aal5_tx`)

The ATM port carries bridged Ethernet frames, without FCS, as AAL5 PDUs on one
virtual circuit (`ATM_VPI`/`ATM_VCI`, default 0/32). Each frame sits behind a
2-byte pad, as in RFC 2684 VC multiplexing. To the DMM the port looks like
the Ethernet MACs: the same frame read interface and the same word push
interface.

**Line side.** Cells are 53 bytes and move one byte per clock.

* Receive: a byte is taken on every clock with `rx_clav` high. `rx_soc`
  marks the first byte of a cell.
* Transmit: a cell starts only when the PHY raises `tx_clav`. Its bytes then
  go out on consecutive clocks with `tx_enb_n` low, and `tx_soc` on the first
  byte.

This is a single-PHY, UTOPIA Level 1 style transfer. The multi-PHY polling
of Level 2 is not modelled.

**Receiver (`aal5_rx`).**

* Checks the HEC and the VPI/VCI of every cell. It counts cells with a bad
  HEC, cells of other circuits and OAM cells in `cells_dropped`.
* Reassembles the PDU until the cell with the end-of-PDU bit (PTI bit 0).
* Drops the PDU, counting it in `drops`, if the CRC-32 residue is wrong, the
  trailer length does not match the cell count, or the buffer is full.

**Transmitter (`aal5_tx`).**

* Store-and-forward, like `gmii_tx`.
* Builds the PDU: pad, frame, zero fill, and the trailer (length = frame + 2,
  CRC-32).
* Cuts the PDU into cells with header, end-of-PDU bit and HEC.

## Command buses (`cmd_arb`, `dpram`)

`cmd_arb` is a round-robin arbiter that passes one command at a time from N
masters to one target, and returns the response to the master that issued
it. There are two of them:

* The DMM's arbiter has N = 1 + NPPU masters: the TSC first, then the PPUs.
* The CMM's arbiter has N = NPPU + 1 masters: the PPUs, then the control CPU.

The arbiters stand in for a simple shared non-burst bus; no particular bus
protocol is modelled. Bulk data does not use the bus. It goes through the
DP-RAMs (`dpram`, 512 × 32 bits, synchronous read-first on both ports).

## Top level (`gigaflow_top`)

| parameter | default | meaning |
|---|---|---|
| `NGE` | 2 | GMII ports, DMM ports 0..NGE-1; the MII port is port NGE, the ATM port NGE+1 |
| `NPPU` | 4 | processing units (DP-RAMs, task outputs, bus masters) |
| `NFLOWS` | 32768 | DMM flow queues |
| `NSEG`, `NPKT`, `NDESC` | 4096, 1024, 2048 | segments of 64 bytes, packet handles, queue descriptors |
| `OUT_FLOWS`, `OUT_BASE` | 16, 1024 | output flow j of port p is flow `OUT_BASE + p*OUT_FLOWS + j` |
| `HBCE_ENTRIES` | 16384 | MAC/VLAN table entries |
| `MAC_BUF_WORDS` | 1024 | receive and transmit buffer of each MAC |
| `TX_RESERVE` | 400 | free transmit-buffer words a port needs before its OSC may send |
| `ATM_VPI`, `ATM_VCI` | 0, 32 | virtual circuit of the ATM port |

Input port p enqueues on flow p at priority 0 by default. `cfg_port_*`
changes that.

The configuration ports are:

* `cfg_tsc_*`: TSC weights;
* `cfg_out_*`: each output flow's `vstep`, priority, shaper rate and depth.

The control CPU reaches the CMM through `cpu_cmm_*`. Its response data
appears on `ppu_cmm_rsp`, together with its own strobe `cpu_cmm_rsp_valid`.

`ready` rises when the DMM and CMM have finished their reset sweeps: about
32K cycles.

Shared types and the command encodings are in `gf_pkg.sv`.

## How this design relates to the published architecture

These parts follow the GigaFlow architecture as published:

* the block set and how it is connected;
* per-flow queuing for 32K flows;
* storing each packet once while it sits in many queues;
* header exchange through one DP-RAM per processor, with commands over a
  shared bus;
* a hash-based MAC classifier that replaces vendor IDs;
* VLAN configuration and context tables with the fields listed above;
* a leaky-bucket shaper and a WF2Q-like output scheduler;
* a weighted, prioritised task scheduler with load balancing.

The following are this design's own choices, because the architecture
description does not give them:

* **Commands.** The DMM's command set beyond enqueue and dequeue. The
  original has twelve further commands that are not documented; the ten
  here are what bridging and MPLS tunnelling need.
* **Formats, widths and sizes.** All memory sizes except the flow count and
  the MAC table size, and the segment size.
* **Algorithms.** The hash function and the four-slot probing; the credit
  scheme of the TSC; the two header buffers per PPU; the OSC's
  reference-length finish estimate.
* **Memories.** The DMM's packet data and the CMM tables are on-chip arrays.
  The original keeps packet data in external DRAM and the tables in external
  SRAM, behind memory controllers that are not part of this RTL.
* **Bus.** The bus between the processors and the managers is reduced to
  the two arbiters.
* **ATM port.** The original names an AAL5/UTOPIA Level 2 interface and
  gives no further detail. Here it has one virtual circuit, a single-PHY
  byte transfer and RFC 2684 bridged frames. The cell and AAL5 formats are
  the standard ones.

The RTL does not contain these parts of the original system:

* the processors themselves;
* the control CPU;
* the IPsec engine;
* the external memories;
* the optical transceivers.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_dpram` | random traffic on both ports against a reference array, one-cycle read latency |
| `tb_cmd_arb` | every master gets exactly its own answers in order; grants rotate |
| `tb_hbce` | learn, lookup, update, delete against a reference model; VID and vendor are part of the key; 5-cycle latency |
| `tb_cmm` | VLAN tables, CLASSIFY results, unconfigured VLANs, aging |
| `tb_tsh` | bucket level against a cycle model |
| `tb_osc` | weighted shares (1:2:3), strict priority, shaped flows skipped, work conservation |
| `tb_tsc` | each arrival dispatched once, FETCH fields and buffer addresses, at most two tasks per PPU, both PPUs used, 8:1 weights, no starvation, overflow count |
| `tb_gmii_rx` | good frames of several lengths (also at half rate), bad FCS, runt, `rx_er` |
| `tb_gmii_tx` | framing, padding, FCS, inter-frame gap |
| `tb_mii_adapt` | nibble assembly and splitting, both directions |
| `tb_aal5` | `aal5_tx` looped into `aal5_rx` under random `tx_clav`; every cell's HEC, circuit, end bit, pad, fill, length and CRC checked against bit-serial reference CRCs; foreign cells, bad HEC, bad CRC and wrong length rejected |
| `tb_dmm` | reception, FETCH, longer header written back, enqueue and copy to two output flows, transmission of both copies, MOVE, empty DEQUEUE, one word per cycle, no storage leak over many packets, drops when packet handles run out |
| `tb_gigaflow_top` | end to end at default sizes (see below) |
| `tb_gigaflow_workload` | minimum-size frames at line rate through the three packet paths, with 1 and 4 PPUs |

`tb_gigaflow_top` runs the top with every parameter at its default.

*Setup.* It includes four behavioural PPU models that run bridging software
(learn, classify, VLAN 20 encapsulated into an MPLS tunnel, flooding of
unknown destinations). A control-CPU model sets up the tables and the
schedulers.

*Traffic.* It drives GMII and MII frames, including two with a bad FCS, and
AAL5 cells on the ATM port. Every transmitted frame is checked byte for
byte, FCS or HEC and AAL5 CRC included.

*Mechanisms.* It counts each of these and fails if any never happens:

* reception on GMII, MII and ATM, and FCS drops;
* tasks on all four PPUs, and a second header fetched while a PPU is busy;
* header rewrite, flooding, and forwarding to learned addresses;
* the shaper holding a flow back;
* two output flows sharing a port;
* transmission on MII and on ATM.

It runs in about 10 s.

`tb_gigaflow_workload` sends 200 back-to-back 64-byte frames with an 8-byte
gap for each path: Ethernet→Ethernet, Ethernet→MPLS and MPLS→Ethernet. At one
byte per cycle, that offers 1.25 Mpackets/s.

It runs two cores side by side, one with a single PPU and one with four. Both
use the default sizes otherwise. Their ATM ports are idle. The helper module `gigaflow_wl_bench` holds
each core with its PPU models. Each PPU model spends 150 cycles of software
time per packet, plus its command round trips. All frames are forwarded and
checked. The measured rates, in kpackets/s:

| PPUs | Eth→Eth | Eth→MPLS | MPLS→Eth |
|---|---|---|---|
| 1 | 482 | 363 | 403 |
| 4 | 1188 | 1002 | 1190 |

* With one PPU, the software time sets the rate.
* With four PPUs, the input line (1.25 Mpackets/s) caps Eth→Eth and MPLS→Eth.
* The output line caps Eth→MPLS, because each frame grows by 15 bytes.

Real packet software is slower than this stand-in. The rates show where the
hardware stops being the bottleneck, not what a product would reach.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_gigaflow_top \
    -y rtl -y tb +libext+.sv rtl/gf_pkg.sv tb/tb_gigaflow_top.sv
./obj_dir/Vtb_gigaflow_top
```

Replace the top-module name and the testbench file to run another bench.

### Limits worth knowing

* One DMM engine serialises reception, transmission and commands. Under heavy
  load a command can wait for a whole frame transfer.
* HBCE learning fails when all four probed slots are taken. The response
  says so (`hit = 0`), and software must handle it.
* The vendor table (64 OUIs) does not age. Once it is full, addresses from
  new vendors can be neither learned nor found.
* The OSC searches its 16 flows linearly within one cycle. A much larger
  `OUT_FLOWS` would need a pipelined priority queue.
* PPUs must complete tasks in order; see "Header buffers".
