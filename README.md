# TELL1 readout board in SystemVerilog

TELL1 is an off-detector readout board for a collider experiment. Each
beam crossing that the first trigger level (Level-0) accepts, at up to
about 1.1 MHz, delivers one event to the board. That event is a burst of
samples on 24 optical links. The board then does four things:

* It pre-processes every event for the second trigger level (Level-1):
  pedestal subtraction, channel masking, common-mode correction and zero
  suppression.
* It sends every event to the Level-1 trigger farm.
* It keeps the raw data of every event in a large Level-1 buffer until
  the farm's decision arrives, which can take tens of milliseconds.
* It sends the events that Level-1 accepts, zero-suppressed again, to the
  High Level Trigger (HLT) farm.

Both outputs are IP packets on Gigabit Ethernet. To keep the packet rate
manageable, several events are packed into one **Multi Event Packet
(MEP)**: up to 32 per packet for Level-1 and 16 for the HLT.

This repository holds synthesizable RTL for the board's digital logic:
the four pre-processing FPGAs ("PP-FPGAs") and the synchronisation and
link FPGA ("SyncLink-FPGA"). The parts around the logic are not
included: receiver cards, SDRAM chips, TTC receiver chip and Ethernet
card. They appear as ports of the top module `tell1_top`, and the
testbenches model them.

## Board structure

```
 6 links ─► PP-FPGA 0 ─┬─ L1T link (16-bit stream) ─┐
 6 links ─► PP-FPGA 1 ─┤                            │
 6 links ─► PP-FPGA 2 ─┤                            ├─► SyncLink-FPGA ─► POS-PHY L3 (L1T MEPs)
 6 links ─► PP-FPGA 3 ─┴─ HLT link (16-bit stream) ─┘        ▲        └─► POS-PHY L3 (HLT MEPs)
              │  ▲                                            │
          SDRAM bank (Level-1 buffer)      TTC: L0 accept, broadcasts, SyncData/SyncAck
```

Inside a PP-FPGA (`pp_fpga`), each of the six links has its own chain:

```
link ─► link_sync ─► ped_com ─► l1t_zsupp ─┐
        │ (raw 16-bit words)               ├─► l1t_pplink ─► L1T link
        └──────────────► l1b_ctrl ◄─► SDRAM│   (64 KByte de-randomizer, Level-0 throttle)
                            └─► hlt_link ─► HLT link
```

Inside the SyncLink-FPGA (`synclink_fpga`):

```
TTC ─► bcast_cmd ─► l0_derandomizer ─► syncdata_gen ─► SyncData to the PP-FPGAs
            └─► l1a_gen ─► Level-1 accept event numbers to the PP-FPGAs
            └─► IP destinations ─► dest FIFO (one per stream)

L1T links ─► l1t_linking ─┐
HLT links ─► hlt_zsupp ───┴─► (per stream) event data FIFO + event size FIFO
      ─► event_transfer_ctrl ─► mep_buffer ─► MEP address FIFO
      ─► framer (+ ip_header_ram, dest FIFO) ─► pos3_tx ─► POS-PHY Level 3
```

All blocks use one clock and a synchronous active-high reset. The
original board uses several clocks: 80 MHz for pre-processing, 120 MHz
for the SDRAM and 100 MHz for the Ethernet card. See "Departures" below
for what one clock means.

## Event identification

Beetle front-end chips send no event number with their data. Their only
tag is an 8-bit pipeline column number (PCN) in the header. The board
therefore learns event boundaries and event numbers from two sources.

* **Reference data valid.** A reference front-end chip on a small
  mezzanine card (FEM) runs in step with the detector chips. Its data
  valid (`ref_dv`) and PCN (`ref_pcn`) enter the board.
  * `link_sync` delays `ref_dv` by `DV_SHIFT` cycles to line it up with
    the link data.
  * It then frames each event as one header word followed by
    `N_SAMPLES` = 32 sample words. The ADC value is in bits [9:0].
  * It compares the header's PCN, bits [7:0], with the reference.
    A mismatch raises that link's `pcn_err` bit for the event.
* **TTC counters.** `bcast_cmd` keeps a local bunch counter (0..3563)
  and a Level-0 event counter. Each Level-0 accept stores
  {event counter, bunch counter} in the 16-deep `l0_derandomizer`.
  `syncdata_gen` offers the oldest entry to all four PP-FPGAs as
  *SyncData*. Each PP-FPGA takes it when link 0 delivers an event header
  and answers with a one-cycle *SyncAck*. Once all four have
  acknowledged, the entry is released. `sync_miss` (part of `error`)
  flags an event header that arrives with nothing offered.

Detectors whose front-end chips are not Beetles send their own data valid
(the link's flow-control bit) and, in the header, part of the Level-0
event counter. An ECS bit per PP-FPGA selects this **link type 1**. In
that mode:

* `link_sync` frames each event with the link's own `link_dv`; the
  reference Beetle signals are not used.
* It compares header bits [7:0] with the lower 8 bits of the event
  counter currently offered on SyncData.
* A mismatch sets the same `pcn_err` bit.

The lower 16 bits of the event number label the event everywhere
downstream. They are the Level-1 buffer slot, the fragment header word
and the key that the linking stages check.

### TTC broadcast encoding

The TTC system carries 6-bit *short broadcasts* and addressed 8-bit
*long broadcasts*. Their exact codes are this design's choice:

| broadcast | meaning |
|---|---|
| short, bit 0 | bunch counter reset |
| short, bit 1 | event counter reset (also restarts Level-1 decision numbering) |
| short, bit 2 | Level-1 decision strobe; bit 3 = accept |
| long, sub-address 0x30 | Level-1 decision; data bit 0 = accept |
| long, 0x10..0x13 | L1T destination IP, byte 0 (most significant) .. 3; written into the dest FIFO on byte 3 |
| long, 0x20..0x23 | HLT destination IP, same scheme |

Level-1 decisions arrive in Level-0 order and carry no number. `l1a_gen`
counts them, and for each accept it sends that count, which is the
event number, to all PP-FPGAs.

## Level-1 trigger path (PP-FPGA)

* `ped_com` subtracts a per-channel pedestal. It then subtracts the
  common mode: the mean of the pedestal-subtracted values of all unmasked
  channels of that link and event, truncated toward zero. Masked channels
  come out as 0. A ping-pong buffer lets one event be corrected while the
  next is written. Output starts two cycles after the last input sample.
* `l1t_zsupp` emits a hit word `{0, chan[4:0], value[9:0]}` for each
  corrected sample above the link's threshold. Values above 1023 are
  saturated. One cycle after the event it emits an end word
  `{1, 00000, hit count[9:0]}`.
* `l1t_pplink` collects the six links' hits and builds one PP fragment:
  a header word holding the event number (sop), a second header word
  holding the 12-bit bunch counter of the Level-0 accept, then link 0's
  hits and end word, link 1's, and so on. Link 5's end word carries eop.
  * Fragments wait in the **64 KByte de-randomizer** (32768 words) until
    the SyncLink-FPGA takes them.
  * Above `THROTTLE_LEVEL` (28672 words, 7/8 full) the **Level-0
    throttle** rises. The Readout Supervisor then stops Level-0 accepts.
  * The remaining 4096 words hold the events still on their way; a
    worst-case event is 199 words.

## Level-1 buffer (`l1b_ctrl`)

Every raw link word of every event must be kept until the Level-1
decision arrives. The buffer is therefore large: 96 MByte per PP-FPGA in
three 16-bit SDRAM chips, seen as one 48-bit memory.

* **Addressing.** The Level-1 latency is fixed, so the buffer needs no
  allocation. Event *n* lives in slot *n* mod 2^`SLOT_BITS`. With 16
  slot bits that is 65536 slots, more than the 58254 events that fit in
  the 52.4 ms latency.
  * Each slot is 256 memory words, of which 66 are used.
  * The six link words of one sample position form a 96-bit word.
  * That word is written as two 48-bit memory words, low half first, at
    `{slot, word index[6:0], half}`.
  * 65536 x 256 x 48 bit is exactly 96 MiB.
* **Write de-randomizer.** The links cannot be stalled, so input words
  enter a 64-deep FIFO. The memory port serves, in priority order:
  refresh, then writes, then reads.
* **Refresh.** Every `REFRESH_INTERVAL` = 936 cycles (7.8 µs at 120 MHz)
  one refresh command is issued. The controller then waits
  `REFRESH_CYCLES`.
* **Read.** Each Level-1 accept queues its event number in a 16-deep
  FIFO. The controller reads the slot's 66 words and tags the returned
  data first/last with a tag FIFO that follows the read latency. A new
  event read starts only while `r_hold` is low. `hlt_link` drives
  `r_hold`: it is high while its FIFO could not take a whole event plus
  the reads in flight. This gives the read path back-pressure even though
  the memory has none.
* **Memory port.** The SDRAM chips are outside the RTL. The controller
  drives a plain command port: `mem_req`/`mem_we`/`mem_ref`/`mem_addr`/
  `mem_wdata`, accepted while `mem_ready` is high, with read data on
  `mem_rvalid`/`mem_rdata` in order and at any latency below 16
  commands. A DDR protocol engine would sit behind this port.
* Overflow of the write de-randomizer or of the accept queue sets
  `wfifo_overflow`, which is part of the board `error` output.

`hlt_link` turns each event read back into an HLT fragment. The fragment
is a header word with the event number, then each 48-bit memory word as
three 16-bit words, lowest first.

## SyncLink-FPGA data streams

The two streams, L1T and HLT, share the same back end (`g_stream[0..1]`
in `synclink_fpga`).

* **L1T linking** (`l1t_linking`). It reads the four PP fragments of one
  event in turn. PP 0's two header words (event number, bunch counter)
  become the board header. The other PPs' header words are compared with
  them (a mismatch sets `l1t_ev_err`) and then dropped.
* **HLT zero suppression** (`hlt_zsupp`). It reads the four raw HLT
  fragments in turn, one word per cycle, and drops the Beetle header
  words.
  * Each sample above the HLT threshold becomes two words: the address
    `{pp[1:0], link[2:0], channel[4:0]}` and the value.
  * A trailer `{1, hit count[14:0]}` closes the event.
* **Event data and size FIFOs.** The event words go into the event data
  FIFO (`EV_DEPTH` = 1024). Each event's length goes into a 64-deep size
  FIFO.
* **MEP assembly** (`event_transfer_ctrl`). It waits until the next
  event fits in the free part of the MEP ring buffer (`mep_buffer`).
  * It writes a length word and then the event.
  * After the packing factor's number of events it pushes a descriptor
    `{start, length, events}` into the MEP address FIFO. The packing
    factor is an ECS register per stream. Its maximum, and its value
    after reset, is `L1T_PACKING` = 32 or `HLT_PACKING` = 16.
  * Space is returned as the framer reads.
  * Buffer sizes: L1T 2^15 words (64 KByte), HLT 2^19 words (1 MByte).
* **Framing** (`framer`). A MEP is framed only once it is complete,
  because the IP header needs its total length. The framer sends, in
  order:
  1. The 17-word Ethernet + IPv4 header template from `ip_header_ram`,
     written by the ECS. Word 8 (total length = 22 + 2 x MEP words), the
     header checksum (word 12, computed over words 7..16) and the
     destination address (words 15, 16, taken from the dest FIFO) are
     substituted.
  2. One MEP header word `{frames[7:0], events[7:0]}`. Here frames =
     ceil((total length - 20) / 1480), the number of Ethernet frames the
     packet needs.
  3. The MEP.

  Packets larger than one frame are left to the Ethernet card to split.
* **POS-PHY Level 3** (`pos3_tx`). It pairs 16-bit words into 32-bit
  `tdat` transfers with `tenb` (active low), `tsop`, `teop` and `tmod`.
  `tmod` = 2 means only the upper half of the last transfer is valid.
  `tprty` is odd parity. Transfers stop while the card's
  packet-available `ptpa` is low.
* **Level-1 throttle.** It rises when the HLT event data FIFO is more
  than 3/4 full or the HLT MEP buffer is more than 3/4 used. The Readout
  Supervisor then turns Level-1 accepts into rejects. This is what keeps
  every HLT-side buffer from overflowing when the network stalls.

### Packet layout (16-bit words, most significant first)

```
 0..6   Ethernet header (destination MAC, source MAC, type)   from template
 7..16  IPv4 header; 8 = total length, 12 = checksum, 15/16 = destination IP
 17     {frames, events}
 18..   per event: length L, then L event words
          L1T event: header (event number), per PP and link: hit words, end word
          HLT event: header (event number), {address, value} per hit, trailer
```

## Configuration (ECS write bus)

`ecs_we`, `ecs_addr[19:0]`, `ecs_wdata[15:0]`:

| `addr[19:17]` | target | `addr` field | data |
|---|---|---|---|
| 0..3 | PP-FPGA | `[12:10]` link, `[9:8]` = 0, `[4:0]` channel | pedestal `[9:0]`, mask `[15]` |
| 0..3 | PP-FPGA | `[12:10]` link, `[9:8]` = 2 | L1T zero-suppression threshold `[9:0]` |
| 0..3 | PP-FPGA | `[9:8]` = 3 | link type `[0]`: 0 Beetle (reference data valid, PCN), 1 own data valid and event counter bits |
| 4 | SyncLink | `[16:15]` = 0, `[4:0]` word | L1T header template |
| 4 | SyncLink | `[16:15]` = 1, `[4:0]` word | HLT header template |
| 4 | SyncLink | `[16:15]` = 2 | HLT threshold `[9:0]` (reset value 1023) |
| 4 | SyncLink | `[16:15]` = 3, `[0]` stream (0 L1T, 1 HLT) | packing factor `[7:0]`, 1..maximum; 0 (reset) = maximum |

## Parameters of `tell1_top`

| parameter | default | meaning |
|---|---|---|
| `NUM_PP`, `NL` | 4, 6 | PP-FPGAs and links per PP-FPGA (24 links) |
| `N_SAMPLES` | 32 | samples per link per event (after one header word) |
| `SLOT_BITS` | 16 | Level-1 buffer slots = 2^SLOT_BITS |
| `DERAND_WORDS`, `THROTTLE_LEVEL` | 32768, 28672 | L1T de-randomizer size and Level-0 throttle level |
| `L1T_AW`, `HLT_AW` | 15, 19 | MEP buffer address widths (64 KByte, 1 MByte) |
| `EV_DEPTH` | 1024 | SyncLink event data FIFOs |
| `L1T_PACKING`, `HLT_PACKING` | 32, 16 | maximum events per MEP (the ECS can set fewer) |

At these defaults the top synthesises with yosys to about 6000 cells and
5300 flip-flop bits. It also needs 11.5 Mbit of memory, mostly the
1 MByte HLT MEP buffer and the four 64 KByte de-randomizers.

## Departures from the original board

* **One clock.** The original board runs the SDRAM at 120 MHz DDR, so one
  96-bit input word costs a third of the memory's capacity. That is
  1.5 times the write bandwidth needed, which leaves room for reads and
  refresh. Here the links and the memory share one clock, and a 96-bit
  word takes two memory cycles.
  * Events must on average be at least about 70 cycles apart, plus the
    reads of accepted events and refresh. The testbenches space them
    110 cycles apart.
  * At a 40 MHz clock this sustains about 0.6 MHz of Level-0 accepts,
    not 1.1 MHz. Reaching the full rate needs the memory side moved to
    its own faster clock.
* **Memory port instead of DDR signalling.** See the Level-1 buffer
  section.
* **HLT MEP buffer on chip.** The original places it in an external
  QDR SRAM. Here it is the same `mep_buffer` array as the L1T buffer,
  1 MByte at the default size.
* **Link type 1 compares event counter bits only.** For links with their
  own data valid, the header is checked against 8 event counter bits.
  Bunch-counter headers are not supported. All six links of a PP-FPGA
  share one link type and must deliver an event in the same cycles.
* **Own algorithms and formats** where the original only names the
  function:
  * the common-mode algorithm (mean of unmasked channels);
  * single-strip threshold zero suppression (no clustering);
  * all fragment and word formats;
  * the TTC codes and the ECS map;
  * the throttle thresholds and the FIFO depths.
* **Bunch counter in Level-1 trigger fragments only.** The 16-bit event
  number and the bunch counter head each Level-1 trigger fragment. HLT
  fragments carry only the event number.
* **Not included:** the clock PLLs, the optical and analogue receiver
  cards, the TTC receiver, the reference front-end card, the Gigabit
  Ethernet card and the control PC. The ECS is reduced to the write bus
  above.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv` that prints
`TB_RESULT checks=<n> failures=<n>`. For example, with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_l1b_ctrl \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/tell1_pkg.sv tb/tb_l1b_ctrl.sv
obj_dir/Vtb_l1b_ctrl
```

The end-to-end tests share `tb/tell1_tb_body.svh`. That file models
everything around the board:

* the reference front-end chip, 18 Beetle links and the six links of
  PP-FPGA 1, which run as link type 1;
* the TTC system and a Readout Supervisor that obeys both throttles;
* the ECS;
* four SDRAM banks (`tb/l1b_sdram_model.sv`, sparse storage, random
  not-ready cycles, refresh busy time);
* the Ethernet card, with `ptpa` stalls.

From its own generated samples it predicts every L1T and HLT event. It
then checks every packet word for word: header, length, checksum,
destination, event and frame counts, and the MEP contents.

* `tb_tell1_top` uses small buffers and forced output stalls, so that the
  following all happen and are counted:
  * both throttles;
  * an accept turned into a reject;
  * the PCN error on its one link;
  * masked channels;
  * long- and short-broadcast decisions;
  * odd-length packets;
  * `ptpa` stalls;
  * refresh.

  It checks 96 events, runs in seconds, and fails if any of these never
  happened.
* `tb_tell1_full` runs `tell1_top` with every parameter at its default:
  288 events, nine L1T MEPs of 32 events including multi-frame packets,
  and two HLT MEPs of 16 events. It takes about 10 seconds.
