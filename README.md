# Optical Multiplexer Board 9U (OMB) for the TileCal read-out

The ATLAS hadronic calorimeter (TileCal) sends each front-end drawer's data
to the counting room twice, over two independent optical links. The OMB sits
between those links and the Read-Out Drivers (RODs). For every event and every
drawer it checks both copies against their CRC and sends one good copy to the
ROD. It decides per event, with no extra latency beyond the packet itself.
The same board can also act as a data source for the RODs. It then injects
pseudo-data, generated on the board or loaded over VME, and timed by the
real trigger.

This repository holds synthesizable SystemVerilog for the board's logic:

- the eight CRC FPGAs, which do the checking, selection and injection;
- the VME FPGA, with its VME64x slave, register routing, internal trigger
  and JTAG master;
- the TTC FPGA, which builds the bunch-crossing and event identifiers,
  distributes them serially and selects the board clock;
- a board-level top, `omb9u_top`, that wires them together.

The optical transceivers, the G-Link serializer/deserializer chips and the
TTCrx receiver are not modelled. Their logic-side signals are the ports of the top.

## Board at a glance

| Quantity | Value |
|---|---|
| Input links | 16: 8 redundant pairs, one pair per front-end drawer |
| Output links | 8, one per CRC FPGA, to the RODs |
| Link word | 16 bits per 40 MHz clock = 640 Mbit/s |
| Total input bandwidth | 10.24 Gbit/s |
| Total output bandwidth | 5.12 Gbit/s |
| Average trigger (L1A) rate | 100 kHz, i.e. 400 clock cycles per event |
| Clock | 40 MHz bunch-crossing clock from TTC, or a 40 MHz local oscillator |

```
 glink_rx[0],[1] ──► CRC FPGA 0 ──► glink_tx[0]
 glink_rx[2],[3] ──► CRC FPGA 1 ──► glink_tx[1]
        ...                ...
 glink_rx[14],[15] ─► CRC FPGA 7 ──► glink_tx[7]
                        ▲  ▲
     serial TTC lines ──┘  └── register bus (one per CRC FPGA)
            │                        │
        TTC FPGA ◄── register bus ── VME FPGA ◄──► VME bus, JTAG chain
            │
  TTC signals (BCR, ECR, L1A, TType), TTC clock, local clock
```

All logic runs on one clock, `sys_clk`, which the clock selector takes from
TTC or from the local oscillator. The link words are taken as synchronous to
that clock. On the real board the G-Link receivers provide this, because both
sides run from the same bunch-crossing clock.

## Packets, CRC and framing

The link and packet format below is this design's own choice. Each link
carries a `link_word_t` per cycle:

- `valid`;
- `sop`, the first word of a packet;
- `eop`, the last word of a packet;
- `data[15:0]`.

The flags stand for what the G-Link control field signals. A packet is laid
out as follows:

| Word | Content |
|---|---|
| 0 | event ID bits [15:0] |
| 1 | {TType[3:0], BCID[11:0]} |
| 2 .. N-2 | payload |
| N-1 | CRC-16 of words 0..N-2 |

The CRC is CRC-16-CCITT:

- polynomial x^16 + x^12 + x^5 + 1;
- initial value 0xFFFF;
- most significant bit first;
- no final XOR.

Because the CRC word is appended, running the CRC over a whole good packet
gives zero. Every receiver uses this check. `omb_crc16` is the one-word
combinational step, and all CRC logic in the design uses it. To change the
polynomial, edit `CRC_POLY` and `CRC_INIT` in `omb_pkg`.

## CRC FPGA: checking two links and choosing one

`omb_crc_fpga` is the heart of the board. The diagram below shows its data path:

```
 rx_a ─► omb_link_rx A ─┐ status          ┌─ verdicts ─► link_rx A/B
                        ├──────► omb_decision ── command ─┐
 rx_b ─► omb_link_rx B ─┘            ▲                    ▼
                                 TTC records      omb_out_mux ─► tx
 ttc_ser ─► omb_ttc_rx ─────────────┤                ▲   ▲
 int_trig ──┘                       ├─► omb_event_gen ┘   │
                                    └─► omb_inject_mem ───┘
```

### Store while checking (`omb_link_rx`)

Each link receiver writes every incoming word into a 1024-word buffer. In the
same cycle it advances the CRC. When the `eop` word arrives, the CRC result is
already complete. The receiver then queues a status record at once, without
reading the packet back. The record holds:

- whether the CRC is good;
- whether the packet overflowed;
- the event ID and BCID from the header;
- the word count.

This is why the board's decision costs no latency: the choice is known when
the last word lands, and the chosen packet can start leaving on the next
cycles.

The buffer has a corner-case rule for overflow. A word that is not the last
of its packet is stored only if two places are free. This means the `eop` word
always finds room, and the buffer never holds a packet without its end. A
packet that lost words is marked overflowed and fails. `ovf_err` pulses, and
`framing_err` pulses for broken `sop`/`eop` sequences.

The read side takes one verdict per packet, in order. A "forward" verdict
streams the packet out at one word per cycle. A "discard" verdict drains it
at the same rate.

### The decision (`omb_decision`)

When both links have a status record, the decision is made in one cycle. The
rules depend on the mode.

| Mode (`CTRL[2:0]`) | Behaviour |
|---|---|
| 0, CRC checking | forward the link whose CRC is good; if both are good, link A; if both are bad, link A and count `both_bad` |
| 1, forced link A | always forward link A |
| 2, forced link B | always forward link B |
| 3, inject from the generator | discard both links; send generator packets |
| 4, inject from the memory | discard both links; send memory packets |

Errors on each link (`crc_err_a`, `crc_err_b`) are counted whether or not the
packet is used.

These rules for missing and late copies are this design's own:

- **Missing copy.** If one link has a packet and the other has none for
  `TIMEOUT` (1024) cycles, the packet present is forwarded alone, and
  `missing` is counted.
- **Late copy.** A record whose event ID equals the last forwarded one is a
  late duplicate. It is discarded, and `stale` is counted.

This keeps the two links aligned after one of them drops a packet.

**Synchronisation check.** With `CTRL[3]` set, every forwarded packet takes
the next TTC record, one per Level-1 Accept. The check compares event ID
bits [15:0] and the BCID against the packet header. A mismatch, or no TTC
record at all, counts `sync_err`.

### Output stage (`omb_out_mux`)

A small command queue names the source of each packet: link A, link B, the
generator or the memory. The stage copies that source to the output link at
one word per cycle, and sends idle words while the source stalls. The output
is registered.

- A forwarded link packet leaves unchanged, with its own CRC.
- An injected packet gets a CRC word computed on the fly and appended. Every
  packet that leaves the board therefore carries a CRC, and a downstream OMB
  or ROD can check it.

### Injection sources

Both sources send one packet per trigger record, so injected data keeps
pace with the real trigger. The generator also copies the trigger's event
ID, TType and BCID into its header, which keeps its packets in step with the
TTC stream. Memory packets are sent exactly as they were loaded.

- **`omb_event_gen`** sends a body of `GEN_LEN` words (at least 2). After
  the two header words comes a 16-bit pseudo-random sequence. It comes from a Fibonacci LFSR
  with taps 16/14/13/11, seeded with `event ID ^ 0xACE1`, or 1 if that is 0.
- **`omb_inject_mem`** is a 4096 × 16 memory loaded over VME through
  `MEM_PTR`/`MEM_DATA`, where the pointer auto-increments. It holds
  `MEM_NPKT` bodies of `MEM_PLEN` words each, stored back to back. Each
  trigger plays the next body in turn, wrapping after the last one. The read
  is pipelined for one word per cycle.

Triggers come from the serial TTC line. When `CTRL[4]` is set, they come
instead from the VME FPGA's internal trigger, and the record then holds
TType 0, BCID 0 and a local event count. Any write to `CTRL` empties the
trigger queue, so records left over from the previous mode do not fire the
new one.

### CRC FPGA registers (word addresses)

| Addr | Name | Access | Meaning |
|---|---|---|---|
| 0x00 | CTRL | rw | [2:0] mode, [3] sync check, [4] internal trigger; a write flushes the trigger queue |
| 0x01 | CMD | w | [0] clear all counters |
| 0x02 | GEN_LEN | rw | generator body length, default 16 |
| 0x03 | MEM_PTR | rw | memory write pointer |
| 0x04 | MEM_DATA | w | write memory at MEM_PTR, then increment MEM_PTR |
| 0x05 | MEM_PLEN | rw | memory packet body length |
| 0x06 | MEM_NPKT | rw | number of packets in memory |
| 0x07 | STATUS | r | [31:16] ID 0x0C7C, [2:0] current mode |
| 0x10–0x1D | counters | r | FWD, CRC_A, CRC_B, BOTH_BAD, MISSING, STALE, SYNC, OVF_A, OVF_B, FRAMING_A, FRAMING_B, INJECTED, TTC_OVF, L1A |

The counters are 32 bits wide. A 3×10^9-packet run does not wrap them.

## TTC FPGA: identifiers, serial distribution, clock source

`omb_ttc_fpga` works from the TTCrx outputs: BCR, ECR, L1A and TType.

- The **BCID** counts bunch crossings, wraps after 3564 (one LHC orbit) and
  is cleared by BCR.
- The **event ID** is 24 bits. ECR clears it and each L1A increments it, so
  the first event after ECR gets number 0.

Every L1A queues the record {TType[7:0], BCID, EvID} in a 16-entry FIFO. The
record is then sent to all eight CRC FPGAs, each over its own wire:

- one start bit (1), then the 44 record bits, MSB first;
- the line rests at 0 between frames.

A frame takes 45 cycles, which is far below the 400-cycle average L1A
spacing. The FIFO absorbs bursts. A record lost to a full FIFO is counted.
`omb_ttc_rx` in each CRC FPGA decodes the frames into its own queue.

TTC FPGA registers:

| Addr | Name | Meaning |
|---|---|---|
| 0x000 | CLKCTRL | [0] Local Mode |
| 0x001 | STATUS | ID 0x077C, [1] running on TTC clock, [0] TTC clock present |
| 0x002 | L1ACNT | L1As received |
| 0x003 | LOST | records lost |
| 0x004 | EVID | current event counter |

### Clock selection (`omb_clk_sel`)

This is the trickiest part of the design. The board normally runs from the
TTC clock. It switches to the local oscillator in two cases:

- when Local Mode is set over VME;
- when the TTC clock stops.

It goes back by itself when the TTC clock returns. The implementation has two
halves.

- **Detecting the TTC clock.** A flip-flop toggled by the TTC clock is
  sampled in the local-clock domain. The TTC clock is declared lost after
  `LOST_CYCLES` (8) local cycles with no toggle. It is declared present again
  after `BACK_EDGES` (16) toggles in a row.
- **Switching without glitches.** Each clock has an enable flip-flop, clocked
  on that clock's falling edge and fed through a two-stage synchroniser. An
  enable can only rise after the other clock's enable has fallen. So the
  output never has a pulse shorter than a half-period of either input.

A stopped TTC clock cannot clock its own enable low. The "lost" condition
therefore clears the TTC enable asynchronously. The output clock is
`(ttc_clk & en_ttc) | (local_clk & en_loc)`. An assertion checks that the
two enables are never on together.

During a switch the board clock pauses for a few cycles. Logic on `sys_clk`
simply sees a longer period. On an FPGA or ASIC this gate-level mux should be
replaced by the vendor's clock-switch primitive. The behaviour to keep is the
one described here.

## VME FPGA: register access, internal trigger, JTAG

`omb_vme_slave` implements the part of VME64x the board needs:

- **Geographical addressing.** The slot number comes from the GA*/GAP* pins,
  which must have odd parity. The CR/CSR window is the 512 KB block where
  A[23:19] equals the slot. After reset the data window is the same block;
  a write to the BAR (below) can move it.
- **Data cycles.** A24 data cycles (AM 0x39 or 0x3D) with 32-bit single
  transfers.
- **Configuration space.** CR/CSR cycles (AM 0x2F), answered in the slot's
  window as D08(O) bytes at offsets 4n+3. They give access to:
  - a small configuration ROM: checksum, length, access widths, VME64x
    version, the "CR" signature, and manufacturer, board and revision IDs;
  - the base address register (BAR, offset 0x7FFFF), which holds the slot
    after reset and moves the A24 window when written;
  - the bit set and bit clear registers (0x7FFFB, 0x7FFF7), whose bit 4
    enables the module. It is set after reset, so the board answers
    without configuration.
- **Strobes.** They are synchronised with two flip-flops. Each data cycle
  becomes one request on the internal register bus, while CR/CSR cycles are
  answered inside the slave. DTACK* is held until the master releases DS*.

A register access takes about six board clocks after the strobes are seen.

`omb_vme_fpga` decodes the byte offset inside the window:

| Offset | Target |
|---|---|
| bit 18 = 1 | CRC FPGA number [17:15], register [13:2] |
| [18:16] = 001 | TTC FPGA, register [13:2] |
| [18:16] = 000 | VME FPGA's own registers |
| anything else | acknowledged, reads 0 |

So CRC FPGA *n*, register *r* sits at `slot<<19 | 1<<18 | n<<15 | r<<2`.

VME FPGA registers:

| Addr | Name | Meaning |
|---|---|---|
| 0x000 | BOARD | ID 0x0B9E, [5] GA parity good, [4:0] slot |
| 0x001 | SCRATCH | free read/write register |
| 0x002 | TRIG | [0] periodic internal trigger; writing [1]=1 gives one trigger; [2] external trigger input enabled |
| 0x003 | PERIOD | cycles between internal triggers (default 400 = 100 kHz) |
| 0x004 | TRIGCNT | internal triggers given, from all sources |
| 0x008 | JTMS | TMS bits for the next shift |
| 0x009 | JTDI | TDI bits for the next shift |
| 0x00A | JCTRL | write [5:0] = bit count (0 means 32) to start a shift; read [0] = busy |
| 0x00B | JTDO | TDO bits captured during the last shift |

Internal triggers come from three sources, and triggers that coincide
count as one:

- a programmable period;
- a register write;
- the external trigger input `ext_trig`, the TTL side of the board's NIM
  trigger input. It is passed through two flip-flops, and each rising edge
  gives one trigger.

The JTAG master (`omb_jtag_master`) shifts up to 32 bits per command, LSB
first, with TCK = clk/4 at the default `DIV`=2. It samples TDO on the rising
TCK edge. The crate's single-board computer runs the programming algorithm
(SVF/JAM player) over these registers to reprogram any device on the chain.

The internal register bus (`lbus_req_t`/`lbus_rsp_t` in `omb_pkg`) is a
one-cycle strobe with address, write flag and data. Every target answers
with `ack` and read data exactly one cycle later.

## Top level (`omb9u_top`)

The top instantiates:

- the clock selector;
- a two-flop reset synchroniser;
- the TTC FPGA;
- the VME FPGA;
- `N_CRC` = 8 CRC FPGAs.

CRC FPGA *i* takes `glink_rx[2i]` as link A and `glink_rx[2i+1]` as link B,
and drives `glink_tx[i]`.

| Parameter | Default | Meaning |
|---|---|---|
| `N_CRC` | 8 | CRC FPGAs (drawers per board) |
| `BUF_DEPTH` | 1024 | words of buffer per input link |
| `MEM_DEPTH` | 4096 | words of injection memory per CRC FPGA |
| `TIMEOUT` | 1024 | cycles to wait for a missing copy |
| `ORBIT` | 3564 | BCID wrap |

These sizes fit the TileCal traffic. At 100 kHz there are 400 cycles per
event, and a drawer packet is a few hundred 16-bit words. A 1024-word buffer
therefore holds one packet being forwarded plus the next one arriving.

## How far it follows the original board

**Taken from the board:**

- the partitioning into 8 CRC FPGAs, a VME FPGA and a TTC FPGA;
- 16 links in, 8 out, at 16 bits × 40 MHz;
- CRC checking of both copies while storing, with the decision at the last
  word;
- the output multiplexer with three sources (links, event generator, memory
  loaded over VME);
- the real-time CRC added to injected data;
- TTC-based synchronisation checks;
- injection triggered by TTC, by a VME-generated internal trigger, or by
  the external trigger input;
- BCID/EvID generation and point-to-point serial distribution;
- clock selection with Local Mode and automatic fallback and return;
- geographical addressing and the VME64x configuration space;
- remote JTAG access through the VME FPGA.

**This design's own choices:**

- the packet layout, CRC polynomial and link flags;
- the serial TTC frame;
- all register maps and the VME window decoding;
- buffer, memory and FIFO sizes;
- the timeout and late-copy rules;
- the forced-link modes;
- the pseudo-random payload;
- the clock-presence thresholds;
- the internal bus.

The original firmware's formats are not reproduced, so this RTL does not
interoperate with real TileCal front-ends or RODs without adapting the
packet and CRC definitions.

**Not built:**

- VME block transfers and D8/D16 cycles in the A24 data space;
- the user CR/CSR areas and the ADER function registers of VME64x;
- the NIM-to-TTL level converter of the external trigger input (the logic side is the `ext_trig` port);
- the Processing Unit connector interface;
- the optical, G-Link, TTCrx, clock-buffer and EPROM parts, which are
  components rather than logic.

## Verification

Every block has a self-checking testbench in `tb/`. Each one compares the
block with a model written independently in the testbench, for example a
bit-serial CRC or a reference packet builder in `tb_ref_pkg`. Each one ends
by printing `TB_RESULT checks=<n> failures=<n>`.

`tb_omb9u_top` drives the complete board at its default parameters, using
only its pins: TTC signals, 16 links, a VME master model in slot 7, and JTAG.
It first writes and reads back, over VME, every read/write register of the
CRC FPGAs and the VME FPGA. It then makes every mechanism happen and counts it:

- good pairs;
- a bad copy on A, on B and on both;
- a missing copy and a late copy;
- a TTC mismatch;
- generator injection on TTC L1A;
- memory injection, loaded over VME, on the internal trigger and on the
  external trigger input;
- loss and return of the TTC clock;
- Local Mode;
- a JTAG shift;
- CR/CSR reads of the ROM signature and the BAR.

It checks every output packet and the error counters read back over VME.

`tb_omb_rate` runs one CRC FPGA at its default sizes at the board's working
point:

- one event every 400 cycles, i.e. 100 kHz at 40 MHz;
- 397-word packets on both links, which is nearly the whole slot;
- link B lagging by up to 3 cycles;
- occasional CRC errors on one copy;
- the sync check on.

Every event is forwarded as its good copy, with no overflow. The first
output word leaves at most 7 cycles after the later of the two last input
words. This confirms that the choice is made at the last word rather than
after a read-back.

`tb_omb9u_rate` does the same for the whole board at its default sizes.
All 16 input links carry a 397-word packet every 400 cycles, which is the
full 10.24 Gbit/s. All 8 output links must deliver every event, in order.

`tb_omb9u_chain` rebuilds the qualification chain with three boards at
their default sizes:

- boards 0 and 1 run their CRC FPGAs in the generator injection mode and
  stand in for the front end;
- on each L1A they send the same packet, carrying the real TTC data and a
  CRC;
- board 0's output i feeds link A of CRC FPGA i on board 2, and board 1's
  output i feeds link B;
- board 2 checks the CRC with the sync check on.

The fibres between the boards flip one bit in three packets. Every packet
leaving board 2 must have a good CRC, the next event number and the
generated content. Board 2's counters, read over VME, must show exactly
those three CRC errors and no sync error.

## Simulating

Verilator 5 or newer is needed, with `--timing`, because the testbenches use
delays. From the repository root:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -I. -Irtl -Itb -y rtl -y tb +libext+.sv --top-module tb_omb9u_top \
  rtl/omb_pkg.sv tb/tb_ref_pkg.sv tb/tb_omb9u_top.sv
./obj_dir/Vtb_omb9u_top +verilator+rand+reset+2
```

The sources carry no `timescale`. With `--timescale 1ns/1ps`, the
testbenches' 25 ns clock period is the board's 40 MHz.

For a block testbench, replace the top module and file, e.g.
`--top-module tb_omb_link_rx ... tb/tb_omb_link_rx.sv`. The other modules are
found through `-y`.

Flops are reset and memories are written before they are read, so the
results do not depend on Verilator's random initial values
(`+verilator+rand+reset+2`). Each testbench has a watchdog that reports a
failure and stops if the simulation hangs.
