# Convergence Processor: data-handling core of a residential gateway SoC

A home gateway terminates several networks (Ethernet, ATM/DSL, a 2 Mbit/s
serial line) and has to route, firewall and encrypt the packets passing
between them. It does so with one modest embedded CPU. The Convergence
Processor's idea is to keep the CPU for software decisions and to take
every piece of per-packet work that is repetitive off it:

* a programmable **header processor** parses each received header and
  classifies the packet to an 8-bit Flow_ID, so that unwanted packets are
  dropped before they cost any CPU time;
* a **DMA engine** with a configurable **traffic descriptor** moves all
  packet data between the interface FIFOs and system memory, with a
  bounded, programmable share of the on-chip bus;
* a **DES/TDES security engine** encrypts and decrypts whole packets from
  memory back to memory, on two DMA channels of its own;
* the link-layer **interfaces** (802.3 MAC, ATM/AAL5, HDLC, UART) do their
  framing in hardware.

Packets go through system memory; there is no hardware fast path from port
to port. A received packet is written into a port FIFO. Its header is
classified, and the DMA either discards it (Flow_ID 0) or writes it to
memory. The CPU's software then forwards it, if needed through the security
engine. Finally the DMA moves it out to a transmit FIFO. The chip runs at
100 MHz with a 32-bit bus (3.2 Gbit/s). The CPU, the AMBA bus and the memory
controller are not part of this RTL. They appear as ports of the top module
`cp_top`.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017). Every block has a
self-checking testbench.

## Block map

| Module | What it is |
|---|---|
| `cp_top` | Top: wires everything below; memory, CPU-bus and pins as ports |
| `header_processor` | `fex` + `classifier` |
| `fex` | Field Extraction engine, a 3-stage RISC for header parsing |
| `classifier` | 144-bit key, 256 rules, 8 masks, Flow_ID |
| `dma_scheduler` | Traffic descriptor, weighted round robin, FIFO thresholds, Flow_ID accept/reject |
| `bus_arbiter` | CPU / DMA ownership of the on-chip bus |
| `security_engine` | Packet stream in/out, 16-entry context memory, uses `des_core` |
| `des_core`, `des_pkg` | Iterative DES / 3DES (EDE) with the FIPS 46 tables |
| `port_fifo` | Interface FIFO with high/low thresholds for the DMA |
| `eth_mac` (`eth_mac_tx`, `eth_mac_rx`, `eth_pkg`) | 10/100 Ethernet MAC on MII (two in the top) |
| `atm_aal5` (`atm_sar_tx`, `atm_sar_rx`, `atm_pkg`) | ATM port: AAL5 segmentation and reassembly or AAL0 raw cells, 32 circuits |
| `hdlc` (`hdlc_tx`, `hdlc_rx`, `hdlc_pkg`) | 2 Mbit/s HDLC port |
| `uart` | 8N1 RS-232 port (two in the top) |
| `cp_pkg` | Shared types: FEX instruction, classifier rule, security context |

## Header processor

### FEX: the field extraction engine

The FEX is a tiny RISC that runs a user-loaded program over the first words
of a packet. The program is stored in a 2048-instruction memory; the header
sits in a 64-word data memory. Its machine state is:

* four 32-bit registers A, B, C and D;
* a program counter;
* a data pointer DP, which selects the 32-bit header word the engine looks at.

The instruction set has nine instructions:

* `NOP`;
* `EXTRACT n,b`: take the n+1 bits whose rightmost bit is b from the word at
  DP;
* `MOV A/B to DP`;
* `ADD A/B to DP`;
* `JMP C/D, a, addr`: jump if the register equals the constant a;
* `STR`: end of packet.

Any combination of four commands can ride along with an instruction in the
same cycle: `DEC DP`, `INC DP`, `DEC A` and `DEC B`. Commands act after the
instruction. So `ADD A to DP` with `INC DP` gives DP + A + 1, and `EXTRACT`
into A with `DEC A` gives field − 1. That is how a header length in 32-bit
words becomes a DP offset in a single instruction.

The instruction word is 48 bits (`cp_pkg::fex_instr_t`):

* 4-bit opcode;
* the four command bits;
* 3-bit destination: A, B, C, D, or the classifier key;
* n and b, 5 bits each;
* a 16-bit compare constant;
* an 11-bit jump address.

The pipeline is IF / ID / EX. All architectural state changes happen in EX,
so there are no hazards:

* IF reads the synchronous instruction RAM;
* ID builds the mask;
* EX reads the data word at DP, shifts and masks it, writes the register or
  key, updates DP and decides jumps.

A taken jump or `STR` flushes the two younger instructions, so a taken jump
costs 2 extra cycles. `done` appears 3 + (instructions executed) + 2 ×
(taken jumps) cycles after `start`. The example 5-tuple program in
`tb/tb_fex_prog.sv` takes 16 cycles for an IPv4 header. It extracts
protocol, addresses and ports into a 104-bit key.

### Classifier

Every `EXTRACT` to the key is shifted into the key register
(`key <= key << len | field`), giving keys up to 144 bits. On `STR` the key
is copied to a search register. This frees the key register, so the FEX can
parse the next header during the search. If the FEX reaches the next `STR`
before that search ends, it stalls in EX. This is the only back-pressure
between the two halves.

A rule (`cp_pkg::cls_rule_t`) has:

* a valid bit;
* a set: deny, accept or per-flow;
* the index of one of 8 shared 144-bit masks;
* a 144-bit value;
* a Flow_ID.

A rule matches when key and value agree under its mask. The rules RAM is
read one row of 8 rules per cycle, and the lowest-numbered match wins. So
rule order is priority order, as in a firewall table.

A full search takes 256/8 + 2 = 34 cycles, about 2.9 M packets/s. A match in
row r returns after r + 3 cycles. A deny rule, or no match at all, returns
Flow_ID 0.

## DMA and the traffic descriptor

`dma_scheduler` decides each cycle whether the DMA asks for the bus and
which of 32 channels it serves. Each served cycle moves one 32-bit word.
Each channel is configured as receive (to memory) or transmit (from
memory). The descriptor has three levels:

1. **Bus split.** Time is cut into frames of `cfg_dma_cycles` (the DMA's
   budget), then `cfg_off_cycles` during which the DMA stays off the bus.
   The off interval is a guaranteed minimum for the CPU.
2. **Direction split.** The first `cfg_rx_cycles` of the budget are for
   receive channels and the rest for transmit. The two shares need not be
   equal.
3. **Interface split.** Within a segment, channels take turns in weighted
   round robin. A channel keeps the bus for `cfg_ch_weight` words (its
   interface timeslot), then the next requesting channel follows. Position
   and leftover credit persist across frames. So a heavy interface can span
   several DMA timeslots, and a light one is not starved.

**Threshold override.** A receive FIFO above its high mark, or a transmit
FIFO below its low mark, raises the channel's threshold. That channel is
served first, whatever the segment, lowest channel number first. This
happens only inside the DMA budget.

**Flow_ID verdict.** The scheduler also judges each Flow_ID: 0 pulses
`pkt_reject`, anything else `pkt_accept`.

`bus_arbiter` gives the bus to the DMA whenever it asks. Because the DMA
only asks inside its budget, the CPU still gets at least the off interval.
A CPU transfer marked `cpu_lock` is never split. When nobody asks, the bus
parks on the CPU. Grants are registered, and `handover` marks each change
of owner.

## Security engine

Packets come from memory as 32-bit words on DMA channel 2 and go back on
channel 3. A context number, 0 to 15, comes with the first word of each
packet on a side signal (`mem_rctx` at the top).
A context holds:

* three 64-bit keys;
* a default operation: DES or TDES, encrypt or decrypt.

Software can override the operation for a single packet. Two words form one
64-bit block, with the first word in the upper half. The block goes through
`des_core` in ECB mode, and a packet must have an even number of words.

`des_core` does one Feistel round per cycle. The round keys are produced on
the fly by rotating the key halves. TDES is the standard EDE construction
(encrypt-decrypt-encrypt): DES encrypt with k1, decrypt with k2, encrypt
with k3. `done` comes 17 cycles after `start` for DES and 49 for TDES. With
the stream handshake, a block costs 21 / 53 cycles. That is about
300 Mbit/s for DES and 120 Mbit/s for TDES at 100 MHz, well above the
80 Mbit/s the design was dimensioned for.

## Interfaces and port FIFOs

All network ports reach the DMA through a pair of `port_fifo`s (64 × 32
bits, fall-through read). Each FIFO has:

* a programmable high mark and low mark;
* overflow and underflow pulses.

A push into a full FIFO is dropped, even in a cycle with a pop.

* **Ethernet (`eth_mac`, two ports).** Full-duplex IEEE 802.3 MAC on a
  4-bit MII:
  * preamble and SFD;
  * low nibble first;
  * zero padding to 60 bytes;
  * CRC-32 FCS;
  * 96-bit interframe gap.

  The receiver strips preamble and FCS. It reports `good` when the CRC
  residue is right, the frame is at least 64 bytes and `rx_er` never rose.
  A transmit underrun raises `tx_er` and drops the rest of the frame. The
  MII clocks are replaced by a nibble enable every `cfg_div` core cycles: 4
  for 100 Mbit/s, 40 for 10 Mbit/s.
* **ATM (`atm_aal5`).** AAL5 over 53-byte cells for 32 virtual circuits.
  A table written by the CPU gives each circuit its VPI, its VCI and its
  mode. In AAL0 mode the circuit carries raw cells instead: 48-byte
  payloads, no trailer, each received cell handed on as a frame of its own.
  * Transmit: the frame's bytes fill a one-cell buffer while the AAL5
    CRC-32 runs. Zero padding and the 8-byte trailer (length, CRC) close
    the last cell, whose header has PTI bit 0 set. The header error check
    (HEC, a CRC-8) is added to every header.
  * Receive: a cell with a bad HEC or an unknown VPI/VCI is dropped and
    reported. Each circuit keeps its own CRC, byte count and the last 7
    bytes of its previous cell, so frames on different circuits can
    interleave. Those 7 bytes are held because padding may start there.
    Other bytes go out as they arrive. The last cell waits for its trailer,
    which tells how many bytes are data. A frame-end word then carries the
    good flag (CRC and length right).
  * Line side: an 8-bit cell port in the style of UTOPIA (byte, start of
    cell, valid/ready), one byte per clock each way.
* **HDLC (`hdlc`).** Flags 0x7E, zero-bit insertion after five 1s, and the
  CRC-16 FCS of ISO/IEC 13239. An abort is seven 1s. A bit enable every
  `cfg_div` cycles sets the rate; 50 gives 2 Mbit/s.
* **UART (`uart`, two ports).** 8N1 with a runtime divider, a two-flop
  synchroniser and mid-bit sampling, plus framing-error and overrun flags.
  Their byte side faces the CPU and is brought out as top-level ports.

On the DMA side, one Ethernet or HDLC byte travels per 32-bit word:

| Bits | Meaning |
|---|---|
| 7:0 | data byte |
| 8 | first byte of a frame |
| 9 | last byte of a frame |
| 10 | FCS good (receive, with bit 9) |
| 11 | frame error (receive; the word carries no byte) |

ATM words use bits 7:0 and 8 the same way and put the circuit number in
bits 20:16. On transmit, bit 9 marks the last byte. On receive, the frame
ends with a word of its own: bit 9 set, bit 10 the good flag, no byte.
AAL5 and AAL0 each have their own FIFO pair. The segmenter takes whole
frames from either transmit FIFO, AAL5 first. Received words go to the
FIFO of their circuit's mode.

## Top level (`cp_top`)

DMA channel map:

| Channel | Direction | Endpoint |
|---|---|---|
| 0 | receive | generic 32-bit receive port FIFO (its headers feed the header processor) |
| 1 | transmit | generic transmit port FIFO |
| 2 | transmit | security engine input |
| 3 | receive | security engine output |
| 4 / 5 | receive / transmit | HDLC FIFOs |
| 6 / 7 | receive / transmit | Ethernet port 0 FIFOs |
| 8 / 9 | receive / transmit | Ethernet port 1 FIFOs |
| 10 / 11 | receive / transmit | ATM port, AAL5 FIFOs |
| 12 / 13 | receive / transmit | ATM port, AAL0 FIFOs |
| 14–31 | either | brought out as `ext_ch_req` / `ext_ch_thresh` for the interfaces not built here |

The generic port on channels 0 and 1 stands for an interface whose data
arrives already packed in words. The header of a packet is written into the
FEX data memory through `hdr_*`.

The memory side is a simple word port:

* words the DMA writes appear on `mem_w*`, with the channel on `xfer_ch`;
* words it reads are expected on `mem_r*` in the same cycle as `xfer_valid`,
  with sop/eop and, for channel 2, the context number.

For channels that read memory, `ext_ch_req` tells the top that memory holds
words queued by the CPU. The channel then requests whenever its FIFO has
room.

Parameters and their defaults are NCH = 32, DMEM_WORDS = 64, NRULES = 256,
RULES_PER_CYCLE = 8 and FIFO_DEPTH = 64. At these defaults, yosys counts
about 7.3 k flip-flop bits and 168 kbit of memory. Most of the memory is the
FEX program (2048 × 48 bits) and the rule table.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. A watchdog fails it if it hangs. With Verilator 5 (two-state;
random initial values work too, `+verilator+rand+reset+2`):

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
  rtl/cp_pkg.sv rtl/des_pkg.sv rtl/hdlc_pkg.sv rtl/eth_pkg.sv rtl/atm_pkg.sv \
  tb/tb_fex_prog.sv \
  tb/tb_cp_top.sv --top-module tb_cp_top -o sim && ./obj_dir/sim
```

Replace `tb_cp_top` with any other testbench in `tb/`.

`tb_cp_top` runs the whole design at its default sizes. It does the
following at the same time:

* a 48-word packet goes through the receive FIFO to memory;
* five headers are classified (per-flow hit, deny, generic accept, two
  misses);
* a 4-word packet is DES-encrypted memory-to-memory and checked against the
  FIPS test vector;
* 24 words go out through the transmit FIFO;
* an HDLC frame goes round a loopback;
* one Ethernet frame crosses between the two MACs in each direction;
* a 100-byte AAL5 frame goes round the looped-back cell port as three
  cells and is reassembled, and a 30-byte AAL0 frame comes back as one
  padded raw cell;
* the UARTs exchange bytes;
* the CPU grabs the bus at random, sometimes locked.

It fails unless each of these happened at least once:

* FEX stall;
* reject and accept;
* threshold service;
* DMA off interval with work pending;
* locked CPU transfer;
* bus handover;
* round robin reaching the side channels;
* UART reception both ways;
* good HDLC, Ethernet and AAL5 frames, and an AAL0 cell.

`tb_scenario` runs the reference gateway load on the header processor and
the security engine at their default sizes:

* 128 firewall rules (100 deny, 27 per-flow, 1 generic accept);
* 200 mixed headers back to back, each Flow_ID checked against a first-match
  search done in the testbench. The measured rate is 25.3 cycles per packet
  (3.9 M packets/s at 100 MHz), against a 2 M packets/s target;
* a 1496-byte packet encrypted with TDES, at 120 Mbit/s, and decrypted back
  to the original. DES runs at 304 Mbit/s. The target is 80 Mbit/s.

Block testbenches check against values worked out independently:

* DES against published vectors;
* CRCs against the standard check values;
* FEX and classifier timing in exact cycles;
* the DMA schedule against word counts worked out from the descriptor and
  weights.

## Sizing against the target use

The design was dimensioned for about 100 Mbit/s of user traffic out of a
900 Mbit/s aggregate link. The defaults cover that:

* **Reference scenario.** Two 5.5 Mbit/s encrypted video streams, four
  voice channels, and 6 Mbit/s of encrypted two-way data under 128 firewall
  rules.
  * Rules: 128 of the 256 slots.
  * Encryption: 23 Mbit/s, against about 120 Mbit/s for TDES.
  * DMA traffic: about 70 Mbit/s, which is 2.2 % of the 3.2 Gbit/s bus.
* **ATM link.** 155 Mbit/s is 19.4 Mbyte/s. The cell port moves
  100 Mbyte/s each way. Counting the receive stalls, it still takes at
  least 1 M cells/s against the 0.37 M cells/s needed.
* **Worst case.** 900 Mbit/s of minimum-size Ethernet frames is 1.34 M
  packets/s, under the classifier's 2.9 M searches/s.

## How this RTL relates to the original design

These parts follow the published architecture:

* the block structure and connections: header processor feeding Flow_IDs
  to the DMA, security engine on two DMA channels, FIFOs between interfaces
  and DMA, arbiter between CPU and DMA;
* the FEX instruction set, commands, three-stage pipeline and 2K program
  memory;
* the 144-bit key, 256 rules in three sets and 8 masks;
* the 16 security contexts and per-packet operation;
* the three-level traffic descriptor and the threshold override;
* 32 DMA channels and Flow_ID 0 = reject;
* the 100 MHz / 32-bit bus and the 2 Mbit/s HDLC rate;
* two Ethernet ports, two UARTs, and AAL0/AAL5 for 32 ATM flows.

Everything below is this implementation's own choice, since the published
description does not give it:

* all bit encodings and handshakes;
* the FEX data-memory size and the register clearing at start;
* row-parallel, first-match classification and the result of a miss;
* ECB mode, the word order and the round-per-cycle DES;
* FIFO depth, threshold semantics and fall-through reads;
* receive-before-transmit segment order, word granularity and
  lowest-channel-first urgency in the DMA;
* fixed DMA priority, CPU bus parking and the lock input;
* the standard framing of the MAC, ATM/AAL5, HDLC and UART, and the byte-per-word
  packing of their DMA channels;
* the single clock for the MII and HDLC lines.

Known differences and gaps:

* **Instruction count.** The FEX is described as having "8 basic
  instructions" but nine are listed. All nine are implemented, treating
  `JMP C` / `JMP D` as two forms of one.
* **CPU rating.** The CPU is rated at 180 MIPS in the text and 160 MIPS in
  the block diagram. The CPU is outside this RTL, so nothing depends on it.
* **Traffic shaping.** The original calls transmit traffic control "packet
  level shaping". Here interface timeslots are counted in words. A packet
  boundary does not end a timeslot.
* **Not implemented:**
  * the LEON SPARC CPU and its MMU, caches and interrupt controller;
  * the AMBA AHB fabric;
  * the SDRAM/flash controller;
  * the PCMCIA and microprocessor interfaces;
  * AAL2 (only AAL0 and AAL5 are built);
  * the DSP/MPEG packet interfaces;
  * the debug probe.

  The description names these but does not design them (or takes them from
  elsewhere). Their DMA channels and bus signals are top-level ports.
* **ATM port.** The cell port is a plain valid/ready byte interface, not
  the UTOPIA Level II/III signalling (Clav/Enb timing, multi-PHY polling,
  16-bit Level III bus). The HEC is checked but single-bit errors are not
  corrected.
* **Ethernet MAC.** Half-duplex operation (carrier sense, collisions,
  backoff), address filtering and pause frames are not implemented.
* **Header input.** The header processor takes its header from a dedicated
  write port (`hdr_*`). It does not snoop the receive FIFO.
