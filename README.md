# V-Net: an IEEE 802.11 MAC controller around an ARM core

V-Net is the controller chip of a PC Card (PCMCIA) wireless LAN adapter. An
ARM7TDMI processor runs the 802.11 medium access control in firmware. This
includes frame formatting, DCF, fragmentation, reassembly and RTS/CTS/ACK.
The chip's own hardware takes over the work the processor cannot do in time:

- moving frames between memory and the radio bit by bit;
- computing the frame check sequence;
- stamping beacons with the 64-bit TSF time;
- keeping time;
- giving the host PC access to the card's memory.

All of it hangs off one AMBA system bus. The radio side is a DSSS baseband
processor and RF front end at 2.4 GHz, which are outside this RTL.

This repository holds synthesizable SystemVerilog for everything in the chip
except the processor core, plus self-checking testbenches.

```
            ASB (system bus)                               APB (1/3 rate)
  ┌───────────────┐  │                    ┌──────────────┐   │   ┌─────────────┐
  │ PCMCIA ctrl   │──┤ master 1           │ APB bridge   │───┼───│ timers (2)  │
  │ (host window) │  │                    │ + decoder    │   │   └─────────────┘
  └───────────────┘  │                    │ + arbiter    │   │   ┌─────────────┐
  ┌───────────────┐  │                    └──────────────┘   └───│ interrupt   │── nFIQ/nIRQ
  │ ARM7TDMI      │──┤ master 2 (ports)                          │ controller  │
  └───────────────┘  │                    ┌──────────────┐       └─────────────┘
  ┌───────────────┐  │ master 0 (DMA)     │ PAI          │ serial  ┌──────────┐
  │ ext. memory   │──┼────────────────────│ registers,   │─────────│ baseband │
  │ interface     │  │ slave (registers)  │ DMA, FIFOs,  │         │ (PHY)    │
  └──────┬────────┘  │                    │ CRC, TSF     │         └──────────┘
     FLASH, SRAM                          └──────────────┘
```

The top module is `vnet_top`. Its ports are:

- the processor's bus master port and interrupt lines;
- the external memory bus;
- the PC Card host signals;
- the serial interface to the baseband processor.

## The system bus

The bus is a simplified, single-phase version of the AMBA ASB. Its types are
in `vnet_pkg`:

- A master asks for the bus on its own request line and waits for its own
  grant line (`areq`/`agnt` at the arbiter; `arm_breq`/`arm_gnt` on the
  processor's port).
- While it holds the grant, the master drives an `asb_req_t` with these
  fields: `trans`, `addr`, `write`, `size` (byte, half-word or word) and
  `wdata`.
- The master holds the request unchanged until the selected slave answers
  with `bwait` low. Read data (`rdata`) and `berror` are valid in that same
  clock.
- Data sits on little-endian byte lanes: byte address A uses bits
  `8*(A%4)+7 .. 8*(A%4)`. Writes carry byte-lane enables derived from `size`
  and the low address bits. Reads always return the whole word, and the
  master picks its lanes.

**Arbiter** (`asb_arbiter`). The arbiter uses fixed priority:

1. the PAI (highest), because received bits cannot wait;
2. the PCMCIA host port;
3. the processor (lowest).

The grant is a register. It is re-evaluated at every clock edge, except while
a transfer is still waiting. A master therefore keeps the bus for its whole
transfer, and a higher-priority master can take over at the next transfer
boundary. With no requests, the bus parks on the processor. The arbiter also
multiplexes the granted master's request onto the bus. An ungranted master
cannot reach the bus.

**Decoder** (`asb_decoder`). The decoder drives one select line per slave and
sends the selected slave's response back to the masters. It answers any
unmapped address itself with an error.

| `addr[31:28]` | slave | contents |
|---|---|---|
| `0x0` | external memory interface | FLASH at `0x0000_0000`, SRAM at `0x0100_0000` (address bit 24 picks the bank) |
| `0x8` | APB bridge | timers at `0x8000_0000`, interrupt controller at `0x8000_1000` |
| `0x9` | PAI registers | `0x9000_0000` to `0x9000_002C` |
| other | decoder | error response, no wait states |

## The Physical Attachment Interface (PAI)

The PAI does the bit-level work of the MAC. It has one ASB slave port for its
registers and one ASB master port, which its two DMA engines share. On the
radio side it has a serial interface:

- **Transmit:** `tx_pe` (transmit enable), `tx_rdy` (the PHY has sent its
  preamble and header and wants data), `tx_bit_en` (one strobe per bit) and
  `txd`.
- **Receive:** `md_rdy` (high while the PHY delivers the bits of a frame),
  `rx_bit_en` and `rxd`.

Bits travel least significant first, as in 802.11. The bit strobes are
clock enables in the system clock domain. Consecutive strobes must be at
least three clocks apart. At 2 Mbit/s and a 20 MHz clock they are ten apart.

### Transmit path

```
memory ─► TX DMA ─► [timestamp mux] ─► TX FIFO ─► shift reg ─► txd
                         ▲                          ▲   │
                       TSF                    FCS bytes  └─► TX CRC
```

1. Firmware writes `TX_ADDR` and `TX_LEN` (in bytes), then sets `TX_GO`.
2. The DMA engine (`pai_tx_dma`) reads the frame one aligned word per bus
   transfer. It pushes the bytes into the FIFO one per clock. It fetches a
   word only when the FIFO has room for four bytes, so it stalls instead of
   overflowing.
3. The control machine (`pai_tx_ctrl`) waits until the FIFO is primed. That
   means nearly full, or the whole frame fetched. Only then does it raise
   `tx_pe`. This keeps a slow bus from starving the PHY on the very first
   bits.
4. After `tx_rdy`, the control machine loads the shift register with the next
   FIFO byte each time the register empties.
5. The transmit CRC engine (`crc32_serial`) follows every data bit as it
   leaves.
6. After `TX_LEN` bytes, the control machine loads the four bytes of the FCS
   (the complemented CRC, lowest byte first) into the shift register. After
   the last FCS bit it drops `tx_pe` and sets `TX_DONE`.
7. If a bit strobe finds the shift register empty while data is still due,
   the FIFO has run dry. The frame is aborted and `TX_UNDERRUN` is set.

**Timestamp insertion.** When `TS_INSERT` is set, the multiplexer in front
of the FIFO replaces frame bytes `TS_OFFSET .. TS_OFFSET+7` with the TSF
counter, least significant byte first. `TS_OFFSET` resets to 24, where an
802.11 beacon carries its timestamp. The value is taken when the first
timestamp byte enters the FIFO. The other seven bytes come from that same
snapshot, so the eight bytes are one consistent 64-bit value. The FCS is
computed on the stream as sent, so it covers the inserted time.

### Receive path

```
rxd ─► shift reg ─► RX FIFO ─► [status mux] ─► RX DMA ─► memory
  └──► RX CRC ───────────────────────┘
```

1. With `RX_EN` set, a rising edge of `md_rdy` opens a frame. This clears
   the shift register and FIFO, presets the receive CRC and starts the DMA at
   `RX_ADDR`.
2. Every assembled byte goes into the FIFO (`pai_rx_shift` → `sync_fifo`).
   Every bit, including the FCS, goes through the CRC.
3. Bytes that find the FIFO full are dropped and counted as overflow. So are
   bytes beyond `RX_MAXLEN` (default 2346, the largest 802.11 MPDU).
4. When `md_rdy` falls, the frame is good if the CRC register holds the
   CRC-32 residue `0xDEBB20E3`.
5. The DMA (`pai_rx_dma`) packs bytes into words and writes them from
   `RX_ADDR` upward. The last word is padded with zeros. The FCS bytes are
   stored too.
6. In the word after the frame, the DMA writes a status word:

   ```
   bit 31  CRC error     bit 30  overflow     bits 15..0  bytes stored (FCS included)
   ```

7. Then `RX_DONE` is set. `RX_LEN`, `RX_CRC_ERR` and `RX_OVERFLOW` also
   appear in the registers.

**Sharing the master port.** Both engines issue single-word transfers
through the PAI's one bus request. When both want the bus, receive goes
first. The choice is frozen while a transfer waits.

### Registers (`pai_regs`, base `0x9000_0000`, word accesses)

| offset | name | meaning |
|---|---|---|
| 0x00 | CTRL | w: bit0 TX_GO (pulse), bit1 RX_EN, bit2 TSF_EN, bit3 TS_INSERT, bit4 TX_IE, bit5 RX_IE. r: the same bits, with bit0 = transmit busy |
| 0x04 | STATUS | bit0 TX_DONE, bit1 RX_DONE, bit2 RX_CRC_ERR, bit3 RX_OVERFLOW, bit4 TX_BUSY, bit5 RX_BUSY, bit6 TX_UNDERRUN, bit7 DMA_ERR. Write 1 to clear bits 0-3, 6 and 7 |
| 0x08 / 0x0C | TX_ADDR / TX_LEN | word-aligned buffer address, length in bytes |
| 0x10 / 0x14 | RX_ADDR / RX_MAXLEN | word-aligned buffer address, buffer size in bytes |
| 0x18 | RX_LEN | bytes of the last received frame |
| 0x1C | TSF_PRESC | TSF counts every TSF_PRESC+1 clocks (reset 19 = 1 µs at 20 MHz) |
| 0x20 / 0x24 | TSF_LO / TSF_HI | Writing loads that half. Reading TSF_LO latches the high half for the next TSF_HI read |
| 0x28 | TS_OFFSET | position of the timestamp in a frame |

The PAI raises two interrupt requests:

- `tx_irq` = TX_DONE and TX_IE;
- `rx_irq` = RX_DONE and RX_IE.

## Peripherals on the APB

**Bridge** (`asb_apb_bridge`). The APB runs at one third of the bus rate.
Instead of a second clock, the bridge raises `pclk_en` every third system
clock, and all APB signals change only at those edges. An ASB transfer to the
bridge waits through one APB setup cycle and one enable cycle. It ends in the
clock where the enable phase ends. A peripheral takes a write when `psel`,
`penable`, `pwrite` and `pclk_en` are all high. An APB access therefore costs
7 to 9 system clocks, depending on where it falls in the APB cycle.

**Timers** (`amba_timers`). The block has two 32-bit down-counters. Each has
its own 16-bit prescaler P and counts on the system clock, not on the slower
APB enable. With a 20 MHz clock and P = 0 the resolution is 50 ns.

| offset | name | meaning |
|---|---|---|
| +0x0 | LOAD | writing it also loads the counter |
| +0x4 | VALUE | read only |
| +0x8 | CTRL | bit0 enable, bit1 periodic, bit2 interrupt enable, bits 31..16 P |
| +0xC | FLAG | bit0 expired. Any write clears it |

Timer *i* sits at offset `0x10*i`. When a step finds the counter at zero, the
flag is set. The counter then reloads (periodic mode) or stops (one-shot
mode). The period is therefore (LOAD+1)·(P+1) clocks.

**Interrupt controller** (`amba_intc`). The controller drives the
processor's `nFIQ` and `nIRQ` from four level-sensitive sources:

- 0: PAI receive;
- 1: PAI transmit;
- 2: timer 0;
- 3: timer 1.

Each source has an enable bit and a FIQ-select bit. FIQSEL resets to the PAI
receive source, the most urgent one. Priority is fixed by source number,
lowest first. IRQVEC (0x14) and FIQVEC (0x18) give the highest-priority
pending source of each line, so a handler serves sources in that order.

| offset | name |
|---|---|
| 0x00 | RAW |
| 0x04 | ENABLE |
| 0x08 | FIQSEL |
| 0x0C | IRQSTAT |
| 0x10 | FIQSTAT |
| 0x14 | IRQVEC (bit 31 valid) |
| 0x18 | FIQVEC (bit 31 valid) |
| 0x1C | SOFT (software requests) |

## Memory and host

**External memory interface** (`emi`).

- The external bus is 32 bits wide with four active-low byte enables. Byte,
  half-word and word transfers all become one access.
- Each bank has its own chip select.
- Every pad output comes from a register, and read data is registered before
  it goes back on the bus. A transfer runs in three phases:
  1. one clock to load the pad registers;
  2. the access itself, held steady for `WS+1` clocks;
  3. one clock that returns the data and releases the strobes.

  A transfer therefore takes `FLASH_WS+3` clocks (default 6) or `SRAM_WS+3`
  clocks (default 4). Back-to-back accesses leave one clock with no chip
  selected between them.
- The data pads are split into `mem_wdata`, `mem_rdata` and `mem_data_oe`.

**PCMCIA controller** (`pcmcia_ctrl`). The host sees two spaces:

- **Attribute memory** is answered at once, without using the bus:
  - a Card Information Structure at even addresses, with these tuples:
    device, version ("VNET"), configuration (registers at `0x200`, last
    index 1), end;
  - the Configuration Option Register at `0x200`: bits 5..0 hold the index,
    and bit 7 is a soft reset;
  - the Card Configuration and Status Register at `0x202`.
- **Common memory** opens once the host writes a non-zero configuration
  index. Until then it reads as zero and ignores writes. Once open, host
  address A becomes an ASB transfer to `0x0100_0000 + A`, the SRAM, and the
  controller holds `WAIT#` low until the transfer ends:
  - `CE1#` and `CE2#` together: a 16-bit access at the even address;
  - `CE1#` alone: the byte at A on D7..0;
  - `CE2#` alone: the odd byte on D15..8.

Host signals are taken as already synchronous to the system clock. A strobe
(`OE#` or `WE#` low while the card is enabled) starts an access, and the
card waits for the strobe to end before starting the next one.

## How far this follows the source, and what is this design's own

The source is a short architectural description. These parts follow it:

- the block set and its connections;
- the roles of the blocks;
- the master priority order (PAI first, ARM last);
- request/grant signals per master and an independent select per slave;
- the APB at one third of the bus rate;
- two 32-bit timers with independent prescalers and 50 ns resolution;
- FIQ/IRQ driven with a fixed priority;
- byte/half-word/word memory access;
- the host reaching memory as a bus master, with plug-and-play support;
- the PAI's internal structure: DMA engines, FIFOs, CRC-32 engines, shift
  registers, a 64-bit TSF with prescaler, registers, and transmit and receive
  state machines.

Everything at register and signal level is this design's own choice,
including:

- the bus protocol details and the address map;
- register maps;
- FIFO depths (16 bytes each);
- the PHY signal set;
- wait states;
- the CIS contents and the host window;
- the use of the two PAI multiplexers: timestamp insertion on transmit, and
  a status word on receive. The source shows both multiplexers but does not
  say what they are for.

These 802.11 details come from the standard, not from the source:

- the FCS and its bit order;
- the beacon timestamp offset;
- the maximum MPDU size.

The clock rate is not given. A 20 MHz system clock is assumed wherever a
time matters, because it matches the 50 ns timer resolution.

Not built:

- the processor core. Its port is brought out.
- the external FLASH and SRAM chips and the radio chipset. Testbenches
  model them.
- automatic handling of time-critical network management tasks. The source
  says the interface can be set up to do such tasks, but not which tasks or
  how. Hardware ACK responses or clear-channel assessment would be examples.
  Here the firmware does all of it, using the timers, the TSF and the
  interrupts.
- a host interrupt (`IREQ#`) and PC Card I/O space.
- WEP and power management, which the source names only as future work.

The ASB here is a simplified model of AMBA, not a pin-exact one. It has no
bursts, no `BLAST` or retract, and no separate address and data phases. A
real ARM7TDMI veneer would need a thin adapter.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. These testbench helpers
live in `tb/`:

- `asb_mem_slave`: a bus memory with random wait states;
- `ext_mem_model`: the FLASH/SRAM model;
- `crc32_ref.svh`: a reference CRC, written differently from the RTL;
- `apb_tasks.svh`: APB master tasks;
- `arm_bfm`, `host_bfm` and `link_station`: the processor, host and
  adapter models used by the link test.

`tb_vnet_top` runs the whole chip at its default parameters:

1. The processor model makes an unmapped access, then accesses FLASH and
   SRAM in all sizes.
2. The host model reads the CIS, is refused before configuring, configures
   the card and writes a 100-byte frame into SRAM through the card window.
3. Meanwhile the processor sets up the timers, the interrupt controller and
   the PAI.
4. Three frames are transmitted. The baseband model captures each one and
   plays it back into the receiver:
   - one with its timestamp inserted;
   - one corrupted on the way (CRC error);
   - one into a buffer that is too small (overflow).
5. Throughout, the processor serves timer, transmit (IRQ) and receive (FIQ)
   interrupts and reads memory, and the host reads memory, so all three
   masters compete for the bus.
6. The testbench checks:
   - the serial stream: bytes, timestamp window and FCS;
   - the received copy, read back by both the processor and the host;
   - the status words and registers.

   It also counts each mechanism: bus contention, wait states, APB
   transfers, decoder errors, transmit FIFO stalls, host `WAIT#`, each
   interrupt kind, CRC error, overflow, timestamp insertion and the
   unconfigured-card refusal. A mechanism that never occurs is a failure.

`tb_vnet_link` connects two complete adapters through their radio
interfaces. Each adapter is a `link_station`: the chip, its memory, a
processor model (`arm_bfm`), a host model (`host_bfm`) and a baseband model
that puts the transmitted bits "on the air". The test runs one exchange three
times:

- at 1 Mbit/s (20 clocks per bit);
- at 2 Mbit/s (10 clocks per bit);
- at 2 Mbit/s with a maximum-size 802.11 MPDU of 2346 bytes.

In each exchange, host A loads a data frame through its card window and
station A sends it. Station B takes the receive FIQ, checks the status and
answers with a 10-byte ACK frame, which A receives and checks. Host B then
reads the frame and its FCS back through B's card window. The test also
checks that the time each frame spends on the air matches its bit count and
that the transmitter never ran dry.

The transmit unit test runs with a bit strobe every third clock, the
closest spacing the design supports. At
20 MHz, 2 Mbit/s leaves ten clocks per bit, and a 16-byte FIFO covers 128
bit times of bus latency. A single-word SRAM transfer takes four clocks.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/vnet_pkg.sv tb/tb_vnet_top.sv --top-module tb_vnet_top -Mdir obj_top
./obj_top/Vtb_vnet_top
```

Replace `tb_vnet_top` with any other `tb_*` name to run that block's test.
The full-chip test and the link test each take about ten to fifteen seconds.

## Files

- `rtl/vnet_pkg.sv` holds the bus types, address map, interrupt numbers and
  byte-lane helpers.
- `rtl/vnet_top.sv` is the chip.
- Bus: `asb_arbiter.sv`, `asb_decoder.sv`, `asb_apb_bridge.sv`.
- APB peripherals: `amba_timers.sv`, `amba_intc.sv`.
- Memory and host: `emi.sv`, `pcmcia_ctrl.sv`.
- PAI: `pai.sv` (the top of the PAI), `pai_regs.sv`, `pai_tsf.sv`,
  `pai_tx_dma.sv`, `pai_rx_dma.sv`, `pai_tx_ctrl.sv`, `pai_rx_ctrl.sv`,
  `pai_tx_shift.sv`, `pai_rx_shift.sv`, `crc32_serial.sv` (used for both
  directions) and `sync_fifo.sv` (used for both FIFOs).
