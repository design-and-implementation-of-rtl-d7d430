# IEEE 802.11 MAC processor in SystemVerilog

An 802.11 wireless LAN MAC splits into two kinds of work. One is protocol
logic: frame formats, the DCF channel access rules, fragmentation,
RTS/CTS/ACK. It changes with the standard and suits firmware. The other is
bit-serial and time-critical: moving every bit to and from the radio, the
CRC-32 frame check sequence, 802.11's Timing Synchronisation Function (TSF)
timer, and RC4 encryption. A small processor cannot keep up with that.

This design is the hardware half of such a MAC chip. The chip is built
around an ARM7TDMI core that runs the firmware. Around the core sit
bus-master engines that do the heavy lifting without the processor:

* the **PAI** (physical attachment interface) streams frames between
  memory and the PHY;
* the **WEP** engine encrypts or decrypts a block of memory;
* the **PCMCIA** interface lets the host PC read and write the chip's
  memory.

They all share one system bus with the processor. The core itself and its
bus wrapper are licensed IP and are not part of this RTL. Their bus master
port and the two interrupt lines are ports of the top module `mac_top`.

```
                 cpu_* (ARM core + bus wrapper)         nirq / nfiq
                        |                                    ^
   +--------------------+---- system bus ------------+       |
   |  decoder / arbiter (asb_decoder_arbiter)        |       |
   +--+---------+-----------+-----------+------------+       |
      |         |           |           |            |       |
   mem_ctrl    pai         wep        pcmcia     apb_bridge  |
   (slave)  (slave+master)(slave+master)(slave+master)|      |
      |         |                       |          peripheral bus (1/3 clock)
  SRAM/Flash  PHY, baseband,         PC host         |            |
  8/16 bit    synthesiser            (8-bit)        irc -------- timers
```

Masters, from highest to lowest priority: PAI, WEP, PCMCIA, CPU. The bus
parks on the CPU.

## System bus

The original chip uses ARM's ASB. Its signal-level protocol is not
reproduced here. `rtl/mac_pkg.sv` defines a simpler request/ready bus with
the same roles:

* A master raises `breq`. The arbiter answers with a one-hot `gnt` one
  clock later.
* While granted, the master drives `asb_req_t`: valid, write, size
  (byte/half/word), 32-bit addr and wdata. Narrow data are right-aligned.
* It holds the request unchanged until the slave's `asb_rsp_t` shows
  `ready`. The same cycle carries `rdata` and `error`.
* A master keeps the bus as long as it keeps `breq` high or has a transfer
  waiting. Arbitration happens only when the owner lets go.
* Assertions in the arbiter check two rules: only the owner transfers, and a
  waiting transfer holds still.

The decoder selects the slave from address bits 31:28. Anything unmapped
gets an error response.

| Address       | Slave                                   |
|---------------|-----------------------------------------|
| `0x0000_0000` | Flash (external)                        |
| `0x0100_0000` | SRAM (external)                         |
| `0x0800_0000` | memory controller configuration (MCFG)  |
| `0x1000_0000` | PAI registers                           |
| `0x2000_0000` | WEP registers                           |
| `0x3000_0000` | PCMCIA registers                        |
| `0x8000_0000` | interrupt controller (peripheral bus)   |
| `0x8000_1000` | timers (peripheral bus)                 |

The engines move one byte per bus tenure and release the bus after each
one. Several engines and the CPU therefore interleave at byte granularity.
A long WEP job does not lock out the PAI, and the CPU keeps running between
engine transfers.

## Physical attachment interface (`pai`)

This is the most involved block. Its parts:

* a transmit path: `pai_dma` (memory → FIFO), a 64-byte `sync_fifo`, and
  `pai_tx_ctrl`, which holds the shift register and the serial CRC;
* a receive path: `pai_rx_ctrl`, a 64-byte FIFO, and `pai_dma` (FIFO →
  memory);
* the 64-bit `tsf_timer`;
* `pai_serial_if`, which programs the baseband processor and the frequency
  synthesiser;
* one register slave.

The two DMA machines share the block's single bus master port. Receive goes
first, so the receive FIFO never backs up behind transmit traffic.

**Transmit.** Software writes TX_ADDR and TX_LEN and sets CTRL.tx_start.
Alternatively it sets CTRL.tx_on_tsf and arms a TSF compare value, and the
start happens when the TSF reaches that value.

1. The DMA starts filling the FIFO.
2. The controller raises `phy_tx_pe`.
3. It waits for a *rising edge* of `phy_tx_rdy`.
4. It then places one bit per rising edge of the PHY bit clock `phy_txclk`,
   least significant bit first.
5. After LEN bytes it sends the 32-bit FCS.

If the FIFO is empty at a byte boundary, the frame is aborted and
STATUS.tx_underrun is set. The DMA halts on a bus error, and the underrun
that follows is reported the same way; STATUS.dma_err tells the two apart.

**Receive.** While CTRL.rx_enable is set, `phy_rx_pe` is high. CTRL.rx_on_tsf
sets rx_enable at the next TSF event.

* A frame lasts while the PHY holds `phy_md_rdy` high. `md_rdy` rises
  together with the first data bit.
* Bits are taken on rising edges of `phy_rxclk`, packed LSB-first, fed to
  the CRC and pushed into the FIFO, FCS included.
* When `md_rdy` falls, the frame length and CRC result are kept. STATUS.rx_done
  is set only after the DMA has written the last byte to memory, so software
  never sees a half-written frame.
* Two error flags:
  * `rx_crc_err`: the CRC register does not hold the good-frame residue;
  * `rx_overflow`: a byte was lost because the FIFO was full, or the frame
    was longer than RX_MAXLEN (the bytes beyond it are dropped).

All PHY inputs pass through two-flip-flop synchronisers. The PHY clocks can
be asynchronous to the 20 MHz system clock, as long as a bit lasts several
system clocks. At 2 Mbit/s a bit is 10 clocks.

**CRC.** Both serial engines (`crc32_serial`) and the WEP engine's
byte-parallel one (`crc32_parallel`) use the 802.11 CRC-32: reflected
polynomial `0xEDB88320` and an all-ones preset. The FCS is the inverted
register, sent LSB first. The receiver accepts a frame when the register
ends at the residue `0xDEBB20E3`.

**TSF.** A 64-bit microsecond counter with one tick every `TICK_DIV` = 20
clocks. Software reads it as TSF_LO/TSF_HI and loads it by writing TSF_LO
and then TSF_HI. A compare value (CMP_LO, then CMP_HI, which arms it)
produces one event when the counter reaches it. The event can start a
transmit, enable the receiver, or just raise STATUS.tsf_event.

**Serial programming.** A three-wire master: clock, data out, data in.

* Words of 1–32 bits are sent MSB first.
* The serial clock period is 2·(div+1) system clocks.
* For the baseband processor, `bb_cs_n` is held low during the word and the
  bits clocked back are captured in SER_RX.
* For the synthesiser, `syn_le` pulses after the word.

PAI registers (offset from `0x1000_0000`):

| Off  | Name     | Content                                                                  |
|------|----------|--------------------------------------------------------------------------|
| 0x00 | CTRL     | [0] tx_start (self-clearing) [1] rx_enable [2] tx_on_tsf [3] rx_on_tsf     |
| 0x04 | STATUS   | [0] tx_done [1] tx_underrun [2] rx_done [3] rx_crc_err [4] rx_overflow/too long [5] tsf_event [6] ser_done (write 1 to clear); [8] tx_busy [9] rx_active [10] ser_busy [11] dma_err |
| 0x08 | INT_EN   | enables of STATUS[6:0] onto the interrupt                                  |
| 0x0C | TX_ADDR  | frame address                                                             |
| 0x10 | TX_LEN   | frame body length in bytes (FCS added by hardware)                        |
| 0x14 | RX_ADDR  | receive buffer address                                                    |
| 0x18 | RX_MAXLEN| longest frame accepted, reset 2346                                        |
| 0x1C | RX_LEN   | length of the last frame, FCS included                                    |
| 0x20/0x24 | TSF_LO/HI | TSF counter; writing HI loads LO:HI                                   |
| 0x28/0x2C | CMP_LO/HI | TSF compare; writing HI arms it                                       |
| 0x30 | SER_TX   | serial word to send                                                       |
| 0x34 | SER_CTRL | [5:0] bit count [6] target (1 = synthesiser) [15:8] divider; a write starts |
| 0x38 | SER_RX   | bits read back                                                            |

## WEP engine (`wep`)

Software does five things:

1. writes the RC4 seed (IV and secret key, up to 16 bytes) into SEED
   (0x20–0x2C, byte k in word k/4);
2. writes its length into KEYLEN;
3. writes the source address (SRC) and destination address (DST);
4. writes the body length into LEN;
5. sets CTRL.start, with CTRL.decrypt chosen.

The engine then works as follows.

* `rc4_engine` runs the key schedule in the 256-byte single-port
  `sbox_ram`: 256 clocks to fill S, then 4 clocks per swap, 1024 in all. A
  keystream byte comes 7 clocks after each request.
* The memory state machine handles one byte at a time:
  1. read the source byte over the bus;
  2. XOR it with the keystream byte, which was requested when the read
     started;
  3. write the result to the destination.
* `crc32_parallel` folds each plaintext byte into the integrity check value
  (ICV).
* **Encrypt** writes LEN ciphertext bytes followed by the 4-byte ICV,
  itself encrypted.
* **Decrypt** reads LEN+4 bytes and writes the LEN plaintext bytes. It
  compares the decrypted ICV with the one it computed and reports the result
  in STATUS.icv_ok.
* STATUS.done (write 1 to clear) raises the interrupt if CTRL bit 2 is set.
  The plaintext ICV can be read at 0x18.

This follows 802.11 WEP, where the ICV is the CRC-32 of the plaintext.

## PCMCIA host interface (`pcmcia`)

The host sees an 8-bit PC Card.

**Common memory** (REG# high) has a small register window:

* offsets 0–3: a 32-bit pointer into the chip's address space;
* offset 4: DATA. Each read or write of DATA performs one byte transfer at
  the pointer as a bus master and then increments the pointer. WAIT# is
  held low until the transfer completes.
* offset 5: mailbox;
* offset 6: interrupt flag.

**Attribute memory** (REG# low) holds two things:

* the card information structure: a minimal tuple chain with a device
  tuple, a configuration tuple pointing at the configuration registers, one
  configuration entry, and an end tuple;
* the configuration option register (COR) at 0x3F8. IREQ# is driven only
  once a non-zero configuration index is written. COR bit 7 is a soft reset.

**The ARM side** (`0x3000_0000`) has two one-way mailboxes:

* TO_HOST: a write raises IREQ#;
* FROM_HOST: a host write raises the ARM interrupt;
* plus their interrupt flags.

Host strobes are synchronised into the clock domain, and an access acts two
clocks after its strobe falls. WAIT# is combinational from the strobes, so
it is low from the start of a DATA access.

## External memory controller (`mem_ctrl`)

A system bus slave drives a Flash and an SRAM on a shared external bus that
is 16 or 8 bits wide.

* MCFG[8] selects the width; reset is 16-bit.
* MCFG[3:0] and [7:4] hold the Flash and SRAM wait states for
  non-sequential (N) accesses; reset values are 3 and 1.
* MCFG[15:12] and [19:16] hold the same for sequential (S) accesses, with
  the same reset values.

The ARM core runs through memory mostly sequentially, so S accesses are
worth making faster, as page-mode or burst Flash allows. The bus carries no
sequential flag. The controller therefore treats an access as sequential
when its address is the one right after the previous memory access; a
register access in between breaks the run.

A transfer is split into beats:

| Transfer | 16-bit bus | 8-bit bus |
|----------|------------|-----------|
| byte     | 1 beat     | 1 beat    |
| halfword | 1 beat     | 2 beats   |
| word     | 2 beats    | 4 beats   |

The first beat lasts N+1 clocks, or S+1 if the transfer is sequential. Each
further beat lasts S+1 clocks. The response comes one clock after the last
beat. Byte enables select lanes on the 16-bit bus. The data are
little-endian.

## Peripheral bus, interrupts, timers

**`apb_bridge`.** Converts a bus transfer into an APB setup/enable pair. It
runs on a clock enable that fires every third system clock (`DIV` = 3).
Peripheral 0 is the interrupt controller and peripheral 1 the timers,
selected by paddr[15:12].

**`irc`.** Takes eight level-sensitive sources: PAI 0, WEP 1, PCMCIA 2,
timer 0 3, timer 1 4.

* ENABLE masks the sources. FIQSEL routes each one to `nfiq` or `nirq`.
* IRQ_VEC and FIQ_VEC give the number of the highest-priority pending
  source, where the lowest number wins. They read `0x8000_0000` when nothing
  is pending.
* The outputs are registered.

**`timers`.** Two 32-bit down counters, each with its own 16-bit prescaler.

* Timer i has four registers at 0x10·i: LOAD, VALUE, CTRL ([0] enable,
  [1] periodic, [2] irq) and PRESCALE.
* With LOAD = N, a timer expires N·(PRESCALE+1) clocks after it is enabled.
  At 20 MHz with PRESCALE = 0 that is 50 ns per count.
* STATUS (0x20) holds the expired flags, write 1 to clear.

## Verification

Each block has a self-checking testbench `tb/tb_<module>.sv`. The checks
compare against independent models in `tb/tb_pkg.sv`: a bitwise CRC-32, and
RC4 checked against the published test vector for key 01 02 03 04 05. Each
testbench ends with a `TB_RESULT checks=… failures=…` line and has a
watchdog. The behavioural models are:

* `tb/phy_model.sv`: the PHY's serial side;
* `tb/ext_mem_model.sv`: Flash and SRAM on the 8/16-bit bus;
* `tb/bus_mem_model.sv`: a system bus memory with random wait states.

`tb_mac_top` runs the whole chip with default parameters. The testbench
plays the processor with an interrupt-driven handler that reads the vector,
services the source and clears it. The test:

1. boots from Flash;
2. in parallel, encrypts a 120-byte block, transmits a 200-byte frame
   (longer than the FIFO) and lets the host move 96 bytes through DATA and
   exchange mailboxes;
3. decrypts the block, and decrypts it again with one corrupted byte;
4. receives a good frame, a corrupted frame and a too-long frame;
5. provokes a transmit underrun by pointing the DMA at unmapped space;
6. transmits on a TSF compare;
7. switches to the 8-bit bus and transmits from SRAM;
8. programs the baseband;
9. waits for periodic IRQ and one-shot FIQ timer expiries.

It counts each of these events and fails if any never happened. It also
checks every frame bit by bit on the PHY side and every memory buffer
against the reference models. It runs in a few seconds.

`tb_mac_workload` tests the data rate at the largest frame. It sends the
largest 802.11 frame (2346 bytes including the FCS) out at 2 Mbit/s, then
receives one of the same size. The memory system is at its slowest during
both: the 8-bit bus with 3 wait states, with the WEP engine encrypting a
block of the same size over the same bus. It checks four things:

* no underrun or overflow occurs;
* the data are bit-exact;
* the first and last transmitted bits are exactly 2346·8−1 bit times (10
  clocks each) apart;
* RX_LEN is 2346, the default RX_MAXLEN.

On that bus the DMA needs about 7 clocks per byte against the 80 clocks a
byte takes on air. The 64-byte FIFOs therefore never come near their limits
in normal operation; underrun and overflow are reached only by faults such
as a DMA bus error.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_mac_top rtl/mac_pkg.sv tb/tb_pkg.sv tb/tb_mac_top.sv
./obj_dir/Vtb_mac_top
```

The same command works for any `tb_<module>`. Testbenches do not depend on
the random initial state, because everything they read is reset.

## Where this design makes its own choices

The block structure follows the source description of the chip:

* the master/slave roles and priorities of the bus;
* the 64-byte FIFOs;
* the bit-serial CRC engines;
* the 64-bit TSF with TSF-driven transmit and receive;
* the RC4 engine with a 256-byte state RAM and a parallel ICV CRC;
* the PCMCIA host/ARM split with one-way registers and interrupts;
* the 1/3-rate peripheral bus;
* two 32-bit timers with 50 ns resolution;
* the fixed-priority interrupt controller;
* the programmable wait states and the 8/16-bit bus option.

Not specified there, and chosen here:

* the bus protocol and all register maps and address assignments;
* the PHY handshake: TX_RDY edge, MD_RDY with the first bit, LSB first;
* the serial programming format;
* the arbitration order;
* the CIS contents.

Known gaps:

* The ISA host bus option of the development board is not built.
* Manufacturing test logic is not included.
* The ARM core, its bus wrapper, the radio chipset and the memories are
  outside the design. The last three exist only as testbench models.
