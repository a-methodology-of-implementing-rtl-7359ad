# An IEEE 802.11 MAC datapath built from parameterized MAC blocks

Most packet-based medium access controllers (802.11, 802.3, Bluetooth) are made
of the same kinds of hardware: bit-serial functions on the line (CRC,
scrambling), a shift register, byte-wide functions (cipher XOR, address
comparison), FIFOs, DMA, an events section that turns line signals into
events, and a set of state machines and registers that a processor drives.
The architecture implemented here takes that observation literally. It is a
library of such blocks, wired into a receive section and a transmit section
around shared events and register sections, and then configured for one
protocol. This RTL is that configuration for IEEE 802.11: the "customized
network block" that sits between an 802.11 PHY chip, a processor and memory.

The processor keeps the protocol control (backoff, management, key handling).
The hardware does everything that has to happen at line rate:

* it checks the FCS of received frames and appends it to transmitted ones
  (bit-serial CRC-32, one engine per direction);
* it decrypts and encrypts frame bodies with the WEP keystream (RC4 generator
  plus byte XOR, one pair per direction), and generates and checks the WEP
  integrity check value (ICV);
* it classifies received frames as unicast to this station, broadcast or
  multicast;
* it buffers 128 bytes in each direction and moves frames to and from memory
  by DMA;
* it answers a correctly received unicast frame with an ACK after SIFS, with
  no processor involvement;
* it keeps the 64-bit TSF microsecond timer and collects events into an
  interrupting event register.

## Block diagram

```
RECEIVER
 rx_clock, rx_data ─► net_clk_sync ─► bit_en, bit ─┬─► crc32_serial ─► crc_ok
                                                   └─► rx_shift_reg ─► byte
 byte ─► xor_cipher (keystream from rc4_prng) ─► plain byte ─┬─► sync_fifo ─► rx_dma_engine ─► rxm_*
                                                             ├─► addr_decode ─► unicast/broadcast/multicast
                                                             ├─► icv_check ─► ICV good
                                                             └─► ack_fsm (frame control, sender address)
 rx_frame ─► events ─► SOF/EOF ─► rx_fsm (writes FIFO, latches status), rx_dma_ctrl (runs DMA)
 good unicast frame ─► ack_fsm ─ after SIFS ─► ACK request to tx_fsm

TRANSMITTER
 txm_* ─► tx_dma_engine (started by tx_dma_ctrl) ─► sync_fifo ─┐
 icv_crc32 (ICV bytes) ────────────────────────────────────────┼─► xor_cipher (keystream from rc4_prng)
 ack_fsm (ACK bytes) ──────────────────────────────────────────┘
                                                                        │ byte
                                                                        ▼ loaded into tx_shift_reg
 tx_clock ─► net_clk_sync ─► bit_en ─► tx_shift_reg ─► bit ─┬─► tx_data (frame bytes)
                                                            └─► crc32_serial ─► tx_data (FCS, after the last byte)
 tx_ready, cca ─► events ─► SOT/EOT, CCA ─► tx_fsm (sequences all of the above) ─► tx_request

SHARED
 up_* ◄─► ctrl_regs ◄─ tsf_timer;  events ─► event register ─► irq
```

Every box is one module in `rtl/`; `mac80211_cnb` is the top.

## Clocking and the PHY interface

This is the part that decides whether the block works with a real PHY, so it
is described first.

**One clock.** Everything runs on the system clock `clk`. The PHY's bit clocks
`rx_clock` and `tx_clock` are not used as clocks. `net_clk_sync` passes each one
through two flip-flops and turns each rising edge into a one-cycle `bit_en`
strobe. The receive data line goes through the same two flip-flops, so the
sampled bit is the value at the PHY's rising edge. The strobe lags the PHY edge
by two to three system clocks. This works when:

* `clk` is at least 4 times the bit rate (44 MHz for 11 Mbit/s, the default
  `CLK_MHZ`);
* the PHY changes `rx_data` on the falling edge of `rx_clock`.

The FIFOs are therefore ordinary single-clock FIFOs. The network timing is
decoupled from the memory side by the FIFO depth, not by a clock crossing.

**Receive.** `rx_frame` is high while the PHY delivers frame bits; it should
rise before the first bit's clock edge and fall after the last. Its rising
edge is the Start of Frame event and its falling edge the End of Frame event.
Bits are taken LSB first. The whole frame, including the 4-byte FCS, goes
into the receive FIFO.

**Transmit.** For a frame, the MAC raises `tx_request` once CCA is idle. (An
ACK is sent without looking at CCA.) The MAC then waits for the PHY to raise
`tx_ready`; that rising edge is the Start of Transmission event. The PHY takes
`tx_data` on each rising edge of `tx_clock` after that. The first bit is
already on the line when `tx_ready` rises. The MAC moves `tx_data` to the next
bit 2-3 system clocks after each edge. If `tx_ready` rises on a falling edge
of `tx_clock`, the first rising edge after it takes bit 0. After the last FCS
bit the MAC drops `tx_request`. The PHY then drops `tx_ready`, which is the End
of Transmission event. Only then does the transmit machine become idle again.

`cca` is high while the channel is busy. Its falling edge is the
channel-clear event.

All of these handshakes were chosen for this design. The architecture names
the events (start/end of frame, start/end of transmission, clear channel
assessment) but does not define the signals.

## Receive path

1. The Start of Frame event (with reception enabled) makes `rx_fsm` realign
   the shift register, preset the CRC and clear the address decoder.
2. Each byte from `rx_shift_reg` passes through the XOR. It is decrypted if
   receive decryption is on and the byte index is at or past the programmed
   receive cipher offset. For WEP that offset is the start of the frame body
   after the IV field.
3. The byte is written to the FIFO. `addr_decode` watches bytes 4..9 (address 1).
   `ack_fsm` keeps byte 0 (frame control) and bytes 10..15 (address 2, the
   sender). `icv_check` sees every decrypted byte (see the ICV section below).
4. The CRC engine runs on the raw serial bits, so the FCS is checked on the
   frame as it was sent, encrypted or not. Decryption does not know where the frame
   ends, so the four FCS bytes stored in memory are XORed with keystream
   too. The FCS result is in STATUS, so software can ignore the stored copy.
5. At End of Frame, `rx_fsm` latches `crc_ok` and the stored length and pulses
   `rx_done`.

With receive DMA enabled, `rx_dma_ctrl` starts `rx_dma_engine` at Start of
Frame. The FIFO is drained into memory from the programmed buffer address while
the frame is still arriving, so frames longer than 128 bytes are fine. The
receive DMA event fires once the frame has ended and the FIFO is empty. Each
frame goes to the buffer address programmed at the time; the processor moves
that address on between frames.

If a byte arrives while the FIFO is full, it is dropped and an overflow event
is raised. This happens when DMA is off or the memory is too slow.

**Without DMA.** With receive DMA disabled, the processor reads the frame
itself. Each read of RXFIFO returns the oldest byte in bits 7:0 and removes it
from the FIFO; bit 8 shows that a byte was there. A read must select the
register for exactly one clock. CTRL bit 11 flushes the receive FIFO, for
example to discard the rest of a frame after an overflow.

**Automatic ACK.** The ACK machine waits `SIFS_US` microseconds (default 10)
and then asks the transmitter for an ACK frame (D4 00, duration 0, receiver
address = the sender's address, FCS) when all of these hold:

* the FCS was good;
* address 1 equals the station address;
* the frame is not itself a control frame;
* automatic ACK is enabled.

The ACK has priority over a pending data frame and does not wait for CCA.
SIFS is counted from the end-of-frame pulse. That point is about five system
clocks after `rx_frame` falls.

## Transmit path

The processor:

1. places the frame in memory, without FCS;
2. programs the transmit DMA address and length, and the frame length;
3. sets CTRL bit 6 to start the DMA and CTRL bit 5 to start the transmission.
   These can be in the same write or separate writes.

`tx_dma_engine` then fills the FIFO whenever it has room. Once the channel is
idle, `tx_fsm` requests the PHY and preloads the first byte. After Start of
Transmission it reloads the shift register each time it empties. Bytes at or
past the transmit cipher offset are XORed with the transmit keystream. After
the last byte the line switches to the CRC engine for the 32 FCS bits.

Without DMA, the processor writes the frame bytes to TXFIFO instead (one
byte per write, bits 7:0), then sets TX_LEN and starts the transmission. Such
writes are ignored while the transmit DMA is running or the FIFO is full
(STATUS bit 14). CTRL bit 12 flushes the transmit FIFO.

If a bit is due and the FIFO is empty, the frame is cut off: `tx_request`
drops and an underrun event is raised. The PHY will have taken one stale bit
at that point. For frames of up to 128 bytes, the simplest safe use is to wait
for the transmit DMA event before starting the transmission. Longer frames
stream through the FIFO while they are sent, which works as long as the
memory keeps up on average (see the workload test below).

## WEP keystream

`rc4_prng` is an RC4 generator, the cipher used by WEP. The processor writes the
8-byte seed (24-bit IV followed by the 40-bit key, byte 0 in bits 7:0 of the
low word) into the key registers. It then sets the key-init command bit
(CTRL bit 7 for receive, 8 for transmit). The key schedule takes 259 clocks.
STATUS bit 8 (receive) or 9 (transmit) is then set. After that the generator
supplies one byte per two clocks on demand, far more than the 32 clocks per
byte available at 11 Mbit/s.

The seed must be loaded before the frame. On receive, the IV arrives inside
the frame itself. A processor that must decrypt frames with changing IVs has
to know the IV in advance, for example from a previous exchange. This is a
limit of this implementation.

**ICV.** WEP protects the body with a CRC-32, the ICV, placed after the body
and encrypted with it. It is handled by two byte-wide CRC blocks, enabled
separately by CTRL bits 9 (transmit) and 10 (receive).

* On transmit (`icv_crc32`), the ICV covers every FIFO byte from the transmit
  cipher offset on. With ICV enabled, TX_LEN counts the ICV: the DMA supplies
  TX_LEN − 4 bytes. For the last four byte slots, `tx_fsm` takes the
  complemented CRC register, low byte first, instead of reading the FIFO.
  These bytes then pass through the XOR like the body.
* On receive (`icv_check`), the end of the body is only known when the frame
  has ended, and the last four bytes are then the FCS. So each decrypted byte
  from the receive cipher offset on reaches the CRC only after four more
  bytes have arrived behind it. When the frame ends, the CRC has absorbed the
  body and ICV but not the FCS. A correct ICV leaves the register at the
  fixed value 0xDEBB20E3. STATUS bit 12 reports this from the end of the
  frame until the next frame starts.

Both are plain CRC-32 (reflected polynomial 0xEDB88320, preset all ones).

## Processor interface and registers

The bus is synchronous: `up_sel` with `up_we` writes `up_wdata` at the clock
edge. `up_rdata` shows the register at `up_addr` combinationally. Only reads
of RXFIFO have a side effect. Registers are 32 bits wide at word addresses:

| addr | name | contents |
|---|---|---|
| 0x00 | CTRL | 0 rx enable, 1 rx DMA enable, 2 auto ACK, 3 rx decrypt, 4 tx encrypt, 9 tx ICV, 10 rx ICV check; commands (read as 0): 5 start transmission, 6 start tx DMA, 7 rx key init, 8 tx key init, 11 flush rx FIFO, 12 flush tx FIFO |
| 0x01 | STATUS | 0 rx busy, 1 tx busy/pending, 2 last FCS good, 3 unicast, 4 broadcast, 5 multicast, 6 rx DMA busy, 7 tx DMA busy, 8 rx key ready, 9 tx key ready, 10 CCA busy, 11 ACK pending, 12 last ICV good, 13 rx FIFO empty, 14 tx FIFO full |
| 0x02 | EVENT | event bits, write 1 to clear (numbering below) |
| 0x03 | EVMASK | events that drive `irq` |
| 0x04/0x05 | STA_LO/HI | station address, first transmitted byte in bits 7:0 |
| 0x06/0x07 | TXKEY_LO/HI | transmit RC4 seed |
| 0x08/0x09 | RXKEY_LO/HI | receive RC4 seed |
| 0x0A | CRYPT_OFS | 11:0 transmit cipher offset, 27:16 receive cipher offset (bytes) |
| 0x0B | TX_LEN | frame length without FCS (with the ICV if enabled) |
| 0x0C/0x0D | TXDMA_ADDR/LEN | transmit DMA source address and byte count |
| 0x0E | RXDMA_ADDR | receive buffer address |
| 0x0F | RX_LEN | bytes stored for the last frame, FCS included (read only) |
| 0x10/0x11 | TSF_LO/HI | TSF timer; a write loads that half |
| 0x12/0x13 | TSFCMP_LO/HI | TSF compare value (event when reached) |
| 0x14 | RXFIFO | read: bit 8 byte valid, 7:0 byte; the read removes the byte (only while rx DMA is disabled) |
| 0x15 | TXFIFO | write: bits 7:0 appended to the transmit FIFO |

Events (EVENT bit numbers): 0 start of frame, 1 end of frame, 2 start of
transmission, 3 end of transmission, 4 channel clear, 5 TSF compare, 6 rx DMA
done, 7 tx DMA done, 8 frame received, 9 frame transmitted, 10 ACK sent,
11 rx FIFO overflow, 12 tx FIFO underrun.

The TSF timer counts microseconds from `CLK_MHZ`. Writing either half
restarts its prescaler.

## Memory ports

There are two independent byte-wide ports, one per direction. This keeps them
separate for an external memory controller to merge.

* Receive port: `rxm_req` with `rxm_addr`/`rxm_wdata` is held until `rxm_ack`.
* Transmit port: `txm_req` with `txm_addr` is held until `txm_ack`, and
  `txm_rdata` is valid with the acknowledge.

One transfer is outstanding at a time.

## Parameters of `mac80211_cnb`

| parameter | default | meaning |
|---|---|---|
| `CLK_MHZ` | 44 | system clock in MHz; must be ≥ 4 × bit rate; sets TSF and SIFS time bases |
| `FIFO_DEPTH` | 128 | bytes per FIFO (the architecture's figure for 802.11 up to 11 Mbit/s) |
| `KEY_BYTES` | 8 | RC4 seed length (WEP-64); the key registers hold up to 8 |
| `SIFS_US` | 10 | ACK turnaround (802.11 DSSS value) |

## How far it can be trusted, and where it departs from the architecture

The following follow the architecture description:

* the set of blocks and their arrangement (two sections, shared events and
  registers, four receive and three transmit state machines);
* the use of one CRC-32 per direction on the serial line;
* XOR encryption with a keyed pseudo-random generator;
* address classification into unicast, broadcast and multicast;
* automatic transmission of control frames after a good unicast reception;
* the 128-byte FIFOs;
* the TSF register and the kinds of control registers.

The following were chosen here, mostly from the 802.11 standard or as the
simplest working option:

* RC4 as the generator, and the seed format;
* FCS polynomial, bit order and header offsets (from 802.11);
* the single-clock, strobe-based handling of the PHY clocks;
* all handshakes, the register map and the event numbering;
* byte-wide DMA;
* one frame per DMA buffer;
* the cipher offset registers;
* storing the FCS with the frame;
* the RXFIFO/TXFIFO registers and flush commands, the processor's path to the
  FIFOs when DMA is not used (the architecture allows either path);
* ICV generation and checking in hardware. The architecture names the ICV
  as an 802.11 parallel function but does not include it in its 802.11
  block list; here it is built and switched off after reset.

Not built:

* the generic, configurable arrays of bit-serial and parallel functions with
  their programmable interconnect (only the 802.11 configuration exists);
* the processor, memory controller, SRAM/Flash, the PHY and its serial control
  bus (cs/data/clock), and system peripherals (UART, PCMCIA/ISA, timers,
  interrupt controller).

Verification is by simulation only; nothing has been run on hardware. Every
module has a self-checking testbench in `tb/` (`tb_<module>.sv`), with the
expected values computed independently in the testbench. These cover CRC
against a reflected reference and the "123456789" check value, RC4 against the
published "Key" vector and a software model, and frame bytes against queue
models. `tb_mac80211_cnb` runs the whole block at its default parameters with a
PHY, processor and memory model. It covers:

* a unicast frame with an automatic ACK, including the SIFS timing;
* a broadcast frame with a bad FCS;
* a multicast frame;
* an encrypted transmission with a generated ICV, deferred by CCA, then
  looped back, decrypted and ICV-checked;
* a transmit underrun;
* a TSF compare event;
* a receive overflow, after which the processor reads part of the frame
  through RXFIFO and flushes the rest;
* a frame written by the processor through TXFIFO and transmitted.

`tb_mac80211_workload` checks the FIFO sizing at the 802.11 limits, also at
default parameters. It receives a 2346-byte frame (the largest 802.11 frame)
by DMA and transmits a 2346-byte frame. In the transmit case, DMA and
transmission start together, so the frame streams through the 128-byte FIFO.
In both cases the memory stops answering for 3000 clocks in mid-frame. The
frames must arrive byte-exact, with no overflow or underrun. The receive FIFO
peaks at about 94 bytes, one byte per 32 clocks of stall. A 5000-clock stall
exceeds the 4096 clocks that 128 bytes cover at 11 Mbit/s, and must
overflow.

It fails if any of these mechanisms never occurs.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/mac_pkg.sv \
    tb/tb_mac80211_cnb.sv --top-module tb_mac80211_cnb -Mdir obj -o sim
./obj/sim
```

Use the same command with any other `tb/tb_<module>.sv` to test a single block.
Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. The end-to-end run takes well under a second.

`mac_pkg.sv` holds the shared constants, the register and event enumerations,
and the `ctrl_t`/`status_t` bundles between the registers and the state
machines. Change the register map there and in `ctrl_regs.sv`.
