# Bridge-on-a-chip: an ATM to IEEE 802.11 wireless LAN bridge

An ATM network moves data as 53-byte cells on virtual circuits; an 802.11
wireless LAN moves variable-length frames. A bridge between them has to turn
cells into packets and back (segmentation and reassembly, AAL5 or AAL3/4), frame them
for the radio, and decide where each packet goes. This design puts that
bridge on one chip around a single idea: **every packet is stored once, in
one shared data memory, and only pointers move.** Hardware engines do the
work that happens per cell or per byte (reassembly, segmentation, CRCs,
DMA). Two ARM cores, which are outside this RTL, do the work that happens
once per packet:

* the **inter-networking core (IW)** runs the bridge relay and management;
* the **WLAN core** runs the 802.11 MAC protocol.

Each core has its own system bus and its own program memory, so neither
slows the other. They meet in the common data memory, through a small
mailbox, and through their interrupts.

```
            UTOPIA Rx                                         UTOPIA Tx
               |                                                  ^
           rx_fifo -> reassembly_processor   segmentation_processor -> tx_fifo
                              |  (RP)              (SP)  |
                              |     atm_cfg_regs <-------+---- IW bus
                              v                          v
                     +---------------- cmic -----------------+---> external
                     |  4-way round robin: SP, RP, IW, WLAN  |     data memory
                     +-------^-------------------------^-----+
                             |                         |
  IW core --> asb_decoder ---+      wlan_cfg_regs      +--- asb_decoder <-- asb_arbiter <-- WLAN core
                 | program memory  (mailbox+doorbell)  program memory |            ^
                 | int_ctrl, timer32                  int_ctrl, 2x timer32        |
                                                      pai (registers) ---- pai DMA master
                                                       |
                                                  wireless PHY
```

## The life of a packet

**ATM to wireless.**
1. Cells arrive over UTOPIA and wait in `rx_fifo`.
2. The RP takes each cell and looks up its VPI/VCI in the connection table.
3. The RP writes the 48-byte payload into a data buffer, keeping the AAL5 CRC-32 running.
4. On the last cell of the packet (PTI bit 0), the RP checks the CRC and the length, writes an Rx descriptor, and interrupts the IW core.
5. The IW core reads the descriptor. It mails the buffer address and length to the WLAN core (`wlan_cfg_regs`) and rings that core's doorbell.
6. The WLAN core writes the 24-byte 802.11 header in the space left free in front of the payload.
7. The WLAN core gives the PAI the frame's address and length.
8. The PAI fetches the frame by DMA and sends it to the radio with the FCS appended.
9. When the frame has gone, the WLAN core rings back, and the IW core returns the buffer to the free buffer queue.

**Wireless to ATM.**
1. The PAI receives a frame into its FIFO, checking the FCS as the bytes arrive.
2. It queues the frame's length, FCS verdict and header type, and interrupts the WLAN core.
3. The WLAN core chooses a buffer and starts the receive DMA.
4. If the FCS was good, the WLAN core mails the body's address and length to the IW core.
5. The IW core writes a Tx buffer descriptor and links it into the segmentation queue of the chosen VC.
6. The IW core makes sure the transmit schedule names that VC.
7. At the VC's schedule slots the SP reads the payload, adds the AAL5 trailer and the cell header with HEC, and writes each cell into `tx_fifo` for UTOPIA.

The end-to-end testbench plays both cores' firmware exactly like this; it
is the best worked example of how software drives the chip
(`tb/tb_bridge_on_a_chip.sv`).

## Data structures in common memory

These formats are the contract between the hardware engines and the
software, and they are where most of the design's subtlety lies. All
addresses are byte addresses. Words are 32 bits and big-endian: the first
byte of a buffer is bits 31:24 of its first word. Addresses stored in
tables may carry the bus region code 0x1 in bits 31:28 or not, because the
memory controller ignores the upper bits.

**Rx connection table (RCT).** It starts at `RCT_BASE`. The entry for a
cell is at `RCT_BASE + 16 * VCI[RCT_BITS-1:0]`, and has four words:

| word | contents | owner |
|---|---|---|
| w0 | `{valid, aal34, 6'b0, VPI[7:0], VCI[15:0]}` | software |
| w1 | current buffer address, 0 when none | RP |
| w2 | `{overflow, sn_err, crc10_err, 9'b0, next SN[3:0], bytes so far}` | RP |
| w3 | running CRC | RP |

A cell is accepted only when w0 is valid and names exactly the cell's VPI
and VCI. Otherwise it is dropped and counted as unknown. OAM and RM cells
(PTI bit 2 set) are dropped and counted the same way. Software must clear
w1 to w3 when it opens a connection.

**Free buffer queue (FBQ).** A ring of `FBQ_SIZE` buffer addresses at
`FBQ_BASE`:
* software adds buffers and advances `FBQ_PROD`;
* the RP takes one at the first cell of each packet, and advances its own `FBQ_CONS`;
* when the ring is empty, the packet is dropped and counted under "no buffer".

Every buffer holds `BUF_BYTES`. Payload beyond that is not written, and
the packet's descriptor gets the overflow flag.

**Rx descriptor ring (RXD).** `RXD_SIZE` entries of 16 bytes at `RXD_BASE`:

| word | contents |
|---|---|
| d0 | buffer address |
| d1 | `{crc_err, len_err, overflow, sn_err, 12'b0, length}` |
| d2 | `{8'b0, VPI, VCI}` |
| d3 | bytes written, including pad and trailer |

Ring ownership:
* the RP advances `RXD_PROD` and pulses the "packet reassembled" interrupt;
* software advances `RXD_CONS`;
* when the ring is full, the RP drops the packet but keeps its buffer for the next packet on that connection.

**Transmit schedule table (TST).** `TST_LEN` words at `TST_BASE`, each
`{valid, 15'b0, VC number}`. A slot timer ticks every `SLOT_CYCLES`
clocks. At each tick the SP serves the next entry in turn, wrapping at the
end. The number of entries that name a VC sets that VC's share of the
constant cell rate. An invalid entry leaves its slot idle.

**Segmentation queue descriptor (SQD)** at `SQD_BASE + 16 * VC`:

| word | contents |
|---|---|
| q0 | cell header template `{GFC, VPI, VCI, PTI, CLP}` |
| q1 | address of the TBD at the head of the queue, 0 when the queue is empty |
| q2 | bytes already sent from that packet |
| q3 | running CRC (AAL5), or the next sequence number (AAL3/4) |

**Tx buffer descriptor (TBD)**, three words:

| word | contents |
|---|---|
| t0 | buffer address (word aligned) |
| t1 | `{done, aal34, 4'b0, MID[9:0], length}` |
| t2 | next TBD, 0 when none |

When the last cell of a packet has gone, the SP sets `done` in t1. It then
moves q1 to t2 and resets q2 to 0. The SP ignores q3 whenever q2 is 0, so
a new packet always starts with a fresh CRC and sequence number 0.

Software's side of the queues:
* to queue packets, software links TBDs through t2;
* it starts an empty queue by writing q1, with q2 = q3 = 0;
* it must not touch an SQD while the SP is working on it.

## Reassembly processor (RP)

A state machine that handles one cell at a time:
1. It pops the 53 bytes from the Rx FIFO.
2. It reads the 4-word connection entry and checks the connection.
3. On a packet's first cell, it takes a buffer from the FBQ.
4. It writes the 12 payload words to the buffer, updating the CRC-32 word by word.
5. On the last cell, it checks the CRC residue (0xC704DD7B) and the trailer length, then writes the descriptor.
6. It writes entry words w1 to w3 back.

**AAL3/4 connections** (w0 bit 30 set) are handled differently:
* every cell is a SAR-PDU: a 2-byte header `{ST[1:0], SN[3:0], MID[9:0]}`, 44 bytes of data, and a 2-byte trailer `{LI[5:0], CRC-10}`;
* a message starts at a BOM or SSM segment, and ends at an EOM or SSM;
* the CRC-10 of every cell is computed while it is popped, and must leave a zero remainder;
* the sequence number must go up by one (mod 16) from one cell to the next;
* a segment that arrives with no message open is dropped and counted as unknown;
* the RP stores the whole 48-byte SAR-PDUs, and software strips the SAR fields and the CPCS header and trailer;
* in the descriptor, `crc_err` means a CRC-10 error in any cell, `sn_err` means a sequence gap, and the length is the number of bytes stored;
* only one message at a time per connection is reassembled, so messages interleaved by MID are not supported.

The RP does not check the HEC; the PHY is expected to have done so. Each
memory word costs one memory controller transfer, so an uncontended cell
takes about 53 + 3 × (4 + 12 + 3) clocks.

## Segmentation processor (SP)

For each served slot, the SP works through these steps:
1. It reads the TST entry, the SQD and the TBD.
2. It fetches up to 12 payload words, padding with zeros past the end of the packet.
3. It builds the header from the SQD template, setting PTI bit 0 on the packet's last cell, and adds the HEC.
4. It writes the 53 bytes into the Tx FIFO, one per clock.
5. It writes its progress back to the SQD.

A packet's last cell is the one that leaves room for the 8-byte AAL5
trailer: the rest of the packet is at most 40 bytes. In that cell, words
10 and 11 hold the trailer:
* UU = 0 and CPI = 0;
* the length;
* the complemented CRC, computed over everything before it.

A TBD with t1 bit 30 set is sent as **AAL3/4**. The buffer must then hold
the whole CPCS-PDU, which software builds. The SP cuts it into 44-byte
pieces and frames each one as a SAR-PDU:
* the segment type is BOM, COM or EOM, or SSM for a one-cell packet;
* the sequence number starts at 0 for each packet and is kept in q3;
* the MID comes from t1;
* LI is 44, or the bytes left in the last cell;
* the CRC-10 is computed as the bytes go into the FIFO.

PTI bit 0 stays clear on AAL3/4 cells.

The SP starts a cell only when the Tx FIFO has room for all of it. A tick
that arrives while the SP is busy is held, one deep, so a short slot lowers
the rate to what the SP can sustain instead of losing cells.

## Four CRCs

| use | polynomial | bit order | check |
|---|---|---|---|
| AAL5 CPCS trailer | 0x04C11DB7, init all ones, complemented | MSB first | residue 0xC704DD7B |
| 802.11 FCS (PAI) | same polynomial, reflected | LSB first; FCS sent low byte first | residue 0xDEBB20E3 |
| AAL3/4 SAR-PDU | x^10 + x^9 + x^5 + x^4 + x + 1 (0x233), init 0 | MSB first | remainder 0 over the 48 bytes |
| ATM HEC | x^8 + x^2 + x + 1 | MSB first | result XOR 0x55 |

`rtl/boc_pkg.sv` computes all four bit by bit. `tb/tb_pkg.sv` holds
independent table-driven models, checked against the standard check values
at the start of every test.

## Common memory interface controller (CMIC)

The CMIC is the only way into the external data memory. It has four
request ports: SP, RP, IW bus and WLAN bus, in that order.

* **Arbitration.** A round-robin arbiter grants one port per access. Its search starts after the port served last.
* **Memory cycle.** The controller drives an asynchronous SRAM: 20 address bits, 32 data bits, and chip-enable, output-enable and write-enable. The memory cycle lasts `WAIT+1` clocks and is followed by one idle clock, so every access costs `WAIT+2` = 3 clocks.
* **Contention.** The output `mem_contention` pulses whenever a grant is made while another port waits.
* **Data bus.** At the pins the data bus is split into `mem_wdata` and `mem_rdata`; a pad ring would merge them into one bidirectional bus.

## The two system buses

Both buses use one simplified bus protocol, defined in `boc_pkg`:
* A request `{req, we, addr, wdata}` is held until the slave answers with a one-cycle `ready`. Read data comes with the `ready`.
* Register slaves answer one clock after they take a request, so a transfer takes two clocks.
* Bits 31:28 of the address select the slave. An unmapped address is answered by the decoder itself: it reads zero and raises a decode-error interrupt.

| region | IW bus | WLAN bus |
|---|---|---|
| 0x0 | program memory | program memory |
| 0x1 | common memory (CMIC) | common memory (CMIC) |
| 0x2 | ATM config registers | — |
| 0x3 | WLAN config registers | WLAN config registers |
| 0x4 | interrupt controller | interrupt controller |
| 0x5 | timer | timer 0 |
| 0x6 | — | timer 1 |
| 0x7 | — | PAI registers |

**Masters.** The WLAN bus has two masters, the WLAN core and the PAI DMA.
`asb_arbiter` alternates between them and holds a grant until the transfer
completes. Its `wlan_bus_conflict` output pulses when both masters want the
bus.

**Program memories.** Each program memory is 16 bits wide. `prog_mem_ctrl`
splits a 32-bit access into two halfword accesses, high halfword first,
each taking `WAIT+1` clocks.

**Interrupt sources** (`int_ctrl`). Status bits are sticky and cleared by
writing 1. There is an enable mask, and `irq` is a registered output.

| bit | IW controller | WLAN controller |
|---|---|---|
| 0 | packet reassembled | frame received |
| 1 | packet segmented | frame sent |
| 2 | doorbell from the WLAN side | receive DMA done |
| 3 | timer | doorbell from the IW side |
| 4 | UTOPIA parity error | timer 0 |
| 5 | UTOPIA short cell | timer 1 |
| 6 | bus decode error | bus decode error |

**Mailbox** (`wlan_cfg_regs`). The mailbox is reachable from both buses.
Each side writes four message registers: the IW side at 0x00 to 0x0C, the
WLAN side at 0x20 to 0x2C. Each side has doorbell bits. A write to 0x40
sets bits on the other side; a read of 0x40 returns this side's pending
bits; a write to 0x44 clears them. A side's interrupt stays high while it
has a pending bit.

Register maps of every block are at the top of each `rtl/` file.

## Wireless physical attachment interface (PAI)

**Transmit.**
* Software writes `TX_ADDR` and `TX_LEN` and sets CTRL bit 0.
* The DMA engine fetches the frame word by word into a 64-byte FIFO.
* Transmission starts when the FIFO is full or holds the whole frame. The PHY then takes one byte per `tx_rdy` while `tx_en` is high, and the four FCS bytes follow.
* If the DMA falls behind the PHY, `tx_underrun` is set.

**Receive.**
* Bytes arrive on `rx_valid` into a 4096-byte FIFO, and the FCS is checked as they come.
* At `rx_end` the frame's length, FCS verdict and header type go into a 4-entry status queue, and `irq_rx` fires. The header type is the frame's first byte, the 802.11 frame control byte (protocol version, type and subtype).
* `RX_STATUS` reads as `{pending, fcs_ok, 6'b0, frame control byte, length including FCS}`.
* A frame that does not fit in the FIFO or the status queue is dropped and counted.
* Software reads `RX_STATUS`, writes `RX_ADDR` and sets CTRL bit 1. The frame, FCS included, is then copied into memory, and `irq_dma` fires.

**TSF timer.** A 64-bit microsecond timer. It counts one step every
`US_DIV` clocks and can be read and loaded.

## UTOPIA

Both directions use the UTOPIA level-1 octet handshake with one clav per
direction:
* an octet moves on a clock edge where `clav` is high and `enb_n` is low;
* `soc` marks octet 0 of a cell;
* parity is odd over the 8 data bits.

`rx_fifo` commits a cell to its 4-cell store only when all 53 octets
arrived with good parity. It drops a cell with a parity error, or one cut
short by an early `soc`, and pulses an interrupt for each. While the store
is full it holds `enb_n` high. `tx_fifo` offers a cell only when the whole
cell is inside, so a cell never stalls halfway for lack of data.

## Clock, sizes and pins

The whole chip runs on one clock, `clk`, with an active-low asynchronous
reset, `rst_n`. The top module's parameters and their defaults:

| parameter | default | meaning |
|---|---|---|
| `RX_CELLS` | 4 | Rx FIFO depth, in cells |
| `TX_CELLS` | 4 | Tx FIFO depth, in cells |
| `RCT_BITS` | 10 | 1024 connection table entries |
| `MEM_AW` | 20 | 1M-word data memory |
| `PM_AW` | 16 | 64K-halfword program memories |
| `RXF_BYTES` | 4096 | PAI receive FIFO |
| `TXF_BYTES` | 64 | PAI transmit FIFO |
| `US_DIV` | 20 | clocks per microsecond for the TSF |

Counting each bidirectional data bus once, the external interfaces total
171 signals:

| interface | signals |
|---|---|
| UTOPIA | 13 + 13 |
| data memory | 55 |
| two program memories | 35 + 35 |
| wireless PHY | 20 |

Add clock and reset, and the chip needs about 175 pins before test and
power pins.

## What is not here, and where it departs from the architecture

* **Not built:**
  * The ARM cores and their software. The top module exposes each core's bus master port and interrupt line instead.
  * A reset controller.
* **Departures:**
  * *AAL3/4.* Only the SAR sublayer is in hardware. The CPCS header and trailer are software's job, and MID interleaving on receive is not supported.
  * *Scheduling.* Only constant-bit-rate scheduling is built. The VBR and ABR rate controllers are missing.
  * *Radio PHY control.* The PAI does not program the radio PHY's baseband registers, because no such register interface is defined here.
  * *Bus protocol.* It is much simpler than AMBA ASB: no bursts, no split transfers, and no bus bridge between the ASB and a peripheral bus.
  * *ATM configuration registers.* One block, `atm_cfg_regs`, shared by the RP and the SP, rather than registers inside each processor.
  * *Frame assembly.* The 802.11 header is placed in front of the payload in the same buffer. This lets the PAI fetch a frame in one DMA run instead of gathering a separate header area.
* **This design's own choices:** all table and descriptor formats, register maps, the address map and the interrupt assignment above.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each one
prints `TB_RESULT checks=N failures=M`, and has a watchdog that stops a
hung run. `tb/tb_bridge_on_a_chip.sv` runs the whole chip at its default
parameters:
* both cores' firmware;
* an ATM PHY model with random back-pressure;
* a wireless PHY model;
* SRAM models of the three memories.

It relays two packets from ATM to WLAN, and two frames from WLAN to ATM
(one over AAL5, one over AAL3/4). It also receives an AAL3/4 message, and
injects these faults:
* a cell on an unopened VC;
* a corrupted AAL5 packet;
* a parity error;
* a short cell;
* a frame with a bad FCS;
* bus accesses to unmapped addresses.

It counts every mechanism (memory contention, bus conflicts, UTOPIA and
PHY back-pressure, each interrupt, the timers and the program memories)
and fails if one never occurred.

With Verilator 5, compile the packages first:

```
verilator --binary --timing -Wno-fatal --top-module tb_bridge_on_a_chip \
  rtl/boc_pkg.sv tb/tb_pkg.sv \
  rtl/rx_fifo.sv rtl/tx_fifo.sv rtl/reassembly_processor.sv rtl/segmentation_processor.sv \
  rtl/atm_cfg_regs.sv rtl/wlan_cfg_regs.sv rtl/cmic.sv rtl/prog_mem_ctrl.sv \
  rtl/asb_decoder.sv rtl/asb_arbiter.sv rtl/int_ctrl.sv rtl/timer32.sv rtl/pai.sv \
  rtl/bridge_on_a_chip.sv tb/tb_sram.sv tb/tb_bridge_on_a_chip.sv
./obj_dir/Vtb_bridge_on_a_chip
```

A block testbench needs only `rtl/boc_pkg.sv` and `tb/tb_pkg.sv`, the
block's module, and the bus or memory model it uses (`tb/tb_bus_mem.sv`
or `tb/tb_sram.sv`). Every test finishes in well under a minute.
