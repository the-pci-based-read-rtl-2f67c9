# pRORC: PCI read-out receiver card firmware

The ALICE Detector Data Link (DDL) carries detector data over an optical
fibre, at up to 100 MB/s, to the computers that collect it (Local Data
Concentrators, LDCs). At the computer end a Destination Interface Unit (DIU)
receives the link. A read-out receiver card (RORC) connects that DIU to the
computer's I/O bus. This RTL is the firmware of a PCI version of that card,
the pRORC. It is a 32-bit, 33 MHz PCI bus master with no memory of its own.
Link data goes straight into pages of host memory that the host software
hands out. Data from host memory can go the other way, out over the link.

A commercial PCI bridge chip handles the PCI protocol. The firmware talks to
that bridge over its 32-bit add-on bus. The bridge provides:

* mailboxes, which carry commands in and replies out;
* FIFOs, which carry DMA data;
* address and byte-count registers, which start PCI master transfers.

The bridge, the DIU and the host are not part of this RTL. A behavioural
model of the bridge and the host memory is in `tb/bridge_model.sv`. The
RTL covers the 32-bit, 33 MHz card only; a 64-bit, 66 MHz successor with
the PCI core inside the programmable logic is not part of it.

## Block structure

```
              add-on logic          internal control              DIU interface
 bridge   +----------------+   +------------------------+   +----------------------+
 IMB0..3 ->  mailbox_ctrl  |-->|  cmd_interpreter       |-->|  diu_tx: cmd register |--> DIU
 OMB0   <-|                |<--|  mem_manager (Free FIFO|   |  transmit FIFO        |
          |                |   |     + RFBA)            |   |  pattern_gen          |
 FIFOs  <-|  aol_arbiter   |<--|  rdma -----------------+-->|                       |
 M*AR/TC<-|  (bus manager) |<--|  wdma <----------------+---|  diu_rx: data FIFO    |<-- DIU
          +----------------+   +------------------------+   |  status FIFO, loop-back|
                                                             +----------------------+
```

| module | role |
|---|---|
| `prorc_top` | Wires the firmware together. The performance-test firmware `perf_dma` sits beside it. |
| `prorc_pkg` | Holds the bridge register numbers, the opcodes and the struct types. |
| `aol_arbiter` | The add-on bus manager. It uses fixed priority: mailbox transfers, then write DMA, then read DMA. |
| `mailbox_ctrl` | Reads a command from the mailboxes when the bridge interrupts. Writes replies to OMB0. |
| `cmd_interpreter` | Runs each command here, or forwards it over the link. |
| `mem_manager` | The Free FIFO: 128 page entries, each holding BA, BL and IDX. Also holds the Ready FIFO base register (RFBA). |
| `wdma` | The write DMA. Moves link data into host pages and closes each page in the Ready FIFO. |
| `rdma` | The read DMA. Moves a host buffer to the transmit FIFO. |
| `pattern_gen` | The test data generator. |
| `diu_tx` | The transmitter: source select, a dual-clock transmit FIFO and the command register. |
| `diu_rx` | The receiver: loop-back select, a data FIFO and a status FIFO. |
| `async_fifo` | A dual-clock FIFO with Gray-coded pointers. Used by `diu_tx` and `diu_rx`. |
| `perf_dma` | The performance-test firmware. It writes generated blocks again and again into one host buffer, with a block counter. |

## The scattered memory model (write DMA)

This is the central mechanism of the design.

The host does not give the card one big buffer. It keeps a list of free
pages, which can be anywhere in memory, and feeds them to the card one at a
time with `PUSH_FREE` commands. Each page becomes one entry in the Free FIFO.
An entry has three fields:

* **BA**: the page's base address.
* **BL**: the page's length in 32-bit words.
* **IDX**: the index of a slot in the Ready FIFO.

The Ready FIFO is an array in host memory that starts at RFBA. Each slot is
two words.

The write DMA fills the page with received data words. It closes the page in
one of two cases:

* the page is full, after BL words;
* the data block ends.

The receiver marks the end of a block with a block status word, the DTSTW. It
is a control word on the link whose low byte is `DTSTW_CODE` (0x82).

To close a page, the card writes two words to `RFBA + 8*IDX`:

| word | page full | block ended |
|---|---|---|
| 0 | number of words written (= BL) | number of words written |
| 1 | 0 | the DTSTW |

The software finds finished data by polling these slots. A long block runs
over several pages: each full page is closed with 0, and the last page is
closed with the DTSTW. A short block leaves the rest of its page unused. The
next block starts on a new page.

Edge cases:

* **Page fills exactly at the end of a block.** The page is closed with 0
  at once. The DTSTW that follows then takes a fresh page and closes it with
  a count of 0.
* **Data waiting, Free FIFO empty.** The engine stalls and flags
  `wdma_stall`. It goes on when the host gives it another page. A page is
  taken only when data is waiting, so the host can hand out pages early
  without losing them.
* **Free FIFO full.** A `PUSH_FREE` to a full Free FIFO is dropped. It sets
  the sticky overflow bit in the status word.

### Bus sequence for one page

The bridge has one set of address and byte-count registers for master writes
(MWAR, MWTC). Both the page data and the two Ready FIFO words use them, so
the engine reprograms them only after the bridge's add-on-to-PCI FIFO has
drained (`a2p_empty`):

1. Wait for the bridge FIFO to drain. Then write MWAR = BA and MWTC = 4*BL.
2. Write data words to the bridge FIFO, one per clock while `a2p_full` is low.
3. Wait for the bridge FIFO to drain. Then write MWAR = RFBA + 8*IDX and MWTC = 8.
4. Write the count word, then the status word.

Closing a page costs about 8 clocks on top of one clock per data word.

## Commands and replies

The host writes parameters into mailboxes IMB0 to IMB2, then the command
word into IMB3. The bridge interrupts when the top byte of IMB3 is written.
`mailbox_ctrl` then reads IMB0, IMB1, IMB2 and IMB3, in that order.

If IMB3 bit 31 is set, the command is for the far end of the link. IMB0 goes
into the transmitter's command register and out over the link as a control
word. Otherwise IMB3[7:0] is one of these opcodes:

| opcode | name | parameters |
|---|---|---|
| 0x01 | RESET | none. Empties the Free FIFO and stops the write DMA, read DMA and pattern generator. |
| 0x02 | PUSH_FREE | IMB0 = BA, IMB1 = BL in words (0 is ignored), IMB2 = IDX |
| 0x03 | SET_RFBA | IMB0 = Ready FIFO base address |
| 0x04 / 0x05 | WDMA_START / WDMA_STOP | none |
| 0x06 | RDMA_START | IMB0 = host address, IMB1 = length in words. Waits while a read DMA is running. |
| 0x07 | PG_START | IMB0 = seed, IMB1[31:28] = pattern, IMB1[23:0] = block length, IMB2 = number of blocks (0 = endless) |
| 0x08 | PG_STOP | none |
| 0x09 | SET_LOOPBACK | IMB0[0] |
| 0x0A | READ_STATUS | reply: the status word |
| 0x0B | READ_DDL_STATUS | reply: the oldest word in the link status FIFO, or 0 if it is empty |

The card replies only when asked. A reply goes to OMB0. Before writing OMB0,
`mailbox_ctrl` reads bit 0 of the bridge's mailbox status register, which is
set while the host has not yet read the last reply. If it is set, the block
polls again later, so an unread reply is never overwritten. Commands are
still fetched between polls, but the interpreter takes no new command until
its reply has been written.

The status word has these fields:

| bits | meaning |
|---|---|
| 0 | write DMA on |
| 1 | write DMA stalled: no free page |
| 2 | read DMA busy |
| 3 | pattern generator busy |
| 4 | loop-back on |
| 5 | Free FIFO empty |
| 6 | Free FIFO full |
| 7 | Free FIFO overflowed |
| 8 | link status word waiting |
| 9 | command register busy |
| 31:16 | number of Free FIFO entries |

## Interfaces

**Add-on bus.** Every clock, the bus manager grants at most one single-word
access. `aob_addr` selects a bridge register, numbered as in `prorc_pkg`:

* IMB0-3, OMB0-3;
* FIFO: a write pushes into the add-on-to-PCI FIFO, a read pops from the
  PCI-to-add-on FIFO;
* MWAR/MWTC and MRAR/MRTC (counts in bytes);
* MBEF, the mailbox status register.

A write takes effect at the clock edge. Read data (`aob_rdata`) is expected
in the same cycle. The bridge also supplies these flags:

* `imb_irq`: a command is waiting in the mailboxes;
* `a2p_full` and `a2p_empty`: state of the add-on-to-PCI FIFO;
* `p2a_empty`: state of the PCI-to-add-on FIFO.

The real bridge's strobes and wait states would need a thin adapter in front
of this bus.

**DIU.** The link has two streams of 33-bit words: `ctrl` plus 32 data bits.
Each uses a valid/ready handshake in the link clock `link_clk`:

* `diu_tx_*` carries data and commands to the link;
* `diu_rx_*` carries data, DTSTWs and other status words from the link.

## Clock domains and the DIU interface

`clk` is the add-on clock, 33 MHz for 32-bit/33 MHz PCI. `link_clk` is the
DIU clock. Its frequency is free: the testbench uses 50 MHz. Data crosses
between the two only through the `async_fifo` instances. Those instances
compare Gray-coded pointers after two-flop synchronisers.

The transmit FIFO takes its words from one of two sources:

* the pattern generator, while it runs;
* the read DMA, otherwise.

The command register crosses to the link clock by a toggle handshake. A
pending command is sent before any queued data.

On the receive side, data words and DTSTWs share one FIFO, so a block's end
stays in order with its data. All other control words go to a 16-entry
status FIFO. Loop-back feeds the transmitter output straight into the
receiver, for self-test. While it is on, nothing is sent to the DIU.

The pattern generator has five patterns: incrementing, decrementing, walking
(rotate left by one bit), alternating (seed, then its inverse) and constant.
Each block starts from the seed. Each block ends with a DTSTW that holds the
block length in bits 31:8. A loop-back run therefore exercises the whole
page-closing path.

## Performance-test firmware

`perf_dma` is a separate, smaller firmware for measuring DMA speed. It
contains a pattern generator and a simple DMA engine. Each block of n words
is written to the same host buffer, at base+4 through base+4n. After each
block, a block counter is incremented and written to the base address.
Software reads the counter from time to time to work out the rate.

`perf_dma` is the only master on its bus, so it drives the bridge bus
directly. It is controlled through ports (start, base, configuration, stop),
not through mailboxes. In `prorc_top` it stands beside the main firmware,
with its own `perf_*` bridge ports.

## Throughput

With no PCI stalls, both DMA engines move one 32-bit word per 33 MHz clock:
132 MB/s, the peak rate of 32-bit/33 MHz PCI. That is above the 100 MB/s of
the link's forward channel. A 100-word block in `perf_dma` takes 100 to 112
clocks, counter included. The write DMA adds about 8 clocks per closed page.
Measured PCI rates (about 125 MB/s for large blocks, less for small ones)
depend on the host and the bridge, which are outside this RTL.

Two workload testbenches measure the RTL's own rates with a 30 ns clock:

* `tb/tb_workload_dma_speed.sv` runs `perf_dma` with blocks of 10 to
  1,572,864 words (40 B to 6 MB). The rate is 74 MB/s for 40 B blocks,
  124 MB/s for 400 B and 132 to 133 MB/s from 4 KB up. Each block costs
  its words plus about 8 clocks for the address setup and the counter.
* `tb/tb_workload_400k.sv` sends two 400 KB blocks from the DIU side at
  100 MB/s into 4 KB host pages, with 5% random PCI stalls. The write DMA
  keeps up at 100 MB/s, and the DIU is never held off.

## Choices made in this RTL

The architecture and the mechanisms come from the pRORC design:

* the three firmware parts;
* mailbox commands and the guarded outgoing mailbox;
* the priority bus manager with commands first;
* the Free FIFO of 128 entries (BA, BL, IDX), RFBA and the two-word page
  closing;
* two receive FIFOs and one transmit FIFO with a command register;
* loop-back, and a pattern generator with selectable length and block count;
* the test firmware with its block counter.

The following are this design's own choices:

* **Bridge bus.** The register numbers and the single-cycle bus abstraction.
* **Host interface.** The command opcodes and their parameters, the status
  word layout, and the use of OMB0 for single-word replies.
* **Field widths.** BL is counted in words and is 24 bits wide. IDX is 7
  bits wide.
* **Link words.** The DTSTW code (0x82 in the low byte), and the split of
  control words between the data and status FIFOs.
* **Sizes.** The FIFO depths (256 for transmit and receive data, 16 for
  status).
* **Arbitration.** Write DMA has priority over read DMA.
* **Page handling.** A full page is closed at once, and pages are taken only
  when data is waiting.
* **Pattern generator.** The pattern set and the DTSTW after each block.
* **DIU interface.** The DIU signals are modelled as valid/ready streams, not
  as the DIU's real bus.
* **`perf_dma` control.** It is controlled through ports.

## Simulation

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.
`tb/tb_prorc_top.sv` runs the full design at its default sizes:

* loop-back pattern blocks into host pages, including a stall for lack of
  pages;
* status replies, including a second reply waiting for the host to read the
  first;
* a read DMA and a link command out to the DIU;
* DIU data and a status word in;
* a performance-test run.

Host memory is compared word by word with a reference model of the page
layout, and the testbench checks that each mechanism happened at least once.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/prorc_pkg.sv \
    tb/tb_prorc_top.sv --top-module tb_prorc_top -Mdir obj && ./obj/Vtb_prorc_top
```

Use the same command for any other testbench, with its name in place of
`tb_prorc_top`. Verilator has only two signal states, so every testbench
drives its reset low after time 0 to get a real reset edge. The bridge model
`tb/bridge_model.sv` has two parameters: `STALL_PCT` makes the PCI side
stall at random, and `FIFO_DEPTH` sets the size of the bridge FIFOs
(default 8).

To change sizes, override `FREE_DEPTH`, `TX_DEPTH`, `RX_DATA_DEPTH` and
`RX_STATUS_DEPTH` on `prorc_top`. The `async_fifo` depths must be powers of
two, at least 4. To change field widths (`BL_W`, `IDX_W`) or the register
map, edit `prorc_pkg`.
