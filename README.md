# ATM host interface: segmenter and reassembler for an OC-3c link

A workstation on a 155 Mbit/s ATM link has to handle a 53-byte cell every
2.73 µs in each direction. Taking an interrupt per cell would use up the
host, so this interface does all per-cell work in hardware:

- header and payload CRCs,
- cutting blocks into cells,
- sorting received cells by connection,
- keeping each connection's cells in order.

The host deals only in whole blocks. To send, it writes a source address, a
length and the header fields, then the transmit side fetches the block from
host memory and sends it as cells. To receive, the host names a connection
and a cell count, and the receive side copies those cells, in order, into
host memory.

The design is two independent units under one top module, `atm_host_if`:

- **Segmenter** (transmit): `segmenter`, `seg_dma`, `seg_ctrl`.
- **Reassembler** (receive): `reassembler`, `cell_manager`, `clc`, `cam`,
  `llm`, `dprbc`, `rsm_xfer`.

Shared pieces are `hec_crc8`, `aal_crc10`, `sync_fifo`, `spram` and the
package `atm_pkg`. Everything runs on one 50 ns (20 MHz) clock with an
asynchronous active-low reset `rst_n`.

## Cells on the link

The framer ports (`tx_*`, `rx_*`) carry one byte per clock, with a
start-of-cell flag on byte 0. The SONET framer chip itself is outside the
design. Each cell has this layout:

| bytes | contents |
|---|---|
| 0–3 | GFC = 0, VPI = 0, VCI[15:0], PT[2:0], CLP |
| 4 | HEC: CRC-8 (x⁸+x²+x+1) of bytes 0–3, XOR 0x55 |
| 5–52 | 48-byte payload |

VCI bit 15 marks a connection that carries AAL 3/4 ("AAL4") traffic. On such
a connection the payload has three parts:

- A 2-byte SAR header: segment type (COM 00, EOM 01, BOM 10, SSM 11),
  sequence number (4 bits) and MID (10 bits).
- 44 bytes of user data.
- A 2-byte trailer: length indicator (6 bits) and CRC-10
  (x¹⁰+x⁹+x⁵+x⁴+x+1) over the whole 48 bytes.

Any other VCI carries 48 plain bytes per cell. The VPI is always sent as 0
and ignored on receive. Received sequence numbers are not checked; the
design assumes the network does not reorder cells.

## Segmenter

The host writes these registers through the I/O port, then writes GO:

| index | register |
|---|---|
| 0 | SRC_ADDR (byte address, word aligned) |
| 1 | LENGTH (bytes) |
| 2 | HEADER {CLP[19], PT[18:16], VCI[15:0]} |
| 3 | MID |
| 4 | CONTROL: write bit 0 = GO; read {done, busy} |
| 5 | CELLS_SENT |

On every register access, `io_req` is held until `io_ack`, which pulses one
clock after the request is accepted.

`seg_dma` then streams the block from host memory into a 64-word data buffer.
It drops its request whenever the buffer is full. `seg_ctrl` waits until the
buffer holds one cell's worth of words, or the rest of the block. It then
sends the cell a byte per clock, computing the HEC and CRC-10 as the bytes go
out.

Segment types follow from the block length:

- A one-cell block is sent as SSM.
- A longer block is sent as BOM, then COM cells, then EOM.
- The sequence number starts at 0 for each block.
- Unused bytes of the last cell are zero.

Data words are big-endian: the first byte is in bits 31:24. With data ready
and `tx_ready` high, a cell leaves every 54 clocks (2.70 µs). When the block
is sent, `irq` rises and stays high until the next GO.

## Reassembler

### The pipeline carries tokens, not data

Received cells go through four stages that all work at the same time:

```
rx bytes ─► cell_manager ─tok─► clc ─list req─► llm ─buf cmd─► dprbc ─► reassembly buffer
                 │                                                ▲
                 └──────── 48-byte body ─► body FIFO ─────────────┘
```

Only small control tokens pass between the stages, through queues a few
entries deep. The cell body is written once into a byte FIFO and stays there
until the last stage either stores it or discards it.

This gives one rule that makes the pipeline work: **every cell that enters
the FIFO produces exactly one token, and the tokens stay in order.** So when
`cell_manager`, `clc` or `llm` rejects a cell, it does not remove the token.
It marks the token *drop* and passes it on. When `dprbc` gets a drop command,
it pops that cell's 48 bytes out of the FIFO, so the next body is aligned
with the next command. A cell is rejected for one of these reasons:

- a bad HEC,
- a bad CRC-10,
- a full CAM,
- no free buffer node.

If the FIFO or the token queue cannot take a whole cell, `cell_manager`
skips the cell entirely and counts it as overflow. At line rate this cannot
happen, because every stage finishes a cell in less than one cell time.

### CAM lookup: connections become list numbers

`clc` holds two 256 × 48 CAMs, modelled by `cam`:

- **VC CAM:** keyed by VCI, for non-AAL4 connections.
- **Datagram CAM:** keyed by VCI and MID, for AAL4 connections.

If a key is not found, it is written into the lowest free entry, so a new
connection or datagram needs no set-up by the host. If the CAM is full, the
cell is dropped.

The entry index becomes the *internal list reference*, a 9-bit number
{datagram bit, index}: 0–255 are virtual circuits and 256–511 are datagrams.
The host reads CAM entries to learn which list belongs to which VCI or MID.
Deleting an entry also deletes its list. A lookup takes about 3 clocks.

### Linked lists in the 32K × 16 list SRAM

`llm` keeps one singly linked list per list reference. Each node stands for
one 16-word slot of the reassembly buffer, and 12 words of each slot are
used. A busy connection can therefore take as many slots as are free, and its
cells look contiguous to the host without being so in the buffer.

The SRAM holds 16-bit words, and NULL is 0xFFFF:

| address | contents |
|---|---|
| 4·L + 0 | HEAD of list L |
| 4·L + 1 | TAIL of list L |
| 4·L + 2 | STATUS {complete[15], cell count[14:0]} |
| 0x0800 | head of the free list |
| 0x1000 + n | NEXT pointer of node n (2048 nodes) |

`llm` performs these operations, one at a time, in this priority order:

1. **append** (from `clc`): take the head of the free list, link it after
   TAIL, update STATUS and send the slot number to `dprbc`. This takes
   10 clocks.
2. **free**: put a node back on the free list.
3. **unlink** (host read): remove the node at the front of a list.
4. **delete** (host, through the CAM): splice a whole list onto the free
   list and clear its header.
5. **host read/write** of any SRAM word.

STATUS.complete is set when an EOM or SSM cell is appended and cleared when
the list empties. The host polls it to learn that a datagram has fully
arrived.

Unlinking and freeing are separate operations, so a slot is never given to
a new cell while its old data is still being read out.

**Set-up:** `llm` does not clear the SRAM after reset, so the host must first
write the following, through LLM_ADDR/LLM_DATA (the address auto-increments):

1. Every list header as HEAD = TAIL = 0xFFFF and STATUS = 0.
2. FREE_HEAD = 0.
3. NEXT[n] = n + 1, with NEXT[2047] = 0xFFFF.

The end-to-end testbench shows the exact sequence.

### One RAM behaving as two ports

The reassembly buffer is a single-port 32K × 32 RAM. `dprbc` gives even
clocks to the write side and odd clocks to the read side, so storing and
reading never block each other:

- **Write side:** reads a body from the FIFO a byte per clock and packs four
  bytes per word. A body is stored in 48 clocks (2.4 µs).
- **Read side:** streams the 12 words of a slot at up to one word per two
  clocks (1.2 µs per cell). This matches a bus that moves a word every
  100 ns.

### Reading cells into host memory

The host writes these registers, then GO:

- DEST (a byte address),
- LIST_REF,
- CELL_COUNT.

For each cell, `rsm_xfer` then does four things:

1. Asks `llm` to unlink the front node.
2. Has `dprbc` stream that slot.
3. Writes the 12 words to consecutive host addresses.
4. Frees the node.

It stops early if the list runs empty, and XFERRED reports how many cells
moved. The payload lands in host memory exactly as received: for AAL4 that
includes the SAR header and trailer of each cell, and the host strips them.

Reassembler registers:

| index | register |
|---|---|
| 0 | DEST |
| 1 | LIST_REF |
| 2 | CELL_COUNT |
| 3 | CONTROL: GO / {done, busy} |
| 4 | XFERRED |
| 5 | CAM_SEL |
| 6 | CAM_DATA: read {valid[31], key[25:0]}; write = delete |
| 7 | LLM_ADDR |
| 8 | LLM_DATA |
| 9 | {hec_errors, cells_in} |
| 10 | {overflow, crc_errors} |
| 11 | {no_buffer_drops, cam_full_drops} |
| 12 | {bodies_flushed, bodies_stored} |

## Bus ports

Each unit has a simple word-wide bus master port, which stands in for the
Micro Channel streaming master:

- A word moves in every clock where `m_req` and `m_ready` are both high.
- `m_addr` is a byte address.
- Read data is valid in the clock in which the word moves.

Arbitration and the bus's own cycle protocol belong to an adapter outside
the design. Because the segmenter only reads and the reassembler only
writes, `seg_m_we`, `seg_m_wdata` and `rsm_m_we` are constant.

## Timing summary (50 ns clock)

| operation | clocks | time | limit |
|---|---|---|---|
| cell on the link (byte port) | 53 | 2.65 µs | cell time 2.73 µs |
| segmenter cell spacing | 54 | 2.70 µs | 2.73 µs |
| CAM lookup | ~3 | 150 ns | at most 11 clocks |
| list append | 10 | 500 ns | at most 13 clocks |
| body into buffer | 48 | 2.4 µs | 2.4 µs |
| body out of buffer | 24 | 1.2 µs | 1.2 µs |

Even when the host is draining the buffer, one cell costs the list manager
about 21 clocks: append, unlink and free. That is well within a cell time.

## Where this design departs from the original hardware

- **Bus and framer interfaces:** the Micro Channel interface chip and the
  SONET framer are not modelled. Simple request/ready ports replace them.
- **Buffer slots:** they are 16 words, not 12. This is easier to address,
  but 32K words then hold 2048 cells rather than about 2700.
- **Host access to the list SRAM** is allowed at any time, not only during
  configuration.
- **Choices of this design**, not taken from the original:
  - the status word's `complete` flag,
  - the separate free step,
  - reading stopping at an empty list,
  - the statistics registers,
  - all register maps,
  - the list SRAM layout (one format for both virtual-circuit and datagram
    lists).
- **Not built:** the proposed extensions for encryption in the data path and
  for an OC-12 (622 Mbit/s) link. They are future enhancements, not part of
  the basic interface.

## Simulating

Each testbench is self-checking and ends with a `TB_RESULT checks=… failures=…` line.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl -Itb \
    rtl/atm_pkg.sv tb/atm_ref_pkg.sv tb/tb_atm_host_if.sv --top-module tb_atm_host_if
./obj_dir/Vtb_atm_host_if
```

The other block testbenches build the same way with their own top. Some
simulation support is shared:

- `tb/atm_ref_pkg.sv` builds reference cells and computes the CRCs by long
  division, independently of the RTL.
- `tb/mem_model.sv` is the host memory. It has a set-up delay, one word per
  two clocks, and ends a burst after an idle gap.

`tb_atm_host_if` runs the top at its default sizes, with the segmenter looped
back into the reassembler. It does the following:

- Initialises all 512 lists and 2048 nodes.
- Sends AAL4 datagrams (BOM/COM/EOM and SSM) and plain VC blocks, with random
  framer back-pressure.
- Corrupts one header and one AAL4 payload on the link.
- Reads lists back while new cells arrive, and checks every word.
- Deletes a datagram.
- Fills the datagram CAM until a cell is dropped.
- Fills the buffer until cells are dropped for lack of a node.

Each of these mechanisms is counted, and the test fails if one never
happens. Block testbenches check cycle counts where they matter:

- the 54-clock cell spacing,
- the 10-clock append,
- the 48- and 24-clock buffer moves,
- the bus word rate.
