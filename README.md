# SMDS customer-premises interface at STS-3c rate

SMDS (Switched Multi-megabit Data Service) carries variable-length messages of up to 9188
bytes across a metropolitan network. On the wire, each message is cut into 53-byte cells
and sent over a 155.52 Mbit/s SONET STS-3c link to the switching system (SS). This RTL is
the customer-premises (CPE) side of that link, for a LAN bridge. It does the following:

- takes a message from the bridge and segments it into cells;
- writes the cells into empty slots of a DQDB (IEEE 802.6) bus;
- maps the slots into the STS-3c payload envelope;
- on receive, finds cells in the incoming payload again;
- copies out the cells addressed to this node;
- reassembles up to 128 interleaved messages, whose cells may arrive out of order, and
  hands the whole messages back to the bridge.

A management block keeps the link honest. It watches the path overhead bytes for loss of
signal, frame or pointer, exchanges link status with the far end, obtains a message
identifier (MID) for this node and holds transmission back until the start-up rules allow it.

The design runs on one clock: the 19.44 MHz byte clock of the line, one byte per cycle.

```
            bridge                                   framer (not included)
  msg_in_* ──► segmentation ──► MAC B ──slots──► plcp_sts3c ──tx_data──►  line out
                                  ▲  (writes busy cells     │ (inserts POH, generates
                                  │   into empty slots)     │  empty slots)
                        management: MID, tx_allowed         │
                                  ▲                         │
  msg_out_* ◄── reassembly ◄── MAC A ◄── cell_delineation ◄─┴─ rx_data ◄── line in
                              (copies cells     (finds cell boundaries)
                               for this node)
```

In the **Single-CPE** configuration, which is the one built, this node is the only CPE on
the link:
- It receives on Bus A, from the SS, through MAC A.
- It is the head of Bus B: it generates Bus B's slots itself and MAC B fills them.
- The DQDB request/countdown queue is bypassed, because nobody else competes for the slots.

The **Multiple-CPE** configuration needs a second framer and PLCP for the upstream side of
Bus B, and those are not built. For it, MAC B's upstream input, the Bus B slot timing, the
Bus A repeat output and the Bus B M2 byte are brought out as ports. The queue logic and the
MID reservation on Bus B are built and can be switched on with `single_cpe = 0`.

## Cell layout

One cell is 53 bytes. Without its first byte it is a 52-byte *segment*, which the MACs
exchange with the segmentation and reassembly logic as 13 32-bit words, most significant
byte first.

| bytes | field | contents |
|---|---|---|
| 0 | ACF | BUSY bit 7, SL_TYPE bit 6, REQ bits 2:0 (802.6 layout) |
| 1–4 | NCI | `FF FF F0` then HCS |
| 5–6 | segment header | ST (2 bits), MID (10 bits), CSN (4 bits) |
| 7–50 | payload | 44 bytes |
| 51–52 | trailer | PL (6 bits: valid payload bytes), CRC-10 (10 bits) |

The ST codes are BOM `10`, COM `00`, EOM `01` and SSM `11`:
- BOM = beginning of message;
- COM = continuation;
- EOM = end of message;
- SSM = a single-segment message.

CSN is a 4-bit sequence number that starts at 0 in each message. A 250-byte message, for
example, becomes BOM, four COMs and an EOM with PL = 30.

Two checks protect each cell:

- **HCS** is CRC-8 (x⁸+x²+x+1) over the first three NCI bytes, with 0x55 added, as ITU-T
  I.432 does for ATM. The added constant matters: without it, a run of zero bytes would look
  like a valid header at every byte offset, and cell delineation could lock onto nothing.
- **CRC-10** (x¹⁰+x⁹+x⁵+x⁴+x+1) covers bytes 5–52 up to the CRC field. The receiving MAC
  runs the same CRC over all 48 bytes, including the CRC, and expects a zero remainder.

The MAC computes both; segmentation leaves those fields zero.

The destination address sits in payload bytes 4–11 of a BOM or SSM (the DA field of the
message header), as 64 bits. MAC A brings it out (`rx_da`) and accepts the cell when the
address logic answers with `ext_addr_match`. The top compares it with `my_address`.

## Reassembly (`reassembly.sv`)

This is the most involved block. Cells of different messages arrive interleaved, since
each message has its own MID. Within one message, cells may also arrive out of order.
Buffer space is allocated **cell by cell**, not one maximum-size message at a time. Three
memories work together:

- **MID table** (1024 entries): whether a message is in progress for that MID, and which
  message-table entry it owns.
- **Message table** (`N_MSG` = 128 messages × `MSG_SLOTS` = 256 positions): for each message,
  the cell-buffer address of each cell by its position in the message. Per message it also
  keeps a count of cells filed, the highest position seen, the CSN base and the EOM position.
- **Cell buffer** (`N_CELLS` = 4096 cells × 12 words): the payload and trailer of each cell.

Message entries and cell buffers come from free lists. Each free list is a counter of
entries never used, plus a FIFO of entries returned after read-out. Taking the next free
cell address is a single step, so cells can be accepted back to back.

How a cell is filed:

1. A **BOM or SSM** takes a free message entry and writes it into the MID table at
   position 0.
2. A **COM or EOM** looks up its MID. Its position comes from the 4-bit CSN, which wraps
   every 16 cells, unwrapped against the highest position seen so far:
   `pos = hi + signed4((csn − base) − hi[3:0])`. This accepts cells from 8 positions behind
   to 7 ahead of the furthest one seen. A cell outside that window, or with no message in
   progress for its MID, is dropped as an *orphan*. One example is a COM that overtook its
   own BOM.
3. The message is **complete** once its EOM is filed and the cell count equals EOM
   position + 1. Its MID entry is then freed at once, so the MID can start a new message
   while the old one is still being read out.
4. Complete messages are queued and read out in order of completion. Each cell gives PL
   bytes on `out_*` with valid/ready. At most 44 cycles are spent per cell, which is faster
   than the 53-cycle cell time on the line. Read-out returns the cell buffers and, at the
   end, the message entry to their free lists.

The following cells are dropped. Each case has its own counter:
- a cell with a failed CRC (`drop_crc`);
- a second BOM for a MID already in progress (`drop_dup`);
- a cell arriving when no message entry or cell buffer is free (`drop_full`);
- an orphan cell (`drop_orphan`).

A message that lost a cell never completes and keeps its entries. There is no reassembly
timeout.

Filing happens one cycle after the last word of a segment. The cell buffer address is
reserved when the first word arrives, so the words can be written as they come.

## The MACs (`dqdb_mac.sv` = `mac_tx.sv` + `mac_rx.sv` + `dqdb_queue.sv`)

A MAC sits *in* its bus. Every byte on `phy_indicate` leaves on `phy_request` in the same
cycle, unless the MAC replaces it.

**Transmit (`mac_tx`)**
- A segment is loaded from segmentation into a load buffer, 13 words, with a running CRC-10.
- At the ACF of a slot that is empty (BUSY = 0, queued-arbitrated), the MAC may take the
  slot. It needs a segment, permission from the distributed queue and `tx_enable` from
  management.
- When it takes the slot, it sets BUSY and moves the segment into a send register. It then
  writes the segment's 52 bytes in place of the slot's, with HCS and CRC inserted.
- Because the segment moves to a send register at once, the load buffer takes the next
  segment while this one is on the wire. That way, the very next slot can be used.

**Distributed queue (`dqdb_queue`)**
- It follows IEEE 802.6 for one priority.
- The request counter RQ counts REQ bits seen on the other bus. It counts down once for each
  empty slot that passes.
- When a segment is queued, RQ moves into the countdown counter CD. CD counts the empty
  slots that must pass before this node may take one.
- A REQ is then sent on the other bus, by the other MAC, in the next slot whose REQ bit is
  clear.
- With `single_cpe` the queue is bypassed.

**Receive (`mac_rx`)**
- It copies each slot and computes CRC-10 bytewise. It decides one cycle after the last byte.
- It accepts a busy QA slot if:
  - the cell is a BOM or SSM and the address matches, or
  - the cell is a COM or EOM and its MID is in progress.
- It keeps a 1024 × 2-bit MID table: *in progress* and *CRC error seen*.
- An accepted segment goes out on `mac_indicate_*` as 13 words, with its CRC result
  (`mac_indicate_crc_ok`).
- Exceptions to the host:
  - code 1: a BOM for a MID already in progress;
  - code 2: an EOM closing a message in which some cell failed its CRC.
- The MAC does not check cell order; reassembly handles that.

## Finding cells (`plcp_sts3c.sv`, `cell_delineation.sv`)

### Frame layout

An STS-3c frame is 9 rows × 270 bytes (125 µs).
- The first 9 columns are transport overhead. The framer handles them.
- The rest is the payload envelope (SPE): 9 rows of 261 bytes. Each row starts with one
  path overhead (POH) byte, followed by 260 payload bytes.
- The nine POH bytes are, row by row, J1 B3 C2 G1 M1 H4 M2 Z4 Z5.

### Framer handshake

The framer passes SPE bytes and marks J1:
- receive: `rx_data`, `rx_spe`, `rx_j1`;
- transmit: `tx_req`, `tx_j1` ask for one byte, and `tx_data` answers in the same cycle.

### plcp_sts3c

- **Receive:** the PLCP counts columns from J1. It sends POH bytes to management and
  payload bytes to cell delineation.
- **Transmit:** it puts management's POH bytes in the POH column. The payload bytes become
  one continuous stream of 53-byte slots. Slots cross row and frame boundaries, since cells
  float in the payload.
- **Slot generator:** acting as head of Bus B, the PLCP also supplies the content of an empty
  slot (`slot_idle`): ACF 0, NCI `FFFFF0` with its HCS, and zero payload. In Single-CPE mode
  this is what MAC B sees upstream. The valid header in empty slots gives the far end's
  delineation a position to lock onto even on an idle link.

### Cell delineation

Cells are found by their headers alone. The H4 offset pointer is not used. A 5-byte window
slides over the payload bytes:

| state | behaviour |
|---|---|
| HUNT | tries every byte position |
| PRESYNC | entered on the first correct header; checks the header 53 bytes later, each time; 6 consecutive correct headers reach SYNC, one bad header goes back to HUNT |
| SYNC | cells go to MAC A, 4 bytes delayed; 7 consecutive bad headers go back to HUNT |

Outside SYNC, a search timer runs. After 1 ms (`T_SEARCH` = 19,440 cycles) it reports
`search_timeout`, which forces the link status down.

## Management (`management.sv`, `mid_page_alloc.sv`)

### Error indicators

| indicator | condition | default |
|---|---|---|
| LOS | all-zero line bytes | 100 µs = 1,944 cycles |
| LOF | no A1 A1 A1 (`F6 F6 F6`) frame start | 3 ms = 58,320 cycles |
| LOP | no J1 in 8 consecutive frames | declared when the ninth frame starts |

LOS looks at the line bytes as this block receives them. A framer that descrambles must
therefore hand over the bytes in which an all-zero line shows as zeros.

### Alarms

LAIS and PAIS come in from the framer. FRF (far-end receive failure) is sent in G1 bit 3
while the receive side is in error, and read from the incoming G1.

### Link status

The link status is carried in H4 bits 5:0, with these codes:
- down `000000`;
- up `111000`;
- connected `111111`.

The state machine works as follows:
- Any receive error, loss of cell sync or search timeout sets **rx_link_down**.
- Otherwise the state goes to **rx_link_up**.
- It goes on to **connected** once the far end's code is not down.

The node sends its own state in H4.

### Bus identification

M1 must carry the Bus A code (0x01) for `busid_ok`. The node sends the Bus B code (0x02).

### Start-up wait

Busy cells may be sent only when all of these hold:
- 7 s (`T_STARTUP` = 136,080,000 cycles) have passed without LOS or LOF;
- there is no receive error;
- the far end reports up or connected.

This is `tx_allowed`. The top gates MAC B with `tx_allowed && mid_valid`.

### MID page allocation (`mid_page_alloc`)

The SS announces one MID value per frame in M2, counting 1..1023. Values 1..511 belong to
the SS and 512..1023 are free for CPEs. M2 is laid out as follows:
- bit 7: the value is reserved (marked);
- bit 6: cycle start, set with value 1;
- bits 1:0: the value's two LSBs.

The node keeps a 10-bit counter. The cycle-start bit puts the counter in step, and the
LSBs then confirm each step; two LSBs alone could never align a counter.

- **Single-CPE:** the node takes the first unmarked value ≥ 512 from the Bus A stream.
- **Multiple-CPE:** the node marks its value in the M2 bytes it passes on Bus B. It keeps
  the value while the value keeps coming round unmarked from upstream. It reports
  `mid_lost` if another node has marked the value first.

## Timing and throughput

- All blocks use one clock and an asynchronous active-low reset. Block handshakes are
  valid/ready. The bus path through the MACs and the PLCP transmit byte is combinational
  within a cycle.
- **Segmentation** ping-pongs between a 44-byte fill buffer and a 52-byte output buffer.
  Fed one byte per cycle, it produces a segment every 45 cycles.
- A slot needs at least 53 cycles, more where overhead bytes interrupt it. The STS-3c
  payload thus carries about 44 cells per frame.
- The end-to-end test checks that the 209 cells of a 9188-byte message go out in
  consecutive slots.
- Reassembly read-out needs at most 44 cycles per cell; a 9188-byte message takes 9396
  cycles.

## Choices made where the description is open

These are design decisions, not taken from the description of the interface:
- the ACF and ST bit codes, the NCI value and the HCS coset (IEEE 802.6 / ITU-T I.432
  practice);
- PL as a 6-bit field;
- the HCS in the fourth NCI byte;
- the content of empty slots;
- the CSN reordering window (−8..+7 positions);
- the reassembly memory sizes: 256 positions per message and a 4096-cell buffer;
- the free-list structure;
- the drop rules;
- the MAC exception codes;
- the delineation state names and the 4-byte forwarding delay;
- the link status codes and state transitions;
- the G1 FRF bit;
- the M2 bit layout, including the cycle-start bit;
- the M1 bus codes;
- the handshakes of every port.

In the described MAC, the SAR hands a cell over only once access has been granted. Here
the segment is loaded ahead of time and written when the slot is taken, because a 13-word
transfer would not fit between two slots.

The description places the link status in the last 6 bits of H4, and H4 normally also
carries the cell offset pointer. The pointer is not used here, so H4[5:0] is link status
only.

## Not included

- The SONET framer, the optics and byte-clock recovery. The byte clock and the framer's
  SPE handshake are inputs.
- The DS3 PLCP (12 cells per frame with a nibble trailer).
- The second PLCP/framer that Multiple-CPE operation needs for Bus B.
- Network reconfiguration after a failure in Multiple-CPE mode.
- The bridge's protocol converter.
- The alternative FIFO-based reassembly scheme.

## Files

| file | contents |
|---|---|
| `rtl/smds_pkg.sv` | sizes, field types, codes, `hcs8` and `crc10_upd` functions |
| `rtl/segmentation.sv` | message → segments |
| `rtl/reassembly.sv` | segments → messages, MID/message tables, cell buffer |
| `rtl/mac_tx.sv`, `rtl/mac_rx.sv`, `rtl/dqdb_queue.sv`, `rtl/dqdb_mac.sv` | DQDB MAC |
| `rtl/cell_delineation.sv`, `rtl/plcp_sts3c.sv` | STS-3c PLCP |
| `rtl/mid_page_alloc.sv`, `rtl/management.sv` | POH management |
| `rtl/smds_interface.sv` | top, Single-CPE wiring |
| `tb/tb_<block>.sv` | self-checking test per block |
| `tb/tb_smds_interface.sv` | end to end, with the start-up wait shortened to 20,000 cycles |
| `tb/tb_smds_full.sv` | the same test at full size, with every parameter at its default |

The end-to-end tests play framer and switching system. They loop the CPE's transmitted
payload back into the next received frame, and supply the SS's POH: Bus A code, connected
status, and M2 counting 1..1023. They send six messages (30, 250, 9188, 44, 45 and 500
bytes) addressed to the node itself, and corrupt one byte of the second busy cell. The
tests check the following:
- cell sync is reached;
- the link becomes connected;
- the start-up wait holds cells back;
- the MID is 512;
- all 231 cells are sent;
- the long message uses consecutive slots;
- the five intact messages return byte for byte;
- the corrupted BOM is dropped on its CRC, its five following cells are dropped as orphans,
  and MAC A reports a code-2 exception;
- during a line outage of zero bytes, LOS is raised, the link goes down and transmission
  stops; after the outage the link returns to connected.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself with a
watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl --top-module tb_smds_interface \
    rtl/smds_pkg.sv tb/tb_smds_interface.sv -o sim
./obj_dir/sim
```

Replace the name for any other testbench. `tb_smds_interface` runs 2.5 M cycles in a few
seconds. `tb_smds_full` simulates the whole 7 s start-up wait, about 137 M cycles, in
about 3 minutes.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_MSG` | 128 | messages reassembled at once |
| `MSG_SLOTS` | 256 | positions per message (a 9188-byte message needs 209) |
| `N_CELLS` | 4096 | cell buffer, in cells |
| `T_SEARCH` | 19,440 | 1 ms cell search limit |
| `T_LOS` | 1,944 | 100 µs zero run for LOS |
| `T_LOF` | 58,320 | 3 ms without frame start for LOF |
| `T_STARTUP` | 136,080,000 | 7 s start-up wait |

All times are in byte-clock cycles at 19.44 MHz.

The reassembly memories total about 2 Mbit at these sizes. With 4096 cells, 19
maximum-length messages fit at once. 128 interleaved messages of maximum length would need
26,752 cells.
