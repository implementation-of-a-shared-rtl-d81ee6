# Shared-buffer ATM switch with a scalable pipelined buffer memory

A shared-buffer switch keeps every queued cell of every port in one memory.
That needs the least memory for a given cell loss. The catch is speed. An
N x N switch must write N cells and read N cells in every cell time, so the
memory has to run 2N times faster than a port. This design removes that limit
in two ways:

* **The buffer is a pipelined memory.** It is an M x M array of small SRAM
  banks, connected systolically with one register stage per bank. It accepts
  a read or a write of one 65-bit word in every clock, with no dead cycle
  between reads and writes. Data come back a fixed M+3 clocks later. Adding
  banks makes the buffer larger without slowing it down.
* **Address control is separate from the memory.** The output queues are
  linked lists kept inside the buffer itself. Each stored cell carries the
  address of the next cell of its queue, sent one bit per word. Only a few
  registers per port and a small free-address FIFO sit outside the memory.

The RTL is configured as the 4 x 4 prototype. It has four byte-wide ports,
so one 64-byte cell per port arrives every 64 clocks (640 Mbit/s per port at
80 MHz). The buffer holds 128 cells in a 4 x 4 array of 64-word x 65-bit
banks. Each output queue is capped at 64 cells.

## Data flow and the 64-clock cell time

```
 din[4][8] --> icrb --64b--> addr_ctrl --65b req--> pipelined_buffer
                                ^                        |  (M+3 clocks)
                                +--------65b data--------+
                                |
                             --64b--> ocrb --> dout[4][8]
```

A cell is 64 bytes: an 11-byte routing tag followed by the 53-byte ATM cell.
Inside the switch it travels as eight 64-bit words. Byte `b` of a cell is
bits `[8*(b%8) +: 8]` of word `b/8`. Bit 0 of byte 0 is the cell indication:
1 means a real cell and 0 an idle cell. The output port is a 2-bit field at
bit `8 + 2*PAL` of word 0. `PAL` is an external 3-bit input, so the same chip
can route on a different tag field at each stage of a multistage network.

Each cell time of 64 clocks is split by the address controller's 6-bit
master counter `MC`:

| MC        | mode (MD)   | what happens                                                  |
|-----------|-------------|---------------------------------------------------------------|
| 0 .. 31   | write (MD=1)| slot `MC[4:3]` = input port, `MC[2:0]` = word: store the cell the input rotation buffer collected in the previous cell time |
| 32 .. 63  | read (MD=0) | slot `MC[4:3]` = output port: read the head cell of that port's queue |

The rotation buffers have two pages each, and the pages swap every cell
time. `icrb` collects the bytes of the current cells in one page while the
other page feeds `addr_ctrl` during the write half. `ocrb` fills one page
from the read half. When the returned `MD` rises again it swaps pages and
pulses `OCS`. It then sends the page out one byte per port per clock. A port
whose queue was empty gets an all-zero idle cell.

Fixed timing, all clocks at the default sizes:

* A read or write reaches the buffer 2 clocks after its word leaves `icrb`.
* A read returns from the buffer M+3 = 7 clocks after it was issued.
* `ocs_o` follows `ics_i` by 12 clocks: M+3 plus five pipeline registers.
* A cell that finds its queue empty leaves the switch starting 2 cell times
  plus 12 clocks after its first byte arrived.

## Output queues as linked lists (addr_ctrl, idle_addr_queue)

Each output port `p` has two registers:

* `WAR[p]`, the tail. It always points at a free cell that is already
  reserved for the next cell to `p`.
* `RAR[p]`, the head. It points at the next cell to send.

The free addresses live in `idle_addr_queue`. This is a circular FIFO of
128 x 8 bits with head pointer IAQHR and tail pointer IAQTR. After reset,
addresses 0..3 are the four reserved tails (WAR = RAR = p) and the FIFO holds
4..127.

**Write slot.** When word 0 of an input cell arrives, the controller reads
the cell indication and the destination `d`. It accepts the cell if queue `d`
holds fewer than `MAXQ` cells and a free address exists. Then:

* The eight words go to `{WAR[d], word}`.
* The free address `n` at the FIFO head is popped.
* `n` travels MSB first in bit 64 of the eight words, so the cell stored at
  the old tail now points at `n`.
* The same bits are shifted into `WAR[d]` one per clock, so after the slot
  `WAR[d] = n`.

If the cell is refused, `drop_o` pulses and the slot leaves `ME` low.

**Read slot.** For output port `p` with a non-empty queue:

* The eight words at `{RAR[p], word}` are read.
* The old `RAR[p]` goes straight back to the free FIFO.
* The buffer returns each word with the port address `PA` that travelled
  with the request.
* Bit 64 of the returned words is shifted into `RAR[PA]`. After eight words,
  `RAR` holds the next cell's address.

The next read of that port is a full cell time later, so the serial update
always finishes in time.

A queue is empty when its length counter is zero. `RAR` and `WAR` are then
equal: both point at the reserved tail cell.

**Sharing with maximum queue length (SMXQ).** The per-port counters cap a
queue at `MAXQ = floor(B / sqrt(N)) = 128/2 = 64` cells. One congested port
cannot then take the whole buffer. Because four tails are always reserved,
at most 124 cells are queued at once.

## The pipelined buffer (pipelined_buffer)

```
 request --> primary --> col 0 --> col 1 --> col 2 --> col 3 --> (ME,MD,R/W,PA out)
             decoder       |         |         |         |
               |           v         v         v         v
             row 0 ----> bank00 -- bank01 -- bank02 -- bank03 --> out buf
               |           |   \     |   \     |   \     |
             row 1 ----> bank10 -- bank11 -- bank12 -- bank13 --> out buf
               :           :         :         :         :
             row 3 ----> bank30 -- bank31 -- bank32 -- bank33 --> out buf
                           |         |         |         |
                        out buf   out buf   out buf   out buf  --> OR --> data_o
```

Buffer address: `ADDR[10:0] = {cell address, word}`. The bank is chosen by
`x = ADDR[4:3]` (bank row) and `y = ADDR[6:5]` (bank column). The word inside
the bank is `RA = {ADDR[10:7], ADDR[2:0]}`.

**Primary decoder.** It computes `Temp = x - y`:

* `x >= y`: `RBA = x - y`, `CBA = 0`, `PD = x`.
* `x < y`: `RBA = 0`, `CBA = y - x`, `PD = y`.

**Column decoders.** The column decoder whose CBA reaches zero raises the
column trigger CBT. It sends the request down its column. The others pass
`CBA - 1` and `PD - 1` on to the right.

**Row decoders.** The row decoder whose RBA reaches zero raises the row
trigger RBT. It sends RBT along its row, together with the word lines it
decoded from RA.

**Banks.** Inside the array:

* The request moves down its column until it meets the row carrying RBT.
* From that bank it moves diagonally, to row+1 and column+1, carrying both
  triggers.
* Every hop, vertical or diagonal, decrements PD.
* The bank that holds both triggers with PD = 0 is the addressed bank, at
  (x, y). It writes the word, or reads it and sends the data on instead of
  the request's data.
* The request keeps moving diagonally until it leaves the array at the
  bottom row or the right column. An output buffer there drives the shared
  data bus for one clock.

Two examples for the 4 x 4 array:

| target (x,y) | CBA RBA PD | path                                                        |
|--------------|------------|-------------------------------------------------------------|
| (3,1)        | 0   2   3  | col 0 -> bank(0,0) -> (1,0) -> (2,0) -> diag (3,1) access -> bottom buffer 1 |
| (1,3)        | 2   0   3  | col 0 -> col 1 -> col 2 -> bank(0,2) -> diag (1,3) access -> right buffer 1 |

Every request makes exactly M hops inside the array, counting column
decoders and banks. The latency is therefore the same for every address:
1 (primary) + 1 (first column decoder) + M + 1 (output buffer) = M + 3.
Consequences:

* Requests never collide.
* Reads and writes can alternate freely.
* Only the M banks of one diagonal path are busy per request.

The registers that carry data and word lines are loaded only while their
trigger is high. This is the register-enable form of the per-bank clock
gating that saves power in inactive banks.

## Modules

| module            | role |
|-------------------|------|
| `atm_pkg`         | shared constants: cell size, word width, address fields, idle word |
| `atm_switch`      | top: the four blocks below wired together |
| `icrb`            | input cell rotation buffer, 2 pages x 4 ports x 64 bytes |
| `addr_ctrl`       | master counter, WAR/RAR, SMXQ admission, serial next-address handling |
| `idle_addr_queue` | free cell address FIFO (128 x 8) |
| `pipelined_buffer`| M x M bank array with decoders and output buffers |
| `primary_decoder`, `column_decoder`, `row_decoder`, `memory_bank`, `output_buffer` | its stages |
| `ocrb`            | output cell rotation buffer, idle cell insertion, OCS |

Top-level ports of `atm_switch`:

* `clk`, `rst`: synchronous reset, active high.
* `ics_i`: high with byte 0 of the incoming cells.
* `din_i[4][8]`: the input ports.
* `pal_i[2:0]`: which routing-tag field holds the output port.
* `ocs_o`: high with byte 0 of the outgoing cells.
* `dout_o[4][8]`: the output ports.
* `drop_o`: a cell was refused.
* `qlen_o[4]`: queue lengths.

`ics_i` should come every 64 clocks. If it stops, the switch keeps running
on its own 64-clock frame.

## Parameters and how far they scale

* `atm_switch`: `N = 4` ports, `M = 4` (bank array M x M), `MAXQ = 64`.
* `pipelined_buffer`: `M`, `AW = 11`, `DW = 65`, `WORDS = 64` words per bank.

The pipelined buffer is tested at M = 4 and M = 8. M must be a power of two,
because each bank coordinate is a plain `log2 M`-bit address field.

The switch itself is exercised only at N = 4. Two limits apply:

* Write and read slots, 2 x N x 8, must fit into the 64-clock cell time of
  byte-wide ports.
* The next-cell address is sent one bit per word, so cell addresses are
  8 bits and the buffer holds at most 256 cells.

Larger switches (8 x 8 with 200 cells, 16 x 16 with 288 cells in 5 x 5 and
6 x 6 arrays) would need wider ports or words and non-power-of-two bank
addressing. They are not built.

## Own choices and departures

These points are this design's, not taken from a source description:

* Each latch pair (negative-level input latch, positive-level output latch)
  is one rising-edge register.
* The memory banks are behavioural arrays. The 6T cells, the extra
  propagation word line and the sense amplifiers are not modelled.
* Clock gating is expressed as register load enables.
* The exact path through the array is reconstructed from the stated
  M+3 latency and the "one diagonal path" description: down the column,
  turn at the row trigger, then diagonal. So is the way word lines travel
  with the request along the diagonal.
* These conventions are assumed:
  * which address bits are the bank row and the bank column;
  * the byte order inside a word;
  * the cell indication bit;
  * the position of the routing fields;
  * the all-zero idle cell;
  * MD = 1 for write;
  * the write half coming first.
* Reset, the start state of the free list, and what happens to a refused
  cell are not specified by the source. They are chosen as described above.
* `drop_o` and `qlen_o` are extra observation outputs.
* Translating the ATM header into the routing tag happens before the switch
  and is not part of this RTL.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
prints `TB_RESULT checks=N failures=M`. Among them:

* `tb_pipelined_buffer` runs 4 x 4 and 8 x 8 arrays with random back-to-back
  reads and writes against a reference memory. It checks the exact M+3
  latency, and that two writes followed by two reads return their data 7
  clocks after each read.
* `tb_addr_ctrl` runs the controller with a behavioural memory
  (`buf_model`). It drives the SMXQ limit, the buffer-full case and idle
  slots.
* `tb_atm_switch` is the end-to-end test at the default sizes. It sends
  tagged cells through all four ports and compares every output byte with a
  reference queue model. It also checks the ICS-to-OCS delay, and that each
  mechanism happened at least once: mode switch, write followed directly by
  read, SMXQ drop, buffer-full drop, idle cell.
* `tb_traffic` runs the loss experiments for 20000 cell times each:
  * uniform random traffic at load 0.9 and 1.0;
  * bursty on/off traffic, mean burst 8, at load 0.95.

  Every byte is checked. Typical result: no loss at 0.9, about 0.6 % at
  1.0, about 2 % for the bursty case. These short runs cannot reach the
  1e-9 region.

To simulate with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_atm_switch.sv --top-module tb_atm_switch
./obj_dir/Vtb_atm_switch
```

Replace the testbench name for any other test. All testbenches finish in
seconds.
