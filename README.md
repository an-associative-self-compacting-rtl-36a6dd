# Self-compacting buffer for a DAMQ switch input port

A switch input port has to hold packets that wait for different output channels. Giving every
output channel a fixed FIFO wastes space: one busy channel blocks while the others' FIFOs sit
empty. A *dynamically allocated multi-queue* (DAMQ) shares one buffer among all output
channels and lets each channel's queue grow and shrink with its traffic. The usual way to
build a DAMQ is a set of linked lists with a free list. The self-compacting buffer (SCB) in
this repository does it differently. Every channel owns a *contiguous region* of one row
buffer. The regions are kept sorted by channel number, and the buffer moves rows up or down
on every access so that no holes ever form:

* a **write** to channel *c* inserts a row at the end of *c*'s region and pushes every row
  below it down by one;
* a **read** from channel *c* takes the first row of *c*'s region (its oldest entry) and
  pulls every row below it up by one;
* a **read and a write in the same cycle** move only the rows between the two places, so
  everything below both stays where it is.

Three invariants hold at every clock edge:

1. the region of a lower channel lies in lower rows than that of a higher channel;
2. each region is a FIFO, oldest entry first;
3. the number of entries held for channel *i* is known (it is brought out as `ch_count[i]`).

Free space is always one block at the bottom of the buffer. One access of each kind, or one
of both, completes in every clock cycle.

## Structure

```
                 rd_ch, wr_ch (binary -> thermometer code)
                           |
              +------------v-------------+     read / shift_up /      +---------------------+
              |  scb_channel_pointers    |---- write / shift_down --->|   scb_controller    |
              |  CAM: per row channel    |     lines, F, E            | (buffer/pointer     |
              |  code + F + E flags      |<--- S_down, S_up, flag ----|  controller)        |
              |  (scb_cam_cell per bit)  |     updates                +----------+----------+
              +--------------------------+                                       |
                                               S_down, S_up, row write, row read |
              +--------------------------+                                       |
  wr_data --->|  scb_data_buffer         |<--------------------------------------+
              |  ROWS x DATA_W           |---> read bus ---> register ---> rd_data, rd_valid
              |  (scb_buffer_cell / bit) |
              +--------------------------+
```

`scb` is the top. The CAM rows and the data rows move in lock step: row *k* of the CAM
describes row *k* of the data buffer.

| module | role |
|---|---|
| `scb_pkg` | default sizes, thermometer-code helpers |
| `scb_buffer_cell` | one data bit: write, read, shift up, shift down, hold |
| `scb_data_buffer` | array of buffer cells; the cells of a row share its controls; shared read bus |
| `scb_cam_cell` | one channel-code bit: loaded at reset, moves with its row, compares with the read and write keys |
| `scb_channel_pointers` | CAM rows of channel code + F + E; produces the four match lines |
| `scb_controller` | turns match lines and flags into the actual S_down/S_up, row write/read and flag updates; acceptance and `full` |
| `scb` | top: wiring, binary-to-thermometer conversion, registered read data, per-channel counts |

## How a row says where it belongs: channel code, F and E

Each CAM row holds

* the **channel code** of the channel whose region the row is in;
* **F** (first): 1 on the first row of a region;
* **E** (entry): 1 when the row holds data, 0 on the one empty row that ends every region.

Every channel always owns at least its empty end row, so an empty channel is a single row
with F=1, E=0. Writes go into that end row. After reset channel *c* has its end row at row
*c*. All remaining rows are free space. A free row carries the last channel's code with F=1,
E=0. The last channel's region therefore simply runs into the free space below it.

The channel code is a **thermometer code** with `NUM_CH-1` bits: channel *c* has *c* ones in
its low bits (for four channels: 000, 001, 011, 111). Written as `{code, F, E}`, the reset
rows of the default buffer are `02 06 0e 1e 1e 1e 1e 1e` (hex). The code makes each CAM bit
cell simple. Its stored bit is compared with one key bit, and the per-bit results are ANDed
along the row:

* equal bits keep the **read** / **write** line of the row high (an equality match);
* the **shift_up** / **shift_down** line is pulled low only when the key bit is 1 and the
  stored bit 0. With thermometer codes, "no such bit" means *row channel >= key channel*.

The four match lines the CAM reports, one bit per row, are

| line | true for a row when |
|---|---|
| read | its channel equals the read channel and F=1 (the first row of that region) |
| shift_up | its channel >= the read channel |
| write | its channel equals the write channel |
| shift_down | its channel >= the write channel, except the data rows (E=1) of the write channel |

## The controller: which rows move

From the lines the controller finds two rows:

* **read row r**: the read line ANDed with E. A read of an empty channel finds no row and
  is not taken (`rd_ok` low).
* **write row w**: the first row of the write channel with E=0, i.e. its end row.

The shift controls are numbered by the *link* between two rows. `s_down[k]` copies row k-1
into row k. `s_up[k]` copies row k into row k-1. With `below(w)` the rows below the write
row and `after(r)` the rows below the read row:

```
S_down = below(w) & ~after(r)        S_up = after(r) & ~below(w)
```

This one rule gives all the cases:

| access | rows that move | data written to | flag changes |
|---|---|---|---|
| write only | w+1 .. last move down; last row is dropped (it is free) | row w | row w E=1; row w+1 is the copy of the end row, F=0 |
| read only | r+1 .. last move up; the last row becomes a free row | – | new row r gets F=1 |
| both, w < r | w+1 .. r move down; S_up is cancelled | row w | row w+1 F=0; row r+1 (next entry of the read channel) gets F=1 |
| both, w > r | r+1 .. w move up; S_down is cancelled | row w-1 | row w-1 takes the end row's code with E=1; row w keeps E=0 and gets F=0; row r gets F=1 |

Rows below both accesses do not move in a combined access, because one row leaves and one row
arrives.

**Capacity and `full`.** Each channel keeps its end row, so the buffer holds at most
`ROWS - NUM_CH` entries (4 at the default size). `full` is set when that many rows have E=1.
A write is taken when the buffer is not full. It is also taken when the buffer is full and a
read is taken in the same cycle.

## Worked example

This four-cycle sequence on the default buffer (8 rows, 4-bit data, 4 channels) is replayed
by `tb/tb_scb.sv`. The test checks every row word and every match line below. Row words are
`{code, F, E}` in hex, and line vectors are printed with row 0 as the most significant bit.

| cycle | access | write line / shift_down | read line / shift_up | S_down (S_up) | CAM rows 0..7 after | data rows |
|---|---|---|---|---|---|---|
| reset | – | | | | 02 06 0e 1e 1e 1e 1e 1e | |
| 1 | write ch0, 0000 | 80 / ff | | 7f | 03 00 06 0e 1e 1e 1e 1e | row0 = 0000 |
| 2 | write ch1, 1010 | 20 / 3f | | 1f | 03 00 07 04 0e 1e 1e 1e | row2 = 1010 |
| 3 | write ch0, 1111 + read ch1 | c0 / 7f | 20 / 3f | 20 (S_up none) | 03 01 00 06 0e 1e 1e 1e | row1 = 1111, read 1010 |
| 4 | read ch0 | | 80 / ff | none (S_up on rows 1..7) | 03 00 06 0e 1e 1e 1e 1e | row0 = 1111, read 0000 |

Cycle 3 is the interesting one. Channel 0's end row (row 1) is written and becomes `01`.
Row 2 is overwritten from above with the new end row `00`. Channel 1's remaining row (row 3,
`04`) becomes its first row `06`. Rows 4..7 do not move.

## Interface of `scb`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (loads the CAM reset rows) |
| `wr_en`, `wr_ch`, `wr_data` | in | 1, clog2(NUM_CH), DATA_W | write request |
| `wr_ok` | out | 1 | write taken this cycle (combinational) |
| `rd_en`, `rd_ch` | in | 1, clog2(NUM_CH) | read request |
| `rd_ok` | out | 1 | read taken this cycle (the channel holds data; combinational) |
| `rd_valid`, `rd_data` | out | 1, DATA_W | data of the read taken in the previous cycle (registered) |
| `full` | out | 1 | no free row |
| `ch_count[NUM_CH]` | out | clog2(ROWS+1) each | entries held per channel |

Parameters: `NUM_CH` = 4, `ROWS` = 8, `DATA_W` = 4. These defaults are the size of the worked
example, and everything scales with them. `NUM_CH` must be below `ROWS`.
`NUM_CH`, `ROWS` and `DATA_W` are all free parameters. The CAM code width is `NUM_CH-1`, so
the match logic grows with channels × rows and the shift muxes with rows × data bits. Each
access touches every row, so the buffer suits the small row counts of switch input buffers.

Timing: the request is decoded combinationally and every row updates on the same rising
edge. A taken read shows up on `rd_data` with `rd_valid` one cycle later. Assertions in `scb`
check that channel numbers are in range and that at most one row is read and one written per
cycle.

## Where this RTL departs from the original circuit-level design

The design was first presented as CMOS circuits: precharged match lines, pass-transistor
shift paths and a two-phase clock. This RTL keeps the structure, the signals and the row
behaviour, and makes these choices of its own:

* **One clock.** A single rising edge replaces the two-phase clock, and flip-flops replace
  the dynamic cells. The match lines are AND reductions.
* **S_up polarity.** In the circuit S_up is active low. Here `s_up` is active high. The
  vectors in the worked example are the active-low values.
* **Port channel numbers are binary** and are converted to thermometer code inside `scb`.
  The original address encoding at the CAM inputs is not used.
* **Read data is registered** (one cycle latency). The original read bus is driven within the
  read cycle and latched at the clock phase boundary.
* **Flow control is this design's own.** The original design leaves flow control to the
  surrounding packet flow controller, and says nothing about rules for full or empty. The
  full rule, write refusal and empty-read refusal are this design's own.
* **A combined access with the write row below the read row** (the write goes to a higher
  channel than the read, or to the same channel) is never demonstrated in the original. Its
  row moves here follow the symmetric rule above.
* **F and E in the match lines.** The read line includes F, and the shift_down line leaves
  out the write channel's full rows. These terms were chosen so that the lines reproduce the
  example's values. The flag cells themselves are plain flip-flops.
* **Row selects come from the controller.** In the circuit the CAM's read and write lines
  drive the data rows directly. Here the controller combines them with E (and, for a
  combined access with the write below the read, moves the write up one row) and then drives
  the data buffer.
* Each row holds one word; a packet of several words takes several rows.

The router around the buffer is not part of this RTL: the routing decision that supplies the
channel number, the crossbar, and the input and output controllers. The buffer's request and
status ports are where these parts would connect.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_scb_buffer_cell` | all control combinations against a one-bit model |
| `tb_scb_cam_cell` | the four key/stored-bit cases of every line, reset load, shifts |
| `tb_scb_data_buffer` | random write/read/shift controls against an array model |
| `tb_scb_channel_pointers` | reset rows, random row moves and flag updates, match lines against integer comparisons |
| `tb_scb_controller` | the worked example's S_down/S_up; 3000 random accesses from legal states: shift vectors against the explicit row ranges of the table above, and the rows after the update against the rows rebuilt from per-channel counts |
| `tb_scb` | the worked example (rows, lines, data); 20,000 random cycles against one FIFO model per channel, with checks on acceptance, `full`, `ch_count`, read data and its one-cycle latency, and channel order of the rows; counts each access kind (write only, read only, combined with write above or below, refused write, write taken while full, empty read) and fails if one never happened |
| `tb_scb_scaled` | the same random-traffic checks at 8 channels, 24 rows and 16-bit data, with alternating write-heavy and read-heavy phases so that the buffer fills and drains |

`tb_scb` runs the top at its default parameters. To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_scb rtl/scb_pkg.sv tb/tb_scb.sv
./obj_dir/Vtb_scb
```

Replace `tb_scb` with another testbench name to run that one. Each simulation takes well
under a second.
