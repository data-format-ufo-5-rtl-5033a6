# UFO 5 camera readout formatter

A CMOS image sensor with 16 parallel outputs delivers, on every pixel clock,
one pixel from each output. The readout FPGA wraps this stream into
fixed-size 256-bit packets so that a DDR3 frame buffer and a DMA engine can
move whole packets without looking inside them. A host can still find every
pixel by reading the packet headers. Version 5 of the format widens the
per-packet header so that 10, 11 and 12-bit pixels all fit into the same
256-bit packet. It also adds the ADC resolution and output mode to the frame
header, so that on-line processing (for example background subtraction) can
interpret a frame without asking the camera.

This RTL implements the formatter. It contains the control/status register
bank, a frame trigger generator, the frame sequencer that produces the packet
stream, and the frame-buffer occupancy counter that raises BUSY.

## The packet stream

Every packet is 256 bits, i.e. eight 32-bit words. Word 1 is in bits
[255:224], so a packet read as a big-endian bit string starts with word 1.
Each triggered frame is sent as:

```
frame header                          1 packet
row r0:   pixel packets 0 .. 127      128 packets
          row-tail control word       1 packet
row r0+1: ...
...                                   number_of_lines rows
frame tail                            1 packet
```

A full sensor frame is 1088 rows, so it is 2 + 1088 × 129 = 140,354 packets.
`pkt_kind` labels each packet on the output (`PKT_FRAME_HEADER`, `PKT_PIXELS`,
`PKT_ROW_TAIL`, `PKT_FRAME_TAIL`).

### Frame header (eight words, all tagged `5` in the top nibble)

| word | contents |
|---|---|
| 1–5 | `0x51111111`, `0x52222222`, `0x53333333`, `0x54444444`, `0x55555555` |
| 6 | `{4'h5, CMOSIS_start_addr[9:0], skip_lines[6:0], number_of_lines[10:0]}` |
| 7 | `{4'h5, 4'h5, frame_number[23:0]}` |
| 8 | `{4'h5, ADC_Resolution[1:0], Output_mode[1:0], FR_timestep[23:0]}` |

ADC_Resolution: 0 = 10 bit, 1 = 11 bit, 2 = 12 bit. Output_mode: 0 = 16
outputs, 1 = 8, 2 = 4, 3 = 2. In a default frame, word 6 is `0x50000440` (1088
lines) and word 7 of the first frame is `0x55000000`.

### Pixel packet

```
[255:224] {8'h80, pixel_size[3:0], 1'b0, row_number[10:0], 1'b0, pixel_number[6:0]}
          zero gap
[16N-1:0] pixel of output 0, output 1, ..., output 15   (N bits each, output 0 highest)
```

`pixel_size` is the pixel width itself: `0xA`, `0xB` or `0xC`. The gap
shrinks as the pixels grow:

| mode | pixel bits | gap |
|---|---|---|
| 10 bit | 160 | 64 (two zero words) |
| 11 bit | 176 | 48 |
| 12 bit | 192 | 32 (one zero word) |

Packet `pixel_number` = p holds pixel p of each output, for p = 0 … 127.
So one row is 16 × 128 = 2048 pixels. For example, `0x80C00172` is the header of
12-bit row 1, pixel number 114. In 10-bit mode the packet

```
80a00000 00000000 00000000 595794d9 d96c5257 6d5655e5 97059571 f5a96b59
```

is row 0, pixel 0. Its outputs 0..15 carry `0x165, 0x179, 0x136, 0x1d9, …, 0x359`.

### Row-tail control word

This packet follows the last pixel packet of every row. Its header uses the
pixel header layout with tag `0xC0` and the row just finished. The
pixel-number field is 127 after the first row of a frame and 0 after all
other rows: `0xC0C0007F` after row 0 and `0xC0C00100` after row 1 (12 bit).
Then come a zero word and a fixed 192-bit body,
`5055055005505505 0550550555055055 5505505550550550`.

### Frame tail

| word | contents |
|---|---|
| 1 | `0x0AAAAAAA` |
| 2 | status1 = `{1'b1, 1'b0, FSM_Master_Ctrl[3:0], CMOSIS_IN status[25:0]}` |
| 3 | status2 = `{3'b0, end_of_all_FR, error_status[3:0], rd_count_fifo_255_64[9:0], full_255_64, empty_255_64, 2'b0, wr_count_fifo_to_DDR[7:0], full_to_DDR, empty_to_DDR}` |
| 4 | status3 = `{2'b0, BUSY, error_desc_1[16:0], 1'b0, FSM_RD_DDR3[2:0], 1'b0, FSM_WR_DDR3[2:0], 1'b0, FSM_ARBITER_DDR3[2:0]}` |
| 5 | `{6'b0, app_addr_rd[25:0]}` (DDR3 read address) |
| 6 | `{6'b0, app_addr_wr[25:0]}` (DDR3 write address) |
| 7 | `0x00000000` |
| 8 | `0x01111111` |

Some widths here were chosen to fit the known example words, because the field lists do
not give them. These are FSM_Master_Ctrl, error_status, the two FIFO counts,
error_desc_1 and the three DDR3 state codes. With these widths, status words such as
`0x840DFFFF`, `0x0F001001`, `0x28000111` and `0x3FFFF111` decode sensibly.
`ufo5_pkg` defines the three words as packed structs, plus functions that pack
them. Change a width there and every user follows.

## How a frame is produced (`frame_sequencer`)

The sequencer is a five-state machine: IDLE → HEADER → PIXELS ⇄ ROW_TAIL →
TAIL → IDLE. On a trigger in IDLE:

* `frame_header_gen` stores the frame's settings: start address, skipped lines,
  line count, resolution, output mode and FR time step. Register writes during a
  frame therefore do not affect it. The same block keeps the frame counter,
  which counts up after each tail.
* The row counter loads the first row (register 0x9130), and a rows-left
  counter loads the number of lines.

In PIXELS the sensor beat passes straight through `pixel_packet_packer` to the
output in the same cycle. `pix_ready` equals `pkt_ready`, so a pixel beat is
consumed exactly when its packet is. After pixel number 127 the sequencer
sends the row tail. After the last row's tail it sends the frame tail.

`frame_tail_gen` takes its status snapshot on the clock edge that hands over
the last packet before the tail. This keeps the tail unchanged however long
the sink stalls.

A trigger that arrives while a frame is in progress is ignored and counted in
`triggers_ignored`. With zero lines, a frame is a header followed by a tail.

**Timing.** Both streams use valid/ready handshakes: a transfer happens on a
rising edge where both signals are high. A source must hold valid and data
until the transfer. An assertion checks this on the output. If the source and
sink never wait, a frame of L rows leaves in exactly 2 + L·129 cycles, one
packet per clock. There is no buffering: a stalled sink stalls the sensor
stream.

## Triggering and BUSY

`trigger_gen` issues NUMBER_OF_TRIGGERS (0x9170) one-cycle pulses after
`trig_start`. The first comes two cycles after start. After that they are
TRIGGER_PERIOD (0x9180) clocks apart, but never closer than 0x280 clocks:
smaller values are raised to 0x280. `trig_stop` ends a sequence early. The
trigger pulse starts a frame and is also brought out (`trigger`) for the
sensor.

At 0x280 cycles per trigger and one packet per cycle, a full 1088-row frame
(140,354 cycles) is far longer than the trigger period. Most triggers of a
fast sequence are then ignored. Short readouts (few rows) or a longer period
avoid this.

`frame_occupancy` counts frames that have left the formatter (`frame_done`)
minus frames the DMA engine reports as sent (`dma_frame_sent`). It saturates
at 0. BUSY is high while the count is ≥ the threshold in 0x91A0 (reset value 100).
The count is readable at 0x91B0. BUSY replaces the busy bit of status3 in both
the register bank and the frame tail. Nothing inside the formatter acts on
BUSY; the part that throttles the sensor is outside this design.

## Register bank (`reg_bank`)

The registers are 32 bits, at byte addresses on a 16-byte grid from 0x9000.
Most registers appear at +0 and again at +8 of their slot; +4 and +C read as
zero. The exceptions:

* 0x9050 holds status1/2/3 at +0/+4/+8.
* 0x9070 holds the DDR start, end and read pointers at +0/+4/+8.
* 0x9100 and 0x91A0 appear at +0 only.

Writes to read-only or unlisted addresses are ignored. Writes accepted at the
+8 mirror behave like writes at +0. Reads return data the cycle after
`rd_en`, flagged by `rvalid`.

| addr | access | contents (reset value) |
|---|---|---|
| 9000 | RW | CMOSIS configuration (0000C800) |
| 9010 | RO | sensor write-back feedback (input `spi_feedback`) |
| 9020 | RW | SPI speed grade (4) |
| 9030 | RW | `{Output_mode[17:16], ADC_Resolution[13:12], bit_mode[8], firmware version[7:0], read-only = 5}` |
| 9040 | RW | control (201); bits are used outside this design |
| 9050 | RO | status1, status2, status3 |
| 9070 | RO | DDR start, end, read address |
| 90A0 | RW | CMOSIS_PARAM_1: skip lines [9:0], lines [20:10], start address [31:21] |
| 90B0 | RW | CMOSIS_PARAM_2: fast-reject threshold line [10:0] |
| 90C0 | RW | SKIPE_LINES (interleaving threshold) |
| 9100 | RW | RAWDATA_PKT_ADDR (1000) |
| 9110 | RO | `{temp alarms[31:29], FPGA temperature[28:19], sensor temperature[18:0]}` |
| 9120 | RW | number of rows per frame (440 = 1088) |
| 9130 | RW | first row number |
| 9140 | RW | EXP_TIME_EXT (25) |
| 9150 | RW | `{4'h0, ADC gain[27:20], motor X[19:15], Y[14:10], Z[9:5], phi[4:0]}` (02800000) |
| 9170 | RW | NUMBER_OF_TRIGGERS (80) |
| 9180 | RW | TRIGGER_PERIOD (280) |
| 9190 | RW | temperature sample period (07735940) |
| 91A0 | RW | BUSY threshold, frames in DDR (64) |
| 91B0 | RO | frames in DDR not yet sent |

The reset values are those of a camera in its usual configuration. The
formatter reads these registers:

* Header word 6: start address from 0x90A0 [30:21] and skip lines from 0x90A0 [6:0].
* Line count from 0x9120 and first row from 0x9130.
* Mode fields from 0x9030.
* Trigger count and period from 0x9170/0x9180.
* BUSY threshold from 0x91A0.

All settings leave the top on the `cfg` struct for the parts that are not built
here.

## Outside this design

The following parts only exist as ports:

* The sensor itself, its SPI configuration engine, and the two FIFOs between
  the formatter and DDR3 (their counts and flags go into status2).
* The DDR3 controller and its read/write/arbiter state machines (status3, tail
  words 5–6, register 0x9070).
* The master control state machine (status1).
* Fast reject (FR_timestep in header word 8).
* The temperature monitor (0x9110).
* The DMA engine (`dma_frame_sent`).

Their values are passed unchanged into the status words and registers.
`trig_start`/`trig_stop` stand in for the control register 0x9040, whose bit
assignment is not defined here.

## Where the description was thin

These points are this design's own reading and are the first to check against
real data:

* **Pixel order inside a packet.** This design puts output 0 in the highest
  bits. The 10-bit example above decodes to plausible pixel values this way.
* **11-bit mode.** Its packet layout is extrapolated from the 10- and 12-bit
  layouts.
* **Row-tail pixel-number field.** The 127-versus-0 quirk copies the example
  words literally.
* **Row-tail body.** Its middle 64-bit word (`0x0550550555055055`) is the
  least certain constant in the design. The body is the same in all modes. The constant `ROW_TAIL_BODY` in `ufo5_pkg` holds it.
* **Frame layout.** Packet order within a frame, frame counting from 0, and
  ignoring triggers during a frame are this design's choices.
* **Row count.** Rows are numbered from the first-row register, and a full
  frame is 1088 rows (0 … 1087).
* **Output modes.** Output modes other than 16 outputs only change header word
  8; packets always carry 16 pixels.
* **Trigger period.** It is counted in clock cycles.

## Files

| file | contents |
|---|---|
| `rtl/ufo5_pkg.sv` | constants, enums, status and settings structs, packing functions |
| `rtl/ufo5_top.sv` | top level: register bank, trigger generator, sequencer, occupancy |
| `rtl/frame_sequencer.sv` | frame state machine and stream handshakes |
| `rtl/frame_header_gen.sv` | per-frame settings, frame counter, header packet |
| `rtl/frame_tail_gen.sv` | status snapshot, tail packet |
| `rtl/pixel_packet_packer.sv` | pixel packets and row-tail word |
| `rtl/reg_bank.sv` | register map |
| `rtl/trigger_gen.sv` | trigger sequence |
| `rtl/frame_occupancy.sv` | frames-in-DDR count and BUSY |
| `tb/ufo5_ref_pkg.sv` | reference model of all packet formats, synthetic pixel pattern |
| `tb/tb_*.sv` | one self-checking testbench per module |

Parameters of the top: `PKTS_PER_ROW` (128, the pixel packets per row) and
`MIN_PERIOD` (0x280). The row count, resolution and everything else are
run-time register settings.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
counts a failure if a run hangs. The testbenches compare the RTL with
`ufo5_ref_pkg`, which rebuilds every packet by shifting field values to their
bit offsets. The format's own example words (header, tail, 10-bit packet,
12-bit headers, row tails and the full register dump) are checked literally.
`tb_ufo5_top` runs at the default parameters:

* One full 1088-row 10-bit frame, which must take exactly 140,354 cycles.
* A switch to 12-bit short frames with random source gaps and sink
  back-pressure, triggers faster than frames (some ignored), and the 0x280
  period clamp.
* BUSY rising at the threshold and clearing as DMA reports frames sent.

It takes well under a second. To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ufo5_pkg.sv tb/ufo5_ref_pkg.sv tb/tb_ufo5_top.sv --top-module tb_ufo5_top
./obj_dir/Vtb_ufo5_top
```

Replace `tb_ufo5_top` with any other `tb_<module>` to test one block. All
state is reset (asynchronous, active-low `rst_n`), so the results do not
depend on the simulator's initial values.
