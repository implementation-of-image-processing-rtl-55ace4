# Pipelined 3x3 median filter for 8-bit gray-level images

This design removes impulse ("salt-and-pepper") noise from monochrome images. It was meant for
microscope images of blood smears. Every pixel is replaced by the median of its 3x3
neighbourhood, and the image border is padded with zeros. The hardware sits between two
byte-wide asynchronous memories. It reads a raw image from the first memory and writes the
filtered image, in the same format, to the second. The design targets a small FPGA (a FLEX10K
class device with 2,048-bit RAM blocks) and the 32K x 8, 70 ns battery-backed SRAMs that
such a board carries.

The core idea is a median network that never sorts nine values at once. The 3x3 mask is fed
as a stream of three-pixel columns ("sets"), one per clock. Each set is sorted once into
low/middle/high, and each set is then reused by three windows in a row. This gives a median
per clock from a ten-stage pipeline of about 20 compare-exchange nodes.

## The three stages

```
 source memory ──► fetch_block ──sets──► median_block ──medians──► write_block ──► result memory
   (image in)      header, rows,        median_fsm +             picks the image's      (image out)
                   line buffers,        median_core              results, FIFO,
                   zero padding                                  7-cycle writes
```

All three stages run at the same time. The fetch stage reads row r+2 while the write stage is
still writing row r-1.

| module | role |
|---|---|
| `median_filter_top` | connects the three stages; memory pins, `led_done`, `led_err`, reset switch `rst_n` |
| `fetch_block` | reads the header and the rows; three line buffers; streams zero-padded sets |
| `median_block` | `median_fsm` (controller) + `median_core` (pipeline) |
| `write_block` | selects valid medians; `pixel_fifo`; writes header and pixels |
| `ext_ram_read`, `ext_ram_write` | seven-cycle byte read / write of an asynchronous memory |
| `int_ram` | 256 x 8 synchronous RAM (one on-chip RAM block), two-cycle read |
| `pixel_fifo` | result buffer (512 x 8) |
| `median_pkg` | pixel type, controller states, pipeline depth constants |

## The median network (`median_core`)

The three input lanes P1, P2 and P3 carry one set. Every node compares two values and sends
the lower one left and the higher one right. There is one register stage per "arrange" step:

| stage | what it does |
|---|---|
| arrange1-3 | sorts the set: compare lanes 2/3, then 1/2, then 2/3. The result is L <= M <= H. |
| arrange4 | holds the previous sorted set (L', M', H') |
| arrange5 | max(L, L'); min and max of (M, M'); min(H, H') |
| arrange6 | brings in the *next* sorted set straight from arrange3. This gives the max of three lows, max(min(M,M'), M''), and the min of three highs. |
| arrange7 | min(max(min(M,M'),M''), max(M,M')) = median of the three middles |
| arrange8-10 | median of (max of lows, median of middles, min of highs) by the same three compares |

The median of nine equals the median of those three values. The arrange6 trick (taking the
third set from arrange3 instead of from a second delay stage) is what keeps three
consecutive sets aligned.

**Latency.** Count the enabled edges from the one that takes the oldest set of a window. The
window's median is in the output register after the 10th of them, which is the 8th after the
window's newest set. The pipeline advances only on enabled cycles. With the enable low,
every stage holds its value.

## Controller and handshake (`median_fsm`, `median_block`)

The controller is a three-state Moore machine:

| state | en = shift_out | new_row_out | next state on (shift_in, new_row_in) |
|---|---|---|---|
| IDLE | 0 | 0 | (0,0) IDLE · (1,0) CLOCK_ENABLE · (1,1) INITIATE |
| CLOCK_ENABLE | 1 | 0 | (1,0) CLOCK_ENABLE · (0,0) IDLE |
| INITIATE | 1 | 1 | (1,0) CLOCK_ENABLE · (0,0) IDLE |

Any other input pair is an error and returns the controller to IDLE. The pipeline enable `en`
goes to the core. `shift_out` and `new_row_out` go to the write stage.

Timing of a set: the fetch stage raises `shift_in` (and `new_row_in` for the first set of a
row) in cycle t. The set's pixels are on `p_in` in cycle t+1, in which `en` is high. The core
takes them at the end of cycle t+1. The one-cycle offset matches the two-cycle read latency
of the line buffers. Two consequences for any other producer:

* A row must begin from IDLE. Within a row, `shift_in` stays high for every set. A
  `new_row_in` while the controller is enabled is an error, so at least one idle cycle must
  separate two rows.
* The pipeline only moves when it is fed. Results still inside it at the end of an image are
  pushed out by eight zero sets (`FLUSH_SETS`).

## Fetch stage (`fetch_block`)

**Image format** (the same for input and output):

| address | content |
|---|---|
| 0, 1 | height H, low byte first |
| 2, 3 | width W, low byte first |
| 4 ... | pixels, row by row, `4 + r*W + c` |

**Operation.**

1. Read the four header bytes and check them. The stage raises `err` (LED) and stops if
   W = 0, W > `MAX_W` (256), H = 0, or 4 + H*W exceeds the address space.
2. Load rows 0 and 1 into two of three `int_ram` line buffers. Each byte takes one
   seven-cycle read.
3. For each output row r, wait until the write stage reports room (`wr_room`). Then stream
   W+2 sets in consecutive cycles: a padding column, columns 0..W-1, and a second padding
   column. Lane 0 is row r-1, lane 1 is row r, lane 2 is row r+1. Rows -1 and H, and both
   padding columns, are forced to zero at the line-buffer output.
4. Load row r+2 into the buffer that held row r-1, then stream the next row. The buffers are
   used in rotation.
5. After the last row, wait for room once more, send eight zero sets, and raise `done`.

## Write stage (`write_block`)

Not every pipeline output belongs to the image. Windows that span the end of one row and the
start of the next, and the flush outputs, must be dropped. The stage keeps a 10-deep shift
register, shifted with `shift_in` and fed with `new_row_in`. The enabled edge on which a
marker leaves it is the one after which the median of column 0 of that row is in the output
register. The next W-1 enabled edges give columns 1..W-1. Because rows overlap in the
pipeline, the last eight results of a row come out while the next row is being streamed.

Kept results enter a 512-entry FIFO in the cycle after their edge. They come one per clock
within a row, while each memory write takes seven cycles. `wr_room` is high while the FIFO can
take W + 10 more results. That is enough for one whole row or for the flush, so the FIFO
cannot overflow (an assertion checks this). The writer first stores the header, then the
pixels from address 4, and raises `done` when the last write has finished. `led_done` is the
AND of both stages' `done`.

## External memory protocols (`ext_ram_read`, `ext_ram_write`)

Both protocols are designed for a clock of up to 50 MHz (20 ns per cycle). The reference
board's 25.175 MHz clock gives more margin.

| cycle | read | write |
|---|---|---|
| 1 | address out | address out |
| 2 | CE and OE low | CE and WE low |
| 3 | wait | wait |
| 4 | wait | data driven |
| 5 | wait | wait |
| 6 | data latched at the end of the cycle | WE and CE high (the write occurs) |
| 7 | CE and OE high; `done` | data pins released; `done` |

A new request is accepted in cycle 7, so back-to-back accesses take seven cycles each. At
50 MHz a read spends 120 ns from address to latch, for a 70 ns part. A write gives an 80 ns
WE pulse, 40 ns of data set-up and 20 ns of hold. The bidirectional result-memory data pins
appear as `dst_dq_out` plus the tri-state enable `dst_dq_oe`. The pad buffer belongs outside
this RTL. `dst_oe_n` is held high because the result memory is only written.

## Parameters, sizes and performance

| parameter | default | meaning |
|---|---|---|
| `ADDR_W` | 15 | memory address width (32K x 8 parts) |
| `MAX_W` | 256 | longest row = depth of each line buffer (one 2,048-bit RAM block) |
| `FIFO_DEPTH` | 512 | result buffer entries (two RAM blocks); must be at least W + 10 for the widest image processed, else the fetch stage waits forever |
| `PIX_W` (package) | 8 | pixel width |

Any image with 1 <= W <= 256, H >= 1 and 4 + H*W <= 32,768 bytes can be processed. The
largest full-width image is 127 x 256. About 181 x 181 is the largest square. Reads and
writes overlap, so an image takes roughly 8 cycles per pixel. The 127 x 256 image takes
263,882 cycles: 5.3 ms at 50 MHz, or 10.5 ms at 25.175 MHz. The memory protocol sets this
rate. The median pipeline itself could take one set per clock.

On-chip memory: three 256 x 8 line buffers plus the 512 x 8 FIFO, i.e. five 2,048-bit blocks.

## What follows the published design and what is this design's own

These parts follow the published design: the three-stage split, the median network with its
arrange stages, the three-state controller, the seven-cycle memory protocols, the image
storage format, zero padding of the border, and the two-cycle internal RAM read.

These are choices of this design:

* The published description of the fetch and write stages gives only what they must do.
  Everything inside them is this design's: three rotating line buffers, loading and
  streaming rows one after the other, the flush, the result-selection shift register, the
  FIFO and the `wr_room` handshake.
* One drawing of the controller lists `new_row_out = 0` in INITIATE, but its timing diagrams
  show `new_row_out` high for the cycle after `new_row_in`. This design follows the timing
  diagrams. Otherwise the signal would carry nothing.
* The published latency is "9 clock cycles", and it also says a valid result appears "after
  10 clock cycles of 3 data input sets". The network as drawn matches the second wording: 10
  enabled edges from a window's oldest set.
* The 256-pixel row limit, the 512-entry FIFO, the little-endian header and the meaning of
  the two LEDs are assumptions. So are asynchronous active-low resets and chip enable moving
  together with OE/WE.
* The result image is written with a header, in the source format, starting at address 0.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. The reference values come from sorting nine values, not from
the compare network. The memories are modelled by `tb/nvram_model.sv`, a behavioural 70 ns
SRAM. It returns random bytes when the data is sampled too early, and it counts set-up,
pulse-width, address-stability and bus-contention violations.

| testbench | what it establishes |
|---|---|
| `median_core_tb` | 3,000 random windows, exact 10-edge latency, hold with enable low, worked example (10 30 5 / 20 200 20 / 15 10 30 → 20) |
| `median_fsm_tb` | the single and batch waveforms; 5,000 random cycles against the transition table, errors included |
| `median_block_tb` | whole zero-padded images through controller and core, including 1xN and Nx1 |
| `int_ram_tb` | two-cycle read latency, read of a word written in the same cycle |
| `ext_ram_read_tb`, `ext_ram_write_tb` | pin levels in each of the seven cycles, data, no timing violation |
| `fetch_block_tb` | exact set sequence with padding and flush, room handshake, idle cycle between rows, rejected headers |
| `write_block_tb` | result selection from pipeline timing alone, FIFO back-pressure, header and pixels in memory |
| `median_filter_top_tb` | end to end on several images with a 32-entry FIFO. It counts row starts, enabled and idle pipeline cycles, waits for room, padding, flush, overlapping read/write and the error LED, and requires each to occur. |
| `median_filter_full_tb` | unmodified top, 127 x 256 noisy image; every pixel compared, noise removal checked, cycle count printed |

To run one with Verilator 5 from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/median_pkg.sv tb/median_ref_pkg.sv tb/median_filter_top_tb.sv \
    --top-module median_filter_top_tb -o sim
./obj_dir/sim
```

Replace the testbench file and top-module name to run another testbench. The full-size run
takes a few seconds.

## Not included

* The memories, the LEDs, the push button and the board oscillator are bought-in parts. The
  top brings their signals out as ports.
* The tri-state pad buffers of the result memory's data pins belong to the device I/O and
  are not included.
* The design keeps to the 3x3 mask and zero padding. Other mask sizes would need a different
  network.
