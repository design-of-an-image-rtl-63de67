# PUB: a JPEG2000 compression front end built around off-the-shelf encoder cores

A remote camera station has three parts:

- an image capture unit (ICU), which drives the camera and its pan/zoom/tilt (PZT) head;
- a wireless interface (WI) to a base station;
- between them, a Processing Unit Board (PUB), which compresses every frame to JPEG2000 before it goes over the link.

The compression itself is done by commercial JPEG2000 encoder IP cores. This RTL is the FPGA logic around those cores. It:

- takes a byte-serial image in one of five pixel formats;
- turns it into three planes, Y, U and V;
- cuts each plane into tiles of at most 256 × 256 pixels, the largest a core accepts;
- feeds six cores in parallel, one per plane and tile column;
- chooses the cores' quantisation table from the frame speed or compression ratio that was asked for;
- collects the six code streams into an external memory, which WI reads one byte at a time.

The encoder cores and the output memory are not part of this RTL. Their signals are ports of `pub_top`. The testbenches use small behavioural stand-ins for both.

```
 ICU bytes,        +-------+   +-----------------------+   +----------+   6 x buffered  6 x JPEG2000
 V-/H-Synch  ----> | input |-->| BSIPO -> CPB          |-->| tiller   |-->  tiller  --> core (external)
                   | stream|   | (RGB->YUV | interp |  |   | control  |   (Y,U,V x          |
                   | ctrl  |   |  bypass)              |   |          |   odd/even col)     v
                   +-------+   +-----------------------+   +----------+           output stream ctrl
                       ^                                                          -> external memory
  WI config,  +-------------------+    +-------------------+                        -> WI byte reads
  commands -->| master controller |--->| JP2K codec ctrl   |--> quantisation table to the cores
  status  <-- | (flow, relays)    |    +-------------------+
              +-------------------+
```

All logic runs in one clock domain with an asynchronous, active-low reset (`rst_n`). Shared types and constants are in `rtl/pub_pkg.sv`.

## Input formats and the byte stream

ICU sends a frame as follows:

- a one-cycle V-Synch pulse starts the frame;
- each line starts with a one-cycle H-Synch pulse, the first line included;
- pixel bytes follow, with `icu_byte_valid`.

Every format is turned into one internal 24-bit word per pixel:

| colour type / style | bytes on the wire                              | 24-bit word (`bsipo`)      | CPB path     |
|---------------------|------------------------------------------------|----------------------------|--------------|
| RGB 24-bit          | R, G, B                                        | `R G B`                    | RGB→YUV core |
| RGB 12-bit          | 2 pixels in 3 bytes: `R0G0`, `B0R1`, `G1B1`    | `0R 0G 0B` (nibbles)       | RGB→YUV core |
| YUV 4:2:2           | `Y0 U0`, `Y1 V1`, ... (a Y/chroma pair per pixel) | `00 Y C`                | interpolator |
| YUV 4:4:4           | Y, U, V                                        | `Y U V`                    | bypass       |
| grey scale          | one byte                                       | `00 00 G`                  | bypass       |

In the RGB 12-bit packing the high nibble is sent first. The colour configuration is a 2-bit colour type plus two style bits: 12- or 24-bit RGB, and 4:2:2 or 4:4:4 YUV (`colour_cfg_t`). The input stream controller maps it to a BSIPO format and a CPB path.

The BSIPO (byte-serial in, parallel out) counts columns and rows against the frame size. It tags every pixel with flags for start of frame, start of line, end of line and end of frame (`pix_flags_t`). It checks line lengths:

- bytes outside an open line are dropped;
- an H-Synch in the middle of a line ends that line;
- both pulse `err_line`.

A line that is too long is harmless: the surplus bytes are dropped. A line that is too short is not: its missing pixels are not filled in, so the tillers never receive complete tiles, and the frame stays in the DRAIN state described below. No recovery from this case is provided.

Input after the last pixel of the frame is ignored.

The input stream controller passes the stream on only while a frame is accepted. A V-Synch counts only when the master controller has armed the unit. Bytes and H-Synch pulses outside an accepted frame are discarded.

## Colour Processing Block (CPB)

The CPB always produces 3-byte YUV 4:4:4 pixels, through one of three paths.

- **RGB→YUV core** (`rgb_yuv_core`) uses the reversible integer transform: Y = (R + 2G + B) / 4, rounded down; U = R − G; V = B − G. U and V keep only the low 8 bits of the two's-complement difference, so a pixel stays three bytes. It takes one clock. 12-bit RGB goes through the same path without scaling, so its values stay in the range 0..15.
- **Interpolator** (`interpolator`). In 4:2:2 data, even pixels carry U and odd pixels carry V. Each pixel gets its missing chroma as the average of the two neighbouring samples of that chroma, rounded down. The first pixel of a line copies V from pixel 1, and the last copies U from the pixel before it. Interpolation runs along a line only. A pixel is output when the next pair arrives. The line's last pixel comes out in the cycle after its pair, so one idle cycle is needed after each line (an assertion checks this).
- **Bypass**: a register. A grey byte stays in the V lane.

The path must not change during a frame. The master controller only changes the configuration between frames.

## Tiling and the buffered tiller

This part takes the most care.

A core encodes one tile of at most 256 × 256 pixels. A frame arrives in raster order. So a whole row of tiles has been delivered before any tile of that row is complete. Buffering a full tile row per plane would need a lot of on-chip memory. The design instead uses one **buffered tiller** per plane and tile column, and streams each tile into its core while the tile is still arriving.

**Geometry.** The tiller controller works out the tile geometry from the frame size:

| frame (width × height) | tiles                  | buffered tillers used |
|------------------------|------------------------|-----------------------|
| 128 × 128              | 1 tile of 128 × 128    | Y, U, V left          |
| 256 × 256              | 1 tile of 256 × 256    | Y, U, V left          |
| 512 × 512              | 2 × 2 tiles of 256     | all six               |
| 512 × 768              | 2 across × 3 down      | all six               |
| 1024 × 1024, 1024 × 1280 | not supported; the frame is refused (`err_size`) | — |

**Routing.** Tiles are numbered 1, 2 on the first tile row and 3, 4 on the next. Pixels of the left (odd-numbered) tile column go to one tiller. Pixels of the right (even-numbered) tile column go to its neighbour, so along a line the two tillers of a plane take turns. The tiller index is `t = 2*component + column`, where component 0, 1, 2 means Y, U, V. This is also the index of the core it feeds. For grey-scale frames only the Y tillers and cores are used; the grey byte is moved from the V lane into them. `tiles_per_frame` tells the output side how many code streams to expect: 3 × tiles, or 1 × tiles for grey.

**Memory.** Each buffered tiller (`buffered_tiller`) holds half of a 256 × 256 tile: 128 rows × 256 columns × 8 bits = 32 KB. The memory is a dual-port RAM (`dp_ram`) with one write port and one read port. The rows form a ring, addressed as {row slot, column}, and the tiller works as follows:

1. **Fill.** The writer fills rows from the tiller controller, at most one sample per clock.
2. **Start.** Once half of the current tile has been written (`tile_h/2` rows: 128 rows for a 256 tile, 64 for a 128 tile), the reader starts sending the tile to its core in raster order. It sends one sample per clock, using `out_valid`/`out_ready`, with `out_sot` on the first sample and `out_eot` on the last.
3. **Overlap.** From then on, writing and reading overlap. The second half of the tile goes into the row slots the reader has already emptied. The read side follows sample by sample.
4. **Stalls.**
   - If the reader catches up with the writer, it waits with `out_valid` low; the `starved` output is high while it waits.
   - If the core holds `out_ready` low long enough for the ring to fill, new samples are dropped and the sticky `overflow` flag is set. It is reported as `err_overflow` in the status word. A dropped sample still uses up its position in the tile, so the core always gets complete tiles and the frame finishes normally. Only the samples at the dropped positions are wrong: they hold whatever that row slot contained.
5. **Next tile.** A tiller that serves several tiles (512 × 768: three tiles down) moves straight on to the next tile of its column.
6. **Reset.** `frame_start` empties all tillers.

If the core takes one sample per clock, it is never slower than the input. So with the half-tile lead, the ring never overflows.

## Quantisation table (JP2K codec controller)

The core has five quantisation tables. They range from lossless at about 2:1 to lossy at 60:1. The ratios of the middle three are an assumption here: 5, 10 and 20 (parameter `QT_RATIO`). WI asks for either a frame speed or a compression ratio, chosen by `use_ratio`. At each frame start the controller loads the table with the **lowest** ratio, and so the best quality, that meets the request:

- **ratio mode**: the first table whose ratio is at least the one asked for;
- **speed mode**: the first table with `ratio × LINK_BYTES_PER_S ≥ raw frame bytes × frames per second`. Raw frame bytes are width × height × (1 for grey, 3 otherwise). `LINK_BYTES_PER_S` defaults to 1 MB/s, an assumed link rate.

If no table is enough, table 4 is used and `err_qt` is set. The table number and a one-cycle `core_qt_load` strobe go to all cores.

The controller also works the other way round, from the chosen ratio to a frame speed. It computes `floor(ratio × LINK_BYTES_PER_S / raw frame bytes)`, saturated at 255, with a restoring divider. The divider produces one quotient bit per clock, so the result is ready 40 clocks after the frame start. The status word shows the result; it reads 0 while the division runs. In ratio mode, this tells WI what frame speed the requested ratio allows.

This speed rule is a simple model of this design's own. It should be replaced once the real link rate and the behaviour of the core are known.

## Output stream controller

Each core hands over its tile code stream as bytes, using `cs_valid`/`cs_ready`, with `cs_last` on the last byte. A round-robin arbiter grants one core and keeps the grant until that tile's last byte. So each tile's code stream lies contiguously in the output memory.

The external memory has `2**OUT_AW` bytes, one write port and one read port with one clock of read latency. It is used as a ring buffer. When the ring is full, the granted core is held off. WI reads the memory:

- it raises `wi_rd_req` while `wi_bytes_avail` is non-zero;
- each byte arrives two clocks later, with `wi_rd_valid`.

A frame counts as stored once `tiles_per_frame` code streams have been written. The code streams are stored as the cores deliver them. No JP2 file header is assembled.

## Master controller: frame flow, relays and status

The master controller sequences each frame with four states:

- **IDLE**: no configuration has been received yet.
- **ARM**: the pending configuration from WI (colour, frame size, speed or ratio) is copied to the active one. If the frame size can be tiled, the input stream unit is armed. The next V-Synch starts a frame, and `frame_start` pulses one clock later to the tiller, codec and output controllers.
- **CAPTURE**: the frame flows in. The state ends when the CPB has passed the last pixel.
- **DRAIN**: waits until every buffered tiller is empty and every tile's code stream is in the output memory. Then the frame is counted as done and the controller returns to ARM.

A configuration from WI received mid-frame waits as pending. A mode switch therefore always takes effect at a frame boundary. A V-Synch outside ARM, or while the frame size is not supported, is ignored and counted as a dropped frame.

These paths are relayed, each with one clock of delay, and do not affect the frame flow:

- PZT commands, from WI to ICU;
- position requests from WI, and the positions ICU returns;
- the frame size, from WI to ICU;
- ICU status bytes.

The status word `wi_status` (`pub_status_t`) holds:

- the state;
- the count of frames done and the count of frames dropped;
- error flags for size, line length, tiller overflow and quantisation table; these are sticky within a frame;
- the table in use;
- the last ICU status byte;
- the frame speed the loaded table allows.

## What follows the source design and what is this design's own

These follow the published design: the board partitioning, the list of blocks and how they connect, the five input formats and their 24-bit layouts, the colour transform, the 4:2:2 interpolation pattern, the three CPB paths, the frame sizes, tiles of 256, the use of up to six cores (two per component), the 32 KB half-tile buffered tiller that starts feeding its core at half a tile, one sample per clock into the core, five quantisation tables from 2:1 to 60:1 with the lowest sufficient ratio chosen, and byte-wise reading of an external code stream memory.

These are this design's own choices:

- the packing of 12-bit RGB into bytes;
- the sync pulse protocol details and the line-length error handling;
- rounding;
- narrowing U/V to 8 bits;
- interpolation along lines only;
- the grey byte lane;
- all handshakes (valid/ready with start- and end-of-tile flags);
- the ring-of-rows tiller organisation, its overflow behaviour and the 64-row start for 128 tiles;
- the state machine and the pending/active configuration;
- the status word layout;
- the middle quantisation ratios, the link-rate rule for speed mode and the frame speed estimate;
- the output arbiter, the ring buffer and the 2**20-byte memory size;
- the widths of the PZT and position words (24 bits) and of the speed and ratio values (8 bits).

Not provided:

- the JPEG2000 cores and the output memory, which are external;
- tiling for 1024-wide frames, for which no scheme is defined;
- any JP2 file formatting of the output.

## Files

- `rtl/pub_pkg.sv`: types, frame-size functions, constants.
- `rtl/pub_top.sv`: top level.
- `rtl/master_controller.sv`, `rtl/input_stream_controller.sv`, `rtl/bsipo.sv`, `rtl/cpb.sv`, `rtl/rgb_yuv_core.sv`, `rtl/interpolator.sv`, `rtl/tiller_controller.sv`, `rtl/buffered_tiller.sv`, `rtl/dp_ram.sv`, `rtl/jp2k_codec_controller.sv`, `rtl/output_stream_controller.sv`: one block each.
- `tb/tb_<block>.sv`: a self-checking testbench per block. Each prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.
- `tb/tb_pub_top.sv`: end-to-end test at the default sizes. Its sequence:
  1. a refused 1024 × 1024 frame;
  2. a 128² RGB 24-bit frame in speed mode;
  3. a 256² YUV 4:2:2 frame in ratio mode;
  4. a 128² RGB 12-bit frame with one over-long line, whose surplus bytes must be dropped and flagged;
  5. a 128² YUV 4:4:4 frame, during which the next configuration is sent;
  6. a 512² grey frame;
  7. a 512 × 768 RGB 24-bit frame;
  8. a 256² RGB 24-bit frame during which core 0 refuses samples until its tiller overflows. The frame must still complete and report `err_overflow`.

  Relay traffic and cores with random back-pressure run alongside. The test checks every pixel reaching each core against a reference model, the table loaded for each frame, and every code stream read back through WI. It counts how often each mechanism happened: each CPB path, the mode switches, right-column tiles, reuse of a tiller for further tiles, tiller starvation, core back-pressure, arbitration waits, dropped and refused frames, one-sample-per-clock runs, table loads, tiller overflow and the dropped over-long line. A mechanism that never happened counts as a failure.
- `tb/jpeg2000_core_model.sv`: stand-in for the encoder core. It takes a tile with random back-pressure and returns a 4-byte code stream {core id, tile number, 16-bit checksum}.
- `tb/ext_mem_model.sv`: stand-in for the output memory.

Two block tests use smaller sizes to run faster: `tb_buffered_tiller` (8 half rows, 16 columns) and `tb_output_stream_controller` (a 64-byte memory). Everything else, the top-level test included, runs at the default parameters.

## Simulating

With Verilator 5 (two-state, so every register that is read is reset):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/pub_pkg.sv $(ls rtl/*.sv | grep -v pub_pkg) tb/jpeg2000_core_model.sv tb/ext_mem_model.sv tb/tb_pub_top.sv \
  --top-module tb_pub_top -Mdir obj_top
./obj_top/Vtb_pub_top
```

The full top-level test runs in a few seconds. Any other testbench builds from the same file list: replace `tb_pub_top` with, for example, `tb_buffered_tiller` in both places. Every testbench builds without warnings and finishes with a `TB_RESULT` line; a non-zero `failures` count means the test failed.
