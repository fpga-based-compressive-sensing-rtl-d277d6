# Coded-exposure video encoder for a conventional camera

A compressive-sensing camera does not record every frame. It records one
image in which every pixel integrated light during a short, randomly placed
window, and the frames are recovered later by sparse reconstruction. Such
sensors are still research parts. This RTL gets the same data from an
ordinary camera. It takes the sensor's frames, 13 at a time, and for every
pixel averages the 4 consecutive samples that fall inside that pixel's random
window. The result is one 640x480 coded frame per 13 input frames (13x less
data), plus the 104-byte sensing matrix that says which samples went in.
A receiver reconstructs the 13 frames offline, for example with a learned
dictionary and orthogonal matching pursuit. That software is not part of this
repository.

The architecture follows the FPGA framework published as *"FPGA based
Compressive Sensing Framework for Video Compression on Edge Devices"*. Where
the publication leaves details open, this implementation makes its own
choices. They are listed in [Departures and own choices](#departures-and-own-choices).

## The encoding rule

Let `V(m,n,f)` be pixel (m,n) of frame f, f = 1..13. The sensing matrix
`S(r,c,f)` is a 0/1 array of 8x8x13. For every tile position (r,c) it holds
exactly one run ("bump") of four ones over f. The matrix is tiled across the
frame without overlap, so pixel (x,y) uses `S(y mod 8, x mod 8, f)`. The coded
pixel is

    I(x,y) = sum over f of  S(y mod 8, x mod 8, f) * (V(x,y,f) >> 2)

Dividing each sample by four before adding keeps the sum inside 8 bits.
The result is the mean of the four exposed samples, except that each sample
is truncated first, so it can be up to 3 below the exact mean.

The bump start is random but not uniform. A start drawn uniformly from 1..10
would expose frames 1 and 13 far less often than the middle frames. Instead,
a 4-bit index is drawn uniformly from 1..13 and folded:

| index  | first exposed frame | exposed frames |
|--------|---------------------|----------------|
| 1..4   | 1                   | 1..4           |
| 5..9   | index               | index..index+3 |
| 10..13 | 10                  | 10..13         |

## Generating the sensing matrix (`sensing_matrix_gen`)

This is the part that takes the most care to follow. The matrix is produced
one element (tile position) at a time, as 13 bits over time. It is consumed
one frame at a time, as 8-bit rows of one frame. The generator transposes it
on the way:

1. **Index** (`cs_lfsr`, `start_index_map`). An 8-bit maximal-length LFSR
   (x^8+x^6+x^5+x^4+1, seed 0xA5) provides bits 7:4 as the index. Indexes 0,
   14 and 15 are skipped; the LFSR steps once per clock until a valid index
   appears. The index is then folded as in the table above.
2. **Bump** (`bump_counter`, `frame_decoder`, `exposure_banks`). A 2-bit counter adds 0..3
   to the start frame on four consecutive clocks. A 4:13 decoder turns each
   frame number into a SET pulse for one of 13 flip-flops.
3. **Ping-pong banks**. There are two banks of 13 flip-flops. Even elements
   go to bank 0 and odd elements to bank 1. The clock after an element's
   fourth SET, its bank is copied through a 2:1 multiplexer into the register
   stack and cleared in that same clock. Meanwhile the next element is
   already being built in the other bank.
4. **Transpose** (`register_stack`). Eight 13-bit words, one per element
   of a matrix row, are pushed in. Then the stack shifts 13 times. Each shift
   emits bit f of all eight words as one byte: the row for frame f.
5. **Store** (`sm_bram`). Row r of frame f goes to address 8*(f-1)+r of a
   104x8 RAM, so frame 1 fills 0..7, frame 2 fills 8..15, and so on. Bit 7 of
   each byte is column 0.

One matrix takes 8 x (8 x 5 + 14) = 432 clocks, plus one per skipped index.
That is about 450 clocks in practice. The LFSR is never reseeded, so every
group of 13 frames gets a new matrix.

## Accumulating the coded frame (`compressed_frame_gen`)

The coded frame lives in a 640x480x8 dual-port RAM (`frame_dpram`). Port a
reads (`rden_a`, `rdaddress_a`, `rddata_a`) and port b writes (`wten_b`,
`wtaddress_b`, `wtdata_b`). Pixels arrive in raster order, one per clock.

- At each line, the matrix row for (frame, line mod 8) is loaded into an
  8-bit rotate-left register (`rotate_left_reg`). Its MSB, `msbop`, says whether the current pixel
  is exposed in this frame. The register rotates every pixel, which repeats
  the 8-pixel pattern across the line. The next line's row is addressed
  during the current line and loaded on the line's last pixel, so lines follow
  each other without gaps.
- Pipeline, for frames 2..13: the clock a pixel is presented, an exposed
  pixel is read from port a. One clock later, `rddata_a + (pixel >> 2)` is
  formed by the 8-bit adder (`pixel_adder`) and registered. The clock after that, it is
  written back to the same address on port b. Addresses never repeat within
  two clocks, so there is no read/write hazard.
- Frame 1 of a group writes every location without reading: `pixel >> 2`
  where exposed, zero elsewhere. This zeroes the accumulator as a side effect
  of the first frame and costs no extra clocks.
- A frame takes 640x480 + 3 clocks once it is buffered. At 200 MHz that is
  651 frames/s.

## Camera side (`input_frame_buffer`)

The input side has two 640x480 frame memories used ping-pong. The camera
writes one while the encoder reads the other. The camera interface is just
`cam_valid`/`cam_pixel` in raster order. Frame borders are found by counting
pixels, so the camera must deliver whole frames from reset on. The camera
cannot be stalled. If a frame starts while both banks still hold unread
frames, the whole frame is discarded and `frames_dropped` is incremented.
This happens while the sensing matrix is generated, and whenever the encoder
is idle but the camera keeps running. The encoder always consumes frames in
arrival order.

## Top level (`cs_video_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | pulse while `busy` is low: new matrix, then 13 frames |
| `busy` | out | 1 | a group is in progress |
| `done` | out | 1 | one-clock pulse: coded frame complete |
| `cam_valid`, `cam_pixel` | in | 1, 8 | camera pixels, raster order |
| `frames_dropped` | out | 16 | camera frames discarded so far |
| `out_addr`, `out_data` | in, out | 19, 8 | read the coded frame (y*640+x) while idle, data one clock later |
| `sm_addr`, `sm_data` | in, out | 7, 8 | read the sensing matrix while idle, data one clock later |

Parameters are `FRAME_W` (640), `FRAME_H` (480), `NUM_FRAMES` (13), `BUMP`
(4), `BLK` (8) and `SEED`. `BLK` must be a power of two. The folding rule is
written for any `NUM_FRAMES` and `BUMP`, but only the 13/4 configuration is
tested. `cs_pkg` holds the shared defaults.

A group runs as follows: `start`, about 450 clocks of matrix generation,
then 13 x (307,200 + 3) clocks as frames become available, then `done`.
Read the coded frame and the matrix before the next `start`. The next group
overwrites both.

## Departures and own choices

- **Start frame for low indexes.** The algorithm and the prose of the
  original architecture fold indexes 1..4 to frame 1. Its block diagram
  prints 4 instead. Frame 1 is used here, because with 4, frames 1..3 would
  never be exposed. `LOW_START` is a parameter if the other reading is wanted.
- **LFSR polynomial and seed.** These are not specified in the original, and
  were chosen here. Only the upper nibble is used, as in the original.
- **Invalid indexes** (0, 14, 15) are skipped by waiting for the next LFSR
  value.
- **Register stack control.** Separate `ld` and `shift` enables (the original
  drives one combined line), so the stack can hold. Matrix generation pauses
  during the 13 shift clocks of each row.
- **Zeroing the accumulator** by overwriting during frame 1 is this design's
  own. The original does not say how the RAM is cleared.
- **Read latencies.** All RAMs have registered reads (one clock), as block
  RAM does. Because of that, the write-back happens two clocks after the
  read, not one.
- **Interfaces.** The start/done handshake, the readout ports, the frame-drop
  policy and the camera interface are this design's own.
- **Not included:** the camera, the transmission link and storage, and the
  offline reconstruction (K-SVD dictionary learning and OMP). None of these
  are encoder hardware.
- The original's clock target (200 MHz on a Zynq UltraScale+) and its
  resource figures have not been checked. This RTL has been simulated and
  run through generic synthesis only.

## Simulation

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl \
        rtl/cs_pkg.sv tb/tb_cs_video_top.sv --top-module tb_cs_video_top
    ./obj_dir/Vtb_cs_video_top

`-y rtl` lets Verilator find each module in `rtl/<module>.sv`. The package
is named explicitly so that it is read first.

| testbench | what it checks |
|-----------|----------------|
| `tb_cs_video_top` | 16x16 frames, two groups end to end. The matrix is checked against an independent LFSR and folding model, and every coded pixel against the encoding rule. It also counts that every mechanism occurred: skipped index, both folds, both banks, stack shifts, first-frame overwrite, gated reads, waiting for frames, frame drops, both input banks, row reloads. A frame that is already buffered must take exactly W*H+3 clocks. |
| `tb_cs_video_top_full` | The same at the default 640x480 size, one group (about 5.5 M clocks, a few seconds). The measured frame interval of 307,203 clocks is 651 frames/s at 200 MHz. |
| `tb_sensing_matrix_gen` | Three matrices byte by byte, write addresses, the one-bump-of-four property, and the clock count 432 + skips. |
| `tb_compressed_frame_gen` | 16x16, two groups against behavioural RAMs holding random initial contents: result, read and write counts, and a frame interval of W*H+3 clocks. |
| `tb_input_frame_buffer` | Ping-pong order, pixel data, and drop decisions against a model. |
| `tb_cs_lfsr`, `tb_start_index_map`, `tb_bump_counter`, `tb_frame_decoder`, `tb_exposure_banks`, `tb_register_stack`, `tb_sm_bram`, `tb_rotate_left_reg`, `tb_pixel_adder`, `tb_frame_dpram` | Leaf blocks, exhaustively or with random stimulus against models. |

Simulation is two-state. Control registers have a synchronous reset.
Datapath registers (register stack, pipeline stages) and the RAMs do not;
they are always written before their contents are used. The testbenches
start them with random values to show that this holds.
