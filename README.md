# Dense SAD stereo matching on a small FPGA

This core takes two rectified grey-scale images from a stereo camera pair and
finds a horizontal disparity for every pixel position, which gives a dense
depth map. It uses the sum of absolute differences (SAD) over a 5×5 window.
For each window position (x, y) in the left image, the core compares the
window with the 5×5 windows of the right image at x+d, for all 64 candidate
disparities d = 0..63 at once. The d with the lowest SAD wins. On a tie the
smaller d wins.

```
SAD(x, y, d) = Σ_{r=0..4} Σ_{c=0..4} | L(x+c, y+r) − R(x+c+d, y+r) |
disp(x, y)   = argmin_d SAD(x, y, d)
```

The default configuration is 320×240 images, 64 disparities and a 5×5
window, clocked at 50 MHz. The images and the disparity map sit in one
external 16-bit SRAM. Only 16 lines of each image are held on chip. A
full-size frame takes 829,948 clocks in simulation, which is 60 frames/s at
50 MHz.

## Data flow

```
 UART ──► uart_host_if ──┐
                         ├─► sram_mux ─► address_map ─► sram_ctrl ─► SRAM pins
 mem_mgmt_fsm ───────────┤                                  │
 (rw_addr_gen)           │                                  ▼ read data + tag
 controller disparity ───┘                      left / right line_buffer (16 lines)
 writes (disp_addr_gen)                                     │ 8-bit reads
                                                            ▼
 stereo_matching_controller ──────► disp_kernel: left shift_tap (25)
                                               right shift_tap (340)
                                               64 × sad_module (25 abs_diff + parallel_adder)
                                               disparity_segregator (min tree)
```

| Module | Role |
|---|---|
| `stereo_top` | Wires the whole core; SRAM and UART pins. |
| `stereo_matching_controller` | Frame state machine, shift-chain read schedule, line-buffer refill, disparity write queue. |
| `disp_kernel` | Shift chains, 64 SAD modules and the minimum search. |
| `sad_module` | Input multiplexer (`sw`), 25 absolute differences and an adder tree, all registered. |
| `abs_diff`, `parallel_adder` | 8-bit \|a−b\| into 9 bits; a 25-input adder tree into 13 bits. |
| `shift_tap` | Byte-wide shift register with every stage brought out. |
| `disparity_segregator` | Compare-and-select tree over 64 (SAD, d) pairs; registered. |
| `line_buffer` | 16 lines × up to 1024 pixels, written 16 bits at a time, read 8 bits at a time. |
| `mem_mgmt_fsm`, `rw_addr_gen` | Copy image words from the SRAM into the two line buffers. |
| `disp_addr_gen` | Byte offset of a disparity in the output table. |
| `sram_mux`, `address_map`, `sram_ctrl` | Arbitration, bank layout and the SRAM pin interface. |
| `uart`, `uart_host_if` | 8N1 serial port; image upload and disparity read-back. |
| `stereo_pkg` | Shared widths, request structs and the line-buffer address function. |

Widths are 8-bit pixels, 9-bit absolute differences, 13-bit SAD (25 × 255
fits in 13 bits) and 8-bit disparities.

## Shift-chain geometry

This is the part that is easiest to get wrong.

The kernel holds two byte-wide shift chains. The left chain has 25 stages
(one 5×5 window). The right chain has 5 × (64 + 5 − 1) = 340 stages: a band
of 68 columns × 5 rows, which covers every right window from x to x+63+4.
Both chains are filled column by column. Within a column the top row goes in
first. So after a full fill, the newest byte (`taps[0]`) is the bottom pixel
of the right-most column.

With `RCOLS = NDISP + WIN − 1` the window element at row r and column c is
found at:

- left:  `ltaps[(WIN−1−c)·WIN + (WIN−1−r)]`
- right, for disparity d: `rtaps[(RCOLS−1−(d+c))·WIN + (WIN−1−r)]`

Moving the window one pixel to the right means shifting one new column of 5
pixels into each chain. The oldest column then drops off the far end. This
is why a step along a row costs only 7 clocks, against 342 for a full fill.
Right-image columns past the right edge of the image are fed as zeros. The
published design lists 320 stages for the right chain. With 64 disparities
and a 5-wide window, 340 are needed, and that is what is built here.

## Controller timing

`stereo_matching_controller` walks the window positions row by row. x runs
from 0 to XP = W−5 and y from 0 to YP = H−5. The window is anchored at its
top-left pixel.

| State | Clocks | Work |
|---|---|---|
| IDLE | – | Waits for `go`. Then starts the initial line-buffer load and waits for it to finish. |
| INIT_SHIFTTAP | 342 | Reads 340 right and 25 left pixels into the chains. The line-buffer read and the registered read-out add 2 clocks. |
| DISP | 2 | One clock loads the SAD registers, one clock runs the minimum search. |
| UPDATE | 1 (+ stall) | Queues the disparity write. Chooses the next state. |
| FEEDING_SHIFTTAP | 7 | Shifts in one new 5-pixel column (5 + 2 clocks). |
| DONE | 1+ | Waits until the last disparity write has left, then pulses `done`. |

At the default size this gives, per row, 342 + 2 + 1 + 315 × (7 + 2 + 1) =
3495 clocks. Over 236 rows that is 824,820 clocks. The initial line load and
the stalls add the rest of the 829,948.

Disparities are written through a small queue. A write to the SRAM has the
highest priority, so the queue never backs up.

## Memory layout and line-buffer refill

The SRAM is 256K × 16 bits with an 18-bit address. Two pixels share a word,
with the even column in the low byte.

| Bank | Word address | Contents |
|---|---|---|
| left | 0 | W·H/2 words |
| right | W·H/2 | W·H/2 words |
| disparity | W·H | one 16-bit word per window position. Disparity (x, y) is at byte offset 2·(y·W + x); the disparity sits in the low byte. |

Each line buffer holds 16 lines. Pixel (i, j) is stored at
`(j mod 16)·W + i`. After the initial 16 lines are loaded, a refill engine
copies line L into slot L mod 16. It does this once line L−16 is no longer
needed, which is at the latest when the last window of row L−16 is done. It
moves one word of each image per request through `mem_mgmt_fsm`. That FSM
has nine states: one load state and one wait state for each of four cases
(left or right image, first or later word of the line), plus IDLE.

If the controller reaches the end of a row and the bottom line of the next
row is not loaded yet, UPDATE stalls (`stall` is high). The end-to-end test
runs with 5 lines so that this happens.

Requests to the SRAM are served in a fixed order of priority: disparity
write, then line-buffer load, then the serial link. `sram_ctrl` registers
the command. Read data comes back 2 clocks after the grant, together with
the tag of the request.

## Serial protocol

8 data bits, no parity, 1 stop bit. `CLKS_PER_BIT` = 434 gives 115200 baud
at 50 MHz.

- Upload: the host sends W·H bytes of the left image in row-major order, then
  W·H bytes of the right image. When the last word is in the SRAM, a frame
  starts on its own.
- Read-back: after a frame started this way, the core sends
  (W−4)·(H−4) disparity bytes back, in row-major order of the window
  positions.

A frame can also be started by a pulse on `start` when the images are
already in the SRAM. There is then no read-back.

## Ports of `stereo_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock. Synchronous active-low reset. |
| `start` | in | 1 | Start a frame on the images in the SRAM. |
| `sw` | in | 1 | Select of the SAD input multiplexers. It swaps the two AD operands; the SAD is the same either way. |
| `uart_rxd`, `uart_txd` | in/out | 1 | Serial port. |
| `sram_addr` | out | 18 | Word address. |
| `sram_wdata`, `sram_rdata` | out/in | 16 | Data. Read data arrives one clock after the address. |
| `sram_ce_n`, `sram_we_n`, `sram_oe_n` | out | 1 | SRAM strobes, active low. |
| `busy`, `done` | out | 1 | A frame is running; pulse at the end of a frame. |

## Where this design departs from the published one

- The right shift chain has 340 stages instead of 320 (see above).
- The right window for disparity d is taken at x+d, as the matching
  equation is written. This assumes the right image is the one shifted
  right. Swap the images if your rig is the other way round.
- The disparity map is written to the external SRAM, next to the images.
  The published design keeps it in on-chip memory. Here both on-chip
  memories are taken by the line buffers.
- A row ends at x = W−5 and the frame at y = H−5, the last positions where
  a whole window fits. The published conditions compare x and y with the full
  image width and height.
- The disparity address uses the image width: 2·(y·W + x).
- The published design describes the frame as 64 sub-frames of 5×240
  pixels, each done in 64 clocks, and takes 1200 bytes of the right image
  per computation. This design instead scores one window position at a time,
  with all 64 disparities in parallel, and keeps 340 right-image bytes in
  the chain. The published frame rate (50 frames/s at 320×240) is still met.
- Right-image pixels past the image edge are zero. The published design does
  not say what happens there.
- The memory-management FSM follows the published state table. Its
  transitions are taken from that table, not from the state diagram.
- Arbitration, the SRAM bank layout, the tagged read return, the refill
  engine and stall, the disparity write queue and the serial protocol are
  this design's own. The published design names these blocks without giving
  their insides.
- The SRAM chip and the host PC are outside the core. `tb/sram_model.sv` is a
  behavioural SRAM for the testbenches.
- The SRAM is assumed to be 256K × 16. The Middlebury test pairs the design
  was evaluated on (Aloe, Baby, Cones, Reindeer and Art, 413 to 463 pixels
  wide and about 370 lines) do not run at the default parameters, which are
  fixed at 320×240. Even with the size parameters changed, two images plus
  the disparity table need more than 262,144 words. All of these images
  except Cones also have an odd width, which the two-pixels-per-word packing
  does not handle. The line buffer would be large enough for them.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each
testbench compares the module with a reference model written in the
testbench itself. It prints `TB_RESULT checks=N failures=M` and stops on a
watchdog if the module hangs. The kernel and segregator tests use random
images and check every disparity. The controller test checks the length of
each state (342, 2, 1, 7 clocks).

- `tb_stereo_top` runs the whole core at a small size: 24×22 images, 8
  disparities and a 5-line buffer. The first frame is uploaded over the
  serial port and read back over it. The second is preloaded into the SRAM
  and started with `start` and `sw` = 1. The test compares every disparity
  with a software SAD. It also counts each mechanism: serial bytes, buffer
  init, row init, column feed, compute, update, stall, zero fill, disparity
  write and serial transmit. It fails if any of them never happens.
- `tb_stereo_top_full` runs one 320×240 frame at the default parameters,
  from preloaded SRAM. The images are random, with a different disparity
  (4 to 54) in each 40-row band. The test checks all 74,576 disparities
  against a software SAD. It also checks that the frame takes no more than
  1,000,000 clocks (50 frames/s at 50 MHz). Measured: 829,948 clocks.

All testbenches pass.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/stereo_pkg.sv tb/tb_stereo_top.sv --top-module tb_stereo_top
./obj_dir/Vtb_stereo_top
```

Replace `tb_stereo_top` with any other testbench name. The full-size test
takes a few minutes to build and about 15 seconds to run.

To change the size, override `IMG_W`, `IMG_H`, `NDISP`, `WIN` and `NLINES`
on `stereo_top`. `NLINES` must be at least `WIN`, and `NLINES·IMG_W` must
fit in the 16384-byte line buffer. `IMG_W` must be even. The widths in
`stereo_pkg` (13-bit SAD, 8-bit disparity, 10-bit x) bound `WIN`, `NDISP`
and `IMG_W`.
