# GMM: a 3x3 convolution coprocessor driven like a C function

The Generic Matrix Multiplier (GMM) is a fabric accelerator for 2D image
convolution, meant to sit next to a RISC-V application processor on an
FPGA SoC and to be called by software much as a library function would be.
The software writes "arguments" (source and destination addresses, image
size, the nine kernel coefficients) into memory-mapped registers over APB,
"calls" the function by raising a GPIO line, and gets its "return" as an
acknowledge on a second GPIO line. In between, the GMM reads the image
straight from DRAM, convolves it four pixels per clock and writes the
result image back to DRAM.

The application this was built for is Sobel edge detection on 1280x720
video in an OpenVX-style graph: the GMM computes the horizontal gradient,
then (with the other kernel) the vertical gradient, and the processor
forms the L1 norm |Gx| + |Gy| in software. Offloading the two convolutions
is what buys the frame rate; in the reference system the two hardware
convolutions took about 9 ms each where the C versions took about 30 ms.

## Calling the GMM

Registers (byte offsets on the APB port, 32-bit access, no wait states):

| offset        | name    | access | contents |
|---------------|---------|--------|----------|
| 0x04          | STATUS  | RO     | [0] busy, [1] done, [2] err (last request rejected) |
| 0x08          | SRC     | RW     | byte address of the input image |
| 0x0C          | DST     | RW     | byte address of the output image |
| 0x10          | WIDTH   | RW     | width in pixels, a nonzero multiple of 4, at most `MAX_WIDTH` |
| 0x14          | HEIGHT  | RW     | height in rows, nonzero |
| 0x18          | CYCLES  | RO     | clock cycles taken by the last job |
| 0x20 + 4k     | COEFk   | RW     | kernel tap k = 3*row + column (top-left first), signed 8-bit, read back sign-extended |

Any other offset, or a write to a read-only register, completes with
`pslverr`.

The handshake is four-phase on levels:

1. Software writes the registers, then raises `gpio_m`.
2. On the rising edge (after a two-flop synchroniser, so `gpio_m` may come
   from any clock domain) the GMM copies the registers into a job record,
   so software may rewrite them while the job runs.
3. When the last result write has been answered by memory, `gpio_f` rises
   and STATUS.done is set. A rejected configuration raises `gpio_f`
   straight away with STATUS.err set, so software never waits forever.
4. Software lowers `gpio_m`; the GMM lowers `gpio_f` and is idle again.

Memory layout: the input is one 8-bit plane (for Sobel, the luma), stored
row after row with no padding, four pixels per little-endian 32-bit word.
The output has the same width and height, one signed 16-bit value per
pixel, four per 64-bit word; pixel (r, c) is at `DST + 2*(r*WIDTH + c)`.
Pixels outside the image count as zero, and each sum of nine products is
saturated to [-32768, 32767].

## How the convolution streams

The hard part of the design is `gmm_conv_core`, which turns a raster stream
of 4-pixel words into a raster stream of 4-result words with a single read
of every input pixel.

The core walks a grid one word wider and one row taller than the image:
(W/4 + 1) x (H + 1) positions. At the extra column and the extra row it
does not take an input word but makes a zero word itself; this is how the
right and bottom borders get their zero padding, and it also flushes the
pipeline so that the last row and last column come out. At every
position x of row y:

* the line buffer (`gmm_line_buffer`, one 64-bit entry per word column)
  returns {row y-1, row y-2} at x and gets {row y, row y-1} written back,
  so two rows of history cost one RAM of W/4 + 1 entries;
* the new three-row column is shifted into a history of three columns,
  x-2, x-1 and x: twelve pixels wide and three rows high;
* that history holds every 3x3 window needed for the four pixels of row
  y-1, word x-1, so four `gmm_conv_lane` instances compute those four
  results at once, and the word goes out.

Outputs therefore lag the input by one row and one word, and the first
row and first column of positions produce nothing. Rows above the image
are forced to zero as they come out of the line buffer: row y-1 when
y = 0 and row y-2 when y < 2. Since those zeros are also what gets
written back, the RAM needs neither reset nor clearing between frames.
The left border takes care of itself: the column shifted in just before
x = 0 is the zero padding column of the previous row.

The pipeline has three register stages (take the word and read the line
buffer, shift the history, register the lane results) and stalls as a
whole when the result register is full and the write side refuses it.

## Around the core

* `gmm_rd_master` asks memory for the W/4 x H input words in order, at
  SRC + 4i. Read data come back in order on a channel that cannot be
  refused, so the master issues a request only while the words in flight
  plus the words already in its 16-entry FIFO stay below 16. With memory
  latency below about 12 cycles this still sustains one word per cycle.
* `gmm_wr_master` sends each result word to DST + 8i and counts the write
  responses; the job ends on the last response, so the data are in memory
  when `gpio_f` rises.
* `gmm_ctrl` runs the GPIO handshake, checks and latches the
  configuration, starts the three datapath blocks together and counts
  cycles for the CYCLES register.
* `gmm_apb_regs` is the register file; `gmm_pkg` holds the widths, the
  register offsets and the configuration record type; `gmm_fifo` is a
  small first-word-fall-through FIFO.

Memory channels (plain signals on `gmm_top`):

* read: `rd_req_valid/ready/addr` (32-bit byte address), then
  `rd_resp_valid/data` (32 bits, in request order, no backpressure);
* write: `wr_req_valid/ready/addr/data` (address and 64-bit data
  together), then a one-cycle `wr_resp_valid` per write.

On an FPGA SoC these would go through a bridge to the fabric interface of
the processor subsystem (for instance AXI); that bridge is not part of
this RTL.

## Performance

With memory that accepts one request per cycle, a W x H frame takes
(W/4 + 1)(H + 1) cycles plus a small fixed latency: 231,452 cycles for
1280 x 720, against 231,441 grid positions. The reference system's 9 ms per
HD convolution is therefore reached at any clock above about 26 MHz. At
100 MHz one convolution takes 2.3 ms, so a full Sobel frame (two
convolutions) needs about 4.6 ms of GMM time.

Resources (default `MAX_WIDTH = 1280`): one 321 x 64-bit line buffer
(about 20.5 kbit), 36 8x8 multipliers (4 lanes x 9 taps) and about
900 flip-flops.

## Where this design departs from the reference system, or fills gaps

What the GMM is for and how it is driven (APB configuration of addresses
and coefficients, a GPIO start, a GPIO acknowledge, images in DRAM by
physical address, four convolutions in parallel, HD frames, Sobel as two
passes) comes from the reference system's description. That description
does not give the insides, so the following are this design's own
choices:

* "Four convolutions in parallel" is taken as four neighbouring output
  pixels per cycle with one kernel, since the reference system computes
  the two Sobel gradients one after the other.
* The reference implementation used 20 18x18 multiplier blocks and 20
  18-kbit RAM blocks. This design needs 36 small multipliers and about two
  RAM blocks. How the original shared its multipliers, and what its other
  RAMs held, is not known.
* 3x3 kernels, 8-bit signed coefficients, 8-bit pixels in one plane,
  16-bit saturated results, zero padding at the borders, widths in
  multiples of 4, images stored without a line stride.
* The register map, the STATUS and CYCLES registers, the four-phase GPIO
  protocol, the configuration check, and the memory channel formats.
* Pulling the luma plane out of YUV 4:2:2 video, and copying results
  between cached and non-cached DRAM, are left to software or to the SoC's
  DMA; the GMM only reads SRC and writes DST.

Not part of the RTL: the processor subsystem, its fabric interconnect and
DMA, the DRAM, and the L1 norm (software). The testbenches stand in for
the processor and the memory.

## Files and simulation

`rtl/` holds one module or package per file; `gmm_top` is the top.
`tb/` holds one self-checking testbench per module, plus:

* `gmm_mem_model.sv`: a behavioural byte-addressed memory with random
  request stalls, read latencies and write response delays;
* `tb_gmm_top.sv`: end to end through APB and GPIO with a stalling memory,
  random kernels and sizes, a Sobel pair with the L1 norm, a rejected
  configuration and an APB error, and counters that fail the test if any
  of these (or read stalls, write stalls, credit throttling, saturation
  either way) never happened;
* `tb_gmm_top_full.sv`: a full 1280 x 720 Sobel pair at default
  parameters, every result checked, frame time checked against the grid.

Every testbench ends by printing `TB_RESULT checks=N failures=M`. To run
one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        +libext+.sv rtl/gmm_pkg.sv tb/tb_gmm_top_full.sv \
        --top-module tb_gmm_top_full -o sim
    ./obj_dir/sim

The full-size test runs in about a second. To change the largest
supported width, set `MAX_WIDTH` on `gmm_top`; the line buffer follows.
Changing the lane count or kernel size means editing `gmm_pkg` and the
window wiring in `gmm_conv_core`, which assumes a 3x3 kernel.
