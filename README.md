# Infrared NUC accelerator: streaming Gaussian blur, DeNU, DeStrip and shift/average engines

Scene-based non-uniformity correction (NUC) for infrared focal-plane arrays
removes fixed-pattern, stripe and shading noise by updating correction
parameters as frames go by. Most of that work is cheap bookkeeping. A few
steps touch every pixel, though, and those dominate the run time on a
processor: the Gaussian blur inside the denoising and DeNU steps above all.

This RTL is the programmable-logic half of such a system on a Zynq-class
device at 200 MHz. The processor keeps the frame-count-driven parameter
updates in software. A DMA streams each frame from DDR through one of these
engines and back, at one pixel per clock:

| mode (CTRL[2:0]) | engine | output word |
|---|---|---|
| 0 `MODE_BLUR` | separable Gaussian blur, ksize up to 17 | blurred pixel |
| 1 `MODE_DENU` | blur, then pixel - blur | signed 32-bit |
| 2 `MODE_DENU_AB` | blur, then \|pixel - blur\| | unsigned |
| 3 `MODE_STRIP` | DeStrip restore: pixel + col[x] + row[y] | saturated 16-bit |
| 4 `MODE_SHIFT` | pixel << SHIFT, and the frame average | 32-bit |
| 5 `MODE_DENOISE` | route to an external DeNoise core and back | core's result |

A 640 x 512 frame goes through the blur in 332,826 cycles (1.66 ms at
200 MHz). That is 512 x 640 input cycles, plus 8 replayed rows for the bottom
border, plus 26 cycles of pipeline. The first result appears 5,147 cycles
after the first pixel: the blur needs the 8 rows below a pixel before it
can finish it.

## Block structure

```
nuc_accel_top
 ├─ axil_regs          AXI4-Lite registers, weight/strip table strobes, interrupt
 ├─ weight_loader      shadow + active Gaussian weights, committed between frames
 ├─ denu_accel         modes 0-2
 │   ├─ gaussian_blur
 │   │   ├─ gauss_row_conv   horizontal pass (adder_tree, pipe_delay)
 │   │   └─ gauss_col_conv   vertical pass (line_ram x 16, adder_tree, pipe_delay)
 │   ├─ sync_fifo     original pixels, waiting for their blurred value
 │   └─ sub_abs
 ├─ strip_correct      mode 3 (two offset RAMs)
 └─ shift_avg          mode 4 (accumulator + sequential divider)
```

`nuc_pkg` holds the widths, the mode enums and the register map.

## The blur: one pixel per clock with mirrored borders

The kernel is symmetric with KSIZE = 2R+1 taps (17, R = 8, by default). Only
its R+1 distinct weights are stored: 18-bit unsigned with 16 fraction bits,
`weights[0]` being the centre. The blur is computed as a row pass followed by
a column pass. Both passes pre-add the two pixels that share a weight, so
each needs R+1 multipliers and an (R+1)-input pipelined adder tree.

**Border rule.** Both passes mirror the image without repeating the edge
pixel ("reflect-101": index -1 reads 1, index W reads W-2). No padded pixels
are ever stored. Each tap has a multiplexer in front of it that picks the
register or line buffer holding the mirrored neighbour. The select lines are
computed from the current column or row number, so the border costs no
cycles.

**Row pass** (`gauss_row_conv`). A 2R+1 shift register holds the pixels
around the current one. Output x can be formed once pixel x+R has arrived, so
the last R outputs of a row would need R more input cycles. Instead, the
shift register is copied into a *tail snapshot* when a row ends. The R tail
outputs are computed from that snapshot, in the cycles when the next row's
first R pixels are filling the shift register and produce no output. Rows
therefore follow each other with no gap cycles. An assertion checks that a
tail output and a regular output never fall in the same cycle. The row
result keeps 4 extra fraction bits (`GUARD`) and is rounded, then saturated
to 20 bits.

**Column pass** (`gauss_col_conv`). KSIZE-1 = 16 single-port read-first RAMs
of MAX_W x 20 bits form a ring of row buffers. Each incoming row-pass pixel
is written over the oldest row while the 16 older rows of the same column
are read. The column of 17 vertical neighbours is then available in one
cycle. Output row y is produced while row y+R arrives. The top border is
mirrored by the tap multiplexers.

The bottom R output rows need rows that never arrive. After the last pixel
of a frame the pass runs a **flush**: for R x WIDTH cycles it reads the ring
without writing it. It treats the missing rows as mirror images of rows
already stored. During the flush `flush_busy` is high.

**Hold.** `gaussian_blur` drops `s_ready` from the last input pixel of a
frame until the last output pixel of that frame has left. The next frame
therefore cannot enter during the flush. The cost is R rows per frame. An
assertion checks that a flush only happens while the input is held.

**Stalls.** The blur has one clock enable, `ce = m_ready`. Every register,
RAM port and side-band delay advances only when it is high, so downstream
back-pressure freezes the pipeline in place with no skid buffers.

**Kernel size.** KSIZE is the synthesized maximum. A smaller kernel is run
by writing zeros into the outer weights.

**Frame size.** Width and height are registers: at least R+1, at most
MAX_W x MAX_H (1280 x 1024). The input stream's tlast is not used.

**Arithmetic.** Row: `round(sum * w / 2^12)`, saturated to 20 bits. Column:
`round(sum * w / 2^20)`, saturated to 16 bits. Weights summing to 65536 give
unity gain. The testbench reference (`tb/blur_ref_pkg.sv`) repeats this
exactly, so outputs are compared bit for bit.

## DeNU engine

`denu_accel` feeds the input to the blur and, at the same time, to a FIFO
(`sync_fifo`, 16384 x 16 bits). The FIFO holds the original pixels until
their blurred value comes out, R rows plus about 20 cycles later. `sub_abs`
then gives the blur, pixel - blur, or |pixel - blur|. The FIFO depth covers
(R+1) x MAX_W + 64 entries.

## Weight loading

Weights are computed by software; for a Gaussian, `w[j] ∝ exp(-j²/2σ²)`
normalized so that `w[0] + 2·Σw[j] = 65536`. Software writes them to
`BASE_WGT + 4j`. `weight_loader` collects the writes in a shadow bank. It
copies the shadow bank to the active bank only when the blur is idle, so a
frame never sees a half-updated kernel. Until the copy, STATUS.busy stays
high. After reset the kernel is the identity (centre 1.0).

## DeStrip restore

Stripe noise is estimated in software as one value per column and one per
row (640 + 512 values for a 640 x 512 image). `strip_correct` holds them in
two RAMs written at `BASE_COL + 4x` and `BASE_ROW + 4y`. It outputs
`clamp(pixel + col[x] + row[y], 0, 65535)` with signed 16-bit offsets, over
two pipeline stages.

## Shift and average

`shift_avg` passes `pixel << SHIFT` (32-bit) through and adds up the
unshifted pixels (37-bit sum). After the last pixel a restoring divider
divides the sum by WIDTH x HEIGHT in 37 cycles. The divider works in the
background, so the next frame may already start. The truncated mean goes to
the MEAN register, and `mean_done` raises the interrupt.

## Top level, registers and interrupt

Pixels enter on `s_axis_*` (32 bits, pixel in [15:0]; this is the DMA's
memory-to-stream side). Results leave on `m_axis_*` with `tlast` on the
frame's last word (the DMA's stream-to-memory side).

**Mode changes.** The mode register is sampled only when no frame is in
flight. A frame is in flight from its first accepted pixel until its last
output word has been accepted. A CTRL write during a frame therefore applies
from the next frame.

**DeNoise route.** In mode 5 the pixels leave on `dn_m_*` and the result
comes back on `dn_s_*`, with `dn_sigma_n` carrying the SIGMA register. The
DeNoise core itself is not part of this RTL.

| offset | register | access |
|---|---|---|
| 0x000 | CTRL [2:0] mode | rw |
| 0x004 | WIDTH (reset 640) | rw |
| 0x008 | HEIGHT (reset 512) | rw |
| 0x00C | SHIFT [4:0] | rw |
| 0x010 | SIGMA, passed to the DeNoise core | rw |
| 0x014 | STATUS [0] interrupt pending (write 1 to clear), [1] busy | rw1c / ro |
| 0x018 | IRQ_EN [0] | rw |
| 0x01C | MEAN, last frame average | ro |
| 0x020 | FRAMES, frames completed | ro |
| 0x100 + 4j | blur weight j, j = 0..8 | wo |
| 0x2000 + 4x | strip column offset x, x < 1280 | wo |
| 0x4000 + 4y | strip row offset y, y < 1024 | wo |

Writes to table entries beyond the table are dropped. Byte strobes are
ignored. The interrupt is pending when an output frame ends in modes 0–3
and 5, and when the mean is ready in mode 4. `irq = pending & IRQ_EN`.

## Departures and open points

- The source system's frame rates (66 fps at 640 x 512, 30 fps at
  1280 x 1024, 50 fps at 640 x 640) include processor software and the
  DeNoise core, neither of which is here.

  The pixel-rate engines take (H + 8) x W cycles per frame: 1.66, 6.6 and
  2.1 ms at 200 MHz. Those measurements come from `nuc_accel_full_tb` and
  `nuc_accel_workload_tb`.
- The DeNoise algorithm is not specified beyond its Gaussian blur, so it is
  an external core on stream ports.

  Also outside this RTL:
  - the DMA and interconnect, which are vendor blocks;
  - the frame-count update scheduler, which is software;
  - the DeStrip histogram and median, DeShading, DeFPN and sigmaN updates,
    all processor software.
- The source describes the blur arithmetic as wide integer. Here it is fixed
  point: Q2.16 weights, 4 guard bits between the passes, and round-to-nearest
  after each pass. The result can differ from a floating-point blur by up to
  one least-significant bit.
- Which DeNU quantity is needed (pixel - blur or its magnitude) is not
  pinned down, so both are offered.
- The border rule (reflect-101), all widths, the register map and the
  handshakes are this design's own choices.
- The FIFO's read port is asynchronous (first-word fall-through), so a
  synthesis tool may build it from distributed RAM rather than block RAM.
  Registering the read port would move it to block RAM at the cost of one
  cycle of look-ahead logic.

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. Example with plain Verilator 5:

```
verilator --binary --timing --assert -j 4 --top-module nuc_accel_top_tb \
  -y rtl -y tb +libext+.sv rtl/nuc_pkg.sv tb/blur_ref_pkg.sv tb/nuc_accel_top_tb.sv
./obj_dir/Vnuc_accel_top_tb +verilator+rand+reset+2
```

| testbench | what it covers |
|---|---|
| `adder_tree_tb`, `sub_abs_tb`, `weight_loader_tb`, `axil_regs_tb` | unit checks |
| `gauss_row_conv_tb`, `gauss_col_conv_tb`, `gaussian_blur_tb` | blur passes at reduced size; random gaps and stalls, several frame sizes, back-to-back frames, rate bound |
| `denu_accel_tb`, `strip_correct_tb`, `shift_avg_tb` | engines against models; saturation, mean, divider time |
| `nuc_accel_top_tb` | all six modes end to end at 32 x 16 / ksize 5 |
| `nuc_accel_full_tb` | default parameters: a 640 x 512 \|pixel - blur\| frame with ksize 17 and a 2 ms bound, then a shift/average frame |
| `nuc_accel_workload_tb` | default parameters: 640 x 640 and 1280 x 1024 frames with a cycle bound |

`nuc_accel_top_tb` counts each mechanism and fails if any never happens:

- output stalls;
- bottom-row replay;
- a mode write during a frame;
- a weight update deferred to the frame end;
- strip saturation;
- interrupts;
- the frame mean.

The full-size testbenches run in seconds.

To change the build, edit the parameters:

- `MAX_W` and `MAX_H` set the buffer sizes: line RAMs, FIFO depth, offset
  RAMs and counter widths.
- `KSIZE` sets the number of taps and line buffers.
- `nuc_pkg` sets the pixel, weight and guard widths.
