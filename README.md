# Spatio-temporal window memory for streaming video filters

A video filter that works on a neighbourhood of pixels needs, for every pixel
of a raster stream, all the pixels around it at once. For a spatial filter
that means the ω×ω pixels around it. For a spatio-temporal filter it also
means the same ω×ω windows in the previous frames. Storing and lining up
that data is most of the work in such a design, and the same work for every
filter. This RTL does that work. It takes a raster stream and hands the
filter core, every cycle a pixel arrives, **NFRAMES windows of ω×ω pixels**
around one common centre. Window 0 is from the live frame and window *k* is
from the frame *k* periods earlier. Taps that fall outside the image are
already replaced. The filter function itself is not included: it connects
to the `out_*` ports.

The default configuration is a 3×3 window over a 7-frame neighbourhood, on
1367×768 frames of 24-bit pixels. The six previous frames are kept in an
external 36-bit ZBT SRAM.

```
            live pixel ───────────────────────────────────────┐
 in_* ──►  vdmc ── write FIFO ─► address ctrl ─► ZBT ctrl ◄──►│ external ZBT SRAM
            │                    (PAT + counters)             │ (NFRAMES frame slots)
            └─ read FIFO, level 1..NFRAMES-1 ◄─ read data ◄───┘
                       │ (one pixel per level, same cycle as the live pixel)
                       ▼
           temporal pixel register (NFRAMES pixels of one position)
                       │
                       ▼
 slwc:  gmo_line_buffer (ω-1 lines × NFRAMES levels, one memory object)
        window registers ω×ω per level ── boundary_pixel_switch per level ──► out_win
        bsc (position, out-of-image mask) ┘
 output_sync: frame/line marks delayed to the window centre ──► out_valid/vsync/hsync
```

## The frame store and its schedule (`vdmc`)

This is the least obvious part. Memory bandwidth limits the whole design,
not logic speed.

**Layout.** The SRAM holds NFRAMES frames back to back and is used as a
circular buffer of frame slots. The write address counter runs through the
whole store, one word per live pixel, and wraps from the last slot to the
first. The read counter of level *k* starts *k* frames (k·IMG_W·IMG_H words)
behind the write counter and advances the same way. It therefore always
points at the pixel in the same position *k* frames earlier. No frame number
is ever computed: the slot rotation comes from the counters' offsets alone.
The store needs NFRAMES slots, not NFRAMES−1, because the slot being written
must not be one that is still being read.

**Traffic.** Each live pixel costs one write plus NFRAMES−1 reads. With a
ZBT SRAM (any mix of reads and writes, one per clock, no turnaround cycles)
the memory clock must be at least

    f_mem ≥ f_pixel × (1 + (NFRAMES − 1))

The memory and the stream share `clk` here, so the stream may present at most
one pixel every NFRAMES cycles, plus a little slack (see below). At the
default 7 frames that is one pixel every 8 cycles. At 150 MHz this is about
21 Mpixel/s, or 20 frames/s at 1367×768. Fewer frames raise the frame rate
proportionally.

**Physical address table.** Accesses are grouped into bursts of BURST (8)
words. The table `PAT` (a parameter, fixed at compile time) lists the order of
the bursts. The default is one write burst of the live frame, then one read
burst of each stored level. The address controller walks the table over and
over:

- A write entry runs if the write FIFO holds at least BURST pixels.
- A read entry runs if that level's read FIFO has room for BURST words,
  counting the reads already in flight.
- An entry that cannot run is skipped in one cycle.
- A burst that runs issues its BURST accesses on consecutive cycles, the
  first in the cycle the entry is examined.

The skip cycles are the only overhead, which is why the stream needs a little
slack beyond one pixel every NFRAMES cycles.

**FIFOs.** The read FIFOs (first-word fall-through, FIFO_DEPTH words each)
prefetch in bursts ahead of the stream. Their head words are therefore
available in the very cycle the live pixel arrives. The write FIFO absorbs the
live pixels between write bursts. After reset, the controller starts taking
the stream only at a frame start that finds every read FIFO holding at least
one burst. In practice that means the stream may start about NFRAMES×BURST
cycles after reset. If the stream is faster than the memory, a pixel meets an
empty read FIFO or a full write FIFO. That sets the sticky `underrun` or
`overrun` flag. The stream is never stalled, because real-time video cannot
wait.

`out_lvl_ok[k]` tells the filter whether level *k* already holds a real frame.
After start-up, level *k* becomes valid with the *k*-th frame. Before that the
level carries whatever the SRAM held.

## Line buffers as one memory object (`gmo_line_buffer`)

The ω−1 previous lines of **all** temporal levels share one memory, a
"global memory object". Its word width is (ω−1)·NFRAMES·PIX_W bits and its
length is one image line. At the defaults that is 2 × 7 × 24 = 336 bits ×
1367 words. The column of the current pixel is the address. It works as a
circular buffer. For each pixel the column is read and the new pixels are
written over the oldest line of that column in the same cycle. This works
because block RAMs in read-first mode return the old word while storing the
new one (`block_ram`).

Each line has its own *row slot* inside the word, so no data has to shift.
The slot that gets written advances by one at every line start. On read, the
slots are put back in age order using the slot number registered with the
read. The slot counter is never reset at a frame start, so the ordering stays
consistent across frames of any height.

Each row slot is cut into segments no wider than 32 bits, the widest data path
of a Spartan-3 block RAM. A remainder is padded to the next power of two: a
48-bit slot becomes 32+16, and the default 168-bit slot becomes 5×32+8. A
segment is write-enabled only while its slot is the one being written, so
every segment is a plain single-port, read-first RAM with no byte enables.
Splitting a segment's depth over several physical block RAMs is left to
synthesis.

## Window position and the image border (`bsc`, `boundary_pixel_switch`)

The newest pixel enters the bottom-right corner of the window. The window
centre therefore trails the input by h = (ω−1)/2 lines and h pixels. The
boundary state controller follows `vsync`/`hsync` to get the column and line
of each incoming pixel, and computes the centre from them. The computation
borrows from the line above and wraps into the previous frame. For every tap,
the controller flags whether the tap's image position is left, right, above
or below the image. This covers every combination of borders that a window can
overlap.

The flagged taps hold pixels from the end of the previous line, the start of
the next line, or another frame. The pixel switch replaces them with one of
two values, selected at run time by `bnd_mode`:

- `BND_CENTRE`: the window's centre pixel, which is always inside the image;
- `BND_CONST`: the value on `bnd_const`.

Every temporal level uses the same mask.

Because the window slides continuously, the windows whose centres are in the
last h lines of a frame come out while the first h lines of the next frame go
in. To get those windows after the last frame, feed h lines plus h+1 more
pixels (for example, the start of another frame).

## Output synchronisation (`output_sync`)

The filter needs frame and line marks that belong to the window *centre*, not
to the newest pixel. `output_sync` delays `vsync`/`hsync` by h·IMG_W + h
pixels. It uses a read-first circular buffer of that many entries, the same
read-then-write cycle as the line buffers. Two more register stages match the
window path. `out_valid` is low for the start-up windows, whose centres are
earlier than the first frame start. From the first frame on, `out_valid` is
high exactly once per input pixel.

## Interface and timing (`rtvps_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | single clock for stream and memory; asynchronous active-low reset |
| `in_valid`, `in_vsync`, `in_hsync`, `in_pix` | in | raster stream: `vsync` on the first pixel of a frame, `hsync` on the first pixel of every line, both qualified by `in_valid` |
| `bnd_mode`, `bnd_const` | in | border replacement source |
| `out_valid`, `out_vsync`, `out_hsync` | out | a window is present; its centre starts a frame / line |
| `out_win[k][r][c]` | out | level *k* (0 = live), row *r* from the top, column *c* from the left |
| `out_lvl_ok[k]` | out | level *k* holds a real frame for this centre |
| `out_cx`, `out_cy` | out | centre position |
| `underrun`, `overrun` | out | sticky: the stream was faster than the memory |
| `sram_addr`, `sram_cen_n`, `sram_we_n`, `sram_dq_o`, `sram_dq_oe`, `sram_dq_i` | | ZBT SRAM; the bidirectional data pad is outside the design |

Timing, with N = NFRAMES:

- **Window latency.** The window that ends with a pixel appears four cycles
  after that pixel: one cycle for the temporal register, then the line-buffer
  read, the window shift and the pixel switch.
- **Centre.** The window's centre entered h lines and h pixels before that
  pixel.
- **SRAM timing.** The SRAM sees the address one cycle after a request. Data
  moves in the bus cycle two edges after the address is sampled. Read data is
  back five cycles after the request.
- **Rates.** Pixels must arrive at most one per cycle and, with N > 1, no
  faster than one every N cycles plus slack. Frames must be exactly
  IMG_W×IMG_H pixels, and IMG_W×IMG_H must be a multiple of BURST.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `IMG_W`, `IMG_H` | 1367, 768 | frame size |
| `OMEGA` | 3 | window width, odd, ≥ 3 |
| `PIX_W` | 24 | bits per pixel |
| `NFRAMES` | 7 | temporal depth, 1..16; with 1 the frame store and its controller are left out |
| `MEM_W` | 36 | SRAM word; one pixel per word |
| `BURST` | 8 | accesses per table entry |
| `FIFO_DEPTH` | 32 | words per FIFO (a choice of this design) |

The package `rtvps_pkg` holds the defaults, the table type (`pat_t`, built by
`default_pat`), the replacement-mode enum, and the sizing functions used for
elaboration checks.

## What follows the original architecture and what is this design's own

The following come from the published architecture:

- The split into a sliding window controller, a video data memory controller
  and a synchronisation block.
- Line buffers grouped into one wide memory object and partitioned into
  ≤32-bit block RAM segments.
- The one-cycle read-then-write circular buffer.
- A boundary controller driven by the sync signals, with replacement by the
  centre pixel or an external constant.
- A FIFO per temporal level, a compile-time access-pattern table, counter
  address generation, and a ZBT SRAM physical controller.
- The default sizes.

The following are choices of this design:

- **Line layout.** The rotating row-slot layout inside the memory object.
- **Shared SLWC.** One sliding window controller shared by all levels.
- **FIFOs.** FIFO depths and the write FIFO.
- **Scheduling.** The table format and the skip-when-not-ready policy.
- **Start-up.** Taking the stream only once the FIFOs are primed, and the
  sticky error flags instead of any recovery.
- **Interfaces.** The sync-mark format, the single clock, and the ZBT
  pipeline timing.
- **Memory words.** One pixel per memory word.
- **Output marks.** Delaying the marks with a block RAM.
- **Reset.** The reset of control state only; memories are not cleared.

Not included:

- an SDRAM path (the original uses a vendor-generated SDRAM controller, which
  can be swapped for the SRAM one);
- the filter core;
- the design-time tool that allocates memory objects to block RAMs (the
  segment split above is its result for this layout);
- sharing one dual-port block RAM between partitions of two different
  segments, one on each port. Every segment here is its own single-port
  memory, so a device may need more block RAMs than the tightest packing.

The original's resource figures are for a specific FPGA and synthesis tool,
so they are not a target for this RTL.

## Verification

Every module has a self-checking testbench in `tb/` that compares against
values computed independently of the RTL. Each testbench ends with a
`TB_RESULT checks=… failures=…` line.

| testbench | what it covers |
|---|---|
| `tb_block_ram` | read-first behaviour, hold while disabled |
| `tb_gmo_line_buffer` | two layouts (48 = 32+16 bits, 2 lines; 40 = 32+8 bits, 4 lines), line order over many lines |
| `tb_bsc` | pixel position, centre and mask for a 5×5 window; all 24 border cases plus the inside case |
| `tb_boundary_pixel_switch` | both replacement modes on random windows |
| `tb_slwc` | 3×3 and 5×5, two levels, idle cycles, mode switching, 3-cycle latency |
| `tb_output_sync` | pre-frame pixels, idle cycles, mark alignment |
| `tb_sync_fifo` | random traffic against a queue |
| `tb_vdmc_addr_ctrl` | every address, burst lengths, FIFO room, no late reads, skips and wrap-around |
| `tb_zbt_sram_ctrl` | back-to-back mixed traffic, 5-cycle read latency, read-after-write |
| `tb_vdmc` | stored levels against earlier frames, level-valid flags, priming, forced underrun |
| `tb_rtvps_top` | end to end at 8×6, 3-frame depth, 5 frames streamed: every window, flags, marks, latency; counts border replacements of both kinds, write/read bursts, skips, store wrap-around |
| `tb_rtvps_top_full` | the same checks at the default size, 8 full 1367×768 frames (about a minute) |
| `tb_rtvps_sweep` | 3×3, 5×5 and 7×7 windows × 1, 3, 5, 7, 9 frames on 16×8 frames |

`tb/zbt_sram_model.sv` is a behavioural ZBT SRAM model, including
read-after-write forwarding, and is used only in simulation.
`tb/rtvps_top_check.svh` is the checker shared by the two end-to-end
benches.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rtvps_pkg.sv tb/tb_rtvps_top.sv --top-module tb_rtvps_top -o sim
./obj_dir/sim
```

Replace `tb_rtvps_top` with any testbench name. The package file must come
first.
