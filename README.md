# Self-checking image pipeline for a star tracker

A star tracker photographs the sky, finds the stars in the picture and
compares them with a catalogue to work out which way a spacecraft points.
Before any star can be identified, the raw camera image has to be cleaned:
impulsive noise removed, the dark background cut away, and the result kept
in memory for the processor that computes star centroids.

This RTL is that pre-processing pipeline, built for an SRAM-based FPGA in
orbit. On such a device a radiation hit can flip a configuration bit and
quietly change what the circuit does. Full duplication (DMR) or triplication
would catch that, but it roughly doubles the logic. Instead, each stage here
carries a small check that follows from what the stage computes. When a check
fails it raises an error line, and the processor (not part of this RTL) drops
the frame and reloads the FPGA. The image memory is protected differently:
it repairs its own single-bit upsets as the frame is read.

```
 pixel stream ─► acquisition ─► median filter ─► threshold ─► image storage ─► processor
 (8-bit, raster)  3x3 window     19-node net       DMR copy     parity + back-up
                      │               │                │        of star pixels
                   error1          error2           error3   (corrects itself)
```

The pipeline takes one 8-bit grayscale pixel per clock. Its default frame is
640 × 480 (VGA).

## Files

| file | contents |
|---|---|
| `rtl/star_tracker_pkg.sv` | pixel, window and stored-word types; image size |
| `rtl/star_tracker_top.sv` | the pipeline; frame addressing; error flags |
| `rtl/acquisition_module.sv`, `rtl/line_fifo.sv` | 3x3 line buffer and its decimated check (error1) |
| `rtl/median_filter.sv`, `rtl/exchange_node.sv` | median network and its range check (error2) |
| `rtl/threshold_unit.sv`, `rtl/threshold_dmr.sv` | background removal, duplicated (error3) |
| `rtl/image_storage.sv`, `rtl/star_encoder.sv`, `rtl/pixel_check.sv`, `rtl/sdp_ram.sv` | protected frame store |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_star_tracker_full.sv` | one full VGA frame at default parameters |
| `tb/star_tb_pkg.sv` | reference model used by the testbenches (sorting, sky generator, expected pixel) |

## Acquisition: the line buffer checks itself (error1)

The median filter needs each pixel together with its eight neighbours. The
pixels arrive one row after another, so the two rows above the current one
must be held back. Two one-line FIFOs (`line_fifo`, 640 pixels each) and nine
registers R0..R8 form the 3×3 window. The new pixel enters R0 and FIFO 1 on
the same clock. FIFO 1 feeds R3 and FIFO 2, and FIFO 2 feeds R6. Each row of
three registers shifts to the right. After push *n*, with L the line length:

```
R0 R1 R2 = p(n)      p(n-1)    p(n-2)
R3 R4 R5 = p(n-L)    p(n-L-1)  p(n-L-2)
R6 R7 R8 = p(n-2L)   p(n-2L-1) p(n-2L-2)       centre R4 = p(n-L-1)
```

**The check.** The structure is a delay line with two parallel branches, so
every pixel passes R2, then R5 L pushes later, then R8 another L pushes
later. A counter with a period of 2L pushes does three things:

- at count 0 it loads detection register DR1 from R2;
- at count L it loads DR2 from R5;
- at the next count 0 it compares DR1, DR2 and R8.

A mismatch means a path through the buffer has changed, and error1 is set.
Only one pixel in 2L is checked. That is enough, because a configuration
upset changes the circuit for good and corrupts most of the pixels that pass
through it afterwards. The cost is two 8-bit registers, a counter and a
comparator. Checking starts once 2L+3 pixels have been pushed, so that every
register holds a streamed pixel and not a reset value or an unwritten FIFO
entry.

## Median filter: the unused outputs bound the median (error2)

The median of nine pixels comes from a network of 19 identical
`exchange_node`s. Each node has one comparator and two 2:1 multiplexers and
outputs the higher (H) and lower (L) of its two inputs. The network works in
four steps:

1. Sort each row of three pixels (nodes 1–9).
2. Take the largest of the three row minima (nodes 10–11) and the smallest
   of the three row maxima (nodes 12–13).
3. Take the median of the three row middles (nodes 14–16).
4. Take the median of those three results (nodes 17–19). The L output of
   node 19 is the median.

This leaves eight node outputs unused. Four of them are the discarded
maxima of nodes 12, 13, 16 and 19, and each of these is always ≥ the median.
The other four are the discarded minima of nodes 10, 11, 15 and 18, and each
of these is always ≤ the median. In a correct circuit these eight are
exactly the eight non-median pixels.

Six more exchange nodes use them to build a range:

- H1–H3 take the smallest of the four high values (the 6th smallest pixel);
- L1–L3 take the largest of the four low values (the 4th smallest pixel).

Two comparators raise error2 when the median lies above the upper bound or
below the lower bound. A fault that moves the median but leaves it inside the
range goes undetected. This is the known blind spot of the method.

The node numbering above is this RTL's own. The published network also has
19 nodes, with the median on the lower output of the last node, but its
wiring drawing was not copied line by line.

## Threshold (error3)

Pixels below the threshold become 0 and all others pass unchanged, so star
intensities survive for centroiding. A pixel equal to the threshold is kept.
This stage is only one comparator and one multiplexer, too small for a custom
check, so it is simply duplicated: `threshold_dmr` compares the two copies
and raises error3 on any difference. A synthesis tool will merge the two
identical copies unless the FPGA flow is told to keep both. Synthesised
without such a constraint, error3 becomes the constant 0.

## Image storage: upsets corrected on read

The frame is kept in block RAM, where radiation flips stored bits rather than
logic. The store protects itself using a property of star images: they are
almost entirely black. A VGA sky image has well under 500 star pixels, less
than 0.2 % of the frame.

**Write.** `star_encoder` stores each pixel as a 9-bit word:

| pixel | stored bits [8:0] |
|---|---|
| background (0) | `0 0000000 0` |
| star (non-zero) | `parity, p[7:1], 1`, with parity = XOR of p[7:1] |

Every star word is then at least three bit flips away from the background
word. In addition, each star pixel is copied unmodified into a small back-up
memory (4096 entries by default), at the next free entry in frame order. The
star's own LSB is lost in the main memory; the back-up copy keeps it.

**Read.** The processor reads the frame in order, starting at address 0 after
`rd_start`. `pixel_check` examines each word. Let `perr` = parity XOR
(XOR of the seven MSBs).

- **star** = (LSB and `perr`) or (not `perr` and any MSB set)
- **error in star** = LSB and `perr`

Every single-bit upset is handled:

- An upset background word has only one bit set, so it is never taken for a
  star. It reads as 0, which removes the upset.
- An upset star word is still a star.
- If the upset hit the seven MSBs or the parity bit, "error in star" is set,
  and the pixel comes from the back-up memory (`rd_corrected`).
- If the upset hit only the LSB, the seven MSBs are intact. The pixel is
  output as stored, with LSB 0.

The back-up entry of a star is found by counting the stars read so far. This
is why reads must be sequential. The back-up RAM is read every cycle at the
*next* value of that counter, so the copy is already waiting when the star
word arrives. Read data comes one cycle after `rd_en`.

Limits:

- A star pixel of value 1 encodes one bit away from background, so the
  threshold should be 2 or more.
- Stars beyond the back-up capacity are not backed up, and
  `backup_overflow` is raised for that frame.
- The back-up memory itself is not protected.

## Top level: streaming, framing and timing

`star_tracker_top` takes a pixel on every cycle with `pix_valid` high.
`pix_sof` marks the first (top-left) pixel of a frame. Idle cycles are
allowed anywhere and freeze the whole front end.

- **Lag.** The window centre lags the newest pixel by one line plus one
  pixel. The filtered value of frame address *a* is therefore written
  IMG_W+1 pushes after pixel *a* arrives. The last IMG_W+1 pixels of a frame
  are stored while the next frame (or any padding) streams in. Frames may
  follow each other directly.
- **Borders.** Windows are formed on the raw stream, so at the image borders
  they take pixels from the neighbouring row, or from whatever was streamed
  before the frame. This is what the bare line-buffer structure does; no
  border handling is added.
- **Lead-in.** The line FIFOs are not cleared by reset. The first frame after
  reset should therefore be preceded by at least IMG_W+1 pixels of any value,
  or its top row depends on the RAM's power-up contents.
- **Latency.** Push → window registers → median register → threshold and
  memory write. `frame_done` is set by the second clock edge after the push
  that completes the last window of a frame.
- **Error lines.** error1..3 are sticky and cleared only by reset, which
  stands for the reconfiguration.
- **One frame buffer.** The store holds one frame (640 × 480 × 9 bits, which
  is exactly 75 36-Kb block RAMs). A frame must be read out before the next
  one overwrites it.

Parameters of the top are `IMG_W` (640), `IMG_H` (480) and `BACKUP_DEPTH`
(4096). The back-up size is this design's choice: one 36-Kb block RAM, sized
well above the expected number of star pixels.

## Where this departs from, or adds to, the original description

These are choices made here where the description is silent:

- pixel framing (`pix_valid`, `pix_sof`) and border behaviour;
- pipeline registers and their latency;
- error flags that stay set until reset;
- the 2L period of the decimated check, and when that check starts;
- the sequential read port, the write-side star counter and the overflow flag;
- the back-up memory size.

Other points:

- The `pixel_check` logic is derived from the required behaviour (correct
  classification under any single upset). The gate-level drawing of the
  original was not used.
- The median network follows the row / extremes / middles decomposition
  described above, not a node-by-node copy of the original drawing.
- Not included: the processor software, the FPGA reconfiguration, the image
  sensor, and the vendor fault-injection IP used to evaluate the design.
- The fault-tolerance figures of the original evaluation (detection rate,
  false positives, reconfiguration rate) come from configuration-memory fault
  injection on the FPGA. They cannot be reproduced in RTL simulation.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_star_tracker_top rtl/star_tracker_pkg.sv tb/tb_star_tracker_top.sv
./obj_dir/Vtb_star_tracker_top
```

Variables that nothing initialises start at random values
(`+verilator+rand+reset+2`); the testbenches do not depend on them.

- **`tb_star_tracker_top`** runs 16 × 12 frames of synthetic sky
  (background noise, impulsive noise, 3×3 stars) with random idle cycles,
  including back-to-back frames and a frame with more stars than back-up
  entries. Every stored frame is compared pixel by pixel with a reference
  median-and-threshold model. It then flips bits in the image memory and
  checks the repairs. Finally it forces a stuck FIFO output, a stuck median
  node and a stuck threshold copy, and checks that each raises its own error
  line and only that one. It counts every mechanism and fails if any of them
  never occurred.
- **`tb_star_tracker_full`** streams one complete 640 × 480 frame at default
  parameters, compares all 307 200 stored pixels, then upsets every star word
  and every 97th word and checks that all of them are corrected. It runs in a
  few seconds.
- The unit testbenches check the small blocks exhaustively: every input
  pair of the exchange node, every pixel/threshold pair, and every code word
  with every single-bit flip. The median filter is checked against a sort on
  30 000 random windows.

Fault injection in the testbenches uses `force` on internal nets and direct
writes to the memory arrays (hierarchical names such as
`dut.u_store.u_main.mem`). Renaming instances requires updating those paths.
