# Vehicle detector: FPGA frame engine

This design counts vehicles that cross a window of a traffic camera image.
The window is 128 x 256 pixels. For each new frame it measures how much of the
window differs from a stored picture of the empty road. When that amount
reaches a local maximum over time, a vehicle is at its point of deepest
intrusion, and one is counted.

The work is split between a host PC and an FPGA board on the PCI bus.
The board has a byte-wide 512 kB SRAM. The host program cuts the window out of
each camera frame, sends it to the board and reads the result. The FPGA
(this RTL) does the per-pixel arithmetic:

- low-pass filtering
- the comparison with the reference image
- thresholding
- counting the changed pixels
- the per-frame decision

The FPGA signals the end of each frame with an interrupt.

## The per-frame computation

Every pixel is an 8-bit value, 0 to 255. For frame *i*:

| step | operation | where |
|------|-----------|-------|
| τ1 | luminance `Y = [0.299 R + 0.587 G + 0.114 B]`, nearest integer, halves up | `rgb2y` (optional, on the loading path) |
| τ2 | 3x3 mean `F = round(sum of the 9 neighbours / 9)`; border pixels are dropped | `mean_filter3x3` |
| τ3 | `C = |F - I|`, where `I` is the reference image | `diff_threshold` |
| τ4 | `B = 1` if `C >= h`, else 0; `h` = 80 after reset | `diff_threshold` |
| τ5 | detection index `d_i` = number of `B = 1` pixels over the 126 x 254 interior | `detection_index` |
| event | `present = d_i >= A`; frame *i-1* is a peak if `d_{i-1} > d_{i-2}`, `d_{i-1} > d_i` and `d_{i-1} >= A`; each peak counts one vehicle. `A` = 1000 after reset | `event_detector` |

The reference image `I` must already be gray and filtered in the same way
(3x3 mean on the interior) before the host loads it. This reference fitting
is the host's job. The engine only reads the reference.

### Exact arithmetic

- **Luminance.** Three constant multiplications by 19-bit fractions:
  `Y = (156763 R + 307758 G + 59769 B + 262142) >> 19`.
  These constants give exactly `floor((299 R + 587 G + 114 B + 500) / 1000)` for
  all 2^24 inputs, so the result equals the decimal definition with no error.
- **Divide by nine.** `(sum + 4) * 7282 >> 16`. This equals `floor((sum + 4) / 9)`
  for every sum from 0 to 2295. A sum divided by nine never ends in exactly
  one half, so this is plain round-to-nearest.
- **Detection index.** 16 bits. The largest value is 32,004. The counter
  saturates rather than wraps.

## How a frame moves through the engine

```
 host ── PCI bridge ── local bus ──► host_interface ──(writes)──┐
                                       │  start / irq            ▼
                                       ▼                     SRAM (512 kB)
                               frame_sequencer ◄──(reads)────┘
                                       │ pixel + reference pixel
                                       ▼
                 mean_filter3x3 ─► diff_threshold ─► detection_index ─► event_detector
                  (ref as tag)      |F-I| >= h          sum of B          peak / count
```

**SRAM map.** The frame is at address 0 and the reference image at 32,768.
Both are stored row by row. This leaves 448 kB unused.

**Ownership.** While a frame is processed, the sequencer owns the SRAM and
only reads it. At all other times the host interface may write it. A host
write to the data port during processing is not lost. The bus is stalled
(`lb_ready` low) until the frame ends. The host may therefore start loading
the next frame as soon as it has started the current one.

**Read schedule.** The SRAM has one byte-wide port, and each interior output
needs two pixels: the frame pixel and the reference pixel at the same place.
The sequencer walks the frame in raster order:

1. In `RD_FRAME` it reads frame pixel *(r, c)*.
2. If that pixel completes the 3x3 neighbourhood of an interior pixel
   (*r >= 2* and *c >= 2*), the sequencer goes to `RD_REF`.
3. In `RD_REF` it reads the reference pixel of the neighbourhood's centre,
   at *(r-1, c-1)*.
4. Only then is the frame pixel pushed into the filter, with the reference
   pixel beside it.

The reference is read late on purpose: it is needed only once the window
centred on it is complete.

**Keeping the reference aligned.** `mean_filter3x3` has a sideband `tag`
input. The tag is returned together with the filtered value of the window
that the tagged pixel completed. The reference pixel is passed in as the tag.
It therefore reaches `diff_threshold` in the same clock as the filtered value
of its own position, with no delay line to keep in step with the filter's
latency.

**Filter.** Two line buffers of 256 bytes keep the two previous rows. A 3x3
register window shifts by one column per pushed pixel. Results appear two
clocks after the push, and only for interior windows. The filter follows its
position with its own row and column counters, restarted by `in_sof`. Pixels
may arrive with gaps.

**Timing.** A frame takes:

- reading: `ROWS*COLS + (ROWS-2)*(COLS-2)` = 64,772 clocks
- pipeline drain and interrupt: 8 clocks

That is 64,780 clocks from the start write to `irq`, or 1.62 ms at the
board's 40 MHz. This is measured in simulation.

Loading a 32 kB frame over the PCI bridge's 3 MB/s path takes about 10.9 ms.
One frame every 66.7 ms (15 frames/s) leaves a wide margin. The published
implementation spent about 1.44 million clocks (36 ms) on processing. The
schedule here is this design's own.

## The event decision

`event_detector` keeps the last two indices. When `d_i` arrives it makes two
decisions:

- whether frame *i* shows something large enough (`present`)
- whether frame *i-1* was the peak of a passage (`peak`)

A peak is therefore reported one frame late, with the frame after it. The
peak must be strictly greater than both neighbours. A plateau of two equal
values is not counted. A peak below the minimum area `A` is also ignored.
This rejects small blobs, but a very faint vehicle goes uncounted.

Before the first frame, and after a clear, the history reads as zero. A
vehicle already in the window at the first frame is therefore counted when
its index falls.

`peak_d` holds the index of the most recent peak. `count` is the number of
vehicles since the last clear.

## Host interface

Byte registers on an 8-bit local bus. The bus signals are `lb_cs`, `lb_we`,
`lb_addr[3:0]`, `lb_wdata`, `lb_rdata` and `lb_ready`. The requester holds
`lb_cs` until it sees `lb_ready`. The access happens in that clock, and read
data is valid in it.

| addr | name | access | meaning |
|------|------|--------|---------|
| 0 | CTRL | W | bit0 start frame, bit1 clear history and count, bit2 acknowledge irq |
| 1 | MODE | R/W | bit0: data port takes R,G,B triplets and stores their luminance |
| 2 | STATUS | R | bit0 busy, bit1 irq, bit2 present, bit3 peak (of the last result) |
| 3-5 | PTR0-2 | R/W | 19-bit SRAM write pointer |
| 6 | DATA | W | write a byte (or one byte of a triplet) at PTR; PTR advances per stored pixel |
| 7 | THRESH | R/W | binarisation threshold h (reset 80) |
| 8-9 | AREA0-1 | R/W | minimum area A (reset 1000) |
| A-B | DIDX0-1 | R | last detection index d_i |
| C-D | COUNT0-1 | R | vehicle count |
| E-F | PEAKD0-1 | R | index of the last peak |

Writes to DATA, and start requests, stall while a frame is in progress.

A typical host sequence:

1. Load the fitted reference once: PTR = 32768, then 32,768 DATA writes.
2. For each frame, load the frame: PTR = 0, then DATA writes. Use MODE = 1
   to send colour pixels as R,G,B triplets.
3. Write CTRL = 1 to start the frame.
4. Wait for `irq`.
5. Read DIDX, STATUS and COUNT.
6. Write CTRL = 4 to acknowledge the interrupt.

In colour mode a pixel passes through `rgb2y` and is written to the SRAM two
clocks after its blue byte. In gray mode it is written one clock after its
byte.

**SRAM pins.** The top drives:

- `sram_addr`
- `sram_dout` (data to drive on the chip's data pins while `sram_we_n` is low)
- `sram_we_n`
- `sram_oe_n`

It reads `sram_din` in the same clock as the address. This assumes an
asynchronous SRAM whose access time is less than one 25 ns period. Writes are
one clock long. The bidirectional pad and the chip-enable are left to the
board-level wrapper.

## Files

| file | content |
|------|---------|
| `rtl/vd_pkg.sv` | sizes, reset values, register map |
| `rtl/vehicle_detector_top.sv` | the engine: wiring, SRAM ownership, bus-rule assertion |
| `rtl/host_interface.sv` | register file, loading path, interrupt |
| `rtl/rgb2y.sv` | luminance converter |
| `rtl/frame_sequencer.sv` | SRAM read schedule and pixel stream |
| `rtl/mean_filter3x3.sv` | line buffers, 3x3 window, divide by nine |
| `rtl/diff_threshold.sv` | absolute difference and threshold |
| `rtl/detection_index.sv` | per-frame sum |
| `rtl/event_detector.sv` | minimum area, local maximum, counter |
| `tb/sram_model.sv` | behavioural SRAM, simulation only |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus two whole-system runs |

All parameters default to the full size: 128 x 256 pixels and a 19-bit SRAM
address. The window size can be changed through `ROWS`/`COLS` on the top.
The row and column counters use `$clog2` of them. The pointer registers
assume `AW` of 17 to 24 bits.

## Verification

Every testbench checks its module against values computed independently in
the testbench. Each prints `TB_RESULT checks=N failures=M`, and each has a
watchdog.

- `tb_rgb2y` compares the converter with the decimal formula on corner values,
  a gray sweep and 20,000 random colours.
- `tb_mean_filter3x3` checks every output of a 6 x 10 image fed with gaps, and
  of a full 128 x 256 image. It checks the value, the tag, `out_last`, the
  output count and the two-clock latency.
- `tb_diff_threshold`, `tb_detection_index` and `tb_event_detector` check edge
  cases (C = h, a plateau, a peak below the area, clear) and random data.
- `tb_frame_sequencer` runs the full-size schedule over an SRAM model and
  checks every push and the exact read time.
- `tb_host_interface` checks the registers, gray and colour loading, the
  stall, the pulses and the interrupt.
- `tb_vehicle_detector_top` is the whole engine at its default size. Twelve
  frames go through the local bus only, and each is compared with a software
  model of the whole computation. The run includes a colour frame, a write
  stalled during processing, a threshold change, a clear, present and absent
  frames, and four counted vehicles. Each frame is also checked to take
  exactly 64,780 clocks, within the 1,440,180-clock budget.
- `tb_detection_sequence` is a 34-frame run shaped like a real recording. It
  has ten quiet frames with noise blobs, a car over frames 10-12, a fainter
  vehicle at 13, and large objects at 20-22 and 29-31. Exactly four vehicles
  must be counted, at frames 11, 13, 21 and 30. The frames are synthetic.

Run any testbench with plain Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/vd_pkg.sv tb/tb_vehicle_detector_top.sv --top-module tb_vehicle_detector_top
./obj_dir/Vtb_vehicle_detector_top
```

The full-size system tests build in about 30 s and run in a few seconds.

## Departures and open points

- **Where τ1 sits.** The per-frame operation count of the published design
  includes the colour conversion. Yet the frame it transfers is a 32 kB gray
  image. Here the converter sits on the loading path, so the SRAM and the
  engine always see gray pixels. A host that converts in software writes gray
  bytes instead.
- **Rounding of the mean.** The filter rounds to nearest. The published
  formula gives no rounding rule for the division by nine.
- **Counting in hardware.** The vehicle counter and the minimum-area gate on
  peaks are this design's. The published system displays the count on the
  host but does not say where the count is kept.
- **This design's own choices.** The register map, bus handshake, SRAM map,
  read schedule and reset behaviour (asynchronous, active low; memories are
  not reset) are all this design's choices.
- **Outside the RTL.** The PCI bridge chip, the SRAM chip, the video digitiser
  and the host program are not part of the RTL. The top brings out the bridge's
  local bus and the SRAM pins.
- **Not tested on real recordings.** Detection quality was tested only on
  synthetic scenes. The thresholds 80 and 1000 are the published values for
  one particular camera and window.
