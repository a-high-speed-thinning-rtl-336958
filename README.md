# Variable-width streaming thinning processor

Thinning reduces the strokes of a binary character image to lines one pixel
wide while keeping their shape: their connections, branches and end points.
It is the usual step before feature extraction in character recognition.
This design does one complete thinning iteration in a single pass over a
pixel stream. The image enters in raster order, one pixel per clock. A
small window slides over it, and a bank of template decoders decides for
every pixel whether it survives. No frame buffer is needed and there is no
per-pixel control. The processor has only one setting: the image width. It
can be set to any value from 25 to 40 pixels with a single register write,
so images need not be rescaled to a fixed width first.

The template set is a one-pass parallel algorithm with two changes that
keep end points and connectivity:

- The trimming (noise-removal) templates that would eat the end of a stroke
  now check extra pixels.
- Two longer windows, 1x4 and 4x1, keep strokes that are two pixels thick
  from disappearing.

```
 pix_in ──► neighbor_gen ──win[4][4]──► thinning_logic ──► reg ──► pix_out
              ▲  (3 line delays + 4-bit SR)                           hit_out
              │ sel
          width_reg ◄── width_wr / width_data   (host)
```

## Files

| file | contents |
|---|---|
| `rtl/thin_pkg.sv` | window type `win_t`, status struct `hit_t`, width range constants |
| `rtl/width_reg.sv` | host-written image-width register |
| `rtl/line_delay.sv` | 40-stage shift register with a 16-input width multiplexer |
| `rtl/neighbor_gen.sv` | three line delays and a 4-bit shift register forming the 4x4 window |
| `rtl/thinning_logic.sv` | combinational template decoder |
| `rtl/thinning_processor.sv` | top level |
| `tb/thin_ref_pkg.sv` | software reference of one pass, plus synthetic test glyphs |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_table1_workloads` |

## The 4x4 window and variable width

Each line delay is a 40-stage shift register. A 16-input multiplexer taps it
at stage `width-1`, one tap for each width from 25 to 40. The pixel that
leaves the multiplexer is therefore exactly one image line older than the
pixel entering the delay. Three line delays are chained, followed by a
4-bit shift register. The first four stages of each line delay, together
with the 4-bit register, hold four vertically adjacent lines of four
adjacent pixels each.

In `thin_pkg::win_t` the window is indexed `w[row][col]`. Row 0 is the
oldest (top) line and column 0 the oldest (left) pixel. After a strobe,
`w[r][c]` holds the pixel that entered `(3-r)*W + (3-c)` strobes earlier.
The pixel being decided is the centre `w[1][1]`. Its 3x3 neighbourhood is
rows 0-2 and columns 0-2. Row 3 and column 3 hold the extra pixels below
and to the right that some templates need. Changing the width changes only
the multiplexer select. Nothing else in the datapath depends on it.

The window does not know where a line ends. Near the left or right edge it
wraps onto the neighbouring line. **Images must therefore carry a blank
border of at least one pixel on every side.** With that border, the wrapped
pixels are always blank and the result is the same as for an image
surrounded by zeros. An image narrower than 25 pixels is padded with blank
columns up to 25.

## Templates

`thinning_logic` evaluates every template in parallel on the unmodified
window, so one pass is one parallel iteration. A template cell of `1` must
be set, `0` must be clear, and `x` is a don't-care. The pixels named by
number in the conditions are in these positions:

```
 P7  n   P9  P13
 w   C   e   P14
 P5  s   P3  P15
 P10 P11 P12
```

**Thinning templates.** The centre is removed if any of these matches:

```
 boundary                                   corner
 (a)   (b)   (c)   (d)                      (e)   (f)   (g)   (h)
 000   01x   x1x   x10                      x00   00x   x1x   x1x
 111   011   111   110                      110   011   011   110
 x1x   01x   000   x10                      x1x   x1x   00x   x00
```

**Saving windows.** A thinning match is cancelled if either of these
matches:

- the centre row reads `0 1 1 0` (`w`, `C`, `e`, `P14`);
- the centre column reads `0 1 1 0` (`n`, `C`, `s`, `P11`).

This keeps strokes that are two pixels thick: without it, both of their
sides would be removed in the same pass.

**Trimming templates.** The centre is removed if any of these matches,
whatever the saving windows say. The first six are end-point templates.
Each requires extra pixels, so a clean stroke end is not eaten away:

```
 (a) 000   P3+P5 = 1      (b) 00x   P9+P3 = 1      (c) x1x   P7+P9 >= 1
     010                      011                      010
     x1x                      00x                      000

 (d) x00   P5+P7 >= 1     (e) 000   P10+P11+P12 > 0  (f) 001   P13+P14+P15 > 0
     110                      010                        011
     x00                      111                        001
```

The other four remove a pixel whose only neighbour is a single diagonal
one: only the SW, only the SE, only the NE or only the NW neighbour is set.

The sums are integer sums. In (a) and (b), exactly one of the two corner
pixels must be set. In (c) and (d), at least one must be. The case where
both corners are set in (a) or (b) is handled by (e) or (f), which look one
row or column further out.

The final result for a pixel is:

```
pix = C & !((thin & !save) | trim)
```

The status flags `hit_out` show, for the pixel on `pix_out`, whether a
thinning template matched (`thin`), a saving window matched (`save`), a
trimming template matched (`trim`), and whether the pixel was cleared
(`remove`).

## Interface and timing (`thinning_processor`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset: clears the delay lines and the output, sets the width to 40 |
| `width_wr`, `width_data` | in | 1, 6 | write the image width; values outside 25..40 are clamped; takes effect on the next clock |
| `pix_en`, `pix_in` | in | 1, 1 | pixel strobe and pixel; one pixel is taken on each clock with `pix_en`=1 |
| `pix_out` | out | 1 | result for the pixel given 2*W+3 strobes earlier; changes only on strobes |
| `hit_out` | out | 4 | `thin_pkg::hit_t` flags for the pixel on `pix_out` |
| `width` | out | 6 | current width |

Parameters `MIN_WIDTH` (25) and `MAX_WIDTH` (40) set the range. The
multiplexer has `MAX_WIDTH-MIN_WIDTH+1` inputs.

One iteration is done as follows:

1. Write the width. Change it only between images.
2. Stream the H x W pixels.
3. Stream 2*W+3 blank pixels to flush the pipeline.
4. Discard the first 2*W+3 values of `pix_out`. The next H*W values are
   the thinned image in raster order.

Further iterations stream the result back in. With `pix_en` held high, a
pass takes H*W + 2*W + 3 clocks. Taking the strobe low freezes the whole
pipeline, so a slow host can pace the stream.

Sizes (yosys coarse synthesis of the top): 135 flip-flops. Of these, 120
are the three 40-stage line delays. The rest are 4 for the top window
register, 6 for the width register and 5 for the output and status. The
template logic is about 110 word-level cells (mostly 1-bit AND/OR).

## Origin of the design, and what was chosen here

The following come from the published design of this processor:

- the width register set by one host write;
- three shift registers, each with a switchable 16-input width multiplexer,
  and a 4-bit shift register, forming a 4x4 window for widths 25-40;
- the template decoder between them;
- all template cells, and the conditions on P3-P15.

The original was built from programmable logic and TTL parts on a PC
add-on board. The host PC streamed the image and repeated the passes.

The following were chosen for this design and are not taken from that
source:

- **Pixel strobe and throughput.** `pix_en` lets a host pace the stream;
  at full rate there is one pixel per clock. The original's bus timing is
  not modelled.
- **Output register.** There is one register after the template logic.
  The latency is 2*W+3 strobes, and the host flushes the pipeline.
- **Blank border and edges.** The hardware does not handle line ends.
  Images need a one-pixel blank border.
- **Which trimming templates remain.** Four of the original eight trimming
  templates are replaced by the six end-point templates above. The four
  single-diagonal templates are kept.
- **Trimming wins over saving.** The 1x4/4x1 windows cancel only thinning
  matches.
- **Sum conditions.** They are read as integer sums: `=1` means exactly
  one, `>=1` and `>0` mean at least one.
- **Pixel names.** Only P3, P5, P7, P9 and P10-P15 have fixed positions.
  The other neighbours are named by compass direction.
- **Width register.** Out-of-range writes are clamped. Reset sets the
  width to 40, and all delay lines are cleared on reset.
- **Status output.** `hit_out` is added for monitoring.

## Measured workloads

The original processor was measured on these images:

| image | size | iterations |
|---|---|---|
| `g` | 22x28 | 3 |
| `e` | 34x30 | 7 |
| `T` | 40x35 | 5 |
| a Chinese character | 38x38 | 4 |
| an unnamed image | 32x30 | 4 |

All of these fit: the widths are within 25-40, and the 22-pixel `g` is
padded to 25. `tb_table1_workloads` runs images of these sizes and
iteration counts. The original scans are not available, so the images are
synthetic glyphs with strokes several pixels thick. The bench also
checks that thinning leaves the number of 8-connected strokes of each
image unchanged. The run takes 4 to 7
passes per image. For example, the 38x38 image takes 4 x 1523 = 6092 clocks,
which is 0.3 ms at 20 MHz with one pixel per clock. The original board
needed about 2.8 ms, limited by the PC's transfers.

## Verification

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`.

- `tb_thinning_logic` applies all 65,536 possible windows. It compares the
  output and the flags with a reference that encodes each template as a
  string.
- `tb_line_delay` and `tb_neighbor_gen` stream random pixels with random
  strobe gaps at all 16 widths. They check every window cell and the
  multiplexer output against a recorded history of the stream.
- `tb_width_reg` checks all 64 possible write values, the clamping, the
  hold behaviour and the reset value.
- `tb_thinning_processor` is the end-to-end test at the default
  parameters. It plays the host across several images and iterations, with
  width switches, an out-of-range width, strobe gaps and a template-gallery
  image. It compares every pass with the reference in `tb/thin_ref_pkg.sv`
  and checks the clock count per pass. It fails if any mechanism never
  happened: a thinning removal, a saving window, each of the ten trimming
  templates, a width switch, a clamp or a strobe gap.
- `tb_table1_workloads` runs the measured image sizes described above.

The reference model is the specification these tests check against. It
shares the template reading, and so the readings listed above, with the
RTL.

To run one testbench with plain Verilator, from the project root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_thinning_processor -y rtl -y tb +libext+.sv -Irtl \
  rtl/thin_pkg.sv tb/thin_ref_pkg.sv tb/tb_thinning_processor.sv \
  --Mdir obj -o sim && obj/sim
```

The end-to-end benches print every thinned image as text, so the skeletons
can be inspected.

## Limits

- The thinned results here come from synthetic glyphs. Skeleton quality
  has not been compared with the original measurements.
- The template reading has two open points:
  - the condition symbols (whether `=1` means exactly one);
  - whether the saving windows also veto trimming.

  If either is read the other way, only `thinning_logic.sv` and the
  reference package need to change.
- There is no bus interface to a host computer. A wrapper has to provide
  the width write, the pixel strobe and the flush.
