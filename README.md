# Streaming integral image generator with 17-bit word length reduction

A Haar-feature face detector evaluates many rectangle sums inside a small
sub-window (here 20x20 pixels) that slides across the image. Each rectangle
sum takes four lookups in an integral image. The usual hardware keeps an
integral image of the window only. Each time the window moves one pixel to
the right, that approach subtracts the column that left the window from every
one of the 400 elements, so it needs hundreds of subtractors.

This design keeps no such window-relative image. Along each image line it
keeps accumulating to the right, from the first column of the line to the
current column. It never subtracts. The window's integral image is simply
the last 20 accumulated columns, kept in a shift register. A rectangle sum is
a difference of corners, so the part accumulated left of the window cancels.
The catch is that the accumulated values grow without bound along a line.
They are therefore kept in 17 bits and allowed to wrap (see
[Why 17 wrapping bits are enough](#why-17-wrapping-bits-are-enough)). The
whole generator has 20 + 33 adders and no subtractors.

## Data flow

```
 in_pixel ──┬──────────────────────────────► row 19 ┐
            │  pixel_buffer                          │ vertical pixel
            └─► line_buffer[18] ─► ... ─► line_buffer[0]  register
                 (1 line ago)            (19 lines ago)  (20 x 8 bit)
                                                       │
                          vertical_adder_tree (prefix sums down the column)
                                                       │ column sum register
                                                       ▼ (20 x 13 bit)
                 horizontal_adder:  II[0] + column sum  (mod 2^17)
                                                       │
                 ii_buffer:  II[0] ─► II[1] ─► ... ─► II[19] ─► dropped
                                       │
                                 rect_sum (4 corners, mod 2^17)
```

* **Pixel buffer** (`pixel_buffer`, 19 x `line_buffer`). Each line buffer is
  one image line deep (a block-RAM-shaped simple dual-port memory). They
  form a cascade. The incoming pixel is written into line buffer 18. Each
  buffer's old word at the same column moves one buffer up. Line buffer *k*
  therefore holds the line 19-*k* lines above the current one. Reading all 19
  at the current column, plus the current pixel, gives the 20 pixels of one
  window column, top (oldest line) first.
* **Vertical adder tree** (`vertical_adder_tree`). Forms the prefix sums
  `cs[r] = p[0] + ... + p[r]` of that column with a Brent-Kung parallel-prefix
  network: 33 two-input adders, 8 adders deep. A column sum is at most
  255·20 = 5100, which needs 13 bits.
* **Horizontal adders** (`horizontal_adder`). Twenty 17-bit adders add the
  column sums to the previous vertical integral image (register `II[0]`). At
  column 0 of a line the previous value is taken as zero. The carry out of
  bit 16 is dropped.
* **Integral image buffer** (`ii_buffer`). `II[0]..II[19]`, 20 registers of
  20 x 17 bits. On every new column, the new vertical integral image enters
  `II[0]`, everything shifts one place, and `II[19]` is lost. That is
  6,800 flip-flops, most of the design.
* **Rectangle sum** (`rect_sum`). Takes four corners of the window and
  returns `D - B - C + A` in 17 bits. This is the primitive a Haar feature
  evaluator uses. The classifier itself (feature weights, thresholds,
  cascade) is not part of this design.

## Why 17 wrapping bits are enough

Write `S(y, x)` for the exact value the design would hold without
truncation. For window row *r* and image column *x* it is the sum of the
pixels from the window's top line down to row *r*, and from column 0 of the
line to *x*. The register holds `S mod 2^17`. For a rectangle inside the
window:

    sum = S(y1, x1) - S(y0, x1) - S(y1, x0) + S(y0, x0)

The true sum lies in `[0, 255·20·20] = [0, 102000]`. That range is below
2^17 = 131,072. Reduction mod 2^17 commutes with addition and subtraction.
So the same expression evaluated on the truncated 17-bit registers, itself
truncated to 17 bits, equals the true sum exactly. This holds even when the
intermediate results are negative or larger than 2^17, and however many times
each element has wrapped.

Classic word length reduction compares each element against a cutoff and
subtracts the cutoff when it is exceeded. Rectangle sums then need a compare
and a correction. Choosing the cutoff to be exactly 2^17 makes both steps
free: dropping the carry *is* the subtraction of the cutoff, and the 17-bit
wrap of the difference *is* the correction. For example, 131,004 + 122 =
131,126 is stored as 54.

Two consequences for a user of the window:

* The raw elements in `win_ii` are meaningful only modulo 2^17 and only as
  differences. Never compare them against thresholds directly.
* The bound only holds for rectangles that fit in a 20x20 window of 8-bit
  pixels. Widening `WIN` or `PIX_W` requires widening `II_W` to
  `ceil(log2(max_pixel · WIN²))` bits.

## Window and rectangle conventions

`win_ii[a][r]` is the element of column age *a* and window row *r*:

* `a = 0` is the newest (rightmost) column and `a = 19` the oldest.
* `r = 0` is the top, oldest line.

When `win_valid` is high, `win_x` and `win_y` give the image column and line
of `win_ii[0][19]`.

A rectangle query `rect_t {y0, y1, x0, x1}` uses *window column* numbers
`c = 19 - a`, with 0 the leftmost column. It returns the sum of:

* window rows `y0 .. y1-1`, where `0 <= y0 <= y1 <= 20`;
* window columns `x0+1 .. x1`, where `0 <= x0 <= x1 <= 19`.

Rows need no column above the window, because the vertical accumulation
starts at the window's top line. Columns do need the column to the left of
the rectangle, and the buffer holds only 20 columns. So a rectangle can
cover window columns 1..19 (up to 20x19 pixels). The leftmost column of the
window can only appear as the left boundary.

## Interface and timing (`integral_image_generator`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of counters and valid flags |
| `in_valid` | in | 1 | `in_pixel` is valid this cycle; gaps of any length are allowed |
| `in_sof` | in | 1 | with `in_valid`: this is pixel (0,0) of a frame |
| `in_pixel` | in | 8 | grayscale pixel, raster order |
| `win_valid` | out | 1 | one-cycle pulse: `win_ii` holds a complete window |
| `win_x`, `win_y` | out | 10, 9 | image position of the newest column's bottom element |
| `win_ii` | out | 20x20x17 | the window's integral image |
| `rect_valid`, `rect` | in | 1, 20 | rectangle query on the window as it is in this cycle |
| `rect_out_valid`, `rect_out_sum` | out | 1, 17 | answer, one cycle later |

The design takes one pixel per cycle and produces one window per pixel. For
a pixel presented in cycle *t*, the window that ends at that pixel is in
`win_ii` with `win_valid` high in cycle *t+3*. The three stages are:

1. the vertical pixel register;
2. the column sum register;
3. `II[0]` and the shift of `ii_buffer`.

`win_valid` is raised only once 20 lines of the frame and 20 columns of the
line have been seen (`x >= 19`, `y >= 19`). Earlier windows contain data from
the previous line or frame.

The window registers change only when a new pixel's column arrives. A
consumer that needs many rectangle queries per window can stall the input
(`in_valid` low) and query the held window for as long as it likes.

The raster position comes from internal counters, which wrap at
`IMG_W`/`IMG_H`. `in_sof` restarts them, so a frame may be cut short.

Two assertions guard the interface. `in_sof` may only be high together with
`in_valid`. A rectangle query must satisfy the bounds given above.

## Parameters

| name | default | where |
|---|---|---|
| `WIN` | 20 | window height and width (`iig_pkg`; module parameters default to it) |
| `II_W` | 17 | element width, see above |
| `PIX_W` | 8 | pixel width |
| `IMG_W`, `IMG_H` | 640, 480 | image size. These are this design's choice; the source of the architecture gives no resolution. `IMG_W` sets the line buffer depth. |

A 640-pixel line buffer fits one 18 Kbit FPGA block RAM (lines up to 2,304
pixels do), so the pixel buffer maps to 19 block RAMs.

## Relation to the published architecture, and own choices

Taken from the published architecture:

* the four blocks and their order;
* 19 line buffers feeding 20 vertical pixels;
* cumulative sum down the column;
* 20 horizontal adders into a shifting 20-column buffer whose oldest column
  is dropped;
* the 17-bit elements with the carry discarded;
* 17-bit rectangle sums with no compare or correction.

This design's own choices:

* **Vertical adder tree structure.** The published architecture states only
  the function and counts 35 adders for the tree. This design uses a
  Brent-Kung network with 33 adders.
* **Cascade direction and top-to-bottom order.** The published figure does
  not fix which line buffer receives the input, nor which end the cumulative
  sum starts from. Here line buffer 18 takes the input, and the sum runs
  from the top (oldest) line.
* **Interface and timing.** The stream interface (`in_valid`, `in_sof`), the
  image size and the register stage of each block are chosen here.
* **Restart at each line.** The horizontal accumulation restarts at column 0
  of every line. Modular arithmetic would give correct rectangle sums
  without the restart, but with it the window elements equal an ordinary
  integral image reduced mod 2^17, which is easier to check and debug.
* **Rectangle query port.** Its encoding and its one-cycle output register
  are chosen here.

After synthesis the generator has about 7,140 flip-flops: 6,800 in the
window, 160 vertical-pixel bits, 260 column-sum bits, and counters. That is
close to the roughly 7,500 registers reported for the published FPGA
implementation. The upper bits of the first few column sums are constant
(for example, `cs[0]` never exceeds 255). Synthesis removes them.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | checks |
|---|---|
| `tb_line_buffer` | random reads and writes against a reference array; 1-cycle latency; read-first on address collision |
| `tb_pixel_buffer` | 30 lines of random pixels with gaps; every column of 20 vertical pixels from line 19 on |
| `tb_vertical_adder_tree` | random, all-255 and all-0 columns against a running sum |
| `tb_horizontal_adder` | random and extreme operands against an exact sum mod 2^17; the 131,004 + 122 → 54 example |
| `tb_ii_buffer` | random shifts against a list of the last 20 columns |
| `tb_rect_sum` | windows built with arbitrary wrapped offsets; random and maximal rectangles against exact pixel sums |
| `tb_integral_image_generator` | 48x24 image, three frames (the first cut short), random input gaps |
| `tb_iig_full` | the default 640x480 design, one cut-short frame, then one complete frame |

The last two share `iig_e2e_harness`. The harness computes an exact
integral image of each frame. It checks all 400 elements of every reported
window, modulo 2^17, together with the window's position and its 3-cycle
latency. It issues a random rectangle query on every window and compares the
answer with the exact sum.

The harness also counts input stalls, element wraps, rectangle sums whose
corner arithmetic left `[0, 2^17)`, line restarts and frame restarts. It
fails if any of them never occurred. The full-size run checks about
288,000 windows and 116 million values, and takes seconds.

To run one, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/iig_pkg.sv \
    tb/tb_integral_image_generator.sv --top-module tb_integral_image_generator
./obj_dir/Vtb_integral_image_generator
```

Replace the testbench name to run the others. `tb_iig_full` takes the design
with no parameter overrides.

## Limits

* The Haar classifier that would consume the window is not included. The
  window (`win_ii`) and the rectangle-sum port are where it would attach.
* `win_ii` is a 6,800-bit output. A real classifier would sit next to
  `ii_buffer` and read selected elements rather than route the whole window.
* `line_buffer` contents and the window registers have no reset. Only the
  valid flags and counters are reset. Outputs before the first 20 lines of
  a frame are marked invalid rather than cleared.
