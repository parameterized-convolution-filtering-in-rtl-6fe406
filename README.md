# Bit-serial m×m convolution pipeline

This is a streaming 2-D convolution filter for raster-scan images:

    V'(x,y) = Σ C(i,j) · V(x+i, y+j)

Each output pixel is a weighted sum over an m×m window. The pipeline reads every input
pixel exactly once, however large the window, and produces one output pixel per input
pixel. That is as much parallelism as the pixel I/O rate allows. The arithmetic is
**bit-serial**: a pixel takes 16 clock cycles ("bit times") to pass any point, least
significant bit first. So a multiplier is a column of 8 one-bit slices, an adder is one
full adder with a carry flip-flop, and a one-pixel delay is a 16-bit shift register. The
whole filter is generated from a few small cells, and `KERNEL_M` sets the kernel size.
The default is 3×3.

At the default sizes the filter uses 9 multipliers, each built from 8 slices, plus 9
serial adders, 7 one-pixel delays, 2 line delays of 637 sixteen-bit words each and one output
register. After synthesis that is about 1000 word-level cells, 490 flip-flops and
32 Kbit of RAM.

## Data flow

```
              y (serial pixel, lsb first, 8 data bits + 8 zeros)
      ┌─────────┬─────────┬────────── … ──────────┬─────────┐
     [×C0]     [×C1]     [×C2]     [×C3] …       [×C7]     [×C8]
      │         │         │         │             │         │
1/2 ─(+)─Δ────(+)─Δ────(+)─Δ─Δ(L-3)─(+)─Δ … ─Δ───(+)─Δ────(+)─► result_register ─► pix_out
```

* **Multipliers.** All m² multipliers receive the same serial pixel. Multiplier *j*
  holds coefficient C*j*, which is loaded from the shared coefficient bus `coef_x` when
  `ldc[j]` is high.
* **Adder chain.** Adder *j* adds its multiplier's product to the partial sum that
  arrives from its left neighbour.
* **Δ, the one-pixel delay.** It sits after every adder and holds the partial sum for
  16 clocks. The sum therefore meets the next adder together with the product of the
  *next* pixel, so adjacent coefficients see adjacent pixels of a row.
* **Δ(L−m), the line delay.** It follows the Δ of the last adder in each kernel row and
  adds `LINE_LEN − KERNEL_M` pixel times. One row end therefore adds `LINE_LEN − KERNEL_M
  + 1` pixel times. The sum then reaches the first adder of the next kernel row just as
  that adder multiplies the pixel one image line below the first pixel of the row before.
* **The chain head.** The first adder starts from the constant ½ (0x0080). Truncating the
  final sum to 8 bits therefore rounds it to the nearest value instead of rounding down.

C0 weights the oldest pixel of the window, which is its top-left corner. C(m²−1) weights
the newest pixel, the bottom-right corner. The output for the window whose newest pixel is
*n* is

    sum(n) = 0x0080 + Σ_{r,c < m} C[r·m + c] · P[n − (m−1−r)·L − (m−1−c)]   (mod 2^16)
    pix(n) = sum(n)[15:8]

P[k] is the k-th pixel in raster order. The window is a plain raster window: near the
left edge it wraps around to the end of the previous line. The design does no special
border handling.

## Number formats

| quantity | format |
|---|---|
| pixel | 8-bit unsigned |
| coefficient | 8-bit two's complement, value = code / 256 (−0.5 … +0.496) |
| product, partial sum | 16-bit, 8 fraction bits, modulo 2^16 |
| output pixel | bits [15:8] of the final sum |

`FRAC_BITS` (default 8) sets where the binary point sits. The 16-bit sums wrap around and
nothing saturates. A kernel whose weights add up to one keeps a 0…255 image inside the
range. A kernel with large or negative weights can wrap, and a negative sum comes out as
a large pixel value. A single coefficient can be at most 127/256, so a kernel such as
"identity" or a sharpening kernel with a centre weight above ½ cannot be represented at
this scale. Lower `FRAC_BITS` for those, and `pix_out` then takes bits
[FRAC_BITS+7:FRAC_BITS].

## The serial-parallel multiplier (the subtle part)

`sp_multiplier` stacks `COEF_W` copies of `sp_mult_stage`. The stage for the lowest bit
is at the bottom and the sign-bit stage is at the top. Stage *i* stores coefficient bit
c_i. In every bit time it adds three terms in a full adder:

* c_i AND y_t,
* the sum bit `p_in` from the stage above,
* its own carry from the previous bit time.

The sum is registered and passed down on `p_out`, and the carry is registered and fed
back into the same stage. The partial sum moves down one stage per clock, while y moves
up one bit weight per clock. Terms of equal weight therefore always meet in the same
adder:

* the sum from stage i+1 computed at time t−1 has weight 2^(i+t),
* the new partial product c_i·y_t has weight 2^(i+t),
* the carry stage i made at t−1 also has weight 2^(i+t).

The bottom stage's sum flip-flop delivers product bit *t* one clock after pixel bit *t*
was on `y`. Padding the 8-bit pixel with 8 zero bits lets all 16 product bits come out
before the next pixel begins.

Two points depend on the framing of the words:

* **Word boundaries.** In bit 0 of a word (`first` high) every stage ignores `p_in` and
  its carry. Those still hold the high-order part of the previous product, which lies
  beyond bit 15 and is thrown away. No separate reset pulse is needed between pixels,
  and words follow each other back to back.
* **Sign of the coefficient.** The top stage carries weight −2^7. It adds the *inverted*
  partial product and starts every word with a carry of 1. Over the 16 bit times this
  adds 2^7·(2^16 − 1 − Y) + 2^7 ≡ −2^7·Y (mod 2^16), which is exactly the sign bit's
  share of the product. The pixel is unsigned, so no sign extension of `y` is needed.

The serial adders clear their carry in the same way, one clock later, because the product
streams are one clock behind `y`.

## Timing

* `word_timer` counts 16 bit times freely from reset. `word_start` is high in the cycle
  where bit 0 of a pixel must be on `y`. After that come bits 1–7, then eight zeros.
  There is no stall or valid input: a pixel enters every 16 clocks.
* Coefficients must be loaded before the image starts. Loading changes a multiplier in the
  middle of a word, so load while the pixel on `y` is zero. The product of a zero pixel is
  zero whatever the coefficient is, as the test benches rely on.
* The result for the window with newest pixel *n* appears on `sum_out`/`pix_out` with
  `pix_valid` high for one clock. That clock is the second bit time of pixel n+1's word,
  17 clocks after bit 0 of pixel n entered. `sum_serial` shows the same sum leaving the
  last adder, lsb first.
* **Inside the line delay**, the RAM has a single port, and reads and writes take turns.
  An input shift register gathers each 16-bit word. In the word's last bit time the word
  is written at the write address, which then advances. In bit time 8 the word written
  WORDS−1 words earlier is read from the address WORDS−1 behind, into a holding register.
  At the next word boundary that word moves into an output shift register and leaves lsb
  first. That is exactly WORDS word times after it entered, keeping its alignment to the
  word framing. There is one write and one read per pixel time, so an external RAM would
  need only two accesses per 16 clocks.
* The line-delay RAM is not reset. Outputs are valid filter results only from pixel
  (m−1)·L + (m−1) onwards, counted from the first pixel after reset. Earlier outputs mix
  in whatever the RAM held.

Throughput is one pixel per 16 clocks. At 16 MHz that is 1 Mpixel/s, which is 9 multiplies
and 9 additions per µs (18 Mop/s). The rates image applications ask for are higher:

| application | pixel rate | bit clock for one pipeline | pipelines at 16 MHz |
|---|---|---|---|
| 640×480 video at 30 frames/s | 9.2 Mpixel/s | 147 MHz | about 10 |
| NTSC peak | 14.3 Mpixel/s | 229 MHz | about 15 |
| 3000×4000 page at 1 page/s | 12 Mpixel/s | 192 MHz | 12 |

Meeting them needs a fast clock or several pipelines, each working on part of the image.
Storage is different: `LINE_LEN` must equal the image line length. The default of
640 holds a video line, and a 3000-pixel page needs `LINE_LEN=3000`, which gives a
4096-word (65 536-bit) RAM per line delay.

## Modules

| file | role |
|---|---|
| `conv_pkg.sv` | default widths and sizes |
| `word_timer.sv` | 16-slot bit-time counter, word framing |
| `sp_mult_stage.sv` | one multiplier slice: coefficient bit, partial product, full adder, sum and carry flip-flops |
| `sp_multiplier.sv` | `COEF_W` slices stacked into an 8×8 → 16-bit serial-parallel multiplier |
| `serial_adder.sv` | full adder with carry flip-flop |
| `pixel_delay.sv` | 16-stage shift register (Δ) |
| `line_delay.sv` | Δ(L−m): circular buffer of 16-bit words in a single-port RAM, read and write addresses WORDS−1 apart, with serial-to-parallel and parallel-to-serial shift registers |
| `result_register.sv` | gathers the final sum, registers it, truncates it to 8 bits |
| `conv_pipeline.sv` | top level: builds the m² taps with `generate` and wires the chain |

Top-level parameters are `KERNEL_M` (3), `LINE_LEN` (640), `PIX_W` (8), `COEF_W` (8),
`WORD_W` (16) and `FRAC_BITS` (8). `WORD_W` must be at least `PIX_W + COEF_W` for the
product to be exact. The parameters are separate, but only the default relation between
them has been tested.

## How far it follows the source design, and where it departs

The following come from the published design:

* the structure of multipliers, adder chain, one-pixel delays and line delays,
* rounding by starting the chain at ½,
* the 8-bit pixel, 8-bit two's complement coefficient and 16-bit sum widths,
* 16 bit times per pixel,
* a serial-parallel carry-save multiplier stage that holds one coefficient register bit,
  with stages stacked high bit on top and the product leaving the bottom lsb first,
* the line delay as a circular buffer in RAM.

The following are this implementation's own choices:

* **Delay between kernel rows.** The total is one pixel plus L−m pixels, which is L−m+1.
  This makes the window a true m×m square. Reading "L−3 between rows" as the entire
  delay would shift each kernel row by one pixel.
* **Fraction position.** The 8 fraction bits, and so the 1/256 coefficient scale, are a
  choice. The format is only pinned down to "two's complement" and "rounded 8-bit result".
* **Handling the sign bit** in the top multiplier stage, and **clearing per word** through
  a `first` flag instead of a reset line.
* **The line delay's RAM** is an on-chip array of 16-bit words behind one port. The
  original puts it in a separate RAM chip. The word width, the bit times used for the
  write and the read, and the holding register are choices. For an external RAM, replace
  the `mem` array and keep the address and slot logic.
* **Interface.** The ports are the free-running word framing (`word_start`), the parallel
  `sum_out`/`pix_out` with `pix_valid`, and an asynchronous active-low reset.
* The full adders are written as behaviour (XOR/majority), not as the particular gate
  network of an FPGA cell.

The following are not included:

* a version with fixed coefficients, where each slice is reduced to "×0" or "×1",
* coefficients fetched per pixel from a table addressed by the subpixel position (used
  for non-integer scaling),
* the image memory interface that feeds `y` and stores `pix_out`.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module's outputs
against arithmetic computed independently in the testbench:

| testbench | what it checks |
|---|---|
| `tb_sp_mult_stage` | one slice on its own: it outputs P + c·Y (or P − c·Y for the sign slice) |
| `tb_sp_multiplier` | signed × unsigned products modulo 2^16, including −128, −1, 0, 1 and 127, back to back, with exactly one clock of latency |
| `tb_serial_adder` | a + b modulo 2^16 per word, including carry out of bit 15 |
| `tb_pixel_delay` | exact 16-clock delay |
| `tb_line_delay` | exact delay of 637 and of 5 words, also after the word framing restarts at another phase |
| `tb_result_register` | whole word, truncation and the `valid` strobe |
| `tb_word_timer` | slot sequence, `first` and `last` |

The end-to-end benches share `tb/conv_check.sv`. It streams random images and loads two
coefficient sets: a mostly-smoothing set and a full-range signed set. It checks every
valid output against the formula above, and checks that outputs come exactly 16 clocks
apart. It fails if any of these never happened: a coefficient load, a window spanning
the line delays, a negative product, a round-up by the ½, windows of each coefficient
set, a wrapped sum.

| testbench | configuration |
|---|---|
| `tb_conv_pipeline` | defaults, 7 lines |
| `tb_conv_frame_vga` | defaults, one whole 640×480 frame (about 919 000 checks, a few seconds) |
| `tb_conv_pipeline_m5` | 5×5 kernel, 24-pixel lines |
| `tb_conv_copier_page` | `LINE_LEN=3000`, one whole 3000×4000 page (192 M clocks, about 2 minutes) |

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/conv_pkg.sv tb/tb_conv_frame_vga.sv \
              --top-module tb_conv_frame_vga
    ./obj_dir/Vtb_conv_frame_vga

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Every one of them has a
watchdog.
