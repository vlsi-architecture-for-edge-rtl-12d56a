# Streaming 3x3 edge detector (Sobel, Prewitt, Laplace)

This design finds edges in 8-bit grayscale images, aimed at leaf images from
crop monitoring. It takes the pixels one at a time in raster order and gives a
black-and-white edge image back. Each output pixel is FF where the image
changes sharply and 00 elsewhere.

Its main idea is to build each 3x3 convolution from plain arithmetic cells:

- nine 8x8-bit array multipliers, one per kernel tap;
- a chain of eight 16-bit ripple-carry adders that sums the nine products.

The Sobel detector uses two such units, one per gradient direction. It then
forms the gradient magnitude `sqrt(Gx^2 + Gy^2)` and compares it with an
18-bit threshold. Prewitt is the same circuit with other coefficients. Laplace
needs only one kernel, so it uses one unit and compares its signed response
directly.

The RTL follows a published architecture for the datapath: the cell
structure, the counts of multipliers and adders, and the widths (8-bit pixels
and coefficients, 16-bit products and adders, 17-bit results, 18-bit
threshold, 256x256 images). Several details were not specified there. The
stream interface, signed-coefficient handling, border policy and pipelining
are this design's own. Each is listed under "Design choices and departures".

## Dataflow

```
pixel_in ──► line_buffer ──► window p0..p8 (registered)
                               │
               ┌───────────────┴───────────────┐
               ▼                               ▼
        kernel_conv (Gx)               kernel_conv (Gy)      (Sobel / Prewitt only)
               │                               │
               └──────► grad_magnitude ◄───────┘
                               │ |G|  (Laplace: Gx directly, signed)
                               ▼
                        edge_threshold  (> threshold ? FF : 00)
                               ▼
                 output register: pixel_out, out_valid, out_x, out_y
```

`edge_detector` is the top. The `OPERATOR` parameter (`OP_SOBEL`,
`OP_PREWITT`, `OP_LAPLACE`, from `edge_pkg`) sets which kernels are used and
whether the second convolution and the magnitude stage are built at all.

## The convolution unit (`kernel_conv`)

This is the core of the design and the part with the most to understand.

**Tap order.** Pixels and coefficients are numbered p0..p8 row by row from the
top-left, the same order in which the kernels are written below. Both are held
in packed arrays (`window_t`, `kernel_t`) whose index is the tap number.

**Products.** Tap `i` multiplies pixel `p_i` by coefficient `k_i` in an
`array_mult8`. The multiplier is unsigned. The kernels have negative
coefficients, so each tap:

1. multiplies the pixel by the coefficient's magnitude;
2. negates the 16-bit product when the coefficient is negative.

The products are therefore 16-bit two's complement numbers. Their range is
-32640..32385, because coefficients are -128..127.

**Accumulation.** Eight `ripple_adder` instances form a chain, not a tree:

- adder 1 adds products 0 and 1;
- adder n adds product n to the output of adder n-1;
- adder 8 gives the result.

The partial sums wrap at 16 bits. For the three kernels used here no partial
sum exceeds ±1020 in magnitude, so nothing wraps. A user-supplied kernel must
keep every partial sum within ±32767.

**17-bit result.** The last adder's carry out is used to widen the result to
17 bits. The top bit is the exact sign of the full-precision sum: carry out
XOR the sign bits of the adder's two operands. The result `g` is therefore
the exact signed sum of the last adder's two operands.

**Timing.** The unit is purely combinational: nine multipliers and eight
ripple adders in series. It is the critical path of the design.

## Arithmetic cells

**`array_mult8`** is an unsigned 8x8 array multiplier.

- Partial-product bit `x[i] & y[j]` comes from one AND gate.
- Row 0 is the partial product of `x[0]`.
- Row i (1..7) adds the partial product of `x[i]` to the upper eight bits of
  row i-1: that row's sum bits 1..7 and its carry out.
- Each row has a half adder in its lowest column and full adders above it.
  Carries ripple leftwards along the row.
- The lowest bit of rows 0..6 gives S0..S6. The last row gives S7..S14, and
  its carry out is S15.

**`ripple_adder`** chains `WIDTH` one-bit full adders (default 16).

- Bit 0 takes `cin`.
- The carry out of the top bit is `cout`.
- So `{cout, sum} = a + b + cin`.

`full_adder` and `half_adder` are the one-bit gate-level cells.

## Gradient magnitude and threshold

**`grad_magnitude`** computes `floor(sqrt(gx^2 + gy^2))` in three steps:

1. it squares both 17-bit signed gradients;
2. it adds the squares into a 34-bit radicand;
3. it takes the integer square root bit by bit.

For each result bit, from the top down, the square of the candidate root with
that bit set is compared with the radicand. The bit is kept if the square is
not larger. It is combinational. The squaring uses the `*` operator, and
synthesis maps it as it sees fit.

**`edge_threshold`** compares a signed 19-bit response with the unsigned
18-bit threshold.

- Strictly greater gives FF; anything else gives 00.
- For Sobel and Prewitt the response is the magnitude, which is never
  negative.
- For Laplace it is the signed Laplacian, so only positive responses above
  the threshold count as edges.

The threshold is an input port. It is meant to be tuned per image set, and the
design has no built-in value. The testbenches use 200 (Sobel), 150 (Prewitt)
and 60 (Laplace) on their synthetic images.

## Kernels

Values are in tap order, one row of the kernel per group:

| operator | first kernel (`kernel_x`)      | second kernel (`kernel_y`)     |
|----------|--------------------------------|--------------------------------|
| Sobel    | -1 0 1 / -2 0 2 / -1 0 1       | 1 2 1 / 0 0 0 / -1 -2 -1       |
| Prewitt  | 1 1 1 / 0 0 0 / -1 -1 -1       | -1 0 1 / -1 0 1 / -1 0 1       |
| Laplace  | 0 -1 0 / -1 4 -1 / 0 -1 0      | (not used)                     |

For Prewitt, the kernel that responds to vertical change is called "x". Sobel
uses the opposite naming. This does not affect the magnitude.

## Stream interface and timing

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `shift_enable` | in | 1 | `pixel_in` is valid this cycle and is shifted into the line buffer |
| `read_enable` | in | 1 | with `shift_enable`: `pixel_in` is pixel (0,0) of a new frame |
| `pixel_in` | in | 8 | input pixel, raster order |
| `threshold` | in | 18 | edge threshold |
| `pixel_out` | out | 8 | FF = edge, 00 = no edge |
| `out_valid` | out | 1 | a new output pixel is on `pixel_out` (one-cycle pulse) |
| `out_x`, `out_y` | out | log2(size) | image position of that pixel |

**Accepting pixels.** A pixel is accepted on every rising edge with
`shift_enable` high. The source may pause for any number of cycles: with
`shift_enable` low the design holds its state. The line buffer counts the
column and row itself.

**Frame boundaries.** `read_enable` restarts the counters at (0,0). This lets
a source abandon a partial frame and start again. Without `read_enable` the
counters wrap after the last pixel of a frame, so frames can follow back to
back. A frame start must come with a pixel: `read_enable` without
`shift_enable` is illegal, and an assertion in `line_buffer` reports it in
simulation.

**The line buffer.** `line_buffer` keeps the two previous rows in two memories
of `IMG_WIDTH` bytes, addressed by the column. When a pixel at column x is
accepted:

- the new window column is formed from memory 2 (row y-2), memory 1 (row y-1)
  and the new pixel;
- the new pixel is written into memory 1, and memory 1's old value into
  memory 2;
- the 3x3 window registers shift left by one column.

**Border pixels.** Only windows that lie wholly inside the image produce
output. A W x H frame gives (W-2) x (H-2) output pixels, for x in 1..W-2 and
y in 1..H-2, in raster order. For 256x256 that is 254x254 pixels. Border
pixels get no output; a consumer that needs a full-size image fills them
itself, usually with 00.

**Latency and throughput.** Call the edge that accepts the bottom-right pixel
of a window edge N.

- Edge N loads the window registers.
- Edge N+1 registers `pixel_out`, `out_valid`, `out_x` and `out_y`.
- The whole convolution-magnitude-threshold path sits between these two
  registers in one cycle.

Throughput is one output per accepted pixel once two rows are buffered. A
256x256 frame streamed without pauses takes 65536 cycles, and its last output
appears one cycle after its last pixel.

## Parameters

| module | parameter | default | notes |
|--------|-----------|---------|-------|
| `edge_detector` | `IMG_WIDTH`, `IMG_HEIGHT` | 256, 256 | image size; line memories are `IMG_WIDTH` x 8 bits |
| `edge_detector` | `OPERATOR` | `OP_SOBEL` | `OP_PREWITT`, `OP_LAPLACE` |
| `ripple_adder` | `WIDTH` | 16 | |
| `grad_magnitude` | `W` | 17 | gradient width |
| `edge_threshold` | `VW`, `TW` | 19, 18 | response and threshold widths |

The shared widths (`PIX_W`, `COEF_W`, `PROD_W`, `G_W`, `THR_W`, `VAL_W`), the
types and the kernel tables are in `rtl/edge_pkg.sv`. To add an operator, add
an enum value and its kernels to `kernel_x`/`kernel_y`. Keep its partial sums
within 16 bits.

## Design choices and departures

These points were not specified by the published architecture and were
decided here:

- **Signed coefficients.** The multipliers are unsigned. Negative
  coefficients are handled by multiplying by the magnitude and negating the
  product. The partial sums are 16-bit two's complement.
- **Adder arrangement.** The products are summed as a linear chain of eight
  adders. The published synthesis views show the same counts of multipliers
  and adders, but their exact wiring was not available.
- **Stream protocol.** The published design has `read_enable` and
  `shift_enable` signals, but their exact meaning is not given. Here they are
  "frame start" and "pixel valid". The `out_valid`, `out_x` and `out_y`
  outputs are additions.
- **Image storage.** The published simulation loaded whole images into
  256x256 arrays from text files. This RTL streams pixels instead and holds
  only two rows. The testbenches hold the images.
- **Borders.** They produce no output, as described above.
- **Laplace decision.** The signed response is compared with the threshold,
  with no absolute value taken, matching the single greater-than stage of the
  published Laplace design.
- **Square root.** It is an exact integer root, rounded down.
- **Output coding.** FF/00.
- **Reset.** Synchronous and active high. The line memories are not reset,
  because no valid window reads a location not written in the same frame.
- **Resources and I/O count.** The published FPGA results (LUT count, power,
  an 8-pin I/O count) were not reproduced. This top has more ports than that
  I/O count allows. The combinational convolution path is long, so a
  high-clock-rate implementation would add pipeline registers inside
  `kernel_conv` and `grad_magnitude`.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_array_mult8` | all 65536 operand pairs against `x*y` |
| `tb_ripple_adder` | corner cases and 20000 random additions including carry in/out |
| `tb_kernel_conv` | the three operators' kernels on extreme and random windows; random kernels in -14..14 |
| `tb_grad_magnitude` | floor-root property `r^2 <= s < (r+1)^2` over the full 17-bit range |
| `tb_edge_threshold` | values equal to, just above and just below the threshold; negative values |
| `tb_line_buffer` | every window's nine pixels and position, windows per frame, stalls, counter wrap, restart after an abandoned frame (10x7 image) |
| `tb_edge_detector` | Sobel, Prewitt and Laplace side by side on 16x12 images: every output pixel, position, count and the one-cycle latency. Covers stalls, frame restart, counter wrap, and edge and non-edge outputs; each of these must occur at least once |
| `tb_edge_detector_full` | the default top (Sobel, 256x256) on two synthetic leaf images, every one of 2 x 64516 outputs, and 65536 cycles per frame |
| `tb_leaf_workloads` | all three operators at 256x256 on two synthetic leaf images with random stalls |

Expected outputs come from an integer reference model, `tb/edge_ref_pkg.sv`.
It is written independently of the RTL and also generates the synthetic leaf
images. The images are a textured bright ellipse with darker veins on a noisy
dark background.

To run a testbench with Verilator (from the project root):

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/edge_pkg.sv tb/edge_ref_pkg.sv tb/tb_edge_detector.sv \
    --top-module tb_edge_detector --Mdir build
./build/Vtb_edge_detector
```

Replace `tb_edge_detector` with any testbench name. For the unit testbenches
that do not use the reference model, `tb/edge_ref_pkg.sv` can be left out.
All testbenches finish in seconds, including the 256x256 ones.
