# conv3x3 — a pipelined 3×3 convolution core with ReLU and 8-bit output

`conv3x3` computes one output pixel of a 3×3 convolution on every clock. It is
meant as the arithmetic heart of a small edge-inference accelerator. Signed 8-bit
pixels are multiplied by signed 8-bit kernel weights. The nine products are summed
with a bias in a 24-bit accumulator. The result is quantized by a 1-bit arithmetic
right shift, passed through ReLU and saturated to a signed 8-bit value. The kernel
and the bias are inputs like the pixels, so they can change at run time.

The core does not walk over an image. Whatever drives it cuts the image into 3×3
windows and presents one window per clock. For a 5×5 image that means nine windows
and a 3×3 output map.

## What one output is

For a window `pix[r][c]`, a kernel `ker[r][c]` (r, c = 0..2) and a bias `b`:

```
acc = clamp24(b) + Σ pix[r][c] · ker[r][c]     (24-bit two's complement)
q   = acc >>> SHIFT                            (SHIFT = 1, arithmetic)
y   = min(max(q, 0), 127)                      (ReLU, then int8 saturation)
```

Points worth knowing about the number formats:

- **Products** are kept at their full 16 bits. They are sign-extended into the
  24-bit accumulator. Nine worst-case products (−128·−128) sum to 147 456, which
  needs 19 bits. The pixel and weight sums alone can therefore never overflow.
- **Bias** is a 32-bit signed input, but the accumulator has 24 bits. A bias
  outside the signed 24-bit range is clamped to −2²³ or 2²³−1 before it is added.
  That is this design's choice. Only a bias close to those limits can make the
  24-bit sum wrap, and then it wraps like an ordinary two's-complement register.
- **Quantization** is a plain arithmetic shift, which rounds towards minus
  infinity. There is no rounding. An odd sum such as 3 gives 1; −1 stays −1 and
  ReLU then makes it 0.
- **ReLU and saturation.** ReLU clamps negative values to 0. Saturation clamps values
  above 127 to 127, the int8 maximum. So `y` always lies in 0..127, even though
  the port is a signed 8-bit value. Because the shift is arithmetic, doing ReLU
  before or after it gives the same result.

## Pipeline and timing

```
          clock 0            clock 1                 clock 2
in_valid ─┐
pix, ker ─┼─► 9 multipliers ─► [prod ×9, bias] ─► Σ ─► [acc] ─► >>>1, ReLU, sat ─► [y]
bias  ────┘   bias clamp            stage 1             stage 2           stage 3
                                                                     out_valid, y
```

- Three register stages. `out_valid` is `in_valid` delayed by exactly three
  clocks, and `y` comes with it.
- All nine multiplies of a window happen in the same clock, so throughput is one
  window per clock with no restrictions. Windows may come back to back or with
  gaps. There is no back-pressure: the core never stalls, and a result is lost if
  nobody takes it in the clock where `out_valid` is high.
- `pix`, `ker` and `bias` are sampled together with `in_valid`. Each window
  therefore carries its own kernel and bias, and a kernel change takes effect on
  the very next window.
- `rst_n` is an asynchronous, active-low reset. It clears every register,
  including the valid pipeline, so nothing comes out until new windows go in.

## Blocks

| module        | job                                                      | stages |
|---------------|----------------------------------------------------------|--------|
| `conv3x3`     | the core: `conv3x3_mac` followed by `conv3x3_act`        | 3      |
| `conv3x3_mac` | bias clamp, nine multipliers, 24-bit accumulation        | 2      |
| `conv3x3_act` | arithmetic shift, ReLU, saturation to int8               | 1      |
| `conv3x3_pkg` | shared defaults: window size, widths, shift              | –      |

Parameters of `conv3x3` (the sub-blocks take the subsets they need):

| parameter | default | meaning                        |
|-----------|---------|--------------------------------|
| `IN_W`    | 8       | pixel width, signed            |
| `COEF_W`  | 8       | kernel weight width, signed    |
| `ACC_W`   | 24      | accumulator width, signed      |
| `BIAS_W`  | 32      | bias input width, signed       |
| `OUT_W`   | 8       | output width, signed           |
| `SHIFT`   | 1       | quantization right shift       |

Ports of `conv3x3`: `clk`, `rst_n`, `in_valid`, `pix[3][3]`, `ker[3][3]`, `bias`,
`out_valid`, `y`. The arrays are indexed `[row][col]`, so `pix[0][2]` is the
top-right pixel of the window. The widths scale with the parameters. The window
size is fixed at 3×3 (`K` in the package).

After synthesis the core at its defaults has about 200 flip-flop bits: nine
16-bit products, the clamped bias, the accumulator, the output and three valid
bits. It also has nine multipliers and an adder chain.

## Reference case

The core's reference case is a 5×5 image convolved with a kernel whose rows are
all (1, 0, −1), with bias 0:

```
image (hex, signed)         output map
ff 02 03 01 fe              0 0 1
00 01 ff 04 02              0 0 0
02 fd 01 00 01              1 0 0
fe 01 02 ff 03
03 00 fe 02 ff
```

Take the top-right output as an example. Its window sums to 5 − 3 + 0 = 2, and
2 >>> 1 gives 1. The last window (bottom-right) sums to −2, and ReLU makes that 0.
The bottom row of the image is known only in columns 2..4. Columns 0 and 1 hold 3
and 0 here, a choice that reproduces the output map above. Any value of 3 or 4 in
column 0, together with a column-1 value of at most 4, gives the same map.

## How far it follows its specification

These parts follow the specification:

- the signed 8-bit pixels and weights;
- the 24-bit accumulator;
- the 32-bit bias port;
- quantization as a 1-bit arithmetic right shift;
- ReLU and saturation;
- the 8-bit output;
- a fully pipelined dataflow with one window per clock;
- a kernel that can be changed at run time.

The specification does not give the following, so they are this design's own
choices:

- three pipeline stages, with the stage boundaries shown above;
- the `in_valid` / `out_valid` strobe, with no back-pressure;
- an asynchronous active-low reset that clears all state;
- clamping a bias that does not fit in the 24-bit accumulator;
- wrapping of the accumulator when the bias pushes it past its limits;
- the order shift, then ReLU, then saturation;
- saturation to 127 (int8) rather than 255.

The core has no line buffer, no window generator and no kernel storage. The
environment supplies all three, as the testbench does. Multi-channel and streaming
versions are outside this design.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`. Each one
compares the outputs with a separate integer model in `tb/conv3x3_ref_pkg.sv`,
which is written without reference to the RTL. Each one also checks the exact
latency and has a watchdog.

- `tb_conv3x3_mac`: about 2000 windows at the extremes (all −128, 127 against
  −128), random windows and kernels, small biases, large biases and biases that
  need clamping. Windows come back to back and with gaps. Checks `acc` and the
  2-clock latency.
- `tb_conv3x3_act`: about 2000 accumulator values covering negative inputs, −1,
  both parities, the 254/255/256 saturation boundary, ±2²³ and random values.
  Checks `y` and the 1-clock latency.
- `tb_conv3x3`: end to end, with every parameter at its default. It first runs the
  reference case and compares it with the fixed map above. It then runs 300 random
  5×5 images, each with its own random kernel and bias, alternating back-to-back
  and gapped feeding. It counts how often ReLU clamping, saturation, odd-sum
  truncation, a non-zero bias, bias clamping, a kernel change and back-to-back
  windows happen, and it fails if any count is zero. It checks `y` and the
  3-clock latency for every window.

Each testbench has been run against a deliberately broken copy of its block and
reported failures. The copies were: one product left out of the sum, a logical
shift in place of the arithmetic one, and a shift of 2 in place of 1.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --top-module tb_conv3x3 -Irtl -Itb \
    rtl/conv3x3_pkg.sv tb/conv3x3_ref_pkg.sv \
    rtl/conv3x3_mac.sv rtl/conv3x3_act.sv rtl/conv3x3.sv tb/tb_conv3x3.sv
./obj_dir/Vtb_conv3x3
```

Use `tb_conv3x3_mac` or `tb_conv3x3_act` as the top, and the matching RTL files,
to test the sub-blocks on their own. Each run takes well under a second.
Lint with `verilator --lint-only -Wall`. The only warnings are for package
constants that a given module does not use.

To change the arithmetic, override the parameters on `conv3x3`. The reference
model takes the widths as arguments, but `tb_conv3x3` is written for the default
widths.
