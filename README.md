# Streaming grayscale morphology with arbitrary structure elements

This is synthesizable SystemVerilog for a circuit that computes grayscale
morphological transforms on an image streamed in raster order. It handles
dilation, erosion, opening, closing, top-hat and bottom-hat, using any flat
structure element that fits in an N x N window (default 7 x 7). Such filters
are a cheap way to pick out obstacles in navigation images. After an initial
delay of (N-1)/2 image rows, the circuit produces one result per clock. It
pauses for only N-1 cycles per image row. At the default size, a 1920 x 1080
frame of 16-bit pixels takes about 2.09 million cycles.

The key idea is that the structure element is never analysed or decomposed.
It is written as N binary strings, one per row. Each bit directly sets two
multiplexers in a chain of comparators. Any shape works: a diamond, a disk,
a line, or something irregular or asymmetric. The pipeline depth is the same
for every shape.

## Data path

```
                  +--------------------- raw buffer (N x MAX_W) ------------------+
                  |                                                               v
pix_in -> input FIFO -> process unit #1 -> process unit #2 -> subtracter -> output mux -> output FIFO -> pix_out
                             |                   |   ^                       ^   ^
                             |                   +---|-----------------------+   |
                             +-------------------+---+---------------------------+
                                    (by-pass paths)
control unit: registers, start / busy / done, enables
```

| mode (`morph_mode_t`)                        | result                         |
|----------------------------------------------|--------------------------------|
| `out_sel=SEL_PU1`                            | dilation or erosion            |
| `out_sel=SEL_PU2` (unit 1 erode, unit 2 dilate) | opening                     |
| `out_sel=SEL_PU2` (unit 1 dilate, unit 2 erode) | closing                     |
| `out_sel=SEL_SUB`, `pu2_en=1`, raw - processed | top-hat (original - opening) |
| `out_sel=SEL_SUB`, `pu2_en=1`, processed - raw | bottom-hat (closing - original) |
| `out_sel=SEL_SUB`, `pu2_en=0`                | original vs. one dilation/erosion |

Both process units use the same structure element. A unit the mode does not
use gets no data and no start. In subtraction modes, each pixel leaves the
input FIFO only when process unit #1 and the raw buffer both accept it. The
raw buffer then returns that pixel to the subtracter in order.

## The configurable comparator chain (`morph_cmp_chain`)

One chain handles one row of the window. It computes the max (dilation) or
min (erosion) over the marked pixels of an N-pixel sliding window. The chain
has N-1 comparators C1..C(N-1), and two links run through it:

* The **bottom link** carries raw pixels. It has one pipeline register per
  stage, so it moves one stage per cycle.
* The **top link** carries the partial result. It passes a pipeline register
  and then an extra delay register R, so it moves one stage per *two* cycles.
  Because it moves at half speed, at every comparator the partial result
  meets the next pixel of its window.

Two multiplexers sit in front of each comparator. MUX A chooses whether the
top input skips R (the straight path). MUX B chooses between comparing top
and bottom and just passing the top input through. The string sets them as
follows (MSB = left-most, oldest pixel):

1. Let M be the number of leading zeros of the string.
2. The first M MUX A take the straight path. The rest take the delayed path.
3. Comparator k (k = 1..N-1, counted from the input) compares when bit N-1-k
   is 1 and passes its top input when the bit is 0.

For example, with N = 5 and string `01011`, the output for the window
p1..p5 is max(p2, p4, p5). With `10101` it is max(p1, p3, p5). Both results
appear at the same cycle. Only with this rule does the partial result pick
up the first marked pixel and stay aligned with its window.

Two choices here are not fixed by the method itself:

* **Strings can change while data is in flight.** The active string rotates
  from one image row to the next (see below), but the chain is 2N-2 cycles
  deep. So each comparator reads its MUX settings from a delay line of the
  string: stage k uses the copy from 2k-1 cycles earlier, which is the string
  of the window that stage is processing. A string change is therefore exact
  at any cycle boundary.
* **Latency.** The result for a window appears N-1 cycles after the window's
  newest pixel enters the chain. With N = 5, the window p1..p5 whose p5 is
  presented in cycle 5 is at the output in cycle 10. This matches the
  published cycle-by-cycle trace of the method.

## Process unit (`morph_pu`)

* **Row banks** (`morph_line_banks`): N banks of MAX_W pixels each. Image
  row r goes to bank r mod N. All banks are read at the same column in the
  same cycle. The newest row of the window is taken straight from the input,
  and the bank being written holds a row that has already left the window.
* **Scan.** The first (N-1)/2 rows are only stored. After that, each scan
  row feeds W + N - 1 columns to the chains: (N-1)/2 virtual columns, the W
  image columns, then (N-1)/2 more virtual columns. The input is not read
  during the N-1 virtual columns. After the last image row, (N-1)/2 virtual
  rows are scanned without input to finish the bottom of the image.
* **Borders.** Virtual pixels are never stored. At the chain inputs they are
  replaced by the value that cannot win: 0 for dilation, all ones for
  erosion. The same happens for rows above or below the image.
* **String rotation.** Chain j stays wired to bank j, but the rows in the
  banks move by one at each scan row. So the N strings are rotated by one
  position per scan row using a row counter. At scan row 0, chain j gets
  element row (j+N-1) mod N.
* **`use` masks and the step-shaped chain** (`morph_step_chain`). If a
  chain's string is all zeros, its output is replaced by the neutral value.
  The N row results are then combined by N-1 pipelined comparators. Row j is
  delayed by a staircase of j-1 registers so that it reaches its comparator
  at the right cycle.
* **Flow control.** The whole pipeline advances in a cycle when two things
  hold: the output register is free, and an input pixel is present if the
  scan needs one. Otherwise every register holds. The output register is
  separate from the pipeline, so a result can leave even while the pipeline
  waits for input. `busy` stays high until the last result has left.

Each unit has N(N-1) + (N-1) comparators: 48 for N = 7.

## Timing and sizes

* **Latency** of one unit, from the first accepted pixel to the first
  result: W(N-1)/2 + 2N + (N-1) cycles. This covers the (N-1)/2 rows of
  preparation, 2N cycles through the cascade chain and its registers, and
  N-1 cycles in the step chain. The tests check this to the cycle.
* **Frame time** of one unit: (N-1)/2·W + H·(W+N-1) cycles. At 1920 x 1080
  with N = 7 that is 2,085,840 cycles. The design was reported to synthesize
  at 290 MHz on a Virtex-4, which gives about 139 frames/s. That frequency
  has not been re-verified with this RTL. At 100 MHz the rate would be about
  48 frames/s.
* **Input FIFO.** Unit 1 stops reading between consecutive image rows from
  row (N-1)/2 on: H-(N+1)/2 gaps of N-1 cycles, plus (N-1)/2 cycles before
  the first of those rows. (`border_pause` also counts the last (N-1)/2
  cycles of every such row, (H-(N-1)/2)(N-1) in all.) When pixels arrive at
  one per cycle, these pauses pile up to about (H-(N+1)/2)(N-1) words over a frame: 6456 at 1080 rows and
  N = 7. That is the default depth of both FIFOs (`FIFO_DEPTH`). In the
  full-frame top-hat test, the input FIFO peaked at 6443 words and never
  refused a pixel.
* **Memory** at the defaults: 2 units x 7 x 1920 x 16 bits, plus the raw
  buffer at 7 x 1920 x 16 bits, plus the two FIFOs at 6456 x 16 bits each.
  That totals 851,712 bits.

## Programming it

Registers are written through `cfg_we/cfg_addr/cfg_wdata`. The register
map is in `morph_pkg`. Writes are ignored while `busy` is high.

| address | register |
|---------|----------|
| `0x01`  | image width (1..MAX_W) |
| `0x02`  | image height ((N-1)/2+1..MAX_H) |
| `0x03`  | mode, `morph_mode_t` in bits 5:0: {pu1_op, pu2_en, pu2_op, out_sel[1:0], sub_dir}; op 1 = dilate |
| `0x10+i`| structure element row i (row 0 = top), bit N-1 = left-most column |
| `0x00`  | write 1 to start a frame |

After the start, feed the `W*H` pixels on `pix_in_*` and read the results on
`pix_out_*`. Both are valid/ready streams in raster order. `done` pulses
when the last result has entered the output FIFO. The element is applied as
written, centred on the output pixel, for both operators; it is not
mirrored for dilation. For symmetric elements this makes no difference.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N`       | 7       | window size; must be odd and at least 3 |
| `DW`      | 16      | pixel width |
| `MAX_W`   | 1920    | largest image width (size of each bank) |
| `MAX_H`   | 1080    | largest image height |
| `FIFO_DEPTH` | (MAX_H-(N+1)/2)(N-1) | depth of each FIFO |

## Departures and design choices

* **Maximum width.** It is 1920, chosen to match the 1080p target and the
  bank size of 1920 x 16 bits. A smaller maximum width of 1280 is also
  plausible for the same design.
* **Raw buffer.** It fills its N banks one after the other, whatever the
  image width, so it is a FIFO of N·MAX_W pixels. If it were sized as N rows
  of the *current* width, narrow images could deadlock: two process units
  hold back N-1 rows plus a few tens of pixels in their pipelines.
* **Invented interfaces.** The handshakes, the register map, the
  start/busy/done protocol, and clamping negative differences to 0 in the
  subtracter are all this design's own.
* **Unit enables.** The "disable to save power" enables only keep unused
  units idle. There is no clock gating.

## How far it has been checked

Every module has a self-checking testbench in `tb/`. Each one compares
against a behavioural reference written independently of the RTL:

* Comparator chain: random strings, including `01011` and `10101`, with
  random stalls.
* Step chain, row banks, FIFO, raw buffer, subtracter, multiplexer and
  control unit.
* Process unit: diamond, random and partly empty elements, with random
  gaps and back-pressure. Latency and frame time are checked to the cycle.
* `tb_morph_top`: all modes at reduced size. It counts border pauses,
  input FIFO build-up, back-pressure, the by-pass of unit 2, the subtracter
  path, empty element rows and mode switches, and fails if any never
  happened.
* `tb_morph_workloads`: default-size design. Runs a 256 x 256 top-hat with
  a 7 x 7 diamond, a 5 x 5 diamond dilation, and a 7 x 7 square dilation
  with its latency checked.
* `tb_morph_top_full`: one full 1920 x 1080 top-hat at the default
  parameters, with all 2,073,600 pixels compared. It runs in about 15 s.

Timing closure, FPGA resource use and power have not been evaluated.

## Files and simulation

`rtl/`: `morph_pkg` (types, register map), `morph_cmp_chain`,
`morph_step_chain`, `morph_line_banks`, `morph_pu`, `morph_fifo`,
`morph_raw_buffer`, `morph_subtracter`, `morph_out_mux`, `morph_ctrl`,
`morph_top`.
`tb/`: one `tb_<module>` per module, plus `tb_morph_workloads` and
`tb_morph_top_full`.

Run any testbench with plain Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb rtl/morph_pkg.sv tb/tb_morph_top.sv --top-module tb_morph_top
./obj_dir/Vtb_morph_top
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`.
Lint a module with
`verilator --lint-only -Wall -y rtl rtl/morph_pkg.sv rtl/morph_top.sv`.
