# Coarse region segmentation with a digital resistive-fuse network

This design segments a small grey-level image into coarse regions, for
example a whole face as one region, and leaves out the eyes, brows and mouth inside it.
It is the front end of a face/object recognizer. A PC captures a camera
frame and reduces it to 64x64 pixels. This engine then smooths the image
while keeping the strong edges between regions. The PC labels the regions,
cuts them out, and runs its feature extraction and template matching on
them. This RTL covers only the FPGA engine.

The engine emulates an analog *resistive-fuse network*. Every pixel `n` is a
circuit node `O_n`. The node is tied to its input pixel `I_n` through a
conductance `sigma`, and to each neighbour `k` through a nonlinear element
`G`. While `|O_k - O_n|` stays below a threshold `delta`, `G` acts as a
resistor and the network smooths. At or above `delta` the fuse opens, and
the two nodes are no longer connected. Noise is averaged away, while large
steps survive as region boundaries.

Coarse segmentation comes from two runs. The first run uses a plain linear
element, so small details such as the eyes blur into their surroundings.
The second run changes `G` to a fuse, so only the large steps that remain
(face against background) stay open.

## The node update

The digital engine replaces the continuous-time circuit with discrete
steps. By Kirchhoff's current law a node moves by the total current that
flows into it, and repeating the update over the whole image converges to
the network's steady state. Each update computes:

```
O_n <- clamp( O_n + LUT_1[I_n - O_n] + sum over k in {up,down,left,right}, k inside image, of LUT_2[O_k - O_n] )
```

* **LUT_1** holds the current from the input source, `dt*sigma*x`.
* **LUT_2** holds the current through the element, `dt*G(d)`. Whether the
  element is a linear resistor or a fuse, and how large `delta` is, depends
  only on what is written into LUT_2. The datapath never compares against a
  threshold.
* Both tables are RAMs with 512 entries. The index is the 9-bit two's-complement difference of
  the *integer* pixel values (`-255..255`), so index `0x1FF` means -1.
  Each entry is a signed 12-bit current with 4 fraction bits. The time step is
  already folded in.
* Node values are 12 bits: 8 integer bits and 4 fraction bits. Without the fraction
  bits, corrections smaller than one grey level would be lost, and the
  network would stop converging early. The host reads the integer part in bits
  `[11:4]`.
* The sum saturates at 0 and at 4095 (255.9375).
* Pixels on the image border have fewer neighbours. A missing neighbour
  carries no current, so the border acts as an open circuit.

For the update to stay stable, the table contents must satisfy roughly
`dt*(sigma + 4g) < 1`. The testbenches use `dt*sigma = 1/32` and
`dt*g = 1/5`, which gives these tables:

```
LUT_1[x] = trunc(16*x/32)
LUT_2[d] = trunc(16*d/5)  if |d| < delta, else 0     (delta = 24 for the fuse run)
```

## Pixel-serial schedule

A single datapath visits the pixels one at a time in raster order. The
destination memory has one read port, so the five node values a pixel needs
(centre, up, down, left, right) are fetched one per clock. Together with
the pipeline and the write-back, each pixel takes 8 clocks:

| phase | memory access issued             | datapath (data from the previous phase)          |
|-------|----------------------------------|--------------------------------------------------|
| 0     | read `O_n`, read `I_n`           |                                                  |
| 1     | read `O_up`                      | latch `O_n`; LUT_1 index `I_n - O_n`              |
| 2     | read `O_down`                    | LUT_2 index `O_up - O_n`; acc = LUT_1 output     |
| 3     | read `O_left`                    | LUT_2 index `O_down - O_n`; acc += G(up)         |
| 4     | read `O_right`                   | LUT_2 index `O_left - O_n`; acc += G(down)       |
| 5     |                                  | LUT_2 index `O_right - O_n`; acc += G(left)      |
| 6     |                                  | acc += G(right)                                  |
| 7     | write `O_n <- clamp(O_n + acc)`  |                                                  |

If a neighbour lies outside the image, the controller reads the centre
address in its place, and the datapath drops that current.

The update is in place (Gauss-Seidel): a pixel sees the new values of the
pixels above it and to its left. That is what a single destination memory
gives, and for this kind of diffusion it usually converges faster than
updating all nodes at once.

With `copy_first` set, a run starts with a copy pass at one pixel per clock
that sets `O = I`. Run lengths, counted from the clock after the start
write to the clock in which `done` is high:

```
(copy_first ? W*H + 1 : 0) + iters * W*H * 8 + 1
```

At 64x64 with the default of 24 sweeps this is 790,530 clocks, or 19.76 ms at
40 MHz. That keeps within the 20 ms per frame the system needs for video-rate
segmentation. The number of sweeps is a host register. 24 is the largest
value that still fits in the 20 ms budget with the copy pass.

## Driving it from the host

`rf_top` has a simple synchronous word bus in place of the board's PCI
target logic:

* `host_we` writes in the clock in which it is high.
* `host_re` returns `host_rdata` with `host_rvalid` one clock later.
* While `busy` is high, writes are ignored and destination reads return
  nothing useful.

| address         | access | contents                                                    |
|-----------------|--------|-------------------------------------------------------------|
| 0x0000-0x0FFF   | W      | source memory, pixel `I` at `y*64 + x` (8 bits)             |
| 0x1000-0x1FFF   | R      | destination memory, node `O` at `y*64 + x` (12 bits, 4 fraction bits) |
| 0x2000-0x21FF   | W      | LUT_1, index = signed difference                            |
| 0x2200-0x23FF   | W      | LUT_2, index = signed difference                            |
| 0x3000          | W      | control: bit 0 start, bit 1 copy source to destination first |
| 0x3001          | R/W    | sweeps per run (reset value 24)                             |
| 0x3002          | R      | status: bit 0 busy, bit 1 done (cleared by the next start)  |
| 0x3003          | R      | clocks taken by the last run                                |

A coarse segmentation of one frame takes these steps:

1. Write the 4096 pixels.
2. Write LUT_1.
3. Write LUT_2 with the linear curve.
4. Write control `0x3` (copy, then start), and wait for `done`.
5. Rewrite LUT_2 with the fuse curve.
6. Write control `0x1` (start, no copy), and wait for `done`.
7. Read back the destination memory.

Region edges are then where neighbouring output values differ by at least
`delta`.

## Modules

```
rf_top                 host bus decode, control/status registers, cycle counter
├── rf_controller      copy pass, raster scan, 8-phase pixel schedule, sweep count
├── rf_datapath        differences, LUT addressing, current sum, saturation
├── rf_source_mem      4096 x 8   input image, host write / engine read
├── rf_dest_mem        4096 x 12  node values, engine read+write, host read when idle
└── rf_lut (x2)        512 x 12   LUT_1 and LUT_2, host write / engine read
rf_pkg                 sizes, formats, neighbour order, address map
```

All memories read synchronously with one clock of latency, and none has a
reset. Control logic resets asynchronously on `rst_n` low. The parameters
`W`, `H` (image size) and `IT_W` (sweep counter width) can be set on
`rf_top` and `rf_controller`. The number formats live in `rf_pkg`.

## What is taken from the system description and what is not

The following come from the system description:

* The structure: source memory for `I`, destination memory for `O`, LUT_1
  for the linear `sigma*x`, and LUT_2 for the nonlinear `G`.
* A KCL update repeated to a steady state, processed pixel-serially.
* The 64x64 image.
* The linear-then-fuse way of obtaining coarse regions.
* The 40 MHz / under-20 ms frame budget.

The following are choices of this design, where the description gives no
detail:

* **Word widths:** 8-bit pixels, 12-bit nodes, 12-bit LUT words.
* **Neighbourhood:** the four nearest neighbours inside the 3x3 window,
  with no diagonals.
* **Ordering:** in-place Gauss-Seidel updates in raster order.
* **Schedule:** the 8-clock pixel schedule, the copy pass, and the default
  of 24 sweeps.
* **Boundary:** open-circuit border pixels.
* **Host side:** the bus, the address map and the status/cycle registers.
* **Table curves:** the exact shape of `G` is up to the table contents.
  The testbenches use a linear curve cut to zero at `|d| >= delta`.

Outside this RTL:

* the PCI interface of the board, represented here by the host bus ports;
* the camera and capture board;
* the 320x240 to 64x64 reduction;
* the region labeling, the Gabor wavelet features (4 directions, 5
  frequencies) and the dynamic-link template matching, all of which run as
  software on the PC.

## Verification

Every module has a self-checking testbench in `tb/`. The shared reference
model is in `tb/rf_tb_pkg.sv`.

| testbench           | what it checks |
|---------------------|----------------|
| `tb_rf_source_mem`  | full image written and read back in scrambled order; read-enable hold; overwrite |
| `tb_rf_dest_mem`    | engine/host port selection, read latency, read-during-write returns the old word |
| `tb_rf_lut`         | signed fuse table loaded, read by signed difference, reloaded (linear to fuse) |
| `tb_rf_datapath`    | 6000 random pixel updates against the model, with physical and random tables; saturation, open fuses, border masks; copy writes |
| `tb_rf_controller`  | every control output in every clock against an independent schedule model on a 5x4 image; run lengths with and without copy, zero sweeps |
| `tb_rf_top`         | full size, default parameters (see below) |

`tb_rf_top` runs the whole engine at its default size on a synthetic face
scene: a noisy background, a bright ellipse, and darker eyes and mouth. It
does three runs:

1. A copy-only run, which must reproduce the image.
2. A copy plus 24 linear sweeps.
3. After a LUT_2 reload to a fuse, 24 more sweeps.

After each run it compares all 4096 nodes with the reference model, and
checks the cycle counts against the formula above and the 20 ms budget. It
also checks that the face/background step stays open while the eyes merge
into the face. It counts the copy passes, linear links, open fuses, border
neighbours, LUT mode switches and refused busy writes, and fails if any of
them never occurs. The test takes about 1.6 M clocks and simulates in a few
seconds.

`tb_rf_book_scene` runs the same host sequence, also at full size, on the
second kind of scene: a bright book cover with rows of darker print. It
checks every node after both runs, and checks that the cover outline stays
a step of at least `delta` while no step inside the cover reaches it.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rf_pkg.sv tb/rf_tb_pkg.sv tb/tb_rf_top.sv --top-module tb_rf_top -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
with a watchdog if the design hangs.
