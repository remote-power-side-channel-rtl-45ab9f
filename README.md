# A BNN convolution accelerator and the on-chip sensor that spies on it

This is SystemVerilog for a small FPGA system built to show a **remote power
side-channel attack** on a machine-learning accelerator. The system has two
tenants on one chip:

* **The victim.** It runs the first convolution layer of a binarized neural
  network (BNN) for 28x28 MNIST digits. There are three block memories (Input
  Image, Param, Output Feature Map), an on-chip controller and a convolution
  unit. The unit is a line buffer feeding a combinational adder tree and
  produces one output per clock cycle.
* **The adversary.** It has a time-to-digital converter (TDC), a 256-stage
  delay line sampled every clock. Its output tracks the local supply voltage,
  and a FIFO stores one raw 256-bit sample per cycle.

Bright (foreground) pixels make the adder tree toggle more than dark
background pixels, so the supply droops more in the cycles that process
them. If the same image is processed many times, the adversary can average
the TDC samples, remove slow drift and threshold the result. This recovers a
recognisable copy of the secret input image without touching the victim's
logic. The end-to-end testbench reproduces that attack in simulation.

Everything is reached over one 32-bit AXI4-Lite bus. On the real board its
master is a vendor JTAG-to-AXI bridge; here the bus appears as the top's
`s_axil_*` ports.

```
  s_axil_* ──► axil_interconnect ─┬─► bnn_controller (registers, sequencing)
                                  ├─► tdc_fifo ◄── tdc_sensor ◄── vdrop_uv
                                  ├─► axil_bram "Input Image" ──pixels──┐
                                  ├─► axil_bram "Param" ───kernel───────┤
                                  └─► axil_bram "Output Feature Map" ◄──┴── conv_unit
                                                                  (line_buffer + conv_adder_tree)
```

## The convolution unit, and why its window lags by 25 pixels

Equation used throughout (x = row, y = column, one kernel j of 64):

    O[x][y] = sum over a,b in 0..2 of  w[a][b] * I[x+a][y+b],   w in {-1,+1}

There is no padding, so a 28x28 image gives 26x26 outputs per kernel.

**Binary multiply.** A kernel is stored as 9 bits. Bit value 1 means +1 and
bit value 0 means -1. Bit i is K(i+1), numbered row by row from the top
left: K1 K2 K3 / K4 K5 K6 / K7 K8 K9. Multiplying by +/-1 is just adding or
subtracting the pixel. `conv_adder_tree` does that for all nine taps and
sums them in a balanced tree of two-input adders, in one cycle with no
registers. Pixels are unsigned 8-bit values. The sum lies in -2295..+2295, a
13-bit signed value, and is stored as 16 bits.

**Line buffer.** `line_buffer` is three rows of 28 pixel registers. A pixel
enters row 0 on the left and everything moves one place right. The rightmost
word of a row enters the next row on the left, and the rightmost word of the
last row is dropped. The 3x3 window is the **rightmost three words of each
row**:

```
row 0:  [new] ... [P9][P8][P7]  ─┐
row 1:  ┌►   ... [P6][P5][P4]  ─┤      image window:  P1 P2 P3
row 2:  └►   ... [P3][P2][P1]  ─► dropped                P4 P5 P6
                                                          P7 P8 P9
```

P9, the window's bottom-right pixel, is therefore not the newest pixel.
It is the one pushed **ROW_LEN-K = 25 pushes earlier**. This has two
consequences that the rest of the design is built around:

1. After the last pixel of an image, 25 more pushes are needed before the
   image's last window reaches the adder tree.
2. When the image is streamed again for the next kernel, the kernel must
   change 25 pushes after the new image starts, not when it starts.

`conv_unit` registers the tree's sum. A result (`res_valid`, `res`) appears
exactly **2 cycles after its push** (`pix_valid`): the line buffer shifts on
the first edge and the sum is registered on the second. Every push yields a
result, including windows that wrap around an image edge (P9 in row 0 or 1,
or in column 0 or 1). The controller discards those.

## Running the layer: 784 cycles per kernel

`bnn_controller` streams the image from Input Image once per kernel, back to
back, reading one pixel per cycle. Each read word goes straight into the
convolution unit on the next cycle. With `LAG` = 25 and push number `s`
counted from the start of the run:

* push `s` evaluates the window whose P9 is global pixel `g = s - 25`. That
  window belongs to kernel pass `g / 784`;
* kernel `k` is read from Param in the cycle after push `25 + 784*k` is
  issued. Param's read port drives the adder tree directly and holds its
  value, so the new kernel arrives exactly with the first window of pass `k`;
* after the last pass, 25 filler pushes (re-reads of the first pixels, whose
  results are dropped) flush the last windows;
* each result whose P9 is at row >= 2 and column >= 2 of its image is
  written to Output Feature Map at the next address (kernel-major, then
  row-major 26x26).

A run of `N` kernels takes **N x 784 + 25 + 3 cycles**: one result per clock
and 784 clocks per kernel, plus the flush and 3 cycles of pipeline (memory
read, shift, result register). For all 64 kernels that is 50,204 cycles.
The `CYCLES` register reports it.

## The TDC sensor and how samples line up with pixels

`tdc_sensor` is a **behavioural model**, not synthesizable logic. The real
sensor is a chain of FPGA carry primitives whose delay cannot be written in
portable RTL. Each rising clock edge is launched through an adjustable delay
into a 256-stage chain, and 256 flip-flops capture at the next edge how far
it got. The model computes

    stages = floor((CLK_PERIOD_PS - (ADJ_BASE_PS + delay_sel*ADJ_STEP_PS))
                   / (TAP_PS * (1 + DELAY_PPM_PER_MV * 1e-9 * vdrop_uv)))

and outputs a thermometer code with that many ones. A supply drop makes
every stage slower, so the Hamming weight falls. The defaults are 25 ps per
stage and a 50 MHz clock (20 ns), the values for the Artix-7 board. With
`delay_sel` = 64 and no drop, the edge stops at stage 128. `vdrop_uv` is
the supply drop at the sensor in microvolts. It stands for the analog
coupling through the power network and is a port of the top, so a
testbench supplies it.

**Alignment.** The controller raises `trace_valid` in the 784 cycles in
which the adder tree evaluates the windows of one chosen kernel pass
(`TRACE_KERNEL`, default 0, the first kernel). The sensor captures a cycle's
delay at the edge that ends the cycle. `tdc_fifo` therefore stores the
sample of the cycle *after* each `trace_valid` cycle. The n-th stored sample
is the supply estimate for the cycle in which pixel n sat at P9. One run
leaves exactly 784 samples, one per pixel. The FIFO holds 1024 samples.
Another trigger while it is full is dropped and sets a sticky overflow flag.

## Address and register map

Address bits [20:18] select the slave. Unmapped selects (5-7) answer DECERR.
All three memories hold one word per 32-bit bus word, right-aligned.
Addresses past a memory's end answer SLVERR and read 0.

| Base          | Slave              | Contents |
|---------------|--------------------|----------|
| `0x0000_0000` | controller         | registers below |
| `0x0004_0000` | TDC / FIFO         | registers below |
| `0x0008_0000` | Input Image        | 784 x 8-bit pixels, raster order |
| `0x000C_0000` | Param              | 64 x 9-bit kernels |
| `0x0010_0000` | Output Feature Map | 64 x 676 results, 16-bit two's complement |

Controller (writes other than CTRL are ignored while busy):

| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0x00 | CTRL | W | bit 0: start a run |
| 0x04 | STATUS | R | bit 0 busy, bit 1 done |
| 0x08 | NUM_KERNELS | R/W | kernels per run, reset 64 |
| 0x0C / 0x10 / 0x14 | IMG_BASE / PARAM_BASE / OFM_BASE | R/W | word address of the first pixel / kernel / result |
| 0x18 | CYCLES | R | cycles of the last run |
| 0x1C | TRACE_KERNEL | R/W | kernel pass that drives the TDC capture, reset 0 |

TDC / FIFO:

| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0x00 | CTRL | R/W | bit 0 arm, bits 15:8 delay_sel (reset 64); writing bit 1 empties the FIFO and clears overflow |
| 0x04 | STATUS | R | bits 15:0 count, 16 full, 17 empty, 18 overflow |
| 0x08 | POP | W | drop the head sample |
| 0x20-0x3C | SAMPLE0-7 | R | head sample, bits 32i+31..32i in word i |

A typical sequence: write the image and kernels, clear and arm the TDC, start
a run, poll STATUS, read Output Feature Map. Then read the 784 samples
(eight words and a POP each) and sum their bit counts to get Hamming
weights.

## Source files

| File | Role |
|---|---|
| `rtl/bnn_pkg.sv` | sizes, types, address map |
| `rtl/axil_if.sv` | AXI4-Lite interface bundle used inside the design |
| `rtl/axil_slave_port.sv` | AXI4-Lite to simple register/RAM access, one transaction at a time |
| `rtl/axil_interconnect.sv` | 1-to-5 AXI4-Lite interconnect with DECERR |
| `rtl/axil_bram.sv` | dual-port block memory (bus port + accelerator port); used three times |
| `rtl/line_buffer.sv`, `rtl/conv_adder_tree.sv`, `rtl/conv_unit.sv` | convolution unit |
| `rtl/bnn_controller.sv` | registers and sequencing |
| `rtl/tdc_sensor.sv` | TDC behavioural model |
| `rtl/tdc_fifo.sv` | 256-bit capture FIFO with registers |
| `rtl/bnn_top.sv` | top level |
| `tb/axil_master_bfm.sv` | AXI4-Lite master used by the testbenches |
| `tb/pdn_model.sv` | testbench power model: turns the convolution window into a supply drop |
| `tb/attack_analysis.sv` | the attacker's signal processing (filter, histogram threshold, correlation) |
| `tb/tb_*.sv` | one self-checking testbench per module, `tb_bnn_top` for the whole design |
| `tb/tb_attack_workloads.sv` | the attack experiments: number of runs, all ten digits |

## Simulating

With Verilator 5, for example the whole design:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/bnn_pkg.sv tb/tb_bnn_top.sv --top-module tb_bnn_top
./obj_dir/Vtb_bnn_top
```

Replace `tb_bnn_top` with any other testbench name to run that one. Each
testbench prints `TB_RESULT checks=N failures=M` and stops on a watchdog if
something hangs.

`tb_bnn_top` runs the design at its default sizes, using only the bus:

* it loads a digit-like image and 64 pseudo-random kernels;
* it runs all 64 kernels, checks the cycle count and checks all 43,264
  results against the equation;
* it captures and reads out 16 traces of the first kernel, then mounts the
  attack: average the Hamming weights, subtract the mean of the previous
  ten samples, take magnitudes, build a 40-bin histogram, and set the
  threshold where the counts fall below a tenth of the background peak;
* it prints the recovered image and its normalised cross-correlation with
  the input, and requires at least 0.25. Typical runs give 0.31-0.37;
* it also forces a FIFO overflow, traces a kernel other than the first,
  and provokes DECERR, SLVERR and a write that is ignored while busy.

The supply drop it feeds to the sensor comes from `pdn_model`, a simple
power model: static + 8 uV x (sum of the nine window pixels) + slow ripple
+ noise. That model decides how good the recovered image is. The hardware
does not. The attack itself is in `attack_analysis`.

`tb_attack_workloads` repeats the attack experiments on the same hardware,
one kernel per run:

* one image captured 3,000 times with a much noisier supply (noise up to
  200 mV per cycle), recovered from the first 100, 500, 1,000 and 3,000
  traces, the run counts of the original experiment. It requires 3,000
  runs to beat 100 and to reach 0.3. A typical result is 0.16 / 0.31 /
  0.36 / 0.36. Once the noise is averaged away, the error of the recovery
  method itself remains: a cycle's drop depends on all nine window pixels,
  not only on the one at P9. So the curve flattens at about 0.36, where
  the hardware reached 0.6-0.75;
* each of the digits 0 to 9 (a 5x7 dot pattern scaled by three), 16 runs
  each, with the normal noise, each required to reach 0.2. Typical values
  are 0.27 to 0.43.

It runs in about two and a half minutes, almost all of it reading 3,000
traces out over the bus. The other testbenches run in seconds.

The other testbenches check each block against values computed
independently: window contents after every shift, adder sums at the
extremes and at random, result latency, every OFM write address and value,
FIFO order, flags and the sensor formula.

## What comes from the design description and what is this implementation's

Taken from the original design:

* the block structure and data paths (the system block diagram);
* the 28x28 8-bit input and the 64 binary 3x3 kernels, with +1 = 1 and -1 = 0;
* the three-row, 28-word line buffer with its shift and wrap rule, and the
  P1..P9 / K1..K9 numbering;
* the add/subtract combinational adder tree and one output per clock;
* the 256-stage TDC with an adjustable delay, about 25 ps per stage, and one
  256-bit sample per clock into a FIFO;
* the 32-bit AXI4-Lite bus and the clock rates (50, 120 or 100 MHz,
  depending on the board).

Chosen here, because the description leaves it open:

* the register and address maps;
* the memory widths and depths (Output Feature Map holds all 64 maps), and
  one word per bus word;
* the controller's back-to-back streaming, kernel switch timing and 25-push
  flush;
* the 2-cycle convolution latency;
* the capture trigger and FIFO depth (1024);
* the AXI handshake style (address and data taken together, one transaction
  in flight);
* synchronous active-low reset;
* the TDC's delay-voltage sensitivity (1000 ppm/mV) and adjustable-delay
  range.

Not included:

* **Pooling, batch normalisation and sign function.** The system has such a
  block after the convolution. Its pooling size, normalisation parameters
  and data path are not specified, and the attack concerns only the first
  convolution.
* **The JTAG-to-AXI bridge.** It is a vendor core; its bus side is the
  top's `s_axil_*` ports.
* **The attack's signal processing.** Averaging, filtering and thresholding
  run in software on the host; the testbench contains a version of it.

## Changing it

The image size, kernel count and FIFO depth are parameters of `bnn_top`
(`IMG_W`, `IMG_H`, `NUM_KERN`, `FIFO_DEPTH`). Widths and the address map
live in `bnn_pkg`. For the 120 MHz or 100 MHz boards, set `bnn_top`'s
`TDC_CLK_PERIOD_PS` to 8333 or 10000 and `TDC_ADJ_BASE_PS` to 1933 or 3600.
The edge then still stops at stage 128 for `delay_sel` = 64.

The kernel size is 3 throughout. The controller and line buffer take `K`
as a parameter, but the 9-bit kernel word and the OFM sizing assume 3.
