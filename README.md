# LSTM inference in hardware: a 2D-LSTM stream accelerator and a DRAM processing-in-memory 1D-LSTM engine

This repository holds synthesizable SystemVerilog for two LSTM inference engines, from a
published architecture study on efficient hardware for 1D- and multidimensional LSTM networks:

* **`mdlstm_accel`**: an FPGA-style accelerator for a two-dimensional LSTM (2D-LSTM) layer plus
  a fully connected output layer. It labels every pixel of an image patch, for example text versus
  background in document binarisation. The hard part of a 2D-LSTM is that each pixel depends on
  its left and upper neighbour in each of four scan directions. The accelerator therefore
  interleaves the four directions, so that a deep pipeline always has independent work.
* **`pim_device`**: a DRAM device whose banks compute a binary-weight 1D-LSTM next to the sense
  amplifiers. Each column of sub-arrays computes one LSTM cell. Weights stay in the DRAM rows,
  and dot products are formed on the open row by small adder trees.

`lstm_accel_top` places both engines side by side. They share only clock and reset, and every port
of each is brought out.

Everything below describes the RTL as built. The section "Where this RTL departs from the
original architecture" lists the deviations.

---

## 1. The 2D-LSTM accelerator

### 1.1 What one cell computes

For pixel (i, j) and one scan direction, each of the NH cells computes five gates from the input
pixel x (C channels) and the outputs y and states c of the two predecessor pixels:

```
s_g  = W_g x(i,j) + U_g y(i-1,j) + V_g y(i,j-1) + b_g         g in {a, k, f, g, o}
a = tanh(s_a), k, f, g, o = sigmoid(s_.)
c(i,j) = f * c(i-1,j) + g * c(i,j-1) + a * k
y(i,j) = o * tanh(c(i,j))
```

Here (i-1, j) is the previous column and (i, j-1) the previous row, both in the scan order of the
direction. At the first column or row the missing predecessor is zero. The four directions start
at the top-left (TL), top-right (TR), bottom-left (BL) and bottom-right (BR) corner. The output
layer adds, for every pixel, the 4·NH outputs of all four directions for that pixel.

### 1.2 Direction interleaving and the data path

The host lays out the input so that for every *scan step* the four directions follow each other:
step 0 is x(TL origin), x(TR origin), x(BL origin), x(BR origin), then step 1, and so on. One
such item is a *direction-step*. Consecutive direction-steps never depend on each other. A
direction-step depends only on the one four items earlier (previous column, same direction) and
the one 4·W items earlier (previous row).

```
AXI4 read --> Mem2Stream --> input width converter (C elements) --> hidden layer --+--> output layer --> argmax --> output width converter --> Stream2Mem --> AXI4 write
                                                                      ^   ^        |
                                        X-axis buffer (4 words) ------+   |        +--> X/Y width converters
                                        Y-axis buffer (4*W words) --------+                 |
                                                                      ^---------------------+
```

Every link is a valid/ready stream. The recurrent buffers are delay lines of whole words. One word
holds the y and c of all NH cells of one direction-step. The X-axis buffer returns the word
written four direction-steps earlier, and the Y-axis buffer the word written 4·W earlier.
Nothing needs to be addressed: the scan order is the same for every row. `rec_dwc` collects
PE_LSTM-wide hidden outputs into a word and writes it on the last group. It passes that word
straight through in the same cycle, so the buffer never misses it.

### 1.3 The hidden-layer pipeline (`hidden_layer`)

PE_LSTM cells are computed per cycle, so a direction-step takes NH/PE_LSTM cycles. The input and
recurrent dot products are fully unrolled (SIMD = FULL). The pipeline has five register stages:

| stage | work |
|---|---|
| step registers | x, the two recurrent words and their borders latched at the start of a direction-step |
| p1 | weights and biases of the PE_LSTM cells read |
| p2 | five dot products per cell; pre-activation saturated to a table index |
| p3 | sigmoid / tanh tables (`act_lut`) |
| p4 | c = f·c_x + g·c_y + a·k |
| p5 | y = o·tanh(c), rounded and saturated |

A stall at the output freezes the whole pipeline (`en`).

**Hazard stall.** With few cells per direction-step (PE_LSTM close to NH), a direction-step
could start before the word it needs, written four direction-steps earlier, has left the
pipeline. The layer counts direction-steps started and written back, and it starts a new one
only while fewer than four are in flight. `obs_hazard_stall` shows the stall. With the defaults
(NH=40, PE_LSTM=1) a direction-step lasts 40 cycles, and the stall never happens.

**Number formats.** Each format is a fixed choice of this RTL:

| quantity | format |
|---|---|
| x | unsigned XW bits, all fraction: a pixel in [0, 1) |
| weights | signed WW bits, WW-1 fraction bits; WW=1 means 0 → +1, 1 → −1 |
| biases | signed BW bits, BW-1 fraction bits |
| y | signed YW bits, YW-1 fraction bits |
| accumulator | XW + WW-1 fraction bits (11 at the defaults) |
| table index | accumulator saturated to 8 bits with 4 fraction bits, range [−8, 8) |
| sigmoid table | unsigned Q0.8 |
| tanh table | signed Q1.7 |
| c | 16-bit signed, 7 fraction bits, saturating |

The tables are computed at elaboration time with `$exp` (`act_lut`), so no data file is needed.

### 1.4 Output layer and matching buffer (`output_layer`)

All NO output units work in parallel. Each takes the PE_LSTM hidden outputs of a cycle and its
weights for them, and sums them in an adder tree. The sums of one direction-step are accumulated
locally and then added once to the pixel's partial sum.

* **Pixel labelling (`SEGMENT=1`, default).** Each unit has a matching buffer of H·W partial
  sums. A direction-step at scan position (row r, column c) of direction d belongs to image pixel
  `row_off[d][r] + col_idx[d][c]`. These are two small generated tables that mirror the row for
  BL/BR and the column for TR/BR. After the last direction-step of a patch, the buffer is read
  out in raster order, one pixel per cycle (`obs_drain` is high). Each entry is reset to the bias
  as it is read. The hidden layer is held off during the H·W read-out cycles.
* **Image classification (`SEGMENT=0`).** Each unit has one accumulator. The weights are stored
  in stream order, ((step·4 + direction)·NH + cell), and there is one result per image.

`softmax_argmax` outputs the index of the largest unit (ties go to the lower index), and
`dwc_out` packs the labels into bus words. The last label of a patch flushes a partly filled word,
padded with zeros.

### 1.5 Host interface

The AXI4-Lite slave (`ctrl_slave`) has these registers:

| address | register |
|---|---|
| 0x00 | write bit 0 = start; read bit 0 = busy, bit 1 = done |
| 0x04 | source byte address |
| 0x08 | destination byte address |
| 0x0C | number of input words |
| 0x10 | number of output words |

Parameters are written one element per 32-bit write. Address bits [31:28] select the region and
bits [27:2] give the index:

| region | contents | index |
|---|---|---|
| 1 | LSTM weights | {cell, gate (3 bits), input (⌈log2(C+2NH)⌉ bits)}; inputs 0..C-1 are x, then NH for the previous column, then NH for the previous row; gate order a, k, f, g, o |
| 2 | LSTM biases | {cell, gate} |
| 3 | FC weights | {unit, input (⌈log2(4NH)⌉ bits)}; input = direction·NH + cell |
| 4 | FC biases | unit |

The input is XW-bit elements packed from bit 0 upwards in 64-bit words. A pixel may straddle two
words. The pixels are in the interleaved order of section 1.2, and several patches can follow
each other in one run. The output is one ⌈log2 NO⌉-bit label per pixel in raster order. Each patch
starts a new word.

`mem2stream` reads with INCR bursts of up to 16 beats that never cross a 4 KiB boundary, one
burst at a time. `stream2mem` writes single beats. Done is set after the last write response.

### 1.6 Default configuration

The defaults are the document-binarisation network: C=3, NH=40, NO=2, 64×64 patches, 8-bit x,
4-bit LSTM weights, 8-bit LSTM biases, 4-bit y, 8-bit FC weights and biases, PE_LSTM=1, and a
64-bit bus. PE_LSTM can be raised, for example to 10. Throughput then grows until the hazard stall
starts to bite.

---

## 2. The PIM DRAM 1D-LSTM engine

### 2.1 Hierarchy

```
pim_device   N_BANKS banks on one 64-bit bus, y(t) broadcast between banks
 └ pim_bank    16 CSAs (one LSTM cell each) + pim_ctrl sequencer
    └ pim_csa    4 MAC sub-arrays (one per gate a, i, f, o) + transfer register + pim_spu
       └ pim_subarray  1024×1024 cells, row buffer (PSA), shadow latches (SHL), 16 pim_dot_unit
          └ pim_dot_unit  32 pim_mul_unit + adder tree → 8-bit partial dot product
```

A *CSA* (column of sub-arrays) is the vertical stack of sub-arrays that share one secondary
processing unit (SPU).

### 2.2 Arithmetic

* **Weights** are binary, and each is stored twice in adjacent columns so that it lines up with
  2-bit data. Bit 0 means +1 and bit 1 means −1.
* **Data** x(t) and y(t−1) are 2-bit two's complement with one fraction bit (Q1.1).
* **Multiplier.** `pim_mul_unit` is two XORs plus a +1 carry, giving a 3-bit product.
* **Dot unit.** A dot unit covers 32 elements, and a gate of 160 inputs (32 x plus 128 y) uses
  five units.
* **SPU accumulation.** The SPU adds the five 8-bit partial sums into a 16-bit buffer entry and
  adds the gate bias.
* **Activation.** On the last partial sum the SPU applies a PLAN piecewise-linear sigmoid, with
  breakpoints at 1, 2.375 and 5. tanh is computed as 2·sigmoid(2x)−1.
* **Gate outputs.** Sigmoid gates are quantised to unsigned Q0.2 and the tanh gate to signed
  Q1.1.
* **Cell update.** c = f·c + a·i is kept as an 8-bit signed Q4.4 value, saturating.
  y = o·tanh(c) is rounded to Q1.1.

### 2.3 Commands and one time step

The bank takes one command per cycle (`pim_req_t`):

| command | action |
|---|---|
| ACT | open a row of a block |
| LATCH | copy the open row into the shadow latches |
| RD, WR | 8 bytes, one per CSA, 8 CSAs per half |
| WRB | one byte into every CSA of up to four blocks at once |
| MAC | move dot unit `unit` into SPU entry `sel`; `done` on the last |
| CELL | compute c and y |
| BIAS | set the bias of a gate in one CSA |
| YOUT | put y(t) of all 16 CSAs on the bus |
| FCRD | read the FC sums |
| CLR | set c to 0 |

Weights are in row 0 and the data vector [x(t), y(t−1)] is in row 1 of every sub-array. Gate g
is in block g. `pim_ctrl` runs one time step per `step_start`:

```
for g in a, i, f, o:  ACT row 0 ; LATCH ; ACT row 1 ; MAC unit 0..4 (done on 4) into entry g
wait 2 cycles ; CELL   → y(t) of all 16 cells valid, step_done pulses
```

For the next step, y(t) must be written into row 1 of the banks that need it. The device does this
without a dedicated bus. In one cycle the source bank drives YOUT onto the shared bus, and the
banks in `bcast_mask` take a chosen byte of it with a WRB (`bcast`, `bcast_src`, `bcast_byte`,
`bcast_req`). One bank, chosen by the host, acts as the FC bank. Its SPU entries 4 to 15
accumulate fully connected sums, which the host reads with FCRD.

---

## 3. Where this RTL departs from the original architecture

* **PIM bank count.** The device has 16 banks in the original. Here `N_BANKS` defaults to 4,
  because elaborating one full bank takes about 1.6 GB and 20 s in the lint tools. 4 banks hold
  64 cells, or 48 when one is the FC bank.
* **PIM cell and sense amplifiers** are digital models: a memory array and a row register. There
  is no precharge, charge sharing or DRAM timing. The row decoders, level shifters, SSAs and
  drivers are not modelled, and neither is the host processor with its DRAM on the FPGA side
  (the testbenches use an AXI memory model).
* **PIM sequencing.** `pim_ctrl` handles the four gates one after the other. In the original,
  the sub-arrays of a CSA work in a pipeline.
* **2D-LSTM recurrence carries c.** The recurrent words carry both y and c. The cell equation
  needs both, although block diagrams of the original show only y.
* **2D-LSTM number formats.** The table sizes, the index range, the c width and the input format
  of section 1.3 are this design's choices. The original only states that quantised table-based
  activations are used.
* **Output-layer accumulation.** The local per-direction-step accumulation, the bias reset on
  read-out and the stall during read-out are this design's way of meeting the rule that a
  partial sum is never read and written in the same cycle.
* **Fixed unrolling.** SIMD_INPUT and SIMD_RECURRENT are fixed at FULL, the setting used in every
  evaluated configuration. There is one accelerator instance (M=1).
* **Host interface.** The register map, the parameter windows, the AXI burst policy and the PIM
  command encoding are this design's own.
* **PLAN breakpoints** (1, 2.375, 5) are those of the standard PLAN approximation. The original
  only names the method.

## 4. Which evaluated networks fit at the defaults

| network | fits? | why |
|---|---|---|
| Document binarisation (C=3, NH=40, NO=2, 64×64) | yes | the defaults are this network |
| MNIST classification (C=1, NH=20, NO=10, 28×28) | no, at the defaults | set C=1, NH=20, W=H=28, NO=10, SEGMENT=0 and it fits |
| OCR Bi-LSTM on PIM (128 cells, 32 inputs) | no | needs 8 compute banks plus the FC bank; 4 banks are built, 16 would hold 240 cells |

## 5. Verification

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

**Shared testbench files.**

* `mdlstm_ref` is a bit-accurate reference of the 2D-LSTM cell.
* `pim_ref` is a reference of the binary LSTM arithmetic.
* `axi_mem_model` is an AXI4 memory with random gaps.
* `axil_host.svh` and `pim_host.svh` are host tasks.

**Main testbenches.**

* `tb_hidden_layer` runs two patches plus a restart through the hidden layer and the recurrent
  buffers, and compares every y and c of all four directions.
* `tb_mdlstm_accel` is end-to-end over AXI. It checks every hidden output and every label, and
  counts the hazard stall, the drain and back-pressure on both buses.
* `tb_pim_bank` runs three LSTM steps of 16 cells and checks every y(t).
* `tb_pim_device` uses two banks, both stepping, and a y(t) broadcast.
* `tb_lstm_accel_top` runs both engines at once and fails if any of these never happened: hazard
  stall, drain, input back-pressure, output back-pressure, PIM step or PIM broadcast.

**Sizes simulated.**

* The top was simulated with C=2, NH=4, W=3, H=2, NO=2, PE_LSTM=4, and 2 PIM banks of 2 cells with
  4 rows per sub-array.
* The largest PIM simulation is one full-width bank of 16 cells (4 rows per sub-array).
* No testbench runs the top at its default parameters. At full size, the PIM arrays (4 banks ×
  64 sub-arrays × 1 Mbit) make the simulator build far too long, and a 64×64 patch with NH=40
  takes about 0.7 million cycles.

To run a testbench with plain verilator, from the repository root:

```
verilator --binary --timing -Irtl -Itb rtl/mdlstm_pkg.sv rtl/pim_pkg.sv \
  tb/mdlstm_ref.sv tb/pim_ref.sv tb/axi_mem_model.sv rtl/*.sv tb/tb_lstm_accel_top.sv \
  --top-module tb_lstm_accel_top -Mdir obj -o sim && obj/sim
```

For a single block, list only the files it uses, for example
`rtl/pim_pkg.sv rtl/pim_ctrl.sv tb/tb_pim_ctrl.sv`.
