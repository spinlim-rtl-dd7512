# SpinLiM: ternary neural-network layers computed inside SOT-MRAM

SpinLiM runs the multiply-accumulate of ternary neural networks (weights
and activations in {-1, 0, +1}) inside a spin-orbit-torque MRAM array.
It does not read operands out to an ALU. Each memory cell is a stateful
logic gate: its next state depends on what it already stores and on how it
is written. Two cells together hold one ternary value. A short, fixed
sequence of writes turns that stored value into its product with a second
ternary value. A whole array row of 128 values is multiplied at once. Only
the products are read out, and per-column counters add them up.

This repository holds a synthesizable SystemVerilog model of that design:
the logic behaviour of the cell, the modified word-line and write drivers,
the 128 x 128 computing array, and the digital unit around it. That unit
maps convolution and fully connected layers onto the array, adds up the
columns and pools the results. Magnetic switching, currents and the sense
amplifiers are analog and are not modelled. Their digital effect (which bit
is stored, and which bit a read returns) is.

## 1. The cell as a logic gate

An STT-SOT p-MTJ cell has two access transistors. One is in the
spin-transfer-torque path, through the junction. The other is in the
spin-orbit-torque path, along the heavy-metal strip under it. The cell
switches only when both currents flow. Three logic operands describe a
write:

| operand | physical meaning | logic meaning |
|---|---|---|
| A | both access transistors on | "this cell takes part in the write" |
| B | stored resistance (1 = high) | current state |
| C | polarity of the BL-SL voltage | value the write tends to store |

The next state is

    B' = A·C + ~A·B

So a cell with A = 0 keeps its value, and one with A = 1 takes C. Choosing C
gives different gates: C = 0 gives `~A·B` (AND-type), C = 1 gives `A + B`,
and C = ~B gives `A xor B`. `stt_sot_cell` is this equation on a clock edge,
enabled when both word lines are on.

## 2. Ternary values and the four-write multiplication

A ternary value P is split over the two cells of a computing cell
(`spinlim_pkg::trit_t`):

| P | P1 (cell-1, sign) | P2 (cell-2, non-zero) |
|---|---|---|
| -1 | 0 | 1 |
| 0 | 0 (free) | 0 |
| +1 | 1 | 1 |

The product of two values in this form is `(XNOR(P1,Q1), AND(P2,Q2))`.
Both parts come from the cell equation with A = ~Q:

* cell-1 holds P1 and is written with C = ~P1. Where Q1 = 0 (A = 1), it
  stores ~P1; where Q1 = 1, it keeps P1. The result is XNOR(P1, Q1).
* cell-2 holds P2 and is written with C = 0. Where Q2 = 0, it is cleared;
  where Q2 = 1, it keeps P2. The result is AND(P2, Q2).

A full multiplication is therefore four consecutive writes to one row group,
one clock cycle each:

| cycle | L (mode) | T (cell) | word lines | write driver drives | cell result |
|---|---|---|---|---|---|
| W1 | 0 memory | 0 | decoded WL | C_i1 = P1 | B1 = P1 |
| W2 | 1 SpinLiM | 0 | A = ~Q1 | ~C_i1 | B1 = XNOR(P1,Q1) |
| W3 | 0 memory | 1 | decoded WL | C_i2 = P2 | B2 = P2 |
| W4 | 1 SpinLiM | 1 | A = ~Q2 | 0 | B2 = AND(P2,Q2) |

P comes from the column (each column has its own value). Q comes from the
row (one value for the whole row group). After W4 every column of the group
holds its product P[c]·Q. The publication behind this design reports about
28.8 ns and about 2 pJ for one such parallel multiplication. In this model
each write is one clock, so a multiplication takes 4 cycles.

## 3. The array and its drivers

`spinlim_array` has 128 columns (BL/SL pairs) and 128 row groups. Each
group has two cell rows, and each cell row has an STT and a SOT word line,
so four word lines per group. That is a 128 x 256 cell array. The full
macro also has two reference columns for the sense amplifiers, which are
not modelled.

* `row_decoder` turns the group address into one-hot word lines WL_i. It is
  active during a write (`clk_sot`) or a read.
* `wl_driver` (one per group) takes WL_i, the mode L, the cell select T,
  the operand Q and the SOT window Clk_SOT. In memory mode it passes WL_i
  to the cell that T picks. In SpinLiM mode it passes `WL_i & ~Q`. The SOT
  word line is the same value gated by Clk_SOT.
* `write_driver` (one per column) sets the write polarity from the
  buffered bits C_i1/C_i2: `C_i1` or `C_i2` in memory mode, `~C_i1` or `0`
  in SpinLiM mode.
* `array_buffer` holds C_i1/C_i2 for all columns. It is loaded at once from
  a weight word, or one column per cycle when a convolution window is
  gathered.
* A read returns both bits of every column of one group. They are
  registered one cycle later on `out1`/`out2`, standing in for the sense
  amplifiers.

The array switches freely between plain memory writes and logic writes from
one cycle to the next. Writing a row group never disturbs the others.

## 4. Mapping a layer onto the array

Every layer is computed as `out[c] = sum_r P_r[c] * Q_r`: one row per
addend, one column per output.

**Fully connected.** Row r is input neuron r. P_r is its weight row, meaning
the weights to up to 128 output neurons, one per column. Q_r is the input
activation.

**Convolution.** Each column is one output pixel (oy, ox), with ox running
fastest. Each row is one kernel position (d, ky, kx), with kx running
fastest. P_r[c] is the input pixel `X[d][oy+ky][ox+kx]` and Q_r is the
kernel value `K[d][ky][kx]`. A 3x3 kernel over a 6x6 input thus uses 9
rows per input channel and 16 columns. Row r is "the input map shifted by
kernel offset r", multiplied by one kernel value.

`mapping_control` runs a layer:

1. For each row, fetch the operands. In FC mode this takes one cycle: the
   weight word goes into the array buffer and the activation becomes Q. In
   convolution mode the buffer is cleared, then the window is gathered from
   the global buffer, one column per cycle, and Q is taken from the kernel
   list.
2. Run W1-W4 on row group `r mod 128`.
3. When all 128 groups hold products, or the rows run out, read the used
   groups one per cycle into `counter_unit`. Then start again at group 0
   with the next rows. So a layer may have any number of rows; the counters
   keep adding across chunks.
4. Stream the column sums out through `pooling_unit`: in column order, or,
   for a convolution with `pool_en`, in 2x2 windows reduced to their
   maximum.

Columns beyond `n_cols` are loaded with 0 and contribute nothing. A
convolution wider than 128 output pixels is run in tiles of output rows:
point `x_base` at the first input row of the tile and set `out_h` to the
tile height, keeping `in_h` as the full map height.

Cycle cost per row: FC 6 cycles (fetch, load, 4 writes). Convolution
`1 + n_cols + 4` cycles. Plus one read cycle per row and a few cycles per
chunk, and one cycle per output.

## 5. The unit and its interface (`spinlim_top`)

```
 wm_* --> weight_memory (1024 x 128 values) --+--> array_buffer --> spinlim_array --> counter_unit --> pooling_unit --> res_*
 gb_* --> global_buffer (4096 values) --------+        ^               ^   (128 x 128 groups)  (128 x 16 bit)
                                      mapping_control --+---------------+--------------------------+
```

* Load weights with `wm_we/wm_waddr/wm_wdata`. A word is 128 ternary values
  (`trit_t [127:0]`). An FC layer stores one weight row per word. A kernel
  is a flat list `K[d][ky][kx]`, 128 values per word, starting at `w_base`.
* Load activations with `gb_we/gb_waddr/gb_wdata`, one value per address.
  FC inputs are stored at `x_base + r`; feature maps at
  `x_base + d*in_h*in_w + y*in_w + x`.
* Set `mode` (`MODE_FC` or `MODE_CONV`), `n_rows` (inputs, or K*K*D),
  `n_cols` (outputs, or out_h*out_w, at most 128), the convolution geometry
  and `pool_en`. Then pulse `start` while `busy` is low.
* Results arrive as `res_valid`/`res_data` (signed 16-bit), numbered by
  `res_idx`. `done` pulses one cycle after the last result.
* While `busy` is low, the computing array can also be used as an
  ordinary memory through `mem_*`. `mem_we` writes `mem_wdata` into cell
  row `mem_t` of group `mem_addr`. `mem_re` returns both cell rows of a
  group on `mem_rdata1/2` one cycle later. After a layer, the same read
  shows the products left in the array. The port is ignored while a layer
  runs.
* Reset `rst_n` is asynchronous and active low. The array cells and the
  memories are not reset.

The outputs are raw signed sums (or pooled maxima). Turning them into
ternary activations for the next layer, and sequencing layers, is left to
the host.

## 6. What this model adds to, and leaves out of, the published design

Taken from the design as published: the cell equation, the ternary
encoding, the four-write sequence, the behaviour of the word-line and write
drivers, the 128 x 128 array size, the convolution and FC mappings, and the
existence of mapping-control, counter and pooling units and of the global
buffer and weight memory.

Choices of this model, where the published description is silent or gives
only a name:

* A write is one clock edge, and a cell switches only when both word lines
  are on.
* In SpinLiM mode the operand is gated by the decoded row, so only the
  addressed group computes.
* A read returns both cells of a group in one cycle, one cycle after the
  request.
* 0 is encoded as (0, 0).
* Sizes: 16-bit counters, a 1024-word weight memory, a 4096-entry global
  buffer.
* Fetch, gather, chunking and output order are as described in section 4.
* Pooling is 2x2 max pooling applied to the signed sums.
* The array's typical memory mode is reached through a separate host port
  that is active only between layers.
* One computing array. The published floor plan shows several sub-arrays,
  but their number is not given.

Not modelled:

* the magnetic device and its switching errors;
* the current-mean pre-charge sense amplifiers and the two reference
  columns;
* analog BL/SL levels and pulse widths;
* energy and timing in nanoseconds;
* the activation function between layers.

## 7. Capacity against the evaluated networks

* **MNIST, 784-500-300-200-10.** It runs layer by layer: at most 784 rows
  (7 chunks), outputs in tiles of up to 128, 784 weight words, |sum| < 2^15.
  Not all 604,000 weights fit in the 131,072-value weight memory at once,
  so the host reloads them per tile.
* **CIFAR-10** (conv 128-256-512 kernels, then FC 512-1024-1024-10). The
  first convolution (32x32x3 input) and the FC layers fit, in tiles. The
  second convolution's input feature map (at least 14x14x128 values) does
  not fit the 4096-entry global buffer, and the counters cannot carry sums
  across layer runs. That layer therefore needs a larger `GB_DEPTH`.

## 8. Files

| file | contents |
|---|---|
| `rtl/spinlim_pkg.sv` | `trit_t`, `layer_mode_e`, encode/value/multiply helpers |
| `rtl/stt_sot_cell.sv` | one stateful cell |
| `rtl/ternary_mul_cell.sv` | two cells on one BL/SL pair |
| `rtl/wl_driver.sv`, `rtl/write_driver.sv`, `rtl/row_decoder.sv` | array periphery |
| `rtl/spinlim_array.sv` | the computing array |
| `rtl/array_buffer.sv`, `rtl/counter_unit.sv`, `rtl/pooling_unit.sv` | operand buffer, column counters, pooling |
| `rtl/weight_memory.sv`, `rtl/global_buffer.sv` | weight and activation storage |
| `rtl/mapping_control.sv` | layer sequencer |
| `rtl/spinlim_top.sv` | the complete unit |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

## 9. Simulating

Every testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<m>`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/spinlim_pkg.sv tb/tb_spinlim_top.sv --top-module tb_spinlim_top -o sim
./obj_dir/sim
```

For another block, use `tb/tb_<block>.sv` and its top-module name. The
simulator finds the RTL files through `-Irtl`, because each file is named
after its module.

What the testbenches cover:

* The cell testbench checks the eight-row truth table, and that one current
  alone does not switch the cell.
* The computing-cell testbench runs all nine ternary products, with both
  encodings of 0.
* The driver and decoder testbenches are exhaustive.
* The array testbench checks memory-mode readback and random products in
  every group, and that each product takes 4 cycles.
* The mapping-control testbench runs FC and convolution layers, with and
  without pooling. It uses a datapath model written in the testbench and
  checks the order of the four writes.
* `tb_spinlim_top` runs the unit at its full default size. It first uses
  the array as an ordinary memory (all 256 cell rows written and read
  back). It then runs an FC
  layer of 150 inputs by 100 outputs, a 6x6x16 convolution with pooling,
  and a 10x10x2 convolution, each spanning chunks where the rows allow. It
  compares every result with a direct computation, reads one row group's
  leftover products through the memory port, and checks that each
  mechanism actually occurred. The FC layer (150 rows) and the pooled
  convolution (144 rows) both take more than one chunk.
* `tb_spinlim_workloads` runs slices of the evaluated networks at full
  size:
  * a 128-output tile of the first MNIST layer (784 rows, 7 chunks, about
    5,600 cycles);
  * the last MNIST layer (200 to 10);
  * a four-output-row tile of the first CIFAR-10 convolution (32x32x3
    input, 5x5x3 kernel, 112 columns, pooled, about 9,000 cycles).

The full-size run takes about a minute of wall time, most of it for
building the 32k-cell model; simulating takes under a second.
