# Block-circulant neural-network accelerator on ReRAM crossbars

A block-circulant weight matrix is made of k x k sub-matrices. Each row of a
sub-matrix is the row above it rotated by one place, so the whole sub-matrix is
defined by one k-element vector, its *weight representative vector*. FFT-based
accelerators exploit this structure in the frequency domain. This design
computes the product directly in analog ReRAM crossbars instead. Only the
representative vectors are stored, one per bitline, which cuts crossbar storage
by a factor of k. The *input* is rotated in a shift register in front of the
crossbar, one place per step. After k steps every row of every circulant block
has been produced, and the weights never have to be rewritten.

Around that core the design adds four techniques:

- **Horizontal weight slicing.** An 8-bit weight occupies four adjacent 2-bit
  cells on the same wordline.
- **Intra-crossbar weight duplication.** A pre-rotated copy of the
  representative vector sits on extra bitlines, so fewer rotation steps are
  needed.
- **Input slice reusing.** A chain of input buffers slides a window of input
  slices through a feature-map column, so each slice is fetched once.
- **Input tile sharing.** All kernel columns work on the same input column at
  once, and their partial sums are combined in the output buffer.

The layers of a network run at the same time on different processing elements
and pass results to each other as soon as they exist (an intra-layer pipeline).

Everything is SystemVerilog in `rtl/`, with a self-checking testbench per
module in `tb/`.

## Structure

```
reboc_top                 16 PEs on a 4x4 mesh + global buffer (128 KB)
 ├─ global_buffer         host port, streams input to PE 0, collects from PE 15
 └─ pe  (x16)             one network layer each
     ├─ pe_buffer         4 KB FIFO of incoming activations
     ├─ input_buffer      chain of 4 slice buffers + staging buffer (slice reuse)
     ├─ bcu (x4)          one compute unit = one kernel column (tile sharing)
     │   ├─ bcu_ctrl      shift / bit-plane / ADC schedule
     │   └─ xb_lane (x8)  one crossbar = one kernel row
     │       ├─ shift_reg     input slice, rotated inside k-row blocks
     │       ├─ rram_xbar     128x128 2-bit cells, 1-bit DAC wordlines   (behavioural)
     │       ├─ sample_hold   holds the bitlines                          (behavioural)
     │       ├─ adc           one per crossbar, one column per clock      (behavioural)
     │       └─ shift_add     combines weight slices and input bits
     ├─ output_buffer     4 banks of partial sums, tile-sharing accumulation
     ├─ relu_quant        ReLU + shift/saturate to 8 bits
     └─ max_pool          2x2, stride 2
```

`reboc_pkg` holds the sizes and the per-layer configuration record
`layer_cfg_t`. The defaults are 128x128 crossbars with 2-bit cells, 8-bit
activations (a 128-byte shift register per crossbar), 8 crossbars per compute
unit, 4 compute units per PE, 16 PEs, a 4 KB PE buffer and a 128 KB global
buffer.

## The shift method inside one crossbar

For a circulant block with representative vector w, output i is

    y[i] = sum_m w[m] * x[(m + i) mod k]

Row m of a block holds w[m]. After t rotations, row m of the shift register holds
x[(m+t) mod k], so bitline sums at step t give y[t]. A 128-row crossbar holds
128/k input blocks stacked on its wordlines. Each block of the shift register
rotates on its own, and one bitline sums over all input blocks. A bitline
therefore produces one row of one block-row of the block-circulant matrix.

**Bitline layout.** Logical output e of a crossbar is output block e/g,
duplicate e mod g. It uses the four columns 4e..4e+3, least significant weight
slice first. Duplicate d stores the vector rotated by d*k/g (row m holds
w[(m - d*k/g) mod k]), so at step t it produces channel (e/g)*k + d*k/g + t. With
duplication g the controller needs only k/g steps, and a crossbar has
n_oblk * g * 4 <= 128 used columns.

**Signed weights.** Cells can only store non-negative levels. Each weight is
stored as w + 128. The shift-and-add stage subtracts 128 * sum(x), which the
shift register computes when it loads the slice. The result is the exact signed
dot product.

**Bit-serial inputs.** The wordline DACs are 1 bit wide, so each step applies
the eight bit planes of the inputs one after another. The per-step sequence is:

- apply the bit plane;
- wait one clock while the bitlines settle;
- sample them into the sample-and-hold;
- convert the used columns on the crossbar's single ADC, one per clock.

Each ADC code is added to its logical output, shifted left by
(input bit + 2 * weight slice). With 9-bit ADC codes the result is exact.

**Timing of one operation**, from the controller's load state through its done
state, in clocks:

    1 + (k/g) * (8 * (2 + ncols) + 1 + nout + 1) + 1
    nout = n_oblk * g,  ncols = 4 * nout

For example, k = 16, g = 2, two output blocks takes 1138 clocks. The
testbenches check this count.

## Convolution in a PE: slice reuse and tile sharing

Activations travel as bytes in this order: channel fastest, then row, then
column. A *slice* is the 128 channels at one position. A *tile* is one column of
the feature map. A layer has kernel size r (1..4), stride 1 and no padding.
Input and output channel counts are at most 128, so one slice fills one crossbar
exactly. A fully connected layer is a 1x1 map with r = 1.

- **Slice reuse.** Slices are gathered one at a time into a staging buffer. When
  the PE advances, every slice in the chain moves up one buffer and the oldest
  drops out. The bottom r buffers then hold r consecutive slices of the current
  tile, so each slice serves r windows but is read from the PE buffer once.
- **Tile sharing.** Compute unit g holds kernel column g, and its lane l holds
  kernel row l. All r units start together on the same window. For tile i, unit
  g produces the partial sum of output column i - g. The output buffer keeps one
  bank per output column, bank = column mod 4, so the r units write different
  banks in the same clock. Unit 0 starts a sum and the others add to it. When
  unit r-1 has added its share, output column i-r+1 is complete for that window
  row.
- **Readout.** The complete column is then read channel by channel. Each value
  goes through `relu_quant` (arithmetic right shift by `out_shift`, then clamp to
  0..255 with ReLU on, or to a signed byte with it off) and `max_pool`, then
  into an output register on the link to the next PE. The readout waits while
  the downstream link is not ready. The input side keeps filling the staging
  buffer from the PE buffer while the crossbars compute.

## Layer pipeline over the array

PE n sends its output stream to PE n+1 along a snake path through the 4x4 mesh
(row 0 left to right, row 1 right to left, ...). The global buffer feeds PE 0
and stores whatever PE 15 emits. A PE whose configuration has `active = 0`
forwards its input link untouched, so a network with fewer than 16 layers can be
placed on any PEs in path order. Every PE starts on the same `start` pulse and
begins work as soon as its first slices arrive. A downstream layer therefore
works on the first output slices while the upstream layer still computes.

## Using it

Host sequence on `reboc_top`:

1. Write each used PE's `layer_cfg_t` (`cfg_we`, `cfg_pe`, `cfg_data`). The
   fields are: active, r, h_in, w_in, k_log2, g_log2, n_oblk, relu_en, pool_en
   and out_shift. `n_oblk << k_log2` is the number of output channels.
2. Program the weights one cell per clock: PE, compute unit (kernel column),
   lane (kernel row), row, column and 2-bit value. The cell layout is described
   under "The shift method inside one crossbar" above.
3. Write the input image into the global buffer.
4. Pulse `start` with `in_base`, `in_len`, `out_base` and `out_len`, then wait
   for `done`.

`tb/tb_reboc_top.sv` does all of this and is the reference example.

Each testbench simulates with plain Verilator, for example:

    verilator --binary -Irtl -y rtl --top-module tb_pe rtl/reboc_pkg.sv tb/tb_pe.sv
    ./obj_dir/Vtb_pe

Each testbench prints `TB_RESULT checks=N failures=M`. The full-array testbench
`tb_reboc_top` runs at the default sizes. Building it takes about four minutes;
the simulation itself takes seconds.

## What the testbenches cover

- Every leaf block is compared with values computed independently in the
  testbench.
- `tb_bcu` and `tb_xb_lane` check the block-circulant product against the
  expanded circulant matrix, with duplication g = 1, 2 and 4 and k = 8, 16 and
  32.
- `tb_pe` runs a 3x3 convolution on a 5x5x128 input, with random input gaps and
  output stalls, with and without ReLU and max pooling.
- `tb_reboc_top` runs three layers on the full array: a 3x3 convolution, a 2x2
  convolution with ReLU and max pooling, and a 128x128 fully connected layer
  with k = 128 and g = 8. Inactive PEs sit between the layers. It checks the
  final bytes against a layer-by-layer reference, and it counts a failure for
  any of these mechanisms that never occurs: slice reuse, tile sharing,
  duplication, weight slicing, input stalls, ReLU clamping, pooling, forwarding
  and overlapping layers.

## Limits and departures

- **Crossbar, sample-and-hold and ADC are behavioural models.** They are ideal:
  exact bitline sums, no device noise, one clock to settle, and one conversion
  per clock. Cell programming takes one clock and does not model the ReRAM
  write time.
- **One layer per PE.** A layer must fit in one PE:
  - at most 128 input and 128 output channels;
  - kernel size at most 4;
  - stride 1, no padding;
  - height at most 16 (the output-buffer depth).

  Splitting a large layer over several PEs, larger fully connected layers, and
  spilling partial sums to the global buffer are not built. Real networks
  (LeNet, AlexNet, CifarNet, Tiny YOLO) exceed these limits and cannot be run
  as they stand.
- **Fixed precision.** Weights and activations are always 8 bits. The
  evaluated networks use 2-, 4- or 6-bit MACs. Such values fit inside the
  8-bit format, but there is no faster mode for fewer bits.
- **No layer replication.** The document balances the pipeline by giving a
  busy layer several copies across PEs. Here each layer has exactly one PE.
- **Output buffer size.** The output buffer keeps r output columns of partial
  sums in the PE, which is more storage than a single column of output channels.
- **Mesh.** Only the neighbour links of the pipeline path exist. There is no
  router.
- **Input buffers.** One input-buffer chain per PE serves all of its crossbars.
  Every compute unit sees the same window, so per-crossbar input buffers are not
  needed.
- **Design choices of this RTL.** The offset encoding for signed weights, the
  ADC width, the requantisation by shift-and-saturate, the 2x2 pooling window,
  the valid/ready links and the single clock are this design's own choices.
  The 1.2 GHz clock appears only as a target; nothing in the RTL depends on it.
- **Duplicated column.** The duplicated column follows the stored values of the
  published g = 2 example (w3, w4, w1, w2 under w1, w2, w3, w4). With a one-step
  input shift that column yields y1 and y3 in the first step and y2 and y4 in
  the second. It does not yield y1 and y2 together.

## Networks from the evaluation

The evaluation runs LeNet, AlexNet, CifarNet and Tiny YOLO. The document does
not give their layer sizes; the sizes used here come from their usual
published forms. Each one has layers beyond the built limits: kernels larger
than 4, strides above 1, maps taller than 16, or more than 128 channels. None
can be run as it stands. The 3x3 convolution on a 5x5x128 input, used as the
document's worked example, fits one PE and is simulated.
