// reboc_pkg: sizes, types and small helpers shared by the block-circulant
// ReRAM accelerator. Defaults follow the published configuration: 128x128
// crossbars of 2-bit cells, 8 crossbars per compute unit, 4 compute units per
// processing element, 16 processing elements, a 4 KB PE buffer and a 128 KB
// global buffer. Input activations are 8 bits (a 128 B shift register per
// 128-row crossbar) and weights are at most 8 bits, split into four 2-bit
// slices on adjacent bitlines. Accumulator width, ADC resolution and the
// per-layer configuration record are this design's own choices.
package reboc_pkg;

  // Crossbar and data precision
  parameter int XB_ROWS   = 128;             // wordlines = elements of one input slice
  parameter int XB_COLS   = 128;             // bitlines
  parameter int CELL_BITS = 2;               // bits stored per ReRAM cell
  parameter int IN_BITS   = 8;               // activation precision (SR 128 B / 128 rows)
  parameter int W_BITS    = 8;               // weight precision (b7..b0 over 4 cells)
  parameter int W_SLICES  = W_BITS / CELL_BITS;
  parameter int BL_BITS   = $clog2(XB_ROWS * ((1 << CELL_BITS) - 1) + 1); // 9
  parameter int ADC_BITS  = BL_BITS;         // lossless conversion of one bitline
  parameter int ACC_BITS  = 32;              // partial-sum width
  parameter int MAX_OUTS  = XB_COLS / W_SLICES; // logical outputs per crossbar read

  // Hierarchy
  parameter int XBS_PER_BCU = 8;
  parameter int BCUS_PER_PE = 4;             // also the largest kernel size (ITS groups)
  parameter int NUM_PES     = 16;
  parameter int MESH_DIM    = 4;

  // Buffers
  parameter int PE_BUF_BYTES = 4096;
  parameter int GB_BYTES     = 131072;
  parameter int H_MAX        = 16;           // largest feature-map height held by the OB

  typedef logic [IN_BITS-1:0]  act_t;
  typedef logic [ACC_BITS-1:0] acc_t;
  typedef act_t [XB_ROWS-1:0]  slice_t;      // one input slice: XB_ROWS channels at one (x,y)

  // Per-PE layer configuration, written by the host before a run.
  typedef struct packed {
    logic       active;     // 0: the PE forwards its input stream untouched
    logic [2:0] r;          // kernel size r x r, 1..BCUS_PER_PE (r = 1 with 1x1 maps is an FC layer)
    logic [5:0] h_in;       // input height (slices per tile)
    logic [5:0] w_in;       // input width (tiles)
    logic [2:0] k_log2;     // block-circulant block size k = 2**k_log2, 2..XB_ROWS
    logic [2:0] g_log2;     // intra-crossbar duplication degree g = 2**g_log2
    logic [7:0] n_oblk;     // output blocks; output channels = n_oblk * k <= XB_ROWS
    logic       relu_en;
    logic       pool_en;    // 2x2 max pool, stride 2
    logic [4:0] out_shift;  // requantisation: right shift before saturating to IN_BITS
  } layer_cfg_t;

endpackage
