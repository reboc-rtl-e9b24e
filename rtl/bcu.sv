// bcu -- block-circulant compute unit: XBS crossbar lanes driven in lockstep by
// one controller, their per-output results summed on the unit's shared bus.
//
// In a convolution the unit is one input-tile-sharing crossbar group, i.e. one
// kernel column: lane l holds the weights of kernel row l and receives the l-th
// slice of the current input window, so the bus sum is the group's partial sum
// for one output position. Only lanes below `n_lanes` (the kernel size) are
// added. `start` runs one operation (see bcu_ctrl for its cycle count);
// results leave as a stream of (psum_ch, psum) with psum_valid, one per clock.
// Lanes are programmed through prog_* with a lane index.
module bcu
  import reboc_pkg::*;
#(
  parameter int XBS = XBS_PER_BCU
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          prog_en,
  input  logic [$clog2(XBS)-1:0]        prog_lane,
  input  logic [$clog2(XB_ROWS)-1:0]    prog_row,
  input  logic [$clog2(XB_COLS)-1:0]    prog_col,
  input  logic [CELL_BITS-1:0]          prog_val,
  input  logic                          start,
  input  logic [2:0]                    k_log2,
  input  logic [2:0]                    g_log2,
  input  logic [7:0]                    n_oblk,
  input  logic [3:0]                    n_lanes,
  input  slice_t                        lane_data [XBS],
  output logic                          busy,
  output logic                          done,
  output logic                          psum_valid,
  output logic [7:0]                    psum_ch,
  output logic signed [ACC_BITS-1:0]    psum
);

  logic                          sr_load, sr_rotate, sample, conv, sa_clear;
  logic [$clog2(IN_BITS)-1:0]    bit_sel;
  logic [$clog2(XB_COLS)-1:0]    conv_col;
  logic [$clog2(MAX_OUTS)-1:0]   rd_idx;
  logic signed [ACC_BITS-1:0]    rd_val [XBS];

  bcu_ctrl u_ctr (
    .clk, .rst_n, .start, .k_log2, .g_log2, .n_oblk, .busy, .done,
    .sr_load, .sr_rotate, .bit_sel, .sample, .conv, .conv_col, .sa_clear, .rd_idx,
    .out_valid(psum_valid), .out_ch(psum_ch)
  );

  for (genvar l = 0; l < XBS; l++) begin : g_lane
    xb_lane u_lane (
      .clk, .rst_n,
      .prog_en(prog_en && prog_lane == l), .prog_row, .prog_col, .prog_val,
      .sr_load, .sr_data(lane_data[l]), .sr_rotate, .k_log2, .bit_sel, .sample,
      .conv, .conv_col, .sa_clear, .rd_idx, .rd_val(rd_val[l])
    );
  end

  // shared bus: sum of the active lanes
  always_comb begin
    psum = '0;
    for (int l = 0; l < XBS; l++)
      if (4'(l) < n_lanes) psum = psum + rd_val[l];
  end

endmodule
