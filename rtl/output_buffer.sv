// output_buffer -- the PE's output buffer (OB), which combines the partial sums of
// the input-tile-sharing crossbar groups. Group g working on input tile i produces
// psum(i, g), a contribution to output column o = i - g; output column o is
// complete once groups 0..r-1 have seen tiles o..o+r-1. NB banks (one per group)
// each hold the sums of one output column for every window row and channel; the
// bank of column o is o mod NB, so the r groups, which always work on different
// columns, write different banks in the same clock. A write with `first` set
// starts a new sum, otherwise it adds. The read port is combinational and is used
// after a column is complete. Bank organisation and sizes are this design's choice.
module output_buffer
  import reboc_pkg::*;
#(
  parameter int NB   = BCUS_PER_PE,
  parameter int HMAX = H_MAX
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [$clog2(HMAX)-1:0]     wr_j,
  input  logic [7:0]                  wr_ch,
  input  logic [NB-1:0]               wr_en,
  input  logic [NB-1:0]               wr_first,
  input  logic signed [ACC_BITS-1:0]  wr_data [NB],
  input  logic [$clog2(NB)-1:0]       rd_bank,
  input  logic [$clog2(HMAX)-1:0]     rd_j,
  input  logic [7:0]                  rd_ch,
  output logic signed [ACC_BITS-1:0]  rd_data
);

  localparam int CHW = $clog2(XB_ROWS);
  localparam int AW  = $clog2(HMAX) + CHW;
  logic signed [ACC_BITS-1:0] mem [NB][HMAX * XB_ROWS];
  logic [AW-1:0] waddr, raddr;

  assign waddr = {wr_j, wr_ch[CHW-1:0]};
  assign raddr = {rd_j, rd_ch[CHW-1:0]};

  for (genvar b = 0; b < NB; b++) begin : g_bank
    always_ff @(posedge clk)
      if (wr_en[b])
        mem[b][waddr] <= wr_first[b] ? wr_data[b] : mem[b][waddr] + wr_data[b];
  end

  assign rd_data = mem[rd_bank][raddr];

  // rst_n is kept for a uniform interface; the sums need no reset because every
  // sum is started by a `first` write before it is read.
  logic unused_rst;
  assign unused_rst = rst_n;

endmodule
