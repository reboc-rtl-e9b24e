// max_pool -- the max pool unit: 2x2 windows with stride 2 over the output
// stream of a layer. Outputs arrive column by column (`col`), within a column row
// by row (`row`), and within a row channel by channel (`ch`). A line buffer keeps,
// for every row pair and channel, the running maximum; the element at an odd
// column and odd row completes a window and is emitted on `out_valid` in the same
// clock. Trailing odd rows or columns are dropped. With `pool_en` low every
// element passes straight through. Values compare as unsigned (pooling follows
// the ReLU). Window size and stride are this design's choice.
module max_pool
  import reboc_pkg::*;
#(
  parameter int HMAX = H_MAX
) (
  input  logic                    clk,
  input  logic                    pool_en,
  input  logic                    in_valid,
  input  logic [5:0]              col,
  input  logic [$clog2(HMAX)-1:0] row,
  input  logic [7:0]              ch,
  input  act_t                    din,
  output logic                    out_valid,
  output act_t                    dout
);

  localparam int CHW = $clog2(XB_ROWS);
  localparam int RPW = $clog2(HMAX) - 1;

  act_t line [HMAX/2][XB_ROWS];
  act_t prev, m;
  logic first;

  assign prev  = line[row[RPW:1]][ch[CHW-1:0]];
  assign first = !col[0] && !row[0];
  assign m     = (first || din > prev) ? din : prev;

  always_ff @(posedge clk)
    if (in_valid && pool_en) line[row[RPW:1]][ch[CHW-1:0]] <= m;

  assign out_valid = in_valid && (!pool_en || (col[0] && row[0]));
  assign dout      = pool_en ? m : din;

endmodule
