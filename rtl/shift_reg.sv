// shift_reg -- the per-crossbar input shift register (SR) of the shift method.
//
// The weight representative vector of each k x k circulant block stays fixed in
// the crossbar; instead the input is rotated. `load` copies one input slice (one
// element per wordline) from the input buffer. Each `rotate` moves every element
// up by one row inside its own k-row block, circularly: row i takes the element of
// row i+1, and the first row of a block takes the element of its last row, so after
// t rotations row j of a block holds x[(j+t) mod k] as in the published shift
// example. k = 2**k_log2 is set per layer. Inputs are applied bit-serially through
// 1-bit DACs: `wl` is bit `bit_sel` of every element. `xsum`, the sum of all
// loaded elements, is captured on load; rotation does not change it and the
// shift-and-add stage uses it to remove the weight offset. Load and rotate act on
// the clock edge; `wl` follows the stored value combinationally.
module shift_reg
  import reboc_pkg::*;
#(
  parameter int ROWS = XB_ROWS,
  parameter int IBW  = IN_BITS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        load,
  input  logic [ROWS-1:0][IBW-1:0]    load_data,
  input  logic                        rotate,
  input  logic [2:0]                  k_log2,
  input  logic [$clog2(IBW)-1:0]      bit_sel,
  output logic [ROWS-1:0]             wl,
  output logic [IBW+$clog2(ROWS)-1:0] xsum
);

  localparam int RW = $clog2(ROWS);
  logic [ROWS-1:0][IBW-1:0] sr;
  logic [RW-1:0]            kmask;
  assign kmask = RW'((1 << k_log2) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      xsum <= '0;
    end else if (load) begin
      logic [IBW+RW-1:0] s;
      s = '0;
      for (int i = 0; i < ROWS; i++) s = s + (IBW+RW)'(load_data[i]);
      sr   <= load_data;
      xsum <= s;
    end else if (rotate) begin
      // row i takes the element at (i+1) mod k inside its block
      for (int i = 0; i < ROWS; i++)
        sr[i] <= sr[(RW'(i) & ~kmask) | ((RW'(i) + RW'(1)) & kmask)];
    end
  end

  always_comb
    for (int i = 0; i < ROWS; i++) wl[i] = sr[i][bit_sel];

endmodule
