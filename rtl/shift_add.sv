// shift_add -- shift-and-add (S&A) stage behind a crossbar's ADC.
//
// With horizontal weight slicing a weight of W_BITS bits occupies SLICES adjacent
// bitlines, CELL_BITS per cell, least significant slice on the lowest column of
// its group; with bit-serial inputs every crossbar read sees one input bit plane.
// Each ADC code for column `col` and input bit `bit_idx` is therefore added to
// logical output col / SLICES after a left shift of bit_idx + CELL_BITS*(col mod
// SLICES). Weights are stored offset by 2**(W_BITS-1) so that cells hold only
// non-negative levels; on read the stage removes the offset by subtracting
// 2**(W_BITS-1) times the sum of the inputs (`xsum`), giving a signed dot product.
// The offset encoding is this design's choice. `clear` zeroes all sums.
// Accumulation happens on the clock edge; `rd_val` is combinational.
module shift_add
  import reboc_pkg::*;
#(
  parameter int COLS   = XB_COLS,
  parameter int SLICES = W_SLICES,
  parameter int CBITS  = CELL_BITS,
  parameter int WB     = W_BITS,
  parameter int ABITS  = ADC_BITS,
  parameter int IBW    = IN_BITS,
  parameter int XSW    = IN_BITS + $clog2(XB_ROWS),
  parameter int AW     = ACC_BITS,
  parameter int NOUT   = COLS / SLICES
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      acc_en,
  input  logic [$clog2(COLS)-1:0]   col,
  input  logic [$clog2(IBW)-1:0]    bit_idx,
  input  logic [ABITS-1:0]          adc_val,
  input  logic [XSW-1:0]            xsum,
  input  logic [$clog2(NOUT)-1:0]   rd_idx,
  output logic signed [AW-1:0]      rd_val
);

  logic signed [AW-1:0] acc [NOUT];

  logic [$clog2(NOUT)-1:0] idx;
  logic [AW-1:0]           addend;
  int unsigned             sh;
  assign idx    = $clog2(NOUT)'(col / SLICES);
  assign sh     = 32'(bit_idx) + CBITS * (32'(col) % SLICES);
  assign addend = AW'(adc_val) << sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NOUT; i++) acc[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < NOUT; i++) acc[i] <= '0;
    end else if (acc_en) begin
      acc[idx] <= acc[idx] + $signed(addend);
    end
  end

  assign rd_val = acc[rd_idx] - $signed(AW'(xsum) << (WB - 1));

endmodule
