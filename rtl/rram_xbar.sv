// rram_xbar -- BEHAVIOURAL MODEL of an analog ReRAM crossbar (not synthesizable
// hardware in a real chip: the array is a resistive memory with analog readout).
//
// ROWS x COLS cells, each holding a CELL_BITS conductance level 0..2**CELL_BITS-1.
// The wordlines are driven by 1-bit DACs, so a wordline is either on or off for
// one read; the model folds the DACs in: wl[r] = 1 applies the read voltage to
// row r. Each bitline then carries the sum over the active rows of its cells'
// levels, returned here as an exact integer bl[c] (Kirchhoff summation with ideal
// devices: no noise, no IR drop).
//
// Timing: the bitlines settle one clock after the wordlines change: bl is
// registered and is recomputed on a clock edge where wl differs from the value
// seen at the previous edge. Cells are programmed one at a time through prog_*
// on a clock edge (the real write latency is not modelled); a programmed cell
// updates its bitline at the same edge. Cells start at level 0 after reset.
module rram_xbar
  import reboc_pkg::*;
#(
  parameter int ROWS  = XB_ROWS,
  parameter int COLS  = XB_COLS,
  parameter int CBITS = CELL_BITS,
  parameter int BLW   = $clog2(ROWS * ((1 << CBITS) - 1) + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     prog_en,
  input  logic [$clog2(ROWS)-1:0]  prog_row,
  input  logic [$clog2(COLS)-1:0]  prog_col,
  input  logic [CBITS-1:0]         prog_val,
  input  logic [ROWS-1:0]          wl,
  output logic [COLS-1:0][BLW-1:0] bl
);

  logic [CBITS-1:0] cells [ROWS][COLS];
  logic [ROWS-1:0]  wl_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          cells[r][c] <= '0;
      wl_q <= '0;
      bl   <= '0;
    end else begin
      wl_q <= wl;
      if (wl != wl_q) begin
        // new wordline pattern: full analog read of every bitline
        for (int c = 0; c < COLS; c++) begin
          logic [BLW-1:0] sum;
          sum = '0;
          for (int r = 0; r < ROWS; r++)
            if (wl[r]) sum = sum + BLW'(cells[r][c]);
          if (prog_en && wl[prog_row] && 32'(prog_col) == c)
            sum = sum - BLW'(cells[prog_row][c]) + BLW'(prog_val);
          bl[c] <= sum;
        end
      end else if (prog_en && wl[prog_row]) begin
        // same wordlines: only the programmed cell's bitline changes
        bl[prog_col] <= bl[prog_col] - BLW'(cells[prog_row][prog_col]) + BLW'(prog_val);
      end
      if (prog_en) cells[prog_row][prog_col] <= prog_val;
    end
  end

endmodule
