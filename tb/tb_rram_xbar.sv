// tb_rram_xbar -- checks the crossbar model: random 2-bit cells are programmed,
// random wordline patterns applied, and one clock later every bitline compared with a sum
// computed here from the testbench's own copy of the cells.
module tb_rram_xbar;
  import reboc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic prog_en = 0;
  logic [6:0] prog_row, prog_col;
  logic [1:0] prog_val;
  logic [XB_ROWS-1:0] wl;
  logic [XB_COLS-1:0][BL_BITS-1:0] bl;
  logic [1:0] model [XB_ROWS][XB_COLS];

  rram_xbar dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wl = '0; prog_row = '0; prog_col = '0; prog_val = '0;
    for (int r = 0; r < XB_ROWS; r++) for (int c = 0; c < XB_COLS; c++) model[r][c] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // program a random subset of columns fully
    for (int c = 0; c < 8; c++)
      for (int r = 0; r < XB_ROWS; r++) begin
        @(negedge clk);
        prog_en = 1; prog_row = 7'(r); prog_col = 7'(c * 17); prog_val = 2'($urandom);
        model[r][c*17] = prog_val;
      end
    @(negedge clk); prog_en = 0;
    for (int it = 0; it < 20; it++) begin
      @(negedge clk);
      for (int r = 0; r < XB_ROWS; r++) wl[r] = (it == 0) ? 1'b1 : 1'($urandom);
      @(posedge clk); #1;
      for (int c = 0; c < XB_COLS; c++) begin
        int s;
        s = 0;
        for (int r = 0; r < XB_ROWS; r++) if (wl[r]) s += model[r][c];
        checks++;
        if (int'(bl[c]) != s) begin
          failures++;
          if (failures < 4) $display("it %0d bitline %0d: got %0d want %0d", it, c, bl[c], s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
