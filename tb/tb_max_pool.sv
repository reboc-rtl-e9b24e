// tb_max_pool -- streams a random 5x5 map of 128 channels column by column and
// checks that exactly the 2x2 window maxima of the top-left 4x4 part come out,
// in order; then checks pass-through with pooling off.
module tb_max_pool;
  import reboc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic pool_en = 1, in_valid = 0, out_valid;
  logic [5:0] col;
  logic [3:0] row;
  logic [7:0] ch;
  act_t din, dout;
  act_t fm [5][5][XB_ROWS];
  int nout = 0;

  max_pool dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    col = '0; row = '0; ch = '0; din = '0;
    foreach (fm[i, j, c]) fm[i][j][c] = 8'($urandom);
    for (int o = 0; o < 5; o++)
      for (int j = 0; j < 5; j++)
        for (int c = 0; c < XB_ROWS; c++) begin
          @(negedge clk);
          in_valid = 1; col = 6'(o); row = 4'(j); ch = 8'(c); din = fm[o][j][c];
          #1;
          if (out_valid) begin
            act_t m;
            m = fm[o-1][j-1][c];
            if (fm[o-1][j][c] > m) m = fm[o-1][j][c];
            if (fm[o][j-1][c] > m) m = fm[o][j-1][c];
            if (fm[o][j][c] > m) m = fm[o][j][c];
            checks++; nout++;
            if (dout != m) failures++;
          end
        end
    checks++; if (nout != 4 * XB_ROWS) begin failures++; $display("outputs %0d", nout); end
    pool_en = 0;
    for (int it = 0; it < 100; it++) begin
      @(negedge clk); din = 8'($urandom); col = 6'($urandom); row = 4'($urandom); #1;
      checks++; if (!out_valid || dout != din) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
