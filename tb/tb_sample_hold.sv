// tb_sample_hold -- the held values must follow the bitlines only on a sample
// strobe and keep their value while the bitlines change.
module tb_sample_hold;
  import reboc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic sample = 0;
  logic [XB_COLS-1:0][BL_BITS-1:0] bl, held, exp_v;

  sample_hold dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bl = '0; exp_v = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 50; it++) begin
      @(negedge clk);
      for (int c = 0; c < XB_COLS; c++) bl[c] = BL_BITS'($urandom);
      sample = 1'($urandom);
      if (sample) exp_v = bl;
      @(posedge clk); #1;
      checks++;
      if (held != exp_v) begin failures++; $display("held mismatch at %0d", it); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
