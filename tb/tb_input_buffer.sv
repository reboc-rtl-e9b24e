// tb_input_buffer -- pushes five random slices through the chain of four input
// buffers as in input slice reusing: after each advance the bottom buffer must
// hold the newest slice and each slice must move up one buffer, the oldest being
// dropped. Also checks that the staging buffer refuses data when full and that
// an advance without a full staging buffer does nothing.
module tb_input_buffer;
  import reboc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic flush = 0, in_valid = 0, in_ready, staging_full, advance = 0;
  act_t in_data;
  slice_t slots [BCUS_PER_PE];
  slice_t sent [8];

  input_buffer dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_data = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 5; n++) begin
      for (int e = 0; e < XB_ROWS; e++) sent[n][e] = 8'($urandom);
      for (int e = 0; e < XB_ROWS; e++) begin
        @(negedge clk); in_valid = 1; in_data = sent[n][e];
        if (e == 3) begin advance = 1; end   // not full yet: must be ignored
        else advance = 0;
      end
      @(negedge clk); in_valid = 1; in_data = 8'hAA; advance = 0;   // refused: full
      #1; checks++; if (in_ready || !staging_full) failures++;
      @(negedge clk); in_valid = 0; advance = 1;
      @(negedge clk); advance = 0;
      for (int s = 0; s < BCUS_PER_PE; s++) begin
        int idx;
        idx = n - (BCUS_PER_PE - 1 - s);
        if (idx >= 0) begin
          checks++;
          if (slots[s] != sent[idx]) begin failures++; $display("after %0d: slot %0d wrong", n, s); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
