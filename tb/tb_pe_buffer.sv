// tb_pe_buffer -- random producer and consumer stalls through a 16-entry PE
// buffer: the output order must equal the input order, nothing may be lost or
// duplicated, and the full condition must be reached and hold back the producer.
module tb_pe_buffer;
  import reboc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, fulls = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  act_t in_data, out_data;
  act_t q [$];

  pe_buffer #(.DEPTH(16)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int nsent = 0, nrcv = 0;
  initial begin
    in_data = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    while (nrcv < 2000) begin
      @(negedge clk);
      // phase with a slow consumer fills the buffer
      out_ready = (nsent < 500) ? ($urandom_range(0, 9) == 0) : 1'($urandom);
      if (!in_valid || in_ready) begin
        in_valid = (nsent < 2000) && 1'($urandom_range(0, 3) != 0);
        in_data = 8'($urandom);
      end
      @(posedge clk);
      if (!in_ready) fulls++;
      if (in_valid && in_ready) begin q.push_back(in_data); nsent++; end
      if (out_valid && out_ready) begin
        act_t w;
        w = q.pop_front();
        checks++; nrcv++;
        if (out_data != w) failures++;
      end
      #1;
      if (in_valid && in_ready) in_valid = 0;
    end
    checks++; if (fulls == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
