// tb_shift_reg -- loads a random slice and rotates it; after t rotations row j of
// every k-row block must hold element (j+t) mod k of that block, read through the
// bit-plane output. Checked for several block sizes; xsum is checked on load.
module tb_shift_reg;
  import reboc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic load = 0, rotate = 0;
  logic [XB_ROWS-1:0][IN_BITS-1:0] load_data;
  logic [2:0] k_log2;
  logic [2:0] bit_sel;
  logic [XB_ROWS-1:0] wl;
  logic [IN_BITS+6:0] xsum;

  shift_reg dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    k_log2 = 4; bit_sel = 0; load_data = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int kl = 1; kl <= 7; kl += 2) begin
      int k, sum;
      k = 1 << kl;
      sum = 0;
      @(negedge clk);
      k_log2 = 3'(kl);
      for (int i = 0; i < XB_ROWS; i++) begin load_data[i] = 8'($urandom); sum += load_data[i]; end
      load = 1;
      @(negedge clk); load = 0;
      checks++; if (int'(xsum) != sum) failures++;
      for (int t = 0; t < k + 2; t++) begin
        for (int b = 0; b < IN_BITS; b++) begin
          bit_sel = 3'(b); #1;
          for (int r = 0; r < XB_ROWS; r++) begin
            int src;
            src = (r / k) * k + ((r % k) + t) % k;
            checks++;
            if (wl[r] != load_data[src][b]) begin
              failures++;
              if (failures < 5) $display("k=%0d t=%0d row %0d bit %0d wrong", k, t, r, b);
            end
          end
        end
        @(negedge clk); rotate = 1;
        @(negedge clk); rotate = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
