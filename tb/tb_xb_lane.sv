// tb_xb_lane -- one crossbar lane (SR, crossbar, S&H, ADC, S&A) driven by a
// controller: block size k = 8, duplication g = 4, one output block. Random
// signed weights and unsigned inputs; every result is compared with the product
// of the expanded circulant matrix and the input slice.
module tb_xb_lane;
  import reboc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic prog_en = 0;
  logic [6:0] prog_row, prog_col;
  logic [1:0] prog_val;
  logic start = 0;
  logic [2:0] k_log2, g_log2;
  logic [7:0] n_oblk;
  logic busy, done, sr_load, sr_rotate, sample, conv, sa_clear, out_valid;
  logic [2:0] bit_sel;
  logic [6:0] conv_col;
  logic [4:0] rd_idx;
  logic [7:0] out_ch;
  slice_t sr_data;
  logic signed [ACC_BITS-1:0] rd_val;

  bcu_ctrl u_ctr (.*);
  xb_lane dut (.*);

  localparam int K = 8, G = 4;
  int wrv [XB_ROWS];
  int x [XB_ROWS];
  longint ref_y [K];
  int seen [K];

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    prog_row = '0; prog_col = '0; prog_val = '0; sr_data = '0;
    k_log2 = 3; g_log2 = 2; n_oblk = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < XB_ROWS; r++) wrv[r] = $urandom_range(0, 255) - 128;
    for (int d = 0; d < G; d++)
      for (int r = 0; r < XB_ROWS; r++) begin
        int u;
        u = wrv[(r / K) * K + ((r % K) - d * (K / G) + K) % K] + 128;
        for (int s = 0; s < W_SLICES; s++) begin
          @(negedge clk);
          prog_en = 1; prog_row = 7'(r); prog_col = 7'(d * W_SLICES + s); prog_val = 2'((u >> (2 * s)) & 3);
        end
      end
    @(negedge clk); prog_en = 0;
    for (int r = 0; r < XB_ROWS; r++) begin x[r] = $urandom_range(0, 255); sr_data[r] = 8'(x[r]); end
    for (int i = 0; i < K; i++) begin
      ref_y[i] = 0; seen[i] = 0;
      for (int b = 0; b < XB_ROWS / K; b++)
        for (int j = 0; j < K; j++)
          ref_y[i] += longint'(wrv[b * K + ((j - i) % K + K) % K]) * x[b * K + j];
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) begin
      @(posedge clk); #1;
      if (out_valid) begin
        checks++;
        seen[out_ch]++;
        if (longint'(rd_val) != ref_y[out_ch]) begin
          failures++;
          if (failures < 5) $display("ch %0d got %0d want %0d", out_ch, rd_val, ref_y[out_ch]);
        end
      end
    end
    for (int i = 0; i < K; i++) begin checks++; if (seen[i] != 1) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
