// tb_bcu -- end-to-end check of the block-circulant matrix-vector product in one
// compute unit. Three lanes hold random signed 8-bit block-circulant weight
// matrices (block size k = 16, 2 output blocks, duplication g = 2) programmed as
// weight representative vectors: horizontally sliced into four 2-bit cells,
// offset by 128, duplicate d pre-rotated by d*k/g. Random 8-bit inputs are loaded
// and the streamed partial sums are compared, channel by channel, with the full
// product sum over lanes of W_l * x_l computed here from the expanded circulant
// matrices. The number of clocks of one operation is checked against the
// controller's schedule. A second run uses g = 1 and k = 32.
module tb_bcu;
  import reboc_pkg::*;
  localparam int NL = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic prog_en = 0;
  logic [2:0] prog_lane;
  logic [6:0] prog_row, prog_col;
  logic [1:0] prog_val;
  logic start = 0;
  logic [2:0] k_log2, g_log2;
  logic [7:0] n_oblk;
  logic [3:0] n_lanes;
  slice_t lane_data [XBS_PER_BCU];
  logic busy, done, psum_valid;
  logic [7:0] psum_ch;
  logic signed [ACC_BITS-1:0] psum;

  bcu dut (.*);

  int wrv [NL][4][XB_ROWS];      // [lane][out block][input row]: weight vector element
  int x   [NL][XB_ROWS];
  longint ref_y [XB_ROWS];
  int seen [XB_ROWS];

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input int kl, input int gl, input int nob);
    int k, g, nout, ncols, steps, cycles, expect_cycles;
    k = 1 << kl; g = 1 << gl;
    k_log2 = 3'(kl); g_log2 = 3'(gl); n_oblk = 8'(nob); n_lanes = 4'(NL);
    // weights and programming
    for (int l = 0; l < NL; l++)
      for (int ob = 0; ob < nob; ob++)
        for (int r = 0; r < XB_ROWS; r++) wrv[l][ob][r] = $urandom_range(0, 255) - 128;
    for (int l = 0; l < NL; l++)
      for (int ob = 0; ob < nob; ob++)
        for (int d = 0; d < g; d++)
          for (int r = 0; r < XB_ROWS; r++) begin
            int blk, m, w, u;
            blk = r / k; m = r % k;
            w = wrv[l][ob][blk * k + ((m - d * (k / g)) % k + k) % k];
            u = w + 128;
            for (int s = 0; s < W_SLICES; s++) begin
              @(negedge clk);
              prog_en = 1; prog_lane = 3'(l); prog_row = 7'(r);
              prog_col = 7'((ob * g + d) * W_SLICES + s); prog_val = 2'((u >> (2 * s)) & 3);
            end
          end
    @(negedge clk); prog_en = 0;
    // inputs and reference: y[ob*k+i] = sum_l sum_blk sum_j w[(j-i) mod k] x[blk*k+j]
    for (int l = 0; l < XBS_PER_BCU; l++) lane_data[l] = '0;
    for (int l = 0; l < NL; l++)
      for (int r = 0; r < XB_ROWS; r++) begin x[l][r] = $urandom_range(0, 255); lane_data[l][r] = 8'(x[l][r]); end
    for (int c = 0; c < XB_ROWS; c++) begin ref_y[c] = 0; seen[c] = 0; end
    for (int ob = 0; ob < nob; ob++)
      for (int i = 0; i < k; i++)
        for (int l = 0; l < NL; l++)
          for (int blk = 0; blk < XB_ROWS / k; blk++)
            for (int j = 0; j < k; j++)
              ref_y[ob * k + i] += longint'(wrv[l][ob][blk * k + ((j - i) % k + k) % k]) * x[l][blk * k + j];
    // run
    nout = nob * g; ncols = nout * W_SLICES; steps = k / g;
    expect_cycles = 1 + steps * (IN_BITS * (2 + ncols) + 1 + nout + 1) + 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 0;
    while (!done) begin
      @(posedge clk); #1;
      cycles++;
      if (psum_valid) begin
        checks++;
        seen[psum_ch]++;
        if (longint'(psum) != ref_y[psum_ch]) begin
          failures++;
          if (failures < 6) $display("k=%0d g=%0d ch %0d got %0d want %0d", k, g, psum_ch, psum, ref_y[psum_ch]);
        end
      end
    end
    for (int c = 0; c < nob * k; c++) begin
      checks++;
      if (seen[c] != 1) begin failures++; $display("channel %0d seen %0d times", c, seen[c]); end
    end
    checks++;
    if (cycles + 1 != expect_cycles) begin
      failures++; $display("cycles %0d, expected %0d", cycles + 1, expect_cycles);
    end
  endtask

  initial begin
    prog_lane = '0; prog_row = '0; prog_col = '0; prog_val = '0;
    k_log2 = 4; g_log2 = 1; n_oblk = 2; n_lanes = NL;
    for (int l = 0; l < XBS_PER_BCU; l++) lane_data[l] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(4, 1, 2);
    run(5, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
