// tb_pe -- one processing element running a 3x3 convolution, stride 1, on a
// 5x5 input with 128 channels (the worked example of input slice reusing and
// input tile sharing), 32 output channels as two 16x16 circulant blocks per
// 128-channel slice, duplication g = 2. The nine kernel positions get
// independent random block-circulant weights. The input is streamed with random
// gaps and the output consumed with random stalls; every output element is
// compared with a direct convolution computed here, followed by the same
// shift-and-clamp requantisation. A second run adds ReLU and 2x2 max pooling.
module tb_pe;
  import reboc_pkg::*;
  localparam int R = 3, H = 5, W = 5, KL = 4, GL = 1, NOB = 2;
  localparam int K = 1 << KL, G = 1 << GL, CO = NOB * K, HO = H - R + 1, WO = W - R + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  layer_cfg_t cfg;
  logic start = 0, busy, done;
  logic prog_en = 0;
  logic [1:0] prog_bcu;
  logic [2:0] prog_lane;
  logic [6:0] prog_row, prog_col;
  logic [1:0] prog_val;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  act_t in_data, out_data;

  pe dut (.*);

  int wrv [R][R][NOB][XB_ROWS];   // [kernel col][kernel row][out block][input row]
  int x [W][H][XB_ROWS];          // [column][row][channel]
  longint y [WO][HO][XB_ROWS];
  act_t expq [$];
  int stalls = 0, nonzero = 0, zero = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int clamp8(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  function automatic act_t quant(longint v, bit relu, int sh);
    longint s;
    s = v >>> sh;
    if (relu) return (s < 0) ? 8'd0 : (s > 255) ? 8'd255 : 8'(s);
    return (s > 127) ? 8'd127 : (s < -128) ? 8'h80 : 8'(s);
  endfunction

  task automatic program_weights();
    for (int gc = 0; gc < R; gc++)
      for (int l = 0; l < R; l++)
        for (int ob = 0; ob < NOB; ob++)
          for (int d = 0; d < G; d++)
            for (int r = 0; r < XB_ROWS; r++) begin
              int u;
              u = wrv[gc][l][ob][(r / K) * K + ((r % K) - d * (K / G) + K) % K] + 128;
              for (int s = 0; s < W_SLICES; s++) begin
                @(negedge clk);
                prog_en = 1; prog_bcu = 2'(gc); prog_lane = 3'(l); prog_row = 7'(r);
                prog_col = 7'((ob * G + d) * W_SLICES + s); prog_val = 2'((u >> (2 * s)) & 3);
              end
            end
    @(negedge clk); prog_en = 0;
  endtask

  task automatic run(input bit relu, input bit pool, input int sh);
    int nexp;
    cfg = '{active: 1'b1, r: 3'(R), h_in: 6'(H), w_in: 6'(W), k_log2: 3'(KL), g_log2: 3'(GL),
            n_oblk: 8'(NOB), relu_en: relu, pool_en: pool, out_shift: 5'(sh)};
    expq = {};
    for (int o = 0; o < WO; o++)
      for (int j = 0; j < HO; j++)
        for (int c = 0; c < XB_ROWS; c++) begin
          act_t v;
          if (pool) begin
            if (o % 2 == 0 || j % 2 == 0 || o >= 2 * (WO / 2) || j >= 2 * (HO / 2)) continue;
            v = 0;
            for (int a = 0; a < 2; a++) for (int b = 0; b < 2; b++) begin
              act_t q;
              q = (c < CO) ? quant(y[o-a][j-b][c], relu, sh) : 8'd0;
              if (q > v) v = q;
            end
          end else v = (c < CO) ? quant(y[o][j][c], relu, sh) : 8'd0;
          expq.push_back(v);
        end
    nexp = expq.size();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    fork
      begin
        for (int i = 0; i < W; i++)
          for (int j = 0; j < H; j++)
            for (int c = 0; c < XB_ROWS; c++) begin
              @(negedge clk);
              while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
              in_valid = 1; in_data = 8'(x[i][j][c]);
              @(posedge clk);
              while (!in_ready) @(posedge clk);
            end
        @(negedge clk); in_valid = 0;
      end
      begin
        int got;
        got = 0;
        while (got < nexp) begin
          @(negedge clk);
          out_ready = 1'($urandom);
          @(posedge clk);
          if (out_valid && !out_ready) stalls++;
          if (out_valid && out_ready) begin
            act_t w;
            w = expq.pop_front();
            checks++; got++;
            if (out_data != 0) nonzero++; else zero++;
            if (out_data != w) begin
              failures++;
              if (failures < 6) $display("output %0d got %0d want %0d", got - 1, out_data, w);
            end
          end
        end
      end
    join
    while (busy) @(negedge clk);
    @(negedge clk); out_ready = 1;
    repeat (3) @(posedge clk);
    checks++;
    if (out_valid) begin failures++; $display("extra output"); end
  endtask

  initial begin
    cfg = '0; prog_bcu = '0; prog_lane = '0; prog_row = '0; prog_col = '0; prog_val = '0; in_data = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    // odd elements negate the element before them: zero-mean vectors give outputs of both signs
    foreach (wrv[a, b, c, d])
      wrv[a][b][c][d] = (d % 2 == 0) ? int'($urandom_range(0, 255)) - 128
                                     : clamp8(-wrv[a][b][c][d-1] + int'($urandom_range(0, 8)) - 4);
    foreach (x[a, b, c]) x[a][b][c] = $urandom_range(0, 255);
    foreach (y[a, b, c]) y[a][b][c] = 0;
    // direct convolution with the expanded block-circulant matrices
    for (int o = 0; o < WO; o++)
      for (int j = 0; j < HO; j++)
        for (int gc = 0; gc < R; gc++)
          for (int l = 0; l < R; l++)
            for (int ob = 0; ob < NOB; ob++)
              for (int i = 0; i < K; i++)
                for (int col = 0; col < XB_ROWS; col++)
                  y[o][j][ob * K + i] += longint'(wrv[gc][l][ob][(col / K) * K + ((col % K) - i + K) % K])
                                         * x[o + gc][j + l][col];
    program_weights();
    run(0, 0, 14);
    run(1, 1, 12);
    checks++;
    if (nonzero < 100 || zero < 100) begin failures++; $display("degenerate outputs: %0d non-zero, %0d zero", nonzero, zero); end
    checks++;
    if (stalls == 0) begin failures++; $display("output stall never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
