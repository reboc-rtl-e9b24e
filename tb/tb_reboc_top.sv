// tb_reboc_top -- end-to-end run of the full accelerator at its default size
// (16 PEs, 4 compute units of 8 crossbars each, 128 KB global buffer) on a small
// three-layer block-circulant network, layers running concurrently:
//   PE 0: 3x3 conv, 5x5x128 -> 3x3x16, k = 16, g = 2, ReLU
//   PE 1: 2x2 conv, 3x3x128 -> 2x2x32, k = 16, g = 1, ReLU, 2x2 max pool -> 1x1
//   PE 5: fully connected 128 -> 128, k = 128, g = 8, signed output
// The other PEs are inactive and forward the stream (PEs 2-4 lie between layers).
// Weights are random block-circulant matrices programmed as weight representative
// vectors; the input image is written into the global buffer; the 128 result
// bytes are read back and compared with a layer-by-layer reference computed here
// from the expanded circulant matrices. The testbench also counts how often each
// mechanism occurred (slice reuse in the input buffers, tile sharing by several
// crossbar groups, duplicated weight columns, sliced weight columns, input stalls,
// ReLU clamping, max pooling, forwarding by inactive PEs, layers overlapping in
// time) and counts a failure for any that never happened.
module tb_reboc_top;
  import reboc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0, prog_en = 0, gb_we = 0, start = 0, done;
  logic [3:0] cfg_pe, prog_pe;
  layer_cfg_t cfg_data;
  logic [1:0] prog_bcu;
  logic [2:0] prog_lane;
  logic [6:0] prog_row, prog_col;
  logic [1:0] prog_val;
  logic [16:0] gb_addr, in_base, out_base;
  logic [17:0] in_len, out_len;
  act_t gb_wdata, gb_rdata;
  logic [NUM_PES-1:0] pe_busy, pe_done;

  reboc_top dut (.*);

  // ---------------- network ----------------
  localparam int NL = 3;
  int L_PE [NL]  = '{0, 1, 5};
  int L_R  [NL]  = '{3, 2, 1};
  int L_H  [NL]  = '{5, 3, 1};
  int L_KL [NL]  = '{4, 4, 7};
  int L_GL [NL]  = '{1, 0, 3};
  int L_NOB[NL]  = '{1, 2, 1};
  bit L_RELU[NL] = '{1, 1, 0};
  bit L_POOL[NL] = '{0, 1, 0};
  int L_SH [NL]  = '{12, 9, 10};

  int wrv [NL][4][4][2][XB_ROWS];          // [layer][kernel col][kernel row][out block][row]
  int fm  [NL+1][8][8][XB_ROWS];           // activations entering each layer (signed for the last)

  function automatic int clamp8(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  function automatic int quant(longint v, bit relu, int sh);
    longint s;
    s = v >>> sh;
    if (relu) return (s < 0) ? 0 : (s > 255) ? 255 : int'(s);
    return (s > 127) ? 127 : (s < -128) ? -128 : int'(s);
  endfunction

  task automatic reference();
    for (int L = 0; L < NL; L++) begin
      int r, h, k, co, ho;
      longint y [8][8][XB_ROWS];
      r = L_R[L]; h = L_H[L]; k = 1 << L_KL[L]; co = L_NOB[L] * k; ho = h - r + 1;
      for (int o = 0; o < ho; o++)
        for (int j = 0; j < ho; j++)
          for (int c = 0; c < XB_ROWS; c++) begin
            y[o][j][c] = 0;
            if (c < co)
              for (int gc = 0; gc < r; gc++)
                for (int l = 0; l < r; l++)
                  for (int col = 0; col < XB_ROWS; col++)
                    y[o][j][c] += longint'(wrv[L][gc][l][c / k][(col / k) * k + ((col % k) - (c % k) + k) % k])
                                  * fm[L][o + gc][j + l][col];
          end
      for (int o = 0; o < ho; o++)
        for (int j = 0; j < ho; j++)
          for (int c = 0; c < XB_ROWS; c++)
            fm[L+1][o][j][c] = (c < co) ? quant(y[o][j][c], L_RELU[L], L_SH[L]) : 0;
      if (L_POOL[L])
        for (int o = 0; o < ho / 2; o++)
          for (int j = 0; j < ho / 2; j++)
            for (int c = 0; c < XB_ROWS; c++) begin
              int m;
              m = fm[L+1][2*o][2*j][c];
              if (fm[L+1][2*o+1][2*j][c] > m)   m = fm[L+1][2*o+1][2*j][c];
              if (fm[L+1][2*o][2*j+1][c] > m)   m = fm[L+1][2*o][2*j+1][c];
              if (fm[L+1][2*o+1][2*j+1][c] > m) m = fm[L+1][2*o+1][2*j+1][c];
              fm[L+1][o][j][c] = m;
            end
    end
  endtask

  task automatic program_layer(input int L);
    int r, k, g;
    r = L_R[L]; k = 1 << L_KL[L]; g = 1 << L_GL[L];
    for (int gc = 0; gc < r; gc++)
      for (int l = 0; l < r; l++)
        for (int ob = 0; ob < L_NOB[L]; ob++)
          for (int d = 0; d < g; d++)
            for (int row = 0; row < XB_ROWS; row++) begin
              int u;
              u = wrv[L][gc][l][ob][(row / k) * k + ((row % k) - d * (k / g) + k) % k] + 128;
              for (int s = 0; s < W_SLICES; s++) begin
                @(negedge clk);
                prog_en = 1; prog_pe = 4'(L_PE[L]); prog_bcu = 2'(gc); prog_lane = 3'(l);
                prog_row = 7'(row); prog_col = 7'((ob * g + d) * W_SLICES + s);
                prog_val = 2'((u >> (2 * s)) & 3);
              end
            end
    @(negedge clk); prog_en = 0;
  endtask

  // ---------------- mechanism counters ----------------
  int n_isr = 0, n_its = 0, n_icwd = 0, n_hws = 0, n_stall = 0, n_relu = 0, n_pool = 0,
      n_bypass = 0, n_ilp = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_pe[0].u_pe.advance && dut.g_pe[0].u_pe.tj >= 6'd1) n_isr++;
    if ($countones(dut.g_pe[0].u_pe.ob_en) > 1) n_its++;
    if (dut.g_pe[5].u_pe.g_bcu[0].u_bcu.psum_valid && dut.g_pe[5].u_pe.g_bcu[0].u_bcu.u_ctr.e[2:0] != 0) n_icwd++;
    if (dut.g_pe[0].u_pe.g_bcu[0].u_bcu.u_ctr.conv && dut.g_pe[0].u_pe.g_bcu[0].u_bcu.u_ctr.conv_col[1:0] != 0) n_hws++;
    if (dut.g_pe[0].u_pe.pb_out_valid && !dut.g_pe[0].u_pe.ib_in_ready) n_stall++;
    if (dut.g_pe[1].u_pe.rd_fire && dut.g_pe[1].u_pe.ob_rd[ACC_BITS-1] && dut.g_pe[1].u_pe.rd_ch < 8'd32) n_relu++;
    if (dut.g_pe[1].u_pe.rd_fire && dut.g_pe[1].u_pe.mp_valid) n_pool++;
    if (dut.lk_valid[3] && dut.lk_ready[3]) n_bypass++;
    if ($countones(pe_busy) > 1) n_ilp++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int nin;
    cfg_pe = '0; cfg_data = '0; prog_pe = '0; prog_bcu = '0; prog_lane = '0; prog_row = '0;
    prog_col = '0; prog_val = '0; gb_addr = '0; gb_wdata = '0;
    in_base = '0; out_base = 17'd65536; out_len = 18'd128;
    // random weights; odd elements negate the element before them so that every
    // representative vector sums to about zero and the unsigned inputs give
    // outputs of both signs
    foreach (wrv[a, b, c, d, e])
      wrv[a][b][c][d][e] = (e % 2 == 0) ? int'($urandom_range(0, 255)) - 128
                                        : clamp8(-wrv[a][b][c][d][e-1] + int'($urandom_range(0, 8)) - 4);
    foreach (fm[a, b, c, d]) fm[a][b][c][d] = 0;
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) for (int c = 0; c < XB_ROWS; c++)
      fm[0][i][j][c] = $urandom_range(0, 255);
    reference();
    repeat (2) @(posedge clk); rst_n = 1;
    // layer configuration (inactive PEs keep their reset value: forward)
    for (int L = 0; L < NL; L++) begin
      @(negedge clk);
      cfg_we = 1; cfg_pe = 4'(L_PE[L]);
      cfg_data = '{active: 1'b1, r: 3'(L_R[L]), h_in: 6'(L_H[L]), w_in: 6'(L_H[L]),
                   k_log2: 3'(L_KL[L]), g_log2: 3'(L_GL[L]), n_oblk: 8'(L_NOB[L]),
                   relu_en: L_RELU[L], pool_en: L_POOL[L], out_shift: 5'(L_SH[L])};
    end
    @(negedge clk); cfg_we = 0;
    for (int L = 0; L < NL; L++) program_layer(L);
    // input image, column by column, row by row, channel by channel
    nin = 0;
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) for (int c = 0; c < XB_ROWS; c++) begin
      @(negedge clk); gb_we = 1; gb_addr = 17'(nin); gb_wdata = 8'(fm[0][i][j][c]); nin++;
    end
    @(negedge clk); gb_we = 0; in_len = 18'(nin); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    // the reference must not be trivial: most result bytes are non-zero
    checks++;
    begin
      int nz;
      nz = 0;
      for (int c = 0; c < XB_ROWS; c++) if (fm[NL][0][0][c] != 0) nz++;
      if (nz < 64) begin failures++; $display("degenerate reference: %0d non-zero results", nz); end
    end
    for (int c = 0; c < XB_ROWS; c++) begin
      @(negedge clk); gb_addr = 17'(65536 + c);
      @(negedge clk);
      checks++;
      if (gb_rdata != 8'(fm[NL][0][0][c])) begin
        failures++;
        if (failures < 6) $display("result %0d got %0d want %0d", c, $signed(gb_rdata), fm[NL][0][0][c]);
      end
    end
    $display("mechanisms: isr=%0d its=%0d icwd=%0d hws=%0d stall=%0d relu=%0d pool=%0d bypass=%0d ilp=%0d",
             n_isr, n_its, n_icwd, n_hws, n_stall, n_relu, n_pool, n_bypass, n_ilp);
    checks += 9;
    if (n_isr == 0)    begin failures++; $display("input slice reuse never happened"); end
    if (n_its == 0)    begin failures++; $display("input tile sharing never happened"); end
    if (n_icwd == 0)   begin failures++; $display("weight duplication never used"); end
    if (n_hws == 0)    begin failures++; $display("weight slices never converted"); end
    if (n_stall == 0)  begin failures++; $display("input stall never happened"); end
    if (n_relu == 0)   begin failures++; $display("ReLU never clamped"); end
    if (n_pool == 0)   begin failures++; $display("max pool never produced"); end
    if (n_bypass == 0) begin failures++; $display("no forwarding through an inactive PE"); end
    if (n_ilp == 0)    begin failures++; $display("layers never overlapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
