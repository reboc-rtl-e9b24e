// tb_bcu_ctrl -- counts the controller's strobes for several (k, g, blocks)
// settings: k/g rotations, IN_BITS samples per rotation, one conversion per used
// column per sample, one result per logical output per rotation covering every
// output channel exactly once, and the total cycle count of the schedule.
module tb_bcu_ctrl;
  import reboc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0;
  logic [2:0] k_log2, g_log2;
  logic [7:0] n_oblk;
  logic busy, done, sr_load, sr_rotate, sample, conv, sa_clear, out_valid;
  logic [2:0] bit_sel;
  logic [6:0] conv_col;
  logic [4:0] rd_idx;
  logic [7:0] out_ch;

  bcu_ctrl dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input int kl, input int gl, input int nob);
    int k, g, nout, ncols, steps, n_load, n_rot, n_smp, n_conv, n_out, cyc;
    int seen [256];
    k = 1 << kl; g = 1 << gl; nout = nob * g; ncols = nout * W_SLICES; steps = k / g;
    foreach (seen[i]) seen[i] = 0;
    n_load = 0; n_rot = 0; n_smp = 0; n_conv = 0; n_out = 0; cyc = 0;
    @(negedge clk); k_log2 = 3'(kl); g_log2 = 3'(gl); n_oblk = 8'(nob); start = 1;
    do begin
      @(negedge clk); start = 0;
      cyc++;
      n_load += int'(sr_load); n_rot += int'(sr_rotate); n_smp += int'(sample); n_conv += int'(conv);
      if (out_valid) begin n_out++; seen[out_ch]++; end
      if (conv && int'(conv_col) >= ncols) failures++;
    end while (!done);
    $display("k=%0d g=%0d nob=%0d: load %0d rot %0d smp %0d conv %0d out %0d cyc %0d", k, g, nob, n_load, n_rot, n_smp, n_conv, n_out, cyc);
    checks += 6;
    if (n_load != 1) failures++;
    if (n_rot != steps) failures++;
    if (n_smp != steps * IN_BITS) failures++;
    if (n_conv != steps * IN_BITS * ncols) failures++;
    if (n_out != steps * nout) failures++;
    if (cyc != 1 + steps * (IN_BITS * (2 + ncols) + 1 + nout + 1) + 1) begin
      failures++; $display("k=%0d g=%0d cycles %0d", k, g, cyc);
    end
    for (int c = 0; c < nob * k; c++) begin checks++; if (seen[c] != 1) failures++; end
    while (busy) @(negedge clk);
  endtask

  initial begin
    k_log2 = 4; g_log2 = 0; n_oblk = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    run(4, 0, 2);
    run(4, 2, 1);
    run(2, 1, 3);
    run(7, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
