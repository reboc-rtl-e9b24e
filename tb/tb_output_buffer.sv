// tb_output_buffer -- random first/accumulate writes to all banks at once
// against a model of the sums; every location read back afterwards.
module tb_output_buffer;
  import reboc_pkg::*;
  localparam int NB = BCUS_PER_PE, HM = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [1:0] wr_j, rd_j;
  logic [7:0] wr_ch, rd_ch;
  logic [NB-1:0] wr_en, wr_first;
  logic signed [ACC_BITS-1:0] wr_data [NB];
  logic [1:0] rd_bank;
  logic signed [ACC_BITS-1:0] rd_data;
  longint model [NB][HM][XB_ROWS];
  bit written [NB][HM][XB_ROWS];

  output_buffer #(.HMAX(HM)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_en = '0; wr_first = '0; wr_j = '0; wr_ch = '0; rd_j = '0; rd_ch = '0; rd_bank = '0;
    foreach (wr_data[b]) wr_data[b] = '0;
    foreach (written[b, j, c]) written[b][j][c] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      wr_j = 2'($urandom); wr_ch = 8'($urandom_range(0, XB_ROWS - 1));
      for (int b = 0; b < NB; b++) begin
        wr_en[b] = 1'($urandom);
        wr_first[b] = !written[b][wr_j][wr_ch] || ($urandom_range(0, 7) == 0);
        wr_data[b] = $signed($urandom_range(0, 2000000)) - 1000000;
        if (wr_en[b]) begin
          model[b][wr_j][wr_ch] = wr_first[b] ? longint'(wr_data[b]) : model[b][wr_j][wr_ch] + wr_data[b];
          written[b][wr_j][wr_ch] = 1;
        end
      end
    end
    @(negedge clk); wr_en = '0;
    for (int b = 0; b < NB; b++)
      for (int j = 0; j < HM; j++)
        for (int c = 0; c < XB_ROWS; c++)
          if (written[b][j][c]) begin
            rd_bank = 2'(b); rd_j = 2'(j); rd_ch = 8'(c); #1;
            checks++;
            if (longint'(rd_data) != model[b][j][c]) failures++;
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
