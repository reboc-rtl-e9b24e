// tb_shift_add -- feeds random ADC codes for random columns and input bits and
// compares every logical output with sum(code << (bit + 2*slice)) minus the
// weight offset 128*xsum, then checks that clear zeroes the sums.
module tb_shift_add;
  import reboc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0, acc_en = 0;
  logic [6:0] col;
  logic [2:0] bit_idx;
  logic [ADC_BITS-1:0] adc_val;
  logic [IN_BITS+6:0] xsum;
  logic [4:0] rd_idx;
  logic signed [ACC_BITS-1:0] rd_val;
  longint model [32];

  shift_add dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_all();
    for (int i = 0; i < 32; i++) begin
      rd_idx = 5'(i); #1;
      checks++;
      if (longint'(rd_val) != model[i] - 128 * longint'(xsum)) begin
        failures++;
        if (failures < 5) $display("out %0d got %0d want %0d", i, rd_val, model[i] - 128 * longint'(xsum));
      end
    end
  endtask

  initial begin
    col = '0; bit_idx = '0; adc_val = '0; xsum = 15'($urandom); rd_idx = '0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      acc_en = 1; col = 7'($urandom); bit_idx = 3'($urandom); adc_val = ADC_BITS'($urandom_range(0, 384));
      model[col / 4] += longint'(adc_val) << (bit_idx + 2 * (col % 4));
    end
    @(negedge clk); acc_en = 0;
    check_all();
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    foreach (model[i]) model[i] = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
