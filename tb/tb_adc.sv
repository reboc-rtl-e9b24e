// tb_adc -- converts random held values one column per clock and checks the code,
// its tag and its one-clock latency; a second, 6-bit instance checks saturation.
module tb_adc;
  import reboc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic conv = 0;
  logic [6:0] col;
  logic [15:0] tag_in, tag_out, tag6;
  logic [XB_COLS-1:0][BL_BITS-1:0] held;
  logic dout_valid, v6;
  logic [ADC_BITS-1:0] dout;
  logic [5:0] d6;

  adc dut (.*);
  adc #(.ABITS(6)) dut6 (.clk, .rst_n, .conv, .col, .tag_in, .held, .dout_valid(v6), .dout(d6), .tag_out(tag6));

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    col = '0; tag_in = '0;
    for (int c = 0; c < XB_COLS; c++) held[c] = BL_BITS'($urandom_range(0, 384));
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      int want, want6;
      @(negedge clk);
      conv = 1'($urandom); col = 7'($urandom); tag_in = 16'($urandom);
      want = held[col]; want6 = (want > 63) ? 63 : want;
      @(posedge clk); #1;
      checks++;
      if (dout_valid != conv) failures++;
      if (conv) begin
        checks += 3;
        if (int'(dout) != want) failures++;
        if (int'(d6) != want6) failures++;
        if (tag_out != tag_in) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
