// tb_global_buffer -- host writes an input region, a run streams it out through
// a stalling loop-back that adds 1 to each byte, and the results must land at the
// output base; host reads check both regions and the done flag.
module tb_global_buffer;
  import reboc_pkg::*;
  localparam int BYTES = 4096;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic h_we = 0, start = 0, done, tx_valid, tx_ready, rx_valid, rx_ready;
  logic [11:0] h_addr, in_base, out_base;
  logic [12:0] in_len, out_len;
  act_t h_wdata, h_rdata, tx_data, rx_data;
  act_t img [300];

  global_buffer #(.BYTES(BYTES)) dut (.*);

  // loop-back with random stalls: one-entry register
  logic lv; act_t ld;
  assign tx_ready = !lv || (rx_ready && stall_n);
  assign rx_valid = lv && stall_n;
  assign rx_data  = ld + 8'd1;
  logic stall_n;
  always_ff @(posedge clk) stall_n <= 1'($urandom);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) lv <= 0;
    else if (tx_valid && tx_ready) begin lv <= 1; ld <= tx_data; end
    else if (rx_valid && rx_ready) lv <= 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    h_addr = '0; h_wdata = '0; in_base = 12'd100; out_base = 12'd2000; in_len = 300; out_len = 300;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk); img[i] = 8'($urandom); h_we = 1; h_addr = 12'(100 + i); h_wdata = img[i];
    end
    @(negedge clk); h_we = 0; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      @(negedge clk); h_addr = 12'(2000 + i);
      @(negedge clk);
      checks++; if (h_rdata != img[i] + 8'd1) failures++;
      h_addr = 12'(100 + i);
      @(negedge clk);
      checks++; if (h_rdata != img[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
