// tb_relu_quant -- random sums and shifts, both modes, against
// clamp(sum >>> shift) computed here.
module tb_relu_quant;
  import reboc_pkg::*;
  int checks = 0, failures = 0;
  logic signed [ACC_BITS-1:0] din;
  logic relu_en;
  logic [4:0] out_shift;
  act_t dout;

  relu_quant dut (.*);

  initial begin
    for (int it = 0; it < 5000; it++) begin
      longint s;
      int want;
      din = $signed($urandom);
      if (it % 3 == 0) din = din >>> 16;
      relu_en = 1'($urandom);
      out_shift = 5'($urandom_range(0, 20));
      #1;
      s = longint'(din) >>> out_shift;
      if (relu_en) want = (s < 0) ? 0 : (s > 255) ? 255 : int'(s);
      else want = (s > 127) ? 127 : (s < -128) ? -128 : int'(s);
      checks++;
      if (dout != 8'(want)) begin
        failures++;
        if (failures < 5) $display("din %0d sh %0d relu %0d got %0d want %0d", din, out_shift, relu_en, dout, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
