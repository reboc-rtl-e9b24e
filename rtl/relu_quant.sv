// relu_quant -- the ReLU unit with requantisation to the activation width.
// The sum is arithmetically shifted right by `out_shift`. With `relu_en` the
// result is clamped to 0..2**IN_BITS-1 (negative values become 0, the unsigned
// activations the next layer expects); without it the result is saturated to a
// signed IN_BITS value (two's complement), meant for a final layer whose raw
// scores are read by the host. Purely combinational. The shift-and-saturate
// requantisation is this design's choice.
module relu_quant
  import reboc_pkg::*;
(
  input  logic signed [ACC_BITS-1:0] din,
  input  logic                       relu_en,
  input  logic [4:0]                 out_shift,
  output act_t                       dout
);

  localparam logic signed [ACC_BITS-1:0] UMAX = (1 <<< IN_BITS) - 1;
  localparam logic signed [ACC_BITS-1:0] SMAX = (1 <<< (IN_BITS - 1)) - 1;
  localparam logic signed [ACC_BITS-1:0] SMIN = -(1 <<< (IN_BITS - 1));

  logic signed [ACC_BITS-1:0] s;
  assign s = din >>> out_shift;

  always_comb begin
    if (relu_en) begin
      if (s < 0)         dout = '0;
      else if (s > UMAX) dout = '1;
      else               dout = act_t'(s);
    end else begin
      if (s > SMAX)      dout = act_t'(SMAX);
      else if (s < SMIN) dout = act_t'(SMIN);
      else               dout = act_t'(s);
    end
  end

endmodule
