// adc -- BEHAVIOURAL MODEL of the crossbar's analog-to-digital converter, shared
// by all bitlines of one crossbar. Each clock with `conv` high it converts the
// held value of column `col` and presents the code one clock later with
// `dout_valid`. Codes above 2**ABITS-1 saturate (with the default ABITS equal to
// the bitline width the conversion is exact). The tag input travels with the
// conversion so the consumer knows which column and input bit the code belongs to.
module adc
  import reboc_pkg::*;
#(
  parameter int COLS  = XB_COLS,
  parameter int BLW   = BL_BITS,
  parameter int ABITS = ADC_BITS,
  parameter int TAGW  = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     conv,
  input  logic [$clog2(COLS)-1:0]  col,
  input  logic [TAGW-1:0]          tag_in,
  input  logic [COLS-1:0][BLW-1:0] held,
  output logic                     dout_valid,
  output logic [ABITS-1:0]         dout,
  output logic [TAGW-1:0]          tag_out
);

  logic [BLW-1:0]   sel;
  logic [ABITS-1:0] code;
  assign sel = held[col];

  if (ABITS >= BLW) begin : g_exact
    assign code = ABITS'(sel);
  end else begin : g_sat
    assign code = (|sel[BLW-1:ABITS]) ? '1 : sel[ABITS-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout_valid <= 1'b0;
      dout       <= '0;
      tag_out    <= '0;
    end else begin
      dout_valid <= conv;
      if (conv) begin
        dout    <= code;
        tag_out <= tag_in;
      end
    end
  end

endmodule
