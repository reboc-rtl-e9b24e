// sample_hold -- BEHAVIOURAL MODEL of the crossbar's sample-and-hold stage (an
// analog circuit in the real part). On a clock edge with `sample` high it
// captures every bitline value; the held values stay on `held` while the single
// ADC converts them one column after another. Cleared by reset.
module sample_hold
  import reboc_pkg::*;
#(
  parameter int COLS = XB_COLS,
  parameter int BLW  = BL_BITS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sample,
  input  logic [COLS-1:0][BLW-1:0] bl,
  output logic [COLS-1:0][BLW-1:0] held
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      held <= '0;
    else if (sample) held <= bl;
  end

endmodule
