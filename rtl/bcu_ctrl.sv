// bcu_ctrl -- controller (CTR) of one block-circulant compute unit.
//
// One `start` runs one crossbar operation: the SRs load the input slice, then for
// each of the k/g circulant shifts the controller walks the IN_BITS input bit
// planes; per bit plane it applies the plane to the wordlines, waits one clock for
// the bitlines to settle, samples them once and converts the used columns one per
// clock on the crossbar's single ADC. When all bit planes of a shift are
// in, it reads out every logical output of the crossbar (one per clock, with its
// output channel), then clears the S&A and rotates the SRs. Logical output e of a
// crossbar is output block e/g, duplicate e mod g; duplicate d holds the weight
// vector pre-rotated by d*k/g (intra-crossbar weight duplication), so at shift t
// it delivers channel (e/g)*k + d*k/g + t. The number of shifts, k/g, follows the
// document; the column-serial ADC schedule is this design's choice.
//
// Cycles per operation: 1 (load) + (k/g) * (IN_BITS*(2+ncols) + 1 + nout + 1) + 1,
// where nout = n_oblk*g and ncols = nout*W_SLICES.
module bcu_ctrl
  import reboc_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [2:0]                   k_log2,
  input  logic [2:0]                   g_log2,
  input  logic [7:0]                   n_oblk,
  output logic                         busy,
  output logic                         done,
  // lane control
  output logic                         sr_load,
  output logic                         sr_rotate,
  output logic [$clog2(IN_BITS)-1:0]   bit_sel,
  output logic                         sample,
  output logic                         conv,
  output logic [$clog2(XB_COLS)-1:0]   conv_col,
  output logic                         sa_clear,
  output logic [$clog2(MAX_OUTS)-1:0]  rd_idx,
  // result stream
  output logic                         out_valid,
  output logic [7:0]                   out_ch
);

  typedef enum logic [3:0] {S_IDLE, S_LOAD, S_SETTLE, S_SAMPLE, S_CONV, S_DRAIN, S_EMIT, S_ROT, S_DONE} state_t;
  state_t state;

  localparam int CW = $clog2(XB_COLS);
  localparam int BW = $clog2(IN_BITS);

  logic [7:0]    t;        // circulant shift index
  logic [BW-1:0] b;        // input bit plane
  logic [CW-1:0] c;        // column being converted
  logic [7:0]    e;        // logical output being emitted
  logic [8:0]    nout, ncols, steps;

  assign nout  = 9'(n_oblk) << g_log2;
  assign ncols = 9'(nout * W_SLICES);
  assign steps = 9'((1 << k_log2) >> g_log2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      t <= '0; b <= '0; c <= '0; e <= '0;
    end else begin
      case (state)
        S_IDLE:   if (start) state <= S_LOAD;
        S_LOAD:   begin t <= '0; b <= '0; state <= S_SETTLE; end
        S_SETTLE: state <= S_SAMPLE;
        S_SAMPLE: begin c <= '0; state <= S_CONV; end
        S_CONV:   if (9'(c) == ncols - 9'd1) begin
                    if (b == BW'(IN_BITS - 1)) state <= S_DRAIN;
                    else begin b <= b + 1'b1; state <= S_SETTLE; end
                  end else c <= c + 1'b1;
        S_DRAIN:  begin e <= '0; state <= S_EMIT; end
        S_EMIT:   if (9'(e) == nout - 9'd1) state <= S_ROT;
                  else e <= e + 1'b1;
        S_ROT:    if (9'(t) == steps - 9'd1) state <= S_DONE;
                  else begin t <= t + 1'b1; b <= '0; state <= S_SETTLE; end
        S_DONE:   state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    logic [7:0] ob, d;
    ob        = e >> g_log2;
    d         = e & 8'((1 << g_log2) - 1);
    busy      = (state != S_IDLE);
    done      = (state == S_DONE);
    sr_load   = (state == S_LOAD);
    sr_rotate = (state == S_ROT);
    sa_clear  = (state == S_ROT);
    sample    = (state == S_SAMPLE);
    conv      = (state == S_CONV);
    conv_col  = c;
    bit_sel   = b;
    rd_idx    = $clog2(MAX_OUTS)'(e);
    out_valid = (state == S_EMIT);
    out_ch    = (ob << k_log2) + (d << (k_log2 - g_log2)) + t;
  end

endmodule
