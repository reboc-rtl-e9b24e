// xb_lane -- one crossbar together with its private periphery: the input shift
// register (SR), the crossbar itself with its 1-bit wordline DACs, the
// sample-and-hold, the ADC and the shift-and-add stage. All control comes from
// the compute unit's controller, so every lane of a compute unit runs in
// lockstep. Timing: the bitlines follow the wordlines (bit `bit_sel` of the SR)
// one clock later; `sample` latches them; each `conv` converts column `conv_col`, and the code reaches the S&A
// two edges later (ADC register, then accumulate). `rd_val` is the signed dot
// product of logical output `rd_idx` for the current circulant shift.
module xb_lane
  import reboc_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // crossbar programming
  input  logic                          prog_en,
  input  logic [$clog2(XB_ROWS)-1:0]    prog_row,
  input  logic [$clog2(XB_COLS)-1:0]    prog_col,
  input  logic [CELL_BITS-1:0]          prog_val,
  // control
  input  logic                          sr_load,
  input  slice_t                        sr_data,
  input  logic                          sr_rotate,
  input  logic [2:0]                    k_log2,
  input  logic [$clog2(IN_BITS)-1:0]    bit_sel,
  input  logic                          sample,
  input  logic                          conv,
  input  logic [$clog2(XB_COLS)-1:0]    conv_col,
  input  logic                          sa_clear,
  input  logic [$clog2(MAX_OUTS)-1:0]   rd_idx,
  output logic signed [ACC_BITS-1:0]    rd_val
);

  localparam int CW   = $clog2(XB_COLS);
  localparam int BW   = $clog2(IN_BITS);
  localparam int TAGW = CW + BW;
  localparam int XSW  = IN_BITS + $clog2(XB_ROWS);

  logic [XB_ROWS-1:0]              wl;
  logic [XSW-1:0]                  xsum;
  logic [XB_COLS-1:0][BL_BITS-1:0] bl, held;
  logic                            adc_v;
  logic [ADC_BITS-1:0]             adc_code;
  logic [TAGW-1:0]                 tag;

  shift_reg u_sr (
    .clk, .rst_n, .load(sr_load), .load_data(sr_data), .rotate(sr_rotate),
    .k_log2, .bit_sel, .wl, .xsum
  );

  rram_xbar u_xb (
    .clk, .rst_n, .prog_en, .prog_row, .prog_col, .prog_val, .wl, .bl
  );

  sample_hold u_sh (.clk, .rst_n, .sample, .bl, .held);

  adc #(.TAGW(TAGW)) u_adc (
    .clk, .rst_n, .conv, .col(conv_col), .tag_in({conv_col, bit_sel}), .held,
    .dout_valid(adc_v), .dout(adc_code), .tag_out(tag)
  );

  shift_add u_sa (
    .clk, .rst_n, .clear(sa_clear), .acc_en(adc_v), .col(tag[TAGW-1:BW]),
    .bit_idx(tag[BW-1:0]), .adc_val(adc_code), .xsum, .rd_idx, .rd_val
  );

endmodule
