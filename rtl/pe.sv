// pe -- processing element: runs one convolutional (or fully connected) layer of
// a block-circulant network and streams its output to the next layer.
//
// Data path: input elements (8-bit activations, channel-fastest, then row, then
// column: a column of the feature map is an input tile, one (x,y) position with
// its 128 channels is an input slice) enter the PE buffer, are gathered slice by
// slice into the input-buffer chain (input slice reusing) and, once the bottom r
// buffers hold a window of r slices of the current tile, all r compute units
// (BCUs) start together on that same window (input tile sharing). BCU g holds the
// weights of kernel column g, lane l of it kernel row l, so BCU g produces the
// partial sum of output column i-g for tile i. The output buffer adds these
// partial sums; when the last group (g = r-1) has added its share, the output
// column i-r+1 is complete for that window row and is read out channel by
// channel through the ReLU/requantisation unit and the max pool unit to the
// output link. Stride is 1 and there is no padding, so an h x w input gives an
// (h-r+1) x (w-r+1) output. A PE whose configuration has `active` low forwards
// its input link to its output link (used when a network has fewer layers than
// the array has PEs).
//
// Interfaces: in_* / out_* are valid/ready element links; an element moves on a
// clock edge where both are high. `start` begins a layer; `done` pulses when the
// layer's last output has been handed to the output register. prog_* program one
// crossbar cell of BCU prog_bcu, lane prog_lane.
module pe
  import reboc_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  layer_cfg_t                    cfg,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  // crossbar programming
  input  logic                          prog_en,
  input  logic [$clog2(BCUS_PER_PE)-1:0] prog_bcu,
  input  logic [$clog2(XBS_PER_BCU)-1:0] prog_lane,
  input  logic [$clog2(XB_ROWS)-1:0]    prog_row,
  input  logic [$clog2(XB_COLS)-1:0]    prog_col,
  input  logic [CELL_BITS-1:0]          prog_val,
  // input link
  input  logic                          in_valid,
  input  act_t                          in_data,
  output logic                          in_ready,
  // output link
  output logic                          out_valid,
  output act_t                          out_data,
  input  logic                          out_ready
);

  localparam int NB  = BCUS_PER_PE;
  localparam int HW  = $clog2(H_MAX);

  typedef enum logic [2:0] {P_IDLE, P_FILL, P_START, P_RUN, P_READ, P_NEXT, P_DONE} pstate_t;
  pstate_t state;

  // ---------------- PE buffer and input buffer chain ----------------
  logic   pb_in_ready, pb_out_valid, ib_in_ready, staging_full, advance;
  act_t   pb_out_data;
  slice_t slots [NB];

  pe_buffer u_pebuf (
    .clk, .rst_n, .in_valid(in_valid && cfg.active), .in_data, .in_ready(pb_in_ready),
    .out_valid(pb_out_valid), .out_data(pb_out_data), .out_ready(ib_in_ready)
  );

  input_buffer #(.SLOTS(NB)) u_ib (
    .clk, .rst_n, .flush(state == P_IDLE && start), .in_valid(pb_out_valid),
    .in_data(pb_out_data), .in_ready(ib_in_ready), .staging_full, .advance, .slots
  );

  // ---------------- layer position ----------------
  logic [5:0] ti;          // current input tile (column)
  logic [5:0] tj;          // current slice (row) inside the tile
  logic [5:0] jw;          // window row = tj - (r-1)
  logic [5:0] w_out;
  logic [7:0] rd_ch;
  logic [7:0] c_out;
  logic       fin_valid;   // this window completes an output column
  logic [5:0] o_fin;

  assign jw        = tj - 6'(cfg.r - 3'd1);
  assign w_out     = cfg.w_in - 6'(cfg.r - 3'd1);
  assign c_out     = cfg.n_oblk << cfg.k_log2;
  assign fin_valid = (ti >= 6'(cfg.r - 3'd1));
  assign o_fin     = ti - 6'(cfg.r - 3'd1);

  // ---------------- compute units (one ITS group each) ----------------
  logic                       bcu_start;
  logic [NB-1:0]              bcu_done, bcu_busy, psum_valid;
  logic [7:0]                 psum_ch [NB];
  logic signed [ACC_BITS-1:0] psum [NB];
  slice_t                     lane_data [NB][XBS_PER_BCU];

  assign bcu_start = (state == P_START);

  always_comb begin
    for (int g = 0; g < NB; g++)
      for (int l = 0; l < XBS_PER_BCU; l++)
        lane_data[g][l] = (l < int'(cfg.r)) ? slots[NB - int'(cfg.r) + l] : '0;
  end

  for (genvar g = 0; g < NB; g++) begin : g_bcu
    bcu u_bcu (
      .clk, .rst_n,
      .prog_en(prog_en && prog_bcu == g), .prog_lane, .prog_row, .prog_col, .prog_val,
      .start(bcu_start && (g < int'(cfg.r))), .k_log2(cfg.k_log2), .g_log2(cfg.g_log2),
      .n_oblk(cfg.n_oblk), .n_lanes(4'(cfg.r)), .lane_data(lane_data[g]),
      .busy(bcu_busy[g]), .done(bcu_done[g]),
      .psum_valid(psum_valid[g]), .psum_ch(psum_ch[g]), .psum(psum[g])
    );
  end

  // ---------------- output buffer (ITS accumulation) ----------------
  logic [NB-1:0]              ob_en, ob_first;
  logic signed [ACC_BITS-1:0] ob_data [NB];
  logic signed [ACC_BITS-1:0] ob_rd;

  always_comb begin
    ob_en    = '0;
    ob_first = '0;
    for (int b = 0; b < NB; b++) ob_data[b] = '0;
    for (int g = 0; g < NB; g++) begin
      logic [5:0] o;
      o = ti - 6'(g);
      if (psum_valid[0] && g < int'(cfg.r) && ti >= 6'(g) && o < w_out) begin
        ob_en[o[1:0]]    = 1'b1;
        ob_first[o[1:0]] = (g == 0);
        ob_data[o[1:0]]  = psum[g];
      end
    end
  end

  output_buffer #(.NB(NB)) u_ob (
    .clk, .rst_n, .wr_j(jw[HW-1:0]), .wr_ch(psum_ch[0]), .wr_en(ob_en), .wr_first(ob_first),
    .wr_data(ob_data), .rd_bank(o_fin[1:0]), .rd_j(jw[HW-1:0]), .rd_ch, .rd_data(ob_rd)
  );

  // ---------------- ReLU, max pool, output register ----------------
  act_t q, mp_out;
  logic rd_fire, mp_valid;

  relu_quant u_relu (.din(rd_ch < c_out ? ob_rd : '0), .relu_en(cfg.relu_en),
                     .out_shift(cfg.out_shift), .dout(q));

  assign rd_fire = (state == P_READ) && (!out_valid || out_ready) && cfg.active;

  max_pool u_mp (
    .clk, .pool_en(cfg.pool_en), .in_valid(rd_fire), .col(o_fin), .row(jw[HW-1:0]),
    .ch(rd_ch), .din(q), .out_valid(mp_valid), .dout(mp_out)
  );

  logic ov_q;
  act_t od_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ov_q <= 1'b0;
      od_q <= '0;
    end else if (rd_fire) begin
      ov_q <= mp_valid;
      od_q <= mp_out;
    end else if (out_ready) begin
      ov_q <= 1'b0;
    end
  end

  // bypass for an inactive PE
  assign out_valid = cfg.active ? ov_q : in_valid;
  assign out_data  = cfg.active ? od_q : in_data;
  assign in_ready  = cfg.active ? pb_in_ready : out_ready;

  // ---------------- sequencer ----------------
  assign advance = (state == P_FILL) && staging_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= P_IDLE;
      ti <= '0; tj <= '0; rd_ch <= '0;
    end else begin
      case (state)
        P_IDLE:  if (start && cfg.active) begin
                   ti <= '0; tj <= '0; state <= P_FILL;
                 end
        P_FILL:  if (staging_full)
                   state <= (tj >= 6'(cfg.r - 3'd1)) ? P_START : P_NEXT;
        P_START: state <= P_RUN;
        P_RUN:   if (bcu_done[0]) begin
                   rd_ch <= '0;
                   state <= fin_valid ? P_READ : P_NEXT;
                 end
        P_READ:  if (rd_fire) begin
                   if (rd_ch == 8'(XB_ROWS - 1)) state <= P_NEXT;
                   rd_ch <= rd_ch + 1'b1;
                 end
        P_NEXT:  begin
                   if (tj == cfg.h_in - 6'd1) begin
                     tj <= '0;
                     ti <= ti + 1'b1;
                     state <= (ti == cfg.w_in - 6'd1) ? P_DONE : P_FILL;
                   end else begin
                     tj <= tj + 1'b1;
                     state <= P_FILL;
                   end
                 end
        P_DONE:  state <= P_IDLE;
        default: state <= P_IDLE;
      endcase
    end
  end

  assign busy = (state != P_IDLE);
  assign done = (state == P_DONE);

endmodule
