// reboc_top -- the accelerator: NUM_PES processing elements on a MESH_DIM x
// MESH_DIM mesh plus the global buffer. Each PE runs one layer and the layers of a
// network run at the same time as an intra-layer pipeline: as soon as a PE
// finishes an output slice, the slice travels over the mesh link to the PE of the
// next layer, which starts on it before the previous layer has finished. PE n
// feeds PE n+1 along a snake path through the mesh (row 0 left to right, row 1
// right to left, ...), so every link joins neighbouring mesh nodes. The global
// buffer feeds PE 0 and collects the output of PE NUM_PES-1; PEs that are not
// needed are configured inactive and forward their input. Only the
// neighbour-to-neighbour links of this path are built; the document names the
// mesh but does not describe its routers.
//
// Host interface (all synchronous to clk):
//   cfg_we/cfg_pe/cfg_data  write one PE's layer configuration
//   prog_*                  program one crossbar cell (PE, BCU, lane, row, column)
//   gb_*                    read/write the global buffer while idle
//   start + lengths         run the network; done rises when out_len bytes are back
//   pe_busy/pe_done         per-PE status: working on its layer / finished it (one-clock pulse)
module reboc_top
  import reboc_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            cfg_we,
  input  logic [$clog2(NUM_PES)-1:0]      cfg_pe,
  input  layer_cfg_t                      cfg_data,
  input  logic                            prog_en,
  input  logic [$clog2(NUM_PES)-1:0]      prog_pe,
  input  logic [$clog2(BCUS_PER_PE)-1:0]  prog_bcu,
  input  logic [$clog2(XBS_PER_BCU)-1:0]  prog_lane,
  input  logic [$clog2(XB_ROWS)-1:0]      prog_row,
  input  logic [$clog2(XB_COLS)-1:0]      prog_col,
  input  logic [CELL_BITS-1:0]            prog_val,
  input  logic                            gb_we,
  input  logic [$clog2(GB_BYTES)-1:0]     gb_addr,
  input  act_t                            gb_wdata,
  output act_t                            gb_rdata,
  input  logic                            start,
  input  logic [$clog2(GB_BYTES)-1:0]     in_base,
  input  logic [$clog2(GB_BYTES):0]       in_len,
  input  logic [$clog2(GB_BYTES)-1:0]     out_base,
  input  logic [$clog2(GB_BYTES):0]       out_len,
  output logic                            done,
  output logic [NUM_PES-1:0]              pe_busy,
  output logic [NUM_PES-1:0]              pe_done
);

  layer_cfg_t cfg [NUM_PES];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PES; p++) cfg[p] <= '0;
    end else if (cfg_we) begin
      cfg[cfg_pe] <= cfg_data;
    end
  end

  // link n goes into PE n; link NUM_PES returns to the global buffer
  logic lk_valid [NUM_PES+1];
  act_t lk_data  [NUM_PES+1];
  logic lk_ready [NUM_PES+1];

  global_buffer u_gb (
    .clk, .rst_n, .h_we(gb_we), .h_addr(gb_addr), .h_wdata(gb_wdata), .h_rdata(gb_rdata),
    .start, .in_base, .in_len, .out_base, .out_len, .done,
    .tx_valid(lk_valid[0]), .tx_data(lk_data[0]), .tx_ready(lk_ready[0]),
    .rx_valid(lk_valid[NUM_PES]), .rx_data(lk_data[NUM_PES]), .rx_ready(lk_ready[NUM_PES])
  );

  for (genvar p = 0; p < NUM_PES; p++) begin : g_pe
    pe u_pe (
      .clk, .rst_n, .cfg(cfg[p]), .start, .busy(pe_busy[p]), .done(pe_done[p]),
      .prog_en(prog_en && prog_pe == p), .prog_bcu, .prog_lane, .prog_row, .prog_col, .prog_val,
      .in_valid(lk_valid[p]), .in_data(lk_data[p]), .in_ready(lk_ready[p]),
      .out_valid(lk_valid[p+1]), .out_data(lk_data[p+1]), .out_ready(lk_ready[p+1])
    );
  end

endmodule
