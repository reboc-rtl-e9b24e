// global_buffer -- the on-chip global buffer (128 KB by default) between the host
// (standing in for external memory) and the PE array. While idle the host writes
// and reads bytes through h_* (reads return one clock later on h_rdata). `start`
// launches a run: the buffer streams in_len bytes from in_base to the first PE over
// a valid/ready link and stores the bytes arriving from the last PE at out_base
// onward; `done` rises when out_len bytes have arrived and stays high until the
// next start. The streaming engine is this design's own; the document gives only
// the buffer and its size.
module global_buffer
  import reboc_pkg::*;
#(
  parameter int BYTES = GB_BYTES
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host port
  input  logic                     h_we,
  input  logic [$clog2(BYTES)-1:0] h_addr,
  input  act_t                     h_wdata,
  output act_t                     h_rdata,
  // run control
  input  logic                     start,
  input  logic [$clog2(BYTES)-1:0] in_base,
  input  logic [$clog2(BYTES):0]   in_len,
  input  logic [$clog2(BYTES)-1:0] out_base,
  input  logic [$clog2(BYTES):0]   out_len,
  output logic                     done,
  // link to the first PE
  output logic                     tx_valid,
  output act_t                     tx_data,
  input  logic                     tx_ready,
  // link from the last PE
  input  logic                     rx_valid,
  input  act_t                     rx_data,
  output logic                     rx_ready
);

  localparam int AW = $clog2(BYTES);
  act_t        mem [BYTES];
  logic [AW:0] sent, rcvd;
  logic        running, rd_next;
  logic [AW-1:0] rd_addr;

  assign rx_ready = running;
  assign rd_next  = running && (sent != in_len) && (!tx_valid || tx_ready);
  assign rd_addr  = in_base + AW'(sent);

  always_ff @(posedge clk) begin
    if (rx_valid && rx_ready)      mem[out_base + AW'(rcvd)] <= rx_data;
    else if (h_we && !running)     mem[h_addr] <= h_wdata;
    if (rd_next)                   tx_data <= mem[rd_addr];
    h_rdata <= mem[h_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; done <= 1'b0; sent <= '0; rcvd <= '0; tx_valid <= 1'b0;
    end else if (start) begin
      running <= 1'b1; done <= 1'b0; sent <= '0; rcvd <= '0; tx_valid <= 1'b0;
    end else if (running) begin
      if (rd_next) begin
        sent     <= sent + 1'b1;
        tx_valid <= 1'b1;
      end else if (tx_ready) begin
        tx_valid <= 1'b0;
      end
      if (rx_valid && rx_ready) begin
        rcvd <= rcvd + 1'b1;
        if (rcvd + 1'b1 == out_len) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

endmodule
