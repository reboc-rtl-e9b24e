// input_buffer -- the chain of connected input buffers (IBs) that implements
// input slice reusing. SLOTS buffers of one slice each are stacked; a new slice
// is first gathered, one element per accepted `in_valid`, into a staging buffer.
// `advance` then moves every slice up by one buffer, drops the top one (it is
// exhausted) and puts the staged slice into the bottom buffer. With a kernel of
// height r the bottom r buffers hold the sliding window of r consecutive slices
// of the current input tile, so each slice is fetched once and reused by r
// windows. `slots[SLOTS-1]` is the newest slice. The staging buffer accepts data
// while the compute units work from their own shift registers. `advance` is
// honoured only when the staging buffer is full; `flush` empties the staging buffer.
module input_buffer
  import reboc_pkg::*;
#(
  parameter int SLOTS = BCUS_PER_PE
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   flush,
  input  logic   in_valid,
  input  act_t   in_data,
  output logic   in_ready,
  output logic   staging_full,
  input  logic   advance,
  output slice_t slots [SLOTS]
);

  localparam int CW = $clog2(XB_ROWS + 1);
  slice_t        staging;
  logic [CW-1:0] cnt;

  assign staging_full = (cnt == CW'(XB_ROWS));
  assign in_ready     = !staging_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      staging <= '0;
      for (int s = 0; s < SLOTS; s++) slots[s] <= '0;
    end else if (flush) begin
      cnt <= '0;
    end else if (advance && staging_full) begin
      for (int s = 0; s < SLOTS - 1; s++) slots[s] <= slots[s+1];
      slots[SLOTS-1] <= staging;
      cnt <= '0;
    end else if (in_valid && in_ready) begin
      staging[cnt[$clog2(XB_ROWS)-1:0]] <= in_data;
      cnt <= cnt + 1'b1;
    end
  end

endmodule
