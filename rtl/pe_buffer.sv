// pe_buffer -- the PE buffer: a first-in first-out store of feature-map elements
// arriving from the global buffer or from the previous layer's PE. DEPTH bytes
// (4 KB by default, 32 slices of 128 channels). Valid/ready on both sides; an
// element moves on a clock edge where valid and ready are both high. The write
// side's ready is low when the buffer is full, which stalls the producer. Reads
// are registered: the head element sits in an output register.
module pe_buffer
  import reboc_pkg::*;
#(
  parameter int DEPTH = PE_BUF_BYTES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  act_t in_data,
  output logic in_ready,
  output logic out_valid,
  output act_t out_data,
  input  logic out_ready
);

  localparam int AW = $clog2(DEPTH);
  act_t          mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;      // elements in mem, not counting the output register
  logic          push, pop;

  assign in_ready = (count != (AW+1)'(DEPTH));
  assign push     = in_valid && in_ready;
  // move the head into the output register when it is empty or being taken
  assign pop      = (count != '0) && (!out_valid || out_ready);

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= in_data;
    if (pop)  out_data  <= mem[rptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0; count <= '0; out_valid <= 1'b0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
      if (pop) out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;
    end
  end

endmodule
