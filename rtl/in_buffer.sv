// in_buffer: packet FIFO at a router input (the document's I/O buffers).
//
// A small circular FIFO of DEPTH entries with a valid/ready handshake on the
// write side: a packet is written on a clock edge where in_valid and
// in_ready are both high. in_ready depends only on the stored count, never
// combinationally on the reader, so chains of routers cannot form
// combinational paths through it. The head entry is shown on out_data with
// out_valid; pop removes it. The document names the buffers only; the depth
// (2, enough for one packet per clock per link), the handshake and the
// synchronous active-high reset are this design's choices.
module in_buffer #(
  parameter type         T     = rkt_pkg::pkt_t,
  parameter int unsigned DEPTH = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  output T     out_data,
  input  logic pop
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem [DEPTH];
  logic [AW-1:0]   rd_ptr, wr_ptr;
  logic [AW:0]     count;
  logic            push, do_pop;

  always_comb begin
    in_ready  = (count < (AW+1)'(DEPTH));
    out_valid = (count != '0);
    out_data  = mem[rd_ptr];
    push      = in_valid && in_ready;
    do_pop    = pop && out_valid;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (do_pop) rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  a_no_pop_empty : assert property (@(posedge clk) disable iff (rst) pop |-> out_valid);

endmodule
