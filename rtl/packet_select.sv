// packet_select: the input selector of the router (the "priority encoder"
// box of the node diagram, steered by the arbiter's grant vector sel).
//
// Given N packets and a one-hot grant, it passes the granted packet on,
// together with its valid bit and the number of the port it came from, so
// the routing error check knows the arrival direction. It is an AND-OR
// multiplexer; with no grant the outputs are zero.
// Interface: combinational, no clock.
module packet_select
  import rkt_pkg::*;
#(
  parameter int unsigned N = NPORTS
) (
  input  pkt_t         pkt_in [N],
  input  logic [N-1:0] valid_in,
  input  logic [N-1:0] gnt,
  output pkt_t         pkt_out,
  output logic         valid_out,
  output logic [2:0]   port_out
);

  always_comb begin
    pkt_out   = '0;
    valid_out = 1'b0;
    port_out  = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (gnt[i]) begin
        pkt_out   = pkt_out | pkt_in[i];
        valid_out = valid_out | valid_in[i];
        port_out  = port_out | 3'(i);
      end
    end
  end

endmodule
