// route_err_detect: decides whether the switch a packet came from made a
// routing error, from the receiving router's own address, the packet's
// destination and the port the packet arrived on.
//
// The document's idea is that a router checks its own position against the
// deterministic XY path of the packet. The packet carries no source address
// in this design, so the check uses the arrival direction instead (this
// design's choice):
//   - every hop must move towards the destination: a packet that came in on
//     the West port has moved east, so the destination x must not be west of
//     this router; likewise for the other three ports;
//   - a packet that came in on the North or South port has moved in y, which
//     XY routing only does once x is done, so its destination x must equal
//     this router's x, unless the packet's rev bit says the hop was a
//     deliberate bypass of an unavailable neighbour.
// Packets from the local port are not checked.
//
// Interface: combinational; err is high while the checked packet violates a
// rule.
module route_err_detect
  import rkt_pkg::*;
(
  input  addr_t cur,
  input  addr_t dest,
  input  logic  rev,
  input  port_e in_port,
  output logic  err
);

  logic [1:0] cx, cy, dx, dy;

  always_comb begin
    cx  = addr_x(cur);
    cy  = addr_y(cur);
    dx  = addr_x(dest);
    dy  = addr_y(dest);
    err = 1'b0;
    unique case (in_port)
      P_W:     err = (dx < cx);
      P_E:     err = (dx > cx);
      P_N:     err = (dy < cy) || (!rev && (dx != cx));
      P_S:     err = (dy > cy) || (!rev && (dx != cx));
      default: err = 1'b0;
    endcase
  end

endmodule
