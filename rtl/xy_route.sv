// xy_route: output port choice of the RKT switch, XY routing made adaptive
// so that an unavailable neighbour can be bypassed.
//
// Plain XY routing (as the document describes it) first moves the packet
// along x to the destination column, then along y, and delivers it to the
// local port when both coordinates match. The adaptive change, this design's
// reading of the document's "modified XY" bypass: when the x neighbour on the
// way is marked unavailable and the packet still has to move in y, it takes
// the y move first and sets bypass, which the router writes into the packet's
// rev bit so the next router does not count the hop as a routing error. Only
// minimal moves are made; when no minimal move is available the packet must
// wait (blocked).
//
// route_fault models a fault in the routing logic: the router then takes the
// y move first without marking it, a real routing error that the next router
// detects. It exists to exercise the error detection.
//
// Interface: combinational. avail[p] is high when output port p may be used
// (bit P_L is ignored: the local port is always available).
module xy_route
  import rkt_pkg::*;
(
  input  addr_t             cur,
  input  addr_t             dest,
  input  logic [NPORTS-1:0] avail,
  input  logic              route_fault,
  output port_e             port,
  output logic              bypass,
  output logic              blocked
);

  logic [1:0] cx, cy, dx, dy;
  logic       want_x, want_y;
  port_e      dir_x, dir_y;

  always_comb begin
    cx     = addr_x(cur);
    cy     = addr_y(cur);
    dx     = addr_x(dest);
    dy     = addr_y(dest);
    want_x = (dx != cx);
    want_y = (dy != cy);
    dir_x  = (dx > cx) ? P_E : P_W;
    dir_y  = (dy > cy) ? P_S : P_N;

    port    = P_L;
    bypass  = 1'b0;
    blocked = 1'b0;
    if (route_fault && want_x && want_y && avail[dir_y]) begin
      port = dir_y;
    end else if (want_x) begin
      if (avail[dir_x]) begin
        port = dir_x;
      end else if (want_y && avail[dir_y]) begin
        port   = dir_y;
        bypass = 1'b1;
      end else begin
        port    = dir_x;
        blocked = 1'b1;
      end
    end else if (want_y) begin
      port    = dir_y;
      blocked = !avail[dir_y];
    end
  end

endmodule
