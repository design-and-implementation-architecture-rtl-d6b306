// xy_route_tb: exhaustive check of the routing choice over every current
// address, destination, set of available neighbours and the routing-fault
// input, against a reference that lists the minimal directions in order of
// preference (x then y normally; y then x under a routing fault) and takes
// the first available one.
module xy_route_tb;
  import rkt_pkg::*;

  addr_t      cur, dest;
  logic [4:0] avail;
  logic       route_fault;
  port_e      port;
  logic       bypass, blocked;
  int         checks = 0, failures = 0;

  xy_route dut (.cur(cur), .dest(dest), .avail(avail), .route_fault(route_fault),
                .port(port), .bypass(bypass), .blocked(blocked));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++)
      for (int d = 0; d < 16; d++)
        for (int a = 0; a < 16; a++)
          for (int f = 0; f < 2; f++) begin
            int    cx, cy, dx, dy;
            port_e px, py, first, second, e_port;
            bit    has_x, has_y, e_bypass, e_blocked;
            cur         = addr_t'(c);
            dest        = addr_t'(d);
            avail       = {4'(a), 1'b1};
            route_fault = f[0];
            cx = c % 4; cy = c / 4; dx = d % 4; dy = d / 4;
            has_x = (dx != cx);
            has_y = (dy != cy);
            px    = (dx > cx) ? P_E : P_W;
            py    = (dy > cy) ? P_S : P_N;
            e_bypass  = 0;
            e_blocked = 0;
            if (!has_x && !has_y) begin
              e_port = P_L;
            end else if (has_x && has_y) begin
              first  = (f != 0) ? py : px;
              second = (f != 0) ? px : py;
              if (avail[first]) e_port = first;
              else if (avail[second]) begin
                e_port   = second;
                e_bypass = (second == py);
              end else begin
                e_port    = px;
                e_blocked = 1;
              end
            end else begin
              e_port    = has_x ? px : py;
              e_blocked = !avail[e_port];
            end
            #1;
            checks++;
            if (port !== e_port || bypass !== e_bypass || blocked !== e_blocked) begin
              failures++;
              $display("FAIL cur=%h dest=%h avail=%b f=%0d: port %0d/%0d bypass %b/%b blocked %b/%b",
                       c, d, avail, f, port, e_port, bypass, e_bypass, blocked, e_blocked);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
