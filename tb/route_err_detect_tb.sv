// route_err_detect_tb: exhaustive check of the routing error detector. The
// reference reconstructs the previous router from the arrival port and
// calls the hop correct when it shortened the distance to the destination
// by one and, for a y move without the bypass mark, x was already done at
// the previous router.
module route_err_detect_tb;
  import rkt_pkg::*;

  addr_t cur, dest;
  logic  rev;
  port_e in_port;
  logic  err;
  int    checks = 0, failures = 0;

  route_err_detect dut (.cur(cur), .dest(dest), .rev(rev), .in_port(in_port), .err(err));

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++)
      for (int d = 0; d < 16; d++)
        for (int r = 0; r < 2; r++)
          for (int p = 0; p < 5; p++) begin
            int cx, cy, dx, dy, px, py;
            bit ok;
            cx = c % 4; cy = c / 4; dx = d % 4; dy = d / 4;
            px = cx; py = cy;
            case (p)
              1: py = cy - 1;  // came from the north neighbour
              2: px = cx + 1;  // from the east
              3: py = cy + 1;  // from the south
              4: px = cx - 1;  // from the west
              default: ;
            endcase
            if (p == 0) ok = 1;
            else begin
              ok = (iabs(px - dx) + iabs(py - dy)) == (iabs(cx - dx) + iabs(cy - dy) + 1);
              if ((p == 1 || p == 3) && r == 0 && px != dx) ok = 0;
            end
            cur     = addr_t'(c);
            dest    = addr_t'(d);
            rev     = r[0];
            in_port = port_e'(p);
            #1;
            checks++;
            if (err !== !ok) begin
              failures++;
              $display("FAIL cur=%h dest=%h rev=%0d port=%0d: err=%b", c, d, r, p, err);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
