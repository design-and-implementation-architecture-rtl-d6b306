// rkt_node_tb: one router at x=1, y=1 (all four neighbours present), driven
// from all five inputs at once with random packets while the four mesh
// outputs accept at random. Each packet leaving on any output is matched
// against the set of packets in flight: it must leave on the port the
// reference XY routing chooses, with the payload and codeword corrected
// (single flipped bit injected on about a third of the packets), the bypass
// mark set only when the reference bypasses, and the routing-error pulse
// exactly when the hop that brought it in broke the reference rules.
// Three phases: all neighbours available; East neighbour unavailable
// (packets must bypass it); routing fault injected (y moves first).
// The sticky err_from flags must point exactly at the ports misrouted
// packets came in on. Also checks the one-clock pass-through latency of an idle router and that
// stalls (output not ready) happen and lose nothing.
module rkt_node_tb;
  import rkt_pkg::*;
  import ham_ref_pkg::*;

  localparam int CX = 1, CY = 1;
  localparam int PER_SRC = 300;

  logic       clk = 1'b0;
  logic       rst;
  logic       loc_valid_in, loc_ready;
  addr_t      loc_addr_in;
  data_t      loc_data_in;
  code_t      loc_err_in;
  logic       loc_valid_out;
  data_t      loc_data_out;
  logic       loc_corrected, loc_uncorr;
  logic [3:0] in_valid, in_ready, out_valid, out_ready, nbr_avail;
  pkt_t       in_pkt [4];
  pkt_t       out_pkt [4];
  logic       route_fault;
  logic       route_err, bypass_taken, stall, ecc_corrected, ecc_uncorr;
  logic [3:0] err_from;
  logic [3:0] exp_from = '0;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rkt_node #(.X(2'(CX)), .Y(2'(CY)), .SEED(16'h1234)) dut (
    .clk(clk), .rst(rst),
    .loc_valid_in(loc_valid_in), .loc_ready(loc_ready), .loc_addr_in(loc_addr_in),
    .loc_data_in(loc_data_in), .loc_err_in(loc_err_in),
    .loc_valid_out(loc_valid_out), .loc_data_out(loc_data_out),
    .loc_corrected(loc_corrected), .loc_uncorr(loc_uncorr),
    .in_valid(in_valid), .in_ready(in_ready), .in_pkt(in_pkt),
    .out_valid(out_valid), .out_ready(out_ready), .out_pkt(out_pkt),
    .nbr_avail(nbr_avail), .route_fault(route_fault),
    .route_err(route_err), .err_from(err_from), .bypass_taken(bypass_taken), .stall(stall),
    .ecc_corrected(ecc_corrected), .ecc_uncorr(ecc_uncorr));

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int   port;       // expected output: 0 local, 1..4 N, E, S, W
    logic rev;        // expected bypass mark
    logic err;        // expected routing-error pulse
    logic corr;       // a single bit was flipped
    addr_t addr;
    data_t data;
  } exp_t;

  exp_t inflight [$];
  int   n_stall = 0, n_bypass = 0, n_err = 0, n_corr = 0, n_out = 0;
  int   e_bypass = 0, e_err = 0;

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  // Reference routing: minimal directions, x first (y first under a fault).
  function automatic void ref_route(addr_t d, logic [3:0] av, logic fault,
                                    output int port, output logic rev);
    int dx = int'(d[1:0]), dy = int'(d[3:2]);
    int px = (dx > CX) ? 2 : 4;
    int py = (dy > CY) ? 3 : 1;
    rev = 1'b0;
    if (dx == CX && dy == CY) port = 0;
    else if (dy == CY) port = px;
    else if (dx == CX) port = py;
    else if (fault && av[py-1]) port = py;
    else if (av[px-1]) port = px;
    else begin
      port = py;
      rev  = 1'b1;
    end
  endfunction

  // Reference check of the hop into this router from input port p (1..4).
  function automatic logic ref_err(addr_t d, int p, logic rev);
    int dx = int'(d[1:0]), dy = int'(d[3:2]);
    int px = CX, py = CY;
    if (p == 0) return 1'b0;
    if (p == 1) py = CY - 1;
    if (p == 2) px = CX + 1;
    if (p == 3) py = CY + 1;
    if (p == 4) px = CX - 1;
    if (iabs(px - dx) + iabs(py - dy) != iabs(CX - dx) + iabs(CY - dy) + 1) return 1'b1;
    if ((p == 1 || p == 3) && !rev && px != dx) return 1'b1;
    return 1'b0;
  endfunction

  // A destination this router can serve in the current phase (never blocked).
  function automatic addr_t pick_dest(logic [3:0] av);
    addr_t d;
    int    port;
    logic  r;
    forever begin
      d = addr_t'($urandom_range(15));
      if (int'(d[3:2]) == CY && int'(d[1:0]) > CX && !av[1]) continue;
      ref_route(d, av, 1'b0, port, r);
      return d;
    end
  endfunction

  logic [3:0] phase_avail;
  logic       phase_fault;
  int         tag = 0;

  task automatic send(int p);
    addr_t d;
    data_t v;
    code_t e;
    logic  rv;
    exp_t  x;
    d  = pick_dest(phase_avail);
    v  = data_t'(tag);
    tag++;
    e  = ($urandom_range(2) == 0) ? code_t'(1) << $urandom_range(12) : '0;
    rv = (p != 0) ? 1'($urandom) : 1'b0;
    ref_route(d, phase_avail, phase_fault, x.port, x.rev);
    x.err  = ref_err(d, p, rv);
    x.corr = (e != '0);
    x.addr = d;
    x.data = v;
    inflight.push_back(x);
    if (x.rev) e_bypass++;
    if (x.err) begin
      e_err++;
      exp_from[p-1] = 1'b1;
    end
    if (p == 0) begin
      loc_addr_in  = d;
      loc_data_in  = v;
      loc_err_in   = e;
      loc_valid_in = 1'b1;
      do @(posedge clk); while (!loc_ready);
      #1 loc_valid_in = 1'b0;
    end else begin
      in_pkt[p-1].rev  = rv;
      in_pkt[p-1].addr = d;
      in_pkt[p-1].code = ref_encode(v) ^ e;
      in_pkt[p-1].data = v ^ e[7:0];
      in_pkt[p-1].pad  = '0;
      in_valid[p-1]    = 1'b1;
      do @(posedge clk); while (!in_ready[p-1]);
      #1 in_valid[p-1] = 1'b0;
    end
    repeat ($urandom_range(2)) @(posedge clk);
    #1;
  endtask

  // Output monitor: every clock, at most one packet leaves.
  always @(posedge clk) begin
    if (!rst) begin
      int   port;
      pkt_t got;
      logic found;
      port = -1;
      if (loc_valid_out) port = 0;
      for (int m = 0; m < 4; m++) if (out_valid[m]) port = m + 1;
      if (stall) n_stall++;
      if (bypass_taken) n_bypass++;
      if (route_err) n_err++;
      if (ecc_corrected) n_corr++;
      if (port >= 0) begin
        n_out++;
        got   = (port == 0) ? '0 : out_pkt[port-1];
        found = 1'b0;
        checks++;
        if (port != 0 && !out_ready[port-1]) begin
          failures++;
          $display("FAIL sent on port %0d while it was not ready", port);
        end
        for (int i = 0; i < inflight.size(); i++) begin
          exp_t x;
          x = inflight[i];
          if (x.port != port) continue;
          if (port == 0) begin
            if (loc_data_out != x.data) continue;
          end else begin
            if (got.addr != x.addr || got.data != x.data) continue;
            if (got.code != ref_encode(x.data) || got.rev != x.rev || got.pad != '0) continue;
          end
          if (route_err != x.err || ecc_corrected != x.corr) continue;
          found = 1'b1;
          inflight.delete(i);
          break;
        end
        if (!found) begin
          failures++;
          $display("FAIL unexpected output on port %0d: data=%02h err=%b corr=%b", port,
                   (port == 0) ? loc_data_out : got.data, route_err, ecc_corrected);
        end
      end
    end
  end

  task automatic run_phase(logic [3:0] av, logic fault);
    phase_avail = av;
    phase_fault = fault;
    nbr_avail   = av;
    route_fault = fault;
    fork
      for (int k = 0; k < PER_SRC; k++) send(0);
      for (int k = 0; k < PER_SRC; k++) send(1);
      for (int k = 0; k < PER_SRC; k++) send(2);
      for (int k = 0; k < PER_SRC; k++) send(3);
      for (int k = 0; k < PER_SRC; k++) send(4);
    join
    repeat (50) @(posedge clk);
    #1;
    checks++;
    if (inflight.size() != 0) begin
      failures++;
      $display("FAIL %0d packets never left", inflight.size());
      inflight.delete();
    end
  endtask

  // Random back-pressure from the neighbours.
  always @(negedge clk) out_ready <= 4'($urandom) | 4'($urandom);

  initial begin
    rst          = 1'b1;
    loc_valid_in = 1'b0;
    loc_addr_in  = '0;
    loc_data_in  = '0;
    loc_err_in   = '0;
    in_valid     = '0;
    for (int m = 0; m < 4; m++) in_pkt[m] = '0;
    nbr_avail    = 4'hF;
    route_fault  = 1'b0;
    phase_avail  = 4'hF;
    phase_fault  = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // Latency of an idle router: written on one edge, out before the next.
    force out_ready = 4'hF;
    inflight.push_back('{port: 2, rev: 1'b0, err: 1'b0, corr: 1'b0, addr: addr_t'(CY * 4 + 2), data: 8'hC3});
    loc_addr_in  = addr_t'(CY * 4 + 2);
    loc_data_in  = 8'hC3;
    loc_valid_in = 1'b1;
    @(posedge clk);
    #1 loc_valid_in = 1'b0;
    checks++;
    if (out_valid !== 4'b0010 || out_pkt[1].data !== 8'hC3 || out_pkt[1].code !== ref_encode(8'hC3)) begin
      failures++;
      $display("FAIL one-clock pass-through: out_valid=%b", out_valid);
    end
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 4'b0000) begin
      failures++;
      $display("FAIL packet sent twice");
    end
    release out_ready;
    n_out = 0;

    checks++;
    if (err_from !== 4'b0000) begin
      failures++;
      $display("FAIL err_from set before any routing error");
    end
    // Only packets from the North port for a start: err_from must point there.
    for (int k = 0; k < 20; k++) send(1);
    repeat (10) @(posedge clk);
    #1;
    checks++;
    if (err_from !== exp_from || inflight.size() != 0) begin
      failures++;
      $display("FAIL err_from %b expected %b", err_from, exp_from);
    end
    run_phase(4'hF, 1'b0);
    checks++;
    if (err_from !== exp_from) begin
      failures++;
      $display("FAIL err_from %b expected %b", err_from, exp_from);
    end
    run_phase(4'b1101, 1'b0);   // East neighbour unavailable
    run_phase(4'hF, 1'b1);      // routing fault

    checks++;
    if (n_out != 15 * PER_SRC + 20) begin
      failures++;
      $display("FAIL %0d packets out, %0d sent", n_out, 15 * PER_SRC + 20);
    end
    checks++;
    if (n_bypass != e_bypass || n_bypass == 0) begin
      failures++;
      $display("FAIL bypasses %0d expected %0d", n_bypass, e_bypass);
    end
    checks++;
    if (n_err != e_err || n_err == 0) begin
      failures++;
      $display("FAIL routing errors %0d expected %0d", n_err, e_err);
    end
    checks++;
    if (n_stall == 0 || n_corr == 0) begin
      failures++;
      $display("FAIL stalls %0d corrections %0d", n_stall, n_corr);
    end
    $display("packets=%0d stalls=%0d bypasses=%0d routing_errors=%0d corrected=%0d",
             n_out, n_stall, n_bypass, n_err, n_corr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
