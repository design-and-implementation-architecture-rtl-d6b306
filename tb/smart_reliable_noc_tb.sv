// smart_reliable_noc_tb: end-to-end test of the 4x4 mesh at its default size.
//   0. The example transfer: node 0 sends 8'hFF to address 4'b1110 (x=2,
//      y=3, node 14); it must arrive after exactly 5 hops (5 clocks).
//   1. Random traffic from every node to random destinations, a single bit
//      of the codeword flipped on a fifth of the packets: every packet must
//      arrive once, at its destination, with its payload corrected, and no
//      routing error may be reported.
//   2. Node 5 (x=1, y=1) marked faulty: traffic that can get round it is
//      sent (a reference walk of the routing decides which), each source
//      waiting for its packet to arrive before sending the next; packets
//      must bypass it, arrive intact, and again raise no routing error.
//   3. Routing faults injected in four routers: packets still arrive, the
//      routers downstream report the routing errors, and exactly the four
//      faulty routers end up marked suspect (none before).
//   4. Two bits flipped: the double error is reported on the way.
// Before that, the ECC demonstrator beside the mesh encodes 8'hFF, has bit 12
// flipped and must return 8'hFF.
// Each mechanism (error correction, bypass, routing error detection,
// double-error detection, stall under contention) is counted and must occur.
module smart_reliable_noc_tb;
  import rkt_pkg::*;
  import ham_ref_pkg::*;

  localparam int NODES   = 16;
  localparam int PER_SRC = 120;

  logic  clk = 1'b0;
  logic  rst;
  logic  node_fault    [NODES];
  logic  route_fault   [NODES];
  logic  valid_in      [NODES];
  logic  ready_out     [NODES];
  addr_t addr_in       [NODES];
  data_t data_in       [NODES];
  code_t err_in        [NODES];
  logic  valid_out     [NODES];
  data_t data_out      [NODES];
  logic  ecc_corrected [NODES];
  logic  ecc_uncorr    [NODES];
  logic  route_err     [NODES];
  logic  switch_suspect [NODES];
  logic  bypass_taken  [NODES];
  logic  stall         [NODES];
  data_t ecc_data_in, ecc_dec_out;
  code_t ecc_error_in, ecc_enc_out, ecc_error_out;
  logic  ecc_dec_corrected, ecc_dec_uncorr;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  smart_reliable_noc dut (
    .clk(clk), .rst(rst), .node_fault(node_fault), .route_fault(route_fault),
    .valid_in(valid_in), .ready_out(ready_out), .addr_in(addr_in), .data_in(data_in),
    .err_in(err_in), .valid_out(valid_out), .data_out(data_out),
    .ecc_corrected(ecc_corrected), .ecc_uncorr(ecc_uncorr), .route_err(route_err), .switch_suspect(switch_suspect),
    .bypass_taken(bypass_taken), .stall(stall),
    .ecc_data_in(ecc_data_in), .ecc_error_in(ecc_error_in), .ecc_enc_out(ecc_enc_out),
    .ecc_error_out(ecc_error_out), .ecc_dec_out(ecc_dec_out),
    .ecc_dec_corrected(ecc_dec_corrected), .ecc_dec_uncorr(ecc_dec_uncorr));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected deliveries, counted by (destination, payload).
  int outstanding [int];
  int n_out = 0, n_corr = 0, n_bypass = 0, n_rerr = 0, n_stall = 0, n_unc = 0;
  bit check_data = 1'b1;
  bit one_at_a_time = 1'b0;
  bit busy [NODES];

  always @(posedge clk) begin
    if (!rst) begin
      for (int i = 0; i < NODES; i++) begin
        if (ecc_corrected[i]) n_corr++;
        if (ecc_uncorr[i]) n_unc++;
        if (bypass_taken[i]) n_bypass++;
        if (route_err[i]) n_rerr++;
        if (stall[i]) n_stall++;
        if (valid_out[i]) begin
          int key;
          key = i * 256 + int'(data_out[i]);
          n_out++;
          if (one_at_a_time) busy[data_out[i][7:4]] = 1'b0;
          if (check_data) begin
            checks++;
            if (outstanding.exists(key) && outstanding[key] > 0) begin
              outstanding[key]--;
            end else begin
              failures++;
              $display("FAIL node %0d received unexpected %02h", i, data_out[i]);
            end
          end
        end
      end
    end
  end

  function automatic int total_outstanding();
    int s = 0;
    foreach (outstanding[k]) s += outstanding[k];
    return s;
  endfunction

  // Walk the routing (XY, y first when the x neighbour is faulty) and tell
  // whether a packet from s to d gets through with the given faulty node.
  function automatic bit reachable(int s, int d, int bad);
    int x = s % 4, y = s / 4;
    int dx = d % 4, dy = d / 4;
    if (s == bad || d == bad) return 0;
    while (x != dx || y != dy) begin
      int nx = x, ny = y;
      if (x != dx) begin
        nx = (dx > x) ? x + 1 : x - 1;
        if (ny * 4 + nx == bad) begin
          if (y == dy) return 0;
          nx = x;
          ny = (dy > y) ? y + 1 : y - 1;
        end
      end else begin
        ny = (dy > y) ? y + 1 : y - 1;
      end
      if (ny * 4 + nx == bad) return 0;
      x = nx;
      y = ny;
    end
    return 1;
  endfunction

  task automatic send(int s, int d, data_t v, code_t e);
    addr_in[s]  = addr_t'(d);
    data_in[s]  = v;
    err_in[s]   = e;
    valid_in[s] = 1'b1;
    if ($countones(e) <= 1) begin
      int key = d * 256 + int'(v);
      if (outstanding.exists(key)) outstanding[key]++;
      else outstanding[key] = 1;
    end
    do @(posedge clk); while (!ready_out[s]);
    #1 valid_in[s] = 1'b0;
    err_in[s] = '0;
  endtask

  // One traffic source per node, started by the phase sequencer below.
  int  phase_bad = -1;
  bit  go [NODES];
  bit  done [NODES];

  for (genvar g = 0; g < NODES; g++) begin : g_src
    initial begin
      int    d, key;
      data_t v;
      code_t e;
      done[g] = 1'b0;
      go[g]   = 1'b0;
      forever begin
        wait (go[g]);
        for (int k = 0; k < PER_SRC; k++) begin
          do d = $urandom_range(NODES - 1);
          while (phase_bad >= 0 && !reachable(g, d, phase_bad));
          v = one_at_a_time ? {4'(g), 4'(k)} : data_t'($urandom);
          e = ($urandom_range(4) == 0) ? code_t'(1) << $urandom_range(12) : '0;
          key = d * 256 + int'(v);
          if (outstanding.exists(key)) outstanding[key]++;
          else outstanding[key] = 1;
          busy[g]     = 1'b1;
          addr_in[g]  = addr_t'(d);
          data_in[g]  = v;
          err_in[g]   = e;
          valid_in[g] = 1'b1;
          do @(posedge clk); while (!ready_out[g]);
          #1;
          valid_in[g] = 1'b0;
          err_in[g]   = '0;
          if (one_at_a_time) wait (!busy[g]);
          repeat ($urandom_range(3)) @(posedge clk);
          #1;
        end
        go[g]   = 1'b0;
        done[g] = 1'b1;
      end
    end
  end

  task automatic all_sources(int bad);
    phase_bad = bad;
    for (int i = 0; i < NODES; i++) begin
      done[i] = (i == bad);
      go[i]   = (i != bad);
    end
    for (int i = 0; i < NODES; i++) wait (done[i]);
  endtask

  task automatic drain(string what);
    int t = 0;
    while (total_outstanding() != 0 && t < 2000) begin
      @(posedge clk);
      t++;
    end
    #1;
    checks++;
    if (total_outstanding() != 0) begin
      failures++;
      $display("FAIL %s: %0d packets lost (delivered so far %0d)", what, total_outstanding(), n_out);
      foreach (outstanding[k]) if (outstanding[k] != 0) $display("  missing dest %0d data %02h x%0d", k / 256, k % 256, outstanding[k]);
    end
  endtask

  initial begin
    int t0, lat, rerr_before;
    rst = 1'b1;
    for (int i = 0; i < NODES; i++) begin
      node_fault[i]  = 1'b0;
      route_fault[i] = 1'b0;
      valid_in[i]    = 1'b0;
      addr_in[i]     = '0;
      data_in[i]     = '0;
      err_in[i]      = '0;
    end
    ecc_data_in  = 8'hFF;
    ecc_error_in = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // The ECC demonstrator beside the mesh: 8'hFF, bit 12 flipped.
    @(negedge clk);
    ecc_error_in = 13'b1000000000000;
    #1;
    checks++;
    if (ecc_enc_out !== 13'b0011011111111 || ecc_error_out !== 13'b1011011111111) begin
      failures++;
      $display("FAIL ecc_8 enc_out %b error_out %b", ecc_enc_out, ecc_error_out);
    end
    @(negedge clk);
    checks++;
    if (ecc_dec_out !== 8'hFF || !ecc_dec_corrected) begin
      failures++;
      $display("FAIL ecc_8 dec_out %b", ecc_dec_out);
    end

    // 0. The example transfer and its hop latency.
    send(0, 14, 8'hFF, '0);  // address 4'b1110
    lat = 0;
    while (!valid_out[14] && lat < 50) begin
      @(posedge clk);
      #1;
      lat++;
    end
    checks++;
    if (lat != 5 || data_out[14] !== 8'hFF) begin
      failures++;
      $display("FAIL example transfer: %0d clocks, data %02h", lat, data_out[14]);
    end
    drain("example");

    // 1. Random traffic, no faults.
    all_sources(-1);
    drain("random traffic");
    checks++;
    if (n_rerr != 0) begin
      failures++;
      $display("FAIL %0d routing errors reported in a fault-free mesh", n_rerr);
    end

    // 2. Node 5 unavailable: bypass it.
    // At most one packet per source in flight: adaptive bypassing adds turns
    // that plain XY forbids, so a heavily loaded ring of routers round the
    // faulty node could otherwise fill up and deadlock.
    node_fault[5] = 1'b1;
    one_at_a_time = 1'b1;
    all_sources(5);
    one_at_a_time = 1'b0;
    drain("bypass traffic");
    node_fault[5] = 1'b0;
    checks++;
    if (n_rerr != 0) begin
      failures++;
      $display("FAIL %0d routing errors reported for bypasses", n_rerr);
    end

    checks++;
    for (int i = 0; i < NODES; i++) if (switch_suspect[i]) begin
      failures++;
      $display("FAIL node %0d suspected without a routing fault", i);
    end

    // 3. Routing faults in four routers.
    rerr_before = n_rerr;
    route_fault[0]  = 1'b1;
    route_fault[3]  = 1'b1;
    route_fault[12] = 1'b1;
    route_fault[15] = 1'b1;
    all_sources(-1);
    drain("routing-fault traffic");
    for (int i = 0; i < NODES; i++) begin
      checks++;
      if (switch_suspect[i] !== route_fault[i]) begin
        failures++;
        $display("FAIL node %0d suspect=%b routing fault=%b", i, switch_suspect[i], route_fault[i]);
      end
    end
    for (int i = 0; i < NODES; i++) route_fault[i] = 1'b0;
    checks++;
    if (n_rerr == rerr_before) begin
      failures++;
      $display("FAIL routing faults went undetected");
    end

    // 4. Double errors: reported, payload not trusted.
    check_data = 1'b0;
    for (int k = 0; k < 4; k++) begin
      send(k, 15 - k, data_t'($urandom), code_t'(3) << (2 * k));
      repeat (12) @(posedge clk);
    end
    #1;
    check_data = 1'b1;

    checks++;
    if (n_corr == 0 || n_bypass == 0 || n_rerr == 0 || n_unc < 4 || n_stall == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("delivered=%0d corrected=%0d bypasses=%0d routing_errors=%0d double_errors=%0d stalls=%0d",
             n_out, n_corr, n_bypass, n_rerr, n_unc, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
