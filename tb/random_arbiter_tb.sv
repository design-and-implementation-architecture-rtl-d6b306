// random_arbiter_tb: checks the five-way random arbiter.
//   - random request patterns: the grant is one-hot, only to an active
//     request, and never empty while a request is active;
//   - all five requests held: each is served between 12% and 28% of the
//     clocks, none waits more than 64 clocks, and the service order is not a
//     fixed rotation (it differs from round robin on many clocks);
//   - one request alone is granted at once.
module random_arbiter_tb;

  localparam int N = 5;

  logic         clk = 1'b0;
  logic         rst;
  logic [N-1:0] req, gnt;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  random_arbiter #(.N(N), .SEED(16'hBEEF)) dut (.clk(clk), .rst(rst), .req(req), .gnt(gnt));

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (req=%b gnt=%b)", what, req, gnt);
    end
  endtask

  int cnt [N];
  int last [N];
  int maxwait;
  int not_rr;
  int prev;

  initial begin
    rst = 1'b1;
    req = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;

    for (int k = 0; k < 5000; k++) begin
      req = N'($urandom);
      #1;
      check($countones(gnt) <= 1, "grant not one-hot");
      check((gnt & ~req) == '0, "grant without request");
      check((req == '0) || (gnt != '0), "request not served");
      @(negedge clk);
    end

    req = '1;
    foreach (cnt[i]) begin
      cnt[i]  = 0;
      last[i] = 0;
    end
    maxwait = 0;
    not_rr  = 0;
    prev    = -1;
    for (int k = 1; k <= 10000; k++) begin
      #1;
      for (int i = 0; i < N; i++) begin
        if (gnt[i]) begin
          cnt[i]++;
          if (k - last[i] > maxwait) maxwait = k - last[i];
          last[i] = k;
          if (prev >= 0 && i != (prev + 1) % N) not_rr++;
          prev = i;
        end
      end
      @(negedge clk);
    end
    for (int i = 0; i < N; i++)
      check(cnt[i] > 1200 && cnt[i] < 2800, $sformatf("share of request %0d is %0d/10000", i, cnt[i]));
    check(maxwait <= 64, $sformatf("longest wait %0d clocks", maxwait));
    check(not_rr > 2000, $sformatf("order looks fixed (%0d breaks)", not_rr));

    for (int i = 0; i < N; i++) begin
      req = N'(1) << i;
      #1;
      check(gnt == req, "lone request");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
