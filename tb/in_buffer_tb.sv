// in_buffer_tb: random writes and pops on the input FIFO, checked against a
// queue: data comes out in order, in_ready is high exactly when fewer than
// DEPTH entries are held, and out_valid exactly when one is; the buffer is
// filled and drained many times. Run at the default depth (2).
module in_buffer_tb;
  import rkt_pkg::*;

  localparam int DEPTH = 2;

  logic clk = 1'b0;
  logic rst;
  logic in_valid, in_ready, out_valid, pop;
  pkt_t in_data, out_data;
  pkt_t model [$];
  int   checks = 0, failures = 0;
  int   full_and_both = 0;

  always #5 clk = ~clk;

  in_buffer #(.T(pkt_t), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .out_valid(out_valid), .out_data(out_data), .pop(pop));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst      = 1'b1;
    in_valid = 1'b0;
    pop      = 1'b0;
    in_data  = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 10000; k++) begin
      in_valid = ($urandom_range(99) < 60);
      in_data  = pkt_t'({$urandom, 16'($urandom)});
      #1;
      pop = out_valid && ($urandom_range(99) < 50);
      #1;
      checks++;
      if (in_ready !== (model.size() < DEPTH) || out_valid !== (model.size() > 0)) begin
        failures++;
        $display("FAIL flags: size=%0d ready=%b valid=%b", model.size(), in_ready, out_valid);
      end
      if (out_valid) begin
        checks++;
        if (out_data !== model[0]) begin
          failures++;
          $display("FAIL data order");
        end
      end
      if (model.size() == DEPTH && pop) full_and_both++;
      @(posedge clk);
      if (pop && model.size() > 0) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
      @(negedge clk);
      pop = 1'b0;
    end
    checks++;
    if (full_and_both == 0) begin
      failures++;
      $display("FAIL never popped a full buffer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
