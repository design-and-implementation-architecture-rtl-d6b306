// hamming_enc_tb: drives all 256 data values through the registered encoder
// and checks each codeword, one clock later, against the position-by-position
// reference code; also checks the value 8'hFF -> 13'b0011011111111 and reset.
module hamming_enc_tb;
  import ham_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [7:0]  data_in;
  logic [12:0] enc_out;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  hamming_enc dut (.clk(clk), .rst(rst), .data_in(data_in), .enc_out(enc_out));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [12:0] got, logic [12:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    rst     = 1'b1;
    data_in = 8'h5A;
    @(negedge clk);
    check(enc_out, '0, "reset");
    rst = 1'b0;
    for (int v = 0; v < 256; v++) begin
      data_in = 8'(v);
      @(negedge clk);
      check(enc_out, ref_encode(8'(v)), $sformatf("encode %02h", v));
    end
    // The printed example: all ones.
    data_in = 8'hFF;
    @(negedge clk);
    check(enc_out, 13'b0011011111111, "printed example");
    // Latency: the output follows the input by exactly one clock.
    data_in = 8'h00;
    @(posedge clk); #1;
    data_in = 8'hFF;
    check(enc_out, ref_encode(8'h00), "holds until next edge");
    @(posedge clk); #1;
    check(enc_out, ref_encode(8'hFF), "one clock latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
