// hamming_dec_tb: feeds codewords from the reference encoder with no, one or
// two flipped bits into the registered decoder. Checks, one clock later, that
// no error passes unchanged, every single error (in any of the 13 bits) is
// corrected (payload and whole codeword) and flagged, and every double error is flagged as uncorrectable.
module hamming_dec_tb;
  import ham_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [12:0] code_in, code_out;
  logic [7:0]  dec_out;
  logic        dec_corrected, dec_uncorr;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  hamming_dec dut (.clk(clk), .rst(rst), .code_in(code_in), .dec_out(dec_out),
                   .code_out(code_out), .dec_corrected(dec_corrected), .dec_uncorr(dec_uncorr));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [7:0] d, logic [12:0] e);
    int nerr;
    code_in = ref_encode(d) ^ e;
    nerr    = popcount13(e);
    @(negedge clk);
    checks++;
    if (nerr <= 1) begin
      if (dec_out !== d || code_out !== ref_encode(d) || dec_corrected !== (nerr == 1) ||
          dec_uncorr !== 1'b0) begin
        failures++;
        $display("FAIL d=%02h e=%b: out=%02h corr=%b unc=%b", d, e, dec_out,
                 dec_corrected, dec_uncorr);
      end
    end else begin
      if (dec_uncorr !== 1'b1 || dec_corrected !== 1'b0) begin
        failures++;
        $display("FAIL double d=%02h e=%b: corr=%b unc=%b", d, e, dec_corrected, dec_uncorr);
      end
    end
  endtask

  initial begin
    rst     = 1'b1;
    code_in = '0;
    @(negedge clk);
    checks++;
    if (dec_out !== '0 || dec_corrected || dec_uncorr) begin
      failures++;
      $display("FAIL reset");
    end
    rst = 1'b0;
    // The printed example: 8'hFF with bit 12 flipped.
    code_in = 13'b1011011111111;
    @(negedge clk);
    checks++;
    if (dec_out !== 8'hFF) begin
      failures++;
      $display("FAIL printed example: %b", dec_out);
    end
    for (int v = 0; v < 256; v++) begin
      apply(8'(v), '0);
      for (int b = 0; b < 13; b++) apply(8'(v), 13'(1) << b);
    end
    for (int n = 0; n < 2000; n++) begin
      int b1, b2;
      b1 = $urandom_range(12);
      b2 = (b1 + 1 + $urandom_range(11)) % 13;
      apply(8'($urandom), (13'(1) << b1) | (13'(1) << b2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
