// ecc_8_tb: streams data words and error patterns through the ECC test block
// every clock and checks its pipeline: enc_out one clock after data_in,
// error_out = enc_out ^ error_in, dec_out two clocks after data_in and equal
// to the original data whenever at most one bit was flipped. Starts with the
// example all-ones word with bit 12 flipped.
module ecc_8_tb;
  import ham_ref_pkg::*;

  localparam int N = 3000;

  logic        clk = 1'b0;
  logic        rst;
  logic [7:0]  data_in;
  logic [12:0] error_in, enc_out, error_out;
  logic [7:0]  dec_out;
  logic        dec_corrected, dec_uncorr;
  int          checks = 0, failures = 0;
  logic [7:0]  D [N];
  logic [12:0] E [N];

  always #5 clk = ~clk;

  ecc_8 dut (.clk(clk), .rst(rst), .data_in(data_in), .error_in(error_in),
             .enc_out(enc_out), .error_out(error_out), .dec_out(dec_out),
             .dec_corrected(dec_corrected), .dec_uncorr(dec_uncorr));

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  initial begin
    D[0] = 8'hFF;
    E[0] = 13'b1000000000000;
    for (int k = 1; k < N; k++) begin
      D[k] = 8'($urandom);
      case ($urandom_range(2))
        0:       E[k] = '0;
        1:       E[k] = 13'(1) << $urandom_range(12);
        default: E[k] = (13'(1) << $urandom_range(6)) | (13'(1) << (7 + $urandom_range(5)));
      endcase
    end
    rst      = 1'b1;
    data_in  = '0;
    error_in = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < N + 2; k++) begin
      // Inputs for this clock: new data, and the error for the word now in enc_out.
      data_in  = (k < N) ? D[k] : 8'h00;
      error_in = (k >= 1 && k <= N) ? E[k-1] : '0;
      #1;
      if (k >= 1 && k <= N) begin
        checks++;
        if (enc_out !== ref_encode(D[k-1]))
          fail($sformatf("enc_out k=%0d got %b exp %b", k - 1, enc_out, ref_encode(D[k-1])));
        checks++;
        if (error_out !== (ref_encode(D[k-1]) ^ E[k-1]))
          fail($sformatf("error_out k=%0d", k - 1));
        if (k == 1) begin
          checks++;
          if (enc_out !== 13'b0011011111111 || error_out !== 13'b1011011111111)
            fail("printed example enc/error");
        end
      end
      if (k >= 2) begin
        checks++;
        if (popcount13(E[k-2]) <= 1) begin
          if (dec_out !== D[k-2] || dec_uncorr)
            fail($sformatf("dec_out k=%0d got %02h exp %02h", k - 2, dec_out, D[k-2]));
          if (dec_corrected !== (E[k-2] != '0))
            fail($sformatf("dec_corrected k=%0d", k - 2));
        end else if (!dec_uncorr) begin
          fail($sformatf("double error not flagged k=%0d", k - 2));
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
