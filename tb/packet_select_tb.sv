// packet_select_tb: random packets on five inputs; for every one-hot grant
// the output must be the granted packet, its valid bit and its port number,
// and with no grant the output must be empty.
module packet_select_tb;
  import rkt_pkg::*;

  pkt_t        pkt_in [NPORTS];
  logic [4:0]  valid_in, gnt;
  pkt_t        pkt_out;
  logic        valid_out;
  logic [2:0]  port_out;
  int          checks = 0, failures = 0;

  packet_select dut (.pkt_in(pkt_in), .valid_in(valid_in), .gnt(gnt),
                     .pkt_out(pkt_out), .valid_out(valid_out), .port_out(port_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      for (int i = 0; i < NPORTS; i++) pkt_in[i] = pkt_t'({$urandom, 16'($urandom)});
      valid_in = 5'($urandom);
      for (int g = -1; g < int'(NPORTS); g++) begin
        gnt = (g < 0) ? 5'b0 : 5'(1) << g;
        #1;
        checks++;
        if (g < 0) begin
          if (pkt_out !== '0 || valid_out !== 1'b0 || port_out !== 3'd0) begin
            failures++;
            $display("FAIL no grant");
          end
        end else if (pkt_out !== pkt_in[g] || valid_out !== valid_in[g] || port_out !== 3'(g)) begin
          failures++;
          $display("FAIL grant %0d: port %0d valid %b", g, port_out, valid_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
