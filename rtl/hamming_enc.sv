// hamming_enc: registered Hamming encoder, 8 data bits to a 13-bit
// single-error-correcting, double-error-detecting codeword.
//
// The codeword is {p8, p4, p2, p1, p0, data}: the four check bits of the
// (12,8) Hamming code plus an overall parity bit (see rkt_pkg). The document
// gives the block (an encoder with clk, rst, an 8-bit input and a 13-bit
// output, and one input/output pair, 8'hFF -> 13'b0011011111111); the bit
// layout and the overall parity bit are this design's reading of that pair.
//
// Timing: with REGISTERED = 1 (default, as in the ECC demonstrator) enc_out
// is registered, one clock after data_in; rst is synchronous, active high,
// and clears it (this design's choice). With REGISTERED = 0 the encoder is
// combinational and clk/rst are unused; the router uses it that way to build
// a packet in the same clock it is written into the input buffer.
module hamming_enc
  import rkt_pkg::*;
#(
  parameter bit REGISTERED = 1'b1
) (
  input  logic  clk,
  input  logic  rst,
  input  data_t data_in,
  output code_t enc_out
);

  if (REGISTERED) begin : g_reg
    always_ff @(posedge clk) begin
      if (rst) enc_out <= '0;
      else     enc_out <= ham_encode(data_in);
    end
  end else begin : g_comb
    always_comb enc_out = ham_encode(data_in);
  end

endmodule
