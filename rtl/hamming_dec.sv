// hamming_dec: registered Hamming decoder for the 13-bit codeword made by
// hamming_enc.
//
// It recomputes the four check bits (syndrome) and the overall parity. Odd
// parity means one flipped bit: the syndrome, read as a number, is the
// 1-origin Hamming position of that bit (0 means the overall parity bit
// itself) and the bit is inverted. Even parity with a non-zero syndrome means
// two flipped bits: they cannot be corrected and dec_uncorr is raised. The
// syndrome-as-bit-position rule is the document's description of Hamming's
// code; the extra double-error flag comes with the 13th (parity) bit, which
// is this design's reading.
//
// code_out is the corrected 13-bit word, which the router forwards so that
// errors do not pile up over several hops.
//
// Timing: with REGISTERED = 1 (default, as in the ECC demonstrator) all
// outputs are registered, one clock after code_in; rst is synchronous,
// active high. With REGISTERED = 0 the decoder is combinational and clk/rst
// are unused; the router uses it that way.
module hamming_dec
  import rkt_pkg::*;
#(
  parameter bit REGISTERED = 1'b1
) (
  input  logic  clk,
  input  logic  rst,
  input  code_t code_in,
  output data_t dec_out,
  output code_t code_out,
  output logic  dec_corrected,
  output logic  dec_uncorr
);

  dec_t d;

  always_comb d = ham_decode(code_in);

  if (REGISTERED) begin : g_reg
    always_ff @(posedge clk) begin
      if (rst) begin
        dec_out       <= '0;
        code_out      <= '0;
        dec_corrected <= 1'b0;
        dec_uncorr    <= 1'b0;
      end else begin
        dec_out       <= d.data;
        code_out      <= d.code;
        dec_corrected <= d.corrected;
        dec_uncorr    <= d.uncorr;
      end
    end
  end else begin : g_comb
    always_comb begin
      dec_out       = d.data;
      code_out      = d.code;
      dec_corrected = d.corrected;
      dec_uncorr    = d.uncorr;
    end
  end

endmodule
