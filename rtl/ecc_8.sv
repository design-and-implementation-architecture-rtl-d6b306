// ecc_8: stand-alone test block for the 8-bit Hamming ECC, with the ports
// of the document's ECC_8 (clk, rst, data_in[7:0], error_in[12:0],
// enc_out[12:0], error_out[12:0], dec_out[7:0]).
//
// data_in is encoded (hamming_enc, one register stage), the codeword is
// corrupted by XOR with error_in to model a faulty channel
// (error_out = enc_out ^ error_in, as the document's simulation values show),
// and the corrupted word is decoded and corrected (hamming_dec, one register
// stage). The two flags from the decoder are brought out as well; they are
// this design's addition.
//
// Timing: enc_out one clock after data_in; error_out combinational from
// enc_out and error_in; dec_out two clocks after data_in (error_in sampled
// one clock after data_in). rst is synchronous, active high.
module ecc_8
  import rkt_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  data_t data_in,
  input  code_t error_in,
  output code_t enc_out,
  output code_t error_out,
  output data_t dec_out,
  output logic  dec_corrected,
  output logic  dec_uncorr
);

  hamming_enc u_enc (
    .clk     (clk),
    .rst     (rst),
    .data_in (data_in),
    .enc_out (enc_out)
  );

  always_comb error_out = enc_out ^ error_in;

  hamming_dec u_dec (
    .clk           (clk),
    .rst           (rst),
    .code_in       (error_out),
    .dec_out       (dec_out),
    .code_out      (),
    .dec_corrected (dec_corrected),
    .dec_uncorr    (dec_uncorr)
  );

endmodule
