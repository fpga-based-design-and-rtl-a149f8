// golay_top - extended Golay (24,12,8) codec: encoder and decoder side by side.
//
// The two ends of a protected link. tx_data is encoded combinationally to
// tx_codeword, which leaves the chip toward the channel; words coming back from
// the channel enter at rx_word and pass through the four-stage decoder, which
// returns the corrected word (message in bits 11:0), the error vector it removed
// and a retransmission request for uncorrectable words. The channel itself
// (where bits may flip) is outside the design.
//
// Timing: tx_codeword follows tx_data without a clock. The decoder outputs
// follow rx_word by four clocks (see golay_decoder). Reset is active-low and
// synchronous and only affects the decoder. Placing both ends in one top is
// this design's choice; the published encoder and decoder were separate.
module golay_top
  import golay_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  half_t     tx_data,
  output codeword_t tx_codeword,
  input  logic      rx_valid,
  input  codeword_t rx_word,
  output logic      dec_valid,
  output codeword_t dec_codeword,
  output codeword_t dec_err_vec,
  output logic      dec_retransmit
);

  golay_encoder u_enc (
    .data_i    (tx_data),
    .codeword_o(tx_codeword)
  );

  golay_decoder u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (rx_valid),
    .rx_word   (rx_word),
    .out_valid (dec_valid),
    .corrected (dec_codeword),
    .err_vec   (dec_err_vec),
    .retransmit(dec_retransmit)
  );

endmodule
