// golay_encoder - combinational extended Golay (24,12,8) encoder.
//
// The 12-bit message is placed in the low half of the codeword and the twelve
// check bits, c[12+r] = parity(B_ROW[r] & data), in the high half. This is the
// syndrome network evaluated with the check half held at zero, which is how
// the generator-matrix equations are used for encoding. Every codeword has a
// weight of 0, 8, 12, 16 or 24 and any two differ in at least 8 places.
//
// Interface: data_i (12 bits) in, codeword_o (24 bits) out.
// Timing: purely combinational, no clock, as in the published encoder; the
// placement of message and check bits within the word is this design's choice.
module golay_encoder
  import golay_pkg::*;
(
  input  half_t     data_i,
  output codeword_t codeword_o
);

  always_comb begin
    codeword_o[K-1:0] = data_i;
    codeword_o[N-1:K] = b_mult(data_i);
  end

endmodule
