// golay_syndrome - syndrome S of a received extended Golay word.
//
// S[r] = w[12+r] XOR parity(B_ROW[r] & w[11:0]); this is H = [I / B] applied
// to the word. S is zero for a codeword; for an error pattern e it equals
// e[23:12] XOR B*e[11:0], which the decoder inverts.
//
// Interface: word_i (24 bits) in, syn_o (12 bits) out. Combinational.
// The equations are the published ones; only their packing into the matrix
// constant of golay_pkg is this design's.
module golay_syndrome
  import golay_pkg::*;
(
  input  codeword_t word_i,
  output half_t     syn_o
);

  always_comb syn_o = word_i[N-1:K] ^ b_mult(word_i[K-1:0]);

endmodule
