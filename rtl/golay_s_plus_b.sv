// golay_s_plus_b - the twelve candidate vectors S + b_k of the Golay decoder.
//
// For each message-bit position k (0..11) the output sum_o[k] is the syndrome
// with column k of B added, i.e. each bit either passes through or is inverted
// according to B. If the error pattern holds a single error in message bit k,
// sum_o[k] is exactly the error pattern of the check half. The decoder uses one
// copy on the syndrome S and a second copy on the second syndrome SB.
//
// Interface: syn_i (12 bits) in, sum_o (12 x 12 bits) out. Combinational.
// Following the published inversion pattern; index k numbers the vectors by
// message bit, so the published b_1 .. b_12 are sum_o[11] .. sum_o[0].
module golay_s_plus_b
  import golay_pkg::*;
(
  input  half_t syn_i,
  output half_t sum_o [K]
);

  always_comb
    for (int unsigned k = 0; k < K; k++) sum_o[k] = syn_i ^ b_col(index_t'(k));

endmodule
