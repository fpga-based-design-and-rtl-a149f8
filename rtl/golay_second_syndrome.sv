// golay_second_syndrome - second syndrome SB = B * S.
//
// Because B*B = I, an error pattern e gives SB = B*e[23:12] XOR e[11:0]: when
// all errors lie in the message half, SB is that half's error pattern. Each
// output bit is the parity of S masked by one row of B.
//
// Interface: syn_i (12 bits) in, sb_o (12 bits) out. Combinational.
// The decoding step that uses SB is published; its XOR network is not, and is
// this design's, built from the same matrix B.
module golay_second_syndrome
  import golay_pkg::*;
(
  input  half_t syn_i,
  output half_t sb_o
);

  always_comb sb_o = b_mult(syn_i);

endmodule
