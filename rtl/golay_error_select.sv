// golay_error_select - chooses the error vector E of the extended Golay decoder.
//
// E is written [high half, low half] = [E[23:12], E[11:0]]. The weight tests
// are taken in the order of the decoding algorithm:
//   1. wt(S) <= 3          -> E = [S, 0]
//   2. wt(S + b_k) <= 2    -> E = [S + b_k, I_k]      (I_k: only bit k set)
//   3. wt(SB) <= 3         -> E = [0, SB]
//   4. wt(SB + b_k) <= 2   -> E = [I_k, SB + b_k]
//   5. none of the above   -> found_o = 0, E = 0: the word must be resent.
// Within steps 2 and 4 the lowest k wins. For at most three errors exactly
// one test passes, so the order only decides words with four or more errors,
// which no test accepts. The caller supplies the outcomes of the weight
// comparisons; the candidate vectors are re-formed here from S and SB.
//
// Interface: syn_i, sb_i (12 bits), hit_s_i, hit_q_i (1 bit), hit_sb_i,
// hit_qb_i (12 bits, bit k for b_k) in; err_o (24 bits), found_o out.
// Combinational. The tests and their order are the published algorithm;
// step 4 forms SB + b_k, the only choice that decodes correctly.
module golay_error_select
  import golay_pkg::*;
(
  input  half_t     syn_i,
  input  half_t     sb_i,
  input  logic      hit_s_i,
  input  half_t     hit_sb_i,
  input  logic      hit_q_i,
  input  half_t     hit_qb_i,
  output codeword_t err_o,
  output logic      found_o
);

  // Lowest set bit of a hit mask, as a one-hot vector I_k (zero if none).
  // B * I_k is column k of B, so b_mult() of the one-hot vector gives b_k.
  half_t first_sb, first_qb;

  always_comb begin
    first_sb = hit_sb_i & (~hit_sb_i + half_t'(1));
    first_qb = hit_qb_i & (~hit_qb_i + half_t'(1));
    err_o    = '0;
    found_o  = 1'b1;
    if (hit_s_i)
      err_o = {syn_i, half_t'(0)};
    else if (hit_sb_i != '0)
      err_o = {syn_i ^ b_mult(first_sb), first_sb};
    else if (hit_q_i)
      err_o = {half_t'(0), sb_i};
    else if (hit_qb_i != '0)
      err_o = {first_qb, sb_i ^ b_mult(first_qb)};
    else
      found_o = 1'b0;
  end

endmodule
