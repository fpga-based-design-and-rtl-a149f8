// golay_decoder - pipelined extended Golay (24,12,8) decoder.
//
// Corrects every pattern of up to three bit errors in a 24-bit word and flags
// every four-error pattern for retransmission. It follows the syndrome
// algorithm: S = H*w; test wt(S) <= 3 and wt(S + b_k) <= 2; form the second
// syndrome SB = B*S; test wt(SB) <= 3 and wt(SB + b_k) <= 2; the first test
// that passes gives the error vector E, and the output is w XOR E.
//
// Pipeline (one word accepted per clock, no stalls):
//   stage 1  input register (rx_word, in_valid)
//   stage 2  syndrome S
//   stage 3  weights of S and the twelve S + b_k reduced to hit flags; SB
//   stage 4  weights of SB and SB + b_k, error selection, corrected word
// A word presented with in_valid before clock edge n appears on the outputs,
// with out_valid high, right after edge n+3 (latency 4 clocks counted from the
// edge that samples it). The received word travels alongside S and SB.
//
// Interface: clk, rst_n (active-low, synchronous), in_valid, rx_word in;
// out_valid, corrected (its message half is corrected[11:0]), err_vec (E)
// and retransmit out. Two assertions at the end guard the outputs.
// The decoding steps and the adder-tree weight units are the published
// design. That the decoder is clocked is published too; its stage
// boundaries, the reset and the valid flag are this design's choices.
module golay_decoder
  import golay_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  codeword_t rx_word,
  output logic      out_valid,
  output codeword_t corrected,
  output codeword_t err_vec,
  output logic      retransmit
);

  // ---------------- stage 1: input register ----------------
  logic      v1;
  codeword_t w1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      w1 <= '0;
    end else begin
      v1 <= in_valid;
      w1 <= rx_word;
    end
  end

  // ---------------- stage 2: syndrome ----------------
  half_t     syn_c;
  logic      v2;
  codeword_t w2;
  half_t     s2;

  golay_syndrome u_syn (.word_i(w1), .syn_o(syn_c));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v2 <= 1'b0;
      w2 <= '0;
      s2 <= '0;
    end else begin
      v2 <= v1;
      w2 <= w1;
      s2 <= syn_c;
    end
  end

  // ---------------- stage 3: first-syndrome tests, second syndrome ----------
  weight_t wt_s;
  half_t   sb_vec [K];
  weight_t wt_sb  [K];
  half_t   sb_c;
  half_t   hit_sb_c;

  golay_weight12        u_wt_s (.vec_i(s2), .wt_o(wt_s));
  golay_s_plus_b        u_spb  (.syn_i(s2), .sum_o(sb_vec));
  golay_second_syndrome u_sb   (.syn_i(s2), .sb_o(sb_c));

  for (genvar k = 0; k < K; k++) begin : g_wt_sb
    golay_weight12 u_wt (.vec_i(sb_vec[k]), .wt_o(wt_sb[k]));
    assign hit_sb_c[k] = (wt_sb[k] <= 4'd2);
  end

  logic      v3;
  codeword_t w3;
  half_t     s3, q3, hit_sb3;
  logic      hit_s3;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v3      <= 1'b0;
      w3      <= '0;
      s3      <= '0;
      q3      <= '0;
      hit_s3  <= 1'b0;
      hit_sb3 <= '0;
    end else begin
      v3      <= v2;
      w3      <= w2;
      s3      <= s2;
      q3      <= sb_c;
      hit_s3  <= (wt_s <= 4'd3);
      hit_sb3 <= hit_sb_c;
    end
  end

  // ---------------- stage 4: second-syndrome tests, selection ----------------
  weight_t   wt_q;
  half_t     qb_vec [K];
  weight_t   wt_qb  [K];
  half_t     hit_qb_c;
  codeword_t err_c;
  logic      found_c;

  golay_weight12 u_wt_q (.vec_i(q3), .wt_o(wt_q));
  golay_s_plus_b u_qpb  (.syn_i(q3), .sum_o(qb_vec));

  for (genvar k = 0; k < K; k++) begin : g_wt_qb
    golay_weight12 u_wt (.vec_i(qb_vec[k]), .wt_o(wt_qb[k]));
    assign hit_qb_c[k] = (wt_qb[k] <= 4'd2);
  end

  golay_error_select u_sel (
    .syn_i   (s3),
    .sb_i    (q3),
    .hit_s_i (hit_s3),
    .hit_sb_i(hit_sb3),
    .hit_q_i (wt_q <= 4'd3),
    .hit_qb_i(hit_qb_c),
    .err_o   (err_c),
    .found_o (found_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      corrected  <= '0;
      err_vec    <= '0;
      retransmit <= 1'b0;
    end else begin
      out_valid  <= v3;
      corrected  <= w3 ^ err_c;
      err_vec    <= err_c;
      retransmit <= v3 & ~found_c;
    end
  end

  // A retransmission request only accompanies a valid output word, and a
  // correction never removes more than three errors (the code's radius).
  a_retx_valid : assert property (@(posedge clk) disable iff (!rst_n)
                                  retransmit |-> out_valid);
  a_radius     : assert property (@(posedge clk) disable iff (!rst_n)
                                  (out_valid && !retransmit) |-> ($countones(err_vec) <= 3));

endmodule
