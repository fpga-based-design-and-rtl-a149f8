// golay_weight12 - Hamming weight of a 12-bit vector as an adder tree.
//
// The vector is cut into four groups of three bits. A full adder counts the
// ones of each group (2-bit result, 0..3). Two adders combine the groups in
// pairs (3-bit results, 0..6) and a last adder forms the 4-bit weight (0..12).
// This is the published three-level structure of full adders, 3-bit adders
// and a 4-bit adder; the grouping of bits into adders is this design's.
//
// Interface: vec_i (12 bits) in, wt_o (4 bits) out. Combinational.
module golay_weight12
  import golay_pkg::*;
(
  input  half_t   vec_i,
  output weight_t wt_o
);

  logic [1:0] cnt3 [4];  // ones in bits 3g+2 .. 3g
  logic [2:0] cnt6 [2];  // ones in bits 6p+5 .. 6p

  for (genvar g = 0; g < 4; g++) begin : g_fa
    golay_full_adder u_fa (
      .a_i    (vec_i[3*g]),
      .b_i    (vec_i[3*g+1]),
      .c_i    (vec_i[3*g+2]),
      .sum_o  (cnt3[g][0]),
      .carry_o(cnt3[g][1])
    );
  end

  always_comb begin
    cnt6[0] = {1'b0, cnt3[0]} + {1'b0, cnt3[1]};
    cnt6[1] = {1'b0, cnt3[2]} + {1'b0, cnt3[3]};
    wt_o    = {1'b0, cnt6[0]} + {1'b0, cnt6[1]};
  end

endmodule
