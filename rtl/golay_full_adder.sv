// golay_full_adder - one-bit full adder used as a 3-input ones counter.
//
// {carry_o, sum_o} is the number of ones among a_i, b_i and c_i (0..3).
// Combinational. Helper of golay_weight12.
module golay_full_adder (
  input  logic a_i,
  input  logic b_i,
  input  logic c_i,
  output logic sum_o,
  output logic carry_o
);

  always_comb begin
    sum_o   = a_i ^ b_i ^ c_i;
    carry_o = (a_i & b_i) | (a_i & c_i) | (b_i & c_i);
  end

endmodule
