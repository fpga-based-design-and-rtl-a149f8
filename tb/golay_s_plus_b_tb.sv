// golay_s_plus_b_tb - checks the twelve S + b_k vectors.
// Random and corner syndromes are compared with S XOR reference column k.
// Directed: a single error in message bit k plus up to two check-bit errors
// must make vector k equal the check-half error pattern.
module golay_s_plus_b_tb;
  import golay_ref_pkg::*;
  logic [11:0] s;
  logic [11:0] sum [12];
  int checks = 0, failures = 0;

  golay_s_plus_b dut (.syn_i(s), .sum_o(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      s = (i == 0) ? 12'h000 : (i == 1) ? 12'hfff : 12'($urandom); #1;
      for (int k = 0; k < 12; k++) begin
        checks++;
        if (sum[k] !== (s ^ ref_col(k))) begin
          failures++;
          if (failures < 10) $display("FAIL S=%03h k=%0d got %03h", s, k, sum[k]);
        end
      end
    end
    for (int k = 0; k < 12; k++) begin
      automatic logic [11:0] ehi = rand_pattern($urandom_range(2, 0))[11:0];
      s = ref_syndrome({ehi, 12'(1) << k}); #1;
      checks++;
      if (sum[k] !== ehi) begin
        failures++;
        $display("FAIL directed k=%0d got %03h expected %03h", k, sum[k], ehi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
