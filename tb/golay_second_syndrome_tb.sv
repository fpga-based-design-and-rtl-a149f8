// golay_second_syndrome_tb - exhaustive check of SB = B*S.
// Every 12-bit S is compared with the XOR of reference columns; B*b_k must be
// I_k and B must be symmetric; for errors confined to the message half, SB
// must return that error pattern.
module golay_second_syndrome_tb;
  import golay_ref_pkg::*;
  logic [11:0] s, sb;
  int checks = 0, failures = 0;

  golay_second_syndrome dut (.syn_i(s), .sb_o(sb));

  task automatic check(input logic [11:0] exp, input string what);
    checks++;
    if (sb !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s S=%03h SB=%03h expected %03h", what, s, sb, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      s = 12'(v); #1;
      check(ref_bmult(s), "B*S");
    end
    // B is its own inverse: B * b_k = I_k. B is symmetric (checked on the
    // reference columns, on which the decoder's column/row use relies).
    for (int k = 0; k < 12; k++) begin
      s = ref_col(k); #1;
      check(12'(1) << k, "B*B = I");
      for (int r = 0; r < 12; r++) begin
        checks++;
        if (ref_col(k)[r] != ref_col(r)[k]) begin
          failures++;
          $display("FAIL B not symmetric at %0d,%0d", r, k);
        end
      end
    end
    for (int i = 0; i < 500; i++) begin
      automatic logic [11:0] e = rand_pattern($urandom_range(3, 1))[11:0];
      s = ref_syndrome({12'h000, e}); #1;
      check(e, "message-half errors");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
