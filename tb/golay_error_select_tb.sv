// golay_error_select_tb - checks the error-vector selection.
// The weight tests are evaluated here from reference syndromes of known error
// patterns: for up to three errors the selected E must equal the injected
// pattern, for four errors found_o must be low. Directed cases check the
// priority between tests and the lowest-index rule.
module golay_error_select_tb;
  import golay_ref_pkg::*;
  logic [11:0] s, sb, hit_sb, hit_qb;
  logic        hit_s, hit_q;
  logic [23:0] err;
  logic        found;
  int checks = 0, failures = 0;

  golay_error_select dut (
    .syn_i(s), .sb_i(sb), .hit_s_i(hit_s), .hit_sb_i(hit_sb),
    .hit_q_i(hit_q), .hit_qb_i(hit_qb), .err_o(err), .found_o(found)
  );

  task automatic apply(input logic [23:0] e);
    s  = ref_syndrome(e);
    sb = ref_bmult(s);
    hit_s = $countones(s) <= 3;
    hit_q = $countones(sb) <= 3;
    for (int k = 0; k < 12; k++) begin
      hit_sb[k] = $countones(s ^ ref_col(k)) <= 2;
      hit_qb[k] = $countones(sb ^ ref_col(k)) <= 2;
    end
    #1;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s S=%03h SB=%03h E=%06h found=%0b", what, s, sb, err, found);
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
    for (int i = 0; i < 3000; i++) begin
      automatic logic [23:0] e = rand_pattern(i % 4);
      apply(e);
      check(found && err == e, "correctable");
    end
    for (int i = 0; i < 500; i++) begin
      apply(rand_pattern(4));
      check(!found && err == '0, "four errors");
    end
    // priority: step 2 wins over the others
    s = 12'h013; sb = 12'h800; hit_s = 1; hit_q = 1; hit_sb = 12'h0f0; hit_qb = 12'h00f; #1;
    check(found && err == {12'h013, 12'h000}, "priority S");
    // lowest k of step 3
    hit_s = 0; #1;
    check(found && err == {12'h013 ^ ref_col(4), 12'h010}, "priority S+b lowest k");
    // step 5 before step 6
    hit_sb = '0; #1;
    check(found && err == {12'h000, 12'h800}, "priority SB");
    hit_q = 0; #1;
    check(found && err == {12'h001, 12'h800 ^ ref_col(0)}, "SB+b lowest k");
    hit_qb = '0; #1;
    check(!found && err == '0, "retransmit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
