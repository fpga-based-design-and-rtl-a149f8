// golay_weight12_tb - exhaustive check of the 12-bit weight adder tree.
// All 4096 input vectors are applied and the result compared with $countones.
module golay_weight12_tb;
  logic [11:0] vec;
  logic [3:0]  wt;
  int checks = 0, failures = 0;

  golay_weight12 dut (.vec_i(vec), .wt_o(wt));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      vec = 12'(v);
      #1;
      checks++;
      if (wt != 4'($countones(vec))) begin
        failures++;
        if (failures < 10) $display("FAIL vec=%03h wt=%0d expected %0d", vec, wt, $countones(vec));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
