// golay_syndrome_tb - checks the syndrome network.
// Codewords give S = 0; a single error in check bit 12+r gives S = I_r; a
// single error in message bit k gives column k of B; random words are compared
// with the reference syndrome.
module golay_syndrome_tb;
  import golay_ref_pkg::*;
  logic [23:0] w;
  logic [11:0] s;
  int checks = 0, failures = 0;

  golay_syndrome dut (.word_i(w), .syn_o(s));

  task automatic check(input logic [11:0] exp, input string what);
    checks++;
    if (s !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s w=%06h S=%03h expected %03h", what, w, s, exp);
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
    for (int i = 0; i < 300; i++) begin
      w = ref_encode(12'($urandom)); #1;
      check('0, "codeword");
    end
    for (int r = 0; r < 12; r++) begin
      w = 24'(1) << (12 + r); #1;
      check(12'(1) << r, "check-bit error");
    end
    for (int k = 0; k < 12; k++) begin
      w = 24'(1) << k; #1;
      check(ref_col(k), "message-bit error");
    end
    for (int i = 0; i < 2000; i++) begin
      w = 24'($urandom); #1;
      check(ref_syndrome(w), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
