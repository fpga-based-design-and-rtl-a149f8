// golay_encoder_tb - exhaustive check of the combinational encoder.
// For all 4096 messages: the codeword matches the reference equations, the
// message half is unchanged and the weight is 0, 8, 12, 16 or 24. Linearity is
// checked on random pairs (enc(a) ^ enc(b) == enc(a ^ b)).
module golay_encoder_tb;
  import golay_ref_pkg::*;
  logic [11:0] data;
  logic [23:0] cw;
  int checks = 0, failures = 0;

  golay_encoder dut (.data_i(data), .codeword_o(cw));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s data=%03h cw=%06h", what, data, cw);
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
    int wt;
    logic [23:0] ca, cb;
    for (int m = 0; m < 4096; m++) begin
      data = 12'(m);
      #1;
      wt = $countones(cw);
      check(cw == ref_encode(data), "reference");
      check(cw[11:0] == data, "systematic");
      check(wt == 0 || wt == 8 || wt == 12 || wt == 16 || wt == 24, "weight");
    end
    for (int i = 0; i < 200; i++) begin
      automatic logic [11:0] a = 12'($urandom), b = 12'($urandom);
      data = a; #1; ca = cw;
      data = b; #1; cb = cw;
      data = a ^ b; #1;
      check(cw == (ca ^ cb), "linearity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
