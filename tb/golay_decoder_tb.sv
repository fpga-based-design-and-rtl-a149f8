// golay_decoder_tb - checks the pipelined decoder.
// Words are streamed back to back (one per clock, with occasional idle
// cycles): every single-, double- and triple-error pattern on random
// codewords, error-free words and random four-error words. A scoreboard
// queue holds what each word must decode to; out_valid must appear exactly
// four clocks after the word was presented, in order. Reset is applied in
// the middle of a stream and must clear out_valid within one clock.
module golay_decoder_tb;
  import golay_ref_pkg::*;

  localparam int LATENCY = 4;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  logic [23:0] rx_word = '0;
  logic        out_valid, retransmit;
  logic [23:0] corrected, err_vec;
  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct {
    logic [23:0] cw;
    logic [23:0] e;
    bit          bad;
    int          t_in;
  } item_t;
  item_t q[$];

  golay_decoder dut (
    .clk, .rst_n, .in_valid, .rx_word,
    .out_valid, .corrected, .err_vec, .retransmit
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // Output monitor / scoreboard.
  item_t it;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (q.size() == 0) check(0, "unexpected output");
      else begin
        it = q.pop_front();
        check(cycle - it.t_in == LATENCY, $sformatf("latency %0d", cycle - it.t_in));
        if (it.bad) check(retransmit, "four errors not flagged");
        else begin
          check(!retransmit, "retransmit on correctable word");
          check(corrected == it.cw, $sformatf("corrected word %06h exp %06h e %06h", corrected, it.cw, it.e));
          check(err_vec == it.e, "error vector");
        end
      end
    end
  end

  task automatic send(input logic [23:0] e, input bit bad);
    @(negedge clk);
    q.push_back('{cw: ref_encode(12'($urandom)), e: e, bad: bad, t_in: cycle});
    // t_in: clock edges so far; the next edge samples the word
    rx_word  = q[$].cw ^ e;
    in_valid = 1'b1;
    if ($urandom_range(9, 0) == 0) begin  // idle cycle
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 20; i++) send('0, 0);
    for (int a = 0; a < 24; a++) begin
      send(24'(1) << a, 0);
      for (int b = a + 1; b < 24; b++) begin
        send((24'(1) << a) | (24'(1) << b), 0);
        for (int c = b + 1; c < 24; c++)
          send((24'(1) << a) | (24'(1) << b) | (24'(1) << c), 0);
      end
    end
    for (int i = 0; i < 500; i++) send(rand_pattern(4), 1);
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY + 2) @(posedge clk);
    check(q.size() == 0, "all words returned");
    // reset in the middle of a stream
    @(negedge clk);
    rx_word = 24'h123456; in_valid = 1;
    repeat (2) @(negedge clk);
    rst_n = 0; in_valid = 0; q.delete();
    @(negedge clk);
    check(!out_valid, "reset clears out_valid");
    repeat (LATENCY) @(negedge clk);
    check(!out_valid, "pipeline empty after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
