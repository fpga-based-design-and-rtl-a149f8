// golay_top_tb - end-to-end test of the Golay codec with the channel modelled
// in the testbench.
//
// Each message is encoded by the top's encoder, a chosen error pattern is
// XORed onto tx_codeword (the channel) and the result is streamed into the
// decoder at one word per clock. The scoreboard checks the codeword against
// the reference equations, and for each decoded word the corrected word,
// the recovered message, the error vector, the retransmission flag and the
// four-clock latency. The error patterns are drawn so that every branch of
// the decoding algorithm is taken; each branch is counted and a branch that
// never occurred counts as a failure:
//   clean     no error                  (E = [S,0] with S = 0)
//   step2     1..3 errors, check half   (E = [S,0])
//   step3     1 message-half error + 0..2 check-half errors (E = [S+b_k, I_k])
//   step5     2..3 errors, message half (E = [0,SB])
//   step6     1 check-half error + 1..2 message-half errors (E = [I_k, SB+b_k])
//   retx      four errors               (retransmission requested)
// The top has no parameters, so this is also the full-size run.
module golay_top_tb;
  import golay_ref_pkg::*;

  localparam int LATENCY = 4;
  localparam int WORDS   = 3000;

  typedef enum int {CLEAN, STEP2, STEP3, STEP5, STEP6, RETX, NKIND} kind_t;

  logic        clk = 0, rst_n = 0;
  logic [11:0] tx_data = '0;
  logic [23:0] tx_codeword;
  logic        rx_valid = 0;
  logic [23:0] rx_word = '0;
  logic        dec_valid, dec_retransmit;
  logic [23:0] dec_codeword, dec_err_vec;

  int checks = 0, failures = 0, cycle = 0;
  int seen [NKIND];

  typedef struct {
    logic [11:0] msg;
    logic [23:0] cw;
    logic [23:0] e;
    kind_t       kind;
    int          t_in;
  } item_t;
  item_t q[$];
  item_t it;

  golay_top dut (
    .clk, .rst_n, .tx_data, .tx_codeword, .rx_valid, .rx_word,
    .dec_valid, .dec_codeword, .dec_err_vec, .dec_retransmit
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20 * WORDS) @(posedge clk);
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

  // Error pattern for a given branch: hi errors in [23:12], lo errors in [11:0].
  function automatic logic [23:0] pattern(input int hi, input int lo);
    logic [23:0] e = '0;
    while ($countones(e[23:12]) < hi) e[12 + $urandom_range(11, 0)] = 1'b1;
    while ($countones(e[11:0])  < lo) e[$urandom_range(11, 0)] = 1'b1;
    return e;
  endfunction

  function automatic logic [23:0] make_error(input kind_t k);
    case (k)
      CLEAN:   return '0;
      STEP2:   return pattern($urandom_range(3, 1), 0);
      STEP3:   return pattern($urandom_range(2, 0), 1);
      STEP5:   return pattern(0, $urandom_range(3, 2));
      STEP6:   return pattern(1, $urandom_range(2, 1));
      default: return rand_pattern(4);
    endcase
  endfunction

  always @(posedge clk) begin
    if (rst_n && dec_valid) begin
      if (q.size() == 0) check(0, "unexpected output");
      else begin
        it = q.pop_front();
        check(cycle - it.t_in == LATENCY, "latency");
        if (it.kind == RETX) begin
          check(dec_retransmit, "four errors not flagged");
          if (dec_retransmit) seen[RETX]++;
        end else begin
          check(!dec_retransmit, "retransmit on correctable word");
          check(dec_codeword == it.cw, "corrected codeword");
          check(dec_codeword[11:0] == it.msg, "recovered message");
          check(dec_err_vec == it.e, "error vector");
          if (!dec_retransmit && dec_err_vec == it.e) seen[it.kind]++;
        end
      end
    end
  end

  initial begin
    kind_t k;
    logic [11:0] m;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      k = kind_t'($urandom_range(NKIND - 1, 0));
      m = 12'($urandom);
      tx_data = m;
      #1;  // encoder is combinational
      check(tx_codeword == ref_encode(m), "encoder output");
      q.push_back('{msg: m, cw: tx_codeword, e: make_error(k), kind: k, t_in: cycle});
      rx_word  = tx_codeword ^ q[$].e;   // the channel
      rx_valid = 1'b1;
      if ($urandom_range(7, 0) == 0) begin  // gap in the stream
        @(negedge clk);
        rx_valid = 1'b0;
      end
    end
    @(negedge clk);
    rx_valid = 1'b0;
    repeat (LATENCY + 2) @(posedge clk);
    check(q.size() == 0, "every word decoded");
    for (int i = 0; i < NKIND; i++) begin
      $display("branch %s taken %0d times", kind_t'(i), seen[i]);
      check(seen[i] > 0, "branch never taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
