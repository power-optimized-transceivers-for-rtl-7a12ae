// tb_prbs_check: self-checking test of the PRBS-7 word checker.
// The testbench makes a PRBS-7 (x^7 + x^6 + 1) bit stream, 10 bits per word
// with the oldest bit in bit 9, and feeds it to the checker. It checks:
// lock after LOCK_WORDS good words (latency), no errors on a clean stream,
// that every single injected bit flip gives one or two bad words and drops
// lock, that an all-zero line never locks, and that en low freezes the state.
//
// The paper's receiver diagram names a PRBS checker; the PRBS-7 pattern and
// the error cases are this design's own.
module tb_prbs_check;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, en = 0;
  initial #0.05 rst_n = 0;   // a falling edge: also resets the flops on divided clocks
  logic [9:0] din = 0;
  logic locked, word_err;
  logic [15:0] err_cnt;
  always #1 clk = ~clk;
  prbs_check #(.WIDTH(10), .LOCK_WORDS(8)) dut (.clk, .rst_n, .en, .din, .locked, .word_err, .err_cnt);

  logic [6:0] lfsr = 7'h5A;   // [0] newest bit
  function automatic logic [9:0] next_word();
    logic [9:0] w;
    for (int b = 9; b >= 0; b--) begin
      w[b] = lfsr[6] ^ lfsr[5];
      lfsr = {lfsr[5:0], w[b]};
    end
    return w;
  endfunction

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int lock_at, bad_words;
    logic [15:0] c0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // lock latency
    lock_at = -1;
    for (int n = 0; n < 30; n++) begin
      @(negedge clk) begin en = 1; din = next_word(); end
      @(posedge clk); #0.1;
      if (locked && lock_at < 0) lock_at = n;
    end
    // the first word has no history yet and may count as bad
    chk(lock_at >= 7 && lock_at <= 9, $sformatf("lock after %0d words", lock_at + 1));
    c0 = err_cnt;
    chk(c0 <= 1, $sformatf("%0d errors while locking", c0));
    // clean stream
    for (int n = 0; n < 500; n++) begin
      @(negedge clk) din = next_word();
      @(posedge clk); #0.1;
      chk(!word_err && locked, $sformatf("clean word %0d flagged", n));
    end
    chk(err_cnt == c0, "error count moved on a clean stream");
    // single bit flips, far apart
    for (int f = 0; f < 20; f++) begin
      c0 = err_cnt;
      bad_words = 0;
      @(negedge clk) din = next_word() ^ (10'd1 << $urandom_range(9));
      for (int n = 0; n < 12; n++) begin
        @(posedge clk); #0.1;
        bad_words += int'(word_err);
        if (n == 0) chk(!locked, "lock kept after a bit error");
        @(negedge clk) din = next_word();
      end
      chk(bad_words >= 1 && bad_words <= 2, $sformatf("flip %0d gave %0d bad words", f, bad_words));
      chk(err_cnt - c0 == 16'(bad_words), "error count differs from bad words");
      chk(locked, "no relock after a bit error");
    end
    // en low: nothing moves, even on garbage
    c0 = err_cnt;
    for (int n = 0; n < 20; n++) begin
      @(negedge clk) begin en = 0; din = 10'($urandom); end
      @(posedge clk); #0.1;
    end
    chk(err_cnt == c0 && locked, "state moved with en low");
    // all-zero line: every word is an error, never locked
    for (int n = 0; n < 30; n++) begin
      @(negedge clk) begin en = 1; din = '0; end
      @(posedge clk); #0.1;
      chk(word_err && !locked, "all-zero word accepted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
