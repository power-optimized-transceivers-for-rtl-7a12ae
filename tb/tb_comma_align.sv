// tb_comma_align: self-checking test of the word aligner.
// An encoder instance makes bursts of 8 K28.7 preamble words (RD-) followed by
// random data characters. The testbench shifts this stream by a random number
// of bits (0..9) before it reaches the aligner, and picks a new shift for each
// burst, with a restart pulse in between. Checks:
//  - aligned rises after LOCK_COMMAS commas at one offset, within a bounded
//    number of words (latency) and with the offset equal to the shift;
//  - once aligned, every output word equals the encoded word at one fixed lag;
//  - restart drops aligned at once; en low stops any new lock.
//
// Alignment on the preamble within 80 bits (4 commas) follows the paper; the
// shifts and data are this testbench's own.
module tb_comma_align
  import xcvr_pkg::*;
;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #0.05 rst_n = 0;   // a falling edge: also resets the flops on divided clocks
  always #1 clk = ~clk;

  // stream source
  logic       enc_en = 0, rd_clr = 0, kin = 0, rd_pos;
  logic [7:0] din8 = 0;
  logic [9:0] code;
  enc_8b10b u_enc (.clk, .rst_n, .en (enc_en), .rd_clr, .din (din8), .kin, .dout (code), .rd_pos);

  // line shift
  logic [9:0] code_q = 0, line;
  int unsigned shift = 0;
  always @(posedge clk) code_q <= code;
  assign line = 10'({code_q, code} >> shift);   // the stream delayed by shift bits

  logic       en = 0, restart = 0, aligned;
  logic [9:0] dout;
  logic [3:0] offset;
  comma_align #(.LOCK_COMMAS(4)) dut (.clk, .rst_n, .en, .restart, .din (line), .dout, .aligned, .offset);

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // history of encoder output words, one per clock
  logic [9:0] hist[$];
  always @(posedge clk) if (rst_n) #0.05 hist.push_back(code);

  task automatic send(input logic k, input logic [7:0] d, input logic clr);
    @(negedge clk) begin enc_en = 1; kin = k; din8 = d; rd_clr = clr; end
  endtask

  int lag = -1;
  initial begin
    int lock_words, first_pre, idx;
    repeat (2) @(posedge clk);
    @(negedge clk) begin rst_n = 1; en = 1; end
    for (int b = 0; b < 12; b++) begin
      shift = (b == 0) ? 3 : $urandom_range(9);
      // restart between bursts
      @(negedge clk) restart = 1;
      @(posedge clk); #0.1 chk(!aligned, "aligned during restart");
      @(negedge clk) restart = 0;
      send(1, K28_7, 1);
      first_pre = hist.size();
      lock_words = -1;
      for (int n = 0; n < 8 + 60; n++) begin
        if (n < 7) send(1, K28_7, 0);
        else send(0, 8'($urandom), 0);
        #1.1;
        if (aligned && lock_words < 0) begin
          lock_words = n + 1;
          chk(offset == 4'(shift), $sformatf("burst %0d: offset %0d for shift %0d", b, offset, shift));
        end
        if (aligned) begin
          idx = hist.size() - 1;
          if (lag < 0 && dout != PREAMBLE_NEG) begin
            // the lag is found on the first data word (preamble words all match)
            for (int l = 4; l >= 0; l--) if (hist[idx - l] == dout) lag = l;
            chk(lag >= 0, "aligned output matches no encoded word");
          end else if (lag >= 0) begin
            chk(dout == hist[idx - lag], $sformatf("burst %0d word %0d: %b expected %b",
                b, n, dout, hist[idx - lag]));
          end
        end
      end
      // 4 commas plus the pipeline: lock well inside the 8-word preamble
      chk(lock_words > 0 && lock_words <= 8, $sformatf("burst %0d: lock after %0d words", b, lock_words));
    end
    // en low: no lock on a fresh preamble
    @(negedge clk) begin restart = 1; en = 0; end
    @(negedge clk) restart = 0;
    for (int n = 0; n < 12; n++) send(1, K28_7, n == 0);
    #0.6 chk(!aligned, "locked with en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
