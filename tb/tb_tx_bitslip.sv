// tb_tx_bitslip: self-checking test of the transmit bit-slip stage.
// Random words go in, one per clock. With slip_en low the word must come out
// unchanged one clock later. With slip_en high and a slip of s bits, the
// output stream must be the input stream delayed by s bits (bit 9 is first on
// the line), and also one clock later. Every slip value 0..9 is tried. Words
// are driven on the falling edge and checked just after the rising edge.
//
// The paper's transmitter diagram names the bit slip stage with a bypass;
// the slip range and timing checked are this design's own.
module tb_tx_bitslip;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, slip_en = 0;
  initial #0.05 rst_n = 0;   // a falling edge: also resets the flops on divided clocks
  logic [3:0] slip = 0;
  logic [9:0] din = 0, dout;
  always #1 clk = ~clk;
  tx_bitslip #(.WIDTH(10)) dut (.clk, .rst_n, .slip_en, .slip, .din, .dout);

  logic [9:0] hist[$];   // words that went in, oldest first

  task automatic check_word(input logic [9:0] exp, input string what);
    checks++;
    if (dout !== exp) begin
      failures++; $display("FAIL: %s: dout=%b expected %b", what, dout, exp);
    end
  endtask

  initial begin
    logic [19:0] w;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // bypass: the word comes out one clock later
    for (int n = 0; n < 50; n++) begin
      @(negedge clk) din = 10'($urandom); hist.push_back(din);
      @(posedge clk); #0.1 check_word(hist[$], "bypass");
    end
    // every slip value
    for (int s = 0; s < 10; s++) begin
      @(negedge clk) begin slip_en = 1; slip = 4'(s); end
      for (int n = 0; n < 40; n++) begin
        @(negedge clk) din = 10'($urandom); hist.push_back(din);
        @(posedge clk); #0.1;
        // the line stream delayed by s bits: the last s bits of the previous
        // word then the first 10-s bits of this one
        w = {hist[$-1], hist[$]};
        check_word(w[19-(10-s) -: 10], $sformatf("slip %0d", s));
      end
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
