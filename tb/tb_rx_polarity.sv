// tb_rx_polarity: self-checking test of the receive polarity stage.
// Random words go in, one per clock, with the invert control changing at
// random. Each output word must be the input word, inverted when invert was
// high, exactly one clock later (one word per clock, no gaps).
//
// The paper's receiver diagram names the polarity block; what it is checked
// for is this design's reading of it.
module tb_rx_polarity;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, invert = 0;
  initial #0.05 rst_n = 0;   // a falling edge: also resets the flops on divided clocks
  logic [9:0] din = 0, dout;
  always #1 clk = ~clk;
  rx_polarity #(.WIDTH(10)) dut (.clk, .rst_n, .invert, .din, .dout);

  initial begin
    logic [9:0] exp;
    int n_inv = 0;
    repeat (2) @(posedge clk);
    checks++;
    if (dout !== '0) begin failures++; $display("FAIL: reset value %b", dout); end
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk) begin
        din = 10'($urandom);
        invert = ($urandom_range(3) == 0);
        exp = invert ? ~din : din;
        n_inv += int'(invert);
      end
      @(posedge clk); #0.1;
      checks++;
      if (dout !== exp) begin
        failures++; $display("FAIL: word %0d invert=%b dout=%b expected %b", n, invert, dout, exp);
      end
    end
    checks++;
    if (n_inv == 0) begin failures++; $display("FAIL: invert never used"); end
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
