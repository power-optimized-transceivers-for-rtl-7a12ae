// tb_ser_clkdiv: checks the word-clock divider: pclk has a period of RATIO
// serial clocks with RATIO/2 high, and load is high for exactly one serial
// clock per word, RATIO/2 serial clocks after each pclk rising edge
// (the edge where the shift register exchanges a word).
//
// The divide-by-10 from the 6.25 GHz serial clock to 625 MHz follows the
// paper; the load position is this design's own.
module tb_ser_clkdiv;
  localparam int RATIO = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, pclk, load;
  initial #0.05 rst_n = 0;   // a falling edge: also resets the flops on divided clocks
  always #1 clk = ~clk;
  ser_clkdiv #(.RATIO(RATIO)) dut (.clk_ser (clk), .rst_n, .pclk, .load);

  initial begin
    int n = 0, last_rise = -1, high = 0, since_rise = 0;
    logic pclk_q = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (400) begin
      @(posedge clk);
      #0.1;
      n++;
      if (pclk && !pclk_q) begin
        if (last_rise >= 0) begin
          checks++;
          if (n - last_rise != RATIO || high != RATIO / 2) begin
            failures++; $display("FAIL: pclk period %0d high %0d", n - last_rise, high);
          end
        end
        last_rise = n; high = 0; since_rise = 0;
      end
      if (pclk) high++;
      // load is sampled by the next serial edge: it must be high on the
      // edge RATIO/2 serial clocks after the pclk rise
      if (last_rise >= 0) begin
        checks++;
        if (load !== (since_rise == RATIO / 2 - 1)) begin
          failures++; $display("FAIL: load=%b at %0d clocks after the pclk rise", load, since_rise);
        end
      end
      since_rise++;
      pclk_q = pclk;
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
