// tb_sipo_deser: checks the 1:10 deserializer driven by the word-clock
// divider. A random bit stream is shifted in; every word presented on the
// parallel side must be the last ten bits received, earliest bit in bit 9,
// and a new word must come every 10 serial clocks, stable across the
// following rising edge of the parallel clock.
//
// The 1:10 shift-register deserializer follows the paper; bit order and
// stimulus are this design's own.
module tb_sipo_deser;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, pclk, load, sin = 0;
  initial #0.05 rst_n = 0;   // a falling edge: also resets the flops on divided clocks
  logic [9:0] pdata;
  always #1 clk = ~clk;
  ser_clkdiv #(.RATIO(10)) u_div (.clk_ser (clk), .rst_n, .pclk, .load);
  sipo_deser #(.RATIO(10)) dut (.clk_ser (clk), .rst_n, .load, .sin, .pdata);

  logic [9:0] hist = 0;   // bits taken so far, newest in bit 0
  logic [9:0] expw = 0;
  int nload = 0, last_load = -1, n = 0;
  always @(negedge clk) sin = 1'($urandom);
  always @(posedge clk) if (rst_n) begin
    n++;
    hist <= {hist[8:0], sin};
    if (load) begin
      expw <= {hist[8:0], sin};
      if (last_load >= 0) begin
        checks++;
        if (n - last_load != 10) begin failures++; $display("FAIL: word spacing %0d", n - last_load); end
      end
      last_load = n;
      nload++;
    end
  end
  always @(posedge pclk) if (rst_n && nload > 1) begin
    checks++;
    if (pdata !== expw) begin failures++; $display("FAIL: word %b expected %b", pdata, expw); end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
