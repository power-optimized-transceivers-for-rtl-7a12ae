// tb_piso_ser: checks the 10:1 serializer driven by the word-clock divider.
// Random words are offered on the parallel clock; the serial output must
// carry each word bit 9 first, one bit per serial clock, words back to back
// (one word per 10 serial clocks: 6.25 Gb/s from a 625 MHz word clock).
//
// The 10:1 shift-register serializer follows the paper; bit order and
// stimulus are this design's own.
module tb_piso_ser;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, pclk, load, sout;
  initial #0.05 rst_n = 0;   // a falling edge: also resets the flops on divided clocks
  logic [9:0] pdata = 0;
  always #1 clk = ~clk;
  ser_clkdiv #(.RATIO(10)) u_div (.clk_ser (clk), .rst_n, .pclk, .load);
  piso_ser #(.RATIO(10)) dut (.clk_ser (clk), .rst_n, .load, .pdata, .sout);

  logic [9:0] words[$];
  always @(posedge pclk) if (rst_n) begin
    pdata <= 10'($urandom);
  end
  // record the word the serializer takes
  always @(posedge clk) if (rst_n && load) words.push_back(pdata);

  // sample the line one step after every serial edge from the first load on
  logic bits[$];
  always @(posedge clk) if (rst_n && (load || bits.size() > 0)) #0.1 bits.push_back(sout);

  initial begin
    logic [9:0] w;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (words.size() >= 201);
    #0.5;
    for (int k = 0; k < 200; k++) begin
      w = words[k];
      for (int b = 9; b >= 0; b--) begin
        checks++;
        if (bits[10*k + 9 - b] !== w[b]) begin
          failures++; $display("FAIL: word %0d bit %0d: %b, expected %b", k, b, bits[10*k+9-b], w[b]);
        end
      end
    end
    // rate: one word per RATIO serial clocks
    checks++;
    if (bits.size() < 2000 || bits.size() > 2010) begin
      failures++; $display("FAIL: %0d bits for 201 words", bits.size());
    end
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
