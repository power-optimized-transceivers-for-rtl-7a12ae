// tb_enc_8b10b: checks the 8b/10b encoder against code words from the
// published code tables (taken by hand, independent of the RTL tables) and,
// over a long random character stream, the code's defining properties:
// running disparity confined to two values, no run of more than five equal
// bits, the rd_pos output, the comma appearing only in K28 words, and the
// hold behaviour of en and rd_clr. Latency: one clock.
//
// The 8b/10b code is the standard one the paper uses; the stimulus is this
// testbench's own.
module tb_enc_8b10b;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, en = 0, rd_clr = 0, kin = 0, rd_pos;
  initial #0.05 rst_n = 0;   // a falling edge: also resets the flops on divided clocks
  logic [7:0] din = 0;
  logic [9:0] dout;
  always #5 clk = ~clk;

  enc_8b10b dut (.clk, .rst_n, .en, .rd_clr, .din, .kin, .dout, .rd_pos);

  task automatic enc1(input logic [7:0] d, input logic k);
    @(negedge clk); din = d; kin = k; en = 1;
    @(negedge clk); en = 0;
  endtask

  task automatic expect_code(input logic [7:0] d, input logic k, input logic [9:0] code, input string name);
    enc1(d, k);
    checks++;
    if (dout !== code) begin
      failures++;
      $display("FAIL %s: got %b expected %b", name, dout, code);
    end
  endtask

  initial begin
    int cum, run, last_bit, n_comma;
    logic [19:0] two;
    logic [9:0]  prevw;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // golden words, starting from RD-
    expect_code(8'h00, 0, 10'b1001110100, "D0.0 RD-");   // stays RD-
    expect_code(8'hBC, 1, 10'b0011111010, "K28.5 RD-");  // -> RD+
    expect_code(8'h00, 0, 10'b0110001011, "D0.0 RD+");   // stays RD+
    expect_code(8'hBC, 1, 10'b1100000101, "K28.5 RD+");  // -> RD-
    expect_code(8'hB5, 0, 10'b1010101010, "D21.5");
    expect_code(8'h4A, 0, 10'b0101010101, "D10.2");
    expect_code(8'h63, 0, 10'b1100011100, "D3.3 RD-");
    expect_code(8'hFC, 1, 10'b0011111000, "K28.7 RD-");
    expect_code(8'hF1, 0, 10'b1000110111, "D17.7 RD- (A7)"); // -> RD+
    expect_code(8'h63, 0, 10'b1100010011, "D3.3 RD+");
    expect_code(8'hEB, 0, 10'b1101001000, "D11.7 RD+ (A7)"); // -> RD-
    expect_code(8'hFD, 1, 10'b1011101000, "K29.7 RD-");
    expect_code(8'h07, 0, 10'b1110001011, "D7.0 RD-");   // -> RD+
    expect_code(8'h07, 0, 10'b0001110100, "D7.0 RD+");   // -> RD-
    expect_code(8'hBC, 1, 10'b0011111010, "K28.5 RD-");  // -> RD+
    // en low: output and RD hold
    @(negedge clk); din = 8'h55; kin = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (dout !== 10'b0011111010 || rd_pos !== 1'b1) begin
      failures++; $display("FAIL: encoder did not hold while disabled");
    end
    // rd_clr: back to RD-
    @(negedge clk); rd_clr = 1; @(negedge clk); rd_clr = 0;
    expect_code(8'h00, 0, 10'b1001110100, "D0.0 after rd_clr");

    // random stream: properties
    cum = 0; run = 0; last_bit = -1; n_comma = 0; prevw = 10'b0011111000;
    for (int i = 0; i < 3000; i++) begin
      logic [7:0] d;
      logic       k;
      d = 8'($urandom);
      k = 1'b0;
      case ($urandom_range(0, 15))
        0: begin k = 1; d = {3'($urandom), 5'd28}; end
        1: begin k = 1; d = 8'hF7; end
        2: begin k = 1; d = 8'hFB; end
        3: begin k = 1; d = 8'hFE; end
        default: ;
      endcase
      enc1(d, k);
      cum += 2 * $countones(dout) - 10;
      checks++;
      if (!(cum == 0 || cum == 2)) begin
        failures++; $display("FAIL: running disparity %0d after %b", cum, dout);
        cum = 0;
      end
      checks++;
      if (rd_pos !== (cum == 2)) begin failures++; $display("FAIL: rd_pos"); end
      for (int b = 9; b >= 0; b--) begin
        if (dout[b] == last_bit) run++; else run = 1;
        last_bit = dout[b];
        if (run > 5) begin failures++; $display("FAIL: run of %0d at word %b", run, dout); end
      end
      checks++;
      // comma 0011111 / 1100000 only at bit 9 of K28 words, never astride
      two = {prevw, dout};
      for (int p = 1; p < 10; p++) begin
        logic [6:0] w7;
        w7 = two[19-p -: 7];
        if ((w7 == 7'b0011111 || w7 == 7'b1100000) && !(prevw[9:4] == 6'b001111 || prevw[9:4] == 6'b110000)) begin
          failures++; $display("FAIL: comma astride %b %b", prevw, dout);
        end
      end
      if (dout[9:3] == 7'b0011111 || dout[9:3] == 7'b1100000) n_comma++;
      prevw = dout;
    end
    checks++;
    if (n_comma == 0) begin failures++; $display("FAIL: no comma seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
