// tb_dec_8b10b: checks the 8b/10b decoder. A random character stream (data
// and the allowed control characters) is encoded by the encoder and must
// come back unchanged, with K flags and without error flags. Then hand-made
// faults: words outside the code (all zeros, all ones, 111111xxxx) must set
// code_err; K28.5 sent twice in its RD- form must set disp_err on the second
// one; and while en is low the outputs hold. Latency: one clock.
//
// The 8b/10b code is the standard one the paper uses; the streams and error
// cases are this testbench's own.
module tb_dec_8b10b;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #0.05 rst_n = 0;   // a falling edge: also resets the flops on divided clocks
  always #5 clk = ~clk;

  logic       e_en = 0, e_k = 0, e_rd;
  logic [7:0] e_d = 0;
  logic [9:0] code;
  logic       d_en = 0, rd_load = 0, kout, code_err, disp_err;
  logic [9:0] d_in;
  logic [7:0] dout;
  logic       use_code = 1;
  logic [9:0] forced = 0;

  enc_8b10b u_enc (.clk, .rst_n, .en (e_en), .rd_clr (1'b0), .din (e_d), .kin (e_k),
                   .dout (code), .rd_pos (e_rd));
  assign d_in = use_code ? code : forced;
  dec_8b10b dut (.clk, .rst_n, .en (d_en), .rd_load, .rd_init (1'b0), .din (d_in),
                 .dout, .kout, .code_err, .disp_err);

  task automatic dec_forced(input logic [9:0] w);
    @(negedge clk); forced = w; d_en = 1;
    @(negedge clk); d_en = 0;
  endtask

  initial begin
    logic [7:0] qd[$];
    logic       qk[$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // encoder feeds decoder every cycle: decoder output lags the input by 2
    for (int i = 0; i < 3000 + 2; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        logic [7:0] xd;
        logic       xk;
        xd = qd.pop_front();
        xk = qk.pop_front();
        checks++;
        if (dout !== xd || kout !== xk || code_err || disp_err) begin
          failures++;
          $display("FAIL: decoded %h k=%b ce=%b de=%b, expected %h k=%b", dout, kout, code_err, disp_err, xd, xk);
        end
      end
      e_en = (i < 3000);
      d_en = (i >= 1);
      e_k  = 0;
      e_d  = 8'($urandom);
      case ($urandom_range(0, 11))
        0: begin e_k = 1; e_d = {3'($urandom), 5'd28}; end
        1: begin e_k = 1; e_d = 8'hF7; end
        2: begin e_k = 1; e_d = 8'hFB; end
        3: begin e_k = 1; e_d = 8'hFD; end
        4: begin e_k = 1; e_d = 8'hFE; end
        default: ;
      endcase
      if (i < 3000) begin qd.push_back(e_d); qk.push_back(e_k); end
    end
    @(negedge clk); e_en = 0; d_en = 0;
    // code errors
    use_code = 0;
    @(negedge clk); rd_load = 1; @(negedge clk); rd_load = 0;
    dec_forced(10'b0000000000);
    checks++; if (!code_err) begin failures++; $display("FAIL: all zeros not a code error"); end
    dec_forced(10'b1111111111);
    checks++; if (!code_err) begin failures++; $display("FAIL: all ones not a code error"); end
    dec_forced(10'b1111110101);
    checks++; if (!code_err) begin failures++; $display("FAIL: 111111 not a code error"); end
    // disparity error: K28.5 RD- twice
    @(negedge clk); rd_load = 1; @(negedge clk); rd_load = 0;
    dec_forced(10'b0011111010);
    checks++; if (code_err || disp_err || !kout || dout !== 8'hBC) begin failures++; $display("FAIL: K28.5 RD- not decoded"); end
    dec_forced(10'b0011111010);
    checks++; if (!disp_err) begin failures++; $display("FAIL: repeated K28.5 RD- not a disparity error"); end
    // K28.7 RD+ after rd_load and a RD+ word: no error, decoded
    @(negedge clk); rd_load = 1; @(negedge clk); rd_load = 0;
    dec_forced(10'b0011111010);    // -> RD+
    dec_forced(10'b1100000111);    // K28.7 RD+
    checks++; if (code_err || disp_err || !kout || dout !== 8'hFC) begin failures++; $display("FAIL: K28.7 RD+ not decoded"); end
    // hold while disabled
    @(negedge clk); forced = 10'b0000000000; d_en = 0;
    repeat (3) @(negedge clk);
    checks++; if (dout !== 8'hFC || code_err) begin failures++; $display("FAIL: decoder did not hold"); end
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
