// tb_async_fifo: checks the dual-clock FIFO with unrelated write (7 ns) and
// read (5.3 ns, then 13 ns) clocks and random push/pop. Every popped word
// must be the next pushed word; the FIFO must report full after DEPTH pushes
// with no pops and empty after draining; levels must stay within 0..DEPTH.
//
// The FIFO's use follows the paper's clock-compensation FIFOs; depths, clocks
// and stimulus are this testbench's own.
module tb_async_fifo;
  localparam int W = 12, AW = 4, DEPTH = 16;
  int checks = 0, failures = 0;
  logic wclk = 0, rclk = 0, rst_n = 1;
  initial #0.05 rst_n = 0;   // a falling edge: also resets the flops on divided clocks
  logic winc = 0, rinc = 0, wfull, rempty;
  logic [W-1:0] wdata = 0, rdata;
  logic [AW:0] wlevel, rlevel;
  realtime rhalf = 2.65;
  always #3.5 wclk = ~wclk;
  always #(rhalf) rclk = ~rclk;

  async_fifo #(.WIDTH(W), .ADDR_W(AW)) dut (.wclk, .wrst_n (rst_n), .winc, .wdata, .wfull, .wlevel,
                                           .rclk, .rrst_n (rst_n), .rinc, .rdata, .rempty, .rlevel);

  logic [W-1:0] q[$];
  int n_rd = 0, n_wr = 0;
  bit run_w = 0, run_r = 0;
  int wprob = 50, rprob = 50;

  // writer: drive on the falling edge, the FIFO takes it on the rising one
  always @(negedge wclk) begin
    if (winc) begin q.push_back(wdata); n_wr++; end
    // wfull only changes on the rising edge, so it is the value the FIFO sees
    winc  = run_w && ($urandom_range(0, 99) < wprob) && !wfull;
    wdata = W'($urandom);
  end

  always @(posedge rclk) begin
    if (rinc && !rempty) begin
      checks++;
      if (q.size() == 0 || rdata !== q[0]) begin
        failures++; $display("FAIL: read %h expected %h", rdata, q.size() ? q[0] : '0);
      end
      if (q.size()) void'(q.pop_front());
      n_rd++;
    end
  end
  always @(negedge rclk) rinc = run_r && ($urandom_range(0, 99) < rprob) && !rempty;

  initial begin
    repeat (3) @(posedge wclk);
    rst_n = 1;
    // fill with no reads: full after DEPTH words
    run_w = 1; wprob = 100;
    repeat (40) @(posedge wclk);
    checks++;
    if (!wfull || q.size() != DEPTH || wlevel != DEPTH) begin
      failures++; $display("FAIL: not full after %0d writes (level %0d)", q.size(), wlevel);
    end
    run_w = 0;
    run_r = 1; rprob = 100;
    repeat (40) @(posedge rclk);
    checks++;
    if (!rempty || q.size() != 0 || rlevel != 0) begin
      failures++; $display("FAIL: not empty after draining (%0d left)", q.size());
    end
    // random traffic, fast reader then slow reader
    run_w = 1; wprob = 60; rprob = 70;
    repeat (3000) @(posedge wclk);
    rhalf = 6.5;
    repeat (3000) @(posedge wclk);
    run_w = 0; rprob = 100;
    repeat (100) @(posedge rclk);
    checks++;
    if (q.size() != 0 || n_rd != n_wr) begin
      failures++; $display("FAIL: %0d written, %0d read", n_wr, n_rd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge rclk) if (rst_n) begin
    if (rlevel > DEPTH) begin failures++; $display("FAIL: rlevel %0d", rlevel); end
  end

  initial begin
    repeat (100000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
