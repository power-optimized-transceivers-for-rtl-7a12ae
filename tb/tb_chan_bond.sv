// tb_chan_bond: self-checking test of the channel bonding block.
// Two lanes write tagged characters on their own clocks (1.00 and 1.03 ns
// half periods); the core side reads on a faster clock. The testbench builds
// packets, gives byte i of each word to lane i, and delays lane 1 by a number
// of words (skew). Bonded output words are compared with the expected list.
// Cases:
//  1. clean packets and bursts with 0..6 words of skew;
//  2. lane 1 cuts a packet short (end mark after 3 characters): the packet
//     ends after 3 words with 'last', the rest of lane 0 is discarded;
//  3. stale characters on lane 0 before a burst: discarded (start of burst);
//  4. lane 1 misses a packet's start: that packet is discarded (start of
//     packet), the next one is received;
//  5. lane 1 stops while lane 0 keeps writing: the relief rule discards lane 0
//     before its FIFO overflows, and the next burst is received in step;
//  6. out_ready low stalls the output and loses nothing.
// Rate: a long packet must come out at the lane word rate; latency: the first
// word must come out within a bounded time of the later lane's write.
//
// Skew removal with one FIFO per lane follows the paper; the deskew cases and
// clocks are this testbench's own.
module tb_chan_bond
  import xcvr_pkg::*;
;
  localparam int LANES = 2, AW = 4;
  int checks = 0, failures = 0;
  logic lclk0 = 0, lclk1 = 0, clk = 0, rst_n = 1;
  initial #0.05 rst_n = 0;   // a falling edge: also resets the flops on divided clocks
  always #1.00 lclk0 = ~lclk0;
  always #1.03 lclk1 = ~lclk1;
  always #0.8  clk   = ~clk;

  logic        lane_clk [LANES], lane_rst_n [LANES], lane_push [LANES];
  lane_word_t  lane_word [LANES];
  logic [LANES-1:0] lane_full;
  logic out_ready = 1, out_valid, out_sop, out_last, deskew_pulse;
  logic [15:0] out_d;
  logic [1:0]  out_k;
  logic [LANES-1:0][AW:0] lane_level;
  assign lane_clk[0] = lclk0;
  assign lane_clk[1] = lclk1;
  assign lane_rst_n[0] = rst_n;
  assign lane_rst_n[1] = rst_n;

  chan_bond #(.LANES(LANES), .ADDR_W(AW)) dut (.lane_clk, .lane_rst_n, .lane_push, .lane_word,
    .lane_full, .clk, .rst_n, .out_ready, .out_valid, .out_d, .out_k, .out_sop, .out_last,
    .deskew_pulse, .lane_level);

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // per-lane write queues; an entry with valid = 0 is an idle lane clock
  typedef struct packed { logic valid; lane_word_t w; } slot_t;
  slot_t lq0[$], lq1[$];
  int n_full_push = 0;
  always @(negedge lclk0) begin
    lane_push[0] = 0;
    if (lq0.size() > 0) begin
      slot_t s;
      s = lq0.pop_front();
      lane_push[0] = s.valid; lane_word[0] = s.w;
      if (s.valid && lane_full[0]) n_full_push++;
    end
  end
  always @(negedge lclk1) begin
    lane_push[1] = 0;
    if (lq1.size() > 0) begin
      slot_t s;
      s = lq1.pop_front();
      lane_push[1] = s.valid; lane_word[1] = s.w;
      if (s.valid && lane_full[1]) n_full_push++;
    end
  end

  typedef struct packed { logic [15:0] d; logic [1:0] k; logic sop, last; } ow_t;
  ow_t exp_q[$];
  int n_out = 0, n_deskew = 0, t_first = -1;
  always @(posedge clk) if (rst_n) begin
    n_deskew += int'(deskew_pulse);
    if (out_valid) begin
      ow_t g;
      g = '{d: out_d, k: out_k, sop: out_sop, last: out_last};
      n_out++;
      if (t_first < 0) t_first = int'($realtime * 10);
      if (exp_q.size() == 0) chk(0, $sformatf("unexpected word %h", g));
      else begin
        chk(g == exp_q[0], $sformatf("got %h expected %h", g, exp_q[0]));
        void'(exp_q.pop_front());
      end
    end
  end

  function automatic lane_word_t lw(input logic sob, sop, eop, input logic [7:0] d);
    lane_word_t w = '0;
    w.sob = sob; w.sop = sop; w.eop = eop; w.c.d = d;
    return w;
  endfunction
  task automatic idle(input int lane, input int n);
    repeat (n) if (lane == 0) lq0.push_back('0); else lq1.push_back('0);
  endtask
  task automatic put(input int lane, input lane_word_t w);
    if (lane == 0) lq0.push_back({1'b1, w}); else lq1.push_back({1'b1, w});
  endtask
  // a packet of n words; cut1 >= 0: lane 1 ends it after cut1 characters;
  // skip1 > 0: lane 1 misses the first skip1 characters
  task automatic packet(input int n, input logic sob, input int cut1 = -1, input int skip1 = 0,
                        input logic expect_out = 1);
    int n_out_exp = (cut1 >= 0) ? cut1 : n;
    for (int i = 0; i < n; i++) begin
      logic [15:0] d = 16'($urandom);
      put(0, lw(sob && i == 0, i == 0, 0, d[7:0]));
      if ((cut1 < 0 || i < cut1) && i >= skip1) put(1, lw(sob && i == 0, i == 0, 0, d[15:8]));
      if (expect_out && i < n_out_exp)
        exp_q.push_back('{d: d, k: '0, sop: (i == 0), last: (i == n_out_exp - 1)});
    end
    put(0, lw(0, 0, 1, K29_7));
    put(1, lw(0, 0, 1, K29_7));
  endtask
  task automatic drain(input string what);
    int t = 0;
    while ((exp_q.size() > 0 || lq0.size() > 0 || lq1.size() > 0) && t < 3000) begin
      @(posedge clk); t++;
    end
    repeat (40) @(posedge clk);
    chk(exp_q.size() == 0, $sformatf("%s: %0d words never came out", what, exp_q.size()));
    exp_q.delete();
  endtask

  initial begin
    int n0, t0, dsk0;
    lane_push[0] = 0; lane_push[1] = 0; lane_word[0] = '0; lane_word[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    // 1. clean bursts with skew; latency of the first word
    t0 = int'($realtime * 10);
    for (int b = 0; b < 6; b++) begin
      idle(1, b);
      packet($urandom_range(1, 8), 1);
      packet($urandom_range(1, 8), 0);
      drain($sformatf("clean, skew %0d", b));
    end
    chk(t_first > 0 && t_first - t0 < 200, $sformatf("first word after %0d ps x100", t_first - t0));
    // rate: a 200-word packet, lanes writing every lane clock
    n0 = n_out;
    packet(200, 1);
    t0 = int'($realtime);
    repeat (100) @(posedge lclk1);
    chk(n_out - n0 >= 95, $sformatf("%0d words in 100 lane clocks", n_out - n0));
    drain("rate");
    // 2. lane 1 cuts a packet short
    packet(8, 1, 3);
    packet(4, 0);
    drain("cut packet");
    // 3. stale characters on lane 0 before a burst
    dsk0 = n_deskew;
    put(0, lw(0, 0, 0, 8'h11));
    put(0, lw(0, 0, 0, 8'h22));
    packet(5, 1);
    drain("stale lane");
    chk(n_deskew - dsk0 >= 2, "stale characters not discarded");
    // 4. lane 1 misses a packet start
    packet(6, 1, -1, 2, 0);
    packet(5, 0);
    drain("missed start");
    // 5. lane 1 silent while lane 0 writes 40 characters
    for (int i = 0; i < 40; i++) put(0, lw(i == 0, i == 0, 0, 8'(i)));
    idle(1, 60);
    packet(5, 1);
    drain("stopped lane");
    chk(n_full_push == 0, $sformatf("%0d writes into a full lane FIFO", n_full_push));
    // 6. output stall
    fork
      begin
        packet(30, 1);
        drain("stall");
      end
      begin
        repeat (10) @(negedge clk);
        for (int i = 0; i < 60; i++) @(negedge clk) out_ready = $urandom_range(1);
        @(negedge clk) out_ready = 1;
      end
    join
    chk(n_deskew > 0, "no deskew discards");
    $display("words=%0d deskew=%0d", n_out, n_deskew);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
