// tb_burst_xcvr_top: end-to-end test of the burst-mode transceiver at its
// default size (two lanes, 8-word preamble, 4-comma lock, 8-word loss of
// signal), transmitter looped back to receiver.
//
// The line model delays lane 0 by 3 and lane 1 by 28 bit times (skew that
// channel bonding must remove) and can invert a lane, flip one bit, or
// replace both lanes with a PRBS-7 stream. The recovered serial clocks are
// the transmit serial clock (an ideal, already-locked CDR). Random packets
// (1-12 words, some with K23.7 characters) are written at a client rate
// above the line rate, so back-to-back packets share a burst; some packets
// pause mid-way so that the transmitter must send fill. Received words are
// compared with a queue of the words written.
//
// Phases: clean traffic; bit slip on both lanes; crossed polarity on lane 1
// (corrected by rx_invert); one injected bit error (not scored, must be
// detected and recovered from); clean traffic again; PRBS test.
// Each mechanism is counted and must occur at least once. Rate and latency
// checks: one word per parallel clock in the data state, exactly
// PREAMBLE_WORDS preamble words per burst, and word alignment within the
// 80 bits of the preamble.
//
// The rates (6.25 Gb/s per lane, 625 MHz words), the three burst states, the
// shared-burst packets and the 80-bit alignment follow the paper; the line
// model, clocks and traffic are this testbench's own.
module tb_burst_xcvr_top;
  import xcvr_pkg::*;

  localparam int LANES = 2;
  localparam int PRE   = 8;

  int checks = 0, failures = 0;

  // ---------------- clocks ----------------
  logic clk_ser = 0, tx_clk = 0, rx_clk_core = 0, rx_clk = 0, rst_n = 1;
  initial #0.05 rst_n = 0;   // a falling edge: also resets the flops on divided clocks
  always #0.08 clk_ser = ~clk_ser;          // 6.25 GHz
  always #0.6  tx_clk = ~tx_clk;            // client faster than line
  always #0.75 rx_clk_core = ~rx_clk_core;
  always #0.7  rx_clk = ~rx_clk;

  // ---------------- DUT ----------------
  logic                  tx_valid, tx_ready, tx_last, tx_slip_en, rx_prbs_en, rx_ready;
  logic [15:0]           tx_data, rx_data;
  logic [1:0]            tx_k, rx_k, tx_sout, rx_sin, rx_invert;
  logic [1:0][3:0]       tx_slip, rx_offset;
  logic                  tx_pclk, rx_valid, rx_sop, rx_last, tx_fill, rx_deskew;
  burst_state_e          tx_state;
  logic [1:0][1:0]       rx_lane_state;
  logic [1:0]            rx_aligned, rx_code_err, rx_eop, rx_lane_full, prbs_locked, prbs_word_err;
  logic [1:0][4:0]       rx_lane_level;
  logic [4:0]            tx_fifo_level, rx_fifo_level;
  logic [1:0][15:0]      prbs_err_cnt;

  burst_xcvr_top dut (
    .rst_n, .tx_clk, .tx_valid, .tx_ready, .tx_data, .tx_k, .tx_last,
    .tx_clk_ser (clk_ser), .tx_pclk, .tx_sout, .tx_slip_en, .tx_slip,
    .rx_clk_ser ({clk_ser, clk_ser}), .rx_sin, .rx_invert, .rx_prbs_en,
    .rx_clk_core, .rx_clk, .rx_valid, .rx_ready, .rx_data, .rx_k, .rx_sop, .rx_last,
    .tx_state, .tx_fill, .rx_lane_state, .rx_aligned, .rx_offset, .rx_code_err,
    .rx_eop, .rx_deskew, .rx_lane_full, .tx_fifo_level, .rx_fifo_level,
    .rx_lane_level, .prbs_locked, .prbs_word_err, .prbs_err_cnt);

  // ---------------- line model ----------------
  localparam int SKEW0 = 3, SKEW1 = 28;
  logic [31:0] line0 = '0, line1 = '0;
  logic        inv1 = 0, flip1 = 0, prbs_mode = 0;
  logic [6:0]  prbs_s = 7'h5A;
  logic        prbs_bit, prbs_flip = 0;
  assign prbs_bit = prbs_s[6] ^ prbs_s[5];
  always @(posedge clk_ser) begin
    line0  <= {line0[30:0], tx_sout[0]};
    line1  <= {line1[30:0], tx_sout[1]};
    prbs_s <= {prbs_s[5:0], prbs_bit};
    if (prbs_mode) begin
      rx_sin <= {2{prbs_bit ^ prbs_flip}};
    end else begin
      rx_sin[0] <= line0[SKEW0];
      rx_sin[1] <= line1[SKEW1] ^ inv1 ^ flip1;
    end
  end

  // ---------------- scoreboard ----------------
  typedef struct packed { logic sop, last; logic [1:0] k; logic [15:0] d; } beat_t;
  beat_t exp_q[$];
  logic  score = 1;
  int    words_rx = 0, pkts_rx = 0, words_tx = 0, pkts_tx = 0;

  always @(posedge rx_clk) begin
    if (rst_n && rx_valid && rx_ready) begin
      beat_t e;
      if (score) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL: unexpected word %h", rx_data);
        end else begin
          e = exp_q.pop_front();
          if (e.d !== rx_data || e.k !== rx_k || e.sop !== rx_sop || e.last !== rx_last) begin
            failures++;
            $display("FAIL @%0t: got d=%h k=%b sop=%b last=%b exp d=%h k=%b sop=%b last=%b",
                     $time, rx_data, rx_k, rx_sop, rx_last, e.d, e.k, e.sop, e.last);
          end
        end
      end
      words_rx++;
      if (rx_last) pkts_rx++;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_preamble_cyc = 0, n_bursts = 0, n_data_cyc = 0, n_fill = 0, n_los = 0;
  int n_align = 0, n_offset_chg = 0, n_code_err = 0, n_deskew = 0, n_skew = 0;
  int n_rx_eop = 0, n_prbs_lock = 0;
  burst_state_e tx_state_q = ST_RESET;
  always @(posedge tx_pclk) begin
    if (rst_n) begin
      if (tx_state == ST_PREAMBLE) n_preamble_cyc++;
      if (tx_state == ST_DATA) n_data_cyc++;
      if (tx_state == ST_PREAMBLE && tx_state_q != ST_PREAMBLE) n_bursts++;
      if (tx_fill) n_fill++;
      tx_state_q <= tx_state;
    end
  end

  // per-lane receive observation on lane 0's parallel clock domain is enough
  // for counting; alignment latency is measured on lane 0 in its own clock
  logic [1:0][1:0] st_q = '0;
  logic [1:0]      al_q = '0;
  logic [1:0][3:0] off_q = '0;
  logic [1:0][3:0] last_off = '0;
  int              align_lat = 0, max_align_lat = 0;
  always @(posedge dut.lane_pclk[0]) begin
    if (rst_n) begin
      for (int i = 0; i < LANES; i++) begin
        if (rx_lane_state[i] == 2'(ST_RESET) && st_q[i] != 2'(ST_RESET)) n_los++;
        if (rx_aligned[i] && !al_q[i]) n_align++;
        if (rx_aligned[i] && !al_q[i]) begin
          if (rx_offset[i] != last_off[i]) n_offset_chg++;
          last_off[i] = rx_offset[i];
        end
        if (rx_code_err[i]) n_code_err++;
        if (rx_eop[i]) n_rx_eop++;
        if (prbs_locked[i] && rx_prbs_en) n_prbs_lock++;
      end
      // lane 0: cycles from leaving reset until aligned
      if (rx_lane_state[0] == 2'(ST_PREAMBLE) && !rx_aligned[0]) align_lat++;
      if (rx_aligned[0] && !al_q[0]) begin
        if (align_lat > max_align_lat) max_align_lat = align_lat;
        align_lat = 0;
      end
      if (rx_lane_state[0] == 2'(ST_RESET)) align_lat = 0;
      st_q  <= rx_lane_state;
      al_q  <= rx_aligned;
      off_q <= rx_offset;
    end
  end
  always @(posedge rx_clk_core) begin
    if (rst_n) begin
      if (rx_deskew) n_deskew++;
      // lanes written at different times: their write counters differ
      if (dut.u_bond.g_lane[0].u_fifo.wbin != dut.u_bond.g_lane[1].u_fifo.wbin) n_skew++;
    end
  end

  // ---------------- stimulus ----------------
  // words are driven on the falling client edge and taken on the rising one
  task automatic send_packet(input int len, input bit pause);
    for (int w = 0; w < len; w++) begin
      beat_t b;
      b.d    = 16'($urandom);
      b.k    = 2'b00;
      if ($urandom_range(0, 9) == 0) begin
        b.k[0] = 1'b1; b.d[7:0] = 8'hF7;      // K23.7 on lane 0
      end
      b.sop  = (w == 0);
      b.last = (w == len - 1);
      @(negedge tx_clk);
      while (!tx_ready) begin
        tx_valid = 1'b0;
        @(negedge tx_clk);
      end
      tx_valid = 1'b1;
      tx_data  = b.d;
      tx_k     = b.k;
      tx_last  = b.last;
      if (score) exp_q.push_back(b);
      words_tx++;
      if (pause && w == len / 2) begin
        @(negedge tx_clk);
        tx_valid = 1'b0;
        repeat (40) @(negedge tx_clk);
      end
    end
    @(negedge tx_clk);
    tx_valid = 1'b0;
    pkts_tx++;
  endtask

  task automatic traffic(input int npkts);
    for (int p = 0; p < npkts; p++) begin
      send_packet($urandom_range(1, 12), (p % 5) == 2);
      if ((p % 4) == 3) repeat (60) @(posedge tx_clk);   // burst ends
    end
  endtask

  task automatic wait_drain(input string what);
    int t = 0;
    while (exp_q.size() != 0 && t < 20000) begin
      @(posedge rx_clk);
      t++;
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %s: %0d words never arrived", what, exp_q.size());
    end
    repeat (200) @(posedge tx_clk);      // link goes dark, receivers reset
  endtask

  initial begin
    int err0;
    tx_valid = 0; tx_data = '0; tx_k = '0; tx_last = 0;
    tx_slip_en = 0; tx_slip = '0; rx_invert = '0; rx_prbs_en = 0; rx_ready = 1;
    rx_sin = '0;
    repeat (10) @(posedge tx_clk);
    rst_n = 1;
    repeat (10) @(posedge tx_clk);

    // 1. clean traffic with lane skew
    traffic(16);
    wait_drain("clean traffic");

    // 2. bit slip on both lanes: receivers must realign
    tx_slip_en = 1; tx_slip[0] = 4'd4; tx_slip[1] = 4'd7;
    traffic(8);
    wait_drain("bit slip");

    // 3. crossed polarity on lane 1, corrected by rx_invert
    inv1 = 1; rx_invert[1] = 1;
    traffic(8);
    wait_drain("polarity");
    inv1 = 0; rx_invert[1] = 0; tx_slip_en = 0;
    repeat (100) @(posedge tx_clk);

    // 4. one bit error on lane 1 inside a long packet (not scored)
    score = 0;
    fork
      send_packet(12, 0);
      begin
        wait (tx_state == ST_DATA);
        repeat (60) @(posedge clk_ser);
        @(negedge clk_ser) flip1 = 1;
        @(negedge clk_ser) flip1 = 0;
      end
    join
    send_packet(6, 0);
    repeat (400) @(posedge tx_clk);
    exp_q.delete();
    score = 1;

    // 5. clean traffic again: the link must have recovered
    traffic(8);
    wait_drain("after error");

    // 6. PRBS-7 test pattern on both lanes
    prbs_mode = 1;
    rx_prbs_en = 1;
    repeat (60) @(posedge dut.lane_pclk[0]);
    checks++;
    if (prbs_locked !== 2'b11) begin
      failures++;
      $display("FAIL: PRBS checkers not locked");
    end
    err0 = int'(prbs_err_cnt[0]);
    @(negedge clk_ser) prbs_flip = 1;
    @(negedge clk_ser) prbs_flip = 0;
    repeat (20) @(posedge dut.lane_pclk[0]);
    checks++;
    if (int'(prbs_err_cnt[0]) <= err0 || prbs_locked[0] !== 1'b1) begin
      failures++;
      $display("FAIL: PRBS bit error not counted (%0d -> %0d) or no relock", err0, prbs_err_cnt[0]);
    end
    rx_prbs_en = 0;
    prbs_mode = 0;

    // ---------------- mechanism and rate checks ----------------
    $display("bursts=%0d packets tx=%0d rx=%0d words tx=%0d rx=%0d", n_bursts, pkts_tx, pkts_rx, words_tx, words_rx);
    $display("fill=%0d los=%0d align=%0d realign=%0d code_err=%0d deskew=%0d skew=%0d rx_eop=%0d prbs_lock=%0d max_align_lat=%0d",
             n_fill, n_los, n_align, n_offset_chg, n_code_err, n_deskew, n_skew, n_rx_eop, n_prbs_lock, max_align_lat);
    check_cnt("bursts (preamble state)", n_bursts);
    check_cnt("packets sharing a burst", pkts_tx - n_bursts);
    check_cnt("fill characters", n_fill);
    check_cnt("loss of signal", n_los);
    check_cnt("alignment", n_align);
    check_cnt("realignment after bit slip", n_offset_chg);
    check_cnt("invalid code word", n_code_err);
    check_cnt("deskew discard", n_deskew);
    check_cnt("lane skew in bonding FIFOs", n_skew);
    check_cnt("end of packet", n_rx_eop);
    check_cnt("PRBS lock", n_prbs_lock);
    checks++;
    if (n_preamble_cyc != PRE * n_bursts) begin
      failures++;
      $display("FAIL: %0d preamble words for %0d bursts", n_preamble_cyc, n_bursts);
    end
    checks++;
    if (n_data_cyc != words_tx + pkts_tx + n_fill) begin
      failures++;
      $display("FAIL: data state %0d cycles, expected %0d words + %0d ends + %0d fills",
               n_data_cyc, words_tx, pkts_tx, n_fill);
    end
    checks++;
    if (max_align_lat > PRE) begin
      failures++;
      $display("FAIL: alignment took %0d words, more than the preamble", max_align_lat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check_cnt(input string what, input int n);
    checks++;
    if (n < 1) begin
      failures++;
      $display("FAIL: mechanism never happened: %s", what);
    end
  endfunction

  // watchdog
  initial begin
    repeat (400000) @(posedge tx_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
