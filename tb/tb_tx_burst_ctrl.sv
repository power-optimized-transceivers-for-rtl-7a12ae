// tb_tx_burst_ctrl: self-checking test of the transmit burst state machine.
// A queue stands in for the transmit FIFO (first word fall through). Two
// encoders, as in the transceiver, take the controller's character outputs.
// A monitor rebuilds what each lane would send (zeros, preamble word or
// encoded character) from word_sel and the encoder output, and checks:
//  - every burst opens with exactly PREAMBLE_WORDS preamble words, all sent
//    at negative running disparity, and is followed by data at once;
//  - the data characters are the FIFO words in order, byte i on lane i, and
//    each packet is closed by K29.7 on every lane;
//  - packets already waiting share the burst (no second preamble); an empty
//    FIFO inside a packet gives K28.5 fill; an empty FIFO after K29.7 ends
//    the burst (zeros);
//  - the first preamble word follows the first FIFO word within 4 clocks.
// Stimulus: single packets, packets queued back to back, packets with a gap
// in the middle, and random traffic with K23.7 characters (K28.5, K28.7 and
// K29.7 are reserved for the link).
//
// The preamble, shared bursts and return to reset follow the paper; the
// preamble length (80 bits), the characters and the stimulus are this
// design's own.
module tb_tx_burst_ctrl
  import xcvr_pkg::*;
;
  localparam int LANES = 2, PRE = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #0.05 rst_n = 0;   // a falling edge: also resets the flops on divided clocks
  always #1 clk = ~clk;

  typedef struct packed { logic last; logic [1:0] k; logic [15:0] d; } fw_t;
  fw_t fifo[$];
  logic fifo_empty, fifo_pop, head_last, enc_en, enc_rd_clr, fill_pulse;
  logic [15:0] head_d, enc_d;
  logic [1:0]  head_k, enc_k, word_sel;
  burst_state_e state;
  assign fifo_empty = (fifo.size() == 0);
  assign head_d     = fifo_empty ? '0 : fifo[0].d;
  assign head_k     = fifo_empty ? '0 : fifo[0].k;
  assign head_last  = fifo_empty ? 1'b0 : fifo[0].last;
  always @(posedge clk) if (fifo_pop) void'(fifo.pop_front());

  tx_burst_ctrl #(.LANES(LANES), .PREAMBLE_WORDS(PRE)) dut (
    .clk, .rst_n, .fifo_empty, .head_d, .head_k, .head_last, .fifo_pop,
    .enc_en, .enc_rd_clr, .enc_d, .enc_k, .word_sel, .state, .fill_pulse);

  logic [9:0] code [LANES];
  logic [LANES-1:0] rd_pos;
  for (genvar i = 0; i < LANES; i++) begin : g_enc
    enc_8b10b u_enc (.clk, .rst_n, .en (enc_en), .rd_clr (enc_rd_clr),
                     .din (enc_d[8*i +: 8]), .kin (enc_k[i]), .dout (code[i]), .rd_pos (rd_pos[i]));
  end

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // expected characters per lane: {k, d}; K29.7 after each last word
  logic [8:0] exp_q [LANES][$];
  task automatic push_word(input logic [15:0] d, input logic [1:0] k, input logic last);
    fifo.push_back('{last: last, k: k, d: d});
    for (int i = 0; i < LANES; i++) begin
      exp_q[i].push_back({k[i], d[8*i +: 8]});
      if (last) exp_q[i].push_back({1'b1, K29_7});
    end
  endtask
  function automatic logic [15:0] rnd_d(output logic [1:0] k);
    logic [15:0] d = 16'($urandom);
    k = '0;
    return d;
  endfunction

  // ---------------- monitor ----------------
  // the encoder inputs taken at each enabled edge, to tell the characters
  logic [8:0] enc_in_q [LANES];
  int pre_run = 0, n_bursts = 0, n_fill = 0, n_pkts = 0, n_b2b = 0;
  logic in_burst = 0, after_eop = 0;
  int first_push_t = -1, lat_max = 0;
  always @(posedge clk) if (rst_n) begin
    logic [8:0] ch [LANES];
    // what the lanes carry this cycle
    case (word_sel)
      2'd1: begin
        if (pre_run == 0) begin
          n_bursts++;
          if (first_push_t >= 0) begin
            lat_max = ($time/2 - first_push_t > lat_max) ? int'($time/2) - first_push_t : lat_max;
            first_push_t = -1;
          end
        end
        pre_run++;
        chk(!in_burst || pre_run <= PRE, "preamble word inside a burst");
        chk(rd_pos == '0, "preamble word at RD+");
        in_burst = 1;
      end
      2'd2: begin
        chk(in_burst, "data outside a burst");
        if (pre_run != 0) chk(pre_run == PRE, $sformatf("preamble of %0d words", pre_run));
        pre_run = 0;
        for (int i = 0; i < LANES; i++) ch[i] = enc_in_q[i];
        if (ch[0] == {1'b1, K28_5}) begin
          // K28.5 is reserved for fill: the client sends none
          n_fill++;
          for (int i = 1; i < LANES; i++) chk(ch[i] == {1'b1, K28_5}, "fill on one lane only");
        end else begin
          if (after_eop) n_b2b++;
          after_eop = 0;
          for (int i = 0; i < LANES; i++) begin
            if (exp_q[i].size() == 0) chk(0, "unexpected character");
            else begin
              chk(ch[i] == exp_q[i][0], $sformatf("lane %0d: %h expected %h", i, ch[i], exp_q[i][0]));
              void'(exp_q[i].pop_front());
            end
          end
          if (ch[0] == {1'b1, K29_7}) begin n_pkts++; after_eop = 1; end
        end
      end
      default: begin
        chk(!in_burst || after_eop, "burst cut without K29.7");
        chk(pre_run == 0, "preamble not followed by data");
        in_burst = 0; after_eop = 0;
      end
    endcase
    if (enc_en) for (int i = 0; i < LANES; i++) enc_in_q[i] = {enc_k[i], enc_d[8*i +: 8]};
  end

  task automatic note_push();
    if (state == ST_RESET && first_push_t < 0) first_push_t = int'($time/2);
  endtask

  initial begin
    logic [1:0] k;
    logic [15:0] d;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (4) @(negedge clk);
    // 1. single packets, each its own burst
    for (int p = 0; p < 4; p++) begin
      @(negedge clk);
      note_push();
      for (int w = 0; w < 5; w++) begin d = rnd_d(k); push_word(d, k, w == 4); end
      repeat (40) @(negedge clk);
    end
    chk(n_bursts == 4, $sformatf("%0d bursts for 4 lone packets", n_bursts));
    // 2. three packets queued: one burst
    @(negedge clk);
    note_push();
    for (int p = 0; p < 3; p++)
      for (int w = 0; w < 3; w++) begin d = rnd_d(k); push_word(d, k, w == 2); end
    repeat (60) @(negedge clk);
    chk(n_bursts == 5, $sformatf("queued packets took %0d bursts", n_bursts - 4));
    // 3. a gap inside a packet: fill characters
    @(negedge clk);
    note_push();
    for (int w = 0; w < 3; w++) begin d = rnd_d(k); push_word(d, k, 0); end
    repeat (20) @(negedge clk);
    for (int w = 0; w < 3; w++) begin d = rnd_d(k); push_word(d, k, w == 2); end
    repeat (40) @(negedge clk);
    // 4. random traffic with K characters
    for (int p = 0; p < 30; p++) begin
      int n = $urandom_range(1, 10);
      @(negedge clk);
      note_push();
      for (int w = 0; w < n; w++) begin
        d = 16'($urandom);
        k = '0;
        if ($urandom_range(7) == 0) begin d[7:0] = 8'hF7; k[0] = 1; end   // K23.7
        push_word(d, k, w == n - 1);
      end
      repeat ($urandom_range(0, 30)) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    for (int i = 0; i < LANES; i++) chk(exp_q[i].size() == 0, $sformatf("lane %0d: %0d characters never sent", i, exp_q[i].size()));
    chk(n_fill > 0, "no fill characters");
    chk(n_b2b > 0, "no packets back to back");
    chk(lat_max > 0 && lat_max <= 4, $sformatf("preamble latency %0d clocks", lat_max));
    chk(state == ST_RESET && word_sel == 2'd0, "not back in reset with no traffic");
    $display("bursts=%0d packets=%0d fill=%0d back_to_back=%0d latency=%0d", n_bursts, n_pkts, n_fill, n_b2b, lat_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
