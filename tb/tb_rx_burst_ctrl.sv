// tb_rx_burst_ctrl: self-checking test of the receive burst state machine.
// The controller runs with a comma aligner and a decoder, as in a receive
// lane; an encoder in the testbench makes the line words (zeros, the K28.7
// preamble word, encoded characters, or a forced invalid word). The words
// the controller pushes to its bonding FIFO are compared with an expected
// list, and the state is checked in every phase:
//  1. zeros: reset;
//  2. a burst with two packets, fill inside the second, then loss of signal;
//  3. a code error mid-packet: the cut packet is closed by an end mark, the
//     rest is dropped until K29.7, and the next packet in the same burst is
//     received (the K29.7 word sets the decoder's disparity);
//  4. a code error on the first character of a burst: no start-of-burst mark
//     is left over for the next packet;
//  5. light lost mid-packet: end mark, then reset after LOS_WORDS zeros.
// Counts of errors and end-of-packet pulses, the reset latency after light
// is lost, and the push latency after the first data word are checked.
//
// The reset / preamble / data states and the return to preamble on an end of
// packet or invalid word follow the paper; the characters, resynchronisation
// and loss-of-signal count are this design's own.
module tb_rx_burst_ctrl
  import xcvr_pkg::*;
;
  localparam int LOS = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #0.05 rst_n = 0;   // a falling edge: also resets the flops on divided clocks
  always #1 clk = ~clk;

  // ---------------- line source ----------------
  logic       enc_en = 0, rd_clr = 0, kin = 0, rd_pos;
  logic [7:0] din8 = 0;
  logic [9:0] code;
  enc_8b10b u_enc (.clk, .rst_n, .en (enc_en), .rd_clr, .din (din8), .kin, .dout (code), .rd_pos);
  // 0 zeros, 1 preamble, 2 encoder, 3 invalid word; delayed to meet the encoder
  logic [1:0] sel_n = 0, sel = 0;
  always @(posedge clk) sel <= sel_n;
  logic [9:0] line;
  always_comb
    case (sel)
      2'd1:    line = PREAMBLE_NEG;
      2'd2:    line = code;
      2'd3:    line = 10'b0000001111;     // 6b sub-block 000000: never valid
      default: line = '0;
    endcase

  // ---------------- lane under test ----------------
  logic       align_en, align_restart, aligned, dec_en, dec_rd_load, dec_rd_init;
  logic       code_err, disp_err, push, err_pulse, eop_pulse;
  logic [9:0] algn;
  logic [3:0] offset;
  char_t      dch;
  lane_word_t push_word;
  burst_state_e state;
  comma_align #(.LOCK_COMMAS(4)) u_align (.clk, .rst_n, .en (align_en), .restart (align_restart),
    .din (line), .dout (algn), .aligned, .offset);
  dec_8b10b u_dec (.clk, .rst_n, .en (dec_en), .rd_load (dec_rd_load), .rd_init (dec_rd_init),
    .din (algn), .dout (dch.d), .kout (dch.k), .code_err, .disp_err);
  rx_burst_ctrl #(.LOS_WORDS(LOS)) dut (.clk, .rst_n, .word (algn), .aligned, .align_en,
    .align_restart, .dec_en, .dec_rd_load, .dec_rd_init, .dec_char (dch), .dec_code_err (code_err),
    .dec_disp_err (disp_err), .push, .push_word, .state, .err_pulse, .eop_pulse);

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // ---------------- stimulus helpers ----------------
  lane_word_t exp_q[$], got_q[$];
  int n_err = 0, n_eop = 0, first_data_t = -1, push_lat = 0;
  always @(posedge clk) if (rst_n) begin
    if (push) begin
      got_q.push_back(push_word);
      if (first_data_t >= 0) begin
        push_lat = int'($time/2) - first_data_t;
        first_data_t = -1;
      end
    end
    n_err += int'(err_pulse);
    n_eop += int'(eop_pulse);
  end

  task automatic zeros(input int n);
    repeat (n) @(negedge clk) begin enc_en = 0; sel_n = 0; rd_clr = 1; end
  endtask
  task automatic preamble();
    repeat (8) @(negedge clk) begin enc_en = 0; sel_n = 1; rd_clr = 0; end
  endtask
  // one character; bad = send an invalid word instead (the encoder still
  // advances, as a transmitter would)
  task automatic char(input logic k, input logic [7:0] d, input logic bad = 0);
    @(negedge clk) begin enc_en = 1; rd_clr = 0; kin = k; din8 = d; sel_n = bad ? 2'd3 : 2'd2; end
  endtask
  // a packet of n data characters; bad_at >= 0 corrupts that character; the
  // expected pushes follow the controller's rules given first/sob and cut
  task automatic packet(input int n, input logic sob, input int bad_at = -1, input logic fill = 0);
    lane_word_t e;
    logic [7:0] d;
    for (int i = 0; i < n; i++) begin
      if (fill && i == n / 2) repeat (3) char(1, K28_5);
      d = 8'($urandom);
      char(0, d, i == bad_at);
      if (bad_at < 0 || i < bad_at) begin
        e = '0; e.c.d = d; e.sop = (i == 0); e.sob = sob && (i == 0);
        exp_q.push_back(e);
      end else if (i == bad_at) begin
        e = '0; e.eop = 1;
        exp_q.push_back(e);
      end
    end
    char(1, K29_7);
    if (bad_at < 0) begin e = '0; e.eop = 1; e.c.k = 1; e.c.d = K29_7; exp_q.push_back(e); end
  endtask

  task automatic expect_state(input burst_state_e s, input string what);
    @(posedge clk); #0.1 chk(state == s, $sformatf("%s: state %0d, expected %0d", what, state, s));
  endtask

  initial begin
    int t0, los_lat;
    lane_word_t e;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // 1. no light
    zeros(20);
    expect_state(ST_RESET, "zeros");
    // 2. two packets, fill inside the second, then light off
    preamble();
    expect_state(ST_PREAMBLE, "preamble");
    first_data_t = int'($time/2) + 1;
    packet(6, 1);
    chk(state == ST_DATA, "not in data during a packet");
    chk(push_lat >= 2 && push_lat <= 5, $sformatf("first push %0d clocks after the word", push_lat));
    packet(4, 0, -1, 1);
    zeros(1);
    t0 = int'($time/2);
    los_lat = -1;
    for (int i = 0; i < 20; i++) begin
      zeros(1);
      #1.1 if (state == ST_RESET && los_lat < 0) los_lat = int'($time/2) - t0;
    end
    chk(los_lat >= LOS && los_lat <= LOS + 4, $sformatf("reset %0d words after light off", los_lat));
    // 3. error mid-packet, then a clean packet in the same burst
    preamble();
    packet(8, 1, 3);
    packet(3, 0);
    zeros(20);
    // 4. error on the first character of a burst
    preamble();
    packet(5, 1, 0);
    packet(2, 0);
    zeros(20);
    // 5. light lost inside a packet
    preamble();
    for (int i = 0; i < 2; i++) begin
      logic [7:0] d;
      d = 8'($urandom);
      char(0, d);
      e = '0; e.c.d = d; e.sop = (i == 0); e.sob = (i == 0);
      exp_q.push_back(e);
    end
    e = '0; e.eop = 1; exp_q.push_back(e);
    zeros(20);
    expect_state(ST_RESET, "light lost");

    // ---------------- compare ----------------
    chk(got_q.size() == exp_q.size(), $sformatf("%0d pushes, expected %0d", got_q.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < got_q.size(); i++) begin
      if (exp_q[i].eop) chk(got_q[i].eop && !got_q[i].sop && !got_q[i].sob,
                            $sformatf("push %0d: %h, expected an end mark", i, got_q[i]));
      else chk(got_q[i] == exp_q[i], $sformatf("push %0d: %h expected %h", i, got_q[i], exp_q[i]));
    end
    chk(n_err == 3, $sformatf("%0d errors, expected 3", n_err));
    chk(n_eop == 4, $sformatf("%0d end-of-packet pulses, expected 4", n_eop));
    $display("pushes=%0d errors=%0d eop=%0d los_latency=%0d push_latency=%0d", got_q.size(), n_err, n_eop, los_lat, push_lat);
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
