// tx_burst_ctrl: burst-mode transmit state machine (reset, preamble, data)
// and lane striping.
//
// Reset: nothing to send. The encoders are disabled with their inputs held,
// their running disparity is returned to negative, and the serializers are
// given all-zero words (no light). When the transmit FIFO holds a word the
// controller moves to preamble.
// Preamble: PREAMBLE_WORDS copies of the zero-disparity K28.7 word go out on
// every lane for clock recovery and word alignment; the encoders stay off.
// Data: each FIFO word is striped over the lanes, byte i to lane i, and
// encoded. After the word marked last, every lane sends the end-of-packet
// character K29.7. If another packet is already waiting the burst goes on
// with it, with no new preamble; otherwise the controller returns to reset.
// Should the FIFO run dry inside a packet, K28.5 fill characters are sent
// and dropped by the receiver.
//
// Timing: the FIFO is read first-word-fall-through. Encoder inputs are
// registered here (one clock), the encoder adds one more, and word_sel is
// delayed to meet the encoder output: it picks, two clocks after the
// decision, between zeros, the preamble word and the encoder output.
module tx_burst_ctrl
  import xcvr_pkg::*;
#(
  parameter int unsigned LANES          = 2,
  parameter int unsigned PREAMBLE_WORDS = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // transmit FIFO (first word fall through)
  input  logic                 fifo_empty,
  input  logic [8*LANES-1:0]   head_d,
  input  logic [LANES-1:0]     head_k,
  input  logic                 head_last,
  output logic                 fifo_pop,
  // encoders (shared control, one character per lane)
  output logic                 enc_en,
  output logic                 enc_rd_clr,
  output logic [8*LANES-1:0]   enc_d,
  output logic [LANES-1:0]     enc_k,
  // lane word select, aligned with the encoder output
  output logic [1:0]           word_sel,     // 0 zeros, 1 preamble, 2 encoder
  output burst_state_e         state,
  output logic                 fill_pulse    // a fill character was sent
);

  localparam int unsigned PC = $clog2(PREAMBLE_WORDS + 1);
  localparam logic [1:0] SEL_ZERO = 2'd0, SEL_PRE = 2'd1, SEL_ENC = 2'd2;

  burst_state_e state_q, state_d;
  logic [PC-1:0] pre_cnt;
  logic          eop_next, eop_next_d;
  logic [1:0]    sel_d, sel_q;
  logic          en_d, clr_d;
  logic [8*LANES-1:0] d_d;
  logic [LANES-1:0]   k_d;

  always_comb begin
    state_d    = state_q;
    eop_next_d = eop_next;
    fifo_pop   = 1'b0;
    sel_d      = SEL_ZERO;
    en_d       = 1'b0;
    clr_d      = 1'b0;
    d_d        = enc_d;     // hold the encoder inputs unless encoding
    k_d        = enc_k;
    fill_pulse = 1'b0;
    case (state_q)
      ST_RESET: begin
        clr_d = 1'b1;
        if (!fifo_empty) state_d = ST_PREAMBLE;
      end
      ST_PREAMBLE: begin
        sel_d = SEL_PRE;
        if (pre_cnt == PC'(PREAMBLE_WORDS - 1)) state_d = ST_DATA;
      end
      default: begin   // ST_DATA
        sel_d = SEL_ENC;
        en_d  = 1'b1;
        if (eop_next) begin
          d_d        = {LANES{K29_7}};
          k_d        = '1;
          eop_next_d = 1'b0;
          if (fifo_empty) state_d = ST_RESET;
        end else if (!fifo_empty) begin
          fifo_pop   = 1'b1;
          d_d        = head_d;
          k_d        = head_k;
          eop_next_d = head_last;
        end else begin
          d_d        = {LANES{K28_5}};
          k_d        = '1;
          fill_pulse = 1'b1;
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= ST_RESET;
      pre_cnt    <= '0;
      eop_next   <= 1'b0;
      enc_en     <= 1'b0;
      enc_rd_clr <= 1'b0;
      enc_d      <= '0;
      enc_k      <= '0;
      sel_q      <= SEL_ZERO;
      word_sel   <= SEL_ZERO;
    end else begin
      state_q    <= state_d;
      pre_cnt    <= (state_q == ST_PREAMBLE) ? pre_cnt + PC'(1) : '0;
      eop_next   <= eop_next_d;
      enc_en     <= en_d;
      enc_rd_clr <= clr_d;
      enc_d      <= d_d;
      enc_k      <= k_d;
      sel_q      <= sel_d;
      word_sel   <= sel_q;
    end
  end

  assign state = state_q;

endmodule
