// rx_burst_ctrl: burst-mode receive state machine of one lane (reset,
// preamble, data), including loss-of-signal detection.
//
// Reset: no light. The aligner and decoder are disabled and the aligner's
// lock is cleared. Any non-zero word (light) moves to preamble.
// Preamble: the comma aligner is enabled and the decoder is off. Each
// aligned preamble word (K28.7 at RD-) sets the decoder's running disparity
// to negative. Once aligned, the first word that is neither preamble nor
// all zeros starts data: the decoder is enabled from that very word on.
// Data: the aligner is frozen and each word is decoded. The decoded
// characters are written to the lane's bonding FIFO; the first one of each
// packet is tagged start-of-packet, and the first one after a preamble also
// start-of-burst. The end-of-packet character K29.7 writes an end mark and
// returns to preamble. A word with a code or disparity error also returns to
// preamble: the word is dropped and counted, an end mark closes the cut
// packet, and the lane then waits for a preamble word or a K29.7 word before
// it accepts data again, so that it never resumes inside a packet. K28.5 fill
// and K28.7 are dropped. Because the decoder keeps its disparity across the
// preamble state, a following packet can start without a new preamble. A
// K29.7 word seen while resynchronising also sets the decoder's disparity
// (its two forms tell RD-/RD+), so the next packet decodes cleanly.
// LOS_WORDS consecutive all-zero words (no optical power) return to reset
// from any state.
//
// Timing: 'word' is the aligner output; the decoder result for it arrives
// one clock later, qualified internally. The state machine reacts to an end
// or error in the same clock it is decoded, so the word after an end mark is
// already judged as a possible new packet.
// The character field of push_word is the decoder's output passed on as it
// is; this block adds only the push strobe and the sob/sop/eop tags.
module rx_burst_ctrl
  import xcvr_pkg::*;
#(
  parameter int unsigned LOS_WORDS = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  // aligner
  input  logic [9:0]   word,
  input  logic         aligned,
  output logic         align_en,
  output logic         align_restart,
  // decoder
  output logic         dec_en,
  output logic         dec_rd_load,
  output logic         dec_rd_init,  // RD loaded with dec_rd_load (1 = positive)
  input  char_t        dec_char,
  input  logic         dec_code_err,
  input  logic         dec_disp_err,
  // lane output (to the bonding FIFO)
  output logic         push,
  output lane_word_t   push_word,
  // status
  output burst_state_e state,
  output logic         err_pulse,    // a word was rejected
  output logic         eop_pulse     // an end of packet was received
);

  localparam int unsigned LC = $clog2(LOS_WORDS + 1);

  burst_state_e  state_q, state_d;
  logic          dec_vld;      // decoder output belongs to a data word
  logic          sop_pend, sob_pend, resync;
  logic          word_eop;
  logic [LC-1:0] zero_cnt;
  logic          word_zero, word_pre, los;
  logic          ev_err, ev_eop, ev_fill;

  assign word_zero = (word == '0);
  assign word_pre  = (word == PREAMBLE_NEG) || (word == PREAMBLE_POS);
  assign word_eop  = (word == EOP_NEG) || (word == EOP_POS);
  assign los       = word_zero && (zero_cnt == LC'(LOS_WORDS - 1));

  assign ev_err  = dec_vld && (dec_code_err || dec_disp_err);
  assign ev_eop  = dec_vld && !ev_err && dec_char.k && (dec_char.d == K29_7);
  assign ev_fill = dec_vld && !ev_err && dec_char.k &&
                   (dec_char.d == K28_5 || dec_char.d == K28_7);

  burst_state_e eff;
  always_comb begin
    state_d       = state_q;
    dec_en        = 1'b0;
    dec_rd_load   = 1'b0;
    dec_rd_init   = 1'b0;
    align_en      = 1'b0;
    align_restart = 1'b0;
    eff = (state_q == ST_DATA && (ev_err || ev_eop)) ? ST_PREAMBLE : state_q;
    case (eff)
      ST_RESET: begin
        align_restart = 1'b1;
        dec_rd_load   = 1'b1;
        if (!word_zero) state_d = ST_PREAMBLE;
      end
      ST_PREAMBLE: begin
        align_en = 1'b1;
        state_d  = ST_PREAMBLE;
        // K28.7 is sent at RD- and leaves RD-; K29.7 leaves RD as it found
        // it, so its form tells the disparity of the stream after it
        if (aligned && (word == PREAMBLE_NEG || word_eop)) begin
          dec_rd_load = 1'b1;
          dec_rd_init = (word == EOP_POS);
        end
        if (aligned && !word_pre && !word_zero && !resync && !ev_err) begin
          dec_en  = 1'b1;
          state_d = ST_DATA;
        end
      end
      default: begin   // ST_DATA
        dec_en  = 1'b1;
        state_d = ST_DATA;
      end
    endcase
    if (los) begin
      state_d     = ST_RESET;
      dec_en      = 1'b0;
      dec_rd_load = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= ST_RESET;
      dec_vld  <= 1'b0;
      sop_pend <= 1'b0;
      sob_pend <= 1'b0;
      resync   <= 1'b0;
      zero_cnt <= '0;
    end else begin
      state_q  <= state_d;
      dec_vld  <= dec_en;
      zero_cnt <= !word_zero ? '0 :
                  (zero_cnt == LC'(LOS_WORDS)) ? zero_cnt : zero_cnt + LC'(1);
      if (eff != ST_DATA && state_d == ST_DATA) sop_pend <= 1'b1;
      else if (push && !push_word.eop) sop_pend <= 1'b0;
      // a preamble word starts a burst; a burst's first character says so
      if (eff == ST_PREAMBLE && aligned && word == PREAMBLE_NEG) sob_pend <= 1'b1;
      else if (push) sob_pend <= 1'b0;   // also a cut packet's end mark
      if (ev_err) resync <= 1'b1;
      else if (eff == ST_PREAMBLE && aligned && (word_pre || word_eop)) resync <= 1'b0;
      else if (state_d == ST_RESET) resync <= 1'b0;
    end
  end

  // A data character of the current packet, an end mark, or nothing
  always_comb begin
    push             = 1'b0;
    push_word        = '0;
    push_word.c      = dec_char;
    if (dec_vld && !ev_fill) begin
      push = 1'b1;
      if (ev_eop || ev_err) begin
        push_word.eop = 1'b1;
      end else begin
        push_word.sop = sop_pend;
        push_word.sob = sob_pend;
      end
    end
  end

  assign state     = state_q;
  assign err_pulse = ev_err;
  assign eop_pulse = ev_eop;

endmodule
