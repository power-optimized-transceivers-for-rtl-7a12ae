// rx_lane: receive path of one lane: 1:10 deserializer with its word-clock
// divider, polarity correction, comma alignment, 8b/10b decoder, burst-mode
// state machine and PRBS checker.
//
// clk_ser and sin come from the lane's clock and data recovery circuit. The
// divider makes the lane's parallel clock (pclk), on which everything after
// the deserializer runs, and which also writes the lane's channel-bonding
// FIFO. The PRBS checker looks at the polarity-corrected words before
// alignment, when prbs_en is set.
//
// The order polarity, comma align, decoder and the PRBS checker beside the
// aligner follow the paper's receiver diagram; the burst state machine carries
// out its burst protocol; the rest of the wiring is this design's.
module rx_lane
  import xcvr_pkg::*;
#(
  parameter int unsigned LOCK_COMMAS = 4,
  parameter int unsigned LOS_WORDS   = 8
) (
  input  logic         clk_ser,
  input  logic         rst_n,
  input  logic         sin,
  input  logic         invert,
  input  logic         prbs_en,
  output logic         pclk,
  output logic         push,
  output lane_word_t   push_word,
  output burst_state_e state,
  output logic         aligned,
  output logic [3:0]   offset,
  output logic         err_pulse,
  output logic         eop_pulse,
  output logic         prbs_locked,
  output logic [15:0]  prbs_err_cnt,
  output logic         prbs_word_err
);

  logic       load;
  logic [9:0] raw, pol, algn;
  logic       align_en, align_restart, dec_en, dec_rd_load, dec_rd_init;
  char_t      dch;
  logic       code_err, disp_err;

  ser_clkdiv #(.RATIO(10)) u_div (
    .clk_ser (clk_ser), .rst_n (rst_n), .pclk (pclk), .load (load));

  sipo_deser #(.RATIO(10)) u_des (
    .clk_ser (clk_ser), .rst_n (rst_n), .load (load), .sin (sin), .pdata (raw));

  rx_polarity #(.WIDTH(10)) u_pol (
    .clk (pclk), .rst_n (rst_n), .invert (invert), .din (raw), .dout (pol));

  comma_align #(.LOCK_COMMAS(LOCK_COMMAS)) u_align (
    .clk (pclk), .rst_n (rst_n), .en (align_en), .restart (align_restart),
    .din (pol), .dout (algn), .aligned (aligned), .offset (offset));

  dec_8b10b u_dec (
    .clk (pclk), .rst_n (rst_n), .en (dec_en), .rd_load (dec_rd_load),
    .rd_init (dec_rd_init), .din (algn), .dout (dch.d), .kout (dch.k),
    .code_err (code_err), .disp_err (disp_err));

  rx_burst_ctrl #(.LOS_WORDS(LOS_WORDS)) u_ctrl (
    .clk (pclk), .rst_n (rst_n),
    .word (algn), .aligned (aligned),
    .align_en (align_en), .align_restart (align_restart),
    .dec_en (dec_en), .dec_rd_load (dec_rd_load), .dec_rd_init (dec_rd_init),
    .dec_char (dch), .dec_code_err (code_err), .dec_disp_err (disp_err),
    .push (push), .push_word (push_word),
    .state (state), .err_pulse (err_pulse), .eop_pulse (eop_pulse));

  prbs_check #(.WIDTH(10), .LOCK_WORDS(8)) u_prbs (
    .clk (pclk), .rst_n (rst_n), .en (prbs_en), .din (pol),
    .locked (prbs_locked), .word_err (prbs_word_err), .err_cnt (prbs_err_cnt));

endmodule
