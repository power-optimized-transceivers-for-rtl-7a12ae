// burst_xcvr_top: burst-mode 8b/10b optical-link transceiver, LANES x 6.25
// Gb/s (10 Gb/s payload over two wavelengths by default).
//
// Transmit: client words (8 bits per lane plus a K flag per lane, and a last-
// word flag) enter an asynchronous FIFO from the client clock. The burst
// controller, on the parallel clock made by dividing the transmit serial clock
// by 10, sends nothing while idle (all-zero words: the laser is dark), a K28.7
// preamble of PREAMBLE_WORDS words when a packet arrives, then the striped and
// 8b/10b-encoded packet and a K29.7 end mark on every lane. Each lane has its
// own encoder, bit-slip test stage and 10:1 CMOS shift-register serializer.
//
// Receive: each lane takes a recovered serial clock and data (the clock and
// data recovery circuit is analog and outside this RTL), deserializes 1:10,
// corrects polarity, aligns on the preamble comma and decodes, under its own
// burst state machine. Channel bonding removes the skew between lanes and
// joins them into words again; a final asynchronous FIFO hands them to the
// receive client clock.
//
// Clocks: tx_clk_ser (transmit PLL), rx_clk_ser[i] (lane i recovered clock),
// rx_clk_core (bonding), tx_clk / rx_clk (clients). One active-low
// asynchronous reset, rst_n, for all domains. The transmit parallel clock is
// brought out as tx_pclk.
//
// From the paper: two lanes at 6.25 Gb/s with 10:1 CMOS serializers and a
// 625 MHz parallel clock, 8b/10b coding with a dual 16-bit client interface,
// the data / preamble / reset burst protocol with a zero-disparity preamble
// word, alignment in 80 bits, encoder and decoder held outside the data
// state, one FIFO per lane for channel bonding, and the block chains of its
// transmitter and receiver diagrams (bit slip, polarity, PRBS check). This
// design's own: the characters used (K28.7, K29.7, K28.5), the lengths of the
// preamble, lock and loss-of-signal counts, the FIFO depths, the deskew rules
// and the client handshake.
//
// Lint note: the Verilator linter reports rst_n as flopped both synchronously and
// asynchronously. The flip-flops use it only as an asynchronous reset; the
// synchronous use is the 'disable iff' of the assertions inside the FIFOs and
// lanes, which is not logic.
module burst_xcvr_top
  import xcvr_pkg::*;
#(
  parameter int unsigned LANES          = 2,
  parameter int unsigned PREAMBLE_WORDS = 8,
  parameter int unsigned LOCK_COMMAS    = 4,
  parameter int unsigned LOS_WORDS      = 8,
  parameter int unsigned FIFO_ADDR_W    = 4
) (
  input  logic                  rst_n,
  // transmit client
  input  logic                  tx_clk,
  input  logic                  tx_valid,
  output logic                  tx_ready,
  input  logic [8*LANES-1:0]    tx_data,
  input  logic [LANES-1:0]      tx_k,
  input  logic                  tx_last,
  // transmit line side
  input  logic                  tx_clk_ser,
  output logic                  tx_pclk,
  output logic [LANES-1:0]      tx_sout,
  input  logic                  tx_slip_en,
  input  logic [LANES-1:0][3:0] tx_slip,
  // receive line side (from clock and data recovery)
  input  logic [LANES-1:0]      rx_clk_ser,
  input  logic [LANES-1:0]      rx_sin,
  input  logic [LANES-1:0]      rx_invert,
  input  logic                  rx_prbs_en,
  // receive client
  input  logic                  rx_clk_core,
  input  logic                  rx_clk,
  output logic                  rx_valid,
  input  logic                  rx_ready,
  output logic [8*LANES-1:0]    rx_data,
  output logic [LANES-1:0]      rx_k,
  output logic                  rx_sop,
  output logic                  rx_last,
  // status
  output burst_state_e          tx_state,
  output logic                  tx_fill,
  output logic [LANES-1:0][1:0] rx_lane_state,
  output logic [LANES-1:0]      rx_aligned,
  output logic [LANES-1:0][3:0] rx_offset,
  output logic [LANES-1:0]      rx_code_err,
  output logic [LANES-1:0]      rx_eop,
  output logic                  rx_deskew,
  output logic [LANES-1:0]      rx_lane_full,
  output logic [FIFO_ADDR_W:0]  tx_fifo_level,
  output logic [FIFO_ADDR_W:0]  rx_fifo_level,
  output logic [LANES-1:0][FIFO_ADDR_W:0] rx_lane_level,
  output logic [LANES-1:0]      prbs_locked,
  output logic [LANES-1:0]      prbs_word_err,
  output logic [LANES-1:0][15:0] prbs_err_cnt
);

  localparam int unsigned TXW = 8 * LANES + LANES + 1;       // {last, k, d}
  localparam int unsigned RXW = 8 * LANES + LANES + 2;       // {sop, last, k, d}

  // ------------------------------------------------------------------ TX
  logic               tx_full, tx_empty, tx_pop, tx_load;
  logic [TXW-1:0]     tx_head;
  logic [FIFO_ADDR_W:0] tx_rlevel;   // not used: the controller needs only empty
  logic               enc_en, enc_rd_clr;
  logic [8*LANES-1:0] enc_d;
  logic [LANES-1:0]   enc_k;
  logic [1:0]         word_sel;

  ser_clkdiv #(.RATIO(10)) u_tx_div (
    .clk_ser (tx_clk_ser), .rst_n (rst_n), .pclk (tx_pclk), .load (tx_load));

  async_fifo #(.WIDTH(TXW), .ADDR_W(FIFO_ADDR_W)) u_tx_fifo (
    .wclk (tx_clk), .wrst_n (rst_n), .winc (tx_valid && !tx_full),
    .wdata ({tx_last, tx_k, tx_data}), .wfull (tx_full), .wlevel (tx_fifo_level),
    .rclk (tx_pclk), .rrst_n (rst_n), .rinc (tx_pop),
    .rdata (tx_head), .rempty (tx_empty), .rlevel (tx_rlevel));

  assign tx_ready = !tx_full;

  tx_burst_ctrl #(.LANES(LANES), .PREAMBLE_WORDS(PREAMBLE_WORDS)) u_tx_ctrl (
    .clk (tx_pclk), .rst_n (rst_n),
    .fifo_empty (tx_empty),
    .head_d (tx_head[8*LANES-1:0]),
    .head_k (tx_head[8*LANES +: LANES]),
    .head_last (tx_head[TXW-1]),
    .fifo_pop (tx_pop),
    .enc_en (enc_en), .enc_rd_clr (enc_rd_clr), .enc_d (enc_d), .enc_k (enc_k),
    .word_sel (word_sel), .state (tx_state), .fill_pulse (tx_fill));

  for (genvar i = 0; i < int'(LANES); i++) begin : g_tx
    tx_lane u_lane (
      .pclk (tx_pclk), .clk_ser (tx_clk_ser), .load (tx_load), .rst_n (rst_n),
      .enc_en (enc_en), .enc_rd_clr (enc_rd_clr),
      .enc_d (enc_d[8*i +: 8]), .enc_k (enc_k[i]),
      .word_sel (word_sel), .slip_en (tx_slip_en), .slip (tx_slip[i]),
      .sout (tx_sout[i]));
  end

  // ------------------------------------------------------------------ RX
  logic       lane_pclk  [LANES];
  logic       lane_rst_n [LANES];
  logic       lane_push  [LANES];
  lane_word_t lane_word  [LANES];

  for (genvar i = 0; i < int'(LANES); i++) begin : g_rx
    burst_state_e st;
    rx_lane #(.LOCK_COMMAS(LOCK_COMMAS), .LOS_WORDS(LOS_WORDS)) u_lane (
      .clk_ser (rx_clk_ser[i]), .rst_n (rst_n), .sin (rx_sin[i]),
      .invert (rx_invert[i]), .prbs_en (rx_prbs_en),
      .pclk (lane_pclk[i]), .push (lane_push[i]), .push_word (lane_word[i]),
      .state (st), .aligned (rx_aligned[i]), .offset (rx_offset[i]),
      .err_pulse (rx_code_err[i]), .eop_pulse (rx_eop[i]),
      .prbs_locked (prbs_locked[i]), .prbs_err_cnt (prbs_err_cnt[i]),
      .prbs_word_err (prbs_word_err[i]));
    assign rx_lane_state[i] = st;
    assign lane_rst_n[i]    = rst_n;
  end

  logic               bond_valid, bond_sop, bond_last;
  logic [8*LANES-1:0] bond_d;
  logic [LANES-1:0]   bond_k;
  logic               rx_full, rx_empty;
  logic [RXW-1:0]     rx_head;
  logic [FIFO_ADDR_W:0] rx_rlevel;   // not used: the client sees only valid

  chan_bond #(.LANES(LANES), .ADDR_W(FIFO_ADDR_W)) u_bond (
    .lane_clk (lane_pclk), .lane_rst_n (lane_rst_n),
    .lane_push (lane_push), .lane_word (lane_word), .lane_full (rx_lane_full),
    .clk (rx_clk_core), .rst_n (rst_n), .out_ready (!rx_full),
    .out_valid (bond_valid), .out_d (bond_d), .out_k (bond_k),
    .out_sop (bond_sop), .out_last (bond_last),
    .deskew_pulse (rx_deskew), .lane_level (rx_lane_level));

  async_fifo #(.WIDTH(RXW), .ADDR_W(FIFO_ADDR_W)) u_rx_fifo (
    .wclk (rx_clk_core), .wrst_n (rst_n), .winc (bond_valid && !rx_full),
    .wdata ({bond_sop, bond_last, bond_k, bond_d}), .wfull (rx_full),
    .wlevel (rx_fifo_level),
    .rclk (rx_clk), .rrst_n (rst_n), .rinc (rx_ready && !rx_empty),
    .rdata (rx_head), .rempty (rx_empty), .rlevel (rx_rlevel));

  assign rx_valid = !rx_empty;
  assign rx_data  = rx_head[8*LANES-1:0];
  assign rx_k     = rx_head[8*LANES +: LANES];
  assign rx_last  = rx_head[RXW-2];
  assign rx_sop   = rx_head[RXW-1];

endmodule
