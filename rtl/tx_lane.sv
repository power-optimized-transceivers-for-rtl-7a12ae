// tx_lane: transmit path of one lane: 8b/10b encoder, word select, bit slip
// and 10:1 serializer.
//
// The word select puts all zeros (reset state, no light), the K28.7 preamble
// word, or the encoder output into the bit slip stage; the burst controller
// drives the select already aligned with the encoder's one-clock latency. The
// serializer shifts the word out on the serial clock, bit 9 first. Latency
// from encoder input to the first bit on the line: two parallel clocks plus
// half a word (the serializer loads in mid-word).
//
// The paper's transmitter diagram gives the chain encoder, bit slip (with a bypass) and
// CMOS shift-register serializer; the word select and the preamble word are
// this design's way of carrying out the burst protocol of the paper.
//
// Lint note: the Verilator linter reports rst_n as flopped both synchronously
// and asynchronously. The flip-flops use it only as an asynchronous reset;
// the synchronous use is the 'disable iff' of the assertion that the preamble
// goes out at RD-, which is not logic.
module tx_lane
  import xcvr_pkg::*;
(
  input  logic       pclk,
  input  logic       clk_ser,
  input  logic       load,
  input  logic       rst_n,
  input  logic       enc_en,
  input  logic       enc_rd_clr,
  input  logic [7:0] enc_d,
  input  logic       enc_k,
  input  logic [1:0] word_sel,    // 0 zeros, 1 preamble, 2 encoder
  input  logic       slip_en,
  input  logic [3:0] slip,
  output logic       sout
);

  logic [9:0] code, word, slipped;
  logic       rd_pos;

  enc_8b10b u_enc (
    .clk    (pclk),
    .rst_n  (rst_n),
    .en     (enc_en),
    .rd_clr (enc_rd_clr),
    .din    (enc_d),
    .kin    (enc_k),
    .dout   (code),
    .rd_pos (rd_pos)
  );

  always_comb begin
    case (word_sel)
      2'd1:    word = PREAMBLE_NEG;
      2'd2:    word = code;
      default: word = '0;
    endcase
  end

  tx_bitslip #(.WIDTH(10)) u_slip (
    .clk     (pclk),
    .rst_n   (rst_n),
    .slip_en (slip_en),
    .slip    (slip),
    .din     (word),
    .dout    (slipped)
  );

  piso_ser #(.RATIO(10)) u_ser (
    .clk_ser (clk_ser),
    .rst_n   (rst_n),
    .load    (load),
    .pdata   (slipped),
    .sout    (sout)
  );

  // the preamble is only sent at negative disparity (see comma_align)
  a_pre_neg: assert property (@(posedge pclk) disable iff (!rst_n)
                              (word_sel == 2'd1) |-> !rd_pos);

endmodule
