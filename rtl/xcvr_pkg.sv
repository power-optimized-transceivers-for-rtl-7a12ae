// xcvr_pkg: shared constants and types of the burst-mode 8b/10b transceiver.
//
// The transceiver moves 16-bit client words (two 8-bit characters, each with a
// control flag) over LANES serial channels of 8b/10b code. Ten-bit code words
// are written as in the 8b/10b literature, "abcdei fghj", with bit 'a' in bit
// 9 of a logic [9:0]; bit 9 is the first bit on the line.
//
// The preamble word is K28.7 (0011111000 / 1100000111). It has zero disparity,
// so the running disparity never changes while it repeats, and it holds the
// comma 0011111 at one position per word (the inverse 1100000 appears too,
// five bits on, so the receiver looks for 0011111 only). End of packet is
// marked by K29.7, as in Ethernet. The choice of these two characters is this
// design's; the burst protocol only asks for a zero-disparity preamble word
// and an end-of-packet mark.
package xcvr_pkg;


  // Characters (8-bit values, K flag set)
  localparam logic [7:0] K28_5 = 8'hBC;
  localparam logic [7:0] K28_7 = 8'hFC;
  localparam logic [7:0] K29_7 = 8'hFD;

  // Ten-bit preamble word in both polarities of the running disparity
  localparam logic [9:0] PREAMBLE_NEG = 10'b0011111000;
  localparam logic [9:0] PREAMBLE_POS = 10'b1100000111;

  // Ten-bit end-of-packet word (K29.7) in both polarities
  localparam logic [9:0] EOP_NEG = 10'b1011101000;
  localparam logic [9:0] EOP_POS = 10'b0100010111;

  // Seven-bit comma pattern looked for by the aligner
  localparam logic [6:0] COMMA_P = 7'b0011111;

  // Burst states shared by transmitter and receiver (Section V of the design
  // notes in README: reset, preamble, data)
  typedef enum logic [1:0] {
    ST_RESET    = 2'd0,
    ST_PREAMBLE = 2'd1,
    ST_DATA     = 2'd2
  } burst_state_e;

  // One character of one lane after decoding
  typedef struct packed {
    logic       k;
    logic [7:0] d;
  } char_t;

  // Entry of a per-lane channel-bonding FIFO
  typedef struct packed {
    logic  sob;   // first character of a burst (after a preamble)
    logic  sop;   // first character of a packet
    logic  eop;   // end-of-packet mark, or end of a packet cut by an error
    char_t c;
  } lane_word_t;

endpackage
