// enc_8b10b: registered 8b/10b encoder with running disparity.
//
// Each enabled clock maps one 8-bit character (HGF EDCBA, with a K flag for
// control characters) to a 10-bit DC-balanced code word "abcdei fghj"
// (bit 9 = 'a' = first on the line). The 5b/6b and 3b/4b sub-blocks follow
// the standard Widmer-Franaszek code tables: a sub-block with unequal ones
// and zeros is sent in the polarity that drives the running disparity (RD)
// back toward zero, and RD flips after it. D.x.A7 replaces D.x.P7 where P7
// would make a run of five equal bits (x = 17, 18, 20 at RD-, x = 11, 13, 14
// at RD+).
//
// Burst-mode power saving: while en is low the code register and RD hold
// their values; the burst controller also holds din, so nothing toggles. The output is the
// registered code word: one cycle of latency from din to dout.
// Valid control inputs are K28.0-K28.7, K23.7, K27.7, K29.7, K30.7; other
// values with k set are coded as K28.y/K.x.7 patterns without a check.
module enc_8b10b
  import xcvr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,      // encode this cycle; hold everything when low
  input  logic       rd_clr,  // start of burst: running disparity to RD-
  input  logic [7:0] din,     // HGF EDCBA
  input  logic       kin,     // control character
  output logic [9:0] dout,    // abcdei fghj, bit 9 = a
  output logic       rd_pos   // running disparity after dout (1 = positive)
);

  // 5b/6b table, RD- column ("abcdei")
  function automatic logic [5:0] code6_neg(input logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // 3b/4b table, RD- column ("fghj"); data and K28 differ for y = 1,2,5,6
  function automatic logic [3:0] code4_neg(input logic [2:0] y, input logic k28, input logic alt7);
    case (y)
      3'd0: return 4'b1011;
      3'd1: return k28 ? 4'b0110 : 4'b1001;
      3'd2: return k28 ? 4'b1010 : 4'b0101;
      3'd3: return 4'b1100;
      3'd4: return 4'b1101;
      3'd5: return k28 ? 4'b0101 : 4'b1010;
      3'd6: return k28 ? 4'b1001 : 4'b0110;
      default: return alt7 ? 4'b0111 : 4'b1110;
    endcase
  endfunction

  function automatic logic unbalanced6(input logic [5:0] c);
    return $countones(c) != 3;
  endfunction

  function automatic logic unbalanced4(input logic [3:0] c);
    return $countones(c) != 2;
  endfunction

  logic       rd_q;          // RD after the last code word
  logic [9:0] code_d;
  logic       rd_d;

  always_comb begin
    logic [4:0] x;
    logic [2:0] y;
    logic       k28, alt7, rd_mid;
    logic [5:0] c6;
    logic [3:0] c4;
    x   = din[4:0];
    y   = din[7:5];
    k28 = kin && (x == 5'd28);
    c6  = k28 ? 6'b001111 : code6_neg(x);
    // complement under RD+ when unbalanced, and D.07 (111000/000111)
    if (rd_q && (unbalanced6(c6) || (!k28 && x == 5'd7))) c6 = ~c6;
    rd_mid = unbalanced6(c6) ? ~rd_q : rd_q;
    // alternate 7: all K.x.7, and data where P7 would give a run of five
    alt7 = (y == 3'd7) && (kin ||
           (!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
           ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14)));
    c4 = code4_neg(y, k28, alt7);
    if (rd_mid && (unbalanced4(c4) || y == 3'd3 || k28)) c4 = ~c4;
    rd_d   = unbalanced4(c4) ? ~rd_mid : rd_mid;
    code_d = {c6, c4};
  end

  // Code word register; RD and dout hold while disabled
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q <= 1'b0;
      dout <= PREAMBLE_NEG;
    end else if (rd_clr) begin
      rd_q <= 1'b0;
    end else if (en) begin
      dout <= code_d;
      rd_q <= rd_d;
    end
  end

  assign rd_pos = rd_q;

endmodule
