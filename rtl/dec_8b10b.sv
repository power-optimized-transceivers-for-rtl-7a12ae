// dec_8b10b: registered 8b/10b decoder with running-disparity check.
//
// Each enabled clock takes one aligned 10-bit code word "abcdei fghj"
// (bit 9 = 'a') and returns the 8-bit character HGF EDCBA, the K flag and
// two error flags: code_err when a sub-block is not in the code tables, and
// disp_err when a sub-block's disparity does not fit the running disparity
// (RD) tracked from earlier words. After an error RD is taken from the
// received word so that one bad word does not cause a string of errors.
// Control characters recognised: K28.y and K23.7, K27.7, K29.7, K30.7.
//
// While en is low (burst preamble and reset states) the output registers and
// RD hold, so no decode activity reaches the rest of the receiver. rd_init
// with rd_load sets RD at the start of a burst. Latency: one clock.
module dec_8b10b (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       rd_load,   // set RD to rd_init (start of burst)
  input  logic       rd_init,
  input  logic [9:0] din,       // abcdei fghj
  output logic [7:0] dout,      // HGF EDCBA
  output logic       kout,
  output logic       code_err,
  output logic       disp_err
);

  // 6b -> 5b. valid = 0 for words outside the table.
  function automatic logic [5:0] dec6(input logic [5:0] c);   // {valid, x}
    case (c)
      6'b100111, 6'b011000: return {1'b1, 5'd0};
      6'b011101, 6'b100010: return {1'b1, 5'd1};
      6'b101101, 6'b010010: return {1'b1, 5'd2};
      6'b110001:            return {1'b1, 5'd3};
      6'b110101, 6'b001010: return {1'b1, 5'd4};
      6'b101001:            return {1'b1, 5'd5};
      6'b011001:            return {1'b1, 5'd6};
      6'b111000, 6'b000111: return {1'b1, 5'd7};
      6'b111001, 6'b000110: return {1'b1, 5'd8};
      6'b100101:            return {1'b1, 5'd9};
      6'b010101:            return {1'b1, 5'd10};
      6'b110100:            return {1'b1, 5'd11};
      6'b001101:            return {1'b1, 5'd12};
      6'b101100:            return {1'b1, 5'd13};
      6'b011100:            return {1'b1, 5'd14};
      6'b010111, 6'b101000: return {1'b1, 5'd15};
      6'b011011, 6'b100100: return {1'b1, 5'd16};
      6'b100011:            return {1'b1, 5'd17};
      6'b010011:            return {1'b1, 5'd18};
      6'b110010:            return {1'b1, 5'd19};
      6'b001011:            return {1'b1, 5'd20};
      6'b101010:            return {1'b1, 5'd21};
      6'b011010:            return {1'b1, 5'd22};
      6'b111010, 6'b000101: return {1'b1, 5'd23};
      6'b110011, 6'b001100: return {1'b1, 5'd24};
      6'b100110:            return {1'b1, 5'd25};
      6'b010110:            return {1'b1, 5'd26};
      6'b110110, 6'b001001: return {1'b1, 5'd27};
      6'b001110:            return {1'b1, 5'd28};
      6'b101110, 6'b010001: return {1'b1, 5'd29};
      6'b011110, 6'b100001: return {1'b1, 5'd30};
      6'b101011, 6'b010100: return {1'b1, 5'd31};
      6'b001111, 6'b110000: return {1'b1, 5'd28};   // K28
      default:              return {1'b0, 5'd0};
    endcase
  endfunction

  // 4b -> 3b, data reading (K28 after 110000 is complemented first)
  function automatic logic [3:0] dec4(input logic [3:0] c);   // {valid, y}
    case (c)
      4'b1011, 4'b0100: return {1'b1, 3'd0};
      4'b1001:          return {1'b1, 3'd1};
      4'b0101:          return {1'b1, 3'd2};
      4'b1100, 4'b0011: return {1'b1, 3'd3};
      4'b1101, 4'b0010: return {1'b1, 3'd4};
      4'b1010:          return {1'b1, 3'd5};
      4'b0110:          return {1'b1, 3'd6};
      4'b1110, 4'b0001,
      4'b0111, 4'b1000: return {1'b1, 3'd7};
      default:          return {1'b0, 3'd0};
    endcase
  endfunction

  // disparity of a sub-block: +1 more ones, -1 more zeros, 0 balanced
  function automatic logic signed [1:0] disp6(input logic [5:0] c);
    int n;
    n = $countones(c);
    return (n > 3) ? 2'sd1 : (n < 3) ? -2'sd1 : 2'sd0;
  endfunction

  function automatic logic signed [1:0] disp4(input logic [3:0] c);
    int n;
    n = $countones(c);
    return (n > 2) ? 2'sd1 : (n < 2) ? -2'sd1 : 2'sd0;
  endfunction

  logic rd_q;

  logic [7:0] d_d;
  logic       k_d, cerr_d, derr_d, rd_d;

  always_comb begin
    logic [5:0] c6, r6;
    logic [3:0] c4, r4, c4x;
    logic       k28, kx7, rd_mid, bad_d6, bad_d4;
    logic signed [1:0] s6, s4;
    c6  = din[9:4];
    c4  = din[3:0];
    r6  = dec6(c6);
    k28 = (c6 == 6'b001111) || (c6 == 6'b110000);
    // K28 after 110000 uses the complemented 3b/4b column
    c4x = (c6 == 6'b110000) ? ~c4 : c4;
    r4  = dec4(c4x);
    kx7 = ((c6 == 6'b111010) || (c6 == 6'b000101) || (c6 == 6'b110110) ||
           (c6 == 6'b001001) || (c6 == 6'b101110) || (c6 == 6'b010001) ||
           (c6 == 6'b011110) || (c6 == 6'b100001)) &&
          ((c4 == 4'b0111) || (c4 == 4'b1000));
    k_d    = k28 || kx7;
    d_d    = {r4[2:0], r6[4:0]};
    cerr_d = !r6[5] || !r4[3];
    // disparity rules: an unbalanced sub-block must have the sign opposite
    // to the RD it starts from; 111000/000111 and 1100/0011 behave the same
    s6 = disp6(c6);
    if (c6 == 6'b111000) s6 = 2'sd1;
    if (c6 == 6'b000111) s6 = -2'sd1;
    bad_d6 = (s6 == 2'sd1 && rd_q) || (s6 == -2'sd1 && !rd_q);
    rd_mid = (disp6(c6) != 2'sd0) ? (disp6(c6) == 2'sd1) : rd_q;
    s4 = disp4(c4);
    if (c4 == 4'b1100) s4 = 2'sd1;
    if (c4 == 4'b0011) s4 = -2'sd1;
    bad_d4 = (s4 == 2'sd1 && rd_mid) || (s4 == -2'sd1 && !rd_mid);
    derr_d = bad_d6 || bad_d4;
    rd_d   = (disp4(c4) != 2'sd0) ? (disp4(c4) == 2'sd1) : rd_mid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q     <= 1'b0;
      dout     <= '0;
      kout     <= 1'b0;
      code_err <= 1'b0;
      disp_err <= 1'b0;
    end else if (rd_load) begin
      rd_q <= rd_init;
    end else if (en) begin
      rd_q     <= rd_d;
      dout     <= d_d;
      kout     <= k_d;
      code_err <= cerr_d;
      disp_err <= derr_d;
    end
  end

endmodule
