// comma_align: comma detection and word alignment (barrel shifter + FSM).
//
// The deserializer cuts the bit stream into 10-bit words at an arbitrary
// phase. This block joins the previous and the current word into a 20-bit
// window, looks at all ten bit offsets for the comma 0011111 (the first seven
// bits of the K28.7 preamble word sent at negative disparity), and selects
// the word at the locked offset with a barrel shifter. Only this one comma
// polarity is used: a repeated K28.7 also shows the inverse comma 1100000
// five bits away, which would make alignment ambiguous.
//
// Lock rule: a comma seen at the current offset counts up to LOCK_COMMAS.
// Before lock, a comma at another offset moves the offset there and restarts
// the count at one. Once locked, a comma at another offset only starts a
// candidate count: the offset moves (and stays locked) after LOCK_COMMAS
// commas in a row at the new offset, so a bit error that mimics a comma does
// not break the lock, while a new burst from another sender (eight preamble
// words) still realigns within its preamble. 'aligned' is high once the
// count reaches LOCK_COMMAS. While en is low
// (decoder running) the offset and count hold. restart clears the count
// (receiver reset state). dout is registered: the aligned word appears one
// parallel clock after the word that completes it.
module comma_align
  import xcvr_pkg::*;
#(
  parameter int unsigned LOCK_COMMAS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       restart,
  input  logic [9:0] din,
  output logic [9:0] dout,
  output logic       aligned,
  output logic [3:0] offset      // current bit offset, for observation
);

  localparam int unsigned CW = $clog2(LOCK_COMMAS + 1);

  logic [9:0]    prev;
  logic [19:0]   win;
  logic [9:0]    hit;
  logic          found;
  logic [3:0]    pos;
  logic [3:0]    off_q;
  logic [CW-1:0] cnt;
  logic [3:0]    cand_off;   // candidate offset while locked
  logic [CW-1:0] cand_cnt;

  assign win = {prev, din};

  always_comb begin
    found = 1'b0;
    pos   = '0;
    for (int p = 0; p < 10; p++) begin
      hit[p] = (win[19-p -: 7] == COMMA_P);
      if (hit[p] && !found) begin
        found = 1'b1;
        pos   = 4'(p);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev  <= '0;
      dout  <= '0;
      off_q    <= '0;
      cnt      <= '0;
      cand_off <= '0;
      cand_cnt <= '0;
    end else begin
      prev <= din;
      dout <= win[19 - int'(off_q) -: 10];
      if (restart) begin
        cnt      <= '0;
        cand_cnt <= '0;
      end else if (en && found) begin
        if (pos == off_q) begin
          if (cnt != CW'(LOCK_COMMAS)) cnt <= cnt + CW'(1);
          cand_cnt <= '0;
        end else if (cnt != CW'(LOCK_COMMAS)) begin
          off_q <= pos;
          cnt   <= CW'(1);
        end else if (pos == cand_off && cand_cnt != '0) begin
          if (cand_cnt == CW'(LOCK_COMMAS - 1)) begin
            off_q    <= pos;
            cand_cnt <= '0;
          end else begin
            cand_cnt <= cand_cnt + CW'(1);
          end
        end else begin
          cand_off <= pos;
          cand_cnt <= CW'(1);
        end
      end
    end
  end

  // aligned refers to the word in dout (offset of the cycle that made it)
  logic aligned_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) aligned_q <= 1'b0;
    else        aligned_q <= (cnt == CW'(LOCK_COMMAS)) && !restart;
  end
  assign aligned = aligned_q;
  assign offset  = off_q;

endmodule
