// prbs_check: PRBS-7 checker on the deserialized word stream.
//
// Link test: when the far end sends the pseudo-random sequence of
// x^7 + x^6 + 1 instead of coded data, each bit must equal the XOR of the
// bits received 7 and 6 bit times before it. The checker keeps the last 7
// bits and tests all WIDTH bits of each word in parallel (bit WIDTH-1 is the
// earliest on the line), so it needs no word alignment and no seed: it
// synchronises itself from the received bits. An all-zero stream, which
// fits the recurrence, is counted as an error. A word with any failing bit
// counts one error (err_cnt saturates). 'locked' goes high after
// LOCK_WORDS consecutive error-free words and drops at the next error.
// While en is low the counters hold. Registered outputs, one clock latency.
module prbs_check #(
  parameter int unsigned WIDTH      = 10,
  parameter int unsigned LOCK_WORDS = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic             locked,
  output logic             word_err,
  output logic [15:0]      err_cnt
);

  localparam int unsigned LW = $clog2(LOCK_WORDS + 1);

  logic [6:0]          hist;     // hist[0] newest bit
  logic [WIDTH+6:0]    s;        // history followed by this word, s[0] newest
  logic                bad;
  logic [LW-1:0]       good_cnt;

  assign s = {hist, din};

  always_comb begin
    bad = 1'b0;
    for (int i = 0; i < int'(WIDTH); i++)
      if (s[i] != (s[i+7] ^ s[i+6])) bad = 1'b1;
    // all zeros satisfies the recurrence but is not the sequence (no light)
    if (s == '0) bad = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist     <= '0;
      word_err <= 1'b0;
      err_cnt  <= '0;
      good_cnt <= '0;
      locked   <= 1'b0;
    end else if (en) begin
      hist     <= din[6:0];
      word_err <= bad;
      if (bad) begin
        if (err_cnt != '1) err_cnt <= err_cnt + 16'd1;
        good_cnt <= '0;
        locked   <= 1'b0;
      end else if (good_cnt != LW'(LOCK_WORDS)) begin
        good_cnt <= good_cnt + LW'(1);
        locked   <= (good_cnt == LW'(LOCK_WORDS - 1));
      end
    end
  end

endmodule
