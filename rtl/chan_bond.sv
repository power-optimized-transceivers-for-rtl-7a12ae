// chan_bond: channel bonding of LANES receive lanes into one word stream.
//
// Each lane runs on its own recovered clock and reaches the receiver with its
// own delay. Every lane writes its decoded characters, tagged with start-of-
// packet (sop) and end-of-packet (eop) marks, into a FIFO of its own
// (async_fifo, lane clock to core clock). The read side takes one entry from
// every lane at the same time, and only when all lanes hold one, so the skew
// between lanes is absorbed by the FIFO fill levels.
//
// Deskew rules (this design's), in order: if some heads are end marks and
// others are not, the others are discarded, which closes a packet that one
// lane cut short after an error (every packet a lane starts is closed by an
// end mark, also when it is cut); all heads end marks end the packet. Among
// data heads: if some carry the start-of-burst mark and others do not, the
// others are discarded (stale data from before the burst), so every burst
// starts with the lanes in step; the same for start-of-packet marks (a lane
// that missed a packet's start). A lane that stops delivering (it waits to
// resynchronise after an error) would stall the others: when a lane FIFO is
// four entries from full (the read side sees the write pointer a few clocks
// late) while another lane's is empty, heads are discarded from the non-empty
// lanes. Lane writes into a full FIFO are dropped. The bonded word is kept one
// cycle in a holding register so that the end marks, which carry no data, can
// be folded into a 'last' flag on the packet's final word.
//
// Output: out_valid for one core clock per word, with out_d (lane i in byte
// i), out_k, out_sop and out_last. out_ready low stalls the read side.
//
// Lint note: the Verilator linter reports rst_n and lane_rst_n as flopped both
// synchronously and asynchronously. The flip-flops use it only as an
// asynchronous reset; the synchronous use is the 'disable iff' of the
// assertions inside its lane FIFOs, which is not logic.
module chan_bond
  import xcvr_pkg::*;
#(
  parameter int unsigned LANES  = 2,
  parameter int unsigned ADDR_W = 4
) (
  // lane side
  input  logic                 lane_clk   [LANES],
  input  logic                 lane_rst_n [LANES],
  input  logic                 lane_push  [LANES],
  input  lane_word_t           lane_word  [LANES],
  output logic [LANES-1:0]     lane_full,
  // core side
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 out_ready,
  output logic                 out_valid,
  output logic [8*LANES-1:0]   out_d,
  output logic [LANES-1:0]     out_k,
  output logic                 out_sop,
  output logic                 out_last,
  output logic                 deskew_pulse,   // heads were discarded
  output logic [LANES-1:0][ADDR_W:0] lane_level // lane FIFO levels (skew)
);

  localparam int unsigned W = $bits(lane_word_t);

  lane_word_t       head  [LANES];
  logic [LANES-1:0] empty;
  logic [LANES-1:0] pop;
  logic [LANES-1:0] high;                 // lane FIFO nearly full
  logic [ADDR_W:0]  rlevel [LANES];
  localparam int unsigned DEPTH = 1 << ADDR_W;

  for (genvar i = 0; i < int'(LANES); i++) begin : g_lane
    logic [W-1:0] rd;
    async_fifo #(.WIDTH(W), .ADDR_W(ADDR_W)) u_fifo (
      .wclk   (lane_clk[i]),
      .wrst_n (lane_rst_n[i]),
      .winc   (lane_push[i] && !lane_full[i]),
      .wdata  (lane_word[i]),
      .wfull  (lane_full[i]),
      .wlevel (lane_level[i]),
      .rclk   (clk),
      .rrst_n (rst_n),
      .rinc   (pop[i]),
      .rdata  (rd),
      .rempty (empty[i]),
      .rlevel (rlevel[i])
    );
    assign high[i] = (rlevel[i] >= (ADDR_W + 1)'(DEPTH - 4));
    assign head[i] = lane_word_t'(rd);
  end

  logic [LANES-1:0] is_sob, is_sop, is_eop;
  always_comb begin
    for (int i = 0; i < int'(LANES); i++) begin
      is_sob[i] = head[i].sob;
      is_sop[i] = head[i].sop;
      is_eop[i] = head[i].eop;
    end
  end

  // holding register
  logic               hold_v, hold_sop;
  logic [8*LANES-1:0] hold_d;
  logic [LANES-1:0]   hold_k;

  typedef enum logic [1:0] {ACT_NONE, ACT_DROP, ACT_EOP, ACT_DATA} act_e;
  act_e act;

  always_comb begin
    act = ACT_NONE;
    pop = '0;
    if (high != '0 && empty != '0) begin
      // a lane has stopped (resynchronising after an error) while the others
      // fill up: discard from the others rather than overflow
      act = ACT_DROP;
      pop = ~empty;
    end else if (empty == '0 && out_ready) begin
      if (is_eop != '0 && is_eop != '1) begin
        act = ACT_DROP;
        pop = ~is_eop;
      end else if (is_eop == '1) begin
        act = ACT_EOP;
        pop = '1;
      end else if (is_sob != '0 && is_sob != '1) begin
        act = ACT_DROP;
        pop = ~is_sob;
      end else if (is_sop != '0 && is_sop != '1) begin
        act = ACT_DROP;
        pop = ~is_sop;
      end else begin
        act = ACT_DATA;
        pop = '1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_v    <= 1'b0;
      hold_sop  <= 1'b0;
      hold_d    <= '0;
      hold_k    <= '0;
      out_valid <= 1'b0;
      out_d     <= '0;
      out_k     <= '0;
      out_sop   <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (act == ACT_EOP || act == ACT_DATA) begin
        // a new packet start also ends a held word that never saw its mark
        if (hold_v) begin
          out_valid <= 1'b1;
          out_d     <= hold_d;
          out_k     <= hold_k;
          out_sop   <= hold_sop;
          out_last  <= (act == ACT_EOP) || head[0].sop;
        end
        if (act == ACT_DATA) begin
          hold_v   <= 1'b1;
          hold_sop <= head[0].sop;
          for (int i = 0; i < int'(LANES); i++) begin
            hold_d[8*i +: 8] <= head[i].c.d;
            hold_k[i]        <= head[i].c.k;
          end
        end else begin
          hold_v <= 1'b0;
        end
      end
    end
  end

  assign deskew_pulse = (act == ACT_DROP);

endmodule
