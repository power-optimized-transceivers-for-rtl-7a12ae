// async_fifo: dual-clock FIFO for the client-side and channel-bonding clock-
// domain crossings.
//
// The transceiver's coder runs from a clock divided down from the serial
// clock, the client from its own clock of the same nominal rate; this FIFO
// absorbs the phase difference between them. Write and read pointers are kept
// in Gray code and passed to the other side through two flip-flops, the
// classic Cummings structure. The read side is first-word-fall-through: rdata
// shows the head entry whenever rempty is low, and rinc pops it. Full and
// empty are pessimistic by the two-cycle synchroniser delay.
//
// Interface: push with winc when wfull is low; pop with rinc when rempty is
// low. wlevel and rlevel are the write and read sides' views of the fill
// level. Depth is 2**ADDR_W entries (the buffer depth is this design's
// choice).
//
// Lint note: the Verilator linter reports wrst_n and rrst_n as flopped both synchronously
// and asynchronously. The flip-flops use it only as an asynchronous reset; the
// synchronous use is the 'disable iff' of the assertions against writing a
// full or reading an empty FIFO, which is not logic.
module async_fifo #(
  parameter int unsigned WIDTH  = 19,
  parameter int unsigned ADDR_W = 4
) (
  input  logic              wclk,
  input  logic              wrst_n,
  input  logic              winc,
  input  logic [WIDTH-1:0]  wdata,
  output logic              wfull,
  output logic [ADDR_W:0]   wlevel,
  input  logic              rclk,
  input  logic              rrst_n,
  input  logic              rinc,
  output logic [WIDTH-1:0]  rdata,
  output logic              rempty,
  output logic [ADDR_W:0]   rlevel
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [WIDTH-1:0] mem [DEPTH];

  logic [ADDR_W:0] wbin, wgray, rbin, rgray;
  logic [ADDR_W:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [ADDR_W:0] wgray_r1, wgray_r2;   // write pointer in read domain

  function automatic logic [ADDR_W:0] bin2gray(input logic [ADDR_W:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [ADDR_W:0] gray2bin(input logic [ADDR_W:0] g);
    logic [ADDR_W:0] b;
    b[ADDR_W] = g[ADDR_W];
    for (int i = int'(ADDR_W) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic [ADDR_W:0] wbin_next;
  assign wbin_next = wbin + ADDR_W'(1);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (winc && !wfull) begin
        wbin  <= wbin_next;
        wgray <= bin2gray(wbin_next);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (winc && !wfull) mem[wbin[ADDR_W-1:0]] <= wdata;
  end

  assign wfull  = (wgray == {~rgray_w2[ADDR_W:ADDR_W-1], rgray_w2[ADDR_W-2:0]});
  assign wlevel = wbin - gray2bin(rgray_w2);

  // ---------------- read side ----------------
  logic [ADDR_W:0] rbin_next;
  assign rbin_next = rbin + ADDR_W'(1);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rinc && !rempty) begin
        rbin  <= rbin_next;
        rgray <= bin2gray(rbin_next);
      end
    end
  end

  assign rempty = (rgray == wgray_r2);
  assign rlevel = gray2bin(wgray_r2) - rbin;
  assign rdata  = mem[rbin[ADDR_W-1:0]];

  // A push into a full FIFO or a pop from an empty one loses data
  // silently; the users guard both, and these checks say so.
  a_no_overflow: assert property (@(posedge wclk) disable iff (!wrst_n) !(winc && wfull));
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) !(rinc && rempty));

endmodule
