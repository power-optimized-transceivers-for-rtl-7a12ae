// piso_ser: RATIO:1 parallel-in serial-out shift register (CMOS serializer).
//
// The burst-mode link runs each lane at 6.25 Gb/s so that the 10:1
// serializer is a plain CMOS shift register with no current-mode-logic
// multiplexer tree after it. On the serial clock edge where load is high the
// register takes the parallel word; on every other edge it shifts left, so
// bit RATIO-1 (code bit 'a') leaves first. sout is registered: the first bit
// of a word appears one serial clock after the load edge.
module piso_ser #(
  parameter int unsigned RATIO = 10
) (
  input  logic             clk_ser,
  input  logic             rst_n,
  input  logic             load,    // from ser_clkdiv
  input  logic [RATIO-1:0] pdata,   // held by the parallel side
  output logic             sout
);

  logic [RATIO-1:0] sr;

  always_ff @(posedge clk_ser or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else if (load) sr <= pdata;
    else sr <= {sr[RATIO-2:0], 1'b0};
  end

  assign sout = sr[RATIO-1];

endmodule
