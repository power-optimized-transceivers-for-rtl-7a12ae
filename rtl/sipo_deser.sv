// sipo_deser: 1:RATIO serial-in parallel-out shift register (CMOS
// deserializer).
//
// Bits from the clock-and-data-recovery circuit shift in on each recovered
// serial clock; the newest bit enters at bit 0, so after RATIO clocks the
// earliest bit sits in bit RATIO-1, matching the transmit bit order. On the
// edge where load is high the shift register (including the bit arriving on
// that edge) is copied to pdata, which then stays stable for a whole word
// and is read on the next rising edge of the divided parallel clock. Word
// boundaries are arbitrary here; the comma aligner finds them.
module sipo_deser #(
  parameter int unsigned RATIO = 10
) (
  input  logic             clk_ser,
  input  logic             rst_n,
  input  logic             load,    // from ser_clkdiv
  input  logic             sin,
  output logic [RATIO-1:0] pdata
);

  logic [RATIO-2:0] sr;   // the newest RATIO-1 bits

  always_ff @(posedge clk_ser or negedge rst_n) begin
    if (!rst_n) begin
      sr    <= '0;
      pdata <= '0;
    end else begin
      sr <= {sr[RATIO-3:0], sin};
      if (load) pdata <= {sr[RATIO-2:0], sin};
    end
  end

endmodule
