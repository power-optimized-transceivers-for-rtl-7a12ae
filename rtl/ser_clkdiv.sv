// ser_clkdiv: word-clock divider of a serializer or deserializer lane.
//
// The serial clock (6.25 GHz in the 2 x 6.25 Gb/s burst-mode link) is divided
// by RATIO, the number of bits per parallel word, to give the parallel (PCS)
// clock that runs the 8b/10b coder: 625 MHz for RATIO = 10. A counter runs
// from 0 to RATIO-1; pclk is high for the first half of the count, so its
// rising edge comes with count 0. load pulses for one serial clock when the
// count is RATIO/2 - 1: at the next serial edge, half a word after the pclk
// edge, the shift register exchanges a word with the parallel side, when the
// parallel data are stable. pclk is a register output (a divided clock),
// as the dividers of the reference design are.
module ser_clkdiv #(
  parameter int unsigned RATIO = 10
) (
  input  logic clk_ser,
  input  logic rst_n,
  output logic pclk,
  output logic load
);

  localparam int unsigned CW = $clog2(RATIO);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk_ser or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= CW'(RATIO - 1);     // the first edge starts a word
      pclk <= 1'b0;
      load <= 1'b0;
    end else begin
      cnt  <= (cnt == CW'(RATIO - 1)) ? '0 : cnt + CW'(1);
      // values for the next count
      pclk <= (cnt == CW'(RATIO - 1)) || (cnt < CW'(RATIO / 2 - 1));
      load <= (cnt == CW'(RATIO / 2 - 2));
    end
  end

endmodule
