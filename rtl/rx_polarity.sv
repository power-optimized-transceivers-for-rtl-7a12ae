// rx_polarity: receive polarity correction.
//
// A differential pair that is crossed on the board turns every received bit
// into its complement. When invert is set, this stage complements each
// deserialized word before comma alignment, so that the aligner and decoder
// see the transmitted code. Registered: one parallel clock of latency.
module rx_polarity #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             invert,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= invert ? ~din : din;
  end

endmodule
