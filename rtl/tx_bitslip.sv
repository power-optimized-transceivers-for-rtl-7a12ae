// tx_bitslip: transmit bit slip with bypass.
//
// Delays the 10-bit word stream by 0 to WIDTH-1 bit times so that word
// boundaries on the line move against the receiver's deserializer; it is the
// test hook that exercises the receiver's comma alignment. The previous word
// and the current word form a 2*WIDTH-bit window (previous word first on the
// line), and the output is the WIDTH bits that start 'slip' bits earlier in
// the stream. The output mux picks either this slipped word or the unslipped
// input (slip_en low), as the transmit coder's bypass mux does. Registered
// output: one parallel clock of latency in both settings.
module tx_bitslip #(
  parameter int unsigned WIDTH = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     slip_en,
  input  logic [$clog2(WIDTH)-1:0] slip,      // 0 .. WIDTH-1 bits
  input  logic [WIDTH-1:0]         din,
  output logic [WIDTH-1:0]         dout
);

  logic [WIDTH-1:0]   prev;
  logic [2*WIDTH-1:0] win;
  logic [WIDTH-1:0]   slipped;

  assign win     = {prev, din};
  assign slipped = win[WIDTH-1 + int'(slip) -: WIDTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '0;
      dout <= '0;
    end else begin
      prev <= din;
      dout <= slip_en ? slipped : din;
    end
  end

endmodule
