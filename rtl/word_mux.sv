`timescale 1ps / 1fs
// Word multiplexer: 20-bit bus at 60 MWord/s to 10-bit words at 120 MWord/s.
//
// A toggle flip-flop on the word clock makes the 60 MHz bus clock clk60 that
// is brought off chip; the user's logic changes the bus on its falling edge.
// On the word-clock edge where clk60 rises the bus is sampled: the low half
// d[9:0] goes to the output at once and the high half d[19:10] is held and
// sent on the next word-clock edge. So each bus word becomes two 10-bit
// words, low half first, one word-clock period each, and the output changes
// on rising word-clock edges (the serializer register samples the value of
// the previous period on that same edge).
// The rates, widths and the 60 MHz output follow the published block
// diagram; which half goes first, the sampling edge and reset are this
// design's choices. rst_n (active low, asynchronous) clears the outputs.
module word_mux
  import ser_pkg::*;
#(
  parameter int unsigned IN_W  = ser_pkg::BUS_W,
  parameter int unsigned OUT_W = ser_pkg::WORD_W
) (
  input  logic             word_clk,  // 120 / 125 MHz
  input  logic             rst_n,
  input  logic [IN_W-1:0]  d,         // external bus, stable around clk60 rising
  output logic             clk60,     // word_clk / 2, bus word rate
  output logic [OUT_W-1:0] word_out   // to the serializer register
);

  logic [IN_W-OUT_W-1:0] hi_q;

  always_ff @(posedge word_clk or negedge rst_n) begin
    if (!rst_n) begin
      clk60    <= 1'b0;
      hi_q     <= '0;
      word_out <= '0;
    end else begin
      clk60 <= ~clk60;
      if (!clk60) begin          // clk60 rises on this edge: new bus word
        hi_q     <= d[IN_W-1:OUT_W];
        word_out <= d[OUT_W-1:0];
      end else begin
        word_out <= hi_q;
      end
    end
  end

endmodule
