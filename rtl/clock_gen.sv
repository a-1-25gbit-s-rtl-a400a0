`timescale 1ps / 1fs
// Clock generator of the serializer.
//
// Derives every on-chip clock from the VCO clock (1.2 GHz, or 1.25 GHz):
//   bit_clk  - VCO / 2 from a single toggle flip-flop, so its duty cycle is
//              close to 50 % (600 / 625 MHz). It shifts the two 5-bit shift
//              registers and selects the output multiplexer.
//   ring     - a 5-stage one-hot ring clocked by bit_clk. Stages n1..n4 feed a
//              gate that injects a one into the first stage when n1..n4 are
//              all zero, so exactly one "one" and four "zeros" circulate and a
//              ring that powers up in any state cleans itself up within 5 bit
//              clocks. The last stage is the load strobe of the shift
//              registers (one bit-clock period high in every five).
//   word_clk - set by n4 and reset by n1 through a set/reset latch
//              (120 / 125 MHz). It rises one bit clock before load goes high
//              and is high for 2 of the 5 bit-clock periods.
//   fb_clk   - word_clk / 3 (40.08 / 41.67 MHz), the PLL feedback, also
//              brought off chip. High for one word-clock period in three.
// The ratios, the ring and the n4/n1 set/reset word clock follow the
// published clock generator; the exact injection function, the 2-of-5 duty
// cycle that follows from it and the divide-by-3 counter are this design's.
// No reset is needed: every register here reaches its cycle from any state.
//
// The word_clk set/reset element is a latch on purpose (it is one in the
// original circuit); bit_clk, word_clk and fb_clk are generated clocks.
module clock_gen
  import ser_pkg::*;
#(
  parameter int unsigned RING_STAGES = ser_pkg::RING_LEN,
  parameter int unsigned FB_RATIO    = ser_pkg::FB_DIV
) (
  input  logic vco_clk,   // PLL output, bit rate
  output logic bit_clk,   // vco_clk / 2
  output logic load,      // shift-register load strobe, 1 of RING_STAGES bit clocks
  output logic word_clk,  // bit_clk / RING_STAGES
  output logic fb_clk     // word_clk / FB_RATIO, to the PLL and off chip
);

  localparam int unsigned CW = (FB_RATIO > 1) ? $clog2(FB_RATIO) : 1;

  // divide by two
  always_ff @(posedge vco_clk) bit_clk <= ~bit_clk;

  // one-hot ring divider: ring[0] = n1 ... ring[RING_STAGES-1] = load
  logic [RING_STAGES-1:0] ring;
  always_ff @(posedge bit_clk)
    ring <= {ring[RING_STAGES-2:0], ~|ring[RING_STAGES-2:0]};

  assign load = ring[RING_STAGES-1];

  // set/reset element: set by n4 (stage before load), reset by n1
  always_latch begin
    if (ring[RING_STAGES-2])
      word_clk = 1'b1;
    else if (ring[0])
      word_clk = 1'b0;
  end

  // divide by FB_RATIO for the phase comparison with the reference
  logic [CW-1:0] fb_cnt;
  always_ff @(posedge word_clk) begin
    fb_cnt <= (fb_cnt >= CW'(FB_RATIO - 1)) ? '0 : fb_cnt + 1'b1;
    fb_clk <= (fb_cnt == CW'(FB_RATIO - 1));
  end

endmodule
