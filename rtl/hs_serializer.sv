`timescale 1ps / 1fs
// 10-bit high-speed serializer built from half-rate static shift registers.
//
// The bit rate (1.2 / 1.25 Gbit/s) is twice the rate at which any register
// here other than the optional output flip-flop is clocked:
//   word_q   - register loaded with the 10-bit word on every rising word_clk.
//   sr_even  - 5-bit shift register (SR-1) holding bits 0,2,4,6,8.
//   sr_odd   - 5-bit shift register (SR-2) holding bits 1,3,5,7,9.
//              Both load word_q on the rising bit_clk edge where load is
//              high and otherwise shift towards bit 0, one bit per bit_clk.
//   odd_lat  - latch, open while bit_clk is low, that delays SR-2 by half a
//              bit-clock period.
//   mux      - selected by bit_clk itself: SR-1 while bit_clk is high, the
//              latch while it is low, giving 0,1,2,...,9 (bit 0 first).
//   retimed  - flip-flop on the VCO clock that resamples the mux output,
//              removing bit-clock duty-cycle and mux asymmetry from the bit
//              widths; retime_en = 0 bypasses it.
// Timing, counted in VCO periods from the rising word_clk that captures a
// word when driven by clock_gen: bit 0 leaves the mux 4 periods later and
// bit i 4+i periods later; with retiming each bit is one period later still.
//
// The split into even and odd shift registers, the half-period latch, the
// clock-selected mux and the bypassable resampling flip-flop follow the
// published serializer. Shifting towards bit 0, the mux polarity (the one
// that yields the bits in order with a latch open on low bit_clk) and the
// asynchronous active-low reset of the shift path are this design's.
//
// odd_lat is a latch by design, and bit_clk is used as data (mux select):
// both are the circuit, not coding slips. An assertion checks that load is
// never high on two bit-clock edges in a row.
module hs_serializer
  import ser_pkg::*;
#(
  parameter int unsigned W = ser_pkg::WORD_W
) (
  input  logic         vco_clk,    // bit-rate clock
  input  logic         bit_clk,    // vco_clk / 2
  input  logic         word_clk,   // bit_clk / (W/2)
  input  logic         load,       // shift-register load strobe, bit_clk domain
  input  logic         rst_n,
  input  logic         retime_en,  // static: 1 = resample output on vco_clk
  input  logic [W-1:0] word_in,
  output logic         serial_out
);

  localparam int unsigned H = W / 2;

  logic [W-1:0] word_q;
  logic [H-1:0] sr_even, sr_odd;
  logic         odd_lat, mux_out, retimed;

  always_ff @(posedge word_clk or negedge rst_n) begin
    if (!rst_n) word_q <= '0;
    else        word_q <= word_in;
  end

  always_ff @(posedge bit_clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_even <= '0;
      sr_odd  <= '0;
    end else if (load) begin
      for (int i = 0; i < H; i++) begin
        sr_even[i] <= word_q[2*i];
        sr_odd[i]  <= word_q[2*i+1];
      end
    end else begin
      sr_even <= {1'b0, sr_even[H-1:1]};
      sr_odd  <= {1'b0, sr_odd[H-1:1]};
    end
  end

  always_latch begin
    if (!bit_clk) odd_lat = sr_odd[0];
  end

  assign mux_out = bit_clk ? sr_even[0] : odd_lat;

  always_ff @(posedge vco_clk) retimed <= mux_out;

  assign serial_out = retime_en ? retimed : mux_out;

  // the load strobe is one bit-clock period wide, once per word
  a_load_one_period: assert property (@(posedge bit_clk) disable iff (!rst_n) load |=> !load);

endmodule
