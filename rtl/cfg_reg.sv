`timescale 1ps / 1fs
// Serially programmed test-configuration register.
//
// The test card programs the chip through three pins, ProgClk, ProgDat and
// ProgLoad. Here ProgDat is shifted into a CFG_W-bit shift register on every
// rising prog_clk while prog_load is low; a rising prog_clk with prog_load
// high copies the shift register into the active configuration, so a new
// setting takes effect at one instant and the serializer never sees a
// half-shifted value. Bits go in most significant first. rst_n (active low,
// asynchronous) restores CFG_RESET.
// The three-pin interface is the chip's; the register's length, bit order,
// load protocol and reset value are this design's. The one field, the bypass
// of the output retiming flip-flop, is the only documented setting.
// cfg is static configuration for the serializer's clock domains: change it
// only while the serial data is not being used.
module cfg_reg
  import ser_pkg::*;
(
  input  logic prog_clk,
  input  logic prog_dat,
  input  logic prog_load,
  input  logic rst_n,
  output cfg_t cfg
);

  logic [CFG_W-1:0] shreg;

  always_ff @(posedge prog_clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      cfg   <= CFG_RESET;
    end else if (prog_load) begin
      cfg <= cfg_t'(shreg);
    end else begin
      shreg <= (shreg << 1) | CFG_W'(prog_dat);
    end
  end

endmodule
