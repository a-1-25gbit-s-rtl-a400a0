`timescale 1ps / 1fs
// Serializer chip top: 20-bit parallel bus in, 1.2 / 1.25 Gbit/s stream out.
//
// Data path: the word multiplexer turns the 20-bit bus (60 MWord/s) into
// 10-bit words at 120 MWord/s; the high-speed serializer turns each 10-bit
// word into ten bits on the VCO clock, bit 0 first. Clocks: the PLL locks its
// VCO to 30 times the reference (40.08 MHz -> 1.2 GHz, or 41.67 MHz ->
// 1.25 GHz for standard Gigabit-Ethernet rate); the clock generator divides
// the VCO clock into the bit clock, the load strobe and the word clock, and
// divides the word clock by 3 back to the reference rate for the PLL.
// Control: the test configuration is shifted in on prog_clk / prog_dat /
// prog_load; its one field bypasses the output retiming flip-flop.
//
// Ports follow the chip's test-card interface: the bus d, the clock
// reference, the active-low reset, the programming pins, the 120, 60 and
// 40 MHz clock outputs and the lock-detect output. serial_data is the CMOS
// level stream that feeds the 50-ohm PECL output driver, an analog cell not
// modelled here. The user's logic should update d on the falling edge of
// out60. The PLL is a behavioural model; all else is synthesizable.
// Latency from the out60 rising edge that samples d to the first serial bit
// is a fixed number of VCO periods (constant-latency transmission).
module gbit_ser_top
  import ser_pkg::*;
(
  input  logic             ref_clk,      // 40.08 MHz (or 41.67 MHz) reference
  input  logic             rst_n,        // active-low reset
  input  logic [BUS_W-1:0] d,            // parallel data, 60 MWord/s
  input  logic             prog_clk,     // configuration shift clock
  input  logic             prog_dat,     // configuration serial data
  input  logic             prog_load,    // configuration load
  output logic             serial_data,  // to the 50-ohm output driver
  output logic             out120,       // word clock
  output logic             out60,        // bus word clock
  output logic             out40,        // reference-rate clock (PLL feedback)
  output logic             lock_detect   // PLL lock
);

  logic              vco_clk, bit_clk, load, word_clk, fb_clk;
  logic [WORD_W-1:0] word;
  cfg_t              cfg;

  pll_model u_pll (
    .ref_clk (ref_clk),
    .fb_clk  (fb_clk),
    .vco_clk (vco_clk),
    .lock    (lock_detect)
  );

  clock_gen u_clkgen (
    .vco_clk  (vco_clk),
    .bit_clk  (bit_clk),
    .load     (load),
    .word_clk (word_clk),
    .fb_clk   (fb_clk)
  );

  cfg_reg u_cfg (
    .prog_clk  (prog_clk),
    .prog_dat  (prog_dat),
    .prog_load (prog_load),
    .rst_n     (rst_n),
    .cfg       (cfg)
  );

  word_mux u_wmux (
    .word_clk (word_clk),
    .rst_n    (rst_n),
    .d        (d),
    .clk60    (out60),
    .word_out (word)
  );

  hs_serializer u_ser (
    .vco_clk    (vco_clk),
    .bit_clk    (bit_clk),
    .word_clk   (word_clk),
    .load       (load),
    .rst_n      (rst_n),
    .retime_en  (cfg.retime_en),
    .word_in    (word),
    .serial_out (serial_data)
  );

  assign out120 = word_clk;
  assign out40  = fb_clk;

endmodule
