`timescale 1ps / 1fs
// Shared constants and types of the 1.2/1.25 Gbit/s serializer.
//
// The word sizes and clock ratios are those of the serializer ASIC: a 20-bit
// external bus is cut into two 10-bit words, each 10-bit word is split into
// an even-bit and an odd-bit half of 5 bits, the bit clock is the VCO clock
// divided by 2, the word clock is the bit clock divided by 5, and the PLL
// feedback is the word clock divided by 3 (VCO / 30 = reference frequency).
// The configuration record is this design's own layout: only the bypass of
// the output retiming flip-flop is a documented setting.
package ser_pkg;

  parameter int unsigned BUS_W    = 20;          // external parallel bus
  parameter int unsigned WORD_W   = 10;          // serialized word
  parameter int unsigned RING_LEN = 5;           // one-hot ring divider stages
  parameter int unsigned FB_DIV   = 3;           // word clock to PLL feedback

  // Test configuration, shifted in through ProgClk/ProgDat/ProgLoad.
  typedef struct packed {
    logic retime_en;  // 1: serial output resampled by the VCO-clock flip-flop
  } cfg_t;

  parameter int unsigned CFG_W = $bits(cfg_t);
  parameter cfg_t CFG_RESET = '{retime_en: 1'b1};

endpackage
