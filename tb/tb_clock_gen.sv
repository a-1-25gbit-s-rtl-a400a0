`timescale 1ps / 1fs
// Self-checking test of clock_gen.
// Drives a 1.2 GHz VCO clock and checks, in VCO periods, every ratio of the
// generator: bit_clk toggles on every VCO edge (period 2), load is high for
// exactly one bit-clock period in every 5, word_clk has period 10 and is high
// for 4 (set by n4, reset by n1), word_clk rises 2 VCO periods before the
// bit-clock edge that samples load, and fb_clk has period 30. The ring starts
// from a random state, so the checks begin after a settling time of 20 VCO
// periods (the ring must clean itself up within 5 bit clocks).
module tb_clock_gen;

  logic vco_clk = 1'b0;
  logic bit_clk, load, word_clk, fb_clk;
  int   checks = 0, failures = 0;
  int   cyc = 0;

  clock_gen dut (.*);

  always #417 vco_clk = ~vco_clk;
  always @(posedge vco_clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  localparam int SETTLE = 20;
  localparam int RUN    = 3000;

  // bit clock: toggles on every VCO edge
  logic prev_bit;
  always @(negedge vco_clk) begin
    if (cyc > SETTLE) check(bit_clk !== prev_bit, "bit_clk did not toggle");
    prev_bit = bit_clk;
  end

  // load: one bit-clock high in every five
  int load_hi = 0, load_gap = 0, loads = 0;
  always @(negedge bit_clk) begin
    if (cyc > SETTLE) begin
      if (load) begin
        check(load_hi == 0, "load high for more than one bit clock");
        if (loads > 0) check(load_gap == 4, $sformatf("load gap %0d", load_gap));
        loads++;
        load_hi  = 1;
        load_gap = 0;
      end else begin
        load_hi = 0;
        load_gap++;
      end
    end
  end

  // word clock period, high time and phase to load
  int wc_rise = -1, wc_fall = -1, words = 0;
  always @(posedge word_clk) begin
    if (cyc > SETTLE) begin
      if (wc_rise >= 0) check(cyc - wc_rise == 10, $sformatf("word_clk period %0d", cyc - wc_rise));
      words++;
    end
    wc_rise = cyc;
  end
  always @(negedge word_clk) begin
    if (cyc > SETTLE && wc_rise >= 0) check(cyc - wc_rise == 4, $sformatf("word_clk high %0d", cyc - wc_rise));
    wc_fall = cyc;
  end
  // the bit-clock edge that samples load = 1 is 4 VCO periods after word_clk rose
  always @(posedge bit_clk) begin
    if (cyc > SETTLE && load) check(cyc - wc_rise == 4, $sformatf("load sampled %0d after word_clk", cyc - wc_rise));
  end

  // feedback divider
  int fb_rise = -1, fbs = 0;
  always @(posedge fb_clk) begin
    if (cyc > SETTLE) begin
      if (fb_rise >= 0) check(cyc - fb_rise == 30, $sformatf("fb_clk period %0d", cyc - fb_rise));
      fbs++;
    end
    fb_rise = cyc;
  end

  initial begin
    wait (cyc == RUN);
    check(loads > RUN / 10 - 5, $sformatf("too few loads %0d", loads));
    check(words > RUN / 10 - 5, $sformatf("too few word clocks %0d", words));
    check(fbs > RUN / 30 - 3, $sformatf("too few feedback clocks %0d", fbs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(834 * (RUN + 500));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
