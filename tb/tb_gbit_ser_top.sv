`timescale 1ps / 1fs
// End-to-end test of the serializer chip at its default parameters.
// The testbench plays the test card: it supplies the reference clock and the
// reset, programs the configuration through prog_clk / prog_dat / prog_load,
// puts random 20-bit words on the bus at each falling edge of out60, and
// receives the serial stream by sampling serial_data in the middle of every
// bit (falling VCO edge). The received stream must be the bus words, bit 0 of
// d first, at one bit per VCO period, after a fixed latency counted from the
// falling out60 edge that changed the bus:
//     bypass: 2 word-clock periods through the word multiplexer and the
//             serializer register (20 VCO periods) + 4 = 24 VCO periods,
//     retimed: one VCO period more = 25.
// Runs: 1.2 Gbit/s (40.08 MHz reference) retimed, then bypassed, then a
// change to 1.25 Gbit/s (41.67 MHz reference) with retiming. Checked on
// the way: lock, the out120 / out60 / out40 periods (10 / 20 / 30 VCO periods),
// the VCO period, and that each mechanism (PLL lock, relock after the rate
// change, load strobes, both bus halves, both output modes, configuration
// loads) happened at least once.
module tb_gbit_ser_top;

  logic        ref_clk = 1'b0, rst_n = 1'b1;
  // power-on reset: a falling edge at 1 ps, so the asynchronous resets act
  initial #1 rst_n = 1'b0;
  logic [19:0] d = '0;
  logic        prog_clk = 1'b0, prog_dat = 1'b0, prog_load = 1'b0;
  logic        serial_data, out120, out60, out40, lock_detect;
  int          checks = 0, failures = 0;
  real         ref_half = 12475.0;   // 40.08 MHz

  gbit_ser_top dut (.*);

  always #(ref_half) ref_clk = ~ref_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // VCO period counter, taken from inside the chip
  wire vco = dut.vco_clk;
  int  cyc = 0;
  always @(posedge vco) cyc++;

  // mechanism counters
  int n_lock = 0, n_load = 0, n_lo = 0, n_hi = 0, n_bypass = 0, n_retime = 0, n_cfg = 0, n_rate = 0;
  always @(posedge lock_detect) n_lock++;
  always @(posedge dut.load) n_load++;
  always @(posedge out120) if (rst_n) begin
    if (out60) n_hi++; else n_lo++;   // out60 before its toggle on this edge
  end

  // clock output periods
  int r120 = -1, r60 = -1, r40 = -1;
  bit clk_chk = 1'b0;
  always @(posedge out120) begin
    if (clk_chk && r120 >= 0) check(cyc - r120 == 10, $sformatf("out120 period %0d", cyc - r120));
    r120 = cyc;
  end
  always @(posedge out60) begin
    if (clk_chk && r60 >= 0) check(cyc - r60 == 20, $sformatf("out60 period %0d", cyc - r60));
    r60 = cyc;
  end
  always @(posedge out40) begin
    if (clk_chk && r40 >= 0) check(cyc - r40 == 30, $sformatf("out40 period %0d", cyc - r40));
    r40 = cyc;
  end

  // traffic and capture
  bit   run = 1'b0;
  logic exp_q[$];
  logic rx_q[$];
  always @(negedge out60) begin
    logic [19:0] w;
    w = 20'($urandom);
    d <= w;
    if (run) for (int i = 0; i < 20; i++) exp_q.push_back(w[i]);
  end
  always @(negedge vco) if (run) rx_q.push_back(serial_data);

  // send NW bus words and return the latency (VCO periods) at which the
  // received stream matches them, -1 if none does
  task automatic traffic(input int nw, output int lat);
    @(negedge out60);
    exp_q.delete();
    rx_q.delete();
    run = 1'b1;
    repeat (nw) @(negedge out60);
    run = 1'b0;
    repeat (10) @(negedge out60);   // let the last word drain (not captured)
    lat = -1;
    for (int l = 0; l < 60 && lat < 0; l++) begin
      bit ok = 1'b1;
      for (int i = 0; i + l < rx_q.size() && i < exp_q.size(); i++)
        if (rx_q[i + l] !== exp_q[i]) begin
          ok = 1'b0;
          break;
        end
      if (ok) lat = l;
    end
    // one check per bit compared at the found latency
    if (lat >= 0)
      for (int i = 0; i + lat < rx_q.size() && i < exp_q.size(); i++) check(1'b1, "");
    else
      check(1'b0, "received stream matches the bus words at no latency");
  endtask

  task automatic prog_pulse();
    #50000 prog_clk = 1'b1;
    #50000 prog_clk = 1'b0;
  endtask

  task automatic set_retime(input logic on);
    prog_dat = on;
    prog_pulse();
    prog_load = 1'b1;
    prog_pulse();
    prog_load = 1'b0;
    n_cfg++;
    check(dut.cfg.retime_en === on, "configuration not loaded");
  endtask

  task automatic wait_lock(input string name);
    int n;
    n = 0;
    while (!lock_detect && n < 500) begin
      @(posedge ref_clk);
      n++;
    end
    check(lock_detect, {"no lock at ", name});
  endtask

  task automatic vco_period(input real exp_ps);
    realtime t0;
    real per;
    @(posedge vco) t0 = $realtime;
    repeat (300) @(posedge vco);
    per = ($realtime - t0) / 300.0;
    check(per > exp_ps - 0.5 && per < exp_ps + 0.5, $sformatf("VCO period %f exp %f", per, exp_ps));
  endtask

  int lat;
  initial begin
    repeat (4) @(posedge ref_clk);
    rst_n = 1'b1;
    check(dut.cfg.retime_en == 1'b1, "retiming is not the reset default");
    wait_lock("40.08 MHz");
    vco_period(24950.0 / 30.0);
    clk_chk = 1'b1;

    // 1.2 Gbit/s, retimed output (default)
    traffic(60, lat);
    n_retime++;
    check(lat == 25, $sformatf("retimed latency %0d exp 25", lat));

    // 1.2 Gbit/s, retiming flip-flop bypassed
    set_retime(1'b0);
    traffic(60, lat);
    n_bypass++;
    check(lat == 24, $sformatf("bypass latency %0d exp 24", lat));

    // change to the Gigabit-Ethernet rate: 41.67 MHz reference, 1.25 GHz VCO
    set_retime(1'b1);
    clk_chk = 1'b0;
    ref_half = 12000.0;
    repeat (5) @(posedge ref_clk);
    wait_lock("41.67 MHz");
    n_rate++;
    vco_period(24000.0 / 30.0);
    clk_chk = 1'b1;
    traffic(60, lat);
    n_retime++;
    check(lat == 25, $sformatf("retimed latency at 1.25 Gbit/s %0d exp 25", lat));

    check(n_lock >= 2,   $sformatf("PLL locked %0d times, expected a lock and a relock", n_lock));
    check(n_load > 0,    "no load strobe");
    check(n_lo > 0,      "no low bus half sent");
    check(n_hi > 0,      "no high bus half sent");
    check(n_retime > 0,  "retimed mode never run");
    check(n_bypass > 0,  "bypass mode never run");
    check(n_cfg > 0,     "configuration never loaded");
    check(n_rate > 0,    "rate never changed");
    $display("mechanisms: lock %0d load %0d low %0d high %0d retimed %0d bypass %0d cfg %0d rate %0d",
             n_lock, n_load, n_lo, n_hi, n_retime, n_bypass, n_cfg, n_rate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
