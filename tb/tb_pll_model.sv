`timescale 1ps / 1fs
// Self-checking test of the PLL model.
// The testbench closes the loop with its own divide-by-30 of the VCO clock.
// With a 40.08 MHz reference the model must lock, its VCO period must then
// be the reference period / 30 (1.2 GHz) and the feedback edges must line up
// with the reference edges. The reference is then switched to 41.67 MHz: lock
// must drop, come back, and the VCO must run at 1.25 GHz. The spread of the
// VCO period must match the modelled 2 ps RMS noise.
module tb_pll_model;

  logic ref_clk = 1'b0, fb_clk = 1'b0;
  logic vco_clk, lock;
  int   checks = 0, failures = 0;
  real  ref_half = 12475.0;  // 40.08 MHz

  pll_model dut (.*);

  always #(ref_half) ref_clk = ~ref_clk;

  int div = 0;
  always @(posedge vco_clk) begin
    div = (div == 14) ? 0 : div + 1;
    if (div == 0) fb_clk = ~fb_clk;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  realtime t_ref, t_fb;
  always @(posedge ref_clk) t_ref = $realtime;
  always @(posedge fb_clk)  t_fb  = $realtime;

  // VCO period statistics, for the noise check
  realtime t_v = 0;
  real     jit_sum = 0.0, jit_sq = 0.0;
  int      jit_n = 0;
  bit      jit_on = 1'b0;
  always @(posedge vco_clk) begin
    if (jit_on && t_v > 0) begin
      jit_sum += $realtime - t_v;
      jit_sq  += ($realtime - t_v) * ($realtime - t_v);
      jit_n++;
    end
    t_v = $realtime;
  end
  function automatic real jit_rms();
    real m;
    m = jit_sum / jit_n;
    return $sqrt(jit_sq / jit_n - m * m);
  endfunction

  task automatic measure(input real exp_period, input string name);
    realtime t0;
    real per;
    jit_sum = 0.0; jit_sq = 0.0; jit_n = 0;
    @(posedge vco_clk) t0 = $realtime;
    jit_on = 1'b1;
    repeat (600) @(posedge vco_clk);
    jit_on = 1'b0;
    per = ($realtime - t0) / 600.0;
    check(jit_n > 100 && jit_rms() > 1.0 && jit_rms() < 3.0,
          $sformatf("%s: VCO period noise %f ps RMS, exp about 2", name, jit_rms()));
    check(per > exp_period - 0.5 && per < exp_period + 0.5,
          $sformatf("%s: VCO period %f exp %f", name, per, exp_period));
    @(posedge ref_clk);
    #1000;
    check(t_fb - t_ref < 100.0 && t_ref - t_fb < 100.0,
          $sformatf("%s: phase error %f ps", name, t_fb - t_ref));
    check(lock, {name, ": lock lost"});
  endtask

  int ref_cycles;
  initial begin
    ref_cycles = 0;
    while (!lock && ref_cycles < 400) begin
      @(posedge ref_clk);
      ref_cycles++;
    end
    check(lock, "no lock at 40.08 MHz");
    $display("locked at 40.08 MHz after %0d reference cycles", ref_cycles);
    measure(24950.0 / 30.0, "1.2 GHz");

    ref_half = 12000.0;  // 41.67 MHz
    ref_cycles = 0;
    while (lock && ref_cycles < 50) begin
      @(posedge ref_clk);
      ref_cycles++;
    end
    check(!lock, "lock did not drop on a reference frequency step");
    ref_cycles = 0;
    while (!lock && ref_cycles < 400) begin
      @(posedge ref_clk);
      ref_cycles++;
    end
    check(lock, "no lock at 41.67 MHz");
    $display("locked at 41.67 MHz after %0d reference cycles", ref_cycles);
    measure(24000.0 / 30.0, "1.25 GHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(25000 * 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
