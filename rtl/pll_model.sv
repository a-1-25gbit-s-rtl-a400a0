`timescale 1ps / 1fs
// Behavioural model of the clock-multiplying PLL (not synthesizable).
//
// The real PLL is analog: a three-state phase/frequency detector, a charge
// pump, an RC loop filter and a VCO of three differential cells with
// symmetrical loads. It multiplies the 40.08 MHz reference by 30 to 1.2 GHz
// (41.67 MHz to 1.25 GHz), the division by 30 being done by the clock
// generator, whose output comes back on fb_clk.
// This model keeps that loop. A three-state detector measures, at each pair
// of rising ref_clk / fb_clk edges, the time by which the feedback edge is
// late (positive) or early (negative): the width of its UP or DN pulse. The
// charge pump and RC filter become a proportional term (the resistor) plus
// an accumulated term (the capacitor) that set the VCO half period:
//     half = NOM_HALF_PS - (KP * err + integ) / (2 * MULT),
//     integ += KI * err,
// clamped to a +-40 % tuning range. With KP = 0.5 and KI = 0.1 the phase
// error falls to about three quarters of its value per reference cycle. lock goes high after
// LOCK_COUNT consecutive comparisons within LOCK_TOL_PS and low again on the
// first one outside. The VCO's own noise is modelled as a random
// deviation of each period, JITTER_PS RMS (2 ps, the VCO cycle-to-cycle
// noise the real design was sized for); reference jitter, supply noise and
// the real VCO tuning curve are not modelled.
// The loop structure, the ratio and the 2 ps VCO noise follow the published
// PLL; the gains, the tuning range, the noise distribution and the lock
// criterion are this model's. Units: ps.
module pll_model #(
  parameter int unsigned MULT        = 30,       // VCO / reference
  parameter real         NOM_HALF_PS = 416.667,  // free-running half period (1.2 GHz)
  parameter real         KP          = 0.5,
  parameter real         KI          = 0.1,
  parameter real         JITTER_PS   = 2.0,      // VCO period noise, RMS
  parameter real         LOCK_TOL_PS = 100.0,
  parameter int unsigned LOCK_COUNT  = 16
) (
  input  logic ref_clk,   // 40.08 MHz LHC reference (41.67 MHz for 1.25 Gbit/s)
  input  logic fb_clk,    // VCO / MULT from the clock generator
  output logic vco_clk,   // 1.2 / 1.25 GHz
  output logic lock       // lock detect
);

  typedef enum logic [1:0] {PFD_IDLE, PFD_UP, PFD_DN} pfd_t;

  pfd_t        pfd;
  realtime     t_first;
  real         half_ps, integ;
  int unsigned good;

  initial begin
    vco_clk = 1'b0;
    lock    = 1'b0;
    pfd     = PFD_IDLE;
    t_first = 0;
    half_ps = NOM_HALF_PS;
    integ   = 0.0;
    good    = 0;
  end

  // approximately normal deviate, mean 0 and variance 1 (sum of 12 uniforms)
  function automatic real gauss();
    real acc;
    acc = 0.0;
    for (int i = 0; i < 12; i++) acc += real'($urandom % 1_000_000) / 1.0e6;
    return acc - 6.0;
  endfunction

  // VCO: each period is 2 * half_ps plus random noise of JITTER_PS RMS
  always begin
    real per;
    per = 2.0 * half_ps + JITTER_PS * gauss();
    #(per / 2.0) vco_clk = 1'b1;
    #(per / 2.0) vco_clk = 1'b0;
  end

  function automatic real clamp(input real v);
    real lo, hi;
    lo = NOM_HALF_PS * 0.6;
    hi = NOM_HALF_PS * 1.4;
    return (v < lo) ? lo : ((v > hi) ? hi : v);
  endfunction

  task automatic update(input real e);
    integ   = integ + KI * e;
    half_ps = clamp(NOM_HALF_PS - (KP * e + integ) / (2.0 * MULT));
    if (e < LOCK_TOL_PS && e > -LOCK_TOL_PS) begin
      if (good < LOCK_COUNT) good++;
    end else begin
      good = 0;
    end
    lock = (good >= LOCK_COUNT);
  endtask

  // three-state phase/frequency detector
  always @(posedge ref_clk) begin
    if (pfd == PFD_DN) begin
      update(-($realtime - t_first));
      pfd = PFD_IDLE;
    end else begin
      pfd     = PFD_UP;
      t_first = $realtime;
    end
  end

  always @(posedge fb_clk) begin
    if (pfd == PFD_UP) begin
      update($realtime - t_first);
      pfd = PFD_IDLE;
    end else begin
      pfd     = PFD_DN;
      t_first = $realtime;
    end
  end

endmodule
