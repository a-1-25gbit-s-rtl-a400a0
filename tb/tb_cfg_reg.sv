`timescale 1ps / 1fs
// Self-checking test of cfg_reg.
// Checks the reset value (retiming on), that shifting alone does not change
// the active configuration, that a load pulse copies the shifted bit in, and
// that reset restores the default. Random values are programmed repeatedly.
module tb_cfg_reg;
  import ser_pkg::*;

  logic prog_clk = 1'b0, prog_dat = 1'b0, prog_load = 1'b0, rst_n = 1'b1;
  // power-on reset: a falling edge at 1 ps, so the asynchronous resets act
  initial #1 rst_n = 1'b0;
  cfg_t cfg;
  int   checks = 0, failures = 0;

  cfg_reg dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic pulse();
    #5000 prog_clk = 1'b1;
    #5000 prog_clk = 1'b0;
  endtask

  task automatic prog_word(input logic [CFG_W-1:0] v);
    cfg_t cfg_old;
    cfg_old = cfg;
    for (int i = CFG_W - 1; i >= 0; i--) begin
      prog_dat = v[i];
      pulse();
    end
    check(cfg == cfg_old, "configuration changed cfg_old load");
    prog_load = 1'b1;
    pulse();
    prog_load = 1'b0;
    check(cfg === cfg_t'(v), $sformatf("loaded %b exp %b", cfg, v));
  endtask

  initial begin
    #1000;
    check(cfg === CFG_RESET, "reset value");
    rst_n = 1'b1;
    prog_word('0);
    check(cfg.retime_en == 1'b0, "bypass selected");
    prog_word('1);
    check(cfg.retime_en == 1'b1, "retiming selected");
    repeat (20) prog_word(CFG_W'($urandom));
    prog_word('0);
    rst_n = 1'b0;
    #1000;
    check(cfg === CFG_RESET, "reset restores default");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
