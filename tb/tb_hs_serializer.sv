`timescale 1ps / 1fs
// Self-checking test of hs_serializer, with its clocks made by the testbench.
// A VCO-clock counter (phase 0..9 per word) produces, with non-blocking
// assignments on the VCO edge: bit_clk toggling every VCO edge (high on even
// phases), word_clk rising at phase 0 and falling at phase 4, and load high
// around the rising bit_clk at phase 4, as the on-chip clock generator does.
// Random 10-bit words change on the falling word_clk. The expected stream is
// worked out from the word captured at phase 0: bit i must be on the output
// in VCO period 4+i after the capture (one more with retiming on); it is
// sampled in the middle of each bit, on the falling VCO edge. The word is
// then checked bit for bit, bit 0 first, at one bit per VCO period. Both the
// bypass and the retimed output are run.
module tb_hs_serializer;

  logic       vco_clk = 1'b0;
  logic       bit_clk = 1'b0, word_clk = 1'b0, load = 1'b0;
  logic       rst_n = 1'b1, retime_en = 1'b0;
  // power-on reset: a falling edge at 1 ps, so the asynchronous resets act
  initial #1 rst_n = 1'b0;
  logic [9:0] word_in = '0;
  logic       serial_out;
  int         checks = 0, failures = 0;

  hs_serializer dut (.*);

  always #417 vco_clk = ~vco_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  int cyc = 0;
  always @(posedge vco_clk) begin
    int ph;
    cyc++;
    ph = cyc % 10;
    bit_clk  <= (ph % 2 == 0);
    word_clk <= (ph == 0) ? 1'b1 : (ph == 4) ? 1'b0 : word_clk;
    load     <= (ph == 3) ? 1'b1 : (ph == 5) ? 1'b0 : load;
  end

  always @(negedge word_clk) word_in <= 10'($urandom);

  // expected bit per VCO period, indexed modulo 64
  logic exp_bit [64];
  logic exp_vld [64];
  initial foreach (exp_vld[i]) exp_vld[i] = 1'b0;

  int words = 0;
  always @(posedge word_clk) begin
    if (rst_n) begin
      for (int i = 0; i < 10; i++) begin
        exp_bit[(cyc + 4 + i + int'(retime_en)) % 64] = word_in[i];
        exp_vld[(cyc + 4 + i + int'(retime_en)) % 64] = 1'b1;
      end
      words++;
    end
  end

  int bits = 0;
  always @(negedge vco_clk) begin
    if (exp_vld[cyc % 64]) begin
      check(serial_out === exp_bit[cyc % 64],
            $sformatf("bit at cycle %0d: got %b exp %b (retime %b)", cyc, serial_out, exp_bit[cyc % 64], retime_en));
      exp_vld[cyc % 64] = 1'b0;
      bits++;
    end
  end

  initial begin
    repeat (25) @(posedge vco_clk);
    check(serial_out == 1'b0, "output not cleared by reset");
    @(negedge word_clk) rst_n = 1'b1;
    repeat (2000) @(posedge vco_clk);
    check(bits >= 1900, $sformatf("bypass: only %0d bits checked", bits));
    // switch to the retimed output between words
    @(negedge word_clk);
    foreach (exp_vld[i]) exp_vld[i] = 1'b0;
    rst_n     = 1'b0;
    retime_en = 1'b1;
    @(negedge word_clk) rst_n = 1'b1;
    bits = 0;
    repeat (2000) @(posedge vco_clk);
    check(bits >= 1900, $sformatf("retimed: only %0d bits checked", bits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(834 * 6000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
