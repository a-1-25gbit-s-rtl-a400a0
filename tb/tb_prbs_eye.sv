`timescale 1ps / 1fs
// Workload test: 255-bit pseudo-random sequence through the whole chip.
// The chip's eye-diagram measurement sends a pseudo-random sequence of about
// 256 bits at 1.2 Gbit/s. Here the sequence is the maximal-length PRBS-8
// b[n] = b[n-8] ^ b[n-6] ^ b[n-5] ^ b[n-4] (period 255). The bus carries it
// 20 bits per word, d[0] first. At the output a self-synchronizing checker,
// like a bit-error-rate tester, predicts every received bit from the 8 before
// it. That finds no error only if the chip sends every bit once, in order,
// with none lost or repeated. Transitions are counted from bit to bit (128
// per 255-bit period). The testbench also checks the eye: every
// transition of serial_data falls on a rising VCO edge, so every bit lasts a
// whole number of VCO periods. The run is made with the retiming flip-flop on
// (reset default) and then bypassed, after which the run is repeated at
// 1.25 Gbit/s with a 41.67 MHz reference.
module tb_prbs_eye;

  logic        ref_clk = 1'b0, rst_n = 1'b1;
  // power-on reset: a falling edge at 1 ps, so the asynchronous resets act
  initial #1 rst_n = 1'b0;
  logic [19:0] d = '0;
  logic        prog_clk = 1'b0, prog_dat = 1'b0, prog_load = 1'b0;
  logic        serial_data, out120, out60, out40, lock_detect;
  int          checks = 0, failures = 0;
  real         ref_half = 12475.0;

  gbit_ser_top dut (.*);

  always #(ref_half) ref_clk = ~ref_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // PRBS-8 source, 20 bits per bus word
  logic [7:0] gen = 8'h01;   // gen[0] = newest bit
  always @(negedge out60) begin
    logic [19:0] w;
    for (int i = 0; i < 20; i++) begin
      logic b;
      b = gen[7] ^ gen[5] ^ gen[4] ^ gen[3];
      gen = {gen[6:0], b};
      w[i] = b;
    end
    d <= w;
  end

  // checker and eye monitor
  wire     vco = dut.vco_clk;
  realtime t_vco;
  always @(posedge vco) t_vco = $realtime;

  bit         on = 1'b0;
  logic [7:0] hist = '0;
  int         nbits = 0, nerr = 0, ones = 0, edges = 0, bad_edges = 0;
  always @(negedge vco) begin
    logic pred;
    pred = hist[7] ^ hist[5] ^ hist[4] ^ hist[3];
    if (on) begin
      nbits++;
      if (nbits > 8 && serial_data !== pred) nerr++;
      if (serial_data) ones++;
      if (serial_data !== hist[0]) edges++;
    end
    hist = {hist[6:0], serial_data};
  end
  // every value change, zero-width ones included, must sit on a VCO edge
  always @(serial_data) if (on) begin
    if ($realtime != t_vco) bad_edges++;
  end

  task automatic measure(input string name);
    nbits = 0; nerr = 0; ones = 0; edges = 0; bad_edges = 0;
    on = 1'b1;
    repeat (255 * 8) @(negedge vco);
    on = 1'b0;
    check(nerr == 0, $sformatf("%s: %0d bit errors in %0d bits", name, nerr, nbits));
    // 128 ones per 255-bit period
    check(ones >= 128 * 8 - 8 && ones <= 128 * 8 + 8, $sformatf("%s: %0d ones in %0d bits", name, ones, nbits));
    check(edges >= 128 * 8 - 8 && edges <= 128 * 8 + 8, $sformatf("%s: %0d transitions", name, edges));
    check(bad_edges == 0, $sformatf("%s: %0d transitions off the VCO edge", name, bad_edges));
    $display("%s: %0d bits, %0d errors, %0d transitions", name, nbits, nerr, edges);
  endtask

  task automatic prog_pulse();
    #50000 prog_clk = 1'b1;
    #50000 prog_clk = 1'b0;
  endtask

  task automatic set_retime(input logic v);
    prog_dat = v;
    prog_pulse();
    prog_load = 1'b1;
    prog_pulse();
    prog_load = 1'b0;
  endtask

  task automatic wait_lock();
    int n;
    n = 0;
    while (!lock_detect && n < 500) begin
      @(posedge ref_clk);
      n++;
    end
    check(lock_detect, "no lock");
  endtask

  initial begin
    repeat (4) @(posedge ref_clk);
    rst_n = 1'b1;
    wait_lock();
    repeat (10) @(posedge ref_clk);
    measure("1.2 Gbit/s retimed");
    set_retime(1'b0);
    repeat (2) @(posedge ref_clk);
    measure("1.2 Gbit/s bypass");
    set_retime(1'b1);
    ref_half = 12000.0;
    repeat (5) @(posedge ref_clk);
    wait_lock();
    repeat (10) @(posedge ref_clk);
    measure("1.25 Gbit/s retimed");
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
