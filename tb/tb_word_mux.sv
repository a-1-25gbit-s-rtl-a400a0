`timescale 1ps / 1fs
// Self-checking test of word_mux.
// A 120 MHz word clock drives the multiplexer; random 20-bit words are put on
// the bus at every falling edge of the 60 MHz output. Checks: clk60 toggles
// on every word-clock edge; in the word-clock period that starts with clk60
// rising the output is the low half of the bus word sampled on that edge, in
// the next period its high half (so two 10-bit words per bus word, low half
// first, with no extra cycles); reset clears the output.
module tb_word_mux;

  logic        word_clk = 1'b0;
  logic        rst_n = 1'b1;
  // power-on reset: a falling edge at 1 ps, so the asynchronous resets act
  initial #1 rst_n = 1'b0;
  logic [19:0] d = '0;
  logic        clk60;
  logic [9:0]  word_out;
  int          checks = 0, failures = 0;

  word_mux dut (.*);

  always #4170 word_clk = ~word_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // bus driver
  always @(negedge clk60) d <= 20'($urandom);

  logic [19:0] sampled;
  logic        have = 1'b0;
  int          lo_seen = 0, hi_seen = 0;
  always @(posedge clk60) begin
    sampled = d;
    have    = 1'b1;
  end

  logic prev60;
  int   since_rst = 0;
  always @(negedge word_clk) begin
    if (rst_n) since_rst++;
    if (since_rst > 2) begin
      check(clk60 !== prev60, "clk60 did not toggle");
      if (have) begin
        if (clk60) begin
          check(word_out === sampled[9:0], $sformatf("low half %h exp %h", word_out, sampled[9:0]));
          lo_seen++;
        end else begin
          check(word_out === sampled[19:10], $sformatf("high half %h exp %h", word_out, sampled[19:10]));
          hi_seen++;
        end
      end
    end
    prev60 = clk60;
  end

  initial begin
    repeat (3) @(negedge word_clk);
    check(word_out == '0 && clk60 == 1'b0, "reset state");
    @(posedge word_clk);
    rst_n <= 1'b1;
    repeat (400) @(posedge word_clk);
    check(lo_seen > 150 && hi_seen > 150, "too few words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(8340 * 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
