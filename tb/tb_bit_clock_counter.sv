// tb_bit_clock_counter: checks that tick comes once every 16 clocks at the
// configured phase (free-running, TICK_AT=15) and that after restart is
// released the first tick comes TICK_AT clocks later (receive setting, TICK_AT=7).
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_bit_clock_counter;
  int checks = 0, failures = 0;
  logic clk = 0, xrst = 0;
  logic restart_a = 0, restart_b = 0, tick_a, tick_b;
  int last_a, cyc;
  always #5 clk = ~clk;
  bit_clock_counter #(.DIV(16), .TICK_AT(15)) dut_a (.clk, .xrst, .restart(restart_a), .tick(tick_a));
  bit_clock_counter #(.DIV(16), .TICK_AT(7))  dut_b (.clk, .xrst, .restart(restart_b), .tick(tick_b));
  `TB_WATCHDOG(clk, 5000)
  initial begin
    #12 xrst = 1;
    cyc = 0; last_a = -1;
    // free running: the count leaves reset at 0, so the first tick is 15 clocks
    // after reset is released, then one every 16
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      cyc++;
      if (tick_a) begin
        if (last_a < 0) `CHECK(cyc == 15, $sformatf("first tick at %0d", cyc))
        else            `CHECK(cyc - last_a == 16, $sformatf("period %0d", cyc - last_a))
        last_a = cyc;
      end
    end
    `CHECK(last_a > 0, "ticks seen")
    // restart: hold, release, expect a tick exactly TICK_AT=7 cycles later, then 16
    for (int r = 0; r < 5; r++) begin
      @(negedge clk) restart_b = 1;
      repeat ($urandom % 20) @(negedge clk);
      `CHECK(!tick_b, "no tick during restart")
      @(negedge clk) restart_b = 0;
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (!tick_b && cyc < 40);
      `CHECK(cyc == 7, $sformatf("first tick %0d after restart", cyc))
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (!tick_b && cyc < 40);
      `CHECK(cyc == 16, $sformatf("second tick %0d later", cyc))
    end
    `TB_DONE
  end
endmodule
