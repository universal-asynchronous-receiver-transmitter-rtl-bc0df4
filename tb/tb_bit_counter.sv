// tb_bit_counter: checks the frame data counter against a model: it advances
// only when inc and tick are both high, and clr returns it to zero with
// priority over inc.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_bit_counter;
  int checks = 0, failures = 0;
  logic clk = 0, xrst = 0;
  logic tick, inc, clr;
  logic [3:0] count, exp;
  always #5 clk = ~clk;
  bit_counter #(.W(4)) dut (.clk, .xrst, .tick, .inc, .clr, .count);
  `TB_WATCHDOG(clk, 5000)
  initial begin
    tick = 0; inc = 0; clr = 0; exp = 0;
    #12 xrst = 1;
    `CHECK(count == 0, "reset")
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      tick = 1'($urandom);
      inc  = ($urandom % 4) != 0;
      clr  = ($urandom % 16) == 0;
      if (clr) exp = 0;
      else if (inc && tick) exp = exp + 1;
      @(posedge clk); #1;
      `CHECK(count == exp, $sformatf("count=%0d exp=%0d", count, exp))
    end
    `TB_DONE
  end
endmodule
