// tb_sync2: checks the two-stage synchroniser: reset value, then that q equals
// the input applied two clock edges earlier for a run of random bytes.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_sync2;
  int checks = 0, failures = 0;
  logic clk = 0, xrst = 0;
  logic [7:0] d, q;
  logic [7:0] hist [3];
  always #5 clk = ~clk;
  sync2 #(.WIDTH(8), .RST_VAL(8'h5A)) dut (.clk, .xrst, .d, .q);
  `TB_WATCHDOG(clk, 1000)
  initial begin
    d = 8'h00;
    #12;
    `CHECK(q == 8'h5A, "reset value")
    xrst = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      // two rising edges have passed since hist[1] was applied
      if (i >= 2) `CHECK(q == hist[1], $sformatf("q=%h expected %h", q, hist[1]))
      if (i >= 2) `CHECK(q == hist[1] || q != hist[0], "value arrives after one edge only")
      hist[1] = hist[0];
      d = 8'($urandom);
      hist[0] = d;
    end
    `TB_DONE
  end
endmodule
