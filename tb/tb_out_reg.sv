// tb_out_reg: checks the single output register: reset value and a one-clock
// delay from d to q for random bytes.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_out_reg;
  int checks = 0, failures = 0;
  logic clk = 0, xrst = 0;
  logic [7:0] d, q, prev;
  always #5 clk = ~clk;
  out_reg #(.WIDTH(8), .RST_VAL(8'hC3)) dut (.clk, .xrst, .d, .q);
  `TB_WATCHDOG(clk, 1000)
  initial begin
    d = 8'h00;
    #12;
    `CHECK(q == 8'hC3, "reset value")
    @(negedge clk) xrst = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      d = 8'($urandom);
      prev = d;
      @(posedge clk); #1;
      `CHECK(q == prev, $sformatf("q=%h expected %h", q, prev))
    end
    `TB_DONE
  end
endmodule
