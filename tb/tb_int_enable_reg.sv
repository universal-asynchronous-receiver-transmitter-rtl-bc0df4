// tb_int_enable_reg: checks the interrupt enable register: reset to all
// masked, loads only when we is high, holds otherwise.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_int_enable_reg;
  int checks = 0, failures = 0;
  logic clk = 0, xrst = 0;
  logic we;
  logic [2:0] din, ier_data, exp;
  always #5 clk = ~clk;
  int_enable_reg dut (.clk, .xrst, .we, .din, .ier_data);
  `TB_WATCHDOG(clk, 2000)
  initial begin
    we = 0; din = 0;
    #12;
    `CHECK(ier_data == 3'b111, "reset value")
    exp = 3'b111;
    @(negedge clk) xrst = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we  = 1'($urandom);
      din = 3'($urandom);
      if (we) exp = din;
      @(posedge clk); #1;
      `CHECK(ier_data == exp, $sformatf("ier=%b exp=%b", ier_data, exp))
    end
    `TB_DONE
  end
endmodule
