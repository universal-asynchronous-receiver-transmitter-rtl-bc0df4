// tb_status_reg: checks the status register: reset value, TX_RDY and RX_RDY
// one clock after the FIFO flags, PERR set by a pulse, held, cleared by a
// status read, and set winning over clear.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_status_reg;
  int checks = 0, failures = 0;
  logic clk = 0, xrst = 0;
  logic tx_full, rx_empty, perr_set, perr_clr;
  logic [2:0] sr_data;
  logic exp_perr;
  always #5 clk = ~clk;
  status_reg dut (.clk, .xrst, .tx_full, .rx_empty, .perr_set, .perr_clr, .sr_data);
  `TB_WATCHDOG(clk, 2000)
  initial begin
    {tx_full, rx_empty, perr_set, perr_clr} = 4'b0100;
    #12;
    `CHECK(sr_data == 3'b001, "reset value")
    @(negedge clk) xrst = 1;
    exp_perr = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      tx_full  = 1'($urandom);
      rx_empty = 1'($urandom);
      perr_set = ($urandom % 8) == 0;
      perr_clr = ($urandom % 4) == 0;
      if (perr_set) exp_perr = 1;
      else if (perr_clr) exp_perr = 0;
      @(posedge clk); #1;
      `CHECK(sr_data == {exp_perr, !rx_empty, !tx_full}, $sformatf("sr=%b", sr_data))
    end
    `TB_DONE
  end
endmodule
