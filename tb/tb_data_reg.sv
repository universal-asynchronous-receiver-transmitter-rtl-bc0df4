// tb_data_reg: checks the read data register: it follows the receive FIFO
// head (dxs1=1) or the zero-extended status (dxs1=0) while x_rd is high, and
// holds its value while x_rd is low whatever the inputs do.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_data_reg;
  int checks = 0, failures = 0;
  logic clk = 0, xrst = 0;
  logic x_rd, dxs1;
  logic [7:0] rx_head, dout, exp;
  logic [2:0] sr_data;
  always #5 clk = ~clk;
  data_reg dut (.clk, .xrst, .x_rd, .dxs1, .rx_head, .sr_data, .dout);
  `TB_WATCHDOG(clk, 2000)
  initial begin
    x_rd = 1; dxs1 = 0; rx_head = 0; sr_data = 0;
    #12;
    `CHECK(dout == 8'h00, "reset value")
    exp = 0;
    @(negedge clk) xrst = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      x_rd    = ($urandom % 3) != 0;
      dxs1    = 1'($urandom);
      rx_head = 8'($urandom);
      sr_data = 3'($urandom);
      if (x_rd) exp = dxs1 ? rx_head : {5'b0, sr_data};
      @(posedge clk); #1;
      `CHECK(dout == exp, $sformatf("dout=%h exp=%h", dout, exp))
    end
    `TB_DONE
  end
endmodule
