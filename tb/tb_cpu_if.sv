// tb_cpu_if: drives the CPU interface with synchronised-style strobes and
// checks the four access types of the function table: a data write gives one
// tx_wr pulse (none when the transmit FIFO is full or the chip is not
// selected), an IER write changes which status bits raise xintd, a data read
// gives one rx_rd pulse (none when the receive FIFO is empty) and returns the
// FIFO head, and a status read returns {PERR, RX_RDY, TX_RDY} and clears PERR.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_cpu_if;
  int checks = 0, failures = 0;
  logic clk = 0, xrst = 0;
  logic dxs1, xcs1, x_wr, x_rd, tx_full, rx_empty, perr_set, tx_wr, rx_rd, xintd;
  logic [7:0] data_bus1, rx_head, data_out, rd_val;
  logic [2:0] sr_data;
  int n_tx_wr = 0, n_rx_rd = 0;
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (tx_wr) n_tx_wr++;
    if (rx_rd) n_rx_rd++;
  end
  cpu_if dut (.clk, .xrst, .dxs1, .xcs1, .x_wr, .x_rd, .data_bus1, .tx_full, .rx_empty,
              .rx_head, .perr_set, .tx_wr, .rx_rd, .data_out, .xintd, .sr_data);
  `TB_WATCHDOG(clk, 20000)

  task automatic access(input bit dxs, input bit write, input bit cs, input logic [7:0] d);
    @(negedge clk);
    dxs1 = dxs; xcs1 = !cs; data_bus1 = d;
    repeat (2) @(negedge clk);
    if (write) x_wr = 0; else x_rd = 0;
    repeat (4) @(negedge clk);
    rd_val = data_out;
    x_wr = 1; x_rd = 1;
    repeat (2) @(negedge clk);
    xcs1 = 1;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int n_prev;
    dxs1 = 0; xcs1 = 1; x_wr = 1; x_rd = 1; tx_full = 0; rx_empty = 1; perr_set = 0;
    data_bus1 = 0; rx_head = 8'hA5;
    #12 xrst = 1;
    repeat (3) @(negedge clk);
    `CHECK(xintd == 1, "no interrupt after reset (all masked)")
    // data writes
    n_prev = n_tx_wr; access(1, 1, 1, 8'h3C);
    `CHECK(n_tx_wr == n_prev + 1, "one tx_wr per data write")
    n_prev = n_tx_wr; access(1, 1, 0, 8'h3C);
    `CHECK(n_tx_wr == n_prev, "no write when not selected")
    tx_full = 1;
    n_prev = n_tx_wr; access(1, 1, 1, 8'h11);
    `CHECK(n_tx_wr == n_prev, "no write when transmit FIFO full")
    // status read while TX full, RX empty
    access(0, 0, 1, 8'h00);
    `CHECK(rd_val == 8'b000, $sformatf("status %b", rd_val))
    tx_full = 0; rx_empty = 0;
    repeat (2) @(negedge clk);
    access(0, 0, 1, 8'h00);
    `CHECK(rd_val == 8'b011, $sformatf("status %b", rd_val))
    // IER: unmask RX_RDY only (bit 1 = 0)
    access(0, 1, 1, 8'b1111_1101);
    `CHECK(sr_data == 3'b011, "status")
    @(negedge clk);
    `CHECK(xintd == 0, "RX_RDY interrupt when unmasked")
    rx_empty = 1;
    repeat (2) @(negedge clk);
    `CHECK(xintd == 1, "no interrupt: TX_RDY masked, RX empty")
    // PERR: set, interrupt when unmasked, cleared by status read
    access(0, 1, 1, 8'b0000_0011);
    @(negedge clk) perr_set = 1;
    @(negedge clk) perr_set = 0;
    @(negedge clk);
    `CHECK(sr_data[2] == 1 && xintd == 0, "PERR sets and interrupts")
    access(0, 0, 1, 8'h00);
    `CHECK(rd_val[2] == 1, "status read shows PERR")
    `CHECK(sr_data[2] == 0, "status read clears PERR")
    // data read
    rx_empty = 0; rx_head = 8'h5E;
    n_prev = n_rx_rd; access(1, 0, 1, 8'h00);
    `CHECK(n_rx_rd == n_prev + 1, "one rx_rd per data read")
    `CHECK(rd_val == 8'h5E, $sformatf("read data %h", rd_val))
    rx_empty = 1;
    n_prev = n_rx_rd; access(1, 0, 1, 8'h00);
    `CHECK(n_rx_rd == n_prev, "no pop of an empty FIFO")
    `TB_DONE
  end
endmodule
