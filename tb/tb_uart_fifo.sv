// tb_uart_fifo: checks the FIFO at the receive depth (4) against a queue
// model under random pushes and pops: head, registered rd_data, full and
// empty flags, pointer wrap-around, and that pushes when full and pops when
// empty are ignored. Counts how often each of those corner cases occurred.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_uart_fifo;
  localparam int DEPTH = 4;
  int checks = 0, failures = 0;
  int n_full_push = 0, n_empty_pop = 0, n_wrap = 0;
  logic clk = 0, xrst = 0;
  logic wr, rd;
  logic [7:0] wr_data, rd_data, head, exp_rd;
  logic full, empty;
  logic [7:0] q[$];
  always #5 clk = ~clk;
  uart_fifo #(.DEPTH(DEPTH), .WIDTH(8)) dut (
    .clk, .xrst, .wr, .wr_inc(wr), .wr_data, .rd, .rd_inc(rd), .rd_data, .head, .full, .empty
  );
  `TB_WATCHDOG(clk, 5000)
  initial begin
    wr = 0; rd = 0; wr_data = 0; exp_rd = 0;
    #12 xrst = 1;
    `CHECK(empty && !full, "empty after reset")
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      `CHECK(empty == (q.size() == 0), "empty flag")
      `CHECK(full == (q.size() == DEPTH), "full flag")
      if (q.size() > 0) `CHECK(head == q[0], $sformatf("head=%h exp=%h", head, q[0]))
      `CHECK(rd_data == exp_rd, "rd_data")
      // bias towards filling or draining in phases
      wr = ((i / 50) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      rd = ((i / 50) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      wr_data = 8'($urandom);
      if (wr && q.size() == DEPTH) n_full_push++;
      if (rd && q.size() == 0) n_empty_pop++;
      @(posedge clk);
      begin
        bit can_push;
        can_push = wr && q.size() < DEPTH;  // a push is refused when full, even with a pop
        if (rd && q.size() > 0) begin
          exp_rd = q.pop_front();
          n_wrap++;
        end
        if (can_push) q.push_back(wr_data);
      end
    end
    `CHECK(n_full_push > 0, "push when full exercised")
    `CHECK(n_empty_pop > 0, "pop when empty exercised")
    `CHECK(n_wrap > 2 * DEPTH, "pointer wrap exercised")
    $display("push-when-full=%0d pop-when-empty=%0d pops=%0d", n_full_push, n_empty_pop, n_wrap);
    `TB_DONE
  end
endmodule
