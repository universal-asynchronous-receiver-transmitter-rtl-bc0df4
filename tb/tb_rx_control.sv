// tb_rx_control: walks the receive state machine: restart and dcc held in
// IDLE, start on a low r_xd, receive/dci until received, then exactly one
// FIFO_WRITE cycle for a good frame with room, and no write for a bad frame or
// a full FIFO.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_rx_control;
  int checks = 0, failures = 0;
  logic clk = 0, xrst = 0;
  logic r_xd, received, frame_ok, fifo_full;
  logic restart, receive, dci, dcc, fifo_write, fifo_write_inc;
  int writes;
  always #5 clk = ~clk;
  rx_control dut (.clk, .xrst, .r_xd, .received, .frame_ok, .fifo_full,
                  .restart, .receive, .dci, .dcc, .fifo_write, .fifo_write_inc);
  `TB_WATCHDOG(clk, 10000)
  initial begin
    r_xd = 1; received = 0; frame_ok = 1; fifo_full = 0;
    #12 xrst = 1;
    repeat (5) begin
      @(negedge clk);
      `CHECK(restart && dcc && !receive && !fifo_write, "IDLE outputs")
    end
    for (int f = 0; f < 12; f++) begin
      logic ok, full;
      ok = 1'($urandom); full = ($urandom % 3) == 0;
      r_xd = 0;
      @(negedge clk);
      r_xd = 1;
      `CHECK(receive && dci && !restart, "DATA_RECEIVE")
      repeat ($urandom_range(2, 20)) begin
        @(negedge clk);
        `CHECK(receive && !fifo_write, "still receiving")
      end
      received = 1; frame_ok = ok; fifo_full = full;
      @(negedge clk);
      received = 0;
      writes = 0;
      repeat (3) begin
        if (fifo_write) begin
          writes++;
          `CHECK(fifo_write_inc, "write_inc with write")
        end
        @(negedge clk);
      end
      `CHECK(writes == ((ok && !full) ? 1 : 0), $sformatf("writes=%0d ok=%0b full=%0b", writes, ok, full))
      `CHECK(restart && !receive, "back to IDLE")
    end
    `TB_DONE
  end
endmodule
