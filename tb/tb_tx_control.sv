// tb_tx_control: walks the transmit state machine through IDLE, FIFO_READ and
// DATA_TRANSMIT: it must stay idle while the FIFO is empty, read the FIFO for
// exactly one cycle, hold transmit and dci until transmitted, then pulse dcc
// and return to idle; back-to-back bytes each get one read, even when a
// second byte is already waiting in the FIFO.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_tx_control;
  int checks = 0, failures = 0;
  logic clk = 0, xrst = 0;
  logic fifo_empty, transmitted;
  logic fifo_read, fifo_read_inc, transmit, dci, dcc;
  int reads;
  always #5 clk = ~clk;
  tx_control dut (.clk, .xrst, .fifo_empty, .transmitted, .fifo_read, .fifo_read_inc, .transmit, .dci, .dcc);
  `TB_WATCHDOG(clk, 5000)
  initial begin
    fifo_empty = 1; transmitted = 0;
    #12 xrst = 1;
    repeat (10) begin
      @(negedge clk);
      `CHECK(!fifo_read && !transmit && !dci && !dcc, "idle while FIFO empty")
    end
    for (int f = 0; f < 6; f++) begin
      fifo_empty = 0;
      @(negedge clk);
      `CHECK(fifo_read && fifo_read_inc && !transmit, "FIFO_READ state")
      fifo_empty = (f % 2) == 0;   // on odd frames a second byte is still waiting
      reads = $urandom_range(3, 30);
      repeat (reads) begin
        @(negedge clk);
        fifo_empty = 1;
        `CHECK(transmit && dci && !fifo_read && !dcc, "DATA_TRANSMIT holds")
      end
      transmitted = 1;
      #1 `CHECK(dcc, "dcc with transmitted")
      @(negedge clk) transmitted = 0;
      `CHECK(!transmit && !dci && !fifo_read, "back to IDLE")
    end
    `TB_DONE
  end
endmodule
