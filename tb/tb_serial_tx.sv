// tb_serial_tx: the serial transmitter against a queue standing in for the
// transmit FIFO. Bytes are queued in bursts; a line monitor decodes every
// frame on tx_d by sampling mid-bit and checks the byte, even parity and stop
// bit, that bits last exactly 16 clocks, that each byte is read from the FIFO
// once, and that back-to-back frames start at most 16+3 clocks apart after the
// previous stop bit ends.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_serial_tx;
  localparam int DIV = 16;
  int checks = 0, failures = 0;
  logic clk = 0, xrst = 0;
  logic fifo_empty, fifo_read, fifo_read_inc, tx_d;
  logic [7:0] fifo_data;
  logic [7:0] q[$], sent[$];
  int cyc = 0, n_frames = 0, n_back_to_back = 0, last_stop_end = -1;
  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign fifo_empty = (q.size() == 0);
  always @(posedge clk) begin
    if (fifo_read && q.size() > 0) begin
      fifo_data <= q[0];
      sent.push_back(q[0]);
    end
    if (fifo_read_inc && q.size() > 0) void'(q.pop_front());
  end
  serial_tx #(.DIV(DIV)) dut (.clk, .xrst, .fifo_empty, .fifo_data, .fifo_read, .fifo_read_inc, .tx_d);
  `TB_WATCHDOG(clk, 200000)

  // line monitor
  initial begin
    logic [7:0] b; logic p, s; int t0;
    forever begin
      @(negedge tx_d);
      t0 = cyc;
      if (last_stop_end >= 0 && t0 - last_stop_end <= DIV + 3) n_back_to_back++;
      repeat (DIV / 2) @(posedge clk);
      `CHECK(tx_d == 0, "start bit holds to mid-bit")
      for (int k = 0; k < 8; k++) begin
        repeat (DIV) @(posedge clk);
        b[k] = tx_d;
      end
      repeat (DIV) @(posedge clk); p = tx_d;
      repeat (DIV) @(posedge clk); s = tx_d;
      `CHECK(s == 1, "stop bit")
      `CHECK(p == ^b, $sformatf("parity of %h", b))
      `CHECK(sent.size() > 0 && b == sent[0], $sformatf("byte %h expected %h", b, sent.size() ? sent[0] : 8'h00))
      if (sent.size() > 0) void'(sent.pop_front());
      n_frames++;
      // exact bit length: the stop bit must still be high for DIV/2 - 1 clocks
      repeat (DIV / 2 - 1) @(posedge clk);
      #1 `CHECK(tx_d == 1, "stop bit lasts a full bit")
      last_stop_end = cyc;
    end
  end

  // edge-time monitor: inside a frame every level change of tx_d falls a
  // whole number of bit times (DIV clock periods of 10 ns) after the start edge
  int n_edges = 0;
  initial begin
    longint t0, dt;
    t0 = -1000000;
    @(posedge xrst);
    forever begin
      @(tx_d);
      dt = longint'($time) - t0;
      if (!tx_d && dt >= 11 * DIV * 10) t0 = longint'($time);
      else begin
        n_edges++;
        `CHECK(dt % (DIV * 10) == 0, $sformatf("edge %0d ns into frame", dt))
      end
    end
  end

  initial begin
    fifo_data = 0;
    #12 xrst = 1;
    for (int burst = 0; burst < 6; burst++) begin
      repeat ($urandom_range(1, 2)) q.push_back(8'($urandom));
      wait (q.size() == 0 && sent.size() == 0 && tx_d == 1);
      repeat ($urandom_range(20, 300)) @(posedge clk);
    end
    // one more burst kept topped up, to see frames back to back
    for (int i = 0; i < 6; i++) begin
      wait (q.size() < 2);
      @(posedge clk) q.push_back(8'($urandom));
    end
    wait (q.size() == 0 && sent.size() == 0);
    repeat (12 * DIV) @(posedge clk);
    `CHECK(n_frames >= 12, $sformatf("frames seen %0d", n_frames))
    `CHECK(n_back_to_back >= 3, $sformatf("back-to-back frames %0d", n_back_to_back))
    `TB_DONE
  end
endmodule
