// tb_serial_rx: sends frames into the serial receiver at 16 clocks per bit
// with a random phase against the clock: good frames, frames with a wrong
// parity bit, frames with a missing stop bit and short glitches (false
// starts). Checks that exactly the good frames are written to the FIFO, in
// order and with the right byte, one write cycle each; that perr_set pulses
// once per parity error; that nothing is written while fifo_full is high; and
// that each write comes 10.5 bit times (+/-2 clocks) after the start edge.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_serial_rx;
  localparam int DIV = 16;
  int checks = 0, failures = 0;
  logic clk = 0, xrst = 0;
  logic r_xd, fifo_full, fifo_write, fifo_write_inc, perr_set;
  logic [7:0] rec_data;
  logic [7:0] expq[$];
  int n_perr = 0, n_perr_exp = 0, n_fre = 0, n_glitch = 0, n_full_drop = 0, n_good = 0;
  longint t_start;
  always #5 clk = ~clk;
  serial_rx #(.DIV(DIV)) dut (.clk, .xrst, .r_xd, .fifo_full, .fifo_write, .fifo_write_inc, .rec_data, .perr_set);
  `TB_WATCHDOG(clk, 400000)

  always @(posedge clk) begin
    if (xrst && perr_set) n_perr++;
    if (xrst && fifo_write) begin
      longint dt;
      dt = longint'($time) - t_start;
      `CHECK(fifo_write_inc, "write_inc with write")
      `CHECK(!fifo_full, "no write when full")
      `CHECK(expq.size() > 0 && rec_data == expq[0], $sformatf("rec_data=%h", rec_data))
      `CHECK(dt >= longint'((10 * DIV + DIV / 2 - 2) * 10) && dt <= longint'((10 * DIV + DIV / 2 + 4) * 10), $sformatf("write %0d ns after start", dt))
      if (expq.size() > 0) void'(expq.pop_front());
      n_good++;
    end
  end

  task automatic send(input logic [7:0] b, input bit bad_par, input bit bad_stop);
    logic [10:0] fr;
    fr = {!bad_stop, (^b) ^ bad_par, b, 1'b0};
    #($urandom_range(0, 9));
    t_start = longint'($time);
    for (int k = 0; k < 11; k++) begin
      r_xd = fr[k];
      repeat (DIV) @(posedge clk);
    end
    r_xd = 1;
    repeat ($urandom_range(1, 3) * DIV) @(posedge clk);
  endtask

  initial begin
    r_xd = 1; fifo_full = 0;
    #12 xrst = 1;
    repeat (40) @(posedge clk);
    for (int f = 0; f < 60; f++) begin
      logic [7:0] b; int kind;
      b = 8'($urandom);
      kind = $urandom % 10;
      fifo_full = (f % 15) == 14;
      if (kind == 0) begin
        // glitch shorter than half a bit: a false start, nothing stored
        r_xd = 0; repeat (4) @(posedge clk); r_xd = 1;
        repeat (3 * DIV) @(posedge clk);
        n_glitch++;
      end else if (kind == 1) begin
        send(b, 1, 0); n_perr_exp++;
      end else if (kind == 2) begin
        send(b, 0, 1); n_fre++;
        repeat (2 * DIV) @(posedge clk);
      end else begin
        if (fifo_full) n_full_drop++;
        else expq.push_back(b);
        send(b, 0, 0);
      end
      fifo_full = 0;
    end
    repeat (4 * DIV) @(posedge clk);
    `CHECK(expq.size() == 0, $sformatf("%0d good frames not written", expq.size()))
    `CHECK(n_perr == n_perr_exp, $sformatf("perr pulses %0d expected %0d", n_perr, n_perr_exp))
    `CHECK(n_perr_exp > 0 && n_fre > 0 && n_glitch > 0 && n_full_drop > 0, "every frame kind exercised")
    $display("good=%0d perr=%0d fre=%0d glitch=%0d full_drop=%0d", n_good, n_perr_exp, n_fre, n_glitch, n_full_drop);
    `TB_DONE
  end
endmodule
