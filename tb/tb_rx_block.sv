// tb_rx_block: feeds the receive block frames through a model data counter
// and a parity counter driven by its pci/pcc pulses, with a tick in the middle
// of each bit, and checks rec_data, perr (bad parity) and x_fre (missing stop
// bit or false start) at the received pulse.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_rx_block;
  int checks = 0, failures = 0;
  logic clk = 0, xrst = 0;
  logic tick, receive, rx_d, pci, pcc, perr, x_fre, received;
  logic [7:0] rec_data, data;
  logic [3:0] data_count, par_count;
  logic bad_par, bad_stop, false_start;
  int n_perr = 0, n_fre = 0, n_false = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (!receive)  data_count <= 0;
    else if (tick) data_count <= data_count + 1;
    if (pcc)       par_count <= 0;
    else if (pci)  par_count <= par_count + 1;
  end
  rx_block dut (.clk, .xrst, .tick, .receive, .rx_d, .data_count, .par_count,
                .pci, .pcc, .rec_data, .perr, .x_fre, .received);
  `TB_WATCHDOG(clk, 100000)
  task automatic bit_slot(input logic v, input bit last);
    rx_d = v;
    repeat (7) @(negedge clk);
    tick = 1;
    @(negedge clk);
    tick = 0;
    if (!last) repeat (8) @(negedge clk);
  endtask
  initial begin
    tick = 0; receive = 0; rx_d = 1; par_count = 0;
    #12 xrst = 1;
    repeat (5) @(negedge clk);
    for (int f = 0; f < 40; f++) begin
      data = 8'($urandom);
      bad_par = ($urandom % 4) == 0;
      bad_stop = ($urandom % 5) == 0;
      false_start = ($urandom % 8) == 0;
      receive = 1;
      bit_slot(false_start, false_start);
      if (!false_start) begin
        for (int k = 0; k < 8; k++) bit_slot(data[k], 0);
        bit_slot((^data) ^ bad_par, 0);
        bit_slot(!bad_stop, 1);
      end
      `CHECK(received, "received pulse")
      `CHECK(x_fre == (bad_stop || false_start), $sformatf("x_fre=%b", x_fre))
      if (!false_start) begin
        `CHECK(rec_data == data, $sformatf("rec_data=%h exp=%h", rec_data, data))
        `CHECK(perr == bad_par, $sformatf("perr=%b exp=%b", perr, bad_par))
        if (bad_par) n_perr++;
        if (bad_stop) n_fre++;
      end else n_false++;
      @(negedge clk);
      `CHECK(!received, "received is one cycle")
      receive = 0;
      rx_d = 1;
      repeat (4) @(negedge clk);
    end
    `CHECK(n_perr > 0 && n_fre > 0 && n_false > 0, "all error kinds exercised")
    `TB_DONE
  end
endmodule
