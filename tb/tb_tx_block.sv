// tb_tx_block: drives the transmit block with its own bit tick (every 16
// clocks), a model data counter and a parity counter fed from the block's
// pci/pcc pulses, and checks the line level in every bit slot: start 0, the
// byte bit 0 first, even parity, stop 1, then one transmitted pulse after the
// stop bit, and an idle-high line when transmit is low.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_tx_block;
  int checks = 0, failures = 0;
  logic clk = 0, xrst = 0;
  logic tick, transmit, pci, pcc, tx_d, transmitted;
  logic [7:0] data;
  logic [3:0] data_count, par_count;
  logic exp;
  int cyc = 0, n_trans;
  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign tick = (cyc % 16) == 15;
  always_ff @(posedge clk) begin
    if (!transmit)          data_count <= 0;
    else if (tick)          data_count <= data_count + 1;
    if (pcc)                par_count <= 0;
    else if (pci)           par_count <= par_count + 1;
  end
  tx_block dut (.clk, .xrst, .tick, .transmit, .data, .data_count, .par_count,
                .pci, .pcc, .tx_d, .transmitted);
  `TB_WATCHDOG(clk, 50000)
  initial begin
    transmit = 0; data = 0; par_count = 0;
    #12 xrst = 1;
    repeat (20) @(negedge clk);
    `CHECK(tx_d == 1, "idle high")
    for (int f = 0; f < 20; f++) begin
      data = 8'($urandom);
      @(negedge clk iff tick) transmit = 1;   // align so slot 0 starts at a tick
      n_trans = 0;
      for (int slot = 0; slot <= 11; slot++) begin
        @(posedge clk iff tick);
        @(negedge clk);
        if (transmitted) n_trans++;
        case (slot)
          0:       exp = 0;
          9:       exp = ^data;
          10, 11:  exp = 1;
          default: exp = data[slot-1];
        endcase
        `CHECK(tx_d == exp, $sformatf("frame %0d slot %0d tx_d=%b exp=%b", f, slot, tx_d, exp))
        `CHECK(transmitted == (slot == 11), $sformatf("transmitted in slot %0d", slot))
      end
      transmit = 0;
      @(negedge clk);
      `CHECK(tx_d == 1, "line idle after frame")
    end
    `TB_DONE
  end
endmodule
