// tb_parity_counter: feeds random bytes bit by bit as inc pulses, after a clr,
// and checks that the count equals the number of ones and that its bit 0 is
// the even-parity bit of the byte.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_parity_counter;
  int checks = 0, failures = 0;
  logic clk = 0, xrst = 0;
  logic inc, clr;
  logic [3:0] count;
  logic [7:0] b;
  always #5 clk = ~clk;
  parity_counter #(.W(4)) dut (.clk, .xrst, .inc, .clr, .count);
  `TB_WATCHDOG(clk, 20000)
  initial begin
    inc = 0; clr = 0;
    #12 xrst = 1;
    for (int i = 0; i < 200; i++) begin
      b = 8'($urandom);
      @(negedge clk) clr = 1;
      @(negedge clk) clr = 0;
      `CHECK(count == 0, "cleared")
      for (int k = 0; k < 8; k++) begin
        @(negedge clk) inc = b[k];
        repeat ($urandom % 3) begin @(negedge clk) inc = 0; end
      end
      @(negedge clk) inc = 0;
      `CHECK(count == 4'($countones(b)), $sformatf("count=%0d for %h", count, b))
      `CHECK(count[0] == ^b, "parity bit")
    end
    `TB_DONE
  end
endmodule
