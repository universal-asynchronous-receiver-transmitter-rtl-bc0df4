// tb_xint_gen: exhaustive check of the interrupt equation over all 64
// combinations of status and mask bits, against a bit-by-bit reference.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_xint_gen;
  int checks = 0, failures = 0;
  logic [2:0] sr_data, ier_data;
  logic xintd, pending;
  xint_gen dut (.sr_data, .ier_data, .xintd);
  initial begin
    #100000;
    failures++;
    `TB_DONE
  end
  initial begin
    for (int s = 0; s < 8; s++)
      for (int m = 0; m < 8; m++) begin
        sr_data = 3'(s); ier_data = 3'(m);
        pending = 1'b0;
        for (int b = 0; b < 3; b++) if (sr_data[b] == 1'b1 && ier_data[b] == 1'b0) pending = 1'b1;
        #1;
        `CHECK(xintd == !pending, $sformatf("sr=%b ier=%b xintd=%b", sr_data, ier_data, xintd))
      end
    `TB_DONE
  end
endmodule
