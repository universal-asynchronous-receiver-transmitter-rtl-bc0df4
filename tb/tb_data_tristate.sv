// tb_data_tristate: checks that the chip drives DATA only while XRD and XCS
// are both low, and that data_in follows whatever another driver puts on the
// bus while the chip is released.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_data_tristate;
  int checks = 0, failures = 0;
  logic [7:0] data_bus2, data_in, cpu_val;
  logic xrd, xcs, cpu_drive;
  wire  [7:0] data;
  assign data = cpu_drive ? cpu_val : 8'bz;
  data_tristate dut (.data_bus2, .xrd, .xcs, .data, .data_in);
  initial begin
    #100000;
    failures++;
    `TB_DONE
  end
  initial begin
    for (int i = 0; i < 100; i++) begin
      data_bus2 = 8'($urandom);
      cpu_val   = 8'($urandom);
      {xrd, xcs} = 2'($urandom);
      cpu_drive = !( !xrd && !xcs );
      #10;
      if (!xrd && !xcs) begin
        `CHECK(data == data_bus2, "chip drives bus during read")
        `CHECK(data_in == data_bus2, "data_in during read")
      end else begin
        `CHECK(data == cpu_val, "bus released outside read")
        `CHECK(data_in == cpu_val, "data_in follows CPU")
      end
    end
    `TB_DONE
  end
endmodule
