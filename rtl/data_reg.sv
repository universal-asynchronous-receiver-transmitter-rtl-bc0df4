// data_reg: the CPU read data register. While no read is in progress (x_rd
// high) it follows the source the CPU has selected with D_XS: the head of the
// receive FIFO when dxs1 is 1, the status register (zero-extended) when dxs1
// is 0. Once x_rd goes low it holds, so the byte on DATA does not change for
// the rest of the read even though the receive FIFO is popped at its start.
// Because D_XS is set up 100 ns before XRD falls, the byte is ready two clocks
// after XRD falls and well inside the 250 ns read strobe. The specification
// names the register; the follow-then-hold rule is this design's choice.
// Reset: xrst, active low, asynchronous, to zero.
module data_reg (
  input  logic       clk,
  input  logic       xrst,
  input  logic       x_rd,
  input  logic       dxs1,
  input  logic [7:0] rx_head,
  input  logic [2:0] sr_data,
  output logic [7:0] dout
);
  always_ff @(posedge clk or negedge xrst) begin
    if (!xrst)     dout <= '0;
    else if (x_rd) dout <= dxs1 ? rx_head : {5'b0, sr_data};
  end
endmodule
