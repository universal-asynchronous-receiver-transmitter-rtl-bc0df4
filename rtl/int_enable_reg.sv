// int_enable_reg: the 3-bit interrupt enable (mask) register. A CPU write with
// D_XS low loads data_bus1 bits 2..0; a 1 in bit i masks status bit i from the
// interrupt, as the specification's XINT equation requires. we is a one-cycle
// strobe from the CPU interface; the register changes on the next clock edge.
// Reset (xrst, active low, asynchronous) to 3'b111, all sources masked, is
// this design's choice so that XINT stays inactive until software enables it.
module int_enable_reg (
  input  logic       clk,
  input  logic       xrst,
  input  logic       we,
  input  logic [2:0] din,
  output logic [2:0] ier_data
);
  always_ff @(posedge clk or negedge xrst) begin
    if (!xrst)   ier_data <= 3'b111;
    else if (we) ier_data <= din;
  end
endmodule
