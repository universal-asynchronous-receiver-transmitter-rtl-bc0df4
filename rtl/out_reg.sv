// out_reg: single register stage on CLK16M. The specification puts one such
// stage on RXD (RXDIFF, giving r_xd), on the read data (DATAOFF, giving
// data_bus2), on the interrupt (XINTOFF, giving XINT) and on the serial output
// (TXDOFF, giving TXD). q follows d one clock edge later. The reset value
// RST_VAL is this design's choice: the idle/inactive level of each signal.
// Reset: xrst, active low, asynchronous.
module out_reg #(
  parameter int unsigned      WIDTH   = 1,
  parameter logic [WIDTH-1:0] RST_VAL = '1
) (
  input  logic             clk,
  input  logic             xrst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge xrst) begin
    if (!xrst) q <= RST_VAL;
    else       q <= d;
  end
endmodule
