// bit_clock_counter: the transmit and receive clock counters. It counts CLK16M
// cycles modulo DIV (16 in the specification) and raises tick (stb_clk16 /
// srb_clk16) for one cycle whenever the count equals TICK_AT, i.e. once every
// DIV cycles. restart clears the count; the first tick then comes TICK_AT
// cycles after restart is released. The transmitter lets it run freely (TICK_AT = DIV-1); the
// receiver restarts it at the start-bit edge with TICK_AT = DIV/2-1 so that
// bits are sampled near their middle (this design's choice for the receive
// side, which the specification does not detail). Reset: xrst, active low.
module bit_clock_counter #(
  parameter int unsigned DIV     = 16,
  parameter int unsigned TICK_AT = 15
) (
  input  logic clk,
  input  logic xrst,
  input  logic restart,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge xrst) begin
    if (!xrst)                          cnt <= '0;
    else if (restart)                   cnt <= '0;
    else if (cnt == CW'(DIV - 1))       cnt <= '0;
    else                                cnt <= cnt + 1'b1;
  end

  assign tick = !restart && (cnt == CW'(TICK_AT));
endmodule
