// bit_counter: the transmit and receive data counters (stb_data_count /
// srb_data_count). The count numbers the bit slot of the frame in progress:
// it advances by one on a bit tick while inc (stb_dci / srb_dci) is high and
// returns to zero when clr (stb_dcc / srb_dcc) is high; clr wins over inc.
// Reset: xrst, active low, asynchronous.
module bit_counter #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         xrst,
  input  logic         tick,
  input  logic         inc,
  input  logic         clr,
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge xrst) begin
    if (!xrst)             count <= '0;
    else if (clr)          count <= '0;
    else if (inc && tick)  count <= count + 1'b1;
  end
endmodule
