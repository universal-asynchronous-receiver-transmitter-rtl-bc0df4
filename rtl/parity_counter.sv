// parity_counter: the transmit and receive parity counters (stb_par_count /
// srb_par_count). It counts the data bits that were 1: +1 for each cycle inc
// (stb_pci / srb_pci) is high, back to zero when clr (stb_pcc / srb_pcc) is
// high; clr wins. Bit 0 of the count is the even-parity bit of the byte.
// Reset: xrst, active low, asynchronous.
module parity_counter #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         xrst,
  input  logic         inc,
  input  logic         clr,
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge xrst) begin
    if (!xrst)     count <= '0;
    else if (clr)  count <= '0;
    else if (inc)  count <= count + 1'b1;
  end
endmodule
