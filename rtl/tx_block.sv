// tx_block: the transmit block. On each bit tick (stb_clk16) while transmit
// is high it drives tx_d according to the bit slot in data_count:
//   0 start bit (0), 1..8 data bit data[count-1] (bit 0 first),
//   9 parity bit, 10 stop bit (1); at 11, after a whole stop bit, it pulses
//   transmitted for one cycle.
// In slots 1..8 it pulses pci (stb_pci) for each 1 bit it sends, and in slot 0
// it pulses pcc (stb_pcc), so the parity counter holds the number of ones by
// slot 9; its bit 0 is sent as the parity bit (even parity, this design's
// choice). The line idles high. The specification clocks this block with
// stb_clk16; here CLK16M is the clock and the tick is an enable.
// Reset: xrst, active low, asynchronous; tx_d high, transmitted low.
module tx_block
  import uart_pkg::*;
(
  input  logic             clk,
  input  logic             xrst,
  input  logic             tick,
  input  logic             transmit,
  input  logic [7:0]       data,
  input  logic [CNT_W-1:0] data_count,
  input  logic [CNT_W-1:0] par_count,
  output logic             pci,
  output logic             pcc,
  output logic             tx_d,
  output logic             transmitted
);
  logic       step;
  logic       in_data;
  logic [2:0] bit_idx;

  assign step    = tick && transmit;
  assign in_data = (data_count >= SLOT_D0) && (data_count <= SLOT_D7);
  assign bit_idx = 3'(data_count - SLOT_D0);
  assign pcc     = step && (data_count == SLOT_START);
  assign pci     = step && in_data && data[bit_idx];

  always_ff @(posedge clk or negedge xrst) begin
    if (!xrst) begin
      tx_d        <= 1'b1;
      transmitted <= 1'b0;
    end else begin
      transmitted <= 1'b0;
      if (!transmit) begin
        tx_d <= 1'b1;
      end else if (step) begin
        if (data_count == SLOT_START)       tx_d <= 1'b0;
        else if (in_data)                   tx_d <= data[bit_idx];
        else if (data_count == SLOT_PARITY) tx_d <= par_count[0];
        else                                tx_d <= 1'b1;
        if (data_count == SLOT_DONE) transmitted <= 1'b1;
      end
    end
  end
endmodule
