// rx_block: the receive block. On each bit tick (srb_clk16, near the middle of
// a bit) while receive is high it samples rx_d according to the bit slot in
// data_count:
//   0  start bit: must still be 0; a 1 ends the frame at once with x_fre set
//   1..8 data bits into rec_data[count-1], pulsing pci (srb_pci) for each 1
//   9  parity bit: perr is set if it differs from bit 0 of par_count
//      (even parity, this design's choice)
//   10 stop bit: x_fre is set if it is 0; received pulses for one cycle.
// pcc (srb_pcc) clears the parity counter at slot 0. perr, x_fre and rec_data
// keep their values from the pulse of received until the next frame starts.
// The specification clocks this block with srb_clk16; here CLK16M is the
// clock and the tick is an enable. Reset: xrst, active low, asynchronous.
module rx_block
  import uart_pkg::*;
(
  input  logic             clk,
  input  logic             xrst,
  input  logic             tick,
  input  logic             receive,
  input  logic             rx_d,
  input  logic [CNT_W-1:0] data_count,
  input  logic [CNT_W-1:0] par_count,
  output logic             pci,
  output logic             pcc,
  output logic [7:0]       rec_data,
  output logic             perr,
  output logic             x_fre,
  output logic             received
);
  logic       step;
  logic       in_data;
  logic [2:0] bit_idx;

  assign step    = tick && receive;
  assign in_data = (data_count >= SLOT_D0) && (data_count <= SLOT_D7);
  assign bit_idx = 3'(data_count - SLOT_D0);
  assign pcc     = step && (data_count == SLOT_START);
  assign pci     = step && in_data && rx_d;

  always_ff @(posedge clk or negedge xrst) begin
    if (!xrst) begin
      rec_data <= '0;
      perr     <= 1'b0;
      x_fre    <= 1'b0;
      received <= 1'b0;
    end else begin
      received <= 1'b0;
      if (step) begin
        if (data_count == SLOT_START) begin
          perr  <= 1'b0;
          x_fre <= rx_d;
          if (rx_d) received <= 1'b1;
        end else if (in_data) begin
          rec_data[bit_idx] <= rx_d;
        end else if (data_count == SLOT_PARITY) begin
          perr <= rx_d ^ par_count[0];
        end else if (data_count == SLOT_STOP) begin
          x_fre    <= !rx_d;
          received <= 1'b1;
        end
      end
    end
  end
endmodule
