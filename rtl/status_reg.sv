// status_reg: the UART status register. Bit 0 is TX_RDY (transmit FIFO not
// full), bit 1 RX_RDY (receive FIFO not empty), bit 2 PERR (a received frame
// had wrong parity), as the specification lays out. TX_RDY and RX_RDY are
// registered copies of the FIFO flags, one clock behind them. PERR is set by a
// one-cycle perr_set pulse from the receiver and stays set until perr_clr (a
// CPU read of the status register); that clearing rule is this design's
// choice. Reset (xrst, active low, asynchronous): TX_RDY=1, RX_RDY=0, PERR=0.
module status_reg
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       xrst,
  input  logic       tx_full,
  input  logic       rx_empty,
  input  logic       perr_set,
  input  logic       perr_clr,
  output logic [2:0] sr_data
);
  always_ff @(posedge clk or negedge xrst) begin
    if (!xrst) begin
      sr_data <= 3'b001;
    end else begin
      sr_data[SR_TX_RDY] <= !tx_full;
      sr_data[SR_RX_RDY] <= !rx_empty;
      if (perr_set)      sr_data[SR_PERR] <= 1'b1;
      else if (perr_clr) sr_data[SR_PERR] <= 1'b0;
    end
  end
endmodule
