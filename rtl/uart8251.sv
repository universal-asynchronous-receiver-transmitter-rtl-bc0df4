// uart8251: a UART modelled on the 8251 peripheral. A CPU writes bytes over an
// 8-bit asynchronous bus into a 2-word transmit FIFO; the serial transmit
// block sends each as a frame on TXD (start, bit 0..bit 7, even parity, stop,
// 16 CLK16M cycles per bit). The serial receive block samples RXD, checks
// parity and stop bit and stores good bytes in a 4-word receive FIFO that the
// CPU reads back. Status (TX_RDY, RX_RDY, PERR) and an interrupt enable mask
// drive the active-low interrupt XINT.
// CPU bus (all strobes active low, asynchronous to CLK16M):
//   D_XS=0 + XRD : read status {5'b0, PERR, RX_RDY, TX_RDY}
//   D_XS=0 + XWR : write interrupt enable register from DATA[2:0]
//                  (a 1 masks the matching status bit)
//   D_XS=1 + XRD : read the oldest received byte
//   D_XS=1 + XWR : queue a byte for transmission
// D_XS, XCS, XWR, XRD and DATA are each registered twice on CLK16M, RXD once;
// the read data, XINT and TXD leave through one output register each. DATA is
// driven only while XRD and XCS are low. With these stages a write or read
// takes effect three clocks after its strobe falls, which fits the 250 ns
// minimum strobe of the bus timing at 16 MHz. Reset: XRST, active low,
// asynchronous.
module uart8251
  import uart_pkg::*;
#(
  parameter int unsigned TX_DEPTH = 2,
  parameter int unsigned RX_DEPTH = 4,
  parameter int unsigned DIV      = BIT_CLKS
) (
  input  logic       CLK16M,
  input  logic       XRST,
  input  logic       D_XS,
  input  logic       XCS,
  input  logic       XWR,
  input  logic       XRD,
  inout  wire  [7:0] DATA,
  output logic       XINT,
  output logic       TXD,
  input  logic       RXD
);
  logic       clk, xrst;
  logic [7:0] data_in, data_bus1, data_out, data_bus2;
  logic       DXS1, XCS1, X_WR, X_RD, r_xd;
  logic       tx_wr, rx_rd, xintd;
  logic [2:0] sr_data;
  logic       tx_full, tx_empty, stb_fifo_read, stb_fifo_read_inc;
  logic [7:0] stb_fifo_data;
  logic       rx_full, rx_empty, srb_fifo_write, srb_fifo_write_inc, perr_set;
  logic [7:0] rec_data, rx_head;
  logic       tx_d;

  assign clk  = CLK16M;
  assign xrst = XRST;

  // Input synchronisers
  sync2 #(.WIDTH(8), .RST_VAL(8'h00)) u_data_synch (.clk, .xrst, .d(data_in), .q(data_bus1));
  sync2 #(.WIDTH(1), .RST_VAL(1'b0))  u_dxs_synch  (.clk, .xrst, .d(D_XS), .q(DXS1));
  sync2 #(.WIDTH(1), .RST_VAL(1'b1))  u_xcs_synch  (.clk, .xrst, .d(XCS),  .q(XCS1));
  sync2 #(.WIDTH(1), .RST_VAL(1'b1))  u_xwr_synch  (.clk, .xrst, .d(XWR),  .q(X_WR));
  sync2 #(.WIDTH(1), .RST_VAL(1'b1))  u_xrd_synch  (.clk, .xrst, .d(XRD),  .q(X_RD));
  out_reg #(.WIDTH(1), .RST_VAL(1'b1)) u_rxd_iff   (.clk, .xrst, .d(RXD),  .q(r_xd));

  cpu_if u_cpu_if (
    .clk, .xrst, .dxs1(DXS1), .xcs1(XCS1), .x_wr(X_WR), .x_rd(X_RD), .data_bus1,
    .tx_full, .rx_empty, .rx_head, .perr_set,
    .tx_wr, .rx_rd, .data_out, .xintd, .sr_data
  );

  uart_fifo #(.DEPTH(TX_DEPTH), .WIDTH(8)) u_tx_fifo (
    .clk, .xrst, .wr(tx_wr), .wr_inc(tx_wr), .wr_data(data_bus1),
    .rd(stb_fifo_read), .rd_inc(stb_fifo_read_inc), .rd_data(stb_fifo_data),
    .head(), .full(tx_full), .empty(tx_empty)
  );

  serial_tx #(.DIV(DIV)) u_serial_tx (
    .clk, .xrst, .fifo_empty(tx_empty), .fifo_data(stb_fifo_data),
    .fifo_read(stb_fifo_read), .fifo_read_inc(stb_fifo_read_inc), .tx_d
  );

  serial_rx #(.DIV(DIV)) u_serial_rx (
    .clk, .xrst, .r_xd, .fifo_full(rx_full), .fifo_write(srb_fifo_write),
    .fifo_write_inc(srb_fifo_write_inc), .rec_data, .perr_set
  );

  uart_fifo #(.DEPTH(RX_DEPTH), .WIDTH(8)) u_rx_fifo (
    .clk, .xrst, .wr(srb_fifo_write), .wr_inc(srb_fifo_write_inc), .wr_data(rec_data),
    .rd(rx_rd), .rd_inc(rx_rd), .rd_data(),
    .head(rx_head), .full(rx_full), .empty(rx_empty)
  );

  // Output registers
  out_reg #(.WIDTH(8), .RST_VAL(8'h00)) u_data_off (.clk, .xrst, .d(data_out), .q(data_bus2));
  out_reg #(.WIDTH(1), .RST_VAL(1'b1))  u_xint_off (.clk, .xrst, .d(xintd), .q(XINT));
  out_reg #(.WIDTH(1), .RST_VAL(1'b1))  u_txd_off  (.clk, .xrst, .d(tx_d),  .q(TXD));

  data_tristate u_data_tri (.data_bus2, .xrd(XRD), .xcs(XCS), .data(DATA), .data_in);
endmodule
