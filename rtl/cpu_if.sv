// cpu_if: the CPU interface. It decodes the synchronised bus strobes into the
// four accesses of the specification's function table:
//   D_XS=0 read  : status register onto DATA (also clears PERR)
//   D_XS=0 write : data_bus1[2:0] into the interrupt enable register
//   D_XS=1 read  : receive FIFO head onto DATA, then pop the FIFO (rx_rd)
//   D_XS=1 write : data_bus1 into the transmit FIFO (tx_wr)
// An access acts once, in the cycle after its strobe (X_WR or X_RD) is first
// seen low with XCS1 low; this edge rule is this design's choice since a
// strobe lasts several clocks. Writes to a full transmit FIFO and reads of an
// empty receive FIFO are ignored. It holds the status register, interrupt
// enable register, data register and XINT generator. Reset: xrst, active low.
module cpu_if (
  input  logic       clk,
  input  logic       xrst,
  input  logic       dxs1,
  input  logic       xcs1,
  input  logic       x_wr,
  input  logic       x_rd,
  input  logic [7:0] data_bus1,
  input  logic       tx_full,
  input  logic       rx_empty,
  input  logic [7:0] rx_head,
  input  logic       perr_set,
  output logic       tx_wr,
  output logic       rx_rd,
  output logic [7:0] data_out,
  output logic       xintd,
  output logic [2:0] sr_data
);
  logic       x_wr_q, x_rd_q;
  logic       wr_start, rd_start;
  logic       ier_we, sr_rd;
  logic [2:0] ier_data;

  always_ff @(posedge clk or negedge xrst) begin
    if (!xrst) begin
      x_wr_q <= 1'b1;
      x_rd_q <= 1'b1;
    end else begin
      x_wr_q <= x_wr;
      x_rd_q <= x_rd;
    end
  end

  assign wr_start = x_wr_q && !x_wr && !xcs1;
  assign rd_start = x_rd_q && !x_rd && !xcs1;
  assign tx_wr    = wr_start &&  dxs1 && !tx_full;
  assign ier_we   = wr_start && !dxs1;
  assign rx_rd    = rd_start &&  dxs1 && !rx_empty;
  assign sr_rd    = rd_start && !dxs1;

  status_reg u_sr (
    .clk, .xrst, .tx_full, .rx_empty, .perr_set, .perr_clr(sr_rd), .sr_data
  );

  int_enable_reg u_ier (
    .clk, .xrst, .we(ier_we), .din(data_bus1[2:0]), .ier_data
  );

  xint_gen u_xint (.sr_data, .ier_data, .xintd);

  data_reg u_dr (
    .clk, .xrst, .x_rd, .dxs1, .rx_head, .sr_data, .dout(data_out)
  );
endmodule
