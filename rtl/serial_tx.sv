// serial_tx: the serial transmit block, wired as the specification's block
// diagram: a clock counter (stb_clk16, one tick per DIV clocks), the transmit
// control state machine, the data counter (stb_data_count), the parity counter
// (stb_par_count) and the transmit block that drives tx_d. It pops a byte from
// the transmit FIFO (fifo_read, fifo_read_inc; the byte arrives on fifo_data
// the next cycle) whenever the FIFO is not empty and it is idle, then sends a
// start bit, the byte bit 0 first, an even-parity bit and a stop bit, each
// DIV clocks long. A frame takes 11 bit times plus up to one bit time to align
// to the free-running tick. The chip-select enable the specification gives
// these sub-blocks is not used (a frame must finish after the CPU deselects).
// Reset: xrst, active low, asynchronous.
module serial_tx
  import uart_pkg::*;
#(
  parameter int unsigned DIV = BIT_CLKS
) (
  input  logic       clk,
  input  logic       xrst,
  input  logic       fifo_empty,
  input  logic [7:0] fifo_data,
  output logic       fifo_read,
  output logic       fifo_read_inc,
  output logic       tx_d
);
  logic             stb_clk16, transmit, transmitted;
  logic             stb_dci, stb_dcc, stb_pci, stb_pcc;
  logic [CNT_W-1:0] stb_data_count, stb_par_count;

  bit_clock_counter #(.DIV(DIV), .TICK_AT(DIV - 1)) u_clk (
    .clk, .xrst, .restart(1'b0), .tick(stb_clk16)
  );

  tx_control u_ctl (
    .clk, .xrst, .fifo_empty, .transmitted, .fifo_read, .fifo_read_inc,
    .transmit, .dci(stb_dci), .dcc(stb_dcc)
  );

  bit_counter #(.W(CNT_W)) u_dc (
    .clk, .xrst, .tick(stb_clk16), .inc(stb_dci), .clr(stb_dcc), .count(stb_data_count)
  );

  parity_counter #(.W(CNT_W)) u_pc (
    .clk, .xrst, .inc(stb_pci), .clr(stb_pcc), .count(stb_par_count)
  );

  tx_block u_tx (
    .clk, .xrst, .tick(stb_clk16), .transmit, .data(fifo_data),
    .data_count(stb_data_count), .par_count(stb_par_count),
    .pci(stb_pci), .pcc(stb_pcc), .tx_d, .transmitted
  );
endmodule
