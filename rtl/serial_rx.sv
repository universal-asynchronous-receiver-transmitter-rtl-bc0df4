// serial_rx: the serial receive block, built like the transmit side: a clock
// counter restarted at the start-bit edge (srb_clk16 ticks DIV/2 clocks later
// and every DIV clocks after that, near the middle of each bit), the receive
// control state machine, the data counter (srb_data_count), the parity counter
// (srb_par_count) and the receive block. A correct frame (start 0, eight data
// bits bit 0 first, even parity, stop 1) is written into the receive FIFO with
// fifo_write/fifo_write_inc one cycle after the middle of its stop bit; a frame
// with a parity error raises perr_set for one cycle and is not stored, as is a
// frame with a framing error. Reset: xrst, active low, asynchronous.
module serial_rx
  import uart_pkg::*;
#(
  parameter int unsigned DIV = BIT_CLKS
) (
  input  logic       clk,
  input  logic       xrst,
  input  logic       r_xd,
  input  logic       fifo_full,
  output logic       fifo_write,
  output logic       fifo_write_inc,
  output logic [7:0] rec_data,
  output logic       perr_set
);
  logic             srb_clk16, restart, receive, received, perr, x_fre;
  logic             srb_dci, srb_dcc, srb_pci, srb_pcc;
  logic [CNT_W-1:0] srb_data_count, srb_par_count;

  bit_clock_counter #(.DIV(DIV), .TICK_AT(DIV / 2 - 1)) u_clk (
    .clk, .xrst, .restart, .tick(srb_clk16)
  );

  rx_control u_ctl (
    .clk, .xrst, .r_xd, .received, .frame_ok(!perr && !x_fre), .fifo_full,
    .restart, .receive, .dci(srb_dci), .dcc(srb_dcc), .fifo_write, .fifo_write_inc
  );

  bit_counter #(.W(CNT_W)) u_dc (
    .clk, .xrst, .tick(srb_clk16), .inc(srb_dci), .clr(srb_dcc), .count(srb_data_count)
  );

  parity_counter #(.W(CNT_W)) u_pc (
    .clk, .xrst, .inc(srb_pci), .clr(srb_pcc), .count(srb_par_count)
  );

  rx_block u_rx (
    .clk, .xrst, .tick(srb_clk16), .receive, .rx_d(r_xd),
    .data_count(srb_data_count), .par_count(srb_par_count),
    .pci(srb_pci), .pcc(srb_pcc), .rec_data, .perr, .x_fre, .received
  );

  assign perr_set = received && perr && !x_fre;
endmodule
