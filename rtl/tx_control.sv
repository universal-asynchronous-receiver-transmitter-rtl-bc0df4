// tx_control: the transmit control block, a three-state machine.
//   IDLE          : waits until the transmit FIFO holds a byte.
//   FIFO_READ     : one cycle with fifo_read and fifo_read_inc high, which
//                   loads the oldest byte onto stb_fifo_data and pops it.
//   DATA_TRANSMIT : transmit and dci (stb_dci) high, so the transmit block
//                   and the data counter run, until the transmit block
//                   returns transmitted; then dcc (stb_dcc) clears the data
//                   counter and the machine goes back to IDLE.
// The specification starts a frame when it sees a data write (DXS1 high, X_WR
// low); starting whenever the FIFO is not empty is this design's reading of
// that, and it also sends a second buffered byte without a further write.
// Outputs are decoded from the state (dcc also from transmitted).
// Reset: xrst, active low, asynchronous, to IDLE with all outputs low.
module tx_control
  import uart_pkg::*;
(
  input  logic clk,
  input  logic xrst,
  input  logic fifo_empty,
  input  logic transmitted,
  output logic fifo_read,
  output logic fifo_read_inc,
  output logic transmit,
  output logic dci,
  output logic dcc
);
  tx_state_t state, state_nx;

  always_ff @(posedge clk or negedge xrst) begin
    if (!xrst) state <= TX_IDLE;
    else       state <= state_nx;
  end

  always_comb begin
    state_nx      = state;
    fifo_read     = 1'b0;
    fifo_read_inc = 1'b0;
    transmit      = 1'b0;
    dci           = 1'b0;
    dcc           = 1'b0;
    unique case (state)
      TX_IDLE: begin
        if (!fifo_empty) state_nx = TX_FIFO_READ;
      end
      TX_FIFO_READ: begin
        fifo_read     = 1'b1;
        fifo_read_inc = 1'b1;
        state_nx      = TX_DATA_TRANSMIT;
      end
      TX_DATA_TRANSMIT: begin
        transmit = 1'b1;
        dci      = 1'b1;
        if (transmitted) begin
          dcc      = 1'b1;
          state_nx = TX_IDLE;
        end
      end
      default: state_nx = TX_IDLE;
    endcase
  end
endmodule
