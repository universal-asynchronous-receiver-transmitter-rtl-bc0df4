// rx_control: the receive control block, a three-state machine.
//   IDLE         : holds the receive clock counter (restart) and data counter
//                  (dcc) at zero and waits for r_xd to go low (a start bit).
//   DATA_RECEIVE : receive and dci high, so the receive block and the data
//                  counter run, until the receive block pulses received.
//                  A frame with no parity or framing error goes on to
//                  FIFO_WRITE if the receive FIFO has room; any other frame
//                  is dropped and the machine returns to IDLE.
//   FIFO_WRITE   : exactly one cycle with fifo_write and fifo_write_inc high,
//                  so the byte lands in one FIFO word, then back to IDLE.
// The one-cycle FIFO_WRITE state is the specification's; the start-bit
// detection and the drop rule for a full FIFO are this design's choices.
// Reset: xrst, active low, asynchronous, to IDLE.
module rx_control
  import uart_pkg::*;
(
  input  logic clk,
  input  logic xrst,
  input  logic r_xd,
  input  logic received,
  input  logic frame_ok,
  input  logic fifo_full,
  output logic restart,
  output logic receive,
  output logic dci,
  output logic dcc,
  output logic fifo_write,
  output logic fifo_write_inc
);
  rx_state_t state, state_nx;

  always_ff @(posedge clk or negedge xrst) begin
    if (!xrst) state <= RX_IDLE;
    else       state <= state_nx;
  end

  always_comb begin
    state_nx       = state;
    restart        = 1'b0;
    receive        = 1'b0;
    dci            = 1'b0;
    dcc            = 1'b0;
    fifo_write     = 1'b0;
    fifo_write_inc = 1'b0;
    unique case (state)
      RX_IDLE: begin
        restart = 1'b1;
        dcc     = 1'b1;
        if (!r_xd) state_nx = RX_DATA_RECEIVE;
      end
      RX_DATA_RECEIVE: begin
        receive = 1'b1;
        dci     = 1'b1;
        if (received) begin
          dcc      = 1'b1;
          state_nx = (frame_ok && !fifo_full) ? RX_FIFO_WRITE : RX_IDLE;
        end
      end
      RX_FIFO_WRITE: begin
        fifo_write     = 1'b1;
        fifo_write_inc = 1'b1;
        state_nx       = RX_IDLE;
      end
      default: state_nx = RX_IDLE;
    endcase
  end
endmodule
