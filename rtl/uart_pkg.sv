// uart_pkg: constants and state types shared by the 8251-style UART.
// A frame is start bit, eight data bits (bit 0 first), one even-parity bit and
// one stop bit; each bit lasts 16 cycles of CLK16M. The bit-slot numbering of
// the frame counters (0 start, 1..8 data, 9 parity, 10 stop) is used by both
// the transmit and the receive block. Status register bit positions follow the
// specification (TX_RDY bit 0, RX_RDY bit 1, PERR bit 2).
package uart_pkg;
  localparam int unsigned BIT_CLKS   = 16;  // CLK16M cycles per serial bit
  localparam int unsigned CNT_W      = 4;   // width of the frame and parity counters
  localparam logic [CNT_W-1:0] SLOT_START  = 4'd0;
  localparam logic [CNT_W-1:0] SLOT_D0     = 4'd1;
  localparam logic [CNT_W-1:0] SLOT_D7     = 4'd8;
  localparam logic [CNT_W-1:0] SLOT_PARITY = 4'd9;
  localparam logic [CNT_W-1:0] SLOT_STOP   = 4'd10;
  localparam logic [CNT_W-1:0] SLOT_DONE   = 4'd11;

  localparam int unsigned SR_TX_RDY = 0;
  localparam int unsigned SR_RX_RDY = 1;
  localparam int unsigned SR_PERR   = 2;

  typedef enum logic [1:0] {TX_IDLE, TX_FIFO_READ, TX_DATA_TRANSMIT} tx_state_t;
  typedef enum logic [1:0] {RX_IDLE, RX_DATA_RECEIVE, RX_FIFO_WRITE} rx_state_t;
endpackage
