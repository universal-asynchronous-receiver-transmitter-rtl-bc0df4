// uart_fifo: small synchronous FIFO used as the transmit FIFO (8 bits x 2
// words) and the receive FIFO (8 bits x 4 words). As in the specification the
// writer asserts wr together with wr_inc and the reader rd together with
// rd_inc: wr stores wr_data at the write pointer, wr_inc advances it; rd loads
// the word at the read pointer into the rd_data register, rd_inc advances the
// read pointer. Both pointers wrap to zero after DEPTH-1. head shows the oldest
// word without a clock delay (used by the CPU read path). full and empty come
// from an occupancy counter (this design's choice); a write when full and a
// pointer advance when empty are ignored. Reset: xrst, active low, asynchronous.
module uart_fifo #(
  parameter int unsigned DEPTH = 2,
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             xrst,
  input  logic             wr,
  input  logic             wr_inc,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd,
  input  logic             rd_inc,
  output logic [WIDTH-1:0] rd_data,
  output logic [WIDTH-1:0] head,
  output logic             full,
  output logic             empty
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam logic [PW-1:0] PMAX = PW'(DEPTH - 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wp, rp;
  logic [PW:0]      used;
  logic             do_wr, do_rd;

  assign full  = (used == (PW+1)'(DEPTH));
  assign empty = (used == '0);
  assign do_wr = wr_inc && !full;
  assign do_rd = rd_inc && !empty;
  assign head  = mem[rp];

  always_ff @(posedge clk) begin
    if (wr && !full) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge xrst) begin
    if (!xrst) begin
      wp      <= '0;
      rp      <= '0;
      used    <= '0;
      rd_data <= '0;
    end else begin
      if (rd && !empty) rd_data <= mem[rp];
      if (do_wr) wp <= (wp == PMAX) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == PMAX) ? '0 : rp + 1'b1;
      if (do_wr && !do_rd)      used <= used + 1'b1;
      else if (do_rd && !do_wr) used <= used - 1'b1;
    end
  end
endmodule
