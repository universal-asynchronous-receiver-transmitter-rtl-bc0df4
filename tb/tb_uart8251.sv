// tb_uart8251: end-to-end test of the UART at its default parameters
// (2-word transmit FIFO, 4-word receive FIFO, 16 clocks per bit, 16 MHz).
// A CPU model drives the asynchronous bus with the minimum timings of the
// bus timing diagrams (100 ns set-up, 250 ns strobe, read data sampled 50 ns
// before XRD rises, 10 ns hold). A line monitor decodes every frame on TXD,
// and a line driver sends frames into RXD. Scenarios: status after reset,
// transmit of queued bytes with the FIFO filling (TX_RDY low) and a write to
// a full FIFO being dropped, receive into the 4-word FIFO with a fifth frame
// dropped, a parity error setting PERR and XINT, a framing error, interrupt
// masking, and a TXD->RXD loopback. Each mechanism is counted and must occur.
`timescale 1ns/100ps
`include "tb/tb_util.svh"
module tb_uart8251;
  localparam real TCLK = 62.5;
  localparam int  DIV  = 16;
  int checks = 0, failures = 0;
  logic CLK16M = 0, XRST = 0, D_XS = 0, XCS = 1, XWR = 1, XRD = 1, RXD_drv = 1, loopback = 0;
  logic XINT, TXD, RXD;
  logic [7:0] cpu_val;
  logic cpu_drive = 0;
  wire  [7:0] DATA;
  assign DATA = cpu_drive ? cpu_val : 8'bz;
  assign RXD  = loopback ? TXD : RXD_drv;
  always #(TCLK / 2) CLK16M = ~CLK16M;

  uart8251 dut (.CLK16M, .XRST, .D_XS, .XCS, .XWR, .XRD, .DATA, .XINT, .TXD, .RXD);

  `TB_WATCHDOG(CLK16M, 60000)

  // mechanism counters
  int n_tx_frames = 0, n_tx_full = 0, n_tx_drop = 0, n_rx_drop = 0, n_perr = 0;
  int n_fre = 0, n_xint_on = 0, n_xint_masked = 0, n_loop = 0, n_back_to_back = 0;

  // ---------------- CPU bus model ----------------
  task automatic cpu_write(input bit dxs, input logic [7:0] v);
    D_XS = dxs; XCS = 0; cpu_val = v; cpu_drive = 1;
    #100 XWR = 0;
    #250 XWR = 1;
    #10  XCS = 1; cpu_drive = 0;
    #100;
  endtask
  task automatic cpu_read(input bit dxs, output logic [7:0] v);
    D_XS = dxs; XCS = 0;
    #100 XRD = 0;
    #200 v = DATA;           // 50 ns before XRD rises
    #50  XRD = 1;
    #10  XCS = 1;
    #100;
  endtask
  function automatic logic [7:0] status_exp(bit perr, bit rx_rdy, bit tx_rdy);
    return {5'b0, perr, rx_rdy, tx_rdy};
  endfunction

  // ---------------- TXD monitor ----------------
  logic [7:0] txq[$];      // bytes expected on TXD, in order
  longint last_end = -1;
  initial begin
    logic [7:0] b; logic p; longint t0;
    @(posedge XRST);
    forever begin
      @(negedge TXD);
      t0 = longint'($realtime);
      if (last_end >= 0 && real'(t0 - last_end) <= (DIV + 3) * TCLK) n_back_to_back++;
      #(DIV * TCLK / 2);
      `CHECK(TXD == 0, "TXD start bit")
      for (int k = 0; k < 8; k++) begin #(DIV * TCLK); b[k] = TXD; end
      #(DIV * TCLK) p = TXD;
      #(DIV * TCLK);
      `CHECK(TXD == 1, "TXD stop bit")
      `CHECK(p == ^b, "TXD even parity")
      if (!loopback) begin
        `CHECK(txq.size() > 0 && txq[0] == b, $sformatf("TXD byte %h", b))
        if (txq.size() > 0) void'(txq.pop_front());
      end
      n_tx_frames++;
      #(DIV * TCLK / 2 - 1);
      last_end = longint'($realtime);
    end
  end

  // ---------------- RXD driver ----------------
  task automatic send_frame(input logic [7:0] b, input bit bad_par = 0, input bit bad_stop = 0);
    logic [10:0] fr;
    fr = {!bad_stop, (^b) ^ bad_par, b, 1'b0};
    for (int k = 0; k < 11; k++) begin RXD_drv = fr[k]; #(DIV * TCLK); end
    RXD_drv = 1;
    #(2 * DIV * TCLK);
  endtask

  task automatic wait_tx_idle();
    wait (txq.size() == 0);
    #(13 * DIV * TCLK);
  endtask

  initial begin
    logic [7:0] v, bytes[5];
    #(3.3 * TCLK) XRST = 1;
    #(4 * TCLK);

    // status after reset: TX_RDY=1, RX_RDY=0, PERR=0; XINT inactive
    cpu_read(0, v);
    `CHECK(v == status_exp(0, 0, 1), $sformatf("reset status %b", v))
    `CHECK(XINT == 1, "XINT inactive after reset")

    // --- transmit: four writes back to back; the FIFO fills and TX_RDY drops ---
    for (int i = 0; i < 3; i++) begin
      bytes[i] = 8'($urandom);
      cpu_write(1, bytes[i]);
      txq.push_back(bytes[i]);
    end
    cpu_read(0, v);
    if (v[0] == 0) n_tx_full++;
    `CHECK(v[0] == 0, "TX_RDY low with the transmit FIFO full")
    bytes[3] = 8'($urandom);
    cpu_write(1, bytes[3]);   // FIFO full: dropped
    wait_tx_idle();
    `CHECK(txq.size() == 0, "all queued bytes transmitted")
    `CHECK(n_tx_frames == 3, $sformatf("frames on TXD %0d (the dropped write must not appear)", n_tx_frames))
    if (n_tx_frames == 3) n_tx_drop++;
    cpu_read(0, v);
    `CHECK(v[0] == 1, "TX_RDY high again")

    // --- receive: five frames, the fifth finds the FIFO full ---
    for (int i = 0; i < 5; i++) begin bytes[i] = 8'($urandom); send_frame(bytes[i]); end
    cpu_read(0, v);
    `CHECK(v == status_exp(0, 1, 1), $sformatf("status with data %b", v))
    `CHECK(XINT == 1, "RX_RDY masked: no interrupt")
    if (XINT == 1) n_xint_masked++;
    for (int i = 0; i < 4; i++) begin
      cpu_read(1, v);
      `CHECK(v == bytes[i], $sformatf("read %h expected %h", v, bytes[i]))
    end
    cpu_read(0, v);
    `CHECK(v == status_exp(0, 0, 1), "receive FIFO empty, fifth frame dropped")
    if (v == status_exp(0, 0, 1)) n_rx_drop++;

    // --- interrupts: unmask RX_RDY (bit 1) and PERR (bit 2) ---
    cpu_write(0, 8'b0000_0001);
    #(4 * TCLK);
    `CHECK(XINT == 1, "no interrupt while RX empty")
    bytes[0] = 8'($urandom);
    send_frame(bytes[0]);
    `CHECK(XINT == 0, "XINT on received byte")
    if (XINT == 0) n_xint_on++;
    cpu_read(1, v);
    `CHECK(v == bytes[0], "interrupting byte")
    #(4 * TCLK);
    `CHECK(XINT == 1, "XINT released after read")

    // --- parity error: not stored, PERR set, interrupt, cleared by status read ---
    send_frame(8'h5A, 1, 0);
    `CHECK(XINT == 0, "XINT on parity error")
    cpu_read(0, v);
    `CHECK(v == status_exp(1, 0, 1), $sformatf("PERR in status %b", v))
    if (v[2]) n_perr++;
    cpu_read(0, v);
    `CHECK(v == status_exp(0, 0, 1), "PERR cleared by status read")
    #(4 * TCLK);
    `CHECK(XINT == 1, "XINT released")

    // --- framing error: stop bit low, nothing stored, no PERR ---
    send_frame(8'hC3, 0, 1);
    #(2 * DIV * TCLK);
    cpu_read(0, v);
    `CHECK(v == status_exp(0, 0, 1), $sformatf("framing error frame dropped %b", v))
    if (v == status_exp(0, 0, 1)) n_fre++;

    // --- loopback: TXD into RXD, two bytes round trip ---
    cpu_write(0, 8'b0000_0111);
    loopback = 1;
    bytes[0] = 8'($urandom); bytes[1] = 8'($urandom);
    cpu_write(1, bytes[0]);
    cpu_write(1, bytes[1]);
    #(26 * DIV * TCLK);
    cpu_read(1, v);
    `CHECK(v == bytes[0], $sformatf("loopback byte 0 %h", v))
    cpu_read(1, v);
    `CHECK(v == bytes[1], $sformatf("loopback byte 1 %h", v))
    if (v == bytes[1]) n_loop++;
    cpu_read(0, v);
    `CHECK(v == status_exp(0, 0, 1), "loopback drained")
    loopback = 0;

    $display("tx_frames=%0d tx_full=%0d tx_drop=%0d rx_drop=%0d perr=%0d fre=%0d xint=%0d masked=%0d loop=%0d back_to_back=%0d",
             n_tx_frames, n_tx_full, n_tx_drop, n_rx_drop, n_perr, n_fre, n_xint_on, n_xint_masked, n_loop, n_back_to_back);
    `CHECK(n_tx_full > 0 && n_tx_drop > 0, "transmit FIFO full and write dropped occurred")
    `CHECK(n_rx_drop > 0, "receive FIFO overflow occurred")
    `CHECK(n_fre > 0, "framing error occurred")
    `CHECK(n_perr > 0, "parity error occurred")
    `CHECK(n_xint_on > 0 && n_xint_masked > 0, "interrupt and masking occurred")
    `CHECK(n_loop > 0, "loopback occurred")
    `CHECK(n_back_to_back > 0, "back-to-back frames from the FIFO occurred")
    `TB_DONE
  end
endmodule
