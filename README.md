# UART-8251: a small 8251-style serial port in SystemVerilog

This is a universal asynchronous receiver/transmitter modelled on the 8251
peripheral. A CPU on an 8-bit asynchronous bus queues bytes for transmission
and reads back received bytes. The UART turns each byte into an 11-bit serial
frame on `TXD`. In the other direction it checks every frame that arrives on
`RXD` and keeps only the good ones. One clock, `CLK16M` (16 MHz), runs
everything. The serial bit rate is that clock divided by 16, which gives
1 Mbit/s.

The design follows an 8251-style course-project specification. That
specification describes the partitioning (synchronisers, CPU interface,
FIFOs, serial transmit and receive blocks and their counters), the register
map and the transmit machinery in detail. It says much less about the
receiver, so much of the receiver is this design's own. The section
"Departures and own choices" lists every point where the RTL fills a gap or
differs from the specification.

## Pins

| Pin      | Dir   | Meaning |
|----------|-------|---------|
| `CLK16M` | in    | 16 MHz system clock |
| `XRST`   | in    | reset, active low, asynchronous |
| `D_XS`   | in    | register select: 0 = status / interrupt enable, 1 = data |
| `XCS`    | in    | chip select, active low |
| `XWR`    | in    | write strobe, active low |
| `XRD`    | in    | read strobe, active low |
| `DATA`   | inout | 8-bit data bus; the UART drives it only while `XRD` and `XCS` are low |
| `XINT`   | out   | interrupt, active low |
| `TXD`    | out   | serial output, idles high |
| `RXD`    | in    | serial input, idles high |

## Register map

| `D_XS` | Access | Effect |
|--------|--------|--------|
| 0 | read  | status `{5'b0, PERR, RX_RDY, TX_RDY}`; the read also clears `PERR` |
| 0 | write | interrupt enable register ← `DATA[2:0]` |
| 1 | read  | oldest byte of the receive FIFO, which is then removed |
| 1 | write | byte appended to the transmit FIFO |

Status bits:

- `TX_RDY` (bit 0) is 1 while the 2-word transmit FIFO is not full.
- `RX_RDY` (bit 1) is 1 while the 4-word receive FIFO holds data.
- `PERR` (bit 2) is set when a frame arrives with the wrong parity bit.

The interrupt enable register works as a mask: a **1 disables** the matching
status bit. The interrupt follows

    XINT = not( OR over i of (status[i] and not mask[i]) )

so `XINT` goes low while any unmasked status bit is set. After reset the
mask is `3'b111` and `XINT` is high. Software that wants an interrupt for
received data writes `3'b101`, which clears bit 1. Because `TX_RDY` is
almost always 1, unmasking bit 0 gives a continuous "room to write"
interrupt.

If the CPU writes a byte while the transmit FIFO is full, the byte is
dropped. If it reads data while the receive FIFO is empty, it gets the
last head value, and nothing is removed.

## The bus side: synchronisers and read timing

The CPU bus is asynchronous to `CLK16M`. `D_XS`, `XCS`, `XWR`, `XRD` and
`DATA` each pass through two flip-flops (`sync2`) before the logic uses
them. `RXD` passes through one (`out_reg`). Three outputs leave through one
register each: the read data, `XINT` and `TXD`.

Each access acts exactly once. It happens in the first cycle in which the
synchronised strobe is seen low while the synchronised `XCS` is low. That
is at most three clocks (187.5 ns) after the strobe falls. The minimum bus
timing this design is built to meet:

- **Write:** `DATA` and `D_XS` set up 100 ns before `XWR` falls, `XWR` low
  for at least 250 ns, and 10 ns hold after `XWR` rises. The write is taken
  while `DATA` is still stable.
- **Read:** `D_XS` set up 100 ns before `XRD` falls, `XRD` low for at least
  250 ns. `DATA` must be valid 50 ns before `XRD` rises, so 200 ns after it
  falls.

Meeting the read requirement with four register stages in the path takes
one trick. This is the least obvious part of the bus side:

- While no read is in progress, the read data register (`data_reg`) keeps
  following whatever `D_XS` selects: the receive-FIFO head or the status.
- `DATAOFF` registers that value, and the tristate driver (`data_tristate`)
  is switched by the raw `XRD` and `XCS` pins.
- The byte is therefore already on its way before `XRD` falls. It appears
  on `DATA` at most 150 ns after `XRD` falls.
- Once the synchronised `XRD` is low, `data_reg` freezes. The receive FIFO
  can then be popped at the start of the read without changing the byte
  the CPU is sampling.

## Serial frame

    idle(1) | start(0) | b0 b1 b2 b3 b4 b5 b6 b7 | parity | stop(1) | idle(1)

Bit 0 is sent first. Each bit lasts 16 clocks. The parity is even: the
parity bit makes the number of ones in b0..b7 plus the parity bit even.

## Transmitter (`serial_tx`)

The transmitter is built from five parts, wired as in the specification's
diagram:

- **`bit_clock_counter`** (stb_clk16) runs freely and pulses once every
  16 clocks. This pulse is the bit tick.
- **`tx_control`** is a three-state machine:
  - `IDLE`: waits until the transmit FIFO holds a byte.
  - `FIFO_READ`: one cycle that loads the oldest byte into the FIFO's
    output register and advances the read pointer.
  - `DATA_TRANSMIT`: holds `transmit` and `stb_dci` high until the
    transmit block reports `transmitted`. Then `stb_dcc` clears the data
    counter and the machine goes back to `IDLE`.
- **`bit_counter`** (stb_data_count) gives the bit slot of the frame. It
  advances on each tick while `stb_dci` is high.
- **`parity_counter`** (stb_par_count) counts the ones sent. It is cleared
  by `stb_pcc` in the start slot and advanced by `stb_pci`.
- **`tx_block`** sets `tx_d` on each tick according to the slot:

| Slot | Sent |
|------|------|
| 0 | start bit |
| 1..8 | data bit `slot-1` |
| 9 | bit 0 of the parity count |
| 10 | stop bit |
| 11 | `transmitted` pulses, after a whole stop bit |

A frame starts at the next free-running tick, up to 16 clocks after the
byte reaches the head of the FIFO. With a second byte waiting, frames follow
each other with about one extra bit time of idle line between them.

## Receiver (`serial_rx`)

The receiver mirrors the transmitter and reuses the same counter modules.
The sampling scheme is this design's own:

- **Start detection.** In `IDLE`, `rx_control` holds the receive clock
  counter and data counter at zero. The first low level on the
  synchronised `RXD` moves it to `DATA_RECEIVE`.
- **Mid-bit sampling.** The clock counter restarts at that edge and first
  ticks 7 clocks later, then every 16 clocks. Each bit is therefore sampled
  8–9 clocks after its edge, close to its middle.
- **`rx_block`** handles each slot on its tick:

| Slot | Action |
|------|--------|
| 0 | checks the start bit is still low; if not, the frame ends at once as a false start |
| 1..8 | shifts data into `rec_data`, counting ones |
| 9 | compares the parity bit with the count: a mismatch sets `perr` |
| 10 | checks the stop bit: a low stop bit sets `x_fre` (framing error); `received` pulses |

- **After `received`:**
  - A frame with no error, arriving while the FIFO has room, gets exactly
    one `FIFO_WRITE` cycle.
  - A parity error pulses `perr_set`, which sets `PERR` in the status
    register. The byte is not stored.
  - A framing error or a false start is dropped without a flag.
  - A good frame that finds the FIFO full is dropped.
- The machine is back in `IDLE` in the middle of the stop bit, ready for the
  next start edge.

## FIFOs (`uart_fifo`)

One module serves both directions: `DEPTH = 2` for transmit and `DEPTH = 4`
for receive, 8 bits wide.

- The writer asserts `wr` with `wr_inc`, and the reader asserts `rd` with
  `rd_inc`.
- `rd` loads the head into the registered `rd_data`, which the transmitter
  uses. `head` shows the oldest word without delay, which the CPU read path
  uses.
- Both pointers wrap after `DEPTH-1`. An occupancy counter gives `full` and
  `empty`.

## Module hierarchy

    uart8251                      top; parameters TX_DEPTH=2, RX_DEPTH=4, DIV=16
    ├── sync2 ×5                  DATA, D_XS, XCS, XWR, XRD synchronisers
    ├── out_reg ×4                RXD input flop; DATA, XINT, TXD output flops
    ├── cpu_if                    access decode
    │   ├── status_reg
    │   ├── int_enable_reg
    │   ├── xint_gen
    │   └── data_reg
    ├── uart_fifo (transmit, 2 words)
    ├── serial_tx
    │   ├── bit_clock_counter, bit_counter, parity_counter
    │   ├── tx_control
    │   └── tx_block
    ├── serial_rx
    │   ├── bit_clock_counter, bit_counter, parity_counter
    │   ├── rx_control
    │   └── rx_block
    ├── uart_fifo (receive, 4 words)
    └── data_tristate             DATA bus driver
    uart_pkg                      frame slot numbers, status bit positions, state types

## Departures and own choices

**Where the RTL differs from the specification**

- **Chip select and the serial blocks.** The specification gives every
  serial sub-block `XCS1` as a chip enable. Here `XCS` only qualifies CPU
  accesses. The CPU de-selects the chip right after writing, and the frame
  must still complete.
- **When a frame starts.** The specification starts a frame when it sees a
  data write. Here the transmit machine starts whenever the FIFO is not
  empty. This covers that case, and it also sends a second buffered byte.
- **Clocking of the bit logic.** The transmit and receive blocks run on
  `CLK16M`, with the bit tick as an enable rather than as a clock.

**Choices the specification leaves open**

- **Parity sense.** The parity is even.
- **Clearing `PERR`.** A status read clears it.
- **Reset values.** The mask resets to `3'b111`. Line and strobe registers
  reset to their idle levels.
- **Bus driver enable.** The bus driver is also gated by `XCS`.
- **One action per access.** Each CPU access is edge-detected, so it acts
  once.
- **Full and empty FIFOs.** Writes to a full FIFO and reads of an empty one
  are ignored.
- **Receiver details.** The receiver's start detection, sampling point,
  false-start handling and drop rules are all this design's own.

**Not modelled:** baud-rate selection, character lengths other than 8, and
a choice of parity or stop bits. The design has one fixed format.

## Simulation

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each ends
by printing `TB_RESULT checks=N failures=M`. Each has a watchdog that ends
the run as a failure if it hangs. Shared check macros are in
`tb/tb_util.svh`. Run from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/uart_pkg.sv tb/tb_uart8251.sv --top-module tb_uart8251 -o sim
    ./obj_dir/sim

`tb_uart8251` runs the whole UART at its default parameters. It uses a CPU
bus model at the minimum timings above, a frame decoder on `TXD` and a frame
driver on `RXD`, and it checks:

- the status after reset;
- three transmitted bytes, with the transmit FIFO reported full and a
  fourth write dropped;
- five received frames, where the fifth overflows the 4-word FIFO;
- the masked and unmasked interrupt;
- a parity error that sets `PERR` and `XINT` and is cleared by a status
  read;
- a framing error;
- a `TXD`→`RXD` loopback of two bytes.

It counts each of these events and fails if any never happened. It finishes
in well under a second.

Other notable testbenches:

- `tb_serial_tx` checks that every edge of a frame falls on a multiple of
  16 clocks and that buffered frames run back to back.
- `tb_serial_rx` sends good frames, frames with a bad parity bit or a bad
  stop bit, and glitches at a random phase to the clock. It checks that
  each good frame is stored 10.5 bit times after its start edge.
- `tb_uart_fifo` compares the FIFO with a queue model at depth 4.

Testbenches that set parameters use the documented defaults, except that
`tb_sync2` and `tb_out_reg` use an 8-bit width.
