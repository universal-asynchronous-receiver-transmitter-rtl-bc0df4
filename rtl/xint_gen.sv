// xint_gen: interrupt factor. Following the specification's equation, xintd
// is low (interrupt pending) when any status bit is set whose interrupt
// enable register bit is clear: xintd = not OR_i (sr_data[i] and not
// ier_data[i]). Purely combinational; XINTOFF registers it before the pin.
module xint_gen (
  input  logic [2:0] sr_data,
  input  logic [2:0] ier_data,
  output logic       xintd
);
  assign xintd = !(|(sr_data & ~ier_data));
endmodule
