// data_tristate: the bidirectional CPU data bus driver. While the CPU holds
// XRD low with the chip selected (XCS low) the bus carries data_bus2; at all
// other times the pins are released to high impedance so the CPU can drive
// them. The specification names only XRD as the enable; adding XCS, so that
// an unselected chip never drives the bus, is this design's choice. The
// enable uses the raw pins, so the bus turns around without clock delay.
// data_in returns what is on the pins, for the input synchroniser.
module data_tristate (
  input  logic [7:0] data_bus2,
  input  logic       xrd,
  input  logic       xcs,
  inout  wire  [7:0] data,
  output logic [7:0] data_in
);
  logic drive;

  assign drive   = !xrd && !xcs;
  assign data    = drive ? data_bus2 : 8'bz;
  assign data_in = data;
endmodule
