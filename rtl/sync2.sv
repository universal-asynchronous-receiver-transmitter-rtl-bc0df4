// sync2: two-flip-flop synchroniser, used for the CPU-side inputs DATA, D_XS,
// XCS, XWR and XRD (DATASynch, DXSSynch, XCSSynch, XWRSynch, XRDSynch in the
// specification). The input is registered twice on CLK16M, so q follows d
// two clock edges later. The reset value RST_VAL is this design's choice
// (1 for the idle level of the active-low strobes, 0 for data).
// Reset: xrst, active low, asynchronous.
module sync2 #(
  parameter int unsigned      WIDTH   = 8,
  parameter logic [WIDTH-1:0] RST_VAL = '0
) (
  input  logic             clk,
  input  logic             xrst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge xrst) begin
    if (!xrst) begin
      meta <= RST_VAL;
      q    <= RST_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
