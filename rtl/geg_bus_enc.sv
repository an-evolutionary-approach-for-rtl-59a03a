// geg_bus_enc: GEG encoder for a whole address bus.
//
// The BUS_W-line bus is cut into BUS_W/W clusters of W consecutive lines:
// cluster c holds lines c*W .. c*W+W-1. Each cluster goes through its own
// bijective truth table (geg_cluster_enc), so the whole encoder is a
// permutation of the bus words and can be undone by geg_bus_dec. Cutting
// the bus keeps the tables small (2**W rows instead of 2**32); the document
// evaluates W = 4 and W = 8 and finds W = 8 best, hence the default.
//
// TABLES holds the cluster tables side by side, cluster c at bits
// [c*W*2**W +: W*2**W], each laid out as described in geg_cluster_enc. The
// tables come from the offline genetic search for one application; the
// default (Gray code in every cluster) is a placeholder of this design.
//
// Interface: addr (plain address) -> code (word driven on the bus lines),
// combinational, zero latency, no state.
module geg_bus_enc #(
  parameter int unsigned                 BUS_W  = geg_pkg::BUS_W,
  parameter int unsigned                 W      = geg_pkg::CLUSTER_W,
  parameter logic [BUS_W*(2**W)-1:0]     TABLES = (BUS_W*(2**W))'(geg_pkg::gray_bus_lut(W))
) (
  input  logic [BUS_W-1:0] addr,
  output logic [BUS_W-1:0] code
);

  localparam int unsigned NCLUST   = BUS_W / W;
  localparam int unsigned LUT_BITS = W * (2**W);

  if (NCLUST * W != BUS_W) begin : g_bad_split
    $error("geg_bus_enc: BUS_W must be a multiple of W");
  end

  for (genvar c = 0; c < NCLUST; c++) begin : g_cluster
    geg_cluster_enc #(
      .W     (W),
      .TABLE (TABLES[c*LUT_BITS +: LUT_BITS])
    ) u_enc (
      .din  (addr[c*W +: W]),
      .dout (code[c*W +: W])
    );
  end

endmodule
