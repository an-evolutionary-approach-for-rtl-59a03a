// geg_bus_dec: GEG decoder for a whole address bus, the inverse of
// geg_bus_enc.
//
// The received word is cut into the same clusters of W consecutive lines
// (cluster c holds lines c*W .. c*W+W-1) and each cluster goes through the
// inverse of its encoder table (geg_cluster_dec). It takes the encoder's
// TABLES, not an inverse, so that one parameter set configures both ends
// of the bus. The default (Gray code in every cluster) is a placeholder of
// this design; real tables come from the offline genetic search.
//
// Interface: code (word on the bus lines) -> addr (plain address),
// combinational, zero latency, no state.
module geg_bus_dec #(
  parameter int unsigned                 BUS_W  = geg_pkg::BUS_W,
  parameter int unsigned                 W      = geg_pkg::CLUSTER_W,
  parameter logic [BUS_W*(2**W)-1:0]     TABLES = (BUS_W*(2**W))'(geg_pkg::gray_bus_lut(W))
) (
  input  logic [BUS_W-1:0] code,
  output logic [BUS_W-1:0] addr
);

  localparam int unsigned NCLUST   = BUS_W / W;
  localparam int unsigned LUT_BITS = W * (2**W);

  if (NCLUST * W != BUS_W) begin : g_bad_split
    $error("geg_bus_dec: BUS_W must be a multiple of W");
  end

  for (genvar c = 0; c < NCLUST; c++) begin : g_cluster
    geg_cluster_dec #(
      .W     (W),
      .TABLE (TABLES[c*LUT_BITS +: LUT_BITS])
    ) u_dec (
      .din  (code[c*W +: W]),
      .dout (addr[c*W +: W])
    );
  end

endmodule
