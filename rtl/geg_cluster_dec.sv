// geg_cluster_dec: decoder for one cluster of W bus lines.
//
// It applies the inverse of the cluster encoder's table, which the document
// calls the decoder. Both sides are given the same encoder TABLE; the
// inverse table is worked out at elaboration time (INV[TABLE[i]] = i), so
// the two cannot drift apart. Like the encoder it is a constant look-up with
// no state.
//
// Interface: din (coded cluster word from the bus) -> dout (plain word),
// W bits each, combinational, zero latency.
// Elaboration stops with an error when TABLE is not a permutation.
module geg_cluster_dec #(
  parameter int unsigned          W     = geg_pkg::CLUSTER_W,
  parameter logic [W*(2**W)-1:0]  TABLE = (W*(2**W))'(geg_pkg::gray_lut(W))
) (
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (W < 1 || W > geg_pkg::MAX_W) begin : g_bad_w
    $error("geg_cluster_dec: W must be 1..%0d", geg_pkg::MAX_W);
  end
  if (!geg_pkg::lut_is_perm(geg_pkg::lut_t'(TABLE), W)) begin : g_not_perm
    $error("geg_cluster_dec: TABLE is not a permutation");
  end

  localparam logic [W*(2**W)-1:0] INV =
    (W*(2**W))'(geg_pkg::lut_inverse(geg_pkg::lut_t'(TABLE), W));

  logic [W-1:0] rom [2**W];

  always_comb begin
    for (int i = 0; i < 2**W; i++) rom[i] = INV[i*W +: W];
    dout = rom[din];
  end

endmodule
