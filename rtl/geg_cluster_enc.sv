// geg_cluster_enc: encoder for one cluster of W bus lines.
//
// The encoder is a bijection of the W-bit words onto themselves, stored as
// its truth table: the word sent on the cluster's lines for input word i is
// entry i of TABLE (bits [i*W +: W]). That representation, one row per input
// word, is the document's; the table itself is produced offline for one
// application by the genetic search and is passed in as a parameter, so the
// block synthesizes to a constant look-up (pure combinational logic, no
// registers). The default, a Gray-code table, is a placeholder of this design.
//
// Interface: din (plain cluster word) -> dout (coded cluster word), both W
// bits, combinational, zero latency.
// Elaboration stops with an error when TABLE is not a permutation, because
// the decoder could then not recover the address.
module geg_cluster_enc #(
  parameter int unsigned          W     = geg_pkg::CLUSTER_W,
  parameter logic [W*(2**W)-1:0]  TABLE = (W*(2**W))'(geg_pkg::gray_lut(W))
) (
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (W < 1 || W > geg_pkg::MAX_W) begin : g_bad_w
    $error("geg_cluster_enc: W must be 1..%0d", geg_pkg::MAX_W);
  end
  if (!geg_pkg::lut_is_perm(geg_pkg::lut_t'(TABLE), W)) begin : g_not_perm
    $error("geg_cluster_enc: TABLE is not a permutation");
  end

  logic [W-1:0] rom [2**W];

  always_comb begin
    for (int i = 0; i < 2**W; i++) rom[i] = TABLE[i*W +: W];
    dout = rom[din];
  end

endmodule
