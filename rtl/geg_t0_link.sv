// geg_t0_link: one encoded address bus, transmitter to receiver.
//
// An address stream (for instance a processor's instruction fetch
// addresses) enters geg_t0_enc, crosses the bus as BUS_W coded lines plus
// the INC signalling line, and is restored by geg_t0_dec. Both ends share
// one set of parameters, so they always use the same cluster tables and
// stride. The coded lines are brought out as ports because their switching
// activity is what the scheme reduces. With T0_EN = 1 (default) this is the
// document's GEG+T0 hybrid for a fetch-only address bus; with T0_EN = 0 it
// is plain GEG, the document's scheme for a multiplexed (fetch plus
// load/store) address bus.
//
// Timing: an address accepted with in_valid at a rising clk edge appears on
// out_addr with out_valid one cycle later. rst_n is active low, synchronous.
module geg_t0_link #(
  parameter int unsigned             BUS_W  = geg_pkg::BUS_W,
  parameter int unsigned             W      = geg_pkg::CLUSTER_W,
  parameter logic [BUS_W*(2**W)-1:0] TABLES = (BUS_W*(2**W))'(geg_pkg::gray_bus_lut(W)),
  parameter int unsigned             STRIDE = 4,
  parameter bit                      T0_EN  = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [BUS_W-1:0] in_addr,
  output logic             bus_valid,
  output logic [BUS_W-1:0] bus_code,
  output logic             bus_inc,
  output logic             out_valid,
  output logic [BUS_W-1:0] out_addr
);

  geg_t0_enc #(
    .BUS_W  (BUS_W),
    .W      (W),
    .TABLES (TABLES),
    .STRIDE (STRIDE),
    .T0_EN  (T0_EN)
  ) u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_addr   (in_addr),
    .bus_valid (bus_valid),
    .bus_code  (bus_code),
    .bus_inc   (bus_inc)
  );

  geg_t0_dec #(
    .BUS_W  (BUS_W),
    .W      (W),
    .TABLES (TABLES),
    .STRIDE (STRIDE)
  ) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .bus_valid (bus_valid),
    .bus_code  (bus_code),
    .bus_inc   (bus_inc),
    .out_valid (out_valid),
    .out_addr  (out_addr)
  );

endmodule
