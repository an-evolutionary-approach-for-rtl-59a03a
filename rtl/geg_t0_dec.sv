// geg_t0_dec: hybrid GEG+T0 address decoder (receiving end).
//
// When a transfer arrives with INC high the address is the previous decoded
// address plus STRIDE (T0 case) and the bus lines are ignored; with INC low
// the lines carry a GEG code and are passed through the inverse cluster
// tables (geg_bus_dec). The decoded address is remembered for the next
// in-sequence transfer. The decoding rule follows from the document's
// encoder; the stride, the valid strobe and reset are this design's choices
// and must match geg_t0_enc.
//
// Interface and timing: out_addr/out_valid are combinational from
// bus_code/bus_inc/bus_valid (zero latency); the last-address register is
// loaded at the rising clk edge of every valid transfer. rst_n is active low
// and synchronous. An assertion checks the bus rule that INC is never raised
// before a first address has been received.
module geg_t0_dec #(
  parameter int unsigned             BUS_W  = geg_pkg::BUS_W,
  parameter int unsigned             W      = geg_pkg::CLUSTER_W,
  parameter logic [BUS_W*(2**W)-1:0] TABLES = (BUS_W*(2**W))'(geg_pkg::gray_bus_lut(W)),
  parameter int unsigned             STRIDE = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bus_valid,
  input  logic [BUS_W-1:0] bus_code,
  input  logic             bus_inc,
  output logic             out_valid,
  output logic [BUS_W-1:0] out_addr
);

  logic [BUS_W-1:0] geg_addr;
  logic [BUS_W-1:0] last_addr;
  logic             last_ok;

  geg_bus_dec #(
    .BUS_W  (BUS_W),
    .W      (W),
    .TABLES (TABLES)
  ) u_geg (
    .code (bus_code),
    .addr (geg_addr)
  );

  always_comb begin
    out_valid = bus_valid;
    out_addr  = bus_inc ? last_addr + BUS_W'(STRIDE) : geg_addr;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_ok   <= 1'b0;
      last_addr <= '0;
    end else if (bus_valid) begin
      last_ok   <= 1'b1;
      last_addr <= out_addr;
    end
  end

  a_inc_after_first : assert property (
    @(posedge clk) disable iff (!rst_n) (bus_valid && bus_inc) |-> last_ok
  ) else $error("geg_t0_dec: INC raised before any address was received");

endmodule
