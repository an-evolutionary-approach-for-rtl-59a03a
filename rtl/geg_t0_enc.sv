// geg_t0_enc: hybrid GEG+T0 address encoder (transmitting end).
//
// Every address is coded two ways at once. If it follows the previous
// address by STRIDE (an in-sequence reference, typical of instruction
// fetch), the T0 code is sent: the bus lines keep their previous value and
// the extra signalling line INC is raised, so the receiver rebuilds the
// address by adding STRIDE to the last one. Otherwise the GEG code (the
// per-cluster truth tables of geg_bus_enc) is driven with INC low. Choosing
// between the two this way, and the extra INC line, follow the document; the
// stride, the registered bus driver, the valid strobe and reset follow this
// design.
//
// With T0_EN = 0 the sequence test is disabled, INC stays low and the block
// is the plain GEG encoder (the document's multiplexed-bus configuration)
// behind a bus register.
//
// Interface and timing: an address presented with in_valid high at a rising
// clk edge appears coded on bus_code/bus_inc, with bus_valid high, one cycle
// later. Without in_valid the bus lines and INC keep their value (no
// switching) and bus_valid is low. The "previous address" is the last one
// accepted with in_valid; after reset there is none, so the first address is
// always GEG coded. Reset (rst_n, active low, synchronous) clears the bus.
module geg_t0_enc #(
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
  output logic             bus_inc
);

  logic [BUS_W-1:0] geg_code;
  logic [BUS_W-1:0] prev_addr;
  logic             prev_ok;
  logic             in_seq;

  geg_bus_enc #(
    .BUS_W  (BUS_W),
    .W      (W),
    .TABLES (TABLES)
  ) u_geg (
    .addr (in_addr),
    .code (geg_code)
  );

  always_comb begin
    in_seq = T0_EN && prev_ok && (in_addr == prev_addr + BUS_W'(STRIDE));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_ok   <= 1'b0;
      prev_addr <= '0;
      bus_valid <= 1'b0;
      bus_code  <= '0;
      bus_inc   <= 1'b0;
    end else begin
      bus_valid <= in_valid;
      if (in_valid) begin
        prev_ok   <= 1'b1;
        prev_addr <= in_addr;
        bus_inc   <= in_seq;
        if (!in_seq) bus_code <= geg_code;   // T0: lines stay frozen
      end
    end
  end

endmodule
