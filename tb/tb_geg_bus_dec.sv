// tb_geg_bus_dec: checks the 32-bit GEG decoder.
// Coded words built by formula (Gray or per-cluster affine) are fed to the
// decoders, which must return the original address; a GEG4 encoder and
// decoder pair is also run back to back.
module tb_geg_bus_dec;
  import geg_tb_pkg::*;

  localparam logic [32*256-1:0] T8 = affine_bus_lut(8);
  localparam logic [32*16-1:0]  T4 = 512'(affine_bus_lut(4));

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a, vg8, va8, va4, dg8, da8, da4, e4, r4;

  geg_bus_dec                          u_g8 (.code(vg8), .addr(dg8));
  geg_bus_dec #(.W(8), .TABLES(T8))    u_a8 (.code(va8), .addr(da8));
  geg_bus_dec #(.W(4), .TABLES(T4))    u_a4 (.code(va4), .addr(da4));
  geg_bus_enc #(.W(4), .TABLES(T4))    u_e4 (.addr(a),   .code(e4));
  geg_bus_dec #(.W(4), .TABLES(T4))    u_r4 (.code(e4),  .addr(r4));

  task automatic check(logic [31:0] x);
    a   = x;
    vg8 = gray_bus(x, 8);
    va8 = affine_bus(x, 8);
    va4 = affine_bus(x, 4);
    @(posedge clk);
    checks++;
    if (dg8 != x) begin failures++; $display("gray8 %h -> %h", vg8, dg8); end
    checks++;
    if (da8 != x) begin failures++; $display("affine8 %h -> %h", va8, da8); end
    checks++;
    if (da4 != x) begin failures++; $display("affine4 %h -> %h", va4, da4); end
    checks++;
    if (r4 != x) begin failures++; $display("round trip4 %h -> %h", x, r4); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0);
    check(32'hffff_ffff);
    for (int b = 0; b < 32; b++) check(32'h1 << b);
    for (int n = 0; n < 2000; n++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
