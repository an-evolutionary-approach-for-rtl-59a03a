// tb_geg_bus_enc: checks the 32-bit GEG encoder.
// Instances: GEG8 with the default tables, GEG8 and GEG4 with a different
// affine table in every cluster (so a cluster wired to the wrong lines or
// the wrong table shows). Random addresses plus walking-one addresses are
// compared with the per-cluster formula.
module tb_geg_bus_enc;
  import geg_tb_pkg::*;

  localparam logic [32*256-1:0] T8 = affine_bus_lut(8);
  localparam logic [32*16-1:0]  T4 = 512'(affine_bus_lut(4));

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a, cg8, ca8, ca4;

  geg_bus_enc                          u_g8 (.addr(a), .code(cg8));
  geg_bus_enc #(.W(8), .TABLES(T8))    u_a8 (.addr(a), .code(ca8));
  geg_bus_enc #(.W(4), .TABLES(T4))    u_a4 (.addr(a), .code(ca4));

  task automatic check(logic [31:0] x);
    a = x;
    @(posedge clk);
    checks++;
    if (cg8 != gray_bus(x, 8)) begin
      failures++; $display("gray8 %h -> %h exp %h", x, cg8, gray_bus(x, 8));
    end
    checks++;
    if (ca8 != affine_bus(x, 8)) begin
      failures++; $display("affine8 %h -> %h exp %h", x, ca8, affine_bus(x, 8));
    end
    checks++;
    if (ca4 != affine_bus(x, 4)) begin
      failures++; $display("affine4 %h -> %h exp %h", x, ca4, affine_bus(x, 4));
    end
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
