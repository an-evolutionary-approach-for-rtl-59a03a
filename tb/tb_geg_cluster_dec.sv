// tb_geg_cluster_dec: exhaustive check of the cluster decoder.
// For every coded word v it checks that re-encoding the decoder's output
// by formula gives v back (Gray for the default table, K*i + C for the
// affine tables), and that the decoder undoes the cluster encoder. A
// W = 2 instance inverts the example encoder 00,01,10,11 -> 11,10,00,01.
module tb_geg_cluster_dec;
  import geg_tb_pkg::*;

  localparam logic [8*256-1:0] T8 = 2048'(affine_bus_lut(8));
  localparam logic [4*16-1:0]  T4 = 64'(affine_bus_lut(4));

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] v8, dg8, da8, enc8, rt8;
  logic [3:0] v4, da4;
  logic [1:0] v2, dx2;
  localparam logic [1:0] EX2 [4] = '{2'b11, 2'b10, 2'b00, 2'b01};

  geg_cluster_dec                         u_g8 (.din(v8), .dout(dg8));
  geg_cluster_dec #(.W(8), .TABLE(T8))    u_a8 (.din(v8), .dout(da8));
  geg_cluster_dec #(.W(4), .TABLE(T4))    u_a4 (.din(v4), .dout(da4));
  geg_cluster_dec #(.W(2), .TABLE({EX2[3], EX2[2], EX2[1], EX2[0]})) u_x2 (.din(v2), .dout(dx2));
  geg_cluster_enc #(.W(8), .TABLE(T8))    u_e8 (.din(v8), .dout(enc8));
  geg_cluster_dec #(.W(8), .TABLE(T8))    u_r8 (.din(enc8), .dout(rt8));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      v8 = 8'(i);
      v4 = 4'(i);
      v2 = 2'(i);
      @(posedge clk);
      if (i < 4) begin
        checks++;
        if (EX2[dx2] != v2) begin
          failures++; $display("2-bit example code=%0d got %0d", i, dx2);
        end
      end
      checks++;
      if (8'(gray(int'(dg8))) != v8) begin
        failures++; $display("gray8 code=%0h got=%0h", i, dg8);
      end
      checks++;
      if (8'(affine(int'(da8), 3, 1, 8)) != v8) begin
        failures++; $display("affine8 code=%0h got=%0h", i, da8);
      end
      checks++;
      if (rt8 != v8) begin
        failures++; $display("round trip %0h -> %0h -> %0h", i, enc8, rt8);
      end
      if (i < 16) begin
        checks++;
        if (4'(affine(int'(da4), 3, 1, 4)) != v4) begin
          failures++; $display("affine4 code=%0h got=%0h", i, da4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
