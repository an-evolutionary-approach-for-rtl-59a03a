// tb_geg_cluster_enc: exhaustive check of the cluster encoder.
// Three instances: W = 8 with the default (Gray) table, W = 8 and W = 4
// with affine tables i -> K*i + C. Every input word is applied and the
// output compared with the formula from geg_tb_pkg. Two W = 2 instances
// hold the two non-trivial example encoders of 2-bit words
// (00,01,10,11 -> 11,10,00,01 and -> 10,11,01,00), checked row by row.
module tb_geg_cluster_enc;
  import geg_tb_pkg::*;

  localparam logic [8*256-1:0] T8 = 2048'(affine_bus_lut(8));   // cluster 0: K=3, C=1
  localparam logic [4*16-1:0]  T4 = 64'(affine_bus_lut(4));     // cluster 0: K=3, C=1

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] din8, dg8, da8;
  logic [3:0] din4, da4;
  logic [1:0] din2, dx2, dy2;
  localparam logic [1:0] EX2 [4] = '{2'b11, 2'b10, 2'b00, 2'b01};
  localparam logic [1:0] EX3 [4] = '{2'b10, 2'b11, 2'b01, 2'b00};

  geg_cluster_enc                         u_g8 (.din(din8), .dout(dg8));
  geg_cluster_enc #(.W(8), .TABLE(T8))    u_a8 (.din(din8), .dout(da8));
  geg_cluster_enc #(.W(4), .TABLE(T4))    u_a4 (.din(din4), .dout(da4));
  geg_cluster_enc #(.W(2), .TABLE({EX2[3], EX2[2], EX2[1], EX2[0]})) u_x2 (.din(din2), .dout(dx2));
  geg_cluster_enc #(.W(2), .TABLE({EX3[3], EX3[2], EX3[1], EX3[0]})) u_y2 (.din(din2), .dout(dy2));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      din8 = 8'(i);
      din4 = 4'(i);
      din2 = 2'(i);
      @(posedge clk);
      if (i < 4) begin
        checks++;
        if (dx2 != EX2[i] || dy2 != EX3[i]) begin
          failures++; $display("2-bit example in=%0d got %b %b", i, dx2, dy2);
        end
      end
      checks++;
      if (dg8 != 8'(gray(i))) begin
        failures++; $display("gray8 in=%0h got=%0h", i, dg8);
      end
      checks++;
      if (da8 != 8'(affine(i, 3, 1, 8))) begin
        failures++; $display("affine8 in=%0h got=%0h", i, da8);
      end
      if (i < 16) begin
        checks++;
        if (da4 != 4'(affine(i, 3, 1, 4))) begin
          failures++; $display("affine4 in=%0h got=%0h", i, da4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
