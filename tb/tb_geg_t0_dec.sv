// tb_geg_t0_dec: checks the hybrid decoder with a bus driven by the
// testbench. Each address is sent either with INC high (when it is the
// last address plus 4) or as a Gray-coded word with INC low; in-sequence
// addresses are also sometimes sent coded, which the decoder must accept.
// Idle cycles carry garbage on the lines and must not disturb the state.
// out_addr is combinational and is compared in the same cycle.
module tb_geg_t0_dec;
  import geg_tb_pkg::*;

  int checks = 0, failures = 0;
  int n_t0 = 0, n_geg = 0, n_idle = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, bus_valid, bus_inc, out_valid;
  logic [31:0] bus_code, out_addr;

  geg_t0_dec u_dut (.clk, .rst_n, .bus_valid, .bus_code, .bus_inc, .out_valid, .out_addr);

  logic [31:0] last;
  bit          last_ok;

  task automatic send(bit v, logic [31:0] a, bit allow_t0);
    @(negedge clk);
    bus_valid = v;
    if (!v) begin
      bus_code = $urandom;
      bus_inc  = 1'b0;
      n_idle++;
    end else if (allow_t0 && last_ok && a == last + 32'd4) begin
      bus_inc = 1'b1;
      bus_code = $urandom;          // lines are don't-care under INC
      n_t0++;
    end else begin
      bus_inc = 1'b0;
      bus_code = gray_bus(a, 8);
      n_geg++;
    end
    #1;
    checks++;
    if (out_valid !== v || (v && out_addr !== a)) begin
      failures++;
      $display("a=%h inc=%0b got valid=%0b addr=%h", a, bus_inc, out_valid, out_addr);
    end
    @(posedge clk);
    if (v) begin last = a; last_ok = 1; end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] pc;
    rst_n = 0; bus_valid = 0; bus_inc = 0; bus_code = '0;
    last = '0; last_ok = 0;
    @(posedge clk);
    @(negedge clk) rst_n = 1;
    send(1, 32'hffff_fffc, 1);
    send(1, 32'h0, 1);              // wraps
    pc = 32'h1000;
    for (int n = 0; n < 4000; n++) begin
      int r;
      r = $urandom_range(99);
      if (r < 65)      pc += 4;
      else if (r < 85) pc = 32'h1000 + ($urandom_range(1023) << 2);
      else             pc = $urandom;
      send($urandom_range(7) != 0, pc, $urandom_range(9) != 0);
    end
    $display("transfers: t0=%0d geg=%0d idle=%0d", n_t0, n_geg, n_idle);
    checks++;
    if (n_t0 == 0 || n_geg == 0 || n_idle == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
