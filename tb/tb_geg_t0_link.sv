// tb_geg_t0_link: end-to-end test of the encoded address bus at its
// default configuration (32-bit bus, 8-bit clusters, GEG+T0, stride 4).
//
// A synthetic instruction-fetch stream (straight-line runs, loops, calls
// to far addresses, random jumps, idle cycles, a run across the 2**32
// wrap and a reset in mid-stream) is sent through encoder and decoder. The
// decoded address must equal the address sent one cycle earlier. The test
// counts how often each mechanism occurred (T0 transfer with INC high,
// GEG-coded transfer, idle cycle, reset) and fails if one never did. It
// also counts transitions on the coded lines (including INC) against the
// transitions the same stream would cause on a plain 32-bit bus.
module tb_geg_t0_link;
  import geg_tb_pkg::*;

  int checks = 0, failures = 0;
  int n_t0 = 0, n_geg = 0, n_idle = 0, n_reset = 0;
  longint tr_plain = 0, tr_coded = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, in_valid, bus_valid, bus_inc, out_valid;
  logic [31:0] in_addr, bus_code, out_addr;

  geg_t0_link u_dut (.clk, .rst_n, .in_valid, .in_addr, .bus_valid, .bus_code,
                     .bus_inc, .out_valid, .out_addr);

  logic [31:0] exp_addr, plain_prev;
  bit          exp_valid;
  logic [32:0] coded_prev;

  task automatic send(bit v, logic [31:0] a);
    @(negedge clk);
    in_valid = v;
    in_addr  = a;
    @(posedge clk);
    exp_valid = v;
    if (v) exp_addr = a;
    #1;
    checks++;
    if (out_valid !== exp_valid || (exp_valid && out_addr !== exp_addr)) begin
      failures++;
      $display("sent %h (v=%0b), received %h (v=%0b)", exp_addr, exp_valid, out_addr, out_valid);
    end
    if (bus_valid) begin
      if (bus_inc) n_t0++; else n_geg++;
      tr_plain += longint'(popcount(64'(plain_prev ^ a)));
      plain_prev = a;
    end else n_idle++;
    tr_coded += longint'(popcount(64'(coded_prev ^ {bus_inc, bus_code})));
    coded_prev = {bus_inc, bus_code};
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 0; in_valid = 0;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid || bus_inc) begin failures++; $display("reset state wrong"); end
    coded_prev = {bus_inc, bus_code};
    @(negedge clk);
    rst_n = 1;
    n_reset++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] pc, ret;
    int r;
    rst_n = 0; in_valid = 0; in_addr = '0;
    plain_prev = '0; coded_prev = '0;
    do_reset();
    n_reset = 0;
    send(1, 32'hffff_fff8);
    send(1, 32'hffff_fffc);
    send(1, 32'h0000_0000);         // in sequence across the wrap
    pc = 32'h0001_0000;
    for (int blk = 0; blk < 2000; blk++) begin
      r = $urandom_range(99);
      if (r < 40) begin                       // straight-line run
        repeat ($urandom_range(12, 1)) begin
          pc += 4; send($urandom_range(15) != 0, pc);
        end
      end else if (r < 70) begin              // small loop
        logic [31:0] top;
        int len, it;
        top = pc; len = $urandom_range(8, 2); it = $urandom_range(5, 1);
        repeat (it) begin
          pc = top;
          send(1, pc);
          repeat (len) begin pc += 4; send(1, pc); end
        end
      end else if (r < 90) begin              // call and return
        ret = pc + 4;
        pc = 32'h0002_0000 + ($urandom_range(2047) << 2);
        send(1, pc);
        repeat ($urandom_range(6, 1)) begin pc += 4; send(1, pc); end
        pc = ret; send(1, pc);
      end else begin                          // far jump
        pc = {8'($urandom_range(255)), 24'h0} | (32'($urandom) & 32'h00ff_fffc);
        send(1, pc);
      end
      if (blk == 1000) do_reset();
    end
    $display("transfers: t0=%0d geg=%0d idle=%0d resets=%0d", n_t0, n_geg, n_idle, n_reset);
    $display("transitions: plain bus=%0d coded bus+INC=%0d", tr_plain, tr_coded);
    checks++;
    if (n_t0 == 0 || n_geg == 0 || n_idle == 0 || n_reset == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
