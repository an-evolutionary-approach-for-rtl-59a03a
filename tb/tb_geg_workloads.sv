// tb_geg_workloads: the two bus scenarios of the evaluation, on synthetic
// address streams.
//
//   fetch-only bus : instruction fetch addresses only (runs, loops, calls);
//                    configurations GEG8+T0 and GEG8.
//   multiplexed bus: the same fetch stream interleaved with load/store
//                    addresses walking arrays in a data region;
//                    configurations GEG8 and GEG4.
//
// Every configuration must deliver every address unchanged one cycle
// later. For each scenario and configuration the test reports the
// transitions on the coded lines (INC included) against a plain bus. The
// cluster tables are the default Gray tables, not tables optimised for
// these streams, so the numbers show the mechanism, not the savings an
// application-specific table would reach.
module tb_geg_workloads;
  import geg_tb_pkg::*;

  localparam int NCFG = 4;   // 0: GEG8+T0, 1: GEG8, 2: GEG4, 3: GEG8+T0 on mux stream (reference)

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, in_valid;
  logic [31:0] in_addr;
  logic [NCFG-1:0]       bv, bi, ov;
  logic [NCFG-1:0][31:0] bc, oa;

  geg_t0_link                              u_h8 (.clk, .rst_n, .in_valid, .in_addr,
      .bus_valid(bv[0]), .bus_code(bc[0]), .bus_inc(bi[0]), .out_valid(ov[0]), .out_addr(oa[0]));
  geg_t0_link #(.T0_EN(1'b0))              u_g8 (.clk, .rst_n, .in_valid, .in_addr,
      .bus_valid(bv[1]), .bus_code(bc[1]), .bus_inc(bi[1]), .out_valid(ov[1]), .out_addr(oa[1]));
  geg_t0_link #(.W(4), .T0_EN(1'b0))       u_g4 (.clk, .rst_n, .in_valid, .in_addr,
      .bus_valid(bv[2]), .bus_code(bc[2]), .bus_inc(bi[2]), .out_valid(ov[2]), .out_addr(oa[2]));
  geg_t0_link #(.W(4))                     u_h4 (.clk, .rst_n, .in_valid, .in_addr,
      .bus_valid(bv[3]), .bus_code(bc[3]), .bus_inc(bi[3]), .out_valid(ov[3]), .out_addr(oa[3]));

  longint tr_plain, tr_cfg [NCFG];
  logic [31:0] plain_prev;
  logic [32:0] prev_lines [NCFG];
  int n_seq;

  task automatic send(logic [31:0] a);
    @(negedge clk);
    in_valid = 1'b1;
    in_addr  = a;
    @(posedge clk);
    #1;
    for (int k = 0; k < NCFG; k++) begin
      checks++;
      if (!ov[k] || oa[k] !== a) begin
        failures++; $display("cfg %0d: sent %h received %h", k, a, oa[k]);
      end
      tr_cfg[k] += longint'(popcount(64'(prev_lines[k] ^ {bi[k], bc[k]})));
      prev_lines[k] = {bi[k], bc[k]};
    end
    if (a == plain_prev + 32'd4) n_seq++;
    tr_plain += longint'(popcount(64'(plain_prev ^ a)));
    plain_prev = a;
  endtask

  task automatic start();
    @(negedge clk);
    rst_n = 0; in_valid = 0;
    @(negedge clk);
    rst_n = 1;
    tr_plain = 0; plain_prev = '0; n_seq = 0;
    for (int k = 0; k < NCFG; k++) begin tr_cfg[k] = 0; prev_lines[k] = '0; end
  endtask

  task automatic report(string name, int n);
    $display("%s: %0d addresses, %0d%% in sequence, plain bus %0d transitions",
             name, n, (100 * n_seq) / n, tr_plain);
    $display("  GEG8+T0 %0d  GEG8 %0d  GEG4 %0d  GEG4+T0 %0d",
             tr_cfg[0], tr_cfg[1], tr_cfg[2], tr_cfg[3]);
  endtask

  // One basic block of 1..6 instruction fetches ending in a taken branch
  // (loop back, forward skip or far jump), which puts about two thirds of the
  // fetch addresses in sequence. With mux set, each instruction is followed
  // by a data access with probability 1/3.
  logic [31:0] pc, dptr [4];
  task automatic fetch_block(bit mux);
    int r, len;
    len = $urandom_range(6, 1);
    repeat (len) begin
      send(pc);
      if (mux && $urandom_range(2) == 0) begin
        int s;
        s = $urandom_range(3);
        send(dptr[s]);
        dptr[s] += 32'(4 << s);
      end
      pc += 4;
    end
    r = $urandom_range(99);
    if (r < 40)      pc -= 32'(4 * $urandom_range(12, 1));         // loop back
    else if (r < 80) pc += 32'(4 * $urandom_range(16, 1));         // forward skip
    else             pc = 32'h0040_0000 + ($urandom_range(8191) << 2);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    rst_n = 0; in_valid = 0; in_addr = '0;
    start();
    pc = 32'h0040_0000; n = 0;
    for (int b = 0; b < 3000; b++) fetch_block(1'b0);
    n = int'(checks / NCFG);
    report("fetch-only bus", n);
    start();
    pc = 32'h0040_0000;
    dptr[0] = 32'h1000_0000; dptr[1] = 32'h1000_8000;
    dptr[2] = 32'h1001_0000; dptr[3] = 32'h7fff_f000;
    for (int b = 0; b < 3000; b++) fetch_block(1'b1);
    report("multiplexed bus", int'(checks / NCFG) - n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
