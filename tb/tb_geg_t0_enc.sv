// tb_geg_t0_enc: checks the hybrid GEG+T0 encoder against a cycle model.
// Two instances see the same stimulus: the default (GEG8 + T0, stride 4)
// and one with T0 disabled (plain GEG behind the bus register). The
// stimulus mixes in-sequence runs, jumps, repeats of the same address,
// idle cycles inside a run, a run across the 2**32 wrap, the first
// address after reset being previous-plus-4 of the reset value, and a
// reset in mid-stream. The model predicts bus_code, bus_inc and bus_valid
// one cycle after each input; a wrong latency fails the compare.
module tb_geg_t0_enc;
  import geg_tb_pkg::*;

  int checks = 0, failures = 0;
  int n_t0 = 0, n_geg = 0, n_idle = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, in_valid;
  logic [31:0] in_addr;
  logic        v1, i1, v2, i2;
  logic [31:0] c1, c2;

  geg_t0_enc                  u_h (.clk, .rst_n, .in_valid, .in_addr,
                                   .bus_valid(v1), .bus_code(c1), .bus_inc(i1));
  geg_t0_enc #(.T0_EN(1'b0))  u_g (.clk, .rst_n, .in_valid, .in_addr,
                                   .bus_valid(v2), .bus_code(c2), .bus_inc(i2));

  // model state
  logic [31:0] m_prev, m_code1, m_code2;
  bit          m_ok, m_inc1, m_v;

  task automatic model_reset();
    m_prev = '0; m_ok = 0; m_code1 = '0; m_code2 = '0; m_inc1 = 0; m_v = 0;
  endtask

  task automatic step(bit v, logic [31:0] a);
    bit seq;
    @(negedge clk);
    in_valid = v;
    in_addr  = a;
    @(posedge clk);
    m_v = v;
    if (v) begin
      seq = m_ok && (a == m_prev + 32'd4);
      m_inc1 = seq;
      if (!seq) m_code1 = gray_bus(a, 8);
      m_code2 = gray_bus(a, 8);
      m_prev = a;
      m_ok = 1;
      if (seq) n_t0++; else n_geg++;
    end else n_idle++;
    #1;
    checks++;
    if (v1 !== m_v || i1 !== m_inc1 || c1 !== m_code1) begin
      failures++;
      $display("hybrid: a=%h v=%0b got v=%0b inc=%0b code=%h exp v=%0b inc=%0b code=%h",
               a, v, v1, i1, c1, m_v, m_inc1, m_code1);
    end
    checks++;
    if (v2 !== m_v || i2 !== 1'b0 || c2 !== m_code2) begin
      failures++;
      $display("geg only: a=%h got v=%0b inc=%0b code=%h exp code=%h", a, v2, i2, c2, m_code2);
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 0; in_valid = 0;
    @(posedge clk);
    model_reset();
    #1;
    checks++;
    if (v1 || i1 || c1 != 0) begin failures++; $display("reset state wrong"); end
    @(negedge clk);
    rst_n = 1;
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
    rst_n = 0; in_valid = 0; in_addr = '0;
    do_reset();
    step(1, 32'h4);                 // prev after reset is not valid: GEG
    step(1, 32'h8);                 // T0
    step(0, 32'h1234_5678);         // idle
    step(1, 32'hc);                 // T0 across an idle cycle
    step(1, 32'hc);                 // repeat: GEG
    step(1, 32'hffff_fff8);
    step(1, 32'hffff_fffc);
    step(1, 32'h0);                 // wraps: T0
    step(1, 32'h4);
    pc = 32'h0040_0000;
    for (int n = 0; n < 3000; n++) begin
      int r;
      r = $urandom_range(99);
      if (r < 60)      pc += 4;                      // in sequence
      else if (r < 70) pc = pc;                      // repeat
      else if (r < 75) pc += 8;                      // short skip
      else if (r < 90) pc = 32'h0040_0000 + ($urandom_range(4095) << 2);
      else             pc = $urandom;
      step($urandom_range(9) != 0, pc);
      if (n == 1500) do_reset();
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
