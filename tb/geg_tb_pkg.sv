// geg_tb_pkg: reference functions shared by the GEG testbenches.
//
// They compute expected values by formula, independently of the RTL's
// table helpers: the binary-reflected Gray code x ^ (x >> 1) for the
// default tables, and affine permutations i -> (K*i + C) mod 2**W (K odd)
// that the testbenches pass in as non-default cluster tables.
package geg_tb_pkg;

  function automatic int unsigned gray(int unsigned x);
    return x ^ (x >> 1);
  endfunction

  // Gray code applied to every W-bit cluster of a 32-bit word.
  function automatic logic [31:0] gray_bus(logic [31:0] a, int unsigned w);
    logic [31:0] r;
    int unsigned m;
    m = (1 << w) - 1;
    r = '0;
    for (int unsigned c = 0; c < 32 / w; c++) begin
      r |= 32'(gray((a >> (c*w)) & m)) << (c*w);
    end
    return r;
  endfunction

  function automatic int unsigned affine(int unsigned i, int unsigned k,
                                         int unsigned c, int unsigned w);
    return (k * i + c) & ((1 << w) - 1);
  endfunction

  // Whole-bus table, cluster c uses K = 2c+3 (odd) and C = 7c+1.
  function automatic logic [8191:0] affine_bus_lut(int unsigned w);
    logic [8191:0] t;
    int unsigned n, v;
    t = '0;
    n = w * (1 << w);
    for (int unsigned c = 0; c < 32 / w; c++)
      for (int unsigned i = 0; i < (1 << w); i++) begin
        v = affine(i, 2*c + 3, 7*c + 1, w);
        for (int unsigned b = 0; b < w; b++)
          t[c*n + i*w + b] = ((v >> b) & 1) != 0;
      end
    return t;
  endfunction

  function automatic logic [31:0] affine_bus(logic [31:0] a, int unsigned w);
    logic [31:0] r;
    int unsigned m;
    m = (1 << w) - 1;
    r = '0;
    for (int unsigned c = 0; c < 32 / w; c++) begin
      r |= 32'(affine((a >> (c*w)) & m, 2*c + 3, 7*c + 1, w)) << (c*w);
    end
    return r;
  endfunction

  function automatic int unsigned popcount(logic [63:0] x);
    int unsigned n;
    n = 0;
    for (int i = 0; i < 64; i++) n += int'(x[i]);
    return n;
  endfunction

endpackage
