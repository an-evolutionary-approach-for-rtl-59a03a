// geg_pkg: constants and elaboration-time helpers shared by the GEG
// (genetic encoder generator) bus codec.
//
// A GEG encoder splits a 32-bit address bus into equal clusters of W lines
// and passes each cluster through a bijective W-bit truth table. The tables
// are produced offline for one application and reach the RTL as parameters.
// A table for a W-bit cluster is a packed vector of 2**W entries of W bits;
// entry i (the code sent for input word i) sits at bits [i*W +: W].
//
// The functions below work on tables of up to MAX_W = 8 bits per cluster
// (2048 table bits per cluster, 8192 for a whole 32-bit bus); a caller
// assigns the result to a narrower parameter, which keeps the low bits and
// therefore the right entries. They are only used to compute parameters
// and localparams, so they cost no hardware.
//
// The default table (Gray code in every cluster) is this design's own
// placeholder: the document's tables are application specific and are not
// printed. Any permutation may be supplied instead.
package geg_pkg;

  localparam int unsigned BUS_W     = 32;  // address bus width (document)
  localparam int unsigned CLUSTER_W = 8;   // GEG8, the document's best case
  localparam int unsigned MAX_W     = 8;   // largest cluster the helpers support
  localparam int unsigned MAX_LUT_BITS = MAX_W * (1 << MAX_W);  // 2048
  localparam int unsigned MAX_BUS_LUT_BITS = BUS_W * (1 << MAX_W);  // 8192

  typedef logic [MAX_LUT_BITS-1:0]     lut_t;
  typedef logic [MAX_BUS_LUT_BITS-1:0] bus_lut_t;

  // Binary-reflected Gray code table for one W-bit cluster.
  function automatic lut_t gray_lut(int unsigned w);
    lut_t t;
    t = '0;
    for (int unsigned i = 0; i < (1 << w); i++) begin
      for (int unsigned b = 0; b < w; b++) begin
        t[i*w + b] = (((i >> b) ^ (i >> (b + 1))) & 1) != 0;
      end
    end
    return t;
  endfunction

  // Gray table repeated for every cluster of a bus of BUS_W lines.
  function automatic bus_lut_t gray_bus_lut(int unsigned w);
    bus_lut_t t;
    lut_t     g;
    int unsigned nbits;
    t = '0;
    g = gray_lut(w);
    nbits = w * (1 << w);
    for (int unsigned c = 0; c < BUS_W / w; c++) begin
      for (int unsigned k = 0; k < nbits; k++) begin
        t[c*nbits + k] = g[k];
      end
    end
    return t;
  endfunction

  // Entry i of a W-bit table.
  function automatic int unsigned lut_entry(lut_t t, int unsigned w, int unsigned i);
    int unsigned v;
    v = 0;
    for (int unsigned b = 0; b < w; b++) begin
      if (t[i*w + b]) v |= (1 << b);
    end
    return v;
  endfunction

  // 1 when the W-bit table is a permutation, the condition that makes the
  // encoder invertible.
  function automatic bit lut_is_perm(lut_t t, int unsigned w);
    bit [(1<<MAX_W)-1:0] seen;
    logic [MAX_W-1:0]    v;
    seen = '0;
    for (int unsigned i = 0; i < (1 << w); i++) begin
      v = MAX_W'(lut_entry(t, w, i));
      if (seen[v]) return 1'b0;
      seen[v] = 1'b1;
    end
    return 1'b1;
  endfunction

  // Inverse of a W-bit permutation table: the decoder's truth table.
  function automatic lut_t lut_inverse(lut_t t, int unsigned w);
    lut_t inv;
    int unsigned v;
    inv = '0;
    for (int unsigned i = 0; i < (1 << w); i++) begin
      v = lut_entry(t, w, i);
      for (int unsigned b = 0; b < w; b++) begin
        inv[v*w + b] = ((i >> b) & 1) != 0;
      end
    end
    return inv;
  endfunction

  // Table of cluster c taken out of a whole-bus table.
  function automatic lut_t bus_lut_slice(bus_lut_t t, int unsigned w, int unsigned c);
    lut_t s;
    int unsigned nbits;
    s = '0;
    nbits = w * (1 << w);
    for (int unsigned k = 0; k < nbits; k++) begin
      s[k] = t[c*nbits + k];
    end
    return s;
  endfunction

endpackage
