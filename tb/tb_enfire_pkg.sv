// tb_enfire_pkg: reference data shared by the ENFIRE testbenches.
//
// Holds an independent copy of the bank-row segment layout (columns of the
// four segments of each LUT width), the LUT contents used by all tests
// (a fixed hash of MLB, width, index and row), and a helper that packs one
// bank row from those contents. Expected values in the testbenches are
// computed from lut_fn directly, never by reading the design's memories.
package tb_enfire_pkg;

  // Lowest column of segment k of width 1 << sz (sz 0..3).
  function automatic int seg_col(int sz, int k);
    int t1[4] = '{0, 1, 8, 9};
    int t2[4] = '{2, 10, 16, 18};
    int t4[4] = '{4, 12, 20, 24};
    int t8[4] = '{32, 40, 48, 56};
    case (sz)
      0: return t1[k];
      1: return t2[k];
      2: return t4[k];
      default: return t8[k];
    endcase
  endfunction

  // Content of LUT (sz, idx) of MLB mlb at input x, width 1 << sz.
  function automatic logic [7:0] lut_fn(int mlb, int sz, int idx, logic [7:0] x);
    logic [31:0] h;
    h = 32'(x) * 32'h9e37_79b1 + 32'(mlb) * 32'h85eb_ca6b + 32'(sz) * 32'hc2b2_ae35
        + 32'(idx) * 32'h27d4_eb2f;
    h = h ^ (h >> 15);
    h = h * 32'h2c1b_3c6d;
    h = h ^ (h >> 12);
    return 8'(h) & 8'((9'd1 << (1 << sz)) - 9'd1);
  endfunction

  // Row r of bank b of MLB mlb holding all 16 LUTs of that bank.
  function automatic logic [63:0] bank_row(int mlb, int b, logic [7:0] r);
    logic [63:0] w;
    w = 64'h0;
    w[31:28] = 4'(r) ^ 4'ha;    // spare segment: plain data
    for (int sz = 0; sz < 4; sz++)
      for (int k = 0; k < 4; k++)
        for (int j = 0; j < (1 << sz); j++)
          w[seg_col(sz, k) + j] = lut_fn(mlb, sz, 4 * b + k, r)[j];
    return w;
  endfunction

endpackage
