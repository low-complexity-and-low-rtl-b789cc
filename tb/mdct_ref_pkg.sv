// mdct_ref_pkg: reference model for the testbenches.
//
// Works straight from the integer transform matrices of each standard
// (H.264/AVC 4x4 and 8x8, VC-1 4x4 and 8x8, AVS 8x8, the JPEG/MPEG 8x8
// DCT scaled to integers, the 4x4 and 2x2 Hadamard matrices) by plain
// matrix-vector products, not from the shared factorisation used in the
// RTL. Forward: y_k = sum_n C[k][n] x_n. Inverse: x_n = sum_k C[k][n] w_k.
// The H.264/AVC 4x4 inverse, whose matrix holds halves, is modelled
// with the truncating halvings of the shared data path (see idct1d).
package mdct_ref_pkg;
  import mdct_pkg::*;

  typedef longint vec_t [8];

  localparam int C_AVC8 [8][8] = '{
    '{ 8,  8,  8,  8,  8,  8,  8,  8}, '{12, 10,  6,  3, -3, -6,-10,-12},
    '{ 8,  4, -4, -8, -8, -4,  4,  8}, '{10, -3,-12, -6,  6, 12,  3,-10},
    '{ 8, -8, -8,  8,  8, -8, -8,  8}, '{ 6,-12,  3, 10,-10, -3, 12, -6},
    '{ 4, -8,  8, -4, -4,  8, -8,  4}, '{ 3, -6, 10,-12, 12,-10,  6, -3}};
  localparam int C_AVS8 [8][8] = '{
    '{ 8,  8,  8,  8,  8,  8,  8,  8}, '{10,  9,  6,  2, -2, -6, -9,-10},
    '{10,  4, -4,-10,-10, -4,  4, 10}, '{ 9, -2,-10, -6,  6, 10,  2, -9},
    '{ 8, -8, -8,  8,  8, -8, -8,  8}, '{ 6,-10,  2,  9, -9, -2, 10, -6},
    '{ 4,-10, 10, -4, -4, 10,-10,  4}, '{ 2, -6,  9,-10, 10, -9,  6, -2}};
  localparam int C_VC18 [8][8] = '{
    '{12, 12, 12, 12, 12, 12, 12, 12}, '{16, 15,  9,  4, -4, -9,-15,-16},
    '{16,  6, -6,-16,-16, -6,  6, 16}, '{15, -4,-16, -9,  9, 16,  4,-15},
    '{12,-12,-12, 12, 12,-12,-12, 12}, '{ 9,-16,  4, 15,-15, -4, 16, -9},
    '{ 6,-16, 16, -6, -6, 16,-16,  6}, '{ 4, -9, 15,-16, 16,-15,  9, -4}};
  localparam int C_MPEG8 [8][8] = '{
    '{362, 362, 362, 362, 362, 362, 362, 362},
    '{502, 426, 284, 100,-100,-284,-426,-502},
    '{473, 196,-196,-473,-473,-196, 196, 473},
    '{426,-100,-502,-284, 284, 502, 100,-426},
    '{362,-362,-362, 362, 362,-362,-362, 362},
    '{284,-502, 100, 426,-426,-100, 502,-284},
    '{196,-473, 473,-196,-196, 473,-473, 196},
    '{100,-284, 426,-502, 502,-426, 284,-100}};
  localparam int C_VC14 [4][4] = '{'{17, 17, 17, 17}, '{22, 10,-10,-22},
                                   '{17,-17,-17, 17}, '{10,-22, 22,-10}};
  localparam int C_AVC4 [4][4] = '{'{1, 1, 1, 1}, '{2, 1,-1,-2},
                                   '{1,-1,-1, 1}, '{1,-2, 2,-1}};
  localparam int C_H4 [4][4]   = '{'{1, 1, 1, 1}, '{1, 1,-1,-1},
                                   '{1,-1,-1, 1}, '{1,-1, 1,-1}};

  function automatic int coef(sel_e m, int k, int n);
    case (m)
      M_HAD2:  return (k == 1 && n == 1) ? -1 : 1;
      M_HAD4:  return C_H4[k][n];
      M_AVC4:  return C_AVC4[k][n];
      M_VC1_4: return C_VC14[k][n];
      M_AVC8:  return C_AVC8[k][n];
      M_AVS8:  return C_AVS8[k][n];
      M_VC1_8: return C_VC18[k][n];
      default: return C_MPEG8[k][n];
    endcase
  endfunction

  function automatic vec_t fwd1d(sel_e m, vec_t x);
    vec_t y;
    int n = block_n(m);
    for (int k = 0; k < 8; k++) begin
      y[k] = 0;
      if (k < n) for (int i = 0; i < n; i++) y[k] += longint'(coef(m, k, i)) * x[i];
    end
    return y;
  endfunction

  function automatic vec_t inv1d(sel_e m, vec_t w);
    vec_t x;
    int n = block_n(m);
    if (m == M_AVC4) begin
      // H.264/AVC 4x4 inverse: rows (1,1,1,1), (1,1/2,-1/2,-1), (1,-1,-1,1),
      // (1/2,-1,1,-1/2), halvings by arithmetic shift as in the data path.
      longint e0, e1, e2, e3;
      x = '{default: 0};
      e0 = w[0] + w[2];
      e1 = w[0] - w[2];
      e2 = (w[1] >>> 1) - w[3];
      e3 = w[1] + w[3] - (w[3] >>> 1);
      x[0] = e0 + e3; x[1] = e1 + e2; x[2] = e1 - e2; x[3] = e0 - e3;
      return x;
    end
    for (int i = 0; i < 8; i++) begin
      x[i] = 0;
      if (i < n) for (int k = 0; k < n; k++) x[i] += longint'(coef(m, k, i)) * w[k];
    end
    return x;
  endfunction

  // Round half up by the mode's growth, saturate to DATA_W bits.
  function automatic longint scale(sel_e m, longint v);
    int s = growth_bits(m);
    longint r = (v + (longint'(1) << (s - 1))) >>> s;
    longint mx = (longint'(1) << (DATA_W - 1)) - 1;
    if (r > mx) return mx;
    if (r < -mx - 1) return -mx - 1;
    return r;
  endfunction

  // Full 2-D model: blk[r] is input vector r; result[k] is output vector k.
  typedef longint blk_t [8][8];
  function automatic blk_t ref2d(sel_e m, bit inverse, blk_t blk);
    blk_t z, res;
    vec_t v, o;
    int n = block_n(m);
    z = '{default: '{default: 0}};
    res = '{default: '{default: 0}};
    for (int r = 0; r < n; r++) begin
      for (int i = 0; i < 8; i++) v[i] = blk[r][i];
      o = inverse ? inv1d(m, v) : fwd1d(m, v);
      for (int i = 0; i < n; i++) z[r][i] = scale(m, o[i]);
    end
    for (int c = 0; c < n; c++) begin
      for (int i = 0; i < 8; i++) v[i] = (i < n) ? z[i][c] : 0;
      o = inverse ? inv1d(m, v) : fwd1d(m, v);
      for (int i = 0; i < n; i++) res[c][i] = scale(m, o[i]);
    end
    return res;
  endfunction

endpackage
