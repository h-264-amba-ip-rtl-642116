// tq_ref_pkg: reference model of the H.264 transforms and (de)quantisation,
// written directly from the matrix definitions with plain integer arithmetic
// (no butterflies, no sharing), for the testbenches to compare against.
// Blocks are arrays in raster order, index = 4*row + column (2*row + column
// for 2x2 blocks).
package tq_ref_pkg;

  typedef int blk16_t[16];
  typedef int blk4_t[4];

  // forward core transform matrix and Hadamard matrix
  function automatic int cf(int i, int j);
    int m[4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
    return m[i][j];
  endfunction

  function automatic int hd(int i, int j);
    int m[4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
    return m[i][j];
  endfunction

  // Z = M X M^T with M = Cf (forward residual) or H (luma DC)
  function automatic blk16_t fwd4(blk16_t x, bit hadamard);
    blk16_t z;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int s = 0;
        for (int k = 0; k < 4; k++)
          for (int l = 0; l < 4; l++)
            s += (hadamard ? hd(i, k) * hd(j, l) : cf(i, k) * cf(j, l)) * x[4*k + l];
        z[4*i + j] = s;
      end
    return z;
  endfunction

  function automatic blk16_t fwd_res(blk16_t x);
    return fwd4(x, 1'b0);
  endfunction

  // forward luma DC: (H X H) / 2, rounded towards minus infinity
  function automatic blk16_t fwd_ldc(blk16_t x);
    blk16_t z = fwd4(x, 1'b1);
    foreach (z[i]) z[i] = z[i] >>> 1;
    return z;
  endfunction

  function automatic blk16_t inv_ldc(blk16_t x);
    return fwd4(x, 1'b1);
  endfunction

  // 2x2 chroma DC transform, forward and inverse alike
  function automatic blk4_t cdc(blk4_t c);
    blk4_t f;
    f[0] = c[0] + c[1] + c[2] + c[3];
    f[1] = c[0] - c[1] + c[2] - c[3];
    f[2] = c[0] + c[1] - c[2] - c[3];
    f[3] = c[0] - c[1] - c[2] + c[3];
    return f;
  endfunction

  // H.264 inverse residual transform: rows, then columns, then (x+32)>>6
  function automatic blk16_t inv_res(blk16_t d);
    int f[16], h[16];
    blk16_t r;
    for (int i = 0; i < 4; i++) begin
      int e0, e1, e2, e3;
      e0 = d[4*i] + d[4*i+2];
      e1 = d[4*i] - d[4*i+2];
      e2 = (d[4*i+1] >>> 1) - d[4*i+3];
      e3 = d[4*i+1] + (d[4*i+3] >>> 1);
      f[4*i]   = e0 + e3;
      f[4*i+1] = e1 + e2;
      f[4*i+2] = e1 - e2;
      f[4*i+3] = e0 - e3;
    end
    for (int j = 0; j < 4; j++) begin
      int g0, g1, g2, g3;
      g0 = f[j] + f[8+j];
      g1 = f[j] - f[8+j];
      g2 = (f[4+j] >>> 1) - f[12+j];
      g3 = f[4+j] + (f[12+j] >>> 1);
      h[j]    = g0 + g3;
      h[4+j]  = g1 + g2;
      h[8+j]  = g1 - g2;
      h[12+j] = g0 - g3;
    end
    foreach (r[i]) r[i] = (h[i] + 32) >>> 6;
    return r;
  endfunction

  function automatic int mf_tab(int rem, int cls);
    int t[6][3] = '{'{13107, 5243, 8066}, '{11916, 4660, 7490}, '{10082, 4194, 6554},
                    '{9362, 3647, 5825}, '{8192, 3355, 5243}, '{7282, 2893, 4559}};
    return t[rem][cls];
  endfunction

  function automatic int v_tab(int rem, int cls);
    int t[6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16},
                    '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};
    return t[rem][cls];
  endfunction

  function automatic int cls_of(int idx);
    int r = idx / 4, c = idx % 4;
    if (r % 2 == 0 && c % 2 == 0) return 0;
    if (r % 2 == 1 && c % 2 == 1) return 1;
    return 2;
  endfunction

  // kind: 0 residual, 1 luma DC, 2 chroma DC
  function automatic int quant(int w, int idx, int kind, int qp, bit intra);
    longint qbits, f, m, a, aw;
    int qb, mf;
    qb    = 15 + qp / 6 + (kind != 0 ? 1 : 0);
    mf    = mf_tab(qp % 6, kind != 0 ? 0 : cls_of(idx));
    qbits = longint'(qb);
    m     = longint'(mf);
    aw    = longint'(w);
    if (aw < 0) aw = -aw;
    f     = (longint'(1) << qbits) / (intra ? 3 : 6);
    a     = (aw * m + f) >> qbits;
    if (a > 32767) a = 32767;
    return w < 0 ? -int'(a) : int'(a);
  endfunction

  function automatic int dequant(int z, int idx, int kind, int qp);
    longint s;
    s = longint'(z) * v_tab(qp % 6, kind != 0 ? 0 : cls_of(idx));
    s = s <<< (qp / 6);
    if (kind == 1) s = (s + 2) >>> 2;
    else if (kind == 2) s = s >>> 1;
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return int'(s);
  endfunction

  // whole T/Q of one block, as the IP computes it; n = 16 or 4 values used
  function automatic blk16_t tq_block(blk16_t x, int kind, bit inverse, int qp, bit intra);
    blk16_t y, r;
    blk4_t  c, f;
    if (!inverse) begin
      if (kind == 2) begin
        for (int i = 0; i < 4; i++) c[i] = x[i];
        f = cdc(c);
        y = '{default: 0};
        for (int i = 0; i < 4; i++) y[i] = f[i];
      end else y = (kind == 0) ? fwd_res(x) : fwd_ldc(x);
      foreach (r[i]) r[i] = quant(y[i], i, kind, qp, intra);
    end else begin
      foreach (y[i]) y[i] = dequant(x[i], i, kind, qp);
      if (kind == 2) begin
        for (int i = 0; i < 4; i++) c[i] = y[i];
        f = cdc(c);
        r = '{default: 0};
        for (int i = 0; i < 4; i++) r[i] = f[i];
      end else r = (kind == 0) ? inv_res(y) : inv_ldc(y);
    end
    return r;
  endfunction

endpackage
