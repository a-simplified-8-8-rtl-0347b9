// tb_ref_pkg: reference model of the 8x8 forward transform and quantization
// used by the testbenches, written with plain integers and independent of the
// RTL's structure.
//   - bf1d:    1D 8-point transform, the standard's butterfly equations
//   - fwd2d:   rows first, then columns
//   - mf_ref:  quantization factor from the position group rule
//   - quant:   |Z| = (|W|*MF + f) >> (qbits+1), sign of W, f = 2^qbits/3 or /6
package tb_ref_pkg;

  typedef int blk_t [8][8];
  typedef int vec_t [8];

  function automatic int asr(int v, int n);
    return v >>> n;
  endfunction

  function automatic vec_t bf1d(vec_t x);
    int a0, a1, a2, a3, a4, a5, a6, a7;
    int b0, b1, b2, b3, b4, b5, b6, b7;
    vec_t y;
    a0 = x[0] + x[7]; a1 = x[1] + x[6]; a2 = x[2] + x[5]; a3 = x[3] + x[4];
    a4 = x[0] - x[7]; a5 = x[1] - x[6]; a6 = x[2] - x[5]; a7 = x[3] - x[4];
    b0 = a0 + a3; b1 = a1 + a2; b2 = a0 - a3; b3 = a1 - a2;
    b4 = a5 + a6 + (asr(a4, 1) + a4);
    b5 = a4 - a7 - (asr(a6, 1) + a6);
    b6 = a4 + a7 - (asr(a5, 1) + a5);
    b7 = a5 - a6 + (asr(a7, 1) + a7);
    y[0] = b0 + b1;          y[1] = b2 + asr(b3, 1);
    y[2] = b0 - b1;          y[3] = asr(b2, 1) - b3;
    y[4] = b4 + asr(b7, 2);  y[5] = b5 + asr(b6, 2);
    y[6] = b6 - asr(b5, 2);  y[7] = -b7 + asr(b4, 2);
    return y;
  endfunction

  function automatic blk_t rows1d(blk_t x);
    blk_t s;
    vec_t v, r;
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) v[j] = x[i][j];
      r = bf1d(v);
      for (int j = 0; j < 8; j++) s[i][j] = r[j];
    end
    return s;
  endfunction

  function automatic blk_t cols1d(blk_t s);
    blk_t w;
    vec_t v, r;
    for (int j = 0; j < 8; j++) begin
      for (int i = 0; i < 8; i++) v[i] = s[i][j];
      r = bf1d(v);
      for (int i = 0; i < 8; i++) w[i][j] = r[i];
    end
    return w;
  endfunction

  function automatic blk_t fwd2d(blk_t x);
    return cols1d(rows1d(x));
  endfunction

  // Position group: 0..5 as G0..G5.
  function automatic int group_of(int i, int j);
    bit i04, j04, iodd, jodd, i26, j26;
    i04 = (i == 0 || i == 4); j04 = (j == 0 || j == 4);
    i26 = (i == 2 || i == 6); j26 = (j == 2 || j == 6);
    iodd = (i % 2) == 1;      jodd = (j % 2) == 1;
    if (i04 && j04)   return 0;
    if (iodd && jodd) return 1;
    if (i26 && j26)   return 2;
    if ((i04 && jodd) || (iodd && j04)) return 3;
    if ((i04 && j26) || (i26 && j04))   return 4;
    return 5;
  endfunction

  function automatic int mf_ref(int m, int g);
    int t [6][6] = '{
      '{13107, 11428, 20972, 12222, 16777, 15481},
      '{11916, 10826, 19174, 11058, 14980, 14290},
      '{10082,  8943, 15978,  9675, 12710, 11985},
      '{ 9362,  8228, 14913,  8931, 11984, 11295},
      '{ 8192,  7346, 13159,  7740, 10486,  9777},
      '{ 7282,  6428, 11570,  6830,  9118,  8640}};
    return t[m][g];
  endfunction

  function automatic int qbits_ref(int qp);
    return 15 + qp / 6;
  endfunction

  function automatic longint f_ref(int qp, bit intra);
    longint p2;
    p2 = longint'(1) << qbits_ref(qp);
    return intra ? p2 / 3 : p2 / 6;
  endfunction

  function automatic int quant1(int w, int qp, int i, int j, bit intra);
    longint mag, q;
    mag = (w < 0) ? -longint'(w) : longint'(w);
    q = (mag * mf_ref(qp % 6, group_of(i, j)) + f_ref(qp, intra)) >>> (qbits_ref(qp) + 1);
    return (w < 0) ? -int'(q) : int'(q);
  endfunction

  function automatic blk_t quant(blk_t w, int qp, bit intra);
    blk_t z;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) z[i][j] = quant1(w[i][j], qp, i, j, intra);
    return z;
  endfunction

endpackage
