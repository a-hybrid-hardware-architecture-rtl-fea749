// od_ref_pkg: reference models used by the testbenches.
//
// Written independently of the RTL: transforms as explicit matrix products,
// the VLC as strings of '0'/'1' characters, colour conversion from its
// formulas. The code format and the arithmetic follow od_pkg's description.
package od_ref_pkg;
  import od_pkg::*;

  typedef int blk16_t [16];

  localparam int CM [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
  localparam int ZZ [16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  // floor division by a power of two for signed values
  function automatic int fshr(input longint v, input int s);
    longint d;
    d = longint'(1) << s;
    if (v >= 0) return int'(v / d);
    return int'(-((-v + d - 1) / d));
  endfunction

  function automatic int nsc(input int pos);
    int r, c;
    r = pos / 4;  c = pos % 4;
    if (r % 2 == 0 && c % 2 == 0) return 1024;
    if (r % 2 == 1 && c % 2 == 1) return 410;
    return 648;
  endfunction

  function automatic void csc_fwd(input rgb_t p, output int y, output int cb, output int cr);
    int r, g, b;
    r = p.r;  g = p.g;  b = p.b;
    y  = fshr(77 * r + 150 * g + 29 * b + 128, 8) - 128;
    cb = fshr(-43 * r - 85 * g + 128 * b + 128, 8);
    cr = fshr(128 * r - 107 * g - 21 * b + 128, 8);
  endfunction

  function automatic int clamp(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic rgb_t csc_inv(input int y, input int cb, input int cr);
    rgb_t p;
    int yy;
    yy = y + 128;
    p.r = 8'(clamp(yy + fshr(359 * cr + 128, 8), 0, 255));
    p.g = 8'(clamp(yy - fshr(88 * cb + 183 * cr - 128, 8), 0, 255));
    p.b = 8'(clamp(yy + fshr(454 * cb + 128, 8), 0, 255));
    return p;
  endfunction

  // Y = C X C^T
  function automatic blk16_t dct(input blk16_t x);
    blk16_t y;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int s;
        s = 0;
        for (int a = 0; a < 4; a++)
          for (int b = 0; b < 4; b++) s += CM[i][a] * x[a*4+b] * CM[j][b];
        y[i*4+j] = s;
      end
    return y;
  endfunction

  // X = (C^T W C + 2048) >> 12, clamped
  function automatic blk16_t idct(input blk16_t w);
    blk16_t x;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        longint s;
        s = 0;
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) s += longint'(CM[i][a]) * w[i*4+j] * CM[j][b];
        x[a*4+b] = clamp(fshr(s + 2048, 12), -512, 511);
      end
    return x;
  endfunction

  // levels in zigzag order; returns truncated flag
  function automatic bit quant(input blk16_t c, input int qp, input bit low_only,
                               output blk16_t lev);
    int nz;
    bit tr;
    nz = 0;
    tr = 0;
    for (int k = 0; k < 16; k++) begin
      int p, q;
      p = ZZ[k];
      q = int'((longint'(iabs(c[p])) * nsc(p) + (longint'(1) << (10 + qp))) >> (12 + qp));
      if (q > 1023) q = 1023;
      if (low_only && ((p % 4) >= 2 || (p / 4) >= 2)) q = 0;
      if (q != 0) begin
        if (nz >= MAX_NZ) begin q = 0; tr = 1; end
        else nz++;
      end
      lev[k] = (c[p] < 0) ? -q : q;
    end
    return tr;
  endfunction

  function automatic blk16_t dequant(input blk16_t lev, input int qp);
    blk16_t w;
    for (int k = 0; k < 16; k++) begin
      int p, m;
      longint r;
      p = ZZ[k];
      m = iabs(lev[k]);
      r = (m == 0) ? 0 : ((longint'(m) << qp) + ((longint'(1) << qp) >> 2)) * nsc(p);
      w[p] = int'((lev[k] < 0) ? -r : r);
    end
    return w;
  endfunction

  function automatic string bits(input longint v, input int n);
    string s;
    s = "";
    for (int i = n - 1; i >= 0; i--) s = {s, v[i] ? "1" : "0"};
    return s;
  endfunction

  function automatic string sym(input int run, input int lev);
    int m, s;
    string t;
    m = iabs(lev);
    s = $clog2(m + 1);
    t = bits(run, 4);
    for (int i = 0; i < s - 1; i++) t = {t, "1"};
    if (s < 10) t = {t, "0"};
    t = {t, bits(m, s - 1), (lev < 0) ? "1" : "0"};
    return t;
  endfunction

  function automatic int lev_of(input blk_rec_t r, input int ch, input int k);
    return int'($signed(r.lev[ch][k]));
  endfunction

  function automatic string encode(input blk_rec_t r);
    string t;
    if (r.mode == MODE_SIL) begin
      t = "1";
      t = {t, r.lo_hit ? {"1", bits(r.lo_idx, 3)} : {"0", bits(r.lo_rgb, 24)}};
      t = {t, r.hi_hit ? {"1", bits(r.hi_idx, 3)} : {"0", bits(r.hi_rgb, 24)}};
      t = {t, bits(r.bitmap, 16)};
    end else begin
      t = {"0", bits(r.qp, 3), r.cdown ? "1" : "0"};
      for (int ch = 0; ch < 3; ch++) begin
        int n, run;
        n = 0;
        for (int k = 0; k < 16; k++) if (lev_of(r, ch, k) != 0) n++;
        t = {t, bits(n, 3)};
        run = 0;
        for (int k = 0; k < 16; k++)
          if (lev_of(r, ch, k) == 0) run++;
          else begin
            t = {t, sym(run, lev_of(r, ch, k))};
            run = 0;
          end
      end
    end
    return t;
  endfunction

  // Reconstruction of a record whose colours are resolved.
  function automatic void reconstruct(input blk_rec_t r, output rgb_t px [16]);
    blk16_t s [3];
    if (r.mode == MODE_SIL) begin
      for (int i = 0; i < 16; i++) px[i] = r.bitmap[i] ? r.hi_rgb : r.lo_rgb;
    end else begin
      for (int ch = 0; ch < 3; ch++) begin
        blk16_t l;
        for (int k = 0; k < 16; k++) l[k] = lev_of(r, ch, k);
        s[ch] = idct(dequant(l, int'(r.qp)));
      end
      for (int i = 0; i < 16; i++) px[i] = csc_inv(s[0][i], s[1][i], s[2][i]);
    end
  endfunction

  // Random DCT-mode record with at most MAX_NZ small levels per component.
  function automatic blk_rec_t rand_dct_rec();
    blk_rec_t r;
    r = '0;
    r.mode = MODE_DCT;
    r.qp = 3'($urandom_range(0, 7));
    r.cdown = 1'($urandom_range(0, 1));
    for (int ch = 0; ch < 3; ch++) begin
      int n;
      n = $urandom_range(0, MAX_NZ);
      for (int i = 0; i < n; i++) begin
        int k, v;
        k = $urandom_range(0, 15);
        v = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 1023) : $urandom_range(1, 12);
        if ($urandom_range(0, 1) == 1) v = -v;
        r.lev[ch][k] = LW'(v);
      end
    end
    return r;
  endfunction

  function automatic blk_rec_t rand_sil_rec();
    blk_rec_t r;
    r = '0;
    r.mode = MODE_SIL;
    r.lo_hit = 1'($urandom_range(0, 1));
    r.hi_hit = 1'($urandom_range(0, 1));
    r.lo_idx = 3'($urandom);
    r.hi_idx = 3'($urandom);
    r.lo_rgb = 24'($urandom);
    r.hi_rgb = 24'($urandom);
    r.bitmap = 16'($urandom);
    return r;
  endfunction
endpackage
