// tb_ref_pkg: behavioural reference models used by the testbenches.
//
// Written independently of the RTL: a bit-level model of the lower-part-OR
// adder and of the absolute difference built on it, synthetic reference and
// current frames with a known global motion, the approximate block SAD, the
// integer search (pattern, phase rules, cycle count) and the HEVC quarter-
// sample interpolation with the fractional search.
package tb_ref_pkg;

  int unsigned low_bits = 5;

  function automatic int loa_sum(int a, int b, int low, output int cout);
    int lo, hi, cin, mask;
    mask = (1 << low) - 1;
    lo   = (a | b) & mask;
    cin  = (low > 0) ? (((a >> (low - 1)) & 1) & ((b >> (low - 1)) & 1)) : 0;
    hi   = (a >> low) + (b >> low) + cin;
    cout = (hi >> (8 - low)) & 1;
    return ((hi << low) | lo) & 255;
  endfunction

  function automatic int ad_ref(int a, int b, int low);
    int s, c;
    s = loa_sum(a, (~b) & 255, low, c);
    return c ? ((s == 255) ? 255 : s + 1) : (~s) & 255;
  endfunction

  // synthetic frames: smooth texture; current frame = reference moved by (gx,gy)
  int gx = 0, gy = 0;

  function automatic int ref_pix(int x, int y);
    int v;
    v = (x * x) / 8 + (y * y) / 4 + (x * y) / 16 + 3 * x + 5 * y + 1000;
    v = v % 512;
    return (v < 256) ? v : 511 - v;
  endfunction

  function automatic int cur_pix(int x, int y);
    return ref_pix(x + gx, y + gy);
  endfunction

  function automatic int blk_sad(int px, int py, int n, int mx, int my);
    int s = 0;
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++)
        s += ad_ref(cur_pix(px + x, py + y), ref_pix(px + mx + x, py + my + y), low_bits);
    return s;
  endfunction

  // ---------------------------------------------------------------- TZS
  // cost_mode 0: approximate block SAD; 1: synthetic cost |mx-tx|+|my-ty|
  // plus a small ripple, used to test the control alone
  int cost_mode = 0;
  int tx = 0, ty = 0;

  function automatic int cost(int px, int py, int n, int mx, int my);
    if (cost_mode == 0) return blk_sad(px, py, n, mx, my);
    return 4 * ((mx > tx ? mx - tx : tx - mx) + (my > ty ? my - ty : ty - my)) + ((mx * 3 + my * 5) & 3);
  endfunction

  function automatic void pat(int i, int s, output int dx, output int dy);
    int px [16] = '{1, 1, 0, -1, -1, -1, 0, 1, 2, 1, -1, -2, -2, -1, 1, 2};
    int py [16] = '{0, 1, 1, 1, 0, -1, -1, -1, 1, 2, 2, 1, -1, -2, -2, -1};
    dx = px[i] * s;
    dy = py[i] * s;
  endfunction

  function automatic int clampv(int v);
    return (v > 64) ? 64 : (v < -64) ? -64 : v;
  endfunction

  // Evaluates groups of steps 2^k0 .. 2^k1 around (cx,cy), updating the
  // running best (ties keep the earlier candidate).
  function automatic void tzs_phase(int px, int py, int n, int cx, int cy, int k0, int k1,
                                    inout int bs, inout int bx, inout int by, inout int bk,
                                    inout int groups);
    for (int k = k0; k <= k1; k++) begin
      for (int i = 0; i < 16; i++) begin
        int dx, dy, mx, my, s;
        pat(i, 1 << k, dx, dy);
        mx = clampv(cx + dx);
        my = clampv(cy + dy);
        s  = cost(px, py, n, mx, my);
        if (s < bs) begin bs = s; bx = mx; by = my; bk = k; end
      end
      groups++;
    end
  endfunction

  function automatic void tzs_ref(int px, int py, int n, output int sad, output int mx,
                                  output int my, output int cycles);
    int bs, bx, by, bk, groups, decisions, base, lg;
    lg = $clog2(n);
    bs = 32'h7fffffff; bx = 0; by = 0; bk = 0; groups = 0; decisions = 1;
    tzs_phase(px, py, n, 0, 0, 0, 2, bs, bx, by, bk, groups);
    if (bk != 0) begin
      if (bk == 2) begin
        decisions++;
        tzs_phase(px, py, n, 0, 0, 3, 4, bs, bx, by, bk, groups);
      end
      do begin
        base = bs;
        decisions++;
        tzs_phase(px, py, n, bx, by, 0, 4, bs, bx, by, bk, groups);
      end while (bs < base && groups + 5 <= 15);
    end
    sad = bs; mx = bx; my = by;
    cycles = groups * n + decisions * (lg + 4);
  endfunction

  // ---------------------------------------------------------------- FME
  function automatic int tap(int ph, int k);
    int t1 [8] = '{-1, 4, -10, 58, 17, -5, 1, 0};
    int t2 [8] = '{-1, 4, -11, 40, 40, -11, 4, -1};
    int t3 [8] = '{0, 1, -5, 17, 58, -10, 4, -1};
    return (ph == 1) ? t1[k] : (ph == 2) ? t2[k] : t3[k];
  endfunction

  function automatic int clip255(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  function automatic int asr6(int v);
    return v >>> 6;
  endfunction

  // predicted sample at integer position (ix,iy) + fractional (fx,fy), 0..3
  function automatic int frac_pred(int ix, int iy, int fx, int fy);
    int s, h;
    if (fx == 0 && fy == 0) return ref_pix(ix, iy);
    if (fy == 0) begin
      s = 0;
      for (int k = 0; k < 8; k++) s += tap(fx, k) * ref_pix(ix - 3 + k, iy);
      return clip255(asr6(s + 32));
    end
    if (fx == 0) begin
      s = 0;
      for (int k = 0; k < 8; k++) s += tap(fy, k) * ref_pix(ix, iy - 3 + k);
      return clip255(asr6(s + 32));
    end
    s = 0;
    for (int k = 0; k < 8; k++) begin
      h = 0;
      for (int j = 0; j < 8; j++) h += tap(fx, j) * ref_pix(ix - 3 + j, iy - 3 + k);
      s += tap(fy, k) * h;
    end
    return clip255(asr6(asr6(s) + 32));
  endfunction

  function automatic int foff(int j);
    return (j < 3) ? j - 3 : j - 2;
  endfunction

  function automatic int fdiv4(int v);   // floor(v/4)
    return (v >= 0) ? v / 4 : -((-v + 3) / 4);
  endfunction

  // best of the integer candidate and the 48 fractional ones, in the
  // comparator's order; returns the quarter-sample vector
  function automatic void fme_ref(int px, int py, int n, int imx, int imy, int isad,
                                  output int sad, output int qx, output int qy);
    sad = isad; qx = 4 * imx; qy = 4 * imy;
    for (int k = 0; k < 48; k++) begin
      int ox, oy, s;
      if (k < 6)       begin ox = foff(k); oy = 0; end
      else if (k < 12) begin ox = 0; oy = foff(k - 6); end
      else             begin ox = foff((k - 12) / 6); oy = foff((k - 12) % 6); end
      s = 0;
      for (int y = 0; y < n; y++)
        for (int x = 0; x < n; x++) begin
          int ix, iy, p;
          ix = px + imx + x + fdiv4(ox);
          iy = py + imy + y + fdiv4(oy);
          p  = frac_pred(ix, iy, ox - 4 * fdiv4(ox), oy - 4 * fdiv4(oy));
          s += ad_ref(cur_pix(px + x, py + y), p, low_bits);
        end
      if (s < sad) begin sad = s; qx = 4 * imx + ox; qy = 4 * imy + oy; end
    end
  endfunction

  function automatic int fme_cycles(int n);
    return 5 * n + 11 + $clog2(n) + 9;
  endfunction

endpackage
