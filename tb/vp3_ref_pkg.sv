// vp3_ref_pkg: reference models for the video encoder testbenches: block
// sums of absolute differences with and without the per-row early exit,
// the scaled variances, a floating point DCT and the quantiser.
package vp3_ref_pkg;
  typedef int blk_t [64];

  function automatic int avg2(input int a, input int b);
    return (a + b) / 2;
  endfunction

  // prediction: ref1 alone or the truncated average of both
  function automatic blk_t predict(input blk_t r1, input blk_t r2, input bit one_ref);
    blk_t p;
    foreach (p[i]) p[i] = one_ref ? r1[i] : avg2(r1[i], r2[i]);
    return p;
  endfunction

  function automatic int sad(input blk_t s, input blk_t r);
    int a = 0;
    foreach (s[i]) a += (s[i] > r[i]) ? s[i] - r[i] : r[i] - s[i];
    return a;
  endfunction

  // returns the total, sets early when the row check abandoned the block
  function automatic int sad_breakout(input blk_t s, input blk_t r, input int so_far,
                                      input int best, output bit early);
    int a = so_far;
    early = 0;
    for (int i = 0; i < 64; i++) begin
      a += (s[i] > r[i]) ? s[i] - r[i] : r[i] - s[i];
      if (i % 8 == 7 && i != 63 && a > best) begin early = 1; return a; end
    end
    return a;
  endfunction

  function automatic longint variance64(input blk_t d);
    longint s = 0, ss = 0;
    foreach (d[i]) begin s += longint'(d[i]); ss += longint'(d[i]) * longint'(d[i]); end
    return 64 * ss - s * s;
  endfunction

  function automatic blk_t rand_blk(input int lo, input int hi);
    blk_t b;
    foreach (b[i]) b[i] = lo + int'($urandom_range(hi - lo));
    return b;
  endfunction

  function automatic real dct_coef(input blk_t f, input int u, input int v);
    real s = 0.0, cu, cv;
    cu = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    cv = (v == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++)
        s += f[y*8+x] * $cos((2*x+1)*u*3.14159265358979/16.0) * $cos((2*y+1)*v*3.14159265358979/16.0);
    return 0.25 * cu * cv * s;
  endfunction

  function automatic int quant(input int c, input int recip, input int qmax);
    longint m, q;
    m = (c < 0) ? -longint'(c) : longint'(c);
    q = (m * recip + 32768) >>> 16;
    if (q > longint'(qmax)) q = longint'(qmax);
    return (c < 0) ? -int'(q) : int'(q);
  endfunction

  // raster index of the n-th coefficient in zig-zag order
  function automatic int zz(input int n);
    int x = 0, y = 0;
    for (int k = 0; k < n; k++) begin
      if ((x + y) % 2 == 0) begin
        if (x == 7) y++; else if (y == 0) x++; else begin x++; y--; end
      end else begin
        if (y == 7) x++; else if (x == 0) y++; else begin x--; y++; end
      end
    end
    return y * 8 + x;
  endfunction
endpackage
