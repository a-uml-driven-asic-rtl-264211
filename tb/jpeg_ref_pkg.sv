// jpeg_ref_pkg: reference models for the JPEG encoder testbenches, written
// independently of the RTL: a floating-point 8x8 DCT, a zig-zag table built by
// walking the scan explicitly, rounding division, and the run-length symbol
// sequence with and without removal of trailing sixteen-zero symbols.
package jpeg_ref_pkg;
  typedef struct {
    int rlen;
    int size;
    int amp;
    bit dc;
  } sym_t;

  function automatic void real_dct(input int pix[64], output real f[64]);
    real s, cu, cv;
    for (int v = 0; v < 8; v++)
      for (int u = 0; u < 8; u++) begin
        s = 0.0;
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++)
            s += real'(pix[y*8+x] - 128) * $cos((2*x+1)*u*3.14159265358979/16.0)
                                         * $cos((2*y+1)*v*3.14159265358979/16.0);
        cu = (u == 0) ? 0.70710678 : 1.0;
        cv = (v == 0) ? 0.70710678 : 1.0;
        f[v*8+u] = 0.25 * cu * cv * s;
      end
  endfunction

  // zig-zag: move right/down-left/down/up-right along the scan
  function automatic void zigzag(output int zz[64]);
    int r, c;
    bit up;
    r = 0; c = 0; up = 1;
    for (int n = 0; n < 64; n++) begin
      zz[n] = r * 8 + c;
      if (up) begin
        if (c == 7) begin r++; up = 0; end
        else if (r == 0) begin c++; up = 0; end
        else begin r--; c++; end
      end else begin
        if (r == 7) begin c++; up = 1; end
        else if (c == 0) begin r++; up = 1; end
        else begin r++; c--; end
      end
    end
  endfunction

  function automatic int qdiv(input int d, input int q);
    int m;
    if (q == 0) q = 1;
    m = (d < 0) ? -d : d;
    m = (m + q / 2) / q;
    return (d < 0) ? -m : m;
  endfunction

  function automatic int bits_of(input int v);
    int m, s;
    m = (v < 0) ? -v : v;
    s = 0;
    while (m != 0) begin s++; m = m >> 1; end
    return s;
  endfunction

  function automatic sym_t mk(input int run, input int v, input bit dc);
    sym_t t;
    t.rlen = run; t.size = bits_of(v); t.dc = dc;
    t.amp  = (v < 0) ? ((v - 1) & 32'hfff) : (v & 32'hfff);
    return t;
  endfunction

  // symbols of one block given its 64 coefficients in zig-zag order
  function automatic void rle_block(input int c[64], input bit suppress, ref sym_t q[$]);
    sym_t blk[$];
    int run;
    blk.push_back(mk(0, c[0], 1));
    run = 0;
    for (int n = 1; n < 64; n++) begin
      if (c[n] == 0 && n == 63) blk.push_back(mk(0, 0, 0));      // EOB
      else if (c[n] == 0) begin
        run++;
        if (run == 16) begin blk.push_back(mk(15, 0, 0)); run = 0; end
      end else begin
        blk.push_back(mk(run, c[n], 0));
        run = 0;
      end
    end
    if (suppress && c[63] == 0) begin
      // drop (15,0) symbols directly before the EOB
      while (blk.size() >= 2 && blk[blk.size()-2].rlen == 15 && blk[blk.size()-2].size == 0
             && !blk[blk.size()-2].dc)
        blk.delete(blk.size()-2);
    end
    foreach (blk[i]) q.push_back(blk[i]);
  endfunction

  function automatic int count_zrl(input int c[64]);
    int run, n_zrl;
    run = 0; n_zrl = 0;
    for (int n = 1; n < 63; n++) begin
      if (c[n] == 0) begin run++; if (run == 16) begin n_zrl++; run = 0; end end
      else run = 0;
    end
    return n_zrl;
  endfunction
endpackage
