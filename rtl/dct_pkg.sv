// dct_pkg: constants and helper functions shared by the 8x8 DCT blocks of the
// JPEG encoder and the video-encoder transform path.
//
// cos16(k) returns round(4096 * cos(k*pi/16)) for any integer k >= 0. Only the
// nine first-quadrant values are stored; every other angle follows from the
// symmetries cos(2pi - a) = cos(a) and cos(pi - a) = -cos(a).
// zigzag_raster(n) returns the raster (row*8 + column) index of the n-th
// coefficient in zig-zag scan order. It walks the anti-diagonals r + c = d:
// even diagonals run from bottom-left to top-right, odd ones the other way.
// The 12-bit cosine scale and the table formulation are this design's choice.
package dct_pkg;

  function automatic int cos16(input int k);
    int m;
    int s;
    int v;
    m = k % 32;
    s = 1;
    if (m > 16) m = 32 - m;
    if (m > 8) begin
      m = 16 - m;
      s = -1;
    end
    case (m)
      0:       v = 4096;
      1:       v = 4017;
      2:       v = 3784;
      3:       v = 3406;
      4:       v = 2896;
      5:       v = 2276;
      6:       v = 1567;
      7:       v = 799;
      default: v = 0;
    endcase
    return s * v;
  endfunction

  // Basis weight C(u) * cos((2x+1) u pi / 16) scaled by 4096, C(0) = 1/sqrt(2).
  function automatic int basis(input int u, input int x);
    return (u == 0) ? 2896 : cos16((2 * x + 1) * u);
  endfunction

  function automatic int zigzag_raster(input int n);
    int cnt;
    int r;
    int res;
    int lo;
    int hi;
    cnt = 0;
    res = 0;
    for (int d = 0; d < 15; d++) begin
      lo = (d > 7) ? d - 7 : 0;
      hi = (d < 7) ? d : 7;
      for (int i = 0; i <= hi - lo; i++) begin
        r = (d % 2 == 0) ? hi - i : lo + i;
        if (cnt == n) res = r * 8 + (d - r);
        cnt++;
      end
    end
    return res;
  endfunction

endpackage
