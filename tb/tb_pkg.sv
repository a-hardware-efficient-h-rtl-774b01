// tb_pkg: reference models shared by the testbenches.
//
// fpix() is a synthetic reference frame: a hashed texture defined for any
// integer pixel coordinate, so testbenches need no stored image. The other
// functions are independent golden models (SAD, H.264 quarter-pel samples,
// Hadamard SATD, Exp-Golomb lengths) written directly from the standard
// formulas rather than from the RTL structure.
//
// The reference models follow the H.264 definitions of the filters, the
// Hadamard transform and the Exp-Golomb code; the hashed test frame is this
// testbench's own.
package tb_pkg;

  function automatic int fpix(input int x, input int y);
    int unsigned h;
    h = 32'(x + 4096) * 32'd7919 + 32'(y + 4096) * 32'd104729;
    h = h ^ (h >> 13);
    h = h * 32'h5bd1e995;
    h = h ^ (h >> 15);
    return int'(h[7:0]);
  endfunction

  function automatic int clip255(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // unrounded 6-tap filter
  function automatic int t6(input int a, b, c, d, e, f);
    return a - 5*b + 20*c + 20*d - 5*e + f;
  endfunction

  // half-pel-grid sample at half-pel coordinates (hx, hy) of frame fpix
  function automatic int hsample(input int hx, input int hy);
    int x, y, b1 [6];
    x = hx >>> 1; y = hy >>> 1;
    if (hx % 2 == 0 && hy % 2 == 0) return fpix(x, y);
    if (hx[0] && !hy[0])
      return clip255((t6(fpix(x-2,y), fpix(x-1,y), fpix(x,y), fpix(x+1,y), fpix(x+2,y), fpix(x+3,y)) + 16) >>> 5);
    if (!hx[0] && hy[0])
      return clip255((t6(fpix(x,y-2), fpix(x,y-1), fpix(x,y), fpix(x,y+1), fpix(x,y+2), fpix(x,y+3)) + 16) >>> 5);
    for (int i = 0; i < 6; i++)
      b1[i] = t6(fpix(x-2,y-2+i), fpix(x-1,y-2+i), fpix(x,y-2+i), fpix(x+1,y-2+i), fpix(x+2,y-2+i), fpix(x+3,y-2+i));
    return clip255((t6(b1[0], b1[1], b1[2], b1[3], b1[4], b1[5]) + 512) >>> 10);
  endfunction

  // H.264 quarter-pel luma sample at quarter-pel coordinates (qx, qy)
  function automatic int qsample(input int qx, input int qy);
    int hx0, hy0;
    hx0 = qx >>> 1; hy0 = qy >>> 1;
    if (!qx[0] && !qy[0]) return hsample(hx0, hy0);
    if (qx[0] && !qy[0])  return (hsample(hx0, hy0) + hsample(hx0+1, hy0) + 1) >>> 1;
    if (!qx[0] && qy[0])  return (hsample(hx0, hy0) + hsample(hx0, hy0+1) + 1) >>> 1;
    // both odd: average of the two neighbouring half-pel samples that are
    // horizontal or vertical half positions
    if (hx0[0] != hy0[0]) return (hsample(hx0, hy0) + hsample(hx0+1, hy0+1) + 1) >>> 1;
    return (hsample(hx0+1, hy0) + hsample(hx0, hy0+1) + 1) >>> 1;
  endfunction

  // SATD of a 4x4 difference block by matrix products H * D * H
  function automatic int satd4(input int d [16]);
    int hm [4][4] = '{'{1,1,1,1}, '{1,1,-1,-1}, '{1,-1,-1,1}, '{1,-1,1,-1}};
    int t [4][4];
    int s;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 4; k++) t[i][j] += hm[i][k] * d[4*k + j];
      end
    s = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int v;
        v = 0;
        for (int k = 0; k < 4; k++) v += t[i][k] * hm[j][k];
        s += (v < 0) ? -v : v;
      end
    return s;
  endfunction

  function automatic int se_len(input int v);
    int code, len;
    code = (v > 0) ? 2*v - 1 : -2*v;
    len = 1;
    while ((code + 1) >= (1 << ((len + 1) / 2))) len += 2;
    return len;
  endfunction

endpackage
