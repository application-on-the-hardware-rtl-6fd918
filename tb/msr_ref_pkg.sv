// msr_ref_pkg: reference models for the testbenches, written from the
// filter equations rather than from the hardware structure. An image is a
// dynamic array of ints in raster order.
package msr_ref_pkg;
  typedef int img_t[];

  localparam int H9 [9] = '{1, 8, 28, 56, 70, 56, 28, 8, 1};

  function automatic int rnd(input longint acc, input int sh);
    longint r;
    r = (acc + (longint'(1) << (sh - 1))) >>> sh;
    return (r > 255) ? 255 : int'(r);
  endfunction

  function automatic int px(const ref img_t im, input int w, input int h, input int r, input int c);
    if (r < 0 || c < 0 || r >= h || c >= w) return 0;
    return im[r * w + c];
  endfunction

  // Horizontal 9-tap filter keeping columns 2m+1 (causal), W -> W/2.
  function automatic img_t down_x(const ref img_t im, input int w, input int h);
    img_t o = new[(w / 2) * h];
    for (int r = 0; r < h; r++)
      for (int m = 0; m < w / 2; m++) begin
        longint a = 0;
        for (int k = 0; k < 9; k++) a += H9[k] * px(im, w, h, r, 2 * m + 1 - k);
        o[r * (w / 2) + m] = rnd(a, 8);
      end
    return o;
  endfunction

  // Vertical 9-tap filter keeping lines 2q+1 (causal), H -> ceil(H/2).
  function automatic img_t down_y(const ref img_t im, input int w, input int h);
    int ho = (h + 1) / 2;
    img_t o = new[w * ho];
    for (int q = 0; q < ho; q++)
      for (int m = 0; m < w; m++) begin
        longint a = 0;
        for (int k = 0; k < 9; k++) a += H9[k] * px(im, w, h, 2 * q + 1 - k, m);
        o[q * w + m] = rnd(a, 8);
      end
    return o;
  endfunction

  function automatic img_t down2d(const ref img_t im, input int w, input int h);
    img_t t = down_x(im, w, h);
    return down_y(t, w / 2, h);
  endfunction

  // Zero-stuffed 2x interpolation with the 9-tap kernel, gain 2 per axis:
  // out[2n+p] = sum_i h[2i+p] in[n-i] / 128. Vertical first, then horizontal.
  function automatic img_t up2d(const ref img_t im, input int w, input int h, input int hout);
    img_t t = new[w * hout];
    img_t o = new[2 * w * hout];
    for (int r = 0; r < hout; r++)
      for (int m = 0; m < w; m++) begin
        longint a = 0;
        for (int i = 0; 2 * i + r % 2 < 9; i++) a += H9[2 * i + r % 2] * px(im, w, h, r / 2 - i, m);
        t[r * w + m] = rnd(a, 7);
      end
    for (int r = 0; r < hout; r++)
      for (int c = 0; c < 2 * w; c++) begin
        longint a = 0;
        for (int i = 0; 2 * i + c % 2 < 9; i++) a += H9[2 * i + c % 2] * px(t, w, hout, r, c / 2 - i);
        o[r * 2 * w + c] = rnd(a, 7);
      end
    return o;
  endfunction

  function automatic img_t weight(const ref img_t im, input int wt);
    img_t o = new[im.size()];
    foreach (im[i]) o[i] = rnd(longint'(wt) * im[i], 8);
    return o;
  endfunction

  function automatic img_t add(const ref img_t a, const ref img_t b);
    img_t o = new[a.size()];
    foreach (a[i]) o[i] = (a[i] + b[i] > 255) ? 255 : a[i] + b[i];
    return o;
  endfunction

  // log2 in 1/32 units: floor(log2 x) * 32 + linear fraction.
  function automatic int log2q(input int x);
    int e = 0;
    if (x < 1) x = 1;
    while ((2 << e) <= x) e++;
    return e * 32 + (((x - (1 << e)) * 32) >> e);
  endfunction

  function automatic img_t retinex(const ref img_t i, const ref img_t l, input int off, input int g);
    img_t o = new[i.size()];
    foreach (i[k]) begin
      int r = off + g * (log2q(i[k]) - log2q(l[k]));
      o[k] = (r < 0) ? 0 : (r > 255) ? 255 : r;
    end
    return o;
  endfunction

  // Illumination estimate of the three-scale pyramid.
  function automatic img_t ibar(const ref img_t im, input int w, input int h,
                                input int w1, input int w2, input int w3);
    int h1 = (h + 1) / 2, h2 = (h1 + 1) / 2, h3 = (h2 + 1) / 2;
    img_t d1, d2, d3, s2, s1;
    d1 = down2d(im, w, h);
    d2 = down2d(d1, w / 2, h1);
    d3 = down2d(d2, w / 4, h2);
    begin
      img_t a, b, u;
      a = weight(d3, w3);
      u = up2d(a, w / 8, h3, h2);
      b = weight(d2, w2);
      s2 = add(u, b);
      u = up2d(s2, w / 4, h2, h1);
      b = weight(d1, w1);
      s1 = add(u, b);
    end
    return up2d(s1, w / 2, h1, h);
  endfunction

  // Retinex output of the three-scale pyramid with the default weights.
  function automatic img_t retinex_msr(const ref img_t im, input int w, input int h);
    img_t l = ibar(im, w, h, 85, 85, 86);
    return retinex(im, l, 128, 2);
  endfunction

  function automatic img_t avg4(const ref img_t im, input int w, input int h);
    img_t o = new[(w / 4) * (h / 4)];
    for (int r = 0; r < h / 4; r++)
      for (int c = 0; c < w / 4; c++) begin
        int s = 0;
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) s += px(im, w, h, 4 * r + i, 4 * c + j);
        o[r * (w / 4) + c] = (s + 8) >> 4;
      end
    return o;
  endfunction

  // Test picture: smooth gradient, a bright square and pseudo-random noise.
  function automatic img_t picture(input int w, input int h, input int seed);
    img_t o = new[w * h];
    int s = seed;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int v;
        s = s * 1103515245 + 12345;
        v = (r * 97 + c * 53) % 160 + ((s >>> 16) & 63);
        if (r % 16 > 4 && r % 16 < 11 && c % 24 > 6 && c % 24 < 15) v += 40;
        o[r * w + c] = (v > 255) ? 255 : v;
      end
    return o;
  endfunction
endpackage
