// tb_ref_pkg: reference models for the detector testbenches.
//
// Images are flat integer arrays in raster order. The models follow the
// definitions directly (full 3x3 windows, no decomposition) so they are an
// independent check of the streaming hardware: pixels outside the frame are
// left out of a window, which equals using the neutral value.
package tb_ref_pkg;

  typedef int img_t [];

  // Grey morphology with a rows x cols rectangle centred on each pixel.
  function automatic img_t morph(img_t a, int w, int h, bit erode, int rh, int rv);
    img_t o = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int v = erode ? 255 : 0;
        for (int dr = -rv; dr <= rv; dr++)
          for (int dc = -rh; dc <= rh; dc++) begin
            int rr = r + dr, cc = c + dc;
            if (rr >= 0 && rr < h && cc >= 0 && cc < w) begin
              int x = a[rr * w + cc];
              if (erode ? (x < v) : (x > v)) v = x;
            end
          end
        o[r * w + c] = v;
      end
    return o;
  endfunction

  function automatic img_t close3(img_t a, int w, int h);
    return morph(morph(a, w, h, 0, 1, 1), w, h, 1, 1, 1);
  endfunction

  function automatic img_t open3(img_t a, int w, int h);
    return morph(morph(a, w, h, 1, 1, 1), w, h, 0, 1, 1);
  endfunction

  function automatic int iabs(int x);
    return x < 0 ? -x : x;
  endfunction

  function automatic int imin(int a, int b);
    return a < b ? a : b;
  endfunction

  function automatic int imax(int a, int b);
    return a > b ? a : b;
  endfunction

  // Top-hat: |second pass result - original|.
  function automatic img_t tophat(img_t a, int w, int h, bit erode_first);
    img_t m = erode_first ? open3(a, w, h) : close3(a, w, h);
    img_t o = new[w * h];
    foreach (o[i]) o[i] = iabs(m[i] - a[i]);
    return o;
  endfunction

  // Three frames difference of t_k given t_(k-1), t_(k-2).
  function automatic img_t tfdf(img_t t0, img_t t1, img_t t2);
    img_t o = new[t0.size()];
    foreach (o[i]) o[i] = imin(iabs(t0[i] - t1[i]), iabs(t1[i] - t2[i]));
    return o;
  endfunction

  // Adaptive threshold of a frame.
  function automatic int thresh(img_t a, int tmin);
    longint sum = 0;
    int mx = 0, t;
    foreach (a[i]) begin
      sum += a[i];
      mx = imax(mx, a[i]);
    end
    t = (int'(sum / a.size()) + mx) / 2;
    return imax(t, tmin);
  endfunction

  function automatic img_t rand_img(int w, int h, int lo, int hi);
    img_t o = new[w * h];
    foreach (o[i]) o[i] = lo + int'($urandom % (hi - lo + 1));
    return o;
  endfunction

endpackage
