// Reference models for the detector testbenches.
//
// Plain integer arithmetic on whole images held in dynamic arrays, written
// directly from the defining equations rather than from the RTL structure:
//   gaussian : out(r,c) = floor(sum_{dr,dc} m(dr,dc) * p(r+dr,c+dc) / 16),
//              m = [1 2 1; 2 4 2; 1 2 1], pixels outside the image = 0
//   lpf      : y[k] = floor((-x[2k+1] + 2x[2k] + 6x[2k-1] + 2x[2k-2]
//              - x[2k-3]) / 8), x[i<0] = 0 (one continuous stream)
//   ll_band  : lpf over the raster image, then lpf over the L band read
//              column by column; result in column-major order
//   S        : floor(sum (A-B)^2 / 2^shift)
package tb_ref_pkg;
  typedef int img_t[];

  // Floor division by 2^k for signed values.
  function automatic int fdiv(int v, int k);
    return v >>> k;
  endfunction

  function automatic img_t gaussian(img_t p, int w, int h);
    img_t o = new[w*h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int s = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++) begin
            int rr = r + dr, cc = c + dc;
            int m = (dr == 0 ? 2 : 1) * (dc == 0 ? 2 : 1);
            if (rr >= 0 && rr < h && cc >= 0 && cc < w) s += m * p[rr*w + cc];
          end
        o[r*w + c] = s / 16;   // s >= 0 for the unsigned images used here
      end
    return o;
  endfunction

  function automatic img_t lpf(img_t x);
    img_t y = new[x.size() / 2];
    for (int k = 0; k < x.size() / 2; k++) begin
      int s = 0;
      int idx[5] = '{2*k+1, 2*k, 2*k-1, 2*k-2, 2*k-3};
      int cf[5]  = '{-1, 2, 6, 2, -1};
      for (int t = 0; t < 5; t++) if (idx[t] >= 0) s += cf[t] * x[idx[t]];
      y[k] = fdiv(s, 3);
    end
    return y;
  endfunction

  // LL band of a w x h raster image, returned in column-major order
  // (element c*(h/2) + r is LL row r, column c).
  function automatic img_t ll_band(img_t p, int w, int h);
    img_t l = lpf(p);                 // h rows of w/2, row-major
    img_t colstream = new[(w/2) * h];
    for (int c = 0; c < w/2; c++)
      for (int r = 0; r < h; r++) colstream[c*h + r] = l[r*(w/2) + c];
    return lpf(colstream);
  endfunction

  function automatic int s_value(img_t a, img_t b, int shift);
    longint acc = 0;
    for (int i = 0; i < a.size(); i++) begin
      int d = a[i] - b[i];
      acc += longint'(d * d);
    end
    return int'(acc >> shift);
  endfunction

  function automatic int abs_i(int v);
    return v < 0 ? -v : v;
  endfunction

  // Whole detector: returns the filtered object (column-major LL domain) and
  // the matching count.
  function automatic void detector(img_t in_img, img_t ref_img, int w, int h,
                                   int tol, output img_t obj_out, output int s,
                                   output int cnt);
    img_t g1 = gaussian(in_img, w, h);
    img_t g2 = gaussian(ref_img, w, h);
    img_t ll1 = ll_band(g1, w, h);
    img_t ll2 = ll_band(g2, w, h);
    img_t obj = new[ll1.size()];
    int shift = $clog2(8 * w * h);
    s = s_value(g1, g2, shift);
    for (int i = 0; i < obj.size(); i++) begin
      int d = abs_i(ll2[i] - ll1[i]);
      obj[i] = (d > s + ll2[i]) ? d : 0;
    end
    // Column-major stream = raster image of width h/2, height w/2.
    obj_out = gaussian(obj, h/2, w/2);
    cnt = 0;
    foreach (obj_out[i]) if (obj_out[i] <= tol) cnt++;
  endfunction
endpackage
