// pp_ref_pkg: frame-level reference models of the post-processing steps,
// used by the testbenches to work out expected outputs independently of the
// RTL. Images are int arrays in raster order (index y*w + x); 0 is a hole.
package pp_ref_pkg;

  typedef int img_t[];

  function automatic int iabs(input int a);
    return (a < 0) ? -a : a;
  endfunction

  // Left-right consistency check.
  function automatic img_t lrcc_ref(input img_t dl, input img_t dr, input int w, input int h,
                                    input int th);
    img_t o = new[w*h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int d = dl[y*w+x];
        o[y*w+x] = 0;
        if (x - d >= 0 && iabs(d - dr[y*w+x-d]) < th) o[y*w+x] = d;
      end
    return o;
  endfunction

  // Three-way hole filling: smallest of the nearest valid disparities to the
  // left, to the right and above.
  function automatic img_t hf_ref(input img_t d, input int w, input int h, input bit en);
    img_t o = new[w*h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int v = d[y*w+x];
        o[y*w+x] = v;
        if (en && v == 0) begin
          int best = 0;
          int c;
          c = 0; for (int i = x - 1; i >= 0; i--) if (d[y*w+i] != 0) begin c = d[y*w+i]; break; end
          if (c != 0 && (best == 0 || c < best)) best = c;
          c = 0; for (int i = x + 1; i < w; i++)  if (d[y*w+i] != 0) begin c = d[y*w+i]; break; end
          if (c != 0 && (best == 0 || c < best)) best = c;
          c = 0; for (int j = y - 1; j >= 0; j--) if (d[j*w+x] != 0) begin c = d[j*w+x]; break; end
          if (c != 0 && (best == 0 || c < best)) best = c;
          o[y*w+x] = best;
        end
      end
    return o;
  endfunction

  // floor(window sum * 2^extra / n^2), taps outside the frame count as 0.
  function automatic img_t mean_ref(input img_t a, input int w, input int h, input int n,
                                    input int extra);
    img_t o = new[w*h];
    int r = (n - 1) / 2;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        longint s = 0;
        for (int j = -r; j <= r; j++)
          for (int i = -r; i <= r; i++)
            if (x+i >= 0 && x+i < w && y+j >= 0 && y+j < h) s += a[(y+j)*w + x+i];
        o[y*w+x] = int'((s << extra) / (n * n));
      end
    return o;
  endfunction

  // Variance check with the two-stage mean deviation (4 fraction bits).
  function automatic img_t vc_ref(input img_t d, input img_t pix, input int w, input int h,
                                  input int n, input int th);
    img_t m, dev, md, o;
    m   = mean_ref(pix, w, h, n, 4);
    dev = new[w*h];
    for (int i = 0; i < w*h; i++) dev[i] = iabs(m[i] - 16 * pix[i]);
    md  = mean_ref(dev, w, h, n, 0);
    o   = new[w*h];
    for (int i = 0; i < w*h; i++) o[i] = (md[i] > th) ? d[i] : 0;
    return o;
  endfunction

  // Tap weight: 11-bit Gaussian tables, product cut to 0..15.
  function automatic int sim_w(input int a, input real sigma);
    return int'($floor(2047.0 * $exp(-0.5 * (real'(a) / sigma) ** 2) + 0.5));
  endfunction

  function automatic int prox_w(input int d2, input real sigma);
    return int'($floor(2047.0 * $exp(-0.5 * real'(d2) / (sigma * sigma)) + 0.5));
  endfunction

  function automatic int wmf_weight(input int a, input int d2, input real ss, input real sp);
    return (sim_w(a, ss) * prox_w(d2, sp)) >> 18;
  endfunction

  // Weighted median: lowest level whose cumulative weight exceeds half the
  // total (rounded down); holes get no vote; no weight gives a hole.
  function automatic int wmedian(input int wv[], input int dv[]);
    int hist[256];
    int tot = 0;
    int cum = 0;
    foreach (hist[l]) hist[l] = 0;
    foreach (wv[i]) if (dv[i] != 0) begin
      tot += wv[i];
      hist[dv[i]] += wv[i];
    end
    for (int lvl = 0; lvl < 256; lvl++) begin
      cum += hist[lvl];
      if (cum > tot / 2) return lvl;
    end
    return 0;
  endfunction

  // One weighted median filter pass; taps outside the frame are holes with
  // intensity 0.
  function automatic img_t wmf_ref(input img_t d, input img_t pix, input int w, input int h,
                                   input int n, input real ss, input real sp);
    img_t o = new[w*h];
    int r = (n - 1) / 2;
    int wv[], dv[];
    int wt[256][32];
    for (int a = 0; a < 256; a++)
      for (int d2 = 0; d2 < 32; d2++) wt[a][d2] = wmf_weight(a, d2, ss, sp);
    wv = new[n*n];
    dv = new[n*n];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int k = 0;
        for (int j = -r; j <= r; j++)
          for (int i = -r; i <= r; i++) begin
            bit in_f = (x+i >= 0 && x+i < w && y+j >= 0 && y+j < h);
            int q  = in_f ? pix[(y+j)*w + x+i] : 0;
            dv[k] = in_f ? d[(y+j)*w + x+i] : 0;
            wv[k] = wt[iabs(pix[y*w+x] - q)][i*i + j*j];
            k++;
          end
        o[y*w+x] = wmedian(wv, dv);
      end
    return o;
  endfunction

endpackage
