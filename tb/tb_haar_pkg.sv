// tb_haar_pkg - reference model of the lifting-wavelet denoiser, written with
// plain integers and loops, for the testbenches to compare the RTL against.
//
//   forward level : d = odd - even, a = even + floor(d / 2)
//   inverse level : even = a - floor(d / 2), odd = even + d
//   soft threshold: sign(d) * max(|d| - thr, 0)
// A frame of 2^levels samples is transformed on its own (Haar lifting has no
// overlap between frames), so a stream can be modelled frame by frame.
package tb_haar_pkg;

  function automatic int floor_half(int v);
    return v >>> 1;
  endfunction

  function automatic int soft_ref(int d, int thr);
    int mag;
    mag = (d < 0) ? -d : d;
    if (mag <= thr) return 0;
    return (d < 0) ? -(mag - thr) : (mag - thr);
  endfunction

  function automatic int sat(int v, int w);
    int hi, lo;
    hi = (1 << (w - 1)) - 1;
    lo = -(1 << (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // Forward transform of one frame. d[j] holds band j (2^(levels-j-1)
  // coefficients) flattened as d[j * 2^levels + k]; atop is the coarsest
  // approximation.
  function automatic void fwd_frame(input int x[], input int levels,
                                    output int d[], output int atop);
    int n;
    int a[];
    int na[];
    n = 1 << levels;
    a = new[n];
    d = new[levels * n];
    for (int i = 0; i < n; i++) a[i] = x[i];
    for (int j = 0; j < levels; j++) begin
      int len;
      len = n >> (j + 1);
      na = new[len];
      for (int k = 0; k < len; k++) begin
        int e, o, dd;
        e = a[2*k];
        o = a[2*k+1];
        dd = o - e;
        d[j*n + k] = dd;
        na[k] = e + floor_half(dd);
      end
      a = na;
    end
    atop = a[0];
  endfunction

  // Inverse transform of one frame from the same layout.
  function automatic void inv_frame(input int d[], input int atop,
                                    input int levels, output int y[]);
    int n;
    int a[];
    int na[];
    n = 1 << levels;
    a = new[1];
    a[0] = atop;
    for (int j = levels - 1; j >= 0; j--) begin
      int len;
      len = n >> (j + 1);
      na = new[2*len];
      for (int k = 0; k < len; k++) begin
        int e;
        e = a[k] - floor_half(d[j*n + k]);
        na[2*k]   = e;
        na[2*k+1] = e + d[j*n + k];
      end
      a = na;
    end
    y = a;
  endfunction

  // Full denoising of one frame: soft threshold on bands < thr_levels with
  // thr[j], coarsest approximation zeroed, inverse, saturation to out_w bits.
  function automatic void denoise_frame(input int x[], input int levels,
                                        input int thr_levels, input int thr[],
                                        input int out_w, output int y[]);
    int d[];
    int atop;
    int n;
    n = 1 << levels;
    fwd_frame(x, levels, d, atop);
    for (int j = 0; j < thr_levels; j++)
      for (int k = 0; k < (n >> (j + 1)); k++)
        d[j*n + k] = soft_ref(d[j*n + k], thr[j]);
    inv_frame(d, 0, levels, y);
    for (int i = 0; i < n; i++) y[i] = sat(y[i], out_w);
  endfunction

  // Same, with a threshold for every coefficient, laid out like d.
  function automatic void denoise_frame_thrc(input int x[], input int levels,
                                             input int thr_levels, input int thrc[],
                                             input int out_w, output int y[]);
    int d[];
    int atop;
    int n;
    n = 1 << levels;
    fwd_frame(x, levels, d, atop);
    for (int j = 0; j < thr_levels; j++)
      for (int k = 0; k < (n >> (j + 1)); k++)
        d[j*n + k] = soft_ref(d[j*n + k], thrc[j*n + k]);
    inv_frame(d, 0, levels, y);
    for (int i = 0; i < n; i++) y[i] = sat(y[i], out_w);
  endfunction

  // Lower median of |d| of band j of one frame and the universal threshold
  // made from it: 4.9375 * m with the fraction rounded down, saturated.
  function automatic int univ_thr(input int d[], input int levels, input int j,
                                  input int thr_w);
    int n, m, t;
    int mags[$];
    n = 1 << levels;
    for (int k = 0; k < (n >> (j + 1)); k++) mags.push_back(d[j*n + k] < 0 ? -d[j*n + k] : d[j*n + k]);
    mags.sort();
    m = mags[mags.size() / 2 - 1];
    t = 4 * m + m - (m >> 4);
    if (t > (1 << thr_w) - 1) t = (1 << thr_w) - 1;
    return t;
  endfunction

endpackage
