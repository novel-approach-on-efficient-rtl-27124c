// dwt_ref_pkg: floating-point reference model of the 9/7 lifting DWT used by the
// testbenches. It works on the original (unflipped) lifting steps with
// alpha..zeta and whole-sample symmetric extension at both ends of a line, so it
// shares no arithmetic with the flipped fixed-point and digit-serial datapaths.
package dwt_ref_pkg;
  localparam real A = -1.586134342;
  localparam real B = -0.05298011854;
  localparam real G = 0.8829110762;
  localparam real D = 0.4435068522;
  localparam real Z = 1.149604398;

  typedef real rarr_t[];

  // Mirror index j into 0..n-1 (whole-sample symmetric).
  function automatic int mirror(int j, int n);
    if (j < 0) j = -j;
    if (j > n - 1) j = 2 * (n - 1) - j;
    return j;
  endfunction

  // 1-D forward 9/7 DWT of x (even length n >= 8): lo[i], hi[i], i < n/2.
  function automatic void dwt97(input real x[], output real lo[], output real hi[]);
    int n, h;
    real e[], o[], d1[], s1[], d2[];
    n = x.size();
    h = n / 2;
    e = new[h + 1];
    o = new[h + 1];
    // e[i] = x[2i], o[i] = x[2i+1]; extend e by one on the right.
    for (int i = 0; i <= h; i++) begin
      e[i] = x[mirror(2 * i, n)];
      o[i] = x[mirror(2 * i + 1, n)];
    end
    d1 = new[h];
    s1 = new[h + 1];
    d2 = new[h];
    lo = new[h];
    hi = new[h];
    for (int i = 0; i < h; i++) d1[i] = o[i] + A * (e[i] + e[i+1]);
    // symmetric: d1[-1] = d1[0]
    for (int i = 0; i < h; i++) s1[i] = e[i] + B * ((i == 0 ? d1[0] : d1[i-1]) + d1[i]);
    // s1[h] mirrors s1[h-1] for even n
    s1[h] = s1[h-1];
    for (int i = 0; i < h; i++) d2[i] = d1[i] + G * (s1[i] + s1[i+1]);
    for (int i = 0; i < h; i++) begin
      real s2;
      s2 = s1[i] + D * ((i == 0 ? d2[0] : d2[i-1]) + d2[i]);
      lo[i] = Z * s2;
      hi[i] = d2[i] / Z;
    end
  endfunction

  // In-place multi-level 2-D DWT of an n x n image stored row-major in img,
  // Mallat layout: each level filters the rows, then the columns, of the
  // top-left L x L low-low band (L = n >> level).
  function automatic void dwt2d(ref real img[], input int n, input int levels);
    for (int lv = 0; lv < levels; lv++) begin
      int len;
      real line[], lo[], hi[];
      len = n >> lv;
      line = new[len];
      for (int r = 0; r < len; r++) begin
        for (int c = 0; c < len; c++) line[c] = img[r * n + c];
        dwt97(line, lo, hi);
        for (int c = 0; c < len / 2; c++) begin
          img[r * n + c] = lo[c];
          img[r * n + len / 2 + c] = hi[c];
        end
      end
      for (int c = 0; c < len; c++) begin
        for (int r = 0; r < len; r++) line[r] = img[r * n + c];
        dwt97(line, lo, hi);
        for (int r = 0; r < len / 2; r++) begin
          img[r * n + c] = lo[r];
          img[(len / 2 + r) * n + c] = hi[r];
        end
      end
    end
  endfunction

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // Fixed-point word (fb fraction bits) to real and back.
  function automatic real fx2r(longint v, int fb);
    return real'(v) / (2.0 ** fb);
  endfunction
  function automatic longint r2fx(real v, int fb);
    return longint'(v * (2.0 ** fb));
  endfunction
endpackage
