// dbwt_ref_pkg: reference model for the DBWT testbenches.
//
// Computes the expected wavelet coefficients directly from the definition
// (plain convolution, decimation, rounding), independently of the folded
// hardware: the 9/7 analysis filters are quantised here from their real
// values, output m of a level uses x[2m+1-k] with x[n] = 0 for n < 0, and
// results are rounded half-up and saturated to 16 bit.
package dbwt_ref_pkg;

  typedef int     iarr_t[];
  typedef longint larr_t[];

  // CDF 9/7 analysis filters, unit DC gain low-pass
  localparam real HR [9] = '{ 0.026748757411, -0.016864118443, -0.078223266529,
                              0.266864118443,  0.602949018236,  0.266864118443,
                             -0.078223266529, -0.016864118443,  0.026748757411};
  localparam real GR [7] = '{ 0.091271763114, -0.057543526229, -0.591271763114,
                              1.115087052457, -0.591271763114, -0.057543526229,
                              0.091271763114};

  function automatic int hq(int k);
    return int'($floor(HR[k] * 1024.0 + 0.5));
  endfunction

  function automatic int gq(int k);
    return int'($floor(GR[k] * 1024.0 + 0.5));
  endfunction

  function automatic int rnd(longint acc, int sh);
    longint r;
    r = (acc + (longint'(1) << (sh - 1))) >>> sh;
    if (r > 32767)  r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  // Raw (unrounded) decimated filter outputs of one sequence.
  function automatic void filt_raw(input iarr_t x, output larr_t lo, output larr_t hi);
    int n;
    n  = x.size();
    lo = new[n/2];
    hi = new[n/2];
    for (int m = 0; m < n/2; m++) begin
      lo[m] = 0;
      hi[m] = 0;
      for (int k = 0; k < 9; k++)
        if (2*m+1-k >= 0) lo[m] += longint'(hq(k)) * x[2*m+1-k];
      for (int k = 0; k < 7; k++)
        if (2*m+1-k >= 0) hi[m] += longint'(gq(k)) * x[2*m+1-k];
    end
  endfunction

  // One level of the 1-D transform, rounded to 16 bit.
  function automatic void dwt1d(input iarr_t x, output iarr_t lo, output iarr_t hi);
    larr_t rl, rh;
    filt_raw(x, rl, rh);
    lo = new[rl.size()];
    hi = new[rh.size()];
    foreach (rl[m]) begin
      lo[m] = rnd(rl[m], 10);
      hi[m] = rnd(rh[m], 10);
    end
  endfunction

  // One level of the separable 2-D transform of an n x n image stored
  // row-major: rows first, each rounded to 16 bit, then columns. Subbands are
  // named <horizontal><vertical> and returned row-major, (n/2) x (n/2).
  function automatic void sep2d(input iarr_t img, input int n,
                                output iarr_t ll, output iarr_t lh,
                                output iarr_t hl, output iarr_t hh);
    iarr_t row, lo, hi, rl, rh, col;
    int h;
    h = n / 2;
    rl = new[n*h];
    rh = new[n*h];
    for (int r = 0; r < n; r++) begin
      row = new[n];
      for (int c = 0; c < n; c++) row[c] = img[r*n+c];
      dwt1d(row, lo, hi);
      for (int c = 0; c < h; c++) begin rl[r*h+c] = lo[c]; rh[r*h+c] = hi[c]; end
    end
    ll = new[h*h]; lh = new[h*h]; hl = new[h*h]; hh = new[h*h];
    for (int c = 0; c < h; c++) begin
      col = new[n];
      for (int r = 0; r < n; r++) col[r] = rl[r*h+c];
      dwt1d(col, lo, hi);
      for (int m = 0; m < h; m++) begin ll[m*h+c] = lo[m]; lh[m*h+c] = hi[m]; end
      for (int r = 0; r < n; r++) col[r] = rh[r*h+c];
      dwt1d(col, lo, hi);
      for (int m = 0; m < h; m++) begin hl[m*h+c] = lo[m]; hh[m*h+c] = hi[m]; end
    end
  endfunction

  // One level of the non-separable 2-D transform: the four 2-D kernels are
  // the outer products of the quantised 1-D filters, applied directly to the
  // image (zero outside it) with a single rounding by 20 bits at the end.
  // Output (m, p) uses rows 2m+1-v and columns 2p+1-u.
  function automatic void nonsep2d(input iarr_t img, input int n,
                                   output iarr_t ll, output iarr_t lh,
                                   output iarr_t hl, output iarr_t hh);
    int h;
    longint sll, slh, shl, shh, px;
    h = n / 2;
    ll = new[h*h]; lh = new[h*h]; hl = new[h*h]; hh = new[h*h];
    for (int m = 0; m < h; m++)
      for (int p = 0; p < h; p++) begin
        sll = 0; slh = 0; shl = 0; shh = 0;
        for (int v = 0; v < 9; v++)
          for (int u = 0; u < 9; u++) begin
            int r, c;
            r = 2*m + 1 - v;
            c = 2*p + 1 - u;
            if (r >= 0 && c >= 0) begin
              px = img[r*n+c];
              sll += longint'(hq(v) * hq(u)) * px;
              if (v < 7)         slh += longint'(gq(v) * hq(u)) * px;
              if (u < 7)         shl += longint'(hq(v) * gq(u)) * px;
              if (u < 7 && v < 7) shh += longint'(gq(v) * gq(u)) * px;
            end
          end
        ll[m*h+p] = rnd(sll, 20);
        lh[m*h+p] = rnd(slh, 20);
        hl[m*h+p] = rnd(shl, 20);
        hh[m*h+p] = rnd(shh, 20);
      end
  endfunction

endpackage
