// dbwt_pkg: shared constants of the discrete biorthogonal wavelet transform
// (DBWT) library.
//
// Word lengths: input samples are W_I = 9 bit and all wavelet coefficients
// are carried at W_O = 16 bit two's complement, the figures of the design.
// The filter pair is the CDF 9/7 biorthogonal analysis pair (9-tap low-pass
// h, 7-tap high-pass g). Both filters are symmetric, so only the unique
// halves are stored: H_Q[0..4] = h[0..4] (h[k] = h[8-k]) and
// G_Q[0..3] = g[0..3] (g[k] = g[6-k]). The coefficients are quantised to
// W_C = 12 bit with FRAC = 10 fractional bits, normalised for unit DC gain of
// the low-pass filter (sum of h = 1, sum of g = 0); the coefficient word
// length and this normalisation are choices of this implementation.
//
// Filtering convention used by every block: with zero-based sample index n,
// the decimated output pair m is produced when sample x[2m+1] arrives:
//   low[m]  = sum_{k=0..8} h[k] * x[2m+1-k]
//   high[m] = sum_{k=0..6} g[k] * x[2m+1-k]
// with x[n] = 0 for n < 0 (every frame, and in 2-D every row, starts from
// zero history). A frame of N samples gives N/2 pairs.
package dbwt_pkg;

  localparam int W_I   = 9;    // input sample width
  localparam int W_O   = 16;   // coefficient (output) width, all levels
  localparam int W_C   = 12;   // filter coefficient width
  localparam int FRAC  = 10;   // fractional bits of the filter coefficients
  localparam int L_LO  = 9;    // low-pass taps
  localparam int L_HI  = 7;    // high-pass taps
  localparam int NU_LO = 5;    // unique low-pass coefficients
  localparam int NU_HI = 4;    // unique high-pass coefficients
  localparam int NU    = NU_LO + NU_HI;

  // round(c * 2^10) of the CDF 9/7 analysis filters
  localparam logic signed [W_C-1:0] H_Q [NU_LO] = '{12'sd27, -12'sd17, -12'sd80, 12'sd273, 12'sd617};
  localparam logic signed [W_C-1:0] G_Q [NU_HI] = '{12'sd93, -12'sd59, -12'sd605, 12'sd1142};

  // Multiplier count of stage j of the balanced pipeline: ceil(L / 2^j),
  // at least one.
  function automatic int mults_of_level(int l, int j);
    int m;
    m = (l + (1 << j) - 1) >> j;
    return (m < 1) ? 1 : m;
  endfunction

  // Round-half-up a wide accumulator by SHIFT bits and saturate to W_O bits.
  function automatic logic signed [W_O-1:0] round_sat(input logic signed [63:0] acc,
                                                      input int shift);
    logic signed [63:0] r;
    r = (acc + (64'sd1 <<< (shift - 1))) >>> shift;
    if (r > 64'sd32767)       return 16'sh7fff;
    else if (r < -64'sd32768) return 16'sh8000;
    else                      return r[W_O-1:0];
  endfunction

endpackage
