// sgs_ref_pkg - reference model for the steerable Gaussian smoother
// testbenches.
//
// Works on whole frames held as plain integer arrays, independently of the
// RTL: a 1-D pass in either direction with zero padding at the image border,
// rounding to nearest after dropping 16 fraction bits and clamping at 255,
// plus helpers that build sampled Gaussian masks and test images.
package sgs_ref_pkg;
  localparam int RW = 160;
  localparam int RH = 160;
  typedef int frame_t [RH][RW];
  typedef int coefs_t [];

  // One 1-D filter pass: vertical (column window) or horizontal (row window).
  function automatic void pass1d(const ref frame_t src, ref frame_t dst,
                                 input int w, input int h,
                                 input coefs_t coef, input bit vertical);
    int taps, r0;
    taps = coef.size();
    r0   = (taps - 1) / 2;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        longint sum;
        sum = 0;
        for (int i = 0; i < taps; i++) begin
          int rr, cc;
          rr = vertical ? r + i - r0 : r;
          cc = vertical ? c : c + i - r0;
          if (rr >= 0 && rr < h && cc >= 0 && cc < w)
            sum += longint'(src[rr][cc]) * longint'(coef[i]);
        end
        sum = (sum + 32768) / 65536;
        dst[r][c] = (sum > 255) ? 255 : int'(sum);
      end
  endfunction

  // Sampled Gaussian of the given sigma, scaled so the taps add up to
  // 'gain' (65536 is unity gain); the rounding remainder goes to the centre.
  function automatic coefs_t gauss(input real sigma, input int taps, input int gain);
    coefs_t c;
    real g[];
    real tot;
    int s;
    c = new[taps];
    g = new[taps];
    tot = 0.0;
    for (int i = 0; i < taps; i++) begin
      real x;
      x = real'(i - (taps - 1) / 2);
      g[i] = $exp(-(x * x) / (2.0 * sigma * sigma));
      tot += g[i];
    end
    s = 0;
    for (int i = 0; i < taps; i++) begin
      c[i] = int'($floor(g[i] / tot * real'(gain) + 0.5));
      s += c[i];
    end
    c[(taps - 1) / 2] += gain - s;
    return c;
  endfunction

  // Test image: a diagonal ramp with a bright square and pseudo-random noise.
  function automatic int test_pixel(input int r, input int c, input int seed);
    int v;
    v = (r * 3 + c * 2 + seed) % 200;
    if (r > 20 && r < 60 && c > 30 && c < 90) v = 250;
    v += ((r * 7919 + c * 104729 + seed * 31) ^ (r * c)) % 23;
    if (v > 255) v = 255;
    if (v < 0) v = -v % 256;
    return v;
  endfunction
endpackage
