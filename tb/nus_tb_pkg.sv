// nus_tb_pkg: reference models shared by the interpolator testbenches.
//
// - The three sampling schemes (partition limits x_n and frequencies f_n) named alpha, beta and
//   gamma, plus a uniform scheme (f = 128 everywhere) for comparison, and the computation of the interpolator's table entries from them. Everything is
//   done in integer units of 2^-14:
//     R(v, p)  truncation of v toward zero to a multiple of the pitch p = 32768/f (2/f)
//     PIL_1 = R(x_1, p_1);  PIL_n = R(R(x_n, p_{n-1}), p_n)
//     CSL_n = R(R(x_{n+1}, p_n), p_{n+1}) - 1   (x_23 = 1 - 2^-14, p_23 = p_22)
//     QMR_n = (CSL_n - PIL_n + 1) / p_n          words in partition n
//     SMN_1 = 0, SMN_n = SMN_{n-1} + QMR_{n-1}   first word of partition n
//     Add log_n = SMN_n - (f_n/2 + PIL_n / p_n)
//     B_n = 1 - log2 f_n, D_n = log2 f_n, S_n = 15 - log2 f_n (7 for f_n = 2^15), Dsp_n = f_n/2
// - The eight test functions g1..g8 (g1 = sqrt(2) * sigma * erfinv(x), sigma = 0.3), with erfinv by Newton
//   iteration on a power series of erf.
// - The sample memory image of a function under a scheme (ordinate g(x) and forward-difference
//   slope, both with frac_of(f) fraction bits, rounded to nearest and saturated to 32 bits) and a bit-exact model of the
//   interpolation that works from PIL/SMN/pitch rather than from the hardware's bit slicing.
package nus_tb_pkg;
  import nus_pkg::*;

  localparam int NS = 4;      // schemes: alpha, beta, gamma, uniform f = 128
  localparam int NF = 8;      // functions
  localparam int DEPTH = 512;
  localparam real SIGMA = 0.3;  // sigma_y of g1 and g2

  // Fraction bits of the stored words and of the output, chosen per function so that its
  // ordinates fit in 32 bits: 16 for g3 (which reaches 8192 at the domain ends), 24 otherwise.
  function automatic int frac_of(int f);
    return (f == 3) ? 16 : 24;
  endfunction

  localparam real SCHEME_X [NS][P] = '{
    '{-1.0, -0.9977, -0.9954, -0.9903, -0.9805, -0.9590, -0.9141, -0.8204, -0.6407, -0.3438, -0.1251,
      0.0, 0.1249, 0.3436, 0.6405, 0.8202, 0.9140, 0.9589, 0.9804, 0.9901, 0.9953, 0.9976},
    '{-1.0, -0.9977, -0.9954, -0.9903, -0.9805, -0.9590, -0.9141, -0.8204, -0.6407, -0.3438, -0.1251,
      0.0, 0.1249, 0.3436, 0.6405, 0.8202, 0.9140, 0.9589, 0.9804, 0.9901, 0.9953, 0.9976},
    '{-1.0, -0.996, -0.9954, -0.99, -0.9805, -0.959, -0.9141, -0.7, -0.5, -0.3438, -0.1251,
      0.0, 0.2, 0.4, 0.7, 0.8, 0.914, 0.9589, 0.9804, 0.9901, 0.9953, 0.9976},
    '{-1.0, -0.9977, -0.9954, -0.9903, -0.9805, -0.9590, -0.9141, -0.8204, -0.6407, -0.3438, -0.1251,
      0.0, 0.1249, 0.3436, 0.6405, 0.8202, 0.9140, 0.9589, 0.9804, 0.9901, 0.9953, 0.9976}};
  localparam int SCHEME_F [NS][P] = '{
    '{32768, 16384, 8192, 4096, 2048, 1024, 512, 256, 128, 64, 32,
      32, 64, 128, 256, 512, 1024, 2048, 4096, 8192, 16384, 32768},
    '{4096, 4096, 4096, 1024, 1024, 128, 128, 128, 32, 32, 32,
      32, 32, 256, 256, 1024, 1024, 8192, 8192, 512, 512, 16384},
    '{1024, 1024, 4096, 1024, 1024, 128, 128, 128, 32, 32, 32,
      128, 128, 256, 256, 1024, 1024, 8192, 8192, 512, 512, 16384},
    '{128, 128, 128, 128, 128, 128, 128, 128, 128, 128, 128,
      128, 128, 128, 128, 128, 128, 128, 128, 128, 128, 128}};

  typedef struct {
    nus_cfg_t cfg   [1:P];
    int       pil   [1:P];
    int       csl   [1:P];
    int       pitch [1:P];
    int       smn   [1:P];
    int       qmr   [1:P];
    int       total;
  } scheme_t;

  function automatic int trunc_to(int v, int p);
    return (v < 0) ? -((-v) / p) * p : (v / p) * p;
  endfunction

  function automatic int log2i(int f);
    int l = 0;
    while ((1 << l) < f) l++;
    return l;
  endfunction

  function automatic scheme_t make_scheme(int s);
    scheme_t sc;
    int xu [1:P+1];
    int smn;
    for (int n = 1; n <= P; n++) begin
      real a;
      a = SCHEME_X[s][n-1];
      xu[n] = (a < 0.0) ? -int'($floor(-a * 16384.0 + 1.0e-9)) : int'($floor(a * 16384.0 + 1.0e-9));
      sc.pitch[n] = 32768 / SCHEME_F[s][n-1];
    end
    xu[P+1] = 16383;
    smn = 0;
    for (int n = 1; n <= P; n++) begin
      int nxt, lf;
      nxt = (n < P) ? sc.pitch[n+1] : sc.pitch[n];
      sc.pil[n] = (n == 1) ? trunc_to(xu[1], sc.pitch[1])
                           : trunc_to(trunc_to(xu[n], sc.pitch[n-1]), sc.pitch[n]);
      sc.csl[n] = trunc_to(trunc_to(xu[n+1], sc.pitch[n]), nxt) - 1;
      sc.qmr[n] = (sc.csl[n] - sc.pil[n] + 1) / sc.pitch[n];
      if (sc.qmr[n] < 0) sc.qmr[n] = 0;
      sc.smn[n] = smn;
      smn += sc.qmr[n];
      lf = log2i(SCHEME_F[s][n-1]);
      sc.cfg[n] = make_cfg(X_W'(sc.csl[n]), lf,
                           LOG_W'(sc.smn[n] - (SCHEME_F[s][n-1] / 2 + sc.pil[n] / sc.pitch[n])));
    end
    sc.total = smn;
    return sc;
  endfunction

  // Partition of an input (units of 2^-14): lowest n with x <= CSL_n, else P.
  function automatic int part_of(scheme_t sc, int x);
    for (int n = 1; n <= P; n++) if (x <= sc.csl[n]) return n;
    return P;
  endfunction

  // Floor division for a positive divisor.
  function automatic int fdiv(int a, int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  // Expected RAM address (mod DEPTH) and residual (units of 2^-14) of an input.
  function automatic void addr_diff(scheme_t sc, int x, output int addr, output int diff);
    int n, k;
    n = part_of(sc, x);
    k = fdiv(x - sc.pil[n], sc.pitch[n]);
    addr = (sc.smn[n] + k) & (DEPTH - 1);
    diff = x - (sc.pil[n] + k * sc.pitch[n]);
    if (sc.pitch[n] == 1) diff = 0;
  endfunction

  // ---- test functions ----
  // erf: power series below 2.5, continued fraction for erfc above.
  function automatic real erf_r(real z);
    real term, sum, t, az;
    az = (z < 0.0) ? -z : z;
    if (az < 2.5) begin
      sum = 0.0;
      term = az;                      // az^(2k+1) (-1)^k / k!
      for (int k = 0; k < 120; k++) begin
        sum += term / real'(2 * k + 1);
        term = -term * az * az / real'(k + 1);
      end
      sum = sum * 2.0 / $sqrt(3.14159265358979323846);
    end else begin
      t = az;
      for (int k = 80; k >= 1; k--) t = az + (real'(k) / 2.0) / t;
      sum = 1.0 - $exp(-az * az) / ($sqrt(3.14159265358979323846) * t);
    end
    return (z < 0.0) ? -sum : sum;
  endfunction

  // erfinv by Newton iteration from 0 (erf is concave for z > 0, so it approaches from below).
  function automatic real erfinv(real y);
    real z, e, ay;
    ay = (y < 0.0) ? -y : y;
    z = 0.0;
    for (int i = 0; i < 200; i++) begin
      e = erf_r(z) - ay;
      if (e < 1.0e-16 && e > -1.0e-16) break;
      z = z - e / (2.0 / $sqrt(3.14159265358979323846) * $exp(-z * z));
    end
    return (y < 0.0) ? -z : z;
  endfunction

  // g1..g8 as numbered in the source: index f = 1..8.
  // g1, g2 and g3 have poles at x = -1 and x = +1; there they are evaluated at -1 + 2^-15 and
  // 1 - 2^-15 instead, so that every stored word is finite.
  function automatic real gfun(int f, real x);
    if (f <= 3) begin
      if (x < -1.0 + 1.0 / 32768.0) x = -1.0 + 1.0 / 32768.0;
      if (x > 1.0 - 1.0 / 32768.0) x = 1.0 - 1.0 / 32768.0;
    end
    case (f)
      1: return $sqrt(2.0) * SIGMA * erfinv(x);
      2: return 3.0 + $sqrt(2.0) * SIGMA * erfinv(x);
      3: return -1.0 / (x * x - 1.0);
      4: return $exp(x);
      5: return x * x * x;
      6: return x * x;
      7: return -x * x - 2.0 * x - 2.0;
      default: return x * x - 6.0 * x - 25.0;
    endcase
  endfunction

  function automatic longint sat32(real v);
    if (v > 2147483647.0) return 64'sd2147483647;
    if (v < -2147483648.0) return -64'sd2147483648;
    return longint'(v);
  endfunction

  // Memory image: ordinate and slope of every word (0 where no partition uses the word).
  typedef int mem_t [DEPTH];
  function automatic void make_image(scheme_t sc, int f, output mem_t ord, output mem_t der);
    real scale;
    scale = real'(longint'(1) << frac_of(f));
    for (int a = 0; a < DEPTH; a++) begin
      ord[a] = 0;
      der[a] = 0;
    end
    // Partition n fills words SMN_n .. SMN_n + ceil((CSL_n - PIL_n + 1) / pitch_n) - 1. When a
    // partition's length is not a multiple of its pitch, its last word is the next partition's
    // first one and is overwritten by it. The last partition is extended to the top input code
    // 1 - 2^-14, which lies above CSL_22 and is given to partition 22 by the selector.
    for (int n = 1; n <= P; n++) begin
      int words;
      if (n < P) words = (sc.csl[n] - sc.pil[n] + sc.pitch[n]) / sc.pitch[n];
      else       words = (16383 - sc.pil[n] + sc.pitch[n]) / sc.pitch[n];
      for (int m = 0; m < words; m++) begin
        int  xi, a;
        real x0, x1, g0, g1;
        xi = sc.pil[n] + m * sc.pitch[n];
        a  = sc.smn[n] + m;
        x0 = real'(xi) / 16384.0;
        x1 = real'(xi + sc.pitch[n]) / 16384.0;
        g0 = gfun(f, x0);
        g1 = gfun(f, x1);
        if (a < DEPTH) begin
          ord[a] = int'(sat32(g0 * scale));
          der[a] = int'(sat32((g1 - g0) / (x1 - x0) * scale));
        end
      end
    end
  endfunction

  // Bit-exact expected output (16 fraction bits) for input x.
  function automatic int expect_out(scheme_t sc, mem_t ord, mem_t der, int x);
    int     a, d;
    longint s;
    addr_diff(sc, x, a, d);
    s = (longint'(ord[a]) <<< 14) + longint'(der[a]) * longint'(d);
    s = s >>> 14;
    if (s > 64'sd2147483647) s = 64'sd2147483647;
    if (s < -64'sd2147483648) s = -64'sd2147483648;
    return int'(s);
  endfunction

endpackage
