// fft_pkg: shared types and elaboration-time functions for the split-radix
// decimation-in-frequency FFT circuits.
//
// The twiddle factors of the transform are roots of unity w_N^k = e^{-i 2 pi k / N}.
// They are known when the circuit is built, so each one is identified by the exact
// pair (k, N) and classified here into three kinds:
//   TW_TRIVIAL  +1, -1, +i, -i: a swap and/or sign change, no arithmetic,
//   TW_W8       odd powers of w_8: both parts have magnitude sqrt(2)/2, so the
//               product takes two additions and two multiplications,
//   TW_GENERAL  anything else: a full complex multiplication, done either with
//               4 multiplications and 2 additions (CMUL_4M2A, the FFTW-matching
//               choice) or 3 multiplications and 3 additions (CMUL_3M3A, the
//               split-radix-matching choice, two further additions done here).
// The same classification drives the generate blocks of the circuit and the
// operation-count functions below, which give the number of real multipliers and
// real adders/subtractors an N-point transform instantiates.
//
// Fixed-point convention (this design's choice): a coefficient is a signed
// integer scaled by 2^FRAC with FRAC = TW - 2, so that values up to sqrt(2)
// (needed for b+a and b-a) fit into TW bits.
package fft_pkg;

  typedef enum logic [0:0] {
    CMUL_4M2A = 1'b0,   // (a+ib)(c+id) = (ac-bd) + i(ad+bc)
    CMUL_3M3A = 1'b1    // t1=a(c+d), t2=d(b+a), t3=c(b-a); (t1-t2) + i(t1+t3)
  } cmul_style_e;

  typedef enum logic [1:0] {
    TW_TRIVIAL = 2'd0,
    TW_W8      = 2'd1,
    TW_GENERAL = 2'd2
  } tw_kind_e;

  localparam real PI = 3.14159265358979323846;

  // Kind of w_n^k (n a power of two, n >= 1).
  function automatic tw_kind_e tw_kind(int k, int n);
    int kk;
    kk = k % n;
    if (n < 4 || (kk % (n / 4)) == 0) return TW_TRIVIAL;
    if (n >= 8 && (kk % (n / 8)) == 0) return TW_W8;
    return TW_GENERAL;
  endfunction

  // Index 0..3 of a trivial root: 0 -> +1, 1 -> -i, 2 -> -1, 3 -> +i.
  function automatic int tw_quadrant(int k, int n);
    if (n < 4) return ((k % n) == 0) ? 0 : 2;
    return (k % n) / (n / 4);
  endfunction

  // Odd octant 1,3,5,7 of a w_8-type root.
  function automatic int tw_octant(int k, int n);
    return (k % n) / (n / 8);
  endfunction

  function automatic int quantize(real v, int frac);
    real s;
    s = v * (2.0 ** frac);
    return (s >= 0.0) ? int'($floor(s + 0.5)) : -int'($floor(-s + 0.5));
  endfunction

  // Real part a and imaginary part b of w_n^k, and the generation-time sums
  // b+a and b-a used by CMUL_3M3A, all scaled by 2^frac.
  function automatic int tw_re(int k, int n, int frac);
    return quantize($cos(2.0 * PI * k / n), frac);
  endfunction
  function automatic int tw_im(int k, int n, int frac);
    return quantize(-$sin(2.0 * PI * k / n), frac);
  endfunction
  function automatic int tw_bpa(int k, int n, int frac);
    return quantize(-$sin(2.0 * PI * k / n) + $cos(2.0 * PI * k / n), frac);
  endfunction
  function automatic int tw_bma(int k, int n, int frac);
    return quantize(-$sin(2.0 * PI * k / n) - $cos(2.0 * PI * k / n), frac);
  endfunction

  // Real multiplications / additions of one twiddle multiplication.
  function automatic int tw_muls(int k, int n, cmul_style_e style);
    case (tw_kind(k, n))
      TW_TRIVIAL: return 0;
      TW_W8:      return 2;
      default:    return (style == CMUL_4M2A) ? 4 : 3;
    endcase
  endfunction
  function automatic int tw_adds(int k, int n, cmul_style_e style);
    case (tw_kind(k, n))
      TW_TRIVIAL: return 0;
      TW_W8:      return 2;
      default:    return (style == CMUL_4M2A) ? 2 : 3;
    endcase
  endfunction

  // Operation counts of the split-radix DiF recursion built by fft_dif_sr:
  //   N = 1: nothing;  N = 2: one complex butterfly (4 real additions);
  //   N >= 4: N complex add/sub (x_j +- x_{j+N/2}), N/2 complex add/sub for
  //   (d_j -+ i d_{j+N/4}), twiddles w_N^j and w_N^3j for j < N/4, then one
  //   N/2-point and two N/4-point transforms.
  function automatic int fft_muls(int n, cmul_style_e style);
    int m;
    if (n <= 2) return 0;
    m = 0;
    for (int j = 0; j < n / 4; j++)
      m += tw_muls(j, n, style) + tw_muls(3 * j, n, style);
    return m + fft_muls(n / 2, style) + 2 * fft_muls(n / 4, style);
  endfunction
  function automatic int fft_adds(int n, cmul_style_e style);
    int a;
    if (n <= 1) return 0;
    if (n == 2) return 4;
    a = 2 * n + n;
    for (int j = 0; j < n / 4; j++)
      a += tw_adds(j, n, style) + tw_adds(3 * j, n, style);
    return a + fft_adds(n / 2, style) + 2 * fft_adds(n / 4, style);
  endfunction

  // Number of twiddle multipliers of each kind in an n-point transform
  // (trivial ones included; they cost nothing but are still routed).
  function automatic int fft_tw_count(int n, tw_kind_e kind);
    int c;
    if (n <= 2) return 0;
    c = 0;
    for (int j = 0; j < n / 4; j++) begin
      if (tw_kind(j, n) == kind) c++;
      if (tw_kind(3 * j, n) == kind) c++;
    end
    return c + fft_tw_count(n / 2, kind) + 2 * fft_tw_count(n / 4, kind);
  endfunction

endpackage
