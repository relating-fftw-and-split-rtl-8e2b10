// fft_dif_sr_tb: self-checking test of the combinational split-radix FFT for
// every size from 4 to 128 in both complex-multiplication styles.
//  - Numerics: each instance transforms random full-scale vectors and corner
//    cases (impulse, all-maximum, all-minimum, alternating signs, one complex
//    exponential), and every output bin is compared with a direct double-
//    precision DFT. The tolerance is a fixed-point error budget per stage
//    (log2(N) stages): TOL_PER_STAGE LSB of rounding plus the coefficient
//    quantization error, an eighth of a coefficient LSB (2^-17) times the sum of the
//    input magnitudes.
//  - Operation counts: the real multiplications and additions the recursion
//    instantiates (fft_pkg::fft_muls / fft_adds, driven by the same root
//    classification as the generate blocks) are compared with the reference
//    counts for sizes 4..256: FFTW-style multiplication must give
//    0/16 4/52 24/144 84/372 248/912 660/2164 1656/5008 and split-radix style
//    0/16 4/52 20/148 68/388 196/964 516/2308 1284/5380 (multiplies/adds).
module fft_dif_sr_tb;
  import fft_ref_pkg::*;
  import fft_pkg::*;
  localparam int DW = 16, TW = 16;
  localparam int NSIZE = 6;            // N = 4, 8, ..., 128
  localparam int NVEC = 40;
  localparam real TOL_PER_STAGE = 2.0;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int done = 0;
  real max_err [NSIZE][2];

  for (genvar s = 0; s < NSIZE; s++) begin : g_size
    for (genvar st = 0; st < 2; st++) begin : g_style
      localparam int N = 4 << s;
      localparam int LOGN = s + 2;
      localparam int W = DW + LOGN + 1;
      localparam cmul_style_e STYLE = (st == 0) ? CMUL_4M2A : CMUL_3M3A;

      logic signed [W-1:0] x_re [N], x_im [N], y_re [N], y_im [N];

      fft_dif_sr #(.N(N), .W(W), .TW(TW), .STYLE(STYLE)) u_dut (
        .x_re, .x_im, .y_re, .y_im);

      initial begin
        real xr[], xi[], yr[], yi[];
        int maxv, minv;
        real l1, tol;
        maxv = (1 << (DW - 1)) - 1;
        minv = -(1 << (DW - 1));
        max_err[s][st] = 0.0;
        xr = new[N];
        xi = new[N];
        for (int v = 0; v < NVEC; v++) begin
          for (int j = 0; j < N; j++) begin
            int a, b;
            case (v)
              0: begin a = (j == 0) ? maxv : 0; b = 0; end            // impulse
              1: begin a = maxv; b = maxv; end                         // all max
              2: begin a = minv; b = minv; end                         // all min
              3: begin a = (j % 2 == 0) ? maxv : minv; b = -a - 1; end // alternating
              4: begin                                                 // exponential, bin 1
                a = int'(20000.0 * root_re(j, N));
                b = int'(20000.0 * root_im(N - j, N));
              end
              default: begin
                a = $signed($urandom) >>> (32 - DW);
                b = $signed($urandom) >>> (32 - DW);
              end
            endcase
            x_re[j] = W'(a);
            x_im[j] = W'(b);
            xr[j] = a;
            xi[j] = b;
          end
          @(posedge clk);
          dft(N, xr, xi, yr, yi);
          l1 = 0.0;
          for (int j = 0; j < N; j++) l1 += fabs(xr[j]) + fabs(xi[j]);
          tol = LOGN * (TOL_PER_STAGE + l1 * 2.0 ** (-(TW + 1)));
          for (int k = 0; k < N; k++) begin
            real e;
            e = fabs(y_re[k] - yr[k]);
            if (fabs(y_im[k] - yi[k]) > e) e = fabs(y_im[k] - yi[k]);
            if (e > max_err[s][st]) max_err[s][st] = e;
            checks++;
            if (e > tol) begin
              failures++;
              if (failures < 10)
                $display("FAIL N=%0d style=%0d vec=%0d bin=%0d got (%0d,%0d) exp (%f,%f)",
                         N, st, v, k, y_re[k], y_im[k], yr[k], yi[k]);
            end
          end
        end
        done++;
      end
    end
  end

  initial begin
    int exp_m4 [7] = '{0, 4, 24, 84, 248, 660, 1656};
    int exp_a4 [7] = '{16, 52, 144, 372, 912, 2164, 5008};
    int exp_m3 [7] = '{0, 4, 20, 68, 196, 516, 1284};
    int exp_a3 [7] = '{16, 52, 148, 388, 964, 2308, 5380};
    for (int i = 0; i < 7; i++) begin
      int n;
      n = 4 << i;
      checks += 4;
      if (fft_muls(n, CMUL_4M2A) != exp_m4[i] || fft_adds(n, CMUL_4M2A) != exp_a4[i]) begin
        failures++;
        $display("FAIL op count N=%0d eq(2): %0d/%0d", n, fft_muls(n, CMUL_4M2A), fft_adds(n, CMUL_4M2A));
      end
      if (fft_muls(n, CMUL_3M3A) != exp_m3[i] || fft_adds(n, CMUL_3M3A) != exp_a3[i]) begin
        failures++;
        $display("FAIL op count N=%0d eq(3): %0d/%0d", n, fft_muls(n, CMUL_3M3A), fft_adds(n, CMUL_3M3A));
      end
      $display("N=%0d: eq(2) %0d/%0d  eq(3) %0d/%0d", n, fft_muls(n, CMUL_4M2A),
               fft_adds(n, CMUL_4M2A), fft_muls(n, CMUL_3M3A), fft_adds(n, CMUL_3M3A));
    end
    wait (done == 2 * NSIZE);
    for (int s = 0; s < NSIZE; s++)
      $display("N=%0d max error: eq(2) %f LSB, eq(3) %f LSB", 4 << s, max_err[s][0], max_err[s][1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
