// fft_top_tb: end-to-end test of the clocked FFT at its default size
// (N = 256, 16-bit samples, FFTW-style complex multiplication).
// It resets the design, then sends random and corner-case vectors, some back to
// back (one per cycle) and some with idle cycles between them, and checks that
//  - out_valid rises exactly two cycles after in_valid and only then,
//  - every output bin matches a direct double-precision DFT within the
//    fixed-point error budget (per stage: 2 LSB of rounding plus an eighth of a
//    coefficient LSB times the sum of input magnitudes),
//  - the outputs hold their value while out_valid is low,
//  - a reset in the middle of traffic clears out_valid.
// It also counts how often each mechanism of the transform was used: twiddle
// multiplications that vanish (+-1, +-i), by odd powers of w_8, and general
// ones; back-to-back vectors; idle gaps; reset. A mechanism never used fails.
module fft_top_tb;
  import fft_ref_pkg::*;
  import fft_pkg::*;
  localparam int N = 256, DW = 16, TW = 16, LOGN = 8, OW = DW + LOGN + 1;
  localparam int NVEC = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                 rst_n, in_valid, out_valid;
  logic signed [DW-1:0] in_re [N], in_im [N];
  logic signed [OW-1:0] out_re [N], out_im [N];

  fft_top u_dut (.clk, .rst_n, .in_valid, .in_re, .in_im, .out_valid, .out_re, .out_im);

  // Expected results, queued in input order.
  real exp_re [$][], exp_im [$][], exp_tol [$];
  int  cycle = 0, sent_cycle [$];
  int  n_back_to_back = 0, n_gap = 0, n_reset = 0, n_checked_vec = 0;
  int  n_trivial = 0, n_w8 = 0, n_general = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic make_vector(int v);
    real xr[], xi[], yr[], yi[], l1;
    xr = new[N];
    xi = new[N];
    l1 = 0.0;
    for (int j = 0; j < N; j++) begin
      int a, b;
      case (v)
        0: begin a = 32767; b = 32767; end
        1: begin a = (j % 2 == 0) ? 32767 : -32768; b = -32768; end
        2: begin a = int'(30000.0 * root_re(3 * j, N)); b = int'(30000.0 * root_im(N - 3 * j, N)); end
        default: begin
          a = $signed($urandom) >>> (32 - DW);
          b = $signed($urandom) >>> (32 - DW);
        end
      endcase
      in_re[j] = DW'(a);
      in_im[j] = DW'(b);
      xr[j] = a;
      xi[j] = b;
      l1 += fabs(xr[j]) + fabs(xi[j]);
    end
    dft(N, xr, xi, yr, yi);
    exp_re.push_back(yr);
    exp_im.push_back(yi);
    exp_tol.push_back(LOGN * (2.0 + l1 * 2.0 ** (-(TW + 1))));
    sent_cycle.push_back(cycle);
  endtask

  // Output checker.
  logic signed [OW-1:0] held_re [N];
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real yr[], yi[], tol, worst;
      int  sc;
      checks++;
      if (exp_re.size() == 0) begin
        failures++;
        $display("FAIL out_valid with no vector outstanding at cycle %0d", cycle);
      end else begin
        yr = exp_re.pop_front();
        yi = exp_im.pop_front();
        tol = exp_tol.pop_front();
        sc = sent_cycle.pop_front();
        if (cycle - sc != 2) begin
          failures++;
          $display("FAIL latency %0d cycles, expected 2", cycle - sc);
        end
        worst = 0.0;
        for (int k = 0; k < N; k++) begin
          real e;
          e = fabs(out_re[k] - yr[k]);
          if (fabs(out_im[k] - yi[k]) > e) e = fabs(out_im[k] - yi[k]);
          if (e > worst) worst = e;
          checks++;
          if (e > tol) begin
            failures++;
            if (failures < 10)
              $display("FAIL bin %0d got (%0d,%0d) exp (%f,%f) tol %f", k, out_re[k], out_im[k],
                       yr[k], yi[k], tol);
          end
        end
        n_checked_vec++;
        $display("vector %0d: worst bin error %f LSB (budget %f)", n_checked_vec, worst, tol);
        n_trivial += fft_tw_count(N, TW_TRIVIAL);
        n_w8      += fft_tw_count(N, TW_W8);
        n_general += fft_tw_count(N, TW_GENERAL);
      end
    end
    held_re <= out_re;
    if (rst_n && !out_valid && cycle > 3) begin
      checks++;
      if (out_re != held_re) begin
        failures++;
        $display("FAIL output changed while out_valid low at cycle %0d", cycle);
      end
    end
  end

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    for (int j = 0; j < N; j++) begin
      in_re[j] = '0;
      in_im[j] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL out_valid high after reset");
    end
    for (int v = 0; v < NVEC; v++) begin
      @(negedge clk);
      make_vector(v);
      in_valid = 1'b1;
      if (v % 4 == 3) begin
        @(negedge clk);
        in_valid = 1'b0;
        repeat (2) @(negedge clk);
        n_gap++;
      end else if (v > 0) begin
        n_back_to_back++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    // reset with one vector in flight: it must be dropped
    make_vector(NVEC);
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    rst_n = 1'b0;
    void'(exp_re.pop_back());
    void'(exp_im.pop_back());
    void'(exp_tol.pop_back());
    void'(sent_cycle.pop_back());
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL out_valid high during reset");
    end
    rst_n = 1'b1;
    n_reset++;
    repeat (4) @(negedge clk);
    checks++;
    if (n_checked_vec != NVEC || exp_re.size() != 0) begin
      failures++;
      $display("FAIL %0d of %0d vectors came out", n_checked_vec, NVEC);
    end
    $display("mechanisms: %0d trivial, %0d w8-type, %0d general twiddle products; %0d back-to-back, %0d gaps, %0d resets",
             n_trivial, n_w8, n_general, n_back_to_back, n_gap, n_reset);
    checks++;
    if (n_trivial == 0 || n_w8 == 0 || n_general == 0 || n_back_to_back == 0 || n_gap == 0 ||
        n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
