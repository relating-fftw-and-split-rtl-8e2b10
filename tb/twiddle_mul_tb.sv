// twiddle_mul_tb: self-checking test of the root-of-unity multiplier.
// Every root w_16^K, K = 0..15, is instantiated in both complex-multiplication
// styles, so all four trivial roots, all four odd powers of w_8 and all eight
// general roots occur. Results are compared with the product by the exact root
// in double precision; trivial roots must give the exact swap/negation.
// The testbench also checks that the elaboration-time classification picks the
// expected kind for each K.
module twiddle_mul_tb;
  import fft_ref_pkg::*;
  import fft_pkg::*;
  localparam int W = 25, TW = 16, FRAC = TW - 2, N = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_trivial = 0, n_w8 = 0, n_general = 0;

  logic signed [W-1:0] in_re [N], in_im [N];
  logic signed [W-1:0] o4_re [N], o4_im [N], o3_re [N], o3_im [N];

  for (genvar k = 0; k < N; k++) begin : g_dut
    twiddle_mul #(.N(N), .K(k), .W(W), .TW(TW), .STYLE(CMUL_4M2A)) u_4m2a (
      .in_re(in_re[k]), .in_im(in_im[k]), .out_re(o4_re[k]), .out_im(o4_im[k]));
    twiddle_mul #(.N(N), .K(k), .W(W), .TW(TW), .STYLE(CMUL_3M3A)) u_3m3a (
      .in_re(in_re[k]), .in_im(in_im[k]), .out_re(o3_re[k]), .out_im(o3_im[k]));
  end

  task automatic check_one(int k, logic signed [W-1:0] gr, logic signed [W-1:0] gi);
    real c, d, xr, xi, tol;
    c = in_re[k];
    d = in_im[k];
    xr = c * root_re(k, N) - d * root_im(k, N);
    xi = c * root_im(k, N) + d * root_re(k, N);
    tol = (k % 4 == 0) ? 0.0 : 1.0 + 2.0 * (fabs(c) + fabs(d)) * 2.0 ** (-FRAC);
    checks++;
    if (fabs(gr - xr) > tol + 1e-6 || fabs(gi - xi) > tol + 1e-6) begin
      failures++;
      if (failures < 10)
        $display("FAIL K=%0d in=(%0d,%0d) got (%0d,%0d) exp (%f,%f)", k, in_re[k], in_im[k],
                 gr, gi, xr, xi);
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin
      tw_kind_e exp_kind;
      exp_kind = (k % 4 == 0) ? TW_TRIVIAL : (k % 2 == 0) ? TW_W8 : TW_GENERAL;
      checks++;
      if (tw_kind(k, N) != exp_kind) begin
        failures++;
        $display("FAIL kind of w_16^%0d", k);
      end
      case (exp_kind)
        TW_TRIVIAL: n_trivial++;
        TW_W8:      n_w8++;
        default:    n_general++;
      endcase
    end
    repeat (3000) begin
      for (int k = 0; k < N; k++) begin
        in_re[k] = W'($signed($urandom) >>> (32 - W + 1));
        in_im[k] = W'($signed($urandom) >>> (32 - W + 1));
      end
      @(posedge clk);
      for (int k = 0; k < N; k++) begin
        check_one(k, o4_re[k], o4_im[k]);
        check_one(k, o3_re[k], o3_im[k]);
      end
    end
    $display("roots: %0d trivial, %0d w8-type, %0d general", n_trivial, n_w8, n_general);
    checks++;
    if (n_trivial != 4 || n_w8 != 4 || n_general != 8) failures++;
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
