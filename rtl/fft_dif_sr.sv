// fft_dif_sr: combinational N-point complex forward FFT (N a power of two),
// natural order in and out: y_k = sum_j x_j w_N^{jk}, w_N = e^{-i 2 pi / N}.
//
// How it works. Decimation in frequency splits the outputs into even and odd:
//   y_{2k}   = FFT_{N/2}(x_j + x_{j+N/2})_k
//   y_{2k+1} = FFT_{N/2}((x_j - x_{j+N/2}) w_N^j)_k.
// Instead of multiplying each odd-half value by w_N^j at once, the twiddle is
// carried into the next stage, where the odd half is again split and each sum
// has the form w_1 c +- w_2 d with w_2 / w_1 = -i. Rewriting it as
// w_1 (c +- (w_2/w_1) d) turns the second multiplication into a swap and one
// complex multiplication by a root is left per value. Unrolled, this is the
// split-radix recursion that this module builds:
//   d_j = x_j - x_{j+N/2},  e_j = x_{j+N/4} - x_{j+3N/4}       (j < N/4)
//   y_{2k}   = FFT_{N/2}(x_j + x_{j+N/2})_k                     (j < N/2)
//   y_{4k+1} = FFT_{N/4}((d_j - i e_j) w_N^j)_k
//   y_{4k+3} = FFT_{N/4}((d_j + i e_j) w_N^{3j})_k
// Every root is known exactly as (k, N), so multiplications by +-1 and +-i
// vanish and odd powers of w_8 cost two multiplications (twiddle_mul). With
// STYLE = CMUL_4M2A the circuit has as many real operations as FFTW's codelets
// (e.g. 24 multiplications and 144 additions for N = 16); with CMUL_3M3A as many
// as the split-radix algorithm (20 and 148). fft_pkg::fft_muls/fft_adds give
// the counts for any N.
//
// Interface: x_re/x_im and y_re/y_im are arrays of N signed W-bit values. No
// scaling is done inside; the caller provides log2(N)+1 bits of headroom above
// the input width (fft_top does). Timing: purely combinational.
//
// Lint note: the module instantiates itself, with the size halved or
// quartered, until N = 2 or N = 1. When Verilator lints this module alone as
// the top, it also checks the not-yet-specialised copy of the recursive
// instances and reports the sub-transform nets (s_*, a_*, b_*, ye_*, y1_*,
// y3_*) as unused or undriven. The warning stands because it is not a circuit
// fault: linted or simulated inside a parent (fft_top, the testbenches) the
// recursion is fully expanded, every net is driven and the lint is clean.
module fft_dif_sr
  import fft_pkg::*;
#(
  parameter int          N     = 256,
  parameter int          W     = 25,
  parameter int          TW    = 16,
  parameter cmul_style_e STYLE = CMUL_4M2A
) (
  input  logic signed [W-1:0] x_re [N],
  input  logic signed [W-1:0] x_im [N],
  output logic signed [W-1:0] y_re [N],
  output logic signed [W-1:0] y_im [N]
);
  if (N == 1) begin : g_n1
    assign y_re[0] = x_re[0];
    assign y_im[0] = x_im[0];
  end else if (N == 2) begin : g_n2
    always_comb begin
      y_re[0] = x_re[0] + x_re[1];
      y_im[0] = x_im[0] + x_im[1];
      y_re[1] = x_re[0] - x_re[1];
      y_im[1] = x_im[0] - x_im[1];
    end
  end else begin : g_split
    localparam int H = N / 2;
    localparam int Q = N / 4;

    logic signed [W-1:0] s_re [H], s_im [H];   // x_j + x_{j+N/2}
    logic signed [W-1:0] d_re [H], d_im [H];   // x_j - x_{j+N/2}
    logic signed [W-1:0] u_re [Q], u_im [Q];   // d_j - i e_j
    logic signed [W-1:0] v_re [Q], v_im [Q];   // d_j + i e_j
    logic signed [W-1:0] a_re [Q], a_im [Q];   // u_j w_N^j
    logic signed [W-1:0] b_re [Q], b_im [Q];   // v_j w_N^{3j}
    logic signed [W-1:0] ye_re [H], ye_im [H];
    logic signed [W-1:0] y1_re [Q], y1_im [Q];
    logic signed [W-1:0] y3_re [Q], y3_im [Q];

    always_comb begin
      for (int j = 0; j < H; j++) begin
        s_re[j] = x_re[j] + x_re[j+H];
        s_im[j] = x_im[j] + x_im[j+H];
        d_re[j] = x_re[j] - x_re[j+H];
        d_im[j] = x_im[j] - x_im[j+H];
      end
      // (dr + i di) -+ i (er + i ei) with e_j = d_{j+N/4}
      for (int j = 0; j < Q; j++) begin
        u_re[j] = d_re[j] + d_im[j+Q];
        u_im[j] = d_im[j] - d_re[j+Q];
        v_re[j] = d_re[j] - d_im[j+Q];
        v_im[j] = d_im[j] + d_re[j+Q];
      end
    end

    for (genvar j = 0; j < Q; j++) begin : g_tw
      twiddle_mul #(.N(N), .K(j), .W(W), .TW(TW), .STYLE(STYLE)) u_tw1 (
        .in_re(u_re[j]), .in_im(u_im[j]), .out_re(a_re[j]), .out_im(a_im[j]));
      twiddle_mul #(.N(N), .K(3 * j), .W(W), .TW(TW), .STYLE(STYLE)) u_tw3 (
        .in_re(v_re[j]), .in_im(v_im[j]), .out_re(b_re[j]), .out_im(b_im[j]));
    end

    fft_dif_sr #(.N(H), .W(W), .TW(TW), .STYLE(STYLE)) u_even (
      .x_re(s_re), .x_im(s_im), .y_re(ye_re), .y_im(ye_im));
    fft_dif_sr #(.N(Q), .W(W), .TW(TW), .STYLE(STYLE)) u_odd1 (
      .x_re(a_re), .x_im(a_im), .y_re(y1_re), .y_im(y1_im));
    fft_dif_sr #(.N(Q), .W(W), .TW(TW), .STYLE(STYLE)) u_odd3 (
      .x_re(b_re), .x_im(b_im), .y_re(y3_re), .y_im(y3_im));

    always_comb begin
      for (int k = 0; k < H; k++) begin
        y_re[2*k] = ye_re[k];
        y_im[2*k] = ye_im[k];
      end
      for (int k = 0; k < Q; k++) begin
        y_re[4*k+1] = y1_re[k];
        y_im[4*k+1] = y1_im[k];
        y_re[4*k+3] = y3_re[k];
        y_im[4*k+3] = y3_im[k];
      end
    end
  end

  initial assert (N >= 1 && (N & (N - 1)) == 0)
    else $error("fft_dif_sr: N must be a power of two");
endmodule
