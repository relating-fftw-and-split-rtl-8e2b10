// cmul_3m3a: multiply a complex sample c + id by a complex constant a + ib known
// when the circuit is built, with three real multiplications and three real
// additions at run time:
//   t1 = a(c + d),  t2 = d(b + a),  t3 = c(b - a),
//   (a + ib)(c + id) = (t1 - t2) + i(t1 + t3).
// b + a and b - a depend only on the constant and are formed when the circuit
// is built (parameters BPA and BMA), so only c + d, t1 - t2 and t1 + t3 remain.
// This is the complex multiplication that makes the FFT's operation count equal
// to split-radix's.
//
// Interface: in_re/in_im = c/d, signed W-bit; out_re/out_im signed W-bit.
// A, BPA = b+a and BMA = b-a are signed integers scaled by 2^(TW-2), which
// holds magnitudes up to sqrt(2). c + d is kept one bit wider. Each result is
// formed at full precision and rounded once to W bits; the number format and
// the rounding are this design's choices.
// Timing: purely combinational.
module cmul_3m3a #(
  parameter int W   = 25,
  parameter int TW  = 16,
  parameter int A   = 11585,
  parameter int BPA = 0,
  parameter int BMA = -23170
) (
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  localparam int FRAC = TW - 2;
  localparam int PW   = W + TW + 2;

  localparam logic signed [TW-1:0] CA   = TW'(A);
  localparam logic signed [TW-1:0] CBPA = TW'(BPA);
  localparam logic signed [TW-1:0] CBMA = TW'(BMA);
  localparam logic signed [PW-1:0] HALF = PW'(1) <<< (FRAC - 1);

  logic signed [W:0]    c_plus_d;          // run-time addition 1
  logic signed [PW-1:0] t1, t2, t3;        // the three multiplications
  logic signed [PW-1:0] sum_re, sum_im;    // run-time additions 2 and 3

  always_comb begin
    c_plus_d = (W+1)'(in_re) + (W+1)'(in_im);
    t1 = PW'(c_plus_d) * PW'(CA);
    t2 = PW'(in_im) * PW'(CBPA);
    t3 = PW'(in_re) * PW'(CBMA);
    sum_re = t1 - t2;
    sum_im = t1 + t3;
    out_re = W'((sum_re + HALF) >>> FRAC);
    out_im = W'((sum_im + HALF) >>> FRAC);
  end
endmodule
