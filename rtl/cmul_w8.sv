// cmul_w8: multiply a complex sample c + id by an odd power of the 8th root of
// unity, w_8^OCT = e^{-i pi OCT / 4}, OCT in {1, 3, 5, 7}. Both parts of such a
// root have magnitude s = sqrt(2)/2 (sin(pi/4) = cos(pi/4)), so the product
// needs only two additions, p = c + d and q = d - c, and two multiplications by
// +-s:
//   w_8^1: s( p, q)   w_8^3: s( q, -p)   w_8^5: s(-p, -q)   w_8^7: s(-q, p)
// where (x, y) means x + iy. The sign is folded into the constant.
//
// Interface: in_re/in_im = c/d, signed W-bit; out_re/out_im signed W-bit.
// s is quantized to TW bits scaled by 2^(TW-2); products are rounded to W bits
// (this design's number format). Timing: purely combinational.
module cmul_w8 #(
  parameter int W   = 25,
  parameter int TW  = 16,
  parameter int OCT = 1
) (
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  localparam int FRAC = TW - 2;
  localparam int PW   = W + TW + 2;
  localparam int S    = fft_pkg::quantize(0.70710678118654752440, FRAC);

  // Sign of the constant applied to each output and which sum feeds it.
  localparam bit RE_FROM_Q = (OCT == 3) || (OCT == 7);
  localparam int SIGN_RE   = (OCT == 5 || OCT == 7) ? -1 : 1;
  localparam int SIGN_IM   = (OCT == 3 || OCT == 5) ? -1 : 1;
  localparam logic signed [TW-1:0] C_RE = TW'(SIGN_RE * S);
  localparam logic signed [TW-1:0] C_IM = TW'(SIGN_IM * S);
  localparam logic signed [PW-1:0] HALF = PW'(1) <<< (FRAC - 1);

  logic signed [W:0]    p, q;            // the two additions
  logic signed [PW-1:0] m_re, m_im;      // the two multiplications

  always_comb begin
    p = (W+1)'(in_re) + (W+1)'(in_im);
    q = (W+1)'(in_im) - (W+1)'(in_re);
    m_re = PW'(RE_FROM_Q ? q : p) * PW'(C_RE);
    m_im = PW'(RE_FROM_Q ? p : q) * PW'(C_IM);
    out_re = W'((m_re + HALF) >>> FRAC);
    out_im = W'((m_im + HALF) >>> FRAC);
  end

  initial assert (OCT == 1 || OCT == 3 || OCT == 5 || OCT == 7)
    else $error("cmul_w8: OCT must be odd and below 8");
endmodule
