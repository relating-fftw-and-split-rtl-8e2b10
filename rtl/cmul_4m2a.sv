// cmul_4m2a: multiply a complex sample by a complex constant known when the
// circuit is built, with four real multiplications and two real additions:
//   (a + ib)(c + id) = (ac - bd) + i(ad + bc).
// This is the complex multiplication that makes the FFT's operation count equal
// to FFTW's.
//
// Interface: in_re/in_im = c/d, signed W-bit; out_re/out_im signed W-bit.
// The constant a + ib is given by the signed integer parameters A and B, scaled
// by 2^(TW-2) (so 1.0 = 2^(TW-2)). Each pair of products is summed at full
// precision and rounded once to W bits (round half up, arithmetic shift); the
// number format and the rounding are this design's choices.
// Timing: purely combinational.
module cmul_4m2a #(
  parameter int W  = 25,
  parameter int TW = 16,
  parameter int A  = 11585,
  parameter int B  = -11585
) (
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  localparam int FRAC = TW - 2;
  localparam int PW   = W + TW + 1;

  localparam logic signed [TW-1:0] CA = TW'(A);
  localparam logic signed [TW-1:0] CB = TW'(B);
  localparam logic signed [PW-1:0] HALF = PW'(1) <<< (FRAC - 1);

  logic signed [PW-1:0] ac, bd, ad, bc;   // the four real multiplications
  logic signed [PW-1:0] sum_re, sum_im;   // the two real additions

  always_comb begin
    ac = PW'(in_re) * PW'(CA);
    bd = PW'(in_im) * PW'(CB);
    ad = PW'(in_im) * PW'(CA);
    bc = PW'(in_re) * PW'(CB);
    sum_re = ac - bd;
    sum_im = ad + bc;
    out_re = W'((sum_re + HALF) >>> FRAC);
    out_im = W'((sum_im + HALF) >>> FRAC);
  end
endmodule
