// twiddle_mul: multiply a complex sample by the root of unity w_N^K =
// e^{-i 2 pi K / N}, where N and K are fixed when the circuit is built.
// The root is classified exactly from (K, N) (fft_pkg::tw_kind):
//   +1, -i, -1, +i   swap and/or sign change only, no multiplier,
//   odd power of w_8 cmul_w8 (2 multiplications, 2 additions),
//   other            cmul_4m2a (STYLE = CMUL_4M2A, equation (2)) or
//                    cmul_3m3a (STYLE = CMUL_3M3A, equation (3)).
// Interface: signed W-bit complex in and out; coefficients TW bits.
// Timing: purely combinational.
module twiddle_mul
  import fft_pkg::*;
#(
  parameter int          N     = 16,
  parameter int          K     = 1,
  parameter int          W     = 25,
  parameter int          TW    = 16,
  parameter cmul_style_e STYLE = CMUL_4M2A
) (
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  localparam int       FRAC = TW - 2;
  localparam tw_kind_e KIND = tw_kind(K, N);

  if (KIND == TW_TRIVIAL) begin : g_trivial
    localparam int Q = tw_quadrant(K, N);
    always_comb begin
      case (Q)
        0:       begin out_re =  in_re; out_im =  in_im; end  // * 1
        1:       begin out_re =  in_im; out_im = -in_re; end  // * -i
        2:       begin out_re = -in_re; out_im = -in_im; end  // * -1
        default: begin out_re = -in_im; out_im =  in_re; end  // * i
      endcase
    end
  end else if (KIND == TW_W8) begin : g_w8
    cmul_w8 #(.W(W), .TW(TW), .OCT(tw_octant(K, N))) u_mul (
      .in_re, .in_im, .out_re, .out_im);
  end else if (STYLE == CMUL_4M2A) begin : g_4m2a
    cmul_4m2a #(.W(W), .TW(TW), .A(tw_re(K, N, FRAC)), .B(tw_im(K, N, FRAC))) u_mul (
      .in_re, .in_im, .out_re, .out_im);
  end else begin : g_3m3a
    cmul_3m3a #(.W(W), .TW(TW), .A(tw_re(K, N, FRAC)),
                .BPA(tw_bpa(K, N, FRAC)), .BMA(tw_bma(K, N, FRAC))) u_mul (
      .in_re, .in_im, .out_re, .out_im);
  end
endmodule
