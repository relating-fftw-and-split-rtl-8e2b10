// fft_top: clocked N-point complex forward FFT.
//
// A whole vector of N complex samples is taken in one cycle, transformed by the
// combinational split-radix decimation-in-frequency circuit fft_dif_sr and
// presented, in natural order and unscaled, two cycles later. One transform can
// start every cycle. STYLE chooses the complex multiplication used for general
// twiddles: CMUL_4M2A (4 multiplications, 2 additions; operation count equal to
// FFTW's) or CMUL_3M3A (3 and 3; equal to split-radix's).
//
// Interface: in_valid with in_re/in_im (N signed DW-bit samples); out_valid with
// out_re/out_im (N signed OW-bit bins, OW = DW + log2(N) + 1, which holds the
// largest possible bin without overflow). rst_n is asynchronous, active low,
// and clears the valid bits and the data registers.
// Timing: cycle 0 in_valid -> registered inputs -> combinational transform ->
// cycle 2 out_valid. The input and output registers and the valid bit are this
// design's choice; the transform itself is combinational.
module fft_top
  import fft_pkg::*;
#(
  parameter int          N     = 256,
  parameter int          DW    = 16,
  parameter int          TW    = 16,
  parameter cmul_style_e STYLE = CMUL_4M2A,
  localparam int         OW    = DW + $clog2(N) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re [N],
  input  logic signed [DW-1:0] in_im [N],
  output logic                 out_valid,
  output logic signed [OW-1:0] out_re [N],
  output logic signed [OW-1:0] out_im [N]
);
  logic                 x_valid;
  logic signed [OW-1:0] x_re [N], x_im [N];
  logic signed [OW-1:0] y_re [N], y_im [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_valid   <= 1'b0;
      out_valid <= 1'b0;
      for (int i = 0; i < N; i++) begin
        x_re[i]   <= '0;
        x_im[i]   <= '0;
        out_re[i] <= '0;
        out_im[i] <= '0;
      end
    end else begin
      x_valid   <= in_valid;
      out_valid <= x_valid;
      if (in_valid) begin
        for (int i = 0; i < N; i++) begin
          x_re[i] <= OW'(in_re[i]);
          x_im[i] <= OW'(in_im[i]);
        end
      end
      if (x_valid) begin
        out_re <= y_re;
        out_im <= y_im;
      end
    end
  end

  fft_dif_sr #(.N(N), .W(OW), .TW(TW), .STYLE(STYLE)) u_fft (
    .x_re, .x_im, .y_re, .y_im);
endmodule
