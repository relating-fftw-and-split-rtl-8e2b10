// cmul_4m2a_tb: self-checking test of the 4-multiplication complex multiplier.
// Instances for every general root w_32^K (K not a multiple of 4) are driven
// with random and extreme samples. Each result is checked twice:
//  - exactly, against (a c - b d, a d + b c) computed in 64-bit integers from
//    the quantized constant, rounded half up;
//  - against the product with the exact root in double precision, within
//    1 LSB plus the constant's quantization error.
module cmul_4m2a_tb;
  import fft_ref_pkg::*;
  localparam int W = 25, TW = 16, FRAC = TW - 2, N = 32;
  localparam int NK = 24;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  function automatic int kof(int i);   // i-th K in 1..31 that is not 0 mod 4
    return i + i / 3 + 1;
  endfunction

  logic signed [W-1:0] in_re [NK], in_im [NK], out_re [NK], out_im [NK];

  for (genvar i = 0; i < NK; i++) begin : g_dut
    cmul_4m2a #(.W(W), .TW(TW),
                .A(fft_pkg::tw_re(kof(i), N, FRAC)),
                .B(fft_pkg::tw_im(kof(i), N, FRAC))) u_dut (
      .in_re(in_re[i]), .in_im(in_im[i]), .out_re(out_re[i]), .out_im(out_im[i]));
  end

  function automatic longint rnd(longint v);
    return (v + (64'sd1 <<< (FRAC - 1))) >>> FRAC;
  endfunction

  task automatic check_all();
    for (int i = 0; i < NK; i++) begin
      longint a, b, c, d, er, ei;
      real xr, xi;
      a = longint'(fft_pkg::tw_re(kof(i), N, FRAC));
      b = longint'(fft_pkg::tw_im(kof(i), N, FRAC));
      c = longint'(in_re[i]);
      d = longint'(in_im[i]);
      er = rnd(a * c - b * d);
      ei = rnd(a * d + b * c);
      checks++;
      if (longint'(out_re[i]) != er || longint'(out_im[i]) != ei) begin
        failures++;
        if (failures < 10) $display("FAIL exact K=%0d in=(%0d,%0d) got (%0d,%0d) exp (%0d,%0d)",
                 kof(i), c, d, out_re[i], out_im[i], er, ei);
      end
      xr = c * root_re(kof(i), N) - d * root_im(kof(i), N);
      xi = c * root_im(kof(i), N) + d * root_re(kof(i), N);
      checks++;
      if (fabs(out_re[i] - xr) > 1.0 + (fabs(c) + fabs(d)) * 2.0 ** (-FRAC) ||
          fabs(out_im[i] - xi) > 1.0 + (fabs(c) + fabs(d)) * 2.0 ** (-FRAC)) begin
        failures++;
        if (failures < 10) $display("FAIL real K=%0d got (%0d,%0d) exp (%f,%f)", kof(i), out_re[i], out_im[i], xr, xi);
      end
    end
  endtask

  initial begin
    repeat (2000) begin
      for (int i = 0; i < NK; i++) begin
        in_re[i] = W'($signed($urandom) >>> (32 - W + 1));
        in_im[i] = W'($signed($urandom) >>> (32 - W + 1));
      end
      @(posedge clk);
      check_all();
    end
    // extremes of the range the FFT uses (one bit of headroom)
    for (int s = 0; s < 4; s++) begin
      for (int i = 0; i < NK; i++) begin
        in_re[i] = (s[0]) ? -(W'(1) <<< (W - 2)) : (W'(1) <<< (W - 2)) - 1;
        in_im[i] = (s[1]) ? -(W'(1) <<< (W - 2)) : (W'(1) <<< (W - 2)) - 1;
      end
      @(posedge clk);
      check_all();
    end
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
