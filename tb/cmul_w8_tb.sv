// cmul_w8_tb: self-checking test of the multiplier by odd powers of w_8.
// One instance per power 1, 3, 5, 7, driven with random and extreme samples.
// Each result is checked exactly against (c + d, d - c) routed and scaled by
// +-11585 (sqrt(2)/2 at 14 fraction bits) in 64-bit integers, and against the
// product with the exact root in double precision.
module cmul_w8_tb;
  import fft_ref_pkg::*;
  localparam int W = 25, TW = 16, FRAC = TW - 2;
  localparam longint S = 64'sd11585;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [W-1:0] in_re [4], in_im [4], out_re [4], out_im [4];

  for (genvar i = 0; i < 4; i++) begin : g_dut
    cmul_w8 #(.W(W), .TW(TW), .OCT(2 * i + 1)) u_dut (
      .in_re(in_re[i]), .in_im(in_im[i]), .out_re(out_re[i]), .out_im(out_im[i]));
  end

  function automatic longint rnd(longint v);
    return (v + (64'sd1 <<< (FRAC - 1))) >>> FRAC;
  endfunction

  task automatic check_all();
    for (int i = 0; i < 4; i++) begin
      longint c, d, p, q, er, ei;
      real xr, xi, tol;
      c = longint'(in_re[i]);
      d = longint'(in_im[i]);
      p = c + d;
      q = d - c;
      case (i)
        0: begin er = rnd( S * p); ei = rnd( S * q); end
        1: begin er = rnd( S * q); ei = rnd(-S * p); end
        2: begin er = rnd(-S * p); ei = rnd(-S * q); end
        default: begin er = rnd(-S * q); ei = rnd( S * p); end
      endcase
      checks++;
      if (longint'(out_re[i]) != er || longint'(out_im[i]) != ei) begin
        failures++;
        if (failures < 10)
          $display("FAIL exact oct=%0d in=(%0d,%0d) got (%0d,%0d) exp (%0d,%0d)",
                   2 * i + 1, c, d, out_re[i], out_im[i], er, ei);
      end
      xr = c * root_re(2 * i + 1, 8) - d * root_im(2 * i + 1, 8);
      xi = c * root_im(2 * i + 1, 8) + d * root_re(2 * i + 1, 8);
      tol = 1.0 + (fabs(c) + fabs(d)) * 2.0 ** (-FRAC);
      checks++;
      if (fabs(out_re[i] - xr) > tol || fabs(out_im[i] - xi) > tol) begin
        failures++;
        if (failures < 10)
          $display("FAIL real oct=%0d got (%0d,%0d) exp (%f,%f)", 2 * i + 1,
                   out_re[i], out_im[i], xr, xi);
      end
    end
  endtask

  initial begin
    repeat (5000) begin
      for (int i = 0; i < 4; i++) begin
        in_re[i] = W'($signed($urandom) >>> (32 - W + 1));
        in_im[i] = W'($signed($urandom) >>> (32 - W + 1));
      end
      @(posedge clk);
      check_all();
    end
    for (int s = 0; s < 4; s++) begin
      for (int i = 0; i < 4; i++) begin
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
