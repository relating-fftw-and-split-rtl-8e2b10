// fft_ref_pkg: reference arithmetic for the testbenches, in double precision
// and independent of the circuit: the direct O(N^2) DFT
//   Y_k = sum_j X_j e^{-i 2 pi j k / N}
// and the exact value of a root of unity.
package fft_ref_pkg;
  localparam real PI = 3.14159265358979323846;

  function automatic real root_re(int k, int n);
    return $cos(2.0 * PI * k / n);
  endfunction
  function automatic real root_im(int k, int n);
    return -$sin(2.0 * PI * k / n);
  endfunction

  function automatic void dft(input int n, input real xr[], input real xi[],
                              output real yr[], output real yi[]);
    yr = new[n];
    yi = new[n];
    for (int k = 0; k < n; k++) begin
      real sr, si;
      sr = 0.0;
      si = 0.0;
      for (int j = 0; j < n; j++) begin
        real c, s;
        c = root_re((j * k) % n, n);
        s = root_im((j * k) % n, n);
        sr += xr[j] * c - xi[j] * s;
        si += xr[j] * s + xi[j] * c;
      end
      yr[k] = sr;
      yi[k] = si;
    end
  endfunction

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction
endpackage
