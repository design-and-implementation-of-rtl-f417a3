// tb_fft_ref_pkg: floating-point reference DFT for the FFT testbenches.
//
// dft() computes X[k] = sum_n x[n] * exp(-j*2*pi*n*k/N) directly in double
// precision, independently of the fixed-point hardware.
package tb_fft_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  typedef real vec_t [];

  function automatic void dft(input vec_t x_re, input vec_t x_im,
                              output vec_t y_re, output vec_t y_im);
    int  n;
    real ang;
    n    = x_re.size();
    y_re = new[n];
    y_im = new[n];
    for (int k = 0; k < n; k++) begin
      y_re[k] = 0.0;
      y_im[k] = 0.0;
      for (int i = 0; i < n; i++) begin
        ang = -2.0 * PI * real'((i * k) % n) / real'(n);
        y_re[k] += x_re[i] * $cos(ang) - x_im[i] * $sin(ang);
        y_im[k] += x_re[i] * $sin(ang) + x_im[i] * $cos(ang);
      end
    end
  endfunction

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

endpackage
