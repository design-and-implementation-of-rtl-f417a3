// r4_butterfly: radix-4 decimation-in-frequency butterfly.
//
// From four points x0..x3 (spaced a quarter of the sub-transform apart) it
// forms the four-point DFT
//   y0 = (x0+x2) + (x1+x3)        y2 = (x0+x2) - (x1+x3)
//   y1 = (x0-x2) - j(x1-x3)       y3 = (x0-x2) + j(x1-x3)
// and multiplies y1, y2, y3 by the twiddles (c1 - j*s1), (c2 - j*s2),
// (c3 - j*s3).  y0 leaves without a multiplication.  Multiplying by -j or +j
// is only a swap of real and imaginary parts with a sign change, so the
// butterfly needs adders and three complex multipliers.
//
// real_only: the caller asserts it when all four inputs are known to be real
// (the Butterfly approach to the real FFT).  The imaginary inputs are then
// forced to zero so that the adders on the imaginary path do not toggle.  This
// is how this design cancels operations on data known to be real; the
// document does not say how its processor does it.
//
// Purely combinational.  The data width W is the same at input and output:
// the caller provides headroom for the growth of the transform.
module r4_butterfly
  import fft_pkg::*;
#(
  parameter int W = 26
) (
  input  logic                   real_only,
  input  logic signed [W-1:0]    x_re [4],
  input  logic signed [W-1:0]    x_im [4],
  input  logic signed [TW_W-1:0] tw_c [1:3],
  input  logic signed [TW_W-1:0] tw_s [1:3],
  output logic signed [W-1:0]    y_re [4],
  output logic signed [W-1:0]    y_im [4]
);

  logic signed [W-1:0] xi [4];
  logic signed [W-1:0] a0_re, a0_im, a1_re, a1_im, a2_re, a2_im, a3_re, a3_im;
  logic signed [W-1:0] b_re [4];
  logic signed [W-1:0] b_im [4];

  always_comb begin
    for (int i = 0; i < 4; i++) xi[i] = real_only ? '0 : x_im[i];
    a0_re = x_re[0] + x_re[2];  a0_im = xi[0] + xi[2];
    a1_re = x_re[0] - x_re[2];  a1_im = xi[0] - xi[2];
    a2_re = x_re[1] + x_re[3];  a2_im = xi[1] + xi[3];
    a3_re = x_re[1] - x_re[3];  a3_im = xi[1] - xi[3];
    // four-point DFT, -j*(a+jb) = b - ja
    b_re[0] = a0_re + a2_re;    b_im[0] = a0_im + a2_im;
    b_re[1] = a1_re + a3_im;    b_im[1] = a1_im - a3_re;
    b_re[2] = a0_re - a2_re;    b_im[2] = a0_im - a2_im;
    b_re[3] = a1_re - a3_im;    b_im[3] = a1_im + a3_re;
  end

  assign y_re[0] = b_re[0];
  assign y_im[0] = b_im[0];

  for (genvar m = 1; m < 4; m++) begin : g_tw
    cmult #(.W(W)) u_mul (
      .a_re (b_re[m]),
      .a_im (b_im[m]),
      .c    (tw_c[m]),
      .s    (tw_s[m]),
      .p_re (y_re[m]),
      .p_im (y_im[m])
    );
  end

endmodule
