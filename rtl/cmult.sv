// cmult: multiplies a complex data word by a twiddle factor (c - j*s).
//
// Result = (a_re + j*a_im) * (c - j*s)
//        = (a_re*c + a_im*s) + j*(a_im*c - a_re*s).
// c and s are Q2.14 words; the full-precision products are rounded to nearest
// (add half an LSB, shift right by 14) and cut back to the data width W.  The
// caller sizes W so that the result cannot overflow (|c - j*s| <= 1), so the
// bits of the rounded sums above W only repeat the sign and are dropped.  The
// unit is purely combinational.  The four-multiplier form and the rounding are
// this design's own choices.
module cmult
  import fft_pkg::*;
#(
  parameter int W = 26
) (
  input  logic signed [W-1:0]    a_re,
  input  logic signed [W-1:0]    a_im,
  input  logic signed [TW_W-1:0] c,
  input  logic signed [TW_W-1:0] s,
  output logic signed [W-1:0]    p_re,
  output logic signed [W-1:0]    p_im
);

  localparam int PW = W + TW_W + 1;

  logic signed [PW-1:0] xr, xi, xc, xs;
  logic signed [PW-1:0] sum_re, sum_im;
  logic signed [PW-1:0] rnd_re, rnd_im;

  always_comb begin
    xr     = PW'(a_re);
    xi     = PW'(a_im);
    xc     = PW'(c);
    xs     = PW'(s);
    sum_re = xr * xc + xi * xs;
    sum_im = xi * xc - xr * xs;
    rnd_re = (sum_re + (PW'(1) <<< (TW_FRAC - 1))) >>> TW_FRAC;
    rnd_im = (sum_im + (PW'(1) <<< (TW_FRAC - 1))) >>> TW_FRAC;
    p_re   = W'(rnd_re);
    p_im   = W'(rnd_im);
  end

endmodule
