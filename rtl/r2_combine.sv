// r2_combine: radix-2 butterfly that joins two half-size transforms.
//
// With E[k] the transform of the even-indexed samples and O[k] that of the
// odd-indexed samples (each of size M), the transform of size 2M is
//   X[k]     = E[k] + W_2M^k * O[k]
//   X[k + M] = E[k] - W_2M^k * O[k]
// This is the step that builds an N/2-point transform out of two N/4-point
// radix-4 transforms when N/2 is not a power of four (64-point input: 32 =
// 2 x 16; 256-point input: 128 = 2 x 64).  The twiddle arrives as (c, s) for
// W = c - j*s.  Purely combinational; same width W at input and output.
module r2_combine
  import fft_pkg::*;
#(
  parameter int W = 26
) (
  input  logic signed [W-1:0]    e_re,
  input  logic signed [W-1:0]    e_im,
  input  logic signed [W-1:0]    o_re,
  input  logic signed [W-1:0]    o_im,
  input  logic signed [TW_W-1:0] tw_c,
  input  logic signed [TW_W-1:0] tw_s,
  output logic signed [W-1:0]    lo_re,
  output logic signed [W-1:0]    lo_im,
  output logic signed [W-1:0]    hi_re,
  output logic signed [W-1:0]    hi_im
);

  logic signed [W-1:0] t_re, t_im;

  cmult #(.W(W)) u_mul (
    .a_re (o_re),
    .a_im (o_im),
    .c    (tw_c),
    .s    (tw_s),
    .p_re (t_re),
    .p_im (t_im)
  );

  assign lo_re = e_re + t_re;
  assign lo_im = e_im + t_im;
  assign hi_re = e_re - t_re;
  assign hi_im = e_im - t_im;

endmodule
